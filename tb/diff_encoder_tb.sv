// diff_encoder_tb: drives random bits into diff_encoder and checks every
// output against the +-1 product of the input and the previous output, and
// the reference reload.
module diff_encoder_tb;
  logic clk = 0, rst = 1, init = 0, en = 0, d = 0, q;
  int checks = 0, failures = 0;
  bit prev;
  int seen[4];

  diff_encoder dut (.clk, .rst, .init, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    checks++; if (q !== 1'b1) begin failures++; $display("reset value"); end
    prev = 1;
    for (int i = 0; i < 500; i++) begin
      en = ($urandom % 4) != 0;
      d  = $urandom % 2;
      init = (i % 97) == 50;
      @(posedge clk); #1;
      if (init) prev = 1;
      else if (en) begin
        seen[{d, prev}]++;
        prev = dsss_ref_pkg::prod(d, prev);
      end
      checks++;
      if (q !== prev) begin failures++; $display("step %0d: q=%b exp=%b", i, q, prev); end
    end
    en = 0; init = 0;
    // truth table: every row exercised
    for (int r = 0; r < 4; r++) begin
      checks++; if (seen[r] == 0) begin failures++; $display("row %0d never hit", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
