// clk_gen_tb: checks the sample enable and the inverted D/A clock of clk_gen
// for the default divide-by-2 and for a divide-by-4 instance, against a
// counter kept in the testbench.
module clk_gen_tb;
  logic clk = 0, rst = 1;
  logic se2, dc2, se4, dc4;
  int checks = 0, failures = 0;
  int n = 0;
  int ne2 = 0, rises2 = 0;
  logic dc2_prev;

  clk_gen            dut2 (.clk, .rst, .sample_en(se2), .dac_clk(dc2));
  clk_gen #(.DIV(4)) dut4 (.clk, .rst, .sample_en(se4), .dac_clk(dc4));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);  // first edge out of reset: counters at 1
    n = 1;
    dc2_prev = dc2;
    repeat (400) begin
      #1;
      checks++; if (se2 !== ((n % 2) == 1)) begin failures++; $display("se2 wrong at %0d", n); end
      checks++; if (dc2 !== ((n % 2) >= 1)) begin failures++; $display("dc2 wrong at %0d", n); end
      checks++; if (se4 !== ((n % 4) == 3)) begin failures++; $display("se4 wrong at %0d", n); end
      checks++; if (dc4 !== ((n % 4) >= 2)) begin failures++; $display("dc4 wrong at %0d", n); end
      if (se2) ne2++;
      if (dc2 && !dc2_prev) rises2++;
      dc2_prev = dc2;
      @(posedge clk);
      n++;
    end
    // 40 MHz from 80 MHz: one enable and one D/A clock edge every 2 cycles
    checks++; if (ne2 != 200)    begin failures++; $display("enable count %0d", ne2); end
    checks++; if (rises2 != 200) begin failures++; $display("dac_clk rises %0d", rises2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
