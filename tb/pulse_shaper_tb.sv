// pulse_shaper_tb: checks every (chip, sample index) of pulse_shaper against
// round(2047*sin(pi*k/4)) with the chip's sign, the hold while en is low and
// the return to 0 when no chip is sent.
module pulse_shaper_tb;
  import dsss_pkg::*;
  logic clk = 0, rst = 1, en = 0, valid = 0, chip = 0;
  sample_idx_t k = '0;
  dac_sample_t dout;
  int checks = 0, failures = 0;
  int exp_v;

  pulse_shaper dut (.clk, .rst, .en, .valid, .chip, .k, .dout);

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
    for (int i = 0; i < 200; i++) begin
      valid = ($urandom % 8) != 0;
      chip  = $urandom % 2;
      k     = sample_idx_t'($urandom % 4);
      en    = 1;
      @(posedge clk); #1;
      exp_v = valid ? dsss_ref_pkg::shaped(chip, int'(k)) : 0;
      checks++;
      if (int'(dout) != exp_v) begin
        failures++; $display("chip=%b k=%0d valid=%b: %0d exp %0d", chip, k, valid, dout, exp_v);
      end
      // hold while en is low
      en = 0; chip = ~chip; valid = 1; k = k + 1'b1;
      @(posedge clk); #1;
      checks++;
      if (int'(dout) != exp_v) begin failures++; $display("not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
