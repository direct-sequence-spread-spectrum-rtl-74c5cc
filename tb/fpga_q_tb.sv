// fpga_q_tb: tests FPGA_Q on its own. The testbench plays FPGA_I: it gives a
// q_start in one of FPGA_Q's sample cycles and then changes q_bit shortly
// after each instant FPGA_Q takes a bit (every 127 chips). Every D/A sample
// of the 64-bit burst is checked against the PN_Q spread, half-sine shaped
// reference, as are the LED and the D/A clock rate.
module fpga_q_tb;
  import dsss_ref_pkg::*;
  logic clk = 0, rst = 1, q_bit = 0, q_start = 0;
  logic dac_clk, led;
  logic [11:0] dac_q;
  int checks = 0, failures = 0;
  bit e[NSYM];
  bit tq[CHIPS];
  int got[$];
  logic dac_clk_d = 0;
  int rises = 0, cycles = 0;

  fpga_q dut (.clk, .rst, .q_bit, .q_start, .dac_q, .dac_clk, .led);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    dac_clk_d <= dac_clk;
    cycles <= cycles + 1;
    if (dac_clk && !dac_clk_d) begin
      rises <= rises + 1;
      if (led || got.size() > 0) got.push_back(int'(signed'(dac_q)));
    end
  end

  initial begin
    int q0;
    pn_table(3, tq);
    foreach (e[s]) e[s] = $urandom % 2;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    repeat (11) @(posedge clk);
    forever begin @(posedge clk); #1; if (dut.sample_en) break; end
    q_bit = e[0]; q_start = 1;
    @(posedge clk); #1 q_start = 0;
    checks++; if (!led) begin failures++; $display("LED off"); end
    for (int s = 1; s < NSYM; s++) begin
      repeat (CHIPS * SPC * CLKS_PER_SAMPLE - 2) @(posedge clk);
      #1 q_bit = e[s];
      @(posedge clk); @(posedge clk);
    end
    repeat (CHIPS * SPC * CLKS_PER_SAMPLE + 40) @(posedge clk);
    #1;
    checks++; if (led) begin failures++; $display("LED still on"); end
    q0 = -1;
    foreach (got[j]) if (q0 < 0 && got[j] != 0) q0 = j - 1;
    for (int s = 0; s < NSYM; s++) begin
      bit ok = 1;
      for (int j = s*CHIPS*SPC; j < (s+1)*CHIPS*SPC; j++)
        if (q0 < 0 || q0 + j >= got.size() ||
            got[q0 + j] != shaped(prod(e[s], tq[(j/SPC) % CHIPS]), j % SPC)) ok = 0;
      checks++; if (!ok) begin failures++; if (failures < 10) $display("symbol %0d wrong", s); end
    end
    checks++;
    if (q0 < 0 || q0 + NSYM*CHIPS*SPC >= got.size() || got[q0 + NSYM*CHIPS*SPC] != 0) begin
      failures++; $display("burst length wrong");
    end
    checks++; if (rises * 2 < cycles - 2 || rises * 2 > cycles + 2) begin failures++; $display("D/A clock rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
