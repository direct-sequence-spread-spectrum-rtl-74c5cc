// fpga_i_tb: tests FPGA_I on its own with a short A/D period. dsss_rx_check
// checks the I D/A output of two frames; the testbench captures the encoded
// Q bits at the instants FPGA_Q would take them (q_start, then every 127
// chips) and checks them against the differentially encoded even frame bits,
// and checks that q_start comes two sample periods (4 board clocks) after
// the I channel took its first bit.
module fpga_i_tb;
  import dsss_ref_pkg::*;
  localparam int PERIOD  = 12_000;
  localparam int UNIT_ID = 16'h0BEE;

  logic clk = 0, rst = 1;
  logic adc_convst, dac_clk, led, q_bit, q_start;
  logic [11:0] adc_data, dac_i;
  int conversions;
  int checks, failures, frames, enc_flips, enc_holds, q_offsets, seq_steps;
  int my_checks = 0, my_failures = 0;
  longint cyc = 0, qs_at = -1;
  bit qb[$];
  int nqframes = 0;

  fpga_i #(.ADC_PERIOD(PERIOD), .UNIT_ID(16'(UNIT_ID))) dut (
    .clk, .rst, .adc_convst, .adc_data, .dac_i, .dac_clk, .led, .q_bit, .q_start);

  adc_model u_adc (.clk, .rst, .convst(adc_convst), .data(adc_data), .conversions);

  dsss_rx_check #(.UNIT_ID(UNIT_ID), .CHECK_Q(1'b0)) u_rx (
    .rst, .dac_clk, .dac_i, .dac_q(12'd0), .led_i(led), .led_q(1'b0),
    .checks, .failures, .frames, .enc_flips, .enc_holds, .q_offsets, .seq_steps);

  always #5 clk = ~clk;

  task automatic check_q_frame(int fr);
    bit f[128];
    int smp[6];
    bit prev = 1;
    bit ok = 1;
    for (int j = 0; j < 6; j++) smp[j] = adc_value(6*fr + j);
    build_frame(UNIT_ID, fr, smp, f);
    for (int s = 0; s < NSYM; s++) begin
      prev = prod(f[2*s+1], prev);
      if (qb[s] !== prev) ok = 0;
    end
    my_checks++;
    if (!ok) begin my_failures++; $display("frame %0d: encoded Q bits wrong", fr); end
  endtask

  // FPGA_I's own I-channel first take, seen through the hierarchy
  longint itake_at = -1;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (dut.i_take && dut.u_ctrl.i_start) itake_at <= cyc;
    if (q_start) begin
      qs_at <= cyc;
      qb.delete();
      qb.push_back(q_bit);
      my_checks++;
      if (cyc - itake_at != 2 * CLKS_PER_SAMPLE) begin
        my_failures++; $display("q_start %0d cycles after I start", cyc - itake_at);
      end
    end else if (qs_at >= 0 && (cyc - qs_at) % (CHIPS * SPC * CLKS_PER_SAMPLE) == 0 && qb.size() < NSYM) begin
      qb.push_back(q_bit);
      if (qb.size() == NSYM) begin
        check_q_frame(nqframes);
        nqframes <= nqframes + 1;
      end
    end
  end

  initial begin
    repeat (PERIOD * 6 * 3 + 100_000) @(posedge clk);
    my_failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + my_checks, failures + my_failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 0;
    wait (frames == 2);
    repeat (10) @(posedge clk);
    my_checks++; if (nqframes != 2) begin my_failures++; $display("Q frames %0d", nqframes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + my_checks, failures + my_failures);
    $finish;
  end
endmodule
