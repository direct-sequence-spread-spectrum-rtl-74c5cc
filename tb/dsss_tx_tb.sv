// dsss_tx_tb: end-to-end test of the two-FPGA transmitter with a short A/D
// period (12,000 cycles, so that six readings take longer than one burst).
//
// An A/D model feeds the sensor interface; dsss_rx_check samples both D/A
// outputs and checks three complete frames sample by sample and after
// despreading. The test also checks the D/A clocks (40 MHz, the same phase on
// both devices), the A/D period, the burst rate (one frame per six A/D
// periods) and that each mechanism occurred: A/D reads, frame assembly with a
// stepping sequence number, both outcomes of differential encoding, the
// half-chip Q offset and both transmission-state LEDs.
module dsss_tx_tb;
  localparam int PERIOD  = 12_000;
  localparam int UNIT_ID = 16'h3C5A;
  localparam int NFRAMES = 3;

  logic clk = 0, rst = 1;
  logic adc_convst, dac_clk_i, dac_clk_q, led_i, led_q;
  logic [11:0] adc_data;
  logic [11:0] dac_i, dac_q;
  int conversions;
  int checks, failures, frames, enc_flips, enc_holds, q_offsets, seq_steps;
  int my_checks = 0, my_failures = 0;
  longint cyc = 0, last_convst = -1, led_rise[$];
  int dac_clk_edges = 0, led_q_on = 0;
  logic led_i_d = 0, led_q_d = 0, dac_clk_d = 0;

  dsss_tx #(.ADC_PERIOD(PERIOD), .UNIT_ID(16'(UNIT_ID))) dut (
    .clk, .rst, .adc_convst, .adc_data, .dac_i, .dac_q,
    .dac_clk_i, .dac_clk_q, .led_i, .led_q);

  adc_model u_adc (.clk, .rst, .convst(adc_convst), .data(adc_data), .conversions);

  dsss_rx_check #(.UNIT_ID(UNIT_ID)) u_rx (
    .rst, .dac_clk(dac_clk_i), .dac_i, .dac_q, .led_i, .led_q,
    .checks, .failures, .frames, .enc_flips, .enc_holds, .q_offsets, .seq_steps);

  always #5 clk = ~clk;

  task automatic finish();
    $display("A/D reads %0d, frames %0d, encoder flips %0d holds %0d, Q offsets %0d, sequence steps %0d, Q LED bursts %0d",
             conversions, frames, enc_flips, enc_holds, q_offsets, seq_steps, led_q_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks + my_checks, failures + my_failures);
    $finish;
  endtask

  initial begin
    repeat (PERIOD * 6 * (NFRAMES + 1) + 100_000) @(posedge clk);
    my_failures++;
    $display("watchdog: %0d frames seen", frames);
    finish();
  end

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    led_i_d <= led_i; led_q_d <= led_q; dac_clk_d <= dac_clk_i;
    // both D/A clocks run in phase; one rising edge every 2 board clocks
    my_checks++;
    if (dac_clk_i !== dac_clk_q) begin my_failures++; $display("D/A clocks out of phase"); end
    if (dac_clk_i && !dac_clk_d) dac_clk_edges <= dac_clk_edges + 1;
    if (adc_convst) begin
      if (last_convst >= 0) begin
        my_checks++;
        if (cyc - last_convst != PERIOD) begin my_failures++; $display("A/D period %0d", cyc - last_convst); end
      end
      last_convst <= cyc;
    end
    if (led_i && !led_i_d) led_rise.push_back(cyc);
    if (led_q && !led_q_d) led_q_on <= led_q_on + 1;
  end

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 0;
    wait (frames == NFRAMES);
    repeat (10) @(posedge clk);
    // 40 MHz D/A clock from the 80 MHz board clock
    my_checks++;
    if (dac_clk_edges * 2 < cyc - 2 || dac_clk_edges * 2 > cyc + 2) begin
      my_failures++; $display("D/A clock edges %0d in %0d cycles", dac_clk_edges, cyc);
    end
    // one frame per six A/D periods
    for (int k = 1; k < led_rise.size(); k++) begin
      my_checks++;
      if (led_rise[k] - led_rise[k-1] != 6 * PERIOD) begin
        my_failures++; $display("frame spacing %0d", led_rise[k] - led_rise[k-1]);
      end
    end
    // every mechanism must have happened
    my_checks++; if (conversions < 6 * NFRAMES) begin my_failures++; $display("too few A/D reads"); end
    my_checks++; if (seq_steps != NFRAMES)    begin my_failures++; $display("sequence did not step"); end
    my_checks++; if (enc_flips == 0)          begin my_failures++; $display("encoder never flipped"); end
    my_checks++; if (enc_holds == 0)          begin my_failures++; $display("encoder never held"); end
    my_checks++; if (q_offsets != NFRAMES)    begin my_failures++; $display("Q offset missing"); end
    my_checks++; if (led_rise.size() != NFRAMES || led_q_on != NFRAMES) begin
      my_failures++; $display("LED bursts %0d/%0d", led_rise.size(), led_q_on);
    end
    finish();
  end
endmodule
