// dsss_tx_full_tb: one complete operation of dsss_tx with every parameter at
// its default: the A/D is read every 1/3 s (26,666,667 cycles of 80 MHz), and
// after six readings (2 s of simulated time) the frame is sent once. The
// received burst is checked sample by sample and after despreading by
// dsss_rx_check, with the A/D period, the 40 MHz D/A clocks and the
// half-chip Q offset.
module dsss_tx_full_tb;
  localparam int PERIOD  = 26_666_667;   // default A/D period
  localparam int UNIT_ID = 16'h0001;     // default unit ID

  logic clk = 0, rst = 1;
  logic adc_convst, dac_clk_i, dac_clk_q, led_i, led_q;
  logic [11:0] adc_data;
  logic [11:0] dac_i, dac_q;
  int conversions;
  int checks, failures, frames, enc_flips, enc_holds, q_offsets, seq_steps;
  int my_checks = 0, my_failures = 0;
  longint cyc = 0, last_convst = -1, first_led = -1;
  logic led_i_d = 0;

  dsss_tx dut (
    .clk, .rst, .adc_convst, .adc_data, .dac_i, .dac_q,
    .dac_clk_i, .dac_clk_q, .led_i, .led_q);

  adc_model u_adc (.clk, .rst, .convst(adc_convst), .data(adc_data), .conversions);

  dsss_rx_check #(.UNIT_ID(UNIT_ID)) u_rx (
    .rst, .dac_clk(dac_clk_i), .dac_i, .dac_q, .led_i, .led_q,
    .checks, .failures, .frames, .enc_flips, .enc_holds, .q_offsets, .seq_steps);

  always #5 clk = ~clk;

  task automatic finish();
    $display("A/D reads %0d, frames %0d, Q offsets %0d, first burst at cycle %0d",
             conversions, frames, q_offsets, first_led);
    $display("TB_RESULT checks=%0d failures=%0d", checks + my_checks, failures + my_failures);
    $finish;
  endtask

  initial begin
    repeat (PERIOD * 7 + 200_000) @(posedge clk);
    my_failures++;
    $display("watchdog: %0d frames seen", frames);
    finish();
  end

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    led_i_d <= led_i;
    if (dac_clk_i !== dac_clk_q) begin my_failures++; my_checks++; end
    if (adc_convst) begin
      if (last_convst >= 0) begin
        my_checks++;
        if (cyc - last_convst != PERIOD) begin my_failures++; $display("A/D period %0d", cyc - last_convst); end
      end
      last_convst <= cyc;
    end
    if (led_i && !led_i_d && first_led < 0) first_led <= cyc;
  end

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 0;
    wait (frames == 1);
    // the burst starts just after the sixth reading, i.e. 6 A/D periods in
    my_checks++;
    if (first_led < 6 * PERIOD || first_led > 6 * PERIOD + 100) begin
      my_failures++; $display("burst at cycle %0d", first_led);
    end
    my_checks++; if (q_offsets != 1) begin my_failures++; $display("Q offset missing"); end
    my_checks++; if (enc_flips == 0 || enc_holds == 0) begin my_failures++; $display("encoder idle"); end
    finish();
  end
endmodule
