// fpga_q: the logic of FPGA_Q of the two-FPGA baseband transmitter.
//
// FPGA_Q derives its own sample timing and D/A clock from the shared 80 MHz
// board clock and spreads and shapes the differentially encoded Q bits it
// receives from FPGA_I with the PN_Q sequence. FPGA_I tells it, with q_start,
// when to begin; from then on the Q channel takes a new bit from q_bit every
// 127 chips on its own count, which puts it exactly half a chip behind the I
// channel. The LED shows the transmission state. The division of work follows
// the design; the signalling is this design's own.
//
// Timing: the first Q sample appears one sample period after q_start.
module fpga_q
  import dsss_pkg::*;
(
  input  logic        clk,      // 80 MHz board clock
  input  logic        rst,
  input  logic        q_bit,    // encoded Q bit from FPGA_I
  input  logic        q_start,  // start signal from FPGA_I
  output dac_sample_t dac_q,
  output logic        dac_clk,
  output logic        led
);
  logic sample_en;
  logic q_take, q_done;

  clk_gen u_clk (.clk, .rst, .sample_en, .dac_clk);

  spread_shape #(.PN_TAPS(PN_Q_TAPS)) u_ss_q (
    .clk, .rst, .sample_en, .start(q_start), .bit_in(q_bit),
    .bit_take(q_take), .active(led), .done(q_done), .dac_out(dac_q)
  );

endmodule
