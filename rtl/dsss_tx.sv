// dsss_tx: baseband DS-SS OQPSK transmitter built from two FPGAs.
//
// A sensor A/D is read every period T; six readings, a preamble, a frame sync
// word, the unit ID and a sequence number make a 128-bit frame. Odd bits go
// to the I channel and even bits to the Q channel; each stream is
// differentially encoded, spread by its own 127-chip PN sequence at 10 Mchip/s
// and shaped with half-sine pulses at 4 samples per chip. The Q channel runs
// half a chip (2 samples) behind I, which gives offset QPSK with a constant
// envelope. fpga_i holds everything but the Q spreading and shaping, which is
// in fpga_q; the two are connected by q_bit and q_start, as on the two-FPGA
// prototype board. The D/A and A/D converters and the RF up-conversion are
// outside this module.
//
// Interface: one 80 MHz board clock and reset for both devices; A/D strobe
// and data; two 12-bit two's complement D/A words with their inverted 40 MHz
// clocks; the two transmission-state LEDs.
module dsss_tx
  import dsss_pkg::*;
#(
  parameter int unsigned     ADC_PERIOD = 26_666_667,  // 1/3 s at 80 MHz
  parameter logic [ID_W-1:0] UNIT_ID    = 16'h0001
) (
  input  logic             clk,
  input  logic             rst,
  output logic             adc_convst,
  input  logic [ADC_W-1:0] adc_data,
  output dac_sample_t      dac_i,
  output dac_sample_t      dac_q,
  output logic             dac_clk_i,
  output logic             dac_clk_q,
  output logic             led_i,
  output logic             led_q
);
  logic q_bit, q_start;

  fpga_i #(.ADC_PERIOD(ADC_PERIOD), .UNIT_ID(UNIT_ID)) u_fpga_i (
    .clk, .rst, .adc_convst, .adc_data,
    .dac_i, .dac_clk(dac_clk_i), .led(led_i), .q_bit, .q_start
  );

  fpga_q u_fpga_q (
    .clk, .rst, .q_bit, .q_start,
    .dac_q, .dac_clk(dac_clk_q), .led(led_q)
  );

endmodule
