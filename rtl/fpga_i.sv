// fpga_i: the logic of FPGA_I of the two-FPGA baseband transmitter.
//
// FPGA_I reads the sensor A/D, assembles the 128-bit frame, splits it into
// odd (I) and even (Q) bits, differentially encodes both streams, spreads and
// shapes the I stream for its D/A, and hands the encoded Q bits plus a start
// signal to FPGA_Q, which runs the Q channel half a chip (2 samples) later.
// This split of functions between the two devices follows the design; the
// inter-FPGA signalling (q_bit held stable, one q_start pulse per frame) is
// this design's own.
//
// Interface: 80 MHz board clock and synchronous reset in; A/D convert strobe
// out and 12-bit A/D word in; 12-bit two's complement I samples and the
// inverted 40 MHz clock to the I D/A; LED; q_bit and q_start to FPGA_Q.
// Timing: a frame goes out SAMPLES_PER_FRAME A/D periods after the previous
// one was started, and lasts 64 x 127 x 4 sample periods.
module fpga_i
  import dsss_pkg::*;
#(
  parameter int unsigned     ADC_PERIOD  = 26_666_667,  // T in board cycles
  parameter int unsigned     ADC_CONV    = 8,
  parameter logic [ID_W-1:0] UNIT_ID     = 16'h0001
) (
  input  logic             clk,         // 80 MHz board clock
  input  logic             rst,
  output logic             adc_convst,
  input  logic [ADC_W-1:0] adc_data,
  output dac_sample_t      dac_i,
  output logic             dac_clk,
  output logic             led,
  output logic             q_bit,       // encoded Q bit, to FPGA_Q
  output logic             q_start      // start of the Q channel, to FPGA_Q
);
  logic sample_en;
  logic [ADC_W-1:0] sample;
  logic sample_valid;
  logic frame_load, enc_init, frame_start, enc_first, i_start, tx_state;
  logic raw_i, raw_q, enc_i, enc_q, enc_en, advance, advance_d;
  logic i_take, i_active, i_done, q_take, q_busy;
  logic [SEQ_W-1:0] seq_num;

  clk_gen u_clk (.clk, .rst, .sample_en, .dac_clk);

  adc_if #(.PERIOD(ADC_PERIOD), .CONV_CYCLES(ADC_CONV)) u_adc (
    .clk, .rst, .adc_convst, .adc_data, .sample, .sample_valid
  );

  tx_ctrl u_ctrl (
    .clk, .rst, .sample_en, .sample_valid, .i_done, .q_busy,
    .frame_load, .enc_init, .frame_start, .enc_first, .i_start, .tx_state
  );

  frame_assembler #(.UNIT_ID(UNIT_ID)) u_frame (
    .clk, .rst, .sample, .sample_valid,
    .load(frame_load), .advance,
    .i_bit(raw_i), .q_bit(raw_q), .seq_num
  );

  // encoders take the new pair one cycle after the shifter has moved
  always_ff @(posedge clk) begin
    if (rst) advance_d <= 1'b0;
    else     advance_d <= advance;
  end
  assign enc_en = enc_first || advance_d;

  diff_encoder u_enc_i (.clk, .rst, .init(enc_init), .en(enc_en), .d(raw_i), .q(enc_i));
  diff_encoder u_enc_q (.clk, .rst, .init(enc_init), .en(enc_en), .d(raw_q), .q(enc_q));

  spread_shape #(.PN_TAPS(PN_I_TAPS)) u_ss_i (
    .clk, .rst, .sample_en, .start(i_start), .bit_in(enc_i),
    .bit_take(i_take), .active(i_active), .done(i_done), .dac_out(dac_i)
  );

  q_offset_ctrl u_qoff (
    .clk, .rst, .sample_en, .frame_start, .i_take,
    .q_start, .q_take, .advance, .busy(q_busy)
  );

  assign q_bit = enc_q;
  assign led   = tx_state;

endmodule
