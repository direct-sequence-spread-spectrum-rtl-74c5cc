// q_offset_ctrl: generates the control signal that starts the Q channel half
// a chip after the I channel, and paces the frame shifter.
//
// The I channel's bit_take events are delayed by Q_OFFSET_SAMPLES (2) sample
// periods in a small shift register clocked by sample_en. The delayed event
// is the instant the Q channel takes its bit: the first one of a frame goes
// out as q_start (the signal from FPGA_I to FPGA_Q), and one board-clock
// cycle after every delayed event advance asks the frame shifter and the
// encoders for the next bit pair, after both channels have taken the current
// one. Generating the Q start on the I side with a 2-sample delay follows the
// design; the advance pacing is this design's own.
//
// Timing: q_start is high in the sample_en cycle Q_OFFSET_SAMPLES sample
// periods after i_take; advance is high in the next board-clock cycle.
module q_offset_ctrl #(
  parameter int unsigned DELAY = dsss_pkg::Q_OFFSET_SAMPLES
) (
  input  logic clk,
  input  logic rst,
  input  logic sample_en,
  input  logic frame_start,  // the coming i_take is the first of a frame
  input  logic i_take,       // I channel took a bit (in a sample_en cycle)
  output logic q_start,      // start the Q channel
  output logic q_take,       // Q channel takes a bit now
  output logic advance,      // fetch the next bit pair
  output logic busy          // a delayed event is still in flight
);
  logic [DELAY-1:0] take_d;   // delayed take events
  logic [DELAY-1:0] first_d;  // ... and whether each was a frame's first
  logic             first_pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      take_d        <= '0;
      first_d       <= '0;
      first_pending <= 1'b0;
      advance       <= 1'b0;
    end else begin
      if (frame_start) first_pending <= 1'b1;
      else if (sample_en && i_take) first_pending <= 1'b0;
      if (sample_en) begin
        take_d  <= {take_d[DELAY-2:0],  i_take};
        first_d <= {first_d[DELAY-2:0], i_take && first_pending};
      end
      advance <= q_take;
    end
  end

  assign q_take  = sample_en && take_d[DELAY-1];
  assign q_start = sample_en && first_d[DELAY-1];
  assign busy    = |take_d || advance;

  initial assert (DELAY >= 2) else $error("q_offset_ctrl: DELAY must be at least 2");

endmodule
