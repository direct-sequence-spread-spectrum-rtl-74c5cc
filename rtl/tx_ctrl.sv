// tx_ctrl: transmission controller of FPGA_I.
//
// Counts the A/D samples read since the last frame. When SAMPLES_PER_FRAME
// (6) have arrived it has the frame assembled (LOAD, which also resets the
// differential encoders to their reference), encodes the first bit pair
// (ENC0), waits for a sample_en cycle and starts the I channel (START), stays
// in the transmission state while the I channel sends the frame (TX), and
// then waits one chip (GUARD) so that the Q channel, half a chip behind,
// has finished before the next frame may begin. The transmission state
// drives the LED. The design names the transmission state and the LED; the
// state sequence and the samples-per-frame trigger are this design's own.
//
// Timing: frame_load, enc_init and frame_start are one-cycle pulses in LOAD,
// enc_first is one cycle later, i_start is a one-cycle pulse coincident with
// sample_en.
module tx_ctrl
  import dsss_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic sample_en,
  input  logic sample_valid,  // new A/D sample shifted into the frame buffer
  input  logic i_done,        // I channel finished the frame
  input  logic q_busy,        // Q-offset pipeline still has events in flight
  output logic frame_load,    // assemble frame (to frame_assembler)
  output logic enc_init,      // reset encoder references
  output logic frame_start,   // the next I take starts a frame
  output logic enc_first,     // encode bit pair 0
  output logic i_start,       // start the I channel
  output logic tx_state       // transmission state (LED)
);
  typedef enum logic [2:0] {COLLECT, LOAD, ENC0, START, TX, GUARD} state_t;
  state_t state;

  localparam int unsigned SW = $clog2(SAMPLES_PER_FRAME + 1);
  localparam int unsigned GW = $clog2(SAMPLES_PER_CHIP + 1);
  logic [SW-1:0] nsamples;
  logic [GW-1:0] guard_cnt;

  assign frame_load  = (state == LOAD);
  assign enc_init    = (state == LOAD);
  assign frame_start = (state == LOAD);
  assign enc_first   = (state == ENC0);
  assign i_start     = (state == START) && sample_en;
  assign tx_state    = (state == START) || (state == TX) || (state == GUARD);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= COLLECT;
      nsamples  <= '0;
      guard_cnt <= '0;
    end else begin
      // sample counter: cleared when a frame is loaded, saturating
      if (state == LOAD)
        nsamples <= SW'(sample_valid);
      else if (sample_valid && nsamples != SW'(SAMPLES_PER_FRAME))
        nsamples <= nsamples + 1'b1;

      unique case (state)
        COLLECT: if (nsamples == SW'(SAMPLES_PER_FRAME)) state <= LOAD;
        LOAD:    state <= ENC0;
        ENC0:    state <= START;
        START:   if (sample_en) state <= TX;
        TX:      if (i_done) begin
                   state     <= GUARD;
                   guard_cnt <= '0;
                 end
        GUARD:   if (sample_en) begin
                   if (guard_cnt == GW'(SAMPLES_PER_CHIP - 1) && !q_busy) state <= COLLECT;
                   else if (guard_cnt != GW'(SAMPLES_PER_CHIP - 1)) guard_cnt <= guard_cnt + 1'b1;
                 end
        default: state <= COLLECT;
      endcase
    end
  end

endmodule
