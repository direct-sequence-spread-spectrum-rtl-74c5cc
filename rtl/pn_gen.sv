// pn_gen: 127-chip pseudo-noise sequence generator.
//
// A 7-stage Fibonacci linear feedback shift register: the state shifts
// towards the MSB, the new LSB is the XOR of the state bits selected by TAPS,
// and the chip is the MSB. With a primitive feedback (the defaults in
// dsss_pkg) the sequence is a maximal-length sequence of 127 chips, so it
// repeats exactly once per data bit. The 127-chip length follows the design;
// the design does not give the PN_I/PN_Q sequences, so the feedback
// polynomials and the all-ones seed are this design's own.
//
// Timing: chip is valid while the state is held; restart reloads SEED and
// step advances one chip, each on the next clock edge.
module pn_gen #(
  parameter logic [6:0] TAPS = dsss_pkg::PN_I_TAPS,
  parameter logic [6:0] SEED = dsss_pkg::PN_SEED
) (
  input  logic clk,
  input  logic rst,
  input  logic restart,  // reload the seed (chip 0)
  input  logic step,     // advance to the next chip
  output logic chip
);
  logic [6:0] state;

  initial assert (SEED != '0) else $error("pn_gen: all-zero seed locks the LFSR");

  always_ff @(posedge clk) begin
    if (rst || restart) state <= SEED;
    else if (step)      state <= {state[5:0], ^(state & TAPS)};
  end

  assign chip = state[6];

endmodule
