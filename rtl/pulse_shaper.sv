// pulse_shaper: half-sine pulse shaping of a chip stream, 4 samples per chip.
//
// Each chip becomes one half period of a sine, sampled four times:
// round(A*sin(pi*k/4)) for k = 0..3, i.e. 0, 1447, 2047, 1447 with A = 2047.
// A chip of logic 1 gives the positive half-sine and logic 0 the negative one.
// Half-sine shaping at 4 samples per chip follows the design; the sampling
// phase (k/4 rather than (k+1/2)/4), the amplitude and the 12-bit two's
// complement D/A word are this design's. With the Q channel half a chip
// behind I this gives a constant-envelope (circular) I/Q trajectory.
//
// Timing: registered. On a cycle with en high the sample for (chip, k) is
// computed; it appears on dout on the next clock edge and is held until the
// next en. With valid low the output returns to 0 (D/A mid-scale).
module pulse_shaper
  import dsss_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,     // sample-rate enable
  input  logic        valid,  // a chip is being transmitted
  input  logic        chip,   // spread chip, 1 = +1, 0 = -1
  input  sample_idx_t k,      // sample index within the chip
  output dac_sample_t dout    // D/A word
);
  dac_sample_t mag;

  always_comb mag = half_sine_mag(k);

  always_ff @(posedge clk) begin
    if (rst)         dout <= '0;
    else if (en)     dout <= !valid ? '0 : (chip ? mag : -mag);
  end

endmodule
