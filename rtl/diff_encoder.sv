// diff_encoder: differential encoder for one bit stream.
//
// The output is the product of the input and the previous output, with logic
// 1 read as +1 and logic 0 as -1; in logic terms it is the XNOR of the input
// bit and the previous output bit:
//   in prev | out
//    0   0  |  1
//    0   1  |  0
//    1   0  |  0
//    1   1  |  1
// The product-with-delayed-output structure and the truth table follow the
// design. The reference value the first bit of a frame is encoded against
// (REF, loaded by init) is this design's own choice.
//
// Timing: q holds the last encoded bit; it updates on the clock edge of a
// cycle with en high, so a bit presented with en appears one cycle later.
module diff_encoder #(
  parameter bit REF = 1'b1  // previous-output value assumed at frame start
) (
  input  logic clk,
  input  logic rst,
  input  logic init,  // reload the reference (start of frame)
  input  logic en,    // encode d
  input  logic d,     // raw bit
  output logic q      // encoded bit
);
  always_ff @(posedge clk) begin
    if (rst || init) q <= REF;
    else if (en)     q <= ~(d ^ q);
  end
endmodule
