// clk_gen: derives the 40 MHz sample timing and the D/A converter clock from
// the 80 MHz board clock.
//
// A counter modulo DIV runs on the board clock. sample_en is a one-cycle
// enable, high once every DIV cycles; every sample-rate register in the design
// updates on the board clock edge that ends a cycle with sample_en high. The
// D/A clock is the divided clock inverted, as on the prototype: it is a
// register, so it has no glitches, and its rising edge falls half-way between
// two sample updates, when the D/A input word is stable. The divide ratio of 2
// (80 MHz to 40 MHz) is the design's; the counter form is this design's own.
//
// Timing (DIV = 2): sample_en is high every second cycle; dac_clk rises one
// board-clock cycle after each sample update.
module clk_gen #(
  parameter int unsigned DIV = dsss_pkg::CLK_PER_SAMPLE
) (
  input  logic clk,        // board clock, 80 MHz
  input  logic rst,        // synchronous, active high
  output logic sample_en,  // one-cycle enable at the 40 MHz sample rate
  output logic dac_clk     // inverted 40 MHz clock for the D/A converter
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt, cnt_nxt;

  always_comb cnt_nxt = (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      dac_clk <= 1'b0;
    end else begin
      cnt     <= cnt_nxt;
      // divided clock is high in the first half of a sample period; the D/A
      // clock is its inverse
      dac_clk <= !(cnt_nxt < CW'(DIV / 2));
    end
  end

  assign sample_en = (cnt == CW'(DIV - 1));

endmodule
