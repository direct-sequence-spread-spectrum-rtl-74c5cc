// spread_shape: spreads a differentially encoded bit stream with a 127-chip
// PN sequence and shapes each chip into four half-sine D/A samples.
//
// One instance serves the I channel and one the Q channel (with its own PN
// polynomial). A transmission is started by start; the first encoded bit is
// taken from bit_in in that cycle, and each further bit is taken at the end
// of the 127th chip of the previous one (bit_take marks both). Each chip is
// the XNOR of the held bit and the PN chip, which is the product of the two
// in +-1 terms. After SYMBOLS bits the channel stops, pulses done and drives
// the D/A word back to 0. Spreading with 127 chips and 4 half-sine samples per
// chip follow the design; the start/take handshake is this design's own.
//
// Timing: everything advances on cycles with sample_en high. start and
// bit_take are honoured/issued only in such cycles. The first sample of a
// transmission appears on dac_out one sample period after start; a
// transmission lasts SYMBOLS*CHIPS*4 sample periods (812.8 us at 40 MHz), so
// the channel carries one bit per 12.7 us. bit_in must be stable in the cycle
// bit_take is high.
module spread_shape
  import dsss_pkg::*;
#(
  parameter logic [6:0]  PN_TAPS = PN_I_TAPS,
  parameter int unsigned SYMBOLS = SYMBOLS_PER_FRAME,
  parameter int unsigned CHIPS   = CHIPS_PER_BIT
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sample_en,  // 40 MHz sample enable
  input  logic        start,      // begin a transmission (with sample_en)
  input  logic        bit_in,     // encoded bit
  output logic        bit_take,   // bit_in is taken in this cycle
  output logic        active,     // transmission state
  output logic        done,       // last sample of the transmission
  output dac_sample_t dac_out     // shaped samples for the D/A
);
  localparam int unsigned CW = $clog2(CHIPS);
  localparam int unsigned NW = (SYMBOLS > 1) ? $clog2(SYMBOLS) : 1;

  sample_idx_t sidx;
  logic [CW-1:0] cidx;
  logic [NW-1:0] nsym;
  logic          sym;
  logic          pn_chip, spread_chip;
  logic          go, last_sample_of_chip, last_chip, last_sym;

  assign go                  = sample_en && !active && start;
  assign last_sample_of_chip = (sidx == sample_idx_t'(SAMPLES_PER_CHIP - 1));
  assign last_chip           = last_sample_of_chip && (cidx == CW'(CHIPS - 1));
  assign last_sym            = (nsym == NW'(SYMBOLS - 1));
  assign done                = sample_en && active && last_chip && last_sym;
  assign bit_take            = go || (sample_en && active && last_chip && !last_sym);
  assign spread_chip         = ~(sym ^ pn_chip);

  pn_gen #(.TAPS(PN_TAPS), .SEED(PN_SEED)) u_pn (
    .clk     (clk),
    .rst     (rst),
    .restart (go),
    .step    (sample_en && active && last_sample_of_chip),
    .chip    (pn_chip)
  );

  pulse_shaper u_shape (
    .clk   (clk),
    .rst   (rst),
    .en    (sample_en),
    .valid (active),
    .chip  (spread_chip),
    .k     (sidx),
    .dout  (dac_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      sym    <= 1'b0;
      sidx   <= '0;
      cidx   <= '0;
      nsym   <= '0;
    end else if (go) begin
      active <= 1'b1;
      sym    <= bit_in;
      sidx   <= '0;
      cidx   <= '0;
      nsym   <= '0;
    end else if (sample_en && active) begin
      sidx <= sidx + 1'b1;
      if (last_sample_of_chip) begin
        cidx <= (cidx == CW'(CHIPS - 1)) ? '0 : cidx + 1'b1;
        if (cidx == CW'(CHIPS - 1)) begin
          if (last_sym) begin
            active <= 1'b0;
          end else begin
            nsym <= nsym + 1'b1;
            sym  <= bit_in;
          end
        end
      end
    end
  end

endmodule
