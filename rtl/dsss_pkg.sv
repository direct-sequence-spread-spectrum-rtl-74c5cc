// dsss_pkg: constants and types shared by the DS-SS OQPSK baseband transmitter.
//
// The numbers that define the air interface follow the system parameter
// table of the design: 128-bit frames, 127 chips per bit, 4 samples per chip,
// 10 MHz chip rate (40 MHz sample rate) and a 12-bit sensor A/D word. The
// frame layout below (field widths of preamble, sync word, unit ID, sequence
// number and sensor data), the D/A word width and the half-sine amplitudes are
// this design's own choices; only the 128-bit total and the list of fields are
// fixed by the design.
//
// Frame layout, bit 127 is sent first (frame bit 1, an odd bit, goes to I):
//   [127:112] preamble    16'b1110_1101_0011_0111
//   [111:104] frame sync   8'b1000_1111
//   [103:88]  transmitter unit ID
//   [87:72]   transmission sequence number
//   [71:0]    six 12-bit A/D samples, oldest in the most significant bits
package dsss_pkg;

  // Air-interface constants
  localparam int unsigned BITS_PER_FRAME    = 128;
  localparam int unsigned SYMBOLS_PER_FRAME = BITS_PER_FRAME / 2;  // one I and one Q bit per symbol
  localparam int unsigned CHIPS_PER_BIT     = 127;
  localparam int unsigned SAMPLES_PER_CHIP  = 4;
  localparam int unsigned Q_OFFSET_SAMPLES  = SAMPLES_PER_CHIP / 2; // OQPSK half-chip offset

  // Clocking: 80 MHz board clock, 40 MHz sample clock
  localparam int unsigned CLK_PER_SAMPLE    = 2;

  // Sensor A/D
  localparam int unsigned ADC_W             = 12;
  localparam int unsigned SAMPLES_PER_FRAME = 6;
  localparam int unsigned DATA_W            = ADC_W * SAMPLES_PER_FRAME;  // 72

  // Frame fields
  localparam int unsigned PREAMBLE_W = 16;
  localparam int unsigned SYNC_W     = 8;
  localparam int unsigned ID_W       = 16;
  localparam int unsigned SEQ_W      = 16;
  localparam logic [PREAMBLE_W-1:0] PREAMBLE   = 16'b1110_1101_0011_0111;
  localparam logic [SYNC_W-1:0]     FRAME_SYNC = 8'b1000_1111;

  // D/A samples: two's complement, half-sine amplitude round(A*sin(pi*k/4))
  localparam int unsigned DAC_W   = 12;
  localparam int          DAC_AMP = 2047;
  typedef logic signed [DAC_W-1:0] dac_sample_t;
  typedef logic [$clog2(SAMPLES_PER_CHIP)-1:0] sample_idx_t;

  // Half-sine magnitude of sample k of a chip, k = 0..3: 0, A/sqrt2, A, A/sqrt2
  function automatic dac_sample_t half_sine_mag(sample_idx_t k);
    case (k)
      2'd0:    return dac_sample_t'(0);
      2'd1:    return dac_sample_t'(1447);
      2'd2:    return dac_sample_t'(DAC_AMP);
      default: return dac_sample_t'(1447);
    endcase
  endfunction

  typedef logic [BITS_PER_FRAME-1:0] frame_t;

  // PN generators: 7-stage Fibonacci LFSRs (maximal length, period 127).
  // Feedback mask over the state; the new bit is the XOR of the masked bits.
  localparam logic [6:0] PN_I_TAPS = 7'b110_0000;  // a[n+7] = a[n] ^ a[n+1]
  localparam logic [6:0] PN_Q_TAPS = 7'b100_1000;  // a[n+7] = a[n] ^ a[n+3]
  localparam logic [6:0] PN_SEED   = 7'b111_1111;

endpackage
