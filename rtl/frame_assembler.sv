// frame_assembler: builds the 128-bit transmission frame and shifts out its
// odd (I) and even (Q) bit streams one bit at a time.
//
// A 72-bit shift register collects the six most recent A/D samples. On load
// the frame is formed as preamble, frame sync, unit ID, sequence number and
// sensor data (layout in dsss_pkg), the sequence number is incremented, and
// the frame is split: frame bits 1, 3, 5, ... (counting from the first bit
// sent) fill the 64-bit I register and bits 2, 4, 6, ... the Q register.
// i_bit and q_bit show the current pair; advance shifts both registers by one.
// The list of fields and the odd/even split follow the design; the field
// widths, the sample buffer and the sequence counter width are this design's.
//
// Timing: i_bit/q_bit change on the clock edge after load or advance.
module frame_assembler
  import dsss_pkg::*;
#(
  parameter logic [ID_W-1:0] UNIT_ID = 16'h0001
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [ADC_W-1:0]   sample,        // A/D sample
  input  logic               sample_valid,  // shift sample into the data field
  input  logic               load,          // assemble a new frame
  input  logic               advance,       // move to the next bit pair
  output logic               i_bit,         // current odd (I) bit
  output logic               q_bit,         // current even (Q) bit
  output logic [SEQ_W-1:0]   seq_num        // sequence number of the next frame
);
  logic [DATA_W-1:0]            data_buf;
  logic [SYMBOLS_PER_FRAME-1:0] i_reg, q_reg;
  frame_t                       frame;

  assign frame = {PREAMBLE, FRAME_SYNC, UNIT_ID, seq_num, data_buf};

  always_ff @(posedge clk) begin
    if (rst) begin
      data_buf <= '0;
      seq_num  <= '0;
      i_reg    <= '0;
      q_reg    <= '0;
    end else begin
      if (sample_valid)
        data_buf <= {data_buf[DATA_W-ADC_W-1:0], sample};
      if (load) begin
        seq_num <= seq_num + 1'b1;
        for (int k = 0; k < SYMBOLS_PER_FRAME; k++) begin
          // pair k holds frame bits 2k+1 (odd) and 2k+2 (even), MSB first
          i_reg[SYMBOLS_PER_FRAME-1-k] <= frame[BITS_PER_FRAME-1-2*k];
          q_reg[SYMBOLS_PER_FRAME-1-k] <= frame[BITS_PER_FRAME-2-2*k];
        end
      end else if (advance) begin
        i_reg <= {i_reg[SYMBOLS_PER_FRAME-2:0], 1'b0};
        q_reg <= {q_reg[SYMBOLS_PER_FRAME-2:0], 1'b0};
      end
    end
  end

  assign i_bit = i_reg[SYMBOLS_PER_FRAME-1];
  assign q_bit = q_reg[SYMBOLS_PER_FRAME-1];

endmodule
