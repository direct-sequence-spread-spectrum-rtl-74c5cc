// dsss_pkg_tb: checks the shared constants of dsss_pkg against the system
// numbers they must encode (128 bits, 127 chips, 4 samples, 2-sample Q
// offset, 72 data bits completing the 128-bit frame), the half-sine table
// against round(2047*sin(pi*k/4)), and the frame header pattern.
module dsss_pkg_tb;
  import dsss_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;

  always #5 clk = ~clk;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    expect_eq("bits per frame", BITS_PER_FRAME, 128);
    expect_eq("symbols per frame", SYMBOLS_PER_FRAME, 64);
    expect_eq("chips per bit", CHIPS_PER_BIT, 127);
    expect_eq("samples per chip", SAMPLES_PER_CHIP, 4);
    expect_eq("Q offset", Q_OFFSET_SAMPLES, 2);
    expect_eq("clocks per sample", CLK_PER_SAMPLE, 2);
    expect_eq("frame fields", PREAMBLE_W + SYNC_W + ID_W + SEQ_W + DATA_W, 128);
    expect_eq("data field", DATA_W, 6 * 12);
    expect_eq("preamble", PREAMBLE, 16'hED37);
    expect_eq("sync", FRAME_SYNC, 8'h8F);
    for (int k = 0; k < 4; k++)
      expect_eq($sformatf("half-sine %0d", k), half_sine_mag(sample_idx_t'(k)), dsss_ref_pkg::mag(k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
