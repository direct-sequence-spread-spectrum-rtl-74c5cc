// spread_shape_tb: runs a 3-bit transmission through an I-type and a Q-type
// spread_shape and checks every D/A sample against the reference (product of
// the bit and the m-sequence chip, half-sine shaped), the bit-take instants,
// the done pulse after 3 x 127 x 4 sample periods and the idle output after.
module spread_shape_tb;
  import dsss_pkg::*;
  localparam int NS = 3;
  localparam int SAMPLES = NS * 127 * 4;
  logic clk = 0, rst = 1, sample_en = 0, start = 0;
  logic bit_i, bit_q;
  logic take_i, take_q, act_i, act_q, done_i, done_q;
  dac_sample_t dac_i, dac_q;
  int checks = 0, failures = 0;
  bit bits_i[NS] = '{1, 0, 0};
  bit bits_q[NS] = '{0, 0, 1};
  bit ti[127], tq[127];
  int ntake_i = 0, ntake_q = 0;
  int se_count = 0, start_at = -1, done_at = -1;

  spread_shape #(.PN_TAPS(PN_I_TAPS), .SYMBOLS(NS)) dut_i (
    .clk, .rst, .sample_en, .start, .bit_in(bit_i),
    .bit_take(take_i), .active(act_i), .done(done_i), .dac_out(dac_i));
  spread_shape #(.PN_TAPS(PN_Q_TAPS), .SYMBOLS(NS)) dut_q (
    .clk, .rst, .sample_en, .start, .bit_in(bit_q),
    .bit_take(take_q), .active(act_q), .done(done_q), .dac_out(dac_q));

  always #5 clk = ~clk;
  always @(posedge clk) sample_en <= rst ? 1'b0 : !sample_en;

  // bit sources: next bit presented after each take
  assign bit_i = (ntake_i < NS) ? bits_i[ntake_i] : 1'b0;
  assign bit_q = (ntake_q < NS) ? bits_q[ntake_q] : 1'b0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (take_i) ntake_i <= ntake_i + 1;
    if (take_q) ntake_q <= ntake_q + 1;
    if (sample_en) se_count <= se_count + 1;
    if (sample_en && start) start_at <= se_count;
    if (done_i) done_at <= se_count;
    if (take_i) begin
      checks++;
      if (start_at >= 0 && (se_count - start_at) % 508 != 0) begin
        failures++; $display("take off the bit grid at %0d", se_count - start_at);
      end
    end
  end

  initial begin
    int j, s, c, k, ei, eq;
    dsss_ref_pkg::pn_table(1, ti);
    dsss_ref_pkg::pn_table(3, tq);
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    forever begin @(posedge clk); #1; if (sample_en) break; end
    start = 1;  // seen with sample_en at the next edge
    @(posedge clk); #1 start = 0;
    checks++; if (!act_i || !act_q) begin failures++; $display("not active"); end
    for (j = 0; j <= SAMPLES; j++) begin
      @(posedge clk); @(posedge clk); #1;  // one sample period
      s = j / 508; c = (j / 4) % 127; k = j % 4;
      ei = (j < SAMPLES) ? dsss_ref_pkg::shaped(dsss_ref_pkg::prod(bits_i[s], ti[c]), k) : 0;
      eq = (j < SAMPLES) ? dsss_ref_pkg::shaped(dsss_ref_pkg::prod(bits_q[s], tq[c]), k) : 0;
      checks++;
      if (int'(dac_i) != ei) begin failures++; if (failures < 10) $display("I sample %0d: %0d exp %0d", j, dac_i, ei); end
      checks++;
      if (int'(dac_q) != eq) begin failures++; if (failures < 10) $display("Q sample %0d: %0d exp %0d", j, dac_q, eq); end
    end
    checks++; if (ntake_i != NS || ntake_q != NS) begin failures++; $display("takes %0d %0d", ntake_i, ntake_q); end
    // done in the sample period of the last sample: NS*127*4 - 1 periods after start
    checks++; if (done_at - start_at != SAMPLES) begin failures++; $display("done after %0d", done_at - start_at); end
    checks++; if (act_i || act_q) begin failures++; $display("still active"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
