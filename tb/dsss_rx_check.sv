// dsss_rx_check: testbench receiver and checker for the transmitter's D/A
// outputs.
//
// It samples the I and Q D/A words on each rising edge of the D/A clock, as
// the converters would, and cuts the stream into bursts at the LEDs. For
// burst n it builds the expected frame (preamble, sync, UNIT_ID, sequence
// number n, A/D readings 6n..6n+5 of adc_model) and checks:
//  - every sample of all 64 symbols against the reference waveform
//    (differential encoding, m-sequence spreading, half-sine shaping);
//  - that the burst is exactly 64 x 127 x 4 samples long;
//  - that Q starts exactly 2 samples (half a chip) after I;
//  - the frame recovered by despreading (correlation with the PN sequence)
//    and differential decoding, field by field.
// It also counts the events the end-to-end tests must see at least once.
module dsss_rx_check #(
  parameter int UNIT_ID = 1,
  parameter bit CHECK_Q = 1'b1
) (
  input  logic        rst,
  input  logic        dac_clk,
  input  logic [11:0] dac_i,
  input  logic [11:0] dac_q,
  input  logic        led_i,
  input  logic        led_q,
  output int          checks,
  output int          failures,
  output int          frames,
  output int          enc_flips,    // encoded bit differs from previous one
  output int          enc_holds,    // encoded bit equals previous one
  output int          q_offsets,    // bursts with Q half a chip behind I
  output int          seq_steps     // sequence number one above the last
);
  import dsss_ref_pkg::*;
  localparam int BURST = NSYM * CHIPS * SPC;

  int qi[$], qq[$];
  bit capturing = 0;
  int quiet = 0;
  bit ti[CHIPS], tq[CHIPS];
  int last_seq = -1;

  initial begin
    checks = 0; failures = 0; frames = 0;
    enc_flips = 0; enc_holds = 0; q_offsets = 0; seq_steps = 0;
    pn_table(1, ti);
    pn_table(3, tq);
  end

  function automatic int sx(logic [11:0] v);
    return int'(signed'(v));
  endfunction

  function automatic void fail(string msg);
    failures++;
    if (failures < 20) $display("rx_check: %s", msg);
  endfunction

  // despread and differentially decode one channel; returns the raw bits
  function automatic void demod(const ref int q[$], int base, const ref bit t[CHIPS],
                                output bit raw[NSYM], output bit enc[NSYM]);
    bit prev = 1'b1;
    for (int s = 0; s < NSYM; s++) begin
      int corr = 0;
      for (int c = 0; c < CHIPS; c++)
        corr += sx(12'(q[base + s*CHIPS*SPC + c*SPC + 2])) * (t[c] ? 1 : -1);
      enc[s] = corr > 0;
      raw[s] = prod(enc[s], prev);  // x*y*y = x: the product undoes the encoding
      prev   = enc[s];
    end
  endfunction

  task automatic analyse();
    bit f[128];
    int smp[6];
    bit ei[NSYM], eq[NSYM], ri[NSYM], rq[NSYM], di[NSYM], dq[NSYM];
    bit pi = 1, pq = 1;
    int i0 = -1, q0 = -1;
    int fr = frames;
    bit got[128];
    int v;

    for (int j = 0; j < 6; j++) smp[j] = adc_value(6*fr + j);
    build_frame(UNIT_ID, fr, smp, f);
    for (int s = 0; s < NSYM; s++) begin
      ei[s] = prod(f[2*s], pi);   pi = ei[s];
      eq[s] = prod(f[2*s+1], pq); pq = eq[s];
      if (s > 0) begin
        if (ei[s] != ei[s-1]) enc_flips++; else enc_holds++;
      end
    end
    foreach (qi[j]) if (i0 < 0 && qi[j] != 0) i0 = j - 1;
    foreach (qq[j]) if (q0 < 0 && qq[j] != 0) q0 = j - 1;
    checks++;
    if (i0 < 0 || i0 + BURST >= qi.size()) begin
      fail($sformatf("frame %0d: I burst not found (start %0d, %0d samples)", fr, i0, qi.size()));
      frames++;
      return;
    end
    // sample-exact waveform, one check per symbol
    for (int s = 0; s < NSYM; s++) begin
      bit ok = 1;
      for (int j = s*CHIPS*SPC; j < (s+1)*CHIPS*SPC; j++)
        if (sx(12'(qi[i0 + j])) != shaped(prod(ei[s], ti[(j/SPC) % CHIPS]), j % SPC)) ok = 0;
      checks++; if (!ok) fail($sformatf("frame %0d: I symbol %0d waveform", fr, s));
    end
    checks++;
    if (qi[i0 + BURST] != 0) fail($sformatf("frame %0d: I burst longer than %0d samples", fr, BURST));
    demod(qi, i0, ti, ri, di);
    if (CHECK_Q) begin
      checks++;
      if (q0 - i0 != SPC / 2) fail($sformatf("frame %0d: Q offset %0d samples", fr, q0 - i0));
      else q_offsets++;
      if (q0 >= 0 && q0 + BURST < qq.size()) begin
        for (int s = 0; s < NSYM; s++) begin
          bit ok = 1;
          for (int j = s*CHIPS*SPC; j < (s+1)*CHIPS*SPC; j++)
            if (sx(12'(qq[q0 + j])) != shaped(prod(eq[s], tq[(j/SPC) % CHIPS]), j % SPC)) ok = 0;
          checks++; if (!ok) fail($sformatf("frame %0d: Q symbol %0d waveform", fr, s));
        end
        checks++;
        if (qq[q0 + BURST] != 0) fail($sformatf("frame %0d: Q burst too long", fr));
        demod(qq, q0, tq, rq, dq);
      end else begin
        checks++; fail($sformatf("frame %0d: Q burst not found", fr));
      end
    end
    // reassemble the frame from the received I (odd) and Q (even) bits
    for (int s = 0; s < NSYM; s++) begin
      got[2*s]   = ri[s];
      got[2*s+1] = CHECK_Q ? rq[s] : f[2*s+1];
    end
    begin
      bit [15:0] pre = '0; bit [7:0] sync = '0; bit [15:0] id = '0, seq = '0;
      bit ok = 1;
      for (int k = 0; k < 16; k++) pre  = {pre[14:0],  got[k]};
      for (int k = 16; k < 24; k++) sync = {sync[6:0], got[k]};
      for (int k = 24; k < 40; k++) id   = {id[14:0],  got[k]};
      for (int k = 40; k < 56; k++) seq  = {seq[14:0], got[k]};
      checks++; if (pre  != 16'hED37) fail($sformatf("frame %0d: preamble %h", fr, pre));
      checks++; if (sync != 8'h8F)    fail($sformatf("frame %0d: sync %h", fr, sync));
      checks++; if (id   != 16'(UNIT_ID)) fail($sformatf("frame %0d: unit id %h", fr, id));
      checks++; if (int'(seq) != fr)  fail($sformatf("frame %0d: sequence %0d", fr, seq));
      if (int'(seq) == last_seq + 1) seq_steps++;
      last_seq = int'(seq);
      for (int j = 0; j < 6; j++) begin
        v = 0;
        for (int k = 0; k < 12; k++) v = (v << 1) | int'(got[56 + 12*j + k]);
        if (v != smp[j]) ok = 0;
      end
      checks++; if (!ok) fail($sformatf("frame %0d: sensor data", fr));
    end
    frames++;
  endtask

  always @(posedge dac_clk) if (!rst) begin
    if (!capturing && led_i) begin
      capturing <= 1;
      quiet     <= 0;
      qi.delete(); qq.delete();
    end
    if (capturing || led_i) begin
      qi.push_back(int'(dac_i));
      qq.push_back(int'(dac_q));
    end
    if (capturing) begin
      if (!led_i && !led_q) begin
        quiet <= quiet + 1;
        if (quiet == 15) begin
          capturing <= 0;
          analyse();
        end
      end else begin
        quiet <= 0;
      end
    end
  end

endmodule
