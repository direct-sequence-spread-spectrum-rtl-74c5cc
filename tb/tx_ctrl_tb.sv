// tx_ctrl_tb: walks tx_ctrl through two frames: six A/D samples trigger a
// frame load, the first encode follows one cycle later, the I channel is
// started in a sample_en cycle, the transmission state lasts until one chip
// after i_done, and a new frame needs six new samples.
module tx_ctrl_tb;
  logic clk = 0, rst = 1, sample_en = 0, sample_valid = 0, i_done = 0, q_busy = 0;
  logic frame_load, enc_init, frame_start, enc_first, i_start, tx_state;
  int checks = 0, failures = 0;
  int cyc = 0, load_at = -1, enc_at = -1, start_at = -1, nload = 0, nstart = 0;
  int done_at = -1, idle_at = -1;
  logic tx_prev = 0;

  tx_ctrl dut (.clk, .rst, .sample_en, .sample_valid, .i_done, .q_busy,
               .frame_load, .enc_init, .frame_start, .enc_first, .i_start, .tx_state);

  always #5 clk = ~clk;
  always @(posedge clk) sample_en <= rst ? 1'b0 : !sample_en;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    tx_prev <= tx_state;
    if (frame_load) begin
      load_at <= cyc; nload <= nload + 1;
      checks++; if (!enc_init || !frame_start) begin failures++; $display("load without init"); end
    end
    if (enc_first) begin
      enc_at <= cyc;
      checks++; if (cyc - load_at != 1) begin failures++; $display("enc_first %0d after load", cyc - load_at); end
    end
    if (i_start) begin
      start_at <= cyc; nstart <= nstart + 1;
      checks++; if (!sample_en) begin failures++; $display("start off sample_en"); end
      checks++; if (cyc - enc_at > 3) begin failures++; $display("start late"); end
    end
    if (tx_prev && !tx_state) idle_at <= cyc;
  end

  task automatic samples(int n);
    repeat (n) begin
      repeat (7) @(posedge clk);
      #1 sample_valid = 1; @(posedge clk); #1 sample_valid = 0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    samples(5);
    repeat (10) @(posedge clk);
    checks++; if (nload != 0) begin failures++; $display("loaded after 5 samples"); end
    samples(1);
    repeat (10) @(posedge clk);
    checks++; if (nload != 1 || nstart != 1) begin failures++; $display("no frame after 6 samples"); end
    checks++; if (!tx_state) begin failures++; $display("not in transmission state"); end
    // a sample arriving during transmission counts towards the next frame
    samples(2);
    repeat (20) @(posedge clk);
    #1 i_done = 1; done_at = cyc; @(posedge clk); #1 i_done = 0;
    checks++; if (!tx_state) begin failures++; $display("guard missing"); end
    repeat (20) @(posedge clk);
    // guard of one chip (4 sample periods = 8 clocks)
    checks++; if (idle_at - done_at < 8 || idle_at - done_at > 10) begin
      failures++; $display("guard %0d cycles", idle_at - done_at);
    end
    samples(3);
    repeat (10) @(posedge clk);
    checks++; if (nload != 1) begin failures++; $display("early second frame"); end
    samples(1);
    repeat (10) @(posedge clk);
    checks++; if (nload != 2 || nstart != 2) begin failures++; $display("no second frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
