// q_offset_ctrl_tb: feeds I-channel bit-take events at irregular sample
// instants and checks that each reappears as q_take exactly two sample
// periods later, that only the first of a frame gives q_start, and that
// advance follows q_take by one clock.
module q_offset_ctrl_tb;
  logic clk = 0, rst = 1, sample_en = 0, frame_start = 0, i_take = 0;
  logic q_start, q_take, advance, busy;
  int checks = 0, failures = 0;
  int se = 0;
  int take_at[$];
  bit first_flag[$];
  int nq = 0, nstart = 0, nadv = 0;
  logic q_take_d;

  q_offset_ctrl dut (.clk, .rst, .sample_en, .frame_start, .i_take,
                     .q_start, .q_take, .advance, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) sample_en <= rst ? 1'b0 : !sample_en;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    q_take_d <= q_take;
    if (sample_en) se <= se + 1;
    if (q_take) begin
      int t; bit fst;
      checks++;
      if (take_at.size() == 0) begin failures++; $display("spurious q_take"); end
      else begin
        t = take_at.pop_front(); fst = first_flag.pop_front();
        if (se - t != 2) begin failures++; $display("q_take after %0d samples", se - t); end
        checks++;
        if (q_start !== fst) begin failures++; $display("q_start=%b exp %b", q_start, fst); end
      end
      nq <= nq + 1;
    end
    if (q_start) nstart <= nstart + 1;
    if (advance) begin
      nadv <= nadv + 1;
      checks++; if (!q_take_d) begin failures++; $display("advance without q_take"); end
    end
  end

  initial begin
    bit fst;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int fr = 0; fr < 3; fr++) begin
      @(posedge clk); #1 frame_start = 1; @(posedge clk); #1 frame_start = 0;
      fst = 1;
      for (int b = 0; b < 5; b++) begin
        forever begin @(posedge clk); #1; if (sample_en) break; end
        repeat ($urandom % 3) begin @(posedge clk); @(posedge clk); #1; end
        i_take = 1; take_at.push_back(se); first_flag.push_back(fst); fst = 0;
        @(posedge clk); #1 i_take = 0;
        repeat (2 * (3 + b)) @(posedge clk);
      end
      repeat (12) @(posedge clk);
      #1 checks++; if (busy) begin failures++; $display("busy when idle"); end
    end
    checks++; if (nq != 15)    begin failures++; $display("q_take count %0d", nq); end
    checks++; if (nstart != 3) begin failures++; $display("q_start count %0d", nstart); end
    checks++; if (nadv != 15)  begin failures++; $display("advance count %0d", nadv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
