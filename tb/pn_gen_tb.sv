// pn_gen_tb: checks both PN generators chip by chip against the linear
// recurrences of their m-sequences, the 127-chip period, the balance of
// 64 ones and 63 zeros, and restart.
module pn_gen_tb;
  logic clk = 0, rst = 1, restart = 0, step = 0;
  logic ci, cq;
  int checks = 0, failures = 0;
  bit ti[127], tq[127];
  int ones_i = 0, ones_q = 0;

  pn_gen #(.TAPS(dsss_pkg::PN_I_TAPS)) dut_i (.clk, .rst, .restart, .step, .chip(ci));
  pn_gen #(.TAPS(dsss_pkg::PN_Q_TAPS)) dut_q (.clk, .rst, .restart, .step, .chip(cq));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dsss_ref_pkg::pn_table(1, ti);
    dsss_ref_pkg::pn_table(3, tq);
    repeat (2) @(posedge clk);
    rst <= 0;
    // two full periods, with idle cycles mixed in
    for (int n = 0; n < 254; n++) begin
      #1;
      checks++; if (ci !== ti[n % 127]) begin failures++; $display("I chip %0d", n); end
      checks++; if (cq !== tq[n % 127]) begin failures++; $display("Q chip %0d", n); end
      if (n < 127) begin ones_i += ci; ones_q += cq; end
      if (n % 5 == 0) begin step = 0; @(posedge clk); #1; end
      step = 1; @(posedge clk); #1 step = 0;
    end
    checks++; if (ones_i != 64) begin failures++; $display("I ones %0d", ones_i); end
    checks++; if (ones_q != 64) begin failures++; $display("Q ones %0d", ones_q); end
    // restart from the middle of the sequence
    step = 1; repeat (40) @(posedge clk);
    #1 step = 0; restart = 1; @(posedge clk); #1 restart = 0;
    checks++; if (ci !== ti[0] || cq !== tq[0]) begin failures++; $display("restart"); end
    step = 1; @(posedge clk); #1 step = 0;
    checks++; if (ci !== ti[1] || cq !== tq[1]) begin failures++; $display("after restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
