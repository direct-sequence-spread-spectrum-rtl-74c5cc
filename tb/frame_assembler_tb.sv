// frame_assembler_tb: loads two frames into frame_assembler and checks all
// 64 odd/even bit pairs of each against a frame built from its field list in
// the testbench, including the sequence number step from one frame to the
// next and the use of the six most recent A/D samples only.
module frame_assembler_tb;
  import dsss_pkg::*;
  localparam logic [15:0] ID = 16'hA5C3;
  logic clk = 0, rst = 1, sample_valid = 0, load = 0, advance = 0;
  logic [11:0] sample = '0;
  logic i_bit, q_bit;
  logic [15:0] seq_num;
  int checks = 0, failures = 0;
  bit f[128];
  int s[6];
  int nsamp = 0;

  frame_assembler #(.UNIT_ID(ID)) dut (
    .clk, .rst, .sample, .sample_valid, .load, .advance, .i_bit, .q_bit, .seq_num);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push_sample(int v);
    sample = 12'(v); sample_valid = 1;
    @(posedge clk); #1 sample_valid = 0;
    nsamp++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int fr = 0; fr < 2; fr++) begin
      // more than six samples: only the last six belong in the frame
      for (int j = 0; j < 6 + 3 * fr; j++) push_sample(dsss_ref_pkg::adc_value(nsamp));
      for (int j = 0; j < 6; j++) s[j] = dsss_ref_pkg::adc_value(nsamp - 6 + j);
      dsss_ref_pkg::build_frame(int'(ID), fr, s, f);
      load = 1; @(posedge clk); #1 load = 0;
      checks++; if (seq_num != 16'(fr + 1)) begin failures++; $display("seq %0d", seq_num); end
      for (int p = 0; p < 64; p++) begin
        checks++;
        if (i_bit !== f[2*p] || q_bit !== f[2*p+1]) begin
          failures++; $display("frame %0d pair %0d: %b%b exp %b%b", fr, p, i_bit, q_bit, f[2*p], f[2*p+1]);
        end
        // pair stays put without advance
        @(posedge clk); #1;
        checks++; if (i_bit !== f[2*p] || q_bit !== f[2*p+1]) begin failures++; $display("moved"); end
        advance = 1; @(posedge clk); #1 advance = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
