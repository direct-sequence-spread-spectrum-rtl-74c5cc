// adc_if_tb: checks that adc_if starts a conversion once every PERIOD
// cycles, and returns the converter's word CONV_CYCLES+1 cycles later.
module adc_if_tb;
  localparam int PERIOD = 25, CONV = 3;
  logic clk = 0, rst = 1;
  logic convst, valid;
  logic [11:0] data, sample;
  int conversions;
  int checks = 0, failures = 0;
  int cyc = 0, last_convst = -1, nvalid = 0;

  adc_if #(.PERIOD(PERIOD), .CONV_CYCLES(CONV)) dut (
    .clk, .rst, .adc_convst(convst), .adc_data(data), .sample, .sample_valid(valid)
  );
  adc_model u_adc (.clk, .rst, .convst, .data, .conversions);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (convst) begin
      if (last_convst >= 0) begin
        checks++;
        if (cyc - last_convst != PERIOD) begin
          failures++; $display("convst spacing %0d", cyc - last_convst);
        end
      end
      last_convst <= cyc;
    end
    if (valid) begin
      checks++;
      if (cyc - last_convst != CONV + 1) begin
        failures++; $display("latency %0d", cyc - last_convst);
      end
      checks++;
      if (sample != 12'(dsss_ref_pkg::adc_value(nvalid))) begin
        failures++; $display("sample %0d: %h", nvalid, sample);
      end
      nvalid <= nvalid + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (PERIOD * 10 + CONV + 3) @(posedge clk);
    checks++; if (nvalid != 10) begin failures++; $display("%0d samples", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
