// adc_model: behavioural model of the sensor A/D converter for testbenches.
//
// On each convert strobe it puts the next value of a fixed sequence
// (dsss_ref_pkg::adc_value) on its 12-bit parallel output one clock later and
// holds it until the next conversion. conversions counts the strobes; strobes
// during reset are ignored.
module adc_model (
  input  logic        clk,
  input  logic        rst,
  input  logic        convst,
  output logic [11:0] data,
  output int          conversions
);
  initial begin
    data        = '0;
    conversions = 0;
  end
  always @(posedge clk) begin
    if (!rst && convst) begin
      data        <= 12'(dsss_ref_pkg::adc_value(conversions));
      conversions <= conversions + 1;
    end
  end
endmodule
