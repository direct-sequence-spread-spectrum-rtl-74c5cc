// adc_if: reads the sensor A/D converter once every period T.
//
// A free-running counter of PERIOD board-clock cycles sets the sampling
// instant. At each instant the interface pulses adc_convst for one cycle to
// start a conversion, waits CONV_CYCLES cycles for the converter, then latches
// the 12-bit parallel word on adc_data and presents it on sample with a
// one-cycle sample_valid. The once-per-T reading of a 12-bit word is the
// design's; the convert-strobe/parallel-read protocol, the conversion time and
// the default period are this design's own. The default period of 1/3 s at
// 80 MHz gives six samples per 2 s, i.e. one 128-bit frame every 2 s, which
// is the 64 bit/s average data rate.
//
// Timing: first conversion starts PERIOD cycles after reset; sample_valid is
// high CONV_CYCLES+1 cycles after adc_convst.
module adc_if #(
  parameter int unsigned PERIOD      = 26_666_667,  // cycles of T
  parameter int unsigned CONV_CYCLES = 8            // converter latency
) (
  input  logic                      clk,
  input  logic                      rst,
  output logic                      adc_convst,   // start conversion (to A/D)
  input  logic [dsss_pkg::ADC_W-1:0] adc_data,    // parallel result (from A/D)
  output logic [dsss_pkg::ADC_W-1:0] sample,      // last sample read
  output logic                      sample_valid  // one cycle per new sample
);
  localparam int unsigned PW = $clog2(PERIOD + 1);
  localparam int unsigned WW = $clog2(CONV_CYCLES + 2);

  logic [PW-1:0] period_cnt;
  logic [WW-1:0] wait_cnt;
  logic          converting;

  initial assert (PERIOD > CONV_CYCLES + 1)
    else $error("adc_if: PERIOD must exceed the conversion time");

  always_ff @(posedge clk) begin
    if (rst) begin
      period_cnt   <= '0;
      wait_cnt     <= '0;
      converting   <= 1'b0;
      adc_convst   <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      adc_convst   <= 1'b0;
      sample_valid <= 1'b0;
      if (period_cnt == PW'(PERIOD - 1)) begin
        period_cnt <= '0;
        adc_convst <= 1'b1;
        converting <= 1'b1;
        wait_cnt   <= '0;
      end else begin
        period_cnt <= period_cnt + 1'b1;
      end
      if (converting) begin
        if (wait_cnt == WW'(CONV_CYCLES)) begin
          converting   <= 1'b0;
          sample       <= adc_data;
          sample_valid <= 1'b1;
        end else begin
          wait_cnt <= wait_cnt + 1'b1;
        end
      end
    end
  end

endmodule
