// adc_sampler: 1 MHz trigger and capture for the external modulation ADC.
//
// In the AM and FM modes the FPGA starts a conversion of the external ADC at 1 MHz and
// uses each result to recompute the DDS tuning word. This block counts RATE_DIV system
// clocks per sample (50 MHz / 50 = 1 MHz, the rate the source gives), raises adc_convst
// for CONVST_CLKS clocks at the start of each period, and CONV_CLKS clocks after the
// start latches adc_data. The ADC is assumed to give offset-binary codes; the block
// converts them to two's complement (mid-scale = 0) and presents them for one clock on
// sample_valid/sample. While enable is low no conversions are started. ADC width,
// conversion time and the code format are this design's assumptions.
module adc_sampler #(
  parameter int unsigned ADC_W       = 12,
  parameter int unsigned RATE_DIV    = 50,
  parameter int unsigned CONVST_CLKS = 2,
  parameter int unsigned CONV_CLKS   = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  output logic                    adc_convst,
  input  logic [ADC_W-1:0]        adc_data,
  output logic                    sample_valid,
  output logic signed [ADC_W-1:0] sample
);
  localparam int unsigned CNT_W = $clog2(RATE_DIV);
  logic [CNT_W-1:0] cnt;
  logic             running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      running      <= 1'b0;
      adc_convst   <= 1'b0;
      sample_valid <= 1'b0;
      sample       <= '0;
    end else begin
      sample_valid <= 1'b0;
      if (!running) begin
        cnt        <= '0;
        adc_convst <= 1'b0;
        running    <= enable;
        if (enable) adc_convst <= 1'b1;
      end else begin
        cnt <= (cnt == CNT_W'(RATE_DIV - 1)) ? '0 : cnt + 1'b1;
        if (cnt == CNT_W'(CONVST_CLKS - 1)) adc_convst <= 1'b0;
        if (cnt == CNT_W'(CONV_CLKS)) begin
          sample_valid <= 1'b1;
          sample       <= {~adc_data[ADC_W-1], adc_data[ADC_W-2:0]};
        end
        if (cnt == CNT_W'(RATE_DIV - 1)) begin
          running    <= enable;
          adc_convst <= enable;
        end
      end
    end
  end
endmodule
