// ccb_monitor - cache of the A/D converter outputs for diagnostics.
//
// The monitoring area handed to the driver at the end of each integration
// holds the last values read from the 16 A/D converters, so that failing
// or saturating converters can be spotted. To keep the end of an
// integration short, the measurement is started early: arm (pulsed at
// every integration start) makes the cache take the next complete set of
// conversion results, which then stays unchanged until the next arm.
// The dump at the end of the integration simply copies mon[]. Capturing
// the first set after the integration start is this design's choice; the
// specification only requires the values to be measured during the
// integration and cached.
//
// mon[c] is converter c's sample, zero-extended to 32 bits; converter
// order is detector, then band, then radiometer (c = det + 2*band +
// 8*radiometer). fresh is high once the cache holds a set taken since the
// last arm.
module ccb_monitor
  import ccb_pkg::*;
#(
  parameter int ADC_W = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        arm,
  input  logic                        adc_valid,
  input  logic [N_ADC-1:0][ADC_W-1:0] adc_data,
  output logic [N_ADC-1:0][31:0]      mon,
  output logic                        fresh
);

  logic armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0;
      fresh <= 1'b0;
      mon   <= '0;
    end else if (arm) begin
      armed <= 1'b1;
      fresh <= 1'b0;
    end else if (armed && adc_valid) begin
      armed <= 1'b0;
      fresh <= 1'b1;
      for (int c = 0; c < N_ADC; c++) mon[c] <= 32'(adc_data[c]);
    end
  end

endmodule
