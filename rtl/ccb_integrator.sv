// ccb_integrator - the 64 digital integrations of the CCB.
//
// Each integration period accumulates, separately for each of the four
// phase-switch states {B,A}, the samples of each of the 16 A/D converters:
// 64 unsigned 32-bit sums. When a sum would pass 2^32-1 it stays at
// 2^32-1 and its overflow flag is set for the rest of the integration.
// The specification gives the sums, their range and the overflow mask;
// saturating rather than wrapping is this design's choice.
//
// Interface: at adc_convert (end of a sample) the phase-switch state of
// that sample is latched; the conversion results of all 16 converters
// arrive together later with adc_valid and are added to that state's row.
// busy is high from adc_convert until the results have been added. clear
// zeroes all sums and flags (integration start). The read port is
// combinational: rd_idx uses the specification's array order, index =
// state + 4 * converter, and ovf holds the 64 overflow flags in the same
// order.
module ccb_integrator
  import ccb_pkg::*;
#(
  parameter int ADC_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  adc_convert,
  input  logic [1:0]            state,
  input  logic                  adc_valid,
  input  logic [N_ADC-1:0][ADC_W-1:0] adc_data,
  output logic                  busy,
  input  logic [5:0]            rd_idx,
  output logic [31:0]           rd_data,
  output logic [N_VALUES-1:0]   ovf
);

  logic [31:0] acc [N_VALUES];
  logic [1:0]  state_q;

  assign rd_data = acc[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      state_q <= '0;
    end else begin
      if (adc_convert) begin
        busy    <= 1'b1;
        state_q <= state;
      end else if (adc_valid) begin
        busy <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_VALUES; i++) acc[i] <= '0;
      ovf <= '0;
    end else if (clear) begin
      for (int i = 0; i < N_VALUES; i++) acc[i] <= '0;
      ovf <= '0;
    end else if (adc_valid && busy) begin
      for (int c = 0; c < N_ADC; c++) begin
        logic [32:0] sum;
        int          idx;
        idx = int'(state_q) + N_STATES * c;
        sum = {1'b0, acc[idx]} + 33'(adc_data[c]);
        if (sum[32]) begin
          acc[idx] <= '1;
          ovf[idx] <= 1'b1;
        end else begin
          acc[idx] <= sum[31:0];
        end
      end
    end
  end

endmodule
