// ccb_sample_timer - times the A/D sample intervals and their blanking.
//
// Every sample lasts sample_interval ticks of 0.1 us. The start of each
// sample is blanked: first the analog integrators are discharged for
// ireset_blank ticks (int_reset high), then, only in samples that follow a
// phase-switch update, integration is held off for a further ps_blank
// ticks. For the rest of the sample integ_gate is high. On the last tick
// of the sample adc_convert pulses for one clock, asking the A/D
// converters to read the integrators. This follows the specification;
// the order reset-then-phase-blanking inside the blanked span is this
// design's choice (the specification gives only their sum).
//
// While run is high samples follow each other back to back; a new sample
// starts (sample_start pulse) in the same clock as the previous one ends.
// When run drops, the sample in progress completes and the timer idles
// (active low). trans_next tells, at sample_start, whether the sample
// being started follows a phase-switch update; it is latched then.
// A sample_interval of 0 is treated as 1, and a count that has reached
// the interval always ends the sample, so the timer cannot hang. The driver must keep the
// interval longer than the sum of the blanking intervals.
module ccb_sample_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,            // one-clock pulse every 0.1 us
  input  logic        run,
  input  logic [15:0] sample_interval,
  input  logic [7:0]  ireset_blank,
  input  logic [7:0]  ps_blank,
  input  logic        trans_next,
  output logic        sample_start,
  output logic        adc_convert,
  output logic        active,
  output logic        int_reset,
  output logic        integ_gate
);

  logic [15:0] cnt;
  logic        trans_q;
  logic [15:0] last;
  logic [16:0] blank_end;

  assign last         = (sample_interval == '0) ? 16'd0 : sample_interval - 16'd1;
  assign adc_convert  = active && tick && cnt >= last;
  assign sample_start = run && (!active || adc_convert);
  assign blank_end    = {9'd0, ireset_blank} + (trans_q ? {9'd0, ps_blank} : 17'd0);
  assign int_reset    = active && {1'b0, cnt} < {9'd0, ireset_blank};
  assign integ_gate   = active && {1'b0, cnt} >= blank_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      cnt     <= '0;
      trans_q <= 1'b0;
    end else if (sample_start) begin
      active  <= 1'b1;
      cnt     <= '0;
      trans_q <= trans_next;
    end else if (adc_convert) begin
      active  <= 1'b0;
      cnt     <= '0;
    end else if (active && tick) begin
      cnt <= cnt + 16'd1;
    end
  end

endmodule
