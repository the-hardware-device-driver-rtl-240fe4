// ccb_cal_diode - calibration noise-diode states and settling delay.
//
// At each integration start (load pulse) the per-integration configuration
// is examined. If its update flag is set and the requested states differ
// from the present ones, the diodes are switched to the new states and a
// settling delay of settle_time ticks (0.1 us each) starts; settling stays
// high until it has elapsed, and the scan controller holds off the first
// cycle of the integration until then. Otherwise nothing changes and there
// is no delay. This follows the specification. It gives the settling time
// in 0.1 us units in its register table but speaks of discarding a number
// of A/D samples in the text; this design follows the table and times the
// delay in ticks.
//
// cal[0] drives diode A, cal[1] diode B. Both are off after reset. The
// states change on the clock edge of load.
module ccb_cal_diode (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic        load,
  input  logic [1:0]  cal_states,
  input  logic        cal_update,
  input  logic [31:0] settle_time,
  output logic [1:0]  cal,
  output logic        settling
);

  logic [31:0] remain;

  assign settling = remain != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cal    <= 2'b00;
      remain <= '0;
    end else if (load) begin
      if (cal_update && cal_states != cal) begin
        cal    <= cal_states;
        remain <= settle_time;
      end
    end else if (settling && tick) begin
      remain <= remain - 32'd1;
    end
  end

endmodule
