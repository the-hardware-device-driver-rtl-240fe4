// ccb_phase_switch - the 32-stage phase-switch state machine.
//
// Three 32-bit shift registers hold, per stage of a phase-switch cycle,
// the wanted state of phase switch A, of phase switch B and an update
// flag. At the first sample of each cycle they are loaded from the
// working configuration; every later sample of the cycle shifts them
// right by one, so bit 0 always describes the sample being started.
// Where the update flag of a stage is set, the switch outputs take that
// stage's A and B bits; otherwise they keep their previous states. A cycle
// has samples_per_cycle stages (0 is treated as 1, above 32 as 32).
// All of this follows the specification.
//
// Interface: advance is the sample_start pulse of the sample timer.
// Combinational outputs describe the sample about to start: trans_next
// (its update flag) and last_next (it is the last stage of the cycle).
// The registered outputs ps_a/ps_b change on the clock edge of advance
// and hold for the whole sample; state = {ps_b, ps_a} selects the
// integration the sample belongs to. restart makes the next sample the
// first of a cycle (used at scan and integration starts).
module ccb_phase_switch (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restart,
  input  logic        advance,
  input  logic [5:0]  samples_per_cycle,
  input  logic [31:0] cfg_a,
  input  logic [31:0] cfg_b,
  input  logic [31:0] cfg_upd,
  output logic        trans_next,
  output logic        last_next,
  output logic        ps_a,
  output logic        ps_b,
  output logic [1:0]  state
);

  logic [31:0] sr_a, sr_b, sr_upd;
  logic [4:0]  stage;
  logic [4:0]  last_stage;
  logic        first;
  logic        a_now, b_now, upd_now;

  always_comb begin
    if (samples_per_cycle == '0)      last_stage = 5'd0;
    else if (samples_per_cycle > 6'd32) last_stage = 5'd31;
    else                              last_stage = 5'(samples_per_cycle - 6'd1);
  end

  assign first      = stage == '0;
  assign a_now      = first ? cfg_a[0]   : sr_a[0];
  assign b_now      = first ? cfg_b[0]   : sr_b[0];
  assign upd_now    = first ? cfg_upd[0] : sr_upd[0];
  assign trans_next = upd_now;
  assign last_next  = stage == last_stage;
  assign state      = {ps_b, ps_a};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_a   <= '0;
      sr_b   <= '0;
      sr_upd <= '0;
      stage  <= '0;
      ps_a   <= 1'b0;
      ps_b   <= 1'b0;
    end else if (restart) begin
      stage <= '0;
    end else if (advance) begin
      if (upd_now) begin
        ps_a <= a_now;
        ps_b <= b_now;
      end
      sr_a   <= (first ? cfg_a   : sr_a)   >> 1;
      sr_b   <= (first ? cfg_b   : sr_b)   >> 1;
      sr_upd <= (first ? cfg_upd : sr_upd) >> 1;
      stage  <= last_next ? 5'd0 : stage + 5'd1;
    end
  end

endmodule
