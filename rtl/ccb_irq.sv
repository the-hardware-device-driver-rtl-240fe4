// ccb_irq - 1-PPS edge detection and the shared interrupt line.
//
// The asynchronous 1-PPS input is brought into the clock domain by two
// flip-flops; a rising edge gives a one-clock pps_edge, used by the scan
// controller whether or not interrupts are enabled. The two interrupts of
// the specification share one line: when interrupts are enabled, a 1-PPS
// edge sets the 1-PPS interrupt-sent register (pps_set) and an integration
// interrupt request from the scan controller sets the integration
// interrupt-sent register (int_set). The line is high while either
// register is set and interrupts are enabled, so clearing the enable
// silences the line without touching the state machine. A level-sensitive,
// active-high line is this design's choice.
//
// Timing: pps_edge is high in the second clock after the input rises
// (two synchroniser stages; a third flip-flop remembers the old level).
// int_set, pps_set and irq are combinational.
module ccb_irq (
  input  logic clk,
  input  logic rst_n,
  input  logic pps_in,
  input  logic en_irq,
  input  logic int_req,
  input  logic int_sent,
  input  logic pps_sent,
  output logic pps_edge,
  output logic int_set,
  output logic pps_set,
  output logic irq
);

  logic [2:0] pps_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pps_sync <= '0;
    else        pps_sync <= {pps_sync[1:0], pps_in};
  end

  assign pps_edge = pps_sync[1] && !pps_sync[2];
  assign pps_set  = pps_edge && en_irq;
  assign int_set  = int_req && en_irq;
  assign irq      = en_irq && (int_sent || pps_sent);

endmodule
