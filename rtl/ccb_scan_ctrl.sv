// ccb_scan_ctrl - the life cycle of a scan.
//
// After reset the controller waits for the driver to enable interrupts,
// then starts the first scan with whatever configuration the registers
// hold. A scan is a sequence of integrations; each integration starts by
// copying the per-integration registers (cal-diode states) into working
// registers, clearing the integrators and arming the monitoring cache,
// then raises the integration interrupt, waits for the cal diodes to
// settle if they were switched, and runs integ_period phase-switch cycles
// of samples_per_cycle samples each. When the last sample has been
// converted and added, the results are written to the DMA area and the
// next integration begins, so every integration interrupt after the first
// of a scan announces fresh results.
//
// Start scan (control bit 0) stops sampling at the end of the current
// sample (at once during cal-diode settling, when no sample runs), waits for the next 1-PPS rising edge, and then starts a new
// scan: copy the per-scan registers, then the per-integration registers,
// interrupt, integrate. The partial integration is discarded. Stop scan
// (control bit 1) lets the current integration finish and be written
// out, then starts a new scan at once, without 1-PPS synchronisation.
// These sequences follow the specification, which fixes the order of
// events seen by the driver; the exact split into states is this
// design's own.
//
// Interface: run enables the sample timer; sample_start/last_next come
// from the timer and the phase-switch unit; timer_active, integ_busy,
// settling and dma_busy report the other units. One-clock pulses:
// scan_load (phase-switch restart), integ_load (cal-diode unit), clear
// (integrators), arm (monitor), int_req, dma_start, start_ack, stop_ack.
// work is the per-scan working configuration, held for the whole scan.
module ccb_scan_ctrl
  import ccb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_t      ctrl,
  input  scan_cfg_t  scan_cfg,
  input  logic       pps_edge,
  input  logic       sample_start,
  input  logic       last_next,
  input  logic       timer_active,
  input  logic       integ_busy,
  input  logic       settling,
  input  logic       dma_busy,
  output scan_cfg_t  work,
  output logic       run,
  output logic       ps_restart,
  output logic       integ_load,
  output logic       clear,
  output logic       arm,
  output logic       int_req,
  output logic       dma_start,
  output logic       start_ack,
  output logic       stop_ack,
  output logic       scan_start,   // a new scan's configuration is taken
  output logic       integ_done    // an integration has been written out
);

  typedef enum logic [2:0] {
    S_IDLE, S_WAIT_PPS, S_LOAD_SCAN, S_LOAD_INTEG, S_IRQ, S_CAL, S_RUN, S_DUMP
  } state_e;

  state_e      state;
  logic [15:0] cyc;
  logic [15:0] cyc_last;
  logic        final_q;
  logic        quiet;      // no sample in progress, nothing left to add

  assign cyc_last = (work.integ_period == '0) ? 16'd0 : work.integ_period - 16'd1;
  assign quiet    = !timer_active && !integ_busy;
  assign run      = state == S_RUN && !final_q && !ctrl.start_scan;

  assign ps_restart = state == S_LOAD_INTEG;
  assign integ_load = state == S_LOAD_INTEG;
  assign clear      = state == S_LOAD_INTEG;
  assign arm        = state == S_LOAD_INTEG;
  assign int_req    = state == S_IRQ;
  assign scan_start = state == S_LOAD_SCAN;
  // no sample is in progress while the diodes settle, so a start scan is
  // taken at once there too
  assign start_ack  = ctrl.start_scan && ((state == S_RUN && quiet) || state == S_CAL);
  assign dma_start  = state == S_RUN && quiet && !ctrl.start_scan && final_q;
  assign integ_done = state == S_DUMP && !dma_busy;
  assign stop_ack   = integ_done && ctrl.stop_scan;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      work    <= SCAN_CFG_DEFAULT;
      cyc     <= '0;
      final_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:       if (ctrl.en_irq) state <= S_LOAD_SCAN;
        S_WAIT_PPS:   if (pps_edge) state <= S_LOAD_SCAN;
        S_LOAD_SCAN: begin
          work  <= scan_cfg;
          state <= S_LOAD_INTEG;
        end
        S_LOAD_INTEG: begin
          cyc     <= '0;
          final_q <= 1'b0;
          state   <= S_IRQ;
        end
        S_IRQ:        state <= S_CAL;
        S_CAL: begin
          if (start_ack)      state <= S_WAIT_PPS;
          else if (!settling) state <= S_RUN;
        end
        S_RUN: begin
          if (sample_start && last_next) begin
            if (cyc == cyc_last) final_q <= 1'b1;
            else                 cyc <= cyc + 16'd1;
          end
          if (start_ack)      state <= S_WAIT_PPS;
          else if (dma_start) state <= S_DUMP;
        end
        S_DUMP: begin
          // dma_busy rises the clock after dma_start
          if (integ_done) state <= ctrl.stop_scan ? S_LOAD_SCAN : S_LOAD_INTEG;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
