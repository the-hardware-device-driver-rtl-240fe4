// ccb_top - FPGA core of the CCB continuum backend.
//
// The backend integrates 16 A/D converter channels (2 detectors x 4 bands
// x 2 radiometers) separately for the four states of two phase switches
// and hands the 64 integrations, an overflow mask and the latest raw A/D
// outputs to a host driver by DMA at the end of every integration period.
// A 32-stage programmable phase-switch sequence runs one stage per A/D
// sample; the start of each sample is blanked while the analog integrators
// are reset and, after a phase-switch transition, while the switches
// settle. Two calibration noise diodes may be switched at integration
// starts, followed by a settling delay. Scans start either on a 1-PPS
// edge (start scan) or at the end of the current integration (stop scan).
//
// Blocks: ccb_regs (host registers), ccb_scan_ctrl (scan life cycle),
// ccb_sample_timer, ccb_phase_switch, ccb_cal_diode, ccb_integrator,
// ccb_monitor, ccb_dma_writer and ccb_irq. A divider here makes the
// 0.1 us tick of all the timers from clk: CLK_PER_TICK clocks per tick
// (default 10, a 100 MHz clock; the specification does not name a clock).
//
// External interfaces (all synchronous to clk except pps_in):
//  * register bus: bus_we, bus_addr (word address), bus_wdata, bus_rdata,
//    for a PCI target core; irq is the shared, level, active-high line;
//  * DMA write port: dma_valid/dma_ready/dma_addr (byte offset)/dma_data,
//    for a PCI master core;
//  * A/D converters: adc_convert pulses at the end of each sample; all 16
//    results return together with adc_valid, any number of clocks later
//    but before the end of the next sample;
//  * analog integrators: int_reset (discharge) and integ_gate (integrate);
//  * front end: ps_a/ps_b and cal_a/cal_b with their output enables,
//    which follow control bits 4..7; the state machines run regardless;
//  * reload_req: one-clock request to reconfigure the FPGA (control bit 2);
//    the core also resets itself to the register defaults.
module ccb_top
  import ccb_pkg::*;
#(
  parameter int CLK_PER_TICK = 10,
  parameter int ADC_W        = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        bus_we,
  input  logic [3:0]                  bus_addr,
  input  logic [31:0]                 bus_wdata,
  output logic [31:0]                 bus_rdata,
  output logic                        irq,
  input  logic                        pps_in,
  output logic                        adc_convert,
  input  logic                        adc_valid,
  input  logic [N_ADC-1:0][ADC_W-1:0] adc_data,
  output logic                        int_reset,
  output logic                        integ_gate,
  output logic                        ps_a,
  output logic                        ps_a_oe,
  output logic                        ps_b,
  output logic                        ps_b_oe,
  output logic                        cal_a,
  output logic                        cal_a_oe,
  output logic                        cal_b,
  output logic                        cal_b_oe,
  output logic                        dma_valid,
  input  logic                        dma_ready,
  output logic [11:0]                 dma_addr,
  output logic [31:0]                 dma_data,
  output logic                        reload_req
);

  scan_cfg_t  scan_cfg, work;
  integ_cfg_t integ_cfg;
  ctrl_t      ctrl;
  logic       core_rst_n;
  logic       tick;
  logic       int_sent, pps_sent, int_set, pps_set, pps_edge;
  logic       start_ack, stop_ack, run, ps_restart, integ_load, clear, arm;
  logic       int_req, dma_start, scan_start, integ_done;
  logic       sample_start, timer_active, trans_next, last_next;
  logic       integ_busy, settling, dma_busy, dma_done, mon_fresh;
  logic [1:0] ps_state, cal;
  logic [5:0] rd_idx;
  logic [31:0] rd_data;
  logic [N_VALUES-1:0] ovf;
  logic [N_ADC-1:0][31:0] mon;

  // reload resets the whole core, as loading the FPGA would
  assign core_rst_n = rst_n && !reload_req;

  // 0.1 us tick
  localparam int TW = (CLK_PER_TICK > 1) ? $clog2(CLK_PER_TICK) : 1;
  logic [TW-1:0] div;
  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n)                       div <= '0;
    else if (div == TW'(CLK_PER_TICK - 1)) div <= '0;
    else                                   div <= div + 1'b1;
  end
  assign tick = div == TW'(CLK_PER_TICK - 1);

  ccb_regs u_regs (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .scan_cfg, .integ_cfg, .ctrl, .reload_req, .int_sent, .pps_sent,
    .start_ack, .stop_ack, .int_set, .pps_set
  );

  ccb_irq u_irq (
    .clk, .rst_n(core_rst_n), .pps_in, .en_irq(ctrl.en_irq), .int_req,
    .int_sent, .pps_sent, .pps_edge, .int_set, .pps_set, .irq
  );

  ccb_scan_ctrl u_ctrl (
    .clk, .rst_n(core_rst_n), .ctrl, .scan_cfg, .pps_edge, .sample_start,
    .last_next, .timer_active, .integ_busy, .settling, .dma_busy, .work,
    .run, .ps_restart, .integ_load, .clear, .arm, .int_req, .dma_start,
    .start_ack, .stop_ack, .scan_start, .integ_done
  );

  ccb_sample_timer u_timer (
    .clk, .rst_n(core_rst_n), .tick, .run,
    .sample_interval(work.sample_interval), .ireset_blank(work.ireset_blank),
    .ps_blank(work.ps_blank), .trans_next, .sample_start, .adc_convert,
    .active(timer_active), .int_reset, .integ_gate
  );

  ccb_phase_switch u_ps (
    .clk, .rst_n(core_rst_n), .restart(ps_restart), .advance(sample_start),
    .samples_per_cycle(work.samples_per_cycle), .cfg_a(work.ps_a),
    .cfg_b(work.ps_b), .cfg_upd(work.ps_upd), .trans_next, .last_next,
    .ps_a, .ps_b, .state(ps_state)
  );

  ccb_cal_diode u_cal (
    .clk, .rst_n(core_rst_n), .tick, .load(integ_load),
    .cal_states(integ_cfg.cal_states), .cal_update(integ_cfg.cal_update),
    .settle_time(work.cal_settle), .cal, .settling
  );

  ccb_integrator #(.ADC_W(ADC_W)) u_integ (
    .clk, .rst_n(core_rst_n), .clear, .adc_convert, .state(ps_state),
    .adc_valid, .adc_data, .busy(integ_busy), .rd_idx, .rd_data, .ovf
  );

  ccb_monitor #(.ADC_W(ADC_W)) u_mon (
    .clk, .rst_n(core_rst_n), .arm, .adc_valid, .adc_data, .mon,
    .fresh(mon_fresh)
  );

  ccb_dma_writer u_dma (
    .clk, .rst_n(core_rst_n), .start(dma_start), .busy(dma_busy),
    .done(dma_done), .rd_idx, .rd_data, .ovf, .mon, .dma_valid, .dma_ready,
    .dma_addr, .dma_data
  );

  assign ps_a_oe  = ctrl.drive_ps_a;
  assign ps_b_oe  = ctrl.drive_ps_b;
  assign cal_a    = cal[0];
  assign cal_b    = cal[1];
  assign cal_a_oe = ctrl.drive_cal_a;
  assign cal_b_oe = ctrl.drive_cal_b;

endmodule
