// ccb_regs - host-visible register file of the CCB backend.
//
// Holds the per-scan and per-integration configuration registers, the
// control register and the two interrupt-sent registers behind a simple
// 32-bit register bus (one write strobe, word address, combinational read).
// The hardware never uses these registers directly: the scan controller
// copies them into its working registers at scan and integration starts.
//
// Following the specification: reset values are the tabled defaults and
// the control register is zero after reset; writing bit 2 (reload) brings
// every register back to its default and zeroes the control register,
// as after loading the FPGA, and raises reload_req for one cycle so the
// rest of the design restarts too. The interrupt-sent registers are set by
// the hardware and cleared by the driver writing zero; a hardware set wins
// over a simultaneous write.
//
// Own choices: the word addresses (ccb_pkg::reg_addr_e); start-scan and
// stop-scan are commands that stay set until the scan controller accepts
// them (start_ack/stop_ack), and then read back as zero.
//
// Timing: writes take effect on the next clock edge; reads are
// combinational from the address.
module ccb_regs
  import ccb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register bus
  input  logic        bus_we,
  input  logic [3:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  // to the hardware
  output scan_cfg_t   scan_cfg,
  output integ_cfg_t  integ_cfg,
  output ctrl_t       ctrl,
  output logic        reload_req,
  output logic        int_sent,
  output logic        pps_sent,
  // from the hardware
  input  logic        start_ack,
  input  logic        stop_ack,
  input  logic        int_set,
  input  logic        pps_set
);

  logic reload_wr;
  assign reload_wr = bus_we && bus_addr == REG_CONTROL && bus_wdata[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_cfg   <= SCAN_CFG_DEFAULT;
      integ_cfg  <= INTEG_CFG_DEFAULT;
      ctrl       <= '0;
      int_sent   <= 1'b0;
      pps_sent   <= 1'b0;
      reload_req <= 1'b0;
    end else if (reload_wr) begin
      scan_cfg   <= SCAN_CFG_DEFAULT;
      integ_cfg  <= INTEG_CFG_DEFAULT;
      ctrl       <= '0;
      int_sent   <= 1'b0;
      pps_sent   <= 1'b0;
      reload_req <= 1'b1;
    end else begin
      reload_req <= 1'b0;
      if (start_ack) ctrl.start_scan <= 1'b0;
      if (stop_ack)  ctrl.stop_scan  <= 1'b0;
      if (bus_we) begin
        unique case (bus_addr)
          REG_SAMPLE_INTERVAL: scan_cfg.sample_interval   <= bus_wdata[15:0];
          REG_SAMPLES_PER_CYC: scan_cfg.samples_per_cycle <= bus_wdata[5:0];
          REG_PS_A:            scan_cfg.ps_a              <= bus_wdata;
          REG_PS_B:            scan_cfg.ps_b              <= bus_wdata;
          REG_PS_UPD:          scan_cfg.ps_upd            <= bus_wdata;
          REG_INTEG_PERIOD:    scan_cfg.integ_period      <= bus_wdata[15:0];
          REG_PS_BLANK:        scan_cfg.ps_blank          <= bus_wdata[7:0];
          REG_IRESET_BLANK:    scan_cfg.ireset_blank      <= bus_wdata[7:0];
          REG_CAL_SETTLE:      scan_cfg.cal_settle        <= bus_wdata;
          REG_CAL_STATES:      integ_cfg.cal_states       <= bus_wdata[1:0];
          REG_CAL_UPDATE:      integ_cfg.cal_update       <= bus_wdata[0];
          REG_CONTROL: begin
            // a write can set the commands, never clears a pending one
            ctrl.start_scan  <= ctrl.start_scan | bus_wdata[0];
            ctrl.stop_scan   <= ctrl.stop_scan  | bus_wdata[1];
            ctrl.en_irq      <= bus_wdata[3];
            ctrl.drive_ps_a  <= bus_wdata[4];
            ctrl.drive_ps_b  <= bus_wdata[5];
            ctrl.drive_cal_a <= bus_wdata[6];
            ctrl.drive_cal_b <= bus_wdata[7];
          end
          REG_INT_SENT:        int_sent <= bus_wdata != '0;
          REG_PPS_SENT:        pps_sent <= bus_wdata != '0;
          default: ;
        endcase
      end
      if (int_set) int_sent <= 1'b1;
      if (pps_set) pps_sent <= 1'b1;
    end
  end

  always_comb begin
    bus_rdata = '0;
    unique case (bus_addr)
      REG_SAMPLE_INTERVAL: bus_rdata[15:0] = scan_cfg.sample_interval;
      REG_SAMPLES_PER_CYC: bus_rdata[5:0]  = scan_cfg.samples_per_cycle;
      REG_PS_A:            bus_rdata       = scan_cfg.ps_a;
      REG_PS_B:            bus_rdata       = scan_cfg.ps_b;
      REG_PS_UPD:          bus_rdata       = scan_cfg.ps_upd;
      REG_INTEG_PERIOD:    bus_rdata[15:0] = scan_cfg.integ_period;
      REG_PS_BLANK:        bus_rdata[7:0]  = scan_cfg.ps_blank;
      REG_IRESET_BLANK:    bus_rdata[7:0]  = scan_cfg.ireset_blank;
      REG_CAL_SETTLE:      bus_rdata       = scan_cfg.cal_settle;
      REG_CAL_STATES:      bus_rdata[1:0]  = integ_cfg.cal_states;
      REG_CAL_UPDATE:      bus_rdata[0]    = integ_cfg.cal_update;
      REG_CONTROL:         bus_rdata[7:0]  = ctrl;
      REG_INT_SENT:        bus_rdata[0]    = int_sent;
      REG_PPS_SENT:        bus_rdata[0]    = pps_sent;
      default: ;
    endcase
  end

endmodule
