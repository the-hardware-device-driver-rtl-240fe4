// ccb_regs_tb - self-checking test of the host register file.
//
// Checks the reset defaults of every register, write/read-back of each
// field, that commands stay set until acknowledged, that the hardware sets
// and the driver clears the interrupt-sent registers, and that a reload
// write restores the defaults, zeroes the control register and pulses
// reload_req. Expected values come from the specification's tables.
module ccb_regs_tb;
  import ccb_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        bus_we = 1'b0;
  logic [3:0]  bus_addr = '0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  scan_cfg_t   scan_cfg;
  integ_cfg_t  integ_cfg;
  ctrl_t       ctrl;
  logic        reload_req, int_sent, pps_sent;
  logic        start_ack = 0, stop_ack = 0, int_set = 0, pps_set = 0;
  int          checks = 0, failures = 0;

  ccb_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_we = 0;
  endtask

  task automatic rdchk(input string what, input logic [3:0] a, input logic [31:0] exp);
    bus_addr = a; #1;
    check(what, bus_rdata, exp);
  endtask

  logic [31:0] dflt [14] = '{250, 1, 0, 0, 0, 40, 0, 0, 0, 0, 0, 0, 0, 0};
  logic [31:0] mask [14] = '{32'hffff, 32'h3f, '1, '1, '1, 32'hffff, 32'hff, 32'hff, '1, 32'h3, 32'h1, 32'hf8, 32'h1, 32'h1};
  logic [31:0] v;
  int          reload_pulses = 0;

  always @(negedge clk) if (reload_req) reload_pulses++;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < 14; a++) rdchk($sformatf("default %0d", a), 4'(a), dflt[a]);
    // write random values, read them back through the field widths
    for (int a = 0; a < 11; a++) begin
      v = $urandom;
      wr(4'(a), v);
      rdchk($sformatf("readback %0d", a), 4'(a), v & mask[a]);
    end
    rdchk("struct sample_interval", REG_SAMPLE_INTERVAL, 32'(scan_cfg.sample_interval));
    rdchk("struct ps_upd", REG_PS_UPD, scan_cfg.ps_upd);
    rdchk("struct cal_states", REG_CAL_STATES, 32'(integ_cfg.cal_states));
    // control: persistent bits and commands
    wr(REG_CONTROL, 32'h0000_00f9);
    rdchk("control", REG_CONTROL, 32'hf9);
    check("en_irq", 32'(ctrl.en_irq), 1);
    check("drive_cal_b", 32'(ctrl.drive_cal_b), 1);
    wr(REG_CONTROL, 32'h0000_00f8);     // writing 0 does not cancel start
    check("start pending", 32'(ctrl.start_scan), 1);
    @(negedge clk); start_ack = 1; @(negedge clk); start_ack = 0;
    check("start acked", 32'(ctrl.start_scan), 0);
    wr(REG_CONTROL, 32'h0000_00fa);
    check("stop pending", 32'(ctrl.stop_scan), 1);
    @(negedge clk); stop_ack = 1; @(negedge clk); stop_ack = 0;
    rdchk("stop acked", REG_CONTROL, 32'hf8);
    // interrupt-sent registers
    @(negedge clk); int_set = 1; @(negedge clk); int_set = 0;
    rdchk("int_sent set", REG_INT_SENT, 1);
    rdchk("pps_sent still 0", REG_PPS_SENT, 0);
    @(negedge clk); pps_set = 1; @(negedge clk); pps_set = 0;
    check("pps_sent set", 32'(pps_sent), 1);
    wr(REG_INT_SENT, 0);
    check("int_sent cleared", 32'(int_sent), 0);
    // set wins over a simultaneous clear
    @(negedge clk); bus_we = 1; bus_addr = REG_PPS_SENT; bus_wdata = 0; pps_set = 1;
    @(negedge clk); bus_we = 0; pps_set = 0;
    check("set beats clear", 32'(pps_sent), 1);
    // reload
    wr(REG_CONTROL, 32'h0000_00fc);
    @(posedge clk);
    check("reload pulse", 32'(reload_pulses), 1);
    for (int a = 0; a < 14; a++) rdchk($sformatf("after reload %0d", a), 4'(a), dflt[a]);
    @(negedge clk);
    check("reload pulse once", 32'(reload_pulses), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
