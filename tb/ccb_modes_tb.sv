// ccb_modes_tb - the three phase-switching modes, at the core's defaults.
//
// The driver builds the 32-stage switch pattern from a number of samples
// per measurement and one of three modes: no phase switching, 1-diode
// switching (switch A toggles) and 2-diode switching (both switches,
// four states). This testbench does that for each mode in turn, starts
// each scan with a start-scan command synchronised to 1-PPS, and lets the
// converters return 1 for every sample, so that each of the 64 sums must
// equal the number of samples taken in its phase state: samples per
// measurement x integration period for every state the mode visits, and
// 0 for the others. It also checks that the switches change only at the
// stages where the mode updates them, and counts the phase-switch
// blanking spans. The core's parameters are left at their defaults; the
// sample interval register is set to 5 us to keep the run short.
module ccb_modes_tb;
  import ccb_pkg::*;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic                   bus_we = 1'b0;
  logic [3:0]             bus_addr = '0;
  logic [31:0]            bus_wdata = '0, bus_rdata;
  logic                   irq, pps_in = 1'b0;
  logic                   adc_convert, adc_valid = 1'b0;
  logic [N_ADC-1:0][15:0] adc_data = '0;
  logic                   int_reset, integ_gate;
  logic                   ps_a, ps_a_oe, ps_b, ps_b_oe, cal_a, cal_a_oe, cal_b, cal_b_oe;
  logic                   dma_valid, dma_ready = 1'b1;
  logic [11:0]            dma_addr;
  logic [31:0]            dma_data;
  logic                   reload_req;
  int                     checks = 0, failures = 0;

  localparam int SPM    = 3;    // samples per measurement
  localparam int PERIOD = 4;    // cycles per integration

  ccb_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (cyc % 200_000 == 199_999) pps_in <= 1;
    if (cyc % 200_000 == 1000) pps_in <= 0;
  end

  logic [7:0] image [512];
  always @(posedge clk)
    if (dma_valid && dma_ready)
      for (int b = 0; b < 4; b++) image[int'(dma_addr) + b] <= dma_data[8*b +: 8];

  // converters: every result is 1
  int switch_changes = 0, blank_spans = 0;
  logic ps_a_q = 0, ps_b_q = 0, gate_q = 0;
  always @(negedge clk) begin
    if ({ps_a, ps_b} != {ps_a_q, ps_b_q}) switch_changes++;
    ps_a_q <= ps_a; ps_b_q <= ps_b;
    gate_q <= integ_gate;
    if (adc_convert)
      fork
        begin
          repeat (10) @(negedge clk);
          for (int c = 0; c < N_ADC; c++) adc_data[c] = 16'd1;
          adc_valid = 1;
          @(negedge clk);
          adc_valid = 0;
        end
      join_none
  end
  // a blanked span longer than the integrator reset is phase-switch blanking
  int low_run = 0;
  always @(negedge clk) begin
    if (!integ_gate) low_run++;
    else begin
      if (low_run > 5 * 10 + 5 && low_run < 50 * 10) blank_spans++;
      low_run = 0;
    end
  end

  task automatic reg_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_we = 0;
  endtask

  task automatic wait_int();
    logic got_int;
    got_int = 0;
    while (!got_int) begin
      while (!irq) @(negedge clk);
      bus_addr = REG_INT_SENT; #1;
      got_int = bus_rdata[0];
      if (got_int) reg_write(REG_INT_SENT, 0);
      bus_addr = REG_PPS_SENT; #1;
      if (bus_rdata[0]) reg_write(REG_PPS_SENT, 0);
    end
  endtask

  // driver: build the stage words for a mode
  task automatic program_mode(input int mode, output int spc, output logic [3:0] visits);
    logic [31:0] a, b, upd;
    int          n_meas;
    n_meas = (mode == 0) ? 1 : (mode == 1 ? 2 : 4);
    spc = n_meas * SPM;
    a = 0; b = 0; upd = 0;
    for (int m = 0; m < n_meas; m++) begin
      // measurement order: 2-diode switching walks {B,A} = 00, 01, 11, 10
      logic sa, sb;
      sa = (m == 1 || m == 2);
      sb = (m >= 2);
      if (mode == 1) sb = 0;
      for (int k = 0; k < SPM; k++) begin
        a[m * SPM + k] = sa;
        b[m * SPM + k] = sb;
      end
      upd[m * SPM] = 1;       // switch (and blank) at each measurement start
    end
    visits = (mode == 0) ? 4'b0001 : (mode == 1 ? 4'b0011 : 4'b1111);
    reg_write(REG_SAMPLES_PER_CYC, spc);
    reg_write(REG_PS_A, a);
    reg_write(REG_PS_B, b);
    reg_write(REG_PS_UPD, upd);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int spc, changes0;
    logic [3:0] visits;
    foreach (image[i]) image[i] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    reg_write(REG_SAMPLE_INTERVAL, 50);
    reg_write(REG_INTEG_PERIOD, PERIOD);
    reg_write(REG_PS_BLANK, 20);
    reg_write(REG_IRESET_BLANK, 5);
    reg_write(REG_CONTROL, 32'h38);
    wait_int();                          // first scan with mode defaults
    for (int mode = 0; mode < 3; mode++) begin
      program_mode(mode, spc, visits);
      reg_write(REG_CONTROL, 32'h39);    // start scan on the next 1-PPS
      wait_int();                        // scan start: no data
      changes0 = switch_changes;
      wait_int();                        // first full integration
      wait_int();                        // second: switch history settled
      for (int s = 0; s < 4; s++)
        for (int c = 0; c < N_ADC; c++) begin
          automatic int i = s + 4 * c;
          check($sformatf("mode %0d state %0d conv %0d", mode, s, c),
                longint'({image[4*i+3], image[4*i+2], image[4*i+1], image[4*i]}),
                visits[s] ? SPM * PERIOD : 0);
        end
      // over two integrations the switches change once per measurement
      // (1-diode and 2-diode modes) and never without switching
      check($sformatf("mode %0d switch changes", mode), switch_changes - changes0,
            mode == 0 ? 0 : 2 * (spc / SPM) * PERIOD);
    end
    check("phase-switch blanking spans seen", longint'(blank_spans > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
