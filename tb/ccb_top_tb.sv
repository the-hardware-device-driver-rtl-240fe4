// ccb_top_tb - end-to-end test of the CCB core, acting as driver and front end.
//
// The testbench plays the host driver (register writes, interrupt
// handling, reading the DMA area), the 16 A/D converters (random results
// a few clocks after each conversion strobe), a PCI master that accepts
// DMA words with random stalls, and a 1-PPS source. A reference model,
// written from the interface rules and independent of the RTL, follows
// every sample: its phase-switch stage is the sample number within the
// scan modulo the cycle length, so it predicts the switch states, the
// blanking of each sample, which of the four integrations each result
// belongs to, and where each integration ends. At every integration
// interrupt that follows a DMA dump the whole DMA area (64 sums, overflow
// mask, monitoring values) is compared with the model.
//
// The run goes through: start-up wait for interrupt enable; a scan with
// cal-diode switching and settling; 1-PPS interrupts; start scan (waits
// for a 1-PPS edge); stop scan (restart at integration end); overflow;
// interrupts disabled while the core keeps running; front-end outputs
// disabled; reload to defaults and one integration at the default
// configuration. Each of these is counted and must happen at least once.
// Clock per tick is 2 and the A/D width 32 bits so that all of this,
// overflow included, fits in a short simulation.
module ccb_top_tb;
  import ccb_pkg::*;
  localparam int CPT   = 2;
  localparam int ADC_W = 32;
  localparam int PPS_PERIOD = 9000;

  logic                        clk = 1'b0, rst_n = 1'b0;
  logic                        bus_we = 1'b0;
  logic [3:0]                  bus_addr = '0;
  logic [31:0]                 bus_wdata = '0, bus_rdata;
  logic                        irq, pps_in = 1'b0;
  logic                        adc_convert, adc_valid = 1'b0;
  logic [N_ADC-1:0][ADC_W-1:0] adc_data = '0;
  logic                        int_reset, integ_gate;
  logic                        ps_a, ps_a_oe, ps_b, ps_b_oe, cal_a, cal_a_oe, cal_b, cal_b_oe;
  logic                        dma_valid, dma_ready = 1'b0;
  logic [11:0]                 dma_addr;
  logic [31:0]                 dma_data;
  logic                        reload_req;
  int                          checks = 0, failures = 0;

  ccb_top #(.CLK_PER_TICK(CPT), .ADC_W(ADC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // ---- driver-side shadow of the registers --------------------------------
  scan_cfg_t  cur, act;          // registers now / in use by the running scan
  logic [1:0] pend_cal = 0;      // per-integration registers
  logic       pend_upd = 0;
  logic [1:0] exp_cal = 0;
  logic       exp_a = 0, exp_b = 0;
  logic [7:0] ctrl_shadow = 0;

  // ---- mechanism counters ------------------------------------------------
  int n_dumps_checked = 0, n_pps_irq = 0, n_start_scan = 0, n_stop_scan = 0;
  int n_cal_settle = 0, n_ps_blank = 0, n_ireset_blank = 0, n_overflow = 0;
  int n_masked = 0, n_drive_off = 0, n_reload = 0, n_scans = 0, n_ints = 0;

  // ---- 1-PPS source ---------------------------------------------------------
  int cyc = 0, last_pps_rise = -100000;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (cyc % PPS_PERIOD == PPS_PERIOD - 1) begin pps_in <= 1; last_pps_rise <= cyc; end
    if (cyc % PPS_PERIOD == 150) pps_in <= 0;
  end

  // ---- DMA sink -------------------------------------------------------------
  logic [7:0] image [512];
  bit         dump_seen = 0;
  int         dma_words = 0;
  always @(negedge clk) dma_ready <= 1'($urandom_range(4) != 0);
  always @(posedge clk) begin
    if (dma_valid && dma_ready) begin
      for (int b = 0; b < 4; b++) image[int'(dma_addr) + b] <= dma_data[8*b +: 8];
      dma_words <= dma_words + 1;
      if (int'(dma_addr) == 4 * (DMA_WORDS - 1)) dump_seen <= 1;
    end
  end

  // ---- A/D converters and the reference model --------------------------------
  longint ref_acc [4][N_ADC];
  longint ref_done [4][N_ADC];
  logic [31:0] mon_next [N_ADC], mon_done [N_ADC];
  int     scan_sample = 0, integ_sample = 0, done_samples = 0;
  int     last_conv = 0, int_seen_cyc = 0;
  bit     first_of_integ_switched = 0;
  logic [1:0] snap_cal = 0;
  logic   snap_upd = 0;
  bit     snap_valid = 0, int_before = 0;
  int     win_reset = 0, win_blank = 0;
  bit     big_mode = 0;
  bit     model_on = 0;

  function automatic int spc_of(scan_cfg_t c);
    return (c.samples_per_cycle == 0) ? 1 : int'(c.samples_per_cycle);
  endfunction
  function automatic int per_of(scan_cfg_t c);
    return (c.integ_period == 0) ? 1 : int'(c.integ_period);
  endfunction

  always @(negedge clk) begin
    if (int_reset) win_reset++;
    if (!integ_gate) win_blank++;
    if (adc_convert) begin
      automatic int stage = scan_sample % spc_of(act);
      automatic logic upd = act.ps_upd[stage];
      automatic logic [N_ADC-1:0][ADC_W-1:0] d;
      automatic int gap = cyc - last_conv;
      if (upd) begin exp_a = act.ps_a[stage]; exp_b = act.ps_b[stage]; end
      if (integ_sample == 0) begin
        // the cal-diode registers copied at this integration's start
        automatic logic [1:0] lc = snap_valid ? snap_cal : pend_cal;
        automatic logic       lu = snap_valid ? snap_upd : pend_upd;
        int_before = snap_valid;
        snap_valid = 0;
        first_of_integ_switched = lu && lc != exp_cal && act.cal_settle != 0;
        if (lu) exp_cal = lc;
        if (model_on) begin
          check("cal_a", longint'(cal_a), longint'(exp_cal[0]));
          check("cal_b", longint'(cal_b), longint'(exp_cal[1]));
        end
      end
      if (model_on) begin
        check("ps_a during sample", longint'(ps_a), longint'(exp_a));
        check("ps_b during sample", longint'(ps_b), longint'(exp_b));
        if (integ_sample > 0) begin
          check("sample interval (clocks)", gap, int'(act.sample_interval) * CPT);
          check("integrator-reset blanking", win_reset, int'(act.ireset_blank) * CPT);
          check("total blanking", win_blank,
                (int'(act.ireset_blank) + (upd ? int'(act.ps_blank) : 0)) * CPT);
          if (upd && act.ps_blank != 0) n_ps_blank++;
          if (act.ireset_blank != 0) n_ireset_blank++;
        end else if (int_before) begin
          // first sample after the integration interrupt: cal settling
          automatic int t = cyc - int_seen_cyc;
          automatic int base = int'(act.sample_interval) * CPT;
          if (first_of_integ_switched) begin
            check("cal settling delay", longint'(t >= base + int'(act.cal_settle) * CPT - 2), 1);
            n_cal_settle++;
          end else begin
            check("no settling delay", longint'(t <= base + CPT + 6), 1);
          end
        end
      end
      for (int c = 0; c < N_ADC; c++) begin
        d[c] = (big_mode && c == 5) ? 32'hf000_0000 : 32'($urandom_range(65535));
        ref_acc[{exp_b, exp_a}][c] += longint'(d[c]);
        if (integ_sample == 0) mon_next[c] = d[c];
      end
      last_conv = cyc;
      win_reset = 0; win_blank = 0;
      scan_sample++;
      integ_sample++;
      if (integ_sample == spc_of(act) * per_of(act)) begin
        ref_done = ref_acc;
        mon_done = mon_next;
        done_samples = integ_sample;
        foreach (ref_acc[s, c]) ref_acc[s][c] = 0;
        integ_sample = 0;
      end
      fork
        begin
          automatic logic [N_ADC-1:0][ADC_W-1:0] dd = d;
          repeat ($urandom_range(8, 3)) @(negedge clk);
          adc_data = dd; adc_valid = 1;
          @(negedge clk);
          adc_valid = 0; adc_data = '0;
        end
      join_none
    end
  end

  // ---- driver -----------------------------------------------------------------
  typedef struct { logic [3:0] a; logic [31:0] d; } wr_t;
  wr_t wq [$];
  bit  expect_new_scan = 1;      // next integration interrupt starts a scan

  task automatic reg_write(input logic [3:0] a, input logic [31:0] d);
    wq.push_back('{a, d});
    while (wq.size() != 0) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic check_dump();
    logic [63:0] mask;
    longint      exp_v;
    int          over;
    over = 0;
    check("samples in integration", done_samples, spc_of(act) * per_of(act));
    for (int s = 0; s < 4; s++)
      for (int c = 0; c < N_ADC; c++) begin
        automatic int i = s + 4 * c;
        exp_v = ref_done[s][c] > 64'hffff_ffff ? 64'hffff_ffff : ref_done[s][c];
        check($sformatf("dma value %0d", i),
              longint'({image[4*i+3], image[4*i+2], image[4*i+1], image[4*i]}), exp_v);
      end
    for (int b = 0; b < 64; b++) mask[b] = image[263 - b / 8][b % 8];
    for (int s = 0; s < 4; s++)
      for (int c = 0; c < N_ADC; c++) begin
        automatic bit o = ref_done[s][c] > 64'hffff_ffff;
        check("overflow bit", longint'(mask[s + 4 * c]), longint'(o));
        if (o) over++;
      end
    if (over != 0) n_overflow++;
    for (int c = 0; c < N_ADC; c++)
      check("monitoring value",
            longint'({image[264+4*c+3], image[264+4*c+2], image[264+4*c+1], image[264+4*c]}),
            longint'(mon_done[c]));
    n_dumps_checked++;
  endtask

  task automatic handle_int();
    n_ints++;
    int_seen_cyc = cyc;
    if (dump_seen) begin
      check_dump();
      dump_seen = 0;
    end
    if (expect_new_scan) begin
      act = cur;
      n_scans++;
      scan_sample = 0;
      integ_sample = 0;
      foreach (ref_acc[s, c]) ref_acc[s][c] = 0;
      expect_new_scan = 0;
      model_on = 1;
    end
    // the per-integration registers were just copied
    snap_cal = pend_cal; snap_upd = pend_upd; snap_valid = 1;
    // queue the configuration of the following integration
    pend_cal = 2'($urandom);
    pend_upd = 1'($urandom_range(1));
    wq.push_back('{REG_CAL_STATES, 32'(pend_cal)});
    wq.push_back('{REG_CAL_UPDATE, 32'(pend_upd)});
  endtask

  initial begin : driver
    forever begin
      @(negedge clk);
      if (irq) begin
        bus_addr = REG_INT_SENT; #1;
        if (bus_rdata[0]) begin
          handle_int();
          wq.push_front('{REG_INT_SENT, 32'd0});
        end
        bus_addr = REG_PPS_SENT; #1;
        if (bus_rdata[0]) begin
          n_pps_irq++;
          check("pps interrupt follows 1-PPS edge", longint'(cyc - last_pps_rise < 12), 1);
          wq.push_front('{REG_PPS_SENT, 32'd0});
        end
      end
      if (wq.size() != 0) begin
        automatic wr_t w = wq.pop_front();
        bus_we = 1; bus_addr = w.a; bus_wdata = w.d;
        @(negedge clk);
        bus_we = 0;
      end
    end
  end

  task automatic wait_dumps(input int n);
    int target;
    target = n_dumps_checked + n;
    while (n_dumps_checked < target) @(negedge clk);
  endtask

  task automatic write_scan_cfg(input scan_cfg_t c);
    cur = c;
    reg_write(REG_SAMPLE_INTERVAL, 32'(c.sample_interval));
    reg_write(REG_SAMPLES_PER_CYC, 32'(c.samples_per_cycle));
    reg_write(REG_PS_A, c.ps_a);
    reg_write(REG_PS_B, c.ps_b);
    reg_write(REG_PS_UPD, c.ps_upd);
    reg_write(REG_INTEG_PERIOD, 32'(c.integ_period));
    reg_write(REG_PS_BLANK, 32'(c.ps_blank));
    reg_write(REG_IRESET_BLANK, 32'(c.ireset_blank));
    reg_write(REG_CAL_SETTLE, c.cal_settle);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    scan_cfg_t c;
    int        n, s0, t0;
    foreach (ref_acc[s, cc]) begin ref_acc[s][cc] = 0; ref_done[s][cc] = 0; end
    foreach (image[i]) image[i] = 0;
    cur = SCAN_CFG_DEFAULT; act = SCAN_CFG_DEFAULT;
    repeat (5) @(negedge clk);
    rst_n = 1;
    // start-up: nothing runs until interrupts are enabled
    n = 0;
    repeat (400) begin @(negedge clk); if (adc_convert) n++; end
    check("idle until enabled", n, 0);
    bus_addr = REG_CONTROL; #1;
    check("control zero after reset", longint'(bus_rdata), 0);
    // first scan: 2-diode phase switching, stage 2 holds
    c = SCAN_CFG_DEFAULT;
    c.sample_interval = 12; c.samples_per_cycle = 4;
    c.ps_a = 32'b0101; c.ps_b = 32'b0011; c.ps_upd = 32'b1011;
    c.integ_period = 3; c.ps_blank = 3; c.ireset_blank = 2; c.cal_settle = 100;
    write_scan_cfg(c);
    pend_cal = 2'b01; pend_upd = 1;
    reg_write(REG_CAL_STATES, 32'(pend_cal));
    reg_write(REG_CAL_UPDATE, 32'(pend_upd));
    ctrl_shadow = 8'hf8;
    reg_write(REG_CONTROL, 32'(ctrl_shadow));
    wait_dumps(6);
    check("scans so far", n_scans, 1);
    // start scan: stops at the end of the sample, begins on 1-PPS
    c.sample_interval = 10; c.samples_per_cycle = 3;
    c.ps_a = $urandom; c.ps_b = $urandom; c.ps_upd = $urandom | 32'h1;
    c.integ_period = 2; c.ps_blank = 4; c.ireset_blank = 1; c.cal_settle = 60;
    write_scan_cfg(c);
    s0 = n_scans;
    reg_write(REG_CONTROL, 32'(ctrl_shadow | 8'h01));
    expect_new_scan = 1;
    while (n_scans == s0) @(negedge clk);
    check("start scan begins on 1-PPS", longint'(cyc - last_pps_rise < 12), 1);
    check("partial integration not written", longint'(dump_seen), 0);
    n_start_scan++;
    wait_dumps(4);
    // stop scan: integration finishes, new scan at once
    repeat (37) @(negedge clk);
    c.integ_period = 4; c.samples_per_cycle = 5; c.ps_upd = $urandom;
    write_scan_cfg(c);
    s0 = n_scans;
    t0 = n_dumps_checked;
    reg_write(REG_CONTROL, 32'(ctrl_shadow | 8'h02));
    // the interrupt after the current integration carries its data and
    // starts the new scan
    while (n_ints == 0 || dump_seen == 0) @(negedge clk);
    expect_new_scan = 1;
    while (n_scans == s0) @(negedge clk);
    check("stop scan: last integration written", n_dumps_checked, t0 + 1);
    check("stop scan: not synchronised to 1-PPS", longint'(cyc - last_pps_rise > 12 || cyc - last_pps_rise < 0), 1);
    n_stop_scan++;
    wait_dumps(3);
    // overflow of one converter
    big_mode = 1;
    wait_dumps(3);
    big_mode = 0;
    wait_dumps(2);
    // interrupts disabled: the line stays low, the core keeps integrating
    ctrl_shadow = 8'hf0;
    reg_write(REG_CONTROL, 32'(ctrl_shadow));
    n = 0; t0 = dma_words;
    repeat (6000) begin
      @(negedge clk);
      if (irq) n++;
    end
    check("line low while disabled", n, 0);
    check("core ran while disabled", longint'(dma_words > t0), 1);
    n_masked++;
    ctrl_shadow = 8'h08;    // interrupts on, front-end outputs off
    reg_write(REG_CONTROL, 32'(ctrl_shadow));
    n = 0;
    repeat (3000) begin
      @(negedge clk);
      if (ps_a_oe || ps_b_oe || cal_a_oe || cal_b_oe) n++;
    end
    check("outputs not driven", n, 0);
    n_drive_off++;
    wait_dumps(2);
    check("outputs enabled by control", longint'({ps_a_oe, ps_b_oe, cal_a_oe, cal_b_oe}), 0);
    // reload: registers to defaults, core waits for enable, then a default scan
    reg_write(REG_CONTROL, 32'h04);
    bus_addr = REG_SAMPLE_INTERVAL; #1;
    check("default sample interval after reload", longint'(bus_rdata), 250);
    bus_addr = REG_CONTROL; #1;
    check("control zero after reload", longint'(bus_rdata), 0);
    check("cal diodes off after reload", longint'({cal_a, cal_b}), 0);
    model_on = 0;
    repeat (20) @(negedge clk);
    n = 0;
    repeat (2000) begin @(negedge clk); if (adc_convert) n++; end
    check("idle after reload", n, 0);
    n_reload++;
    cur = SCAN_CFG_DEFAULT;
    exp_a = 0; exp_b = 0; exp_cal = 0; pend_cal = 0; pend_upd = 0; snap_valid = 0;
    dump_seen = 0;
    expect_new_scan = 1;
    ctrl_shadow = 8'hf8;
    reg_write(REG_CONTROL, 32'(ctrl_shadow));
    wait_dumps(1);
    check("default integration: 40 samples", done_samples, 40);
    // every mechanism happened
    check("dumps checked", longint'(n_dumps_checked >= 20), 1);
    check("1-PPS interrupts", longint'(n_pps_irq > 0), 1);
    check("start scan on 1-PPS", longint'(n_start_scan > 0), 1);
    check("stop scan", longint'(n_stop_scan > 0), 1);
    check("cal-diode settling", longint'(n_cal_settle > 0), 1);
    check("phase-switch blanking", longint'(n_ps_blank > 0), 1);
    check("integrator-reset blanking", longint'(n_ireset_blank > 0), 1);
    check("overflow", longint'(n_overflow > 0), 1);
    check("interrupts masked", longint'(n_masked > 0), 1);
    check("outputs disabled", longint'(n_drive_off > 0), 1);
    check("reload", longint'(n_reload > 0), 1);
    $display("dumps=%0d pps=%0d start=%0d stop=%0d cal=%0d psblank=%0d ireset=%0d ovf=%0d masked=%0d drive=%0d reload=%0d scans=%0d",
             n_dumps_checked, n_pps_irq, n_start_scan, n_stop_scan, n_cal_settle, n_ps_blank,
             n_ireset_blank, n_overflow, n_masked, n_drive_off, n_reload, n_scans);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
