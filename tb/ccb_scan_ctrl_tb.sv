// ccb_scan_ctrl_tb - self-checking test of the scan life-cycle controller.
//
// The units around the controller are replaced by small models: a sample
// timer whose samples last SAMPLE_CLKS clocks, a phase-switch stage
// counter, an integrator that is busy for a few clocks after each sample,
// a cal-diode unit that settles for a set time, and a DMA writer that is
// busy for a set time. The test checks the start-up wait for interrupt
// enable, the order of the per-integration steps, the number of samples
// per integration (samples per cycle x integration period), holding off
// sampling while the diodes settle, start scan waiting for a 1-PPS edge
// and discarding the partial integration, and stop scan letting the
// integration finish and restarting without waiting for 1-PPS.
module ccb_scan_ctrl_tb;
  import ccb_pkg::*;
  localparam int SAMPLE_CLKS = 6;

  logic      clk = 1'b0, rst_n = 1'b0;
  ctrl_t     ctrl = '0;
  scan_cfg_t scan_cfg;
  logic      pps_edge = 1'b0;
  logic      sample_start, last_next, timer_active, integ_busy, settling, dma_busy;
  scan_cfg_t work;
  logic      run, ps_restart, integ_load, clear, arm, int_req, dma_start;
  logic      start_ack, stop_ack, scan_start, integ_done;
  int        checks = 0, failures = 0;

  ccb_scan_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- unit models -------------------------------------------------------
  int   t_cnt = 0, stage = 0, busy_cnt = 0, settle_cnt = 0, dma_cnt = 0;
  logic t_end;
  int   settle_clks = 0;
  assign t_end        = timer_active && t_cnt == SAMPLE_CLKS - 1;
  assign sample_start = run && (!timer_active || t_end);
  assign last_next    = stage == int'(work.samples_per_cycle) - 1;
  assign integ_busy   = busy_cnt != 0;
  assign settling     = settle_cnt != 0;
  assign dma_busy     = dma_cnt != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer_active <= 0; t_cnt <= 0; stage <= 0; busy_cnt <= 0; settle_cnt <= 0; dma_cnt <= 0;
    end else begin
      if (sample_start) begin timer_active <= 1; t_cnt <= 0; end
      else if (t_end) timer_active <= 0;
      else if (timer_active) t_cnt <= t_cnt + 1;
      if (ps_restart) stage <= 0;
      else if (sample_start) stage <= last_next ? 0 : stage + 1;
      if (t_end) busy_cnt <= 3; else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
      if (integ_load) settle_cnt <= settle_clks; else if (settle_cnt != 0) settle_cnt <= settle_cnt - 1;
      if (dma_start) dma_cnt <= 10; else if (dma_cnt != 0) dma_cnt <= dma_cnt - 1;
    end
  end

  // ---- event bookkeeping --------------------------------------------------
  int samples_in_integ = 0, dumps = 0, loads = 0, irqs = 0, scans = 0;
  int last_dump_samples = -1;
  int run_while_settling = 0, sample_during_dump = 0, order_errors = 0;
  int load_cycle = -10, cyc = 0;

  // sampled between clock edges, where the design's outputs are settled
  always @(negedge clk) begin
    cyc++;
    if (sample_start) samples_in_integ++;
    if (dma_start) begin dumps++; last_dump_samples = samples_in_integ; end
    if (integ_load) begin
      loads++; samples_in_integ = 0; load_cycle = cyc;
      if (!(clear && arm && ps_restart)) order_errors++;
      if (dma_busy) order_errors++;
    end
    if (int_req) begin irqs++; if (cyc != load_cycle + 1) order_errors++; end
    if (scan_start) scans++;
    if (settling && run) run_while_settling++;
    if (dma_busy && sample_start) sample_during_dump++;
  end

  // the register file clears an accepted command on the clock edge
  always @(posedge clk) begin
    if (start_ack) ctrl.start_scan <= 0;
    if (stop_ack) ctrl.stop_scan <= 0;
  end

  task automatic wait_dump_samples(output int n);
    @(posedge clk);
    while (!dma_start) @(posedge clk);
    n = samples_in_integ;
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, s0, l0, t0;
    scan_cfg = SCAN_CFG_DEFAULT;
    scan_cfg.samples_per_cycle = 4;
    scan_cfg.integ_period = 3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    check("idle until interrupts enabled", scans, 0);
    check("no sampling before enable", samples_in_integ, 0);
    settle_clks = 20;
    ctrl.en_irq = 1;
    @(negedge clk); @(negedge clk);
    check("scan started", scans, 1);
    check("working config copied", int'(work.integ_period), 3);
    wait_dump_samples(n);
    check("samples per integration", n, 12);
    check("settling holds off sampling", run_while_settling, 0);
    // configuration written mid-scan is not used until the next scan
    scan_cfg.integ_period = 5;
    wait_dump_samples(n);
    check("old config still used", n, 12);
    check("no sampling during dump", sample_during_dump, 0);
    // stop scan: integration completes, new scan without 1-PPS
    repeat (20) @(negedge clk);
    ctrl.stop_scan = 1;
    s0 = scans;
    wait_dump_samples(n);
    check("stop: integration completes", n, 12);
    while (scans == s0) @(negedge clk);
    check("stop: new scan", scans, s0 + 1);
    check("stop: new config", int'(work.integ_period), 5);
    settle_clks = 0;
    wait_dump_samples(n);
    check("new samples per integration", n, 20);
    // start scan: stop at end of sample, wait for 1-PPS
    repeat (17) @(negedge clk);
    scan_cfg.samples_per_cycle = 2;
    scan_cfg.integ_period = 2;
    ctrl.start_scan = 1;
    s0 = scans; l0 = dumps;
    t0 = 0;
    while (ctrl.start_scan) begin @(negedge clk); t0++; end
    check("start: sample finishes first", int'(t0 <= SAMPLE_CLKS + 4), 1);
    n = samples_in_integ;
    repeat (200) @(negedge clk);
    check("start: waits for 1-PPS", scans, s0);
    check("start: no sampling while waiting", samples_in_integ, n);
    check("start: partial integration not dumped", dumps, l0);
    pps_edge = 1; @(negedge clk); pps_edge = 0;
    @(negedge clk);
    check("start: scan on 1-PPS", scans, s0 + 1);
    wait_dump_samples(n);
    check("start: new samples per integration", n, 4);
    wait_dump_samples(n);
    // start scan during a long cal-diode settling: taken without sampling
    settle_clks = 5000;
    while (!settling) @(negedge clk);
    repeat (10) @(negedge clk);
    s0 = scans;
    n = samples_in_integ;
    ctrl.start_scan = 1;
    repeat (3) @(negedge clk);
    check("start during settling accepted", int'(ctrl.start_scan), 0);
    pps_edge = 1; @(negedge clk); pps_edge = 0;
    repeat (2) @(negedge clk);
    check("start during settling: new scan", scans, s0 + 1);
    check("start during settling: no samples", samples_in_integ, 0);
    settle_clks = 0;
    wait_dump_samples(n);
    check("order of integration start", order_errors, 0);
    check("interrupt per integration start", irqs, loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
