// ccb_sample_timer_tb - self-checking test of the sample timer.
//
// Runs the timer with a tick every TICK_DIV clocks and checks, sample by
// sample, that a sample lasts sample_interval ticks, that int_reset is
// high for ireset_blank ticks at its start, that integ_gate is low for
// ireset_blank ticks, plus ps_blank ticks when the sample follows a
// phase-switch update, and that dropping run lets the running sample
// finish before the timer idles.
module ccb_sample_timer_tb;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        tick, run = 1'b0, trans_next = 1'b0;
  logic [15:0] sample_interval;
  logic [7:0]  ireset_blank, ps_blank;
  logic        sample_start, adc_convert, active, int_reset, integ_gate;
  int          checks = 0, failures = 0;
  int          div = 0, tick_div = 1;

  ccb_sample_timer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) div <= (div >= tick_div - 1) ? 0 : div + 1;
  assign tick = div == tick_div - 1;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // per-sample measurement
  int  n_cyc, n_reset, n_blank, samples;
  logic trans_q;

  task automatic run_samples(input int n, input int iv, input int ir, input int pb, input int td);
    int exp_blank;
    sample_interval = 16'(iv); ireset_blank = 8'(ir); ps_blank = 8'(pb); tick_div = td;
    @(negedge clk);
    for (int s = 0; s < n; s++) begin
      // the sample starts on this edge
      trans_next = 1'($urandom_range(1));
      run = 1;
      while (!sample_start) @(negedge clk);
      trans_q = trans_next;
      @(negedge clk);
      trans_next = 1'($urandom_range(1));
      n_cyc = 0; n_reset = 0; n_blank = 0;
      while (!adc_convert) begin
        if (tick) begin
          n_cyc++;
          if (int_reset) n_reset++;
          if (!integ_gate) n_blank++;
        end
        @(negedge clk);
      end
      n_cyc++;
      if (int_reset) n_reset++;
      if (!integ_gate) n_blank++;
      exp_blank = ir + (trans_q ? pb : 0);
      if (exp_blank > iv) exp_blank = iv;
      check("ticks per sample", n_cyc, iv == 0 ? 1 : iv);
      check("reset ticks", n_reset, ir > iv ? iv : ir);
      check("blank ticks", n_blank, exp_blank);
      samples++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    sample_interval = 10; ireset_blank = 2; ps_blank = 3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle before run", int'(active), 0);
    run_samples(6, 10, 2, 3, 1);
    run_samples(6, 25, 5, 4, 3);
    run_samples(4, 250, 5, 0, 1);
    run_samples(4, 7, 0, 0, 2);
    for (int k = 0; k < 20; k++)
      run_samples(1, $urandom_range(40, 12), $urandom_range(5), $urandom_range(6), $urandom_range(3, 1));
    // cycle-exact interval with a tick every clock
    tick_div = 1; sample_interval = 40; ireset_blank = 1; ps_blank = 1;
    while (!adc_convert) @(negedge clk);
    @(negedge clk);
    while (!adc_convert) @(negedge clk);
    t0 = $time;
    @(negedge clk);
    while (!adc_convert) @(negedge clk);
    t1 = $time;
    check("clocks between conversions", (t1 - t0) / 10, 40);
    // dropping run: the current sample completes, then the timer idles
    @(negedge clk);
    repeat (5) @(negedge clk);
    run = 0;
    n_cyc = 5;
    while (!adc_convert) begin @(negedge clk); n_cyc++; end
    check("sample completes after run drops", n_cyc, 39);
    @(negedge clk);
    check("idle after run drops", int'(active), 0);
    repeat (100) begin
      @(negedge clk);
      if (adc_convert || sample_start || integ_gate) begin
        failures++;
        $display("FAIL activity while idle");
      end
    end
    checks++;
    check("samples measured", samples, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
