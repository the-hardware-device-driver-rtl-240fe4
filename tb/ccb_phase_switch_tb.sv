// ccb_phase_switch_tb - self-checking test of the phase-switch state machine.
//
// For random switch patterns and cycle lengths, advances the state machine
// sample by sample and compares the switch outputs, the transition flag
// and the end-of-cycle flag with a model that indexes the configuration
// words directly by stage number (stage = sample number mod cycle length),
// holding the previous switch states wherever the update flag is clear.
module ccb_phase_switch_tb;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        restart = 1'b0, advance = 1'b0;
  logic [5:0]  samples_per_cycle;
  logic [31:0] cfg_a, cfg_b, cfg_upd;
  logic        trans_next, last_next, ps_a, ps_b;
  logic [1:0]  state;
  int          checks = 0, failures = 0;

  ccb_phase_switch dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic exp_a = 0, exp_b = 0;
  int   cycles_seen = 0;

  task automatic run_cfg(input int spc, input int n_samples);
    int len, stage;
    len = (spc == 0) ? 1 : (spc > 32 ? 32 : spc);
    samples_per_cycle = 6'(spc);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    for (int k = 0; k < n_samples; k++) begin
      stage = k % len;
      check("trans_next", int'(trans_next), int'(cfg_upd[stage]));
      check("last_next", int'(last_next), int'(stage == len - 1));
      if (stage == len - 1) cycles_seen++;
      advance = 1;
      @(negedge clk);
      advance = 0;
      if (cfg_upd[stage]) begin exp_a = cfg_a[stage]; exp_b = cfg_b[stage]; end
      check("ps_a", int'(ps_a), int'(exp_a));
      check("ps_b", int'(ps_b), int'(exp_b));
      check("state", int'(state), int'({exp_b, exp_a}));
      // switch outputs hold between samples
      repeat ($urandom_range(3)) @(negedge clk);
      check("hold", int'(state), int'({exp_b, exp_a}));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    samples_per_cycle = 1; cfg_a = 0; cfg_b = 0; cfg_upd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset state", int'(state), 0);
    // 2-diode switching over 4 samples, all stages updated
    cfg_a = 32'b0101; cfg_b = 32'b0011; cfg_upd = 32'b1111;
    run_cfg(4, 12);
    // stage 2 holds the switches of stage 1
    cfg_a = 32'b1010; cfg_b = 32'b0110; cfg_upd = 32'b1011;
    run_cfg(4, 12);
    for (int r = 0; r < 30; r++) begin
      cfg_a = $urandom; cfg_b = $urandom; cfg_upd = $urandom;
      run_cfg($urandom_range(33, 1), $urandom_range(80, 1));
    end
    cfg_a = $urandom; cfg_b = $urandom; cfg_upd = $urandom;
    run_cfg(32, 70);
    run_cfg(0, 5);
    check("cycles seen", int'(cycles_seen > 20), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
