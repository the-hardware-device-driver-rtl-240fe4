// ccb_cal_diode_tb - self-checking test of the calibration-diode unit.
//
// Issues integration-start loads with and without the update flag and
// with equal and differing states, and checks the diode outputs and that
// the settling flag lasts exactly settle_time ticks only when the diodes
// were switched.
module ccb_cal_diode_tb;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        tick, load = 1'b0, cal_update = 1'b0;
  logic [1:0]  cal_states = '0, cal;
  logic [31:0] settle_time = '0;
  logic        settling;
  int          checks = 0, failures = 0;
  int          div = 0, tick_div = 1;

  ccb_cal_diode dut (.*);

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

  logic [1:0] exp_cal = 2'b00;

  task automatic do_load(input logic upd, input logic [1:0] st, input int settle, input int td);
    int ticks;
    logic sw;
    tick_div = td; settle_time = settle; cal_update = upd; cal_states = st;
    sw = upd && st != exp_cal;
    if (sw) exp_cal = st;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    check("cal", int'(cal), int'(exp_cal));
    ticks = 0;
    while (settling) begin
      if (tick) ticks++;
      @(negedge clk);
    end
    check("settle ticks", ticks, sw ? settle : 0);
    check("cal after settle", int'(cal), int'(exp_cal));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset cal", int'(cal), 0);
    check("reset settling", int'(settling), 0);
    do_load(1, 2'b01, 50, 1);   // switch A on: delay
    do_load(1, 2'b01, 50, 1);   // same states: no delay
    do_load(0, 2'b10, 50, 1);   // no update flag: nothing changes
    do_load(1, 2'b10, 17, 3);   // switch both
    do_load(1, 2'b11, 0, 1);    // zero settling time
    for (int r = 0; r < 20; r++)
      do_load(1'($urandom_range(1)), 2'($urandom), $urandom_range(300), $urandom_range(4, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
