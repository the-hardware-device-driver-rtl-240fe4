// ccb_irq_tb - self-checking test of 1-PPS detection and interrupt gating.
//
// Drives 1-PPS pulses of various lengths, asynchronous to the clock, and
// checks one pps_edge per rising edge, that the interrupt-sent set strobes
// appear only while interrupts are enabled, and that the shared line
// follows the sent registers and the enable.
module ccb_irq_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pps_in = 1'b0, en_irq = 1'b0, int_req = 1'b0;
  logic int_sent = 1'b0, pps_sent = 1'b0;
  logic pps_edge, int_set, pps_set, irq;
  int   checks = 0, failures = 0;
  int   edges = 0, sets = 0;

  ccb_irq dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (pps_edge) edges++;
    if (pps_set) sets++;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic pulse_pps(input int high_ns, input int low_ns);
    #(high_ns) pps_in = 1'b0;
    #(low_ns)  pps_in = 1'b1;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    #3;
    // disabled: edges seen, nothing set
    for (int k = 0; k < 5; k++) begin pps_in = 1; #(37 + 13 * k); pps_in = 0; #(41 + 7 * k); end
    repeat (4) @(negedge clk);
    check("edges while disabled", edges, 5);
    check("sets while disabled", sets, 0);
    @(negedge clk); int_req = 1; #1;
    check("int_set disabled", int'(int_set), 0);
    @(negedge clk); int_req = 0;
    // enabled
    en_irq = 1;
    for (int k = 0; k < 7; k++) begin pps_in = 1; #(25 + 101 * k); pps_in = 0; #(33 + 3 * k); end
    repeat (4) @(negedge clk);
    check("edges", edges, 12);
    check("sets", sets, 7);
    @(negedge clk); int_req = 1; #1;
    check("int_set", int'(int_set), 1);
    @(negedge clk); int_req = 0; #1;
    check("int_set one clock", int'(int_set), 0);
    // edge latency: high in the second clock after the input rises
    @(negedge clk); pps_in = 1;
    @(posedge clk); #1; check("no edge after 1 clock", int'(pps_edge), 0);
    @(posedge clk); #1; check("edge after 2 clocks", int'(pps_edge), 1);
    @(posedge clk); #1; check("edge one clock long", int'(pps_edge), 0);
    pps_in = 0;
    // the line
    int_sent = 0; pps_sent = 0; #1; check("line idle", int'(irq), 0);
    int_sent = 1; #1; check("line int", int'(irq), 1);
    int_sent = 0; pps_sent = 1; #1; check("line pps", int'(irq), 1);
    en_irq = 0; #1; check("line disabled", int'(irq), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
