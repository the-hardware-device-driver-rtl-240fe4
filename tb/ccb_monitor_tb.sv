// ccb_monitor_tb - self-checking test of the A/D monitoring cache.
//
// Checks that after arm the cache takes the next set of conversion
// results, zero-extended to 32 bits, keeps it through later conversions,
// and takes a new set only after the next arm.
module ccb_monitor_tb;
  import ccb_pkg::*;
  localparam int ADC_W = 16;

  logic                        clk = 1'b0, rst_n = 1'b0;
  logic                        arm = 1'b0, adc_valid = 1'b0;
  logic [N_ADC-1:0][ADC_W-1:0] adc_data = '0;
  logic [N_ADC-1:0][31:0]      mon;
  logic                        fresh;
  int                          checks = 0, failures = 0;

  ccb_monitor #(.ADC_W(ADC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [N_ADC-1:0][ADC_W-1:0] expect_set;

  task automatic conv(output logic [N_ADC-1:0][ADC_W-1:0] d);
    for (int c = 0; c < N_ADC; c++) d[c] = ADC_W'($urandom);
    adc_data = d;
    @(negedge clk); adc_valid = 1; @(negedge clk); adc_valid = 0;
    repeat ($urandom_range(3)) @(negedge clk);
  endtask

  task automatic compare(input string what);
    for (int c = 0; c < N_ADC; c++) check($sformatf("%s ch%0d", what, c), int'(mon[c]), int'(expect_set[c]));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_ADC-1:0][ADC_W-1:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset fresh", int'(fresh), 0);
    for (int r = 0; r < 10; r++) begin
      @(negedge clk); arm = 1; @(negedge clk); arm = 0;
      check("not fresh after arm", int'(fresh), 0);
      conv(d);
      expect_set = d;
      check("fresh", int'(fresh), 1);
      compare("first set");
      repeat ($urandom_range(4, 1)) conv(d);
      compare("held set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
