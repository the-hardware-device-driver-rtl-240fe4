// ccb_integrator_tb - self-checking test of the 64 integrators.
//
// Feeds random conversion results for random phase-switch states, some
// large enough to overflow (the A/D width is raised to 32 bits here so
// that overflow comes quickly), and compares all 64 sums and overflow
// flags, read through the array-order port, with a model that sums in
// 64-bit arithmetic and saturates at 2^32-1.
module ccb_integrator_tb;
  import ccb_pkg::*;
  localparam int ADC_W = 32;

  logic                        clk = 1'b0, rst_n = 1'b0;
  logic                        clear = 1'b0, adc_convert = 1'b0, adc_valid = 1'b0;
  logic [1:0]                  state = '0;
  logic [N_ADC-1:0][ADC_W-1:0] adc_data = '0;
  logic                        busy;
  logic [5:0]                  rd_idx = '0;
  logic [31:0]                 rd_data;
  logic [N_VALUES-1:0]         ovf;
  int                          checks = 0, failures = 0;

  ccb_integrator #(.ADC_W(ADC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  longint ref_sum [4][16];
  int     n_ovf;

  task automatic sample(input logic [1:0] st, input bit big);
    @(negedge clk); adc_convert = 1; state = st;
    @(negedge clk); adc_convert = 0; state = 2'($urandom);  // state may move on
    check("busy after convert", longint'(busy), 1);
    for (int c = 0; c < N_ADC; c++) begin
      adc_data[c] = big ? 32'hc000_0000 + $urandom_range(1000) : 32'($urandom_range(65535));
      ref_sum[st][c] += longint'(adc_data[c]);
    end
    repeat ($urandom_range(4)) @(negedge clk);
    adc_valid = 1;
    @(negedge clk); adc_valid = 0;
    check("busy cleared", longint'(busy), 0);
    // a stray valid without a conversion adds nothing
    adc_valid = 1; @(negedge clk); adc_valid = 0;
  endtask

  task automatic compare();
    n_ovf = 0;
    for (int s = 0; s < 4; s++)
      for (int c = 0; c < N_ADC; c++) begin
        logic over;
        over = ref_sum[s][c] > 64'hffff_ffff;
        rd_idx = 6'(s + 4 * c);
        #1;
        check($sformatf("sum s%0d c%0d", s, c), longint'(rd_data), over ? 64'hffff_ffff : ref_sum[s][c]);
        check($sformatf("ovf s%0d c%0d", s, c), longint'(ovf[s + 4 * c]), longint'(over));
        if (over) n_ovf++;
      end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_sum[s, c]) ref_sum[s][c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int k = 0; k < 200; k++) sample(2'($urandom), 0);
    compare();
    check("no overflow yet", longint'(n_ovf), 0);
    // drive state 3 into overflow
    for (int k = 0; k < 6; k++) sample(2'd3, 1);
    for (int k = 0; k < 40; k++) sample(2'($urandom_range(2)), 0);
    compare();
    check("overflows seen", longint'(n_ovf), 16);
    // clear starts a new integration
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    foreach (ref_sum[s, c]) ref_sum[s][c] = 0;
    compare();
    for (int k = 0; k < 50; k++) sample(2'($urandom), 0);
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
