// ccb_full_tb - the CCB core at its default parameters and configuration.
//
// Nothing is overridden: a 100 MHz clock (10 clocks per 0.1 us tick),
// 16-bit A/D results, and the register defaults after reset (25 us
// samples, one sample per cycle, 40 cycles per integration, no phase
// switching, no blanking). The testbench enables interrupts, which starts
// the first scan, and then follows three integrations as the driver would:
// each integration interrupt after the first must arrive 1 ms after the
// previous one (40 samples of 25 us, plus the DMA dump), and the DMA area
// must hold the sums of the 40 samples in the phase-switch-off state,
// zeros in the other three states, no overflow and the first sample of
// the integration as monitoring values.
module ccb_full_tb;
  import ccb_pkg::*;

  logic                     clk = 1'b0, rst_n = 1'b0;
  logic                     bus_we = 1'b0;
  logic [3:0]               bus_addr = '0;
  logic [31:0]              bus_wdata = '0, bus_rdata;
  logic                     irq, pps_in = 1'b0;
  logic                     adc_convert, adc_valid = 1'b0;
  logic [N_ADC-1:0][15:0]   adc_data = '0;
  logic                     int_reset, integ_gate;
  logic                     ps_a, ps_a_oe, ps_b, ps_b_oe, cal_a, cal_a_oe, cal_b, cal_b_oe;
  logic                     dma_valid, dma_ready = 1'b1;
  logic [11:0]              dma_addr;
  logic [31:0]              dma_data;
  logic                     reload_req;
  int                       checks = 0, failures = 0;

  ccb_top dut (.*);

  always #5 clk = ~clk;   // 100 MHz

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int          cyc = 0;
  logic [7:0]  image [512];
  longint      ref_acc [N_ADC], ref_done [N_ADC];
  logic [15:0] first [N_ADC], first_done [N_ADC];
  int          nsamp = 0, done_samples = 0, last_conv = -1, gap_errors = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk)
    if (dma_valid && dma_ready)
      for (int b = 0; b < 4; b++) image[int'(dma_addr) + b] <= dma_data[8*b +: 8];

  // A/D converters: results 20 clocks after the strobe
  always @(negedge clk) begin
    if (adc_convert) begin
      automatic logic [N_ADC-1:0][15:0] d;
      if (nsamp > 0 && cyc - last_conv != 2500) gap_errors++;
      last_conv = cyc;
      for (int c = 0; c < N_ADC; c++) begin
        d[c] = 16'($urandom);
        ref_acc[c] += longint'(d[c]);
        if (nsamp == 0) first[c] = d[c];
      end
      nsamp++;
      if (nsamp == 40) begin
        ref_done = ref_acc; first_done = first; done_samples = nsamp;
        foreach (ref_acc[c]) ref_acc[c] = 0;
        nsamp = 0;
      end
      fork
        begin
          automatic logic [N_ADC-1:0][15:0] dd = d;
          repeat (20) @(negedge clk);
          adc_data = dd; adc_valid = 1;
          @(negedge clk);
          adc_valid = 0;
        end
      join_none
    end
  end

  task automatic wait_int(output int t);
    while (!irq) @(negedge clk);
    t = cyc;
    bus_addr = REG_INT_SENT; #1;
    check("integration interrupt flagged", longint'(bus_rdata[0]), 1);
    @(negedge clk); bus_we = 1; bus_wdata = 0;
    @(negedge clk); bus_we = 0;
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_prev, t_now;
    foreach (ref_acc[c]) ref_acc[c] = 0;
    foreach (image[i]) image[i] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    bus_addr = REG_INTEG_PERIOD; #1;
    check("default integration period", longint'(bus_rdata), 40);
    @(negedge clk); bus_we = 1; bus_addr = REG_CONTROL; bus_wdata = 32'h08;
    @(negedge clk); bus_we = 0;
    wait_int(t_prev);                       // first interrupt of the scan
    for (int k = 0; k < 3; k++) begin
      wait_int(t_now);
      check("integration length 1 ms (+dump)", longint'(t_now - t_prev >= 100_000 && t_now - t_prev <= 100_200), 1);
      t_prev = t_now;
      check("samples", done_samples, 40);
      for (int s = 0; s < 4; s++)
        for (int c = 0; c < N_ADC; c++) begin
          automatic int i = s + 4 * c;
          check($sformatf("value %0d", i),
                longint'({image[4*i+3], image[4*i+2], image[4*i+1], image[4*i]}),
                s == 0 ? ref_done[c] : 0);
        end
      for (int b = 256; b < 264; b++) check("no overflow", longint'(image[b]), 0);
      for (int c = 0; c < N_ADC; c++)
        check("monitor", longint'({image[264+4*c+3], image[264+4*c+2], image[264+4*c+1], image[264+4*c]}),
              longint'(first_done[c]));
    end
    check("sample spacing 25 us", gap_errors, 0);
    check("phase switches off", longint'({ps_a, ps_b}), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
