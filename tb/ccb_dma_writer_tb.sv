// ccb_dma_writer_tb - self-checking test of the DMA writer.
//
// Serves the integrator read port from a table, stalls the write port at
// random, and collects the written words into a byte-addressed image of
// the DMA area. The image is then checked against the layout: 64 values
// in array order, the overflow mask with bit 0 in the low bit of byte 263
// and bit 63 in the high bit of byte 256, then the 16 monitoring values.
module ccb_dma_writer_tb;
  import ccb_pkg::*;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic                   start = 1'b0, busy, done;
  logic [5:0]             rd_idx;
  logic [31:0]            rd_data;
  logic [N_VALUES-1:0]    ovf;
  logic [N_ADC-1:0][31:0] mon;
  logic                   dma_valid, dma_ready = 1'b0;
  logic [11:0]            dma_addr;
  logic [31:0]            dma_data;
  int                     checks = 0, failures = 0;

  ccb_dma_writer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [31:0] vals [N_VALUES];
  logic [7:0]  image [512];
  int          words, dones;

  assign rd_data = vals[rd_idx];

  always @(negedge clk) dma_ready <= 1'($urandom_range(3) != 0);

  always @(posedge clk) begin
    if (dma_valid && dma_ready) begin
      for (int b = 0; b < 4; b++) image[int'(dma_addr) + b] <= dma_data[8*b +: 8];
      words <= words + 1;
    end
    if (done) dones <= dones + 1;
  end

  task automatic run_dump();
    logic [63:0] got_mask;
    foreach (vals[i]) vals[i] = $urandom;
    ovf = {$urandom, $urandom};
    for (int c = 0; c < N_ADC; c++) mon[c] = $urandom;
    foreach (image[i]) image[i] = 8'h00;
    words = 0; dones = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    check("words", longint'(words), 82);
    check("done pulses", longint'(dones), 1);
    for (int i = 0; i < N_VALUES; i++)
      check($sformatf("value %0d", i), longint'({image[4*i+3], image[4*i+2], image[4*i+1], image[4*i]}), longint'(vals[i]));
    for (int bit_n = 0; bit_n < 64; bit_n++) begin
      int byte_n;
      byte_n = 263 - bit_n / 8;
      got_mask[bit_n] = image[byte_n][bit_n % 8];
    end
    check("overflow mask", longint'(got_mask), longint'(ovf));
    for (int c = 0; c < N_ADC; c++)
      check($sformatf("monitor %0d", c), longint'({image[264+4*c+3], image[264+4*c+2], image[264+4*c+1], image[264+4*c]}), longint'(mon[c]));
    check("nothing beyond", longint'(image[328]), 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle", longint'(dma_valid), 0);
    repeat (4) run_dump();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
