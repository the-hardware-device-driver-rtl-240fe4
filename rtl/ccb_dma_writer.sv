// ccb_dma_writer - writes one integration's results to the DMA area.
//
// On start it writes, in order, the 64 integrated values (byte offsets
// 0..252, array index = phase-switch state + 4 * converter), the 8-byte
// overflow mask (offsets 256 and 260) and the 16 cached A/D outputs
// (offsets 264..324): 82 little-endian 32-bit words in all. The overflow
// mask follows the specification's byte order: bit 0 is the least
// significant bit of the highest byte (offset 263) and bit 63 the most
// significant bit of the lowest (offset 256); as little-endian words,
// word 256 is the byte-reversed ovf[63:32] and word 260 the byte-reversed
// ovf[31:0]. The offsets of the mask and monitoring values are this
// design's choice; the specification does not place them. The power
// supply voltages of the monitoring area are not produced.
//
// Interface: one word per valid/ready handshake to a PCI master core;
// addr, data and valid hold until ready. The integrated values are read
// through a combinational port of the integrator (rd_idx -> rd_data).
// busy is high from the clock after start until the last word is taken;
// done pulses in the clock that takes the last word.
module ccb_dma_writer
  import ccb_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  // integrator read port
  output logic [5:0]             rd_idx,
  input  logic [31:0]            rd_data,
  input  logic [N_VALUES-1:0]    ovf,
  input  logic [N_ADC-1:0][31:0] mon,
  // PCI master write port
  output logic                   dma_valid,
  input  logic                   dma_ready,
  output logic [11:0]            dma_addr,
  output logic [31:0]            dma_data
);

  localparam int LAST = DMA_WORDS - 1;

  logic [6:0] word;
  logic [3:0] mon_idx;

  function automatic logic [31:0] byte_rev(input logic [31:0] x);
    return {x[7:0], x[15:8], x[23:16], x[31:24]};
  endfunction

  assign rd_idx    = word[5:0];
  assign mon_idx   = 4'(word - 7'(N_VALUES + 2));
  assign dma_valid = busy;
  assign dma_addr  = {3'd0, word, 2'b00};
  assign done      = busy && dma_ready && word == 7'(LAST);

  always_comb begin
    if (word < 7'(N_VALUES))          dma_data = rd_data;
    else if (word == 7'(N_VALUES))    dma_data = byte_rev(ovf[63:32]);
    else if (word == 7'(N_VALUES + 1)) dma_data = byte_rev(ovf[31:0]);
    else                              dma_data = mon[mon_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      word <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        word <= '0;
      end
    end else if (dma_ready) begin
      if (word == 7'(LAST)) busy <= 1'b0;
      else                  word <= word + 7'd1;
    end
  end

  // Handshake rule: a word offered is held until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      dma_valid && !dma_ready |=> dma_valid && $stable(dma_addr);
  endproperty
  a_hold: assert property (p_hold);

endmodule
