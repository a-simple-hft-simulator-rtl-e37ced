// bram_pool: the physical node memory.
//
// 256 frames of 64 nodes (16,384 nodes). A node is 3 x 32-bit words; here
// the three words sit side by side in one 96-bit-wide row, so a node is
// read or written in one access (the order node uses 94 of the 96 bits:
// 86 order bits and the 8-bit sequence number). The node address is
// {frame number, page offset}. One access per cycle; read data appears the
// cycle after the address. The side-by-side words are this design's choice.
module bram_pool
  import hft_pkg::*;
#(
  parameter int unsigned NFRAMES = 256,
  localparam int unsigned AW     = $clog2(NFRAMES) + OFF_W
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  order_t        wdata,
  output order_t        rdata
);
  localparam int unsigned WORDS = 3;
  localparam int unsigned NODES = NFRAMES * PAGE_NODES;

  logic [WORDS*32-1:0] mem [NODES];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= {{(WORDS*32-NODE_W){1'b0}}, wdata};
      rdata <= order_t'(mem[addr][NODE_W-1:0]);
    end
  end
endmodule
