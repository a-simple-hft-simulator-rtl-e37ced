// page_table: virtual-to-physical page map (section on translation).
//
// One entry per {address space, virtual page number} holds a valid bit and
// an 8-bit physical frame number. An address space is one heap: the upper
// index bits are the symbol's scoreboard index and the bid/ask side, the
// lower seven the VPN. Two synchronous read ports (data one cycle after the
// address: the one cycle a translation adds to every access) serve the
// memory path and the memory manager; one write port maps and unmaps pages.
// All entries are cleared by reset, walking one entry per cycle
// (init_busy is high meanwhile), as a block RAM cannot be cleared at once.
// Indexing by scoreboard index rather than the full 21-bit symbol and the
// two read ports are this design's choices.
module page_table
  import hft_pkg::*;
#(
  parameter int unsigned SPACE_W = 4,
  localparam int unsigned IDX_W  = SPACE_W + VPN_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] rd0_idx,
  output logic             rd0_valid,
  output logic [PFN_W-1:0] rd0_pfn,
  input  logic [IDX_W-1:0] rd1_idx,
  output logic             rd1_valid,
  output logic [PFN_W-1:0] rd1_pfn,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic             wr_valid,
  input  logic [PFN_W-1:0] wr_pfn,
  output logic             init_busy
);
  localparam int unsigned N = 1 << IDX_W;
  logic [PFN_W:0]   mem [N];
  logic [IDX_W:0]   init_ptr;

  assign init_busy = !init_ptr[IDX_W];

  always_ff @(posedge clk) begin
    if (init_busy)
      mem[init_ptr[IDX_W-1:0]] <= '0;
    else if (wr_en)
      mem[wr_idx] <= {wr_valid, wr_pfn};
    {rd0_valid, rd0_pfn} <= mem[rd0_idx];
    {rd1_valid, rd1_pfn} <= mem[rd1_idx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         init_ptr <= '0;
    else if (init_busy) init_ptr <= init_ptr + 1'b1;
  end
endmodule
