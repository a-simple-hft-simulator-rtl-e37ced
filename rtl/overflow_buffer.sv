// overflow_buffer: shared overflow page with its write FIFO (H7) and the
// hard-reject decision.
//
// When a symbol's heap cannot grow (its 128-page cap is reached or no free
// frame is left), its order is not dropped at once: it is written into a
// FIFO of FIFO_DEPTH entries in front of the single shared overflow page of
// 64 nodes. The FIFO drains one entry per cycle into the page, which keeps
// the parked orders in arrival order. The oldest parked order is offered
// back (out_valid/out_node, taken with out_ready) so that it can be
// inserted once memory has been freed by trades. An order that finds both
// the FIFO and the page full is hard-rejected (reject pulses) and the
// write is dropped. Writers are serialized by the single dispatch port in
// front of this block, so no separate per-symbol arbiter is needed.
// Keeping the overflow page as its own 64-node array, its queue order and
// the re-insertion path are this design's choices; the sizes follow the
// document (4-8 entry FIFO, 8 by default; one 64-node page).
module overflow_buffer
  import hft_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned PAGE_N     = PAGE_NODES,
  localparam int unsigned PW        = $clog2(PAGE_N)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  order_t in_node,
  output logic   in_ready,     // FIFO has room
  output logic   reject,       // in_valid dropped: FIFO and page full
  output logic   out_valid,
  output order_t out_node,
  input  logic   out_ready,
  output logic   empty         // nothing parked anywhere
);
  // ---------------- write FIFO
  order_t fifo_head;
  logic   fifo_full, fifo_empty;
  logic   drain;
  logic [$clog2(FIFO_DEPTH):0]   fifo_count;  // not needed here
  logic [$clog2(FIFO_DEPTH)-1:0] fifo_tail;   // not needed here

  order_fifo #(.T(order_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(in_valid && !fifo_full), .din(in_node),
    .pop(drain), .head(fifo_head),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count), .tail(fifo_tail));

  // ---------------- overflow page (circular queue of parked orders)
  order_t        page [PAGE_N];
  logic [PW-1:0] rd_p, wr_p;
  logic [PW:0]   page_cnt;
  logic          page_full;

  assign page_full = (page_cnt == (PW+1)'(PAGE_N));
  assign drain     = !fifo_empty && !page_full;
  assign in_ready  = !fifo_full;
  assign reject    = in_valid && fifo_full && page_full;

  assign out_valid = (page_cnt != '0);
  assign out_node  = page[rd_p];
  assign empty     = fifo_empty && (page_cnt == '0);

  logic take;
  assign take = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (drain) page[wr_p] <= fifo_head;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_p     <= '0;
      wr_p     <= '0;
      page_cnt <= '0;
    end else begin
      if (drain) wr_p <= wr_p + 1'b1;
      if (take)  rd_p <= rd_p + 1'b1;
      page_cnt <= page_cnt + (PW+1)'(drain) - (PW+1)'(take);
    end
  end
endmodule
