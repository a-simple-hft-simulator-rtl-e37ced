// order_fifo: synchronous first-in first-out queue.
//
// Used as the order dispatch queue between the bus interface and the heap
// engines, and (with T = trade_t) as the trade confirmation queue read by
// the software. push when !full, pop when !empty; a push and a pop may
// happen in the same cycle. head is the oldest entry, valid while !empty.
// tail is the write index, which the software reads to see that its order
// was taken. Storage is a register array, DEPTH a power of two. The depth of
// 16 is this design's choice.
module order_fifo
  import hft_pkg::*;
#(
  parameter type         T     = order_t,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  T              din,
  input  logic          pop,
  output T              head,
  output logic          full,
  output logic          empty,
  output logic [AW:0]   count,
  output logic [AW-1:0] tail
);
  T              mem [DEPTH];
  logic [AW-1:0] rptr, wptr;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign head  = mem[rptr];
  assign tail  = wptr;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full || pop);
endmodule
