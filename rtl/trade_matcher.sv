// trade_matcher: order matching for one symbol.
//
// Every cycle it compares the best bid (root of the max-heap) with the best
// ask (root of the min-heap). When bid price >= ask price a trade executes
// at the ask price for the smaller of the two quantities:
//   equal quantities  -> both roots popped, full fill;
//   bid larger        -> ask popped, bid quantity reduced in place (edit),
//                        partial fill, the buyer survives;
//   ask larger        -> the reverse.
// H3 trade-lock: each heap has a lock flag, set when a trade removes or
// edits its root and cleared when that heap reports the pop or edit done.
// A trade is allowed only when neither lock is set, so the root that is
// still being removed cannot be matched a second time. ev_lock_block
// pulses on cycles where the roots crossed but a lock holds the trade back.
// Interface: trade_valid/trade_ready handshake towards the trade output
// queue; pop/edit requests are single-cycle pulses issued with the trade.
// busy (roots crossed or a lock set) tells the heap engines and the
// scoreboard that matching of this symbol is not finished.
// The handshake and the busy and event outputs are this design's choices.
module trade_matcher
  import hft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bid_valid,
  input  order_t           bid_root,
  input  logic             ask_valid,
  input  order_t           ask_root,
  input  logic             bid_pop_done,
  input  logic             bid_edit_done,
  input  logic             ask_pop_done,
  input  logic             ask_edit_done,
  output logic             trade_valid,
  output trade_t           trade,
  input  logic             trade_ready,
  output logic             bid_pop,
  output logic             ask_pop,
  output logic             bid_edit,
  output logic             ask_edit,
  output logic [QTY_W-1:0] edit_qty,
  output logic             bid_lock,
  output logic             ask_lock,
  output logic             ev_lock_block,
  output logic             busy         // a trade is possible or in progress
);

  logic crossed, fire;
  assign crossed = bid_valid && ask_valid && (bid_root.price >= ask_root.price);
  assign trade_valid = crossed && !bid_lock && !ask_lock;
  assign fire = trade_valid && trade_ready;
  assign ev_lock_block = crossed && (bid_lock || ask_lock);
  assign busy = crossed || bid_lock || ask_lock;

  logic bid_more, ask_more;
  assign bid_more = bid_root.qty > ask_root.qty;
  assign ask_more = ask_root.qty > bid_root.qty;

  always_comb begin
    trade.price   = ask_root.price;
    trade.qty     = bid_more ? ask_root.qty : bid_root.qty;
    trade.symbol  = bid_root.symbol;
    trade.partial = bid_more || ask_more;
    edit_qty      = bid_more ? (bid_root.qty - ask_root.qty)
                             : (ask_root.qty - bid_root.qty);
  end

  assign bid_pop  = fire && !bid_more;
  assign ask_pop  = fire && !ask_more;
  assign bid_edit = fire && bid_more;
  assign ask_edit = fire && ask_more;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bid_lock <= 1'b0;
      ask_lock <= 1'b0;
    end else begin
      if (fire)                               bid_lock <= 1'b1;
      else if (bid_pop_done || bid_edit_done) bid_lock <= 1'b0;
      if (fire)                               ask_lock <= 1'b1;
      else if (ask_pop_done || ask_edit_done) ask_lock <= 1'b0;
    end
  end

  a_same_symbol: assert property (@(posedge clk) disable iff (!rst_n)
                                  fire |-> bid_root.symbol == ask_root.symbol);

endmodule
