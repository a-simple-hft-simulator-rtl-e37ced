// tb_trade_matcher: self-checking test of the per-symbol matcher. Random
// bid/ask roots are applied; the expected trade (ask price, smaller
// quantity, fill type, which root is popped and which edited, remaining
// quantity) is worked out in the testbench. It checks that no second trade
// fires while a lock is held, that the locks clear on done, and that a
// stalled output (trade_ready low) holds the trade back.
module tb_trade_matcher;
  import hft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bid_valid = 0, ask_valid = 0;
  order_t bid_root = '0, ask_root = '0;
  logic bid_pop_done = 0, bid_edit_done = 0, ask_pop_done = 0, ask_edit_done = 0;
  logic trade_valid, trade_ready = 1;
  trade_t trade;
  logic bid_pop, ask_pop, bid_edit, ask_edit, bid_lock, ask_lock, ev_lock_block;
  logic [QTY_W-1:0] edit_qty;

  logic busy;
  trade_matcher dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int blocks;
    blocks = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 400; i++) begin
      int bp, ap, bq, aq;
      bit exp_trade, rdy;
      bp = $urandom_range(60, 40); ap = $urandom_range(60, 40);
      bq = $urandom_range(9, 1);   aq = $urandom_range(9, 1);
      rdy = ($urandom_range(3, 0) != 0);
      @(negedge clk);
      bid_valid = ($urandom_range(9, 0) != 0); ask_valid = ($urandom_range(9, 0) != 0);
      bid_root = '0; ask_root = '0;
      bid_root.price = 16'(bp); bid_root.qty = 16'(bq); bid_root.symbol = 21'h1234;
      ask_root.price = 16'(ap); ask_root.qty = 16'(aq); ask_root.symbol = 21'h1234;
      ask_root.side = SIDE_ASK;
      trade_ready = rdy;
      exp_trade = bid_valid && ask_valid && bp >= ap;
      #1;
      check(trade_valid == exp_trade, $sformatf("trade_valid bid %0d ask %0d", bp, ap));
      check((bid_pop | ask_pop | bid_edit | ask_edit) == (exp_trade && rdy), "fire only when ready");
      if (exp_trade && rdy) begin
        int q;
        q = (bq < aq) ? bq : aq;
        check(trade.price == 16'(ap) && trade.qty == 16'(q), "price and quantity");
        check(trade.partial == (bq != aq), "fill type");
        check(bid_pop == (bq <= aq) && ask_pop == (aq <= bq), "pops");
        check(bid_edit == (bq > aq) && ask_edit == (aq > bq), "edits");
        if (bq != aq) check(edit_qty == 16'((bq > aq) ? bq - aq : aq - bq), "edit quantity");
        // locks block a duplicate on the next cycle with the same roots
        @(negedge clk);
        check(bid_lock && ask_lock && !trade_valid && ev_lock_block, "locked after trade");
        // the heaps report done after a few cycles
        repeat ($urandom_range(3, 0)) begin
          @(negedge clk);
          check(!trade_valid, "no duplicate while locked");
        end
        blocks++;
        bid_pop_done = (bq <= aq); bid_edit_done = (bq > aq);
        ask_pop_done = (aq <= bq); ask_edit_done = (aq > bq);
        bid_valid = 0; ask_valid = 0;   // the popped roots are gone
        @(negedge clk);
        bid_pop_done = 0; bid_edit_done = 0; ask_pop_done = 0; ask_edit_done = 0;
        check(!bid_lock && !ask_lock, "locks cleared by done");
      end
    end
    check(blocks > 20, "enough trades exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
