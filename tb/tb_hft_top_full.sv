// tb_hft_top_full: the end-to-end test of tb_hft_top run on the design at
// its full size (256 frames of 64 nodes, 128 pages per heap, 8 symbols).
// Phase A compares a random six-symbol order stream trade by trade with a
// sequential order book kept in the testbench. Phase B fills one bid heap
// to its cap of 8192 nodes, then the 72-order overflow path until orders
// are hard-rejected, and trades everything away again.
module tb_hft_top_full;
  import hft_pkg::*;

  localparam bit DO_PRESSURE = 1'b1;
  localparam int N_RANDOM    = 900;
  localparam int CAP_NODES   = 128 * 64;  // MAX_PAGES x 64 nodes

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic [3:0]  address = '0;
  logic        write = 1'b0, read = 1'b0;
  logic [31:0] writedata = '0, readdata;

  hft_top dut (
    .clk, .rst_n, .address, .write, .writedata, .read, .readdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ bus tasks
  task automatic bus_write(int a, logic [31:0] d);
    @(negedge clk);
    address = 4'(a); writedata = d; write = 1'b1;
    @(negedge clk);
    write = 1'b0;
  endtask

  task automatic bus_read(int a, output logic [31:0] d);
    @(negedge clk);
    address = 4'(a); read = 1'b1;
    #1 d = readdata;
    @(negedge clk);
    read = 1'b0;
  endtask

  // ------------------------------------------------------ golden model
  typedef struct {int price; int qty; int age;} ref_order_t;
  typedef struct {int price; int qty; int sym; bit partial;} ref_trade_t;
  ref_order_t bids [16][$];
  ref_order_t asks [16][$];
  ref_trade_t exp_tr [16][$];
  int n_exp = 0, n_got = 0, n_partial = 0, n_full = 0;
  int age_ctr = 0;

  function automatic int best(ref ref_order_t q[$], input bit is_bid);
    int b = 0;
    for (int i = 1; i < q.size(); i++)
      if (is_bid ? (q[i].price > q[b].price || (q[i].price == q[b].price && q[i].age < q[b].age))
                 : (q[i].price < q[b].price || (q[i].price == q[b].price && q[i].age < q[b].age)))
        b = i;
    return b;
  endfunction

  task automatic ref_order(int sym, bit ask, int price, int qty);
    ref_order_t o;
    o.price = price; o.qty = qty; o.age = age_ctr++;
    if (ask) asks[sym].push_back(o); else bids[sym].push_back(o);
    forever begin
      int bi, ai, q;
      ref_trade_t t;
      if (bids[sym].size() == 0 || asks[sym].size() == 0) break;
      bi = best(bids[sym], 1'b1);
      ai = best(asks[sym], 1'b0);
      if (bids[sym][bi].price < asks[sym][ai].price) break;
      q = (bids[sym][bi].qty < asks[sym][ai].qty) ? bids[sym][bi].qty : asks[sym][ai].qty;
      t.price = asks[sym][ai].price; t.qty = q; t.sym = sym;
      t.partial = bids[sym][bi].qty != asks[sym][ai].qty;
      exp_tr[sym].push_back(t);
      n_exp++;
      bids[sym][bi].qty -= q;
      asks[sym][ai].qty -= q;
      if (bids[sym][bi].qty == 0) bids[sym].delete(bi);
      if (asks[sym][ai].qty == 0) asks[sym].delete(ai);
    end
  endtask

  function automatic logic [20:0] sym_code(int s);
    // three upper-case letters, all equal: AAA, BBB, ...
    logic [6:0] c;
    c = 7'(8'h41 + s);
    return {c, c, c};
  endfunction

  // -------------------------------------------------- trade collection
  bit compare_trades = 1'b1;
  int got_sum_qty = 0;
  int seen_not_ready = 0;

  task automatic drain_trades();
    logic [31:0] st, lo, hi;
    forever begin
      bus_read(0, st);
      if (!st[2]) break;
      bus_read(2, lo);
      bus_read(3, hi);
      bus_write(0, 32'h8);   // trade_ack
      n_got++;
      got_sum_qty += int'(lo[31:16]);
      if (hi[21]) n_partial++; else n_full++;
      if (compare_trades) begin
        int s;
        s = int'(hi[6:0]) - 'h41;
        if (s < 0 || s > 15 || exp_tr[s].size() == 0) begin
          check(1'b0, $sformatf("unexpected trade symbol %h", hi[20:0]));
        end else begin
          ref_trade_t e;
          e = exp_tr[s].pop_front();
          check(lo[15:0] == 16'(e.price) && lo[31:16] == 16'(e.qty) &&
                hi[20:0] == sym_code(s) && hi[21] == e.partial,
                $sformatf("trade %0d sym %0d: got p=%0d q=%0d f=%0d exp p=%0d q=%0d f=%0d",
                          n_got, s, lo[15:0], lo[31:16], hi[21], e.price, e.qty, e.partial));
        end
      end
    end
  endtask

  task automatic send_order(logic [20:0] sym, bit ask, int price, int qty);
    logic [31:0] st, tail0, tail1;
    forever begin
      bus_read(0, st);
      if (st[0]) break;
      seen_not_ready++;
      drain_trades();
    end
    bus_read(1, tail0);
    bus_write(12, {8'h00, 1'b0, sym[20:14], ask, sym[13:7], 1'b1, sym[6:0]});
    bus_write(13, {16'(qty), 16'(price)});
    bus_write(14, 32'h0);
    bus_read(1, tail1);
    check(tail1 != tail0, "tail advanced after order");
  endtask

  task automatic wait_quiet(int cycles);
    int q = 0;
    while (q < cycles) begin
      logic [31:0] st;
      bus_read(0, st);
      if (st[2]) begin drain_trades(); q = 0; end
      else q++;
    end
  endtask

  // --------------------------------------------------- mechanism counts
  int m_spec = 0, m_shadow_edit = 0, m_shadow_fwd = 0, m_lock = 0, m_buf = 0;
  int m_stall = 0, m_fault = 0, m_prefetch = 0, m_queued = 0, m_free = 0;
  int m_delayed = 0, m_overflow = 0, m_reject = 0, m_stamped = 0;
  always @(posedge clk) begin
    m_spec        += $countones(dut.ev_spec);
    m_shadow_fwd  += $countones(dut.ev_shadow);
    m_buf         += $countones(dut.ev_buf);
    m_lock        += $countones(dut.lock_block);
    m_shadow_edit += $countones(dut.edit_req & ~dut.h_inserting);
    m_stall       += int'(dut.ev_stall);
    m_fault       += int'(dut.ev_demand);
    m_prefetch    += int'(dut.ev_prefetch);
    m_queued      += int'(dut.ev_queued);
    m_free        += int'(dut.ev_free);
    m_delayed     += int'(dut.ev_delayed_free);
    m_overflow    += int'(dut.ev_overflow);
    m_reject      += int'(dut.ev_reject);
    m_stamped     += int'(dut.accept);
  end

  // -------------------------------------------------------------- main
  initial begin
    logic [31:0] st, v;
    int total_rej;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // protocol: reset, wait for sim_active low, start
    bus_write(0, 32'h40);
    bus_read(0, st);
    check(!st[4], "sim_active low after sim_reset");
    bus_write(0, 32'h20);
    bus_read(0, st);
    check(st[4] && st[0], "sim_active and ready after sim_start");

    // ---------------- phase A
    for (int i = 0; i < 60; i++) begin
      int p;
      p = 50 + (i % 30);
      ref_order(0, 1'b0, p, 5);
      send_order(sym_code(0), 1'b0, p, 5);
    end
    for (int i = 0; i < N_RANDOM; i++) begin
      int s, p, q;
      bit ask;
      s   = $urandom_range(5, 0);
      ask = $urandom_range(1, 0);
      p   = ask ? $urandom_range(115, 100) : $urandom_range(110, 95);
      q   = $urandom_range(20, 1);
      ref_order(s, ask, p, q);
      send_order(sym_code(s), ask, p, q);
      if ($urandom_range(7, 0) == 0) drain_trades();
    end
    wait_quiet(300);
    check(n_got == n_exp, $sformatf("phase A trades: got %0d expected %0d", n_got, n_exp));
    bus_read(5, v);
    check(v == 32'(n_got), $sformatf("trade_count %0d", v));
    bus_read(4, v);  check(v > 0, "cycle_count runs");
    bus_read(6, v);  check(v > 0, "mem_reads counted");
    bus_read(7, v);  check(v > 0, "mem_writes counted");
    bus_read(8, v);  check(v > 0, "hazard_stalls counted");
    $display("phase A: %0d trades (%0d partial, %0d full), %0d orders", n_got, n_partial, n_full, age_ctr);

    if (DO_PRESSURE) begin
      int n_in_book;
      // ---------------- phase B
      bus_write(0, 32'h40);
      bus_write(0, 32'h20);
      compare_trades = 1'b0;
      n_got = 0; got_sum_qty = 0;
      for (int s = 0; s < 9; s++) send_order(sym_code(s), 1'b0, 10, 1);
      // heap cap: MAX_PAGES x 64 nodes; overflow FIFO 8 + page 64
      for (int i = 0; i < CAP_NODES - 1 + 72 + 3; i++) send_order(sym_code(0), 1'b0, 10, 1);
      wait_quiet(200);
      $display("phase B: book filled at cycle %0d", cyc);
      bus_read(0, st);
      check(st[7] && st[8], "overflow and reject flags set");
      bus_read(9, v);
      total_rej = int'(v);
      check(v == 32'd4, $sformatf("hard_rejects %0d expected 4", v));
      n_in_book = CAP_NODES + 72;
      for (int i = 0; i < n_in_book; i++) begin
        send_order(sym_code(0), 1'b1, 10, 1);
        if (i % 16 == 0) drain_trades();
        if (i % 2048 == 0) $display("phase B: %0d asks sent at cycle %0d", i, cyc);
      end
      wait_quiet(400);
      check(n_got == n_in_book, $sformatf("phase B trades %0d expected %0d", n_got, n_in_book));
      check(got_sum_qty == n_in_book, "phase B traded quantity");
      check(dut.heap_size[0] == 0 && dut.heap_size[1] == 0, "AAA book empty");
      check(dut.u_ovf.empty, "overflow page empty");
      $display("phase B: %0d trades, %0d rejects", n_got, total_rej);
    end

    // ---------------- mechanisms
    $display("spec_fwd=%0d shadow_edit=%0d shadow_fwd=%0d lock=%0d ins_buf=%0d stall=%0d",
             m_spec, m_shadow_edit, m_shadow_fwd, m_lock, m_buf, m_stall);
    $display("fault=%0d prefetch=%0d alloc_queued=%0d free=%0d delayed_free=%0d overflow=%0d reject=%0d not_ready=%0d stamped=%0d",
             m_fault, m_prefetch, m_queued, m_free, m_delayed, m_overflow, m_reject,
             seen_not_ready, m_stamped);
    check(m_spec > 0,        "H1 speculative root forwarding occurred");
    check(m_shadow_edit > 0, "H2 edit through the quantity shadow occurred");
    check(m_lock > 0,        "H3 trade lock blocked a duplicate");
    check(m_buf > 0,         "H4 insert buffered behind a pop");
    check(m_stamped > 0,     "H5 orders stamped");
    check(m_queued > 0,      "H6 allocator queued a second request");
    check(m_fault > 0,       "page fault allocation occurred");
    check(m_prefetch > 0,    "H8 prefetch occurred");
    check(m_free > 0,        "page freed");
    check(m_stall > 0,       "H10 scoreboard stall occurred");
    check(seen_not_ready > 0,"H11 ready low seen by the processor");
    check(n_partial > 0 || !DO_PRESSURE, "partial fills occurred");
    if (DO_PRESSURE) begin
      check(m_overflow > 0, "H7 overflow page used");
      check(m_reject > 0,   "hard reject occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
