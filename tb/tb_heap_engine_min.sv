// tb_heap_engine_min: the heap engine test of tb_heap_engine run on the ask
// side, a min-heap (IS_MAX = 0): lowest price at the root, then earliest
// timestamp and sequence number.
// A reference list kept in the testbench gives the expected best order.
// Checks: root after every insert, pop order of the whole heap (prices often
// equal so the time/sequence tie-break matters), a partial-fill edit seen in
// the popped quantity, an insert arriving in the same cycle as a pop (input
// buffer), an edit landing while an insert reads the root (quantity
// shadow), and the speculative root update one cycle after an insert starts.
module tb_heap_engine_min;
  import hft_pkg::*;

  localparam bit IS_MAX = 1'b0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ins_valid = 1'b0, ins_ready;
  order_t ins_node = '0;
  logic pop_req = 1'b0, edit_req = 1'b0;
  logic [QTY_W-1:0] edit_qty = '0;
  logic pop_done, edit_done, root_valid;
  order_t root_node;
  logic [VADDR_W:0] size;
  logic inserting, popping, page_fault;
  logic ev_spec_fwd, ev_shadow_fwd, ev_ins_buffered;
  logic mem_req_valid, mem_gnt, mem_rvalid;
  mem_req_t mem_req;
  order_t mem_rdata;

  heap_engine #(.IS_MAX(IS_MAX)) dut (
    .clk, .rst_n, .ins_valid, .ins_node, .ins_ready, .pop_req, .edit_req,
    .edit_qty, .pop_done, .edit_done, .root_valid, .root_node, .size,
    .space_ok(1'b1), .hold_ins(1'b0), .inserting, .popping, .page_fault, .ev_spec_fwd,
    .ev_shadow_fwd, .ev_ins_buffered, .mem_req_valid, .mem_req, .mem_gnt,
    .mem_rvalid, .mem_rdata);

  tb_node_mem mem (.clk, .req_valid(mem_req_valid), .req(mem_req),
                   .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  int n_spec = 0, n_shadow = 0, n_buf = 0;
  always @(posedge clk) begin
    if (ev_spec_fwd) n_spec++;
    if (ev_shadow_fwd) n_shadow++;
    if (ev_ins_buffered) n_buf++;
  end

  // ---------------- reference model
  order_t ref_q[$];
  int unsigned t_now = 0;
  logic [7:0] seq = 0;

  function automatic bit better(order_t a, order_t b);
    // priority written out independently of the design's package function
    if (a.price != b.price) return IS_MAX ? (a.price > b.price) : (a.price < b.price);
    if (a.ts != b.ts) return a.ts < b.ts;
    return a.seq < b.seq;
  endfunction

  function automatic int best_idx();
    int b = 0;
    for (int i = 1; i < ref_q.size(); i++) if (better(ref_q[i], ref_q[b])) b = i;
    return b;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic order_t mk(int price);
    order_t o = '0;
    o.side   = IS_MAX ? SIDE_BID : SIDE_ASK;
    o.price  = 16'(price);
    o.qty    = 16'($urandom_range(500, 1));
    o.symbol = 21'h0A_0C1;
    o.ts     = t_now;
    o.seq    = seq;
    seq++;
    if ($urandom_range(1, 0) != 0) t_now++;
    return o;
  endfunction

  task automatic wait_idle();
    do @(posedge clk); while (inserting || popping || !dut.idle_free);
  endtask

  task automatic do_insert(order_t o);
    ins_valid <= 1'b1; ins_node <= o;
    @(posedge clk);
    while (!ins_ready) @(posedge clk);
    ins_valid <= 1'b0;
    ref_q.push_back(o);
  endtask

  task automatic do_pop_check(string tag);
    int b;
    b = best_idx();
    check(root_valid && root_node == ref_q[b],
          $sformatf("%s: root p=%0d q=%0d expected p=%0d q=%0d", tag,
                    root_node.price, root_node.qty, ref_q[b].price, ref_q[b].qty));
    ref_q.delete(b);
    pop_req <= 1'b1;
    @(posedge clk);
    pop_req <= 1'b0;
    wait_idle();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!root_valid && size == 0, "empty after reset");

    // 1. random inserts, root checked after each
    for (int i = 0; i < 60; i++) begin
      do_insert(mk($urandom_range(120, 100)));
      wait_idle();
      check(root_node == ref_q[best_idx()], $sformatf("root after insert %0d", i));
    end
    check(size == 60, "size 60");

    // 2. edit the root (partial fill), then pop a few
    begin
      int b;
      b = best_idx();
      edit_qty <= 16'd7; edit_req <= 1'b1;
      @(posedge clk); edit_req <= 1'b0;
      ref_q[b].qty = 16'd7;
      @(negedge clk);
      check(root_node.qty == 16'd7, "edit visible in root register at once");
      wait_idle();
    end
    for (int i = 0; i < 10; i++) do_pop_check($sformatf("pop %0d", i));

    // 3. H1: a better node becomes root one cycle after the insert starts
    begin
      order_t o;
      o = mk(IS_MAX ? 200 : 50);
      ins_valid <= 1'b1; ins_node <= o;
      @(posedge clk); ins_valid <= 1'b0; ref_q.push_back(o);
      @(negedge clk);
      check(root_node == o && inserting, "speculative root forwarded before sift-up ends");
      wait_idle();
    end

    // 4. H4: pop and insert in the same cycle; the insert is buffered
    begin
      int b;
      order_t o;
      b = best_idx();
      o = mk(110);
      check(root_node == ref_q[b], "root before simultaneous pop");
      ref_q.delete(b);
      pop_req <= 1'b1; ins_valid <= 1'b1; ins_node <= o;
      @(posedge clk);
      pop_req <= 1'b0; ins_valid <= 1'b0; ref_q.push_back(o);
      @(negedge clk);
      check(popping && !ins_ready, "insert held in the buffer while the pop runs");
      wait_idle();
    end

    // 6. drain everything
    while (ref_q.size() > 0) do_pop_check("drain");
    // 5. H2: edit the root while an insert is reading it
    begin
      order_t r, o;
      r = mk(IS_MAX ? 150 : 50);
      do_insert(r); wait_idle();
      o = mk(IS_MAX ? 140 : 60);
      ins_valid <= 1'b1; ins_node <= o;
      @(posedge clk); ins_valid <= 1'b0; ref_q.push_back(o);
      // wait until the sift-up asks for the root (index 0)
      while (!(inserting && mem_req_valid && !mem_req.we && mem_req.addr == '0)) @(posedge clk);
      edit_qty <= 16'd3; edit_req <= 1'b1;
      @(posedge clk); edit_req <= 1'b0;
      ref_q[best_idx()].qty = 16'd3;
      wait_idle();
      check(root_node.qty == 16'd3, "edit kept after insert");
    end
    while (ref_q.size() > 0) do_pop_check("drain 2");
    check(!root_valid && size == 0, "empty at end");
    check(n_spec > 0, "speculative root forwarding seen");
    check(n_buf > 0, "insert buffered behind pop seen");
    check(n_shadow > 0, "quantity shadow forward seen");
    $display("events: spec=%0d buffered=%0d shadow=%0d", n_spec, n_buf, n_shadow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
