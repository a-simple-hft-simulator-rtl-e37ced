// tb_avalon_if: self-checking test of the processor register window.
// The testbench drives the bus like the processor and plays the order
// FIFO (tail counter, full flag) and the trade queue. Checked: status
// bits after reset, sim_start and sim_reset (one-cycle soft reset that
// clears flags and counters); an order written as META, PRC_AMT and
// TIMESTAMP words produces one ord_valid pulse with the decoded symbol,
// side, price and quantity, and none before sim_start or with the META
// valid bit clear; ready and fifo_stop follow the FIFO; the trade words
// show the queue head and trade_ack pulses only when a trade is
// available; the sticky flags and the six performance counters count
// their events.
module tb_avalon_if;
  import hft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] address = '0;
  logic write = 0, read = 0;
  logic [31:0] writedata = '0, readdata;
  logic ord_valid, trade_ack, sim_active, soft_rst;
  order_t ord;
  logic fifo_full = 0;
  logic [3:0] fifo_tail = '0;
  logic trade_avail = 0;
  trade_t trade_head = '0;
  logic ev_trade = 0, ev_mem_read = 0, ev_mem_write = 0, ev_stall = 0;
  logic ev_overflow = 0, ev_reject = 0;

  avalon_if dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // outputs seen at clock edges
  int n_ord = 0, n_ack = 0, n_soft = 0;
  order_t last_ord;
  always @(posedge clk) if (rst_n) begin
    if (ord_valid) begin n_ord++; last_ord = ord; end
    if (trade_ack) n_ack++;
    if (soft_rst) n_soft++;
  end

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

  function automatic logic [31:0] meta(logic [20:0] sym, bit ask, bit valid);
    return {8'h00, 1'b0, sym[20:14], ask, sym[13:7], valid, sym[6:0]};
  endfunction

  task automatic send(logic [20:0] sym, bit ask, int price, int qty, bit valid);
    bus_write(12, meta(sym, ask, valid));
    bus_write(13, {16'(qty), 16'(price)});
    bus_write(14, 32'hdead_beef);
  endtask

  initial begin
    logic [31:0] v;
    int n0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    bus_read(0, v);
    check(v[0] && !v[1] && !v[2] && !v[4] && !v[7] && !v[8], "status after reset");
    // no order before sim_start
    send(21'h10203, 1'b0, 100, 5, 1'b1);
    check(n_ord == 0, "no order taken before sim_start");
    bus_write(0, 32'h20);
    bus_read(0, v);
    check(v[4], "sim_active after sim_start");
    // orders
    for (int i = 0; i < 50; i++) begin
      logic [20:0] s;
      bit ask, val;
      int p, q;
      s = 21'($urandom); ask = $urandom_range(1, 0); val = ($urandom_range(4, 0) != 0);
      p = $urandom_range(65535, 0); q = $urandom_range(65535, 1);
      n0 = n_ord;
      send(s, ask, p, q, val);
      check(n_ord == n0 + int'(val), "one ord_valid per submitted order");
      if (val)
        check(last_ord.symbol == s && last_ord.side == side_e'(ask) &&
              last_ord.price == 16'(p) && last_ord.qty == 16'(q) &&
              last_ord.ts == '0 && last_ord.seq == '0, "order fields decoded");
    end
    // ready and tail follow the FIFO
    fifo_full = 1; fifo_tail = 4'd9;
    bus_read(0, v);
    check(!v[0] && v[1], "not ready and fifo_stop when the FIFO is full");
    bus_read(1, v);
    check(v == 32'd9, "tail index");
    fifo_full = 0;
    // trades
    trade_head.price = 16'd321; trade_head.qty = 16'd77;
    trade_head.symbol = 21'h1abcd; trade_head.partial = 1'b1;
    bus_write(0, 32'h8);
    check(n_ack == 0, "no ack while no trade is available");
    trade_avail = 1;
    bus_read(0, v);  check(v[2], "trade_avail");
    bus_read(2, v);  check(v == {16'd77, 16'd321}, "trade low word");
    bus_read(3, v);  check(v == {10'b0, 1'b1, 21'h1abcd}, "trade high word");
    bus_write(0, 32'h8);
    check(n_ack == 1, "trade_ack pulse");
    trade_avail = 0;
    // events: counters and flags
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      ev_trade = $urandom_range(1, 0); ev_mem_read = $urandom_range(1, 0);
      ev_mem_write = $urandom_range(1, 0); ev_stall = $urandom_range(1, 0);
      ev_reject = (i == 100); ev_overflow = (i == 150);
    end
    begin
      int c [4:9];
      int exp_c [4:9];
      for (int a = 4; a <= 9; a++) exp_c[a] = 0;
      @(negedge clk);
      ev_trade = 0; ev_mem_read = 0; ev_mem_write = 0; ev_stall = 0;
      ev_reject = 0; ev_overflow = 0;
      bus_read(0, v);
      check(v[7] && v[8], "overflow and reject flags");
      for (int a = 4; a <= 9; a++) begin bus_read(a, v); c[a] = int'(v); end
      check(c[4] > 200, "cycle_count");
      check(c[5] > 50 && c[5] < 150 && c[6] > 50 && c[7] > 50 && c[8] > 50, "event counters");
      check(c[9] == 1, "hard_rejects");
    end
    // sim_reset: one soft reset pulse, everything cleared
    bus_write(0, 32'h40);
    check(n_soft == 1, "one soft reset pulse");
    bus_read(0, v);
    check(!v[4] && !v[7] && !v[8], "flags cleared by sim_reset");
    for (int a = 4; a <= 9; a++) begin
      bus_read(a, v);
      check(v == 0, $sformatf("counter %0d cleared", a));
    end
    n0 = n_ord;
    send(21'h1, 1'b0, 1, 1, 1'b1);
    check(n_ord == n0, "no orders after sim_reset until sim_start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
