// tb_overflow_buffer: self-checking test of the overflow path. Orders
// pushed into the 8-entry write FIFO drain into the 64-order overflow page
// and come out in arrival order. Filling both must raise `reject` for
// further orders (which are dropped), and the parked orders must then be
// read back in order. Random push/take traffic is compared with a queue
// model, and `empty` must reflect both parts.
module tb_overflow_buffer;
  import hft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_ready = 0;
  order_t in_node = '0, out_node;
  logic in_ready, reject, out_valid, empty;

  overflow_buffer dut (.clk, .rst_n, .in_valid, .in_node, .in_ready, .reject,
                       .out_valid, .out_node, .out_ready, .empty);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  order_t model[$];
  int n_rej = 0;

  function automatic order_t rnd();
    return order_t'({$urandom(), $urandom(), $urandom()});
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !out_valid && in_ready, "empty after reset");
    // fill: 72 accepted, then rejects
    for (int i = 0; i < 80; i++) begin
      in_valid = 1; in_node = rnd();
      #1;
      check(reject == !in_ready, "reject exactly when the order cannot be taken");
      if (in_ready) model.push_back(in_node);
      else begin
        check(reject, "reject when FIFO and page are full");
        n_rej++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    check(model.size() == 72, $sformatf("%0d orders parked, expected 72", model.size()));
    check(n_rej == 8, "eight rejects");
    // read back in order
    while (model.size() > 0) begin
      out_ready = 1;
      #1;
      if (out_valid) begin
        check(out_node == model[0], "parked order order");
        void'(model.pop_front());
      end
      @(negedge clk);
    end
    out_ready = 0;
    @(negedge clk);
    check(empty && !out_valid, "empty after reading back");
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      in_valid = ($urandom_range(2, 0) == 0);
      in_node = rnd();
      out_ready = ($urandom_range(2, 0) == 0);
      #1;
      check(reject == (in_valid && !in_ready), "reject exactly when the order cannot be taken");
      if (in_valid && in_ready) model.push_back(in_node);
      if (out_valid) check(out_node == model[0], "random: head order");
      if (out_valid && out_ready) void'(model.pop_front());
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
    end
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
