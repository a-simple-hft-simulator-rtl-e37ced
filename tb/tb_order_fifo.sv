// tb_order_fifo: self-checking test of the synchronous FIFO used for the
// order input queue, the trade output queue and the overflow write FIFO.
// Random push/pop traffic (push only when not full, as the users of the
// FIFO guarantee) is compared every cycle with a queue kept in the
// testbench: head, count, full, empty and the tail index. Full and empty
// must both be reached.
module tb_order_fifo;
  import hft_pkg::*;

  localparam int DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic push = 1'b0, pop = 1'b0;
  order_t din = '0, head;
  logic full, empty;
  logic [4:0] count;
  logic [3:0] tail;

  order_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .head,
                                   .full, .empty, .count, .tail);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  order_t model[$];
  int pushes = 0;

  initial begin
    int n_full, n_empty;
    n_full = 0; n_empty = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(count == 5'(model.size()), "count");
      check(tail == 4'(pushes), "tail index");
      if (model.size() > 0) check(head == model[0], "head");
      if (full) n_full++;
      if (empty) n_empty++;
      // phases that favour filling and then draining
      bias = ((i / 200) % 2 == 0) ? 3 : 1;
      push = !full && ($urandom_range(3, 0) < bias);
      pop  = !empty && ($urandom_range(3, 0) < 4 - bias);
      din  = order_t'({$urandom(), $urandom(), $urandom()});
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) begin model.push_back(din); pushes++; end
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
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
