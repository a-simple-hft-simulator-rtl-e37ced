// tb_bram_pool: self-checking test of the node memory. Random writes
// and reads over addresses spread across all frames are compared with a
// model; read data must appear one cycle after the address, and must hold
// while the memory is not enabled.
module tb_bram_pool;
  import hft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic en = 1'b0, we = 1'b0;
  logic [13:0] addr = '0;
  order_t wdata = '0, rdata;

  bram_pool dut (.clk, .en, .we, .addr, .wdata, .rdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  order_t model [logic [13:0]];

  initial begin
    order_t last;
    bit last_ok;
    last_ok = 0;
    for (int i = 0; i < 6000; i++) begin
      logic [13:0] a;
      bit rd_expect;
      @(negedge clk);
      a = 14'($urandom_range(255, 0) * 64 + $urandom_range(3, 0) * 21);
      en = ($urandom_range(4, 0) != 0);
      we = ($urandom_range(1, 0) != 0) || !model.exists(a);
      addr = a;
      wdata = order_t'({$urandom(), $urandom(), $urandom()});
      rd_expect = en && !we;
      @(negedge clk);
      if (en && we) model[a] = wdata;
      if (rd_expect) begin
        check(rdata == model[a], $sformatf("read of %0d", a));
        last = rdata; last_ok = 1;
      end else if (!en && last_ok) check(rdata == last, "read data held while disabled");
      if (en) begin last = rdata; last_ok = 1; end
      en = 1'b0; we = 1'b0;
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
