// tb_seq_counter: self-checking test of the order time-stamp counter.
// The timestamp must count cycles only while `active`, and the sequence
// number must advance (and wrap at 256) once per accepted order, so two
// orders never receive the same {timestamp, sequence} pair.
module tb_seq_counter;
  import hft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic active = 1'b0, accept = 1'b0;
  logic [TS_W-1:0]  stamp_ts;
  logic [SEQ_W-1:0] stamp_seq;

  seq_counter dut (.clk, .rst_n, .active, .accept, .stamp_ts, .stamp_seq);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned ts;
    int seq, n_acc;
    logic [40:0] seen [$];
    ts = 0; seq = 0; n_acc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(stamp_ts == 0 && stamp_seq == 0, "zero after reset");
    for (int i = 0; i < 2000; i++) begin
      active = ($urandom_range(7, 0) != 0);
      accept = ($urandom_range(1, 0) != 0);
      #1;
      if (accept) begin
        foreach (seen[k]) if (seen[k] == {1'b0, stamp_ts, stamp_seq}) check(1'b0, "stamp reused");
        seen.push_back({1'b0, stamp_ts, stamp_seq});
        if (seen.size() > 300) void'(seen.pop_front());
      end
      @(negedge clk);
      if (active) ts++;
      if (accept) begin seq = (seq + 1) % 256; n_acc++; end
      check(stamp_ts == TS_W'(ts), $sformatf("timestamp %0d expected %0d", stamp_ts, ts));
      check(stamp_seq == SEQ_W'(seq), "sequence number");
    end
    check(n_acc > 256, "sequence number wrapped");
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
