// tb_ref_counter: self-checking test of the per-frame reader counters.
// Random increments and decrements (on a few frames so they collide,
// including inc and dec of the same frame in one cycle) are compared with
// counts kept in the testbench; the counters saturate at 3 and at 0.
// The combinational query port is checked on every frame.
module tb_ref_counter;
  import hft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic inc_valid = 0, dec_valid = 0;
  logic [7:0] inc_frame = '0, dec_frame = '0, query_frame = '0;
  logic query_zero;
  logic [1:0] query_count;

  ref_counter dut (.clk, .rst_n, .inc_valid, .inc_frame, .dec_valid, .dec_frame,
                   .query_frame, .query_zero, .query_count);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int model [256];

  initial begin
    int n_same, n_sat;
    n_same = 0; n_sat = 0;
    foreach (model[f]) model[f] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      inc_valid = ($urandom_range(2, 0) != 0);
      dec_valid = ($urandom_range(2, 0) != 0);
      inc_frame = 8'($urandom_range(5, 0) * 51);
      dec_frame = 8'($urandom_range(5, 0) * 51);
      query_frame = 8'($urandom_range(5, 0) * 51);
      #1;
      check(query_count == 2'(model[query_frame]) && query_zero == (model[query_frame] == 0),
            $sformatf("frame %0d count %0d expected %0d", query_frame, query_count, model[query_frame]));
      if (inc_valid && dec_valid && inc_frame == dec_frame) n_same++;
      else begin
        if (inc_valid) begin if (model[inc_frame] == 3) n_sat++; else model[inc_frame]++; end
        if (dec_valid && model[dec_frame] > 0) model[dec_frame]--;
      end
    end
    @(negedge clk);
    inc_valid = 0; dec_valid = 0;
    for (int f = 0; f < 256; f++) begin
      query_frame = 8'(f);
      #1 check(query_count == 2'(model[f]), $sformatf("final count frame %0d", f));
    end
    check(n_same > 0 && n_sat > 0, "same-frame and saturation cases seen");
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
