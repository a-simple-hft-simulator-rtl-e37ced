// tb_frame_allocator: self-checking test of the physical frame allocator.
// A bitmap model in the testbench predicts each response: the lowest free
// frame at the cycle the request is served, or a failed response when no
// frame is free. Checked: allocation of all 256 frames in order, failure
// when exhausted, reuse of freed frames (lowest first), two requests in
// the same cycle (the second is queued and served next cycle with a
// different frame), and random request/free traffic with free_count.
module tb_frame_allocator;
  import hft_pkg::*;

  localparam int TAG_W = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a_valid = 0, b_valid = 0, free_valid = 0;
  logic [TAG_W-1:0] a_tag = '0, b_tag = '0;
  logic [7:0] free_frame = '0;
  logic a_ready, b_ready, resp_valid, resp_ok, ev_queued;
  logic [TAG_W-1:0] resp_tag;
  logic [7:0] resp_frame;
  logic [8:0] free_count;

  frame_allocator #(.TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- model, advanced at every rising edge
  bit used [256];
  bit q_v = 0;
  logic [TAG_W-1:0] q_t;
  typedef struct {bit ok; logic [TAG_W-1:0] tag; int frame;} resp_t;
  resp_t exp_r[$];
  int n_queued = 0;

  function automatic int lowest_free();
    for (int f = 0; f < 256; f++) if (!used[f]) return f;
    return -1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    bit serve;
    logic [TAG_W-1:0] t;
    resp_t r;
    serve = q_v || a_valid || b_valid;
    t = q_v ? q_t : (a_valid ? a_tag : b_tag);
    if (serve) begin
      int f;
      f = lowest_free();
      r.ok = (f >= 0); r.tag = t; r.frame = f;
      if (f >= 0) used[f] = 1;
      exp_r.push_back(r);
    end
    if (free_valid) used[free_frame] = 0;
    if (q_v) q_v = 0;
    else if (a_valid && b_valid) begin q_v = 1; q_t = b_tag; n_queued++; end
  end

  // ---------------- response checker
  int n_resp = 0, n_fail = 0;
  always @(negedge clk) if (rst_n) begin
    if (resp_valid) begin
      resp_t e;
      n_resp++;
      if (exp_r.size() == 0) check(1'b0, "unexpected response");
      else begin
        e = exp_r.pop_front();
        check(resp_ok == e.ok && resp_tag == e.tag && (!e.ok || resp_frame == 8'(e.frame)),
              $sformatf("response ok=%0d tag=%0d frame=%0d expected ok=%0d tag=%0d frame=%0d",
                        resp_ok, resp_tag, resp_frame, e.ok, e.tag, e.frame));
        if (!resp_ok) n_fail++;
      end
    end
    begin
      int nfree;
      nfree = 0;
      foreach (used[f]) if (!used[f]) nfree++;
      check(free_count == 9'(nfree), "free_count");
    end
  end

  task automatic request(bit a, bit b, logic [TAG_W-1:0] ta, logic [TAG_W-1:0] tb_);
    @(negedge clk);
    while (!a_ready) @(negedge clk);
    a_valid = a; b_valid = b; a_tag = ta; b_tag = tb_;
    @(negedge clk);
    a_valid = 0; b_valid = 0;
  endtask

  task automatic free(int f);
    @(negedge clk);
    free_valid = 1; free_frame = 8'(f);
    @(negedge clk);
    free_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // all frames in order, then one failure
    for (int i = 0; i < 256; i++) request(1, 0, TAG_W'(i), '0);
    request(1, 0, 11'h7ff, '0);
    @(negedge clk);
    check(n_fail == 1, "request fails when all frames are used");
    // freed frames come back lowest first
    free(77); free(3);
    request(1, 0, 11'd1, '0);
    request(1, 0, 11'd2, '0);
    // two at once
    free(10); free(200);
    request(1, 1, 11'd5, 11'd6);
    repeat (3) @(negedge clk);
    check(n_queued == 1, "second request queued");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (a_ready) begin
        a_valid = ($urandom_range(3, 0) == 0);
        b_valid = ($urandom_range(4, 0) == 0);
        a_tag = TAG_W'($urandom); b_tag = TAG_W'($urandom);
      end else begin
        a_valid = 0; b_valid = 0;
      end
      free_valid = 0;
      if ($urandom_range(1, 0) != 0) begin
        int f;
        f = $urandom_range(255, 0);
        // free only frames that are in use and not handed out this cycle
        if (used[f] && lowest_free() != f) begin free_valid = 1; free_frame = 8'(f); end
      end
    end
    @(negedge clk);
    a_valid = 0; b_valid = 0; free_valid = 0;
    repeat (4) @(negedge clk);
    check(exp_r.size() == 0, "every request answered");
    check(n_queued > 10 && n_resp > 1000, "enough traffic");
    $display("responses=%0d failed=%0d queued=%0d", n_resp, n_fail, n_queued);
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
