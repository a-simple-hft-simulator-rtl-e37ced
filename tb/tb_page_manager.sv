// tb_page_manager: self-checking test of page allocation, prefetch and
// freeing, with the real frame allocator, page table and reader counters
// around it (32 frames, at most 8 pages per heap so limits are reached).
// Sixteen modelled heap engines grow and shrink towards random target
// sizes; a heap only grows when space_ok is high and otherwise raises its
// page fault, as the real engines do. Reads in flight are modelled by
// raising and later releasing reader counts on mapped frames.
// Every cycle the testbench checks: space_ok matches the mapped page
// count, all valid page table entries point to distinct frames, and
// mapped pages plus free frames add up to 32. Directed parts check a
// demand fault, a prefetch past 48 nodes, two faults in one cycle (second
// queued), a free delayed by a reader count, the per-heap cap (heap_full)
// and frame exhaustion, and that every heap's pages are returned at the end.
module tb_page_manager;
  import hft_pkg::*;

  localparam int NH = 16, NF = 32, MAXP = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [13:0] heap_size [NH];
  logic [NH-1:0] heap_fault = '0, space_ok, heap_full, compacting;
  logic a_valid, a_ready, b_valid, b_ready, resp_valid, resp_ok, free_valid;
  logic [10:0] a_tag, b_tag, resp_tag, pt_rd_idx, pt_wr_idx;
  logic [4:0] resp_frame, free_frame, ref_frame;
  logic [5:0] free_count;
  logic ev_queued, pt_rd_valid, pt_wr_en, pt_wr_valid, pt_busy, ref_zero;
  logic [7:0] pt_rd_pfn, pt_wr_pfn;
  logic ev_demand, ev_prefetch, ev_free, ev_delayed_free;
  logic [1:0] ref_count;
  logic p0_valid;
  logic [7:0] p0_pfn;
  logic [10:0] p0_idx = '0;

  // reader counts driven by the testbench
  logic inc_valid = 0, dec_valid = 0;
  logic [4:0] inc_frame = '0, dec_frame = '0;

  page_manager #(.NH(NH), .NFRAMES(NF), .MAX_PAGES(MAXP)) dut (.*);

  frame_allocator #(.NFRAMES(NF), .TAG_W(11)) u_alloc (
    .clk, .rst_n, .a_valid, .a_tag, .a_ready, .b_valid, .b_tag, .b_ready,
    .free_valid, .free_frame, .resp_valid, .resp_ok, .resp_tag, .resp_frame,
    .free_count, .ev_queued);

  page_table u_pt (.clk, .rst_n, .rd0_idx(p0_idx), .rd0_valid(p0_valid), .rd0_pfn(p0_pfn),
                   .rd1_idx(pt_rd_idx), .rd1_valid(pt_rd_valid), .rd1_pfn(pt_rd_pfn),
                   .wr_en(pt_wr_en), .wr_idx(pt_wr_idx), .wr_valid(pt_wr_valid),
                   .wr_pfn(pt_wr_pfn), .init_busy(pt_busy));

  ref_counter #(.NFRAMES(NF)) u_ref (.clk, .rst_n, .inc_valid, .inc_frame,
                                     .dec_valid, .dec_frame, .query_frame(ref_frame),
                                     .query_zero(ref_zero), .query_count(ref_count));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int n_demand = 0, n_prefetch = 0, n_free = 0, n_delayed = 0, n_queued = 0, n_full = 0;
  always @(posedge clk) if (rst_n) begin
    n_demand   += int'(ev_demand);
    n_prefetch += int'(ev_prefetch);
    n_free     += int'(ev_free);
    n_delayed  += int'(ev_delayed_free);
    n_queued   += int'(ev_queued);
    n_full     += $countones(heap_full);
  end

  // ---------------- invariants
  bit inv_on = 0;
  always @(negedge clk) if (inv_on) begin
    int nvalid;
    bit seen [NF];
    #2;
    nvalid = 0;
    foreach (seen[f]) seen[f] = 0;
    for (int h = 0; h < NH; h++) begin
      check(space_ok[h] == (int'(dut.mapped[h]) > int'(heap_size[h] >> 6)),
            $sformatf("space_ok heap %0d", h));
      for (int v = 0; v < 128; v++) begin
        logic [8:0] e;
        e = u_pt.mem[{4'(h), 7'(v)}];
        if (e[8]) begin
          nvalid++;
          check(v < int'(dut.mapped[h]), "only VPNs below the mapped count are valid");
          check(!seen[e[4:0]], $sformatf("frame %0d mapped twice", e[4:0]));
          seen[e[4:0]] = 1;
        end
      end
    end
    // a frame being freed is already unmapped in the table but not yet free
    if (!(free_valid || resp_valid))
      check(nvalid + int'(free_count) == NF,
            $sformatf("mapped %0d + free %0d != %0d", nvalid, free_count, NF));
  end

  // ---------------- modelled heap engines
  int target [NH];
  bit engines_on = 0;
  always @(negedge clk) if (engines_on) begin
    for (int h = 0; h < NH; h++) begin
      if (int'(heap_size[h]) < target[h]) begin
        if (space_ok[h]) begin heap_size[h] = heap_size[h] + 1'b1; heap_fault[h] = 0; end
        else heap_fault[h] = !heap_full[h];
      end else begin
        heap_fault[h] = 0;
        if (int'(heap_size[h]) > target[h]) heap_size[h] = heap_size[h] - 1'b1;
      end
    end
  end

  function automatic int frame_of(int h, int v);
    logic [8:0] e;
    e = u_pt.mem[{4'(h), 7'(v)}];
    return e[8] ? int'(e[4:0]) : -1;
  endfunction

  task automatic settle(int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    foreach (heap_size[h]) heap_size[h] = '0;
    foreach (target[h]) target[h] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (pt_busy) @(negedge clk);
    inv_on = 1; engines_on = 1;

    // demand fault: first insert into heap 0
    target[0] = 1;
    settle(10);
    check(heap_size[0] == 1 && n_demand >= 1, "first insert got a page by demand");
    // prefetch past 48 nodes
    target[0] = 48;
    settle(80);
    check(heap_size[0] == 48 && dut.mapped[0] == 1, "one page for 48 nodes before prefetch");
    target[0] = 49;
    settle(10);
    check(dut.mapped[0] == 2 && n_prefetch >= 1, "next page prefetched at 49 of 64");
    // two faults in one cycle: the second is queued
    target[3] = 1; target[4] = 1;
    settle(10);
    check(n_queued >= 1 && heap_size[3] == 1 && heap_size[4] == 1, "two faults served, second queued");
    // delayed free: a read holds frame of heap 0 page 1
    begin
      int f;
      f = frame_of(0, 1);
      @(negedge clk);
      inc_valid = 1; inc_frame = 5'(f);
      @(negedge clk);
      inc_valid = 0;
      target[0] = 40;
      settle(40);
      check(dut.mapped[0] == 2 && n_free == 0,
            $sformatf("page held while a read is in flight (mapped %0d frees %0d)", dut.mapped[0], n_free));
      dec_valid = 1; dec_frame = 5'(f);
      @(negedge clk);
      dec_valid = 0;
      settle(6);
      check(dut.mapped[0] == 1 && n_delayed == 1, "delayed free done after the read");
    end
    // cap: heap 5 to 8 pages
    target[5] = MAXP * 64 + 5;
    settle(700);
    check(heap_size[5] == 14'(MAXP * 64) && heap_full[5] && dut.mapped[5] == 4'(MAXP),
          "heap capped at 8 pages and reported full");
    // exhaustion: heaps 6..9 ask for more than the remaining frames
    for (int h = 6; h < 10; h++) target[h] = 6 * 64;
    settle(2000);
    check(free_count == 0 && n_full > 0, "frames exhausted and heaps reported full");
    // give everything back
    for (int h = 0; h < NH; h++) target[h] = 0;
    settle(3000);
    check(free_count == 6'(NF), "all frames returned");
    // random phase
    for (int r = 0; r < 30; r++) begin
      for (int h = 0; h < NH; h++) target[h] = ($urandom_range(2, 0) == 0) ? $urandom_range(300, 0) : 0;
      repeat (400) begin
        @(negedge clk);
        // random reads in flight on mapped frames
        inc_valid = 0; dec_valid = 0;
        if ($urandom_range(3, 0) == 0) begin
          int f;
          f = frame_of($urandom_range(NH - 1, 0), 0);
          if (f >= 0) begin inc_valid = 1; inc_frame = 5'(f); end
        end
        @(negedge clk);
        if (inc_valid) begin dec_valid = 1; dec_frame = inc_frame; end
        inc_valid = 0;
      end
      @(negedge clk);
      dec_valid = 0;
    end
    for (int h = 0; h < NH; h++) target[h] = 0;
    settle(4000);
    check(free_count == 6'(NF), "all frames returned after random phase");
    if (free_count != 6'(NF))
      for (int h = 0; h < NH; h++)
        if (dut.mapped[h] != 0 || heap_size[h] != 0)
          $display("heap %0d size %0d mapped %0d fault %0d pending %0d fst %0d exhausted %0d ref %0d",
                   h, heap_size[h], dut.mapped[h], heap_fault[h], dut.pending[h], dut.fst,
                   dut.exhausted, ref_count);
    $display("demand=%0d prefetch=%0d free=%0d delayed=%0d queued=%0d",
             n_demand, n_prefetch, n_free, n_delayed, n_queued);
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
