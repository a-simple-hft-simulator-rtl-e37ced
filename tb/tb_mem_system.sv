// tb_mem_system: self-checking test of the shared memory path (arbiter,
// translation through the page table, node memory, reader counts).
// The page table is the real one; after its reset walk the testbench maps
// VPN 0 and VPN 5 of each of the 16 ports to distinct random frames.
// Sixteen requester processes then behave like heap engines: one request
// at a time, held until granted, a read waiting for its data. A model of
// each port's virtual memory checks every read, so data written by one
// heap is never seen by another. Also checked: one grant per cycle,
// every waiting port granted within 16 cycles (round robin), read data
// two cycles after the grant, reader count +1 on the translated frame one
// cycle after a read's grant and -1 one cycle later, and no unmapped access.
module tb_mem_system;
  import hft_pkg::*;

  localparam int NP = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0] req_valid = '0, gnt, rvalid;
  mem_req_t req [NP];
  order_t rdata;
  logic [10:0] pt_idx;
  logic pt_valid;
  logic [7:0] pt_pfn;
  logic ref_inc, ref_dec, ev_read, ev_write, ev_unmapped;
  logic [7:0] ref_inc_frame, ref_dec_frame;

  logic wr_en = 0, wr_valid = 0, init_busy, rd1_valid;
  logic [10:0] wr_idx = '0;
  logic [7:0] wr_pfn = '0, rd1_pfn;

  mem_system dut (.clk, .rst_n, .req_valid, .req, .gnt, .rvalid, .rdata,
                  .pt_idx, .pt_valid, .pt_pfn, .ref_inc, .ref_inc_frame,
                  .ref_dec, .ref_dec_frame, .ev_read, .ev_write, .ev_unmapped);

  page_table u_pt (.clk, .rst_n, .rd0_idx(pt_idx), .rd0_valid(pt_valid),
                   .rd0_pfn(pt_pfn), .rd1_idx('0), .rd1_valid, .rd1_pfn,
                   .wr_en, .wr_idx, .wr_valid, .wr_pfn, .init_busy);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int frame_of [NP][2];                     // port, vpn 0 / 5
  order_t vmem [NP][logic [12:0]];
  int n_reads = 0, n_writes = 0, n_inc = 0, n_dec = 0;

  // frames whose reads are in flight, for the reader count check
  int inflight[$];
  always @(negedge clk) if (rst_n) begin
    check($countones(gnt) <= 1, "one grant per cycle");
    check(!ev_unmapped, "no unmapped access");
    if (ref_inc) begin n_inc++; inflight.push_back(ref_inc_frame); end
    if (ref_dec) begin
      n_dec++;
      check(inflight.size() > 0 && inflight[0] == ref_dec_frame, "reader count released on its frame");
      if (inflight.size() > 0) void'(inflight.pop_front());
    end
  end

  task automatic port_proc(int p, int nops);
    for (int i = 0; i < nops; i++) begin
      logic [12:0] a;
      bit we;
      int waited, vi;
      vi = $urandom_range(1, 0);
      a = {7'(vi ? 5 : 0), 6'($urandom_range(63, 0))};
      we = ($urandom_range(1, 0) != 0) || !vmem[p].exists(a);
      @(negedge clk);
      req_valid[p] = 1'b1;
      req[p].we = we; req[p].addr = a;
      req[p].wdata = order_t'({$urandom(), $urandom(), $urandom()});
      waited = 0;
      #1;
      while (!gnt[p]) begin @(negedge clk); #1; waited++; end
      check(waited < NP, $sformatf("port %0d waited %0d cycles", p, waited));
      if (we) begin vmem[p][a] = req[p].wdata; n_writes++; end
      @(negedge clk);
      req_valid[p] = 1'b0;
      if (!we) begin
        // grant cycle -> translate+access cycle -> data cycle
        check(dut.ref_inc && ref_inc_frame == 8'(frame_of[p][vi]),
              "reader count raised on the translated frame");
        @(negedge clk);
        check(rvalid[p] && rdata == vmem[p][a], $sformatf("port %0d read of %0d", p, a));
        n_reads++;
      end
      repeat ($urandom_range(2, 0)) @(negedge clk);
    end
  endtask

  initial begin
    int perm [256];
    foreach (req[p]) req[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (init_busy) @(negedge clk);
    foreach (perm[i]) perm[i] = i;
    perm.shuffle();
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < 2; v++) begin
        frame_of[p][v] = perm[p * 2 + v];
        wr_en = 1; wr_valid = 1;
        wr_idx = {4'(p), 7'(v ? 5 : 0)};
        wr_pfn = 8'(frame_of[p][v]);
        @(negedge clk);
      end
    wr_en = 0;
    for (int p = 0; p < NP; p++) begin
      fork
        automatic int pp = p;
        port_proc(pp, 300);
      join_none
    end
    wait fork;
    repeat (4) @(negedge clk);
    check(n_inc == n_reads && n_dec == n_reads, "reader counts balance");
    check(n_reads > 500 && n_writes > 500, "enough traffic");
    $display("reads=%0d writes=%0d", n_reads, n_writes);
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
