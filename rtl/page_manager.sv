// page_manager: page allocation, prefetch and delayed deallocation for all
// heaps (sections on page allocation, H8 and H9).
//
// Each heap (bid and ask of every symbol) has its own virtual address
// space; its pages are mapped contiguously from VPN 0, so one count per
// heap, `mapped`, tells which VPNs are valid. From each heap's size:
//   space_ok   - the page of heap index `size` (the next free slot) is
//                mapped, so an insert can run;
//   demand     - an insert is waiting (the engine's page fault) and its
//                page is not mapped: a frame is requested on allocator
//                port a;
//   prefetch   - the last page holds more than 48 of its 64 nodes (75%):
//                the next page is requested in the background on port b,
//                so it is usually mapped before an insert needs it (H8),
//                when no second fault needs port b;
//   release    - more pages are mapped than the heap needs (one past the
//                last used page while it is over 75% full, else none
//                beyond it): the last page is unmapped and its frame freed.
// A free runs one page at a time: read the page table entry for the frame,
// then wait until no read of that frame is in flight (reader count zero,
// H9) before the entry is cleared and the bitmap bit set. The heap's
// symbol is marked compacting meanwhile. Each heap is capped at MAX_PAGES
// pages (VPN width); heap_full tells the dispatcher that a heap needs a new
// page and cannot get one (cap reached or no free frame), so its next order
// goes to the overflow page. When the allocator answers that no frame is
// free, new requests wait until a frame has been freed.
// The release rule and the request priority are this design's choices; the
// 64-node pages, the 75% threshold, the 128-page cap and the reader-count
// check follow the document.
module page_manager
  import hft_pkg::*;
#(
  parameter int unsigned NH        = 16,
  parameter int unsigned NFRAMES   = 256,
  parameter int unsigned MAX_PAGES = 128,
  parameter int unsigned THRESHOLD = PREFETCH_AT,
  localparam int unsigned HW       = $clog2(NH),
  localparam int unsigned FW       = $clog2(NFRAMES),
  localparam int unsigned SIZE_W   = VADDR_W + 1,
  localparam int unsigned TAG_W    = HW + VPN_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [SIZE_W-1:0]     heap_size [NH],
  input  logic [NH-1:0]         heap_fault,
  output logic [NH-1:0]         space_ok,
  output logic [NH-1:0]         heap_full,
  output logic [NH-1:0]         compacting,
  // frame allocator
  output logic                  a_valid,
  output logic [TAG_W-1:0]      a_tag,
  input  logic                  a_ready,
  output logic                  b_valid,
  output logic [TAG_W-1:0]      b_tag,
  input  logic                  b_ready,
  input  logic                  resp_valid,
  input  logic                  resp_ok,
  input  logic [TAG_W-1:0]      resp_tag,
  input  logic [FW-1:0]         resp_frame,
  input  logic [FW:0]           free_count,
  output logic                  free_valid,
  output logic [FW-1:0]         free_frame,
  // page table
  output logic [TAG_W-1:0]      pt_rd_idx,
  input  logic                  pt_rd_valid,
  input  logic [PFN_W-1:0]      pt_rd_pfn,
  output logic                  pt_wr_en,
  output logic [TAG_W-1:0]      pt_wr_idx,
  output logic                  pt_wr_valid,
  output logic [PFN_W-1:0]      pt_wr_pfn,
  input  logic                  pt_busy,
  // reader counts
  output logic [FW-1:0]         ref_frame,
  input  logic                  ref_zero,
  // events
  output logic                  ev_demand,
  output logic                  ev_prefetch,
  output logic                  ev_free,
  output logic                  ev_delayed_free
);
  localparam int unsigned MW = $clog2(MAX_PAGES) + 1;

  logic [MW-1:0] mapped  [NH];
  logic [NH-1:0] pending;
  logic          exhausted;

  typedef enum logic [1:0] {F_IDLE, F_RD, F_WAIT} fstate_e;
  fstate_e       fst;
  logic [HW-1:0] f_heap;
  logic [FW-1:0] f_frame;
  logic          f_waited;

  // ---------------- room for the next insert (kept apart from the logic
  // below, which depends on the engines' page faults that depend on this)
  always_comb begin
    for (int h = 0; h < int'(NH); h++) begin
      logic [SIZE_W-1:0] vpn_n;
      vpn_n        = heap_size[h] >> OFF_W;
      space_ok[h]  = SIZE_W'(mapped[h]) > vpn_n;
      heap_full[h] = !space_ok[h] &&
                     (vpn_n >= SIZE_W'(MAX_PAGES) || free_count == '0);
    end
  end

  // ---------------- per-heap needs
  logic [NH-1:0] demand, prefetch, excess;
  logic [MW-1:0] keep [NH];
  always_comb begin
    for (int h = 0; h < int'(NH); h++) begin
      logic [SIZE_W-1:0] sz, last;
      logic [SIZE_W-1:0] vpn_s, last_vpn, fullness;
      sz       = heap_size[h];
      last     = sz - 1'b1;
      vpn_s    = sz >> OFF_W;
      last_vpn = last >> OFF_W;
      fullness = sz - (last_vpn << OFF_W);
      if (sz == '0)
        keep[h] = heap_fault[h] ? MW'(1) : '0;
      else if (fullness > SIZE_W'(THRESHOLD) && last_vpn + 1'b1 < SIZE_W'(MAX_PAGES))
        keep[h] = MW'(last_vpn + 2'd2);
      else
        keep[h] = MW'(last_vpn + 1'b1);
      demand[h]   = heap_fault[h] && !space_ok[h] && vpn_s < SIZE_W'(MAX_PAGES) &&
                    !pending[h] && !exhausted && !(fst != F_IDLE && f_heap == HW'(h));
      prefetch[h] = !demand[h] && mapped[h] < keep[h] && !pending[h] && !exhausted &&
                    !(fst != F_IDLE && f_heap == HW'(h));
      excess[h]   = mapped[h] > keep[h] && !pending[h] && !heap_fault[h];
      compacting[h] = (fst != F_IDLE) && f_heap == HW'(h);
    end
  end

  // ---------------- allocation requests
  logic [HW-1:0] ha, hb;
  logic          any_a, any_b;
  always_comb begin
    any_a = 1'b0; ha = '0;
    any_b = 1'b0; hb = '0;
    for (int h = int'(NH) - 1; h >= 0; h--)
      if (demand[h]) begin any_a = 1'b1; ha = HW'(h); end
    // port b: a second page fault if there is one, else a prefetch
    for (int h = int'(NH) - 1; h >= 0; h--)
      if (prefetch[h]) begin any_b = 1'b1; hb = HW'(h); end
    for (int h = 0; h < int'(NH); h++)
      if (demand[h] && HW'(h) != ha) begin any_b = 1'b1; hb = HW'(h); end
  end
  assign a_valid = any_a && !pt_busy;
  assign b_valid = any_b && !pt_busy;
  assign a_tag   = {ha, VPN_W'(mapped[ha])};
  assign b_tag   = {hb, VPN_W'(mapped[hb])};

  // ---------------- free candidate
  logic [HW-1:0] hf;
  logic          any_f;
  always_comb begin
    any_f = 1'b0; hf = '0;
    for (int h = int'(NH) - 1; h >= 0; h--)
      if (excess[h]) begin any_f = 1'b1; hf = HW'(h); end
  end
  assign pt_rd_idx = {hf, VPN_W'(mapped[hf] - 1'b1)};
  assign ref_frame = f_frame;

  logic map_wr, free_now, f_abort;
  assign map_wr   = resp_valid && resp_ok;
  assign f_abort  = (fst == F_WAIT) && !excess[f_heap];
  assign free_now = (fst == F_WAIT) && !f_abort && ref_zero && !map_wr;

  always_comb begin
    pt_wr_en    = map_wr || free_now;
    pt_wr_idx   = map_wr ? resp_tag : {f_heap, VPN_W'(mapped[f_heap] - 1'b1)};
    pt_wr_valid = map_wr;
    pt_wr_pfn   = map_wr ? PFN_W'(resp_frame) : '0;
  end
  assign free_valid = free_now;
  assign free_frame = f_frame;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int h = 0; h < int'(NH); h++) mapped[h] <= '0;
      pending     <= '0;
      exhausted   <= 1'b0;
      fst         <= F_IDLE;
      f_heap      <= '0;
      f_frame     <= '0;
      f_waited    <= 1'b0;
      ev_demand   <= 1'b0;
      ev_prefetch <= 1'b0;
      ev_free     <= 1'b0;
      ev_delayed_free <= 1'b0;
    end else begin
      ev_demand       <= a_valid && a_ready || b_valid && b_ready && demand[hb];
      ev_prefetch     <= b_valid && b_ready && !demand[hb];
      ev_free         <= free_now;
      ev_delayed_free <= 1'b0;

      if (a_valid && a_ready) pending[ha] <= 1'b1;
      if (b_valid && b_ready) pending[hb] <= 1'b1;
      if (resp_valid) begin
        pending[resp_tag[TAG_W-1:VPN_W]] <= 1'b0;
        if (resp_ok) mapped[resp_tag[TAG_W-1:VPN_W]] <= mapped[resp_tag[TAG_W-1:VPN_W]] + 1'b1;
        else         exhausted <= 1'b1;
      end
      if (free_now) exhausted <= 1'b0;

      unique case (fst)
        F_IDLE: if (any_f && !pt_busy) begin
          f_heap   <= hf;
          f_waited <= 1'b0;
          fst      <= F_RD;
        end
        F_RD: begin
          f_frame <= pt_rd_pfn[FW-1:0];
          fst     <= F_WAIT;
        end
        F_WAIT: begin
          if (f_abort) begin
            fst <= F_IDLE;
          end else if (free_now) begin
            mapped[f_heap] <= mapped[f_heap] - 1'b1;
            fst <= F_IDLE;
            ev_delayed_free <= f_waited;
          end else if (!ref_zero) begin
            f_waited <= 1'b1;
          end
        end
        default: fst <= F_IDLE;
      endcase
    end
  end

  a_map_in_order: assert property (@(posedge clk) disable iff (!rst_n)
      resp_valid && resp_ok |-> VPN_W'(mapped[resp_tag[TAG_W-1:VPN_W]]) == resp_tag[VPN_W-1:0]);
  a_entry_valid: assert property (@(posedge clk) disable iff (!rst_n)
      fst == F_RD |-> pt_rd_valid);
endmodule
