// hft_top: order-matching engine with paged heap memory.
//
// The processor writes orders over the Avalon bus (avalon_if). Each order
// is time-stamped (seq_counter) and queued in the order dispatch FIFO. The
// dispatcher looks the order's symbol up in the scoreboard, which gives it
// a symbol index (0..NSYM-1) and the symbol's status. If the symbol is not
// stalled the order goes to the bid max-heap or ask min-heap engine of that
// symbol; if that heap needs a new page and cannot get one it goes to the
// shared overflow page instead, and if that is full too it is rejected. A
// ninth symbol is rejected as well. Parked overflow orders are offered to
// the dispatcher again, taking turns with the FIFO, once their heap has
// room.
// Every symbol has a trade matcher watching the two heap roots; trades go
// to a trade queue that the processor reads and acknowledges. All heap
// engines share one memory path (mem_system): round-robin arbitration,
// page table translation, physical BRAM pool. The page manager maps and
// unmaps frames as heaps grow and shrink, using the bitmap allocator and
// the per-frame reader counts.
// Heap engine numbering: port 2*s is the bid heap of symbol index s, port
// 2*s+1 its ask heap. A per-heap overflow bit is set when an order for that
// heap is parked and cleared when the overflow buffer is empty; while it is
// set, later orders for that heap are parked behind the earlier ones rather
// than overtaking them.
// A symbol is stalled while it inserts, pops, has a trade possible or in
// progress, waits for a page or frees one. The scoreboard register shows
// a dispatch one cycle late, so in the cycle after a dispatch the same
// symbol may only send a second order to the same heap, where it waits in
// the heap's input buffer. Together with the engines' hold on buffered
// inserts while the matcher is busy, every order's trades are complete
// before the symbol's next order enters its book, as in a sequential
// order book.
// Writing sim_reset resets everything (one cycle later for the core); the
// page table then clears itself over 2048 cycles, during which inserts
// wait. Sizes default to the document's: 8 symbols, 256 frames of 64
// nodes, 128 pages per heap, an 8-entry overflow FIFO. The queue depths
// (16) and the dispatch policy are this design's choices.
module hft_top
  import hft_pkg::*;
#(
  parameter int unsigned NSYM          = 8,
  parameter int unsigned NFRAMES       = 256,
  parameter int unsigned MAX_PAGES     = 128,
  parameter int unsigned ORDER_DEPTH   = 16,
  parameter int unsigned TRADE_DEPTH   = 16,
  parameter int unsigned OVF_FIFO      = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  address,
  input  logic        write,
  input  logic [31:0] writedata,
  input  logic        read,
  output logic [31:0] readdata
);
  localparam int unsigned NH     = 2 * NSYM;
  localparam int unsigned IW     = $clog2(NSYM);
  localparam int unsigned HW     = $clog2(NH);
  localparam int unsigned FW     = $clog2(NFRAMES);
  localparam int unsigned SIZE_W = VADDR_W + 1;
  localparam int unsigned TAG_W  = HW + VPN_W;
  localparam int unsigned OAW    = $clog2(ORDER_DEPTH);
  localparam int unsigned TAW    = $clog2(TRADE_DEPTH);

  // ------------------------------------------------------------ reset
  logic soft_rst, soft_rst_q, core_rst_n;
  always_ff @(posedge clk) soft_rst_q <= rst_n ? soft_rst : 1'b0;
  assign core_rst_n = rst_n && !soft_rst_q;

  // ------------------------------------------------------- bus interface
  logic       ord_valid, sim_active, trade_ack;
  order_t     ord_in, ord_stamped, fifo_head;
  logic       fifo_full, fifo_empty, fifo_pop;
  logic [OAW:0]   fifo_count;
  logic [OAW-1:0] fifo_tail;
  trade_t     trade_head, trade_in;
  logic       trade_full, trade_empty, trade_push;
  logic [TAW:0]   trade_count;
  logic [TAW-1:0] trade_tail;
  logic       ev_mem_read, ev_mem_write, ev_stall, ev_overflow, ev_reject;

  avalon_if #(.TAIL_W(OAW)) u_bus (
    .clk, .rst_n, .address, .write, .writedata, .read, .readdata,
    .ord_valid, .ord(ord_in), .fifo_full, .fifo_tail,
    .trade_avail(!trade_empty), .trade_head, .trade_ack,
    .sim_active, .soft_rst,
    .ev_trade(trade_push), .ev_mem_read, .ev_mem_write, .ev_stall,
    .ev_overflow, .ev_reject);

  // ------------------------------------------------ time stamps (H5)
  logic [TS_W-1:0]  stamp_ts;
  logic [SEQ_W-1:0] stamp_seq;
  logic             accept;
  assign accept = ord_valid && !fifo_full;

  seq_counter u_seq (.clk, .rst_n(core_rst_n), .active(sim_active), .accept,
                     .stamp_ts, .stamp_seq);

  always_comb begin
    ord_stamped     = ord_in;
    ord_stamped.ts  = stamp_ts;
    ord_stamped.seq = stamp_seq;
  end

  order_fifo #(.T(order_t), .DEPTH(ORDER_DEPTH)) u_order_fifo (
    .clk, .rst_n(core_rst_n), .push(accept), .din(ord_stamped),
    .pop(fifo_pop), .head(fifo_head), .full(fifo_full), .empty(fifo_empty),
    .count(fifo_count), .tail(fifo_tail));

  // ------------------------------------------------------ heap engines
  logic [NH-1:0]     ins_valid, ins_ready, pop_req, edit_req, pop_done, edit_done;
  logic [NH-1:0]     root_valid, h_inserting, h_popping, h_fault;
  logic [NH-1:0]     ev_spec, ev_shadow, ev_buf;
  logic [QTY_W-1:0]  edit_qty [NSYM];
  order_t            root_node [NH];
  logic [SIZE_W-1:0] heap_size [NH];
  logic [NH-1:0]     space_ok, heap_full, h_compacting;
  logic [NH-1:0]     m_req_valid, m_gnt, m_rvalid;
  mem_req_t          m_req [NH];
  order_t            m_rdata;
  order_t            disp_node;
  logic [NSYM-1:0]   match_busy;

  for (genvar h = 0; h < NH; h++) begin : g_heap
    heap_engine #(.IS_MAX(h % 2 == 0), .SIZE_W(SIZE_W)) u_heap (
      .clk, .rst_n(core_rst_n),
      .ins_valid(ins_valid[h]), .ins_node(disp_node), .ins_ready(ins_ready[h]),
      .pop_req(pop_req[h]), .hold_ins(match_busy[h/2]), .edit_req(edit_req[h]), .edit_qty(edit_qty[h/2]),
      .pop_done(pop_done[h]), .edit_done(edit_done[h]),
      .root_valid(root_valid[h]), .root_node(root_node[h]),
      .size(heap_size[h]), .space_ok(space_ok[h]),
      .inserting(h_inserting[h]), .popping(h_popping[h]), .page_fault(h_fault[h]),
      .ev_spec_fwd(ev_spec[h]), .ev_shadow_fwd(ev_shadow[h]), .ev_ins_buffered(ev_buf[h]),
      .mem_req_valid(m_req_valid[h]), .mem_req(m_req[h]), .mem_gnt(m_gnt[h]),
      .mem_rvalid(m_rvalid[h]), .mem_rdata(m_rdata));
  end

  // ------------------------------------------------ matchers and trades
  logic [NSYM-1:0] t_valid, t_ready, lock_block;
  trade_t          t_trade [NSYM];
  logic [IW-1:0]   t_rr, t_sel;
  logic            t_any;

  for (genvar s = 0; s < NSYM; s++) begin : g_sym
    logic bid_lock, ask_lock;
    trade_matcher u_match (
      .clk, .rst_n(core_rst_n),
      .bid_valid(root_valid[2*s]), .bid_root(root_node[2*s]),
      .ask_valid(root_valid[2*s+1]), .ask_root(root_node[2*s+1]),
      .bid_pop_done(pop_done[2*s]), .bid_edit_done(edit_done[2*s]),
      .ask_pop_done(pop_done[2*s+1]), .ask_edit_done(edit_done[2*s+1]),
      .trade_valid(t_valid[s]), .trade(t_trade[s]), .trade_ready(t_ready[s]),
      .bid_pop(pop_req[2*s]), .ask_pop(pop_req[2*s+1]),
      .bid_edit(edit_req[2*s]), .ask_edit(edit_req[2*s+1]),
      .edit_qty(edit_qty[s]), .bid_lock, .ask_lock,
      .ev_lock_block(lock_block[s]), .busy(match_busy[s]));
  end

  // round-robin choice of the matcher that may write the trade queue
  always_comb begin
    t_any = 1'b0;
    t_sel = '0;
    for (int k = int'(NSYM) - 1; k >= 0; k--) begin
      logic [IW-1:0] p;
      p = t_rr + IW'(k);
      if (t_valid[p]) begin t_any = 1'b1; t_sel = p; end
    end
    t_ready = '0;
    if (t_any && !trade_full) t_ready[t_sel] = 1'b1;
  end
  assign trade_push = t_any && !trade_full;
  assign trade_in   = t_trade[t_sel];
  always_ff @(posedge clk) begin
    if (!core_rst_n)     t_rr <= '0;
    else if (trade_push) t_rr <= t_sel + 1'b1;
  end

  order_fifo #(.T(trade_t), .DEPTH(TRADE_DEPTH)) u_trade_fifo (
    .clk, .rst_n(core_rst_n), .push(trade_push), .din(trade_in),
    .pop(trade_ack), .head(trade_head), .full(trade_full), .empty(trade_empty),
    .count(trade_count), .tail(trade_tail));

  // ------------------------------------------------------ memory system
  logic [HW+VPN_W-1:0] pt0_idx;
  logic                pt0_valid, pt1_valid, pt_busy;
  logic [PFN_W-1:0]    pt0_pfn, pt1_pfn;
  logic [TAG_W-1:0]    pt1_idx, ptw_idx;
  logic                ptw_en, ptw_valid;
  logic [PFN_W-1:0]    ptw_pfn;
  logic                ref_inc, ref_dec, ref_zero;
  logic [FW-1:0]       ref_inc_frame, ref_dec_frame, ref_q_frame;
  logic [1:0]          ref_q_count;
  logic                ev_unmapped;

  mem_system #(.NPORT(NH), .NFRAMES(NFRAMES)) u_mem (
    .clk, .rst_n(core_rst_n), .req_valid(m_req_valid), .req(m_req),
    .gnt(m_gnt), .rvalid(m_rvalid), .rdata(m_rdata),
    .pt_idx(pt0_idx), .pt_valid(pt0_valid), .pt_pfn(pt0_pfn),
    .ref_inc, .ref_inc_frame, .ref_dec, .ref_dec_frame,
    .ev_read(ev_mem_read), .ev_write(ev_mem_write), .ev_unmapped);

  page_table #(.SPACE_W(HW)) u_pt (
    .clk, .rst_n(core_rst_n),
    .rd0_idx(pt0_idx), .rd0_valid(pt0_valid), .rd0_pfn(pt0_pfn),
    .rd1_idx(pt1_idx), .rd1_valid(pt1_valid), .rd1_pfn(pt1_pfn),
    .wr_en(ptw_en), .wr_idx(ptw_idx), .wr_valid(ptw_valid), .wr_pfn(ptw_pfn),
    .init_busy(pt_busy));

  ref_counter #(.NFRAMES(NFRAMES)) u_ref (
    .clk, .rst_n(core_rst_n),
    .inc_valid(ref_inc), .inc_frame(ref_inc_frame),
    .dec_valid(ref_dec), .dec_frame(ref_dec_frame),
    .query_frame(ref_q_frame), .query_zero(ref_zero), .query_count(ref_q_count));

  logic             fa_a_valid, fa_a_ready, fa_b_valid, fa_b_ready;
  logic [TAG_W-1:0] fa_a_tag, fa_b_tag, fa_resp_tag;
  logic             fa_resp_valid, fa_resp_ok, fa_free_valid, ev_queued;
  logic [FW-1:0]    fa_resp_frame, fa_free_frame;
  logic [FW:0]      free_count;

  frame_allocator #(.NFRAMES(NFRAMES), .TAG_W(TAG_W)) u_alloc (
    .clk, .rst_n(core_rst_n),
    .a_valid(fa_a_valid), .a_tag(fa_a_tag), .a_ready(fa_a_ready),
    .b_valid(fa_b_valid), .b_tag(fa_b_tag), .b_ready(fa_b_ready),
    .free_valid(fa_free_valid), .free_frame(fa_free_frame),
    .resp_valid(fa_resp_valid), .resp_ok(fa_resp_ok), .resp_tag(fa_resp_tag),
    .resp_frame(fa_resp_frame), .free_count, .ev_queued);

  logic ev_demand, ev_prefetch, ev_free, ev_delayed_free;

  page_manager #(.NH(NH), .NFRAMES(NFRAMES), .MAX_PAGES(MAX_PAGES)) u_pm (
    .clk, .rst_n(core_rst_n), .heap_size, .heap_fault(h_fault),
    .space_ok, .heap_full, .compacting(h_compacting),
    .a_valid(fa_a_valid), .a_tag(fa_a_tag), .a_ready(fa_a_ready),
    .b_valid(fa_b_valid), .b_tag(fa_b_tag), .b_ready(fa_b_ready),
    .resp_valid(fa_resp_valid), .resp_ok(fa_resp_ok), .resp_tag(fa_resp_tag),
    .resp_frame(fa_resp_frame), .free_count,
    .free_valid(fa_free_valid), .free_frame(fa_free_frame),
    .pt_rd_idx(pt1_idx), .pt_rd_valid(pt1_valid), .pt_rd_pfn(pt1_pfn),
    .pt_wr_en(ptw_en), .pt_wr_idx(ptw_idx), .pt_wr_valid(ptw_valid), .pt_wr_pfn(ptw_pfn),
    .pt_busy, .ref_frame(ref_q_frame), .ref_zero,
    .ev_demand, .ev_prefetch, .ev_free, .ev_delayed_free);

  // ------------------------------------------------------ scoreboard
  logic [NSYM-1:0] st_ins, st_pop, st_fault, st_comp, st_ovf;
  logic [NH-1:0]   ovf_heap;
  for (genvar s = 0; s < NSYM; s++) begin : g_status
    assign st_ins[s]   = h_inserting[2*s]  || h_inserting[2*s+1];
    assign st_pop[s]   = h_popping[2*s]    || h_popping[2*s+1] || match_busy[s];
    assign st_ovf[s]   = ovf_heap[2*s]     || ovf_heap[2*s+1];
    assign st_fault[s] = h_fault[2*s]      || h_fault[2*s+1];
    assign st_comp[s]  = h_compacting[2*s] || h_compacting[2*s+1];
  end

  logic            lk_alloc, lk_hit, lk_room, lk_stalled;
  logic [IW-1:0]   lk_idx;
  logic [4:0]      lk_status;
  logic [NSYM-1:0] sym_active;
  order_t          cur;

  scoreboard #(.NSYM(NSYM)) u_sb (
    .clk, .rst_n(core_rst_n),
    .st_inserting(st_ins), .st_popping(st_pop), .st_page_fault(st_fault),
    .st_compacting(st_comp), .st_overflow(st_ovf),
    .lk_symbol(cur.symbol), .lk_alloc, .lk_hit, .lk_room, .lk_idx,
    .lk_status, .lk_stalled, .active(sym_active));

  // ------------------------------------------------------ overflow (H7)
  logic   ovf_in_valid, ovf_in_ready, ovf_reject, ovf_out_valid, ovf_out_ready, ovf_empty;
  order_t ovf_out_node;

  overflow_buffer #(.FIFO_DEPTH(OVF_FIFO)) u_ovf (
    .clk, .rst_n(core_rst_n), .in_valid(ovf_in_valid), .in_node(cur),
    .in_ready(ovf_in_ready), .reject(ovf_reject),
    .out_valid(ovf_out_valid), .out_node(ovf_out_node), .out_ready(ovf_out_ready),
    .empty(ovf_empty));

  // ------------------------------------------------------ dispatch
  logic          use_ovf_q, use_ovf, cur_valid, blocked, stall_here;
  logic [HW-1:0] tgt, last_heap;
  logic [IW-1:0] last_idx;
  logic          last_v;
  assign use_ovf   = ovf_out_valid && (use_ovf_q || fifo_empty);
  assign cur       = use_ovf ? ovf_out_node : fifo_head;
  assign cur_valid = use_ovf || !fifo_empty;
  assign tgt       = {lk_idx, cur.side};
  assign disp_node = cur;

  always_comb begin
    ins_valid     = '0;
    fifo_pop      = 1'b0;
    ovf_in_valid  = 1'b0;
    ovf_out_ready = 1'b0;
    lk_alloc      = 1'b0;
    ev_reject     = 1'b0;
    ev_overflow   = 1'b0;
    blocked       = 1'b0;
    stall_here    = 1'b0;
    if (cur_valid) begin
      if (!lk_hit && !lk_room) begin
        // ninth symbol: no scoreboard entry, no heap
        fifo_pop  = 1'b1;
        ev_reject = 1'b1;
      end else begin
        lk_alloc = !use_ovf;
        if (lk_stalled ||
            (last_v && lk_idx == last_idx && tgt != last_heap)) begin
          stall_here = 1'b1;
        end else if (heap_full[tgt] || (!use_ovf && ovf_heap[tgt]) || !lk_hit) begin
          if (!lk_hit) begin
            blocked = 1'b1;            // entry being created this cycle
          end else if (use_ovf) begin
            blocked = 1'b1;            // parked order still has no room
          end else begin
            ovf_in_valid = 1'b1;
            if (ovf_in_ready) begin
              fifo_pop    = 1'b1;
              ev_overflow = 1'b1;
            end else if (ovf_reject) begin
              fifo_pop  = 1'b1;
              ev_reject = 1'b1;
            end else begin
              blocked = 1'b1;
            end
          end
        end else if (ins_ready[tgt]) begin
          ins_valid[tgt] = 1'b1;
          if (use_ovf) ovf_out_ready = 1'b1;
          else         fifo_pop      = 1'b1;
        end else begin
          stall_here = 1'b1;
        end
      end
    end
  end
  assign ev_stall = stall_here;

  always_ff @(posedge clk) begin
    if (!core_rst_n) begin
      use_ovf_q <= 1'b0;
      ovf_heap  <= '0;
      last_v    <= 1'b0;
      last_idx  <= '0;
      last_heap <= '0;
    end else begin
      // the scoreboard shows a dispatch one cycle late: remember it
      last_v    <= |ins_valid;
      last_idx  <= lk_idx;
      last_heap <= tgt;
      // take turns between the two sources whenever one cannot move
      if (blocked || stall_here) use_ovf_q <= !use_ovf_q;
      if (ev_overflow) ovf_heap[tgt] <= 1'b1;
      else if (ovf_empty) ovf_heap <= '0;
    end
  end

  a_no_unmapped: assert property (@(posedge clk) disable iff (!core_rst_n) !ev_unmapped);
endmodule
