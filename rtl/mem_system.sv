// mem_system: shared path from the heap engines to physical node memory.
//
// NPORT heap engines (bid and ask heap of every symbol) each present one
// request at a time: a node read or write at a heap index (the virtual
// address: 7-bit VPN, 6-bit page offset). A round-robin arbiter grants one
// request per cycle. The pipeline then runs:
//   cycle 0  grant; the page table is read at {port, VPN}
//   cycle 1  the frame number arrives (the one cycle of translation
//            latency); the BRAM pool is accessed at {PFN, offset}; a read
//            increments the reader count of its frame
//   cycle 2  read data is returned to the requesting port (rvalid); the
//            reader count is decremented
// A new request is granted every cycle, so requests of different heaps
// overlap. An access to an unmapped page is a design error: it is counted
// (ev_unmapped) and flagged by an assertion, and a write is dropped.
// Arbitration, the port numbering (port = 2*symbol index + side) and the
// two-cycle read latency are this design's choices; translation through a
// page table with one cycle of latency follows the document.
module mem_system
  import hft_pkg::*;
#(
  parameter int unsigned NPORT   = 16,
  parameter int unsigned NFRAMES = 256,
  localparam int unsigned PW     = $clog2(NPORT),
  localparam int unsigned FW     = $clog2(NFRAMES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic     [NPORT-1:0] req_valid,
  input  mem_req_t             req [NPORT],
  output logic     [NPORT-1:0] gnt,
  output logic     [NPORT-1:0] rvalid,
  output order_t               rdata,
  // page table read port
  output logic [PW+VPN_W-1:0]  pt_idx,
  input  logic                 pt_valid,
  input  logic [PFN_W-1:0]     pt_pfn,
  // reader counts
  output logic                 ref_inc,
  output logic [FW-1:0]        ref_inc_frame,
  output logic                 ref_dec,
  output logic [FW-1:0]        ref_dec_frame,
  // events
  output logic                 ev_read,
  output logic                 ev_write,
  output logic                 ev_unmapped
);
  // ---------------- round-robin arbiter
  logic [PW-1:0] rr;
  logic          any;
  logic [PW-1:0] sel;
  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int k = int'(NPORT) - 1; k >= 0; k--) begin
      logic [PW-1:0] p;
      p = rr + PW'(k);
      if (req_valid[p]) begin any = 1'b1; sel = p; end
    end
    gnt = '0;
    if (any) gnt[sel] = 1'b1;
  end

  mem_req_t sreq;
  assign sreq   = req[sel];
  assign pt_idx = {sel, sreq.addr[VADDR_W-1:OFF_W]};

  // ---------------- stage 1: translated access
  logic             s1_v, s1_we;
  logic [PW-1:0]    s1_port;
  logic [OFF_W-1:0] s1_off;
  order_t           s1_wdata;
  // ---------------- stage 2: read return
  logic             s2_v;
  logic [PW-1:0]    s2_port;
  logic [FW-1:0]    s2_frame;

  logic s1_ok;
  assign s1_ok = s1_v && pt_valid;

  bram_pool #(.NFRAMES(NFRAMES)) u_pool (
    .clk, .en(s1_ok), .we(s1_we), .addr({pt_pfn[FW-1:0], s1_off}),
    .wdata(s1_wdata), .rdata(rdata));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr       <= '0;
      s1_v     <= 1'b0;
      s1_we    <= 1'b0;
      s1_port  <= '0;
      s1_off   <= '0;
      s1_wdata <= '0;
      s2_v     <= 1'b0;
      s2_port  <= '0;
      s2_frame <= '0;
    end else begin
      if (any) rr <= sel + 1'b1;
      s1_v     <= any;
      s1_we    <= sreq.we;
      s1_port  <= sel;
      s1_off   <= sreq.addr[OFF_W-1:0];
      s1_wdata <= sreq.wdata;
      s2_v     <= s1_v && !s1_we;
      s2_port  <= s1_port;
      s2_frame <= pt_pfn[FW-1:0];
    end
  end

  always_comb begin
    rvalid = '0;
    if (s2_v) rvalid[s2_port] = 1'b1;
  end

  assign ref_inc       = s1_ok && !s1_we;
  assign ref_inc_frame = pt_pfn[FW-1:0];
  assign ref_dec       = s2_v;
  assign ref_dec_frame = s2_frame;
  assign ev_read       = s1_ok && !s1_we;
  assign ev_write      = s1_ok && s1_we;
  assign ev_unmapped   = s1_v && !pt_valid;

  a_mapped: assert property (@(posedge clk) disable iff (!rst_n) s1_v |-> pt_valid);
endmodule
