// frame_allocator: free-frame bitmap and allocator (sections on page
// allocation and H6).
//
// A 256-bit register holds one bit per physical frame, 1 = free. A priority
// encoder finds the lowest free frame in one cycle; it is built as 8-bit
// sub-encoders whose "any free" flags feed a second-level encoder. An
// allocation clears the bit, a free sets it again, both in the same cycle
// the request is taken, so no frame can be handed out twice.
// Two request ports: when a and b request in the same cycle, a is served
// and b goes into a one-entry queue served next cycle (ev_queued pulses).
// Both ports have ready low while the queue is full.
// The answer comes one cycle after the request is served: resp_valid with
// the requester's tag, resp_ok (0 when no frame was free) and the frame.
// free_count is the number of free frames. The tag (21-bit symbol + 7-bit
// VPN = 28 bits) and the sizes follow the document; the queue entry and the
// answer timing are this design's.
module frame_allocator
  import hft_pkg::*;
#(
  parameter int unsigned NFRAMES = 256,
  parameter int unsigned TAG_W   = SYM_W + VPN_W,
  localparam int unsigned FW     = $clog2(NFRAMES),
  localparam int unsigned NGRP   = NFRAMES / 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             a_valid,
  input  logic [TAG_W-1:0] a_tag,
  output logic             a_ready,
  input  logic             b_valid,
  input  logic [TAG_W-1:0] b_tag,
  output logic             b_ready,
  input  logic             free_valid,
  input  logic [FW-1:0]    free_frame,
  output logic             resp_valid,
  output logic             resp_ok,
  output logic [TAG_W-1:0] resp_tag,
  output logic [FW-1:0]    resp_frame,
  output logic [FW:0]      free_count,
  output logic             ev_queued
);
  logic [NFRAMES-1:0] bitmap;
  logic               q_valid;
  logic [TAG_W-1:0]   q_tag;

  // two-level priority encoder
  logic [NGRP-1:0] grp_any;
  logic [FW-1:0]   first;
  logic            any_free;
  always_comb begin
    logic [$clog2(NGRP)-1:0] g;
    logic [2:0]              b;
    for (int i = 0; i < int'(NGRP); i++) grp_any[i] = |bitmap[i*8 +: 8];
    g = '0;
    for (int i = int'(NGRP) - 1; i >= 0; i--) if (grp_any[i]) g = ($clog2(NGRP))'(i);
    b = '0;
    for (int i = 7; i >= 0; i--) if (bitmap[{g, 3'(i)}]) b = 3'(i);
    first    = {g, b};
    any_free = |grp_any;
  end

  // which request is served this cycle
  logic             serve;
  logic [TAG_W-1:0] serve_tag;
  always_comb begin
    serve     = q_valid || (a_valid && a_ready) || (b_valid && b_ready);
    serve_tag = q_valid ? q_tag : (a_valid ? a_tag : b_tag);
  end
  assign a_ready = !q_valid;
  assign b_ready = !q_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bitmap     <= '1;
      free_count <= (FW+1)'(NFRAMES);
      q_valid    <= 1'b0;
      q_tag      <= '0;
      resp_valid <= 1'b0;
      resp_ok    <= 1'b0;
      resp_tag   <= '0;
      resp_frame <= '0;
      ev_queued  <= 1'b0;
    end else begin
      logic [NFRAMES-1:0] nb;
      logic               took;
      nb   = bitmap;
      took = serve && any_free;
      if (took) nb[first] = 1'b0;
      if (free_valid) nb[free_frame] = 1'b1;
      bitmap     <= nb;
      free_count <= free_count - (FW+1)'(took) + (FW+1)'(free_valid);

      resp_valid <= serve;
      resp_ok    <= took;
      resp_tag   <= serve_tag;
      resp_frame <= first;

      // queue: a second request that arrives with another one
      ev_queued <= 1'b0;
      if (q_valid) begin
        // the queued request is served now; a and b wait
        q_valid <= 1'b0;
      end else if (a_valid && b_valid) begin
        q_valid   <= 1'b1;
        q_tag     <= b_tag;
        ev_queued <= 1'b1;
      end
    end
  end

  a_free_was_used: assert property (@(posedge clk) disable iff (!rst_n)
                                    free_valid |-> !bitmap[free_frame]);
endmodule
