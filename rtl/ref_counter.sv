// ref_counter: per-frame reader counts for delayed deallocation (H9).
//
// Every physical frame has a 2-bit saturating counter of reads in flight.
// The memory path increments the counter of a frame when a read of it is
// issued and decrements it when the data has come back. The memory manager
// asks whether a frame may be freed: it may when the counter is zero (the
// NOR of the two bits), otherwise the free waits. One increment and one
// decrement can arrive in the same cycle, on the same or different frames.
// The counter sizes follow the document; the port layout is this design's.
module ref_counter
  import hft_pkg::*;
#(
  parameter int unsigned NFRAMES = 256,
  parameter int unsigned CNT_W   = 2,
  localparam int unsigned FW     = $clog2(NFRAMES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc_valid,
  input  logic [FW-1:0] inc_frame,
  input  logic          dec_valid,
  input  logic [FW-1:0] dec_frame,
  input  logic [FW-1:0] query_frame,
  output logic          query_zero,
  output logic [CNT_W-1:0] query_count
);
  logic [CNT_W-1:0] cnt [NFRAMES];

  assign query_count = cnt[query_frame];
  assign query_zero  = ~|cnt[query_frame];

  always_ff @(posedge clk) begin
    for (int f = 0; f < int'(NFRAMES); f++) begin
      logic up, dn;
      up = inc_valid && (inc_frame == FW'(f));
      dn = dec_valid && (dec_frame == FW'(f));
      if (!rst_n)
        cnt[f] <= '0;
      else if (up && !dn && cnt[f] != '1)
        cnt[f] <= cnt[f] + 1'b1;
      else if (dn && !up && cnt[f] != '0)
        cnt[f] <= cnt[f] - 1'b1;
    end
  end
endmodule
