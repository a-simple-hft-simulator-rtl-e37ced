// seq_counter: order time-stamping (H5).
//
// A 32-bit timestamp counts clock cycles while the simulation is active; an
// 8-bit global sequence number is appended to it and advances, wrapping,
// each time an order is accepted. Two orders accepted in the same cycle
// (or the same timestamp) therefore never compare equal in the heaps, which
// order equal prices by {timestamp, sequence}. stamp_ts/stamp_seq are the
// values the order accepted in this cycle receives. Counting only while
// `active` is this design's choice; widths follow the order format.
module seq_counter
  import hft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             active,
  input  logic             accept,
  output logic [TS_W-1:0]  stamp_ts,
  output logic [SEQ_W-1:0] stamp_seq
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stamp_ts  <= '0;
      stamp_seq <= '0;
    end else begin
      if (active) stamp_ts  <= stamp_ts + 1'b1;
      if (accept) stamp_seq <= stamp_seq + 1'b1;
    end
  end
endmodule
