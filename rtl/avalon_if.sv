// avalon_if: the processor's register window (input interface, control and
// status, trade output and performance counters).
//
// An Avalon memory-mapped slave with 32-bit words, zero read latency
// (readdata is valid in the cycle `read` is high). Word map:
//   0 (0x00) R/W control/status
//            R: [0] ready (order FIFO can take an order), [1] fifo_stop
//               (order FIFO full), [2] trade_avail, [4] sim_active,
//               [7] overflow_flag, [8] reject_flag
//            W: [3] trade_ack, [5] sim_start, [6] sim_reset
//   1 (0x04) R   order FIFO tail index (advances when an order is taken)
//   2 (0x08) R   trade output low:  [15:0] exec_price, [31:16] exec_qty
//   3 (0x0C) R   trade output high: [20:0] symbol, [21] fill_type
//                (bits 52:32 and 53 of the 64-bit trade word)
//   4..9 (0x10..0x24) R cycle_count, trade_count, mem_reads, mem_writes,
//                hazard_stalls, hard_rejects
//   12 (0x30) W  order META: byte0 = {valid, symbol[6:0]},
//                byte1 = {type, symbol[13:7]}, byte2 = {flip, symbol[20:14]}
//   13 (0x34) W  order price [15:0], amount [31:16]
//   14 (0x38) W  order timestamp word; writing it submits the order
// An order is submitted when word 14 is written while the META valid bit is
// set and the simulation is active; it is taken only if the FIFO has room
// (ready/valid: ord_valid is high for that one cycle and the FIFO pushes it
// when not full; otherwise it is dropped and the tail does not move, which
// the software sees). The software timestamp is not used: the hardware
// stamps each order on receipt. sim_reset produces a one-cycle reset of all
// other logic (soft_rst) and clears the flags and counters; sim_start sets
// sim_active. cycle_count counts while active. hazard_stalls counts cycles
// in which an order is waiting for a stalled symbol.
// The word addresses of the order, tail and trade registers, the bit 0
// ready flag and the submit rule are this design's choices where the
// document's register tables and driver code disagree.
module avalon_if
  import hft_pkg::*;
#(
  parameter int unsigned TAIL_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // Avalon-MM slave
  input  logic [3:0]        address,
  input  logic              write,
  input  logic [31:0]       writedata,
  input  logic              read,
  output logic [31:0]       readdata,
  // towards the order FIFO
  output logic              ord_valid,
  output order_t            ord,        // ts and seq left zero
  input  logic              fifo_full,
  input  logic [TAIL_W-1:0] fifo_tail,
  // trade output queue
  input  logic              trade_avail,
  input  trade_t            trade_head,
  output logic              trade_ack,
  // control
  output logic              sim_active,
  output logic              soft_rst,
  // event inputs for flags and counters
  input  logic              ev_trade,
  input  logic              ev_mem_read,
  input  logic              ev_mem_write,
  input  logic              ev_stall,
  input  logic              ev_overflow,
  input  logic              ev_reject
);
  logic [31:0] meta_q, prc_amt_q;
  logic        overflow_flag, reject_flag;
  logic [31:0] cycle_count, trade_count, mem_reads, mem_writes, hazard_stalls, hard_rejects;

  logic wr_ctrl;
  assign wr_ctrl   = write && address == 4'd0;
  assign trade_ack = wr_ctrl && writedata[3] && trade_avail;
  assign soft_rst  = wr_ctrl && writedata[6];

  always_comb begin
    ord        = '0;
    ord.symbol = {meta_q[22:16], meta_q[14:8], meta_q[6:0]};
    ord.side   = side_e'(meta_q[15]);
    ord.price  = prc_amt_q[15:0];
    ord.qty    = prc_amt_q[31:16];
  end
  assign ord_valid = write && address == 4'd14 && meta_q[7] && sim_active;

  always_comb begin
    readdata = '0;
    unique case (address)
      4'd0: begin
        readdata[0] = !fifo_full;
        readdata[1] = fifo_full;
        readdata[2] = trade_avail;
        readdata[4] = sim_active;
        readdata[7] = overflow_flag;
        readdata[8] = reject_flag;
      end
      4'd1: readdata = 32'(fifo_tail);
      4'd2: readdata = {trade_head.qty, trade_head.price};
      4'd3: readdata = {10'b0, trade_head.partial, trade_head.symbol};
      4'd4: readdata = cycle_count;
      4'd5: readdata = trade_count;
      4'd6: readdata = mem_reads;
      4'd7: readdata = mem_writes;
      4'd8: readdata = hazard_stalls;
      4'd9: readdata = hard_rejects;
      default: readdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n || soft_rst) begin
      meta_q        <= '0;
      prc_amt_q     <= '0;
      sim_active    <= 1'b0;
      overflow_flag <= 1'b0;
      reject_flag   <= 1'b0;
      cycle_count   <= '0;
      trade_count   <= '0;
      mem_reads     <= '0;
      mem_writes    <= '0;
      hazard_stalls <= '0;
      hard_rejects  <= '0;
    end else begin
      if (write && address == 4'd12) meta_q    <= writedata;
      if (write && address == 4'd13) prc_amt_q <= writedata;
      if (wr_ctrl && writedata[5]) sim_active <= 1'b1;
      if (ev_overflow) overflow_flag <= 1'b1;
      if (ev_reject)   reject_flag   <= 1'b1;
      if (sim_active)  cycle_count   <= cycle_count + 1'b1;
      trade_count   <= trade_count   + 32'(ev_trade);
      mem_reads     <= mem_reads     + 32'(ev_mem_read);
      mem_writes    <= mem_writes    + 32'(ev_mem_write);
      hazard_stalls <= hazard_stalls + 32'(ev_stall);
      hard_rejects  <= hard_rejects  + 32'(ev_reject);
    end
  end

  // unused bits of the bus words
  logic unused;
  assign unused = ^{read, meta_q[31:23]};
endmodule
