// tb_node_mem: behavioural node memory used by the heap engine testbench.
// It grants a request on random cycles (about two in three), performs
// writes at once and returns read data two cycles after the grant, which is
// the latency of the translated memory path of the full design. While a
// read is in flight no new request is granted.
module tb_node_mem
  import hft_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << VADDR_W
) (
  input  logic     clk,
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     gnt,
  output logic     rvalid,
  output order_t   rdata
);
  order_t      mem [DEPTH];
  logic        p1_v = 1'b0;
  order_t      p1_d = '0;
  logic        lucky = 1'b0;
  int unsigned writes = 0, reads = 0;

  initial begin
    rvalid = 1'b0;
    rdata  = '0;
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  assign gnt = req_valid && lucky && !p1_v && !rvalid;

  always @(posedge clk) begin
    lucky  <= ($urandom_range(2, 0) != 0);
    p1_v   <= 1'b0;
    rvalid <= p1_v;
    rdata  <= p1_d;
    if (gnt) begin
      if (req.we) begin
        mem[req.addr] <= req.wdata;
        writes <= writes + 1;
      end else begin
        p1_v  <= 1'b1;
        p1_d  <= mem[req.addr];
        reads <= reads + 1;
      end
    end
  end
endmodule
