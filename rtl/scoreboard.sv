// scoreboard: per-symbol scoreboard (H10) with the symbol-to-index map.
//
// Up to NSYM symbols are active at once. A small content-addressed table
// maps a 21-bit symbol to a 3-bit index; a symbol not seen before takes the
// next free entry when the dispatcher asks for it (lk_alloc), and keeps it
// until reset. Each entry has five status bits, written every cycle from
// their sources: inserting and popping (heap engines), page-fault pending
// and overflow (memory side), compacting (a page of the symbol is being
// freed). The read port, indexed by the looked-up symbol, returns the five
// bits and `stalled`. Dispatch of that symbol's orders waits while it is
// stalled; other symbols go on.
// `stalled` is the OR of inserting, popping, page-fault and compacting.
// The overflow bit is reported but left out of `stalled`: orders parked in
// the overflow page belong to one side of the book, and stalling the whole
// symbol would also hold back the opposite orders whose trades free the
// memory the parked orders wait for. The dispatcher applies that bit per
// heap instead. Keeping entries until reset and leaving the overflow bit
// out of `stalled` are this design's choices; the sizes (8 entries, 5
// bits, 21-bit tags) follow the document.
module scoreboard
  import hft_pkg::*;
#(
  parameter int unsigned NSYM = 8,
  localparam int unsigned IW  = $clog2(NSYM)
) (
  input  logic             clk,
  input  logic             rst_n,
  // status sources, one bit per symbol index
  input  logic [NSYM-1:0]  st_inserting,
  input  logic [NSYM-1:0]  st_popping,
  input  logic [NSYM-1:0]  st_page_fault,
  input  logic [NSYM-1:0]  st_compacting,
  input  logic [NSYM-1:0]  st_overflow,
  // lookup / read port
  input  logic [SYM_W-1:0] lk_symbol,
  input  logic             lk_alloc,
  output logic             lk_hit,
  output logic             lk_room,     // a free entry exists
  output logic [IW-1:0]    lk_idx,      // hit index, or the entry to allocate
  output logic [4:0]       lk_status,   // {overflow, compacting, fault, popping, inserting}
  output logic             lk_stalled,
  output logic [NSYM-1:0]  active
);
  logic [SYM_W-1:0] tag [NSYM];
  logic [4:0]       status [NSYM];

  always_comb begin
    lk_hit  = 1'b0;
    lk_room = 1'b0;
    lk_idx  = '0;
    for (int i = int'(NSYM) - 1; i >= 0; i--)
      if (!active[i]) begin lk_room = 1'b1; lk_idx = IW'(i); end
    for (int i = 0; i < int'(NSYM); i++)
      if (active[i] && tag[i] == lk_symbol) begin lk_hit = 1'b1; lk_idx = IW'(i); end
    lk_status  = lk_hit ? status[lk_idx] : 5'b0;
    lk_stalled = |lk_status[3:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= '0;
      for (int i = 0; i < int'(NSYM); i++) begin
        tag[i]    <= '0;
        status[i] <= '0;
      end
    end else begin
      for (int i = 0; i < int'(NSYM); i++)
        status[i] <= {st_overflow[i], st_compacting[i], st_page_fault[i],
                      st_popping[i], st_inserting[i]};
      if (lk_alloc && !lk_hit && lk_room) begin
        active[lk_idx] <= 1'b1;
        tag[lk_idx]    <= lk_symbol;
      end
    end
  end
endmodule
