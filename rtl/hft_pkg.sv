// hft_pkg: types and constants shared by the order-matching and memory
// management blocks.
//
// An order node carries the five fields of the order format (type, price,
// quantity, 21-bit symbol made of three 7-bit ASCII letters, 32-bit
// timestamp) plus the 8-bit global sequence number that breaks same-cycle
// timestamp ties. The 94 bits fit in the three 32-bit BRAM words a node
// occupies. The heap priority rule is price first, then the older
// {timestamp, sequence}. Sizes follow the memory budget: 64-node pages,
// 7-bit virtual page numbers (128 pages per address space), 8-bit physical
// frame numbers (256 frames). The fill-type and register encodings follow
// the hardware/software interface tables.
package hft_pkg;

  localparam int unsigned PRICE_W  = 16;
  localparam int unsigned QTY_W    = 16;
  localparam int unsigned SYM_W    = 21;
  localparam int unsigned TS_W     = 32;
  localparam int unsigned SEQ_W    = 8;

  localparam int unsigned OFF_W    = 6;   // node index within a 64-node page
  localparam int unsigned VPN_W    = 7;   // 128 pages per address space
  localparam int unsigned PFN_W    = 8;   // 256 physical frames
  localparam int unsigned VADDR_W  = VPN_W + OFF_W;   // 13-bit heap index
  localparam int unsigned PADDR_W  = PFN_W + OFF_W;   // 14-bit node address

  localparam int unsigned PAGE_NODES = 1 << OFF_W;    // 64
  localparam int unsigned PREFETCH_AT = 48;           // 75% of a page

  typedef enum logic {SIDE_BID = 1'b0, SIDE_ASK = 1'b1} side_e;

  typedef struct packed {
    side_e              side;   // 0 = bid, 1 = ask
    logic [PRICE_W-1:0] price;
    logic [QTY_W-1:0]   qty;
    logic [SYM_W-1:0]   symbol;
    logic [TS_W-1:0]    ts;
    logic [SEQ_W-1:0]   seq;
  } order_t;

  localparam int unsigned NODE_W = $bits(order_t);    // 94

  typedef struct packed {
    logic               partial;  // 0 = full fill, 1 = partial fill
    logic [SYM_W-1:0]   symbol;
    logic [QTY_W-1:0]   qty;
    logic [PRICE_W-1:0] price;
  } trade_t;

  // Memory request from a heap engine: one node read or write at a heap
  // index (virtual address).
  typedef struct packed {
    logic               we;
    logic [VADDR_W-1:0] addr;
    order_t             wdata;
  } mem_req_t;

  // True when node a must sit above node b. For a max-heap (bids) the higher
  // price wins; for a min-heap (asks) the lower price wins. Equal prices go
  // to the earlier {timestamp, sequence}.
  function automatic logic node_beats(input order_t a, input order_t b,
                                      input logic is_max);
    logic [TS_W+SEQ_W-1:0] age_a, age_b;
    age_a = {a.ts, a.seq};
    age_b = {b.ts, b.seq};
    if (a.price != b.price)
      return is_max ? (a.price > b.price) : (a.price < b.price);
    return age_a < age_b;
  endfunction

endpackage
