# Order-matching engine with paged heap memory

This is an FPGA order book for a small high-frequency-trading simulator.
A processor sends buy (bid) and sell (ask) limit orders over a memory-mapped
bus. The hardware keeps one order book per stock symbol and matches orders
as soon as they cross. It returns trade confirmations to the processor.

Each side of a book is a binary heap in on-chip block RAM:

- The bids form a max-heap, so the best bid is at the root.
- The asks form a min-heap, so the best ask is at the root.

The two roots are compared every cycle.

The heaps do not get fixed memory regions. Each heap sees its own virtual
address space, and a small memory-management unit backs it with 64-node
pages taken from a shared pool of 256 physical frames:

- A page is allocated when a heap grows into it.
- A page is prefetched when the current page is 75 % full.
- A page is freed when the heap shrinks away from it, but only once no read
  of that page is still in flight.

Around this sits a set of hazard mechanisms that keep pipelined heap
operations, matching and paging from corrupting each other.

The RTL is SystemVerilog 2017. Default sizes:

| Resource | Default |
|---|---|
| Active symbols | 8 (16 heaps) |
| Physical frames | 256 × 64 nodes (16,384 nodes) |
| Pages per heap | at most 128 (8,192 orders per side) |
| Overflow | one shared 64-order page behind an 8-entry write FIFO |
| Order and trade queues | 16 entries each |

## Order node and priority

An order node is the packed struct `order_t` (see `rtl/hft_pkg.sv`), 94 bits
long:

| Field | Bits |
|---|---|
| side | 1 |
| price | 16 |
| quantity | 16 |
| symbol | 21 (three 7-bit upper-case ASCII letters) |
| timestamp | 32 |
| sequence | 8 |

It is stored as one 96-bit row, the three 32-bit words of a node side by
side.

The hardware stamps each accepted order with:

- the cycle count since the simulation was started, and
- an 8-bit sequence number that advances with every accepted order.

No two orders ever compare equal. Priority is:

1. better price (higher for bids, lower for asks);
2. then the earlier timestamp;
3. then the lower sequence number.

The function `node_beats` holds this rule.

## Matching (`trade_matcher`)

There is one matcher per symbol. When the bid root's price is at least the
ask root's price, a trade executes at the ask price for the smaller of the
two quantities:

- **Equal quantities:** both roots are popped (a full fill).
- **Unequal quantities:** the smaller side is popped. The larger root's
  quantity is reduced in place, which is an *edit*. This is reported as a
  partial fill.

The trade goes to a 16-entry output queue that the processor reads.

### Trade locks

Every heap has a trade-lock flag:

- It is set when a trade touches that heap's root.
- It is cleared when the heap reports the pop or edit done.

While either lock of a symbol is set, no further trade of that symbol
fires. This stops the same root from being matched twice while it is still
being removed.

## Heap engine (`heap_engine`)

There is one engine per heap. It owns a root register (the best order), the
size, and a single memory port (request, grant, read data some cycles
later). It runs one operation at a time.

### Insert

The new node enters at index `size` and moves up towards the root.

The engine keeps the moving node in a register and reads the parent at each
level. If the parent loses, the parent is written down into the *hole* and
the hole moves up. At the end the moving node is written once. This is one
read and one write per level, instead of swapping pairs.

### Pop

1. The last node is read.
2. The last node moves down from the root. At each level the engine reads
   both children, picks the better one, and moves it up into the hole.
3. The new root register is loaded from the node that ends at index 0.
4. The size drops when the last node's read has returned.

### Speculative root register

At the start of an insert, the new node is compared with the root register.
If the new node wins, it is placed in the register that same cycle, long
before the sift-up reaches index 0. The matcher only ever looks at this
register, so it never sees a stale root.

### Quantity shadow

A partial fill may edit the root while the engine is busy:

- If an insert is moving the root node itself, the edit goes into the moving
  register.
- Otherwise the edit is held in a shadow `{quantity, index, valid}`. Reads of
  that index are patched from the shadow, and the shadow is written back to
  memory when the engine is idle.

### Input buffer

A pop has priority over an insert. An insert that arrives in the same cycle
as a pop, or while a pop runs, waits in a one-node buffer with a valid flag.

An insert is also held while its symbol's matcher is busy (input
`hold_ins`), as described below.

## Dispatch and the per-symbol scoreboard (`hft_top`, `scoreboard`)

Orders enter a 16-entry FIFO. The dispatcher takes one order per cycle:

- A symbol is mapped to one of 8 scoreboard entries the first time it is
  seen.
- A ninth symbol is rejected.

Each entry carries five status bits, taken from the heaps and the memory
manager: inserting, popping, page-fault pending, compacting (a page is
being freed) and overflow.

An order waits when:

1. its symbol is stalled, meaning any of inserting, popping, fault or
   compacting is set; or
2. its symbol's matcher is busy (roots crossed or a lock held); or
3. in the cycle right after a dispatch to the same symbol, it is for the
   other side. An order for the same side goes to that heap's input buffer.

Only that symbol waits; other symbols keep flowing. Rules 2 and 3 make the
book behave exactly like a sequential one. Each incoming order is fully
matched before the next order of that symbol touches the book, so trades
come out in the same order and with the same prices and quantities as a
software order book would produce. The end-to-end testbench checks this
trade by trade.

The overflow bit is not part of `stalled`. Stalling a symbol because its bid
side has parked orders would also stop the asks whose trades free the bid
side's memory, which is a deadlock. Instead the dispatcher applies the bit
to that one heap.

## Paged memory

### Address translation (`mem_system`, `page_table`, `bram_pool`)

A heap index is 13 bits: a 7-bit virtual page number and a 6-bit offset.

The 16 heap ports share one round-robin arbiter and one translated access
per cycle. The pipeline is:

1. The port is granted, and the page table is read at `{port, VPN}`.
2. The frame number arrives. The node RAM is accessed at `{frame, offset}`.
   A read raises its frame's reader count.
3. Read data returns to the port, and the reader count drops.

Reads therefore take two cycles, one of which is translation.

The page table has 2048 entries of `{valid, frame}`. It clears itself after
reset, one entry per cycle, and no page is allocated until that is done.

### Allocation (`frame_allocator`)

A 256-bit bitmap marks the free frames. A two-level priority encoder (8-bit
groups, then group select) returns the lowest free frame in one cycle.

There are two request ports. If both ask in the same cycle, port a is
served and port b's request waits in a one-entry queue for the next cycle.

### Page policy (`page_manager`)

A heap's pages are always mapped contiguously from VPN 0, so a count of
mapped pages per heap is enough state. From each heap's size the manager
derives four things:

- **space_ok:** the page holding index `size` is mapped, so an insert can
  start. If it cannot, the engine raises a page fault and waits.
- **demand:** a faulting heap requests its next page on port a.
- **prefetch:** when the last page holds more than 48 of its 64 nodes, the
  next page is requested on port b. The page is usually mapped before any
  insert needs it. Port b carries a second fault in preference to a
  prefetch.
- **release:** when more pages are mapped than needed, the last one is
  unmapped. "Needed" means pages up to the last used one, plus one spare
  while that page is over 75 % full.

A release follows these steps:

1. Read the frame number from the page table.
2. Wait until the frame's reader count is zero, so no read is still in
   flight on that frame.
3. Clear the table entry and return the frame to the bitmap.

The symbol is marked *compacting* meanwhile.

Each frame has a 2-bit saturating reader counter (`ref_counter`).

### Running out (`overflow_buffer`)

A heap is capped at 128 pages. When a heap is at its cap, or needs a page
and no frame is free, its orders go to the overflow path:

- An 8-entry write FIFO drains one order per cycle into a 64-order overflow
  page, kept as a circular queue.
- While a heap has orders parked there, its newer orders follow them, so
  time priority is kept.
- Parked orders are dispatched again, oldest first, when their heap has room.
- If the FIFO and the page are both full, the order is hard-rejected
  (dropped, counted and flagged).

## Processor interface (`avalon_if`)

The interface is an Avalon-MM slave with 32-bit words and zero read latency.

| Word (byte) | Access | Contents |
|---|---|---|
| 0 (0x00) | R | [0] ready, [1] fifo_stop (FIFO full), [2] trade_avail, [4] sim_active, [7] overflow_flag, [8] reject_flag |
| 0 (0x00) | W | [3] trade_ack, [5] sim_start, [6] sim_reset |
| 1 (0x04) | R | order FIFO tail index; advances when an order is taken |
| 2 (0x08) | R | trade: [15:0] price, [31:16] quantity |
| 3 (0x0C) | R | trade: [20:0] symbol, [21] fill type (1 = partial) |
| 4–9 (0x10–0x24) | R | cycle_count, trade_count, mem_reads, mem_writes, hazard_stalls, hard_rejects |
| 12 (0x30) | W | order META: byte 0 = {valid, symbol[6:0]}, byte 1 = {side, symbol[13:7]}, byte 2 = {flip, symbol[20:14]} |
| 13 (0x34) | W | order [15:0] price, [31:16] quantity |
| 14 (0x38) | W | timestamp word; writing it submits the order (the value is ignored) |

An order is taken only when the META valid bit is set, the simulation is
active and the FIFO has room. The software should wait for `ready` (bit 0)
and can confirm the order by the tail advancing.

The trade words show the head of the trade queue. Writing `trade_ack` pops
it.

Writing `sim_reset` resets the whole engine for one cycle: books, memory
manager, queues, flags and counters.

## Where this departs from the published description

The source description is inconsistent in places. These are the choices
made here:

- **Order register:** orders are written as three words (META, price and
  amount, timestamp), as in the driver code, not as the 64-bit order layout
  of the register table. The timestamp is taken from the hardware.
- **Status bits:** status bit 0 is *ready*, and the tail index has its own
  word. The register table calls bit 0 the FIFO tail, and the driver's bit
  masks disagree with the table for the other bits. Bits 1–8 follow the
  table.
- **Ready:** `ready` drops only when the order FIFO is full, not whenever a
  stall is active. A stall holds back one symbol; orders for it wait in the
  FIFO while other symbols go on. A long stall fills the FIFO, and then
  `ready` drops.
- **Word offsets:** the word offsets of the order, tail and trade registers
  are this design's own. Only the counter offsets 0x10–0x24 are given.
- **Address spaces:** address spaces are per heap, so 2 per symbol, and are
  indexed by scoreboard index rather than by the 21-bit symbol.
- **Per-heap cap:** the 128-page cap applies per heap. For a symbol that is
  up to 256 pages over both sides.
- **Prefetch:** the prefetched frame is entered in the page table at once,
  rather than held in a standby register.
- **Overflow bit:** the scoreboard's overflow bit is not ORed into `stalled`
  (see above).
- **Match-busy rules:** the rules that make matching exactly sequential are
  this design's additions.
- **Moving-node sift:** the heaps use the moving-node sift rather than
  pairwise swaps.
- **Sequence number:** the node keeps the 8-bit sequence number in 8 of the
  10 spare bits of its 96-bit row.

Queue depths, the reset scheme (synchronous, active low) and all handshakes
are also this design's own choices.

## Limits

- There is no order cancel or modify. Orders only rest, trade or are
  rejected. A heap supports insert, pop, peek (the root register) and the
  in-place quantity edit; no separate reorder operation exists, because an
  edit never changes a node's price.
- Symbols are released only by `sim_reset`.
- A heap with parked overflow orders accepts none of its new orders directly
  until the parked ones have gone back.
- Throughput was not tuned:
  - An order costs a few cycles of dispatch plus its sift.
  - A pop from a full 8,192-node heap takes about 13 levels × 2 reads.
  - The bus itself needs about six accesses per order.

## Files

| File | Contents |
|---|---|
| `rtl/hft_pkg.sv` | widths, `order_t`, `trade_t`, `mem_req_t`, the priority function |
| `rtl/hft_top.sv` | top: bus interface, dispatch, 16 heap engines, 8 matchers, trade queue, memory system |
| `rtl/heap_engine.sv` | one heap, with the root register, quantity shadow and input buffer |
| `rtl/trade_matcher.sv` | per-symbol matching and trade locks |
| `rtl/order_fifo.sv` | synchronous FIFO, type-parameterised (orders, trades, overflow) |
| `rtl/seq_counter.sv` | timestamp and sequence number |
| `rtl/scoreboard.sv` | symbol-to-index table and status bits |
| `rtl/mem_system.sv` | arbiter, translation pipeline, node RAM |
| `rtl/page_table.sv` | virtual-to-physical map |
| `rtl/bram_pool.sv` | 16,384 × 96-bit node RAM |
| `rtl/frame_allocator.sv` | free-frame bitmap and encoder |
| `rtl/ref_counter.sv` | per-frame reader counts |
| `rtl/page_manager.sv` | demand, prefetch and release of pages |
| `rtl/overflow_buffer.sv` | overflow write FIFO and overflow page |
| `rtl/avalon_if.sv` | register window and performance counters |

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M`. The heap test runs twice:
`tb_heap_engine` on the bid max-heap and `tb_heap_engine_min` on the ask
min-heap. `tb/tb_node_mem.sv` is a behavioural memory used by both.

The end-to-end tests drive the top through the bus exactly as software
would:

- **`tb/tb_hft_top.sv`:** runs with 64 frames and 4 pages per heap so the
  memory limits are reached quickly.
- **`tb/tb_hft_top_full.sv`:** the same test at the default sizes. It fills
  one bid heap to its cap of 8,192 orders, parks 72 in overflow and sees 4
  rejected.

Both tests do the following:

- Compare every trade of a random six-symbol stream against a sequential
  order book kept in the testbench.
- Count each mechanism from the design's own event signals:
  - speculative root, shadow edit, trade lock, insert buffer and
    per-symbol stall;
  - page fault, prefetch, allocator queue, free, delayed free;
  - overflow, reject, and ready low.
- Fail if any mechanism never occurred.

Build and run with plain verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hft_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/hft_pkg.sv tb/tb_hft_top.sv
./obj_dir/Vtb_hft_top +verilator+rand+reset+2
```

The full-size test takes a few minutes to compile, because of the 16 heap
engines and the 1.5 Mbit node RAM. It then runs about one million clock
cycles, which takes under a minute.
