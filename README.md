# Virtualized order-matching engine for eight stocks

This design is an FPGA accelerator that replays a stream of limit orders
for eight stocks and matches them in hardware. It matches bids against asks
the way an exchange's order book does and records every trade.

- **Per-stock engines.** Each stock has its own engine. The engine holds its
  book as two binary heaps: a max-heap of bids and a min-heap of asks. So the
  best price on each side is always at a heap root. All eight stocks are
  matched at once.
- **Virtual memory for the heaps.** A heap keeps its first 64 nodes in a
  small private RAM. When the book grows past that, the deeper nodes spill
  into a shared pool of memory pages. The pool is reached through virtual
  addresses, a page table, page-table walkers and four memory banks, much
  like a processor's MMU.
- **Loading and read-back.** Software loads the orders through a small
  register interface, starts the run, and reads the trade log back when it
  is done.

Everything is synthesizable SystemVerilog.

- The code is in `rtl/`: one module or package per file. Every file opens
  with a comment describing its behaviour, interface and timing.
- The self-checking testbenches are in `tb/`.

## Data flow

```
 host (Avalon-MM registers, keys)
   |  order words
   v
 order_dispatcher ── 8 x dispatch_fifo_bram  (IDLE / WRITE / DISPATCH / DONE)
   |  one order stream per stock
   v
 8 x symbol_engine ─┬─ heap_fsm (bids, max) ── priv_bram (64 nodes)
   |                └─ heap_fsm (asks, min) ── priv_bram (64 nodes)
   |                   both share one MMU port through mmu_owner
   |                         |
   |                         v
   |   mmu: round robin -> 2 x mmu_fifo -> 2 x hptw (page_table, partition_alloc)
   |        -> arbiter (per-bank dual_write_fifo + tracking_fifo)
   |        -> 4 x mem_bank (60 x bram_dp_256x32 each)
   v  trades
 trade_aggregator (round robin, 86-bit trade -> 64-bit entry)
   v
 trade_log (8704 x 64, single port) ──> host reads back
```

A free-running 32-bit `global_counter` timestamps every order as an engine
takes it. `trade_done` goes high when all of the following are true:

- the dispatcher is in DONE;
- every engine is idle;
- no trade is waiting in the aggregator.

## Orders, nodes and trades

| item | bits | layout |
|---|---|---|
| order word (host → FIFO) | 32 | `{is_bid[31], qty[30:16], price[15:0]}` |
| heap node (`node_t`) | 86 | `{oid[21:0], qty[15:0], ts[31:0], price[15:0]}` |
| trade (`trade_t`) | 86 | `{bid_oid[10:0], ask_oid[10:0], qty[15:0], ts[31:0], price[15:0]}` |
| log entry | 64 | `{6'b0, qty[6:0], engine[2:0], price[15:0], ts[31:0]}` |

`hft_pkg` holds these types, the 64-bit packing function and the heap
order. A node ranks better than another if its price is better: higher for
bids, lower for asks. At equal prices the earlier timestamp ranks better.

The order id is the order's sequence number within its engine. The log
entry keeps only 7 bits of the quantity, as the 64-bit format allows.

## The engine's trade loop (`symbol_engine`)

The engine takes one order at a time and runs a small controller:

1. **Take and push.** Take an order, stamp it with the counter value, and
   push it into its side's heap. If either heap is now empty there is
   nothing to match, so wait for the next order.
2. **Compare the roots.** Peek both roots. If the best bid is below the best
   ask, there is no match.
3. **Trade.** Otherwise a trade is made:
   - The quantity is the smaller of the two root quantities.
   - The price is the price of whichever order arrived first.
4. **Update the book.** An order that is completely filled is popped. The
   other root is either popped too (equal sizes) or rewritten with its
   remaining quantity (UPDATE).
5. **Emit and repeat.** The trade is handed to the aggregator. The roots are
   then compared again, because one large order can fill against several
   resting ones.

The engine stalls in two cases:

- the aggregator does not take its trade;
- a heap is waiting for memory.

## The heap (`heap_fsm`)

Each heap is kept in array order: the children of index `i` are `2i+1` and
`2i+2`. It accepts four commands and answers each with a one-clock
`cmd_done`:

- **PUSH** writes the new node at the end and sifts it up. Each parent that
  is worse than the new node is moved down one level, and the new node is
  written once, at its final place.
- **POP** returns the root. It then sifts the last leaf down from the top,
  moving the better child up while that child beats the leaf.
- **PEEK** returns the root.
- **UPDATE** overwrites the root. The key does not change, so no sift is
  needed.

Nodes are stored by index as follows:

- **Indices 0..63** are in the heap's private RAM, `priv_bram`, which has a
  one-clock read.
- **Indices 64..1023** go to the MMU as virtual addresses
  `{18'b0, engine[2:0], is_bid, index-64 [9:0]}`.
- **Indices 0..2** are also copied in a write-through cache. Most PEEKs are
  therefore answered without any memory access.

A memory access takes two clocks when it hits the private RAM or the cache.
When it goes through the MMU it takes as long as the MMU needs, which
includes waiting for a busy bank.

If the MMU refuses the new leaf of a PUSH (the heap's overflow partition is
exhausted), the push is abandoned. The heap is left unchanged and
`cmd_rejected` is raised. The engine counts such orders on `hard_rejects`.
Any other refusal, such as a full bank queue, is simply retried.

## Virtual memory (`mmu` and below)

This part is the hardest to follow. A request goes through four stages.

**1. Entry.** Eight engines, one request each at most (`mmu_owner` makes
sure of that), compete for the MMU. Each clock a round robin (`rr_arbiter`,
used twice) picks up to two of them. Their requests go into two small input
FIFOs (`mmu_fifo`, 8 deep, 119 bits: va, write flag, data), one per
page-table walker.

**2. Translation (`hptw`).** The walker looks the virtual address up in the
page table.

- The table is indexed by the low 14 bits of the virtual address: engine,
  side and node index.
- Each of its 16384 entries is `{valid, page[7:0], node[5:0]}`.
- **Hit.** A valid entry is a hit, and the physical address is ready two
  clocks after the request.
- **First touch.** An invalid entry is a first touch. The walker takes the
  next free node from `partition_alloc`, writes the entry and finishes one
  clock later.
- **Fault.** If the partition has nothing left, the walker raises a fault,
  and the requester gets a reject.

The physical address is `{11'b0, page[7:0], 3'b0, node[5:0], 4'b0}`. Its
bank is `page[1:0]`. After reset the page table clears itself, one entry per
clock for 16384 clocks. The MMU accepts nothing until the clear is done.

**3. Allocation (`partition_alloc`).** The 240 public pages are split into
16 partitions of 15 pages, one for each heap (engine × side).

- A partition hands out its pages' 64 nodes in order.
- The global page number is `partition*15 + page`.
- Nodes are never returned. A heap that shrinks and grows again reuses its
  table entries, because the same index maps to the same virtual address. So
  a partition only runs out when one heap really holds more than 1024
  nodes.

**4. Banks (`arbiter`, `mem_bank`).**

- Both walkers can hand a translated request to the arbiter in the same
  clock. The arbiter queues each request for its bank in a `dual_write_fifo`
  (two write ports, 8 deep). If that queue is full, it rejects the request.
- When a bank is idle, the arbiter issues the queue head to it. It also
  records the head's virtual address in the bank's `tracking_fifo`.
- A bank moves the 86-bit node as three 32-bit words (PHASE_0..2) into one
  of its 60 page RAMs (`bram_dp_256x32`). A write is acknowledged three
  clocks after issue. A read returns in DONE_READ, four clocks after issue.
- Banks answer in order, so the tracking FIFO head tells which virtual
  address the answer belongs to. Bits 13:11 of that address name the engine
  that receives it.

Writes are acknowledged the same way as reads, so a heap knows when its
write has landed.

## Dispatcher and trade log

The `order_dispatcher` has four states: IDLE, WRITE, DISPATCH and DONE.

- In WRITE, the host fills each stock's FIFO (`dispatch_fifo_bram`, 1792
  words).
- In DISPATCH, each FIFO drains into its engine independently, as fast as
  the engine takes orders.
- DISPATCH starts on an explicit command (register or key), not
  automatically when the FIFOs fill up. So a run may leave some FIFOs short.
- DISPATCH ends when all FIFOs are empty.
- Clearing DONE returns to IDLE and empties the FIFOs.

The `trade_aggregator` takes one trade per clock from the engines in round
robin order. It packs each trade into a 64-bit entry, adding the engine
number.

The `trade_log` stores 8704 entries in a single-port RAM.

- A host read takes the port for one clock. No trade is written in that
  clock.
- When the log is full, further trades are dropped and the `overflow` flag
  is set.

## Register map and keys

The interface is Avalon-MM with 32-bit words. `avs_address` is a word
address, and read data appears one clock after `avs_read`.

| addr | name | access | contents |
|---|---|---|---|
| 0 | CONTROL | W | bit0 begin write, bit1 begin dispatch, bit2 clear done |
| | | R | dispatcher state |
| 1 | STATUS | R | `{trade_done, 7'b0, fifo_full[7:0], fifo_empty[7:0], 6'b0, state[1:0]}` |
| 2..9 | PUSH0..7 | W | order word into stock i's FIFO (only in WRITE) |
| | | R | FIFO i has room |
| 10 | LOG_INFO | R | `{trade_done, overflow, 16'b0, count[13:0]}` |
| 11 | LOG_CMD | W | bit31 = 1 clears the log; otherwise bits 13:0 select an entry to read |
| 12 | LOG_DATA0 | R | entry bits 31:0 (timestamp) |
| 13 | LOG_DATA1 | R | entry bits 63:32 (quantity, engine, price) |

`key[2:0]` are active-low push buttons:

- `key[0]` resets the design; it is combined with `rst_n`.
- `key[1]` begins the write phase.
- `key[2]` begins the dispatch.

The top also brings out the signals for a status display, which is not
included: `trade_done`, `disp_fifo_all_full` and `avl_disp_state`. It also
brings out the total of `hard_rejects`.

A run from the host looks like this:

1. Write CONTROL = 1 (begin write).
2. Write the order words to PUSH0..7.
3. Write CONTROL = 2 (begin dispatch).
4. Poll STATUS until `trade_done` is set.
5. Read LOG_INFO for the count.
6. For each entry, write its index to LOG_CMD, then read LOG_DATA0 and
   LOG_DATA1.
7. Write CONTROL = 4 to return to IDLE.

## Sizes

| parameter | default | where |
|---|---|---|
| stocks / engines | 8 | `hft_sim.NUM_ENGINES` |
| private heap nodes | 64 | `heap_fsm.PRIV_DEPTH`, `priv_bram.DEPTH` |
| virtual nodes per heap | 960 (index space 1024) | `heap_fsm.VIRT_NODES` |
| public pages | 240 (4 banks × 60) | `mem_bank.PAGES` |
| partitions | 16 × 15 pages × 64 nodes | `partition_alloc` |
| dispatch FIFO depth | 1792 | `dispatch_fifo_bram.DEPTH` |
| trade log depth | 8704 | `trade_log.DEPTH` |
| MMU / bank queues | 8 | `mmu.IN_FIFO_DEPTH`, `arbiter.QDEPTH` |

Counted in Cyclone V M10K blocks, the memories at these sizes come to
about 444 blocks. That is more than a 5CSEMA5 device holds (397). Most of the excess is the page table.
It has one 15-bit entry for every possible overflow node, 16384 in all,
which takes about 32 blocks. A page-level mapping would make it far
smaller, but it would change how nodes are allocated.

## What is this implementation's own

The following are followed as described:

- the block structure;
- the dispatcher's four states and the engine's trade-loop states;
- the heap commands and their state names;
- the top-3 cache;
- the two page-table walkers sharing one page table;
- the 16 partitions of 15 pages;
- the four memory banks with their three-phase FSM;
- dual-write and tracking FIFOs in the arbiter;
- the 8704-entry 64-bit trade log;
- the register names.

These were chosen here:

- the order-word, node, trade and log-entry bit layouts;
- the trade price rule (the older order's price);
- timestamp tie-breaking;
- the page-table entry key and its clear-after-reset sweep;
- the page numbering;
- FIFO and queue depths (the dispatch FIFOs are sized to 7 block RAMs
  each);
- write acknowledgements from the MMU;
- reject and retry handling;
- the STATUS and LOG_INFO bit layouts;
- the trade-done condition.

Two widths differ from a literal reading of the interface tables:

- The log's software address is 14 bits, because 5 bits cannot reach 8704
  entries.
- `order_out` is one 32-bit word per stock.

Not included:

- The seven-segment display and blinking logic, whose behaviour is not
  specified.
- The host software: the CSV loader, the golden model and the log reader.
  The testbenches take over their role.

## Testbenches

Each block has `tb/tb_<block>.sv`.

- Every testbench compares the block against an independent model written
  in the testbench itself.
- Each one checks the cycle counts where a latency is defined.
- Each one has a watchdog, and ends by printing
  `TB_RESULT checks=<n> failures=<m>`.
- Shared check macros are in `tb/tb_check.svh`.

`tb_hft_sim` runs the whole design at its default sizes, with no parameter
overrides:

- It resets the design and waits out the page-table clear.
- It begins the write phase through CONTROL and fills all eight FIFOs to
  the top (1792 orders each, 14336 in all).
- It starts the dispatch with `key[2]` and polls STATUS until
  `trade_done`.
- It reads back the full log through the registers.

The orders are chosen so that the run exercises every mechanism:

- Four stocks receive one huge ask that is swept by many small bids. This
  gives long chains of partial fills.
- Three stocks receive random books that first diverge and then cross. This
  drives the heaps deep into virtual memory.
- One stock receives only bids. Its bid heap runs past the end of its
  partition, producing hard rejects.

The testbench keeps its own matching model and compares against it:

- every logged entry;
- the trade count, which is larger than the log, so overflow is tested;
- the reject count;
- the status registers.

It also counts how often each mechanism occurred. A mechanism that never
occurred counts as a failure. The mechanisms are:

- every dispatcher state;
- all FIFOs full;
- the dispatcher waiting for a busy engine;
- heaps spilling into the shared pool;
- page-table misses that allocate a node, and hits on nodes already
  allocated;
- walker faults on an exhausted partition;
- every memory bank in use;
- two MMU requests granted in one clock;
- aggregator contention;
- peeks served by the cache;
- full fills, partial fills on either side, and one order filling against
  several;
- hard rejects;
- log overflow;
- log reads.

The run takes about ten seconds with Verilator.

To simulate a block with plain Verilator (5.x), run from the repository
root:

```
verilator --binary --timing -Irtl -Itb -y rtl rtl/hft_pkg.sv \
    tb/tb_hft_sim.sv --top-module tb_hft_sim -o sim
./obj_dir/sim
```

Replace `tb_hft_sim` with any other testbench name. The simulator starts
undriven state at random values, and the design resets or initialises
everything it reads. So `+verilator+rand+reset+2` can be passed to check
that.
