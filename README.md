# CLGP instruction front end: fetch prestaging with an L0 emergency cache

When the clock is fast and wires are slow, only a few hundred bytes of
storage can be read in one cycle. A 4 KB L1 instruction cache then needs
3–4 cycles per access, and every fetch pays that latency. Fetch prestaging
gets around this as follows. A decoupled branch predictor runs ahead of fetch,
so the lines that fetch will need are known early. Those lines are copied
into a small, fully associative **prestage buffer** before fetch asks for
them, and fetch reads them from there. The prestage buffer becomes the main
instruction supplier. The L1 becomes a backup.

What sets Cache Line Guided Prestaging (CLGP) apart from an ordinary prefetch
buffer is the **consumers counter**. Each buffered line has a counter. It
says how many queued fetches still need that line, and a line can be replaced
only when its counter is zero. A line in a loop stays in the buffer as long as
the loop is still in the queue. Lines are never copied from the buffer into a
cache. A tiny one-cycle **L0 cache** therefore holds different lines: those
that prefetching missed, mostly after branch mispredictions. It acts as an
"emergency cache".

This repository holds synthesizable SystemVerilog for that front end, from
the fetch-block input to the L2 bus, plus self-checking testbenches. It is an
implementation of the scheme published as "Effective Instruction Prefetching
via Fetch Prestaging". The branch predictor, the back end, the data cache and
the L2 are outside it.

```
 fetch blocks ─► fetch_block_splitter ─► cltq ─────────────► fetch_unit ─► fetched lines
                                          │ candidate          │  │   │        (+ source)
                                          ▼                    │  │   └─► l0_cache ◄─ fill
                                     clgp_engine ── inc/alloc ─┼► prestage_buffer  (from L1
                                          │ prefetch           │        ▲ fill       demand
                                          ▼                    ▼ demand │            answers)
                                     l1_icache (one port, turn-taking) ─┘
                                          │ miss (demand or prefetch)
                                          ▼
             data cache request ─► l2_bus_arbiter ─► L2 bus
```

All modules are in `rtl/`, one per file. The shared types (line address
`laddr_t`, 512-bit `line_t`, fetch cache line `fcl_t`, source enums) are in
`rtl/clgp_pkg.sv`. The top is `clgp_frontend`.

## Fetch cache lines

The branch predictor hands over **fetch blocks**: a start byte address and a
length of 1–63 four-byte instructions. `fetch_block_splitter` cuts each block
at 64-byte line boundaries. Each piece is a *fetch cache line* (`fcl_t`):

- the line address;
- the first instruction slot used (0–15);
- the number of instructions used (1–16);
- a `last` flag on the block's final piece.

It emits one piece per cycle and takes a new block only when the previous one
has been fully emitted. A block of 40 instructions starting at slot 10 becomes
four pieces of 6, 16, 16 and 2 instructions.

## The cache line target queue (CLTQ)

`cltq` is the queue that decouples prediction from fetch. Each entry holds
one fetch cache line and two flags:

- `occupied`: the entry holds a line that has not been fetched yet;
- `prefetched`: the prestaging engine has already dealt with this entry.

The queue is bounded in two ways:

- by **8 fetch blocks**, the size of the evaluated machine's decoupling queue;
- by `DEPTH` entries. 32 is this design's choice: 8 blocks of up to 4 lines each.

Block starts are counted on push and block ends on pop. When 8 blocks are
present, `push_ready` drops at the next block start.

The queue serves two readers in the same cycle:

- **Head** (fetch unit): the oldest entry. The fetch unit pops it.
- **Candidate** (prestaging engine): the oldest entry whose `prefetched` flag
  is clear. The engine handles entries in queue order, so the prefetched
  entries always form a run at the head. The candidate is therefore
  `head + n_prefetched`; no search is needed.

If the fetch unit pops an unprefetched head in the same cycle that the
engine would mark it, the engine is held off for that cycle. The fetch unit
always wins the head. Without this rule an entry could be counted as a
consumer after it was already gone, and its counter would never return to
zero.

A misprediction (`flush`) empties the queue in one cycle.

## The prestage buffer and its consumers counter

This is the heart of the design and the part that takes the most care.

`prestage_buffer` has `ENTRIES` (16) fully associative entries. Each holds:

- a tag (the line address);
- the 64-byte line;
- `alloc`: the entry has been assigned to a line;
- `valid`: the line has arrived;
- the **consumers counter**;
- an LRU age rank.

### Lifecycle of an entry

1. **Allocation.** The engine's candidate line is not in the buffer, and some
   entry has counter 0 (a *free* entry). The least recently used free entry
   gets the tag, counter = 1 and `valid` = 0. A prefetch goes to the L1.
2. **In flight.** The entry already matches lookups. A second CLTQ entry for
   the same line finds it and only increments the counter: no second
   prefetch is sent. If the fetch unit reaches the line now, it waits for the
   line (see below).
3. **Fill.** The L1 answer is written to the entry whose tag matches, and
   `valid` is set. If the entry has been given to another line meanwhile (the
   possible case is after a flush), the answer is dropped.
4. **Lifetime extension.** Every further CLTQ entry for this line adds 1 to
   the counter.
5. **Consumption.** Every fetch from the entry subtracts 1, but only if that
   CLTQ entry had been counted (its `prefetched` flag is set). The read goes
   through a `RD_LAT`-stage pipeline (3 cycles at the default size), and one
   read can start every cycle. The line stays in the buffer; it is never
   moved into the L0 or L1.
6. **Free.** At counter 0 the entry can be reallocated. Until then its line
   remains readable: a later path that needs it again still hits it, and the
   lookup then counts it again.

So a line used by a loop of five iterations, all five queued, gets counter
5. It sits safe until the fifth fetch, no matter how many other lines pass
through the buffer meanwhile. An ordinary prefetch buffer would free the
entry on first use.

### Misprediction

On `flush` every counter is cleared, because the CLTQ entries they counted
are gone. Every entry becomes free, but the tags and lines stay. Lines
fetched down a wrong path, or still needed by the right one, can be hit
again until new allocations take their entries. Allocation picks the
least recently *used* free entry, so recently read lines last longest.

### Rules kept by the counter arithmetic

- The counter update is `cnt + inc − (dec and cnt ≠ 0)`. Increment and
  decrement of the same entry in one cycle cancel.
- A flush in the same cycle as an increment wins: the counter ends at 0.
- The counter is `CNT_W` bits wide. The top sizes it to count every CLTQ
  entry, so it cannot wrap; an assertion checks this.
- Another assertion checks that no two allocated entries ever share a tag.

## The prestaging engine

`clgp_engine` makes one decision per cycle for the CLTQ candidate:

| buffer state for the candidate line | action | CLTQ entry |
|---|---|---|
| present (arrived or in flight) | counter + 1 (lifetime extension) | marked |
| absent, a free entry exists, L1 accepts the prefetch | allocate LRU free entry, send prefetch | marked |
| absent, a free entry exists, L1 busy | wait | – |
| absent, no free entry | wait (full-buffer stall) | – |

There is no filtering: a line that is in the L0 or L1 is still prestaged.
The aim is to avoid even the L1 hit latency, not only misses. Statistics
outputs count extensions, prefetches and full-buffer stall cycles.

## The fetch unit: three sources

`fetch_unit` takes the CLTQ head in order. Each cycle it looks the head's
line up in the prestage buffer and the L0 at once, and acts as follows:

1. **Prestage buffer hit, line arrived.** The head is popped, a pipelined
   read starts, and the counter is decremented if the entry was counted. The
   line appears at `out_*` `RD_LAT` cycles later, with `out_src = SRC_PB`. One
   such read can start every cycle.
2. **Prestage buffer match, line still in flight.** The head waits. A demand
   access would only queue behind the prefetch at the same L1 port.
3. **L0 hit.** The line appears one cycle later (`SRC_L0`).
4. **Otherwise** a demand request goes to the L1. The answer is delivered
   (`SRC_L1`, or `SRC_L2` if it missed in the L1) and is also written into the
   L0.

Lines leave the fetch unit in CLTQ order. For that reason an L0 or L1 access
starts only when no prestage-buffer read is still in the pipeline, and only
one L1 demand access is outstanding. On `flush`, everything in flight is
dropped. An L1 access that is under way still completes and fills the L0,
because that line is likely to be on the correct path after the
misprediction. Its answer is simply not delivered.

There is no back-pressure from the back end: a fetched line (up to 16
instructions) leaves on `out_valid`.

## L0 emergency cache

`l0_cache` is `ENTRIES` (4) × 64 bytes, fully associative, with LRU
replacement. It has a combinational lookup; the fetch unit registers the
result, so a hit costs one cycle. It is written only by L1 demand answers. A
line read in the same cycle as a fill is kept: the victim is chosen after the
read updates the LRU order.

## L1 I-cache and sharing its single port

`l1_icache` is `SIZE_BYTES` (4 KB), 2-way set associative, with 64-byte lines
and one port. A hit answers `HIT_LAT` (4) cycles after acceptance. A miss goes
to the L2 bus: as an I-cache request for a demand access, or as a prefetch
request for a prefetch. The line is filled into the LRU way and answered when
the L2 data arrives. The cache is blocking: one access at a time.

Two requesters share the port: fetch-unit demands and engine prefetches. A
fixed priority either way breaks the scheme:

- With demand first, a fetch unit that keeps missing the buffer (after each
  flush) occupies the port, and the engine never gets ahead.
- With prefetch first, demands starve.

The cache therefore alternates:

- after a demand access, a prefetch that was already waiting in the previous
  cycle goes next;
- after a prefetch access, a demand goes next.

The "was waiting" flag is a register. The demand side's ready signal
therefore does not depend combinationally on the prefetch request in the same
cycle.

Prefetch answers carry their line address back to the prestage buffer fill
port.

## L2 bus

`l2_bus_arbiter` is combinational and gives one grant per cycle, with fixed
priority:

1. data cache;
2. I-cache demand misses;
3. prefetch misses.

A requester holds valid and address until granted. The data cache is never
refused, so its grant equals its valid. The top has one outstanding I-side
request at most (the L1 is blocking), so `l2_resp_*` needs no tag.

## Parameters and evaluated configurations

Top-level parameters of `clgp_frontend`. The defaults are the main (45 nm)
configuration:

| parameter | default | meaning |
|---|---|---|
| `CLTQ_DEPTH` | 32 | CLTQ entries (own choice) |
| `CLTQ_BLOCKS` | 8 | fetch blocks the CLTQ may hold |
| `PB_ENTRIES` | 16 | prestage buffer entries |
| `PB_LAT` | 3 | prestage buffer read pipeline stages |
| `L0_ENTRIES` | 4 | L0 lines (256 B) |
| `L1_SIZE` | 4096 | L1 bytes |
| `L1_WAYS` | 2 | L1 associativity |
| `L1_LAT` | 4 | L1 hit cycles |

Other configurations from the same evaluation are reached by overrides:

| configuration | overrides |
|---|---|
| 90 nm process | `PB_LAT=2 L0_ENTRIES=8 L1_LAT=3` (L2 at 17 cycles in the environment) |
| 45 nm, 8 KB L1 | `L1_SIZE=8192` (still 4 cycles) |
| 4-entry buffer | `PB_ENTRIES=4 PB_LAT=1` |

The L1 latency for other sizes, in cycles:

| process | 256 B | 512 B | 1 KB | 2 KB | 4 KB–32 KB | 64 KB |
|---|---|---|---|---|---|---|
| 90 nm | 1 | 1 | 2 | 2 | 3 | 3 |
| 45 nm | 1 | 2 | 3 | 4 | 4 | 5 |

The L2 takes 17 cycles (90 nm) or 24 cycles (45 nm), and main memory 200
cycles.

Fixed widths live in `clgp_pkg`: 32-bit byte addresses, 64-byte lines,
4-byte instructions, and fetch blocks of up to 63 instructions.

## Top-level ports (`clgp_frontend`)

- `fb_valid/fb_ready/fb_addr/fb_len`: fetch blocks from the predictor.
- `flush`: branch misprediction.
- `out_valid/out_fcl/out_data/out_src`: the fetched line, its slots and its
  source.
- `dc_l2_valid/dc_l2_laddr/dc_l2_grant`: the data cache's L2 request.
- `l2_req_valid/l2_req_laddr/l2_req_src` and `l2_resp_valid/l2_resp_data`:
  the L2 bus.
- Statistics: lines per source `n_src[4]`; cycles waiting for an in-flight
  prefetch `n_pb_wait`; `n_extend`, `n_prefetch`, `n_full_stall`;
  prefetches served from L2 `n_pf_from_l2`; CLTQ occupancy.

Reset is asynchronous, active low (`rst_n`). Payload registers that are only
read under a valid bit carry no reset.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself;
each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/clgp_pkg.sv rtl/*.sv \
          tb/tb_clgp_frontend.sv --top-module tb_clgp_frontend -o sim
./obj_dir/sim
```

For `tb_clgp_configs`, add `tb/clgp_cfg_harness.sv`. The unit testbenches
need only the package and their module.

| testbench | what it checks |
|---|---|
| `tb_fetch_block_splitter` | random blocks against a reference split, one line per cycle, flush |
| `tb_cltq` | random push/pop/mark/flush against a queue model (8 entries, 3 blocks) |
| `tb_prestage_buffer` | random lookups, allocations, fills, reads and flushes against a model with LRU and counters; read latency |
| `tb_clgp_engine` | the decision table above |
| `tb_l0_cache` | hits, fills and LRU against a model |
| `tb_l1_icache` | hit latency, misses, L2 protocol, turn-taking between independent demand and prefetch drivers |
| `tb_l2_bus_arbiter` | every request combination |
| `tb_fetch_unit` | source selection, ordering, counter decrements, L0 fill, latencies |
| `tb_clgp_frontend` | the whole front end at default sizes (details below) |
| `tb_clgp_configs` | the 90 nm, 8 KB-L1 and 4-entry-buffer configurations side by side, with the same order, content, latency and counter checks |

`tb_clgp_frontend` works as follows:

- A synthetic program stands in for the predictor: loops, straight runs,
  wrong paths and flushes.
- An L2/memory model answers in 24 cycles, or 224 cycles the first time a
  line is touched. A random data-cache requester competes for the bus.
- It checks that every fetched line is the right one with the right
  contents.
- It checks that each line's delay from its CLTQ pop matches its source:
  3 cycles from the prestage buffer, 1 from the L0, at least 4 from the L1.
- It checks that, once the queue drains with no misprediction pending,
  every consumers counter has returned to zero. This is the end-to-end proof
  that increments and decrements pair up.
- It checks that each mechanism happened at least once:
  - all four fetch sources;
  - lifetime extension and new prefetches;
  - a prefetch served from L2;
  - a full-buffer stall and an in-flight wait;
  - a flush;
  - the CLTQ block limit;
  - the data cache winning the bus.

It runs in well under a second.

## Where this design adds to or departs from the published scheme

The published description gives the structures and the algorithm. It does
not give the cycle-level behaviour. The following are this design's choices:

- **Waiting for an in-flight prefetch.** A fetch that finds its line still
  being prefetched waits, rather than also asking the L1.
- **In-order delivery.** L0/L1 accesses start only with the prestage read
  pipeline empty, and only one L1 demand is outstanding. A parallel-lookup
  design with out-of-order return would hide more latency.
- **Counted consumers only.** Only counted CLTQ entries decrement a counter,
  and the fetch unit wins the head over the engine.
- **L1 behaviour.** The L1 is blocking and alternates between demand and
  prefetch. The original only states one port.
- **Allocation waits for the L1.** Allocation happens when the L1 accepts
  the prefetch. A fill is dropped if its entry was reassigned meanwhile.
- **LRU and L0 fills.** LRU is touched on allocation and on read. Every L1
  demand answer fills the L0.
- **Queue shape.** The CLTQ has 32 entries. The block and address widths are
  also this design's own.

In the published evaluation the front end feeds a 4-wide, 15-stage
out-of-order core running SPECint2000 traces, with a stream branch
predictor. None of that is here. The testbenches use synthetic streams, so
this design's IPC or fetch-source percentages are not comparable to the
published ones.

How far to trust it:

- Each unit is checked against an independent model with random stimulus.
- Assertions cover the queue bookkeeping, tag uniqueness, counter overflow
  and the fetch unit's view of the read pipeline.
- Each testbench was shown to catch a deliberately broken copy of its module.
- Timing is untested beyond cycle counts: no synthesis to a library has been
  done.
