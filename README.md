# Introspective prefetching: a learning prefetcher beside an L1 data cache

A processor's L1 data cache misses follow patterns. When block `x` misses,
the same few blocks often miss shortly afterwards. In this design a second,
"secondary" engine runs next to the processor. It never looks at the program,
registers or instructions. Its only input is the stream of L1 miss addresses.
From that stream it learns which misses tend to follow which. When a learned
miss comes again, it asks the cache to prefetch the blocks that usually
follow.

The RTL has three parts that run in parallel on one clock:

```
             cpu_* (loads/stores)                      mem_* (next level, e.g. L2)
                   |                                          ^
                   v                                          |
   +---------------------------------+  prefetch requests  +--+-----------------+
   | l1_dcache  16 KB, 4-way, 64 B   |<--------------------| secondary_prefetcher|
   | hit 1 cycle, miss +6 cycles     |                     |  + miss_hash_table  |
   +---------------+-----------------+                     +---------^-----------+
                   | demand miss block address                       | pop
                   v                                                 |
             +-----------------------------------------------------------+
             | miss_queue   FIFO, 10 entries, drops oldest when full      |
             +-----------------------------------------------------------+
```

The primary processor and the next memory level are outside the design. The
top module `introspective_prefetch` brings out the processor's load/store port
(`cpu_*`) and the next-level port (`mem_*`).

## The learning algorithm (`secondary_prefetcher`)

The engine is the hardest part to follow, so it gets the most room here.

**What counts as "close".** Two misses are close if at most `N_CLOSE` (5)
misses separate them in the observed miss stream. The engine keeps the last
`N_CLOSE` misses it popped in a small history register.

**What is stored.** The statistics table has `HASH_SIZE` (10000) entries. A miss
tag `x` maps to entry `x mod HASH_SIZE`. An entry holds:

- a valid bit;
- the owning tag;
- `M_SLOTS` (5) follower slots. Each slot holds a tag `y` and an 8-bit count
  of how often `y` missed close after the owner.

A count of 0 marks a free slot.

**Conflicts keep the old data.** The first tag to reach a free entry owns it
for good. A later tag that hashes to the same entry keeps no statistics. A
follower table works the same way. Once its 5 slots are taken, a new follower
is not recorded. Throwing statistics away to make room would waste counts
already gathered. Keeping the old data was measured to do as well as any
random-replacement policy.

**Per miss, in this order.** The engine pops one miss `x` from the queue and
then:

1. **Look up** `x`'s entry. If the entry is free, `x` claims it.
2. **Prefetch.** If `x` owns the entry, it sends one prefetch request for every
   follower whose count is at least `THRESH` (2). It sends one request per
   `pf_valid`/`pf_ready` handshake.
3. **Update.** For each miss `w` in the history that owns its entry, `x` is
   counted as a follower of `w`. An existing slot for `x` is incremented, up to
   255. Otherwise `x` takes a free slot with count 1. If there is no free slot,
   nothing changes. A miss is never counted as its own follower.
4. **Shift** `x` into the history.

Prefetches go out before the update because that gets them out a few cycles
earlier. Each prefetch is worth more the earlier it arrives.

**Timing.** Popping takes 1 cycle and the look-up takes 1. Each prefetch takes
1 cycle plus any wait for `pf_ready`, and leaving the prefetch step takes 1
more. Each history entry then costs 2 cycles, a read and a write, and finishing
takes 1. With a full history and no prefetches, that is 14 cycles from one pop
to the next. A software secondary processor has a budget of roughly 100 cycles
per miss before it falls behind. This engine is well inside that budget.

**Start-up.** After reset, `miss_hash_table` writes zeros into all
`HASH_SIZE` entries, one per cycle. That takes 10000 cycles at the default
size. The engine pops nothing until `engine_ready` rises. Misses from that time
wait in the queue, and when the queue is full the oldest are dropped.

## The miss queue (`miss_queue`)

The queue is a FIFO of 26-bit block addresses, 10 deep. A push into a full
queue discards the oldest entry, so the queue always holds the newest misses.
A miss processed long after it happened is useless to a prefetcher. For the
same reason a short queue is better than a long one. `dropped` pulses on each
discard. A push and a pop in the same cycle on a full queue discard nothing.

## The L1 data cache (`l1_dcache`)

- **Geometry.** 16 KB, 4 ways, 64-byte blocks, 64 sets, 32-bit addresses.
- **Tags and data.** Tags sit in flip-flops and are compared in the request
  cycle. Data sits in 64 word-wide RAM banks, one per way and per word of the
  block. Each bank has a byte-enabled write port and a registered read, so a
  fill writes a whole block in one cycle.
- **Demand port.** A word access is accepted while `cpu_ready` is high. A hit
  answers one cycle later (`cpu_rvalid`, `cpu_rdata`). A miss answers 7 cycles
  after acceptance when the next level takes 6. The cache blocks until the miss
  is served.
- **Miss report.** Each demand miss drives `miss_valid`/`miss_blk` in the cycle
  it is detected. This is the queue's push. Prefetch fills are not reported.
- **Prefetch port.** An accepted prefetch for a block that is already present
  is ignored (`pf_ignored`). Any other accepted prefetch fetches the block and
  inserts it like a demand fill (`pf_issued`).
- **Next-level port.** One read is outstanding at a time. A demand miss wins
  the port over a prefetch. A demand miss that arrives while a prefetch fill is
  outstanding waits, then looks its block up again. If the prefetch brought
  that block (a late prefetch), the miss ends early.
- **Writes and replacement.** The cache is write-through with write allocate.
  Every store appears on `mem_wr_*`, and the next level must always accept it.
  Replacement is true LRU, with invalid ways used first. Every inserted block
  becomes most recently used.
- **Fill cycle.** The CPU is held off for the one cycle in which a fill writes
  the data array.

## What follows the reference configuration and what is this design's own

These come from the evaluated configuration:

- the three-part organisation;
- the miss-address-only interface to the secondary engine;
- the FIFO queue of 10 with delete-oldest;
- the algorithm, with n = 5, m = 5, T = 2, 10000 hash entries and the
  keep-old-data conflict policy;
- prefetch before update;
- prefetches inserted directly into the L1, with present blocks ignored;
- the L1 geometry and timing;
- a secondary running at the same speed as the primary.

These are choices made here, where no specification exists:

- the block-address width;
- the hash function (modulo);
- the 8-bit saturating counts;
- skipping self-followers;
- all handshakes and cycle timing;
- the clearing sweep;
- the cache's write policy, replacement policy, blocking behaviour and port
  priority.

The reference secondary is a programmable processor running this algorithm in
software. Here it is a fixed-function engine.

Some variants were also studied but are not implemented:

- LIFO order;
- dropping the new push when the queue is full;
- random replacement on conflicts with probability p > 0;
- secondary engines slower or faster than the cache clock;
- several secondary engines sharing one queue;
- an engine that randomly skips statistics updates when the queue is nearly
  full, to spend its time on prefetches.

The defaults above were the best or chosen settings in those studies.
`HASH_SIZE`, `QUEUE_DEPTH`, `THRESH`, `N_CLOSE`, `M_SLOTS` and the cache size
and associativity are parameters.

## How far it is verified

Each module has a self-checking testbench in `tb/`, and two more run the whole design:

- **`tb_miss_queue`** compares random push/pop traffic with a reference queue.
  It checks the head data, the count, the valid flag and every drop.
- **`tb_miss_hash_table`** checks the clearing sweep and its length, and random
  reads and writes.
- **`tb_secondary_prefetcher`** compares every prefetch with an independent
  model of the algorithm. The hash table has 23 entries, so conflicts and full
  follower tables are frequent. `pf_ready` is random. It also checks the
  14-cycle event time.
- **`tb_l1_dcache`** compares hit/miss with an LRU reference and checks the
  data, the write-through stores and the 1- and 7-cycle latencies. It also
  covers prefetches that are ignored or inserted, a late prefetch and a demand
  miss that waits behind a prefetch fill.
- **`tb_introspective_prefetch`** runs the whole design at its default
  parameters with a 6-cycle next-level model (`tb/l2_model.sv`). A scripted
  processor replays a 600-access trace over 400 blocks six times and checks
  every load. In a typical run the misses per pass fall from about 350 in the
  first pass to about 70 once the trace is learned. The testbench requires a
  reduction of at least 30%. A final burst of back-to-back misses overflows the
  queue. The testbench counts each mechanism and fails if one never happens:
  - queued misses;
  - dropped misses;
  - issued prefetches;
  - ignored prefetches;
  - late prefetches;
  - demand misses waiting behind a prefetch fill;
  - hash conflicts.
- **`tb_config_sweep`** runs eight configurations of the whole design side by
  side on one synthetic trace. It varies the hash size (100, 1000, 10000), the
  threshold (1, 2, 4) and the queue depth (1, 10, 100). It checks the load data
  of each configuration and the expected trends:
  - a 100-entry table removes fewer misses than 10000 entries;
  - a lower threshold issues more prefetches;
  - a shallower queue drops more misses.

  It prints a table of misses, prefetches and drops. The queue-depth runs use
  a processor that leaves only 4 idle cycles between accesses, so the engine
  falls behind. In them the 1-entry queue removed the most misses. It always
  serves the newest miss, while a deep queue serves stale ones. Each
  configuration is a `sweep_unit`: the design, `l2_model` and `trace_cpu`, a
  processor that generates its trace from a seed.

The design has not been run on real program traces. The miss reductions
measured for real benchmarks depend on a full processor model and are not
reproduced here. Synthesis has not been taken past generic coarse mapping. The
10000 x 197-bit statistics table is meant to become an SRAM macro.

## Simulating

All files are plain SystemVerilog. `rtl/ip_pkg.sv` must be compiled first. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/ip_pkg.sv tb/tb_introspective_prefetch.sv --top-module tb_introspective_prefetch
./obj_dir/Vtb_introspective_prefetch
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Verilator
finds the other modules through `-Irtl -Itb`, because each module is in a file
of its own name.
