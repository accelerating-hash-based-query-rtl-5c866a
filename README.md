# Hash join and group-by engine with a cached hash table

Hash joins and group-by aggregation spend most of their time on the hash table. When the table is
too large for on-chip memory, it lives in DRAM. Every lookup then costs a long round trip, and
collision chains multiply those trips. This design keeps the whole hash table in external DDR
memory. In front of it sits a large direct-mapped cache of hash table entries in FPGA block RAM.
Any lookup the cache can answer skips the DRAM round trip. Colliding keys and repeated keys are
chained in hardware with pointers, so there is no software fallback.

The engine supports three operations on tables of 32-bit (key, value) pairs:

| operation | what it does | result |
|---|---|---|
| build | inserts every row of table S into the hash table | hash table in memory |
| probe | looks up every row (k, v_T) of table T | one row (k, v_S, v_T) per matching S row, written to memory |
| group-by | inserts rows of table G, merging rows with equal keys with SUM, MAX, MIN or COUNT | hash table holding one entry per group |

AVERAGE is obtained on the host from one SUM run and one COUNT run.

## Clocking and top level (`accel_top`)

`accel_top` has two clock domains:

* **Host link domain (`hclk`).** It takes 93-bit command records (`cmd_t`) and returns 163-bit
  completion records (`status_t`). Each direction crosses to the core through a small Gray-code
  FIFO (`async_fifo`). The reference frequencies are 150 MHz for the host link and 200 MHz for
  the core.
* **Core domain (`clk`).** It holds `central_controller` and `hash_engine`, and a single memory
  port that the controller arbitrates.

The host link controller and the DDR memory controller are not part of the RTL. Their sides
appear as plain ports:

* A command/status handshake on the host side.
* A memory request/response port on the memory side, with 28-bit word addresses and 128-bit
  words. Read data must come back in request order; any latency is accepted.

Before a command, the host has to put the input tables into memory, and for build and group-by
the hash table area has to be zero.

### Commands (`ht_pkg::cmd_t`) and status (`ht_pkg::status_t`)

| field | meaning |
|---|---|
| `op` | `OP_BUILD`, `OP_PROBE`, `OP_GROUPBY` |
| `agg` | `AGG_SUM`, `AGG_MAX`, `AGG_MIN`, `AGG_COUNT` (group-by only) |
| `onchip` | on-chip mode: the cache holds the whole hash table (see below) |
| `src_base`, `n_rows` | input table: one row per memory word, key in bits [63:32], value in [31:0] |
| `dst_base` | probe result table: one row per word, (k, v_S, v_T) in bits [95:0] |

The status record returns:

* `out_rows`: the number of result rows written.
* `ht_full`: set if an insert was dropped because the chain area ran out.
* Four statistics counters:

| counter | what it counts |
|---|---|
| cache lookups | reads of the cache |
| hash table lookups | cache misses that went to memory |
| collisions | steps along, or extensions of, a collision chain |
| repetitive | steps along a same-key chain, or aggregations |

The cache hit ratio is `1 - ht_lookups / cache_lookups`.

## Hash table layout

The table has 2^24 entries (`HT_IDX_W`), one entry per 128-bit memory word starting at `HT_BASE`.
Each entry is 113 bits (`entry_t`):

| field | bits | role |
|---|---|---|
| `valid` | 1 | entry in use |
| `key` | 32 | key |
| `value` | 32 | value, or the running aggregate for group-by |
| `ptr_c` | 24 | next entry with a **different** key and the same hash index (collision chain) |
| `ptr_r` | 24 | next entry with the **same** key (repeated keys of a join build) |

The table is split into two halves:

* **Direct-mapped lower half (indices 0 to 2^23-1).** The 23-bit hash of a key picks its head
  entry here.
* **Chain area (upper half).** The hash never points here. Entries for collisions and repeated
  keys are handed out one after the other from the start of this half. Because every chain pointer
  points into the upper half, a pointer of 0 means "end of chain".
* **When the chain area is exhausted** (8M chain entries), further inserts are dropped and
  `ht_full` is raised.

## The engine (`hash_engine`)

Each key takes a request (a "token") through the engine. The token holds:

* the key and value;
* the head index;
* the entry it is currently looking at;
* its CAM slot.

Up to 16 tokens (`NTOK`) are in flight, so DRAM latency is overlapped across keys.

```
 key,value -> lfsr_hash -> Cache_Read_F1 --\
                     (pointer chasing)      >--> ht_cache --hit--> hit queue ----\
                          Cache_Read_F2 ---/        |                             \
                                                   miss -> HashTable_Read_F1 -->  memory port
                                                                                  |
  logic (build / probe / group-by) <-- response queue <---------------------------/
      |  \-- next pointer --> Cache_Read_F2
      |  \-- entry updates --> Cache_Write_F3 (cache) + HashTable_Write_F1 (memory)
      \-- join rows --> result queue
```

The stages:

1. **Hash (`lfsr_hash`).**
   * An LFSR over the CRC-32 polynomial (seed all ones) consumes the key 8 bits per stage.
   * It has 4 pipeline stages, so each key has a latency of 4 cycles and one key is accepted per
     cycle.
   * The low 23 bits of the register are the hash index.
   * The hash is linear over GF(2), so dense integer keys spread very evenly. In simulation,
     100,000 and 700,000 consecutive integers produced no collisions at all, while the same
     number of random keys collide at the expected birthday rate.
2. **Admission and hazard check (`raw_cam`).** A new key leaves `Cache_Read_F1` only if both
   hold:
   * a CAM slot is free;
   * for build and group-by, no token in flight has the same head index.

   This keeps two inserts of the same chain from racing: the second one would otherwise read an
   entry before the first one's write lands. A slot is released only when:
   * its token has finished;
   * every cache and memory write it queued has been performed.
3. **Cache (`ht_cache`).** The cache is direct-mapped with 2^18 lines (`CACHE_IDX_W`):
   * The low 18 bits of the hash table index select the line.
   * The high 6 bits are kept as the tag.
   * Reads take one cycle.

   `Cache_Read_F2` (tokens following a pointer) has priority over new keys. A miss (an invalid
   line or a wrong tag) sends the token to `HashTable_Read_F1`.
4. **Memory.** Writes (`HashTable_Write_F1`) go before reads.
   * Read responses return in order and are paired with their tokens through an outstanding-read
     queue.
   * Every valid entry read from memory is also copied into the cache.
5. **Logic.** Tokens from memory responses are served before cache hits. For the entry the token
   has reached, the logic acts as follows in each operation:

   * **build**
     * Empty head: store the pair.
     * Same key: take a chain entry and link it directly behind the head through `ptr_r`.
     * Other key: follow `ptr_c`. At the end of the chain, take a chain entry and link it there.

     Linking a new entry takes two steps: write the new entry, then rewrite the predecessor. The
     second step is guaranteed to run on the same token.
   * **probe**
     * Same key: emit (k, v_S, v_T), then follow `ptr_r` for more S values of that key.
     * Other key: follow `ptr_c`.
     * Invalid entry or end of chain: the key has no (further) match.
   * **group-by**: as build, except that a matching key updates the stored value with the
     aggregation function instead of adding an entry.

Every changed entry is written to the cache and to memory in the same step (write-through). The
cache therefore never holds an entry newer than memory, and it needs no write-back.

Probe results come out in completion order, not input order. A key that hits in the cache
overtakes an earlier key that is still waiting for memory.

### On-chip mode

Small inputs do not need the external hash table at all. With the `onchip` command bit set, the
cache itself becomes the hash table:

* **Heads.** The head index is cut to `CACHE_IDX_W-1` bits, so heads occupy the lower half of
  the cache lines.
* **Chains.** Chain entries are allocated in the upper half.
* **Misses.** A cache miss can only be an invalid line, so it is treated as an empty entry. It is
  never sent to memory.

At the default size this gives 128K heads and 128K chain entries. That is enough for a build side
of about 150K random keys.

Entries are still written through to memory. After an on-chip group-by, the host therefore finds
the finished table in memory as usual, but no hash table read ever reaches memory.

A probe in on-chip mode must follow an on-chip build with no build or group-by in between. It
relies on the cache contents that build left behind.

### Cache start-up

After reset, and at the start of every build or group-by, `ht_cache` invalidates all lines, one
per cycle: 2^18 cycles, about 1.3 ms at 200 MHz. A probe keeps the cache contents of the build
before it.

## Central controller (`central_controller`)

For each command, the controller:

1. pulses the engine's start;
2. reads the input rows from memory (up to 32 reads in flight) into a row queue that feeds the
   engine;
3. for a probe, writes each result row to the next word from `dst_base`;
4. when all rows are in and the engine is idle, emits the status record.

A small queue records whose read each memory response belongs to. Memory arbitration takes result
writes first, then the engine's hash table traffic, then row fetches.

## Parameters

| parameter | where | default | note |
|---|---|---|---|
| `CACHE_IDX_W` | `accel_top`, `hash_engine`, `ht_cache` | 18 | 256K cache lines, about 31 Mbit of block RAM |
| `HT_IDX_W` | `ht_pkg` | 24 | hash table entries; the hash index is one bit narrower |
| `KEY_W`, `VAL_W` | `ht_pkg` | 32 | |
| `NTOK` | `ht_pkg` | 16 | tokens in flight = CAM slots |
| `DDR_AW`, `DDR_DW` | `ht_pkg` | 28, 128 | 4 GB of memory in 16-byte words |
| `HT_BASE` | `accel_top`, `central_controller` | 0 | first word of the hash table |
| `FETCH_MAX` | `central_controller` | 32 | row reads in flight (enough to cover a 30-cycle memory latency) |

## Where this design makes its own choices

The overall method comes from published work on hash table caching for FPGA query engines:

* the cache of hash table entries in block RAM, direct-mapped by the low index bits, with a tag;
* the split of the hash table into a directly hashed half and a chain area;
* collision chains and repeated-key chains;
* the named request queues;
* write-through;
* a CAM against read-after-write hazards;
* the two clock domains;
* using the block RAM as the whole hash table when the input is small.

That work leaves the following open. The choices here are:

* **Hash function**
  * The LFSR polynomial, seed and pipeline depth.
* **Hash table encoding**
  * The size of the hash table and the entry layout in memory.
  * Zero as the null pointer.
  * Where a repeated key is linked: directly behind the head.
* **Queues and hazards**
  * The queue depths and priorities.
  * The CAM release rule.
* **Controller and interfaces**
  * The command and status records and the memory word layouts.
  * The memory arbitration order.
* **Group-by**
  * The aggregation is applied to the value field.
  * MIN is provided next to MAX.
* **Full hash table**
  * Dropped inserts with a sticky `ht_full` flag.
* **On-chip mode**
  * Hash table entries are still written to memory. Only reads are avoided.

Not included: the host link (PCIe) controller and the DDR3 controller.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `lfsr_hash_tb` | hash values against a bit-serial reference, pipeline latency, stalls |
| `sync_fifo_tb`, `async_fifo_tb` | order, full/empty, random push/pop (two unrelated clocks for the async FIFO) |
| `raw_cam_tb` | matching, allocation, release only after retirement and all pending writes; 3000 random cycles against a slot model |
| `ht_cache_tb` | flush, hits, tag mismatches, lines shared by two indices |
| `hash_engine_tb` | build/probe/group-by (all four aggregations) against reference models, full chain area, on-chip mode, with a memory model of 30-cycle latency and random back-pressure; collisions, three-key chains, repeated keys |
| `central_controller_tb` | command sequencing, row fetch, result placement, status |
| `accel_top_tb` | end to end at default sizes (256K-line cache, 16M-entry table) across both clocks |

`accel_top_tb` runs the three operations in turn. It compares the result table with a reference
join and walks every group's chain in memory. It also counts each mechanism and fails if any
never happened:

* cache hits, misses and tag mismatches;
* collision and repeated-key chains;
* CAM stalls;
* write-through updates;
* result-write back-pressure.

### Full-size query kernels (`tpch_workload_tb`)

`tpch_workload_tb` runs the whole accelerator at its default sizes. It uses the row and group
counts of TPC-H query kernels at the 10 GB scale (the Q14 join and the Q04 and Q03 group-bys). It also
runs the group-bys of Q12 and Q13 and the largest build side (Q13). It then runs the Q14 join
at one tenth of that size in on-chip mode. Last comes the whole Q12 join, with its 15M-row probe. Keys
and values are random. The build side has distinct keys. In the Q14 probes, 90% of keys have a match.
In the Q12 probe every key is distinct and 0.3M of them match, one per build row. The
memory model has a 30-cycle latency. Measured results:

| kernel | rows | cache lookups | hash table lookups | collision steps | hit ratio | cycles per row |
|---|---|---|---|---|---|---|
| Q14 build | 700,000 | 700,773 | 686,741 | 28,876 | 2.0% | 3.40 |
| Q14 probe | 2,000,000 | 2,074,781 | 1,398,528 | 74,781 | 32.6% | 2.60 |
| Q04 group-by (5 groups) | 520,000 | 520,000 | 5 | 0 | 100% | 2.50 |
| Q03 group-by (100K groups) | 300,000 | 300,000 | 100,000 | 0 | 66.7% | 3.21 |
| Q12 group-by (2 groups) | 310,000 | 310,000 | 2 | 0 | 100% | 3.68 |
| Q13 group-by (40 groups) | 1,500,000 | 1,500,000 | 40 | 0 | 100% | 2.17 |
| Q13 build | 1,500,000 | 1,507,373 | 1,468,758 | 132,938 | 2.6% | 3.24 |
| Q14 build, 1 GB scale, on-chip mode | 70,000 | 72,974 | 0 | 18,829 | 100% | 5.97 |
| Q14 probe, 1 GB scale, on-chip mode | 200,000 | 250,613 | 0 | 50,613 | 100% | 1.90 |
| Q12 build | 300,000 | 300,056 | 296,396 | 5,242 | 1.2% | 3.88 |
| Q12 probe | 15,000,000 | 15,014,165 | 14,547,516 | 14,165 | 3.1% | 2.07 |

The group counts of Q12 and Q13 are assumptions: all that is known is that nearly every lookup
hits. The large probes of Q03, Q04 and Q13 (14.8M to 37.2M rows) are not simulated. They would
take 30 to 80 million cycles each, and the simulation would run well past five minutes.

The 1 GB-scale build includes the 262K-cycle cache flush, which adds 3.7 cycles per row for
70K rows.

The hit ratios follow the expected pattern:

* **Build with unique keys** barely hits.
* **Probe** hits on whatever the build left in the cache. About 256K of the 700K entries remain
  there.
* **Probe with unique keys that mostly do not match** (Q12) hits rarely. Most probe keys land on a
  head the build never filled. Only valid entries are cached, so each of those lookups goes to
  memory.
* **Group-by whose groups fit in the cache** misses once per group.

Throughput is bounded by the single memory port, not by the engine:

* every row costs one read to fetch it;
* plus, on a miss, one hash table read;
* plus, for build and group-by, one or two write-through writes;
* plus, for a probe, one result write.

For example, a group-by row that hits still costs a fetch and a write, so at least two port cycles.

Group-by over very few groups is slower still (Q12). The hazard CAM admits only one request per
head index at a time, so with 2 groups at most 2 rows are in flight.
A wider or second memory channel for the table streams would raise the rate.

The simulation takes about two and a half minutes and about 1 GB of memory.

Two files are models used only by testbenches:

* `tb/ddr3_model.sv`: in-order memory with a fixed latency and random refusals.
* `tb/tb_ref_pkg.sv`: reference hash and key searches that find colliding keys.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ht_pkg.sv tb/tb_ref_pkg.sv tb/accel_top_tb.sv --top-module accel_top_tb -o sim
obj_dir/sim
```

The `ht_full` path is tested in `hash_engine_tb`. The testbench presets the chain allocator to the last
four chain entries, then checks that the next inserts are dropped and that the flag rises.
