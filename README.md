# A debug trace buffer reused as a victim cache

Post-silicon validation needs on-chip trace buffers: memories that record
pipeline state so that a bug can be traced after the fact. Once the chip is in
production that memory sits idle. This design puts it back to work. In the
field the processor's 128-bit trace buffer becomes a 4-way (optionally
8-way) set-associative **victim cache** next to the L1 data cache. A victim
cache holds lines recently evicted from the data cache. A data-cache miss that
hits in it swaps the two lines instead of going to L2.

The only new hardware is a small **victim cache controller** and a mode bit
`vc_en` from the debug support unit (DSU). The trace buffer keeps its memory,
its controller and its single port.

On a core running two hardware threads, one thread can flood the victim cache
with lines it never reuses and push out the other thread's useful lines. Two
DSU techniques limit how much each thread may insert:

* **Multi-mode**: the cache is either shared, or exclusive to the thread that
  has used it best over a window of blocks.
* **Logistic-regression partitioning**: a small linear classifier gives ways
  to threads, one way at a time.

Lookups always search every way. Only insertions are limited.

This RTL follows a published proposal built on a LEON3 (SPARC V8) core. The
processor, its data cache controller and the rest of its DSU are not included.
Their side of each interface is a port group of the top module.

## Turning the trace buffer into a cache

A trace buffer of T bytes has T/16 rows of 128 bits. The rows are split in the
ratio 1:4:

| rows | region | contents |
|---|---|---|
| 0 … nsets-1 | tag region | one row per set: four 32-bit tag entries |
| nsets … 5·nsets-1 | data region | one 16-byte line per row, four rows per set |

Here nsets = T/5/16. The default 2.5 KB buffer gives 160 rows, 32 sets and 128
lines (2 KB of data). For an address `a`:

```
TagIndex  = (a >> 4) & (nsets - 1)
DataIndex = nsets + TagIndex*4 + way
```

`vc_index` computes both indexes and drives one of them to the memory. It also
holds the four tag comparators. Each tag entry (`vc_pkg::tag_entry_t`) is
packed as follows:

* a valid bit;
* the thread that inserted the line (2 bits);
* a 3-bit LRU age, where 0 is the newest (3 bits so that 8 ways fit);
* the address bits above the set index (26 bits, enough with 4 or more sets).

nsets must be a power of two and at least 4, so T must be 5·16·2^k bytes with
k ≥ 2. The sizes 0.32, 0.64, 1.25, 2.5, 5 and 10 KB all qualify.

The tag-entry layout, putting the tag region first, and the 16-byte line are
choices of this implementation. The index formulas are from the original.

### 8 ways (`VC_WAYS = 8`)

A tag row holds only four entries, so an 8-way set needs two tag rows. They
sit next to each other, at rows 2·TagIndex and 2·TagIndex+1. The tag region
is still T/5 bytes, so nsets = T/5/16/2:

```
tag rows  = 2*TagIndex, 2*TagIndex + 1
DataIndex = 2*nsets + TagIndex*8 + way
```

A 5 KB buffer gives 32 sets of 8 ways, and 2.5 KB gives 16 sets. The
controller reads both tag rows in Read Tag, one per cycle, and merges the two
compares into one way number. Update TB writes both rows back.

## The victim cache controller (`vc_ctrl`)

The core sends each load or store to the data cache and the victim cache
together: `req`, `maddr` and `thread`, accepted while `ready` is high. The
controller has four named states. Update TB takes two cycles because the
memory has only one port.

| cycle | state | trace buffer port | what happens |
|---|---|---|---|
| 0 | Idle | read tag row of `maddr` | request accepted |
| 1 | Read Tag | read hit line (if VC hit and DC miss) | `vc_resp`, `vc_hit`; data cache gives `dc_hit` |
| 2 | Read Data | — | hit line on `vc_data` / `vc_data_valid` |
| 3 | Update TB | write evicted line into its data row | victim way chosen |
| 4 | Update TB | write updated tag row | hit way invalidated, ages updated |

The Read Tag cycle has three outcomes:

* **Data cache hit**: the controller goes back to Idle. It was busy for 2 cycles.
* **Both miss**: Read Data is skipped. The line the data cache evicts
  (`ev_valid`, `eaddr`, `edata`) is taken in Read Tag. The controller is busy
  for 4 cycles.
* **Victim cache hit**: the line is returned and the evicted line is taken in
  Read Data. The controller is busy for 5 cycles, the access time quoted for
  the 4-way organisation.

With 8 ways, Read Tag and Update TB each take one more cycle. The busy times
become 3, 6 and 7 cycles.

The evicted line must belong to the same victim-cache set as the request. That
holds whenever the data cache has at least nsets sets, which is true for every
L1 size of interest (8 KB or more). An assertion checks it.

Each time `vc_en` rises, the controller clears the tag region, one row per
cycle, before it accepts requests, so old trace data is never mistaken for
tags. With `vc_en` low the controller is idle and the trace buffer records
traces.

### Replacement with partitions

LRU ages change only when a line is inserted. A hit does not change them,
because the hit line leaves the victim cache anyway: it is invalidated and
moves to the data cache.

The ways a thread may insert into depend on the policy:

* **shared**: every way;
* **exclusive to the other thread**: none, and the evicted line is dropped;
* **partitioned**: the ways it owns (`way_owner`).

Dropping a line is safe because the data cache is write-through. Within the
allowed ways the victim is, in order of preference:

1. an invalid way;
2. under partitioning only, a valid way filled by another thread while that
   way still belonged to it;
3. the oldest way.

The new line gets age 0. Every way younger than the victim ages by one, so the
ages stay a permutation of 0–3 across the whole set, whatever the partition.
No ages have to be rebuilt when ownership changes.

An insertion counts for the thread whose miss caused the eviction. That thread
is recorded as the line's owner and drives the statistics.

## Trace mode (`tb_ctlr`)

With `vc_en` low the trace buffer controller writes one record per
`trace_valid` cycle at the write pointer `taddr`, which wraps at the last row.
A record is `{timestamp[31:0], trace_data[95:0]}`. The DSU reads rows through
`dsu_rd`/`dsu_addr` in cycles without a trace write. `dsu_gnt` says the read
was taken, and the row appears on `dsu_rdata` one cycle later.

With `vc_en` high the memory port belongs to the victim cache controller, and
tracing stops.

## Per-block statistics

Execution is cut into **blocks** of `BLOCK_INSNS` retired instructions, one
million by default (`block_timer`). `perf_counters` keeps 32-bit counts per
thread:

* from the victim cache: hits and insertions;
* from the data cache's `dc_evt` pulses: load misses, store misses, misses
  and hits.

At `block_end` the counts are copied to snapshot registers and counting
restarts. One cycle later both DSU controllers start on the snapshot.

## Multi-mode (`mode_ctrl`)

After each block the controller computes, for each thread, the utilisation

```
VUtil_i = hits_i / insertions_i      (unsigned Q8.8; 0/0 = 0, x/0 = max)
```

While shared, it adds one to `counter_i` of the thread with the larger VUtil
(ties go to thread 0). Every `WSIZE` blocks (a window, 10 by default) it forms
`AvgUtil_i` = sum of that window's VUtil_i / WSIZE and then does one of the
following:

* **Shared**: if `counter_0 > F·WSIZE`, the cache becomes exclusive to thread 0
  and the threshold `th` becomes thread 0's AvgUtil. Otherwise thread 1 is
  tested the same way. The counters restart in either case. F = 0.7 by
  default, given as `F_PCT = 70`.
* **Exclusive**: if the selected thread's AvgUtil is below `th` for this window
  and for the previous one, the cache becomes shared again. On entry the
  "previous window" value is `th` itself, so at least two full exclusive
  windows always pass.

While exclusive, the other thread still gets hits on lines already in the
cache but inserts nothing. All four divisions go through one restoring divider
(`seq_div`), so a block is evaluated in at most 176 cycles.

## Logistic-regression partitioning (`lr_partition_ctrl`, `partition_fsm`)

### Features and classes

The six features of a pair of threads (i, j) are ratios of their block
statistics, in unsigned Q8.8 (0/0 = 1.0, x/0 = max):

* vh: victim cache hits;
* lm: load misses;
* sm: store misses;
* cm: cache misses;
* ch: cache hits;
* insert: victim cache insertions.

With w ways there are w+1 classes. Class t gives t ways to thread i and w−t to
thread j. Each class has an intercept and six weights, learned offline and
stored in the DSU's own trace buffer at row t: seven signed Q8.8 values, a0 in
bits 15:0 up to a6 in bits 111:96. They are loaded through `wt_we`, `wt_addr`
and `wt_data` while the unit is idle.

The class with the largest

```
logit_t = a0 + a1·vh + a2·lm + a3·sm + a4·cm + a5·ch + a6·insert
```

wins. The logistic function is monotonic, so no exponential is computed.
Products are formed by shift-and-add, one bit per cycle. Ratios go through the
same restoring divider. Equal logits go to the lower class.

### Several threads

For n threads, every pair is scored. The winning t adds to `P[i]` and w−t to
`P[j]`. Each thread's demand is then `WaysReq[m] = P[m]·w / ΣP` (floor), and
each thread is marked Inc, Dec or unchanged against its current ways.

Example with 4 threads and 8 ways: P = 18, 6, 18, 6 gives demands 3, 1, 3, 1
against 2, 2, 2, 2.

### Two-block hysteresis

A single misprediction must not reshape the cache, so a way moves only after
two blocks in a row ask for the same move:

* **Two threads**: `partition_fsm` implements the three-state machine.
  * S0 → S2 when more ways for thread 0 are wanted, S0 → S1 when fewer.
  * From S2 a second "more" increments `curr_class` and returns to S0.
  * From S1 a second "less" decrements it and returns to S0.
  * A reversal goes across to the other of S1/S2.
  * An equal class returns to S0.
* **More threads**: one way moves from the lowest-numbered Dec thread to the
  lowest-numbered Inc thread, and only if the previous block chose the same
  pair. This is the same rule.

The allocation starts at an even split. Ways are handed out in thread order:
thread 0 gets ways 0…curr_w[0]−1, thread 1 the next ones, and so on. A block
costs about 850 cycles with 2 threads and 4 ways, and about 7 500 with 4
threads and 8 ways.

## Top level (`vc_top`) and the policy input

`vc_top` wires the trace buffer, its controller, the victim cache controller,
the statistics, the block timer and both DSU controllers. `policy` chooses what
limits insertions:

| `policy` | insertion rule |
|---|---|
| `POL_SHARED` | any thread, any way (plain LRU) |
| `POL_MULTIMODE` | shared or exclusive, from `mode_ctrl` (two threads only) |
| `POL_PARTITION` | way ownership from `lr_partition_ctrl` |

Both controllers run on every block whatever the policy, so switching policy
takes effect at once.

| parameter | default | meaning |
|---|---|---|
| `TB_BYTES` | 2560 | trace buffer size T (must be 5·16·2^k) |
| `NTHR` | 2 | hardware threads (up to 4) |
| `VC_WAYS` | 4 | victim cache ways, 4 or 8 |
| `BLOCK_INSNS` | 1 000 000 | instructions per block |
| `WSIZE` | 10 | blocks per multi-mode window |
| `F_PCT` | 70 | multi-mode fraction F, in percent |
| `DSU_ROWS` | 64 | rows of the DSU trace buffer holding the weights |

The data-cache side of the interface is described under `vc_ctrl` above. The
data cache must also pulse its statistics on `dc_evt` (load miss, store miss,
miss, hit) with `dc_evt_thr`, and the core pulses `insn_ret` per thread.

## How far to trust it, and where it departs

* The index formulas, the four-state controller, the line swap, invalidation
  on hit, LRU updated only on insertion and the three-step partitioned
  replacement follow the original proposal. So do the multi-mode flow, the
  features and classes, the pairwise demand computation and the two-block
  hysteresis. Defaults are the evaluated sizes: 2.5 KB, 2 threads, 4 ways,
  windows of 10 blocks, F = 0.7, blocks of 1 M instructions.
* The following are choices of this implementation:
  * all number formats;
  * the handling of zero divisors and ties;
  * the tag-entry layout;
  * the trace record split;
  * the DSU readout port;
  * the clearing of the tag region on entry;
  * the two-cycle Update TB;
  * the placement of the two tag rows of an 8-way set;
  * the weight row layout;
  * the order in which ways are handed out.
* For the demand computation, the ΣP denominator over all threads and the
  visit of every thread pair follow the worked 4-thread example. A more literal
  reading of the flow chart would divide by partial sums.
* The 8-way organisation is a parameter option, not the default. A hit takes
  7 cycles, one more than the 6 cycles quoted for it, because both tag rows
  are written back after every access. Writing back only the changed row
  would save that cycle, but in most accesses the LRU ages change in both
  rows.
* The 4-thread, 8-way configuration is tested end to end with 40 000
  instruction blocks. One partitioning pass over 6 thread pairs and 9 classes
  takes about 7 500 cycles, and a start that arrives while a pass is running
  is ignored. With 1 M instruction blocks this never happens.
* Trace buffers below 320 bytes (fewer than 4 sets) are not supported. The
  26-bit tag field needs at least 2 set-index bits.
* The DSU, the data cache and the pipeline are external. `tb/vc_core_model.sv`
  is a behavioural core (2 or 4 threads) with a 512-byte write-through L1, used only
  by the tests.
* Speedups depend on SPEC workloads that cannot be run here. The tests check
  function and timing, not performance.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert rtl/vc_pkg.sv $(ls rtl/*.sv | grep -v vc_pkg) \
    tb/vc_core_model.sv tb/vc_top_tb.sv --top-module vc_top_tb
./obj_dir/Vvc_top_tb
```

The package must come first on the command line. The unit
benches need only their module, its sub-modules and `vc_pkg.sv`. `vc_ctrl_tb`
also needs `tb/vc_ctrl_check.sv`, the checker it runs once per configuration.

| testbench | what it covers |
|---|---|
| `vc_ctrl_tb` | controller and memory against a reference victim cache, at 4 ways / 2.5 KB / 2 threads and at 8 ways / 5 KB / 4 threads: hit/miss, returned data, busy times (2/4/5 and 3/6/7 cycles), shared/exclusive/partitioned insertion, re-entry clearing |
| `vc_index_tb` | index formulas and tag compare at 4 and 8 ways, random |
| `trace_buffer_tb`, `tb_ctlr_tb` | memory; circular trace recording, readout, victim-cache pass-through |
| `perf_counters_tb`, `block_timer_tb` | per-block counts, block boundaries |
| `mode_ctrl_tb` | multi-mode flow against a reference; entry to both exclusive modes and return |
| `partition_fsm_tb` | the three-state hysteresis |
| `lr_partition_ctrl_tb` | logits, demands and allocation against a reference, at 2×4 and 4×8 |
| `vc_top_tb` | end to end with short blocks: tracing, shared, multi-mode, partitioning in both directions, mode re-entry; then a second instance with 4 threads and an 8-way, 5 KB victim cache, where partitioning gives the reusing thread more ways; every line checked against memory |
| `vc_top_full_tb` | all defaults: a full trace pass, then 11 blocks of 1 M instructions (about 5.5 M cycles, a few seconds), ending in exclusive mode |
