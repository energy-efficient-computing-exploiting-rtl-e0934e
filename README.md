# Data similarity and redundant computation: three hardware mechanisms

Many programs keep computing on values that are equal, nearly equal, or already seen.
Neighbouring GPU threads often hold the same number in a register. Neighbouring pixels or
grid cells often load nearly the same values. A CPU function is often called again with
inputs it has already seen. This repository holds synthesizable SystemVerilog for three
mechanisms that turn this redundancy into saved energy:

* **G-Scalar** is a GPU register file that stores a warp register compactly when its 32
  lanes share bytes. An instruction whose sources hold one value per warp (or per half
  warp, or per active lanes) then runs on a single lane.
* **Lock and Load (LnL)** checks whether a load returns similar values across a thread
  group. If so, the following code region runs only on one "anchor" thread per group.
  Two such approximated warps are fused so that they share one fetch, issue and
  operand-collector slot.
* **AxMemo** is a CPU-side memoization unit. It hashes the (low-bit-truncated) inputs of a
  code block into a 32-bit CRC and looks that up in an L1 and an L2 table. A hit replaces
  running the block. A quality monitor switches memoization off when the results drift.

The three share nothing but clock and reset. `ecr_top` places them side by side with plain
vector ports.

## Building and simulating

Everything is plain SystemVerilog-2017. The packages (`gs_pkg`, `lnl_pkg`, `ax_pkg`) must
be compiled first. Every other module lives in a file of its own name, so library search
finds it:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/*_pkg.sv tb/tb_ax_memo_unit.sv --top-module tb_ax_memo_unit
./obj_dir/Vtb_ax_memo_unit
```

Every testbench checks its own results. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. The testbenches use only `$urandom`, so
any two-state simulator works. `tb_ecr_top` runs the top level at its full size with no
parameter overrides. It finishes in a few seconds.

| testbench | what it exercises |
|---|---|
| `tb_gs_compressor`, `tb_gs_decompressor` | random and structured warps, divergent masks, round trip |
| `tb_gs_rf_bank`, `tb_gs_regfile` | byte-plane gating, reads from base values only, special moves, 3-cycle read latency |
| `tb_gs_scalar_check` | scalar / half / divergent-scalar / vector decisions against a model |
| `tb_lnl_cmp_unit`, `tb_lnl_load_checker` | error estimate against real arithmetic, 3-cycle pipeline |
| `tb_lnl_lcht`, `tb_lnl_warp_ctrl`, `tb_lnl_ibuffer`, `tb_lnl_oc_entry` | history table counts, barrier, fuse/split, fused issue, anchor packing |
| `tb_lnl_core` | an approximable region from checked load to split |
| `tb_ax_crc32`, `tb_ax_hvr`, `tb_ax_input_queue`, `tb_ax_lut`, `tb_ax_quality_monitor` | unit checks (CRC-32 of "12345678" = 0x9AE0DAAF, LRU, generations, sampling) |
| `tb_ax_memo_unit` | 4000 memoized regions against a dictionary model, L1/L2 latencies, quality shut-off |
| `tb_ecr_top` | all three at full size; fails if any mechanism never occurred |

## G-Scalar: compressing by byte planes

A warp register has 32 lanes × 4 bytes. The compressor (`gs_compressor`) works on each
16-lane half. For each half it finds how many of the most significant bytes are equal in
all 16 lanes. This is encoded as 4 bits (`1000`, `1100`, `1110`, `1111` or `0000`). Lane 0's
value for the low half, and lane 16's for the high half, goes to a *base value register*.
Only the byte planes that differ are written. The register file (`gs_regfile`, 16 banks
of `gs_rf_bank`) splits each bank into four byte-plane arrays per half, and only the
arrays whose encoding bit is 0 are enabled. `arrays_active` reports how many are on in
each cycle. A register with `1111` in both halves is scalar and touches no array: it is
read from the base value registers alone (`rd_bvr_only`). `gs_decompressor` rebuilds a
full register from the planes and the metadata.

The metadata word is `{d, fs, enc_l, enc_h, base_l, base_h}` (74 bits):

* `fs` marks a full-warp scalar.
* `d` marks a register last written under a divergent mask. Such a register is stored
  uncompressed, and `base_l` holds the mask it was written under. A later divergent
  instruction with the same mask can then still run as a scalar.

**Scalar execution** (`gs_scalar_check`) decides per instruction, from the metadata of its
sources and its active mask:

* *scalar*: only lane 0 is clocked;
* *half scalar*: one lane per uniform half; non-divergent instructions only;
* *divergent scalar*: only the leading active lane (the highest-numbered one) runs;
* *vector*.

On write-back the single computed value is broadcast before compression, so the result
is again stored as scalar.

**Special move.** A divergent write to a compressed register cannot simply write some
lanes. Inside the register file the old value is read, decompressed, merged with the new
lanes and written back uncompressed. This costs exactly one stall cycle (`special_move`).

Timing: a read returns 3 cycles after it is accepted (metadata/compress, array access,
decompress). A write is visible to any later read.

## Lock and Load: similar loads, anchor threads and warp fusion

**Checking a load** (`lnl_load_checker`, `lnl_cmp_unit`). A warp is split into groups of
4, 8 or 16 threads (`group_log2`). The first active thread of each group is its anchor.
32 comparison units estimate the relative error |a−b|/|a| against the anchor without a
floating-point subtractor, in three pipeline stages:

1. Align the two values to their top 8 mantissa bits.
2. Take their 8-bit difference and an approximate reciprocal of the divisor.
   The reciprocal is a three-piece line; its middle piece is `0xC2 − DIV/2`.
3. Multiply, and compare with the threshold in units of 2⁻¹⁵ (3277 ≈ 10 %).

The load is *similar* when every thread passes. The verdict follows the load by 3 cycles.

**Locking the decision** (`lnl_lcht`). Each warp has three history-table entries
`{valid, result, count}`, one per checked load of a region. `count` is the number of
approximable regions that use the load. START_APPROX names the entries it depends on
(`sa_sel`). It is allowed (`sa_ok`) only when all of them are valid and similar. Each use
decrements the count, and the entry disappears at zero.

**Fusion** (`lnl_warp_ctrl`). Warps 2k and 2k+1 are a fixed pair. START_APPROX is a
barrier for the pair:

* When both warps have arrived, each one that passed starts approximating.
* If both passed, the pair is fused. It is fetched once, through the even warp, and both
  PCs advance together.
* When the end PC is fetched, the pair is split, and that instruction is fetched unfused.
* A warp whose partner is inactive does not wait.

`lnl_ibuffer` keeps two decoded instructions per warp. A fused instruction issues only
when the scoreboards of both warps allow it.

**Packing** (`lnl_oc_entry`). In an approximated warp only anchors run, and threads 2j
and 2j+1 always share a group, so at most one thread of each pair is live. 16 2:1
multiplexers per warp pack the live operands of the two fused warps into one 32-lane
operand: warp 2k in lanes 0–15 and warp 2k+1 in lanes 16–31. One select bit per pair
remembers which thread was taken. The write-back path (`wb_*`) uses those bits to unpack
a packed result into both warps.

Physical register indices are `wid × regs-per-warp + r` and the same plus one warp's
worth for the partner, so one adder serves both.

`lnl_core` wires these blocks into the front end of one SM.

## AxMemo: hashing, two table levels and self-checking quality

The core sends one request per AxMemo instruction to `ax_memo_unit`:

* **Input** (`OP_CRC`): a 32-bit input. Its `req_trunc` low bits are cleared (this is the
  approximation) and it is queued in `ax_input_queue`. The queue drains one word per
  cycle through `ax_crc32`, a 4-byte-per-cycle table CRC-32 with the reflected IEEE
  polynomial. The result goes into the hash value register of the context `{LUT_ID, TID}`
  (`ax_hvr`).
* **Lookup**: waits until no input of its context is still queued (`lookup_stalled`),
  then searches `{LUT_ID, CRC}` in the L1 table.
  * An L1 hit answers 3 cycles after the lookup starts.
  * An L1 miss goes to the L2 table. A hit or miss there answers after 16 cycles
    (2 + 13 + 1), and an L2 hit is copied into L1.
* **Update**: writes the result of the original code into both levels and answers after
  3 cycles.
* **Invalidate**: retires all entries of a LUT_ID in 10 cycles.

**Tables** (`ax_lut`). Each set has 8 ways of 4-byte data, or 4 ways of 8-byte data when
`wide8` is set. Each tag holds the upper CRC bits plus the LUT_ID. Replacement prefers the
matching way, then an invalid way, then true LRU (3-bit ages). The defaults are 128 sets
(8 KB) for L1 and 8192 sets (512 KB) for L2. L2 is inclusive, so an L1 eviction simply
drops the entry.

**Invalidation uses generation numbers.** Each LUT_ID has a 16-bit generation, and each
tag stores the generation it was written in. An entry counts only while the two match,
so an invalidate just increments a counter. This lets tags, data and ages sit in
ordinary single-port-style memories rather than in tens of thousands of individually
clearable flops. The one caveat: a stale entry would reappear after exactly 65,536
invalidations of the same LUT_ID with no rewrite in between.

**Quality monitor** (`ax_quality_monitor`):

1. Every 100th hit is reported as a miss (`sampled_miss`), and the table's value is kept.
2. The core runs the original code and sends an update.
3. The monitor compares the update's value with the kept one, using the same comparison
   unit as LnL (10 %).
4. If more than 10 of a window of 100 samples are off, memoization switches off at the
   end of the window (`memo_disabled`). It stays off until reset, and every lookup then
   misses after one cycle.

## What follows the description and what is chosen here

These sizes and numbers follow the description:

* the 128 KB register file in 16 banks;
* byte-plane encodings and base value registers;
* the divergent-write rule (`d` plus the mask in `base_l`) and the special move;
* three history-table entries per warp and 48 warps per SM;
* thread groups of 4, 8 or 16, and the 10 % threshold;
* fusion of consecutive warps and anchor packing with 16 multiplexers;
* 8 KB L1 and 512 KB L2 tables with 2- and 13-cycle lookups;
* 8-way/4-way set configuration;
* sampling every 100th hit with 100-sample windows and a 10 % limit.

These are choices made here where the description is silent:

* **G-Scalar**
  * The leading lane of a divergent warp is the highest-numbered active lane.
  * The special move is handled inside the register file, with a one-cycle stall.
  * Half-scalar execution keeps lane 0 or lane 16.
* **LnL**
  * The reciprocal constant is `0xC2`.
  * The fetch scheduler is round-robin, and the PC steps by 8.
  * The barrier rule for an inactive partner.
  * The instruction format is 62 bits: opcode 8, source-used 3, four 6-bit register
    fields, immediate 27.
  * The I-buffer slot policy.
* **AxMemo**
  * CRC polynomial and byte order.
  * Queue depth 4.
  * One lookup/update/invalidate in flight at a time.
  * The victim way is chosen when the update arrives.
  * Sampled values are kept per context and compared as single-precision numbers.
  * The shut-off is sticky until reset.
  * Invalidation uses generation numbers, taking 10 cycles.
  * Update latency is 2 cycles.

Not built:

* the texture interpolation used by some approximated loads;
* the GPU's SIMT reconvergence stack and the rest of the SM pipeline (execution units,
  scoreboard, crossbar, caches);
* the host CPU. The AxMemo unit expects a core to drive its request port.

The L2 lookup table stands for the part of the last-level cache that the design lends to
memoization. Here it is a separate memory.

## Known limits

* Only one AxMemo operation (lookup, update or invalidate) is in flight at a time. A
  second thread context waits, but its inputs keep being hashed.
* The LnL blocks model one SM's front end. Operands arrive on a generic port from the
  test environment rather than from the G-Scalar register file.
* The two GPU mechanisms are not combined into one SM.
* Area, power and clock frequency have not been measured. The testbenches check
  function and cycle timing only.
