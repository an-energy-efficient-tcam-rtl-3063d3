# TCAM enhanced cache: dynamic tag aggregation in a CAM tag array

Highly-associative caches and TLBs keep their tags in CAM cells, so every
entry has its own comparator. Those comparators cost area and energy, and
searching them costs about half of each access. This design stores the lowest
N bits of every tag in **ternary** CAM cells, which can also hold the value
"don't care" (X). When neighbouring lines that differ only in those low bits
are all cached, their tags are merged into one entry that has X in the low
bits. That one entry then maps a **super-block** of up to 2^N lines.

The merging happens **dynamically, on every miss**. It runs while the missed
line is being fetched, so the merge work is hidden behind the memory access.
Lookups never decompress anything: a ternary search is as fast as a binary
one, and the data is placed so that a hit reads exactly one row of one bank.

You can use this in two ways:

* **More capacity from the same tag array.** The default configuration is an
  L2 data TLB with 128 tag entries that can map up to 1024 translations.
* **Fewer tag entries for the same data capacity.** The L1 configuration is a
  16 KB cache with 8 sets of 16 tag entries and 2-bit aggregation. Without
  aggregation it would need 64 entries per set.

## Super-blocks and the banked data array

Each tag entry has these fields:

| field | cells | meaning |
|---|---|---|
| tag[W-1:N] | binary CAM | upper tag bits |
| tag[N-1:0] | ternary CAM | low tag bits; the lowest AC of them are X |
| AC | register, $clog2(N+1) bits | aggregation count: the entry maps 2^AC lines |
| valid, dirty | one each | shared by the whole super-block |

The data array is split into **2^N banks**. Bank `b` holds, for every tag
entry, the line whose low tag bits equal `b`. So an entry with AC = k owns its
own row in 2^k of the banks, and aggregation never moves data to another row
number. On a lookup, the request's low tag bits pick the bank while the tag
array is searched in parallel. The match line then picks the row, and only
that one bank row is read.

Entries never overlap. A line is only brought in on a miss, and the merge
runs on every miss, so at most one entry can match any search. The match row
is therefore encoded by OR-ing row numbers, without a priority encoder. The
assertion `a_one_match` in `cam_tcam_tag_array` checks this rule in
simulation.

## Dynamic aggregation on a miss (the part to read carefully)

Aggregation groups are aligned and nested, like a binary tree over the low
tag bits. For example, with N = 3:

* 000 pairs with 001 to form 00X.
* 00X pairs with 01X to form 0XX.
* 0XX pairs with 1XX to form XXX.

On a miss to tag T, the Dynamic Aggregator Module (DAM) searches one level
per round. Round k = 1..N takes one clock cycle:

1. The **Temporary Register** builds the search key as `T ^ (2^k - 1)`. Each
   round inverts one more low bit, so the key lands in the sibling group at
   level k-1. The bits below k-1 do not matter, because they are X in the
   entry being sought.
2. The tag array is searched in the miss's set. A match counts as a **round
   hit only if the matching entry's AC is k-1**. A match with a smaller AC is
   just one line of the sibling group, so the group is incomplete and cannot
   be merged. The **Counter and Comparison Logic** makes this check.
3. On a round hit:
   * The matched row goes into **REGA**, and the previous REGA moves to
     **REGB**.
   * Each bank whose index agrees with the key in bits N-1..k-1 reads that
     row into its **bank buffer**. The **Bank Enable Logic** decides which
     banks those are.
   * One cycle later, the entry matched in the previous round (REGB) is
     invalidated. Its lines are now in the buffers.
4. The first failed round ends the search, and so does a hit in round N.
   * If round 1 failed, the result is **Replace**.
   * Otherwise the result is **Update** at level L, the number of rounds that
     hit.

Here is a worked example with N = 3. Suppose 001, 01X and 1XX are cached and
000 misses:

| round | key | match | result |
|---|---|---|---|
| 1 | 001 | 001, AC 0 | hit. Bank 1 is buffered. REGA = row(001). |
| 2 | 011 | 01X, AC 1 | hit. Banks 2 and 3 are buffered. row(001) is invalidated. |
| 3 | 111 | 1XX, AC 2 | hit. Banks 4 to 7 are buffered. row(01X) is invalidated. |

When the line for 000 arrives, the row of 1XX is rewritten:

* tag = T and AC = 3;
* dirty = the OR of the merged entries' dirty bits and of the store, if any;
* banks 1 to 7 are written from the buffers, and bank 0 gets the fetched line.

All of this is one commit cycle.

If 011 had been cached alone instead of 01X, round 2 would match it with
AC 0. That round fails, and the result is Update at level 1 (00X).

The merge is sequential and follows this tree only. A miss on 000 when 001 is
absent does not merge with 01X, even if 01X is present.

The **DA Logic** holds `da` high from the miss until the commit. `da` is the
clock enable of every DAM register.

## Replace, Update and write-back

The controller in `tcam_enhanced_cache` carries out the DAM's commands when
the line arrives:

* **Update** rewrites the entry in REGA as described above. No new entry is
  used. This is where the extra capacity comes from.
* **Replace** takes a victim from the set:
  * The first invalid way, if the set has one. Aggregation frees such rows.
  * Otherwise the least-recently-used way.

  The line is then written as a new entry with AC = 0.

The victim's super-block has a single dirty bit. If it is dirty, **all 2^AC of
its lines are written back** through the `mem_wr_*` channel, one line at a
time. This happens while the fetch is outstanding, and the commit waits until
the write-back has finished.

Stores use write-back and write-allocate. A store hit writes one word and sets
the dirty bit. A store miss merges its word into the fetched line at commit.

## Set-associative mapping

For SETS > 1, the set index bits sit **above** the N aggregation bits, not
directly above the line offset:

```
req_addr = { tag[W-1:N] | set | tag[N-1:0] | word offset }
mem line address = { tag[W-1:N] | set | tag[N-1:0] }
```

With this split, every member of an aggregation group lands in the same set.
Each search, whether a lookup or an aggregation round, then only compares the
entries of one set. SETS = 1 gives a fully associative array.

## Interface and timing

| port group | protocol |
|---|---|
| `req_valid/req_ready`, `req_write`, `req_addr`, `req_wdata` | A request is accepted when both are high. `req_ready` is low while a miss is in progress, because the cache is blocking. |
| `resp_valid`, `resp_hit`, `resp_rdata` | One answer per request, in order. Stores are answered too. |
| `mem_rd_valid/ready`, `mem_rd_addr` | Fetch of one line. The address is held until accepted. |
| `mem_fill_valid`, `mem_fill_data` | The fetched line, as a one-cycle pulse. |
| `mem_wr_valid/ready`, `mem_wr_addr`, `mem_wr_data` | Write-back of dirty lines. |
| `da`, `commit_valid`, `commit_update`, `commit_level` | Status: the DAM is active; a miss completed, with Update or Replace and its level. |

Cycle counts, measured from the clock edge that accepts the request:

* **Hit:** answered after `HIT_LATENCY` cycles, and hits can be accepted
  back to back. The search and bank read take one cycle, and `HIT_LATENCY-1`
  register stages follow.
* **Miss:** answered after *memory latency* + 3 + `HIT_LATENCY` cycles,
  whatever the aggregation depth. The fetch is issued the cycle after the
  miss, the returned line is registered, the commit takes one cycle, and then
  the answer is given.
* **Aggregation** takes at most N+2 cycles, and write-back takes about two
  cycles per line. Both only add latency when memory answers faster than
  they finish.

Reset is asynchronous and active low, and it invalidates all entries.

## Configurations

| parameter | default (L2 data TLB) | L1 cache case | meaning |
|---|---|---|---|
| `SETS` | 1 | 8 | sets (1 = fully associative) |
| `WAYS` | 128 | 16 | tag entries per set |
| `N` | 3 | 2 | ternary tag bits; 2^N banks |
| `W` | 29 | 24 | tag bits stored per entry, N included |
| `LINE_WORDS` x `WORD_BITS` | 1 x 32 | 8 x 32 | line: one translation / 32-byte line |
| `HIT_LATENCY` | 2 | 1 | cycles to answer a hit |
| memory latency (testbench) | 400 | 32 | miss service time |

The data sizes are 128 x 8 x 32 bits = 1024 translations for the TLB, and
8 x 16 x 4 x 32 bytes = 16 KB for the L1 case.

The entry and tag widths were inferred from the published transistor counts:

* A conventional 1024-entry TLB tag array holds 29 CAM cells per entry.
* A conventional L1 tag array holds 24 CAM cells per entry.
* The L1 aggregated entry is 22 CAM + 2 TCAM cells.

For the TLB, the aggregated array's count fits 29 CAM + 3 TCAM cells, that is
a 32-bit tag. That contradicts the 29 bits of the conventional array, and
29 bits was chosen.

## Files

| file | block |
|---|---|
| `rtl/tcam_pkg.sv` | shared enums; `dc_mask` and `bank_in_group` helpers |
| `rtl/tcam_enhanced_cache.sv` | top: wiring, bank port multiplexing, miss/commit/write-back controller |
| `rtl/cam_tcam_tag_array.sv` | CAM/TCAM tag array with valid and dirty bits |
| `rtl/aggregation_counter.sv` | per-entry AC and its don't-care mask |
| `rtl/data_bank.sv` | one data bank (synchronous SRAM with word enables) |
| `rtl/bank_selector.sv` | bank enable decode and output mux |
| `rtl/lru_tracker.sv` | per-set LRU with invalid-first victim choice |
| `rtl/dynamic_aggregator_module.sv` | DAM: wires the units below |
| `rtl/dam_da_logic.sv` | DA flag |
| `rtl/dam_temp_register.sv` | TR and key generation |
| `rtl/dam_counter_compare.sv` | round counter and AC qualification |
| `rtl/dam_row_regs.sv` | REGA / REGB |
| `rtl/dam_bank_buffer.sv` | Bank Enable Logic and buffer, one per bank |
| `rtl/dam_update_replace.sv` | Update / Replace commands and invalidation |
| `tb/main_memory_model.sv` | behavioural memory (fixed latency, predictable contents) |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. Build and run any of them with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_tcam_enhanced_cache \
    rtl/tcam_pkg.sv tb/tb_tcam_enhanced_cache.sv -Mdir obj_tb -o sim
./obj_tb/sim
```

The reset is asynchronous. In a two-state simulator, start `rst_n` high and
then drive it low, as the testbenches do. A reset that is low from time zero
has no edge, so the flip-flops would keep their random power-up values.

The end-to-end testbenches compare every answer with a reference memory kept
in the testbench. It holds the last value written to each word, or the
memory's initial pattern. The check is therefore independent of where the
cache placed or merged lines. The testbenches also check the hit and miss
cycle counts. Each one counts how often every mechanism occurred, and fails
if any of them never occurred:

* hits, and read and write misses;
* Replace, and Update at each level;
* rejected AC matches and invalidations;
* evictions;
* single-line and multi-line write-backs.

| testbench | configuration | run time |
|---|---|---|
| `tb_tcam_enhanced_cache` | 2 sets x 4 ways, N = 3, 40-cycle memory | < 1 s |
| `tb_tcam_full_size` | defaults (TLB: 128 entries, N = 3), 400-cycle memory | about 6 s |
| `tb_tcam_l1_cache` | L1 case (8 x 16, N = 2, 32-byte lines), 32-cycle memory | about 3 s |
| `tb_<module>` | one per block, against reference models | < 1 s each |

The stimulus is synthetic: random runs of consecutive lines inside a drifting
window, with about one store in four. This gives the spatial locality that
aggregation relies on. These runs check function and timing. They do not
reproduce the miss rates or energy figures of any benchmark suite.

## Design choices

These behaviours are this design's own choices where the architecture leaves
them open:

* **Blocking cache.** It handles one miss at a time. This keeps the
  one-match rule true.
* **Memory interface.** The valid/ready memory channels are chosen here.
* **Writes.** The cache is write-back and write-allocate, and a dirty
  super-block writes back all of its lines.
* **Update/Replace.** The architecture hands these commands to the MMU. Here
  the cache's own controller executes them.
* **Victim choice.** Invalid ways are taken before the LRU way.
* **Recency.** A completed aggregated entry becomes the most recently used
  entry.
* **Hit latency.** It is a parameter, set to the per-configuration figures
  (2 cycles for the TLB, 1 for L1). Those figures come from circuit timing
  estimates and are not a structural pipeline.
* **Gated clocks.** The clock gating described for the DAM is modelled as
  register enables driven by `da`.

Not included:

* **Analog models.** There are no circuit-level models of the CAM/TCAM cells
  or the SRAM. The arrays are plain registers and memories.
* **Energy and area figures.** These come from circuit simulation and are not
  reflected in the RTL.
* **The processor and the memory.** Neither is part of the design.
  `main_memory_model` is a testbench-only stand-in for the memory.
