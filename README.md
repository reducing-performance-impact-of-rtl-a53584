# Variation-aware pipelined L1 data cache

In a nanometre SRAM, random dopant placement gives neighbouring transistors
different threshold voltages. Some cache lines therefore develop their bitline
voltage more slowly than others and need a longer read. The simple fix is to time
every access for the slowest line in the array. That "worst-case" cache makes
every load pay for a few bad lines.

This design instead records how slow each **set** is and stretches only
the accesses that need it:

* A **latency table** holds 2 bits per set: the number of extra cycles (0–3)
  that the set's second pipe stage needs. The table is read while the set
  index is being decoded, so its value is known before the array access begins.
* The **second pipe stage** covers wordline, bitlines and sense amplifiers.
  It lasts 1 + table-value cycles. A regular set answers a load in 3 cycles
  and a slowed set in 4, 5 or 6 cycles.
* A set is as slow as its slowest line. **Line reshuffling** keeps fast lines
  out of slow sets. Within each way, a programmable decoder permutes the lines
  of 2^r consecutive sets (r = 3: 8 sets) so that lines of similar latency
  share a set.
* Before use, a **March test** run at four sense timings measures every
  line's latency. A configuration engine then programs the decoder and the
  table.

The default configuration is 64 KB, 4-way, 64-byte lines (256 sets), LRU
replacement, a 3-stage pipeline, 2-bit latency codes and reshuffling degree 3.
The array model slows 20 % of its lines, each by 1, 2 or 3 cycles with equal
probability.

## Pipeline timing

```
cycle        t            t+1 .. t+1+L                     t+2+L
stage        1            2                                3
work         decode set,  wordlines of all 4 ways on,      output mux picks
             read table   tags compared; sense amps fire   the hit way,
             (sync read)  in the last cycle                 response
```

`L` is the table value of the set. The response of a load hit therefore comes
`2 + L` cycles after the accept cycle, i.e. in the 3rd to 6th cycle counting
the accept cycle. While stage 2 is stretched, stage 1 is stalled:
`req_ready` is low until stage 2 hands over. Back-to-back hits to regular sets
stream at one per cycle.

Stage 2 is the only stage that gets stretched. The other two stages could be
cut into sub-stages, but stage 2 cannot: nothing can be latched until the sense
amplifiers have turned the small analog bitline difference into a digital
value. Variation in stages 1 and 3 is not modelled.

`stage2_timer` counts the cycles the wordline has been held. It raises `done`
once `1 + L` cycles have passed, and the sense amplifiers fire in the cycle the
stage actually advances. A downstream stall therefore only lengthens the hold,
which is harmless. If a refill borrows the array (see below), the waiting access
drops its wordline and starts counting again from zero afterwards.

## Latency table and its reset state

`latency_table` holds 256 × 2 bits. The read is synchronous: the index is
presented in stage 1 and the value is ready in the first stage-2 cycle. Reset
fills every entry with 3, the worst case. Until characterisation has run, the
cache therefore behaves like a worst-case cache: it is slow but correct.

## Line reshuffling

Each way is split into groups of `2^R` consecutive sets. `reshuffle_decoder`
stores an `R`-bit slot for every (way, logical set) pair. The physical row of
way `w` for logical set `s` is

```
row_w(s) = { s[IDX_W-1:R], slot[w][s] }
```

The group bits pass through unchanged and the low bits are replaced. Tags and
LRU state stay indexed by the logical set. Only the data lines move, and never
across ways.

`reshuffle_config` chooses the slots with a counting sort. For every group and
every way, it hands out the lines in order of latency (all class-0 lines first,
in row order, then class 1, ...). The k-th fastest line of each way goes to
logical set k of the group. The table entry of set k is then the largest of the
k-th smallest latencies over the four ways. Ordering every way the same way
minimises the sum of the set latencies within a group. For the default seed the
sum over all 256 sets drops from 330 cycles (no reshuffling) to 188. Each group
takes `4·8·4 + 8 = 136` cycles, so 4352 cycles for the whole cache.

## Characterisation (March test at four timings)

`march_tester` runs March C- over every word of all four ways in parallel:

```
up(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); up(r0)
```

It repeats this once for each sense timing `w = 0..3`. Each read holds the
wordline `1 + w` cycles before sensing. A line that reads back correctly
everywhere at timing `w`, having failed at every shorter timing, gets class
`w`. A line that still fails at timing 3 gets class 3 and is counted in
`n_unrep_lines`. After each timing pass, a sweep reports the newly classified
lines one per cycle to `reshuffle_config`. At the default size the test takes
about 190 000 cycles.

`dcache_pv_top` sequences everything. A pulse on `init_start` does the
following:

1. stops taking requests and waits until the pipeline is empty;
2. runs the March test, which overwrites the data array;
3. runs the configuration engine;
4. invalidates all tags;
5. raises `init_done`.

`init_busy` is high throughout.

## The array model (`pv_sram_way`)

The data array is a full-custom macro whose per-line delay is analog.
`pv_sram_way` is a **behavioural model** of it at cycle level. The cache logic
around it is synthesizable RTL.

* At time zero, each row draws its extra delay from a xorshift generator seeded
  by `SEED`. With probability `FAULT_PCT` % the row is slowed, by 1, 2 or 3
  cycles with equal probability.
* A read returns the stored word only if the sense amplifiers fire after at
  least `1 + delay` cycles on the same row. Sensing earlier returns all ones,
  because the bitlines are still at their precharge level.
* Firing the sense amplifiers ends the access.
* Writes take one cycle and are not slowed.

The top gives each way its own seed (`SEED + 0x9E3779B9·w`), so a testbench can
recompute the variation independently.

## Misses and stores (this design's own policy)

The scheme says nothing about misses or stores, so the following policy was
chosen for this design:

* **Load miss:** the line is allocated. The victim is the first invalid way,
  otherwise the LRU way. The line is fetched from the next level as 8 words in
  order and written into the victim's *physical* row (through the decoder).
  The requested word is returned when the refill ends. While the refill runs,
  it owns the array.
* **Store:** write-through with no allocation. A store hit writes the hit way
  in its last stage-2 cycle, and every store is sent to the next level from
  stage 3. Stores go through the stretched stage like loads.
* **Responses** cannot be back-pressured.

## Modules and interfaces

| file | role |
|---|---|
| `dcache_pkg` | geometry constants, `dc_req_t` {we, addr, wdata}, `dc_resp_t` {we, hit, lat, rdata} |
| `dcache_pv_top` | whole cache: pipeline, table, decoder, 4 array ways, March engine, configuration engine, init sequencer |
| `dcache_pipe` | 3-stage controller, tag compare, refill FSM, write-through port |
| `stage2_timer` | variable-length second stage |
| `tag_lru_store` | tags, valid bits, true LRU |
| `latency_table` | 256 × 2-bit per-set latency |
| `reshuffle_decoder` | programmable logical-set → physical-row mapping per way |
| `reshuffle_config` | sorts lines by latency, programs decoder and table |
| `march_tester` | March C- at sense timings 0..3, per-line latency class |
| `pv_sram_way` | behavioural model of one array way with variation |

Top-level ports:

* `req_valid/req_ready/req`: the request. `req.addr` is a 32-bit byte address
  of a 64-bit word, split as tag [31:14], set [13:6], word [5:3].
* `resp_valid/resp`: the response. `resp.lat` is the number of extra stage-2
  cycles the access took.
* `mem_req_valid/ready/we/addr/wdata` and `mem_resp_valid/data`: the port to the
  next level (L2), which is not part of this design. Line reads return 8 beats.
* `init_start/init_busy/init_done` and the counters `n_slow_lines`,
  `n_unrep_lines` and `n_slow_sets`: characterisation control and results.

Parameters of the top: `N_SETS` (256), `N_WAYS` (4), `R` (3), `FAULT_PCT`
(20), `SEED`. Line size, word width and the 2-bit code come from `dcache_pkg`.

## Simulating

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. To build one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dcache_pkg.sv tb/tb_dcache_pv_top.sv --top-module tb_dcache_pv_top
./obj_dir/Vtb_dcache_pv_top
```

| testbench | what it covers |
|---|---|
| `tb_dcache_pv_top` | whole cache at its default size. Worst-case phase, init started with accesses in flight, slow-line and slow-set counts checked against an independent recomputation, random traffic with data, per-hit latency and isolated-hit cycle counts checked. Counts worst-case hits, regular and stretched hits, refills, stores, stalls, drain and reshuffled sets, and fails if any never happened. |
| `tb_dcache_pv_workloads` | 20 full-size caches: 20 % / 40 % slowed lines at r = 3, and 40 % at r = 4 and 5, each on five random arrays. Each cache streams a 32 KB array twice. The bench checks data, the length of the all-hit pass against the table, that the oracle is never slower, and that raising r never raises an array's table sum. |
| `tb_dcache_pipe` | pipeline with random decoder permutations and 40 % slowed lines: exact hit latencies, one-per-cycle streaming, refills, write-through, random traffic |
| `tb_march_tester`, `tb_reshuffle_config`, `tb_latency_table`, `tb_reshuffle_decoder`, `tb_stage2_timer`, `tb_tag_lru_store`, `tb_pv_sram_way` | one block each |

`tb/l2_mem_model.sv` stands in for the next level (12-cycle latency). A word
that was never written reads as a fixed hash of its address.
`tb/wl_runner.sv` is the per-configuration driver of the workload bench.

Results of `tb_dcache_pv_workloads`. Each configuration is run on five arrays
with different random variation, and the figures are averages over the five.
Each figure is the cycle count of the all-hit pass relative to a cache without
variation. The oracle column is computed by the bench: every access is timed
by the delay of its own line instead of its set's. The worst-case column
assumes every set takes the longest delay.

| slowed lines | r | mean sum of set latencies | latency table | oracle | worst case |
|---|---|---|---|---|---|
| 20 % | 3 | 198 | 1.78 | 1.40 | 4.0 |
| 40 % | 3 | 327 | 2.28 | 1.79 | 4.0 |
| 40 % | 4 | 287 | 2.12 | 1.79 | 4.0 |
| 40 % | 5 | 266 | 2.04 | 1.79 | 4.0 |

These figures come from a stream that does nothing but hit the cache back to
back, so stage 2 sets the pace completely. They are not program run times: in a
full processor most cycles are not spent waiting on the data cache, and the
slowdown would be far smaller. The trend is the one the scheme relies on. The
table recovers most of the worst-case loss, and a larger reshuffling degree
brings it closer to the oracle.

## Trust and departures

* The scheme itself is implemented as described: per-set 2-bit table read
  during decode, stage 2 of 1 + L cycles, set latency = slowest line, and
  reshuffling within a way among 2^r consecutive sets.
* This design's own choices:
  * the March C- sequence and the four-timing sweep;
  * the sorting rule used for reshuffling;
  * reset to worst-case timing and the init sequencer;
  * the miss and write policy;
  * the 64-bit word and 32-bit address;
  * valid/ready handshakes;
  * the all-ones result of an early sense.
* Tags are assumed not to suffer variation, and the latency table is assumed
  fast enough for stage 1.
* The worst-case and oracle organisations the scheme is compared against are
  not built as hardware. The workload bench only computes their cycle counts
  for comparison.
* The processor core and the L2 cache are outside the design.
* `pv_sram_way` is a model, not a macro. A real implementation replaces it with
  the SRAM and its programmable pass-transistor decoder; the logic around it
  stays the same.
* Verilator reports `rst_n` as used both synchronously and asynchronously. This
  comes from the `disable iff` of the handshake assertions in `dcache_pipe` and
  has no effect on the logic.
