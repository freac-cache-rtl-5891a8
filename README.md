# Folded-logic compute slice for a last-level cache

Accelerators that sit on PCIe or on another die pay heavily to move data to
them. This design puts small reconfigurable accelerators *inside* one slice of a
last-level cache (LLC), next to the data. It adds no SRAM of its own. Some of the
slice's existing 8 KB sub-arrays hold look-up-table (LUT) truth tables instead of
cache lines. A sub-array reads one 32-bit row per cycle, so each row can act as
a fresh LUT configuration on every cycle. A circuit too big for the few LUTs
available is therefore **folded**: it is cut into levels, and one level runs
per cycle, with its configuration read from the next row. Values that cross
levels are kept in a small register bank. A circuit folded into N levels runs at
cache clock / N.

The RTL is a SystemVerilog model of the published FReaC Cache architecture. It
covers one 20-way slice with 8 KB sub-arrays. It builds what that architecture
adds to a cache:
- the compute clusters;
- the controller in the control box;
- the reuse of the tag arrays as crossbar configuration memory;
- the switch boxes that join clusters into larger tiles.

The cache itself (tags, coherence, replacement, flushing) is not built here.
It is reached through ports.

## Slice organisation

A slice has 20 ways. Each way has four data arrays of two sub-arrays, so a
slice has 160 sub-arrays of 2048 x 32 bits (1.25 MB). Ways are used in **pairs**.
The four data-array pairs of a way pair each carry cluster logic, so a way pair
is one of three things:

| way-pair mode | what the two ways do |
|---|---|
| cache (0)   | ordinary LLC ways, used by the existing cache controller |
| compute (1) | four micro compute clusters (MCCs) |
| scratchpad (2) | 128 KB of word-addressed scratchpad for the clusters and the host |

All ten pairs have cluster logic, so any split is possible. Examples are 16
compute ways with 4 scratchpad ways (32 clusters, 256 KB), or 8 compute + 10
scratchpad + 2 cache ways. Changing a pair away from cache first asks the cache
controller to flush those ways (`flush_req`/`flush_mask` until `flush_ack`).
After that, `lock_mask` withdraws them from caching. The controller refuses
the cache's array accesses to locked ways (`llc_acc_ok` low). The controller
also refuses host array accesses to cache-mode ways.

## The micro compute cluster (`mcc`)

A cluster is built from two data arrays in adjacent ways, so it has four
sub-arrays. The logic placed between them is:

- **memory latch + mux tree per sub-array.** The latch is the sub-array's read
  register, which holds its row until the next read. A row is the truth table
  of one 5-input LUT (32:1 mux tree), or of two 4-input LUTs: the low 16 bits
  serve LUT A and the high 16 bits serve LUT B. Per step, a cluster therefore
  offers four 5-LUTs or eight 4-LUTs.
- **operand crossbar.** Each of the 32 LUT inputs (8 per sub-array) takes any
  bit of a 296-bit pool:

  | pool index | source |
  |---|---|
  | 0-255 | the register bits |
  | 256-263 | the 8 LUT outputs of the previous step (state latches) |
  | 264-295 | the 32-bit word arriving from the switch box |
  | above 295 | constant 0 |

- **256 intermediate register bits** (eight 32-bit words). They hold values
  that cross folding levels and the flip-flops of the folded circuit.
- **one 32-bit multiply-accumulate unit** (`MUL`, `ACC` = acc + a*b, `CLR`).
- **one operand-bus port.** A step may read or write one 32-bit word. The
  address comes from a register word.
- **one link word** out to the switch box, and one in.

### The crossbar word

All that a step needs besides the four LUT truth tables is one crossbar word
(`freac_pkg::xcfg_t`, 388 bits). Its fields:
- the LUT mode;
- 32 input selects;
- the destination register bit of each LUT output;
- the MAC operation, its operand words and its result word;
- the bus operation and its address, data and destination words;
- the link source word;
- a done-check flag.

The crossbar words live in the tag arrays of the compute ways (`xcfg_store`),
which are idle while the ways compute. The truth tables of step *s* are in row
`SCHED_BASE + s` of the four sub-arrays. The crossbar word of step *s* is entry
`SCHED_BASE + s` of the store, modulo its 1024 entries. Several schedules can
therefore stay loaded side by side. A run selects one by its base, with no
reloading.

### Timing of a step

All clusters run the same schedule in lock-step:

```
cycle c    : controller issues row address SCHED_BASE+s (step_re), reads xcfg[SCHED_BASE+s]
cycle c+1  : rows sit in the latches, xcfg[SCHED_BASE+s] is broadcast (exec)
             crossbar -> LUTs, MAC reads its words, bus request if any
             commit: LUT outputs -> state latches and register bits,
                     MAC updates, register writes; row s+1 is issued now
```

A step without a bus operation costs one cycle, so an N-step schedule takes N
cycles per iteration, plus one cycle to start a run. When a value is written to
a register in the same step:
- the MAC result written is the accumulator as it stood before that step. A
  product computed in step s can therefore be stored from step s+1 on.
- Word writes are applied first (MAC, then bus read data). LUT bit writes go
  last and override them.

## Operand bus and stalls (`cc_ctrl`)

Every cluster runs the same crossbar word, so in a bus step every compute
cluster makes a request. Commit is then held back: the clusters stall. The
controller serves the requests one after another, lowest cluster first. For
each request, it adds the tile offset `OFF_BASE + k * OFF_STRIDE` to the
cluster's address (k = the cluster's rank among the compute clusters). Then:

- if address bit 31 is clear, the rest decodes as
  `{pair[3:0], mcc[1:0], subarray[1:0], row[10:0]}`. The access must hit a
  scratchpad-mode pair. A write takes one cycle, and a read takes two. An access
  to any other pair is dropped, reads return 0, and the error bit of `STATUS`
  is set.
- if bit 31 is set, the request goes to the cache controller on the `ext_*`
  handshake (`ext_req`/`ext_gnt`, then `ext_rvalid` for reads).

Entering a stall and leaving it cost one cycle each. With 8 compute clusters
reading from the scratchpad, a read step therefore takes 1 + 16 + 1 = 18
cycles. A write step takes 1 + 8 + 1 = 10 cycles. The end-to-end test checks
these numbers.

## Programming a slice

The host uses plain loads and stores to a 24-bit word-address range. Bits
23:22 select the region:

| region | bits | contents |
|---|---|---|
| 0 control | 3:0 | 0 `WAY_MODE` (2 bits per pair), 1 `STATUS` (flushing, running, done, error), 2 `SCHED_BASE`, 3 `SCHED_LEN`, 4 `ITERS` (0 = until done), 5 `OFF_BASE`, 6 `OFF_STRIDE`, 7 `RUN`, 8 `CYCLES`, 9 `STALLS`, 10 `ITER_DONE` |
| 1 arrays | 18:0 | `{pair, mcc, subarray, row}`. Setting bit 21 on a write broadcasts the word to that sub-array and row in every compute cluster |
| 2 crossbar store | 13:0 | `{entry[9:0], word[3:0]}`, the crossbar word written 32 bits at a time |
| 3 switch config | 15:0 | `{box[4:0], row[10:0]}`, box = 4r + c |

Requests are accepted whenever the controller is idle. During a flush or a run,
it accepts only reads of the control registers. Read data arrives one cycle
after acceptance. A typical sequence is:
1. Write `WAY_MODE` and let the flush complete.
2. Broadcast the truth-table rows.
3. Write the crossbar words and the switch routes.
4. Fill the scratchpad windows.
5. Set `SCHED_*`, `ITERS` and the offsets.
6. Write `RUN = 1`.
7. Poll `STATUS` until bit 1 (running) clears.

A run ends after `ITERS` repetitions of the schedule. It also ends after a step
whose done-check flag is set, if register bit 255 is 1 in every compute
cluster. That bit is the folded circuit's "done" output.
Bit 255 is bit 31 of register word 7. It keeps its value after a run, so a
schedule that uses word 7 as data should clear the bit first.

## Large tiles: the switch-box grid (`switch_box`)

Clusters of way pairs 0-7 (16 ways, 8 rows of 4 clusters) sit in a grid of
7 x 4 switch boxes. Box (r, c) lies between cluster c of pair r ("up") and
cluster c of pair r+1 ("down"). It has 32-bit links to the boxes north, south,
east and west of it. The east-west link between columns 1 and 2 is the one
that crosses the tag arrays and the control box. Pairs 8 and 9 have no boxes,
so their clusters work only as single-cluster tiles.

For every step, each box reads one row of its own 2048 x 32 configuration
memory at the step address. The row gives a 3-bit source code for each of the
six outputs:

| bits | output | codes |
|---|---|---|
| 2:0 | up cluster | 0 none, 1 up, 2 down, 3 north, 4 south, 5 east, 6 west |
| 5:3 | down cluster | same |
| 8:6 | north | all but 3 |
| 11:9 | south | all but 4 |
| 14:12 | east | 1, 2, 6 only |
| 17:15 | west | 1, 2, 5 only |

A code an output may not take drives 0, and so does code 0. A zeroed
configuration therefore routes nothing. Routing is X-Y: a word moves along
its row first and may then turn north or south. It never turns back onto a
row link and never leaves through the side it came in on. Under these rules
no configuration can close a combinational loop. Each output is written as an
AND-OR of only the inputs it may take, so the netlist has no loop either.
A word crosses the grid within one cycle.

Each cluster drives one register word onto its link (`link_src`). Its link
input is the OR of the box below it and the box above it, so a schedule routes
to a cluster from only one of the two in a given step. The word received
enters the crossbar pool at indices 264-295.

## Files

| file | content |
|---|---|
| `rtl/freac_pkg.sv` | geometry, `xcfg_t`, op codes, way modes, address map |
| `rtl/freac_slice.sv` | top: controller, crossbar store, 40 clusters, 7 x 4 switch-box grid, address routing |
| `rtl/cc_ctrl.sv` | host registers, flush/lock, loading, sequencing, operand serving |
| `rtl/mcc.sv` | one compute cluster |
| `rtl/sub_array.sv` | 2048 x 32 SRAM with held read register |
| `rtl/mux_tree.sv` | 5-LUT / dual 4-LUT mux tree |
| `rtl/operand_xbar.sv` | bit crossbar feeding the LUT inputs |
| `rtl/intermediate_regs.sv` | 256-bit register bank |
| `rtl/mac_unit.sv` | 32-bit MAC |
| `rtl/xcfg_store.sv` | tag arrays as crossbar configuration store |
| `rtl/switch_box.sv` | per-step routing switch with its configuration memory |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_workload_vector.sv` | vector add and vector multiply on single-cluster tiles, four partitions |
| `tb/tb_workload_dpe_tile.sv` | dot product on one tile of 8, then 32 clusters, reduced over the switch-box grid |
| `tb/tb_workload_kmp.sv` | two-character pattern count (string-search core) on 32 tiles |
| `tb/tb_workload_aes_sbox.sv` | AES SubBytes (S-box) on 32 tiles, pure LUT logic |
| `tb/tb_workload_spmv.sv` | sparse matrix-vector product (ELLPACK) with indirect loads on 32 tiles |
| `tb/tb_workload_gemm.sv` | 4 x 4 matrix multiply on 32 tiles, addresses built from loop counters |
| `tb/tb_workload_sort.sv` | four-key sorting network on 32 tiles, comparators and swaps in 4-LUTs |
| `tb/tb_workload_stencil2d.sv` | 3 x 3 stencil over a 6 x 6 grid on 32 tiles |
| `tb/tb_workload_stencil3d.sv` | seven-point 3-D stencil on a 4 x 4 x 4 grid on 32 tiles |
| `tb/tb_workload_fc.sv` | fully connected layer (8 -> 4) with ReLU on 32 tiles |
| `tb/tb_workload_nw.sv` | Needleman-Wunsch alignment of two 4-character sequences on 32 tiles |

`tb/tb_freac_slice.sv` runs the whole slice at its default size, using only the
host port and a model of the cache controller:
1. It partitions the slice: 8 compute clusters, a scratchpad and cache ways.
2. It runs a folded dot-product accelerator on 8 tiles of 16-element vectors.
   The accelerator uses bus reads, the MAC, a 4-LUT counter, a 5-LUT done
   detector and a bus write. The done check stops the run after 16 iterations.
3. It exchanges results between clusters over the switch-box grid. The routes
   include a two-hop westward path, a path that moves west and then turns
   south, a northward path through two boxes, and an unrouted cluster.
4. It forwards operand traffic to the cache controller.

The test counts each mechanism and fails if one never occurs.

The `tb_workload_*` testbenches are kernels from the usual accelerator
benchmark set, mapped by hand onto a full-size slice. Each one:
- programs the slice through the host port only;
- writes its folding schedule step by step, as truth-table rows plus
  crossbar words;
- generates its data;
- checks every result and the exact cycle count against a model in the
  testbench.

The kernels are small on purpose: each runs in seconds. Unless stated
otherwise, each tile is one cluster, and the slice runs 32 tiles in
lock-step with a 256 KB scratchpad. The schedules show what a folded
accelerator looks like. They are not the output of a synthesis and folding
tool.

`tb/tb_workload_vector.sv` runs on four partitions in turn, re-partitioning
the slice between them:
- 32 clusters with a 256 KB scratchpad;
- 16 clusters with 768 KB;
- 16 clusters with 640 KB, with two ways left as cache;
- 16 clusters with 512 KB and a 256 KB cache (the published example
  partition).

Each tile computes
`c[i] = a[i] + b[i]` and `d[i] = a[i] * b[i]` over its own window. The
addition is done on the MAC, as `a*1 + b*1`. 4-LUTs build the address words
and count the elements. The test checks every result and the exact cycle
count: 32 requests are served per bus step.

`tb/tb_workload_dpe_tile.sv` builds one large tile, first from the 8
clusters of way pairs 0-1, then from all 32 clusters of the grid. In a first
run, each cluster accumulates a partial dot product over its own window. A
second schedule reduces the partials in a tree over the grid, with routes
that change from level to level. For 32 clusters, the tree first moves north
along each column (up to four boxes in one hop), then west along pair 0.
A cluster receives a 32-bit word on its link. It copies the word into a
register 8 bits per step through identity 4-LUTs, then adds it on the MAC.
Moving one word between clusters therefore costs four steps plus one MAC
step. Only the crossbar pool, not the MAC, reads the link directly.

`tb/tb_workload_kmp.sv` is a logic-bound kernel: the character comparison at
the core of a string search. In one step, 4-LUTs compare the nibbles of a
character with both pattern characters and leave the results only in the
state latches. In the same step, other 4-LUTs advance the address counter.
In the next step, LUTs read the latches to form "match here" and "previous
character was the first one". The MAC counts the matches.

`tb/tb_workload_aes_sbox.sv` runs the SubBytes step of AES, the most
logic-heavy part of the AES accelerator, on 32 tiles. The testbench computes
the S-box itself: the inverse in GF(2^8), then the affine map. It splits
every output bit on the three high input bits:
- 64 cofactors of the five low bits are computed, four 5-LUTs per step;
- three levels of 2:1 multiplexers follow, eight 4-LUTs per step.

A byte takes 25 folding steps. 23 of them are pure LUT logic with no bus
or MAC use.

`tb/tb_workload_spmv.sv` multiplies a sparse matrix in ELLPACK form (four
non-zeros per row) by a vector, on 32 tiles. The matrix entries are
{column, value} pairs. The column read from the window becomes the address of
the next load, once a 4-LUT has added the vector's base. A row takes 18 steps:
three reads and one MAC per entry, then a store and a write of y[r].

`tb/tb_workload_gemm.sv` multiplies 4 x 4 matrices on 32 tiles, one element
of C per iteration, with the k loop unrolled onto the MAC. The address
register of C[i][j] doubles as the loop counter t = 4i + j. 4-LUTs copy its
fields into the A and B address words and set the k field before each load.
An element takes 15 steps.

`tb/tb_workload_sort.sv` sorts four 8-bit keys per tile with the
five-comparator network, on 32 tiles. Each comparison builds a comparator out
of 4-LUTs in three steps:
1. less-than and equal for each 2-bit chunk;
2. two merge levels.

Two mux steps then place the minimum and the maximum into the free register
slots. The schedule tracks statically which slot holds which key, so no key
is copied back. 33 steps sort four keys.

`tb/tb_workload_stencil2d.sv` applies a 3 x 3 filter to a 6 x 6 grid on 32
tiles, one output per iteration, with the nine taps unrolled onto the MAC.
A tap's grid address is {r + dy, c + dx}. Each of its bits is a 4-LUT of
two counter bits, and the tap's fixed offset is part of the truth table, so
no adder is needed. An output takes 30 steps.

`tb/tb_workload_stencil3d.sv` does the same in three dimensions: a
seven-point stencil with a centre coefficient and a neighbour coefficient,
for the eight interior points of a 4 x 4 x 4 grid. Each 2-bit field of a
tap's address depends on a single counter bit. The schedule begins with the
step that forms the centre address, so the first point needs no special
start value. A point takes 24 steps.

`tb/tb_workload_fc.sv` runs a fully connected layer, y = max(0, W x), with 8
signed inputs and 4 outputs on 32 tiles. The eight products accumulate on the
MAC. 4-LUTs then apply the ReLU, eight bits per step: each bit becomes
`bit & ~sign`. The sign bit is processed last, so every step still sees the
original sign. An output takes 30 steps.

`tb/tb_workload_nw.sv` fills the score matrix of a Needleman-Wunsch
alignment on 32 tiles: two 4-character sequences, match +1, mismatch and gap
-1. Each score is stored biased by i + j + 64. In that form a cell is
max(diag + 1 + 2*match, up, left), so the values stay small and
non-negative. The MAC does the single addition, and the maxima use the
8-bit LUT comparator of the sort kernel. A cell takes 20 steps:
- five reads and one write;
- an 8-bit equality test of the characters;
- two compare-and-select operations.

4-LUTs derive all five addresses from the cell counter.

## Simulating

Each testbench is self-contained. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/freac_pkg.sv tb/tb_freac_slice.sv --top-module tb_freac_slice -Mdir obj
./obj/Vtb_freac_slice
```

The workload testbenches build the same way, with their own file and top
module name.

The full-size slice builds in well under a minute and runs in a fraction of a
second. Lint with `verilator --lint-only -Wall -Irtl rtl/freac_pkg.sv
rtl/freac_slice.sv`. The warnings that remain are about unused bits:
- the outward-facing outputs of the boxes on the edge of the grid are not
  connected;
- the two unused host address bits;
- the padding of the 13-word crossbar entry.

## Parameters

`freac_slice` has four parameters:
- `NUM_PAIRS` = 10, i.e. 20 ways.
- `SA_ROWS` = 2048, i.e. 8 KB sub-arrays with a 32-bit port.
- `XCFG_DEPTH` = 1024. This is the longest schedule the crossbar store holds.
  The value is taken as the set count of a 64 KB way with 64-byte lines.
- `SB_ROWS` = 7, i.e. 7 x 4 switch boxes over the first 8 way pairs.

Cluster resources (256 register bits, 32-bit MAC, four sub-arrays) are package
constants.

## What follows the published architecture and what is this design's own

These follow the published architecture:
- the slice geometry: 20 ways, 8 KB sub-arrays with a 32-bit port, 160
  sub-arrays;
- clusters spanning two adjacent ways;
- a latch and a mux tree per sub-array;
- four 5-LUTs or eight 4-LUTs, one MAC and one bus operation per step;
- 256 register bits;
- a 32-bit MAC;
- crossbar configuration in the tag arrays, broadcast by the controller;
- lock-step clusters on a shared row address;
- flush-then-lock of selected ways;
- loads and stores as the only host interface;
- stall until every cluster's request is served;
- offsets applied by the controller;
- scratchpad ways;
- a 7 x 4 grid of switch boxes over 16 ways, with X-Y routing, static routes
  per step and 32-bit links.

These are choices of this design, because the published description gives no
detail for them:
- every encoding: the crossbar-word layout, the operand pool, the op codes, the
  register map and the address fields;
- the one-cycle fetch-ahead timing and the write priorities;
- the serving order and cycle costs on the operand bus;
- address bit 31 as the marker for "forward to the cache";
- the done-bit convention;
- the broadcast configuration write;
- the synchronous reset;
- how a cluster attaches to the grid (between two boxes, OR-ed link input),
  the route codes, and one 8 KB configuration memory per box (28 x 8 KB,
  where the published estimate counts 8 KB per four clusters).

Known departures and limits:
- There is one slice. A multi-slice system is several independent slices.
  Slices do not talk to each other except through memory.
- Operand requests are served one word at a time. The cache can fetch 32 bytes
  per way access, and a real implementation could coalesce requests.
- The controller forwards requests marked for the cache but does not model the
  cache. Hit/miss behaviour, coherence and flushing belong to the cache
  controller outside this RTL.
- The 3 GHz / 4 GHz timing targets and all area and power figures are outside
  the scope of RTL simulation.
- The grid here has only the 7 x 4 boxes, with none extra at the crossing of
  the tag arrays and the control box; the link between columns 1 and 2
  stands in for that crossing. The longest corner-to-corner route is
  therefore 9 box-to-box links, not the 10 of the published estimate.
- No folding-schedule compiler is included. Schedules are written by hand, as
  in the testbenches.
