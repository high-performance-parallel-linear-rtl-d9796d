# Shifter-sorter top-N selector core

This core picks the N pairs with the largest keys out of a long stream of
(key, data) pairs. It uses almost no control logic and needs no input FIFO.
At its heart is the *shifter sorter*: a chain of N identical cells that does
an insertion sort in hardware. Every cell compares the incoming key with the
key it holds. All cells holding a smaller key shift down by one place in the
same clock. The new pair drops into the gap this leaves. One pair goes in
every clock. The chain never holds more than N pairs, so it is always the
running top-N of everything it has seen. No separate selection step is
needed.

A single chain takes one pair per clock. To go faster, b chains run side by
side on disjoint parts of the stream. At the end a short *merge* gathers the
N best pairs of all chains into the first one. The core sits on a W-bit
system bus. Each bus word carries q = W / (key bits + data bits) pairs. The
core takes min(q, b) pairs per clock.

Default configuration (all parameters of the top):

| parameter | default | meaning |
|-----------|---------|---------|
| `BUS_W`   | 64      | bus width W; gives q = 4 pairs per word |
| `KEY_W`   | 8       | key width |
| `DATA_W`  | 8       | data width |
| `N`       | 64      | cells per chain = size of the selected set |
| `B`       | 4       | parallel chains (b) |

At these values a whole bus word enters the sorters every clock, which is 4
pairs per clock. The merge takes (b-1)·N = 192 clocks.

## The cell (`rtl/ss_node.sv`)

A cell has a key register and a data register, one comparator and two 2:1
multiplexers:

```
load_i  = flush | (in_valid & (key_q < in_key))     // comparator, register enable
next    = load_{i-1} ? pair of cell i-1 : broadcast pair   // mux select
```

Each cell sees three things: the broadcast pair, the pair of the cell above,
and the `load` of the cell above. Because the chain is sorted in descending
order, the cells that load are always a contiguous run from some cell k down
to the end. Cell k is the first cell that loads, and the cell above it does
not, so cell k takes the new pair. Every cell below k takes its upper
neighbour's pair. This is the whole insertion; there is no controller.

Details chosen here:

* The comparison is strict. A new key equal to a stored one goes below it,
  so pairs with equal keys keep their arrival order.
* Reset is synchronous and clears cells to key 0. A cell with key 0 counts
  as **empty**. No key is smaller than 0, so a pair with key 0 is never
  stored. Give real data keys of 1 or more.
* `flush` forces every cell to load. The chain then moves down by one place:
  the last pair leaves and cell 0 takes the broadcast pair. The serial
  read-out and the merge both use this. It acts like broadcasting a key
  larger than any key that can be stored. Pairs that hold the largest key
  value move too.

## The chain (`rtl/shifter_sorter.sv`)

N cells in a row. `in_key`/`in_data` go to every cell. Key, data and load
go from each cell to the cell below it. The result can be read in two ways:

* in parallel from `node_key[0..N-1]` (largest first), one clock after the
  last insertion;
* serially from the last cell (`out_key`, `out_data`) by flushing, smallest
  first.

`out_load` is high when the last pair is about to leave the chain. Either
it was pushed out by an insertion (an eviction) or the chain was flushed.
The top inputs of cell 0 (`load_in`, `key_in`, `data_in`) are brought out
for completeness. Tie `load_in` low for normal use.

Cost per cell: one key comparator, two registers and two multiplexers. The
only signals that run the length of the chain are the broadcast key and
data. Everything else connects neighbour to neighbour.

## Parallel chains and the merge (`rtl/parallel_ss.sv`)

b chains ("units") each take their own input stream, so b pairs can go in
per clock. Each unit keeps the N largest pairs *of its own stream*. The N
largest of the whole input can be spread over all units. The merge moves
them into unit 0. It needs only a multiplexer in front of each unit's
broadcast input and a counter:

```
          +-----------+   evicted (load of last cell) or empty
 in[0] -->| unit 0    |-----------------------------+
   ^      | (insert)  |                             v
   |      +-----------+                       +-----------+
   |                                          | unit 1    | flush every clock
   |                                          +-----------+
   |                                                | last cell
   |                                                v
   |                                          +-----------+
   |                                          | unit b-1  | flush every clock
   |                                          +-----------+
   |                 last cell                      |
   +------------------------------------------------+
```

While `merge_busy` is high:

1. Units 1..b-1 are flushed every clock. Each takes the pair leaving the
   unit above it, so together they behave as one long shift register of
   (b-1)·N cells ("domino" shift).
2. The pair leaving the last unit is broadcast into unit 0 as an ordinary
   insertion. Unit 0 keeps it only if it belongs in its top N.
3. When unit 0 accepts a pair and pushes its smallest pair out, that pair
   goes into unit 1. Otherwise unit 1 takes an empty pair (key 0).

After exactly (b-1)·N clocks every pair that was in units 1..b-1 has been
offered to unit 0. Unit 0 then holds the N largest pairs of the whole input
in descending order. Why this is correct:

* The smallest key in unit 0 can only grow during the merge. A pair pushed
  out of unit 0, or refused by it, is no larger than that smallest key. It
  therefore never gets back in, even if it goes round the ring again.
* Every pair that is finally in the top N is either already in unit 0, or
  leaves the last unit within (b-1)·N clocks and is inserted then.

What the units hold after a merge is smaller than everything in unit 0. So
the core can keep streaming after a merge and merge again without a clear,
and the result is still the top N of everything seen since the clear. The
merge cost is paid once per query, not per pair. With a long input stream
(M pairs, M much larger than N) it hardly matters: the total time is about
M/b + (b-1)·N clocks.

Inputs are refused (`in_ready` low) during a merge. `merge_done` pulses
one clock after the last merge clock. With b = 1 there is nothing to merge,
and `merge_done` follows `merge_start` directly.

## Feeding the sorters from the bus (`rtl/p2s.sv`)

A bus word brings q pairs at once. The sorters take b pairs per clock, one
per unit. The parallel-to-serial converter holds one word and hands it on in
beats of G = min(q, b) pairs. Pair i goes out in beat i / G on lane i mod G.
Every pair has its own valid bit (`bus_mask`), so partly filled words are
allowed. Beats after the last present pair are skipped. This gives:

* q = b (default): one word per clock;
* q > b and b divides q (for example b = 2): q/b clocks per word;
* b does not divide q (for example b = 3 with q = 4): full words take two
  beats. A producer can put only b pairs in each word, and then each word
  takes one clock, which is b pairs per clock.

When the last beat goes out, the converter takes the next word in the same
clock. A word reaches the sorters one clock after the bus hands it over.

## Serial read-out (`rtl/ss_extract.sv`)

After `start`, the controller offers the last cell of unit 0 on a
valid/ready stream. Each time a pair is taken, unit 0 shifts down one cell.
After N pairs the controller stops and `out_last` marks the N-th pair. The
pairs come out in **ascending** key order. Cells that were never filled come
out first, as key 0. Reading out empties the set. The parallel outputs need
no read-out at all.

## The top (`rtl/ss_soc_sorter.sv`)

The top connects word unpacking, `p2s`, `parallel_ss` and `ss_extract`.
Its ports:

* **Bus side:** `bus_valid`/`bus_ready`/`bus_word`/`bus_mask`. Pair i is
  `bus_word[i*(KEY_W+DATA_W) +: KEY_W+DATA_W]`, with the key in the upper
  `KEY_W` bits.
* **`clear`:** empties all sorters and the converter. Use it to start a
  new query.
* **`cmd_merge`:** one-clock request. From then on bus words are refused.
  The merge starts as soon as the converter has passed on its last word.
  `merge_busy` covers the wait and the merge. `merge_done` pulses when
  `result_key`/`result_data` are final.
* **`cmd_drain`:** starts the serial read-out. It is taken only while
  `idle` is high. The pairs appear on `out_valid`/`out_ready`/`out_key`/
  `out_data`/`out_last`.

A typical query:

1. Pulse `clear`.
2. Stream the words.
3. Pulse `cmd_merge` and wait for `merge_done`.
4. Read `result_*`, or pulse `cmd_drain` and take N pairs.

To keep a running top-N instead, skip the clear and merge again whenever a
result is needed.

All registers reset synchronously with `rst`. Everything runs in one clock
domain. Assertions (active in simulation) check that an offered bus word is
held until it is taken, that the merge never starts while the converter
still holds pairs, and that stalled output streams do not move.

## How closely this follows the original architecture

These parts follow the published shifter-sorter architecture:

* the cell (comparator, two multiplexers selected by the load of the cell
  above, key and data registers enabled by the cell's own load, common
  reset);
* the broadcast chain of 64 cells;
* b replicated chains with a multiplexer in front of each, merged by a
  domino shift with feedback into the first chain under a counter;
* the serializer in front of the sorter;
* the default sizes: 8-bit keys and data on a 64-bit bus (q = 4), N = 64,
  b = 4.

These are this implementation's own choices:

* **Empty cells and key 0:** empty cells are marked by key 0.
* **Strict comparison:** the comparison is strict, which keeps equal keys
  in arrival order.
* **`in_valid` and `flush`:** the cell has an `in_valid` qualifier and a
  forced shift. The original reads out by feeding the maximum key value
  instead.
* **Merge details:** during the merge, a pair that unit 0 pushes out is
  passed into unit 1 and goes round the ring again; in clocks where unit 0
  pushes nothing out, unit 1 takes an empty pair. This handling was chosen
  here.
* **Interfaces:** all valid/ready handshakes, the bus word packing, the
  command pulses and the skipping of empty beats in the converter were
  chosen here.

Not included:

* **Bus and host CPU:** the system bus and the host CPU. The top's
  bus-side stream is where a bus adapter would attach.
* **Comparison baseline:** the bitonic-network selector with an input FIFO
  and a sorted-set store. It is only a baseline for comparison.

Throughput follows from one insertion per unit per clock. The original
reports 133 MHz on a Virtex-E FPGA for N = 16 to 128 and gives the
throughput of b parallel chains as b pairs per clock at that rate. This RTL
comes with no FPGA timing results of its own. The critical path is
one key comparison plus a 2:1 multiplexer, whatever N is, but the broadcast
key and data fan out to all N cells.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|-----------|----------------|
| `tb_ss_node` | random stimulus against a cycle model of the cell: load, mux choice, hold, clear |
| `tb_shifter_sorter` | N = 16; after every clock, all cells against a sorted reference list (equal keys stable, key 0 never stored); flush read-out smallest first |
| `tb_parallel_ss` | N = 8, b = 3; merge lasts exactly (b-1)·N clocks; unit 0 holds the top N (every pair a real input pair, none twice); a second merge without clear; read-out |
| `tb_p2s` | Q = 4, G = 1; random masks and stalls; pair order; empty trailing beats skipped; one word per ceil(Q/G) clocks |
| `tb_p2s_g3` | Q = 4, G = 3: a full word goes out as beats of three and one pair, one word every 2 clocks |
| `tb_ss_extract` | with a real chain: N pairs smallest first; `out_last`; no shift while stalled; N clocks when always ready; chain empty afterwards |
| `tb_ss_soc_sorter` | end to end with N = 8, b = 2 (two beats per word), 12 queries; see below |
| `tb_ss_soc_sorter_full` | end to end at the default size: 2048 + 256 words (9216 pair slots), two merges of 192 clocks, 64-pair read-out, one word per clock |
| `tb_ss_workloads` | N = 16, 32, 64, 128 with b = 1, and N = 64 with b = 2, 3, 4; measures exactly b pairs per clock, merge time, result and read-out |

The end-to-end testbenches count how often each mechanism happens, and fail
if one never happens:

* serializer back-pressure;
* partly filled words;
* key-0 pairs;
* evictions from a full chain;
* a merge waiting for the serializer;
* merges, and repeated merges without clear;
* read-outs and read-out stalls;
* clears.

The reference model is a plain list of every pair sent. It is sorted by key
and its top N keys are compared with the result. Where keys tie, which data
is kept depends on timing, so the data is checked as membership in the
input.

## Simulating

Verilator 5 is enough. Compile the package first, and let Verilator find
the other modules by name:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl rtl/ss_pkg.sv tb/tb_ss_soc_sorter.sv \
    --top-module tb_ss_soc_sorter -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. The full-size run takes about
ten seconds. `rtl/ss_pkg.sv` holds the default sizes and the helper
functions for q, min(q, b) and counter widths. To change the configuration,
override the top's parameters. `B` should not exceed q. Otherwise, units
beyond q get no input and only take part in the merge.

## Files

| file | content |
|------|---------|
| `rtl/ss_pkg.sv` | default sizes, derived-size functions |
| `rtl/ss_node.sv` | sorter cell |
| `rtl/shifter_sorter.sv` | chain of N cells |
| `rtl/parallel_ss.sv` | b chains, input muxes, merge counter |
| `rtl/p2s.sv` | parallel-to-serial converter |
| `rtl/ss_extract.sv` | serial read-out controller |
| `rtl/ss_soc_sorter.sv` | top: bus-attached selector core |
| `tb/*.sv` | testbenches; `tb/ss_workload_run.sv` is a helper of `tb_ss_workloads` |
