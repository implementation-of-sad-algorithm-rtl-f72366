# Digit-serial SAD motion estimation with early termination

Block motion estimation takes one block of the current video frame and looks
through a search window in a reference frame for the block that matches it best.
The usual measure is the sum of absolute differences (SAD) over all pixels.
For a 16x16 block in a 24x24 window that means 81 candidate positions, each
with 256 absolute differences. Most candidates lose, and often by a wide
margin.

This design computes every SAD one digit per cycle, most significant digit
first. As soon as the leading digits show that a candidate cannot beat the best
SAD found so far, it is dropped and the next candidate starts. A clear loser
costs about half the cycles of a full evaluation. Next to the search, an array
of 64 four-pixel processing elements classifies the block as stationary,
homogeneous or textured. That class is the input an adaptive search would use
to pick its search pattern.

The RTL follows the architecture in *Implementation of SAD Algorithm for Motion
Estimation* (Vasanthapriya, Vaishnavi, Nithya Lakshmi). That description leaves
a lot open. Everything this RTL had to choose for itself is listed under
"Design choices and departures" below.

## System

```
            write port                      +-------------------------+
 pixels ---> me_dispatcher --candidate----->|     sad_processor       |--> min_sad, best_mv
            (window 24x24,  --ref. block--->| |c-r| -> online tree -> |
             block 16x16,   <--min SAD = 0--|  comparator(s)          |
             rows above/below)              +-------------------------+
                 |  current block, co-located block, padding rows
                 v
            search_strategy_decision  --> mb_class, diff, edge_sum
            (64 x four_pixel_pe + mb_systolic_array)
```

`me_top` connects three parts:

* **`me_dispatcher`** stands in for the host processor's dispatcher. It holds
  the search window, the current block and the frame rows just above and below
  that block, all filled through a write port one pixel per cycle. After
  `start` it offers the candidates of a full search in raster order, with a
  valid/ready handshake. Each candidate carries its motion vector, relative to
  the co-located block: -4..+4 on each axis for the defaults. The minimum SAD
  comes back from the processor; once it is 0 (an exact match) the
  dispatcher stops issuing candidates.
* **`sad_processor`** evaluates the candidates. It keeps the minimum SAD and
  its vector.
* **`search_strategy_decision`** classifies the current block. It runs in
  parallel with the search.

`done` rises once the last candidate has been decided and the classification has
finished. The counters `n_cand`, `n_early` and `n_new_min` show how the search
went.

## The SAD processor

This is the part that takes the most care to understand. It has three stages.

### Absolute differences, MSB first

`sad_abs_diff_block` has one unit per pixel: 16 for a 4x4 block, 256 for
16x16. In the cycle a candidate is accepted, each unit computes |c - r| for its
pixel and stores it in a shift register. The bits then come out MSB first, one
per cycle, in cycles 1 to 8. After that the units output zeros.

### Online adder tree

The bits go into a balanced binary tree of `online_adder`s
(`sad_online_tree`). Carry propagation runs against the digit order: a carry
starts at the least significant digit, which arrives last. So an MSD-first adder
cannot use plain binary. It uses radix-2 signed digits in {-1, 0, +1}, each
carried as a (pos, neg) bit pair.

At each position the adder splits the digit sum s (range -2..2) into a
transfer to the next more significant position and an interim digit. For
s = +-1 it looks one position ahead to choose the split, so the output digit
always stays in {-1, 0, +1}. Each output digit therefore needs the inputs of two
later positions:

* each tree level adds two cycles of delay (online delay 2);
* each level adds one leading digit.

For a 4x4 block (4 levels) the root stream has 12 digits and starts in cycle 9.
For 16x16 (8 levels) it has 16 digits and starts in cycle 17. The zeros after
each stream clear the transfer chain, so streams of consecutive candidates can
follow each other through the tree.

### Comparator

`online_min_comparator` takes the root stream together with the stored minimum.
After k digits the value P of the prefix is known. The m digits still to come
can move the final value by at most 2^m - 1 in either direction. A SAD is never
negative, so the candidate is rejected as soon as either holds:

    P * 2^m - (2^m - 1) >= minimum     or     minimum = 0

If the last digit passes without a rejection, the SAD is below the minimum
(strictly, so ties keep the earlier candidate). The exact value is then stored.

### Schedule

Cycles are counted from the cycle after the candidate is accepted. L is the
number of tree levels, log2(N*N).

| event                                        | formula | 4x4 | 8x8 | 16x16 |
|----------------------------------------------|---------|-----|-----|-------|
| leading SAD digit at the comparator: earliest rejection | 1+2L | 9 | 13 | 17 |
| next candidate accepted if this one is still alive | 8+2L | 16 | 20 | 24 |
| last digit compared                          | 8+3L    | 20  | 26  | 32    |
| new minimum visible                          | 9+3L    | 21  | 27  | 33    |

A rejected candidate is flushed from the whole pipeline. The next candidate is
accepted in the cycle of the rejection, so candidates follow each other every
1+2L to 8+2L cycles. A candidate that survives up to 8+2L overlaps in the tree
with the next one. At most two are ever in flight.

The two slots `h` (newest) and `t` (draining) in `sad_processor` track this by
age. Assertions check that two candidates never finish in the same cycle and
that a candidate is never moved into an occupied slot.

### Partial-SAD comparators (`PARTIAL_CMP`)

With `PARTIAL_CMP = 1`, six more comparators watch partial sums inside the tree:
the two nodes one level below the root (half a block each) and the four nodes
two levels below (a quarter each). For 16x16 blocks these are the partial SADs
of 128 and 64 pixels. Every partial SAD is a lower bound on the full SAD, so any
of these comparators can reject the candidate, two or four cycles earlier than
the root. The earliest rejection then comes at 2L-3 cycles (13 for 16x16).

`me_top` enables the partial comparators. A `sad_processor` instantiated on its
own defaults to the 4x4 block without them, the configuration of the timing
above.

## Block classification

`four_pixel_pe` has eight 2:1 multiplexers in front of four |R - C| units and a
three-adder tree. With select 0 it computes the SAD of four current/reference
pixel pairs. With select 1 it computes a Sobel gradient magnitude in
sum-of-absolute-differences form. For |dx| at (i, j) the pairs are rows i-1, i,
i and i+1 of column j+1 against column j-1, so the middle row counts twice.
|dy| is the same with rows and columns exchanged.

`search_strategy_decision` holds 64 such PEs and uses them twice:

1. **Stationary test (1 cycle).** With select 0 the 64 PEs cover all 256
   pixels and give Diff, the SAD between the current block and the co-located
   reference block. Diff <= `thr_t` gives `MB_STATIONARY`.
2. **Homogeneity test (8 cycles).** This step runs only when Diff > `thr_t`.
   `mb_systolic_array` holds the block framed by the frame row above, the frame
   row below, and side columns that repeat the block's edge pixels. Each cycle
   the top 4 x 18 window feeds 32 PEs computing |dx| and 32 computing |dy|,
   which covers two block rows. Then the array moves up two rows. `edge_sum` is
   the sum of |dx| + |dy| over the block. `edge_sum < thr_h` gives
   `MB_HOMOGENEOUS`, otherwise the result is `MB_TEXTURED`.

`done` comes 2 cycles after `start` for a stationary block and 10 cycles after
it otherwise.

## Interfaces

`me_top` parameters: `N` (block size, 16), `SW` (window size, 24),
`PARTIAL_CMP` (1). `N` must be a power of two with N*N >= 16. The
classification needs `N` to be a multiple of 8.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `wr_en`, `wr_sel`, `wr_row`, `wr_col`, `wr_data` | in | 1, 2, 8, 8, 8 | pixel write: `wr_sel` 0 = window (row/col 0..SW-1), 1 = current block, 2 = frame row above the block, 3 = row below (col 0..N-1) |
| `start` | in | 1 | one-cycle pulse: new search and classification |
| `thr_t` | in | 8+log2(N*N) | stationary threshold on Diff |
| `thr_h` | in | 12+log2(N*N) | homogeneity threshold on the edge sum |
| `done` | out | 1 | results valid, until the next `start` |
| `min_sad`, `best_mv` | out | 8+log2(N*N), `mv_t` | best SAD and its vector (`dx`, `dy`, signed 8 bit) |
| `mb_class`, `diff`, `edge_sum` | out | `mb_class_t`, ... | classification results |
| `n_cand`, `n_early`, `n_new_min` | out | 16 | candidates evaluated, rejected before their last digit, accepted as new minimum |

Typical use: write the window, the block and the two padding rows, pulse
`start`, then wait for `done`. The stored pixels stay valid for further
searches.

`sad_processor` can also be used on its own, with any block-matching order.
Pulse `init`, then offer candidates (`cand`, `cand_mv`) with
`cand_valid`/`cand_ready`, keeping `refb` stable. Read `min_sad`/`best_mv` once
`busy` has fallen. `res_valid` pulses once per candidate, with `res_new_min`,
`res_early` and `res_mv`.

Shared types (`pixel_t`, `sd_digit_t`, `mv_t`, `mb_class_t`) are in
`rtl/sad_pkg.sv`.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops through a cycle-count watchdog if
anything hangs. With Verilator 5:

```
verilator --binary --timing --assert --top-module me_top_tb -y rtl -Itb \
          rtl/sad_pkg.sv tb/me_top_tb.sv -o sim && ./obj_dir/sim
```

Replace `me_top_tb` with any other testbench. `sad_processor_tb` also needs
`tb/sad_processor_check.sv`: add `-y tb`. Undriven state is never read, so
`+verilator+rand+reset+2` does not change results. Building the full-size top
takes about a minute and a half; simulating it takes well under a second.

What the testbenches check:

* `me_top_tb` runs the default configuration (16x16, 24x24, partial
  comparators) end to end. It runs four searches against a full-search model:
  a noisy copy, an exact copy, the co-located block and a flat block. It checks
  SAD, vector, Diff, edge sum, class, number of candidates and total cycles
  (13..24 per candidate). It requires that each of these happens at least
  once: new minimum, early rejection, rejection by a partial comparator,
  overlap of two candidates, stop on an exact match, and all three classes.
* `sad_processor_tb` runs a 4x4 processor, an 8x8 processor and a 16x16
  processor with partial comparators. It checks the schedule cycle counts
  (9+3L for a new minimum, 8+2L for the issue interval, 1+2L for the best case,
  or 2L-3 with partial comparators) and 60 random candidates against a model.
* `me_workload_tb` runs the evaluated setup (16x16 blocks, 24x24 window, full
  search) on 8 synthetic blocks, using two tops side by side: one with only the
  final comparator and one with the partial comparators. Both must find the
  full-search minimum, and the partial-comparator top must never be slower.
  Over the 8 blocks it measured 12931 cycles with the final comparator only
  and 11855 with the partial comparators. A search without early termination
  would take 15552 (8 x 81 x 24).
* The remaining testbenches check one block each. The online adder is checked
  on random signed-digit streams. The tree is checked at the root and the
  partial nodes with their delays. The comparator is checked for soundness,
  exact accept and the zero bound. The others cover the |c-r| serialiser, the
  PE in both modes, the padded systolic window at every position, the
  classifier's values, classes and latency, and the dispatcher's order,
  vectors, back-pressure and early stop.

## Design choices and departures

The source architecture gives the block structure, the PE, the 16x16 padded
array, the 64-PE count, the digit-serial timing diagram of the 4x4 processor
and cycle counts for 4x4, 8x8 and 16x16 blocks. This RTL chose the following
itself:

* **Online arithmetic.** The timing diagram shows MSD-first digit streams that
  gain one digit per adder stage. The signed-digit adder algorithm, its
  two-cycle delay and the (pos, neg) digit encoding are this design's. The
  delay of 2 is inferred from the published cycle counts: each extra tree level
  adds 2 cycles.
* **Rejection rule.** The bound test in the comparator, strict improvement
  (ties keep the earlier candidate) and flushing the pipeline after a rejection
  are this design's.
* **Where the four-pixel PE is used.** The four-pixel PE is described both as
  the basic processing element and as the unit for Sobel edges. The search
  datapath's timing, however, is given as a digit-serial absolute-difference
  stage with an adder tree. Here the candidate search uses that digit-serial
  datapath, and the PEs serve the block classification, where they compute
  both the SAD and the edges.
* **Partial comparators.** They sit on the half- and quarter-block nodes of the
  tree, which gives six comparators as in the source. Pixels are grouped by
  input order, so for 16x16 the halves and quarters are bands of rows.
* **Default sizes.** `me_top` uses the evaluated setup: 16x16 blocks, a 24x24
  window and partial comparators. `sad_processor` on its own defaults to the
  4x4 processor of the timing diagram.
* **Dispatcher.** The full-search order, the storage and write port, the
  vector origin at the window centre and stopping at a zero minimum are this
  design's. The source only says a host-side dispatcher supplies the blocks and
  receives the minimum SAD.
* **Classification.**
  * The edge amplitude |dx| + |dy| and the second threshold `thr_h` are
    assumptions.
  * The rule that a low edge sum means homogeneous is also an assumption.
  * The neighbour pairing in the PE is read from partly legible operand labels.
  * The source goes on to choose a search strategy from the two tests and to
    configure the per-level controllers of a multi-resolution search. It gives
    no criterion for either, so this RTL stops at the class and does not let it
    change the search.
* **Interfaces and reset.** Handshakes, result pulses, counters and reset
  behaviour are this design's.

## Limits

* **Throughput.** A 24x24 full search of one 16x16 block takes 81 candidates at
  13 to 24 cycles each; the textured test block took 1245 cycles. At 150 MHz a
  single processor therefore cannot reach the 1080p, 30 frames/s, two-reference
  rate quoted for the complete adaptive multi-resolution system. That rate
  needs about 306 cycles per block search. Reaching it would take several
  processors or the reduced search patterns of the adaptive search, which is
  not implemented.
* **Write port.** Loading the window is one pixel per cycle, about 860 cycles
  for the defaults, and is not overlapped with the search.
* **Leakage power.** The transistor-stacking work the source reports applies to
  the cell level and has no RTL counterpart.
