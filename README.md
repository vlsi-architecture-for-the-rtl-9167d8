# Systolic diameter and closest-pair engine

Given a set of N points in D dimensions, this design finds in one pass
the **diameter** of the set (the largest distance between two of its
points) and the **closest pair** (the smallest non-zero distance), each with
the indices of the two points. A software loop needs O(N²D) operations for
this. Here a grid of (N−1) × D small bit-serial processors computes all
N(N−1)/2 distances in a pipeline. A chain of compare processors at the
grid's edge reduces them to the two extremes while the distances are still
being produced. The run time grows linearly with N + D.

The architecture follows the systolic design described in *"VLSI
architecture for the computation of the diameter and the closest points of
a set"*: distances set up as a "pseudo-matrix multiplication" T = S ∘ Sᵀ,
compute processors, compare_max/compare_min processors, and hold processors
that release the results. The RTL here is an independent implementation.
Where that description stops short (word widths, the exact skew of the
streams, the wiring of the compare chains, the control interface), the
choices are this design's own. They are listed in
[Departures and choices](#departures-and-choices).

Default configuration: N = 100 points, D = 5 dimensions, 16-bit unsigned
coordinates, L1 (Manhattan) metric. Other sizes and the squared-L2 and L∞
metrics are parameters.

## Organisation

```
                 S words (P^1..P^N), one column per dimension, moving down
                   |      |      |      |      |
 U = 0, V = (i,j) +------+------+------+------+------+   row 0  -> max_hold ------> min_hold
 ---------------> |  CP  |  CP  |  CP  |  CP  |  CP  | --------> (diameter)    (closest pair)
                  +------+------+------+------+------+                ^                ^
 ---------------> |  CP  |  CP  |  CP  |  CP  |  CP  | --------> compare_max --> compare_min
                  +------+------+------+------+------+                ^                ^
        ...                    (N-1) rows                            ...              ...
                  +------+------+------+------+------+                ^                ^
 ---------------> |  CP  |  CP  |  CP  |  CP  |  CP  | --------> compare_max --> compare_min
                  +------+------+------+------+------+           row N-2: chains start here
                   ^      ^      ^      ^      ^
                 S1 words (P^2..P^N), moving up
```

| Module | Role |
|---|---|
| `diameter_closest_top` | Whole engine: host write port, start/done, results |
| `point_memory` | N × D coordinate store; two reads per column per time unit |
| `stream_controller` | Time-unit clocking, skewed stream injection, end-of-execution pulses |
| `compute_array` | (N−1) × D grid of `compute_processor` |
| `compute_processor` (CP) | Adds one coordinate's contribution \|a_d^i − a_d^j\|^p to a pair's partial distance |
| `selection_network` | N−2 `compare_processor` per chain plus the two `compare_hold_processor` |
| `compare_processor` | compare_max or compare_min: winner out one side, loser out the other |
| `compare_hold_processor` | Last processor of a chain; holds the running extreme and releases it |
| `diam_pkg` | Metric enum, phase struct, width functions, comparison rules |

## The time unit: serial transfer, then three ALU clocks

All processors are bit-serial and work in lock step. Neighbours are joined
by 1-bit links. A **time unit** has two phases:

1. **Transfer**, XFER clocks. Every pipeline register shifts out its least
   significant bit and takes in the neighbour's bit at the top. A register
   of width w shifts during the first w clocks of the phase. Afterwards it
   holds the word its upstream neighbour held before. XFER is the widest
   serial word: 19 bits (the distance) at the defaults. Labels are 14 bits
   and coordinates 16.
2. **ALU**, 3 clocks. Each processor computes on the words it just received,
   in place.

One unit is therefore XFER + 3 = 22 clocks at the defaults.
`stream_controller` broadcasts the phase to every processor as a
`phase_t` struct: `clr`, `xfer` with `bit_idx`, and `alu` with `step`. No
processor has a local sequencer.

The compute processor's ALU steps (buffer register Bu):

| step | L1 (default) | squared L2 | L∞ |
|---|---|---|---|
| 0 | Bu := a^i − a^j | same | same |
| 1 | Bu := \|Bu\| | Bu := Bu·Bu | Bu := \|Bu\| |
| 2 | b := b + Bu | b := b + Bu | b := max(b, Bu) |

A compare processor needs one ALU clock: compare and, if needed, swap. A
hold processor needs two: compare-and-swap, then compare with the hold
register.

## Streams and schedule: which pair meets where

This is the least obvious part of the design. Four streams cross the grid:

* **S**: P^1 … P^N. Column d carries coordinate d. Enters at the top and
  moves down one row per unit.
* **S1**: P^2 … P^N, the same data. Enters at the bottom and moves up.
* **U**: the partial distances, starting at 0. Enter each row on the left
  and move right one column per unit.
* **V**: the pair labels {i, j}. They travel alongside U.

S and S1 move in opposite directions. If their words were packed in every
unit, two words coming towards each other would sometimes swap places
between rows without ever sitting in the same processor. So both streams
carry a word only every second unit. Then a word of S meets every word of
S1 it passes.

The injection times make each meeting coincide with the right label.
Let T0 = N − 4, and count units from 0 after `start`:

| stream | word | enters | in unit |
|---|---|---|---|
| S | coordinate d of P^i, i = 1..N | top of column d | T0 + 2i + d |
| S1 | coordinate d of P^j, j = 2..N | bottom of column d | T0 + 2j + d − N |
| V | label (i, i + r + 1), i = 1..N−r−1 | left of row r | T0 + 2i + r |
| U | 0 | left of every row | every unit |

All other slots carry zeros; a label of 0 marks an empty slot. The result
is that P^i and P^j (i < j) meet in **row r = j − i − 1**, column d, in
unit T0 + 2i + r + d. Their pair's partial distance arrives there from the
left in the same unit. So row r produces the r-th off-diagonal of the
distance matrix T: pairs (1, r+2), (2, r+3), …. Row 0 has N−1 pairs and
row N−2 has one. The symmetric half of T and its zero diagonal are never
computed. The extra skew of one unit per column lets a partial distance
reach column d+1 exactly when that column's coordinates of the same two
points arrive. A finished distance leaves row r on the right D units after
it started.

Rows deliver their distances at different times, and most slots are empty.
The selection network therefore treats every row output as "a labelled
distance or nothing" in each unit.

## Selecting the extremes

Two chains climb the right edge from the bottom row to row 0, one
processor per row:

* **Max chain.** `compare_max` at row r takes its row's entry on (a,b) and
  the running maximum from the row below on (c,d). It sends the larger up
  on (e,f) and the other one out on (g,h). Rows N−2 … 1 have a
  `compare_max`. Row 0 has the `compare_max_hold`, which keeps the largest
  entry seen in its hold registers.
* **Min chain.** `compare_min` at row r takes, on (a,b), the (g,h) output
  of its row's `compare_max`, and the running minimum from below on (c,d).
  It sends the smaller up. It ends in `compare_min_hold` at row 0, which is
  fed by the (g,h) output of `compare_max_hold`.

Why upward: row r finishes its last pair r units before row 0 does, and an
entry climbs one row per unit. So the last entries of all rows arrive at
the hold processors in the same unit, and the chains add no drain time.

Feeding the min chain from the max chain is exact because of how (g,h) is
defined. A compare processor sends out on (g,h) the entry that the
*opposite* comparison would choose (c on a tie). For two valid non-zero
entries that is simply the loser. But when only one of the two counts for
a minimum (the other is an empty slot or a zero distance), that entry goes
out on (g,h) even if it also won. Follow one wavefront of entries as it
climbs. At each row, the running max and the running min (one unit behind)
together still contain the smallest entry of the wavefront that counts for
a minimum. Without this rule, a wavefront holding a single non-zero
distance among zero distances would lose that distance before it reached
the min chain.

Rules of the comparison (`diam_pkg::entry_ok`, `diam_pkg::a_wins`):

* max: a ≥ c keeps a (ties go to the entry from the row); min: a ≤ c keeps a.
* An entry with label 0 (empty slot) never wins.
* For the minimum, a distance of 0 does not count. The closest pair is the
  smallest distance **above zero**, so coincident points are skipped. If
  all points coincide, `min_found` stays low.
* A hold register changes only when the new entry is strictly better, so on
  a tie the entry that arrived first is kept. The returned pair is one of
  the pairs that reach the extreme.

`stream_controller` pulses `finish_max` on the last clock of unit
3N + D − 6, when the last distance has reached `compare_max_hold`. It
pulses `finish_min` one unit later. Each hold processor then sets its
end-of-execution flag (`max_eoe`, `min_eoe`) and puts its held distance and
label on the result ports. The results stay there until the next `start`.

## Timing

| quantity | formula | N = 100, D = 5 |
|---|---|---|
| clocks per time unit | XFER + 3 | 22 |
| units per run | 3N + D − 4 | 301 |
| clocks from `start` to `done` | (3N + D − 4)(XFER + 3) + 1 | 6 623 |
| diameter released | end of unit 3N + D − 6 | one unit before `done` |

The first N − 2 units only fill the grid with the S1 stream. The first S
word enters in unit N − 2, and the last pair leaves row 0 in unit
3N + D − 6. The original architecture quotes 3N + D − 1 units for a run;
this schedule takes 3 units fewer. The engine does not pipeline successive point sets.
A new `start` clears every register and begins a full run.

Size after generic synthesis at the defaults: about 53.7 k flip-flop bits
(40.6 k in the grid, 13.1 k in the selection network), an 8 000-bit point
memory, about 27.4 k word-level cells.

## Interface of `diameter_closest_top`

| port | dir | width (defaults) | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `wr_en`, `wr_pt`, `wr_dim`, `wr_data` | in | 1, 7, 3, 16 | write coordinate `wr_dim` (0..D−1) of point `wr_pt` (1..N) |
| `start` | in | 1 | pulse to start a run; ignored while `busy` |
| `busy`, `done` | out | 1 | run in progress; run finished (held until the next start) |
| `time_unit` | out | 16 | unit being executed |
| `max_eoe`, `max_found`, `max_dist`, `max_i`, `max_j` | out | 1, 1, 19, 7, 7 | diameter and its pair, i < j, 1-based |
| `min_eoe`, `min_found`, `min_dist`, `min_i`, `min_j` | out | 1, 1, 19, 7, 7 | closest non-zero distance and its pair |

Use: write all N × D coordinates, one per clock, then pulse `start` and
wait for `done`. The point memory may be rewritten at any time when the
engine is not busy. The engine always processes exactly N points. A
smaller set can be run by filling the unused places with copies of one of
its points: this adds only zero distances and repeats of existing ones.
The returned indices may then name a copy.

Parameters of the top: `N`, `D`, `CW` (coordinate bits), `METRIC`
(`METRIC_L1`, `METRIC_L2SQ`, `METRIC_LINF`). Distance width is
CW + ⌈log2(D+1)⌉ for L1, 2·CW + ⌈log2(D+1)⌉ for squared L2 and CW for L∞,
so sums never overflow. Limits: N ≥ 2, XFER + 3 ≤ 256 and 3N + D − 4 < 65 536
(the controller asserts them). Words in the compare processors must be at
most 64 bits.

## Departures and choices

Taken from the original architecture:

* the (N−1) × D grid of compute processors;
* the four stream directions, and P^1..P^N against P^2..P^N;
* labels travelling with the distances;
* the recurrence b(d+1) = b(d) + |a^i_{d+1} − a^j_{d+1}|^p with b(1) = 0;
* the compare_max rule "if a ≥ c then e,f := a,b; g,h := c,d";
* N−2 compare_max and N−2 compare_min processors plus two hold processors
  that release results under end-of-execution flags;
* serial word transfer followed by a three-clock ALU phase;
* "smallest distance greater than zero" for the closest pair.

This design's own choices:

* 16-bit unsigned coordinates; LSB-first serial links; the unit is sized by
  the widest word (distance), not by the coordinate.
* The injection schedule above (T0 = N − 4, two-unit spacing, one-unit
  column skew) and therefore the unit count 3N + D − 4, compared with the
  3N + D − 1 quoted for the original.
* The chain wiring: both chains climb to row 0, and the min chain is fed
  from the (g,h) outputs of the max chain. (g,h) carries the entry the
  opposite comparison would choose, so it can repeat the winner.
* The reduction order. The original describes the selection as two stages:
  first the largest (and smallest) distance of each of the N−1 rows of T,
  then the extreme of those. Here the chains reduce, each unit, one
  wavefront made of one entry per grid row, and the hold processors
  combine the wavefronts over time. The result is the same extreme; only
  the grouping of the comparisons differs.
* Label 0 marks an empty slot; point indices are 1-based.
* `compare_hold_processor` timing (compare, then update the hold) and
  parallel result ports.
* `point_memory` and the host interface (write port, start/busy/done).
* Reset and clear behaviour: asynchronous reset, plus a synchronous clear
  of every pipeline and hold register at `start`.

Not built: the general L_p metric for p > 2 and the final p-th root. The
root does not change which pair is largest or smallest. The squared-L2
variant returns squared distances, and the L1 and L∞ variants need no root.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_compute_processor` | all three metrics; pass-through of coordinates and labels; one-unit latency; clear |
| `tb_compare_processor` | max and min rules, ties, empty labels, zero distances, loser defined by the opposite comparison |
| `tb_compare_hold_processor` | running extreme against a reference, losers each unit, no release before `finish`, empty runs |
| `tb_compute_array` | N = 7, D = 5: every pair exactly once, in the right row and unit, with the right L1 distance; empty slots elsewhere |
| `tb_selection_network` | random entries, latency of late extremes, zero distances, a single valid entry, all-empty input |
| `tb_point_memory` | all coordinates at default size, ignored out-of-range writes, index 0 reads 0 |
| `tb_stream_controller` | phase sequence, every injected word and label against the schedule, finish pulses, start while busy |
| `tb_diameter_closest_top` | **default size** (N = 100, D = 5): random sets, planted duplicates, all-coincident set, ties, a padded 7-point set; exact clock count; counts compare swaps, hold updates, skipped zero distances and restarts |
| `tb_top_variants` (with `tb_top_run`) | N = 7, D = 5 under L1, squared L2 and L∞; N = 2, D = 1; N = 3, D = 3; N = 16, D = 2 |

The default-size end-to-end run takes under a second of simulation. To run
a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/diam_pkg.sv rtl/*.sv tb/tb_diameter_closest_top.sv \
    --top-module tb_diameter_closest_top -o sim
./obj_dir/sim
```

For `tb_top_variants`, add `tb/tb_top_run.sv` to the file list. The
testbenches read the design through hierarchical references only to count
events (`tb_diameter_closest_top`) or to check a cleared register
(`tb_compute_processor`).

All RTL lints cleanly under `verilator --lint-only -Wall`. The remaining
warnings are the unused rejected outputs at the bottom of the min chain
(`selection_network`) and an unused package constant when a module does
not need it.
