# Multifunctional rank image processor (3x3 window, sorting-network based)

Many non-linear image operations — minimum and maximum filters (erosion and
dilation), the median, any other order statistic, and the differences between
such statistics — reduce to one step: sort the pixels of a small window and
pick values out of the sorted vector by their position (their *rank*). This
design does exactly that in hardware, once per pixel clock. A serial raster
stream enters a register window memory. Every 3x3 window is sorted by a
pipelined network of compare-and-swap cells. The processor then has two
outputs. On the first, two rank switches pick two ranks, and a small output
stage turns them into a rank, a rank difference, a complement against full
scale, a sum or a mean, scaled by a gain. On the second, the sorted window is
cut into its rank differences, the steps between consecutive values on the
way from 0 to full scale. A selection of these steps is added up. Which
ranks, which function and which differences are used is set by a control
word *Y*. Changing *Y* turns the same hardware into a median filter, an erosion or dilation, a local
contrast (max − min) detector, an inverted rank filter, and so on.

The default size is a 64 x 64 image, 8-bit pixels, a 3 x 3 window and one
pixel per clock. The intended rate is 40 Mpixel/s, i.e. a 25 ns cycle.

## Data path

```
pix ──► window_mem ──A1..A9──► sort_mchws ──ranks[0..8]──┬──► rank_diffs ──rank_diff[0..7]──► rdiff_wsel ──► out_d
 (serial,   (2 rows + 3 px        (9 pipelined            │                 (+ min, max)       (dsel)
  1/clk)     of registers)         compare/swap layers)   ├──► rank_mux (sel_a) ──a──┐
                                                          └──► rank_mux (sel_b) ──b──┴► wsel_unit ──► out_y
                                                                                       (fn, gain)
```

| stage | module | latency |
|---|---|---|
| window forming | `window_mem` | window valid on the edge that accepts its last pixel |
| sorting | `sort_mchws` (built from `cmp_swap`) | N = 9 clocks |
| neighbour differences | `rank_diffs` | combinational, with the ranks |
| rank switches | `rank_mux` x 2 | combinational |
| first output: function of two ranks | `wsel_unit` | 1 clock |
| second output: sum of selected rank differences | `rdiff_wsel` | 1 clock |

A pixel accepted at clock edge *t* closes a window. The sorted `ranks` (and
`rank_diff`) appear at edge *t*+9. `out_y`, `out_d`, `out_a` and `out_b`
appear at edge *t*+10. One window is processed per clock and the pipeline never stalls. Idle input
clocks (`pix_valid` low) travel through as invalid slots.

## The sorting unit

`sort_mchws` is a *homogeneous* network: every layer is the same row of
compare-and-swap cells. The only thing that changes from layer to layer is
which lanes they pair. Even layers pair lanes (0,1), (2,3), (4,5), (6,7); lane 8
passes through. Odd layers pair (1,2), (3,4), (5,6), (7,8); lane 0 passes
through. Each `cmp_swap` cell compares its two lanes and routes the smaller
value to the lower lane and the larger to the upper. This is odd-even
transposition sorting. A known property of this network is that N
alternating layers fully order any N inputs. The testbench checks the odd
lane count (N = 9) and an even one (N = 8).

Each layer ends in a register, so the network is a conveyor: a new window
enters every clock and each window moves one layer per clock. The critical
path per stage is one 8-bit comparison and one 2:1 selection, independent of
N. The cost is N·⌊N/2⌋ cells (36 for N = 9) and N x N x 8 pipeline flip-flops.
A Batcher or optimal 9-input network needs fewer cells (25) but is not
homogeneous.

Output order is **ascending**: `ranks[0]` is the minimum, `ranks[4]` the
median, `ranks[8]` the maximum. Rank *r* is the (r+1)-th smallest value. In
the 1-based order-statistic notation, the first order statistic is the minimum
(the n-input conjunction of continuous logic) and the n-th is the maximum
(the disjunction). Below, x(r) stands for `ranks[r]`.

## Window memory

`window_mem` is a shift-register chain (K−1)·IMG_W + K = 131 pixels long. The
newest pixel is at position 0. The window sample in row *r* back and column
*c* back is chain tap *r*·IMG_W + *c*. In the processor's naming, A1 is the
newest pixel and A1, A2, A3 form the current row, each shifting into the next
per accepted pixel. A4–A6 form the row above and A7–A9 the row above that.

Row and column counters follow the raster. A window is output only if it lies
wholly inside the image, i.e. its newest pixel is at column ≥ 2 and row ≥ 2.
A 64 x 64 frame therefore gives 62 x 62 results, and no window ever mixes
pixels from both ends of a row or from two frames. `pix_sof` on a pixel
forces it to position (0,0), which restarts a frame at any time. Without it
the counters wrap after 64 x 64 pixels. `win_row`/`win_col`, and the output's
`out_row`/`out_col`, give the position of the window's bottom-right (newest)
pixel. The window centre is one row and one column earlier.

## Output functions and the control vector Y

`ctrl` (type `dmip_pkg::ctrl_t`) is the control vector Y:

| field | width | meaning |
|---|---|---|
| `sel_a` | 8 | rank taken by switch 1 (0 = min ... 8 = max; larger codes give 8) |
| `sel_b` | 8 | rank taken by switch 2 |
| `fn` | 3 | output function, below |
| `gain` | 4 | weight, unsigned with 2 fraction bits: 4 = x1, 1 = x0.25, 15 = x3.75 |
| `dsel` | 16 | rank differences summed on the second output (bits 0..N used) |

With *a* = `ranks[sel_a]`, *b* = `ranks[sel_b]` and D = 255:

| `fn` | value before weighting |
|---|---|
| `FN_RANK_A` | a |
| `FN_RANK_B` | b |
| `FN_BDIFF` | bounded difference max(a − b, 0) |
| `FN_NONEQ` | nonequivalence \|a − b\| |
| `FN_COMPL` | complement D − a |
| `FN_CDIFF` | D − \|a − b\| |
| `FN_SUM` | a + b |
| `FN_MEAN` | ⌊(a + b)/2⌋ |

`out_y` = min(D, ⌊value · gain / 4⌋). Examples: median = `sel_a=4, fn=FN_RANK_A`;
dilation = `sel_a=8`; local range = `sel_a=8, sel_b=0, fn=FN_BDIFF`; step
between the maximum and the next value = `sel_a=8, sel_b=7, fn=FN_BDIFF` (also
on `rank_diff[7]`). Y is treated as static. Change it only while no valid
window is in the pipeline (at least 10 clocks after the last pixel), or
outputs in flight will mix the old and new settings.

## Second output: selecting rank differences

With the sorted window x(0) ≤ ... ≤ x(8) and the references 0 and D, the
interval [0, D] splits into ten consecutive steps:

e(0) = x(0) − 0, e(i) = x(i) − x(i−1) for i = 1..8, e(9) = D − x(8).

`out_d` is the sum of the steps whose `dsel` bit is set. The steps always add
up to D, so every selection lands in [0, D] and needs no limiting. An
assertion in `rdiff_wsel` checks this. One adder covers many functions:

| `dsel` bits set | `out_d` |
|---|---|
| 0..r | rank x(r) (bit 0 alone: minimum; 0..8: maximum) |
| r+1..9 | complement D − x(r) |
| a+1..b | difference x(b) − x(a) (e.g. bits 7..8: max − x(6)) |
| i alone | one neighbouring difference |
| 0..9 | D |

The original description of this processor names the method, weighting and
selecting the differences of ranks under a control vector, but gives no
circuit for it. The formulation above, including the two reference steps,
is this design's reading of that method.

## Interface of the top, `dmip3`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `pix_valid`, `pix_sof`, `pix` | in | 1, 1, 8 | serial raster input; start-of-frame flag |
| `ctrl` | in | `ctrl_t` | control vector Y |
| `ranks_valid`, `ranks` | out | 1, 9 x 8 | sorted window |
| `rank_diff` | out | 8 x 8 | `ranks[i+1] − ranks[i]`, valid with `ranks_valid` |
| `out_valid`, `out_y` | out | 1, 8 | processed pixel |
| `out_d` | out | 8 | second output: sum of the rank differences selected by `dsel` |
| `out_a`, `out_b` | out | 8, 8 | the two switched ranks |
| `out_row`, `out_col` | out | 6, 6 | position of the window's newest pixel |

Parameters: `IMG_W`, `IMG_H` (64), `K` (3). N = K·K follows from K. Pixel width,
D and the Y field widths are in `dmip_pkg`.

A processor with a single output (rank filter only) is this design used with
`fn = FN_RANK_A` and only `out_y` or `out_a` connected. The unused switch and
function logic is then removed by synthesis if `ctrl` is tied to constants.

## What is specified and what was chosen here

Taken from the original design: the serial input with a register window
memory that scans windows automatically; the 64 x 64 image and 3 x 3 window;
a pipelined sorting unit made of layers of digital comparison-switching
circuits; selection by rank with multiplexers ("switches"), two of them;
processing of ranks and rank differences (bounded difference, nonequivalence,
complement against the reference D = 255, selection, weighting, addition),
chosen by a control vector Y; one pixel per 25 ns cycle.

Choices made for this RTL, where the original is silent:

- The network is odd-even transposition with a register after every layer.
  Only "layers of comparison-switching circuits in a homogeneous conveyor" is
  given.
- The output is ascending (rank 0 = minimum). This follows the
  order-statistic definition, where the lowest rank is the minimum. The
  original's waveform labels are numbered from the largest value down, so
  their numbering is reversed.
- Pixels are 8 bits, since the reference level is 255.
- The encoding of Y, the list of eight functions, the 4-bit gain with 2
  fraction bits, and limiting to 255 are this design's choices.
- Out-of-range rank codes select the maximum.
- For border handling, only windows wholly inside the image are output.
  `pix_valid`/`pix_sof` framing, the position outputs and the asynchronous
  reset are also this design's choices.
- The all-neighbour-differences output `rank_diff` is built as 8 parallel
  subtractors.
- The second output is a 0/1 selection of the ten steps e(0..9). Multi-bit
  weights are used only on the first output.
- Not modelled: the 10-input parallel-input variant mentioned alongside this
  design, and anything about the target FPGA (device, clock, power).

## Verification

Each module has a self-checking testbench in `tb/`, and every one ends with a
line `TB_RESULT checks=N failures=M`:

- `tb_cmp_swap`: all 65 536 input pairs.
- `tb_sort_mchws`: random, repeated and extreme 9- and 8-lane vectors with
  random gaps. Checks the result against a software sort, and checks that each
  vector leaves exactly N clocks after it entered.
- `tb_window_mem`: 7 x 5 frames with idle clocks, frame wrap-around and a frame
  restarted part-way. Checks all nine taps, the positions and the suppression
  of border windows.
- `tb_rank_mux`, `tb_rank_diffs`, `tb_wsel_unit`: exhaustive select codes;
  random sorted vectors; every function and gain against an integer model,
  including limiting and zero-clipped differences.
- `tb_rdiff_wsel`: rank, complement, difference and random selections against
  sums computed from the sorted values.
- `tb_dmip3`: end to end at the default size, with no parameter overrides.
  Streams ten 64 x 64 frames, one per setting of Y, covering all eight
  functions, ten difference selections on the second output, an
  out-of-range rank code, gains below and above one, random idle clocks and a
  frame broken off and restarted. A software model checks every ranks vector,
  rank difference, switched rank, output, position and the 9/10-clock
  latencies. It also counts each of these mechanisms and fails if
  one never occurred. It runs in well under a second.
- `tb_dmip3_rank_images`: a 64 x 64 test image (disc on a ramp with
  salt-and-pepper noise), processed at ranks 0, 1, 2, 3, 7 and 8 and as the
  difference of ranks 3 and 2. Each rank is produced on both outputs at once,
  and both are checked against software order statistics. It also checks
  that the rank images never decrease with rank and that the difference image
  equals the subtraction of the two rank images.

Run one with Verilator (shown for the top; substitute the testbench name):

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dmip_pkg.sv tb/tb_dmip3.sv --top-module tb_dmip3 -o sim
./obj_dir/sim
```

Every file in `rtl/` lints without errors under `verilator --lint-only -Wall`. The only warnings
are about the package constant `GAIN_ONE`, which only the testbenches use,
and about `rst_n` in the `disable iff` of the two assertions (SYNCASYNCNET).
The files also elaborate with the slang front end of yosys. After yosys coarse
synthesis the top has about 580 word-level cells and 1 883 flip-flop bits:
657 in the sorting pipeline and 1 073 in the window memory. No timing closure
or FPGA fit has been done.
