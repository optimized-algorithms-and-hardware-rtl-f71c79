# 3x3 median filter without sorting

A 3x3 median filter removes salt-and-pepper (impulse) noise. Each pixel is
replaced by the median of its nine-pixel neighbourhood, so isolated black
or white pixels disappear while edges stay sharp. A sorting network finds
the median by ordering all nine values. Most of that work is wasted, because
only the middle value is needed.

This RTL implements three pipelined 9-input units. None of them sorts. Each
builds a few partial orderings, using compare-exchange cells and some extra
"coupled" swaps. It then keeps discarding values that can no longer be the
median (or the maximum):

| unit | result | comparators | clocks | accuracy |
|---|---|---|---|---|
| `alg1_median9` | median | 17 | 10 | exact for every input |
| `alg2_median9` | median, approximate | 15 | 9 | 82.3% of windows with distinct values; almost always right on natural images |
| `alg3_max9` | maximum (3x3 max pooling) | 8 | 4 | exact |

All three take a new window every clock. `median_filter_top` puts them side
by side behind a line-buffer window generator, so a raster pixel stream goes
in and three filtered streams come out.

The algorithms, their comparator placement and their clock counts come from
H. H. Draz, N. E. Elashker and M. M. A. Mahmoud, *Optimized Algorithms and
Hardware Implementation of Median Filter for Image Processing*. That paper
implemented them in VHDL on a Virtex-5. This SystemVerilog is an independent
implementation. The window generator, the streaming interface, valid/reset
handling and some details of the step sequences are choices made here; they
are listed under "Departures and open points" below.

## Window numbering

A window is the array `P[0..8]` in raster order:

```
P0 P1 P2
P3 P4 P5      P4 = centre pixel
P6 P7 P8
```

The algorithms treat `P` as a plain array: position has no spatial meaning
inside the units. Every comparator `Pi:Pj` is a compare-exchange. Afterwards
`P[i]` holds the smaller value and `P[j]` the larger one. It exchanges only
when `P[i] > P[j]`, so equal values stay where they are.

## The exact median network (`alg1_median9`)

| clock | comparators | coupled swap, done when that comparator exchanged |
|---|---|---|
| 1 | P0:P5, P1:P6, P2:P7, P3:P8 | – |
| 2 | P5:P7 | P0 <-> P2 |
|   | P6:P8 | P1 <-> P3 |
| 3 | P7:P8 | P0 <-> P1, P2 <-> P3, P5 <-> P6 |
| 4 | P6:P7 | P1 <-> P2 |
|   | P3:P4 | – |
| 5 | P5:P6 | P0 <-> P1 |
|   | P2:P4 | – |
| 6 | P4:P6 | P1 <-> P2 |
| 7 | P4:P5 | P0 <-> P2 |
|   | P1:P3 | – |
| 8 | P3:P5 | P0 <-> P1 |
| 9 | P3:P4 | P1 <-> P2 |
| 10 | P0:P4 | result = larger of the two |

**Why the coupled swaps are needed.** Clock 1 creates four ordered pairs:
(P0<P5), (P1<P6), (P2<P7) and (P3<P8). Clock 2 compares P5 with P7. If they
are exchanged, the pairs (P0,P5) and (P2,P7) would be torn apart. Swapping
P0 with P2 as well moves each pair as a whole. After clock 2 there are two
chains:

```
A: P0 < P5 < P7,  P2 < P7
B: P1 < P6 < P8,  P3 < P8
```

Clock 3 compares the two chain tops, P7 and P8. If they are exchanged, the
whole chains change places (P0<->P1, P2<->P3, P5<->P6). P8 is now the
largest of the eight values P0..P3 and P5..P8, and it drops out. The later
clocks work the same way. Each comparator decides which of two values can
be discarded. The coupled swap keeps the values that still depend on that
decision in the right positions. At clock 10 the median is the larger of P0
and P4.

Each clock is one register stage, so the latency is exactly 10 clocks and
the throughput is one window per clock. The 17 comparators are instances of
`cmp_swap`. That cell also outputs a `swapped` flag, which drives the
coupled-swap multiplexers.

This network has been checked against a sorting reference for all 9! =
362,880 orderings of nine distinct values and for 20,000 random windows
with many repeated values. It gave the exact median every time.

## The approximate median (`alg2_median9`)

Clocks 1 and 2 are the same as in the exact network. The unit then assumes
that the two chain tops, P7 and P8, are both above the median, and drops
them without a further check. This saves two comparators and one clock:

| clock | comparators | extra action |
|---|---|---|
| 3 | P5:P6 (coupled P0<->P1), P2:P4 | |
| 4 | P4:P6 | |
| 5 | P3:P5 | |
| 6 | P1:P3 | if P1 > P3, exchange P1 and P3; otherwise exchange P2 and P3 |
| 7 | P2:P4, P3:P5 | |
| 8 | P3:P4 | |
| 9 | P4:P5 | result = smaller of the two |

When the assumption is wrong, the output is a neighbouring rank instead of
the median. Over all orderings of nine distinct values, 298,624 of 362,880
results (82.3%) are the true median. The original description claims 87%;
this implementation reaches about that figure only when the nine values are
drawn from 16 levels, where ties help.
On real images neighbouring pixels are similar and often equal, so misses
are rare. On the 256 x 256 test scene with 10% impulse noise, 369 of 64,516
windows (0.6%) differed from the exact median.

## Maximum (`alg3_max9`)

This unit runs the first three clocks of the exact network without coupled
swaps. That leaves P8 as the maximum of the eight values other than P4.
Clock 4 compares P4 with P8. It needs 8 comparators and has a latency of
4 clocks. It can serve as a 3x3, stride-1 max-pooling unit.

## Streaming filter (`window3x3`, `median_filter_top`)

`window3x3` holds the two previous image lines in two `IMG_W`-entry line
buffers, which synthesise to memories. On each accepted pixel at column x it
reads both buffers at x and forms a new window column {row y-2, row y-1,
row y}. It shifts that column into a 3x3 register array, then writes the
buffers back (row y-1 moves to row y-2, and the new pixel becomes row y-1).

- **When windows appear.** A window is produced once at least three rows and
  three columns have been seen. It belongs to centre pixel (x-1, y-1) and
  appears one clock after the pixel that completes it.
- **Borders.** Border pixels get no window. A frame of `IMG_W` x `IMG_H`
  pixels gives `(IMG_W-2) x (IMG_H-2)` results, in raster order of their
  centres.
- **Frames.** The first pixel after reset is the top-left pixel of a frame.
  Frames follow each other with no gap and need no separator, because a
  column and row counter tracks the raster position.

`median_filter_top` connects the window generator to all three units. The
top has these ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `pix_valid`, `pix` | in | 1, W | one raster-order pixel per clock at most; gaps allowed |
| `med1_valid`, `med1` | out | 1, W | exact median; 1 + 10 clocks after the completing pixel |
| `med2_valid`, `med2` | out | 1, W | approximate median; 1 + 9 clocks |
| `max_valid`, `max_pix` | out | 1, W | 3x3 maximum; 1 + 4 clocks |

There is no back-pressure. Every stage accepts one item per clock, so the
filter sustains one pixel per clock. Only the valid bits and counters are
reset. Data registers are not reset, because they are only read together
with their valid bit.

Parameters:

| parameter | default | where |
|---|---|---|
| `W` | 8 | pixel width, all modules (`median_pkg::PIX_W`) |
| `IMG_W` | 256 | line length; sets the line-buffer depth |
| `IMG_H` | 256 | lines per frame |

The unit latencies are in `median_pkg` (`ALG1_LAT`, `ALG2_LAT`,
`ALG3_LAT`). They set the length of each unit's valid pipeline and must match
its stage structure, which is written out explicitly in each unit; do not
change them on their own.

## Departures and open points

- **ALG1 coupled swaps of clock 2.** The original text ties the P0<->P2 swap
  to the P6:P8 comparator, and P1<->P3 to P5:P7. That pairing breaks the
  orderings set up in clock 1 and does not produce the exact median. The
  opposite pairing, used here, does.
- **Which comparator triggers the later coupled swaps (clocks 4-9).** The
  original does not state this. The assignment here is the one that makes the
  network exact for every input. The clock-9 swap turns out not to affect
  the result; it is kept anyway.
- **ALG1 clock 4.** One illustration of the step sequence suggests P4:P5.
  The text and the comparator diagram both use P3:P4, and so does this design.
- **ALG2 step 4.** The original describes a rotation P5->P4, P6->P5, P4->P6
  after the P4:P6 comparison. Its comparator diagram shows no such move, and
  applying it drops the hit rate to about 40%, so it is left out.
- **ALG2 step 6.** Read as "if P1 > P3 exchange P1 and P3, otherwise
  exchange P2 and P3".
- **ALG2 clock count.** The comparator diagram draws P4:P6 and P3:P5 in one
  column. This design gives them separate clocks, matching the stated nine
  clocks. The two touch different elements, so the result is the same.
- **ALG2 accuracy.** 82.3% here on all distinct-value orderings, against
  the 87% claimed. The premise that P7 and P8 are above the median after
  clock 2 holds for 92.1% of orderings here, against more than 97% claimed.
- **Output registers.** The diagrams show the last comparator of each unit
  driving the output directly. Here its result is registered, which gives
  the stated clock counts (10, 9 and 4).
- **Not included.** The original intends the units to sit next to an
  embedded general-purpose processor. No bus or register map is defined for
  that, so the top exposes plain streaming ports.
- **Timing figures.** The original's timing figures (about 400 MHz on a
  Virtex-5) were not checked here. The RTL puts exactly one compare-exchange
  plus a 2:1 multiplexer between registers, as the original structure does.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=N
failures=M` line.

| testbench | what it checks |
|---|---|
| `tb_cmp_swap` | all 65,536 input pairs |
| `tb_alg1_median9` | two worked examples ({55,201,10,60,40,28,77,11,44} -> 44 and {46,55,48,60,40,28,77,11,44} -> 46); all 9! orderings back to back; 20,000 random windows with ties and input gaps; latency of exactly 10 clocks for every result |
| `tb_alg2_median9` | the same stimulus against a step-by-step software model (`median_ref_pkg::alg2_model`); latency 9; the hit rate must be between 75% and 95% |
| `tb_alg3_max9` | the same stimulus against a linear-scan maximum; latency 4 |
| `tb_window3x3` | three 7 x 5 frames with random gaps; every window, its timing and the count per frame |
| `tb_median_filter_top` | whole filter at default parameters, two 256 x 256 frames; see below |

The `tb_median_filter_top` run works as follows:

- **Frame 0** is a synthetic scene with 10% salt-and-pepper noise.
- **Frame 1** is random data with random input gaps.
- **Checks.** All three output streams are checked, result by result,
  against software references. The run also requires that input gaps, a
  frame wrap, ALG2 misses and removed impulses each occurred at least once.
- **Image quality.** It reports PSNR against the clean scene: about 15.1 dB
  noisy, 35.4 dB after the exact median and 34.6 dB after the approximate
  one.

Reference models live in `tb/median_ref_pkg.sv`.

## Simulating

With Verilator 5, for example the full filter test:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/median_pkg.sv tb/median_ref_pkg.sv tb/tb_median_filter_top.sv \
  --top-module tb_median_filter_top -Mdir obj
./obj/Vtb_median_filter_top
```

The two packages go first; `-y` lets Verilator find each module in the file
of the same name. Replace the testbench file and top module name to run
another testbench. Each one finishes in seconds.

## Files

- `rtl/median_pkg.sv`: shared constants (pixel width, window size, latencies)
- `rtl/cmp_swap.sv`: compare-exchange cell
- `rtl/alg1_median9.sv`, `rtl/alg2_median9.sv`, `rtl/alg3_max9.sv`: the three units
- `rtl/window3x3.sv`: line buffers and window register
- `rtl/median_filter_top.sv`: the streaming filter
- `tb/`: one testbench per module, plus the reference-model package
