# Noise-immune gradient edge detector

A streaming edge detector for 8-bit grey-level images: one pixel goes in and
one edge-map pixel comes out on every clock cycle, with no frame buffer. The
image is first smoothed with a 5x5 Gaussian whose weights are sums of powers
of two, so the filter needs only shifts and adds. Then the absolute difference
mask (ADM) method finds each pixel's edge strength and direction. Finally the
edges are thinned to one pixel and thresholded. The whole path is a fixed
pipeline: the output for a pixel appears a fixed number of cycles after the
pixel went in. At an image width of 512 that is 2583 cycles.

The RTL follows a published FPGA architecture: a systolic smoothing array,
an ADM strength unit, a localisation unit built from three comparators, and
line buffers whose row length can be switched at run time between 32, 64, 128,
256 and 512 pixels. Where the published description leaves a detail open, the
choice made here is stated in the source comment of the module concerned, and
the main ones are collected under "Interpretations and choices" below.

## Pipeline

```
 pxl_in ─► FIFO0 ──5 px/cycle──► smoothing_unit ─► FIFO1 ──5x5 window──► edge_strength_unit
  8 bit    (4 rows + 5)  (40 bit) 5x5 systolic     (4 rows + 5) (16 of 25  ADM, 4 stages
                                   10 cycles                      pixels)        │ strength 8 + dir 3
                                                                                 ▼
                         edge_out, dir_out ◄── edge_localisation_unit ◄──3x3── FIFO2
                            8 + 3 bit            3 comparators, 1 cycle        (2 rows + 3)
```

| stage | module | latency (W = image width) | at W = 512 |
|---|---|---|---|
| FIFO0, delay to window centre | `window_fifo` (N = 5) | 2W + 3 | 1027 |
| smoothing | `smoothing_unit` | 10 | 10 |
| FIFO1 | `window_fifo` (N = 5) | 2W + 3 | 1027 |
| edge strength | `edge_strength_unit` | 4 | 4 |
| FIFO2 | `window_fifo` (N = 3, 11-bit words) | W + 2 | 514 |
| localisation | `edge_localisation_unit` | 1 | 1 |
| total | `edge_detector_top` | 5W + 23 | 2583 |

`edge_pkg::total_latency(w)` returns the total. Each FIFO's latency is the
delay from its input to the centre of the window it presents.

## Top-level interface (`edge_detector_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `pxl_in` | in | 8 | grey pixel, raster order, one every cycle, no gaps |
| `scl_sel` | in | 3 | image width: 0, 1, 2, 3, 4 = 32, 64, 128, 256, 512 (values above 4 mean 512) |
| `threshold` | in | 8 | an edge pixel's strength must be greater than this |
| `final_sel` | in | 1 | 0: edge pixels come out as 255 (binary map); 1: as their edge strength |
| `edge_out` | out | 8 | edge map pixel, 0 for a non-edge pixel |
| `dir_out` | out | 3 | direction of an edge pixel (see below), 0 otherwise |
| `smt_out` | out | 8 | smoothed pixel (input of FIFO1), for observation |
| `str_out`, `str_dir_out` | out | 8, 3 | edge strength and direction (input of FIFO2), for observation |

There is no valid or frame-start signal. The image is a flat stream, so at the
left and right borders the windows wrap into the neighbouring row, and the top
and bottom rows see the previous and next frame. The first 5W + 23 outputs
after reset, or after `scl_sel` changes, are not meaningful. The row RAMs are
not reset. `scl_sel` can be changed between frames without a reset.

Direction codes (`edge_pkg`) name the direction in which the edge *runs*,
which is the direction of least grey-level change: 1 = `/`, 2 = `|`
(vertical), 3 = `\`, 4 = `-` (horizontal). 0 means "not an edge".

## The power-of-two Gaussian mask

The smoothing weights are those of a 5x5 Gaussian with sigma = 1.7. Each
weight is approximated greedily by at most two power-of-two terms (lambda = 2),
and terms below 2^-7 are dropped:

```
              2^-2        2^-2+2^-3   2^-1        2^-2+2^-3   2^-2
              2^-2+2^-3   2^-1+2^-2   2^-1+2^-2   2^-1+2^-2   2^-2+2^-3
(2^-4+2^-7) x 2^-1        2^-1+2^-2   2^0+2^-3    2^-1+2^-2   2^-1
              2^-2+2^-3   2^-1+2^-2   2^-1+2^-2   2^-1+2^-2   2^-2+2^-3
              2^-2        2^-2+2^-3   2^-1        2^-2+2^-3   2^-2
```

The 25 weights sum to 13.125. The normalisation factor is 1/13.125
approximated by two power-of-two terms, which gives 2^-4 + 2^-7. With this
factor, the summed absolute difference from the exact normalised Gaussian is
0.0926. The older "semi-Gaussian" mask of the original ADM detector is 0.110
away from the same Gaussian.

In hardware every weight is multiplied by 8, giving the integers 2, 3, 4, 6
and 9 (`edge_pkg::MASK_COEF`). Each of them is one or two shifted copies of
the pixel. The combined scale, 2^-3 x (2^-4 + 2^-7) = 9/1024, becomes
`(sum*8 + sum) >> 10`. A flat white image (255) therefore smooths to 235, not
255: the approximated mask has a gain of 0.923. The result is truncated.

## The systolic smoothing array

This part is the hardest to follow. FIFO0 delivers, every cycle, one
*column* of five vertically adjacent pixels `col[0..4]`, where row 0 is the
newest image row. The 5x5 array of `smooth_pe` elements works like this:

* **Pixels move right.** Row r of the array receives `col[r]`, and each
  element passes its pixel to its right-hand neighbour one cycle later. So
  array column c sees the image column that entered c cycles earlier.
* **Partial sums move down.** Each element adds weight x pixel to the sum
  arriving from the element above and registers the result. A sum therefore
  reaches row r exactly r cycles after it left row 0.
* **The delay unit lines them up.** For the sum in array column c to meet
  pixels of one image column in every row, row r's input must lag row r-1's
  by one cycle. The delay unit in front of the array holds row r back by r
  registers.

After row 4, array column c carries the weighted sum of one whole image
column, and the five array columns hold five consecutive image columns. A
5-stage tail adds them (two pairwise adds, then a final add), multiplies by 9
(shift and add) and shifts right by 10:

```
smt(t) = ( sum over r,c of MASK[r][c] * col[r](t-10-c) * 9 ) >> 10
```

Counted from the cycle in which a window's newest column entered, the latency
is 10 cycles: 5 through the array and 5 in the tail. The mask is symmetric,
so the mirror ordering of array columns does not matter.

The elements come in four variants, set by two parameters of `smooth_pe`:

| variant | position | HAS_PRE | HAS_FOUT |
|---|---|---|---|
| upper | top row, columns 0..3 | 0 | 1 |
| upper-right | top-right corner | 0 | 0 |
| general | rows 1..4, columns 0..3 | 1 | 1 |
| right | right column, rows 1..4 | 1 | 0 |

`coef_select` does the weighting: one shifted copy of the pixel per set bit
of the integer weight.

## Scalable line buffers (`scalable_fifo`, `window_fifo`)

One row delay is a single shift register cut into segments:

* N flip-flops first (N = 5 for the 5x5 windows, 3 for the 3x3 window). Their
  outputs are the window taps of that row.
* Then RAM-based delay segments of depth 32-N, 32, 64, 128 and 256, all in
  series. With N = 5 the first segment is 27 deep.
* The output after segment k is exactly 32 x 2^k cycles behind the input. A
  multiplexer on `scl_sel` picks the one that matches the image width.

All segments keep shifting whatever width is selected. The larger widths
therefore cost nothing but the multiplexer, compared with a buffer of fixed
length 512. This is the cheaper of the two published schemes. The other
scheme has five separate buffers and about twice the storage, and is not
built.

`ram_shift_reg` is one segment. It is a DEPTH-word memory with one circular
address counter and an asynchronous read of the word about to be overwritten,
so the delay is exactly DEPTH cycles. This is the shape of an FPGA
distributed-RAM shift register.

`window_fifo` chains N-1 row delays and adds N final registers, for
(N-1) x W + N stages in all: 512x4+5 for FIFO0 and FIFO1, 512x2+3 for FIFO2.
Tap `win[k][j]` is the input 1 + kW + j cycles back: row k = 0 is the newest
row and column j = 0 the newest column. FIFO0 uses only column 0 of its
window, because the smoothing array forms the horizontal extent itself.
FIFO2 stores 11-bit words: the strength plus the direction.

## Edge strength: ADM (`edge_strength_unit`)

The unit compares four directions through the centre of the 5x5 smoothed
window. In each direction it adds the two pixels on one side of the centre,
adds the two pixels on the other side, and takes the absolute difference of
the two sums. That is 16 inputs, 8 additions and 4 absolute differences.
With (dy, dx) the offset from the centre:

| code | edge runs | one side | other side |
|---|---|---|---|
| 1 | `/` | (+1,-1), (+2,-2) | (-1,+1), (-2,+2) |
| 2 | `\|` | (-1,0), (-2,0) | (+1,0), (+2,0) |
| 3 | `\` | (-1,-1), (-2,-2) | (+1,+1), (+2,+2) |
| 4 | `-` | (0,-1), (0,-2) | (0,+1), (0,+2) |

The strength is the largest difference, halved to fit 8 bits. The direction is
the code of the smallest difference; on a tie the lower code wins. There are 4
register stages: sums, absolute differences, pairwise max/min, final max/min.

## Edge localisation (`edge_localisation_unit`)

The unit sees the nine strengths P1..P9 of the 3x3 neighbourhood, numbered
row by row from the top left, and the centre's direction d5. Its steps:

1. Two 4-to-1 multiplexers select, by d5, the two neighbours that lie *across*
   the edge: `/` -> P1, P9; `|` -> P4, P6; `\` -> P3, P7; `-` -> P2, P8.
2. Three 8-bit comparators test P5 > threshold, P5 > the P9-side neighbour,
   and P1-side neighbour > P5.
3. The centre is an edge when the first two tests are true and the third is
   false. On a ridge of equal strengths exactly one pixel therefore survives.
4. Output mux: a non-edge pixel gives 0. An edge gives 255 when
   `final_sel` = 0, or P5 (its strength) when `final_sel` = 1.

The direction output is d5 for an edge pixel and 0 otherwise. Both outputs are
registered.

## Interpretations and choices

These points are not fixed by the published architecture, or are read from
it in one particular way:

* **Mask.** The weights and the 2^-4 + 2^-7 normalisation are the ones that
  reproduce the published approximation error for sigma = 1.7, lambda = 2
  (0.09263).
* **ADM pixels.** Which 16 window pixels feed the four differences is chosen
  here. So are the halving of the strength and the direction codes 1..4, with
  0 meaning "no edge".
* **Which neighbours the localisation compares.** The published text says a
  pixel is compared with its two neighbours "in the edge direction". The
  direction code names the direction of least change, so this design compares
  across it, which gives a true local maximum of the gradient.
* **Tie-break.** The localisation uses one strict and one non-strict
  comparison.
* **Final = 1 output.** With `final_sel` = 1 the localisation outputs the
  centre's edge *strength*. The published text speaks of the original grey
  values, but only strengths travel through FIFO2.
* **Smoothing tail.** The split of the 10-cycle smoothing latency into 5 array
  stages and 5 tail stages is chosen here, as is truncation in the final
  shift.
* **Width select.** The encoding of `scl_sel` is chosen here.
* **Registers.** The pipeline registers ("latches" in the published drawings)
  are edge-triggered flip-flops with synchronous reset.
* **Borders.** There is no border handling, and no valid or frame signal.

Not included: the prototyping board around the detector (ARM7 controller,
LCD, serial link) and the clock-rate claim (73.6 MHz, 280 frames/s at
512x512), which depends on the target device. At one pixel per clock,
280 frames/s of 512x512 needs a 73.4 MHz clock.

## Files

* `rtl/edge_pkg.sv`: widths, the size and direction encodings, the mask, and
  `width_of` and `total_latency`
* `rtl/ram_shift_reg.sv`, `rtl/scalable_fifo.sv`, `rtl/window_fifo.sv`: line
  buffers
* `rtl/coef_select.sv`, `rtl/smooth_pe.sv`, `rtl/smoothing_unit.sv`:
  smoothing
* `rtl/edge_strength_unit.sv`, `rtl/edge_localisation_unit.sv`: ADM and
  thinning
* `rtl/edge_detector_top.sv`: the complete pipeline
* `tb/tb_<module>.sv`: a self-checking testbench per module
* `tb/tb_edge_ref_pkg.sv`: a software model of the whole algorithm, written
  independently of the RTL structure
* `tb/tb_edge_detector_full.sv`: one full 512x512 frame at width 512

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself, and
each has a watchdog. The simulator may be two-state: every register that is
read is reset, and the testbenches compare only outputs whose inputs lie
inside the driven stream. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/edge_pkg.sv tb/tb_edge_ref_pkg.sv tb/tb_edge_detector_top.sv \
    --top-module tb_edge_detector_top
./obj_dir/Vtb_edge_detector_top
```

For a module testbench, replace the last file and the top name, for example
`tb/tb_smoothing_unit.sv` and `tb_smoothing_unit`. `tb_edge_ref_pkg.sv` is
needed only by the two whole-design testbenches.

What the whole-design testbenches check:

* **`tb_edge_detector_top`** streams five images back to back: widths 32, 64,
  32, 128 and 256, without a reset in between. It changes `final_sel` and `threshold`
  between them, and checks `smt_out`, `str_out`/`str_dir_out` and
  `edge_out`/`dir_out` against the model at the latencies in the table above.
  It also requires each behaviour to occur at least once: a width switch,
  binary and strength output, suppression by a stronger neighbour, rejection
  by the threshold, and all four directions.
* **`tb_edge_detector_full`** runs one complete 512x512 frame at the default
  configuration and checks every pixel. It takes about a second.

## Changing it

* **Another mask.** Edit `MASK_COEF` (weights x 8, each at most 4 bits) and
  the normalisation in `smoothing_unit`. Widen `SW`/`TW` in `smoothing_unit`
  if the column or window sums can grow.
* **Another set of widths.** The segment depths come from
  `scalable_fifo::seg_depth`, and `NUM_SIZES`/`MAX_WIDTH` are in `edge_pkg`.
* **A different localisation rule.** Change the `case (d5)` in
  `edge_localisation_unit`, and the matching `case` in
  `tb_edge_ref_pkg::localise`.
