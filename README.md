# Low-power pipelined deinterlacer core

This core turns interlaced video into progressive video. For every pixel of a
line that the current field lacks, it makes two guesses, then blends them:

* a **spatial** guess that interpolates along the strongest local edge
  (45°, 90° or 135°), taken from the lines above and below in the current field;
* a **temporal** guess that takes the same pixel from the previous and the next
  field, trusting the one that better matches its surroundings;
* a **motion weight** that decides how far the temporal guess can be trusted.
  A static scene, including a one-line-thick static horizontal line, gets the
  temporal guess. Motion and "image flow" get the spatial guess.

The algorithm needs many adders, absolute differences, multipliers and
dividers per pixel. The core is therefore built as a **modulo-scheduled pipeline**.
A new pixel starts every 8 clock cycles (the *initiation interval*, II), and each
pixel takes 64 cycles from its first input sample to its output. Because the
expensive operators are reused in different cycles of the 8-cycle interval,
the whole core needs only three multipliers, three dividers and seven
absolute-difference units. With II = 8, a
clock period under 12 ns meets the 96.4 ns pixel period of 720×576 video at 50
fields per second.

## The pixel neighbourhood

```
                x1                 previous / next field (x1p, x1f)
      x2   x3   x4   x5   x6       current field, line above
                x7                 missing pixel (x7p, x7f in the other fields)
      x8   x9   x10  x11  x12      current field, line below
                x13                previous / next field (x13p, x13f)
```

The spatial guess for each direction θ uses a mean `m` of the two pixels that
face each other across x7, and a weighted difference `d` over three parallel
pixel pairs:

| θ    | mean m        | difference d (×4)                          |
|------|---------------|--------------------------------------------|
| 45°  | (x5 + x9)/2   | \|x4−x8\| + 2\|x5−x9\| + \|x6−x10\|        |
| 90°  | (x4 + x10)/2  | \|x3−x9\| + 2\|x4−x10\| + \|x5−x11\|       |
| 135° | (x3 + x11)/2  | \|x2−x10\| + 2\|x3−x11\| + \|x4−x12\|      |

Each direction gets the weight `w = (d_max − d + 1)/(d − d_min + 1)`, and
`y_spatial = Σ w·m / Σ w`. The direction with the smallest difference gets the
largest weight.

The temporal guess is `y_temp = (wp·x7p + wf·x7f)/(wp + wf)`. Its weights use
the same rule as the spatial ones, applied to two candidates. For each
candidate, `D` is the sum of its absolute differences to x3, x4, x5, x9, x10
and x11.

The motion weight is

```
w_temp = max(1 − (|x7f − x7p| + δ) / (2·d_min + 1), 0)
A      = |x4 − x1p| + |x4 − x1f|          (line above x7 vs. the fields' line beyond it)
B      = |x10 − x13p| + |x10 − x13f|      (same below)
δ      = min(A, B) / 2
```

The output is `y7 = (1 − w_temp)·y_spatial + w_temp·y_temp`. The time difference
`|x7f − x7p|` is measured against the finest spatial detail `d_min`. The term δ
checks whether the lines next to x7 in the other fields agree with the current
field. When they disagree both above and below, as in image flow, δ is large and
the spatial guess wins. Taking the better of the two sides matters. A static
thin line that lies on x4's or x10's line disagrees with the other fields on
that side only. A sum over both sides would mistake it for motion. In the
slow-motion test scene below, that mistake doubled the error.

**Departures from the design this core follows.** The temporal weights and δ
above are this core's own choices. The design it follows only describes them:
temporal weights built "similarly" to the spatial ones, and a δ built from
those four differences that is small when the temporal guess is reliable. All
word widths, rounding and the fixed-point formats are also this core's own.
That design also gives a simpler weight, `1 − |x7f − x7p|/(d_min + 1)`, for
easy material. Only the refined formula above is built.

## Fixed-point arithmetic

All pixels are 8 bits. Exact integer ratios replace the fractional formulas:

* Spatial differences are kept as `D = 4d`, so `+1` becomes `+4`:
  `w = floor(256·(Dmax − D + 4)/(D − Dmin + 4))`. All weights have 8 fraction
  bits, from 1/256 up to 256.
* The temporal sums `D` are 6× a mean, so there `+1` becomes `+6`.
* `y_spatial = floor(8·Σ w·(pa+pb) / Σ w)` and
  `y_temp = floor(16·(wp·x7p + wf·x7f)/(wp+wf))`. Both have 4 fraction bits.
* `w_temp = 256 − floor(256·S/(2·Dmin + 4))`, clipped to 0, with
  `S = 4|x7f−x7p| + 2·min(A, B)`.
* `y7 = round((y_spatial·256 + w_temp·(y_temp − y_spatial)) / 4096)`, limited to 255.

## Schedule

A pixel's computation is an *iteration*. Iteration *j* starts in interval *j*
and ends in the last cycle of interval *j*+7. Cycle numbers below count from
the iteration's first cycle (cycle 0 = phase 0 of interval *j*).

| cycles | unit | work |
|---|---|---|
| 0, 8, 16, 24, 32 (phase 0) | `deint_window` | horizontal buses: x2/x8 … x6/x12 |
| 2, 4, 6 | `deint_window` | vertical buses: x1, x7, x13 of the previous and the next field |
| 33 | `spatial_interp`, `temporal_interp` | neighbourhood complete; register the means M, x7p, x7f |
| 33–35 | `spatial_interp`, 3 abs units | D45, D90, D135 |
| 33–36 | `temporal_interp`, 3 abs units | Dp (33–34), Df (35–36) |
| 33–37 | `motion_detect`, 1 abs unit | \|x7f−x7p\| (33), A (34–35), B (36–37) |
| 36–38 | `spatial_interp` divider | w45, w90, w135; d_min registered in cycle 36 |
| 37–39 | `spatial_interp` multiplier | Σ w·M, Σ w |
| 37–38 | `temporal_interp` divider | wp, wf |
| 38 | `motion_detect` comparator, divider | min(A, B), w_temp |
| 39–40 | `temporal_interp` multiplier | wp·x7p + wf·x7f, wp + wf |
| 41 | spatial and temporal dividers | y_spatial, y_temp |
| 42 | `blender` multiplier | y7 |
| 63 | output bus | `y_out`, `y_valid` |

Eight iterations are in flight at once. What makes the sharing work is this:
in any phase, each divider and each multiplier serves at most one iteration.
For example, the spatial divider works for iteration *j* in phases 4–6 of
interval *j*+4. In phase 1 of that same interval it works for iteration *j*−1,
which is finishing its final division. Registers written in one phase keep
their value until that phase comes round again, 8 cycles later. The schedule
therefore needs no extra pipeline copies.

The design this core follows starts some operations as soon as the first
pixels of an iteration arrive, from about cycle 5. This core waits until the
neighbourhood is complete in cycle 33. Its intervals before that are spent only
collecting input, and each block's work fits into two intervals. The operator
counts match that design's schedule: three multipliers, three dividers and
seven absolute-difference units. The cycle in which each operation runs does
not. Between cycle 42 and the output slot
in cycle 63, the result only waits in two interval registers. The output slot is
placed in cycle 63 to keep the 64-cycle latency of the design this core follows.

The 26 absolute differences per pixel are formed by seven shared
absolute-difference units: three in the spatial block, three in the temporal
block and one in the motion detector. The adders that sum differences and the
min/max comparisons are separate small operators in each block. All
operators are combinational and each finishes within one cycle. The
multipliers are Wallace trees: partial products are reduced by layers of 3:2
carry-save adders, and a carry-lookahead adder forms the final sum. The
dividers are restoring array dividers.

## Interface

`deinterlacer` (top) ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ph` | out | 3 | current phase 0..7; the host drives the buses by it |
| `h_valid` | in | 1 | phase 0: the horizontal buses carry a sample |
| `h_top`, `h_bot` | in | 8 | phase 0: next sample of the current-field line above / below the missing line |
| `v_prev`, `v_next` | in | 8 | phases 2, 4, 6: x1, x7, x13 of the previous / next field |
| `y_out` | out | 8 | reconstructed pixel |
| `y_valid` | out | 1 | high for one cycle when `y_out` is new |

How to stream a missing line of width W:

1. In interval k, present the horizontal sample of column k−2 in phase 0. Use
   k = 0 … W+3 and replicate the edge pixels.
2. In phases 2, 4 and 6 of the same interval, present the vertical column of
   column k. This column is the x4 column of iteration k, two samples ahead of
   the horizontal buses.
3. Lower `h_valid` for 4 intervals between lines. An iteration is valid only if
   all five of its horizontal samples were valid, so outputs that would mix two
   lines are suppressed.

Column k comes out 63 cycles after its interval's phase 0. Inside a line there
is one output every 8 cycles. The line and field memories that feed the buses
are outside the core.

## Files

| file | content |
|---|---|
| `rtl/deint_pkg.sv` | widths, fixed-point formats, `win_t` neighbourhood struct |
| `rtl/deint_ctrl.sv` | phase counter, iteration validity, output strobe |
| `rtl/deint_window.sv` | the four input buses, shift registers and vertical delay line |
| `rtl/spatial_interp.sv` | directional means/differences, weights, y_spatial, d_min |
| `rtl/temporal_interp.sv` | candidate weights, y_temp |
| `rtl/motion_detect.sv` | δ and w_temp |
| `rtl/blender.sv` | final mix, rounding, output timing |
| `rtl/divider.sv` | combinational restoring divider (one per computing block) |
| `rtl/wallace_mult.sv` | Wallace-tree multiplier (one per spatial, temporal and blending block) |
| `rtl/cla_adder.sv` | carry-lookahead adder, the final adder of each multiplier |
| `rtl/deinterlacer.sv` | top |
| `tb/deint_ref_pkg.sv` | integer reference model used by all testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_sequence_mse` |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`. For example, for the
full design:

```
verilator --binary --timing --assert -Wno-fatal rtl/deint_pkg.sv tb/deint_ref_pkg.sv \
  rtl/divider.sv rtl/cla_adder.sv rtl/wallace_mult.sv rtl/deint_ctrl.sv rtl/deint_window.sv rtl/spatial_interp.sv \
  rtl/temporal_interp.sv rtl/motion_detect.sv rtl/blender.sv rtl/deinterlacer.sv \
  tb/tb_deinterlacer.sv --top-module tb_deinterlacer -Mdir obj -o sim
./obj/sim
```

`tb_deinterlacer` runs the core at its default settings on a full 720×576
frame: 288 missing lines, 207,360 pixels, about 1.7 million cycles. This takes a
few seconds. The synthetic picture has four regions:

* static texture with thin horizontal lines;
* a moving diagonal edge pattern;
* noise;
* bars moving sideways.

Every output is compared with the reference model, and so is the 63-cycle
delay of every iteration. The testbench also counts how often each behaviour
occurs: pure spatial, pure temporal and mixed weights, each direction winning,
each temporal candidate winning, and pipeline bubbles. The block testbenches
apply thousands of random neighbourhoods and check each result in the cycle the
schedule above says it appears. They also check it in the last cycle it is
still held.

## Quality on interlaced sequences

`tb_sequence_mse` measures picture quality the usual way. It generates
progressive frames at 352×288, interlaces them (frame *t* keeps the lines of
parity *t* mod 2), rebuilds three fields, and computes the mean square error
against the original frames. It does the same for two simple methods: line
averaging and field insertion.

| scene | this core | line averaging | field insertion |
|---|---|---|---|
| slow: static texture, thin horizontal and diagonal lines, object moving 1 px/frame | 121.1 | 912.8 | 10.5 |
| fast: thin static diagonal line, object moving 9 px right and 3 px down per frame | 10.1 | 77.8 | 116.5 |

The core clearly beats line averaging in both scenes. It beats field insertion
when things move. In the almost static scene, field insertion is nearly
perfect, and the core loses mainly on the shallow diagonal line. Spatial
interpolation cannot follow that line, and where it touches both neighbouring
lines the motion detector takes it for motion. The testbench checks the core
against line averaging in both scenes and against field insertion in the fast
scene.

## How far it can be trusted

* All testbenches pass, and each fails when a single deliberate error is put
  into its module.
* The reference model is the formulas above, written again in plain integer
  arithmetic. It shows that the RTL computes *these* formulas exactly. It does
  not show that the chosen temporal weights and δ match the picture quality
  reported for the original design. The standard test sequences ("Salesman",
  "Tennis") were not available. See the next section for synthetic sequences.
* On near-static content with sensor-like noise, the weight formula is
  sensitive. Where `d_min` is only a few grey levels, noise in δ alone can push
  `w_temp` towards 0, and a static thin line can then lose some contrast.
* Timing closure at 83 MHz or more, area and power have not been checked. The
  figures reported for the original design are about 6000 standard cells,
  1.4 mm², about 40 mW and a period under 12 ns in 0.35 µm CMOS.
