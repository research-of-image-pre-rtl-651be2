# Streaming image pre-processing for FPGA: YUV→RGB, adaptive Canny and parallel Hough

This RTL performs the first stages of machine vision on the pixels of a camera, one pixel per clock,
without storing a frame. It has three streaming engines:

* a **colour converter** that turns 8-bit YUV into clamped 8-bit RGB in four pipeline stages;
* a **Canny edge detector** whose high and low thresholds are not fixed. They are found
  automatically from a histogram of the gradient values of each frame;
* a **Hough line transform**. It computes the ρ of one edge pixel for all 51 angles at once, in a
  50-stage shift-and-add pipeline with no multipliers and no sine/cosine tables. A 102-column
  accumulator then votes in parallel, and a local-maximum scan extracts the lines.

```
            ┌─────────┐ rgb
 Y,U,V ───┬─► yuv2rgb ├──────►
          │ └─────────┘
          │ Y  ┌──────────────────────── canny_edge ───────────────────────────┐ edge bit, addr
          └────► gauss ─► grad ─► nms ─┬──────────────────► dual_thresh ───────┼─┬──────────►
               │ 5x5     5x5 x4   3x3  └─► adaptive_thresh ─ th_h,th_l ─┘       │ │
               └────────────────────────────────────────────────────────────────┘ │
                 ┌──────────────────────── hough ───────────────────────────┐     │
                 │ hough_pipe (50 stages) ─► 102 x hough_acc_ram ─► hough_peak ├◄────┘
                 └──────────────────────────────────────────────────────────┘  line flags per ρ
```

The default configuration is a 360×280 image with 8-bit pixels, a 100-bin gradient histogram of
12-bit counters, a 50-stage Hough pipeline with angle step tan Δθ = 2⁻⁵, and 102 accumulator RAMs of
481 × 8 bits.

## Frame protocol

Every engine takes a raster-order stream: `in_valid` marks a pixel, and rows follow each other
with no gaps required. The only handshake is `busy`. When the last pixel of a frame has been taken,
the window stages must still produce the outputs for the last two rows. The Hough transform must
still drain, and the accumulators must be read out. `ipp_top.busy` stays high for all of this, and
the source must not send pixels while it is high. Assertions in `window_gen`, `canny_edge`,
`hough` and `hough_acc_ram` catch a source that does. At 360×280 the Canny tail is about
6·W + 20 clocks and the Hough read-out 482 + 55 clocks, so a normal video blanking interval covers
both. Pixels may also arrive with any number of idle clocks between them.

The colour converter has no frame state. It always answers 4 clocks after its input: the output is
registered on the third rising edge after the edge that took the input.

## Sliding windows (`window_gen`)

All neighbourhood operators share one generator. It holds K−1 line buffers of one image row each
and a K×K register window. For each new pixel, every window row shifts one place to the left. The
right-hand column is loaded with the new pixel at the bottom and the line-buffer outputs above it.
The line buffers are then written with the column, moved one row up. The window centre therefore
lags the input by (K/2)·W + K/2 pixels.

The generator keeps its own row and column counters and emits exactly one window per image pixel,
tagged with the centre's row and column. A `border` flag is set when the window reaches outside
the image. After the last pixel of a frame it inserts (K/2)·W + K/2 flush shifts of its own
(`busy`), so the last rows come out without waiting for the next frame. Stages using it:
`gauss_filter` (5×5 of pixels), `grad_calc` (5×5 of smoothed pixels), `nms` (3×3 of
{direction, magnitude}) and `dual_thresh` (3×3 of {weak, strong} flags).

## The Canny chain (`canny_edge`)

1. **Gaussian smoothing** (`gauss_filter`). This is the integer 5×5 template
   `1 2 3 2 1 / 2 4 6 4 2 / 3 6 7 6 3 / 2 4 6 4 2 / 1 2 3 2 1`, whose weights sum to 79. The sum is
   normalised by multiplying by 830 and shifting right by 16 (830 ≈ 2¹⁶/79), so no divider is
   needed. Pixels closer than two pixels to the border pass through unchanged.
2. **Gradient** (`grad_calc`). Four 5×5 difference templates measure the edge strength across
   the horizontal (`KERN_H`), vertical, top-left→bottom-right and top-right→bottom-left axes
   (`ipp_pkg`). The largest absolute response wins. Its value divided by 8 is the gradient
   magnitude, and its template gives a 2-bit direction code: `00` horizontal, `01` vertical,
   `11` left diagonal, `10` right diagonal. Ties go to the template listed first.
3. **Non-maximum suppression** (`nms`). A 3×3 window carries magnitude and direction together, so
   the centre always sees its own direction. The centre is kept only if it exceeds the
   neighbour on one side of its direction and is at least equal to the neighbour on the other side.
   Otherwise, and on the border, it becomes 0. The asymmetric test keeps exactly one pixel of a
   flat two-pixel ridge.
4. **Adaptive thresholds** (`adaptive_thresh`). See below.
5. **Hysteresis** (`dual_thresh`). Each pixel becomes a strong flag f1 = g > th_h and a weak
   flag f2 = th_l < g < th_h. Both ride in a 3×3 window, whose line buffers supply the delay
   that a separate FIFO for f2 would. The output edge bit is
   `f1 | (f2 & any of the 8 neighbours' f1)`. Neighbours outside the image count as 0. This is
   a single-pass, one-neighbour-deep hysteresis: a weak pixel survives only if it touches a strong
   one directly.
6. **Addresses** (`addr_gen`). Each edge bit is given the linear address `BASE + row·W + col` in
   the frame store. The counter restarts after the last pixel of every frame.

### How the thresholds are found

Most suppressed gradient values of natural images lie between 0 and 100. Values 1…100 are counted in
100 saturating 12-bit counters. Zero is not counted, since suppressed pixels would swamp it, and
values above 100 are ignored. The counters are cleared by the first pixel of each frame.

When the frame's last pixel has been counted, a search walks the histogram from bin 1 upward, one
bin per clock. Two registers hold h[i] and h[i+1]. One clock later the difference |h[i] − h[i+1]|
is formed, and it is treated as zero when it is not larger than `DIFF_TH` (default 0). The first
bin whose difference is zero ends the walk. That bin index is the high threshold, and half of it
(a right shift) is the low threshold. The idea: the histogram falls steeply over the many
weak-texture values, and the first place where it flattens is where real edges begin. If the walk
reaches bin 99 without a zero difference, th_h = 100. After reset the thresholds are 100/50.
`th_valid` pulses for one clock when new values load, about 100 clocks after the frame.

The edge detector never holds a frame. The thresholds of frame *n* therefore become available only
after frame *n* has passed, and they are applied to frame *n+1*. The first frame after reset is
cut at 100/50. This is the main behavioural point to keep in mind when using the block on single
images: send the image twice.

Timing: the edge bit for input pixel *p* is registered 7 clocks after pixel *p + 6W + 6* has been
taken (two 5×5 windows and two 3×3 windows, plus one register per stage).

## The Hough transform (`hough`)

Each edge pixel is converted to coordinates about the image centre, x = col − W/2 and
y = row − H/2. Its ρ for the angle θ is ρ = x cos θ + y sin θ. Rotating the pair
(ρx, ρy) = (x, y) by a small angle Δθ with tan Δθ = 2⁻⁵ gives

```
ρx(i+1) = ρx(i) + ρy(i)·2⁻⁵
ρy(i+1) = ρy(i) − ρx(i)·2⁻⁵
```

Here ρx(i) is ρ at angle iΔθ and ρy(i) is ρ at angle 90° + iΔθ, both scaled by 1/cos^i Δθ. The
scale is ignored: it grows to 1.025 after 50 steps. Each step is one adder, one subtractor and two
fixed shifts. `hough_pipe` chains 50 of them, so every stage i ∈ 0…50 offers two ρ values, and a
new pixel can enter every clock. The registers carry 8 fraction bits. Without them the truncations
of 50 steps would add up to several ρ units. The address `round(ρ) + RHO_MAX` of stage i goes to
accumulator RAM 2i (ρx) and RAM 2i+1 (ρy). Together the 102 RAMs cover θ from 0 to about
180° (90° + 50 · 1.79°) in 1.79° steps.

`hough_acc_ram` is one 481-entry, 8-bit vote counter with a synchronous read. A vote reads its
cell, and one clock later writes back the value plus one, saturating at 255. When two votes to the
same cell come on consecutive clocks, the second read returns stale data. A bypass forwards the
value just written instead. `hough.bypass_cnt` counts how often this happens; it is common, since
neighbouring pixels of a line share ρ.

`hough_peak` starts NSTAGES + 4 clocks after the last pixel, once the last votes are written. It
reads the row at ρ = 0, 1, … 480 of all 102 RAMs at once, and shifts the rows through a
102-column × 3-row window. Columns are ordered by angle: RAMs 0, 2, …, 100 (0°…89°) then
1, 3, …, 101 (90°…179°). A cell is a line when it is at least equal to its 8 neighbours and
greater than `peak_th`. Rows and columns outside the array count as 0. For each ρ, one 102-bit row of
line flags is written to the external memory at address ρ (`ext_we/ext_addr/ext_data`; bit k
belongs to RAM k). The read clears the cells, so the accumulators are empty for the next frame.
After reset one clearing scan runs with the writes suppressed. `done` pulses when the last row has
been written.

`ipp_pkg::hough_rho_max(W, H)` sizes the ρ range as the half-diagonal × 1.04 + 2. This is 240 for
360×280, giving 481 ρ rows and a 9-bit row address.

## Colour conversion (`yuv2rgb`)

With u = U − 128 and v = V − 128 (signed), and each product shifted right by 8 (floor):

```
rdif = v + (v·103 >> 8)              r = Y + rdif
gdif = (u·88 >> 8) + (v·183 >> 8)    g = Y − gdif
bdif = u + (u·198 >> 8)              b = Y + bdif
```

These are the BT.601 factors 1.402, 0.344, 0.714 and 1.772, split into an integer part and an 8-bit
fraction. Results are clamped to 0…255. The four stages are: removal of the 128 offset, the four constant
products, the three differences, and the final sums with clamping.

## Design choices and departures

* The gradient templates and their /8 scaling are this design's own. Only the four directions and
  their codes are fixed.
* The hysteresis is one neighbour deep (single pass), not the recursive edge tracking of
  software Canny.
* Thresholds lag one frame, as explained above.
* The Hough stage covers 0°…179° with 51 × 2 angles at the angle step of tan Δθ = 1/32. The image
  size for the Hough transform is taken from the edge image (360×280). The accumulator depth and
  width (481 × 8) are this design's own.
* Peak extraction uses "not smaller than" against the 8 neighbours, so a plateau gives several
  neighbouring flags. The column order by angle is this design's own.
* The video decoder in front of the converter, the frame store that takes the edge bits, the external
  RAM for the Hough line flags and the clock generator are outside this RTL. Their signals are ports
  of `ipp_top`.
* Memory budget at the defaults: the Canny line buffers take 31,680 bits and the Hough accumulators
  392,496 bits, 431,408 in all. Synthesis of `ipp_top` gives about 10k cells and 3k flip-flops
  besides the memories. On a small FPGA, reduce `ACC_W` or the image size.

## Files

| File | Contents |
|---|---|
| `rtl/ipp_pkg.sv` | types, Gaussian and gradient templates, helper functions |
| `rtl/window_gen.sv` | line buffers + K×K window |
| `rtl/gauss_filter.sv`, `grad_calc.sv`, `nms.sv`, `adaptive_thresh.sv`, `dual_thresh.sv`, `addr_gen.sv` | Canny stages |
| `rtl/canny_edge.sv` | Canny chain and frame tail |
| `rtl/hough_pipe.sv`, `hough_acc_ram.sv`, `hough_peak.sv`, `hough.sv` | Hough transform |
| `rtl/yuv2rgb.sv` | colour converter |
| `rtl/ipp_top.sv` | top level |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulation

Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a watchdog. Each
testbench computes its expected values with its own model, written independently of the RTL:
the integer formulas of the converter, a frame-at-a-time Canny of the same definition, or the
ρ recurrence and peak rule evaluated over the whole edge image. Block testbenches use small images (e.g. 24×16) through parameter overrides.
`tb_ipp_top` runs the whole design at its default size, 360×280. It sends three synthetic frames
(a noisy background with a rectangle, a disc and a diagonal bar) and checks every RGB pixel, every edge bit, the thresholds and every
Hough line-flag row against its models. It also counts each mechanism at least once: clamping,
window flushing, threshold changes, weak edges promoted and dropped, accumulator bypasses and peaks.
The run takes about a minute to build and a few seconds to simulate.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ipp_pkg.sv tb/tb_ipp_top.sv --top-module tb_ipp_top
./obj_dir/Vtb_ipp_top
```

Replace `tb_ipp_top` with any other `tb_<block>` to run a block test. Parameters such as
`IMG_W`, `IMG_H`, `NSTAGES`, `SHIFT`, `FRAC`, `ACC_W`, `NBINS`, `CNT_W` and `DIFF_TH` are
passed down from `ipp_top`. Keep `NRAM = 2·(NSTAGES+1)` and `RHO_MAX` at least
`ipp_pkg::hough_rho_max(IMG_W, IMG_H)`.
