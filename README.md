# Real-time disparity post-processor for hybrid stereo vision

A stereo matcher produces a disparity map per frame: for every pixel of the
left image, how far (in pixels) the same scene point is shifted in the right
image. Raw maps contain occluded pixels, false matches in regions without
texture, and streaky noise. This design cleans such a map in real time,
one pixel per clock, for 1280 x 720 frames with 256 disparity levels at
60 frames/s on a 58 MHz clock.

It belongs to a hybrid (active + passive) stereo camera: an infrared
projector is switched on and off on alternate exposures. So each frame comes
with two grey images: a *pattern-on* image, textured by the projected dots,
and a *pattern-off* image, the plain scene. The post-processor uses both:
the textured one to decide where a disparity can be trusted, the plain one
to find object edges that the median filter must respect.

```
 in_disp_l ─┐
 in_disp_r ─┴─> lrcc ──> hf3 ──> vc (9x9) ──────> wmf_chain (7x7, 0..8 passes) ──> out_disp
                                   ^                  ^
 in_pat_on  ──> pix_fifo ──────────┘                  |
 in_pat_off ──> pix_fifo ─────────────────────────────┘
```

| Stage | What it removes or repairs |
|---|---|
| `lrcc` – left-right consistency check | pixels whose left- and right-referenced disparities disagree (occlusions, mismatches) become holes |
| `hf3` – 3-way hole filler | fills each hole with the smallest (farthest, background) valid disparity found by scanning left, right and down from above |
| `vc` – variance check | drops disparities where the pattern-on image has too little texture to match reliably |
| `wmf_chain` – weighted median filter | edge-preserving median of the 7 x 7 neighbourhood, weighted by intensity similarity and distance; also fills small holes |

Disparity value **0 means "hole"** (no valid disparity) everywhere in the
design. All data are 8 bit.

## Stream protocol and frame timing

Every block uses the same stream format: `valid` marks a pixel on this
clock, `sof` marks pixel (0,0), pixels arrive in raster order, exactly W x H
per frame. There is no back-pressure. Gaps inside a frame (`valid` low) are
allowed; the blocks simply hold.

The window-based blocks are pipelines that are R rows and R pixels behind
their input (R = window radius). Their last rows would only come out when the
next frame pushes them. Instead, each block contains a small controller,
`frame_ctrl`, that keeps the pipeline advancing on its own for exactly its
latency after the last pixel of a frame (the *flush*). During the flush the
raster position keeps counting past the last row, so the window logic sees
these positions as outside the frame and reads zeros there.

The block flushes run one after another along the chain. The next frame may
begin only after the whole chain has drained, i.e. after

```
BLANK_MIN = 1 + (2W+2) + (2(4(W+1)+3)+1) + MAX_ITER·(3(W+1)+4) = 34W + 74  cycles
```

of input idle time (43,594 cycles at W = 1280, with all eight median passes
built in). A 720p frame at 60 frames/s on 58 MHz leaves 966,667 - 921,600 =
45,067 idle cycles per frame, so the real-time rate holds. Starting a
frame early is caught by an assertion in `frame_ctrl`.

Each block's latency from input pixel to output pixel, in active clocks:

| Block | Latency |
|---|---|
| `lrcc` | 1 |
| `hf3` | 2W + 2 |
| `mean_calc` (N x N) | R·W + R + 3 |
| `vc` (9 x 9) | 2·(4W + 7) + 1 |
| `wmf` (7 x 7), one pass | 3W + 7 |
| `pp_top`, MAX_ITER passes | sum of the above, 8 passes always in the path |

The total latency does not depend on the run-time pass count: disabled
passes delay the data just as much as enabled ones.

### Run-time settings

The `cfg_*` inputs of `pp_top` are sampled on the `sof` pixel and hold for the
whole frame:

| Input | Meaning | Default used in tests |
|---|---|---|
| `cfg_th_lrcc` | keep a disparity if \|DL − DR\| **<** this | 3 |
| `cfg_hf_en` | hole filling on/off (off passes holes through) | 1 |
| `cfg_th_md` | mean-deviation threshold, unsigned 8.4 fixed point | 88 (= 5.5) |
| `cfg_wmf_iter` | number of median passes, 0..8 | 1 |
| `cfg_lut_we/sel/addr/data` | write the similarity (sel 0) or proximity (sel 1) weight table | — |

The two weight tables reset to Gaussians computed at elaboration; they can
be rewritten between frames.

## Left-right consistency check (`lrcc`)

For pixel x with left disparity d = DL(x), the partner in the right map is
at x − d in the same row. The block stores the last 256 right-map values of
the row in a small buffer addressed by x mod 256, which is enough because
d < 256. If |d − DR(x − d)| < threshold, d is kept, else 0 is written.
Partners left of the image (x − d < 0) and d = 0 give holes.

## Three-way hole filling (`hf3`, `hf_1way`, `hmirror`)

A hole left by the consistency check is usually an occlusion next to a
foreground object, so it should take the *background* disparity, the
smallest valid one nearby. `hf3` looks in three directions and takes the
minimum of what it finds:

* **left-to-right**: a `hf_1way` filler that scans the row in order, remembering the
  last valid disparity and writing it into each hole;
* **right-to-left**: the row reversed by `hmirror`, scanned by a second
  `hf_1way`, then reversed back by another `hmirror`;
* **top-to-bottom**: a vertical `hf_1way` that remembers the last valid disparity of each
  column in a one-row memory.

Each filler restarts from 0 at the start of each row, or for the vertical one
at the top of the frame, so a hole with nothing valid before it stays a hole.

The hard part is alignment. The right-to-left path goes through two
mirrors, each delaying by one row (W beats), plus the filler's register:
2W + 1 beats. The two forward paths and the original pixel are delayed by
fixed delay lines (`delay_line`) to the same 2W + 1 beats. A "minimum of the
non-zero candidates" stage then combines the three paths, and a final mux
replaces only pixels that were holes. Valid pixels are never changed. With
`hf_en` low the mux always takes the original pixel. `hmirror` is a
ping-pong pair of row buffers: one is written in order while the other is
read backwards.

Because the fillers are causal, "above" here means the rows already seen;
the bottom-to-top direction is not searched.

## Variance check (`vc`, `mean_calc`, `win_gen`)

Stereo matching is unreliable where the image is flat. `vc` measures
texture as the *mean absolute deviation* (MD) of the pattern-on image over
a 9 x 9 window, and keeps the disparity only if MD > threshold.

The pipeline is two mean calculators in series:

1. `mean_calc` #1 computes the window mean m(q) of the pattern-on image for
   every pixel q, with 4 fraction bits.
2. The pixel itself, delayed by the first mean calculator's latency so it
   meets its own mean, gives the deviation |m(q) − 16·I(q)| (12 bits, 8.4).
3. `mean_calc` #2 averages these deviations over the 9 x 9 window around p:
   this is MD(p) in 8.4 format.
4. The disparity, delayed by both latencies, passes if MD(p) > `th_md`,
   else becomes 0.

So each deviation is taken from its own neighbourhood's mean, not from the
mean of p's window. This matches the hardware structure of two identical
mean units; the plain formula for mean deviation would use a single mean.

`mean_calc` gets its window from `win_gen`: N − 1 line buffers plus an
N x N register array. Taps outside the frame read 0 (zero padding) and the
divisor is always N², so border means are pulled toward zero. The sum is
the full N x N sum each clock: N row sums, registered, then their
vertical sum. Division by 81 is a multiply by ⌈2^k/81⌉ and a shift, with k
chosen so that the quotient is the exact floor for every possible sum
(`recip_mul` and `recip_shift` in `pp_pkg`).

## Weighted median filter (`wmf`, `wmf_mask`, `wmf_median`, `wmf_chain`)

The median of the 7 x 7 disparity window, where each of the 49 taps votes
with a weight

```
w(q) = round16( S(|I(p) − I(q)|) · P(dx² + dy²) )
S(a)  = exp(−a² / (2·3²))        similarity,  σ = 3
P(r²) = exp(−r² / (2·33²))       proximity,   σ = 33
```

with I the pattern-off intensity. Taps across an intensity edge weigh
almost nothing, so edges stay sharp.

**`wmf_mask`** holds S in a 256-entry table and P in a 32-entry table
(dx² + dy² ≤ 18 in a 7 x 7 window), both 11 bits wide with 2047 standing
for 1.0. Each tap multiplies its two table values (22 bits) and keeps the
top bits: a 5-bit weight from 0 to 15. One clock.

**`wmf_median`** finds the weighted median without sorting. It has one
node for each of the 256 disparity values. Node n adds the weights of all taps
with disparity ≤ n, so node n holds the cumulative histogram up to n, and
no carry chain across nodes is needed. A single unit computes half the total
weight (`total >> 1`). Every node compares its sum with that half (`>`). A
priority encoder returns the lowest node whose sum exceeds it: that is the
weighted median. One register stage for the node sums, one for the
result. Holes (disparity 0) vote with weight 0, so the filter fills a hole
when enough of its neighbours are valid. A window with no valid weight
gives 0.

**`wmf`** is one pass: two `win_gen`s (intensity and disparity), the mask,
the median, and the registers that keep the centre pixel aligned. With
`en` low it outputs the centre disparity with the same latency. It also passes
the intensity along, so passes can be cascaded.

**`wmf_chain`** cascades MAX_ITER = 8 passes; pass i is enabled when
i < `iter`. Repeating the filter therefore costs area, not frame rate.

## Reference-image FIFOs (`pix_fifo`)

The pattern-on pixel must reach `vc` together with its disparity, which has
spent 1 + 2W + 2 clocks in `lrcc` and `hf3`. The pattern-off pixel must reach
`wmf_chain` after `vc` as well. Two first-word-fall-through FIFOs hold
them. Each is written on `in_valid` and read when the matching disparity
appears (`hf_valid` or `vc_valid`). Depths are the next power of two above the
pixels in flight (4096 and 16384 at W = 1280). Assertions flag overflow and
underflow.

## Files

`rtl/` (one module or package per file):

| File | Contents |
|---|---|
| `pp_pkg.sv` | types, hole code, defaults, reciprocal and position helpers |
| `frame_ctrl.sv` | beat enable, raster position, end-of-frame flush |
| `delay_line.sv` | fixed delay (wire, register or circular buffer) |
| `lrcc.sv` | consistency check |
| `hf_1way.sv`, `hmirror.sv`, `hf3.sv` | hole filling |
| `win_gen.sv`, `mean_calc.sv`, `vc.sv` | window generation, mean, variance check |
| `wmf_mask.sv`, `wmf_median.sv`, `wmf.sv`, `wmf_chain.sv` | weighted median filter |
| `pix_fifo.sv` | reference-image FIFO |
| `pp_top.sv` | top level |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), the
package `pp_ref_pkg.sv` with frame-level reference models of every stage,
`tb_pp_top.sv` (end to end at 48 x 32) and `tb_pp_top_full.sv` (one
1280 x 720 frame with all parameters at their defaults). Every testbench
prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pp_pkg.sv tb/pp_ref_pkg.sv tb/tb_pp_top.sv --top-module tb_pp_top
./obj_dir/Vtb_pp_top
```

Replace `tb_pp_top` by any other testbench. The block testbenches use small
frames (8 x 5 up to 24 x 16) and finish in seconds. `tb_pp_top` takes about
a minute to build. It runs four frames: with input gaps, with hole filling
off, and with 0, 1 and 2 median passes. It checks every stage tap against the
reference models and counts each mechanism (consistency holes, fills, kept
holes, variance drops, median changes). It fails if one of them never
happened.

`tb_pp_top_full` runs one full-size frame and compares every stage with
the models (3.7 million checks). Building it takes about three minutes and
running it about nine, mostly spent in the eight 7 x 7 median passes
evaluated on every clock.

## Departures from the source description and choices made here

* **Hole code.** 0 marks an invalid disparity. The algorithm description
  speaks of −1, but the hardware diagrams test for 0. 0 keeps the data
  unsigned 8-bit.
* **Consistency threshold** is strict (`<`). One description says "less
  than or equal"; the formula uses `<`.
* **Frame protocol and flush** (valid/sof, self-flushing pipelines, minimum
  blanking) are this design's own. The source gives only the frame rate and
  clock.
* **Borders**: windows are zero-padded. Means still divide by N².
* **Fixed point**: means carry 4 fraction bits so the threshold 5.5 is
  exact. The median weights keep 4 bits (16 levels). Table scale and rounding
  are this design's choice.
* **Similarity/proximity pairing**: σ = 3 on intensity difference, σ = 33 on
  distance, following the parameter names.
* **Tables and settings are writable** registers instead of ROMs, so the
  parameters can be tuned per scene (the source asks for run-time
  parameters except the window sizes).
* **Median iterations** are built as eight cascaded passes with bypass; how
  the source repeats the filter in real time is not stated.
* **Holes do not vote** in the median.
* **Hole-filler start value** is 0. The nearest-valid search restarts every
  row (every frame for the vertical filler).
* **Mean deviation** follows the two-mean-calculator structure (per-pixel
  mean), not the single-mean formula.
* Not included: the stereo camera head, rectification and pre-filters, the
  stereo matcher that produces the two raw maps, and the FPGA board. The
  post-processor's inputs are the matcher's two disparity maps and the two
  grey images.

## Verification status

Every module has a testbench that compares it with an independent model:
a per-frame reference in `pp_ref_pkg` for the stream blocks, or direct
arithmetic for the table, median and FIFO units. Each testbench was also
run against a copy of its module with one deliberate bug, and each caught
it. `tb_pp_top` passes at 48 x 32 with two median passes.
The full-size top passes Verilator lint and Yosys elaboration. Its gate-level
synthesis is slow: it holds 8 x 256 median nodes of 49 inputs each.
