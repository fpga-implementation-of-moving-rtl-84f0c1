# Wavelet-domain moving-object and face detector with an adaptive threshold

This design compares two grey-scale images of the same scene and keeps only
what differs between them. The images are an actual frame and a background
frame, or a test face and a database face. The comparison is not done on raw
pixels. Each image is first smoothed by a 3x3 Gaussian filter and reduced to
the LL band of a one-level CDF 5/3 wavelet transform. The LL band is a
quarter-size, low-pass copy of the image that keeps most of its content and
drops noise.

A difference between the two LL bands counts as "object" only where it is
larger than a threshold computed for that coefficient:

    AT_i = S + LL2_i,      S = sum over all pixels (A - B)^2 / (8 * N)

Here A and B are the two filtered images, N is their pixel count and LL2 is
the reference LL band. So the threshold rises when the two frames differ
everywhere, for example under a global change of lighting. It also rises
where the background itself is bright. The surviving object coefficients are
smoothed once more and leave as the object image.

For face recognition the same object stream goes to a matching unit. The
unit counts coefficients whose value is at most 10, the part of the image
where the two faces cancelled out. It declares a match when that count
reaches a global threshold.

The arithmetic uses only adders, shifters and registers, with one squarer in
the threshold unit. There are no multipliers in the filters.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable and uses a
single clock with a synchronous, active-high reset.

## Data flow

```
image_in  -> Gaussian 3x3 -> Image1 -> 2D-DWT (LL) -> LL1 --------------------+
                               |                                               v
                               +--> adaptive threshold <- LL2      background subtraction
                               |        |  AT = S + LL2                |  |LL2-LL1| > AT ? : 0
image_ref -> Gaussian 3x3 -> Image2 -> 2D-DWT (LL) -> LL2 -------------+      v
                                                                        Gaussian 3x3 (LL size)
                                                                              |
                                                   image_out <---------------+
                                                                              v
                                           global_threshold -> matching unit -> match
```

| Module | Role |
|---|---|
| `face_object_detect_top` | the whole detector and the frame flow control |
| `gaussian_filter` | 3x3 Gaussian filter of one frame: window, kernel, borders, flush |
| `window3x3` | shift-register line buffer giving the 3x3 neighbourhood a11..a33 |
| `gaussian_kernel` | (corners + 2 x edges + 4 x centre) >> 4, registered |
| `dwt_2d_ll` | LL band of a one-level 2D DWT, flipping architecture |
| `dwt_1d_lpf` | 5/3 low-pass filter with down-sampling by 2 |
| `dwt_memory_unit` | 32768-word transpose memory |
| `dwt_controller` | write and transposed-read address generator |
| `adaptive_threshold` | S accumulation and AT = S + LL2 |
| `bg_subtraction` | max/min, subtraction and threshold comparison |
| `matching_unit` | tolerance counter and global-threshold comparator |
| `detect_pkg` | shared widths and types |

## The LL-band wavelet transform

The 2D-DWT is the hardest part to follow, because one 1D filter does both
directions and the data passes through a memory in between.

**1D filter.** The 5/3 low-pass filter is

    y = (-x[n] + 2x[n-1] + 6x[n-2] + 2x[n-3] - x[n-4]) >> 3

It is built from four delay registers. The two outer taps are added and then
subtracted. The two inner taps are added and shifted left by one. The centre
tap enters as (x<<2)+(x<<1). The total is shifted right by 3; this is an
arithmetic shift, so it rounds toward minus infinity. A phase flip-flop stands
in for a clock divider and keeps every second result. The kept output k is
centred on input sample 2k-1:

    y_k = (-x[2k+1] + 2x[2k] + 6x[2k-1] + 2x[2k-2] - x[2k-3]) >> 3

Samples before the first one count as 0. The delay line is **not** cleared at
the end of an image line. The filter treats the whole image as one long
stream, so the first outputs of a line mix in the end of the previous line.
This follows from the transpose memory holding exactly one frame of
coefficients, 256 x 128.

**Two passes.** `dwt_2d_ll` has a MUX in front of the 1D filter and a DEMUX
behind it.

- **Pass 1 (rows).** The input pixels arrive in raster order. The filter
  produces 256 x 128 L coefficients, one every second clock. They are written
  to the memory at consecutive addresses, so the memory holds the L band in
  row-major order.
- **Pass 2 (columns).** When the last word is written, the controller switches
  `rd_wr` to 1. It then reads one word per clock at address `r*128 + c`, with
  the column c in the outer loop and the row r in the inner loop. The same 1D
  filter now sees each column as a contiguous stream. Its output, the LL band,
  goes to `ll_band`.

The filter's delay line is cleared at the start of each pass. While pass 2
runs, the block takes no input (`in_ready` is low).

**Output order.** Pass 2 walks columns, so the LL band comes out in
**column-major order**: output `c*128 + r` is LL(row r, column c). Both DWTs
produce the same order, so LL1, LL2 and the threshold stay aligned. The
output Gaussian filter is therefore set up for an image 128 wide, with the
rows of the transposed image. The 3x3 mask is symmetric, so the result is
exactly the transpose of filtering the row-major image. `image_out` is
column-major as well.

## Gaussian filter

`window3x3` is a single chain of 2W+3 registers:
a33 -> a32 -> a31 -> (W-3 shift register) -> a23 -> a22 -> a21 -> (W-3) ->
a13 -> a12 -> a11. Each row of the window is one image line older than the
row before it, so a22 is the pixel W+1 samples back.

The kernel adds the corners and the edge pixels in two adders. It shifts the
edge sum left by 1 and the centre left by 2, adds the three terms, and shifts
the result right by 4.

Two choices are this design's own:

- **Zero padding.** A centre-position counter replaces window pixels that lie
  outside the image with 0. Border pixels therefore come out darker.
- **Self-flush.** After the last pixel of a frame, the filter advances its
  window W+1 more times with `in_ready` low. Every input pixel yields exactly
  one output pixel, two clocks after pixel p+W+1 has entered.

## Adaptive threshold and background subtraction

The threshold unit is a short pipeline: subtract, square, then accumulate in
32 bits. After the N-th pixel pair, a counter loads `acc >> 19` into the S
register; 19 = log2(8 x 65536), and S is ready three clocks after the last
pair. The accumulator then clears itself for the next frame. The final
`S + LL2` adder is combinational.

S must be loaded before the first LL2 coefficient arrives. It is: the column
pass starts only after the last filtered pixel, and an assertion in the top
checks this.

Background subtraction forms max - min of LL1 and LL2. It passes the
difference when it is strictly greater than AT and outputs 0 otherwise. The
published description states this rule both as "LL >= AT" and as "AT less
than LL"; the strict form is used here.

## Matching unit

The unit counts object coefficients with a value of at most `TOL` (10). On
the frame's last coefficient it sets `match = (count >= global_threshold)`
and pulses `match_valid` for one clock, then restarts the count. The
published text says "greater than" but its pseudo code says ">="; the code
follows the pseudo code. `global_threshold` is a raw count from 0 to 16384.
The thresholds 1.0 to 2.3 of the published TSR/FAR/FRR sweep come from a
software model whose scale is not given, so they cannot be carried over.

### Behaviour with dissimilar images

S grows with the total squared difference between the two frames, so the
threshold rises with it. A small object on an unchanged background gives a
small S, and the object survives. Two images that differ everywhere give a
large S. The threshold can then exceed every local difference, the object
image becomes all zero, and the matching unit sees a "perfect" match.

`tb_face_match_workload` shows this on synthetic faces. Four persons are each
compared with all four database faces:

- Genuine pairs give 16384 of 16384 near-zero coefficients.
- Impostor pairs whose faces differ most also give 16384.
- Impostor pairs that are more alike give 15656 to 16357, because some of
  their differences survive.

At a global threshold of 16320, all 4 genuine pairs and 9 of the 12 impostor
pairs are accepted. This follows from the threshold formula as specified and
the RTL keeps it.

## Interface and timing of the top

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `pix_valid` / `pix_ready` | in / out | 1 | one pixel of each image is taken when both are high |
| `image_in`, `image_ref` | in | 8 | actual/test and background/database pixel, raster order |
| `global_threshold` | in | 15 | count needed for a match |
| `image_out`, `out_valid` | out | 10, 1 | filtered object coefficient, column-major 128x128 |
| `rst_out` | out | 1 | pulses with the last object coefficient |
| `match`, `match_valid`, `match_count` | out | 1, 1, 15 | decision, one clock after `rst_out` |
| `s_value` | out | 13 | S of the latest frame |

The top takes one frame pair of 256x256 pixels. It then keeps `pix_ready`
low until `rst_out`, because the DWT's column pass and the output filter must
drain before the next frame can enter.

With no input gaps, a frame pair takes **98 699 clocks** from its first pixel
to `match_valid`: 65 536 input clocks, 32 768 column-pass clocks and 395
clocks of latency. At 118.6 MHz that is about 0.83 ms per comparison.

Parameters: `IMG_W` and `IMG_H` (default 256; both must be even, and powers
of two give the simplest address logic) and `TOL` (default 10). All internal
sizes follow from them: the memories are IMG_W*IMG_H/2 words and the LL band
is IMG_W/2 x IMG_H/2.

## Number formats

| Signal | Format | Why |
|---|---|---|
| pixels, Image1/2 | 8-bit unsigned | grey-scale images |
| L and LL coefficients | 10-bit signed | the 5/3 low-pass overshoots: L in [-64, 318], LL in [-159, 413] |
| object | 10-bit unsigned | \|LL2 - LL1\| <= 572 |
| S | 13-bit unsigned | at most 255^2 / 8 = 8128 |
| threshold AT | 15-bit signed | S + LL2 |
| S accumulator | 32-bit | 65536 x 255^2 < 2^32 |

These widths are choices of this design, derived from the value ranges
above.

## Departures and open points

- **Single clock.** The original architecture divides the clock for the
  down-sampled DWT output and switches the memory between two clocks. Here
  one clock runs everything, and those clocks become valid strobes.
  `clk_out` becomes `out_valid`, and `rst_out` becomes an end-of-frame pulse.
- **Reset.** In the original architecture `rst` travels down the pipeline
  with the data (each stage passes an `rst_out` to the next) and "rst at
  logic 1" means the stage runs. Here `rst` is an ordinary synchronous
  reset, and per-stage valid strobes carry the data through.
- **Own choices where the description is silent.** Border padding, the
  filter flush, the phase of the down-sampling, the clearing of the delay
  line between passes, the read order and the column-major output are all
  this design's choices. So are the frame flow control and all bit widths.
- **No per-line restart in the DWT.** Because the DWT filters a frame as one
  continuous stream, a few coefficients at the start of each row and column
  mix in the neighbouring line. Restarting the filter on every line would
  change the LL values at the image edges.
- **Outside the design.** The face database and the resizing of the 92x112
  ORL images to 256x256 are not part of the RTL. The database image arrives
  as the `image_ref` stream, and the global threshold is an input port.
- **Not reproduced.** The resource figures (slices, LUTs) and the 118.6 MHz
  clock of the original FPGA implementation, and the software-side
  PSNR/TSR/FAR/FRR evaluations.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against `tb_ref_pkg`, an integer model written directly from the
equations: the zero-padded Gaussian, the 5/3 low-pass on a stream, the LL
band in column-major order, S, the threshold, the subtraction and the
matching count. The testbenches also check latencies and the handshake, for
example the W+1 flush clocks, the N/2+3 clocks of the DWT column pass, and S
three clocks after the N-th pixel.

`tb_detect_harness` drives the whole detector with three frame pairs:

1. A dark background, and the same background with a bright square added.
   Some coefficients pass the threshold and the frame is unmatched.
2. The same image on both inputs: S = 0 and the frame is matched.
3. Two random images.

The harness counts each mechanism: back-pressure, filter flush, DWT column
pass, coefficients passed and zeroed, match and unmatch. A mechanism that
never occurs counts as a failure.

- `tb_face_object_detect_top` runs the harness at 16x16 with random input
  gaps.
- `tb_face_object_detect_full` runs it at the default 256x256. It takes
  about 10 s of build and simulation time.

`tb_gaussian_denoise` runs the 256x256 filter on a smooth image with added
Gaussian noise at the variances 0.01 to 0.20 (full scale 1.0), one frame per
level. It checks every output pixel and that the filter raises PSNR at every
level. Measured PSNR, noisy -> filtered:

| noise variance | 0.01 | 0.05 | 0.10 | 0.15 | 0.20 |
|---|---|---|---|---|---|
| noisy (dB) | 20.04 | 13.55 | 11.33 | 10.16 | 9.49 |
| filtered (dB) | 27.75 | 21.75 | 19.54 | 18.16 | 17.34 |

These PSNR values depend on the test image and the noise model. They show
that the filter works, but they are not comparable with PSNR figures from
other evaluations.

`tb_face_match_workload` compares 4 synthetic test faces with 4 database
faces at the default size, 16 frame pairs in about 25 s. It checks every
output against the reference and prints the genuine and impostor acceptance
at several global thresholds.

Run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert --top-module tb_face_object_detect_full \
  -y rtl -y tb +libext+.sv -Irtl rtl/detect_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_face_object_detect_full.sv -o sim && ./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.
Assertions in the top check that the two branches stay in lock step, that no
stage receives data it cannot accept, and that S is ready before LL2.
