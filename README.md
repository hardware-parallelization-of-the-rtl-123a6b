# A SIFT feature engine for a small robot FPGA

This is a hardware version of Lowe's Scale Invariant Feature Transform (SIFT).
It is sized for the Spartan-3 FPGA of a small wheeled robot: 17,280 logic
elements and 432 kbit of block RAM. Its job is simple. The robot is shown a
series of training images of a target object and learns their SIFT features.
For each test image after that, it finds the features, matches them against the
learnt ones, and reacts:

- it turns left if the matches lie in the left third of the image;
- it turns right if they lie in the right third;
- it lights an LED if they lie in the middle third;
- it does nothing if no feature matches.

The robot has no usable camera input, so the images live in a ROM inside the
design. The FPGA sits in a LabVIEW-controlled system, so the whole engine
follows LabVIEW's `enable_in` / `enable_out` handshake for an HDL node in a
single-cycle timed loop.

The engine builds the Gauss pyramid, the Difference-of-Gauss (DoG) pyramid,
scale-space extrema, keypoint filtering and orientation assignment. SIFT's
fourth stage, the 128-element keypoint descriptor, is deliberately left out,
as in the original design. Several training views stand in for what
descriptors would add. A feature here is only its position, octave, interval
and dominant orientation.

## Memory is the constraint

Everything about the sizes comes from the RAM budget. A 128x128 first octave
needs six 16-bit images of 262 kbit each before any other octave is counted,
so it cannot fit. The engine therefore works on a **32x32** first octave:

| octave | size  | Gauss intervals | DoG images |
|--------|-------|-----------------|------------|
| 0      | 32x32 | 6               | 5          |
| 1      | 16x16 | 6               | 5          |
| 2      | 8x8   | 6               | 5          |
| 3      | 4x4   | 6               | 5          |

- The Gauss pyramid is 6 × 1360 = 8160 words.
- The DoG pyramid is 5 × 1360 = 6800 words.
- Both use 16-bit words, so together they take 239 kbit.
- Both are held complete in two `pyr_ram` instances.
- Only one image can be in the pyramid at a time. Images are analysed one
  after another, and only their features (a few bits each) are kept between
  images.

Octave `o` starts at word `oct_base(o, per_oct, 32)` (see `sift_pkg`). Interval
`k` of that octave starts `k * (32>>o)^2` words later. Pixels are stored row by
row.

## Numbers

Every fractional value is a 16-bit fixed-point number: 8 integer bits and 8
fraction bits (Q8.8).

- Gauss pixels are unsigned Q8.8, so an 8-bit grey level `g` is stored as
  `g << 8`.
- DoG values are signed Q8.8 and saturate at ±128.
- Products are formed at full width and rounded back to Q8.8.
- Absolute values are a multiplexer on the sign bit (`fx_abs`).

Division appears twice: the edge test and the gradient angle. Both use
`fxp_div`, a sequential restoring divider. It computes `(num << 8) / den` one
quotient bit per clock and saturates. It takes `NW + 9` clocks: 49 for the
40-bit edge test and 26 for the 17-bit angle. A single-cycle fixed-point
divider was too large and too slow for this FPGA, which is why the divider
takes many cycles.

## The control sequence

`sift_top` is one large state machine. Each register gets its next value from
combinational logic on the current state. The arithmetic lives in datapath
units that the state machine starts and then waits for. All of them share the
two RAMs' single read and write ports. The state machine muxes the read
address and data by state, and an assertion checks that only one unit writes
at a time.

For each ROM image the sequence is:

1. `S_LOAD`: copy the 8-bit image into octave 0, interval 0.
2. For each octave:
   1. `S_DOWN_W` (octaves 1–3 only): `downsample` builds interval 0 by taking
      every second pixel of interval 3 of the previous octave (the fourth
      image, counting from one).
   2. `S_GAUSS_W`, five times: `gauss_filter` with σ_k turns interval k−1 into
      interval k.
   3. `S_DOG_W`: `dog_sub` writes `D_k = G_k − G_{k+1}` for k = 0..4.
   4. `S_EXT_W`: `extrema_detect` scans DoG images 1..3 and offers each
      extremum to `keypoint_filter`. Every surviving keypoint goes to
      `orient_assign`, which emits the feature to `feature_matcher`.
3. `S_IMG_END` / `S_DECIDE`: for a test image, `steer_ctrl` turns the match
   count and the x sum into a decision.
4. `S_FIN`: after the last image, report completion.

The candidate and keypoint paths use valid/ready handshakes. While a candidate
is being filtered or oriented, the extrema scan waits. The orientation unit
then borrows the Gauss RAM read port.

**Time.** The Gaussian filters dominate. They perform one multiply-accumulate
per clock: 49 taps plus 2 clocks of pipeline and write, so 51 clocks per
output pixel. That comes to 5 × 51 × 1360 ≈ 347k clocks per image. With the
load, DoG, scan and orientation added, one image takes roughly 0.44 M enabled
clocks. The full six-image ROM takes about 2.85 M clocks.

## The stages

**Gaussian filters** (`gauss_filter`). There are five 7x7 symmetric kernels,
σ1..σ5 = 1.226, 1.545, 1.947, 2.453 and 3.090. Each is applied to the
previous interval, so the blur grows by a factor of 2^(1/3) per interval. The
weights are stored as one quadrant, `GK[s][|dy|][|dx|]`. Each weight is
`round(t·g(dy)·g(dx))`, where g is the normalised 1D Gaussian and t is a
scale near 256. The scale is chosen so that the 49 weights sum to exactly 256,
and any remainder goes on the centre tap. Pixels
beyond the image edge repeat the edge pixel.

**Extrema** (`extrema_detect`). For each interior pixel of DoG images 1..3,
the unit reads the 3x3x3 cube: the 3x3 patch in the image itself, the one
above and the one below. It then compares the centre with all 26 neighbours in
parallel. A strict maximum or strict minimum becomes a candidate, and its 3x3
DoG patch goes with it.

**Keypoint filter** (`keypoint_filter`). It applies two tests:

- **Contrast:** `|D|` must lie in [2.0, 100.0].
- **Edge:** from the patch it forms the 2x2 Hessian, with `tr = Dxx+Dyy` and
  `det = Dxx·Dyy − Dxy²`. It rejects the candidate if `det ≤ 0` or if
  `tr²/det ≥ 7.2`, which is Lowe's `(r+1)²/r` with r = 5.

The unit pulses `rej_contrast` or `rej_edge` for each dropped candidate.

**Orientation** (`orient_assign`). Over a 5x5 window in the keypoint's Gauss
image, the unit takes central-difference gradients. It weights each magnitude
by a Gaussian of the distance r from the keypoint and adds it into one of 36
bins of 10°. The largest bin wins. Square root and arctangent are
replaced by polynomials:

- **Magnitude:** `|g| ≈ (246·max + 102·min) / 256`, where max and min are the
  larger and smaller of `|dx|` and `|dy|`.
- **Angle:** `atan(z) ≈ 45z + z(1−z)(14.02 + 3.80z)` degrees, for
  `z = min/max` (from the divider). The octant is then restored from the
  signs and from which component is larger.
- **Weight:** `exp(−t) ≈ 1 − t + t²/2 − t³/6`, for `t = r²/(2·2²)`.
- **Bin:** `(θ · ⌊(36·65536+359)/360⌋) >> 24`, with θ in Q8.8 degrees.

**Matching** (`feature_matcher`). The features of the training images
(images 0 .. `N_TRAIN`−1, two by default) are learnt into one 32-entry table.
The table is emptied at the first image of a training series. Every later feature is compared with all entries at once. It
matches one if:

- the octave is equal;
- the interval is equal;
- the orientation bins differ by at most one, going round the circle.

Matches are counted, and their x positions are summed in first-octave pixels
(`x << oct`).

**Steering** (`steer_ctrl`). With `n` matches and x sum `S`, and W = 32:

| condition | decision |
|-----------|----------|
| `n = 0` | nothing |
| `3S < nW` | left |
| `3S > 2nW` | right |
| otherwise | centre (LED) |

The wheels are single-direction, so a left turn drives only the right wheel,
and a right turn drives only the left wheel.

**Enable protocol** (`hdl_node_if`). `enable_in` is the clock enable of every
register and both RAMs, so the engine freezes while it is low. `enable_out`
is `enable_in AND done`, registered. It stays low, lagging `enable_in`, until
all images have been analysed.

**Test images** (`image_rom`). The ROM is computed at elaboration from a
formula; no data file is needed. Its contents are:

- **Background:** grey level 40.
- **Faint patch:** a 5x5 patch of grey level 44 in every image. It is too weak
  to pass the contrast test.
- **Object:** an asymmetric object made of three bright rectangles (230, 180
  and 150) and one black pixel. It sits at the centre of the two training
  images, two rows higher in the second one. In the four test images it sits
  at W/5, W/2 and 4W/5, and the last test image does not have it.
- **Bars:** two bars in the first training image only. They give an edge-like
  response.

## What is this design's own

The original design fixes the overall structure:

- the pyramid shape and the 32x32 size;
- Q8.8 numbers;
- sign-bit absolute values;
- contrast bounds, an edge test and a divider in keypoint localization;
- histogram orientation with polynomial approximations;
- ROM images;
- the four responses;
- the enable handshake.

It leaves the following open, and they are choices made here:

- the σ values and the 7x7 kernel size;
- edge-pixel replication in the filter;
- DoG saturation;
- a strict extremum test against all 26 neighbours of the 3x3x3 cube;
- the contrast bounds 2.0 / 100.0 and the edge ratio 7.2;
- the window size, weighting sigma, bin count and polynomial coefficients of
  the orientation stage;
- a sequential divider rather than a pipelined one;
- the matching rule;
- thirds of the image as the left/centre/right limits;
- the wheel pattern for a turn;
- the RAM organisation with a separate DoG pyramid;
- the valid/ready handshakes;
- the ROM scene and its size (two training images, four test images).

## How far to trust it

Each unit has a self-checking testbench that compares it with an independent
model. Examples are direct convolution, brute-force 26-neighbour search,
integer division, reference matching and analytic gradient directions. Most
benches also check latency. Each one fails when its unit is deliberately
broken in one way.

`tb_sift_top` runs the whole engine at its default parameters. It drops
`enable_in` at random, and the run takes about 2.85 M clocks, which is a few
seconds in Verilator. It checks:

- the four decisions (left, centre, right, nothing) and the wheel/LED outputs
  for each;
- that the engine freezes while `enable_in` is low;
- that `enable_out` behaves as described;
- that every mechanism occurred at least once: stalls, 18 downsamplings,
  contrast and edge rejections, keypoints and matches;
- that the features of both training images are learnt.

Limitations:

- A 32x32 image gives very few features: one or none per image in the
  built-in scene. The matching rule (octave, interval, orientation) is weak. It works on the synthetic scene, but real
  images with more clutter would produce false matches. Descriptors would be
  needed for robust matching.
- There is no sub-pixel or sub-scale interpolation of keypoints.
- Only one orientation is kept per keypoint.
- The engine is slow by design. One shared RAM port and one MAC trade speed
  for area on a small device.
- The design has been simulated and synthesised generically (about 2,300
  cells plus 283 kbit of memory for the two pyramids and the ROM). It has not been fitted to a Spartan-3 or run
  on the robot.

## Simulating

All files are plain SystemVerilog. Compile the package first, then the
units, then one testbench:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/sift_pkg.sv $(ls rtl/*.sv | grep -v sift_pkg) tb/tb_sift_top.sv \
    --top-module tb_sift_top
./obj_dir/Vtb_sift_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog. Unit testbenches such as `tb_gauss_filter` use small image sizes
through parameters. To try another scene, change the function `scene()` in
`rtl/image_rom.sv`. The top's parameters (`IMG_W`, `N_OCT`, `N_INT`,
`N_TRAIN`, `N_IMG`, `MAX_TRAIN`, `NB`) size the RAMs and loops automatically. The address width
follows from `pyr_words()`.

## Files

| file | contents |
|------|----------|
| `rtl/sift_pkg.sv` | Q8.8 types, kernels, feature record, address helpers |
| `rtl/sift_top.sv` | control state machine and wiring |
| `rtl/hdl_node_if.sv` | LabVIEW enable handshake |
| `rtl/image_rom.sv` | training and test images |
| `rtl/pyr_ram.sv` | pyramid RAM |
| `rtl/gauss_filter.sv` | 7x7 Gaussian filter |
| `rtl/downsample.sv` | octave decimation |
| `rtl/dog_sub.sv` | Difference of Gauss |
| `rtl/extrema_detect.sv` | 3x3x3 extremum scan |
| `rtl/keypoint_filter.sv` | contrast and edge rejection |
| `rtl/fxp_div.sv` | multi-cycle fixed-point divider |
| `rtl/orient_assign.sv` | gradient histogram orientation |
| `rtl/feature_matcher.sv` | learning and matching |
| `rtl/steer_ctrl.sv` | left / right / LED decision |
| `tb/tb_<unit>.sv` | one self-checking testbench per unit, `tb_sift_top` end to end |
