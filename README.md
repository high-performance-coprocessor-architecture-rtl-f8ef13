# LWPC stereo coprocessor: dense disparity maps at one pixel per clock

This is synthesizable SystemVerilog for a streaming coprocessor. It takes a
rectified stereo pair (two 8-bit grey images, 256 x 360 pixels) and gives
every pixel a disparity with 1/8-pixel resolution, over a 20-pixel range. It
uses *local weighted phase correlation* (LWPC), a phase-based matching
method. Both images are split into band-pass, oriented, complex responses at
three scales. The match for a left pixel is the horizontal shift at which the
local phase of the right image agrees best with that of the left image.
Agreement is summed over all scales and orientations. The phase is measured
by quadrature filters, so the result does not depend on brightness or
contrast differences between the cameras.

The structure follows the coprocessor described in *High Performance
Coprocessor Architecture for Real-Time Dense Disparity Map* (C.-G. Kim,
V. P. Srini, S.-D. Kim). Each algorithm stage is a set of identical units
working on the same pixel side by side (SIMD), and the stages are chained
into one pipeline. Every 2-D filter is a pair of linear processor arrays
that filter rows and columns without a transpose memory. That publication
describes the architecture at block level. The coefficients, fixed-point
formats, alignment and memory organisation here are this implementation's
own, and each is listed below.

## Data flow

```
left  ─► scaling_unit ─┬─ scale 1 ─► g2h2_unit ─┐
                       ├─ scale 2 ─► g2h2_unit ─┤   per scale and orientation
                       └─ scale 3 ─► g2h2_unit ─┤   phase_corr_unit (21 / 11 / 6 shifts)
right ─► scaling_unit ─┬─ ...       g2h2_unit ─┘              │
                                                              ▼
                                   interp_unit (sum, align scales, interpolate)
                                                              ▼
                                     peak_detect (argmax + parabola) ─► disparity
```

| stage | module | what happens |
|---|---|---|
| pyramid | `scaling_unit`, `pyramid_stage` | 3-tap Gaussian low-pass, keep every 2nd row and column, twice: 256x360, 128x180, 64x90 |
| orientation | `g2h2_unit`, `steer_sum` | seven separable 7x7 basis filters (G2a-c, H2a-d), steered to 0°, +45°, -45°; G2 is the real and H2 the imaginary part |
| correlation | `phase_corr_unit`, `normalizer`, `voting_func` | unit phasors; right phasor delayed 0..D pixels; vote = cos(phase difference), smoothed by a 3x3 Gaussian window |
| combination | `interp_unit` | sum over orientations; coarse scales read back at the matching position, interpolated in disparity, added to the fine scale |
| decision | `peak_detect` | largest vote, refined by a parabola through its two neighbours, 5.3 fixed point |

All streams are raster order, at most one pixel per clock, with no
backpressure. Each sample carries a `tag_t` (valid, x, y), defined in
`lwpc_pkg`, with its coordinates in the image of its own scale. Coarse scales
carry one valid pixel per 4 (scale 2) or 16 (scale 3) input pixels. Every
unit does its work only on valid samples. So each scale runs at its own rate
with no scheduler, and the pipeline drains by itself when the input stops.

## Separable filters without a transpose memory (`sep_filter2d`)

All 2-D filtering (the pyramid low-pass, the 14 G2/H2 basis filters per
scale and the voting window) uses one structure. A separable kernel
`K(i,j) = cy[i]·cx[j]` is applied as a row filter followed by a column
filter. The usual way to do this writes the row-filtered image to memory and
reads it back transposed. Here two linear arrays of N processing elements
(`pe_linear_array`, built from `sep_pe`) work directly on the raster stream:

* **X array** (along the line). The pixel is broadcast to all PEs. PE k
  computes `cx[k]·pixel + (partial sum of PE k+1)` and keeps it in a
  one-entry register. PE 0 then holds `Σ cx[k]·p(x-k)`, one result per
  clock. This is a transposed-form FIR, and the multiplier result feeds the
  adder directly.
* **Y array** (down the columns). It is the same array, but each PE's
  register file holds one word per column. A new row-filtered value at
  column x is multiplied by `cy[k]` and added to the entry PE k+1 wrote at
  column x one line earlier. The result is written back at column x. PE 0
  gives `Σ cy[i]·X(y-i, x)`.

Each X result enters the Y array on the next clock. The two arrays run at the
same rate and produce a result per clock. The only storage is the
`N x line width` register files, with no transpose buffer.
The `first` input of the arrays drops the neighbour's partial sum. It is
driven at x = 0 (X array) and y = 0 (Y array), which zero-pads the image at
its left and top edges. A rounding right shift (the shifter) and saturation
follow the Y array.

The filter is **causal**: the output tagged (x, y) is
`Σ cy[i] cx[j] in(y-i, x-j)`, whose window centre lies (N-1)/2 rows and
columns before the tag. Latency is 3 clocks. These lags are undone once, in
`interp_unit` and at the top-level output (see below). The filters never wait
for future lines.

## Pyramid (`scaling_unit`, `pyramid_stage`)

Each level applies `[1 2 1]/4` along the rows and the columns (3x3 kernel,
sum 16) with rounding. It keeps the pixels with odd x and odd y. Pixel (x, y)
becomes (x>>1, y>>1). The window of a kept pixel is centred on (x-1, y-1),
so coarse pixel u represents fine position 2u exactly. Pixels stay 8 bits
wide.

## G2/H2 orientation filters (`g2h2_unit`, `steer_sum`)

The quadrature pair G2 (second derivative of a Gaussian) and H2 (its Hilbert
transform) can be steered. Each has a basis of 3 (G2) or 4 (H2) separable
filters. The 1-D factors in `lwpc_pkg` are the standard steerable-filter
functions, sampled at x = -3..3 with spacing 0.67 and scaled by 64:

| factor | function | taps |
|---|---|---|
| `F_G2R` | 0.9213 (2x²-1) e^-x² | 7 25 -4 -56 -4 25 7 (centre set to -56 for zero DC) |
| `F_GS`  | e^-x² | 1 11 41 64 41 11 1 |
| `F_G2B` | √1.843 · x e^-x² | -3 -19 -37 0 37 19 3 |
| `F_H2A` | 0.978 (-2.254x + x³) e^-x² | -4 6 48 0 -48 -6 4 |
| `F_H2B` | 0.978 (x² - 0.7515) e^-x² | 4 11 -12 -47 -12 11 4 |
| `F_H2O` | x e^-x² | -2 -14 -27 0 27 14 2 |

The basis is G2a = G2R(x)GS(y), G2b = G2B(x)G2B(y), G2c = GS(x)G2R(y),
H2a = H2A(x)GS(y), H2b = H2B(x)H2O(y), H2c = H2O(x)H2B(y) and
H2d = GS(x)H2A(y). The basis outputs are shifted right by 12 to 16 bits. The
steering gains are:
`G2(θ) = cos²θ G2a − 2cosθ sinθ G2b + sin²θ G2c` and
`H2(θ) = cos³θ H2a − 3cos²θ sinθ H2b + 3cosθ sin²θ H2c − sin³θ H2d`.
At ±45° they are 1/2, ∓1, 1/2 and 0.354, ∓1.061, 1.061, ∓0.354, held as
integers /256 (θ = 0 is the vertical orientation, taken directly from
G2a/H2a). The pass band is centred near a 4.7-pixel wavelength at scale 1, so
the fine scale alone cannot tell shifts one wavelength apart. The coarse
scales resolve this ambiguity.

## Phase correlation (`phase_corr_unit`, `normalizer`, `voting_func`)

For one scale and orientation:

1. `normalizer`: `(re, im) · 128 / floor(√(re²+im²))`, truncated. This is a
   unit phasor in Q1.7, and each component lies in [-128, 128]. A zero
   response gives (0, 0).
2. The right phasor runs through a chain of D one-pixel delays, which
   advance on valid pixels only. Tap d holds right pixel x-d of the same line.
3. `voting_func` d: `Re(L · conj(R_d)) = Re L·Re R_d + Im L·Im R_d`, which
   is `128² cos(Δφ)`. It then applies a 3x3 `[1 2 1]²/16` window. The result
   is 16 bits wide, with 1.0 = 16384. When x < d there is no partner pixel
   and the vote is 0.

Normalising before the window is the simplified form of the LWPC vote: one
window after the division instead of three windowed energies. Normalising
once per stream, before the delay chain, is equivalent to normalising in
every voting function and saves 2·D normalisers. Scale s tests
`D_s = 20 >> (s-1)` shifts (0..20, 0..10, 0..5), which is the same physical
range at each scale.

**Disparity sign:** left pixel x is matched with right pixel x - d, so
objects shifted to the left in the right image have positive disparity.

## Combining the scales (`interp_unit`)

This part needs the most care with timing. The votes of each scale are
first summed over the three orientations (18 bits). Fine output pixel x, at
disparity d, then gets

```
S(x, d) = V1(x, d) + V2(x2, d/2) + V3(x3, d/4)
x_s = min((x − LAG + LAG·2^(s−1)) >> (s−1), W_s − 1)     (rows the same way)
```

`LAG = 4` is the causal lag of each chain in its own pixels: 3 from the
7x7 filter and 1 from the 3x3 window. The formula puts the window centre of
every scale on the same image point. Across x a coarse value is held for the
2 or 4 fine pixels it covers. Across d it is interpolated linearly: the mean
of two taps at odd d for scale 2, and quarter steps for scale 3.

The coarse vote needed by fine row y is only finished about 5 (scale 2) or
15 (scale 3) fine lines later. So:

* the fine votes wait in a **delay line memory of 16 lines**
  (`DELAY_ROWS x W` entries). Each entry holds the vote vector, its row and
  its frame parity. Reading before writing at the same address gives the
  pixel from 16 lines earlier.
* the coarse votes are written into **row memories** addressed by
  `{frame parity, row mod 16, x}`. Rows of the next frame therefore never
  overwrite rows the previous frame still needs.

Consequences: no disparity comes out for the first 16 lines after reset.
The last 16 + 4 lines of a frame come out while the next frame (or blank
lines) is being fed. With gap-free input, every disparity leaves exactly
**16·W + 13 clocks** after the pixel at the bottom-right corner of its 7x7
window entered.

## Peak and sub-pixel refinement (`peak_detect`)

`t = argmax S(d)` (ties go to the smaller d). The offset is
`(S(t+1) − S(t−1)) / (2(2S(t) − S(t−1) − S(t+1)))`. It is rounded to 1/8
(halves away from zero) and clamped to ±1/2. It is 0 at t = 0, at t = D and
for a flat top. The output is `8t + 8·offset`, with 5 integer and 3
fraction bits.

## Interface (`lwpc_coprocessor`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (counters and valid bits) |
| `in_valid` | in | 1 | a left/right pixel pair is present |
| `left_pix`, `right_pix` | in | 8 | grey pixels, raster order, frames back to back |
| `disp_valid` | out | 1 | a disparity is present |
| `disp_x`, `disp_y` | out | 9 | pixel it belongs to (0..W-5, 0..H-5) |
| `disparity` | out | 8 | 5.3 fixed point, 0 .. 20.0 |

The first `in_valid` after reset is pixel (0, 0). The unit counts
coordinates itself, so frames must be complete. The last 4 columns and rows
have no result (the causal windows never reach past them). Parameters
`IMG_W_P` (a multiple of 4), `IMG_H_P` (a multiple of 4) and `MAX_DISP_P` (a
multiple of 4) default to 256, 360 and 20.

At one pixel per clock a 256x360 frame takes 92,160 clocks. 30 frames/s
therefore needs a clock of at least 2.8 MHz. The design's storage is
register files and line memories. At the default size it totals about
4.9 Mbit:

* Y-array register files of the G2/H2 filters, both images and all scales:
  about 1.1 Mbit.
* Register files of the voting windows: about 1.1 Mbit.
* The 16-line fine delay: about 1.6 Mbit.
* The coarse row memories: about 1 Mbit.

## Departures and own choices

* **One filter bank per scale.** The published design multiplexes the three
  scales into one shared G2/H2 block. Here each scale has its own
  decomposition and correlation chain. The arithmetic is identical; it costs
  more area and needs no schedule.
* **On-chip coarse storage.** Coarse-scale results are kept in on-chip row
  memories, not in external memory. The frame-buffer reader in front of the
  coprocessor and the conversion of disparity to depth are not part of
  this RTL.
* **Conjugate in the cross product.** The cross product is
  `Re L·Re R + Im L·Im R`, the real part of `L·conj(R)`. A form with a minus
  sign is sometimes written for it, but it does not measure the phase
  difference.
* **Own choices.** The filter taps, the window size (3x3) and every width
  and rounding are this design's choices. So are the causal alignment, the
  interpolation method (hold in x, linear in d) and the 16-line delay.
* **No handshake.** The output cannot be stalled.

## Verification

Every module has a self-checking testbench in `tb/` that compares it with a
model written independently in the testbench. Where a latency is fixed, the
testbench checks it.

| testbench | checks |
|---|---|
| `tb_sep_pe`, `tb_pe_linear_array` | MAC, `first` restart, register-file addressing, X and Y use |
| `tb_sep_filter2d` | random 7x7 separable kernel against direct 2-D convolution, with input gaps, 3-clock latency |
| `tb_pyramid_stage`, `tb_scaling_unit` | low-pass values, decimation positions, pixel counts at all three levels |
| `tb_steer_sum`, `tb_g2h2_unit` | steering and whole decomposition against floating-point convolution and trigonometric gains |
| `tb_normalizer`, `tb_voting_func`, `tb_phase_corr_unit` | phasors, votes for every shift, line-start disabling, window, latency |
| `tb_interp_unit` | three frames of random votes, every output of two frames, order and count |
| `tb_peak_detect` | argmax, sub-pixel fit, edge and flat-top cases |
| `tb_lwpc_coprocessor` | 64x40 images, disparities 5, 9 and 6.5, ≥ 90% of interior pixels within ½ pixel (observed 99-100%), output count, exact latency, coarse scales, disabled shifts, delay wrap, sub-pixel results, lines spilling into the next frame |
| `tb_lwpc_full` | the same at the default size, 256x360 and shift 13.5 (observed 99.9% within ½ pixel) |
| `tb_lwpc_scene` | 256x232 scene of three textured layers at disparities 3, 9.5 and 16, with depth edges and occlusions; ≥ 85% within ½ pixel inside each layer (observed 99.8-100%), 90.8% over all pixels, output order and count, latency |

The synthetic scenes are smoothed random textures. In the end-to-end tests
the right image is the left one shifted by a known amount; in the layered
scene each layer is shifted by its own amount and nearer layers hide
farther ones. Half-pixel shifts are made by averaging two neighbours. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/lwpc_pkg.sv tb/tb_lwpc_coprocessor.sv \
          --top-module tb_lwpc_coprocessor
./obj_dir/Vtb_lwpc_coprocessor
```

Each testbench prints `TB_RESULT checks=N failures=M`. The full-size run
builds in under a minute and simulates in a few seconds.

## Limits

* The scenes are synthetic textures made of flat layers. Near depth edges
  and in occluded regions many results are wrong (about 9% of all pixels
  of the layered scene): there the votes of two layers mix, and there is
  no left-right consistency check. Photographs and slanted surfaces were not
  simulated.
* The 16-line delay covers the time the coarse chains need to finish the
  rows a fine row reads. It was checked at line widths of 16, 64 and 256.
* Votes from shifts that reach past the start of a line are 0. Pixels within
  20 columns of the left edge therefore see fewer candidates.
