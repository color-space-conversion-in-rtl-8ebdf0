# Real-time colour space converter for parallel video

This converter takes a video stream, one pixel per clock, in any of ten colour
spaces and sends it out in any other. It handles RGB, Y'CrCb 4:4:4 and
Y'CrCb 4:2:2 at 8 to 16 bits per channel, in full, limited or extended range.
It also handles HDMI-style pixel repetition and 3D side-by-side frames.
Each pixel passes through one fixed pipeline of thirteen stages. The stages
cover every step any conversion could need: chroma upsampling, leaving
Y'CrCb, removing the transfer function, changing primaries, putting the
transfer function back, entering Y'CrCb, and chroma downsampling. A small
control unit reads the configuration registers and switches to bypass every
stage the selected conversion does not need. Every mode therefore has the
same structure, and the latency changes only with the filters.

Inside, every channel is a 24-bit unsigned number with 1.0 = 2^24
(saturated at 2^24 - 1). All matrices use 26-bit signed coefficients with 24
fractional bits. Those coefficients are not typed in. They are computed at
elaboration from the chromaticities of the primaries, the D65 white point and
the Kr/Kb luma weights. Every standard's matrix therefore comes from the same
few lines of code.

## The chain

```
 idata ─► input reg ─► upsampler ─► Y'CrCb→R'G'B' ─► CL Cr'Cb'→R'B' ─► gamma decode ─► CL Y→G
 (3×16)   (width→24b)  4:2:2→4:4:4   (+ input range)                   (EOTF, 3 curves)
                                                                                        │
 odata ◄─ output reg ◄─ downsampler ◄─ R'G'B'→Y'CrCb' ◄─ CL R'B'→Cr'Cb' ◄─ gamma encode ◄─ CL RGB→Y ◄─ RGB→RGB
 (3×16)   (24b→width)   4:4:4→4:2:2    (+ output range)                    (OETF)                     (primaries)
```

"CL" means BT.2020 constant luminance. In that system the luma is formed
from *linear* R, G and B, so it has to be decoded and encoded around the
gamma stages:

| stage | module | latency (cycles) | what it does when active |
|---|---|---|---|
| input register | `csc_top` | 1 | puts a `width_in`-bit sample at the top of 24 bits |
| upsampler | `csc_chroma_upsampler` | 15·(px_rep+1)+2, bypass 1 | half-band interpolation of Cr, Cb |
| Y'CrCb→R'G'B' | `csc_ycc2rgb_range` | 7 | range expansion, then the 3×3 matrix for Kr/Kb (601, 709 or 2020) |
| CL Cr'Cb'→R'B' | `csc_ycc2rgb_range_cl_crcb` | 2 | R' = Y' + Cr'·(1.7184 or 0.9936), B' likewise with 1.9404/1.5816 |
| gamma decode | `csc_gamma_dec` | 2 | BT.709/601/2020, sRGB or opRGB EOTF |
| CL Y→G | `csc_ycc2rgb_range_cl_y` | 5 | G = (Y − 0.2627 R − 0.0593 B) / 0.6780 |
| RGB→RGB | `csc_rgb2rgb` | 5 | linear-light change of primaries (601-525, 601-625, 709, 2020, opRGB) |
| CL RGB→Y | `csc_rgb2ycc_range_cl_y` | 2 | Y = 0.2627 R + 0.6780 G + 0.0593 B |
| gamma encode | `csc_gamma_enc` | 2 | the matching OETF |
| CL R'B'→Cr'Cb' | `csc_rgb2ycc_range_cl_crcb` | 4 | sign-dependent division, output range |
| R'G'B'→Y'CrCb' | `csc_rgb2ycc_range` | 9 | matrix, then range compression and clamping |
| downsampler | `csc_chroma_downsampler` | 15·(px_rep+1)+2, bypass 1 | half-band low-pass and decimation of Cr, Cb |
| output register | `csc_top` | 1 | rounds and saturates to `width_out` bits |

A bypassed pixel stage still spends its cycles. The total latency is
therefore 42 cycles with both filters bypassed. Each active filter adds
15·(px_rep+1)+1 cycles. Data enable and both syncs travel with the pixel and
come out with the same delay.

Each pixel stage is one combinational expression followed by a chain of
output registers (`csc_vid_pipe`). A synthesis tool that retimes registers
is expected to spread that chain across the arithmetic. The register count
per stage is the pipeline depth the original area/power study settled on.

### How a conversion is chosen

`csc_control` decodes each colour space code into three properties: its
primaries, its transfer curve and its luma weights. From these it derives
the stage modes:

* 4:2:2 input turns the upsampler on. 4:2:2 output turns the downsampler on.
* Y'CrCb input goes through the matrix of its own space. BT.2020 CL input
  goes through the CL Cr'Cb'→R'B' and Y→G stages instead. RGB input that is
  not full range only has its range stretched. The output side mirrors all
  of this.
* The signal is taken to linear light only when it must be: when the
  primaries or the curves differ, or when CL is used on either side. The
  RGB→RGB matrix runs only when the primaries differ.
* If the input and output space, format family (RGB or Y'CrCb) and range
  are all identical, every pixel stage is bypassed. The filters still follow
  the 4:2:2 flags. `icscen` low bypasses everything.
* sRGB, sYCC and bg-sRGB share the sRGB curve and BT.709 primaries.
  xvYCC601 and xvYCC709 use the BT.709 primaries and curve with the 601 or
  709 luma weights. opRGB has its own primaries and a pure 563/256 power law.
  BT.601 525 and 625 each have their own primaries.

The control outputs are registered. A register write takes effect one clock
later. Change the configuration between frames.

## Number formats

* **Widths.** A sample of `width_in` bits (8, 10, 12, 14 or 16) sits in the
  low bits of its 16-bit field. It is shifted up to bit 23 on entry. On exit
  it is rounded to `width_out` bits and saturated. Widening is exact;
  narrowing rounds to nearest.
* **Full range.** 0 … 1.0. Chroma is offset by 2^23, which is 0.5.
* **Limited range.** Uses the 8-bit levels scaled by 2^16: luma 16…235 and
  chroma 16…240 (128 = zero), whatever the I/O width. Expansion multiplies
  by 256/219 or 256/224. Compression multiplies by 219/256 or 224/256 and
  adds the offset. The result is then clamped to the legal codes.
* **Extended range (xvYCC).** Uses the limited-range scaling. It only clamps
  to codes 1…254, so values beyond the nominal gamut survive.
* Every stage clamps its output to 0 … 2^24 − 1. The R'G'B'→Y'CrCb' stage
  and the downsampler clamp to the limits of the output range.

## Chroma resampling: the part that is not pixel-by-pixel

Both filters are 30th-order half-band FIR filters. An 18th-order version is
selected with the `FILTER_ORDER` parameter of `csc_top`. The taps are an
equiripple design quantised to 2^24. The even taps are zero except the
centre tap of 0.5. The odd taps sum to exactly 0.5, so a flat colour goes
through both filters unchanged, bit for bit.

| order | odd taps t0…t7 (×2^-24, symmetric about the centre) |
|---|---|
| 30 | 5310421, −1655583, 866712, −500940, 289425, −158498, 78166, −35399 |
| 18 | 5213823, −1460987, 607786, −235975, 69657 |

The filters use the polyphase form:

* **Upsampler.** In 4:2:2 the Cr and Cb of a pair of pixels both arrive on
  the even pixel. Whatever sits on the odd pixel is ignored and replaced by
  the held even sample. An even output is the received sample. An odd
  output is Σ 2·tk·(s[p−(2k+1)] + s[p+(2k+1)]), which only touches real
  samples.
* **Downsampler.** On even pixels it computes 0.5·s[p] + Σ tk·(s[p−(2k+1)] +
  s[p+(2k+1)]). On the odd pixel it repeats that value. The output keeps
  the same two-samples-per-even-pixel layout.

Each chroma channel keeps a window of 2·15+1 samples. A small sequencer,
`csc_resample_ctrl`, decides what enters the window and when it moves. It
has three jobs.

**Pixel repetition.** With `px_rep` = n, every pixel arrives n+1 times in a
row. A counter restarted by the rising edge of data enable marks the first
copy. Only that copy moves the window (`adv`). The chroma output register is
also loaded only on advances, so each result is held for n+1 clocks.
Luma and the syncs go through a plain delay line (`csc_sync_delay`) tapped
at 15·(n+1)+2. Copies of a pixel are identical, so delaying them is the same
as regenerating them.

**Borders.** The filters pad each line by replicating its end samples:

* On the first pixel of a line, the whole window is loaded with that pixel.
* When data enable falls, `adv` keeps running for 15 more pixel periods
  (the tail). During the tail the window repeats its newest sample. This
  flushes the last 15 outputs.

Outputs that would belong to positions before the first pixel are
suppressed. During blanking the chroma outputs therefore hold their last
value.

**3D side-by-side.** A line holds two pictures of `half_hactive` pixels
each. Filtering across the seam would smear one eye's picture into the
other. So each channel has a second window:

* The left window stops taking pixels at the seam and repeats its last one.
* The right window is loaded with the first right-hand pixel.

A pixel counter tells the output side which window owns the pixel now
leaving the filter. Parities are counted from the start of each picture,
so an odd `half_hactive` works. Side-by-side mode is on when `3D_enable`
is set and `3D_structure` is 8 (half) or 3 (full). Other 3D structures use
the left window only, like 2D.

**Blanking requirement.** The tail must finish before the next line
starts. The horizontal blanking must last at least 15·(px_rep+1)+2 clocks
for the 30th-order filter, or 9·(px_rep+1)+2 for the 18th-order one. That
is 17 clocks without repetition and 152 at px_rep = 9. Standard HDMI/CEA
timings have far more blanking than this.

Each filter sums all its products in one expression before one output
register. Results are needed only every second pixel, so a synthesis flow
would treat those adders as two-cycle paths.

## Gamma tables

The curves work at 16 bits: the top 16 bits of the 24-bit channel. The
output goes back to the top 16 bits. The input is split into 1024 segments
of 64 codes. Two tables hold the value at the segment start (b) and the rise
over the segment (m). The output is b + (m·offset + 32)/64. All tables are
built at elaboration from the closed-form curves.

Near zero, the encoding curves are too steep for straight lines. The
encoder therefore has a third table of exact values for input codes below
1408. That table takes over where the interpolation would be more than
1 LSB wrong. With it, every encoder output over all 65536 codes is within
1 LSB of the exact curve. The decoding curves are flat at the origin. Their
trouble spot is the BT curve's switch from the linear part to the power law
at 0.081 (code 5308). No straight line follows that kink. So the decoder's
exact table covers just the 64 codes of that one segment. The gain of each
segment is taken from the curve at the next segment's start before any
clamping, which keeps the last segment accurate too. Every decoder output
is then also within 1 LSB.

## Constant luminance (BT.2020 CL)

* **Decoding.** Cr' and Cb' are turned back into R' and B' with the
  divisors of their sign (1.7184/0.9936 for Cr', 1.9404/1.5816 for Cb').
  All three components are then linearised. G follows from
  Y = 0.2627 R + 0.6780 G + 0.0593 B.
* **Encoding.** Y is formed in linear light, then Y', R' and B' are gamma
  encoded, then the differences are divided by the factor of their sign.
  Both sign cases are computed in parallel and one is selected at the end.

## Register map

The register bank has 8-bit registers and an 8-bit address. The port is
select/write-enable: with `isel` and `iwrite_en` high, `iwdata` is written
at the clock edge. With `isel` high and `iwrite_en` low, `ordata` shows the
register one clock later. Unused bits read as 0.

| addr | field | codes |
|---|---|---|
| 0x00 / 0x01 | range_in / range_out [1:0] | 0 full, 1 limited, 2 extended |
| 0x02 / 0x03 | cspace_in / cspace_out [3:0] | 0 BT.601-525, 1 BT.601-625, 2 BT.709, 3 BT.2020, 4 BT.2020 CL, 5 sRGB/sYCC, 6 opRGB/opYCC, 7 bg-sRGB/bg-sYCC, 8 xvYCC601, 9 xvYCC709 |
| 0x04 / 0x05 | chroma_in / chroma_out [1:0] | 0 RGB 4:4:4, 1 Y'CrCb 4:4:4, 2 Y'CrCb 4:2:2 |
| 0x06 / 0x07 | width_in / width_out [2:0] | 0…4 = 8, 10, 12, 14, 16 bits |
| 0x08 | px_rep [3:0] | 0…9 extra copies (values above 9 act as 9) |
| 0x09 / 0x0A | half_hactive [7:0] / [12:8] | pixels per 3D picture |
| 0x0B | 3D_structure [3:0] | 8 side-by-side half, 3 side-by-side full |
| 0x0C | 3D_enable [0] | |
| 0x0F | status (read only) | bit 0 valid: every field holds a legal code; bit 1 written: set by any write, cleared by reading 0x0F |

Reset (`icscrst_n` low, asynchronous) clears every register. The cleared
state is a full-range BT.601 RGB 8-bit pass-through.

## Top-level ports (`csc_top`)

| port | dir | meaning |
|---|---|---|
| ipixclk, icscrst_n | in | pixel clock; asynchronous active-low reset |
| icscen | in | converter enable (low: pure pass-through with the same latency) |
| idata[47:0], idataen, ihsync, ivsync | in | ch1 (R or Y') in [47:32], ch2 (G or Cr') in [31:16], ch3 (B or Cb') in [15:0] |
| odata[47:0], odataen, ohsync, ovsync | out | same layout, `width_out` bits per channel |
| isel, iwrite_en, iaddr[7:0], iwdata[7:0], ordata[7:0] | in/out | register port |
| iscanen, iscanin, oscanout | in/out | scan chain placeholder: `oscanout` is `iscanin` registered while `iscanen` is high; a real chain is inserted by the synthesis flow |

## Where this design departs from the original architecture

The stage list and order, the stage pipeline depths, the 24-bit datapath
with 24-bit coefficients, the 16-bit segmented gamma tables and the register
fields follow the original architecture. So do the half-band orders, border
replication, dual windows for side-by-side and enables for repetition. The
following are choices made here:

* **Register addresses, codes and flags.** The addresses, codes and the
  meaning of the valid and written flags are this design's. The codes follow
  no particular metadata standard.
* **Filter coefficients.** The tap values are a fresh equiripple design.
  Both filters are −6.02 dB at 0.25·fs, as every half-band filter is. Up
  to 0.2·fs the 30th-order filter stays within +0.024/−0.0002 dB, so it
  meets the usual ±0.05 dB passband template. The 18th-order filter droops
  to −0.62 dB at 0.2·fs: it is the cheaper, softer option.
* **Filter arithmetic.** The filters compute in a single combinational sum
  instead of a three-stage pipelined adder chain.
* **Downsampler structure.** The downsampler uses a direct-form window
  rather than a transposed form with an input buffer. The result is the
  same.
* **Exact-value tables.** In the original, the exact-value table holds the
  scattered codes whose interpolation is more than 1 LSB off. Here it is one
  contiguous range of codes: the codes below 1408 in the encoder and the
  64 codes around the BT break point in the decoder. The 1 LSB bound is
  met either way.
* **Curve constants.** The BT curve uses the rounded constants 1.099/0.099
  with the 0.018 break point for BT.601, 709 and 2020 alike.
* **Extended range.** Extended range means limited scaling with clamping to
  codes 1…254.
* **Colour space codes.** bg-sRGB is treated as sRGB primaries and curve.
* **4:2:2 bus layout.** On the three-channel bus, 4:2:2 carries Cr on
  ch2 and Cb on ch3, both on the even pixel of each pair. HDMI instead
  alternates Cb and Cr across the pair; that layout would need a small
  adapter in front.
* **Port names.** The read-data output is called `ordata` and the scan
  output `oscanout`. The original port list names them `owdata` and
  `oscanin`.
* **Luma in the filters.** Luma passes the filters through a delay line
  rather than enable-gated registers.
* **Not built.** 4:2:0 is not supported, which matches the original. The
  coefficients are constants, also as in the original, which could not meet
  timing with them as inputs. 3D modes other than side-by-side go through
  the filters as 2D frames, as the original does. Nothing here has been
  synthesised for timing, so the 600 MHz target in a 40 nm process is
  unverified.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Each has a watchdog and checks the block's
latency in cycles.

* **Matrices.** The stages are compared against real-valued models:
  published BT.2087 matrices, round trips between RGB and Y'CrCb for all
  three matrices and three ranges, greys for all 25 pairs of primaries, and
  clamping.
* **Constant luminance.** The CL stages are checked against the BT.2020 CL
  equations, with both signs of each colour difference.
* **Gamma.** All 65536 codes go through each of the three curves.
* **Filters.** Bit-exact comparison with a model of the filter definition.
  Both filter orders are run on random lines, impulses and flat lines, with
  px_rep from 0 to 9, 2D and side-by-side, odd widths, and the shortest
  allowed blanking. Chroma must hold during blanking.
* **Register bank and control unit.** Directed conversions plus invariants
  checked over random configurations.
* **`tb_csc_top`.** Runs the whole converter at its default parameters.
  It covers twelve conversions, from BT.709 4:2:2 to RGB through BT.2020 CL
  and opRGB to sRGB, with end-to-end expected values. It counts how often
  each mechanism occurred (up/downsampling, repetition, side-by-side,
  bypass, CL decode and encode, linearisation, RGB→RGB, range and width
  changes, register reads, scan), and fails if any count is zero.
* **`tb_csc_roundtrip`.** The picture-quality test. Two converters in
  series take 16-bit BT.601 RGB 4:4:4 to limited-range Y'CrCb 4:2:2 and
  back. One chain is built with 30th-order filters and one with 18th-order
  filters. A flat colour returns within 1 LSB. A smooth image of sinusoids
  returns at about 55 dB PSNR with either filter. Random texture returns at
  about 15 dB, because its chroma detail above a quarter of the pixel rate
  is removed by design. The two filter orders differ by less than 0.5 dB
  on these images, so the 18th-order filters are a sound cheaper choice.

To run one with Verilator:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/csc_pkg.sv tb/tb_ref_pkg.sv tb/tb_csc_top.sv --top-module tb_csc_top
./obj_dir/Vtb_csc_top
```

Replace `tb_csc_top` with any other testbench name. The gamma and filter
testbenches take a few seconds. The end-to-end one takes about half a
minute.

## Files

* `rtl/csc_pkg.sv`: types, the configuration structures and the arithmetic
  helpers. It also holds the elaboration-time maths for the matrices
  (primaries → XYZ → primaries, and Kr/Kb matrices) and the filter taps.
* `rtl/csc_top.sv`: the top level and the width conversion.
  `csc_regbank.sv` and `csc_control.sv` are the configuration side.
* One file per stage, as listed in the table above.
* Helpers:
  * `csc_vid_pipe.sv`: pipeline registers.
  * `csc_gamma_lut.sv`: one segmented curve.
  * `csc_resample_ctrl.sv`: the filter sequencer.
  * `csc_hb_window.sv`: a filter window.
  * `csc_sync_delay.sv`: the variable delay line.
* `tb/tb_ref_pkg.sv`: the real-valued transfer curves and luma weights
  shared by the testbenches.
