# A 4096-point, 8-sample-per-cycle feedforward FFT

VDSL modems need a 4096-point FFT/IFFT at a sample rate higher than one
sample per clock. This processor takes **8 complex samples every clock
cycle** and returns 8 transform outputs every cycle. A frame lasts 512 cycles,
and frames can follow each other with no gap. It is a *feedforward* pipeline
(a multipath delay commutator, MDC): data flows only forward, from one stage of
radix-2 butterflies to the next, and every butterfly and rotator is busy on
every cycle.

The architecture follows the radix-2^4 feedforward MDC FFT described by
A. Arun and B. Prakasam Periyasamy in "High Performance with Reduced Area 4096
Point Feedforward FFT Architecture for VDSL Applications". That work's main
point is where the rotations go. With a radix-2^4 decomposition, most of the
twiddle multiplications become trivial (-j) rotations or rotations by a
16th-root of unity (W16). Both can be built without a general multiplier. Only
two of the twelve stages need general complex multipliers.

Everything is parameterised. `N_LOG2` (12) sets the transform size and
`P_LOG2` (3) sets the parallelism, so the same RTL also builds the 2- and
4-parallel versions and other power-of-two sizes.

## Interface at a glance

`fft4096_mdc` (defaults: `N_LOG2=12`, `P_LOG2=3`, `WIN=16`, `CW=16`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (control state only) |
| `in_valid` | in | 1 | high for 512 consecutive cycles per frame |
| `in_inverse` | in | 1 | sampled on the first cycle of a frame; 1 = inverse transform |
| `in_re[8]`, `in_im[8]` | in | 16 | one complex sample per lane |
| `out_valid`, `out_first` | out | 1 | result valid / first result cycle of a frame |
| `out_inverse` | out | 1 | the frame now leaving was an inverse transform |
| `out_re[8]`, `out_im[8]` | out | 28 | results, unscaled (16 + 12 bits) |
| `out_bin[8]` | out | 12 | frequency index that each output lane carries this cycle |

- **Throughput:** 8 samples per cycle.
- **Latency:** from the first input cycle of a frame to its first output cycle
  is `2*n + N/P - 1` cycles, which is 535 at the defaults. Of this, 511 cycles
  are commutator delay and 24 are pipeline registers.

## Where each sample is: index bits

Each sample of a frame has an index `I = b11 ... b0`. At any point in the
pipeline, each index bit is one of two kinds:

- a **parallel bit**, which picks one of the 8 lanes (3 bits);
- a **serial bit**, which picks one of the 512 cycles of the frame (9 bits).

Stage `s` has butterflies on the lane pairs (0,1), (2,3), (4,5), (6,7). These
butterflies combine samples whose indices differ only in bit `b(12-s)`. So,
when stage `s` starts, that bit must sit on **lane bit 0**. The whole design
follows from this one rule:

- **Input.** Lane bit q holds `b(11-q)` and cycle bit r holds `b(r)`. In
  words: lane `l` carries the block of 512 consecutive samples that starts at
  `bitrev3(l) * 512`. Lane 1 carries samples 2048..2559, lane 2 carries
  1024..1535, and so on. Stage 1 can then work on the input lanes directly.
- **After stages 1 and 2.** The next butterfly bit is still a lane bit.
  Swapping it onto lane bit 0 is a fixed permutation of lanes, just crossing
  wires with no storage and no delay.
- **After stages 3 to 11.** The next butterfly bit is cycle bit
  `J = 11 - s`, with `J` from 8 down to 0. A **delay commutator** on each lane
  pair exchanges it with lane bit 0. The delays are 256, 128, ..., 2, 1
  cycles.
- **After stages 5 and 9.** These are the first stages of the second and
  third group of four. Before the commutators, lanes are rewired so that lane
  bits 0 and 1 trade places. The bit that stage 5 (or 9) just used then stays
  on lane bit 1, rather than going into the delay memory, and the old lane-1
  bit goes into the memory instead. This costs nothing. It keeps the group's
  first bit `d0` on a lane during the W16 stage that follows, so the lanes
  with `d0 = d1 = 0` never rotate there (see the rotator count below).
- **Output.** After stage 12, the lane and cycle bits hold a permutation of
  `I`. A decimation-in-frequency FFT leaves bin `bitrev12(I)` at position `I`.
  The processor does not reorder its outputs. Instead, `out_bin[l]` gives the
  bin on each lane, and a consumer can write results straight into a buffer at
  that address.

`fft_pkg::bit_home()` computes this placement at elaboration time. Every block
that needs to know a sample's index rebuilds it from its lane number and its
own cycle counter.

### The delay commutator

Take one lane pair. The upper lane carries lane bit 0 = 0 and the lower lane
carries lane bit 0 = 1. We want to swap that bit with cycle bit J
(`D = 2^J`). The circuit has three parts:

```
 upper in a ─────────────┐            ┌──[ delay D ]── upper out
                         ├─ crossbar ─┤
 lower in b ─[ delay D ]─┘ (cycle     └──────────────── lower out
                            bit J)
```

When cycle bit J is 1, the crossbar sends the delayed lower sample into the
upper delay line, and the current upper sample goes out on the lower lane.
Otherwise both pass straight through. The result is that lower-lane samples
from the first half of each 2D-cycle block trade places with upper-lane
samples from the second half. All of this is delayed by D cycles.

- **Memory.** Each pair holds 2D words. Over the whole pipeline this adds up
  to `4 * 2 * (256 + ... + 1) = 4088 = N - P` words.
- **Control.** A cycle counter drives the crossbar. It restarts on the first
  sample of each frame and otherwise runs freely, so frames may be separated
  by idle cycles. A frame itself must not have holes in it (an assertion in
  the top checks this).

## What happens after each butterfly: the radix-2^4 rotation schedule

The 12 stages form three groups of four. In a group, let `d0..d3` be the four
index bits that the group's butterflies act on, in order, and let `j2` be the
index bits below them. The 16-point kernel is split 4 x 4. Each stage is
followed by one of these rotations:

| stage in group | rotation after it | rotator | built as |
|---|---|---|---|
| 1st (s = 1, 5, 9) | -j if `d0 & d1` | trivial | swap re/im, negate |
| 2nd (s = 2, 6, 10) | `W16^((2*d2+d3)*(d0+2*d1))` | W16 constant rotator | shift-and-add |
| 3rd (s = 3, 7, 11) | -j if `d2 & d3` | trivial | swap re/im, negate |
| 4th (s = 4, 8) | `W4096^(16^gi * j2 * (d0+2*d1+4*d2+8*d3))` | general | table + 4 multipliers |
| s = 12 | none | | |

In this table `gi` is the group number (0, 1, 2) and `W_M^e = exp(-j*2*pi*e/M)`.

A lane gets a rotator only if some sample that passes through it needs a
non-zero rotation. `fft_stage` decides this at elaboration time. At the
defaults the pipeline holds:

- 22 trivial rotators
- 18 W16 rotators: 6 in each of stages 2, 6 and 10
- 16 general rotators

If the size is not a multiple of four stages, the last group is shorter. It
then uses the plain radix-2 kernel of 8 or 4 points: a W8 rotation (done on the
W16 rotator) and/or a -j.

### The three rotators

- **Trivial (`trivial_rotator`).** `(re, im) * (-j) = (im, -re)`. This is only
  a multiplexer and a negation.
- **W16 (`const_rotator_w16`).** The exponent splits into a quarter turn and a
  residual angle of 0, pi/8, pi/4 or 3pi/8. The residual angle needs only
  three constants: cos(pi/8), sin(pi/8) and cos(pi/4). For 3pi/8 the pi/8 pair
  is reused with cosine and sine swapped. Each constant product is a sum of
  shifted copies of the input. The quarter turn is then a trivial rotation.
- **General (`general_rotator` + `twiddle_rom`).** The table stores only the
  N/8 + 1 = 513 angles of the first octant. Angles in the second octant read
  the table at `512 - offset` and swap cosine and sine. The product
  `(re + j*im)(c - j*s)` uses four real multipliers and two adders. The
  quadrant is applied last, as a trivial rotation. The table contents are
  `round(cos(2*pi*i/N) * 2^15)` and `round(sin(2*pi*i/N) * 2^15)`, stored
  unsigned. They are computed during elaboration by a fixed-point Taylor
  series (`fft_pkg::trig_q`), so no data files are involved.

Both multiplying rotators round to nearest and saturate. Their error is at most
0.5 LSB plus `(|re| + |im|) * 2^-16`.

## Word length and accuracy

- **Widths.** Each butterfly adds one bit, and nothing is scaled: 16-bit
  inputs give 28-bit outputs. Rotators keep the width of their input.
- **Input range.** For the rotations never to overflow, **input samples must
  lie inside the circle of radius 2^15**, not just inside the square.
- **Inverse transform.** An inverse frame is computed as
  `swap(FFT(swap(x)))`, with `swap(re, im) = (im, re)`. This gives
  `N * IDFT(x)`, so the 1/N factor is left to the user.
- **Measured accuracy.** At full size, random inputs of radius 2^14 give
  outputs with an RMS of about 7.4e5 LSB. The largest error against a
  double-precision DFT was about 66 LSB (about 1e-4 of the RMS), for both
  forward and inverse frames.

## How this design relates to the published architecture

Taken from it:

- the feedforward MDC organisation with radix-2 butterflies on adjacent lanes;
- the radix-2^4 rotation schedule (trivial after stages 4i+1 and 4i+3, W16
  after 4i+2, general after 4i+4);
- W16 rotators built from coefficient selection plus shift-and-add;
- a first-octant table of N/8 + 1 angles for the general rotators;
- general rotators with four real multipliers and two adders;
- delays halving from stage to stage;
- N - P words of total buffer memory;
- 8 samples per cycle at 4096 points as the main configuration.

This design's own choices:

- **Bit placement.** The butterfly bit is always brought onto lane bit 0, and
  the input order follows from that. The published work rearranges the
  placement ("rotation allocation") to save W16 rotators, but does not spell
  out its placement. The one used here (the lane-bit exchange after stages 5
  and 9) is this design's own. It gives the published rotator counts:
  - 18 W16 and 16 general rotators for 8 lanes;
  - 9 W16 and 8 general rotators for 4 lanes;
  - 6 W16 and 4 general rotators for 2 lanes.
  Without that exchange the 8-lane pipeline would need 22 W16 rotators.
- **Word lengths and scaling.** 16-bit data, 16-bit coefficients, full growth,
  and rounding and saturation in the rotators. The W16 coefficients are scaled
  by a power of two, so every lane has unit gain. The published error study
  uses shorter, non-power-of-two-scaled coefficient sets.
- **IFFT method, framing and side-band.** Framing uses `in_valid` with
  contiguous frames. Each sample group carries a side-band of valid, first and
  inverse flags.
- **Latency.** It is stated as N/P in the published work. Here it is
  N/P - 1 + 2n because of the two register levels per stage.
- **Output order.** Outputs are not reordered. The input/output reordering
  memories mentioned for applications that need natural order are not
  included; `out_bin` is provided instead.

## Files

`rtl/` — synthesizable SystemVerilog, one unit per file:

| file | contents |
|---|---|
| `fft_pkg.sv` | side-band struct, rotator kinds, bit placement, table generator |
| `fft4096_mdc.sv` | top: framing, 12 stages, 11 shuffles, output bin numbering |
| `fft_stage.sv` | butterflies of one stage and the rotators the schedule asks for |
| `radix2_bu.sv` | radix-2 butterfly |
| `trivial_rotator.sv` | -j rotator |
| `const_rotator_w16.sv` | W16 shift-and-add rotator |
| `general_rotator.sv` | table-based complex multiplier |
| `twiddle_rom.sv` | first-octant cosine/sine table |
| `stage_shuffle.sv` | lane permutation or a column of delay commutators |
| `delay_commutator.sv` | delay-crossbar-delay exchange for one lane pair |
| `delay_line.sv` | circular-buffer delay |

`tb/` — self-checking testbenches. Each prints
`TB_RESULT checks=N failures=M`:

- **One per block:** `tb_<block>.sv`.
- **`tb_fft4096_mdc`:** 256 points, six frames. It covers back-to-back frames,
  an idle gap, forward/inverse switching and a full-scale tone, and checks
  latency and bin coverage.
- **`tb_fft4096_full`:** the default 4096-point, 8-lane size, with a forward
  and an inverse frame.
- **`tb_fft_configs`:** 64 points with 2, 4 and 8 lanes, 128 and 2048 points
  with 8 lanes, and 4096 points with 4 lanes. It uses `fft_config_harness.sv`.

The reference results are double-precision DFTs computed inside the
testbenches.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fft_pkg.sv tb/tb_fft4096_full.sv --top-module tb_fft4096_full
./obj_dir/Vtb_fft4096_full
```

Replace the testbench name to run any other test. The full-size test builds in
about ten seconds and runs in well under a second.

To change the size or the parallelism, override `N_LOG2` and `P_LOG2` on
`fft4096_mdc` (tested from 64 to 4096 points and from 2 to 8 lanes). The input order and `out_bin`
follow automatically.
