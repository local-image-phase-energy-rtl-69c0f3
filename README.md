# Local energy, orientation and phase from steerable quadrature filters

This core turns a stream of 8-bit grey pixels into three local image features
per pixel: **energy** (how much structure is there), **orientation** (which way
it runs, 0 to π) and **phase** (whether it is a line, an edge or something in
between, −π to π). It takes one pixel and produces one feature triple on every
clock cycle, with a fixed latency of 59 cycles. It has no stalls and no
frame buffer.

The main idea is steerability. A second-order Gaussian derivative filter and
its Hilbert-transform partner (a quadrature pair) can be computed at *any*
orientation as a weighted sum of a few fixed basis filters:

* three even basis kernels, Gxx, Gxy and Gyy;
* four odd basis kernels, Hxx, Hxy, Hyx and Hyy.

The image is convolved only with these seven 9×9 kernels. All seven are
separable, so each costs 18 multiplies per pixel instead of 81. The eight
oriented quadrature pairs (c_i, s_i) at θ_i = i·π/8 are then formed with
multiply–add trees and constant weights. The three features come from those 16
numbers:

| feature     | formula                                                           |
|-------------|-------------------------------------------------------------------|
| energy      | E = ⅛ Σ_i (c_i² + s_i²)                                           |
| orientation | θ = ½ · atan2(Σ_i E_i sin 2θ_i, Σ_i E_i cos 2θ_i), with E_i = c_i² + s_i² |
| phase       | φ = atan2(Σ_i s_i, Σ_i c_i)                                       |

All arithmetic is fixed point:

| quantity                   | width   |
|----------------------------|---------|
| kernel taps                | 13 bits |
| basis responses            | 11 bits |
| trigonometric weights      | 9 bits  |
| energy                     | 22 bits |
| angles                     | 9 bits  |
| arctangent datapath        | 24 bits |

These widths come from the published accuracy study of the architecture.

## Pipeline at a glance

```
 in_pix ─► S0: line buffer + 7 separable convolvers ─► S1: 8 steering units ─► S2: energy / orientation / phase ─► out
            24 cycles                                   5 cycles                 30 cycles (7 / 30 / 27, aligned)
```

| module                | role                                                        |
|-----------------------|-------------------------------------------------------------|
| `feature_core`        | top: S0 → S1 → S2                                           |
| `s0_gauss_base`       | stage S0                                                    |
| `line_buffer`         | 8 row memories giving a 9-pixel vertical column             |
| `sep_conv` ×7         | one 9×9 separable convolver per basis kernel                |
| `s1_oriented_filters` | stage S1                                                    |
| `steer_unit` ×8       | one quadrature pair (c_i, s_i) per orientation              |
| `s2_features`         | stage S2, plus the delay buffers that align its outputs     |
| `s2_energy`           | E_i and mean energy (7 cycles)                              |
| `s2_orientation`      | orientation (27 cycles after E_i, 30 after the S2 input)    |
| `s2_phase`            | phase (27 cycles)                                           |
| `cordic_atan`         | pipelined arctangent, used twice                            |
| `delay_buffer`        | register delay line                                         |
| `add_tree`            | pipelined adder tree (helper)                               |
| `gauss_coef_pkg`      | widths, kernel taps, weights, arctangent table, latencies   |

The stage latencies of 24, 5 and 30 cycles (59 in all) are those of the
original architecture. Inside S2 the energy path finishes after 7 cycles and
the phase path after 27. They are delayed by 23 and 3 cycles so that all three
features of a pixel leave together.

## Interface of `feature_core`

| port         | dir | width           | meaning                                             |
|--------------|-----|-----------------|-----------------------------------------------------|
| `clk`        | in  | 1               | clock                                               |
| `rst_n`      | in  | 1               | synchronous, active low; clears valid flags and counters only |
| `in_valid`   | in  | 1               | a pixel is present                                  |
| `in_sof`     | in  | 1               | with `in_valid`: first pixel of a frame             |
| `in_pix`     | in  | 8               | grey value, raster order                            |
| `line_len`   | in  | clog2(IMG_W+1)  | pixels per row, 1..IMG_W; change it only between frames |
| `out_valid`  | out | 1               | a feature triple is present, exactly 59 cycles after its pixel |
| `out_sof`    | out | 1               | triple of a frame's first pixel                     |
| `out_energy` | out | 22              | mean energy, unsigned                               |
| `out_orient` | out | 9               | unsigned, θ = out_orient·π/512, range [0, π)        |
| `out_phase`  | out | 9               | signed, φ = out_phase·π/256, range [−π, π)          |

Parameter `IMG_W` (default 1000) is the longest row the row memories hold.

**Valid protocol.** `in_valid` may drop at any time. Idle cycles simply pass
through the pipeline, and there is no back-pressure.

**Output position.** The output for pixel (r, c) is the response of the 9×9
window whose newest (bottom-right) pixel is (r, c), so the window centre is
(r−4, c−4). Outputs whose window reaches outside the frame (r < 8 or c < 8)
are produced but hold leftovers of the previous row or frame. Ignore them or
crop them.

**Frame start.** `in_sof` restarts the column counter, so a frame that was
cut short in mid-row does not disturb the next one.

Angles are counted counter-clockwise from the x axis (column index), with rows
running downward.

## S0: line buffer and separable convolvers

The line buffer holds eight rows in eight dual-port memories of `IMG_W`
pixels, connected as a cascade. At each accepted pixel, every memory is read
at the current column. Memory *k* is then written with the value memory *k*−1
held at that column, and memory 0 is written with the new pixel. The eight
read values plus the new pixel form the vertical column `col[0]` (oldest row)
… `col[8]` (current pixel).

This "one row per memory" arrangement is the original one. The cascade used
to rotate the rows is this design's choice. It needs no row-select
multiplexers.

Each `sep_conv` works in two passes:

1. **Vertical pass.** A dot product of the column with the vertical taps, in
   an adder tree. The result is rounded by 2⁻⁸ to a 16-bit intermediate.
2. **Horizontal pass.** A 9-entry shift window of those intermediates, which
   advances only when a new column arrives, then a dot product with the
   horizontal taps. The result is rounded by 2⁻¹⁶ and saturated to 11 bits.

The kernel taps are

```
sampled at t = (k−4)·0.67, k = 0..8, e(t) = exp(−t²), stored as round(v·4096)
Gxx = e(y)·0.9213(2x²−1)e(x)          Hxx = e(y)·0.9780(x³−2.254x)e(x)
Gxy = y e(y)·1.843 x e(x)             Hxy = y e(y)·0.9780(x²−0.7515)e(x)
Gyy = (2y²−1)e(y)·0.9213 e(x)         Hyx = (y²−0.7515)e(y)·0.9780 x e(x)
                                      Hyy = (y³−2.254y)e(y)·0.9780 e(x)
```

The tap value 1.0 is clipped to 4095 so that it fits in 13 bits.

With 8-bit input, the largest possible response of any kernel is 703. The
11-bit output therefore never saturates; the saturation logic is only a
guard.

**Latency.** The arithmetic takes 14 cycles: 1 for the memory read, 6 for the
vertical pass and 7 for the horizontal pass. Ten balancing registers bring S0
to the 24 cycles of the original pipeline.

## S1: steering

Each `steer_unit` computes one orientation θ_i = i·π/8 from constant Q7
weights, with c = cos θ_i and s = sin θ_i:

```
c_i = c²·Gxx − 2cs·Gxy + s²·Gyy
s_i = c³·Hxx − 3c²s·Hxy + 3cs²·Hyx − s³·Hyy
```

Its five stages are:

1. input register
2. multiply
3. add pairs
4. final add
5. round by 2⁻⁷ and saturate to 11 bits

**How these weights were chosen.** They are obtained by rotating the kernels
above. Some published statements of the steering equations use −cs for the
Gxy weight and the opposite signs for the Hyx and Hyy terms. Those signs
contradict the rotated kernels, and the derived ones are used here. The
testbenches check the core against a model built from the kernel formulas,
not against the published equation.

## S2: energy, orientation, phase

**Energy** (`s2_energy`) has seven stages:

1. input register
2. squares
3. c_i² + s_i²
4. adder level 1 (pairs of orientations)
5. adder level 2
6. adder level 3
7. shift by 3

It hands the eight E_i, available after three cycles, to the orientation path.

**Orientation** (`s2_orientation`) has three parts:

* It multiplies each E_i by cos 2θ_i and by sin 2θ_i, as 9-bit constants.
* Two adder trees form the two sums.
* `cordic_atan` takes their argument.

Halving a 9-bit binary angle modulo π leaves the same bit pattern. So the
orientation output is the arctangent code read as unsigned, with an LSB of
π/512. Using E_i instead of |E_i| avoids a square root. The constant factor of
the tensor formulation is dropped, because it does not change the argument.

**Phase** (`s2_phase`) sums the eight even and the eight odd responses in two
adder trees, then calls `cordic_atan` (LSB 2π/512 = π/256, signed). Steering
each pair to a common orientation is not needed: the sums are taken directly.
Each tree has 8 inputs and 3 levels, one input per orientation.

## The arctangent (`cordic_atan`)

This is the hardest block to read. It is pipelined and has 23 stages:

1. **Normalise.** Find the larger of |x| and |y| and shift *both* by the same
   amount, left or right, so that the larger one has its top bit at bit 19 of
   a 21-bit signed word. A common scale does not change the angle. It lets
   small vectors use the full CORDIC precision, and lets huge orientation sums
   (up to ~35 bits) enter the 21-bit input the original design used.
2. **Pre-rotate.** If x < 0, rotate the vector by π (negate both) and start
   the angle at π.
3. **Iterate, 20 stages.** Radix-2 vectoring iterations on a 24-bit datapath.
   Each one rotates by ±atan 2⁻ⁱ to drive y towards 0, and adds the rotation
   to a 24-bit binary angle (2²⁴ = one turn).
4. **Round** the angle to 9 bits.

A zero-vector flag travels with the data, so atan2(0, 0) = 0 exactly.

The original used a vendor CORDIC core whose insides are not published. This
one is an independent implementation with the same input width (21), datapath
width (24) and pipeline slot. The iteration count of 20 was chosen to fill the
27- and 30-cycle paths.

## Where this design departs from or adds to the original

* **Tap spacing.** The kernels are sampled at spacing 0.67, the classical
  9-tap choice for these filters. The original states only "nine taps, peak
  frequency 0.21 cycles/pixel".
* **Gxy kernel.** Gxy is taken as 1.843·x·y·e^−(x²+y²). A variant with an
  extra (2x²−1) factor would not be steerable with the weights above.
* **Steering weights.** The signs and the factor 2 are derived from the
  kernels (see S1).
* **Rounding points.** The 16-bit intermediate of the convolvers and the
  rounding shifts are not published; they are this design's choice.
* **Pipeline balance.** S0 is padded with balancing registers to the
  published 24 cycles.
* **Arctangent normalisation.** The common shift in `cordic_atan` is this
  design's choice.
* **Handshake and reset.** The valid flag, the synchronous reset and the
  run-time `line_len` input are additions. The original only says that the
  resolution can be adapted to the application.
* **Not included.** The board around the core is not included: camera frame
  grabber, external memory controller, VGA output and user configuration.
  The core's pixel input and feature output ports are where they would
  connect.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/tb_ref_pkg.sv`, a reference model written directly from the
formulas:

* The kernel taps and weights are recomputed with real arithmetic.
* The two-pass convolution uses the same rounding points as the hardware.
* Energies are computed exactly.
* Angles come from `$atan2` and are compared within one LSB.

The testbenches:

* **`tb_feature_core`** runs the top with `IMG_W = 24`. It streams eight
  frames with random idle cycles: noise, oriented gratings near the filters'
  peak frequency, and stripe patterns. One frame is cut short in mid-row.
  Two frames use a 17-pixel row set through `line_len`. For every output it
  checks:
  * the 59-cycle latency;
  * `out_sof`;
  * exact energy;
  * orientation and phase within one LSB.

  It also counts that each mechanism occurred: row-length change, idle
  cycles, frame re-alignment, arctangent inputs scaled down and up, and phase
  in all four quadrants.
* **`tb_feature_core_full`** runs the top at its default parameters. It
  streams one 1000×1000 frame and then one 512×512 frame, with `line_len`
  changed to 512 in between. Both frames are zone plates, and the testbench
  checks a regular sample of their pixels. It simulates in a few seconds.
* **Unit testbenches** check each block against the same model, including
  its latency.

Run a testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/gauss_coef_pkg.sv tb/tb_ref_pkg.sv tb/tb_feature_core.sv \
    --top-module tb_feature_core -o sim
./obj_dir/sim
```

The same command works for any `tb/tb_<module>.sv`. Add `-Wno-fatal` if your
Verilator version turns style warnings into errors.

## Resources

With the default parameters, the core has:

* about 4,400 flip-flops;
* 8 × 1000 × 8 bits of row memory;
* 126 constant-coefficient multipliers in the convolvers, and the steering
  and orientation multipliers on top of that.

All coefficients are constants, so a synthesis tool turns most multipliers
into shift-and-add logic.
