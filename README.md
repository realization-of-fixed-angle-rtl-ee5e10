# Fixed-angle CORDIC rotators

Rotating a vector (x, y) through an angle that never changes is the same as
multiplying the complex number x + jy by a constant of unit magnitude. Such
rotations come up in robot kinematics, in animation (a clock hand stepping by
one degree), in graphics interpolation and in signal processing. A general
CORDIC rotator spends most of its work on deciding, iteration by iteration,
which way to turn. When the angle is fixed, all of those decisions can be made
when the hardware is built.

This library holds SystemVerilog for four circuits that do such a fixed
rotation. All four rest on three ideas:

* **Few, precomputed micro-rotations.** The angle is written as a short sum
  of elementary CORDIC angles, `theta ≈ sum sigma(i) * atan(2^-k(i))`.
  Only the shift counts `k(i)` and the directions `sigma(i)` are stored: the
  shifts in a small ROM and the directions in a *sign-bit register* (SBR).
  There is no angle accumulator and no comparison.
* **Shift-add scaling.** Every micro-rotation stretches the vector by
  `sqrt(1 + 2^-2k)`. The total gain is removed by multiplying by a product of
  a few factors `(1 ± 2^-s)`, each one more shift and add.
* **Hardwired pre-shifting.** The smallest shift of the set is done by wiring,
  so the barrel shifters only have to cover the rest of the range.

A fifth unit, a Cartesian-to-polar converter (a vectoring CORDIC), stands
beside the rotators. It reproduces the simulation that was published with the
design.

## The default rotation

Every rotator turns the vector by **+22.5°** with four micro-rotations. The
constants live in `fixed_cordic_pkg`.

| step | shift k | direction | elementary angle |
|------|---------|-----------|------------------|
| 0    | 2       | +         | 14.0362°         |
| 1    | 3       | +         | 7.1250°          |
| 2    | 5       | +         | 1.7899°          |
| 3    | 7       | −         | −0.4476°         |
| sum  |         |           | 22.4964° (0.0036° short) |

The gain of these four micro-rotations is `1/K`, where
`K = prod (1 + 2^-2k)^-1/2 = 0.9621519`. Four scaling steps bring it back:

    (1 − 2^-5)(1 − 2^-7)(1 + 2^-10)(1 + 2^-15) = 0.9621497

The angle and both sets are this library's choice: they are the best that
an exhaustive search over four terms found for 22.5°. Any other angle is set
with module parameters (see *Changing the angle*).

With 16-bit words the rotators match the exact 22.5° rotation to within
6 LSB for inputs up to ±8191. Most of that error is truncation in the
shifts. The tests check this bound on every vector.

## Hardwired pre-shifting

This idea matters most for hardware cost. It is also the easiest to get
wrong.

A micro-rotation needs `x >> k` and `y >> k`, with `k` changing from step to
step. A barrel shifter for shifts 0 … S has `ceil(log2(S+1))` stages of 2:1
multiplexers, and every stage is as wide as the word. Suppose the smallest
shift in the set is `l`. Then the `l` low bits of the register never reach the
adder, and the shift by `l` costs nothing if it is done by wiring. Only the
`L − l` upper bits enter the multiplexers. The multiplexers then only cover
`k − l`, from 0 up to `max(k) − l`. The result lands in the `L − l` low bits
of the adder operand.

`preshift_barrel_shifter` implements this. For the default set
(`l = 2`, `max = 7`), the multiplexers are 14 bits wide and cover 0 … 5, so
there are three stages. The ROM stores `k − l` (0, 1, 3, 5).

**Difference from the source.** The source fills the `l` top bits of the
shifted operand with zeros. That is correct only for unsigned data. Here the
coordinates are two's complement, so the top bits are filled with the sign.
The test for this block checks negative operands for exactly that reason.
The source also names the minimum and maximum shift inconsistently in its
text. Its pre-shifting diagram (shift by `k(i) − l`, load `L − l` MSBs) is
the reading used here.

## The four realizations

Here latency means clock edges counted from the edge that takes a vector in
to the edge at which `out_valid` is sampled high.

| module                    | what it is                                  | vectors per cycle | latency |
|---------------------------|---------------------------------------------|-------------------|---------|
| `rotate_then_scale`       | iterative rotation cell, then iterative scaler | 1/5            | 10      |
| `interleaved_cordic_cell` | one cell, rotation and scaling alternate    | 1/9               | 9       |
| `single_rotation_cascade` | one hardwired stage per step, pipelined     | 1                 | 8       |
| `birotation_cascade`      | two 2-step cells in a chain, then scaling   | 1/2               | 9       |

The iterative cells cost the least hardware. The cascades cost more and give
much higher throughput. Their word-level sizes after coarse synthesis (adders
and multiplexers counted as one cell each) are 96, 59, 40 and 81 cells, with
80, 78, 264 and 237 storage bits.

### Iterative cell and separate scaler (`rotate_then_scale`)

`fixed_rotation_cell` is the classic CORDIC loop, minus the angle path:

    x <- x − sigma(i)·(y >> k(i))
    y <- y + sigma(i)·(x >> k(i))

The X and Y registers load the input through their input multiplexer. An
iteration counter addresses the ROM (`shift_rom`), and `sign_bit_register`
recirculates the directions, one bit per step. The two shifted words cross
over to the opposite adder/subtractor (`addsub`).

`shift_add_scaler` has the same structure without the crossing: each
coordinate is added to a shifted copy of itself. `rotate_then_scale` chains
the two. The scaler works on vector n while the cell rotates vector n+1. An
assertion checks that the scaler is always free at the hand-over, which
requires NS ≤ M.

### Interleaved scaling (`interleaved_cordic_cell`)

A single datapath does both kinds of step, alternately: rotation 0,
scaling 0, rotation 1, and so on, so 2M steps in all. The ROM holds the
interleaved shift list and the SBR holds the interleaved signs. A T flip-flop
marks the scaling cycles.

The trick is in how the scaling step gets its operands without touching the
shifted paths. The shifted y always goes to the "x" adder, and the shifted x
to the "y" adder. In a scaling cycle, a `line_changer` exchanges the two
*unshifted* lines instead. The "x" adder then computes `y ± (y >> s)`, and the
"y" adder computes `x ± (x >> s)`. The results are written back crosswise.
The crossing is folded into the register input multiplexer, which already
chooses between the initial and the fed-back value. The barrel shifter to
adder path is the same as in the plain cell, so the critical path does not
grow.

The source gives no drawing of this cell. The crosswise write-back, the
strict alternation that starts with a rotation, and equal numbers of rotation
and scaling steps are choices made here.

### Single-rotation pipeline (`single_rotation_cascade`)

Each `single_rotation_module` performs one micro-rotation. Its shift is wired
and its add/subtract operation is fixed, so it needs no ROM, no SBR and no
multiplexer. A register follows every stage. NS `scaling_module` stages
follow the rotation stages, also registered. The critical path is one
addition, and one vector enters per clock. Where the scaling goes is left
open in the source; a pipelined chain is the choice made here.

With `PIPELINED = 0`, the stages are chained without registers and only the
output is registered. This is the non-pipelined form: the latency is one edge,
and the critical path runs through all the additions. The source quotes a
delay of one word-wide addition plus one full-adder delay per further stage
for this form. That points to carry-save arithmetic, which is not built here:
the stages use ordinary adders, so the chain is slower than that figure.

### Bi-rotation cell and cascade (`birotation_cell`, `birotation_cascade`)

`birotation_cell` performs exactly two micro-rotations, `k0 < k1`, in two
cycles. The shifters are pre-shifted by `k0` through wiring and have a single
row of 2:1 multiplexers that adds `k1 − k0`. The row is controlled by a
T flip-flop, which is 0 for the first step and 1 for the second. A 2-bit SBR
holds the two directions.

The second result is not written back. It goes straight from the adders to
the output. The next cell loads it at the same clock edge at which this cell
loads its next input. In this way a chain of cells runs in lock-step at one
vector per two cycles. An assertion checks the lock-step.
`birotation_cascade` chains NB cells, with cell b doing steps 2b and 2b+1.
The default is two cells for four micro-rotations. Scaling follows as in the
single-rotation pipeline.

### Handshake

The iterative units and the bi-rotation units take a vector on a clock edge
where `in_valid` and `in_ready` are both high. `out_valid` is high for one
cycle with the result. The iterative units keep the result on their outputs
until they accept the next vector. `single_rotation_cascade` has no ready
signal and takes a vector on every edge where `in_valid` is high. The rotators
use an asynchronous active-low reset. The handshake and the reset come from
this library, not from the source.

## Cartesian-to-polar converter (`cartesian2polar`)

`cartesian2polar` is a seven-step vectoring CORDIC. It drives y towards 0 and
adds up the angles it turned through. The magnitude is then multiplied by
`2^-1 + 2^-3 − 2^-6 − 2^-9 = 0.60742`, which is close to 1/1.6468. Angles are
in **degrees × 256**. This unit comes from the published simulation. The
angle values printed there (11520, 18321, 21914, 23738, 24654, 25112, 25341)
are the running sums of the elementary angles in this unit. The port names
are taken from the same simulation: `clk`, `reset`, `clk_enable`, `x0`, `y0`,
`ce_out`, `xn1`, `zn1`, `dvld`.

For (0, 1) the converter returns `zn1 = 25341` and `xn1 = 0`, as in the
published simulation. The 98.99° comes from a vector too short to steer: y
never changes sign, so all seven angles add up.

The converter works on a fixed schedule. An 8-bit counter runs 0 … 7 in
enabled cycles. Inputs are sampled at count 0, the iterations run at counts
1–7, and `dvld` is high for the following enabled cycle. That makes one
conversion every eight enabled cycles. There is no quadrant pre-rotation, so
the angle range is about ±99°; use x ≥ 0. The reset is synchronous and active
high. Two guard bits are used inside. The schedule, the widths and the gain
constant are choices made here.

## Number format and limits

* Coordinates are `WL = 16`-bit two's complement. Any fixed-point scaling
  works, since rotation is linear.
* Arithmetic wraps around; nothing saturates. Keep |x|, |y| ≤ 8191
  (2^13 − 1) so that no intermediate value overflows. The four-step gain is
  only 1.04, but a diagonal vector is up to √2 longer than its coordinates.
* Shifts truncate towards −∞, as an arithmetic right shift does.

## Changing the angle

Every rotator takes the set as parameters: `KSH` (shift counts) and
`KSIGNS`/`SIGNS` (bit i = 1 means sigma(i) = +1, counter-clockwise). The
scaler takes `SSH` and `SSIGNS` (bit j = 1 means add). To build another
angle:

1. Pick shifts and signs so that `sum sigma(i)·atan(2^-k(i))` is close
   to the angle. A search over a few terms is cheap.
2. Compute `K = prod_i (1 + 2^-2k(i))^-1/2`.
3. Pick `s(j)` and `tau(j)` so that `prod_j (1 + tau(j)·2^-s(j))` is close
   to K.

The modules derive the pre-shift, the multiplexer depth and the ROM contents
from `KSH`. The same shift may appear twice. For example,
`KSH = '{0, 0}`, `KSIGNS = 2'b11`, `SSH = '{1}`, `SSIGNS = 1'b0` is an exact
+90° rotation. For `birotation_cascade`, each pair must be ascending
(`k(2b) < k(2b+1)`). `rotate_then_scale` needs NS ≤ M. Pass array
parameters as typed localparams, for example
`localparam int unsigned K [3] = '{1, 4, 7};`.

## Files

| file | contents |
|------|----------|
| `rtl/fixed_cordic_pkg.sv` | word length, default sets, `vec_t` |
| `rtl/addsub.sv` | adder/subtractor |
| `rtl/preshift_barrel_shifter.sv` | barrel shifter with hardwired pre-shift |
| `rtl/shift_rom.sv`, `rtl/sign_bit_register.sv` | shift ROM and SBR |
| `rtl/fixed_rotation_cell.sv` | iterative rotation cell |
| `rtl/shift_add_scaler.sv` | iterative scaling circuit |
| `rtl/rotate_then_scale.sv` | cell followed by scaler |
| `rtl/line_changer.sv`, `rtl/interleaved_cordic_cell.sv` | interleaved cell |
| `rtl/single_rotation_module.sv`, `rtl/scaling_module.sv`, `rtl/single_rotation_cascade.sv` | pipelined cascade |
| `rtl/birotation_cell.sv`, `rtl/birotation_cascade.sv` | bi-rotation cell and chain |
| `rtl/cartesian2polar.sv` | vectoring converter |
| `rtl/fixed_angle_cordic_top.sv` | all of the above side by side |
| `tb/cordic_ref_pkg.sv` | integer and real reference models |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_workloads.sv` | ±90°, two-, three- and six-step rotations |

`fixed_angle_cordic_top` has no parameters. Each unit has its own ports,
prefixed `rts_`, `ilv_`, `src_`, `brc_` and `c2p_`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself; a
watchdog ends a run that hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fixed_cordic_pkg.sv tb/cordic_ref_pkg.sv tb/tb_fixed_angle_cordic_top.sv \
        --top-module tb_fixed_angle_cordic_top
    ./obj_dir/Vtb_fixed_angle_cordic_top

Replace the testbench name to run another one. To lint a module:
`verilator --lint-only -Wall -Irtl -y rtl rtl/fixed_cordic_pkg.sv rtl/<module>.sv`.

## How far it is checked

* Every result of every rotator testbench is compared bit for bit with an
  integer model. The model writes shifts as floor divisions rather than
  shift operators. Each result is also compared with the exact real rotation.
* Latency and the spacing between accepted vectors are checked cycle by
  cycle.
* The top-level test drives all five units at once. It fails if any of these
  never happens: back-pressure, hand-over from rotation cell to scaler,
  back-to-back pipeline input, two-cycle bi-rotation spacing, or clock-enable
  gating.
* `tb_workloads` runs the other configurations that the source evaluates:
  the exact ±90° rotation, a two-step rotation within 0.033 rad, a
  three-step cascade (0.041° off), both pipelined and non-pipelined, and a
  six-step rotation on a three-cell bi-rotation chain and on a six-stage
  pipeline.
* Each testbench was also run against a copy of its module with one
  deliberate error, and it failed each time.

## Departures from the source and open points

* The angle sets, the scaling sets, the 16-bit word length and the default
  angle are chosen here; the source prints no concrete set. The default
  pipeline has four stages, while the source draws
  three. Four lets every realization share one set.
* The pre-shifted operand is sign-filled, not zero-filled (see above).
* The source's reference circuit, an iterative CORDIC without ROM or
  pre-shifting, is only a baseline for comparison and is not included.
* The handshake, the reset style, the interleaved cell's write-back, the
  scaling pipelines of the cascades and the converter's schedule are
  choices made here.
* Throughput and area were not compared with the source's FPGA figures.
