# Fixed-angle CORDIC rotator

Many graphics, animation and robotics tasks keep turning vectors through the
*same* small angle: a clock hand advancing one step, a robot joint stepping,
an object spinning at a constant rate. A general CORDIC rotator handles any
angle. To do that it carries an angle accumulator and decides every
micro-rotation direction at run time, and it spends one micro-rotation per bit
of precision. When the angle is known at design time, all of that can be
worked out in advance:

* **Which micro-rotations.** A rotation by θ becomes a short list of
  elementary rotations by ±atan(2^-k). The list is chosen offline to be as
  short as possible for the accuracy needed. 20° needs 7 micro-rotations and
  30° needs 9. The conventional shift sequence 0, 1, 2, … takes 16 steps
  for 20° and still misses it by about 0.001°.
* **Which directions.** Each direction σᵢ is a constant bit. There is no angle
  datapath and no comparator.
* **How much to scale.** The CORDIC gain of the chosen list is a constant.
  It is removed by a few shift-add terms (1 ± 2^-s) rather than a multiplier.
* **How wide the shifters must be.** Every shift is known, so the smallest
  one, *l*, is removed from the barrel shifters by wiring ("hardwired
  pre-shifting").

This repository contains synthesizable SystemVerilog for that rotator. It has
three engines that compute the same result: a small iterative one, and two
pipelined cascades that accept one vector per clock. The RTL follows the
fixed-angle CORDIC of Parvathy and Anas, *Design of an Optimized CORDIC for
Fixed Angle of Rotation*. Where that description leaves things open, this
implementation makes its own choices. Those are listed in the last section.

## The rotation, stage by stage

One micro-rotation with shift k and direction σ (σ = +1 is counter-clockwise):

    X' = X − σ·(Y >> k)
    Y' = Y + σ·(X >> k)

It turns the vector by σ·atan(2^-k) and lengthens it by √(1 + 2^-2k). After
the whole list the vector has turned by Σ σᵢ·atan(2^-kᵢ) ≈ θ. It has also
grown by 1/K, where K = Π (1 + 2^-2kᵢ)^-½. The scaling stage multiplies both
coordinates by

    K_A = Π (1 + δⱼ·2^-sⱼ) ≈ K,

one term at a time: X' = X + δ·(X >> s), and the same for Y. Each coordinate
is scaled by a shifted copy of itself.

## The two built-in angles

The constants are in `rtl/cordic_pkg.sv`. Array element 0 is the first
operation applied.

| angle | micro-rotations k (σ)                                  | angle reached  | K          | scaling terms s (δ)       | K_A/K − 1 |
|-------|--------------------------------------------------------|----------------|------------|---------------------------|-----------|
| 20°   | 1+, 2−, 3+, 7+, 9−, 12+, 14−                           | 20.0000237°    | 0.86099323 | 3−, 5−, 6+, 13+           | 1.5e-5    |
| 30°   | 0+, 1−, 3+, 4+, 6+, 9−, 10+, 11+, 14−                  | 29.9999999°    | 0.62627147 | 1−, 2+, 9+, 14+, 16+      | 4.8e-6    |

This is how the lists were chosen, and how to make one for another angle:

1. Micro-rotations: start with m = 1. Search every choice of m distinct
   shifts in 0…15 and every sign pattern. Keep the set whose
   |θ − Σ σᵢ·atan(2^-kᵢ)| is smallest. If that error is still above the
   tolerance, increase m by one and search again. The tables use the counts
   7 (20°) and 9 (30°), and the best set of that size.
2. Scaling: compute K for that set. Search products of n terms (1 ± 2^-s),
   0 ≤ s ≤ 16, starting with n = 1. Stop at the first n where |K_A/K − 1| is
   below 2^-16.
3. Angles outside 0…45° are first folded into that range. See the next
   section.

Then pass the new `ROT_M`/`ROT_SHIFTS`/`ROT_DIRS` and `SCL_M`/`SCL_SHIFTS`/`SCL_DIRS` values as parameters of
`fixed_angle_cordic_top`. The 30° build in `tb/tb_workload_fixed_angles.sv`
shows how. Everything that depends on the set is derived from these
parameters: the ROM contents, the register lengths, the pre-shift *l* and the
barrel-shifter depth.

## Folding any angle onto a 0…45° set

Write the fixed angle as θ = q·90° + s·φ, where 0 < φ ≤ 45° and s = ±1.
The core only ever turns by +φ:

* A quarter turn only swaps and negates coordinates:
  (x, y) → (−y, x).
* A turn by −φ is the mirror image of a turn by +φ: negate y before the
  core and again after it.

`fold_map.sv` implements R(q·90°)·F^m, where F negates y. The top places one
instance, with `MIRROR` only, in front of each engine. It places another, with
`MIRROR` and `QUARTERS`, behind each engine. The top parameters `QUARTERS` and
`MIRROR` select the fold. Some examples:

| angle | built as                      |
|-------|-------------------------------|
| 70°   | 90° − 20°                     |
| 200°  | 180° + 20°                    |
| −30°  | the 30° set, mirrored         |

`tb/tb_workload_fixed_angles.sv` runs all three. With the defaults (0, 0)
the fold stages are plain wires. A negation of the most negative word wraps
to itself, so keep inputs inside the range.

## Hardwired pre-shifting

A barrel shifter for up to S shifts on an L-bit word has ⌈log₂(S+1)⌉ stages
of L two-input multiplexers (`barrel_shifter.sv`). In a fixed-angle rotator
every shift is at least *l*, the smallest shift in the set, and at most *s*,
the largest. So the *l* least-significant bits of a register are always
shifted out and never reach the adder. `preshift_shifter.sv` therefore:

* feeds only the L−l most-significant bits of the register into a barrel
  shifter that is L−l bits wide;
* shifts those bits by k − l, which is at most s − l;
* places the result in the L−l low bits of the adder operand;
* fills the top *l* bits of the operand by wiring.

The result is bit-identical to `din >>> k`, with a narrower shifter and
sometimes one stage fewer. For the 20° micro-rotations, l = 1 and s = 14, so
the shifter is 24 bits wide and shifts up to 13 places. For the 20° scaling
terms, l = 3 and s = 13, so it is 22 bits wide and shifts up to 10 places.

In the original scheme those *l* top bits are tied to 0. That is only correct
while the operand is non-negative, and rotated coordinates do go negative.
Here they copy the sign bit. For a non-negative word that is still 0, so the
structure is the same, but two's complement inputs work too.

In the pipelined cascades there is no barrel shifter at all. Each stage's
shift is a constant, so `x >>> k` is just wiring into the adder.

## The three engines

`fixed_angle_cordic_top` holds all three side by side.

| engine                    | module(s)                               | latency (clocks)         | throughput          | storage (20° build)        |
|---------------------------|-----------------------------------------|--------------------------|---------------------|----------------------------|
| iterative                 | `opt_cordic` → `scaling_circuit`        | ROT_M+SCL_M+1 = 12       | 1 per ROT_M+SCL_M+2 | 2×(2×25-bit regs + SBR)    |
| single-rotation cascade   | `cascade_cordic`                        | ROT_M+SCL_M = 11         | 1 per clock         | 11 stages × 51 bits        |
| bi-rotation cascade       | `bi_rotation_cordic`                    | ⌈ROT_M/2⌉+⌈SCL_M/2⌉ = 6  | 1 per clock         | 6 stages × 51 bits         |

**Iterative engine.** `opt_cordic` has an X and a Y register, each loaded
through a multiplexer from the input or fed back from its adder. Each clock
does one micro-rotation:

* `ctrl_rom`, a ROM of a few words indexed by the iteration counter, gives
  k(i);
* `sbr`, the sign-bit register, gives σᵢ. It is loaded with the direction word
  and shifts one place per iteration;
* two pre-shifting shifters and two `addsub` units form X' and Y'. The shifted
  copies cross over: X's adder takes Y's shifted copy.

When it finishes, its `done` starts `scaling_circuit`. That circuit has the
same structure (ROM, SBR, pre-shifting shifters) without the cross-over.
Both circuits report a sticky signed-overflow flag for the current operation.

The plain reference CORDIC, with shifts 0, 1, 2, … on every iteration, is
`opt_cordic` with `SHIFTS = {…, 2, 1, 0}`. Its testbench runs that
configuration too.

**Single-rotation cascade.** `cascade_cordic` has one `rotation_module` per
micro-rotation. Each module is a fixed adder and a fixed subtractor with a
wired shift, followed by a register. Then comes one `scale_module` per scaling
term, also registered. A valid bit travels alongside the data. There is no
back-pressure.

**Bi-rotation cascade.** `bi_rotation_cordic` chains two micro-rotations, or
two scaling terms, between each pair of registers. That halves the latency
and the register count, at the cost of two adder delays per stage. An odd
last operation gets a stage of its own.

All three engines apply the same operations in the same order, each result
truncated to the word length. They therefore produce **bit-identical**
results, and the end-to-end testbench checks that.

## Interface of the top

All ports are W = 25 bits unless marked otherwise. Reset `rst_n` is
asynchronous and active-low.

| port                                   | dir | meaning |
|----------------------------------------|-----|---------|
| `it_start`, `it_x0`, `it_y0`           | in  | start the iterative engine; ignored while `it_busy` |
| `it_busy`, `it_done`, `it_x`, `it_y`, `it_ovf` | out | `it_done` pulses once with the scaled result, which is held until the next start; `it_ovf` flags an adder overflow |
| `pl_valid_in`, `pl_x0`, `pl_y0`        | in  | one vector per clock for both cascades |
| `cs_valid`, `cs_x`, `cs_y`             | out | single-rotation cascade result |
| `br_valid`, `br_x`, `br_y`             | out | bi-rotation cascade result |

**Number format.** Coordinates are 25-bit two's complement integers. The
hardware has no fixed binary point, but a point has to leave headroom. With
1.0 = 2^20 (the testbenches' convention), a rotated vector stays well inside
the range. The worst case is the unscaled 30° gain of 1.6 times √2, applied
to inputs below 2^22. The iterative engine flags a result that wraps.

**Accuracy.** With 1.0 = 2^20:

* turning (1, 0) by 20° gives (0.939707, 0.342026), against the exact
  (0.939693, 0.342020);
* turning (1, 0) by 30° gives (0.866020, 0.499994);
* the error is set by the chosen K_A (about 1.5e-5 relative) and by
  truncation, not by the angle set;
* eighteen successive 20° rotations return a unit vector to within 1e-3 of
  its start.

**Size.** Coarse synthesis with yosys of the 20° top gives 218 word-level
cells and 983 flip-flop bits. Of those, 63 flip-flops are in the iterative
rotator, 561 in the single-rotation cascade and 306 in the bi-rotation
cascade.

## Files

| file | contents |
|------|----------|
| `rtl/cordic_pkg.sv` | word length, shift type, 20° and 30° constant sets |
| `rtl/barrel_shifter.sv` | multiplexer-stage arithmetic right shifter |
| `rtl/preshift_shifter.sv` | barrel shifter with hardwired pre-shift *l* |
| `rtl/addsub.sv` | adder/subtractor with signed overflow |
| `rtl/fold_map.sv` | fixed mirror / quarter-turn folding stage |
| `rtl/ctrl_rom.sv` | shift-count ROM |
| `rtl/sbr.sv` | sign-bit (direction) register |
| `rtl/opt_cordic.sv` | iterative fixed-angle rotator |
| `rtl/scaling_circuit.sv` | iterative shift-add scaler |
| `rtl/rotation_module.sv`, `rtl/scale_module.sv` | dedicated cascade stages |
| `rtl/cascade_cordic.sv`, `rtl/bi_rotation_cordic.sv` | pipelined engines |
| `rtl/fixed_angle_cordic_top.sv` | top level |
| `tb/cordic_ref_pkg.sv` | bit-exact integer models and real-valued helpers for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_workload_fixed_angles.sv` | 20°, 30°, 70°, 200° and −30° builds; all engines against cos/sin |
| `tb/angle_unit_check.sv` | one build plus checker, used by the workload testbench |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/cordic_pkg.sv tb/cordic_ref_pkg.sv tb/tb_fixed_angle_cordic_top.sv \
        --top-module tb_fixed_angle_cordic_top
    ./obj_dir/Vtb_fixed_angle_cordic_top

For another testbench, replace `tb_fixed_angle_cordic_top`. The top-level
testbench runs the default 20° build with no parameter overrides. Folding is
therefore exercised by `tb_workload_fixed_angles` and `tb_fold_map`. The
top-level testbench counts each mechanism it exercises:

* iterative operations;
* starts ignored while busy;
* overflows;
* iterations in which pre-shifting dropped a set bit;
* cascade results, including back-to-back ones;
* the 18-step full turn.

Each testbench compares the RTL against integer models written separately
in `tb/cordic_ref_pkg.sv`. The exact rotation is computed with `$cos`/`$sin`.

## Choices made beyond the original description

The original design fixes the structure:

* ROM-driven shifts;
* SBR-driven directions;
* hardwired pre-shifting;
* dedicated single-rotation stages in a cascade;
* shift-add scaling.

The following are this implementation's own choices:

* **Word length 25 bits and two's complement.** Any other width works
  through `W`.
* **The angle sets.** Only the micro-rotation counts (7 for 20°, 9 for 30°)
  come from the original. The shifts, directions and scaling terms above
  came from the search described in that section.
* **Sign fill instead of zero fill** in the pre-shifted MSBs, as explained
  above.
* **Control of the iterative engine.** The start/busy/done handshake, the
  load multiplexer, the asynchronous reset, the sticky overflow flag, and
  chaining the rotator's `done` into the scaler's `start`.
* **Where the k − l subtraction happens.** It is done next to the shifter.
  It could equally be stored in the ROM.
* **Pipelining.** A register after every cascade stage, and scaling in the
  cascades done by dedicated `scale_module` stages. The original gives
  scaling only as an iterative circuit.
* **The bi-rotation unit.** The original only names a circuit built from
  pairs of micro-rotations. Here it is two dedicated rotation modules chained
  inside one pipeline stage.
* **The scaling circuit applies each term to its own coordinate**
  (X' = X ± X>>s), following the scale-factor product.

* **Folding.** The original only states that any angle can be mapped into
  0…45°. The mirror-and-quarter-turn stages, and their placement around the
  engines, are this implementation's.

Not included:

* vectoring mode;
* any on-chip search for the angle sets, which is done offline.
