# Iterative CORDIC rotator

This is a small fixed-point unit that rotates a 2-D vector `(x, y)` by an angle `z` using
only shifts, additions and a table of constant angles. It has no multiplier. The classic use
is computing `cos z` and `sin z`: start from `(1/K, 0)` and rotate by `z`, and the result is
`(cos z, sin z)`.

The unit is sequential. It accepts one operation, spends one clock on each of `N`
micro-rotations (10 by default), and then presents the result with a one-clock `ready` pulse.

## The algorithm

A rotation by `z` is split into `N` micro-rotations by the fixed angles
`a_k = atan(2^-k)`, with `k = 0 .. N-1`. The first few angles are 45°, 26.6°, 14.0°, and so on.
Each angle is either added or subtracted. The sign of the residual angle decides which:

```
if z >= 0:  x' = x - (y >>> k)   y' = y + (x >>> k)   z' = z - a_k
else:       x' = x + (y >>> k)   y' = y - (x >>> k)   z' = z + a_k
```

Rotating by `±atan(2^-k)` needs a multiplication by `2^-k`, which is an arithmetic shift. The
price is that every step also stretches the vector by `sqrt(1 + 2^-2k)`. After `N` steps:

- `xo ≈ K(N) · (xi·cos zi − yi·sin zi)`
- `yo ≈ K(N) · (yi·cos zi + xi·sin zi)`
- `zo ≈ 0`

The total gain is `K(N) = Π sqrt(1 + 2^-2k)`, which is 1.64676 for N = 10. It approaches
1.6467602581 for large N.

Accuracy and range:

- The residual angle `zo` is what was left unrotated. Its magnitude stays below the last
  step angle, `atan(2^-(N-1))`, which is 0.00195 rad for N = 10. This sets the accuracy: about
  2·10⁻³ on the outputs at N = 10. Each extra iteration roughly halves the error.
- The input angle has to lie within the sum of all step angles, about ±1.74 rad (±99.9°).
  Other angles must first be folded into that range by the user, for example by a quadrant
  swap. This design does not do that folding.

## Number format

All six data ports are signed two's complement, 32 bits wide, with 29 fraction bits (Q2.29):

| bits  | meaning         |
|-------|-----------------|
| 31    | sign            |
| 30–29 | integer part    |
| 28–0  | fraction        |

Some values in this format:

| value | encoding        |
|-------|-----------------|
| 1.0   | `32'h2000_0000` |
| 0.5   | `32'h1000_0000` |
| π/4   | `32'h1921_FB54` |
| 1/K   | `32'h136E_9DB5` |

The range is −4 to +4. That holds a unit vector after the gain of 1.65, and angles up to ±π.
Converting a real number `r` gives `round(r · 2^29)`. Converting back gives `v / 2^29`.

All additions wrap modulo 2^32. Nothing saturates. Keep `|x|` and `|y|` below about 1.7 so
that `K·|v|` stays in range.

The constant tables are computed when the design is elaborated, from their formulas. Both
are rounded to the nearest LSB.

- **Angle table:** `A(k) = round(atan(2^-k) · 2^FRAC)`. It has 60 entries. For a larger `k`,
  the last entry is shifted right by one more bit per step. At 29 fraction bits every entry
  from `k = 30` on is already 0, so that rule only matters for wider formats.
- **Gain table:** `P(i) = round(Π_{m=0..i} 1/sqrt(1+2^-2m) · 2^FRAC)`, for `i < 33`. The gain
  block uses `P(min(N,33) − 1)`.

## Gain compensation

By default (`GAIN_COMP = 0`) the gain `K(N)` is left in the result. The caller removes it by
pre-scaling the input: feeding `xi = 1/K` gives unscaled cosine and sine. This keeps the
datapath free of multipliers and matches the reference behaviour that this design follows.

With `GAIN_COMP = 1`, the two `cordic_gain` instances multiply `xo` and `yo` by `1/K(N)`
(`32'h136E_9E84` for N = 10) on their way to the output registers. The product is rounded
half-up. The 32×32 multipliers are present in the hierarchy either way. With
`GAIN_COMP = 0`, their outputs are unused and synthesis removes them.

## Interface and timing

| port             | dir | width | meaning |
|------------------|-----|-------|---------|
| `clk`            | in  | 1     | clock, rising edge |
| `rst_n`          | in  | 1     | asynchronous reset, active low; clears all registers and outputs |
| `load`           | in  | 1     | start; sampled on a rising edge while the unit is idle |
| `xi`, `yi`, `zi` | in  | 32    | input vector and angle (radians); captured at the load edge |
| `ready`          | out | 1     | high for exactly one clock when a new result is on `xo`, `yo`, `zo` |
| `xo`, `yo`, `zo` | out | 32    | result; held until the next result |

Call the edge at which `load` is accepted edge 0. The operation then runs as follows:

1. At edge 0, `xi`, `yi` and `zi` are captured. They may change afterwards.
2. Edges 1 … N each perform one micro-rotation.
3. At edge N the outputs are written. `ready` is high from edge N to edge N+1, so the
   latency is N clocks.
4. `load` is sampled again in the `ready` clock. If it is high, the next operation starts at
   edge N+1. Back to back, the unit therefore takes one operation every N+1 clocks.

A `load` that arrives while the unit is busy is ignored. It is not queued.

Reset clears `ready` and the outputs to zero. The unit stays idle while `rst_n` is low.

## Structure

```
            +-------------+  start/step/last, idx
  load ---->| cordic_ctrl |------------------------+----------> ready
            +-------------+                        |
                                  idx              v
  xi,yi,zi -> [xn yn zn] --> cordic_microrotation --+--> [xo yo zo]
                  ^        (angle from cordic_atan_rom)   (via cordic_gain
                  +---------------- xt yt zt               if GAIN_COMP)
```

| file | contents |
|------|----------|
| `rtl/cordic_pkg.sv` | format defaults, table sizes, the elaboration-time functions `atan_fixed` and `kprod_fixed` |
| `rtl/cordic.sv` | top: working registers `xn`, `yn`, `zn`, output registers, wiring |
| `rtl/cordic_ctrl.sv` | two-state sequencer (IDLE, RUN) and iteration counter; asserts that `ready` is a single-clock pulse after the last step |
| `rtl/cordic_microrotation.sv` | the combinational step above |
| `rtl/cordic_atan_rom.sv` | angle lookup by iteration index |
| `rtl/cordic_gain.sv` | constant multiplication by `1/K(N)` with rounding |

Only one micro-rotation unit exists. It is reused in every clock, so the datapath costs three
32-bit adders, two barrel shifters for `x` and `y`, and a 64×32 constant table.

### Parameters of `cordic`

| parameter      | default | meaning |
|----------------|---------|---------|
| `WIDTH`        | 32 | word width |
| `FRAC`         | 29 | fraction bits |
| `N`            | 10 | iterations per operation (at least 1) |
| `ANGLE_LENGTH` | 60 | entries of the angle table before the halving rule takes over |
| `KPROD_LENGTH` | 33 | entries of the gain table |
| `GAIN_COMP`    | 0  | 1 = scale `xo` and `yo` by `1/K(N)` |

Accuracy improves by about one bit per iteration, up to roughly `N = FRAC`.

## Where this departs from a literal reading of the reference behaviour

This design follows a clocked behavioural description of the same unit. The following points
are choices made here:

- **Reset.** `rst_n` is a true asynchronous active-low reset. The reference only waits once
  for its reset input to rise and never returns to reset.
- **Sampling of `load`.** `load` is only ever sampled on a clock edge. Right after producing a
  result, the reference also tests `load` without waiting for a clock edge. For a `load` held
  high through the `ready` clock, both start the next operation. They differ only for a
  `load` pulse that ends before the next rising edge.
- **Angle source.** The angle comes from a table indexed by the iteration count, instead of a
  register that is updated every step. The values are the same.
- **Gain compensation.** The reference describes it in floating point and leaves it switched
  off. Here it is a rounded fixed-point multiply, and also off by default.
- **`N = 0`.** The reference produces no output for `N = 0`. This design refuses to elaborate
  with it.

## Simulation

The testbenches are self-checking. Each one prints `TB_RESULT checks=<n> failures=<m>`.

- `tb/cordic_ref_pkg.sv` is a bit-exact reference model in plain 32-bit integer arithmetic,
  with real-number helpers. The testbenches share it.
- `tb_cordic` is the end-to-end test at the default parameters:
  - The vectors `(1/K, 0)` rotated by 0, π/6, π/4 and π/3. The results are checked against
    cos and sin, to within 0.004.
  - 300 random vectors, compared bit for bit with the reference model.
  - For every operation: the latency of N clocks, the one-clock `ready` pulse, and that the
    outputs are held afterwards.
  - It counts positive and negative rotation steps, loads ignored while busy, and
    back-to-back loads. A failure is recorded if any of these never happens.
- `tb_cordic_gaincomp` tests the top with `GAIN_COMP = 1`.
- `tb_cordic_ctrl`, `tb_cordic_microrotation`, `tb_cordic_atan_rom` and `tb_cordic_gain` test
  the blocks on their own. The angle-table test also checks entries computed by hand and the
  indices past the 60-entry table.

To run the end-to-end test with Verilator (the packages come first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cordic \
  rtl/cordic_pkg.sv tb/cordic_ref_pkg.sv \
  rtl/cordic_atan_rom.sv rtl/cordic_ctrl.sv rtl/cordic_gain.sv \
  rtl/cordic_microrotation.sv rtl/cordic.sv tb/tb_cordic.sv
./obj_dir/Vtb_cordic
```

For a unit test, use the same command with that testbench as the top module and the file
list reduced to what it instantiates. Each testbench runs in well under a second.

Lint (`verilator --lint-only -Wall`) reports two kinds of harmless warnings:

- Package constants that a given module does not use.
- `SYNCASYNCNET` on `rst_n`. The reset is used asynchronously by the flip-flops and
  synchronously as the `disable iff` condition of the assertions in `cordic_ctrl`.
