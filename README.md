# Pipelined fixed-point CORDIC sine/cosine generator

This is a sine and cosine generator that uses no multiplier. It is built on the
circular CORDIC (COordinate Rotation DIgital Computer) algorithm in rotation
mode. Start with the vector (K_c, 0). Turn it by the input angle θ through a
series of ever smaller elementary rotations, each made of shifts and additions
only. The vector that comes out is (cos θ, sin θ). The word length is a
parameter. The three lengths the design is meant for are 16, 24 and 32 bits,
and 16 is the default. The number of iterations equals the word length, and
every iteration is one pipeline stage. So the generator takes one new angle
per clock cycle and returns its result `WIDTH` cycles later.

## The algorithm as built

Iteration *i* uses the elementary angle α_i = atan(2^-i). It looks at the sign of
the residual angle z. Then it turns the vector by +α_i or −α_i, so that z moves
towards zero:

```
s      = (z >= 0) ? +1 : -1
x'     = x - s * (y >>> i)
y'     = y + s * (x >>> i)
z'     = z - s * alpha_i
```

Each iteration leaves out the factor cos α_i of a true rotation, which would
need a multiply. After all iterations the vector has therefore grown by
1/K_c = ∏ sqrt(1 + 2^-2i) ≈ 1.6468. The generator removes this growth at the
start instead of the end. The first stage is fed x0 = K_c ≈ 0.60725 and y0 = 0,
so the last stage holds cos θ and sin θ directly, with no final multiplier. K_c
is computed for the actual iteration count `ITER`.

The rotation here is counter-clockwise for a positive residual angle, so y
becomes the sine. The algorithm is often written for clockwise rotation. That
form gives the same magnitudes with the sign of the sine flipped.

### Convergence range

The elementary angles add up to Σ atan(2^-i) ≈ 1.7433 rad (99.9°), and no
sequence of ± choices can go past that. The generator therefore accepts angles
only in |θ| ≤ 1.7433 rad. There is no quadrant pre-rotation. To cover the whole
circle, fold the angle into (−π/2, π/2] outside the generator and fix the signs
of the results. A concurrent assertion in `cordic_sincos` reports any angle
outside the range in simulation.

## Number formats

All values are two's complement, with `WIDTH-2` fractional bits. That leaves a
sign bit and one integer bit, for a range of [−2, 2).

| signal               | meaning                     | 1.0 is      | example, WIDTH=16, θ = 60° |
|----------------------|-----------------------------|-------------|----------------------------|
| `angle`              | θ in radians                | 2^(WIDTH-2) | 17157 (1.04718 rad)        |
| `cos_out`, `sin_out` | cos θ and sin θ             | 2^(WIDTH-2) | 8192 (0.5), 14189 (0.86603)|

Inside the pipeline, x, y and z carry `GUARD` (default 4) extra fractional
bits. They also carry one more integer bit than the ports, so `WIDTH+GUARD+1`
bits in all (21 at the defaults). The guard bits absorb the truncation of the
shifts. The last stage is rounded to nearest on its way to the ports, and the
leftover z is dropped. In the test runs the results were never more than
1 LSB from the exact cosine and sine of the quantised angle, at any of the
three word lengths. The 60° results above match the exact values to the LSB.

## Pipeline and interface

```
angle ─► [stage 0] ─► [stage 1] ─► ... ─► [stage ITER-1] ─► round ─► cos_out, sin_out
K_c,0 ─►   α_0          α_1                  α_ITER-1
in_valid ────────────── valid flag travels with the data ─────────► out_valid
```

`cordic_sincos` has these ports:

| port        | dir | width   | meaning                                            |
|-------------|-----|---------|----------------------------------------------------|
| `clk`       | in  | 1       | clock                                              |
| `rst_n`     | in  | 1       | asynchronous active-low reset; clears every stage  |
| `in_valid`  | in  | 1       | `angle` is valid in this cycle                     |
| `angle`     | in  | WIDTH   | θ, see the number formats                          |
| `out_valid` | out | 1       | `cos_out`/`sin_out` are valid in this cycle        |
| `cos_out`   | out | WIDTH   | cos θ                                              |
| `sin_out`   | out | WIDTH   | sin θ                                              |

Timing:

- An angle presented in cycle n comes out in cycle n+`ITER`.
- Angles can be sent back to back, and gaps in `in_valid` come out as gaps in
  `out_valid`.
- There is no stall input. The pipeline always moves.
- A reset throws away every angle still in flight.

The parameters are `WIDTH` (16), `ITER` (defaults to `WIDTH`) and `GUARD` (4).
At the defaults, coarse synthesis gives about 980 flip-flops and about 200
word-level cells (adders and multiplexers). Both grow roughly with WIDTH².

## Modules

| file                    | role |
|-------------------------|------|
| `rtl/cordic_pkg.sv`     | Elaboration-time constants: atan(2^-i) from its Taylor series, K_c, and rounding to a fixed-point grid. Only real arithmetic in constant functions, so no data file is needed. |
| `rtl/cordic_atan_rom.sv`| The elementary-angle table α_i, indexed by iteration. In the pipeline every stage uses a constant index, so each copy reduces to one constant. |
| `rtl/cordic_stage.sv`   | One registered micro-rotation: two shift-adds for x and y, one add for z, and the sign test. |
| `rtl/cordic_sincos.sv`  | Top. Builds the `ITER`-stage pipeline, feeds in the K_c starting vector, rounds the outputs and checks the angle range. |

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=N failures=M` line.

- `tb/tb_cordic_atan_rom.sv` compares the table against `$atan`, for a
  16-entry table and a 12-entry one. In the 12-entry table the unused indices
  must read 0.
- `tb/tb_cordic_stage.sv` drives random vectors and angles into the stages for
  iterations 0 and 5. It checks the one-cycle results against the iteration
  equations, worked out in the testbench.
- `tb/tb_cordic_sincos.sv` is the end-to-end test at the default 16-bit
  configuration, with `tb/cordic_sincos_checker.sv` providing stimulus and
  scoreboard. It sends:
  - the 60° example on its own;
  - 0, ±1 LSB, ±30°, ±45°, ±90° and both ends of the convergence range;
  - a back-to-back burst of random angles;
  - a random stream with bubbles;
  - a reset while the pipeline is full.

  Every result is compared with `$cos`/`$sin` to within 2 LSB, and every
  latency is checked to be exactly `ITER` cycles. The test counts how often
  each situation occurred and fails if one never did.
- `tb/tb_cordic_widths.sv` runs the same checker on the 24-bit and 32-bit
  builds side by side.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cordic_pkg.sv tb/tb_cordic_sincos.sv --top-module tb_cordic_sincos
./obj_dir/Vtb_cordic_sincos
```

Each run takes well under a second.

## What this design chooses, and what it leaves out

The following come from the CORDIC method itself: the algorithm (rotation
mode, circular coordinates, α_i = atan(2^-i)), the iteration count equal to the
word length, the three word lengths, and the 99.9° convergence limit.

The following are this design's own choices:

- the fully unrolled one-stage-per-iteration pipeline;
- the use of radians with `WIDTH-2` fractional bits;
- the K_c-scaled starting vector;
- the guard bits and output rounding;
- the valid flag and the asynchronous reset;
- treating sign(0) as +1.

Not included:

- A floating-point version of the generator. Only the fixed-point datapath is
  given here.
- Vectoring mode (magnitude and phase), and the linear and hyperbolic
  coordinate systems. The same stage structure computes them with a different
  direction rule and angle table, but they are not part of this sine/cosine
  generator.
- Full-circle angles. These need the quadrant folding described under the
  convergence range.
