# Heun-method chaotic signal generator (Pandey-Baghel-Singh system)

This RTL produces a chaotic signal in hardware. It solves a three-dimensional
"jerk" system, the Pandey-Baghel-Singh (PBS) system, numerically:

    dx/dt = y
    dy/dt = z
    dz/dt = -a*x - b*y - c*z - x^2          a = 1, b = 1.1, c = 0.4

It uses Heun's method (the explicit trapezoidal rule, a second-order
predictor-corrector) in IEEE-754 single precision. After each step the new
point (x, y, z) appears on three 32-bit outputs with a one-cycle `Ready`
strobe. Each step feeds its result back as the starting point of the next
one. One step takes 118 clock cycles.

All floating-point operators are written here: adder, multiplier and divider.
The design needs no vendor IP.

## The numerical step

With `f` the right-hand side above and `h` the step size, one step is:

    f0     = f(x(n))                 slope at the current point
    hk1    = h * f0
    xp     = x(n) + hk1              predictor (an Euler step)
    f1     = f(xp)                   slope at the predictor
    hk2    = h * f1
    x(n+1) = x(n) + (hk1 + hk2) / 2  corrector

Every line is done for all three components at once. The trapezoidal corrector
is the usual Heun form. It computes `h*f0 + h*f1` and then halves that,
instead of computing `h*(f0 + f1)/2`. The two forms are equal algebraically,
but their single-precision rounding differs. This ordering lets one
multiplier stage serve both products.

The x and y components of `f` are just `y` and `z`. So `f` costs four
multiplications (a*x, b*y, c*z, x*x) and three additions, which are summed as
`(a*x + b*y) + (c*z + x*x)`, then negated.

## Hardware structure

```
            X_in,Y_in,Z_in ─┐
                            ▼
 Start ─► pbs_sequencer ─► pbs_init_mux ── x(n) ─────────────────┬───────────────┐
   ▲           sel,load     ▲  (holds x(n))                      │               │
   │                        │                                    ▼               ▼
   │                        │  ┌─► f0 stage ─► multiplier ─► Adder-I ─► f stage  Adder-III ─► output reg ─► Xn/Yn/Zn_out, Ready
   │                        │  │   (pbs_f_stage) (pbs_vec_mul)  (predictor)  │        ▲
   │                        │  │                  ▲   │                      │        │
   │                        │  │                  └───┼──────── f1 ──────────┘        │
   │                        │  │                      └─► Adder-II ─► divider (/2.0) ─┘
   │                        └──┴──────────────── feedback x(n+1) ◄────────────────────┘
   └──────── Ready (step_done)
```

| module | role |
|---|---|
| `pbs_chaos_top` | top level: ports `CLK, RST, Start, X_in, Y_in, Z_in, Xn_out, Yn_out, Zn_out, Ready` |
| `pbs_sequencer` | starts steps while `Start` is high. Drives the multiplexer select: initial condition for the first step, feedback for later ones |
| `pbs_init_mux` | registered multiplexer. Holds x(n) for the whole step |
| `pbs_generator_unit` | one Heun step: the chain of stages below plus the output register |
| `pbs_f_stage` | the vector field f. Used twice (f0 stage and f stage) |
| `pbs_vec_mul` | the multiplier stage: vector times h. Shared by both products of a step |
| `pbs_vec_add` | adder stage. Used three times: predictor, slope sum, corrector |
| `pbs_vec_div` | divider stage: vector divided by a scalar, here the constant 2.0 |
| `fp_add`, `fp_mul` | single-precision adder/subtractor and multiplier. Combinational core plus a `LAT`-stage register chain |
| `fp_div` | single-precision divider. Radix-2 restoring, one quotient bit per cycle, 28-cycle latency |
| `pbs_delay` | register chain that sets the operator latencies |
| `pbs_pkg` | the `fp32_t` and `pbs_vec_t` types, coefficients, step size, latencies, shared rounding/packing function |

### How the stages are sequenced

There is no central state machine walking through the step. Each stage has a
`in_valid` / `out_valid` pair, and the stages are chained by these strobes.
One token travels down the chain per step. Because only one step is ever in
flight, the following simplifications are safe:

* **The multiplier stage is shared.** Its operand comes from the f0 stage or
  the f stage, whichever is valid. A one-bit flag, `second_q`, remembers which
  use started the multiplication. The product is sent to Adder-I (predictor)
  or to Adder-II (slope sum) accordingly. `h*f0` is also kept in a register,
  because Adder-II needs it again later.
* **x(n) needs no copy in the pipeline.** The multiplexer register holds it
  for the whole step. Adder-I and Adder-III read it directly.
* **The divider does not need to be pipelined.** It is busy for 28 cycles,
  and nothing else reaches it in that time.

Assertions in `pbs_generator_unit`, `pbs_chaos_top` and the vector stages
check these properties in simulation. They check that the two multiplier users
never collide, that the divider is idle when the sum arrives, that lanes stay
in lock step, and that a step starts only when none is running.

### Timing

Per step, in clock edges:

    1 (multiplexer) + f0 (MUL + 2*ADD) + MUL + ADD + f (MUL + 2*ADD) + MUL + ADD + DIV + ADD + 1 (output)
    = 4*MUL_LAT + 7*ADD_LAT + DIV_LAT + 2 = 4*8 + 7*8 + 28 + 2 = 118

* `Ready` is seen 118 edges after the edge that first samples `Start` high.
* While `Start` stays high, each later sample follows 118 cycles after the
  previous one. The sequencer reloads the multiplexer in the same cycle that
  `Ready` is high, so consecutive steps have no gap.
* `ADD_LAT` and `MUL_LAT` are parameters. Changing them changes the step
  time by the formula above; nothing else depends on them.
* The 28-cycle divider latency is fixed: load, 26 quotient bits, then
  round.

### Control behaviour

* `RST` is synchronous and active high. It clears the outputs, the held
  point and the "already started" flag.
* On the first step after reset, `X_in`, `Y_in`, `Z_in` are captured.
  After that they are ignored.
* `Start` acts as an enable. Dropping it lets the step in flight finish,
  with one last `Ready`, and then the generator waits. Raising it again
  continues from the last output.
* Outputs hold their value between `Ready` pulses.

## Floating-point details

* Rounding is to nearest, ties to even, in all three operators. Results are
  bit-exact with a correctly rounded single-precision operation. The
  testbenches check this against a double-precision reference.
* Subnormal inputs are treated as zero. Results below the normal range are
  flushed to a signed zero. This is a common FPGA simplification; it has no
  effect on this system's trajectory.
* Infinities and NaN follow IEEE-754. Overflow gives ±Inf. Inf−Inf, 0·Inf,
  0/0 and Inf/Inf give the quiet NaN `0x7FC00000`. An exact cancellation gives
  +0.
* The adder aligns the smaller operand using guard, round and sticky bits,
  then normalises with a leading-zero count. The multiplier uses one 24×24
  product. The divider pre-normalises the dividend so that the quotient lies
  in [1, 2).

## What to expect from the output

The coefficients and the initial condition (0.1, 0, 0) are those under which
the PBS system is usually presented. At these values the origin and
(−1, 0, 0) are both unstable equilibria. The eigenvalues are −0.745 and
0.162 ± 1.147j at the origin, and 0.589 and −0.504 ± 1.20j at (−1, 0, 0).

Solved exactly as written above, the trajectory from (0.1, 0, 0) oscillates
with growing amplitude. x reaches about −73 by t = 28, and the solution then
escapes to −∞ at t ≈ 28.9. This happens for any step size, including in
double precision. With h = 0.01 that point is step 2892. From then on the
generator puts out −Inf and then NaN. It does so deterministically and
bit-exactly as IEEE-754 arithmetic prescribes.

Other starting points last longer but also escape. For example, (−0.1, 0, 0)
escapes at t ≈ 104 and (0, 0.1, 0) at t ≈ 114. A bounded chaotic signal
therefore needs different coefficients or a different right-hand side. Both
are easy to change:

* the coefficients are the `COEF_A`, `COEF_B`, `COEF_C` parameters;
* the right-hand side is confined to `pbs_f_stage`.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `H_STEP` | `32'h3C23D70A` (0.01) | step size h. Our choice: the source fixes no value |
| `COEF_A`, `COEF_B`, `COEF_C` | 1.0, 1.1, 0.4 (`3F800000`, `3F8CCCCD`, `3ECCCCCD`) | system coefficients |
| `ADD_LAT`, `MUL_LAT` | 8, 8 | pipeline depth of the adders and multipliers |

## Where this design makes its own choices

These points are this implementation's, not dictated by the system
description it follows:

* **Multiplication by h in the corrector.** The step needs h twice. The
  block structure has a single multiplier stage, so that one stage is used
  twice per step.
* **Single `Ready`.** One `Ready` bit covers all three outputs.
* **h as a parameter.** h is a parameter, not a port, because the top level
  has no port for it.
* **Latencies.** The operator latencies were chosen so that the step takes
  118 cycles.
* **Operator implementation.** The operators use fixed-latency pipelines
  and a radix-2 divider. Their internal structure is not specified
  elsewhere.
* **No output filter.** The block structure names a "filter stage" at the
  output without saying what it filters. There is none here. The output is
  just a register with `Ready`.
* **Board-level memory not included.** A block RAM appears in the original
  FPGA build, but its purpose is undocumented. It is not part of this RTL.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbenches share `tb/fp_ref_pkg.sv`,
a reference model. It computes each single-precision operation in double
precision and rounds the result to single by bit manipulation. It also
contains a step function that replicates the hardware's order of operations.

A run with plain Verilator, from the repository root. The packages are named
first, and `-y` lets Verilator find every other module by its file name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_pbs_chaos_top rtl/pbs_pkg.sv tb/fp_ref_pkg.sv tb/tb_pbs_chaos_top.sv
./obj_dir/Vtb_pbs_chaos_top
```

Any other testbench runs the same way; substitute its name in both places.

| testbench | what it checks |
|---|---|
| `tb_fp_add`, `tb_fp_mul` | about 4,000 directed and random operations each, bit-exact, with latency |
| `tb_fp_div` | 610 divisions, bit-exact, 28-cycle latency, request while busy ignored |
| `tb_pbs_vec_add`, `tb_pbs_vec_mul`, `tb_pbs_f_stage` | random vectors with gaps, bit-exact, latency 8 / 8 / 24 |
| `tb_pbs_vec_div` | division by 2.0 and by random divisors, `busy`, latency |
| `tb_pbs_init_mux`, `tb_pbs_sequencer` | select, hold, load timing; back-to-back steps, pause and resume |
| `tb_pbs_generator_unit` | 200 single steps from random points: bit-exact with the model, 117-edge latency, close to a double-precision step |
| `tb_pbs_chaos_top` | full design at default parameters, 3,051 samples from (0.1, 0, 0). See below |
| `tb_pbs_workload_1m` | one million samples at h = 2^-16 (t up to 15.3, all finite), bit-exact, 118-cycle spacing. Takes about 3 minutes |

`tb_pbs_chaos_top` checks every sample bit-exactly and checks the step timing
(first `Ready` after 118 cycles, then every 118). It tracks a
double-precision solution for 2,000 steps. It counts each mechanism and
fails if any never occurs:

* start from the initial condition;
* feedback steps;
* a pause in mid-step;
* resume;
* a reset followed by a restart from a new point;
* overflow of the state to Inf/NaN.

## Size

A generic synthesis of the whole design gives about 8,000 word-level cells. It
has 746 flip-flop bits, plus about 10,700 bits in the operator delay chains,
which are mapped as memories. Most of the delay-chain bits exist only to
produce the latency. A resource-conscious build would use shallower
pipelines: lower `ADD_LAT`/`MUL_LAT`, giving a shorter step time. It could
also share one f stage between the two evaluations, because the two are
never active together.
