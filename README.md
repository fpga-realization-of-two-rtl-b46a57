# Fractional-order chaotic oscillators and their fixed/predefined-time synchronization in fixed-point RTL

Fractional-order systems (`D^0.9 x = f(x)`) carry a memory of their whole past.
That makes them awkward for digital hardware. This design makes them cheap.
Each fractional integrator `1/s^0.9` is replaced by a third-order rational transfer function fitted in the Bode (frequency) domain.
That filter is an ordinary three-state linear system, and forward Euler steps it once per clock.
A fractional-order state therefore costs three registers and a handful of multipliers.

The design runs two independent experiments side by side under one start trigger:

1. **A fractional-order Chen chaotic oscillator** (order 0.9; a = 35, b = 3, c = 28).
   It has three fractional states, so nine filter states.
2. **Synchronization of two different fractional-order time-delay (FOTD) chaotic systems.**
   A *drive* system runs freely. A *response* system is steered onto it by a controller.
   The controller uses either a **fixed-time** law (the error settles within a bound that does not depend on the initial state)
   or a **predefined-time** law (the bound is a tuning input `Tc`).
   The errors `e = y - x` are brought out on 16-bit probes. The Chen states are brought out on 12-bit probes.

Everything is synthesizable SystemVerilog in signed Q32.32 fixed point.
Every block has a self-checking testbench that compares it with a floating-point model of the same equations.

## The fractional integrator (`frac_integrator`)

The whole design rests on this block.

```
1/s^0.9  ~  H(s) = g (s^2 + k s + l) / (s^3 + m s^2 + n s + p)

g = 2.2675   k = 216.692   l = 278.2968   m = 361.567   n = 778.819   p = 10
```

`H(s)` equals `2.2675 (s+215.4)(s+1.292) / ((s+2.145)(s+359.4)(s+0.01292))`.
The zeros and poles alternate on the negative real axis. Together they give the -18 dB/decade slope of `s^-0.9` over several decades, to within about 2 dB.
In controllable canonical form, with input `v` (the right-hand side of `D^0.9 x = v`):

```
z1' = z2
z2' = z3
z3' = -p z1 - n z2 - m z3 + v
x   = g (l z1 + k z2 + z3)
```

Forward Euler with `dt = 0.0005` advances all three states on one clock edge: `z <- z + z' * dt`.
The fastest pole is at -359.4, so `|1 - 359.4 dt| = 0.82` and the explicit step is stable with margin.
The magnitudes are very uneven:

- At DC, `x ~ g l z1 = 631 z1`. So `z1` is about 1/631 of the state.
- Each step changes `z1` by about 1e-5.

This is why all arithmetic uses 64-bit words with 32 fractional bits (resolution 2.3e-10).
With 16 or 24 fractional bits the small increments would be lost to rounding.

Ports:

- `load` presets `(z1, z2, z3)` from `z0`.
- `step` performs one Euler step using the `v` present in that cycle.
- `x` and `z` are combinational from the registers.
- The time-delay systems preset a filter to `z = (x0/(g l), 0, 0)`. This is the DC state whose output is `x0`, up to about 1e-6 of rounding.

## Chen oscillator (`chen_fo_system`)

```
D^0.9 X1 = 35 (X2 - X1)
D^0.9 X2 = -X1 X3 + 28 X2 - 7 X1
D^0.9 X3 = -3 X3 + X1 X2
```

Three `frac_integrator`s are cross-coupled through these right-hand sides.
The products `X1 X3` and `X1 X2` are formed from the three filter outputs.
The nine filter states start at `[0,0,2, 0,0,1, 0,0,3]`, i.e. `z3 = 2, 1, 3` in the three chains, which makes the initial states `X = 2g, g, 3g`.

Measured over 15000 steps (7.5 s), the attractor spans roughly -21..26 (X1), -24..31 (X2) and 3..44 (X3). X1 changes sign, so the trajectory visits both lobes.

The expanded nine-equation form published for this oscillator writes its quadratic terms as sums of filter-state products (`x3 x7 + x1 x9 + 2 x2 x8 + ...`).
Taken literally, that form diverges to |x| > 1e5 within two seconds.
This implementation keeps its linear terms exactly, but feeds the products of the approximated states into the filters, as the unexpanded equations say.
See *Departures* below.

## Drive–response synchronization (`fotd_drive`, `fotd_response`, `sync_controller`, `fotd_sync`)

The drive (`s = 0.1` self-inhibition, `tau` a time delay):

```
D^a x1 = -s x1 + 0.1 tanh(x1(t-tau)) + A (x2 - x1)
D^a x2 = -s x2 + 0.1 tanh(x2(t-tau)) + B x1 - D x1 x3 + x4
D^a x3 = -s x3 + 0.1 tanh(x3(t-tau)) + H x1^2 - C x3 + x4
D^a x4 = -s x4 + 0.1 tanh(x4(t-tau)) - R x2
```

The response, a different system:

```
D^a y1 = -s y1 + A1 (y2 - y1) + y4  + 0.1 tanh(y1(t-tau)) + u1
D^a y2 = -s y2 + B1 y1 - y2 - y1 y3 + 0.1 tanh(y2(t-tau)) + u2
D^a y3 = -s y3 + y1 y2 - C1 y3      + 0.1 tanh(y3(t-tau)) + u3
D^a y4 = -s y4 - y2 y3 - R1 y4      + 0.1 tanh(y4(t-tau)) + u4
```

Each of the eight states is a `frac_integrator`. The delayed states come from a `delay_line` and pass through `tanh_pwl`.

### The controller

With `e = y - x` and `h(e) = fy - fx`, where `fx` and `fy` are each system's coupling terms (everything except `-s x` and the tanh term):

```
u   = s e - h(e) - sign(e) L  -  D^(a-1) K(e)

fixed-time:       K = 2^(k1-1)/N^(1-q1 k1) * alpha1 sign(e)|e|^(q1 k1) + 2^(k1-1) lambda1 sign(e)
                  q1 = 0.9, k1 = 2.9, N = 4, alpha1 = 0.007, lambda1 = 0.003      -> 0.2434 |e|^2.61 + 0.0112
predefined-time:  K = Cv/Tc * (alpha2 sign(e)|e|^(q2 k2) + lambda2 sign(e))
                  q2 = 0.5, k2 = 5.2, alpha2 = 12.9, lambda2 = 11, Cv = 0.0534    -> (0.689 |e|^2.6 + 0.587)/Tc
L = 0.2, s = 0.1
```

`h(e)` cancels the difference between the two systems' couplings.
`s e` turns the response's `-s y` into the drive's `-s x`.
What remains of the error dynamics is the tanh mismatch, the `-sign(e) L` term, and `K`.

**The `D^(a-1)` term.** This is the least obvious part of the design.
The controller term sits under `D^(a-1)` inside an equation for `D^a y`.
Integrating both sides with `1/s^a` turns `1/s^a * D^(a-1)` into `1/s`, an ordinary integral.
So the controller returns the control in two parts:

- `u_a = s e - h(e) - sign(e) L`. This enters the right-hand side of the response's fractional integrators.
- `kc = K(e)`. The response integrates it with a plain Euler accumulator `w' = K`, and subtracts `w` from the filter output: `y = g(l z1 + k z2 + z3) - w`.

No `s^0.1` approximation is needed.

**Non-integer powers and tanh** use piecewise-linear tables. The tables are computed at elaboration from real arithmetic (`**` and `$tanh`), so no table file exists.

- `pow_pwl`: 256 segments over `[0, 16)`, input saturated at 16. The error is below 3.5e-3 for `|e| < 2`, and below 0.2 % of the value above 1.
- `tanh_pwl`: 32 segments over `[0, 4)`, odd symmetry, saturated at `tanh(4)`. The error is below 1.5e-3.

Each controller lane has one `pow_pwl` per law, with exponents 2.61 and 2.6.

`Tc` is a run-time input, given as `inv_tc = 1/Tc` in Q32.32 so that no divider is needed. `mode` selects the law.

### Delay (`delay_line`)

The delay is a ring buffer of `DEPTH` words. Each word holds the four states of one step, and `tau = DEPTH * dt`.
Each step reads the word written `DEPTH` steps earlier, then overwrites it.
Until `DEPTH` steps have passed since `load`, the output is the initial condition (constant prehistory).
A saturating fill counter tracks this and drives `hist_full`.
The read is asynchronous, so the buffer maps to distributed RAM.

### Measured settling

The fixed-point design tracks the floating-point model to within 0.2 % in settling time.
The table gives the time from which all `|e_i| < 0.01`, at `dt = 0.0005`, for the three initial-condition pairs:

| law | this design | reported for the original implementation |
|---|---|---|
| fixed-time | 5.32 – 5.49 s | 0.18 s (bound 0.231 s) |
| predefined-time, Tc = 1 | 1.585 s | 0.497 s |
| predefined-time, Tc = 1.5 | 2.20 s | 0.710 s |

The qualitative behaviour matches:

- The errors fall fast while large and slowly near zero.
- The settling time hardly depends on the initial condition.
- A larger `Tc` gives a proportionally later settling: 2.20/1.585 = 1.39 here, against 1.43 in the original report.

The absolute times do not match. With the printed gains, `K` is only about 0.011 (fixed-time) or 0.59 (Tc = 1) once `|e| < 1`. The slow final approach follows directly from these gains, the `D^(a-1)` reading above and the assumed drive/response coefficients.
The predefined-time runs settle later than `Tc`. Treat the `Tc` guarantee as not reproduced.

## Start control and observation (`run_ctrl`, `fo_chaos_top`)

The systems run far faster than anything can watch them. An external 2-bit `trigger` gates them:

- While `trigger != 0`, every system is held at its initial condition (`load`).
- When `trigger == 0`, every system takes one Euler step per clock.
- `step_count` counts the steps taken, so model time is `step_count * 0.0005`.

The trigger passes a two-flop synchronizer. The first step happens on the third clock edge after `trigger` reads 0.

`fo_chaos_top` registers probe words once per step, and `probe_valid` marks each new sample. This is where an on-chip logic analyser attaches.

- `chen_probe[3]`: 12 bits, signed, 5 fractional bits (±64).
- `e_probe[4]`: 16 bits, signed, 11 fractional bits (±16).

Both probes take the floor of the value and saturate.
The full-precision states (`chen_x`, `sync_x`, `sync_y`, `sync_e`) are also ports.

Top-level ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `trigger[1:0]` | in | non-zero: hold at initial conditions; 0: run |
| `mode` | in | 0 fixed-time law, 1 predefined-time law |
| `inv_tc` | in | 1/Tc, Q32.32 |
| `x0[4]`, `y0[4]` | in | drive / response initial conditions, Q32.32, sampled while held |
| `chen_probe[3]`, `e_probe[4]`, `probe_valid` | out | probe words |
| `step_count[31:0]` | out | Euler steps since start |
| `chen_x[3]`, `sync_x[4]`, `sync_y[4]`, `sync_e[4]` | out | full-precision states and errors |
| `hist_full` | out | the delay has filled; the delayed states come from the buffer |

## Number format and constants

`fx_pkg` defines `fx_t` (signed 64-bit, Q32.32), `fx_const` (real to Q32.32 at elaboration, rounded), `fx_mul` (128-bit product, floor back to Q32.32) and the probe quantiser.
Nothing saturates inside the datapath. The Chen and drive states stay below 70 in magnitude, far inside the ±2^31 range.

| constant | value | origin |
|---|---|---|
| Bode fit g, k, l, m, n, p | 2.2675, 216.692, 278.2968, 361.567, 778.819, 10 | published |
| Chen a, b, c; order | 35, 3, 28; 0.9 | published |
| dt | 0.0005 | published for the synchronization runs; reused for the Chen oscillator |
| controller q1, k1, N, L, s, lambda1, alpha1 | 0.9, 2.9, 4, 0.2, 0.1, 0.003, 0.007 | published |
| controller q2, k2, alpha2, lambda2, Cv | 0.5, 5.2, 12.9, 11, 0.0534 | published |
| drive A, B, C, D, H, R | 10, 28, 2.6667, 1, 1, 1 | **chosen here** (bounded, \|x\| < 70) |
| response A1, B1, C1, R1 | 10, 28, 2.6667, 1 | **chosen here** |
| delay DEPTH | 20 steps (tau = 0.01) | **chosen here** |
| number format | Q32.32 fixed point | **chosen here**; the original used floating point |

## Departures from the published design

- **Arithmetic.** Fixed point instead of floating point. Over 2 s of model time, the states agree with a floating-point model to about 1e-2; the differences grow later because the drive and the Chen oscillator are chaotic.
- **Chen nonlinear terms.** These are formed from the products of the approximated states, not from the published nine-state expansion, which diverges.
  The published "coordinate translation" of the Chen variables has no stated offsets and is not applied.
- **Unpublished values.** The drive and response coefficients and the delay length were not published. The values above were chosen to keep both systems bounded.
- **Controller composition.** The controller is applied to the full response equations, including `-s y`. One printed form of the closed-loop equations drops the `-s x` term that results.
  The coefficient printed as `beta2 = 12.9` is used as `alpha2`.
  `h(e)` is taken as `fy - fx`. The source uses `h` without defining it.
- **`D^(a-1)`** is realised as an ordinary integrator, as explained above.
- **Control and probes.** The trigger rule (hold when `trigger != 0`) follows the source. The synchronizer, one step per clock, and the probe binary points are this design's choices.
- **Not included.** The board, the processor system and the vendor logic analyser are not included. The probes are brought out as ports instead.
- **Resources.** The published resource figures (78 DSP slices on an XC7Z020) are far below what this 64-bit datapath needs.
  It has about 185 64x64 multiplications, most of them by constants: one Euler step per clock, with every product in parallel.
  Fitting that device would take narrower words or a time-multiplexed datapath.

## Simulating

Every file in `tb/` is a self-checking testbench. Each prints `TB_RESULT checks=N failures=M` and stops itself after a watchdog time.
With Verilator 5:

```
verilator --binary --timing -Irtl rtl/fx_pkg.sv tb/tb_fo_chaos_top.sv --top-module tb_fo_chaos_top -o sim
./obj_dir/sim
```

The files in `rtl/` are found by name through `-Irtl`, one module or package per file.

| testbench | what it shows |
|---|---|
| `tb_frac_integrator` | filter against a float model, load/hold, one step per strobe |
| `tb_chen_fo_system` | 15000 steps (7.5 s), the first 8000 against a float model; both lobes visited |
| `tb_tanh_pwl`, `tb_pow_pwl` | function accuracy, symmetry, saturation |
| `tb_delay_line` | exact delay, constant prehistory, restart, DEPTH 20 and 7 |
| `tb_run_ctrl` | hold/run/re-arm, 3-clock start latency, step counting |
| `tb_fotd_drive`, `tb_fotd_response` | the two systems against float models |
| `tb_sync_controller` | both control laws, three Tc values, random operands |
| `tb_fotd_sync` | closed loop against a float model; settling time within 2 % |
| `tb_fo_chaos_top` | whole design at default parameters: probes, every mechanism |
| `tb_sync_workloads` | all nine synchronization runs (3 pairs × 3 laws) and their settling times |

All testbenches finish in a few seconds.

To change the experiment:

- Set `x0`, `y0`, `mode` and `inv_tc` at the top ports.
- The delay length is the top's `DEPTH` parameter.
- The coefficients are real-valued parameters of `fotd_drive`, `fotd_response`, `sync_controller` and `chen_fo_system`. They are converted at elaboration.
