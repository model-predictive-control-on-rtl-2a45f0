# MPC on a chip: an interior point QP solver in floating point RTL

A model predictive controller computes, at every sampling instant, the
sequence of future control moves that minimises a quadratic cost subject to
limits on inputs, input rates, states and outputs. After the plant model is
eliminated, that is a dense quadratic program (QP):

    minimise   1/2 u'Q u + c'u      subject to   J u <= g

with `n = Nu*m` decision variables and `mc` inequality constraints. This RTL
is a stand-alone QP engine for such a controller. A host computer sends Q,
c, J and g over an RS232 line; the chip solves the QP with an infeasible
primal-dual interior point method in IEEE single precision and sends u
back. The host applies the first move and repeats at the next sample.

The design follows a published FPGA implementation of constrained MPC (a
Handel-C design on a Xilinx Virtex-II, hardware-in-the-loop tested over
RS232). That work gives the algorithm, the number formats, the problem sizes
and the split into a floating point library, a matrix inversion core and
the solver. It does not give the micro-architecture. Everything below the
level of "which equations are computed", such as the sequencer, the memory
layout, the divider, the serial protocol and the baud rate, is this
design's own choice. Those choices are marked as such below and in each
file's header.

## Top level

```
 rxd --> uart_rx --> host_if --load--> ipm_solver --------------+
                        ^                 |  fp_alu (+,-,*,/,MAC)|
 txd <-- uart_tx <------+--- u, status ---|  mat_inv (own fp_alu)|
                                          +----------------------+
```

| module       | role |
|--------------|------|
| `mpc_chip`   | top: serial link, protocol engine, solver |
| `ipm_solver` | interior point iteration, problem and work memories, sequencer |
| `mat_inv`    | in-place Gauss-Jordan inversion of the n x n Newton matrix |
| `fp_alu`     | one floating point operation at a time: add, sub, mul, div, c+a*b, c-a*b |
| `fp_add`, `fp_mul`, `fp_div`, `fp_round` | the arithmetic behind `fp_alu` |
| `host_if`    | byte protocol: download problem, start, return status and u |
| `uart_rx`, `uart_tx` | 8N1 serial line, 243 clocks per bit (115200 baud at 28 MHz) |
| `mpc_pkg`    | operation and memory-select enums, default format, constant conversion |

## The iteration

The KKT conditions of the QP, with slack t and multipliers lambda, are

    Q u + J'lambda = -c,    J u + t = g,    lambda >= 0, t >= 0, t'lambda = 0.

The infeasible method starts from any point with lambda, t > 0. Here that is
u = 0, lambda = t = 1. It takes damped Newton steps on these equations, with
the complementarity t'lambda = 0 relaxed to `t_i lambda_i = sigma*mu`, where
`mu = t'lambda / mc`.

The full Newton system has size n + mc. Because `mc` is usually much larger
than `n`, the lambda block is eliminated and only an n x n system is solved.
With `d = lambda ./ t`, one iteration is:

| phase | computes | operations |
|-------|----------|------------|
| MU    | `mu = t'lambda / mc`, `smu = sigma*mu`; stop if `mu < EPS_MU` | mc MAC, div, mul |
| D     | `d_i = lambda_i / t_i` | mc div |
| R1    | `r1 = -c - Q u - J'lambda` | n(n+mc) MAC |
| R2    | `r2 = g - J u - smu ./ lambda`, `w = d .* r2` | mc(n+3) |
| SJ    | `S[k][i] = d_k J[k][i]` | mc*n mul |
| M     | `M = Q + J'S`, upper triangle, mirrored | n(n+1)/2 * mc MAC |
| RHS   | `rhs = r1 + J'w` | n*mc MAC |
| INV   | `M <- inv(M)` in `mat_inv` | about 2n^3 |
| DU    | `du = inv(M) rhs` | n^2 MAC |
| DL    | `dlam = -d .* (r2 - J du)` | mc(n+1) |
| DT    | `dt = -t + (smu - t .* dlam) ./ lambda` | 4 mc |
| ALPHA | `alpha = min(1, TAU * min over negative components of -x/dx)` | up to 2mc div |
| UPD   | `u, lambda, t += alpha * (du, dlam, dt)` | n + 2mc MAC |

M is symmetric positive definite: Q is positive definite and d > 0. So
`mat_inv` needs no pivoting, and only the upper triangle of M is computed.
The damping factor TAU < 1 keeps lambda and t strictly positive. The run
ends when `mu < 1e-5`, the stopping rule of the original design, or after
MAX_ITER iterations (a safeguard of this design). Only mu is tested, so an
infeasible problem is not detected.

**Sign of r2.** The published equations print the second residual as
`J u - g - sigma*mu/lambda`. With the slack equation `J u + t = g` and the
printed update for t, the Newton step needs `g - J u - sigma*mu/lambda`.
This design uses the latter.

**Sequencing.** The solver is a sequencer that walks these phases with
loop counters (`i`, `col`, term index `k`, post-step `sub`). It issues one
operation at a time to a single `fp_alu`, like the sequential program the
original was compiled from. An element goes through ELEM (load the
accumulator's initial value), ISSUE and WAIT for each term and post-step,
then FIN (store the result). Add, multiply and MAC take 2 cycles per
operation. Division takes MAN_W+10 cycles (33 in single precision). The
inner loops over constraints dominate.

Measured at the default build:

| problem (n x mc) | iterations | cycles per QP | original implementation, cycles |
|---|---|---|---|
| 3 x 32 (aircraft controller) | 7-9 | 56,000-73,000 | 171,460 |
| 6 x 32 (test-suite size) | 9-10 | 99,000-110,000 | - |
| 45 x 128 (largest) | 9-10 | 5.0-5.6 million | 65,966,362 |
| 128 x 128 inversion (`mat_inv` alone) | - | 4,198,401 | 38,528,305 |

At 28 MHz the aircraft controller's QP takes about 2-3 ms, well inside its
0.5 s sampling period. The numbers come from random QPs in the testbenches.
The controller's own matrices were not available.

## Matrix inversion core (`mat_inv`)

`mat_inv` inverts in place by Gauss-Jordan elimination, with no pivoting.
For each pivot p it does four things:

1. `inv = 1/A[p][p]`.
2. Row p is scaled by `inv`.
3. Each other row r has `A[r][p]` times row p subtracted. Then `A[r][p]`
   becomes `-A[r][p]*inv`.
4. `A[p][p] = inv`.

It holds the matrix in an `N*N` word memory (N = 128 by default, 45 inside
the solver). It is loaded and read through row/column ports while idle.
Its run time is exactly `n*(MAN_W + 11 + 2(n-1) + 2n(n-1)) + 1` cycles from
`start` to `done`. It is only meant for matrices whose pivots stay away
from zero, such as the symmetric positive definite ones it gets from the
solver.

## Numbers

Words use the IEEE-754 layout `{sign, exponent, mantissa}` with
`EXP_W`/`MAN_W` set by parameters. The default (8,23) is IEEE single
precision. The original also ran the controller in a (9,18) format; set
`EXP_W = 9, MAN_W = 18` to build that. Rounding is to nearest, ties to
even. Two simplifications are this design's own:

- Subnormals flush to zero.
- There are no infinities or NaNs. Overflow and division by zero saturate
  to the largest finite value.

MAC (`c + a*b`) rounds the product before the sum, as a separate multiplier
and adder would. The algorithm constants SIGMA = 0.1, TAU = 0.995 and
EPS_MU = 1e-5 are `real` parameters, converted to the word format at
elaboration by `mpc_pkg::const_to_fp`.

## Host protocol (`host_if`)

The layout is this design's own, modelled on the original's download and
read-back sequence:

```
host -> chip:  n (1 byte), mc (1 byte),
               Q  n*n words row-major, c  n words,
               J  mc*n words row-major, g  mc words
chip -> host:  status byte {converged, iterations[6:0]}, then u: n words
```

A word is `ceil((1+EXP_W+MAN_W)/8)` bytes, least significant byte first and
right-aligned. For single precision this is simply the four bytes of a
little-endian `float`. The solver starts as soon as the last byte of g has
arrived. The chip answers when it is done, then waits for the next problem.
n must be 1..NU and mc 1..MC. Sizes are not range-checked.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `EXP_W`, `MAN_W` | 8, 23 | floating point format |
| `NU` | 45 | largest n = Nu*m (memories sized for it) |
| `MC` | 128 | largest number of constraints |
| `MAX_ITER` | 60 | iteration limit (this design's safeguard) |
| `CLKS_PER_BIT` | 243 | serial bit time in clocks |
| `SIGMA`, `TAU`, `EPS_MU` | 0.1, 0.995, 1e-5 | centring, step damping, stopping threshold (`ipm_solver`) |
| `N` | 128 | size of a stand-alone `mat_inv` |

Storage at the defaults: Q (2,025 words), J and the scaled copy S
(5,760 words each), about 12 vectors of up to 128 words, and the 45 x 45
inverter memory. That is roughly 538 kbit, written as plain arrays with
combinational reads. On an FPGA these need mapping to block or distributed
RAM with registered reads; the sequencer would then need one more cycle per
operation.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT` line. Run one
with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mpc_chip \
  -y rtl -y tb +libext+.sv rtl/mpc_pkg.sv tb/tb_fp_pkg.sv tb/tb_qp_pkg.sv tb/tb_mpc_chip.sv
./obj_dir/Vtb_mpc_chip
```

| testbench | what it checks |
|---|---|
| `tb_fp_alu` | all six operations in (8,23) and (9,18) against a double precision reference rounded to the format (bit exact for add/sub/mul, within 1 ulp for div/MAC); known IEEE encodings; latencies |
| `tb_mat_inv` | A*inv(A) = I within 1e-4 for n = 1..8 and for 128 x 128 at the default size; exact cycle count |
| `tb_ipm_solver` | random QPs (3x32, 6x32, 1x2) against a reference that solves the full (n+mc) Newton system in double precision, to 1e-3; convergence; sampling-period bound; the iteration limit; a 3x32 QP in the (9,18) format |
| `tb_ipm_workloads` | the default-size solver on 3x32, 6x32 and 45x128; accuracy and cycle bounds from the table above; then a suite of 50 random 6x32 QPs, each checked against the reference and counted against the exact optimum |
| `tb_uart_rx`, `tb_uart_tx` | serial frames at 16 and 243 clocks per bit, stop-bit errors, glitches, frame timing |
| `tb_host_if` | every downloaded word lands at the right address; one start; status and u bytes in order; the 28-bit format |
| `tb_mpc_chip` | end to end at default parameters, through the serial line: 3x32, 6x32, 1x2 and 45x128 problems, plus a broken frame. It counts that frame errors, inversions, damped and full steps, active constraints and convergence all occur. Runs about a minute. |

`tb_fp_pkg` and `tb_qp_pkg` hold the testbench reference code: real/word
conversion, a random QP generator (Q = H'H + 0.5 I, J and c uniform,
g in [0.2, 1] so u = 0 is feasible) and the reference interior point
solver.

The reference is run twice. With the chip's stopping rule (mu < 1e-5), the
chip agrees with it to about 1e-5. This measures the single precision
arithmetic. Against the exact optimum the error is up to about 1e-3,
because that is all the stopping threshold guarantees. The solver
testbench therefore tightens EPS_MU to 1e-6 for its 1e-3 comparison with
the exact optimum. In the 50-problem suite at the default threshold, 39 of
50 solutions are within 1e-3 of the exact optimum and the rest within about
1.2e-3. An application that needs 1e-3 on u should lower EPS_MU; each
factor of ten costs about one to two iterations.

## Not included

- **Forming the QP.** Building c and g from the state estimate, the
  previous input and the set-point is left to the host. The gradient c
  depends on weights and an expansion that were not specified. The
  constraint matrix J and the Hessian Q are constant for a given
  controller and are downloaded like the rest.
- **Host side.** The state estimator, plant model and test scripts run on
  the host. The testbenches take their place.
- **FPGA resource figures.** The original's slices, LUTs and block RAM
  counts are for its own device and code. They say nothing about this RTL.
