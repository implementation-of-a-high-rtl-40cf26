# Interior-point QP accelerator for linear MPC

This RTL solves, once per control period, the quadratic program of a linear
model predictive controller (MPC). The controller uses a time-varying
prediction model and box limits on inputs and states.

The processor streams in the model matrices for the whole horizon, the limits
and the measured state. The accelerator runs a fixed number of primal-dual
interior-point iterations and streams back the optimal input/state trajectory.
Every Newton system inside the interior-point method is solved by an iterative
MINRES solver. The solver works on a banded, preconditioned form of the
system, so the full KKT matrix is never stored. All arithmetic is IEEE
single-precision (binary32).

The default build is the three-state vehicle path-tracking case:
- 3 states (x, y, heading), 2 inputs (speed, steering angle), horizon N = 5;
- 12 interior-point iterations and 40 MINRES iterations.

At these defaults a solve takes about 106,000 clock cycles: about 1.06 ms at
100 MHz.

The architecture follows an FPGA implementation of this solver that was
produced with high-level synthesis. This RTL is an independent register-level
design of the same algorithm. Where it departs from that implementation is
listed in "Departures and limits" below.

## The problem

With n states, m inputs and horizon N, the decision vector interleaves the
inputs and the predicted states:

    xi = [u0 x1 u1 x2 ... u(N-1) xN]          N(n+m) entries (NOV)

The solver minimises `1/2 xi'Q xi + q'xi` subject to:
- **Dynamics:** `x(k+1) = A_k x_k + B_k u_k`. In matrix form this is `A xi = b`, with `b = [A_0 x0; 0; ...]` and N·n rows (NEC).
- **Box limits:** `C xi <= d`, with 2N(n+m) rows (NIC). Every input has an upper and a lower bound. A state has bounds only if its bit in the mask `CP` is set; for the other states the corresponding entries of d are ignored.

The bound rows of each stage are ordered as
`[u upper (m), u lower (m), x upper (n), x lower (n)]`. A lower bound is
written as `-u <= d`, so its entry of d is the negated limit. For example,
the limit -0.65 <= phi <= 0.65 gives the entry 0.65 in both rows.

Q is diagonal: R on the inputs, Q on the states of stages 1..N-1 and P on xN.
Q, the linear term q and CP are build-time parameters. A, B, d and x0 change
at every solve.

## One solve, as seen from the ports

`qp_solver` has a 32-bit AXI4-Stream input, a 32-bit AXI4-Stream output and
three control wires:
- `ap_start` starts one solve;
- `ap_done` pulses after the last output word has been accepted;
- `ap_idle` is high while the solver waits for `ap_start`.

After `ap_start` the solver reads the following words, each a binary32 value:

| order | content | words (default) |
|---|---|---|
| 1 | A_dN = [A_0; A_1; ...; A_N], row-major, A_0 first | (N+1)·n·n = 90 |
| 2 | B_dN = [B_0; ...; B_N], row-major | (N+1)·n·m = 60 |
| 3 | d, stage by stage in the bound order above | 2N(n+m) = 50 |
| 4 | x0 | n = 3 |

The model for stage k is `x(k+1) = A_k x_k + B_k u_k`. The A_N and B_N
entries are read but unused; they keep one fixed layout for every horizon.
Input `tlast` is ignored. The solver takes words at the rate the source
offers them, with valid/ready stalls in both directions.

It then:
1. forms b = A_0 x0 (`b_calc`);
2. runs the interior-point solve (`ip_algorithm`);
3. writes the N(n+m) = 25 words of xi to the output stream, with `tlast` on
   the last word.

The first m words of xi are the inputs to apply now.

## One interior-point iteration

`ip_algorithm` holds the iterates xi, lambda (equality multipliers), v
(inequality multipliers) and s (slacks). It starts from xi = 0, lambda = 0 and
v = s = 1, so mu = 1. Each iteration runs these phases in order. Every phase
gives its unit(s) a start pulse and waits for their done pulse.

| phase | units | result |
|---|---|---|
| RES | `cds_symv`, `at_mult`, `ct_mult`, `rp_calc`, `rc_calc` in parallel | Q·xi, A'·lambda, C'·v, rp = A·xi − b, rc = C·xi − d + s |
| RN | `rn_calc`, `hdiag_calc` in parallel | rn = rd + C'S⁻¹V·rc − C'v + σμ·C'S⁻¹e; diag(H) = diag(Q + C'S⁻¹VC) |
| ASM | `kkt_assemble` | banded KKT matrix and right-hand side |
| PRE | `precond` | M·K·M and M·rhs |
| MR | `minres` | preconditioned Newton step y, warm-started from the previous y |
| REC | (inline) | step = M·y, split back into dxi and dlambda |
| DVDS | `dvds_calc` | dv = S⁻¹V(C·dxi + rc − s + σμ/v), ds = −s − S·dv/v + σμ/v |
| STEP | `step_length` | α = min(1, −β·z/dz over every v and s entry with dz < 0) |
| UPD | (inline) | xi, lambda, v, s += α·direction; accumulates v's |
| MU | (inline) | σμ = σ · v's / NIC for the next iteration |

The rd in the RN row is the dual residual, the sum of Q·xi, q, A'·lambda and
C'·v.

Only three things take part in the Newton system:
- the diagonal of H, because C holds only box constraints, so C'S⁻¹VC is
  diagonal;
- the model matrices;
- the residuals.

This design takes σ = 0.1 and β = 0.95; the method only requires both to lie
in (0, 1). There is no convergence test: the iteration count is fixed
(`IPM_ITERS`), so the solve time does not depend on the data.

## The banded Newton system: the core of the design

The reduced Newton system is

    [ H  A' ] [dxi    ]   [-rn]
    [ A  0  ] [dlambda] = [-rp]

It has order NOV+NEC = N(2n+m); that is 40 by default. In the order above the
system is wide-banded. Reordering the unknowns stage by stage makes the matrix
narrow-banded:

    [u0, lambda0, x1,  u1, lambda1, x2,  ...]

Each stage block is [u_k (m), lambda_k (n), x_(k+1) (n)], so one stage spans
SW = 2n+m rows. After the reordering every row has its non-zeros within a
window of Z = 3n+m consecutive columns. This is 11 by default.

The matrix is stored in **left-shift** form:
- `vala[r][0..Z-1]` holds the window of row r;
- `col_ind[r]` holds the column of the window's first entry;
- columns past the last one read as zero and need no stored padding.

`kkt_assemble` writes one row per cycle. The row type sets the window start
and its contents:

| row | window start | contents (left to right) |
|---|---|---|
| u_k[p] | k·SW | H at p, then −B_k[:,p]' over lambda_k |
| lambda_0[i] | 0 | −B_0[i,:] over u_0, I at x_1[i] |
| lambda_k[i], k>0 | k·SW − n | −A_k[i,:] over x_k, −B_k[i,:] over u_k, I at x_(k+1)[i] |
| x_(k+1)[i] | k·SW + m | I at lambda_k[i], H at x_(k+1)[i], −A_(k+1)[:,i]' over lambda_(k+1) (absent for the last stage) |

The right-hand side in the same order is −rn at primal rows and −rp at
multiplier rows.

The matrix has diagonal entries that grow to very large and very small values
as the iteration converges. Because of them, `precond` scales the system
symmetrically before it is solved:
- `M_ii = 1/sqrt(sum_j |K_ij|)`, taken over the stored row;
- the solver then works on `M K M` and `M rhs`, and `M y` is the step.

`precond` makes two passes over the rows: one for M, one for the scaled matrix.

`minres` solves the scaled system with the minimum-residual method. The
matrix is symmetric but indefinite, which rules out conjugate gradients. Each
iteration has these steps:
1. A Lanczos step: one banded matrix–vector product on the `ls_matvec` unit,
   which is shared with the start-up residual, then a dot product and a
   three-term vector update.
2. A scalar step that updates the QR factorisation of the Lanczos matrix with
   a Givens rotation. It uses two square roots and a few divides.
3. A pass that updates the search direction and the solution.

The iteration count is fixed at the order of the system (`MINRES_ITERS` = 40),
which in exact arithmetic is enough to solve it. Each solve starts from the
previous interior-point iteration's solution. If the Lanczos vector vanishes,
the solver keeps the current solution instead of dividing by zero.

## Number format

Every datapath value is IEEE-754 binary32. The operators are functions in
`mpc_pkg`: `fp_add`, `fp_sub`, `fp_mul`, `fp_div`, `fp_sqrt` and `fp_lt`.
- Each operator is exact before one final round-to-nearest-even, so results
  match a standard FPU on normal numbers.
- Subnormal inputs read as zero and subnormal results flush to zero.
- Overflow gives infinity.
- The square root of a negative number gives a quiet NaN.

Each operator is a single combinational function. The units register their
result every cycle and do not pipeline inside an operator, so the achievable
clock rate depends on the synthesis tool retiming these paths. Pipelining the
operators changes the units' schedules but not their interfaces.

## Timing

Every unit handles one vector element (or one matrix row) per cycle between a
start and a done pulse:

| unit | cycles (default sizes) |
|---|---|
| residual units | 25 to 50 each (NOV, NEC or NIC) |
| `kkt_assemble` | NR = 40 |
| `precond` | 2·NR = 80 |
| `minres` | about ITERS·(5·NR + 9) + 2·NR = 8,405 measured |

One interior-point iteration takes about 8,800 cycles, of which MINRES is about
95 %. The measured default solve is 105,904 cycles from `ap_start` to
`ap_done`, including streaming with random source gaps and sink back-pressure.
The HLS implementation this follows reports 318,767 cycles for the same case.

## Parameters

`qp_solver` parameters:

| parameter | default | meaning |
|---|---|---|
| `NX`, `NU`, `NH` | 3, 2, 5 | states n, inputs m, horizon N |
| `IPM_ITERS` | 12 | interior-point iterations |
| `MINRES_ITERS` | NH·(2NX+NU) = 40 | MINRES iterations |
| `R_W`, `Q_W`, `P_W` | diag(1,1), diag(10,10,0.5), diag(200,200,10) | diagonal weights as binary32 words |
| `QLIN` | 0 | linear cost term q, N(n+m) words |
| `CP` | 3'b100 | bounded states (bit j = state j); heading only by default |

`ip_algorithm` also has `SIGMA` (0.1) and `BETA` (0.95). Every sizing is
derived from NX, NU and NH, so other models are a parameter change. The
five-state vehicle model, for example, needs NX=5, NU=2, NH=5 and new weights
and mask; that configuration has not been verified.

## Departures and limits

- **Precision:** single precision only. Problems whose system spans too wide
  a range even after preconditioning would need a binary64 variant of the
  `mpc_pkg` operators. The satellite attitude case (7 states, 3 inputs) is
  one such problem.
- **Weights:** Q must be diagonal. `cds_symv` handles more stored diagonals,
  but the top instantiates it with one.
- **Model data:** the equality structure assumes `x(k+1) = A_k x_k + B_k u_k`
  with x0 given. Only the model matrices, bounds and state are run-time data.
- **Interior-point constants:** σ, β and the start point are this design's
  choices. σ stays constant; there is no predictor–corrector step and no
  stopping test.
- **KKT assembly:** the band is rebuilt from the model matrices and H at
  every iteration (40 cycles). The HLS version builds the constant part once
  per solve and then rewrites only the diagonal. Both give the same matrix;
  rebuilding avoids keeping a second copy of the band.
- **Control interface:** the memory-mapped control register block of an
  HLS-generated core is replaced by the plain `ap_start`/`ap_done`/`ap_idle`
  wires.
- **Not included:** the processor side that computes A_dN, B_dN and d from a
  reference trajectory, and the DMA engine that would feed the streams.
- **Nonlinear MPC:** there is no nonlinear (NMPC) solver. It needs
  model-specific derivative code, generated by an external tool, and the
  sparsity patterns that go with it.

## Verification

Each unit has a self-checking testbench in `tb/`. Each one:
- drives random data;
- compares every output with an independent double-precision evaluation of
  the formula, taken from the dense matrices rather than the design's index
  arithmetic;
- checks the unit's cycle count;
- stops with a watchdog.

Each testbench prints `TB_RESULT checks=… failures=…`.

| testbench | what it covers |
|---|---|
| `tb_fp32` | the binary32 operators, against the simulator's `real` arithmetic over random and edge operands (within 1 ulp) |
| `tb_kkt_assemble` | expands every stored row and compares the whole matrix with the permuted dense `[H A'; A 0]` |
| `tb_minres` | random indefinite banded systems, against Gaussian elimination; includes a warm start at the solution |
| `tb_ip_algorithm` | three random QPs with different bound masks, against a dense reference interior-point solve (`tb_ref_pkg`); compares the solution and every step length |
| `tb_qp_solver` | the full default configuration end to end (see below) |
| `tb_qp_horizon10` | the default model with horizon N = 10 (KKT order 80); 403,541 cycles per solve |

`tb_qp_solver` runs at the default parameters. It builds the linearised
vehicle model along a curved path and streams it in with random gaps. It reads
the result under random back-pressure. It then checks:
- the solution against the reference solve;
- the dynamics residual;
- the bounds;
- the latency;
- that each mechanism occurred: input stalls, output back-pressure, clipped
  and full steps, and bounds active at the solution.

To run one testbench with Verilator 5:

    verilator --binary -Wno-fatal --top-module tb_qp_solver \
        rtl/mpc_pkg.sv rtl/*.sv tb/tb_pkg.sv tb/tb_ref_pkg.sv tb/tb_qp_solver.sv
    ./obj_dir/Vtb_qp_solver

Simulation is fast. The end-to-end testbench builds in about 30 s and runs in
under a second. `tb_pkg` converts between binary32 words and `real` in
SystemVerilog, because Verilator does not support `shortreal`.

## Files

- `rtl/mpc_pkg.sv`: binary32 operators and the index maps of the formulation.
- `rtl/qp_solver.sv`: the top: stream front end, weight ROM, b, output.
- `rtl/ip_algorithm.sv`: the interior-point sequencer and iterate storage.
- Units instantiated by `ip_algorithm`:
  - `cds_symv`, `at_mult`, `ct_mult`, `rp_calc`, `rc_calc`;
  - `rn_calc`, `hdiag_calc`, `kkt_assemble`, `precond`;
  - `minres` (with `ls_matvec`), `dvds_calc`, `step_length`.
- `rtl/b_calc.sv`: forms b; instantiated by `qp_solver`.
- `tb/`: the testbenches, plus the binary32 conversion helpers (`tb_pkg`) and
  the double-precision reference model (`tb_ref_pkg`).
