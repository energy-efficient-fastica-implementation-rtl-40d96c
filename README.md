# Eight-channel FastICA engine

This is an engine for blind source separation. Eight electrodes (EEG, for example) each record
a different mix of eight independent sources. The engine finds an 8x8 unmixing matrix that
recovers the sources from 256 samples per channel, using FastICA (fast independent component
analysis). It is built to be small and low-energy, and four ideas make it so:

* **Floating point only where it is needed.** Centering and the covariance are exact integer
  work. Everything after them is IEEE-754 single precision: the eigen-decomposition, the
  whitening and the iteration.
* **One CORDIC engine for the eigen-decomposition.** The engine computes rotation angles and
  applies them, so there is no divider and no arctan unit. CORDIC means shift-and-add
  rotation.
* **A one-unit with one multiplier and one adder.** The one-unit is the FastICA step that
  refines one weight vector. Four copies run in lock-step and share every data-memory read.
  Eight vectors therefore take two passes per iteration.
* **Early determination.** The run stops when the convergence measure stops moving, even if
  the threshold has not been reached.

All of it is plain synthesizable SystemVerilog. The memories are register arrays with one
cycle of read latency.

## What the engine computes

Write X for the 8 x 256 sample matrix, with one row per channel.

1. **Centering.** `Xc = X - mean`. The mean of each channel is its sum shifted right by 8.
   Inputs are 12 bits and results are 18 bits.
2. **Covariance.** `C = Xc Xc^T >> 8`. Only the 36 elements on and above the diagonal are
   computed, each saturated to 24 bits and then converted to floating point.
3. **Eigen-decomposition.** `C = E D E^T`, by the cyclic Jacobi method.
4. **Whitening.** `Z = D^-1/2 E^T Xc`.
5. **Fixed-point iteration.** The weight matrix W starts as the identity. Each iteration does
   the following:
   * It computes a new vector for each of the 8 weight vectors w:
     `w+ = sum_i z_i tanh(w^T z_i) - (256 - sum_i tanh^2(w^T z_i)) w`. This is the usual
     FastICA update times 256; the factor does not matter because of the normalisation that
     follows.
   * It orthonormalises the eight new vectors with Gram-Schmidt.
   * It forms `SAD = sum_i |w_i_old . w_i_new|`, the sum of absolute dot products. SAD reaches
     8 when no vector changes direction.
6. **Exit.** Iteration stops at the first of these three:
   * `8 - SAD < threshold` (converged);
   * 300 iterations;
   * `|SAD_old - SAD_new| < 0.001 * threshold` (early stop).
7. **Separation.** `S = W^T Z` is written over Z, so the host reads the sources from the same
   addresses it wrote the mixtures to.

## Top level and host protocol

`fastica_top` has the parameters `N_CH = 8`, `N_SMP = 256` and `MAX_ITER = 300`.

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `host_en/we/addr/wdata` | in | 1/1/11/32 | data-memory access, honoured only while the engine is idle |
| `host_rdata` | out | 32 | read data, one cycle after a read |
| `start` | in | 1 | one-cycle pulse that starts a run |
| `conv_threshold` | in | 32 | convergence threshold as an IEEE-754 single (0.01 is typical) |
| `busy`, `done` | out | 1 | running; one-cycle end pulse |
| `iterations` | out | 9 | iterations the last run took |
| `converged`, `early_stop` | out | 1 | why the last run stopped; neither set means the iteration limit |

To use the engine:

1. Write sample t of channel c as a sign-extended 12-bit integer to address `c*256 + t`.
2. Pulse `start`.
3. Wait for `done`.
4. Read the separated component c from the same addresses, as single-precision floats.

Like any ICA, the engine returns the components in arbitrary order, sign and scale.

### Memory maps

* **Data memory** (2048 x 32, single port). Address `channel*256 + sample`. It holds, in turn,
  the raw samples, the centered integers, the whitened floats and the separated floats. Every
  stage works in place.
* **Old weight matrix memory** (OWMM, 64 x 32, single port) holds W from the previous iteration.
  **New weight matrix memory** (NWMM, 64 x 32) holds the new W. In both, address
  `vector*8 + element`. The NWMM has one write port and one read port.

## Phases and who owns the memories

`fastica_controller` steps through the phases listed in `fastica_pkg::phase_t`. Each unit gets
a one-cycle start pulse and answers with a one-cycle done pulse. The top routes each memory
port to the unit of the current phase.

| phase | unit | data memory | OWMM | NWMM | cycles (defaults) |
|---|---|---|---|---|---|
| INIT_W | controller | - | write identity | - | 64 |
| CENTER | `centering_unit` | read twice, write | - | - | 6,153 |
| COV | `covariance_unit` | read | - | - | 27,685 |
| EVD | `evd_processor` | - | - | - | 89,376 |
| WHITEN | `whitened_data_generator` | read, write | - | - | about 22,600 |
| ONEUNIT | `four_parallel_one_units` | read | read | write | 49,316 |
| GS | `gram_schmidt_unit` | - | - | read, write | about 800 |
| CONV | `convergence_check_unit` | - | read, write (copy) | read | 194 |
| EARLY | `early_determination_unit` | - | - | - | 3 |
| SEPARATE | `separated_data_generator` | read, write | read | - | about 22,600 |

One iteration takes about 50,300 cycles. A run that reaches the 300-iteration limit takes
about 15.3 M cycles, or 0.15 s at 100 MHz. The synthetic test scene converges in 6 iterations,
which is 470,299 cycles.

The covariance unit streams its 36 results to the EVD processor's load port as they are
produced. Two integer-to-float converters (`fixed_to_float`) sit on the data paths:

* 24-bit, covariance into the EVD;
* 18-bit, centered samples into the whitening.

## Number format

`fastica_pkg` holds the floating-point operators as combinational functions: multiply, add,
subtract, compare, scale by 2^k, and convert from integer. A module that calls one gets one
operator. The format is IEEE-754 single precision with these simplifications:

* results are truncated, not rounded;
* subnormals are flushed to zero;
* overflow saturates to the largest finite value;
* there are no infinities or NaNs.

FastICA on 12-bit data stays far from all of these limits. Truncation costs a few units in the
last place, which the testbenches allow for.

## Eigen-decomposition with one CORDIC engine

This is the most involved part: `evd_processor`, with `cordic_engine` inside it.

`cordic_engine` runs 18 iterations of floating-point CORDIC, one iteration per cycle.

* The shift by 2^-i is an exponent decrement.
* The angle steps atan(2^-i) come from a small constant function.
* The gain is corrected by a final multiplication with 1/K = 0.6072529.

It has two modes:

* **Vectoring** (`mode = 0`) gives `zr = z0 + atan(y0/x0)`. A negative `x0` is first rotated by
  pi.
* **Rotation** (`mode = 1`) rotates `(x0, y0)` by `z0`.

Latency is 20 cycles from `start` to `done`.

`evd_processor` holds B (which becomes D) and E as register arrays. It runs 8 sweeps over the
28 index pairs (p, q). For each pair it does the following:

1. One vectoring operation with `x0 = b_qq - b_pp`, `y0 = 2 b_pq` and `z0 = 0`. Doubling is an
   exponent increment. Halving the result (another exponent step) gives the Jacobi angle
   `theta = 1/2 atan(2 b_pq / (b_qq - b_pp))`.
2. Eight rotations of the row pairs `(b_pk, b_qk)`. This is `B <- J^T B`. Because B is
   symmetric, each result is also written to the mirrored column entries `b_kp` and `b_kq`
   (for k other than p and q).
3. Two rotations, of `(b_pp, b_pq)` and `(b_qp, b_qq)`. This finishes `B <- B J`; only this
   2x2 block is still missing it.
4. Eight rotations of the eigenvector pairs `(e_kp, e_kq)`. This is `E <- E J`.

Each pair therefore costs 19 CORDIC operations of 21 cycles each (issue plus engine latency). A
full decomposition takes 8 x 28 x 19 x 21 = 89,376 cycles. The eigenvalues are the diagonal of
B; eigenvector j is column j of E.

The `SWEEPS` and `ITER` parameters set the number of sweeps and of CORDIC iterations. Their
defaults, 8 and 18, are the published choice. Separation quality is reported to level off
beyond about 4 sweeps and 10 iterations.

## Whitening and separation: the column transform

Both phases compute `out(t) = M in(t)` for each of the 256 sample columns of the data memory:

* whitening uses M = P = D^-1/2 E^T on integer input;
* separation uses M = W^T on float input.

The shared helper `column_transform` does this with one multiplier and one adder. For each
sample it computes the eight outputs in turn, re-reading the column for each one. It keeps the
outputs in an 8-word buffer and writes them over the column at the end. That buffer is what
makes the in-place update safe.

`inv_sqrt` gives `D^-1/2`:

* a 32-entry seed table, indexed by the exponent's parity and 4 fraction bits;
* followed by 3 Newton-Raphson steps `y = y (1.5 - x/2 y^2)`;
* latency 4 cycles.

## The one-unit schedule

`one_unit` produces w+ one element m at a time. Each element is one pass over the 256 samples,
and each sample takes 12 cycles:

| register | computation | cycles |
|---|---|---|
| R1 | `w^T z_i`: 8 reads of the sample column, multiply-add | 8 + 1 |
| R2 | `tanh(R1)`, by a 13-piece linear approximation (below) | 1 |
| R3 | `+= z_m(i) * R2`: one more read, of row m | 1 |
| R4 | `+= R2 * R2` | 1 |

After the last sample, `R5 = 256 - R4` and `Rout = R3 - R5 * w_m`. Rout is stored as
`wplus[m]`.

Because there is only one multiplier and one adder, `w^T z_i` is recomputed for every element
rather than stored. The unit takes 24,592 cycles per vector.

The memory addresses depend only on the counters, never on the data. So the four units in
`four_parallel_one_units` issue identical requests. Unit 0 drives the memory, its read data goes
to all four, and an assertion checks that the four stay in step.

`tanh_pwl` approximates tanh as `a|x| + b` on the ranges with break points 0, 0.5, 1, 1.5, 2, 3
and 7, and uses odd symmetry for negative x. From 7 upward the value is 1. Its largest error is
about 0.016.

## Orthonormalisation, convergence and early stop

* **`gram_schmidt_unit`** runs modified Gram-Schmidt on the NWMM in place. Vector k loses its
  projections on vectors 0..k-1 and is then scaled by `inv_sqrt` of its squared norm.
* **`convergence_check_unit`** does three things:
  * reads OWMM and NWMM side by side to form SAD, copying each new word into the OWMM in the
    same pass;
  * counts iterations;
  * keeps the previous SAD, and raises `converged` or `max_reached`.
* **`early_determination_unit`** runs only when neither flag is set. It forms
  `DV1 = 0.001 * threshold` and `DV2 = |SAD_old - SAD_new|`, and asks the controller to stop if
  `DV2 < DV1`. In the first iteration SAD_old is 0, so the rule cannot fire there.

## Where this design makes its own choices

The algorithm and the following details come from the published architecture:

* the block structure, the memory sizes and port types;
* the 12/18/24-bit widths and the shifts by 8;
* the CORDIC use, with its exponent tricks for the doubling and halving;
* the register-level one-unit steps and the tanh coefficient table;
* the four-way unrolling;
* the early-stop rule.

These are choices of this design:

* The initial W is the identity.
* The convergence test is `N - SAD < threshold`. The source specifies only a comparison of
  SAD with the threshold.
* The early-stop difference is taken as an absolute value.
* The inverse square root uses a plain table plus Newton-Raphson, where the source refers to a
  published modified variant.
* Gram-Schmidt is the modified form, with a plain schedule.
* The covariance saturates to 24 bits.
* The NWMM copy happens during the convergence check.
* Column transforms work in place with an output buffer.
* The order in which the EVD rotations are issued.
* All cycle schedules and handshakes.
* Floating point truncates rather than rounds.

The ranges the source evaluates:

* Its 256-sample, one-second window at 256 Hz fits the 2048-word data memory exactly.
* Windows at 1000 or 512 Hz do not fit: they need 8000 and 4096 words.
* 128, 64 and 32 Hz fit when `N_SMP` is lowered to match. `N_SMP` must be a power of two, since
  the mean is a shift.

The analog front end (electrodes and ADC) is outside the engine. Power and energy are not
modelled.

## Files

`rtl/` holds one module or package per file.

| file | role |
|---|---|
| `fastica_pkg.sv` | floating-point functions, constants, phase type |
| `fastica_top.sv` | top level |
| `fastica_controller.sv` | controller |
| `data_memory.sv`, `owmm.sv`, `nwmm.sv` | memories |
| `centering_unit.sv`, `covariance_unit.sv`, `fixed_to_float.sv` | preprocessing |
| `cordic_engine.sv`, `evd_processor.sv` | eigen-decomposition |
| `inv_sqrt.sv`, `column_transform.sv`, `whitened_data_generator.sv`, `separated_data_generator.sv` | whitening and separation |
| `tanh_pwl.sv`, `one_unit.sv`, `four_parallel_one_units.sv` | one-units |
| `gram_schmidt_unit.sv`, `convergence_check_unit.sv`, `early_determination_unit.sv` | iteration loop |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each compares against
values computed in the testbench (real arithmetic or integer models), checks cycle counts where
they are fixed, and ends with a `TB_RESULT checks=N failures=M` line. `tb_fp_pkg.sv` holds the
shared helpers: float conversion, the tanh reference, and a synthetic scene of seven
non-Gaussian sources plus one Gaussian source, randomly mixed.

There are two system tests:

* `tb_fastica_top` runs the top with `MAX_ITER = 30` three times, so that each exit path fires:
  * convergence (threshold 0.01);
  * early stop (threshold 1e-12);
  * the iteration limit (threshold 0).

  Each run checks that every non-Gaussian source is recovered with |correlation| > 0.97. The
  testbench counts each mechanism.
* `tb_fastica_rates` runs three tops side by side with `N_SMP` set to 128, 64 and 32, which are
  one-second windows at lower sample rates. With these short windows the sources are recovered
  less cleanly, so the test requires only that at least three sources reach |correlation| >= 0.9.
  The 32-sample run ends at the 300-iteration limit.
* `tb_fastica_full` runs the top at its default parameters once. It checks convergence, the
  cycle budget, and that every source is recovered with |correlation| >= 0.9.

To simulate with Verilator 5, for example the full test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fastica_full \
  rtl/fastica_pkg.sv tb/tb_fp_pkg.sv $(ls rtl/*.sv | grep -v fastica_pkg) tb/tb_fastica_full.sv
./obj_dir/Vtb_fastica_full
```

For any other testbench, substitute its name. The full run simulates about 470k cycles in
under a second of simulation time once compiled.
