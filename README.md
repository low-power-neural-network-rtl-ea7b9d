# GMDH network trainer and evaluator

This is a hardware design that builds a small neural network from examples using the Group
Method of Data Handling (GMDH). It then runs that network. Every neuron is a quadratic
polynomial of exactly two inputs:

    Y = b0 + b1*in1 + b2*in2 + b3*in1^2 + b4*in2^2 + b5*in1*in2

Training does not use back-propagation. For each pair of inputs, the coefficients come from one
least-squares solve. Then every subset of the six terms is tried, and the subset with the lowest
error becomes the neuron. Next, a layer is formed from the best of these neurons. If the new
layer lowers the error, its outputs become the inputs of the next layer. Growth stops when a
layer no longer helps, when a layer has one neuron, or when a layer limit is reached. The final
output is the average of the outputs of the last layer.

All arithmetic on network values runs through two small circuits. One is a one-bit signed
multiplication cell. The other is a one-bit full adder of the transmission-gate type. The cell is
used to build a sign-magnitude array multiplier, and the full adder to build ripple-carry
adders. The neuron is made of those two circuits.

The numbers here (Q7.8 fixed point, widths, latencies) are the defaults of this RTL.

## Number format

Network values and coefficients are 16-bit two's complement with 8 fractional bits (Q7.8,
range -128 to +127.996). The constants are in `gmdh_pkg`.

* **Multiply** (`fx_mul`). The operands are split into sign and magnitude, and the magnitudes are
  multiplied by `sm_multiplier`. The 32-bit product is shifted right by 8, which rounds toward
  zero, and the sign is put back. The low 16 bits are kept, so an overflow wraps.
* **Add**: 16-bit ripple-carry adders, also wrapping on overflow.
* **Training sums** keep full precision: 64 bits with 16 fractional bits.

Keep data well inside the range. With inputs of magnitude up to about 8, the squared terms still
fit. Nothing saturates in the neuron itself.

## The arithmetic cells

`signed_mult_cell` multiplies one magnitude bit of X by one of Y and also gives the sign of that
one-bit product:

    p      = Px & Py
    sign_p = p & (SIGN(X) ^ SIGN(Y))

A zero product is never negative. `sm_multiplier` places a W x W grid of these cells. It sums the
partial-product rows with W-1 rows of `rca_adder`: row i adds partial-product row i to the upper W
bits of the running sum. The product sign is the OR of all the cell signs. That equals the XOR of
the operand signs when the product is non-zero, and 0 when it is zero.

`full_adder` is the multiplexer form of a transmission-gate adder. The half-sum `h = A ^ B`
steers two multiplexers: `SUM = h ? ~Cin : Cin` and `Cout = h ? Cin : A`. The transistor-level
properties of these circuits do not appear in RTL. Those properties are fewer devices, no direct
supply connection in the pass gates, and lower switching power.

`gmdh_neuron` is fully parallel and combinational. It uses three multipliers for `in1^2`, `in2^2`
and `in1*in2`, five more for the `b_k * term_k` products, and a chain of five adders.

## Training one neuron (the hardest part)

`neuron_trainer` receives a pair of layer inputs and returns the best equation of those two
inputs, with its error. It works in three phases.

1. **Normal equations** (`normal_eq_accum`), one sample per clock. For term vector
   `t = (1, in1, in2, in1^2, in2^2, in1*in2)` and desired output `y`, it accumulates
   `G[a][b] = sum t_a*t_b` and `r[a] = sum t_a*y`. The squared and cross terms are the neuron's
   own truncated Q7.8 values, so the fit is exact for the circuit that will use it.
2. **Every term subset.** A 6-bit `term_mask` runs from `111111` down to `000001`, which is all
   63 non-empty subsets. `gauss_solver` solves `G b = r` restricted to the kept terms. It does not
   build a smaller matrix. Instead it replaces each removed term's row and column with a row and
   column of the identity and sets that term's right-hand side to 0. This forces `b_k = 0` and
   leaves the other equations unchanged, so one 6x6 solver serves every subset.
   * Method: Gauss-Jordan elimination with partial pivoting.
   * Each row is normalised on a serial restoring divider. The eliminations run one row per
     clock.
   * If a pivot has magnitude `EPS` (16 LSB) or less, the subset has no solution. It is marked
     singular and skipped.
   * The coefficients are rounded to Q7.8 and saturated.
3. **Error.** Each solvable candidate is run on the same `gmdh_neuron` datapath over all samples,
   one sample per clock. The squared errors are summed (SSE, which is s times the MSE). Only the
   best candidate is held. On a tie, the first one tried wins.

On XOR data (0/1 inputs, 4 samples), many subsets are singular, because `in^2 = in` for 0 and 1.
The descending search order makes the first exact solution `y = in1^2 + in2^2 - 2*in1*in2`
(mask `111001`, b0 = 0). That is the classic single-neuron XOR solution.

**Latency.** Accumulation takes `num_samples + 2` clocks. Each subset then costs one solver run of
about `6 * (k * 82 + 7)` clocks, where k is the number of non-zero row elements divided, plus
`num_samples` clocks when the subset is solvable. Measured values:

* XOR neuron: 51,742 clocks.
* A full 56-sample training at the default size: about 0.75 million clocks.

## Growing layers

`gmdh_trainer` owns the sample memory. That memory is two banks of `MAX_SAMPLES x MAX_N` values
plus the desired outputs. For the layer under construction, it works as follows.

1. Every pair (p, q) with p < q of the current inputs goes to `neuron_trainer`.
2. `layer_selector` keeps the first `inputs + 2` candidates. After that, a newcomer replaces the
   kept neuron with the largest error if the newcomer's error is smaller.
3. **Average rule.** On finalize, a kept neuron is dropped if its error is above the average of
   the kept neurons. The test is computed as `err * n * 100 > sum * (100 + SOFT_PCT)`, with no
   division. `SOFT_PCT = 10` would keep neurons up to 10 % above the average.
4. The trainer then compares the survivors' average error with that of the previous layer.
   * **No survivor, or no improvement:** the layer is discarded and training stops (`STOP_NO_GAIN`
     or `STOP_NO_NEURON`). The first hidden layer has nothing to beat and is kept if anything
     survives.
   * **Improvement:** the survivors are written into the evaluator's configuration memory at
     slots 0..n-1, and the remaining slots are marked invalid. Their outputs for every sample are
     computed into the other memory bank and become the next layer's inputs.
5. Training stops after a layer with a single neuron (`STOP_SINGLE`) or when `max_layers` layers
   exist (`STOP_LIMIT`).

The configuration of one neuron (`neuron_cfg_t`) holds a valid bit, the indices of its two inputs
in the previous layer, and the six coefficients.

## Evaluating the trained network

`gmdh_network` holds the configuration in `MAX_LAYERS x MAX_N` entries. Layer 0 reads the system
inputs, and each later layer reads the previous layer's outputs by slot number. One
`gmdh_neuron` evaluates one neuron per clock, slot by slot, into two output buffers used in turn.
`output_averager` then divides the sum of the last layer's valid outputs by their count, with
truncation toward zero.

**Latency** from `start` to `done`: `num_layers * MAX_N + DATA_W + clog2(MAX_N+1) + 5` clocks.
At the defaults that is 12 clocks per layer plus 25.

## Using the top level, `gmdh_top`

Parameters:

| parameter | default | meaning |
|---|---|---|
| `N_IN` | 4 | system inputs |
| `MAX_SAMPLES` | 56 | training samples held |
| `MAX_LAYERS` | 4 | hidden layers held |
| `MAX_N` | `N_IN + 2*MAX_LAYERS` | neuron slots per layer (each layer may grow by 2) |
| `SOFT_PCT` | 0 | softening of the average rule, in percent |

Sequence:

1. Load the training set while idle. For each sample, write each input with `ld_we`, `ld_sample`
   and `ld_col`, then write the desired output with `ld_is_y = 1`.
2. Set `num_inputs`, `num_samples` and `max_layers`, then pulse `train_start`. `train_busy` stays
   high until `train_done` pulses. At that point `n_layers` and `stop_reason` (`gmdh_pkg::stop_t`)
   are valid.
3. Apply `x` and pulse `eval_start`. `y` is valid when `eval_done` pulses. `eval_start` is ignored
   while training runs.

The trainer writes the evaluator's configuration directly. An assertion in `gmdh_top` checks that
this never happens during an evaluation.

All sequential blocks use one clock and an asynchronous active-low reset `rst_n`. Everything that
is read is reset, except the sample memory, which is written before use. Start and done signals
are one-clock pulses.

## Departures and choices

The published algorithm describes the method and the arithmetic cells, not a hardware
organisation. The following are choices of this design:

* **Search order.** The subset count is 63, which follows from six terms. The search order, the
  tie rule, the pivoting, `EPS`, the fixed-point formats and the serial division are all choices.
* **Error measure.** The error used everywhere is the sum of squared errors, not the mean. For a
  fixed sample count both rank candidates and layers identically, and no divider is needed.
* **Output.** There is one output, the average of the last layer. A multi-output network is not
  built.
* **Scheduling.** Training and evaluation use one neuron datapath, time-multiplexed. Parallel
  copies could be added for speed, but are not.
* **Plain multipliers in training.** The training accumulator (42 products per sample) and the
  elimination step of the solver (seven 64x64 products per clock) use the plain `*` operator. They
  do not use the sign-magnitude array, which is kept for the 16-bit network arithmetic.
* **Not built:**
  * The transistor-level pass-gate circuits, their layouts and their power behaviour. The logic
    they compute is in `signed_mult_cell` and `full_adder`.
  * Sigmoid and radial-basis neuron variants.
* **Synthesis size.** After coarse synthesis, the top is about 33,000 word-level cells,
  16,000 flip-flop bits and 22,400 memory bits. The 64-bit solver dominates.

## Limits worth knowing

* **Overflow.** Neuron arithmetic wraps on overflow. Large inputs make the squared terms
  overflow silently.
* **Solver accuracy.** The solver is fixed point, and its singularity test is an absolute
  threshold. Badly conditioned data, for example nearly collinear inputs, can give a poor subset
  that is not flagged singular. The error ranking usually rejects it.
* **Sample count.** `MAX_SAMPLES = 56` and 64-bit sums are sized for small training sets. Larger
  sets need wider accumulators.

## Files

| file | content |
|---|---|
| `rtl/gmdh_pkg.sv` | widths, `neuron_cfg_t`, `stop_t` |
| `rtl/full_adder.sv`, `rtl/signed_mult_cell.sv` | the one-bit cells |
| `rtl/rca_adder.sv`, `rtl/sm_multiplier.sv`, `rtl/fx_mul.sv` | word arithmetic |
| `rtl/gmdh_neuron.sv` | the quadratic neuron |
| `rtl/normal_eq_accum.sv`, `rtl/gauss_solver.sv`, `rtl/seq_divider.sv` | least-squares fit |
| `rtl/neuron_trainer.sv`, `rtl/layer_selector.sv`, `rtl/gmdh_trainer.sv` | training control |
| `rtl/gmdh_network.sv`, `rtl/output_averager.sv` | evaluation |
| `rtl/gmdh_top.sv` | trainer plus evaluator |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/gmdh_top_full_tb.sv` | default-size run: 4 inputs, 56 samples, up to 4 layers |
| `tb/gmdh_workloads_tb.sv` | default-size runs shaped like typical GMDH studies |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Every testbench has a
cycle watchdog. With Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal rtl/gmdh_pkg.sv rtl/*.sv \
        tb/gmdh_top_tb.sv --top-module gmdh_top_tb -Mdir obj_top
    ./obj_top/Vgmdh_top_tb

What the testbenches check:

* **Arithmetic cells and neuron.** These are compared exhaustively or at random against integer
  models.
* **`seq_divider`.** Random divisions plus edge cases: the largest dividend over divisors 1 and
  all-ones, and a dividend below its divisor. The fixed latency is checked too.
* **`gauss_solver`.** Random systems with known solutions, random subsets, and a singular
  matrix.
* **`neuron_trainer`.**
  * XOR.
  * Exact quadratics, where the coefficients must be recovered to 1 LSB.
  * A latency bound.
* **`gmdh_trainer`.** Data sets chosen to end in each stop reason.
* **`gmdh_top_tb`.** Trains and evaluates several data sets with 5 inputs. It compares the
  network output with a model built from the configuration the trainer wrote. It counts how often
  each mechanism occurred and fails if any never did. The mechanisms are:
  * singular subset skipped
  * worst neuron replaced
  * average-rule drop
  * layer added
  * layer discarded for no gain
  * stop on a single neuron
  * stop on the layer limit
  * a network of two or more layers
* **`gmdh_top_full_tb`.** Runs the default configuration on a synthetic 4-input, 56-sample
  regression. It takes about 15 s of simulation. The trained network must beat predicting the
  mean.
* **`gmdh_workloads_tb`.** Three runs at the default size, each checked output-by-output against
  the configuration model:
  * XOR with 2 inputs and 4 samples: one neuron, exact outputs.
  * A 3-input, 24-sample regression grown over several layers: it must beat the mean predictor.
  * A 4-input, single-stage leave-one-out study: train on 55 of 56 samples, predict the one left
    out. Only the first three folds are run; about 450k cycles each. The held-out errors are
    printed, not judged.
  The whole run takes about 25 s of simulation.
