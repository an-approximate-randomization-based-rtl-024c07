# Energy-adjustable threshold-network inference engine

This is a small, multiplier-frugal digital engine for the forward pass of a
single-hidden-layer randomization-based neural network (RBN, the family that
includes extreme learning machines and random vector functional-link nets)
with hard-limit (sign) activations:

    y(x) = sum_n beta_n * sign( b_n + sum_j e_nj * w_nj * x_j ),   class = sign(y)

Its point is that the amount of arithmetic per inference can be cut at run
time, when energy is scarce, without loading a different model. Every
connection (n, j) carries one extra stored bit, `u_nj`, computed off-line,
that says whether the term `w_nj * x_j` matters much to neuron n. In
**Complete** mode every term is accumulated (`e_nj = 1`). In **Approximate**
mode only the relevant ones are (`e_nj = u_nj`); for a skipped term the
multiplier's input registers are simply not loaded, so the multiplier does
not toggle and the term costs (almost) no dynamic energy. The weights are
the same in both modes; they are trained so that the network is accurate
either way. A controller picks the mode for each inference from an
energy-budget input.

The datapath is deliberately serial: one 8 x 8 multiplier and one 16-bit
accumulator compute all N x D terms, one per clock cycle, so latency is
N*D + 3 cycles in *both* modes. What Approximate mode saves is switching
activity (energy per inference), not time.

## Block diagram

```
                 energy_budget, budget_thr
                          |
                   mode_controller ----------- mode (S/A) -----+
                          ^ start                              |
   x_valid/x_data   sequencer (FSM: n, j, n*D+j, first, last)  |
        |                 |                |                   v
        v                 v                v            enable_unit
   input_memory ---x_j--> neuron <--e_nj---------------- Mem U -> u_nj -> MUX(1, u_nj)
   (serial)               Mem w -> [w_nj]  \
                          x_j  -> [x_j ]    *-> + -> [acc] <- b_n (Mem b)
                          e_nj -> [FF] ------------------^
                                   |
                              acc, phi_valid, n
                                   v
                             output_unit: Mem beta -> sign_unit(+/-beta_n) -> + -> [y]
                                                                       y, y_pos, y_valid
```

| File | Block | What it does |
|---|---|---|
| `rtl/rbn_pkg.sv` | – | widths (8-bit data, 16-bit accumulator, 8-bit budget), `mode_e`, `mem_sel_e`, saturating add |
| `rtl/rbn_top.sv` | top | wires the blocks; parameter load port; input stream; result |
| `rtl/sequencer.sv` | control FSM | steps n and j over the N*D terms, one per cycle |
| `rtl/mode_controller.sv` | Controller | Complete/Approximate decision from the energy budget |
| `rtl/input_memory.sv` | Input | serial acquisition of one sample's D features |
| `rtl/enable_unit.sv` | Enable | Mem U, `u_nj` register, S/A multiplexer -> `e_nj` |
| `rtl/neuron.sv` | Neuron | Mem w, Mem b, enabled operand registers, multiplier, accumulator |
| `rtl/output_unit.sv` | Output | Mem beta, Sign Unit, output accumulator |
| `rtl/sign_unit.sv` | Sign Unit | `+beta_n` or `-beta_n` from the sign of the neuron accumulator |
| `rtl/param_mem.sv` | Mem w/b/beta/U | write port + asynchronous read |

## How a term moves through the pipeline

This is the part that needs care when changing the design. Let cycle `c` be
the cycle in which the sequencer issues term (n, j):

| cycle | where | what happens |
|---|---|---|
| c   | sequencer, enable_unit, input_memory | `lin_addr = n*D + j`, `n`, `first` (j = 0) and `last` (j = D-1) are valid; Mem U is read and captured in `u_nj`; the input memory's synchronous read of `x_j` is launched; the neuron registers the address |
| c+1 | enable_unit, neuron | `e_nj = valid & (Complete ? 1 : u_nj)`; Mem w is read at the registered address. At the clock edge, **only if `e_nj = 1`**, the `x_j` and `w_nj` registers load; a flip-flop stores `e_nj` |
| c+2 | neuron | the product `x_j * w_nj` is added to `acc` if the stored `e_nj` is 1. On the first term of a neuron the accumulator is instead loaded with `b_n` plus the (possibly gated) product, so `b_n` is loaded even when the first term is skipped |
| c+3 | output_unit | after the last term of a neuron, `phi_valid` pulses with `acc` final; `beta_n` is read, negated if `acc < 0`, and added to `y` (the term of neuron 0 replaces the old `y`) |
| c+4 | top | after neuron N-1, `y_valid` pulses |

Neurons follow each other with no idle cycle. During neuron 0 the sequencer
issues term (0, j) in the same cycle in which feature `x_j` is accepted, and
the input memory forwards a word that is written and read in the same cycle,
so input acquisition and the first neuron overlap. If the feature stream has
a gap, nothing is issued that cycle (an input stall) and the latency grows by
the gap. From neuron 1 on, the sample is read back from the input memory and
`x_ready` is low; the next sample is accepted once `y_valid` has pulsed.

Worked example (D = 3, N = 2, `x = [1, 2, 3]`, `w_1 = [6, 5, 4]`,
`w_2 = [3, 2, 1]`, `b = 0`, Approximate mode with `u_23 = 0`): the operand
registers take (1, 6), (2, 5), (3, 4), (1, 3), (2, 2) and then hold; the
accumulator reads 0x0006, 0x0010, 0x001C, then restarts at 0x0003, 0x0007,
and stays at 0x0007 because the third product of neuron 2 is never made.
`tb/tb_rbn_example.sv` checks exactly this trace.

## Preparing the relevance bits and the weights

Everything in the memories is computed off-line; the hardware only stores it.

* Hidden parameters `w_nj`, `b_n` are drawn at random (any distribution).
* Relevance: with `xbar_j` the mean of feature j over the training set,
  `a_nj = xbar_j * w_nj`. Positive terms are scaled by the largest positive
  `a` of the neuron, negative ones by the most negative:
  `c_nj = a_nj / max{a_nk > 0}` or `c_nj = a_nj / min{a_nk < 0}`, so
  `0 < c_nj <= 1`. Then `u_nj = 1` if `c_nj > alpha`, else 0. Typical
  thresholds are 0.2 to 0.5; 0.2 drops roughly 20-40% of the products.
* Output weights: let `H` be the hidden-layer output matrix on the training
  set computed with all terms, and `H0` the same with only the relevant
  terms. Solve `beta = (lambda*I + H'H + H0'H0)^-1 (H + H0)' y`, i.e. ridge
  regression that fits both modes at once. Plain ridge regression on `H`
  alone gives a network that loses much more accuracy in Approximate mode.
* Quantise `x`, `w`, `b`, `beta` to 8-bit signed integers. Inputs are
  normally scaled to [0, 1], i.e. 0..127.

## Interface (`rbn_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `load_en`, `load_sel`, `load_addr`, `load_data` | in | 1, 2, clog2(N*D), 8 | write one parameter while `busy` is low. `load_sel` (`rbn_pkg::mem_sel_e`): `MEM_W` and `MEM_U` at `n*D + j`, `MEM_B` and `MEM_BETA` at `n`. `MEM_U` uses bit 0 |
| `energy_budget`, `budget_thr` | in | 8, 8 | sampled with the first feature; `energy_budget < budget_thr` selects Approximate mode |
| `mode` | out | 1 | mode of the current (or last) inference, `MODE_APPROX` = 1 |
| `x_valid`, `x_data`, `x_ready` | in, in, out | 1, 8, 1 | feature stream `x_1 .. x_D`, accepted when both valid and ready |
| `busy` | out | 1 | an inference is in progress |
| `y_valid`, `y`, `y_pos` | out | 1, 10+clog2(N), 1 | result pulse, network output, class (`y >= 0`) |

Memories have no reset: load every word that an inference will read
(all N*D weights and relevance bits, all N biases and output weights) before
the first inference. A smaller network runs on a larger build by loading
zeros into the unused words (zero `w` and `u` for unused features, zero
`beta` for unused neurons; the latency stays that of the full build).

Parameters: `N` (hidden neurons, default 500) and `D` (features, default
100). Widths are in `rbn_pkg`.

## Number formats and arithmetic

* `x_j`, `w_nj`, `b_n`, `beta_n`: 8-bit two's complement.
* Neuron accumulator: 16-bit two's complement. Products of two 8-bit values
  always fit, but a long sum may not (D * 127 * 128 exceeds 16 bits for
  D > 2). The accumulator therefore **saturates** instead of wrapping, which
  keeps the sign, the only thing the activation uses, correct for sums that
  leave the range.
* `sign(0)` is taken as +1.
* Output accumulator: `10 + clog2(N)` bits, wide enough that N terms of
  magnitude up to 128 never overflow.

## What follows the reference architecture and what is this implementation's

Taken from the architecture: the Input / Neuron / Output / Enable /
Controller partition; one multiplier; `x_j` and `w_nj` registers enabled by
`e_nj`, a flip-flop delaying `e_nj` to the accumulator, the accumulator
initialised with `b_n`; Mem U plus a multiplexer between constant 1 and
`u_nj` selected by the mode; Mem beta, Sign Unit and accumulator in the
output; 8-bit data and a 16-bit multiply-accumulate; one term per cycle with
the first neuron overlapping input acquisition; equal latency in both modes.

Chosen here, because the architecture leaves them open:

* the parameter load port and the valid/ready input handshake;
* the controller rule (`energy_budget < budget_thr`, sampled once per
  inference, so a mode change never splits an inference);
* asynchronous-read memories (small memories in LUTs or flip-flops) and the
  synchronous, write-first input memory;
* saturating neuron accumulation, `sign(0) = +1`, the output width;
* the pipeline depth: the result appears N*D + 3 cycles after the first
  feature, one cycle later than an ideal three-stage flow with single-cycle
  phases would give;
* e_nj held low in cycles that carry no term.

Known differences and limits:

* Sizes: the default build (D = 100, N = 500) holds all the classification
  tasks the design was sized for except one with D = 503 features, which
  needs a build with `D` of at least 503 (one such build is simulated).
* The output memory holds `beta_n`, not a product `beta_n * phi_n`: `phi_n`
  is known only at run time, so the Sign Unit applies it to the stored
  `beta_n`.
* Energy itself is not modelled; the testbenches count enabled
  multiplications as its proxy.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`:

| Testbench | What it checks |
|---|---|
| `tb_rbn_top` | default size (N = 500, D = 100), random network, six inferences: both modes, mode switches, input stalls; `y` and class against a reference model with the same saturating arithmetic; latency N*D + 3 + stall cycles; enabled-multiplication count (N*D in Complete mode, the number of set `u_nj` in Approximate mode); each mechanism (skip, saturation, negative activation, both classes) seen at least once; operand registers unchanged in every cycle without an enabled term |
| `tb_rbn_example` | the D = 3, N = 2 worked example above, register by register, in both modes |
| `tb_rbn_workloads` | the default build running networks shaped like the target tasks (D from 5 to 80, N from 207 to 500, zero-padded) and the five (D, N) energy-study shapes with half of the terms relevant and thirty random samples each, plus a second build with D = 503, N = 110 for the widest task; checks `y` and the multiplication count (helper: `tb/rbn_workload_runner.sv`) |
| `tb_neuron` | accumulator value three cycles after each issued term, `phi_valid` timing, the worked example, saturation |
| `tb_enable_unit`, `tb_output_unit`, `tb_sign_unit`, `tb_input_memory`, `tb_param_mem`, `tb_mode_controller`, `tb_sequencer` | each block's rule against a model, with random traffic |

Running one with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/rbn_pkg.sv tb/tb_rbn_top.sv \
          --top-module tb_rbn_top -o sim
./obj_dir/sim
```

Replace `tb_rbn_top` with any other testbench name. The full-size test runs in
well under a second of wall-clock time, the workload test in a few seconds. Lint with
`verilator --lint-only -Wall -Irtl rtl/rbn_pkg.sv rtl/rbn_top.sv`; the one
remaining warning (reset used both asynchronously and in the assertions'
`disable iff`) is expected.
