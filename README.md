# Neural-network branch prediction unit

A conditional branch has two possible outcomes, and a deep pipeline pays heavily
when it guesses wrong. A classic two-level predictor keeps a record of recent
outcomes (the *first level*, a history register) and uses that record to select
a two-bit counter (the *second level*, a pattern history table). This design
keeps the first level and replaces the table of counters with a neural network:

* a **single-layer perceptron (SLP)** predictor: one small perceptron per
  group of branches, and
* a **multilayer perceptron (MLP)** predictor: one network with a hidden layer,
  shared by all branches.

Either network can be fed **global** history (G), the branch's own
**per-address** history (P), or a mix of both (GP). Either network can also be
paired with a **Gshare** predictor in a **hybrid**, where a chooser picks per
branch whichever of the two has been right more often.

All of it is synthesizable SystemVerilog (IEEE 1800-2017). The top module is
`neural_bpu`.

## Sizes

The defaults are the "8K-bit" configurations: the second level of the SLP and of
the MLP each costs about 8K bits.

| Part | Default | Storage |
|---|---|---|
| Global history register (GBHR) | 15 bits | 15 bits |
| Per-address history table (BHT) | 4 registers x 15 bits, selected by branch address bits [1:0] | 60 bits |
| SLP perceptron table | 64 perceptrons (address bits [5:0]) x 16 weights x 8 bits | 8192 bits |
| MLP | 8 address + 13 history inputs, 10 hidden neurons, 1 output; (22x10 + 11) weights x 32 bits | 7392 bits |
| Gshare PHT | 1024 two-bit counters | 2048 bits |
| Hybrid chooser | 1024 two-bit counters | 2048 bits |

In GP mode the SLP sees the 5 newest global bits and the 10 newest per-address
bits. The MLP sees 3 global and 10 per-address bits. The 4K-bit configurations
use 7 history bits: set `SLP_K = 7`, `MLP_K = 7`, `SLP_GP_G = 3`, `MLP_GP_G = 3`.

## How a prediction is made and learned

Every history bit enters a network as a bipolar value: +1 for taken, -1 for not
taken.

### Single-layer perceptron (`slp_predictor`)

The low 6 bits of the branch address select one perceptron of 16 signed 8-bit
weights: a bias `w0` and one weight per history bit. The perceptron's output is

    y = w0 + sum_i w_i * x_i          (x_i = +1 / -1)

Since every `x_i` is +1 or -1, each product is just `w_i` or `-w_i`, so `y` is a
plain adder tree (`perceptron_output`). The branch is predicted taken when
`y > 0`.

When the branch resolves, its weights change **only if the prediction was
wrong**. In that case the perceptron rule `w_i += t * x_i` is applied, with
`t = +1` for taken and -1 for not taken (`perceptron_trainer`). Each weight
saturates at -128 and +127 instead of wrapping. The corrected row is written
back into the table (`perceptron_table`).

### Multilayer perceptron (`mlp_predictor`)

There are 21 bipolar inputs: address bits [7:0] and 13 history bits. The
network has a hidden layer of 10 neurons (half the input count) and one output
neuron. Every neuron has a bias and uses the bipolar sigmoid

    f(x) = 2 / (1 + e^-x) - 1     (= tanh(x/2), range -1..1)

The branch is predicted taken when the output neuron's net input is above zero.

Weights are 32-bit signed fixed-point numbers with 16 fraction bits (Q16.16).
All sums and products saturate. On a misprediction, one step of
back-propagation is applied, with target `t = +1` or -1 and learning rate
1/4 (`ETA_SHIFT = 2`):

    d_o    = (t - o) * f'(net_o)
    d_h[j] = d_o * w_ho[j] * f'(net_h[j])
    w_ho[j] += d_o * h[j] / 4         w_ih[j][i] += d_h[j] * x_i / 4

The hidden-layer inputs are +1/-1, so the hidden sums and the input-weight
updates need no multipliers. Only the 10 hidden-to-output products and the
error terms need real multiplies.

At reset the weights are loaded with small fixed pseudo-random values, within
±0.125. A hash of each weight's position gives the value. With all-zero weights
the hidden neurons would stay identical and never learn.

**`bipolar_sigmoid`** computes `f` as a piecewise-linear interpolation between
the exact values at |x| = 0, 0.5, 1, 1.5, 2, 2.5, 3, 4, 5, 6 and 8. Each knot is
`round(65536 * tanh(x/2))`. Beyond |x| = 8 it holds f(8). The error is below
0.007. The derivative is formed from the function value, as
`f' = (1 + f)(1 - f) / 2`.

### Gshare and the hybrid (`gshare_predictor`, `hybrid_chooser`)

Gshare indexes 1024 two-bit saturating counters with
`address[9:0] XOR global_history[9:0]`. A counter of 2 or 3 predicts taken.
The chooser is a second table of 1024 two-bit counters, indexed by
`address[9:0]`. When exactly one of Gshare and the neural net was right, the
counter moves one step towards that one. Values 2 and 3 select the neural net.

### History (`global_history`, `local_history_table`, `history_select`)

Both history structures are shift registers with bit 0 the newest outcome.
They shift only when a branch resolves. `history_select` builds each network's
history input for the chosen mode:

* G: the K newest global bits.
* P: the K newest bits of the branch's BHT register.
* GP: `{bht[K-G-1:0], ghr[G-1:0]}`.

## Using `neural_bpu`

One branch is in flight at a time:

1. **Request.** Raise `req_valid` with the address on `req_pc` while `req_ready`
   is high. `pred_taken` is valid combinationally in the same cycle. So are the
   component predictions: `pred_slp`, `pred_mlp`, `pred_gshare`, the chooser's
   `use_neural`, the SLP output `slp_y` and the MLP output `mlp_o`.
   `hist_mode`, `nn_sel` and `hybrid_en` are captured with the request.
2. **In flight.** `req_ready` is low, and further requests are stalled. The
   prediction outputs keep showing the held branch.
3. **Resolve.** Raise `res_valid` with the real direction on `res_taken` for one
   cycle. In that cycle:
   * `mispredict`, `slp_mispredict` and `mlp_mispredict` are valid.
   * At the clock edge, every component trains and both histories shift.
   * `req_ready` returns the next cycle.

Nothing changes while a branch is in flight. At resolution each component
therefore re-evaluates the held branch and gets exactly the values it predicted
with. No per-branch state has to travel down a pipeline. The price is that only
one branch can be in flight, which suits a trace-driven or single-step setting.
A pipelined front end with several branches in flight would need
speculative history and stored network outputs instead. Assertions flag a
resolution with nothing in flight.

| Input | Values |
|---|---|
| `hist_mode` | `HIST_G`, `HIST_P`, `HIST_GP` (`nbp_pkg::hist_mode_e`) |
| `nn_sel` | `NN_SLP`, `NN_MLP`: the network paired with Gshare |
| `hybrid_en` | 1: the chooser decides; 0: the selected network alone |

Both networks and Gshare train on every resolved branch, whatever is selected,
so switching `nn_sel` or `hybrid_en` between branches is safe.

## What is this design's own choice

The published design gives the structure and sizes above. It also gives the
bipolar inputs, the bipolar sigmoid, the hidden-layer size, 1-byte SLP and
4-byte MLP weights, training only on a misprediction, and the Gshare+neural
hybrid with a 1024-entry PHT. The following are choices made here, where the
design says nothing:

* The one-branch-in-flight handshake and the run-time mode inputs. The
  published predictors were separate configurations.
* Index bits are the lowest address bits, with no alignment offset.
* SLP: the bias weight, the unit training step, and saturation.
* MLP:
  * the Q16.16 format and the piecewise-linear sigmoid;
  * plain back-propagation with learning rate 1/4;
  * training on mispredictions only, which is the design's SLP rule, applied
    here to the MLP too;
  * the pseudo-random initial weights.
* The MLP predicts and trains in a single cycle. The published design notes
  that the MLP is slower, but gives no latency.
* Gshare uses 10 history bits (no more than the index width). The published
  design asks for the same history length as the neural net; 10 bits is the
  limit the XOR index allows.
* The chooser is a table of per-address 2-bit counters; the published design
  does not describe its selector.
* Reset values: histories all not-taken, SLP weights zero, Gshare counters 01,
  chooser counters 10.

## Files

* `rtl/nbp_pkg.sv`: history-mode and network-select enums, Q16.16 helpers, the
  two-bit counter function.
* `rtl/neural_bpu.sv`: the top level.
* `rtl/slp_predictor.sv`, `rtl/perceptron_table.sv`, `rtl/perceptron_output.sv`,
  `rtl/perceptron_trainer.sv`: the SLP predictor and its parts.
* `rtl/mlp_predictor.sv`, `rtl/bipolar_sigmoid.sv`: the MLP predictor.
* `rtl/gshare_predictor.sv`, `rtl/hybrid_chooser.sv`: the hybrid's parts.
* `rtl/global_history.sv`, `rtl/local_history_table.sv`,
  `rtl/history_select.sv`: the first level.
* `tb/tb_<module>.sv`: one self-checking testbench per module.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

    verilator --binary --timing --assert -Wno-fatal rtl/nbp_pkg.sv rtl/*.sv \
        tb/tb_neural_bpu.sv --top-module tb_neural_bpu -Mdir obj -o sim
    ./obj/sim

`tb_neural_bpu` runs the top at its default sizes through all 12 combinations
of history mode, network and hybrid on/off. It uses 1500 branches from a
synthetic program of five static branches:

* a loop branch,
* a branch that repeats the last outcome,
* an alternating branch,
* a branch correlated with an earlier one,
* a 90%-taken noisy branch.

The testbench checks the following:

* the SLP's `y` against a reference model of the history registers and the
  perceptron table;
* that the final prediction comes from the selected component;
* that a request made while a branch is in flight is stalled;
* the mispredict flags;
* a minimum accuracy for each configuration (85%).

It also counts that stalls, SLP training, MLP training and both chooser
decisions all occurred. Reached accuracy is about 87-98%, the hybrids being
best. `tb_neural_bpu_4k` runs the same test on the 4K-bit configurations. It
reaches 75-98%: with 7 history bits the MLP cannot fully learn the loop branch
from global history. The other testbenches check each module against an independent model
(`tb_bipolar_sigmoid` against `$exp` in real arithmetic). `tb_slp_predictor`
and `tb_mlp_predictor` also require the predictor to learn a patterned branch
stream.

## Limits

* The accuracy figures above come from a synthetic stream. The program
  workloads the design was evaluated with are not reproduced here.
* The MLP datapath is fully combinational: about 45 multipliers of 32x32 bits
  in the forward and training paths. It is correct, but it is not a timing-closed
  implementation. A real one would spread the MLP over several cycles, which
  matches the published observation that the MLP is slower than the SLP.
