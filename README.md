# Shared-engine accelerator for on-device actor-critic training

Training an Advantage Actor-Critic (A2C) agent on a small FPGA SoC means
running two neural networks (the actor, which scores actions, and the critic,
which estimates the state value) forward and backward thousands of times,
while the embedded CPU runs the environment. This RTL is the
programmable-logic half of such a platform. The CPU keeps everything that is
control-heavy or cheap: environment steps, action sampling, the loss, and the
weight update itself. The logic does the dense arithmetic:

* forward passes of the actor and the critic,
* the full back-propagation of an output error into weight and bias gradients,
* a small finite-state machine that watches training and picks the learning
  rate and how often to update.

The central idea is **sharing instead of replicating**. There is one
feed-forward engine and one gradient engine. They serve the actor and the
critic (they differ only in the weights read), and every agent of a
multi-agent run. Agents are served one job at a time in round-robin order.
Adding agents therefore costs one small input slot each, not another set of
multipliers.

```
              host DMA (AXI4-Stream)                         host DMA
                     |                                           ^
                     v                                           |
  +---------------------------------+          +------------------------------+
  | obs_stream_rx                   |          | output mux: result packets   |
  |  one slot per agent, pending[]  |          |  and gradient packets        |
  +---------------------------------+          +------------------------------+
          | pending[]      | slot data                 ^             ^
          v                v                           |             |
  +--------------+    +-----------+   x_act,h_act  +-------------+   |
  | rr_scheduler |--->| ff_engine |--------------->| grad_engine |---+
  +--------------+    +-----------+                +-------------+
                        ^  port A                      | port B   | grad_l1
                        |                              v          v
                     +------------------------------------+  +----------------+
   host weight   --->| weight_mem (actor + critic, banked)|  | meta_optimizer |--> lr, period,
   writes            +------------------------------------+  +----------------+    update flag
```

Everything is in `rtl/`. The top is `a2c_accel_top`. Shared types, sizes and
fixed-point helpers are in the package `a2c_pkg`.

## What follows the architecture, and what is this design's own

The architecture fixes these points, and the RTL follows them:

* the host/logic split described above;
* one feed-forward core shared by actor and critic;
* a separate gradient engine, whose gradients go back to the host for the
  update;
* agent observations arriving from DDR over AXI;
* round-robin time multiplexing of the engines across agents;
* a three-mode meta-optimizer (aggressive descent, stability correction,
  cautious refinement) that adjusts the learning rate and the update schedule
  with a fixed one-cycle response and without host involvement;
* layer sizes that change at run time, so that different control tasks run
  without rebuilding the hardware.

The architecture gives no internal detail, so the following are this design's
own choices. Treat them as a reasonable implementation, not a reproduction:

* the number format;
* the network shape (one ReLU hidden layer, linear outputs);
* all maximum sizes and the number of multiplier lanes;
* the number of agents;
* the memory layout;
* the packet formats;
* the order in which gradients are streamed;
* every indicator, threshold, learning rate and update period of the
  meta-optimizer.

All of them are parameters or are documented in the module headers.

Not part of the RTL, because they are not logic this design owns:

* the host processor and its software;
* the DDR memory;
* the DMA/AXI interconnect that moves packets between DDR and the two stream
  ports.

## Arithmetic

Every value on every interface is 16-bit two's complement with 8 fractional
bits (Q8.8). This covers observations, weights, activations, logits, value,
output errors and gradients. Products are kept at full width and summed in a
48-bit accumulator. A finished sum is shifted right by 8, which truncates
toward minus infinity, and then saturated to 16 bits.

The bias of each neuron is stored as one more weight. It is multiplied by a
constant 1.0 that the engines append to every input vector. The input vector
x therefore becomes `[x; 1; 0...]`, and the hidden vector h becomes
`[h; 1; 0...]`. This is why the host writes the bias of layer 1 in column
`n_in`, and the bias of layer 2 in column `n_hid`.

## Weight memory

`weight_mem` holds both networks. Each layer is a matrix: row r holds the
weights feeding output neuron r. Rows are padded to whole chunks of `LANES`
(default 8) values and split over `LANES` banks, so one read returns one
chunk of one row.

* Layer 1 (input to hidden) of each network has `MAX_HID` rows of
  `C1 = ceil((MAX_IN+1)/LANES)` chunks.
* Layer 2 (hidden to output) has `MAX_OUT` rows of
  `C2 = ceil((MAX_HID+1)/LANES)` chunks.
* The critic uses only row 0 of its layer 2.

The memory has three ports:

* one host write port, which writes one weight per cycle, addressed by
  network, layer, row and column;
* read port A for the feed-forward engine;
* read port B for the gradient engine.

Reads return data one cycle later. Weights may be rewritten only between
jobs.

## The feed-forward engine

`ff_engine` evaluates `h = ReLU(W1·[x;1])` and then `y = W2·[h;1]` for one
network. It works through one weight row at a time, one `LANES`-wide chunk
per cycle. It reads the chunk from memory, multiplies it with the matching
chunk of the input, adds the eight products and accumulates the sum. After a
row's last chunk, the sum is scaled back to Q8.8 and saturated. For the
hidden layer it is also clipped at zero.

The pipeline has two stages: issue (address and input chunk), then
multiply-accumulate. One idle cycle between the layers makes sure the last
hidden value is written before layer 2 reads it.

A pass takes `N1 + N2 + 3` cycles from the cycle in which `start` is high
until `done` is high, where:

* `N1 = n_hid·ceil((n_in+1)/LANES)`
* `N2 = n_out·ceil((n_hid+1)/LANES)`

At the largest size (8 inputs, 64 hidden units, 4 outputs) this is 167
cycles for the actor and 140 for the critic.

After a pass, the engine keeps the padded input and hidden vectors (`x_act`,
`h_act`) for the gradient engine.

## Back-propagation in the gradient engine

The host computes the loss and hands the engine the error at the network
outputs: `delta = dL/dy` (the logit errors for the actor, the value error for
the critic). `grad_engine` then works in four phases:

| phase | work | cost |
|---|---|---|
| BP | `acc = W2ᵀ·delta`, accumulated over the rows of W2, `LANES` products per cycle | `n_out·C2` cycles |
| DH | `delta_h[j] = acc[j]` in Q8.8 if `h[j] > 0`, else 0 (ReLU derivative) | 1 cycle |
| G2 | stream `dW2[k][j] = delta[k]·h[j]` for k < n_out, j ≤ n_hid | one beat per gradient |
| G1 | stream `dW1[j][i] = delta_h[j]·x[i]` for j < n_hid, i ≤ n_in | one beat per gradient |

The bias gradients are the `j = n_hid` and `i = n_in` entries, because their
input is 1.0. With a ready sink, the first gradient appears `n_out·C2 + 3`
cycles after `start`. After that, one gradient is sent per cycle, and the
stream stalls whenever the sink is not ready.

**The forward pass is re-run for each sample.** The engine never stores a
trajectory of activations. Instead, a gradient job first repeats the forward
pass for that sample and then back-propagates through it. On-chip memory
therefore holds exactly one sample's activations, whatever the rollout
length. The cost is one extra forward pass per gradient.

While streaming, the engine also adds up `grad_l1`, the sum of |g| over all
gradients of the job. This is the gradient-magnitude signal used by the
meta-optimizer.

## Jobs, slots and the round-robin schedule

The host sends jobs as AXI4-Stream packets of 32-bit beats:

| beat | contents |
|---|---|
| header | `[7:0]` agent, `[8]` job (0 inference, 1 gradient), `[9]` network for a gradient job (0 actor, 1 critic) |
| observations | `ceil(n_in/2)` beats; element 2m in `[15:0]`, element 2m+1 in `[31:16]` |
| output errors | gradient jobs only: `ceil(MAX_OUT/2)` beats, packed the same way |

`tlast` must be on the last beat.

* **Slots.** `obs_stream_rx` writes each packet into its agent's slot and
  sets the agent's `pending` bit. An agent has one slot. If a header arrives
  for an agent whose slot is still pending, `tready` is held low until that
  job has finished. This is the input back-pressure.
* **Bad packets.** A packet for an unknown agent, or one with `tlast` in the
  wrong place, is discarded up to its `tlast` and sets the sticky `rx_err`.
* **Scheduling.** `rr_scheduler` looks at the pending bits. Whenever the
  engines are free, it grants the first pending agent after the one served
  last. Every waiting agent is therefore served within `N_AGENTS` jobs, in a
  fixed order.

The sequencer in `a2c_accel_top` then runs the granted job:

* **Inference.** Actor pass, then critic pass on the same engine. The output
  packet is a header, then `n_out` logits, then the value.
* **Gradient.** A forward pass of the chosen network, a header, then the
  gradient stream from `grad_engine`.

Output header: `[7:0]` agent, `[8]` 0 for results and 1 for gradients, `[9]`
network, `[10]` update due, `[12:11]` meta-optimizer mode. Bit `[10]` is set
when a weight update has fallen due since the previous header. Every data
beat is one Q8.8 value, sign-extended to 32 bits, and `tlast` marks the last
beat.

A finished inference job counts as one environment step for the update
schedule.

## The meta-optimizer

`meta_optimizer` turns three event streams into a learning mode:

* gradient magnitudes (`grad_l1` at the end of each gradient job);
* episode returns (written by the host);
* environment steps.

It tracks:

* a moving average of gradient magnitude (weight 1/8). A new magnitude above
  twice the average is a *spike*.
* a moving average of episode return (weight 1/4). The *progress* is the new
  return minus the average.
* an *oscillation score*. It goes up by one when progress changes sign with a
  magnitude above the plateau band, and otherwise decays by one.

| from | to | when |
|---|---|---|
| any | stability correction | gradient spike, progress < −20, or oscillation score ≥ 3 |
| stability correction | cautious refinement | 4 calm episodes in a row |
| cautious refinement | aggressive descent | 3 episodes in a row with progress > 5 |
| aggressive descent | cautious refinement | 4 episodes in a row with \|progress\| ≤ 2 |

| mode | learning rate (Q0.16) | update period (steps) |
|---|---|---|
| aggressive descent | 262 (≈0.004) | 5 |
| cautious refinement | 66 (≈0.001) | 10 |
| stability correction | 16 (≈0.00025) | 20 |

The mode and its outputs change on the clock edge after the event that caused
them. Reset starts in aggressive descent. The first gradient and the first
return only seed the averages. `update_due` pulses every `update_period`
steps.

The rules and numbers above are defaults, and all of them are module
parameters. They were chosen to be plausible, not tuned on real training
runs.

The host reads `opt_lr` and the header's update flag, and applies the update
with that rate. The weight update itself stays on the host.

## Sizes and the target tasks

| parameter | default | meaning |
|---|---|---|
| `N_AGENTS` | 4 | agent slots |
| `LANES` | 8 | multipliers in each engine |
| `MAX_IN` | 8 | observations |
| `MAX_HID` | 64 | hidden units |
| `MAX_OUT` | 4 | discrete actions |

The sizes used by a job are set at run time with `cfg_n_in`, `cfg_n_hid` and
`cfg_n_out`. They must not change while jobs are in flight.

The usual benchmark tasks all fit without rebuilding:

| task | observations | actions |
|---|---|---|
| CartPole | 4 | 2 |
| Acrobot | 6 | 3 |
| LunarLander | 8 | 4 |

Each assumes a hidden layer of up to 64 units. A wider network needs a larger
`MAX_HID`. More agents need a larger `N_AGENTS`.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. The
testbenches compare against an integer reference model in
`tb/a2c_ref_pkg.sv` and print `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/a2c_pkg.sv tb/a2c_ref_pkg.sv tb/tb_a2c_accel_top.sv \
    --top-module tb_a2c_accel_top
./obj_dir/Vtb_a2c_accel_top
```

`tb_a2c_accel_top` runs the whole design at its default sizes, in well under
a second. It does the following:

* loads random weights into both networks;
* streams inference and gradient jobs for all four agents under three
  run-time configurations (8/64/4, 4/64/2, 6/64/3);
* throttles the output stream at random;
* feeds returns that take the meta-optimizer through all three modes.

It checks every output value and header. It also checks that each mechanism
happened at least once:

* round-robin rotation;
* input back-pressure;
* output stalls;
* gradients of both networks;
* a change of run-time sizes;
* all three modes;
* the update flag;
* a dropped packet.

The block testbenches also check the feed-forward latency and the gradient
engine's first-beat latency against the formulas above.

`tb_a2c_training` runs the accelerator as it is meant to be used. The
testbench plays the host: it runs four environments and samples actions
from the softmax of the returned logits. It forms A2C batches whenever a
header carries the update flag, sends an actor and a critic gradient job per
transition, and applies the averaged gradients with the meta-optimizer's
learning rate to full-precision weights. It then re-quantises the weights
and rewrites them into the accelerator.

It trains three task sizes in turn:

* 4 observations and 2 actions, using the cart-pole equations of motion;
* 6 observations and 3 actions, using a simple stand-in environment;
* 8 observations and 4 actions, using the same stand-in.

Every logit, value and gradient it receives (about 6.6 million values) is
checked against the reference model. The run takes about 11 s. The episode
lengths it prints show the loop working. They are not a convergence result:
runs this short, with the default learning rates, do not learn much.

## Limits

* One hidden layer only. Deeper networks would need a layer loop in
  `ff_engine` and `grad_engine`, and more weight regions.
* Rounding is by truncation. A software model must truncate the same way to
  match bit for bit.
* The actor's softmax, action sampling, the A2C loss (advantage, entropy)
  and the optimizer step run on the host. The hardware only delivers logits,
  values and gradients.
* Weights are written one value per cycle through a simple port. There is no
  AXI-Lite register file.
* The feed-forward engine pipelines the chunks within one pass, but
  consecutive passes do not overlap. Each pass has 2 to 3 cycles of fill
  and drain. A gradient job also keeps both engines for the whole job, so
  the next agent's inference waits until the gradient stream has finished.
* The engines are written directly as RTL, and the whole network
  back-propagation runs in logic. The host only computes the output-layer
  error and applies the update.
* The meta-optimizer's thresholds are untuned defaults. The learning rate is
  reported, not applied, because the update runs on the host.
