# Pipelined neuron accelerator for on-chip DNN training

This design trains a small fully connected neural network in hardware with
backpropagation and batch gradient descent. Each neuron is a small
processor of its own. It has a pipelined IEEE-754 single-precision
multiply-add ALU, a sigmoid look-up table, a few words of private weight
and gradient memory, and three sequencers:

- a **forward unit** for the activation,
- a **backpropagation unit** for the error term and gradient sums,
- a **gradient-descent unit** for the weight update.

All neurons of a layer work in parallel. A control unit moves the work
from layer to layer by acknowledgements. Training vectors live in an
external SDRAM. They stream through a 256-vector on-chip buffer, which is
refilled a quarter (64 vectors) at a time while training goes on.

The default build is the 3-3-3-1 network: three inputs, two hidden
layers of three sigmoid neurons, and one output neuron. On the bundled
colour task ("is this pixel red?": R greater than the mean of G and B) it
trains on 6000 examples and then scores 98% on 1000 held-out ones. The
same RTL, with its size parameters raised, runs the 784-100-100-10
network used for handwritten-digit recognition.

## The computation

Notation: layer `l` has `S_l` neurons. Neuron `i` of layer `l+1` holds
the weights `w_i0 .. w_iS` of its inputs. `w_i0` is the bias weight,
whose input is the constant 1. The activation function is
`sigmoid(z) = 1/(1+e^-z)`.

For every training example:

1. **Forward trace.** Each neuron computes `a = sigmoid(w_0 + sum_j w_j x_j)`.
   Here `x` is the previous layer's activation vector, or the input vector
   for the first layer.
2. **Output error.** Each output neuron computes `delta = a - y` from its
   target `y`.
3. **Hidden error.** Going from the top layer down, hidden neuron `j`
   computes `delta_j = (sum_k w_kj delta_k) * a_j * (1 - a_j)`. The sum
   runs over the neurons `k` of the layer above.
4. **Gradient accumulation.** Every neuron adds `x_j * delta` to
   `Delta_j` for each of its weights (`x_0 = 1`).

After every `m` examples (one batch), every neuron updates its weights
with `w_j = w_j - alpha * Delta_j / m` and clears `Delta_j`.

## The neuron

### One ALU, shared

`neuron_alu` performs `r = a*b + c`, or `r = a*b + r_prev` when `use_acc`
is set. It is built from:

- `fp_mul`: two pipeline stages.
- `fp_add`: one registered stage. Its output register is the
  accumulator, so a dot product runs at one multiply-accumulate per
  clock.

Every operation carries a tag: destination memory, address, and a *last*
flag. A result leaves the ALU three clocks after its operation. The
neuron then writes it back to the weight memory or the `Delta` memory,
as the tag says. The issuing unit watches for the *last* flag to see that
its sequence has finished.

Every step above reduces to streams of these multiply-adds:

| step | ALU operations (one per clock unless noted) |
|------|---------------------------------------------|
| forward | `z = w_0*1`, then `z = w_j*x_j + z` for j = 1..N, then the sigmoid table |
| output error | `delta = a*1 + (-y)` |
| hidden error | `s = sum_k w_kj*delta_k` by accumulation, then three dependent operations: `(1-a) = a*(-1)+1`, `t = a*(1-a)`, `delta = s*t` |
| gradient sums | `Delta_j = x_j*delta + Delta_j`, written back to address j |
| update | pass 1: `D_j = Delta_j*(1/m)`; pass 2: `w_j = D_j*(-alpha) + w_j`, with `Delta_j` cleared |

The reference models in the testbenches round after the product and
again after the sum. Hardware and reference therefore agree bit for bit.

### Commands and timing

A neuron takes a command with a one-clock `start` and answers with a
one-clock `done`. The clock counts from `start` to `done`, for `N` inputs
and `K` neurons in the layer above:

| command | clocks |
|---------|--------|
| `CMD_FWD` | N + 6 |
| `CMD_BWD_OUT` | N + 9 |
| `CMD_BWD_HID` | K + N + 20 |
| `CMD_GRAD` | 2N + 9 |

A layer adds one clock to combine its neurons' acknowledgements. A
complete training iteration of a single neuron (forward, output error,
update) takes `4N + 24` clocks. For comparison, the original neuron
design reported much longer iterations:

| inputs | this design | original design |
|-------:|------------:|----------------:|
| 2 | 32 | 152 |
| 4 | 40 | 225 |
| 8 | 56 | 368 |
| 16 | 88 | 661 |
| 32 | 152 | 1192 |
| 64 | 280 | 2325 |
| 128 | 536 | 4647 |

This design is therefore not cycle-accurate to the original. The
difference comes from the schedule: here every stream is fully
pipelined at one operation per clock.

In the 3-3-3-1 network, a training example takes at most 128 clocks with
`m = 1`, counted from one hypothesis to the next and including the
update. With a 4 ns clock, the 6000-example run takes 3.1 ms. The
original report gives about 250 clocks per iteration and 10.6 ms.

In the 784-100-100-10 network, a training example takes 2166 clocks
without an update and 3746 clocks with one; a test example takes 1588
clocks. With batch 2 that is about 3000 clocks, or 12 µs at 4 ns, per
training example. The original estimate for this network is 6.43 s for
100,000 examples, or 64 µs each.

### Memories

`neuron_mem` is a register file of `N+1` words. It has a write port, a
read port that answers in the same clock, and a *row* port that shows
all words at once. Each neuron has two of them, one for weights and one
for `Delta`.

The weight row port serves the hidden-error step. Neuron `j` of layer
`l` needs `w_kj` from every neuron `k` of layer `l+1`. `dnn_layer`
connects neuron `j` to column `j+1` of the upper layer's weight rows, so
all neurons of a layer read their column at the same time.

## Number format

All values are IEEE-754 binary32, rounded to nearest even. This design
departs from the standard in a few places:

- Subnormal inputs count as zero, and subnormal results are flushed to
  zero.
- An input with the all-ones exponent (infinity or NaN) gives infinity,
  and so does an overflow. NaN is never produced.
- An exact zero sum is `+0`.

The sigmoid is a 256-entry table over `[-8, 8)`, with buckets 1/16 wide.
Each entry holds the sigmoid of its bucket centre. Inputs outside the
range saturate to the first or last entry. The worst-case error is below
1/64. The table is computed at elaboration from `$exp`, so the design
needs no data file. `LUT_BITS` and `X_RANGE` change the table.

## Training-vector memory

Training vectors are stored one after another in SDRAM. Each has
`N_IN + N_OUT` words, inputs then targets, starting at word address
`vec_base`. The network reads them as a stream of positions 0, 1, 2, ….
Position `p` is SDRAM vector `p mod num_vectors`, so a run longer than
the data set wraps around. It lives in buffer slot `p mod 256`.

`refill_ctrl` handles the stream:

1. After `go`, it fills all 256 slots.
2. It then treats the buffer as four quarters of 64 slots. When the
   network has released every vector of a quarter, the controller
   fetches the next 64 vectors into it. Meanwhile the network works from
   the other three quarters.
3. The fetch never runs ahead of
   `floor(released / 64) * 64 + 256` positions.

A new `go` may arrive while reads of the previous run are still in
flight. The controller counts issued reads that have not returned, and
drops that many responses after the `go`.

The network may use position `p` once `p < loaded`. Until then the
control unit stalls and counts the clocks it waits (`stall_cycles`).
`swap_count` counts quarter refills.

The SDRAM port is an in-order read channel:

- An address is transferred on `sd_req_valid && sd_req_ready`.
- Data return with `sd_rvalid`, after any latency.

The SDRAM and its controller are outside this design. The testbenches
use a behavioural model, `tb/sdram_model.sv`. It accepts a request at
most every other clock, returns data six clocks later, and can be paused.

`vec_buffer` is the 256 × `VEC_W` word SRAM. It has a word-wide write
port from the refill side and a vector-wide read port for the network.
A vector read returns one clock after the request.

## Control unit and top level

`train_ctrl` runs each example in this order:

1. Wait for the vector, read it, latch inputs and targets, and release
   the slot.
2. Forward trace: layer 0, 1, 2. Each layer's acknowledgement starts the
   next layer.
3. Raise `hyp_valid`.
4. In training mode, backward pass: `CMD_BWD_OUT` on the output layer,
   then `CMD_BWD_HID` on layer 1 and then on layer 0.
5. After `batch` examples, send `CMD_GRAD` to all layers at once and
   wait for all three.

In test mode (`train = 0`), only steps 1–3 run. An example counts as
`correct` when every output lies on the same side of 0.5 as its target.
A final batch that is not complete is not applied.

Driving `dnn_top`:

1. Hold `rst` high for a few clocks.
2. While idle, write initial weights with `wl_we`, `wl_layer` (0..2),
   `wl_neuron` and `wl_addr` (word 0 is the bias weight). Weights can be
   read back at any time with `rb_*`.
3. Set the run inputs, keep them stable for the run, and pulse `go`:
   - `train`, `num_examples`, `batch`,
   - `inv_batch` = 1/batch and `neg_lr` = −learning rate, both fp32,
   - `num_vectors` and `vec_base`.
4. `busy` stays high during the run, and `done` pulses at its end.
   `grad_steps` counts weight updates.

Parameters: `N_IN`, `N_H1`, `N_H2`, `N_OUT` (default 3, 3, 3, 1),
`BUF_VECS` (256) and `SWAP_VECS` (64). The top always has two hidden
layers. `ADDR_W = 10` in `dnn_pkg` limits a neuron to 1023 inputs.

## Sizes

| configuration | neurons | weight words | vector words | on-chip vector buffer |
|---------------|--------:|-------------:|-------------:|----------------------:|
| 3-3-3-1 (default) | 7 | 28 | 4 | 1024 words |
| 784-100-100-10 | 210 | 89,610 | 794 | 203,264 words (6.5 Mbit) |

The largest neuron of the MNIST configuration holds 785 weights and 785
gradient sums, 6.3 kB in all. A neuron stays under 1 kB of private
memory only up to 127 inputs (2 × 128 words × 4 bytes).

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`).
Each ends with a line `TB_RESULT checks=N failures=M`. The shared
reference arithmetic is in `tb/tb_fp_pkg.sv`.

| testbench | what it covers |
|-----------|----------------|
| `tb_fp_mul`, `tb_fp_add` | thousands of random operands and rounding ties, checked bit-exact against double precision rounded to single |
| `tb_neuron_alu`, `tb_sigmoid_lut`, `tb_neuron_mem` | the neuron's building blocks, including latencies |
| `tb_forward_unit`, `tb_backprop_unit`, `tb_gradient_unit` | each sequencer with a real ALU; checks results and clock counts |
| `tb_neuron`, `tb_dnn_layer` | command sequences over several batches; checks every activation, delta and weight |
| `tb_vec_buffer`, `tb_refill_ctrl` | buffer data integrity, the refill window, wrap-around, restart, restart with reads in flight |
| `tb_train_ctrl` | the exact command sequence, stalls, scoring, incomplete batches |
| `tb_dnn_top` | the default build end to end (see below) |
| `tb_neuron_sweep` | single neurons with 2–128 inputs; produces the table above |
| `tb_dnn_mnist` | the 784-100-100-10 configuration on synthetic data; checks every hypothesis and all 89,610 weights after training |

`tb_dnn_top` runs three jobs in sequence:

1. Training on 6000 examples with batch 1 and learning rate 0.1.
2. Testing on 1000 separate examples.
3. Training on 700 examples over 300 vectors with batch 7, so the
   stream wraps.

A reference model checks every hypothesis, the final weights, the number
of gradient steps and quarter refills, and the test score. The
testbench requires each mechanism to occur: stalls (the SDRAM model
pauses at random), quarter swaps, wrap-around, and all four neuron
commands. It also requires at most 250 clocks per example, and a test
accuracy of at least 80%.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dnn_pkg.sv tb/tb_fp_pkg.sv tb/sdram_model.sv tb/tb_dnn_top.sv \
    --top-module tb_dnn_top -o sim && obj_dir/sim
```

Leave out `tb/sdram_model.sv` for testbenches that do not use it. Lint a
module with `verilator --lint-only -Wall -Irtl -y rtl rtl/dnn_pkg.sv
rtl/<module>.sv`.

## Where this design makes its own choices

These points were decided here and are not part of the original design:

- The ALU is a fused multiply-add with an accumulator register. The
  multiplier has two stages and the adder one.
- Special values are handled as described under Number format.
- The sigmoid table has 256 entries over `[-8, 8)`, with each entry at
  its bucket centre.
- Neuron memories are register files with a row port. The layer below
  reads weights through that row port during backpropagation.
- Commands use `start`/`done` pulses. Each neuron unit is a fixed-schedule
  sequencer, and the clock counts differ from the original ones (see the
  table).
- `1/m` and `−alpha` are fp32 inputs, because there is no divider.
- The weights are not regularised. A final batch that is not complete is
  dropped.
- Initial weights are loaded through a load port. The top exposes a
  read-back port.
- The SDRAM interface is a simple in-order read channel. Vectors are
  stored contiguously, inputs then targets.
- Test-mode scoring uses a 0.5 threshold on every output. This design
  does not take an arg-max over the outputs.
- Hidden layers backpropagate one after the other, because each layer
  needs the errors of the layer above.
- The colour task uses three inputs (R, G, B). It can also be posed with
  two inputs, R and the mean of G and B; `N_IN = 2` builds that network.
- The sigmoid is only a table. A variant that computes the sigmoid with
  the floating-point ALU, slower but more exact, is not included.

## Files

`rtl/` holds one module or package per file:

- `dnn_pkg` (types and constants)
- arithmetic: `fp_mul`, `fp_add`, `neuron_alu`, `sigmoid_lut`
- neuron: `neuron_mem`, `forward_unit`, `backprop_unit`, `gradient_unit`,
  `neuron`
- network: `dnn_layer`, `vec_buffer`, `refill_ctrl`, `train_ctrl`,
  `dnn_top`

`tb/` holds the testbenches, `tb_fp_pkg` and `sdram_model`.
