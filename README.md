# LSTM jet tagger: a fixed-point LSTM inference engine

This is the RTL of an inference engine that classifies particle jets from a
collider. A jet is given as a sequence of 20 particles with 6 normalised
features each. The engine reads the particles one by one with an LSTM
(long short-term memory) layer of 16 units. A dense layer then maps the 20
hidden states to 5 scores, and a softmax turns the scores into probabilities
for the jet classes quark, gluon, W, Z and top. All arithmetic is 16-bit
fixed point with 6 integer bits. Within each timestep the work is fully
parallel: every weight has its own multiplier. Across timesteps, a single
LSTM cell is reused.

The network shape, the number format, the gate equations and the "one cell,
looped over the particles, with its state kept in static registers"
structure follow a published high-level-synthesis implementation of this
top-tagging network. The cycle-level schedule, the interfaces, the
activation circuits and the parameter loading are choices of this design.
They are pointed out below where they matter.

## The network

```
 jet [20 x 6] ──► LSTM, 16 units ──► [20 x 16] ──► flatten [1 x 320]
                 (recurrent act. = sigmoid,          │
                  activation     = ReLU)             ▼
                                     Dense [320 x 5] + bias ──► softmax ──► [1 x 5]
```

For each particle `x_t` (a 1×6 row), the LSTM works from the previous hidden
state `h_{t-1}` and cell state `C_{t-1}` (1×16 each):

```
i  = sigmoid(x_t W_i + b_i + h_{t-1} U_i)        input gate
f  = sigmoid(x_t W_f + b_f + h_{t-1} U_f)        forget gate
o  = sigmoid(x_t W_o + b_o + h_{t-1} U_o)        output gate
C~ = relu   (x_t W_c + b_c + h_{t-1} U_c)        candidate values
C_t = i * C~ + f * C_{t-1}                       (* = element-wise)
h_t = o * relu(C_t)
```

The state starts at `h_0 = C_0 = 0` for every jet. The layer returns all 20
hidden states. Row t of the [20 x 16] output is `h_t`, and it is flattened
row by row, so element `k = 16 t + u` is `h_t[u]`.

The ReLU in place of the textbook tanh follows the trained model, whose
layer activation is ReLU.

## How a jet moves through the hardware

```
 cycle 0        jet accepted (in_valid & in_ready); whole jet copied to the
                input buffer; cell state cleared
 1, 2           step t=0: register 64 pre-activations | update h, C; store h_0
 3, 4           step t=1
 ...
 39, 40         step t=19
 41             dense layer: 1600 products summed, logits registered
 42             softmax: max-subtract, 5 exponentials, sum registered
 43 .. 53       softmax: 11-bit restoring division, 5 in parallel
 54             probabilities complete
 55             out_valid, out_logits/out_prob valid; in_ready high again
```

The latency is `2*STEPS + 15` cycles: 55 cycles for 20 particles, or 275 ns
at the model's 5 ns clock target. The reference HLS implementation of the
same "static" architecture reports 1.35 µs (270 cycles). The layers run
strictly one after another and a new jet is accepted only when the previous
result appears. As in the reference, the initiation interval therefore equals
the latency. A jet offered earlier simply waits with `in_valid` high.

## The recurrent cell (`lstm_cell`, `lstm_layer`)

This part needs the most care when changing the design.

* **One cell, static state.** `lstm_cell` holds `h` and `C` in registers.
  `lstm_layer` runs it once per particle and writes each `h_t` into its
  output buffer. The cell never sees a sequence. It only sees "one step from
  the stored state", so the same logic serves any `STEPS`.
* **Two cycles per step.** In the `start` cycle, the kernel product
  `x_t W + b` and the recurrent product `h_{t-1} U` are formed, each by a
  `dense_mvm` instance (384 and 1024 multipliers). Their sum is cast to 16
  bits and registered, 64 values in all. In the following `done` cycle, 48
  sigmoid units, the ReLUs and 48 element-wise multipliers produce
  `C_t` and `h_t`, which are written back on that edge. The next step may
  start only after that, so the layer alternates `S_ISSUE`/`S_WAIT`.
* **Zero recurrent bias.** The recurrent product goes through the same
  vector-matrix unit as the kernel product. It is given an all-zero bias,
  which the reference framework also uses for this purpose.
* **Gate order.** The 64 columns of the kernel and recurrent matrices are
  four 16-column blocks in the order **input, forget, output, candidate**
  (`gate_e` in `lstm_pkg`). Keras stores its LSTM gates as input, forget,
  candidate, output. When loading a Keras model, swap the last two blocks of
  both matrices and of the bias.
* **Clearing.** `lstm_layer` clears the cell in the cycle it accepts a jet.
  A jet therefore never depends on the previous one.

## Numbers and arithmetic (`lstm_pkg`)

* `fx_t` is a signed 16-bit value with 10 fractional bits (range −32 …
  +31.999, step 1/1024). Inputs, weights, biases, the LSTM state, logits and
  probabilities all use it.
* Every sum of products is formed exactly in a 48-bit accumulator with 20
  fractional bits. It is cast back to `fx_t` once, by `fx_cast`: floor (drop
  10 bits), then keep the low 16 bits, so an overflow wraps around. These
  are the default rounding and overflow modes of the HLS type of the source
  model. An HLS build may round inside the sum instead, so individual results
  can differ from it in the last bit.
* **Sigmoid** (`sigmoid_act`) is a piecewise-linear curve whose slopes are
  powers of two, so it needs only shifts and adds. The slopes are 1/4, 1/8
  and 1/32, with breakpoints at 1, 2.375 and 5, and the curve is mirrored for
  x < 0. Its error against the true logistic function is at most 0.019, and
  at |x| = 2.375 it steps down by 3 LSB. HLS libraries usually use a lookup
  table instead.
* **Softmax** (`softmax`, `exp_neg`) subtracts the largest logit, so every
  exponent is ≤ 0 and the largest term is exactly 1.0. It computes
  `e^d = 2^-(k+f)` with `k+f = −d·log2 e`. The factor `2^-f` comes from
  linear interpolation between the nine values `2^(-j/8)`, followed by a
  right shift by k. The sum of the five exponentials is then divided into
  each of them by bit-serial restoring division. Probabilities are truncated
  `fx_t` values (1.0 = 1024), so they sum to at most 1.0, and the error per
  probability is below 0.002.

## Loading a model (`weight_store`)

The source model compiles its weights into the firmware as constants. Here
they sit in registers and are written one 16-bit word per cycle through
`wr_en`/`wr_addr`/`wr_data`, with a read-back port `rd_addr`/`rd_data`.
Load only while `busy` is low; an assertion checks this. Since the engine is
fully parallel, all 3077 words drive the datapath at once. The address map:

| words       | contents             | address of element           |
|-------------|----------------------|------------------------------|
| 0 – 383     | kernel W [6 x 64]    | `f*64 + c`                   |
| 384 – 1407  | recurrent U [16 x 64]| `384 + u*64 + c`             |
| 1408 – 1471 | kernel bias b [64]   | `1408 + c`                   |
| 1472 – 3071 | dense D [320 x 5]    | `1472 + k*5 + n`             |
| 3072 – 3076 | dense bias [5]       | `3072 + n`                   |

The column `c = 16*gate + unit` follows the gate order above. A weight `v`
is loaded as `round(v*1024)` in two's complement. The dense bias is an
addition of this design (a Keras Dense layer has one by default); load
zeros to leave it out. Contents are not reset.

## Top-level interface (`lstm_top_tagger`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `wr_en`, `wr_addr`, `wr_data` | in | 1, 12, 16 | parameter write |
| `rd_addr` / `rd_data` | in / out | 12 / 16 | parameter read-back (combinational) |
| `in_valid` / `in_ready` | in / out | 1 | jet handshake; the jet is taken when both are high |
| `in_x[20][6]` | in | 16 each | all particles of a jet in parallel, sampled only in the accepting cycle |
| `out_valid` | out | 1 | one-cycle pulse, 55 cycles after acceptance |
| `out_logits[5]`, `out_prob[5]` | out | 16 each | dense outputs and probabilities (q, g, W, Z, t); held until the next result |
| `busy` | out | 1 | a jet is in flight |

The parameter `STEPS` (default 20) changes the sequence length of the
layer, dense layer and weight store together. The feature, unit and class
counts are package constants.

## Modules

| file | role |
|---|---|
| `rtl/lstm_pkg.sv` | number format, sizes, gate order, address map, cast/ReLU helpers |
| `rtl/dense_mvm.sv` | fully parallel `x*W + b` with an exact wide result |
| `rtl/sigmoid_act.sv` | piecewise-linear sigmoid |
| `rtl/lstm_cell.sv` | one LSTM timestep with registered `h`, `C` |
| `rtl/lstm_layer.sv` | input buffer, particle loop, [20 x 16] output buffer |
| `rtl/dense_layer.sv` | flatten and 320×5 dense layer |
| `rtl/exp_neg.sv` | `e^d` for `d ≤ 0` |
| `rtl/softmax.sv` | softmax with parallel dividers |
| `rtl/weight_store.sv` | parameter registers with load and read-back ports |
| `rtl/lstm_top_tagger.sv` | top: the blocks in sequence, handshake, output registers |

## Cost

A build at the default size has 384 + 1024 multipliers for the gate
products, 48 for the element-wise products, and 1600 for the dense layer,
which adds up to 3056 16×16 multipliers. It holds about 58 k flip-flop bits,
of which 49 k are parameters. The reference HLS build of the same
architecture reports 43 % of the DSPs of a large UltraScale part and
negligible block RAM. This RTL has not been run through FPGA implementation,
so its own resource use and clock rate are unknown. The dense layer's
320-term sum and the cell's update cycle are the longest paths, and they are
the first places to pipeline.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches share
`tb/tb_ref_pkg.sv`, an integer reference model of the whole network, and
they generate their random models and jets themselves.

* `tb_sigmoid_act`: all 65536 input codes; exact against the curve,
  within 0.02 of the logistic function.
* `tb_dense_mvm`, `tb_dense_layer`: random and extreme operands, exact.
* `tb_lstm_cell`: 240 steps over 12 random models, including models large
  enough to wrap. Checks `h`, `C` bit for bit, the 2-cycle timing and clear.
* `tb_lstm_layer`: full 20-particle sequences, exact [20 x 16] output,
  41-cycle latency, state restart.
* `tb_softmax`: 400 logit vectors including ties and ±32. Each probability
  must be within 4/1024 of the true softmax, and the latency is 12 cycles.
* `tb_weight_store`: every address written and read back.
* `tb_workload_10p`: a 10-particle model on the default engine, padded as
  described at the end of this file; exact against a 10-step reference.
* `tb_lstm_top_tagger`: default size, two models loaded through the port,
  14 jets, some offered back to back. Logits are checked exactly and
  probabilities within 4/1024. It also checks the 55-cycle latency, that
  waiting jets are held off, that one step is issued per particle, and that
  a repeated jet gives the same answer.

The reference model shares the design's arithmetic conventions: it uses the
same cast, the same sigmoid curve and the same gate order. The tests show
that the RTL does what this README describes. They do not show agreement
with a trained Keras model, because no trained weights are included.

To simulate, for example the top-level test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/lstm_pkg.sv tb/tb_ref_pkg.sv \
  rtl/dense_mvm.sv rtl/sigmoid_act.sv rtl/lstm_cell.sv rtl/lstm_layer.sv \
  rtl/dense_layer.sv rtl/exp_neg.sv rtl/softmax.sv rtl/weight_store.sv \
  rtl/lstm_top_tagger.sv tb/tb_lstm_top_tagger.sv \
  --top-module tb_lstm_top_tagger -o sim
obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. The
other testbenches build the same way with their own module and the RTL
files they need.

## Departures from the reference implementation, and limits

* Latency is 55 cycles, not 270: the schedule is this design's own (2
  cycles per particle), not the HLS tool's.
* The sigmoid and exponential are approximations chosen for this RTL. Their
  errors are given above.
* Sums are exact before the single cast. An HLS build may round inside the
  sum, so results can differ from it in the last bit.
* Parameters are loaded at run time rather than built in.
* The gate block order (i, f, o, c) differs from Keras' (i, f, c, o).
* No streaming (`io_serial`) interface and no pipelined variant of the
  layer. The fully pipelined alternative, which accepts a jet every cycle at
  several times the resources, is not built.
* A 10-particle model, suggested as a faster variant, runs unchanged. Put
  its particles in slots 0–9 and load zero dense weights for rows 160–319;
  building with `STEPS = 10` instead brings the latency to 35 cycles.
