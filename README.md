# Water-quality classifier: a small neural network with on-chip learning

This is synthesizable SystemVerilog for a handheld water tester's decision
logic. Four measurements of a water sample go in: pH, oxidation-reduction
potential (ORP), dissolved oxygen (DO) and total dissolved solids (TDS), each
already scaled to [-1, 1]. One of three verdicts comes out: **potable**,
**agricultural** (fit for irrigation) or **non-usable**. The decision is made
by a multilayer perceptron. The perceptron can also train itself on labelled
samples by back-propagation, so it needs no host processor for learning.

The design aims at low power and small area. It makes three choices for that:

* **Cheap activation function.** Each neuron's logistic sigmoid
  1/(1+e^-x) is not computed with an exponential and a divider. Instead it is
  replaced by three short polynomials, each valid on its own interval, and a
  multiplexer picks the right one.
* **Parallel neurons.** A neuron has four multipliers and an adder tree, not
  a multiply-accumulate loop with a counter. A neuron therefore finishes in a
  single clock and needs no storage of its own.
* **Time-multiplexed learning.** A state machine runs learning one small step
  per clock, and never while a forward pass is running. This limits switching
  activity.

The architecture follows the article *Power and Area Efficient Intelligent
Hardware Design for Water Quality Applications*: the neuron structure, the
activation polynomials, the learning equations and the FSM-driven learning.
Sizes, number format, timing and interfaces are this implementation's own
choices. They are listed under [Where this RTL makes its own choices](#where-this-rtl-makes-its-own-choices).

## Block structure

```
              x_in[4], target[3], train, epoch_last
                          |
                    [sample registers]<--load--+
                          |                    |
  wt_we/addr/wdata --> [weight_store] 28 regs  |      [learn_ctrl FSM]
  wt_raddr/rdata  <--      | w1 (4x4)  | w2 (3x4)   hid_start/out_start/
                           v           v            bp_start/upd_start
      x_q --> [neuron_layer: hidden, 4 neurons] --h--> [neuron_layer: output, 3 neurons] --y_out-->
                                                                      |
                                                              [class_decoder] --> cls
      x_q, h, y_out, target, w1, w2 --> [backprop_unit] --upd_we/addr/data--> weight_store
```

| Module | Role |
|---|---|
| `ann_pkg` | Sizes (4 inputs, 4 hidden, 3 outputs, 28 weights), the Q4.12 type `fix_t`, saturating multiply/add, and the class enum. |
| `sigmoid_nla` | Piecewise-polynomial sigmoid with interval select. Combinational. |
| `neuron` | Four multipliers, a two-level adder tree and the sigmoid. Output is registered. |
| `neuron_layer` | N parallel neurons on one input vector. Used as the hidden layer (4 neurons) and the output layer (3 neurons). |
| `weight_store` | All 28 weights in registers, visible in parallel. Has a learning write port and a host write/read port. |
| `backprop_unit` | Deltas, gradients summed over an epoch, and the momentum update. One step per clock. |
| `learn_ctrl` | Sequencing FSM and sample handshake. |
| `class_decoder` | Arg-max over the three outputs, giving the class. |
| `water_quality_ann` | Top level. |

## Number format

Every activation, weight, error term, learning rate and momentum factor is a
16-bit two's-complement fixed-point number with 12 fraction bits (**Q4.12**).
The range is -8 to +7.99976 and the step is 1/4096. Back-propagation needs
roughly 12 to 16 bits of dynamic range, and 16 bits is the top of that range.

Multiplication keeps the full 32-bit product and shifts it right
arithmetically by 12, which truncates toward minus infinity. The result is
then saturated to 16 bits. Additions saturate too. Gradient sums over an epoch
use 32-bit accumulators with the same 12 fraction bits. The functions
`fix_mul`, `fix_add` and `fix_sub` in `ann_pkg` define this arithmetic, and
every block uses them.

## The activation function

This is the part with the most design in it. The logistic curve is cut into
intervals, and each interval gets its own low-order polynomial:

| Interval | Polynomial | Q4.12 coefficients (/4096) | `sel` |
|---|---|---|---|
| x < -2 | held at the left edge value, 0.2358 | constant 966 | 3 |
| -2 <= x <= -1 | y = 0.0467 x^2 + 0.1239 x + 0.2969 | 191, 507, 1216 | 0 |
| -1 < x < 1 | y = 0.2383 x + 0.5 | 976, 2048 | 1 |
| 1 <= x < 2 | y = -0.0467 x^2 + 0.2896 x + 0.4882 | -191, 1186, 2000 | 2 |
| x >= 2 | held at the right edge value, 0.8809 | constant 3608 | 3 |

The hardware matches a table-plus-multiplexer picture. All three polynomial
values, plus the held edge value, are formed in parallel as the four inputs of
a 4:1 multiplexer. A comparator circuit on x produces the 2-bit select
`S[1:0]` (`sel`). Coefficients are rounded to the nearest 1/4096 when the
design is elaborated: `int'(0.0467 * 4096.0)` and so on. The squared term is
formed as `fix_mul(x, x)` and is then scaled.

Some properties of this curve that a user should know:

* The three polynomials are only given for [-2, 2), because the inputs are
  normalised to [-1, 1]. Outside that range this design holds the edge value
  of the nearest polynomial, so the function has no jump at +-2. The true
  sigmoid is 0.119 at -2 and falls toward 0, so for strongly negative inputs
  this output is much too high (0.236).
* The [-2, -1] polynomial as specified reaches 0.2197 at x = -1. The linear
  piece starts at 0.2617 there, so the output steps by about 0.04 at x = -1.
  The quadratic is also not monotonic on [-2, -1]: its minimum is 0.215 near
  x = -1.33. The coefficients were kept as specified.
* On (-1, 2) the curve stays within 0.06 of the true logistic function, and
  the testbench checks this.
  The [1, 2) quadratic meets the true sigmoid at 1 and at 2.

Back-propagation uses the derivative y(1 - y), evaluated on this approximated
y.

## Neurons and layers

A neuron computes

```
y = sigmoid( (x0*w0 + x1*w1) + (x2*w2 + x3*w3) )
```

with four multipliers, two first-level adders and one second-level adder. It
has no bias term. The datapath is combinational, and the result is registered
on the clock edge where `in_valid` is high. So `out_valid` follows
`in_valid` by one clock, and `y` holds until the next start.

`neuron_layer` copies the neuron N times. All copies share the input vector
and each has its own weight row. The network is 4-4-3:

* The hidden layer has four neurons, each seeing all four inputs.
* The output layer has three neurons, each seeing all four hidden outputs.

Because the hidden layer has four neurons, every neuron in the chip has the
same four-input shape.

## Learning

Training uses batch gradient descent with momentum. For each training sample,
with targets d (one-hot, 1.0 for the true class):

```
output k : delta_k = (y_k - d_k) * y_k * (1 - y_k)
hidden j : delta_j = (sum_k delta_k * w2[k][j]) * h_j * (1 - h_j)
gradient : G[j][i] += delta_j * x_i        G[k][j] += delta_k * h_j
error    : E += 1/2 * (y_k - d_k)^2
```

After the last sample of an epoch, every weight is updated and every gradient
is cleared:

```
dw(t) = -eps * G + alpha * dw(t-1)          w += dw(t)
```

`eps` (the learning rate) and `alpha` (the momentum factor, between 0 and 1)
are Q4.12 inputs of the top level. Weights do not change inside an epoch, so
the hidden deltas use the same weights as the forward pass.

`backprop_unit` does all of this with a few multipliers, sequenced one step per
clock:

| Phase | Clocks | Work per clock |
|---|---|---|
| output deltas | 3 | one delta_k, and one squared-error term |
| hidden deltas | 4 | one delta_j (sums three products) |
| gradient accumulation | 28 | one gradient product added to its accumulator |
| epoch update (last sample only) | 28 | one weight written, dw(t) stored, gradient cleared |

The unit keeps 28 gradient accumulators and 28 stored dw(t-1) values. All are
zero after reset. When an update finishes, `epoch_error` shows the epoch's E
(Q4.12, 32 bits) and the error sum restarts from zero.

## Operating the top level

Sample handshake: `x_in`, `target`, `train` and `epoch_last` are taken when
`in_valid && in_ready`. `in_ready` is high only while the FSM is idle.

| Event | Clock, counted from the accepting edge |
|---|---|
| hidden layer starts | +1 |
| output layer starts | +2 |
| `out_valid`, with `y_out`, `cls`, `cls_onehot` | +3 (one-clock pulse; values hold) |
| `in_ready` again, inference sample | the clock after `out_valid` |
| `in_ready` again, training sample | 38 clocks after `out_valid` |
| `in_ready` again, last training sample of an epoch | 68 clocks after `out_valid`, after an `epoch_done` pulse |

An epoch is the run of training samples up to and including the one marked
`epoch_last`. Inference samples may be interleaved, and they do not touch the
gradients. `epoch_count` counts completed updates.

Weights reset to small distinct values, ((37a + 11) mod 64 - 32)/128 for flat
address a, so the hidden neurons do not start out identical. A host can load
trained weights with `wt_we/wt_addr/wt_wdata` and read them back with
`wt_raddr/wt_rdata` (combinational). Address layout: input i to hidden j is at
`4*j + i`, and hidden j to output k is at `16 + 4*k + j`. A host write to the
same address in the same clock wins over a learning write.

Debug outputs: `hid_act_sel` and `out_act_sel` show which activation interval
each neuron used in the last forward pass, and `momentum_used` pulses during
an update that applied a non-zero momentum term. `learning` is high while
back-propagation or an update runs.

## Where this RTL makes its own choices

The following follow the article: four inputs (pH, ORP, DO, TDS); three
classes; the four-multiplier, three-adder neuron; the three sigmoid
polynomials and their intervals with a LUT/multiplexer selection; the
back-propagation equations with epoch accumulation and momentum; and an FSM
that starts learning once the output is available, with learning
time-multiplexed.

The following are this implementation's choices:

* **Network size.** One hidden layer of four neurons. The article does not
  give a hidden-layer size.
* **Number format.** Q4.12 with truncation and saturation.
* **No bias.** Neurons have no bias inputs, matching the neuron drawing.
* **Outside [-2, 2).** The activation holds its edge value there.
* **Timing.** Registered neuron outputs, the valid/ready handshake and the
  step-per-clock learning schedule.
* **Learning constants.** `eps` and `alpha` are inputs, because no values are
  given.
* **Weights.** The reset weight pattern and the host weight port.
* **Classes.** Arg-max decision, class order 0 = potable, 1 = agricultural,
  2 = non-usable, and the lower index wins a tie.

One ambiguity in the article concerns when learning happens. One passage
accumulates dE/dw over the epoch and updates the weights at its end. Another
starts back-propagation "as the final output of one epoch is generated". This
RTL follows the first: back-propagation runs after every training sample, and
the weight update runs once per epoch.

Not included:

* The sensors and converters that produce the four measurements.
* The scaling of raw readings into [-1, 1]. The class boundaries come from WHO
  drinking-water standards, and the ranges are not part of this design.
* The device's display.
* A second activation variant that the article compares against: a Padé
  approximation of exp() followed by a divider. It uses more power and area.
  Only the polynomial sigmoid is built.

The article's results for the neuron are FPGA and ASIC power and area
figures. They depend on the synthesis flow, and this RTL does not claim to
reproduce them.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Shared reference
arithmetic, written independently of `ann_pkg`, is in `tb/tb_ref_pkg.sv`.

| Testbench | What it checks |
|---|---|
| `tb_sigmoid_nla` | Sweeps [-3, 3) against the polynomials in floating point (6 LSB tolerance). Checks the interval select at every edge, the held values, and the 0.06 bound against the true sigmoid. |
| `tb_neuron` | Random inputs and weights, with all four intervals reached. Checks the value, the interval, the 1-clock latency and that the output holds. |
| `tb_neuron_layer` | Checks each neuron against its own weight row, and the single-pulse `out_valid`. |
| `tb_weight_store` | Checks the reset pattern, both write ports and their priority, out-of-range addresses, and the w1/w2 layout. |
| `tb_backprop_unit` | Runs 6 epochs of random samples. Compares every written weight bit-exactly with a reference of the learning rule, including momentum. Checks the epoch error, and the 35- and 28-clock run lengths. |
| `tb_learn_ctrl` | Uses models of the layers and the learning unit. Sends random mixes of inference, training and end-of-epoch samples. Checks latencies, that learning starts only when it should, and the epoch counter. |
| `tb_class_decoder` | Random and tie cases against an arg-max. |
| `tb_water_quality_ann` | End to end, at full size. Trains for 40 epochs on 12 synthetic samples around three prototypes (clean, irrigation-grade and polluted water), with eps = 0.5 and alpha = 0.5. Every inference result is compared with a reference forward pass built from the read-back weights. It checks that the reported epoch error matches the outputs seen, that the error falls, and that inference leaves the weights alone. It also checks the latencies and the host port. It counts inference, back-propagation, updates, momentum, every activation interval and every class, and fails if any of these never happened. On this set, accuracy goes from 4/12 to 12/12, and E goes from 4.41 to 1.78. |

The synthetic data set is made up for the test. It is not measured water data.

Running a testbench with Verilator 5 (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ann_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_water_quality_ann.sv \
    --top-module tb_water_quality_ann -o sim
./obj_dir/sim
```

For the other testbenches, swap the last file and the top module name.
Listing every `rtl/*.sv` file is harmless, because unused modules are
ignored. Lint a module with `verilator --lint-only -Wall -Irtl rtl/ann_pkg.sv
rtl/<module>.sv --top-module <module>`. The only warnings are unused package
constants, and `SYNCASYNCNET` on `rst_n`. The second one appears because the
control assertions use the asynchronous reset in `disable iff`.

## Changing the design

* **Precision.** `DATA_W`, `FRAC_W` and `ACC_W` in `ann_pkg` set the
  precision. The sigmoid coefficients follow `FRAC_W` automatically. The
  testbench reference (`tb_ref_pkg`) assumes Q4.12 and would need the same
  change.
* **Network size.** `N_IN`, `N_HID` and `N_OUT` set the network size. The
  neuron's adder tree and the flat weight layout assume four inputs per neuron,
  so the network only has a uniform neuron if `N_IN == N_HID == 4`.
* **Learning schedule.** The learning schedule lengths follow from
  `N_OUT`, `N_HID` and `N_W`.
