# A stochastic-computing multilayer perceptron that learns on chip

This is a three-layer perceptron (inputs, one hidden layer, outputs) whose
arithmetic is done on random bit streams instead of binary words, and which
trains itself by stochastic gradient descent in the same hardware. In
stochastic computing (SC) a number p in [0, 1] is a stream of bits in which a
fraction p are ones. A multiplier is then one AND gate and an adder is one
OR gate, so a neuron with hundreds of inputs costs a few hundred gates. The
usual obstacles are subtraction, normalisation of sums and a non-linear
activation: all three normally force a decode back to binary between layers.
This design avoids every intermediate decode:

* **imperfect addition** — the weighted sum is a wide OR. An OR of streams
  p1, p2 gives p1 + p2 - p1·p2, which is close to the sum while the terms are
  small and, unlike a multiplexer adder, is not scaled down by 1/n;
* **pseudo-subtraction** — a signed weight is a pair (w+, w-) of magnitudes.
  Instead of h+ - h- the neuron forms h+·(1 - h-) = `h+ & ~h-`, modelled on an
  excitatory synapse gated by a shunting one;
* **pseudo-activation** — an OR of a stream with a delayed copy of itself
  gives 2X - X², and squaring that gives the sigmoid-like
  g(X) = (2X - X²)², whose threshold lies near X = 0.5.

Only the network outputs are decoded, by counting ones over one stream of
L = 255 bits. Learning uses the same stream tricks: the output error, the
weight gradients and the error sent back to the hidden layer are all AND/OR
combinations of streams that exist anyway, integrated per weight by an up/down
counter during the pass.

Default size: 197 inputs, 64 hidden neurons, 10 outputs (a size meant for
small-image classification), 8-bit weights, 8-bit LFSR random sources, 9-bit
up/down counters, L = 255, learning rate 0.3.

## Files

| File | Contents |
|---|---|
| `rtl/sc_pkg.sv` | widths, default sizes, LFSR step and seed rule, reset weight rule |
| `rtl/lfsr8.sv` | 8-bit maximal LFSR (x^8+x^6+x^5+x^4+1), period 255 |
| `rtl/sng.sv` | encoder: comparator, bit = (R < E) |
| `rtl/sc_activation.sv` | OR-gate pseudo-activation g(X) |
| `rtl/ud_counter.sv` | 9-bit saturating up/down counter (decoder) |
| `rtl/sc_weight.sv` | one 8-bit weight: register, encoder, update counter |
| `rtl/sc_neuron.sv` | AND products, OR sums, pseudo-subtraction, activation |
| `rtl/sc_error.sv` | target encoder and error pair (t - y) |
| `rtl/sc_layer.sv` | a fully connected layer with its learning logic |
| `rtl/sc_mlp_ctrl.sv` | pass sequencer |
| `rtl/sc_mlp.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/sc_ref_pkg.sv` | cycle-accurate reference model of layer and network |
| `tb/tb_sc_mlp_regression.sv` | learning run on a 9-32-8 regression task |

## Number representation and encoders

Every multi-bit quantity (input, target, weight) is an 8-bit value E read as
the probability E/256. An encoder compares E each cycle with an 8-bit random
number R from an LFSR and emits `R < E`. The LFSR runs through its 255
non-zero states in one period, so a full pass of L = 255 cycles sees every R
exactly once and the stream holds max(E-1, 0) ones: encoding is exact over a
pass, not merely on average.

Signed weights use the differential form X = X+ - X-: every connection has an
excitatory magnitude w+ and a shunting magnitude w-, both 8-bit registers.

Random sources. Streams that meet in one gate must be uncorrelated, or the
AND/OR identities above fail. The network uses one LFSR per input, one per
weight column and sign in each layer (all weights in a column multiply the
same input stream, so they can share one), one per target and one for the
learning-rate stream: 3·N_X + 2·N_V + N_Y + 1 generators, 730 at the default
size. LFSR number i starts at state ((97·i) mod 255) + 1, i.e. at a different
phase of the same sequence; beyond 255 generators phases repeat. Consecutive
LFSR states are shifts of each other, so a stream is not perfectly white in
time; the activation's delayed copies are therefore only approximately
independent inside the network. With independent input bits the activation
matches g(X) within 0.01.

## The neuron

For neuron j with inputs x_k:

```
h+_j = OR_k (x_k & w+_jk)        h-_j = OR_k (x_k & w-_jk)
u_j  = h+_j & ~h-_j               -- p(u) = p(h+)·(1 - p(h-))
v_j  = (u_t | u_{t-1}) & (u_{t-2} | u_{t-3})
```

The last line is the pseudo-activation. `u_t | u_{t-1}` has probability
2u - u² because the two bits are taken at different times; ANDing it with
the same signal two cycles older (which shares no bit with it) squares it,
giving g(u) = (2u - u²)². Three flip-flops per neuron hold the history; they
are cleared at the start of every pass. Everything else in the neuron is
combinational, so both layers, the error and the gradients are evaluated in
the same clock cycle: there is no per-layer latency beyond those
history flip-flops.

Because the OR sum saturates towards 1 as more terms are active, weights must
be small when many inputs are active: with 197 inputs at probability 0.5, a
uniform weight of 8/256 already gives p(h+) ≈ 0.95. This is the intended
operating regime (the activation only needs to know whether the sum is above
about 0.5), but it means a host should initialise weights in the low range.

## Online learning

Each pass of L cycles processes one sample: forward, backward and weight
update happen together, one bit per cycle, and the weights change once at
the end of the pass.

**Output error.** The target t_i is encoded into a stream T_i. With T and Y
independent,

```
e+_i = T_i & ~Y_i     e-_i = Y_i & ~T_i      p(e+) - p(e-) = t - y
```

so the error appears in differential form without any decoding.

**Gradients.** With squared error, u = h+·(1 - h-), and the OR sum treated as
a plain sum, gradient descent gives for each connection

```
dW+_jk =  eta · delta_j · x_k · (1 - h-_j)
dW-_jk = -eta · delta_j · x_k · h+_j
```

where delta_j is the neuron's error (for the output layer, e_i). The slope
of g is not multiplied in: it is positive, so dropping it keeps every step
downhill and only rescales the learning rate per neuron. With
delta = (d+, d-) as a stream pair, each term is an AND of existing streams:

| counter of | counts up on | counts down on |
|---|---|---|
| w+_jk | eta & d+_j & x_k & ~h-_j | eta & d-_j & x_k & ~h-_j |
| w-_jk | eta & d-_j & x_k & h+_j | eta & d+_j & x_k & h+_j |

`eta` is a stream of probability 77/256 ≈ 0.3.

**Back-propagation.** The hidden neurons' error is the output error carried
back through the same weight streams, summed by imperfect addition and kept
as a pair:

```
bp+_j = OR_i [ (e+_i & W+_ij & ~h-_i) | (e-_i & W-_ij & h+_i) ]
bp-_j = OR_i [ (e-_i & W+_ij & ~h-_i) | (e+_i & W-_ij & h+_i) ]
```

and (bp+_j, bp-_j) is the delta of hidden neuron j in the table above.

**Update.** Each weight's 9-bit up/down counter integrates its up and down
streams over the pass; the count lies in -255..255. In the last cycle of a
training pass every weight becomes clip(w + count, 0, 255). A count of c
moves the weight by c/256, while the counted quantity was a probability
times 255, so one pass moves the weight by about eta × gradient.

These learning equations are this implementation's derivation; the method
only states that the error function is differentiated through the SC
operators and minimised by stochastic gradient descent.

## Sequencing and interface (`sc_mlp`)

```
start (in IDLE) --> clr for one cycle, RUN for L cycles (en = 1),
                    FINISH for one cycle (done = 1, apply = train)
```

* Set `x_val[N_X]` and `t_val[N_Y]` (8 bits each) and hold them during the
  pass; pulse `start` with `train` = 1 to learn, 0 to infer.
* `done` pulses L + 1 cycles after the start cycle; `y_val[i]` is then the
  number of ones in output stream i (0..255) and holds until the next start.
  A new pass may start in the cycle after `done`, so one sample takes L + 2 =
  257 cycles whether training or not.
* Weights: `wr_en`, `wr_layer` (0: input→hidden, row = hidden neuron,
  col = input; 1: hidden→output, row = output, col = hidden neuron),
  `wr_neg` (0: w+, 1: w-), `wr_row`, `wr_col`, `wr_data`. `rd_*` selects a
  weight for the combinational `rd_data` (0 when out of range). Write while
  idle.
* Reset is asynchronous, active low. It loads every LFSR with its seed and
  every weight with a small scattered value, (29·row + 13·col + 7·sign +
  3·layer + 5) mod 32; hosts normally write their own initial weights.

Parameters: `N_X`, `N_V`, `N_Y` (sizes, ≤ 256 each with `ADDR_W` = 8), `L`
(stream length, keep 255 = the LFSR period for exact encoding), `ETA`
(learning rate × 256).

## Cost

At 197-64-10 the design holds 2·(197·64 + 64·10) = 26,496 weights, each an
8-bit register, a 9-bit counter and an 8-bit comparator, i.e. about 450,000
flip-flops, plus 730 LFSRs. The learning logic (four AND terms per weight,
plus the counter) dominates; an inference-only variant would drop the
counters and gradient gates.

## How far it has been checked

* Every module has a self-checking testbench. The layer and the top level are
  compared cycle by cycle and weight by weight with an independent reference
  model (`tb/sc_ref_pkg.sv`), over training and inference passes, host
  writes, clipped updates and both error signs.
* `tb_sc_mlp` runs a 5-6-3 network for 24 passes; `tb_sc_mlp_regression`
  trains a 9-32-8 network online with y = x on four outputs and y = x/2 on
  the other four (x broadcast to all nine inputs); its mean absolute test
  error falls from about 0.31 to about 0.1 of full scale in 400 samples.
* The same bench with `NONLINEAR = 1` and `NV = 128` trains a 9-128-8
  network on cos and sin of x·π/2 (four outputs each); the mean absolute
  test error fell from about 0.64 to about 0.17 in 400 samples. Its C++
  model takes a few minutes to compile, so it is not the default.
* The largest size simulated is 9-128-8. The default 197-64-10 network lints
  and elaborates, but its verilator C++ model (every one of the 26,496 weights
  flattened) compiles so slowly (well over an hour single-threaded) that it
  has not been simulated.
* Not reproduced: any classification accuracy or power figure; the top level
  has not been synthesised to gates.
* `train` = 0 gives inference-only operation, but the learning gates and
  counters are still present; there is no separate inference-only build.

## Choices made here

The SC operators, the network equations, the widths (8-bit weights and
LFSRs, 9-bit counters), L = 255, eta = 0.3 and the 197-64-10 size follow the
method. The following are this implementation's own:

* the exact pseudo-activation wiring (delays of 1 and 2 cycles) and clearing
  its history every pass;
* the error circuit, the gradient and back-propagation equations (slope of g
  dropped), and the per-weight counter-and-add update with clipping;
* the LFSR polynomial, the seeds and the sharing of generators per column;
* the three-phase sequencer, one sample per pass, the host weight port and
  the reset weights;
* no bias input (drive one input with a constant if a bias is wanted).

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb rtl/sc_pkg.sv tb/sc_ref_pkg.sv \
    tb/tb_sc_mlp.sv --top-module tb_sc_mlp
./obj_dir/Vtb_sc_mlp
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; the
same command works for any `tb/tb_<name>.sv` (add `tb/sc_ref_pkg.sv` for the
layer and top-level tests).
