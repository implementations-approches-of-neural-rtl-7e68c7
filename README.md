# Neural-network lane-following controller with two sigmoid implementations

A car-like robot follows a lane or wall using five infrared distance detectors:
three along its right side, one at the front and one at the rear. A small
multilayer perceptron, trained offline, turns the five normalised readings into
one control value. This RTL implements that perceptron as a fully parallel
fixed-point datapath. It has 5 inputs, a first hidden layer of 10 neurons, a
second of 7 and a single output neuron. Every neuron ends in a logistic sigmoid
`1/(1+e^-x)`.

The sigmoid is the costly part in hardware, and the design exists in two builds
that differ only in how it is evaluated:

* **ROM build (`SIG_LUT`).** Each neuron has its own 16384 × 14-bit look-up table.
  It is fast and needs almost no logic. The cost is memory: 229,376 bits per
  neuron and 4,128,768 bits for the 18 neurons.
* **Polynomial build (`SIG_POLY`).** Each neuron evaluates an order-7 polynomial
  approximation using Estrin's parallel scheme. It uses no memory but many more
  multipliers.

The top level, `lane_following_nnc`, instantiates both builds side by side. They
share the sensor inputs and the weight-load port, so either can be used on its
own and their outputs can be compared.

## Number formats

Every value is an integer `round(v · 2^f)`. All formats are defined in `rtl/nn_pkg.sv`:

| quantity | bits | fraction bits `f` | range | origin |
|---|---|---|---|---|
| sensor reading | 14 unsigned | 13 | [0, 1] (trained on [0.05, 0.95]) | design choice |
| weight, bias | 16 two's complement | 12 | [-8, 8) | design choice |
| weighted sum X (sigmoid address) | 14 two's complement | 10 | held in [-7, 7] | original design |
| ROM sigmoid output | 14 unsigned | 13 | [0, 1] | original design |
| polynomial sigmoid output | 20 unsigned | 19 | [0, 1] | original design (2^19 scaling) |

Activations of the ROM build are 14 bits wide, and those of the polynomial build
are 20 bits wide. Each layer takes its input width and fraction bits as
parameters. The same weight words therefore serve both builds.

## One neuron: multiply, add, divide, truncate, sigmoid

`neuron.sv` computes

```
sum = bias·2^IN_F + Σ w[i]·x[i]          exact, IN_F + 12 fraction bits
X   = clamp(floor(sum / 2^(IN_F+2)), -7168, 7168)   div_trunc.sv
y   = sigmoid(X / 1024)                    sigmoid_lut.sv or sigmoid_poly.sv
```

All `N_IN` products are formed by separate multipliers at the same time.
The "divide" is a right shift that brings the sum to 10 fraction bits. The
"truncate" keeps 14 bits. Sums outside ±7 saturate to ±7168 rather than wrapping,
because the sigmoid is already within 10^-3 of 0 or 1 there. `div_trunc` reports
each saturation, and the layers pass this out as `sat_evt`.

## The ROM sigmoid (`sigmoid_lut`)

The 14-bit address *is* X in two's complement, so X = -8 … +8 maps onto
16384 words. Positive sums use the lower half of the table and negative sums the
upper half. Word `a` holds `round(8192 / (1 + exp(-a_signed/1024)))`:
sigmoid(0) reads 4096 and sigmoid(7) reads 8185. The worst quantisation error is
half an LSB (6·10^-5). The table is computed at elaboration from `$exp`, not
read from a file. The read is synchronous, one clock, as in an FPGA block RAM.

## The polynomial sigmoid (`sigmoid_poly`): the part that needs care

`sigmoid(x) − ½` is odd. A least-squares fit of order 7 over [-7, 7] therefore
has negligible even coefficients. Dropping them leaves

```
P(x) = a1·x^7 + a3·x^5 + a5·x^3 + a7·x + a8
a1 = -2.33019473e-6   a3 = 2.53908825e-4   a5 = -1.00813688e-2
a7 =  2.26515503e-1   a8 = 0.5
```

The fit is over the points −7:0.001:7. In real arithmetic P(7) = 0.9761.
The hardware scales the coefficients by 2^19 and rounds them to integers:
−1, 133, −5286, 118759 and 262144.

Estrin's scheme regroups the polynomial so that independent products run in
parallel:

```
P = (a8 + a7·x) + x²·(a5·x) + x⁴·[(a3·x) + x²·(a1·x)]
```

Each level of this tree is one pipeline stage:

| stage | computed in parallel |
|---|---|
| 1 | x², a7·x, a5·x, a3·x, a1·x |
| 2 | x⁴, a8 + a7·x, x²·(a5·x), a3·x + x²·(a1·x) |
| 3 | the two halves: (a8 + a7x + a5x³) and x⁴·[…] |
| 4 | final sum, shift to 19 fraction bits, clamp to [0, 1] |

Powers of x carry 20 fraction bits, and x² is exact. Coefficient terms carry 29
fraction bits. Every product is truncated back to those formats. Across [-7, 7]
the pipeline stays within 1.4 LSB (2^-19) of the ideal integer-coefficient
polynomial.

**The x⁷ coefficient is the weak point.** At 2^-19 resolution a1 rounds to −1,
which is about 18 % smaller in magnitude than the true −1.22. That term is
multiplied by x⁷ (823,543 at x = 7), so the fixed-point curve rises past 1
towards the edges: P(7) = 1.32. The output is therefore clamped to [0, 1]. With
the clamp, the largest error against the true sigmoid over [-7, 7] is 0.0144, at
x ≈ ±1. This is the intrinsic error of an order-7 fit; the edges are no worse.
The result at x = 7 is exactly 1.0.

The original implementation reports 0.9203 (482518 · 2^-19) at x = 7. The
arithmetic that produced that figure is not known, and this RTL does not
reproduce it. If you need more accuracy, raise `COEF_F`, or scale x to [-1, 1)
before evaluation so that a1 gets usable bits. Both are outside the original
scheme.

## Layers, network and timing

* `nn_layer` holds `N_OUT` neurons that all see the same `N_IN` inputs. It also
  holds the layer's weights and biases in registers. Reset clears them.
* `nnc` chains three layers (5→10, 10→7, 7→1) and selects the sigmoid with
  `SIG`.
* Every neuron has its own sigmoid unit, so the whole network is one pipeline.
  It accepts a sample every clock:

| | per layer | whole network |
|---|---|---|
| ROM build | 2 clocks (sum register + ROM read) | 6 clocks |
| polynomial build | 5 clocks (sum register + 4 stages) | 15 clocks |

Each layer carries a `valid` bit alongside the data. There is no back-pressure:
the datapath never stalls.

### Loading weights

Training happens offline; the trained values are not part of this RTL. Weights
and biases are written one word per clock through `wr` (type `nn_pkg::wt_wr_t`):

| field | meaning |
|---|---|
| `we` | write strobe |
| `layer` | 0 = first hidden, 1 = second hidden, 2 = output |
| `neuron` | neuron within the layer |
| `idx` | input number; `idx == N_IN` selects the bias |
| `data` | 16-bit signed value, 12 fraction bits |

The network needs 10×6 + 7×11 + 1×8 = 145 words. A write takes effect on the
next clock and applies to every sample that reaches the multipliers after it.
Samples already inside the pipeline may mix old and new weights, so drain the
pipeline before reloading if that matters. An assertion in `nn_layer` flags
writes to a neuron or index that does not exist.

## Ports of the top level (`lane_following_nnc`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `wr` | in | 27 (struct) | weight/bias write, shared by both builds |
| `in_valid`, `sens[5]` | in | 1, 5×14 | one sample of detector readings |
| `lut_valid`, `lut_y` | out | 1, 14 | ROM build output, 6 clocks after the sample |
| `poly_valid`, `poly_y` | out | 1, 20 | polynomial build output, 15 clocks after the sample |
| `lut_sat`, `poly_sat` | out | 3 | per-layer pulse: a weighted sum was held at ±7 |

The infrared detectors and their conversion to digital readings are outside
this RTL. Their five readings enter through `sens`.

## Where this RTL departs from, or adds to, the original design

* **From the original design:**
  * the 5-10-7-1 topology;
  * a sigmoid defined on [-7, 7];
  * the 16384 × 14 ROM with the X·2^10 address and the Y·2^13 contents;
  * the order-7 odd polynomial with 2^19 coefficients, evaluated in Estrin's order;
  * one sigmoid unit per neuron (the reported 4,128,768 ROM bits are exactly 18 tables);
  * the multiplier / adder / divider / truncate / sigmoid structure of a neuron.
* **Chosen here:**
  * the sensor and weight formats;
  * bias terms;
  * saturation in the truncate step;
  * the register weight store and its write port;
  * synchronous reset;
  * every pipeline register and hence all latencies;
  * the synchronous ROM read;
  * the clamp on the polynomial output;
  * the intermediate widths of the polynomial;
  * the polynomial coefficients, which are refitted (see above).
* **Known difference:** the polynomial sigmoid gives 1.0 at x = 7 where the
  original reports 0.9203.

## Files

`rtl/` contains one unit per file:

| file | contents |
|---|---|
| `nn_pkg.sv` | formats, sizes, `sigmoid_kind_e`, `wt_wr_t` |
| `div_trunc.sv` | scale and saturate |
| `sigmoid_lut.sv`, `sigmoid_poly.sv` | the two sigmoids |
| `neuron.sv` | one neuron |
| `nn_layer.sv` | one layer |
| `nnc.sv` | the network |
| `lane_following_nnc.sv` | top level |

`tb/` contains one self-checking testbench per unit (`tb_<unit>.sv`). It also
holds `nn_ref_pkg.sv`, the reference models: a bit-exact integer model of the
ROM network and a real-valued model of the polynomial network. Each testbench
prints `TB_RESULT checks=N failures=M` and stops.

## Simulating

Compile the package first. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/nn_pkg.sv tb/nn_ref_pkg.sv \
  rtl/div_trunc.sv rtl/sigmoid_lut.sv rtl/sigmoid_poly.sv rtl/neuron.sv \
  rtl/nn_layer.sv rtl/nnc.sv rtl/lane_following_nnc.sv \
  tb/tb_lane_following_nnc.sv --top-module tb_lane_following_nnc
./obj_dir/Vtb_lane_following_nnc
```

Swap in another testbench and `--top-module` to test a single unit. Every
testbench runs in well under a second.

## How far it has been checked

* **`tb_sigmoid_lut`:** every address in [-7168, 7168] against `exp`, the
  half-LSB bound, and the one-clock read.
* **`tb_sigmoid_poly`:** every address in [-7168, 7168] streamed one per clock.
  Results stay within 4 LSB of the real-valued integer-coefficient polynomial
  (1.4 LSB observed) and within 0.015 of the true sigmoid. It also checks the
  exact values at 0 and 7 and the 4-clock latency.
* **`tb_div_trunc`:** 20,000 random sums of every magnitude plus the boundary
  cases.
* **`tb_neuron`:** a new random vector every clock into both neuron kinds, with
  saturated and in-range sums.
* **`tb_nn_layer`:** reset state, loading the weights, ignoring writes meant for
  other layers, streaming with gaps, exact latencies.
* **`tb_nnc`:** both builds with all 145 weights loaded. The ROM build must match
  the integer model bit for bit, the polynomial build must be within 0.002 of the
  real model, latencies must be exactly 6 and 15, and the per-layer saturation
  counts must match.
* **`tb_lane_following_nnc`:** the full-size top at its default parameters. It
  covers:
  * the reset state;
  * a moderate weight set, then a reload with a large weight set, drained in
    between;
  * back-to-back samples and gaps;
  * saturation in all three layers;
  * the polynomial clamp;
  * agreement of the two builds with each other (observed difference up to 0.03).

Nothing here has been run on an FPGA or timed. The combinational multiply-add in
front of each sum register and the 64-bit products of the polynomial stages are
the places to pipeline further for a high clock rate.
