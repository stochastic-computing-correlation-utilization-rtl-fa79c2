# Correlation-exploiting stochastic-computing CNN basic functions

Stochastic computing (SC) represents a number by the fraction of ones in a
bit-stream. Multiplication, scaled addition and comparison then cost a single
gate per bit, in exchange for one clock per bit of stream length. Classic SC
treats correlation between streams as an error source and spends a random
number generator (RNG) on almost every stream. The RNGs then dominate the area.

This RTL turns that around for the four basic operations of a convolutional
neural network:

| CNN function    | SC circuit                                   | needs            |
|-----------------|----------------------------------------------|------------------|
| inner product   | XOR per input (sign), then a MUX tree         | correlated inputs are fine |
| max pooling     | OR tree                                       | correlated inputs (exact max) |
| average pooling | MUX tree with toggle-flip-flop selectors      | no selector RNG  |
| ReLU            | OR with a correlated stream of value 0        | correlated input |

Every operand stream in the design comes from **one** LFSR. This makes the
operand streams maximally correlated, and the OR-based max and ReLU are exact
only because of that. The only streams that must be independent are the
inner-product MUX selectors. They reuse the same LFSR with its bits rotated.

The method follows H. Abdellatef et al., "Stochastic Computing Correlation
Utilization in Convolutional Neural Network Basic Functions" (2018). The
surrounding control, the encodings and several generator details are this
implementation's own choices; they are listed under
[Departures and own choices](#departures-and-own-choices).

## Number format

* **Bipolar streams.** A stream of length `L` with `N1` ones has the value
  `x = (2*N1 - L) / L`, a value in [-1, 1]. Its probability of a one is
  `p = (1 + x) / 2`. Inversion negates the value, and XNOR multiplies.
* **Binary operands** are `WIDTH`-bit two's-complement fractions,
  `x = v / 2^(WIDTH-1)`. To get the comparator threshold `p * 2^WIDTH`, invert
  the sign bit of `v`. For example, `v = 0` gives threshold `2^(WIDTH-1)`, so
  `p = 0.5` and `x = 0`.
* **Stream generation** (`sc_sng`): `bit = (rnd < threshold)`. Unipolar mode
  (`BIPOLAR = 0`) takes the threshold directly and is used for selector
  probabilities.
* **Back to binary** (`sc_counter`): count the ones. The result is the raw `N1`;
  the caller computes `x = 2*N1/L - 1`.

## Why correlation helps

Two streams made from the same random value `r` are `a = (r < pa)` and
`b = (r < pb)`. Whenever the smaller one is 1, the larger one is also 1. Hence:

* `a | b = (r < max(pa, pb))`: an OR gate is an exact **max**. Four inputs take
  three ORs (`sc_maxpool`).
* **ReLU** is `max(x, 0)`. `sc_relu` generates a stream of value 0 from the
  same `rnd` (for a 32-bit value that is just `~rnd[31]`) and ORs it with the
  input. The input stream must have been generated from that same `rnd`.
* For the **T-FF adder** (below), the input that is 1 in a cycle where the
  inputs differ is always the same one.

The MUX-tree inner product and the T-FF average pooling accept inputs of any
correlation. Only the selectors must be uncorrelated with the data and with one
another.

## MUX-tree inner product (`sc_mux_tree_ip`)

This computes `z = sum(h_i * x_i) / sum|h_i|` for `N_IN = 16` inputs without a
multiplier or an adder:

1. Each input bit is XORed with the sign of its weight. This inverts the
   stream, which negates its bipolar value.
2. A tree of `N_IN - 1` two-to-one MUXs picks one of the signed
   inputs per clock. Input `i` reaches the output with probability
   `|h_i| / sum|h|`, so the output stream's value is the normalised inner
   product.

The weight magnitudes live only in the selector probabilities. MUX `m` gets a
selector stream of probability

```
sl_m = (sum of |h| of the inputs under MUX m's input 1)
     / (sum of |h| of all inputs under MUX m)
```

For example, a 2-input tree has one MUX with input 0 = `x1`, input 1 = `x2`
and `sl = |h2| / (|h1| + |h2|)`.

**Numbering.** MUX `m` (0-based) drives node `N_IN + m` from nodes `2m`
(select 0) and `2m+1` (select 1). Nodes `0 .. N_IN-1` are the XOR outputs, and
node `2*N_IN - 2` is the result. For 16 inputs:

* MUX 0..7 pair the inputs (0,1), (2,3), …;
* MUX 8..11 pair those results;
* MUX 12..13 are the next level;
* MUX 14 is the root.

The same rule builds a valid tree for any `N_IN >= 2`, of height
`ceil(log2 N_IN)`. A convolution needs `Ch x K x K` inputs, for example 9 for a
3×3 kernel on one channel or 27 on three. For 5 inputs it gives MUX 0 = (x0,
x1), MUX 1 = (x2, x3), MUX 2 = (x4, MUX 0) and root MUX 3 = (MUX 1, MUX 2).

`ip_sel_p[m]` of the top is that MUX's probability as an unsigned fraction of
`2^WIDTH`. The weights are trained off line, so these probabilities are
computed off line too; there is no divider on chip. If both sides of a MUX have
zero weight, any value will do. To use fewer than 16 inputs, give the unused
ones zero weight.

**Selector randomness.** Height along any input-to-output path strictly grows,
so MUXs of equal height never sit on the same path and may share a random
value. MUXs of different heights, and the data, must not. In the top, a MUX of
height `l` (1 = fed by inputs only) compares against the LFSR value rotated
left by `l * floor(WIDTH / (levels + 1))` bits: 6, 12, 18 and 24 for 16 inputs
and 32 bits. In a bit-accurate model this gave the same error as
truly independent random selectors.

## T-FF scaled addition and average pooling (`sc_tff_add`, `sc_avgpool`)

A two-to-one MUX computes `(x + y) / 2` when its selector has probability 0.5
and is uncorrelated with `x` and `y`. Instead of spending an RNG on that
selector, the select comes from a T flip-flop (a JK flip-flop with J = K = T):

```
T = x XOR y          (toggle only when the inputs differ)
z = Q ? y : x        (MUX input 0 = x, input 1 = y)
```

When `x = y`, the output is that bit whatever `Q` is. When they differ, the MUX
takes `x` and `y` in turn, so the select has probability 0.5. If the inputs are
correlated (same RNG), the 1 in a differing cycle always sits on the same side.
The differing cycles then output `1, 0, 1, 0, …`, and
`ones(z) = (ones(x) + ones(y)) / 2`, rounded, with no random error. For
independent inputs the result is still unbiased but random.

`sc_avgpool` builds a balanced tree of these adders: three adders and three
flip-flops for a 2×2 window. The first level is exact for correlated inputs.
The second level sees partly correlated streams and adds a small random error.

## Top level (`sc_cnn_basic_functions`)

The four functions sit side by side on one LFSR. Each drives a 14-bit ones
counter, and one controller runs them all. Their inputs are:

* the inner product: 16 operands `ip_x`, sign bits `ip_sgn` (1 = negative
  weight), and 15 selector probabilities `ip_sel_p`;
* max pooling and average pooling: one shared 2×2 window `pool_x`;
* ReLU: one operand `relu_x`.

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH`   | 32      | operand and LFSR width (binary precision) |
| `N_IN`    | 16      | inner-product inputs (any number ≥ 2) |
| `POOL_N`  | 4       | pooling window size (2×2) |
| `CNT_W`   | 14      | counter width; `L` up to 16383 (8192 needs 14 bits) |
| `SEED`    | `0x7F4A7C15` | LFSR value after reset |
| `RESEED`  | 0       | 1: restart the LFSR from `SEED` at every start |

**Timing.** Pulse `start` while `busy` is low, with `len = L` and operands
stable until `done`. The controller then runs:

* one `INIT` clock, which clears the counters and the T flip-flops;
* `L` `RUN` clocks, each processing one bit of every stream;
* one `DONE` clock, with `done` high.

`done` rises `L + 2` clocks after `start`. The counts `ip_count`, `mp_count`,
`ap_count` and `relu_count` are valid from `done` until the next start. A
`start` in the clock after `done` begins the next run at once. With
`RESEED = 0`, the LFSR continues from one evaluation to the next, so each
evaluation sees fresh random values.

**The LFSR** (`sc_lfsr`) uses the polynomial `x^32 + x^22 + x^2 + x + 1` in
Fibonacci form and leaps `WIDTH` shifts per clock. A one-shift-per-clock LFSR
gives consecutive values that are shifted copies of each other. That makes
consecutive stream bits dependent and roughly doubled the error of the pooling
and ReLU outputs at L = 1024–2048. The leap keeps the same maximal-length
sequence (sampled every 32 shifts, with the same period) and costs only an XOR
network.

## Accuracy

The table shows measured mean absolute errors of the decoded outputs against
real-valued references. They come from `tb_sc_error_sweep` at the default
parameters, with 12 random operand sets per point (48 for pooling and ReLU).

| L    | IP, 16 inputs | max pool | avg pool | ReLU  |
|------|---------------|----------|----------|-------|
| 64   | 0.076         | 0.064    | 0.086    | 0.089 |
| 256  | 0.051         | 0.032    | 0.045    | 0.049 |
| 1024 | 0.021         | 0.019    | 0.020    | 0.022 |
| 8192 | 0.009         | 0.006    | 0.008    | 0.009 |

These errors track the binomial error of a single L-bit stream, about
`0.8/sqrt(L)`. The published MUX-tree errors are about half of that (0.0545 at
L=64 and 0.0047 at L=8192 for 16 inputs). That is below what any source of
independent random bits can reach, so the published figures probably came from
a lower-discrepancy random source than a free-running LFSR. Because the max
pooling and ReLU outputs are exact functions of their input streams, their
remaining error is entirely stream-generation error.

## Departures and own choices

* Only the basic functions are built, not a whole CNN layer. The ReLU has its
  own input SNG, because an inner-product output stream is not correlated with
  a freshly generated zero stream, and the method does not say how to
  correlate them.
* Input counts that are not a power of two use the pairwise tree above. The
  method points to separately published, optimised tree shapes for such
  counts; those are not built. Average pooling still needs a power-of-two
  window, because its MUXs all select with probability 0.5.
* Selector probabilities are inputs, not computed on chip.
* The following are all this implementation's choices:
  * the XOR that drives the T input;
  * the LFSR polynomial, seed, leap width and free-running behaviour;
  * the bit rotation that gives the selectors independent randomness;
  * the controller and its `L + 2` latency;
  * the asynchronous active-low reset;
  * the two's-complement operand encoding.
* The comparison designs the method is measured against (XNOR-based inner
  products, approximate max pooling, RNG-driven average pooling) are not
  included.

## Files

| file | contents |
|------|----------|
| `rtl/sc_pkg.sv` | default sizes, LFSR polynomial table, controller states |
| `rtl/sc_lfsr.sv` | shared leap-forward LFSR |
| `rtl/sc_sng.sv` | comparator SNG, bipolar or unipolar |
| `rtl/sc_counter.sv` | stream-to-binary ones counter |
| `rtl/sc_mux_tree_ip.sv` | XOR + MUX-tree inner product |
| `rtl/sc_maxpool.sv` | OR-tree max pooling (any window size) |
| `rtl/sc_tff_add.sv` | T-FF-selected scaled adder |
| `rtl/sc_avgpool.sv` | tree of T-FF adders |
| `rtl/sc_relu.sv` | OR with correlated zero |
| `rtl/sc_ctrl.sv` | INIT / RUN / DONE sequencer |
| `rtl/sc_cnn_basic_functions.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_sc_error_sweep.sv` | accuracy sweep over L = 64 … 8192 and 2 … 16 inputs |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/sc_pkg.sv tb/tb_sc_cnn_basic_functions.sv \
    --top-module tb_sc_cnn_basic_functions -o sim
./obj_dir/sim
```

Replace the testbench name to run any other testbench. Each one finishes in a
few seconds.

* `tb_sc_cnn_basic_functions` runs the top at its default sizes. It models the
  LFSR and checks the max-pool and ReLU counts exactly, the average pool and
  inner product within tolerance, and the `L + 2` latency. It also checks that
  every mechanism was exercised: negative weights, clamping and passing ReLU,
  back-to-back starts and `L = 8192`.
* `tb_sc_error_sweep` prints the accuracy table above.

Inputs must be initialised. The design has reset for all state, and the
testbenches drive every input from time 0.
