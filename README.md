# Stochastic-computing activations and an in-memory binary spiking layer

This RTL covers three pieces of neural-network hardware that replace costly arithmetic with very cheap logic:

1. **A stochastic RBF kernel.** It computes `exp(-k (x-c)^2)` with a handful of gates. The trick is the limit form `(1 - k (x-c)^2 / N)^N`.
2. **A stochastic sigmoid/tanh unit.** It uses a degree-5 Bernstein polynomial. One output stream gives `sigmoid(2x)` when read as unipolar and `tanh(x)` when read as bipolar.
3. **An in-memory binary spiking convolution layer.** A 32 x 288 array of XNOR memory cells computes a whole 3x3x32 binary convolution window in one access. Each row feeds an integrate-and-fire neuron whose threshold grows over time, so the neuron only ever adds.

The three designs are independent. `sc_dnn_top` places them side by side, and they share only clock and reset.

All three are written as synthesizable digital logic. The memory array and the neuron were conceived as resistive and charge-domain circuits. Here they are digital equivalents with the same function and timing at the level of one time step. The section "What is modelled and what is not" lists what that leaves out.

---

## 1. Stochastic numbers

A stochastic number is a bit stream in which the fraction of ones is the value.

- **Unipolar:** `P(1) = x`, with `x` in [0, 1].
- **Bipolar:** `x = 2 P(1) - 1`, with `x` in [-1, 1].

Arithmetic then becomes single gates:
- AND multiplies two unipolar streams.
- XNOR multiplies two bipolar streams.
- NOT gives `1 - x` (unipolar) or `-x` (bipolar).
- XOR of two *maximally correlated* streams gives `|x - c|`.

Streams must be **uncorrelated** for AND to multiply. They must be **correlated** for XOR to subtract. Much of the design is about controlling which is which.

| module | role |
|---|---|
| `lfsr` | 10-bit maximal-length Fibonacci LFSR, polynomial x^10+x^7+1, period 1023. Reset loads `SEED`, which must be non-zero. |
| `sng` | Stochastic number generator: `bit = (rnd <= value)`. The LFSR never outputs 0, so `P(1) = value/1023`: code 0 is exactly 0 and code 1023 is exactly 1. |
| `sc_counter` | Counts ones over a `LENGTH` = 1024-cycle window. A `start` pulse opens the window with the bit of that cycle. `done` pulses in the cycle after the last bit, and `count` is held until the next start. |
| `sc_delay` | Chain of D flip-flops. Delaying a copy of a stream is how the design decorrelates it from itself. |

**The central pitfall.** Consecutive states of a Fibonacci LFSR are shifted copies of one another (`r(t) ≈ 2 r(t-1) mod 1024`). A stream delayed by one cycle is therefore strongly correlated with the undelayed stream. Both stochastic units below expose the delay step as a parameter (`DUNIT`) for this reason, and the accuracy figures quoted here come from simulating the actual LFSRs.

## 2. RBF kernel (`sc_rbf_unit`, `sc_rbf_kernel`)

### Approximation

```
K(x,c) = exp(-k (x-c)^2) ≈ (1 - k1 (x-c)^2)^N,   k1 = k/N
```

`N` = 8 is the default; 16 is the other supported size. `k1` must lie in [0, 1], so `k <= N`. For a multi-feature kernel, `K(x,c) = prod_i K(x_i, c_i)`. The product is a single AND gate over the per-feature streams.

### Bit-level datapath of `sc_rbf_unit` (one output bit per clock)

```
d    = x XOR c                         |x-c|     (x and c use the same random number)
sq   = d AND d(t-U)                    (x-c)^2
z0   = NOT(sq AND k)                   1 - k1 (x-c)^2
z1   = z0 AND z0(t-2U)                 z0^2
z2   = z1 AND z1(t-4U)                 z0^4
z3   = z2 AND z2(t-8U)                 z0^8      (N = 8 output; N = 16 adds z4)
```

Each squaring stage ANDs a stream with a copy of itself delayed by more than the span of cycles it already depends on. The two factors therefore never share an input bit.

`U` is `DUNIT`, default 13. With `U = 1`, the LFSR correlation described above pushes the mean absolute error (MAE) to 4-10%. With `U = 13`, longer than the 10-bit LFSR, the MAE over x in [0, 1] with `c = 0.5` is 0.8% (k = 1) to 1.8% (k = 7 and 8) at N = 8, and about 1.5% for k = 10 and 16 at N = 16. The cost is `U*(2N-1)` flip-flops per feature: 195 at N = 8.

### Bipolar inputs (`BIPOLAR = 1`)

`x, c` are in [-1, 1]. NOT gates form `x' = (1-x)/2` and `c' = (1-c)/2`. The same core then computes

```
(1 - k1' (x'-c')^2)^N,   k1' = 4k/N
```

The output is always unipolar.

### `sc_rbf_kernel`: the complete unit

Per feature, the kernel contains one LFSR, two SNGs fed by that LFSR's single random number, and one core. It also has an SNG for `k1`, the final AND, and a counter.

- `SHARE_LFSR = 0` (default): the `k1` SNG has its own LFSR.
- `SHARE_LFSR = 1`: the `k1` SNG reuses the bit-reversed state of the first feature's LFSR. This is cheaper and slightly less accurate.

**Timing.** A `start` pulse primes the delay lines for `2*N*DUNIT` cycles and then counts 1024 output bits. `done` is high in the cycle that begins `2*N*DUNIT + 1024` edges after the edge that sampled `start`: 1232 cycles at the defaults. `result/1024 ≈ K`. Inputs must be held from start to done.

## 3. Sigmoid / tanh (`sc_bernstein`, `sc_sigmoid_tanh`)

### Unipolar reformulation

The input `x` in [-1, 1] arrives as a bipolar stream with `P_x = (x+1)/2`. Rewriting the sigmoid in terms of `P_x` gives

```
sigmoid(2ax) = e^(-2a) / (e^(-2a) + e^(-4a P_x))
```

This is an ordinary function of `P_x` on [0, 1], and a Bernstein polynomial approximates it:

```
B(p) = sum_i b_i C(n,i) p^i (1-p)^(n-i),   b_i in [0,1]
```

`tanh(ax) = 2 sigmoid(2ax) - 1`. The same stream read in bipolar format is therefore `tanh(ax)`, and no extra hardware is needed.

### `sc_bernstein`

`n` copies of the input stream, delayed by 0, U, ..., (n-1)U cycles, are summed by a small adder. The sum `i` is binomially distributed, and it selects coefficient stream `b_i` through an (n+1)-way multiplexer.

`U = DUNIT` defaults to 1, meaning one flip-flop per delay step.

### `sc_sigmoid_tanh`

One LFSR drives every SNG:
- the `x` SNG uses the LFSR state;
- all coefficient SNGs use its bit-reversal, which decorrelates them from `x`.

The coefficients are a parameter, `COEF`, with defaults from `sc_pkg` (values `round(1023*b)`):

| function | b_0..b_5 |
|---|---|
| sigmoid(2x) / tanh(x) (default) | 0.12 0.20 0.34 0.66 0.80 0.87 |
| sigmoid(4x) / tanh(2x) | 0.03 0.02 0.00 1.00 0.98 0.96 |

**Timing.** `start` is followed by `(DEGREE-1)*DUNIT + 1` priming cycles, then 1024 counted bits. `done` comes 1029 cycles after start at the defaults. Then:
- `sigmoid ≈ count/1024`
- `tanh ≈ 2*count/1024 - 1`

**Accuracy** over the sweep `P_x = 0, 0.03, ..., 0.99`, simulated:

| instance | sigmoid MAE | tanh MAE |
|---|---|---|
| sigmoid(2x), `DUNIT` = 1 | 1.0% | – |
| sigmoid(2x), `DUNIT` = 5 | 0.4% | 0.8% |
| sigmoid(4x), `DUNIT` = 5 | 0.9% | – |

`DUNIT` = 1 is the structure as specified. 5 is the better choice when the random source is an LFSR.

## 4. In-memory binary spiking layer (`bsnn_layer` and below)

### The arithmetic

The network is a binarised spiking network. Spikes are `s` in {0, 1} and weights are `w` in {-1, +1}. With batch-norm folded in (scale and shift set to 1 and 0), the membrane update of neuron `i`, after scaling everything by `alpha/sigma`, is

```
v(t) = v(t-1) + sum_j w_ij s_j - mu/alpha,      spike when v > theta, then v = 0
```

Memory cells compute XNOR, not a signed product. Store `w` as a bit `wu = (w+1)/2` and let `M1` be the number of -1 weights in the row. Then

```
sum_j w_ij s_j = K_i - M1,      K_i = sum_j XNOR(wu_ij, s_j)
```

so `v(t) = v(t-1) + K_i - rho` with `rho = M1 + mu/alpha`.

### Dynamic threshold

Subtracting `rho` every step would need a subtracting accumulator. Instead, the constant moves onto the threshold:

```
ACC1:  u(t)  = u(t-1) + K(t)             (starts at 0)
ACC2:  th(t) = th(t-1) + rho             (starts at theta)
fire:  u(t) > th(t);  a spike resets ACC1 to 0 and ACC2 to theta
```

This fires on exactly the same steps as the subtracting model, and both accumulators only add.

If `rho` is negative (rare; it happens when `mu/alpha` is more negative than `M1`), ACC2 stays at `theta` and `|rho|` is added to ACC1 instead.

### Blocks

| module | function |
|---|---|
| `bl_driver` | Column decoder and bit-line driver. For a MAC, every column gets the complementary pair `(BL0, BL1) = (s, ~s)`. For a weight write, only the addressed column is driven; the others float. Registered. |
| `stt_xnor_bitcell` | One weight held in a complementary junction pair. MTJ0 on BL0 is low-resistance when `w = 1`, and MTJ1 on BL1 is low-resistance when `w = 0`. The row's source line sits at the "+1" level exactly when `XNOR(w, s) = 1`: `out = (w & BL0) \| (~w & BL1)`. A write with word line and column selected stores BL0. |
| `stt_xnor_subarray` | 32 x 288 cells. Each row returns its count `K_i` (0..288) combinationally. In the resistive array, this count sets a source-line voltage that rises linearly with it. |
| `if_neuron` | ACC1/ACC2 dynamic-threshold neuron as above, with a 16-bit signed accumulator (saturating), comparator and output flip-flop. `init` clears ACC1 and presets ACC2 to `theta`. |
| `sew_gate` | Residual spike-element-wise function `s_out = ~o & s_prev`. If the neuron does not fire, the earlier layer's spike passes through, which gives the identity path of a residual block. |
| `bsnn_layer` | The above, plus per-row `theta`/`rho` registers and the pipeline. |

### Using `bsnn_layer`

At most one request per cycle; an assertion checks this.

1. **Load weights.** Drive `wr_en` with `wr_row`, `wr_col` and `wr_data`, one bit per cycle (9216 cycles for a full array). Cells sharing a source line must be written individually.
2. **Configure each row.** Drive `cfg_en` with `cfg_row`, `cfg_theta` and `cfg_rho`. All three are signed integers in units of one XNOR count.
3. **For each sliding window:**
   - pulse `init`;
   - issue `T` consecutive `step` cycles (T = 4 or 8 time steps), each with the unrolled 288-spike window on `spikes`, the residual spikes on `s_prev`, and `sew_en`.
4. **Read the outputs.** `o`, `s_out` and `out_valid` appear **two cycles after each step**:
   - cycle 0: bit lines and word lines registered;
   - cycle 1: array count, neuron update, output flip-flop;
   - cycle 2: outputs visible.

   One time step completes per clock. At the intended 6 ns time step this is 166 MHz.

### Mapping a convolution

A 3x3 kernel over 32 input channels unrolls to `M = 288` spikes. Each of the `N = 32` rows holds one output channel's kernel, so one array access computes one output pixel for all 32 channels. An `H x W` feature map takes `H*W` windows of `T + 1` cycles each (init plus T steps). Running `P` arrays in parallel, each on a different window, divides that time by `P`. The window unrolling (im2col) and the feature-map storage are outside this RTL.

## 5. Top level (`sc_dnn_top`)

Ports are prefixed by design:

- **`rbf_*`** (`sc_rbf_kernel`): `start`, `x[DIMS]`, `c[DIMS]`, `k1`, `y_bit`, `result`, `done`.
- **`act_*`** (`sc_sigmoid_tanh`): `start`, `x`, `y_bit`, `count`, `done`.
- **`snn_*`** (`bsnn_layer`): write port, configuration port, `init`, `step`, `spikes[288]`, `s_prev[32]`, `sew_en`, `o[32]`, `s_out[32]`, `out_valid`.

**Defaults:**
- RBF: 1 feature, N = 8, unipolar, 10-bit LFSRs, 1024-bit windows.
- Activation: sigmoid(2x)/tanh(x) coefficients, `DUNIT` = 1.
- BSNN: 32 x 288 array, 16-bit accumulators.

## 6. What the RTL can run

| workload | at the defaults |
|---|---|
| univariate RBF, k up to 8 (N = 8) or 16 (N = 16), 1024-bit streams | yes; N = 16 via the `RBF_N` parameter |
| two-feature RBF (k = 7, c = 0.5) | needs `RBF_DIMS = 2` |
| sigmoid(2x)/tanh(x), degree 5 | yes |
| sigmoid(4x)/tanh(2x), degree 5 | needs `COEF = SIGMOID4X_COEF` |
| degree 3 and 7 polynomials | structure supports any `DEGREE`; their coefficients are not provided |
| MNIST net, hidden 32-to-32 3x3 convolution | yes: one layer's weights (9216 bits) fit the array. 14x14 windows x (8+1) cycles = 1764 cycles per image for that layer (simulated in `tb_bsnn_conv_workload`, along with T = 4). |
| CIFAR-10 net, five hidden 32-to-32 convolutions plus one 32-to-256 | one layer at a time. The array holds 9216 of the 46 080 + 73 728 weight bits, so weights must be reloaded per layer, and the 256-channel layer needs 8 passes of 32 rows. One 32-to-32 layer on the 32x32 map takes 1024 x 9 = 9216 cycles (simulated with SEW). |

The input layer (rate encoding of pixels), pooling and fully connected layers are not binarised in-memory layers. They are outside this design.

## 7. What is modelled and what is not

The following are **not modelled**:
- **Analog behaviour:**
  - source-line voltages;
  - junction resistances (2 kΩ / 4 kΩ);
  - the capacitive booster that amplifies the 110-184 mV source-line swing;
  - the charge accumulators;
  - the current-latched sense amplifier;
  - the word-line buffer chains.

  The digital model uses exact integers where the circuit has voltages. The array count `K` is exact, and the neuron compares integers.
- **Non-idealities of the analog circuit:** nonlinearity near K = 0 or 288, Gaussian variation, and missed or extra spikes. None are represented. This RTL gives the ideal behaviour that the analog circuit approximates.
- **Sub-cycle phases** of the analog time step (sampling, precharge, boost, charge, threshold re-precharge). They are folded into one clock cycle.
- **Fractions of `mu/alpha`:** `theta` and `rho` are integers, so fractional parts are lost. Widen the inputs and shift `K` if finer resolution is needed.

The following are **choices made in this RTL**:
- **RBF core:** the squaring-tree arrangement and all delay lengths. `DUNIT` = 13 departs from a minimal one-flip-flop delay for accuracy.
- **SNG comparison:** `<=` instead of `<`, so that the all-ones code means 1.
- **Coefficient decorrelation** by bit-reversing the LFSR state.
- **Interfaces:** the start/done handshakes, the configuration port, the pipeline registers, and accumulator saturation.
- **`init`:** it presets the neuron without emitting an output spike.

**Accuracy figures** quoted above come from simulation of this RTL with its LFSRs. The RBF error (about 2%) is several times higher than what an ideal random source would give.

## 8. Simulating

Every testbench in `tb/` is self-checking. Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_sc_dnn_top \
    -y rtl -y tb +libext+.sv rtl/sc_pkg.sv rtl/bsnn_pkg.sv tb/tb_sc_dnn_top.sv
./obj_dir/Vtb_sc_dnn_top
```

Replace `tb_sc_dnn_top` with any other testbench name.

| testbench | what it checks |
|---|---|
| `tb_sc_dnn_top` | All three designs at full default size. Checks RBF and activation values and latencies, a full 9216-bit weight load, and 6 windows x 8 steps checked spike by spike against a signed IF reference. Counts that spikes, silence, negative rho and SEW suppression all occur. |
| `tb_bsnn_conv_workload` | Complete hidden convolution layers at the default array size. MNIST: 14x14 map, T = 4 and 8. CIFAR-10: 32x32 map, T = 8, with SEW. Rate-coded inputs, a fresh kernel per layer, and windows streamed back to back (T + 1 cycles each). Every spike is checked against a signed convolution-plus-IF reference. |
| `tb_sc_rbf_k_sweep` | The default RBF kernel over k = 1, 2, 4, 7, 8, and an N = 16 kernel over k = 10, 16, with 21 x values each. Checks per-point error, MAE per k, and latency. |
| `tb_sc_rbf_unit` | Bit-exact against an equation-level reference, plus statistical means for N = 8 and N = 16 bipolar. |
| `tb_sc_rbf_kernel` | N = 8, N = 16 with shared LFSR, bipolar, and two features, against `exp(-k(x-c)^2)`, with latency. |
| `tb_sc_bernstein` | Bit-exact selection, and means against the Bernstein formula. |
| `tb_sc_sigmoid_tanh` | The input sweep for both coefficient sets and both delay steps, with MAE bounds and latency. |
| `tb_bsnn_layer` | The layer against the signed IF model, with latency and throughput. |
| `tb_if_neuron` | The dynamic-threshold neuron against the subtracting IF model, including negative rho and saturation. |
| others | One per block: `lfsr`, `sng`, `sc_counter`, `bl_driver`, `stt_xnor_bitcell`, `stt_xnor_subarray`, `sew_gate`. |

## 9. Files

- `rtl/sc_pkg.sv`: SC constants, LFSR tap table, Bernstein coefficient sets.
- `rtl/bsnn_pkg.sv`: array sizes (32, 288), accumulator width, time steps.
- `rtl/lfsr.sv`, `sng.sv`, `sc_counter.sv`, `sc_delay.sv`: stream primitives.
- `rtl/sc_rbf_unit.sv`, `sc_rbf_kernel.sv`: RBF.
- `rtl/sc_bernstein.sv`, `sc_sigmoid_tanh.sv`: sigmoid/tanh.
- `rtl/bl_driver.sv`, `stt_xnor_bitcell.sv`, `stt_xnor_subarray.sv`, `if_neuron.sv`, `sew_gate.sv`, `bsnn_layer.sv`: spiking layer.
- `rtl/sc_dnn_top.sv`: top level.
