# Pipelined CNN energy reconstruction for calorimeter readout

This is a streaming convolutional neural network (CNN) for one readout channel of a
calorimeter. It takes one digitised ADC sample per bunch crossing (BC). For every BC it
returns two values: a trigger probability that a hit above the noise threshold happened, and
the reconstructed energy of that hit. The network is small, with 88 coefficients in its
default form. It has to run with a short, fixed latency: the budget for energy reconstruction
in the trigger path is about 125–150 ns. So the whole network is unrolled in hardware. Every
multiplication has its own multiplier, and the design accepts a new sample on every clock
cycle.

The main idea is **pipelining over input samples**. A textbook convolution layer waits until
all samples of its kernel window have arrived, then multiplies and adds them. Here, each output
is computed by a cascade of DSP slices that starts work on the oldest sample of the window
while newer samples are still arriving. Each slice adds its products to a partial sum passed
down a dedicated cascade path. When the newest sample arrives, only one multiply-add is left.
As a result, a layer's latency barely depends on its size, and all the adding is done inside
the DSP slices.

All RTL is SystemVerilog in `rtl/`. Self-checking testbenches are in `tb/`.

## The network

Default configuration, called "4-Conv" (four convolutional layers):

| part    | layer | input channels         | feature maps | kernel | dilation | activation    | latency (cycles) |
|---------|-------|------------------------|--------------|--------|----------|---------------|------------------|
| trigger | T1    | 1 (ADC)                | 5            | 3      | 1        | sigmoid       | 14               |
| trigger | T2    | 5                      | 1            | 6      | 1        | sigmoid       | 16               |
| energy  | E1    | 2 (ADC, trigger)       | 3            | 4      | 1        | ReLU          | 14               |
| energy  | E2    | 3                      | 1            | 3      | 1        | ReLU          | 14               |

All layers are causal 1-D convolutions over time. Feature map `f` of a layer computes

    y_f[t] = act( b_f + sum_c sum_{j<K} w_f[c][j] * x_c[t - j*D] )

The trigger part sees only the ADC stream. The energy part sees two input channels: the ADC
stream, delayed by the trigger latency (30 cycles), and the trigger output for the same BC.
Channel 0 is the ADC and channel 1 is the trigger. The `energy` output for a sample appears
**58 cycles** after the sample entered on `adc`. At 480 MHz that is 121 ns. The `trigger`
output is delayed so that it belongs to the same BC as `energy`.

A three-layer variant, "3-Conv", has the same trigger part and a single energy layer with
kernel 21 and one feature map. Build it with `E_NL = 1, E_KS = '{0: 21, default: 1},
E_FMS = '{default: 1}`. Its latency is 62 cycles. Both sub-networks are built by `conv_stack`.
`conv_stack` can build any chain of up to 8 layers, including dilated ones. The testbenches also
run these stacks:

- a two-layer trigger network: 10 feature maps with kernel 3, then kernel 2 with dilation 2;
- a four-layer benchmark network: kernel 2 everywhere, with 3 feature maps in all but the last
  layer.

**Number format.** Every streamed value and every coefficient is a signed 18-bit fixed-point
number with 10 fractional bits. A product has 20 fractional bits. Sums are kept at 44 bits,
the width of a DSP cascade, until the activation. The activation rescales with truncation
toward minus infinity, so results are rounded down. Sigmoid outputs lie between 0 and 1024
(1.0). ReLU outputs saturate at the largest 18-bit value. No overflow flags are produced.

## How one feature map is computed (`feature_map`)

This is the part that needs the most explanation.

### The DSP slice

`dsp_systolic` models one dual-multiplier DSP slice in systolic FIR (multiply-add cascade)
mode:

    chainout = a0*b0 + a1*b1 + chainin

The data operands pass two input registers, a product register and the output register. An
operand presented in cycle `c` therefore reaches `chainout` in cycle `c+4`. The cascade input
passes one register, then the output register, so it takes **2 cycles**. Slices in a chain
are therefore two cycles apart. A slice must receive its operands two cycles before the
partial sum of the previous slice reaches it.

### Two calculation paths

Each slice holds two multiplications whose products are summed. The multiplications of a
feature map are packed into slices in two ways:

- **Paired path.** The input channels are taken two at a time. Slice `m` of a chain multiplies
  tap `K-1-m` of both channels. A chain has `K` slices and covers one channel pair, and there
  is one chain per pair. The oldest tap comes first, so the newest sample enters the last
  slice.
- **Odd path.** This path exists only when the number of input channels is odd. The last
  channel gets its own chain, in which slice `m` multiplies two *consecutive* taps of that
  channel, `K-1-2m` and `K-2-2m`. This takes `ceil(K/2)` slices instead of `K` slices that
  would be half used. For odd `K`, the last slice has only the newest tap, and its second
  multiplier gets zeros.

Per feature map this needs `(CIN/2)*K + (CIN mod 2)*ceil(K/2)` slices. For 4-Conv that is 42
slices, which provide 84 multipliers for 78 multiplications. For 3-Conv it is 46 slices for 87
multiplications.

### Where the operands come from

The layer keeps a shift buffer of `D*(K-1)+1` samples per input channel (`sample_buffer`).
Element `i` of the buffer holds the sample that entered `i+1` cycles ago. A slice that must
multiply tap `j` (sample `x[t-j*D]`) at chain position `m` reads buffer element

    idx = 2*m + j*D - s,     s = min over the path of (2*m + j*D)

Here `s` shifts the whole path in time so that the earliest read is the newest buffer element.
`cnn_pkg` computes these indices at elaboration (`pair_index`, `odd_index`). Some examples:

- With `D = 1`, the paired path reads elements `0, 1, ..., K-1`. The samples arrive one per
  cycle but the slices are two cycles apart, so the newest sample waits `K-1` cycles. This is
  the `K-1` term of the latency formula below.
- With `D = 2`, each sample arrives exactly when its slice needs it, and all slices read
  element 0.
- The odd path reads elements 1 and 0 for every slice, because it consumes one sample per
  cycle. For odd `K`, its single-tap last slice is one cycle late. This is the `K mod 2`
  term.

### Alignment, summation, activation

Each path ends in an alignment delay chain (`delay_chain`). The lengths are chosen so that all
paths deliver their result in the same cycle. After that come these stages:

1. sum of all paired chains plus the bias (shifted to 20 fractional bits);
2. the odd path is added ("sum over paths");
3. activation (`activation_unit`);
4. the output register, which loads only while the network is in calculation mode.

From the cycle in which a sample is on the layer input to the cycle in which the result is on
the layer output, the layer takes

    L = 11 + (K mod 2) + (K - 1 if D = 1, else 0)

cycles. This holds for every channel count, because the alignment delays pad the shorter paths
to this value. The fixed part consists of:

- the buffer register (1 cycle);
- the first slice (4 cycles);
- the summation stages (2 cycles);
- the activation (1 cycle);
- the output register (1 cycle);
- the padding that remains.

Examples of the resulting split:

| layer (CIN, K, D) | paired-path cycles | padding | odd-path cycles | padding | L  |
|-------------------|--------------------|---------|-----------------|---------|----|
| T1 (1, 3, 1)      | –                  | –       | 5               | 4       | 14 |
| T2 (5, 6, 1)      | 9                  | 2       | 4               | 7       | 16 |
| E1 (2, 4, 1)      | 7                  | 2       | –               | –       | 14 |
| E1 of 3-Conv (2, 21, 1) | 24           | 3       | –               | –       | 32 |
| dilated (10, 2, 2)| 4                  | 2       | –               | –       | 11 |

The network latency is the sum of the layer latencies. The concatenation costs nothing,
because the ADC copy is delayed in parallel with the trigger part. Input and output registers
that a surrounding design may add are not counted. Such registers typically add two cycles,
so 58 becomes 60 in a system measurement.

## Activation functions

- **Sigmoid table** (`sigmoid_lut`, the default for trigger layers). The sum is truncated to 5
  fractional bits and clamped to [-8, 8), which gives a 512-entry table of
  `round(1024 / (1 + exp(-x)))`. The table is computed by a constant function at elaboration,
  so no data file is needed. The table size is this design's choice.
- **Piecewise linear sigmoid** (`sigmoid_plan`, selected with `SIG_ACT = ACT_SIGMOID_PLAN`).
  It uses four segments whose slopes are powers of two, so all multiplications become shifts:
    - `1` for |x| ≥ 5;
    - `|x|/32 + 0.84375` from 2.375 to 5;
    - `|x|/8 + 0.625` from 1 to 2.375;
    - `|x|/4 + 0.5` below 1;
    - `1 − f(|x|)` for negative x.

  The inputs and outputs use the full 10-fractional-bit format. The error against the true
  sigmoid stays below 0.02.
- **ReLU** (energy layers): `max(0, x)`, saturated at the 18-bit maximum.

Each activation takes one cycle.

## Coefficients and operating modes

The structure of the network is fixed when it is built. The weights are not: they can be
changed at run time without rebuilding.

- **Storage.** `weight_ram` holds all coefficients. The slow-control side writes it through
  `cfg_wr_en`, `cfg_wr_addr` and `cfg_wr_data`, at any time.
- **Shift chain.** Each feature map holds its coefficients in a shift register of
  `1 + CIN*K` words: the bias first, then `w[c][j]` at position `1 + c*K + j`. All feature maps
  form one chain. The chain starts at trigger layer 0, feature map 0 and ends at the last
  energy feature map.
- **Loading.** A pulse on `load_start` starts the mode machine (`coef_ctrl`). It reads RAM
  addresses 0 … NCOEF−1 on consecutive cycles and pushes each word into the chain as it
  arrives. RAM address `a` therefore holds chain position `NCOEF−1−a`, counted from the chain
  input. With NCOEF = 88, a load takes 89 cycles.
- **Modes.**
    - While loading, `loading` is high and the feature-map output registers hold their values.
    - After loading, `calc_mode` is high and the network computes.
    - `load_start` in calculation mode reloads the coefficients.
- **Reset and enable.** Both are registered once before they reach the layers. They act only on
  the output registers and on the input of the sample buffers. The datapath registers have no
  reset; they are flushed by the sample stream itself. Because of the registered enable, the
  outputs freeze one cycle after `loading` rises.
- **`out_valid`.** It is the input `adc_valid` delayed by the network latency. It is kept low
  until every pipeline stage holds results made with the current coefficients. That takes
  latency plus receptive field, which is 70 cycles for 4-Conv, counted from the end of loading.

## Top-level interface (`cnn_energy_top`)

| port                         | dir | width  | meaning                                       |
|------------------------------|-----|--------|-----------------------------------------------|
| `clk`, `rst`                 | in  | 1      | clock (one sample per cycle), synchronous reset, active high |
| `adc`, `adc_valid`           | in  | 18, 1  | ADC sample (10 fractional bits) and its valid flag |
| `cfg_wr_en/addr/data`        | in  | 1, 7, 18 | coefficient RAM write port                  |
| `load_start`                 | in  | 1      | load the coefficients from the RAM into the network |
| `energy`                     | out | 18     | reconstructed energy (ReLU output)            |
| `trigger`                    | out | 18     | trigger probability for the same BC (1024 = 1.0) |
| `out_valid`                  | out | 1      | `energy` and `trigger` are valid              |
| `loading`, `calc_mode`       | out | 1      | current mode                                  |

Top-level parameters:

- `T_NL`, `T_KS`, `T_DS`, `T_FMS`: the trigger layers.
- `SIG_ACT`: the sigmoid implementation.
- `E_NL`, `E_KS`, `E_DS`, `E_FMS`: the energy layers.
- `ADDR_W`: the coefficient RAM address width.

The per-layer parameters are arrays of 8 entries, of which only the first `*_NL` are used.
Both sub-networks must end in a single feature map.

## Module hierarchy

```
cnn_energy_top
├── weight_ram          coefficient RAM
├── coef_ctrl           idle / load / run state machine
├── conv_stack (trigger)            ─┐
├── delay_chain (ADC → concatenation) │
├── conv_stack (energy)              │ each conv_stack:
└── delay_chain (trigger, out_valid) │   conv_layer × NL
                                     │     sample_buffer
                                     │     feature_map × FM
                                     │       dsp_systolic × (paired + odd chains)
                                     │       delay_chain (path alignment)
                                     └─      activation_unit → sigmoid_lut | sigmoid_plan | ReLU
cnn_pkg     formats, activation enum, slice-assignment and latency functions
```

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each has a
watchdog. To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cnn_pkg.sv tb/tb_cnn_ref.sv tb/tb_cnn_energy_top.sv --top-module tb_cnn_energy_top
./obj_dir/Vtb_cnn_energy_top
```

The reference model is in the testbench package `tb_cnn_ref`. It computes the direct
convolution sample by sample, with exactly the fixed-point rules above. Every comparison is
bit-exact.

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_dsp_systolic`     | products, cascade sum, 4- and 2-cycle timing, extreme operands |
| `tb_delay_chain`, `tb_sample_buffer`, `tb_weight_ram`, `tb_coef_ctrl` | delays, buffer contents and reset, RAM read timing, load sequence and mode timing |
| `tb_sigmoid_lut`, `tb_sigmoid_plan`, `tb_activation_unit` | each activation, including clamping, symmetry and distance to the true sigmoid |
| `tb_feature_map`      | eight feature-map shapes (odd/even K, odd/even channel counts, dilation 1–3, all activations), each output at exactly the layer latency, and output hold when disabled |
| `tb_conv_layer`       | whole layers, including a dilated one |
| `tb_conv_stack`       | default trigger network, dilated two-layer trigger network, four-layer benchmark network |
| `tb_cnn_energy_top`   | end to end: 4-Conv (58 cycles), 3-Conv (62 cycles), and a dilated trigger part with the piecewise sigmoid (53 cycles). Covers load, run, rewrite and reload while running, invalid samples, held outputs, ReLU clipping and sigmoid saturation. Each mechanism is counted and must occur. |
| `tb_cnn_energy_full`  | the default build, unmodified, through the same sequence with 2000 samples |

The ADC stimulus is a noisy baseline with a pulse every 45 BCs. The coefficients are random.
The tests check arithmetic and timing, not physics performance.

## Where this design departs from, or goes beyond, what is specified

- **DSP slices** are plain inferable logic with the timing described above. They do not
  instantiate a vendor primitive. A synthesis tool may or may not map them onto hard DSP
  cascades. Reaching 480 MHz on an FPGA has not been checked here.
- **Latency padding.** Every layer is padded to the formula's latency, even where a path could
  finish earlier. The split of the fixed cycles into stages is this design's own.
- **Coefficient loading** goes through one serial shift chain fed from the RAM. The RAM write
  port stands in for the slow-control interface.
- **Sample buffer.** There is one per layer, shared by its feature maps, instead of one per
  neuron. The numerical result is the same.
- **Sigmoid table.** The table size (9-bit address, range ±8) is an assumption. The PLAN
  segment constants are those of the published PLAN method.
- **ReLU/linear saturation** and **truncating rescaling** are choices made here.
- **Dilation of the energy layers** is taken as 1. With that, the latency formula reproduces
  58 and 62 cycles for the two networks.
- **Not included:**
    - time-domain multiplexing of 12 channels through one network instance;
    - the surrounding readout firmware (sample reception, buffering, transmission);
    - the slow-control module.

  To serve 512 channels at 12× multiplexing, 43 instances would be needed. At 42 slices each,
  that is 1806 DSP slices.
