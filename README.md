# Dense neural-network classifier for 28x28 images, in fixed point

This is a small, fully synchronous accelerator for a multilayer perceptron
that recognises handwritten digits. A 28x28 grey-scale image (784 pixel
values) goes in, and the index 0..9 of the most likely digit comes out. The
network has 784 inputs, one hidden layer of 45 neurons with ReLU activation,
and 10 output neurons with sigmoid activation. Training is done offline. The
trained weights and biases are written into on-chip RAM once, before the
network runs.

The main idea is a trade between time and area:

- All neurons of a layer work in parallel. Each neuron has its own multiplier,
  accumulator and weight RAM.
- The inputs of a layer are handled one after another. Each input takes three
  clocks to multiply and accumulate.
- The response time is therefore set by the number of inputs to each layer,
  not by how many neurons a layer has. At 100 MHz an image takes 25.5 us.

All numbers use a 25-bit **sign-magnitude** fixed-point format.

## Number format and arithmetic (`nn_pkg`, `fx_multiplier`, `fx_adder`)

A word is `{sign, magnitude[23:0]}`, with 14 integer bits and 10 fraction bits:

    value = (-1)^sign * magnitude / 1024      range +-16383.999

This is sign-magnitude, not two's complement. For example -12.625 is sign 1
with magnitude 1100.1010b. Users coming from two's-complement datapaths
should keep this in mind when preparing weights.

- **Multiply.** The sign is `sa XOR sb`. The magnitude is the full 48-bit
  unsigned product of the two magnitudes. That product has 20 fraction bits,
  so bits [33:10] are kept. The dropped fraction bits make the result truncate
  toward zero. If any of bits [47:34] is set, the magnitude saturates to all
  ones and `ovf` is raised.
  Example: 5.3125 x -3.375 -> magnitude 0x55 x 0x36 = 0x11EE (in 4-fraction-bit
  terms) -> -17.9296875.
- **Add.** With equal signs the magnitudes are added. With different signs the
  smaller magnitude is subtracted from the larger, and the result takes the
  larger operand's sign. A carry out saturates the result.
- A zero result is always given the + sign. -0 is accepted on every input and
  treated as 0.

Input pixels must already be in this format when they are streamed in, for
example a 0..255 grey level scaled to 0..1. Converting a real number to the
format is done in software. The method is to test each bit weight from 2^13
down to 2^-10, subtracting the weight wherever it fits, which truncates toward
zero. `tb/tb_ref_pkg.sv` (`real2fx`) shows it.

## How an image flows through the design

```
 pixels ──► neuron_layer 0 ──► activation_function ──► act_buf ──► neuron_layer 1 ──► activation_function ──► response_check ──► class
 (stream)   784 in, 45 neurons   (ReLU, 1 value/clk)    45 words   45 in, 10 neurons    (sigmoid table)          (running max)
              ▲ 45 weight RAMs                                        ▲ 10 weight RAMs
              └──────────────────────────── load port ────────────────┘   (also writes the sigmoid table)
```

There is only one `activation_function` unit, and every layer uses it in turn.
The controller in `nn_top` steps through the layers.

### Neuron (`neuron`)

A neuron is a multiplier, a product register, an adder and an accumulator
register that feeds back into the adder, plus a counter of accumulated
products. The layer controls it with three one-clock strobes:

| strobe    | action                                             |
|-----------|----------------------------------------------------|
| `mul_en`  | `prod <= x * w`                                    |
| `acc_en`  | `acc <= acc + prod`, `count++`                     |
| `bias_en` | `acc <= acc + w` (w now holds the bias); `done` is set if `count == N_IN` |

The result is u = sum(x_i * w_i) + b. Each step saturates on overflow, and a
sticky `sat` flag records that this happened.

### Layer (`neuron_layer`)

Each neuron n has its own `weight_ram` of N_IN+1 words:

- word i holds the weight of input i;
- word N_IN holds the bias.

All RAMs are read at the same address, so every neuron gets its own weight for
the current input in the same clock. The layer moves through these states:

```
S_IN  (x_ready=1; on x_valid latch x, read RAMs at idx)
S_MUL (all neurons: mul_en)
S_ACC (all neurons: acc_en; idx++)          ── repeated N_IN times: 3 clocks per input
S_BRD (read RAMs at N_IN, the bias)
S_BADD(all neurons: bias_en)
S_DONE(y_valid=1, sums held on y[] until y_ack; y_ack clears the neurons)
```

The first input is taken in clock 0, and `y_valid` rises in clock 3*N_IN + 2.
If the source leaves `x_valid` low, the layer simply waits in `S_IN`.

### Activation (`activation_function`)

The unit takes one value per clock and delivers the result one clock later.

- **ReLU** (after hidden layers): a negative value becomes +0.
- **Sigmoid** (after the output layer): the result is looked up in a
  4096-entry table held in block RAM. The table index is
  `2048 + u*256`, truncated toward zero and clamped to 0..4095. It covers
  u in [-8, 8) in steps of 1/256. Entry i must hold
  `sigmoid((i - 2048) / 256)` in the fixed-point format. The table is written
  through the load port, like the weights. Inputs outside the range use the
  end entries and raise `clamped`.

### Response (`response_check`)

The 10 activated outputs arrive one per clock. A running maximum is kept, and
a later value replaces it only if it is strictly larger, so on a tie the
lower index wins. One clock after the tenth value, `resp_valid` pulses with
`resp_class` and `resp_score`.

### Controller and timing (`nn_top`)

For each layer the controller does the following:

1. Wait for `y_valid`.
2. Pass the layer's N sums through the activation unit, one per clock. For a
   hidden layer the results go into `act_buf`. For the output layer they go
   to `response_check`.
3. Acknowledge the layer.
4. Stream `act_buf` into the next layer.

Each extra hidden neuron therefore costs 4 clocks: 1 for activation and 3 for
the multiply-accumulate in the next layer. With pixels offered back to back,
`resp_valid` comes

    3*N_IN + 2 + HID_LAYERS*(4*N_HID + 4) + N_OUT + 2  clocks

after the first pixel is taken. The testbenches check this count exactly.

| network      | clocks | at 100 MHz | time reported for the original implementation |
|--------------|-------:|-----------:|-----:|
| 784x10x10    | 2410 | 24.10 us | 23.77 us |
| 784x15x10    | 2430 | 24.30 us | 23.97 us |
| 784x30x10    | 2490 | 24.90 us | 24.57 us |
| 784x45x10 (default) | 2550 | 25.50 us | 25.17 us |
| 784x100x10   | 2770 | 27.70 us | 27.37 us |
| 784x10x10x10 | 2454 | 24.54 us | 47.85 us |

For one hidden layer the slope of 40 ns per hidden neuron matches the
original exactly. The total is a constant 0.33 us higher, because the
original's fixed overhead is not known. The two-hidden-layer figure of
47.85 us cannot be explained by three clocks per input. In this design a
second 10-neuron hidden layer adds only 44 clocks.

Only one image is in flight at a time. `pix_ready` stays low from the last
pixel until `resp_valid`.

## Using `nn_top`

Parameters: `N_IN` (784), `N_HID` (45), `N_OUT` (10), `HID_LAYERS` (1; every
hidden layer is N_HID wide). `N_HID` and `N_OUT` must be at most 255.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low synchronous reset |
| `load_we` | in | 1 | write one word |
| `load_layer` | in | 4 | 0..HID_LAYERS: a layer's weight RAMs; HID_LAYERS+1: sigmoid table |
| `load_neuron` | in | 8 | neuron within the layer |
| `load_addr` | in | 12 | input index, or the layer's input count for the bias; table index for the table |
| `load_data` | in | 25 | fixed-point word |
| `pix_valid`/`pix_ready`/`pix_data` | in/out/in | 1/1/25 | pixel stream; a value is taken when valid and ready are both high |
| `busy` | out | 1 | from the first pixel taken until `resp_valid` |
| `resp_valid` | out | 1 | one-clock pulse: result ready |
| `resp_class` | out | 4 | winning output neuron |
| `resp_score` | out | 25 | its activated output |
| `overflow` | out | 1 | some product or sum saturated during this image |
| `clamped` | out | 1 | some output-layer sum fell outside the sigmoid table |

Use it in this order:

1. Reset the design.
2. Load all weights, biases and the table. This takes one clock per word:
   35,785 words plus 4096 table words at the default size. RAM contents are not
   reset, and they survive a reset.
3. Stream the pixels of each image in order 0..783.

Loading is meant to be done while the network is idle.

## Files

| file | contents |
|------|----------|
| `rtl/nn_pkg.sv` | number format (`fx_t`), `act_mode_e` |
| `rtl/fx_multiplier.sv`, `rtl/fx_adder.sv` | sign-magnitude arithmetic |
| `rtl/weight_ram.sv` | simple dual-port RAM with registered read; weights and sigmoid table |
| `rtl/neuron.sv` | multiply-accumulate neuron |
| `rtl/neuron_layer.sv` | layer: RAMs, neurons, 3-clock sequencer |
| `rtl/activation_function.sv` | ReLU / table sigmoid |
| `rtl/response_check.sv` | arg-max |
| `rtl/nn_top.sv` | top level and layer sequencing |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/tb_ref_pkg.sv` | integer reference arithmetic, sigmoid table values, real-to-fixed conversion |
| `tb/nn_top_full_tb.sv` | default-size (784x45x10) classification of three images |
| `tb/nn_top_workloads_tb.sv`, `tb/nn_top_harness.sv` | the six network shapes of the table above |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. It compares against
expected values computed independently in `tb_ref_pkg`, using signed-integer
arithmetic rather than the sign-magnitude datapath. The testbenches cover:

- the multiplier's worked example;
- saturation and -0 handling;
- RAM read latency;
- neuron sums;
- layer latency (3*N_IN + 2), stalls and held outputs;
- ReLU, the sigmoid table and clamping;
- arg-max ties.

The end-to-end test, `nn_top_tb`, uses a network of 20 inputs, 2 hidden layers
of 6 neurons and 10 outputs. It checks class, score and flags for 12 images
and checks the exact latency. It also counts that stalls, back-pressure, ReLU
zeroing, table clamping, overflow and the hidden-to-hidden hand-off each
happen.

The weights and images are random, because the trained network and the image
set are not part of this design. Classification accuracy is therefore not
measured here; what is verified is that the hardware computes the specified
fixed-point network exactly.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/nn_pkg.sv tb/tb_ref_pkg.sv \
        tb/nn_top_tb.sv --top-module nn_top_tb -o sim && ./obj_dir/sim

Replace `nn_top_tb` with any other testbench. For `nn_top_workloads_tb`, also
pass `tb/nn_top_harness.sv`. All testbenches finish in seconds.

## Where this design makes its own choices

These points are not fixed by the original description and were chosen here:

- **Arithmetic:**
  - truncation of products toward zero;
  - saturation instead of wrap-around;
  - the +0 rule;
  - keeping sums in the same 25-bit format.
- **Bias:** stored as an extra RAM word and added after the last input. It is
  added, so it holds the negated threshold of the textbook neuron
  `u = sum - theta`.
- **Three-clock split:** the three clocks of a multiply-accumulate are split
  as RAM read, multiply, accumulate.
- **Sigmoid table:** its size, range and indexing are choices of this design.
  The original only states that the function is precomputed and read from
  RAM in one clock.
- **Interfaces:** the valid/ready pixel stream, the load-port address map, the
  status flags and the one-image-at-a-time sequencing.
- **Hidden-layer widths:** all hidden layers have the same width.

Not provided:

- **Weights fixed in LUTs:** a variant that builds the trained weights into
  logic instead of RAM. It would need the trained values.
- **Integer representation:** the alternative that scales values by powers of
  ten.
- **Convolution and pooling layers:** the original names them only as future
  work.
