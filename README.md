# Weight-binarized spiking MLP (784-1023-1023-10)

This is a spiking neural network accelerator for MNIST-style digit classification.
Every synaptic weight is a single bit and every spike is a single bit:

* A stored `1` means weight +1, which excites the neuron.
* A stored `0` means weight −1, which inhibits it.

So no multiplier, and no adder wider than a counter, is needed anywhere after the input layer.
The layers are fully connected. A fully connected spiking layer does not look at every synapse.
Instead, a priority encoder lists only the presynaptic neurons that actually spiked, one per clock.
Each listed index is used as the address of a weight row that all neurons of the layer share.
Each neuron then counts its potential up or down by one. Silent neurons cost neither energy nor time.
In the reference setup about a third of the hidden neurons spike in a time step, so the encoder removes roughly two thirds of the work.

The network is 784 inputs (28×28 pixels), two hidden layers of 1023 neurons, and 10 output neurons.
It classifies one image over `T` time steps. The class is the output neuron that spiked most often.

```
 image buffer ──pixels──▶ input layer ──spikes──▶ hidden layer ──spikes──▶ output layer ──▶ spike counters ──▶ class
 (pixel_scan)   1/clk     (input_layer)  1023b    (fc_layer)      1023b     (fc_layer)        10 × log2(T+1)
  optional                 1023 accumulator        PE&PRI + RAM              PE&PRI + RAM
  zero skipping            neurons                 1023 counters             10 counters
```

## Why the layer sizes are 2^k − 1: the priority encoder

In every priority encoder of this design, input 0 is not connected. An encoder output of 0 therefore means "no input is active".
Neuron *j* of a layer drives encoder input *j*, for *j* = 1 … N, and weight row *j* belongs to that neuron.
A layer of 2^k − 1 neurons fills a 2^k-input encoder exactly. That is why the hidden layers have 1023 neurons, not 1024.

* `pe8` is the 8-to-3 encoder. Its output is the highest set input among D7…D1.
* `prio_enc` is the same function for any power-of-two width. It is used as the group encoder.
* `pe_tree` builds a wide encoder from small ones:
  1. The inputs are split into groups of eight.
  2. Each group is OR-reduced.
  3. A `prio_enc` picks the highest non-empty group. This gives the upper index bits.
  4. A multiplexer passes that group to a `pe8`, which gives the lower three bits.
  5. The two parts are concatenated into the index.

  At 32 inputs this is a PE4 plus a PE8. A 1023-neuron layer uses a 1024-input tree: a 128-input group encoder and a PE8.
  A group whose only set bit is its own bit 0 still encodes correctly: the group number supplies the upper bits and the PE8 returns 0.
* `pe_pri` adds the priority-resolving loop (PE&PRI):
  * A register holds the flags that are still pending.
  * The tree encodes the highest pending flag onto `idx`.
  * With `adv` high, that flag is cleared on the clock edge, so the next index appears on the next clock.
  * A multiplexer in front of the register chooses between a newly loaded vector and the fed-back, cleared one.

  Given a vector with *k* flags set, the unit shows *k* indices on *k* consecutive clocks, highest first. After that `idx` is 0.
  Widths that are not a power of two are padded up, with a minimum of 16.

## Input layer: real pixels, one bit of weight

The input layer receives pixel values, not spikes. A pixel is sign-magnitude: bit 7 is the sign (1 = negative) and bits 6:0 are the magnitude.
Pixels arrive one per clock. The pixel index addresses the layer's weight RAM. Every `acc_neuron` then does the following:

1. It XNORs the pixel sign with its own weight bit. Because sign 1 means negative and weight 1 means +1, the XNOR result is the sign of pixel × weight.
2. Together with the magnitude, that sign forms a sign-magnitude product.
3. The accumulator adds the product (XNOR = 0) or subtracts it (XNOR = 1).

A token with `pix_end` high closes the time step. Each neuron compares its accumulator with its own threshold.
If the accumulator is strictly greater, the neuron spikes and resets to 0. Otherwise it keeps its value into the next time step.
The same image is sent again in every time step, so an input neuron's spike rate grows with its weighted input.

`pixel_scan` holds the image and sends it once per time step. It has two modes:

* **`SKIP_ZEROS = 1`** (the default): the non-zero flags of the pixels go through their own PE&PRI, so only non-zero pixels are sent. A digit image is mostly background, so this shortens every time step. In the test images, 19 % of pixels are non-zero, which gives about 150 clocks instead of 785.
* **`SKIP_ZEROS = 0`**: every pixel is sent, in order 1…784, and no encoder is needed. This mode uses less hardware and suits dense inputs.

Zero pixels contribute nothing either way. Both modes give identical results, and the end-to-end testbench checks this.

## Fully connected layer: PE&PRI, shared weight row, up/down counters

One `fc_layer` time step:

| clock | what happens |
|---|---|
| 0 | input spike vector accepted (`in_valid && in_ready`), loaded into the PE&PRI |
| 1 … k | one active presynaptic index per clock; it is the RAM read address |
| 2 … k+1 | the row read on the previous clock reaches all neurons; neuron *n* counts up if bit *n* is 1, down if it is 0 |
| k+1 | the encoder shows 0: the list is exhausted |
| k+2 | fire: every neuron with potential > threshold spikes and resets to 0 |
| k+3 | `out_valid` high with the new spike vector, held until `out_ready` |

With *k* active inputs, the output appears *k* + 3 clocks after the input. An empty input vector takes 3 clocks.

The counters are 16-bit two's complement. They saturate, although a 1023-input layer cannot reach the limits within 16 steps.
Thresholds are per-neuron registers loaded through `th_we`/`th_idx`/`th_data`.

Each weight RAM is one memory of `N_IN` rows × `N_OUT` bits. Logically it is the same as one 1-bit RAM per neuron, all driven by the same address.
Row *j* is addressed directly by encoder index *j*. Row 0 does not exist.

## Inference control and readout

`wbsnn_top` connects the blocks:

* The layers are chained with valid/ready handshakes. A layer holds its output until the next layer takes it, so the three layers can work on different time steps at the same time.
* The rate-limiting stage sets the pace. This is usually the input layer with its pixel stream, or the hidden layer when many neurons spike.

One inference runs as follows:

1. Load the image (`img_*`), the three sets of weight rows (`w1_*`, `w2_*`, `w3_*`) and the thresholds (`th1_*`, `th2_*`, `th3_*`). All of these stay valid across inferences, so only the image needs reloading.
2. Pulse `start` while `busy` is low. All potentials and output spike counts are cleared.
3. The controller starts `T` passes over the image and counts the output layer's spikes per class.
4. After the `T`-th output vector, `class_idx` is set to the class with the most spikes (lowest index on a tie), and `done` pulses for one clock.

At the default size, an image with 19 % lit pixels takes about 6,400–6,700 clocks for 16 time steps. An all-zero image takes 73 clocks. With only 63–255 hidden neurons active, fewer neurons spike, and the pixel stream sets the pace at about 2,500 clocks per image.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_IN` | 784 | pixels per image |
| `N_H1`, `N_H2` | 1023 | hidden layer sizes (use 2^k − 1) |
| `N_OUT` | 10 | classes |
| `P_W` | 8 | pixel width, sign-magnitude |
| `A_W` | 20 | input-layer accumulator width |
| `C_W` | 16 | counter width of the other layers |
| `T` | 16 | time steps per image |
| `SKIP_ZEROS` | 1 | send only non-zero pixels |

The same defaults are collected in `wbsnn_pkg`. The smaller networks of the original evaluation (784-63-63-10, 784-127-127-10, 784-255-255-10) can be run in two ways:

* Set `N_H1`/`N_H2` to the smaller size.
* Keep the default top and give the unused hidden neurons a threshold they cannot exceed.

## Memory

The weight memory is 784×1023 + 1023×1023 + 1023×10 = 1,858,791 bits. The image buffer adds 784 × 8 bits.
For the smaller networks the weights need 53,991 bits (63 hidden neurons), 116,967 bits (127) and 267,495 bits (255).

The original FPGA implementation reports 56.5 block RAMs of 18 Kbit (1.04 Mbit) for the 1023-neuron network. That is less than one bit per weight would need.
The reported figures for 63 and 127 hidden neurons (3.5 and 6.5 BRAMs) do match one bit per weight. How the larger network was fitted is not known.
This RTL stores every weight as one bit.

## What is this design's own

The following follow the original design:

* the network shape
* one-bit weights and spikes
* the reserved encoder input 0
* the PE4/PE8 tree and the PE&PRI loop
* the shared-address weight RAM
* the XNOR/concatenate/accumulate input neuron
* the up/down counter neuron with threshold and ">" comparison
* reset on firing
* optional zero skipping

The following are choices made here, because the original leaves them open:

* **Number of time steps:** 16.
* **Widths:** 8-bit sign-magnitude pixels, a 20-bit accumulator and 16-bit counters, all saturating.
* **Reset value:** 0, both after a spike and at the start of each image.
* **Sub-threshold potential:** kept from one time step to the next. There is no leak.
* **Firing:** once per time step, after all inputs of that step.
* **Encoder timing:** one encoder index per clock, and a RAM with a one-clock read.
* **Handshakes** between the layers.
* **Configuration ports:** weights, thresholds and image are written through ports.
* **Readout:** the class is the output neuron with the most spikes.

No trained weights come with this design. Weights and thresholds must be loaded from a training run, which is outside this RTL.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares against a model written independently in the testbench and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `pe8_tb`, `prio_enc_tb` | all input patterns (PE8, PE4, PE16) |
| `pe_tree_tb` | 32- and 1024-input trees: every one-hot vector, and random vectors |
| `pe_pri_tb` | each set bit listed once, highest first, one per clock, then 0; hold under `adv` low; reload |
| `weight_ram_tb` | random rows, one-clock read latency, hold |
| `counter_neuron_tb`, `acc_neuron_tb` | random operation sequences including saturation, firing and threshold reloads |
| `pixel_scan_tb` | both modes, negative zero, back-pressure, *k* + 1 clocks per pass |
| `input_layer_tb`, `fc_layer_tb` | spike vectors against a model over many time steps, latency, back-pressure |
| `wbsnn_top_tb` | 60-31-31-10 network, 8 steps, six images, then two images with only 15 hidden neurons active |
| `wbsnn_full_tb` | the default 784-1023-1023-10 top, 16 steps: three images with all 1023 hidden neurons, then one image each as a 784-255-255-10, 784-127-127-10 and 784-63-63-10 network (unused hidden neurons disabled by their thresholds) |

`wbsnn_top_tb` runs a zero-skipping top and a full-scan top side by side. Both must match the model.
`wbsnn_top_tb` and `wbsnn_full_tb` also count these events and fail if any of them never happens:

* skipped zero pixels
* spikes in every layer
* count-down (inhibitory) updates
* negative potentials
* potentials carried across a time step
* empty spike vectors
* back-pressure between layers

The full-size test takes about 1.5 minutes to compile and a few seconds to run.
Weights and images in the tests are random, so the tests check that the hardware computes the network exactly. They say nothing about classification accuracy.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/wbsnn_pkg.sv tb/wbsnn_top_tb.sv --top-module wbsnn_top_tb
./obj_dir/Vwbsnn_top_tb
```

Replace `wbsnn_top_tb` with any other testbench name. Modules are found in `rtl/` through `-Irtl`. Random start values (`+verilator+rand+reset+2`) are fine, because everything that is read is reset.

## Files

* `rtl/wbsnn_pkg.sv`: default sizes and the layer state type
* `rtl/pe8.sv`, `rtl/prio_enc.sv`, `rtl/pe_tree.sv`, `rtl/pe_pri.sv`: priority encoders and the PE&PRI unit
* `rtl/weight_ram.sv`: binary weight memory
* `rtl/acc_neuron.sv`, `rtl/counter_neuron.sv`: the two neuron types
* `rtl/pixel_scan.sv`, `rtl/input_layer.sv`, `rtl/fc_layer.sv`: image buffer and layers
* `rtl/wbsnn_top.sv`: the network
* `tb/*.sv`: testbenches
