# Streaming CNN accelerator for two-class image classification

This is a small convolutional neural network built as a hardware pipeline. It
classifies a 28×28 grey-level image, such as a downscaled dermoscopic picture of a
skin lesion, into one of two classes (melanoma or not melanoma). The network is the
classic LeNet-style stack: convolution, ReLU, max-pool, convolution, ReLU,
max-pool, a fully connected layer, and a soft-max stage. Each layer is a
hardware stage of its own. All stages run at the same time on a stream of pixels,
and every map of a layer is computed in parallel. A new input pixel enters every
clock cycle, and the class comes out 828 cycles after `start`.

The structure follows a published FPGA design: a CNN for skin-cancer images on an
Artix-7 board, written there in VHDL. That description fixes the layer sequence,
the map and kernel sizes, the 9-bit data and 5-bit kernel words, and the block
structure of each layer: a kernel ROM with a multiply-accumulate array, a
comparator-based pooling unit, and an FC layer that has feature-map RAMs next to
weight ROMs. It leaves several things open: the number of maps per layer, the
fixed-point scaling, the handshakes and the trained weights. The choices made for
them here are listed in [Choices and departures](#choices-and-departures).

## The network

| stage | input | operation | output |
|---|---|---|---|
| image read | external memory | 784 reads, one per cycle, raster order | 1 × 28×28 stream |
| CONV1 + ReLU | 1 × 28×28 | 5×5 kernels, stride 1, no padding, 16 output maps | 16 × 24×24 |
| POOL1 | 16 × 24×24 | 2×2 max, stride 2 | 16 × 12×12 |
| CONV2 + ReLU | 16 × 12×12 | 5×5 kernels, 4 output maps, each sums all 16 input maps | 4 × 8×8 |
| POOL2 | 4 × 8×8 | 2×2 max, stride 2 | 4 × 4×4 |
| FC + ReLU | 4 × 16 values | 2 neurons, `y[k] = Σ x·W + b[k]` | 2 values |
| soft-max | 2 values | decision (largest value wins), then `exp(y[k]−y_max)/Σ` | class, score, 2 probabilities |

A convolution layer computes, for output map `n` and output pixel `(x, y)`:

    G[n][x][y] = ReLU( sat9( ( Σm Σi Σj C[m][x+i][y+j] · K[n][m][i][j] + b[n] ) >>> SHIFT ) )

with `i, j = 0 … 4`. `sat9` clamps to the 9-bit range −256 … 255. The FC layer
uses the same requantisation, `>>> SHIFT_FC` followed by `sat9` and ReLU.

## How the stream flows

Everything between the image reader and the FC layer is a stream of *raster
order* pixels qualified by a one-bit valid. A stage never stalls its upstream
neighbour. It only reacts to valid cycles, so gaps in a stream are allowed
anywhere. Each stage keeps its own row and column counters, which wrap at the end
of a frame, and so knows where the current pixel lies in its map. All maps of a
layer share one valid, because they are produced in lock step (assertions in
`conv_layer` and `cnn_top` check this).

**Image reader (`image_loader`).** `start` makes it issue `img_rd` with addresses
0 … 783 on 784 consecutive cycles. Each word returns one cycle later and becomes a
valid pixel.

**Window buffer (`line_window`).** A 5×5 convolution needs the current pixel and
the four rows above it. The buffer keeps four line memories of `W` words, indexed
by column, and a 5×5 register window. Every valid pixel shifts the window one
column to the left. The new right-hand column is the four stored pixels of that
column plus the new pixel, and the line memories move down by one row. When the
pixel just taken lies at row ≥ 4 and column ≥ 4, the next cycle holds a complete
window that lies inside the map, and `win_valid` is raised. Only `W` differs
between CONV1 (28) and CONV2 (12), so the two layers differ only in the size of
this buffer.

**Processing-element array (`conv2d_pe`).** This is 25 multiply-add PEs. Each PE
multiplies one window pixel by one kernel weight and adds the product to the
partial sum from its left neighbour. The last PE of a row passes its sum to the
first PE of the next row. The chain is combinational and ends in one register.
There is one array for every pair (output map, input map): 16 in CONV1 and 64 in
CONV2.

**Adder tree (`adder_tree`).** For each output map, a balanced tree adds the
partial sums of all input maps and the map's bias, followed by one register.

**Requantisation and ReLU (`relu`).** The registered sum is shifted, saturated to
9 bits, and sent through the ReLU multiplexer, which selects 0 when the sign bit
is set. A convolution output is therefore valid three cycles after the pixel that
completes its window.

**Max pooling (`maxpool`, one per map).** On an even column the pixel is held in
`max_1a`. On the next, odd column a comparator keeps the larger of the two
(`max_1b`). On an even row this pair maximum goes into a row buffer of `W/2`
words. On an odd row it is compared with the stored maximum from the row above
(`max_2`), and the result leaves with `dout_valid` one cycle later. Every second
pixel of every second row therefore produces an output.

**Fully connected layer (`fc_layer`).** The 16 values of each POOL2 map are
written, as they arrive, into one RAM per map. After the 16th value, the
controller reads the RAMs element by element, once per neuron. Beside each RAM
sits a weight ROM (`weight_rom`) for the same map. Every cycle, the four RAM words
are multiplied by their four ROM words in parallel, and the four products are
added into the neuron's accumulator, which starts from the neuron's bias. After
16 elements the accumulator is requantised and ReLU-clipped, and the neuron's
value leaves with its index. Neuron `k` rises `16·(k+1) + 1` clock edges after the
edge that stores the last POOL2 value. `busy` covers the computation. New input
during that time is an error, caught by an assertion. In the full pipeline this
cannot happen, because the next image's POOL2 data are hundreds of cycles away.

**Soft-max (`classifier`).** Soft-max is monotonic, so the class with the highest
probability is the neuron with the largest value. The classifier keeps a running
maximum over the neurons as they arrive. One cycle after the last neuron it
reports `result_class` and `result_score`. A tie goes to the lower class number.
It then computes the probabilities `p[k] = exp(y[k]−y_max) / Σj exp(y[j]−y_max)`
in two passes, one class per cycle:

* The first pass sums `exp(y[j]−y_max)`. The value comes from a 512-entry table
  of Q16 words, indexed by the difference `y_max − y[j]`.
* The second pass divides each term by the sum and outputs `prob` (Q0.8, where
  255 means 1.0) with `prob_valid` and `prob_idx`.

Neuron values are read as fixed point with 4 fraction bits (`FRAC`), so a
difference of 16 is a factor of e. The table is computed at elaboration with
integer arithmetic: a Taylor series for `exp(−1/16)`, then repeated
multiplication. No data file is needed.

For the two-class network, the probabilities leave 3 and 4 cycles after
`result_valid`.

### Timing of one image at the default size

| event | cycle after `start` |
|---|---|
| first `img_rd` | 1 |
| last pixel read | 784 |
| last CONV2/POOL2 output | shortly after the last pixel, set by pipeline registers |
| `result_valid` | 828 |
| probabilities | 831, 832 |

`busy` stays high from `start` until the last probability. A `start` while `busy` is
ignored. Images are processed one at a time, and the next one can start as soon
as `busy` falls.

## Number formats and weights

* Feature-map words: 9-bit two's complement. The input image uses 0 … 255.
* Kernel and FC weights: 5-bit two's complement (−16 … 15).
* Biases: 12-bit two's complement, in the units of the full-width sum before
  the shift.
* Sums are computed at full width (`cnn_pkg::acc_width`), so nothing overflows
  before the final shift and saturation.
* Shifts: `SHIFT1 = 6`, `SHIFT2 = 8`, `SHIFT_FC = 6` (parameters of `cnn_top`).

**The weights are placeholders.** No trained network comes with this design. The
ROM contents come from four functions in `cnn_pkg`: `conv_weight`, `conv_bias`,
`fc_weight` and `fc_bias`. Each one hashes its coordinates, (layer, output map,
input map, row, column) or (neuron, map, element), into the weight range. The two
FC neurons get opposite weights and biases, so both classes can occur. To run a
trained network, replace the bodies of these four functions with lookups of your
quantised weights. The RTL and the testbench reference model both read the
values from there, and nothing else changes. The kernel ROMs are constants wired
into the multipliers, and the FC ROMs are tables read through a registered port.

## Interface of `cnn_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `start` | in | 1 | begin one image (ignored while `busy`) |
| `busy` | out | 1 | image in flight |
| `img_rd` | out | 1 | read strobe to the external image memory |
| `img_addr` | out | 10 | pixel address, `row·28 + column` |
| `img_data` | in | 9 | pixel, valid the cycle after `img_rd` |
| `result_valid` | out | 1 | one-cycle pulse: result ready |
| `result_class` | out | 1 | 0 or 1 |
| `result_score` | out | 9 | value of the winning FC neuron |
| `prob_valid` | out | 1 | one pulse per class after `result_valid` |
| `prob_idx` | out | 1 | class number of `prob` |
| `prob` | out | 8 | soft-max probability, Q0.8 (255 = 1.0) |
| `sat_event`, `relu_event` | out | 1 | some layer saturated / ReLU-clipped a value this cycle |

The image memory is not part of the design. Any memory with a one-cycle
registered read port fits. For a different latency, change `RD_LAT` of
`image_loader`.

## Choices and departures

These points are decided here, not by the design this RTL follows:

* **Map counts.** CONV1 produces 16 maps and CONV2 produces 4. The original gives
  no counts in its text. A synthesised netlist of its first convolution layer has
  a 160-bit output, made of 10-bit words, and its FC block has four feature-map
  RAMs. Both are parameters (`N1`, `N2`).
* **Internal word width.** That netlist keeps 10-bit words inside the
  convolution layer. Here, every port between layers is 9 bits, as the layer
  block diagrams show, and the sums are full width.
* **Scaling.** The shift-and-saturate requantisation and the shift values are
  this design's own.
* **Soft-max arithmetic.** The fixed-point reading of the neuron values
  (4 fraction bits), the exponential table and the 8-bit probabilities are this
  design's own. The original states only that a soft-max layer classifies.
* **FC activation.** ReLU is applied to the FC outputs before the decision, as
  the original's layer table specifies.
* **PE registers.** The original's PE drawing has a register in every PE of the
  5×5 array. Here the chain is combinational with one register at the end,
  which gives the same results with one cycle of latency.
* **Control.** The original's layer diagrams show a state machine per layer that
  drives a read address into the previous layer's data. Here only the image
  reader and the FC layer generate addresses. The convolution and pooling stages
  take their neighbours' streams directly, and their position counters play the
  role of that state machine.
* **Input size.** The network is sized for 28×28 inputs. A full-resolution
  dermoscopic image, such as 764×575, must be scaled down before it is written
  to the image memory.
* **Weights.** Placeholder values, as described above. Classification quality
  cannot be judged from this RTL alone.

## Files

| file | contents |
|---|---|
| `rtl/cnn_pkg.sv` | widths, types, requantisation functions, ROM contents |
| `rtl/cnn_top.sv` | the whole pipeline |
| `rtl/image_loader.sv` | external-memory reader |
| `rtl/conv_layer.sv` | convolution + ReLU layer |
| `rtl/line_window.sv` | line buffer and 5×5 window |
| `rtl/conv2d_pe.sv` | 5×5 multiply-add PE array |
| `rtl/adder_tree.sv` | sum over input maps plus bias |
| `rtl/relu.sv` | ReLU multiplexer |
| `rtl/maxpool.sv` | 2×2 max pooling |
| `rtl/fc_layer.sv` | fully connected layer with map RAMs |
| `rtl/weight_rom.sv` | FC weight ROM bank |
| `rtl/classifier.sv` | soft-max: decision and probabilities |
| `tb/cnn_ref_pkg.sv` | integer reference model of all layers |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends the simulation.
With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv tb/cnn_top_tb.sv \
        --top-module cnn_top_tb -o sim
    ./obj_dir/sim

The two packages are named first. Verilator finds the modules in `rtl/` and `tb/`
by their file names. To run another test, name its file and module instead of
`cnn_top_tb`. The full-size test builds in under a minute and runs in well under a
second.

What the tests cover:

* `cnn_top_tb`: eight images at the default size (noise, dark and light blobs, a
  gradient and a constant). It compares both FC neuron values, the class and the
  score with the reference model, and both probabilities with a floating-point
  soft-max (within 2 LSB). It also checks the raster read order at one
  pixel per cycle, the POOL1/POOL2 output counts, a constant start-to-result
  latency, and that a `start` while busy is ignored. It requires that saturation,
  ReLU clipping and both class decisions each happen at least once.
* `ph2_batch_tb`: a batch like the PH2 dermoscopy set, with 200 images: 80
  resemble common nevi, 80 atypical nevi and 40 melanomas. The images are
  synthetic, drawn as lesions on skin. They run back to back, and each result is
  checked against the reference model. One image takes 833 cycles from start to
  start, so the whole set takes 166,600 cycles, or 1.67 ms at 100 MHz. With the
  placeholder weights, the class counts mean nothing.
* `conv_layer_tb`: a 2-input, 3-output-map layer on 9×8 frames with random
  stream gaps. It checks every output value, its three-cycle latency, and the
  saturation and ReLU flags.
* `line_window_tb`, `maxpool_tb`: every window and every pooled value, with
  gaps and several frames back to back.
* `fc_layer_tb`: random and extreme inputs, values, cycle timing and `busy`.
* `conv2d_pe_tb`, `adder_tree_tb`, `relu_tb`, `weight_rom_tb`, `classifier_tb`,
  `image_loader_tb`: unit tests of the remaining blocks.

All of them pass. For each module, a deliberately broken variant (a dropped bias,
a wrong comparator, a mis-ordered line buffer, and so on) makes its testbench
fail.
