# Streaming LeNet accelerator for an FPGA edge device

An IoT camera node should send the internet *what it saw*, not the raw
pixels. This design provides the part of such a node that runs on the FPGA
fabric of a processor-plus-FPGA SoC, such as a Cyclone V with an ARM host on a
DE1-SoC board. A small LeNet-style convolutional network for handwritten
digits is mapped completely into hardware: every layer, every kernel and every
multiplier exists as its own circuit. The image streams through the network
one pixel per clock. All layers work at the same time on different parts of
the same image, so the result is ready 13 clocks after the last pixel goes in.

The processor side is not included. That is the Linux program that fetches the
image, drives the DMA engines and publishes the result over MQTT. The design
starts where the DMA engines write into on-chip memory and ends where they read
the result back out.

## System operation

```
 DMA 1 ──► On-Chip Memory 1 ──► read_image ──► cnn_process ──► write_output ──► On-Chip Memory 2 ──► DMA 2
 (ocm1_* ports)   784 x 8 bit       1 pixel/clk     13-clk latency     1 word/position     16 x 80 bit    (ocm2_* ports)
                                        ▲                                     │
 start ─────────────────────────► fpga_ctrl ◄──────────── frame_done ─────────┘
 finish_irq ◄───────────────────────────┘
```

One frame runs like this:

1. The host (in a test, the testbench) writes the 28x28 8-bit image into
   On-Chip Memory 1 at addresses 0 to 783, row by row.
2. The host raises `start`. A rising edge is a request, so a level that stays
   high does not start a second frame.
3. `fpga_ctrl` holds the network in reset for one clock. The network has no
   start-of-frame input: a reset is how a new frame begins. The controller
   also returns the output writer to address 0.
4. `read_image` reads one address per clock and feeds the network.
5. `write_output` packs each of the 4x4 output positions into one 80-bit word.
   That word holds ten signed 8-bit features, with feature 0 in bits 7:0. It
   is written to On-Chip Memory 2 at addresses 0 to 15.
6. After the 16th word, `finish_irq` goes high. It stays high until the next
   `start` edge. The host then copies On-Chip Memory 2 out.

From the clock edge that samples `start` to the edge that first sees
`finish_irq`, a frame takes exactly **802 clocks**:

- 3 clocks to clear the network and start the reader
- 784 clocks for the pixels
- 13 clocks of network latency
- 2 clocks to write the last word and raise the interrupt

That is 16 µs at the 50 MHz clock the design was meant to run at.

## Number format

Every value inside the network is a signed 8-bit integer, and
S = 2^(8-1) − 1 = 127 stands for 1.0. A trained model's weights lie in
[−1, 1], so scaling them by S turns them into 8-bit integers.

- **Pixels.** `input_layer` maps pixels to 0 … 127 by keeping their top 7 bits.
- **Bias.** A product of two scaled numbers carries S twice. The bias is
  therefore added at that scale: it is shifted left by 7 before it is added.
- **Rescaling.** The `tanh_layer` brings the sum back to the 8-bit scale with
  an arithmetic shift right by 7.
- **Bias clamping.** Biases are clamped to [−127, 127] so that every
  parameter fits the chosen bit width. Without the clamp, large biases
  overflow the parameter format.

**The weights are placeholders.** The trained LeNet weights are not
available. `cnn_pkg::weight()` and `cnn_pkg::bias_raw()` produce fixed
integers from a hash of the layer, kernel, channel and position:

- weights: `((h*h + 3h) mod 31) − 15`
- raw biases: `(h*h mod 509) − 254`, which the clamp limits to ±127

To use a real model, replace these two functions with lookups of the
quantised values: round(w·127) for weights and round(b·127) for biases. The
multipliers take their weights as elaboration-time constants. Synthesis
therefore removes multiplications by 0, turns multiplications by 1 into wires
and turns multiplications by powers of two into shifts. Nothing needs to be
done by hand for that.

## Window extraction: how a stream becomes convolutions

This is the part of the design that most needs explaining. Pixels arrive
one at a time, row by row. A KxK kernel needs K pixels from each of K
consecutive rows. When the newest pixel sits at (row r, column c), the window
whose bottom-right corner is that pixel spans the last K−1 full rows plus K
pixels of the current row. That is exactly

    DEPTH = IW·(K−1) + K   values   (117 for the 28-wide image, 53 for the 12-wide one)

`taps` is a single shift register of that length. The window element at
(ky, kx) is always at the fixed position `IW·(K−1−ky) + (K−1−kx)` behind the
newest value. All K² values can therefore be wired straight out of the shift
register, with no addressing at all.

The original generator used one line buffer per kernel row, chained together.
That design added a clock of skew between rows and repeated the same logic.
This design uses one register chain instead, so all rows of a window are
aligned by construction.

`neigh_extractor` adds the controller: column and row counters over the
accepted values. Windows that would wrap around the left edge or start above
the image are not reported. A window is flagged valid only when the newest
pixel has column ≥ K−1 and row ≥ K−1. A 28x28 image thus gives 24x24 windows.
There is no padding and the stride is 1. The counters wrap at the end of the
image, so frames may also follow each other back to back.

`tensor_extractor` registers the window. From the clock that accepts a pixel
to the valid window it completes takes 2 clocks: one to store the pixel in
the taps and one to register the window.

## Dot products and activation

Each kernel has its own `dot_product`:

- **`mcm`** forms all products of the window and the constant weights in one
  clock. There are 25 products in layer 1 and 125 in layer 2.
- **`moa`** adds them and the bias in a balanced binary adder tree (7 levels
  for 125 operands) and registers the sum.

The sum is 2·8 + log2(N) + 2 bits wide, so it cannot overflow.

`tanh_layer` is combinational and adds no clock. With x being the rescaled
sum, it computes a three-segment approximation:

| \|x\| | output |
|---|---|
| ≤ 63 | x |
| 64 … 316 | 63 + (\|x\| − 63)/4 |
| ≥ 317 | ±127 |

The segments meet at about 0.5 and 2.5 in real terms, close to tanh. The
exact form of the original activation is unknown; this approximation is a
choice of this design.

All kernels of a layer run in lock step on the same window. A convolution
layer therefore produces one output pixel of all its feature maps per valid
window.

## Max pooling inside a stream

The network has two 2x2 pooling layers, each split into two stages:

- **`pool_v`** keeps one image line (IW values) per channel in a shift
  register. On every pixel of an odd row (rows counted from 0), it outputs the
  larger of the pixel and the pixel directly above it, which is IW places
  back. Pixels of even rows are only stored.
- **`pool_h`** keeps the first value of each pair and, when the second one
  arrives, outputs the larger of the two. The row width must be even. This
  holds for the 24 and 8 used here, and `pool_layer` asserts it.

Each stage takes one clock, so a pooling layer takes 2. Only 2x2 windows with
stride 2 are supported.

## Stream handshake and stalls

Every stage has the same control inputs:

- `clk`, and an asynchronous active-low `rst_n`.
- `enable`. When `enable` is low, every register holds, including the valid
  flags, so the whole pipeline freezes without losing or duplicating data.
  A consumer takes an output only on a clock where both `out_dv` and `enable`
  are high.
- `in_dv` with `in_data`. A value is accepted on a clock where both `enable`
  and `in_dv` are high. `in_dv` may have any pattern of gaps.

The output of a convolution or pooling layer is itself a stream with gaps. It
feeds the next layer directly.

`read_image` stalls together with the network. Its memory read enable follows
`enable`, so the memory output holds during a stall.

## Timing budget

| Stage | Clocks |
|---|---|
| input layer | 1 |
| convolution layer: tensor extractor 2 + MCM 1 + MOA 1 + tanh 0 | 4 |
| pooling layer: poolV 1 + poolH 1 | 2 |
| whole network: 1 + 2·4 + 2·2 | **13** |

The 13 clocks run from accepting the last pixel to the last output. The
testbenches check this figure, the per-layer latencies and the 802-clock
frame time.

## Files

Files in `rtl/`, one module or package each:

| File | Role |
|---|---|
| `cnn_pkg.sv` | bit width, scale factor, network sizes, latencies, `data_t`, weight and bias functions |
| `fpga_system.sv` | top: controller, both memories, reader, network, writer |
| `fpga_ctrl.sv` | start edge → clear → run → interrupt |
| `on_chip_memory.sv` | true dual-port RAM with a registered read (read-before-write); port B wins a same-address write collision |
| `read_image.sv`, `write_output.sv` | memory ↔ stream adapters |
| `cnn_process.sv` | input layer, conv 1 (5 kernels 5x5), pool, conv 2 (10 kernels 5x5x5), pool |
| `input_layer.sv` | pixel → signed network format |
| `conv_layer.sv` | `tensor_extractor.sv`, `neigh_extractor.sv`, `taps.sv`, `dot_product.sv`, `mcm.sv`, `moa.sv`, `tanh_layer.sv` |
| `pool_layer.sv` | `pool_v.sv`, `pool_h.sv` |

Feature map sizes are 28x28x1 → 24x24x5 → 12x12x5 → 8x8x10 → 4x4x10.

The design has these resources:

- 1375 constant multipliers
- about 19 k flip-flops, most of them in the taps lines and pipeline
  registers
- 7552 bits of RAM

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. `tb/cnn_ref_pkg.sv` is a plain reference
model: nested loops over whole feature maps, without streaming.

With Verilator 5, from the top directory:

```
verilator --binary --timing -y rtl -y tb rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv \
          tb/tb_fpga_system.sv --top-module tb_fpga_system -Mdir obj -o sim
./obj/sim
```

Replace `tb_fpga_system` with any other testbench name to run that one.

The testbenches check the following:

- **`tb_fpga_system`** runs three frames through the whole system at full
  size: random pixels, a solid bar, and stripes that follow the sign pattern of
  the weight formula. It plays the part of the DMA engines and the host. It
  checks every output feature against the reference, the 802-clock frame time,
  and the number of windows and pooled values of every layer. It also checks
  that one network reset happens per frame and that a `start` held high through
  a frame does not start another. It counts activation outputs in each of the
  three tanh segments and fails if one is never reached. With the placeholder
  weights, only the stripe frame reaches saturation.
- **`tb_cnn_process`** runs the network alone on three frames. One frame has
  random input gaps and random `enable` stalls. The test checks every output
  and the 13-clock latency.
- **`tb_workload_digits`** runs six digit images (1, 3, 4, 5, 7, 9, drawn as
  thick strokes) back to back through the full system. It checks all features
  and the frame time of each.
- **The layer and unit testbenches** run the same kind of comparison at small
  sizes. They cover odd image widths, multiple channels, stalls and
  back-to-back frames.

Every testbench runs in well under a second.

## Changing the design

- **Network size.** Set the `cnn_process` / `fpga_system` parameters: image
  size, kernel size, kernel counts. The taps depth, line buffer lengths and
  counter widths follow from them. Image and intermediate widths must give
  even widths for pooling.
- **Bit width.** Change `BITWIDTH` in `cnn_pkg`. The scale factor, product
  and sum widths follow.
- **Weights.** Replace `weight()` and `bias_raw()` in `cnn_pkg`. The
  reference model uses the same functions, so the testbenches keep working.

## Departures and limits

- **Bit width.** The original design leaves the bit width as a generator
  option. 8 bits is this design's choice.
- **Weights.** The weights are synthetic (see above). The network computes
  correctly, but it does not classify digits until real weights are loaded.
- **Fully connected layer.** The final layer (4x4x10 → 10 classes) is not in
  hardware. The 160 features go to the host, which finishes the
  classification.
- **Activation.** The piecewise-linear tanh and the shift-by-7 rescaling
  (division by 128, not 127) are this design's choices.
- **Frame signals.** No frame-valid input or output is built. A frame starts
  with a reset, and the output writer counts 16 outputs.
- **Memories.** The width of On-Chip Memory 2, the word packing and the
  one-clock memory read latency are assumptions. The DMA engines must match
  them.
- **Interrupt.** Edge detection of `start` and an interrupt that stays high
  until the next start are assumptions.
- **Input layer latency.** The input layer's 1-clock latency is an
  assumption. The other stage latencies follow the source design's timing
  budget.
- **Fit on the FPGA.** Whether the 1375 multipliers fit an 85 K logic
  element device has not been checked with vendor tools.
