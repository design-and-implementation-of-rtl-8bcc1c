# Quantized CNN inference engine for camera frames

This is a small FPGA-style accelerator for an 8-bit quantized convolutional
network that classifies a 256 x 256 camera frame for a driver-assistance
perception stack. The host (an embedded ARM processor in the intended system)
does the image preprocessing and any post-processing. It loads the network's
int8 weights into the engine, then streams one frame in. The engine runs the
whole network on chip and streams back one score per class and the winning
class.

The network is fixed in structure:

| stage  | operation                                     | map in          | map out        |
|--------|-----------------------------------------------|-----------------|----------------|
| conv1  | 3x3 conv, 8 filters, bias, ReLU, 2x2 max pool | 256 x 256 x 3   | 128 x 128 x 8  |
| conv2  | 3x3 conv, 8 filters, bias, ReLU, 2x2 max pool | 128 x 128 x 8   | 64 x 64 x 8    |
| conv3  | 3x3 conv, 8 filters, bias, ReLU               | 64 x 64 x 8     | 64 x 64 x 8    |
| FC     | flatten (32768 values) x weight matrix + bias | 32768           | 10 scores      |
| output | argmax                                        | 10 scores       | class index    |

Some of this table comes from the design that this RTL follows, and some is
this implementation's own choice:

- **From the design:** three convolution layers with ReLU, two max-pooling
  layers, one fully connected layer, 8-bit integer weights and activations,
  and a 256 x 256 input.
- **Chosen here:** the 3x3 kernels, the 8 channels per layer and the 10
  classes. The source gives no layer widths. Ten is the number of BDD100K
  object categories.

## Arithmetic: how int8 values flow through a layer

Weights are quantized offline as `q = round(w * 2^s)` and pruned offline by
setting small weights to zero. Pruned weights are stored as ordinary zeros.
The hardware does not skip them.

For each output pixel and each output channel, the conv engine sums 9 taps x 8
input channels of int8 x int8 products into a 32-bit accumulator. The
`requant_relu` stage then brings this sum back to int8 in four steps:

1. Add the 32-bit bias.
2. Shift right by a per-layer amount `SHIFT[l]`, rounding half up. This
   removes the 2^s weight scale.
3. Apply ReLU: negative results become 0.
4. Saturate to at most 127.

ReLU comes before pooling, so everything stored between layers is in
[0, 127]. The input frame itself is signed int8. The FC layer uses the same
MAC hardware, but it keeps full 32-bit scores (`Y = W x + B`) and does not
requantize them.

The softmax that would follow the FC layer is not computed. It does not change
which class is largest, so the engine gives the argmax, and the host can
normalize the raw scores if it needs probabilities.

## The convolution engine and its schedule

One convolution engine (`conv_layer`) is reused for all three conv layers, one
layer after another, under `layer_sequencer`. Per layer:

- **`conv_ctrl`** walks the output pixels in raster order. For each pixel it
  issues one kernel tap per cycle (ky, kx = 0..2). Each tap is a feature-memory
  address. A tap that falls outside the map is flagged as padding, and zeros
  replace the data. The output map therefore has the input's size.
- **Feature memory words.** A feature-memory word holds all 8 channels of a
  pixel (64 bits). A single read therefore gives the whole input vector for
  one tap.
- **Conv weight words.** The conv weight memory returns the 8 x 8 weights of
  that tap (512 bits) in the same cycle.
- **`mac_array`** (8 x 8 multipliers and an adder tree per row) accumulates
  the 9 taps. It has two pipeline stages.
- **Pooling or direct write.** After `requant_relu`, `maxpool2x2` pools the
  stream. It keeps a holding register and a half-row buffer of pair maxima,
  and emits one pooled pixel per 2x2 window in raster order. Conv3 has no
  pool: its pixels are written back at their own address.

The cost is exactly 9 cycles per conv output pixel, plus a tail of a few
cycles. At the default size:

| phase               | cycles                |
|---------------------|-----------------------|
| frame load          | 65,536 (1 pixel/beat) |
| conv1 (256 x 256)   | 589,824               |
| conv2 (128 x 128)   | 147,456               |
| conv3 (64 x 64)     | 36,864                |
| FC (4096 pixels)    | 4,096                 |
| **total**           | **about 843,800**     |

At 150 MHz that is about 5.6 ms per frame, or about 178 frames per second. The
frame load is counted in that total; frames are not overlapped. The intended
system states 9.7 to 11 ms per frame and about 90 to 100 frames per second at
150 MHz, so this schedule meets that target. The engine's cycle counter
(register `CYCLES`) reports the measured value.

The 8 x 8 array is used at 3/8 in conv1, because the input has only 3
channels. Channels 3 to 7 of the frame are stored as zeros, and their weights
should be zero.

## Memory plan (ping-pong feature banks)

`memory_controller` holds two simple dual-port RAMs of 64-bit words:

| bank | words  | holds                                             |
|------|--------|---------------------------------------------------|
| 0    | 65,536 | input frame, then conv2 output                    |
| 1    | 16,384 | conv1 output, then conv3 output (read by the FC)  |

Each layer reads one bank and writes the other, so data is never copied. The
read port is shared by the conv engine and the FC engine, because only one of
them runs at a time. In total the two banks hold 5.2 Mbit of feature storage.

The weights sit in two wide RAMs (`weight_memory`):

- **Conv weights:** 27 words x 512 bits.
- **FC weights:** 4096 words x 640 bits, 2.6 Mbit. One word holds all 10
  classes' weights for one pixel of the flattened map, so the FC layer takes
  one pixel per cycle. In effect, 80 MACs run in parallel as a matrix-vector
  unit.

## Interfaces

**AXI-lite slave** (20-bit byte address, 32-bit data). A write is accepted when
AWVALID and WVALID are both high. WSTRB is ignored.

| address            | register                                                              |
|--------------------|-----------------------------------------------------------------------|
| `0x00000` CTRL     | write bit 0 = 1 to start an inference (ignored while busy)            |
| `0x00004` STATUS   | bit 0 busy, bit 1 done, bit 2 frame error, bits 15:8 predicted class  |
| `0x00008 + 4l`     | SHIFT of conv layer l (l = 0..2), reset value 7                       |
| `0x00018` CYCLES   | cycles of the last inference, from start to the last result beat      |
| `0x01000 + ((l*9 + tap)*16 + lane)*4` | conv weights: byte `o*8 + c` of a tap word, at lane `(o*8+c)/4`, byte `(o*8+c)%4` |
| `0x02000 + (l*8 + o)*4` | conv bias, signed 32-bit                                         |
| `0x03000 + k*4`    | FC bias of class k                                                    |
| `0x80000 + (p*32 + lane)*4` | FC weights of flattened pixel p: byte `k*8 + c` (class k, channel c), lanes 0..19 |

Unmapped addresses, and reads of weight memory (which is write-only), answer
SLVERR. The tap index is `ky*3 + kx`. The flattened FC input index is
`p*8 + c`, with `p = y*64 + x`.

**AXI-stream slave (image).**

- Each beat carries one pixel, in raster order: R, G and B as int8 in
  `tdata[7:0]`, `[15:8]` and `[23:16]`.
- `tready` is high only while a frame is expected, which is from CTRL.start
  until the 65,536th beat.
- `tlast` must be set on the last beat. If it is not, STATUS bit 2 is set.

**AXI-stream master (result).**

- Beats 0..9 carry the 10 signed 32-bit scores, in class order.
- Beat 10 carries the class index, with `tlast` set.
- At the end, `irq` pulses for one cycle and `pred_class` holds the class.

**Clocking and reset.** There is one clock. `rst_n` is an active-low
asynchronous reset. It clears the control state but not the memories.

## Files

| file | role |
|------|------|
| `rtl/dnn_pkg.sv` | sizes, types (`conv_cfg_t`, `phase_e`), register addresses |
| `rtl/dnn_accel_top.sv` | top level, wires everything below |
| `rtl/layer_sequencer.sv` | load -> conv1 -> conv2 -> conv3 -> FC -> output; bank plan; cycle counter |
| `rtl/axil_weight_loader.sv` | AXI-lite slave: registers, biases, weight writes |
| `rtl/input_interface.sv` | image AXI-stream into bank 0 |
| `rtl/memory_controller.sv`, `rtl/feature_memory.sv` | ping-pong feature banks |
| `rtl/weight_memory.sv` | wide weight RAM with 32-bit lane writes |
| `rtl/conv_layer.sv`, `rtl/conv_ctrl.sv` | convolution engine and its tap/address FSM |
| `rtl/mac_array.sv` | pipelined int8 MAC array (conv and FC) |
| `rtl/requant_relu.sv` | bias, rounding shift, ReLU, saturation |
| `rtl/maxpool2x2.sv` | streaming 2x2 max pool |
| `rtl/fc_engine.sv` | FC matrix-vector unit |
| `rtl/output_formatter.sv` | argmax and result stream |

Every module has its own self-checking testbench, `tb/tb_<module>.sv`. Each
one ends by printing `TB_RESULT checks=N failures=M`. There are two end-to-end
tests:

- **`tb/tb_dnn_accel_top.sv`** runs two 16 x 16 frames through the whole
  engine and compares every score with a reference model written in the
  testbench. It also checks the cycle count. It confirms that each mechanism
  happens at least once: zero padding, pooling, ReLU clamping, saturation,
  both bank directions, and input and output back-pressure.
- **`tb/tb_dnn_accel_full.sv`** does the same for one 256 x 256 frame at the
  default parameters, and also checks the 11 ms per frame bound at 150 MHz.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_dnn_accel_top \
  -Irtl -y rtl -y tb +libext+.sv rtl/dnn_pkg.sv tb/tb_dnn_accel_top.sv -o sim
./obj_dir/sim
```

Replace the top-module name and the file to run any other testbench. The
package must come first on the command line. The full-size test needs a few
minutes to compile and about a minute to run: it loads 82k FC weight words
over AXI-lite and computes the reference convolutions in the testbench.

## Changing the design

- **Frame size:** set the `H` and `W` parameters of `dnn_accel_top`. They
  must be multiples of 4, and `H*W` sizes the feature banks and address
  widths. The FC weight memory scales with `(H/4)*(W/4)`. The AXI-lite map
  allows up to 4096 FC pixels, so frames larger than 256 x 256 need a wider
  address.
- **Channels and classes:** `CH` and `NCLS` in `dnn_pkg`. The register map
  assumes `CH*CH/4 <= 16` conv lanes and `NCLS*CH/4 <= 32` FC lanes.
- **Layer count and pooling placement:** these live in `layer_sequencer`,
  which derives the size, pool flag and source bank of each layer from the
  layer index.

## How far to trust it, and where it departs from the source

- **What is tested.** The behaviour is checked in simulation against an
  independent reference model. This has been done at 16 x 16 and at
  256 x 256, with random weights and frames. Each unit test has also been
  run against a deliberately broken copy of its module, and the test caught
  the fault each time. The design has not been run on an FPGA, and nothing
  here has timing closure at 150 MHz. The `mac_array` adder tree and the
  address multipliers in `conv_ctrl` are the likely critical paths.
- **Network shape.** The source's own descriptions disagree:
  - Its text describes three conv layers, two pools and one FC layer. That
    is what is built.
  - Its algorithm listing pools after every conv layer.
  - Its per-layer resource chart lists Conv1, Conv2, FC1, FC2 and an output
    layer.
- **One shared engine.** The source maps "every network layer" to its own
  hardware. Here one engine runs the three conv layers in turn, which keeps
  the design small. Running the layers as a pipeline of separate engines
  would raise throughput but is not done.
- **Interfaces.** The source names AXI-stream between BRAM and the MAC
  array, and an AXI4 memory interface. Inside the engine the RAMs are reached
  through plain synchronous ports. AXI appears only at the boundary: the
  image stream, the result stream and the AXI-lite control port.
- **Not built:**
  - the host processor, the DMA engines that feed the streams, camera
    capture and any DDR path;
  - softmax (only the argmax is computed);
  - quantization and pruning, which happen offline before the weights are
    loaded.
- **Choices made here.** Kernel size, channel count, class count, padding,
  the rounding and saturation rule, the register map and all handshakes are
  choices of this implementation. Each module's opening comment says which
  parts follow the source and which were chosen here.
