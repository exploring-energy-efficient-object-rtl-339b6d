# Streaming quantised CNN classifier for CIFAR-10

This is a small convolutional neural network for 32x32 RGB images in ten
classes, built as a chain of dedicated hardware engines, one per layer.
Weights and activations are 1 or 2 bits wide. The engines pass data to each
other through streams, so the design works as a pipeline: a second image
enters the first layers while the first image is still in the dense layers.
All weights live on chip. The host loads them once, then streams pixels in
and reads class labels out.

The RTL follows a published FPGA study of quantised CNNs on Zynq devices
(Pynq-Z2 and a Zynq UltraScale+ ZU4EV board). That study built the
accelerator with a high-level-synthesis framework for binarised networks.
This is an independent SystemVerilog description of the same network and
engine structure. The network shape, the engine structure and the four
precision variants come from that study. Everything listed under
"Design choices" below was decided here.

## The network

| layer   | input        | output       | engine MW x MH | PE | SIMD | cycles / image |
|---------|--------------|--------------|----------------|----|------|----------------|
| conv1   | 32x32x3      | 30x30x32     | 27 x 32        | 16 | 3    | 16 200         |
| conv2   | 30x30x32     | 28x28x64     | 288 x 64       | 32 | 32   | 14 112         |
| pool1   | 28x28x64     | 14x14x64     | 2x2, stride 2  |    |      |                |
| conv3   | 14x14x64     | 12x12x128    | 576 x 128      | 16 | 32   | 20 736         |
| conv4   | 12x12x128    | 10x10x128    | 1152 x 128     | 16 | 32   | 28 800         |
| pool2   | 10x10x128    | 5x5x128      | 2x2, stride 2  |    |      |                |
| conv5   | 5x5x128      | 3x3x256      | 1152 x 256     | 4  | 32   | 20 736         |
| dense1  | 2304         | 512          | 2304 x 512     | 1  | 4    | 294 912        |
| dense2  | 512          | 512          | 512 x 512      | 1  | 8    | 32 768         |
| dense3  | 512          | 10 (64 rows) | 512 x 64       | 4  | 1    | 8 192          |

All convolutions are 3x3, stride 1, with no padding. An engine needs
`pixels x (MH/PE) x (MW/SIMD)` cycles per image. MW is the input vector
length, MH is the number of output channels, PE is the number of processing
elements and SIMD is the number of lanes per element.

The PE/SIMD split of each layer was not published as such. It is the unique
split that reproduces the per-layer latencies the study reports, when those
latencies are read as clock cycles.

Dense3 is computed with 64 rows, because its reported operation count and
latency correspond to 64 rows. Only rows 0 to 9 are class scores. The other
54 rows are computed and ignored, so their weights can be anything.

dense1 is the slowest engine, so it sets the image rate: one image every
294 912 cycles. That is 2.95 ms, or 339 images/s, at 100 MHz. The first
result appears about 380 700 cycles after the first pixel.

## Precision variants

`cnv_top` has two parameters, `WBITS` and `ABITS`. Each is 1 or 2, which
gives the four variants w1a1, w1a2, w2a1 and w2a2. The default is w1a1. The
folding and the cycle counts are the same for all four.

| value           | 1 bit                   | 2 bits                       |
|-----------------|-------------------------|------------------------------|
| weight          | `1` = +1, `0` = -1      | two's complement, -2 .. +1   |
| activation      | `1` = +1, `0` = -1      | unsigned 0 .. 3              |

The image pixels entering conv1 are 8-bit unsigned values.

Weight storage is 2 009 952 weights, which is 2.01 Mbit at 1 bit per weight
and 4.02 Mbit at 2 bits. On top of that each thresholded row has one
threshold (1-bit activations) or three (2-bit activations).

## The matrix-vector-threshold unit (`mvtu`)

This is the core of the design. Every convolution and dense layer is one
`mvtu` instance. Fed with one input vector of MW elements, it computes MH row
sums against its weight matrix. It then turns each sum into an activation
(or, in dense3, passes the raw 16-bit sum on).

The matrix is too large to compute in one cycle, so the unit folds it in two
directions:

- **Neuron fold, NF = MH/PE.** PE processing elements each compute one row at
  a time. PE `p` owns rows `p, PE+p, 2*PE+p, ...`.
- **Synapse fold, SF = MW/SIMD.** Each PE consumes SIMD columns per cycle.

One vector therefore takes `NF*SF` cycles. Steps run in the order
`(nf=0, sf=0..SF-1), (nf=1, sf=0..SF-1), ...`. All PEs share the same input
slice and the same step, first and last signals.

The input vector is latched whole into the **input vector buffer**. In every
step each PE (`mvtu_pe`) takes SIMD products, adds them to its accumulator,
and on the last synapse step of a row applies the thresholds. The results of
a row group go into a working copy of the **output vector buffer**. When the
last row group is done, that copy moves to the output register.

**Thresholds.** A row with T = 2^ABITS - 1 ascending thresholds outputs the
number of thresholds its sum reaches (`sum >= t`). With 1-bit activations
this is simply `sum >= t`, giving 1 (meaning +1) or 0 (meaning -1). Scaling,
bias and batch normalisation of a trained network fold into these
thresholds.

**Flow control.**
- A new vector is accepted in the same cycle that the previous one finishes,
  so vectors run back to back at exactly NF*SF cycles each.
- The result appears one cycle after the last step and stays until it is
  taken.
- If the previous result has not been taken, the engine stalls on its last
  step.

**Memories.** Each PE has its own memories, read combinationally:
- a weight memory of NF*SF words, each holding SIMD weights;
- a threshold memory of NF words, each holding T thresholds of 16 bits.

**Accumulator width.** The accumulator is 16 bits, signed. The worst cases
are 27 x 2 x 255 = 13 770 in conv1 and 2304 x 2 x 3 = 13 824 in dense1 with
2-bit weights and activations.

## Parameter loading (`cfg` port)

`cfg` is a packed struct (`cnv_pkg::cfg_t`). The host writes one word per
cycle:

| field   | meaning |
|---------|---------|
| `wr_w`  | write a weight word |
| `wr_t`  | write a threshold word |
| `layer` | 0..7 = conv1..conv5, dense1..dense3 |
| `pe`    | processing element `p` |
| `addr`  | weights: `nf*SF + sf`; thresholds: `nf` |
| `data`  | weights: lane `s` at `[s*WBITS +: WBITS]` holds W[row = nf*PE+p][col = sf*SIMD+s]; thresholds: threshold `k` at `[k*16 +: 16]`, ascending |

Column order inside a convolution row is `(ky*3 + kx)*C + c`. That is the
order in which the sliding window unit lays out a window (see below). For
dense1, the 2304 columns are the 3x3x256 map in the same order.

Load all parameters before sending images. Writes while images are in
flight are not blocked.

A full load is 377 440 weight writes plus 1 632 threshold writes. About
295 000 of the weight writes are for dense1.

## Sliding window unit (`swu`)

This unit turns a row-major pixel stream, with all C channels of a pixel in
one word, into one window vector per output pixel. Element
`(ky*K + kx)*C + c` of the window is channel c of pixel (ox+kx, oy+ky).

It keeps a ring of K+1 = 4 line buffers:
- A pixel of row y is accepted once row y-4 is no longer needed.
- A window is issued once its bottom-right pixel has arrived.
- The next image starts after the last window of the current one has been
  issued.

With K equal to the map size, the unit issues a single vector holding the
whole map. That is how the 3x3x256 output of conv5 is flattened for dense1.

## Max-pool (`maxpool`)

This is a 2x2 max-pool with stride 2, taken channel by channel on a pixel
stream. A register holds the left pixel of each pair. A half-row buffer
holds the pair maxima of even rows, which are combined with the odd row
below. Values are compared as unsigned codes, which orders both activation
encodings correctly.

## Top level (`cnv_top`)

```
img -> fifo -> swu -> conv1 -> fifo -> swu -> conv2 -> fifo -> pool1
    -> swu -> conv3 -> fifo -> swu -> conv4 -> fifo -> pool2
    -> swu -> conv5 -> fifo -> swu(flatten) -> dense1 -> fifo
    -> dense2 -> fifo -> dense3 -> argmax -> result
```

- `img_data`: one pixel per transfer, 32x32 pixels per image in row-major
  order. R is at `[7:0]`, G at `[15:8]` and B at `[23:16]`.
- `res_class`: the index of the highest of the ten scores. On a tie the
  lowest index wins.
- `res_scores`: the ten signed 16-bit scores, class `i` at `[i*16 +: 16]`.
- `stream_fifo`: two-entry valid/ready FIFOs that decouple the engines.

All streams use valid/ready handshakes. Reset is active-low and
asynchronous. It clears the control state, but not the parameter memories.

In the original system, a DMA engine moves images from the processor's DDR
memory into the accelerator over AXI and writes the classifications back.
The host writes the parameters over an AXI register interface. Those vendor
blocks are not part of this RTL. The plain stream and `cfg` ports are where
they would attach.

## Design choices and departures

These points were decided here, not taken from the original study:

- The value encodings and the threshold rule above.
- Loading through `cfg`.
- The FIFO depths.
- The line-buffer organisation.
- The class decision done in hardware.
- Parameter memories read combinationally, like distributed RAM. A
  block-RAM mapping would need a registered read and one more pipeline stage
  per engine.

These points resolve disagreements in the source:

- **Conv5 filters.** The system figure labels conv5 as 128 filters. The
  layer table and the operation counts give 256, which is what is built.
- **Dense widths.** The system figure shows 516 channels for the dense
  layers. The table gives 512, which is what is built.
- **Max-pool stride.** The layer table lists stride 1 for the max-pool
  layers, but the map sizes halve. Stride 2 is built.
- **2-bit latency.** The study reports longer convolution latency for w2a2
  and blames memory access. This RTL keeps identical cycle counts for all
  variants.

Not built:
- strided convolution, which is described only as background;
- the YOLOv3 detector, which is proposed only as future work;
- the processor system, AXI interconnects, reset IP, DRAM and the power
  meter.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module with a reference computed in the testbench, and each ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_mvtu_pe` | sums and 2-bit or 1-bit threshold outputs |
| `tb_mvtu` | two engine configurations under random backpressure; back-to-back rate of exactly NF*SF cycles per vector |
| `tb_swu` | every window of three 7x7 maps, plus the flatten case |
| `tb_maxpool` | three 6x6 maps |
| `tb_stream_fifo` | order, full flag and full-rate throughput |
| `tb_argmax` | random scores with ties |
| `tb_cnv_top` | the whole network at full size, default w1a1 |
| `tb_cnv_w1a2`, `tb_cnv_w2a1`, `tb_cnv_w2a2` | the same test for the other three variants |

The four end-to-end testbenches share `tb/tb_cnv_body.svh`. Each one:

1. generates weights from a hash of (layer, row, column);
2. runs a plain SystemVerilog model of the network on a random image and
   sets each layer's thresholds from the spread of that layer's sums, so
   that every activation level occurs;
3. loads all parameters through `cfg`;
4. streams two images back to back, holding the first result for 50 cycles.

It checks both classes and all twenty scores. It also checks:
- each engine's busy cycles against the cycles/image column above;
- that results come exactly one dense1 period (294 912 cycles) apart;
- that the second image entered before the first result left;
- that engines stalled on a busy consumer;
- that both pools produced their outputs;
- that every activation level was produced.

Each end-to-end run takes about 10 s to build and under 10 s to simulate.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cnv_pkg.sv rtl/*.sv tb/tb_cnv_top.sv --top-module tb_cnv_top
./obj_dir/Vtb_cnv_top
```

For a unit test, list `rtl/cnv_pkg.sv`, the module and its submodules, and
the testbench, for example
`rtl/cnv_pkg.sv rtl/mvtu_pe.sv rtl/mvtu.sv tb/tb_mvtu.sv --top-module tb_mvtu`.

Neither the classification accuracy of a trained network nor FPGA timing and
resource use have been checked here. The testbenches use synthetic weights.
