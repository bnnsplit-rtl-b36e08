# BNNsplit: a 2-bit convolutional BNN split across FPGA nodes

A convolutional binarized neural network (here the CIFAR-10-style "CNV"
network with 2-bit weights and 2-bit activations) is too big to keep every
parameter on one small FPGA, and its convolution layers are far slower than
its fully connected layers. BNNsplit cuts the network where the least data
crosses the cut — after the last convolution, where one image is only
**256 channels x 2 bit = 64 bytes** — and turns each half into its own
streaming kernel with AXI4 memory ports:

* **part 1** (`part1_kernel`): six 3x3 convolutions and two 2x2 max pools,
  image in, 64-byte "chunk" out;
* **part 2** (`part2_kernel`): three fully connected layers, chunk in, ten
  class scores out.

Because part 2 is light, one fully connected node can serve several
convolutional nodes. `bnnsplit_top` builds the three-node arrangement of the
original work: two convolutional nodes feed one fully connected node through
its input buffer (`fc_input_buffer`).

```
 images (AXI4) ─► part1_kernel ─┐ 64 B/img
                                ├─► fc_input_buffer ─► part2_kernel ─► scores (AXI4)
 images (AXI4) ─► part1_kernel ─┘
```

Everything is SystemVerilog-2017 (`rtl/`), with self-checking testbenches
(`tb/`) that compare bit-exactly against a reference model of the network.

## Where the network is cut

| stage | operation | input | output | bytes/img out | PE | compute cycles/img |
|---|---|---|---|---|---|---|
| conv0 | 3x3 conv, 8-bit pixels in | 32x32x3 | 30x30x64 | 14400 | 16 | 900·37 |
| conv1 | 3x3 conv | 30x30x64 | 28x28x64 | 12544 | 16 | 784·37 |
| pool0 | 2x2 max | 28x28x64 | 14x14x64 | 3136 | – | streaming |
| conv2 | 3x3 conv | 14x14x64 | 12x12x128 | 4608 | 16 | 144·73 |
| conv3 | 3x3 conv | 12x12x128 | 10x10x128 | 3200 | 8 | 100·145 |
| pool1 | 2x2 max | 10x10x128 | 5x5x128 | 800 | – | streaming |
| conv4 | 3x3 conv | 5x5x128 | 3x3x256 | 576 | 4 | 9·577 |
| conv5 | 3x3 conv | 3x3x256 | 1x1x256 | **64** ← cut | 1 | 1·2305 |
| fc0 | 256 → 512 | | | | 16 (SIMD 64) | 128 |
| fc1 | 512 → 512 | | | | 16 (SIMD 64) | 256 |
| fc2 | 512 → 10, raw scores | | | | 10 (SIMD 64) | 8 |

The layer count, the 2-bit precision, the split point and the 64-byte chunk
come from the BNNsplit design; the exact shapes are those of the CNV network
it builds on (they give the 12544-byte and 64-byte figures it quotes). The
parallelism per layer (PE output channels per cycle, SIMD inputs per cycle
in the fully connected layers) is this implementation's choice. All
constants live in `rtl/bnn_pkg.sv`.

## Number formats

* Weights: 2-bit two's complement, −2..1.
* Activations: 2-bit unsigned, 0..3. Input pixels: 8-bit unsigned.
* Accumulators: 16-bit signed (the largest possible sum, conv0's
  27·255·2, fits).
* Activation function: each output channel has three ascending signed
  16-bit thresholds; the activation is the number of thresholds the
  accumulator reaches (`acc >= t`). This is how batch normalisation and
  2-bit quantisation are folded into a streaming BNN.
* The last fully connected layer has no thresholds; it outputs its 16-bit
  accumulators as class scores.

These formats are choices of this implementation; the original only fixes
the 2-bit width of weights and activations.

## Inside a kernel: memory batch → stream → memory batch

Each kernel is a chain of valid/ready streams that all run at once, so
successive images overlap in the pipeline:

```
axi_mem2stream ─► width_conv ─► layers ... ─► width_conv ─► axi_stream2mem
 (AXI4 read)      64 → pixel                   vector → 64    (AXI4 write)
```

* `axi_mem2stream` reads `num_words` 64-bit words from `base_addr` as INCR
  bursts of up to 16 beats, never across a 4 KB boundary, one burst in
  flight, and streams them out; a stalled consumer stalls the bus.
* `width_conv` is a general gearbox (least significant bits first) between
  any two widths: 64 → 24 bits for RGB pixels, 512 → 64 for the chunk,
  64 → 512 and 192 → 64 in part 2.
* `axi_stream2mem` writes the stream back in the same burst pattern and
  waits for each write response.

Memory layouts:

* image: 3072 bytes (384 words); byte `3p+c` is channel `c` of pixel `p`
  (raster order), byte 0 in bits 7:0 of word 0;
* chunk: 64 bytes (8 words); conv5 channel `c` in bits `2c+1:2c` of the
  512-bit chunk, word 0 holding channels 0..31;
* result: 24 bytes (3 words); class `k` score in bits `16k+15:16k`, upper 32
  bits zero.

A kernel job is a one-cycle `start` with `num_images`, `src_addr` and
`dst_addr` (8-byte aligned; 64-byte aligned destinations keep every burst to
whole chunks). `busy` stays high until the last write response, then `done`
pulses.

## How a convolution layer computes

`conv_layer` is the heart of part 1 and the part that determines its speed.
Pixels arrive one per transfer with all input channels side by side.

1. **LOAD**: the whole input feature map is written into an internal buffer
   (`IFM_DIM²` cycles, one pixel each).
2. **COMPUTE**: for each output pixel, for each group of `PE` output
   channels, the layer spends 9 cycles, one per kernel position. Each cycle
   reads the input pixel under that position (all `IFM_CH` channels) and one
   weight-memory row holding `PE × IFM_CH` weights, forms `PE` dot products
   (`mac_dot`) and adds them to `PE` accumulators. After the ninth position
   the accumulators go through the thresholds (`thresh_act`) and the `PE`
   2-bit results are written into the output pixel register.
3. **EMIT**: once all `OFM_CH/PE` groups are done the output pixel is
   offered; the layer continues with the next pixel when it is taken, and
   returns to LOAD after the last one.

Compute time per image is `OFM_DIM² · (9·OFM_CH/PE + 1)` cycles plus the
load. The multipliers are 2-bit × unsigned products, small enough for plain
LUT logic; no DSP blocks are needed (the original also found LUT multipliers
to be the best choice).

The weight memory is laid out so one row feeds one cycle: row
`(oc/PE)·9 + kpos`, lane `(oc mod PE)·IFM_CH + ic`.

Because a layer does not accept the next image while it computes, and it
holds its output until the next layer is in LOAD, neighbouring layers
alternate rather than fully overlap. One convolutional node therefore
delivers an image about every 62k cycles (conv0 + conv1 compute time) in
simulation, with about 96k cycles from start to the first chunk. A
sliding-window line buffer would let load and compute overlap; it is not
implemented.

`maxpool` needs no buffer of the whole map: it keeps the first pixel of each
horizontal pair, stores pair maxima of even rows in a half-width row buffer
and emits the 2x2 maximum during odd rows.

`fc_layer` registers the input vector, then loops over `OUT_CH/PE` neuron
groups × `IN_CH/SIMD` input slices, one slice per cycle, and offers the
whole output vector at the end (`1 + groups·slices` cycles). The whole
fully connected part takes about 300 cycles per image, roughly 100 times
less than a convolutional node, which is why one fully connected node can
serve several convolutional nodes.

## Loading weights and thresholds

Parameters are not built into the logic; they are written through a simple
bus (`bnn_pkg::cfg_t`), one item per cycle, before a job starts:

| field | meaning |
|---|---|
| `we` | write strobe |
| `layer` | 0..5 convolutions, 6..8 fully connected |
| `kind` | 0: one weight, 1: the three thresholds of a channel |
| `oc`, `kpos`, `ic` | output channel, kernel position `ky·3+kx` (0 for fc), input channel |
| `data` | weight in `[1:0]`; thresholds t0,t1,t2 in `[15:0]`, `[31:16]`, `[47:32]` |

Part 1 holds 1,144,512 weights, part 2 398,336 weights. The memories are
not reset.

## The three-node system

`bnnsplit_top` instantiates `N_CONV` (default 2) `part1_kernel`s, one
`fc_input_buffer` and one `part2_kernel`. Each convolutional node has its own
parameter bus, job control and AXI4 read port for its images; the fully
connected node has its own parameter bus, job control and AXI4 write port for
the scores.

In the original system the nodes are separate boards linked by Gigabit
Ethernet and driven by host software. Here the network is left out: the
convolutional nodes' AXI4 write masters connect straight to the buffer's
write slaves (their destination address is unused).

`fc_input_buffer` is a 64-word FIFO (eight chunks) with one AXI4 write slave
per convolutional node and one AXI4 read slave for the fully connected
kernel. A round-robin arbiter grants one writer for a whole burst (AW, all W
beats, B), so chunks never interleave; a full FIFO stalls `wready`, an empty
one `rvalid`. Chunks come out in the order they went in, so the fully
connected node's results follow the buffer's arrival order, not the image
order of either node. Start the fully connected node with the total number
of images all convolutional nodes will send.

## Verification

Every block has a self-checking testbench. Weights, thresholds and images
are generated by an integer hash (`tb/bnn_ref_pkg.sv`), so a testbench can
load them into the hardware and recompute them in its reference model. Test
weights have zero mean and the thresholds are placed around the expected
accumulator spread so that all four activation levels occur.

| testbench | what it checks |
|---|---|
| `tb_conv_layer` | 3 images at a reduced size, random gaps and back-pressure, every output value, compute cycle count |
| `tb_maxpool` | 3 images, back-pressure, every pooled value, one-cycle latency |
| `tb_fc_layer` | thresholded and raw-score modes, every output, cycle count |
| `tb_axi_mem2stream`, `tb_axi_stream2mem` | data, burst count, 4 KB splitting, `wlast`, busy/done, with a randomly stalling memory |
| `tb_fc_input_buffer` | two writers, one reader, order within each source, whole chunks, full-buffer stalls, alternating grants |
| `tb_part1_kernel` | full size, 2 images, all 512 output activations per image |
| `tb_part2_kernel` | full size, 4 chunks, all 10 scores per image |
| `tb_bnnsplit_top` | full size, two nodes × 10 images (20 per run), all scores traced back to their source image; requires buffer contention, full-buffer stalls and memory stalls to occur |

`tb/axi_mem_model.sv` is a behavioural AXI4 memory (it stands in for DDR)
that withholds ready/valid at random.

Run one testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/bnn_pkg.sv tb/bnn_ref_pkg.sv tb/tb_bnnsplit_top.sv \
    --top-module tb_bnnsplit_top -o sim
obj_dir/sim
```

Each prints `TB_RESULT checks=N failures=M`. The full-size runs load about
1.1 million parameters one per cycle and take around a minute each.

## Departures and limits

* Layer shapes, number formats, the threshold activation, parameter loading,
  per-layer parallelism, burst policy and buffer depth are this
  implementation's choices where the original is silent.
* The convolution layer buffers the whole feature map instead of using a
  line buffer, so layers alternate and a convolutional node's interval is
  about the sum of its two slowest layers.
* No clock frequency or board timing is modelled, so the original's
  throughput figures (287 img/s per convolutional board, 720 chunks/s for
  the fully connected board, 574 img/s for the three boards) cannot be
  compared directly. In cycles, the fully connected node here is about 100
  times faster than a convolutional node, against about 2.5 times on the
  original boards.
* The Ethernet network, host computers, processors, DDR memory and the
  software that schedules jobs are not included. The DSP-based multiplier
  variants of the original are not included either; only the LUT-based
  form is.
* `fc_input_buffer` ignores AXI4 addresses and answers every read from its
  FIFO; the AXI4 masters use a subset of AXI4 (no IDs, cache or protection
  signals) and ignore error responses.
