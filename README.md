# Binarized AlexNet as one on-chip pipeline

This is SystemVerilog for a low-latency inference engine for a binarized
neural network (BNN). It targets AlexNet on 224×224 images. Every neuron and
every weight is a single bit. Every layer of the network is built as its own
block of hardware, holds its own weights in on-chip memory, and streams its
output straight into the next layer. Nothing is ever reloaded between layers
or between images.

Two ideas carry the design:

* **One integer compare per neuron.** A BNN layer normally runs
  XNOR → popcount → activation → batch normalisation → binarisation, and
  the normalisation works in floating point. Here the last three steps
  collapse into a single compare of an integer against a per-channel integer
  threshold. That threshold is computed offline from the normalisation
  constants and rounded up. No floating point is left in the datapath.
* **All layers run at once on the same image.** A layer does not wait for
  the previous layer to finish an image. It starts computing as soon as
  enough input rows have arrived to form its first convolution window.
  While the last layers finish image *n*, the first layers already work on
  image *n+1*.

## Bits and arithmetic

A bit `1` stands for +1 and a bit `0` stands for −1. The product of an input
and a weight is therefore `XNOR`. The sum over a window of N = K·K·C_in
products is

    x = 2·popcount(XNOR(a, w)) − N

The fused comparison layer outputs

    y = ( max(x, 0) ≥ T )

Here `T` is the threshold of that output channel, a 16-bit unsigned integer.
`bnn_pe` computes exactly this. It takes the popcount as a partial sum over
the `SIC` input-channel groups, then applies `2·sum − N`, clamps at zero and
compares. Negative folded thresholds (channels with a negative
normalisation scale) are not handled. The hardware only implements
`max(x,0) ≥ T`.

## A layer: channels in parallel and in sequence

Every convolution or fully connected (FC) layer is one `bnn_layer`. It is
described by four numbers:

| name | meaning |
|---|---|
| `PIC` | input channels handled in the same cycle (bits per input word) |
| `SIC` | number of input-channel groups handled one after another; C_in = PIC·SIC |
| `POC` | output channels handled in the same cycle = number of processing elements (PEs) |
| `SOC` | number of output-channel groups handled one after another; C_out = POC·SOC |

One output pixel therefore takes `SIC·SOC` cycles. Each cycle, every one of
the POC PEs takes in K·K·PIC input bits and the same number of weight bits.
Choosing these four numbers per layer balances the layers against each
other. A layer with more work gets more PEs or more lanes, so that no stage
of the pipeline holds up the others.

Inside a layer (`bnn_layer.sv`), data flows like this:

```
in stream ──► bnn_sidm ──window──► slice select ──► POC × bnn_pe ──► bnn_pool ──► out stream
                 ▲  │                  ▲               ▲   ▲         (optional)
                 │  └─win_valid──► bnn_layer_ctrl ──addr──► bnn_weight_mem
              stall         (soc, sic) steps
```

### The shared input data memory (SIDM), the hardest part

`bnn_sidm` turns a raster stream of pixels into K×K convolution windows
without ever storing a whole feature map.

* **Input order.** Pixels arrive in raster order. Each pixel arrives as
  `SIC` words of `PIC` bits, with channel group 0 first.
* **Row FIFOs.** It keeps `K−1` row FIFOs, each as long as a padded input
  row times SIC. The FIFOs are chained head to tail: what leaves FIFO k
  enters FIFO k+1. When a word of row r arrives, the same column and channel
  group of rows r−1 … r−K+1 are at the heads of the FIFOs. One column of the
  window (K words, one per row) is thus available every cycle.
* **Shift register.** A K×K×SIC shift register of such columns builds the
  window. The columns shift once per pixel, when channel group 0 arrives.
  The later channel groups of the same pixel fill in the newest column.
* **Padding.** The SIDM walks the *padded* map. Positions in the padding
  ring do not consume input. They insert a `0` bit, which means −1. This
  mirrors zero padding in a ±1 network.
* **Stride.** A window is complete when the position has reached the
  bottom-right corner of a window, and row and column lie on the stride
  grid (`(pos − (K−1)) mod STRIDE == 0`). Only such positions produce a
  window.
* **Double buffer.** A finished window is copied into a second register
  (`win_o`), which the PEs read for all `SIC·SOC` cycles of that pixel.
  The row FIFOs keep filling in the meantime. If the next window completes
  while the PEs still hold the previous one, the SIDM stops accepting input
  (`in_ready_o = 0`, `stall_o = 1`) until the control unit releases the
  window. This is the stall that back-pressures the previous layer.

Timing: `win_valid_o` rises in the cycle after the last word of a window's
bottom-right pixel is accepted. `win_release_i` frees the buffer in the
same cycle, so a fresh window can be copied in that cycle.

### Weights, and their word layout

`bnn_weight_mem` holds all of a layer's weights in one memory.

* **Width and depth.** A word is `POC·PIC·K·K` bits wide, one slice per PE.
  There are `SIC·SOC` words. The word for step (soc, sic) is at address
  `soc·SIC + sic`. The word is split into 32-bit lanes that are written
  separately and read all together.
* **Read latency.** Reads are synchronous with one cycle of latency, like a
  block RAM.
* **Bit layout.** Inside a word, the weight for PE `p`, window tap
  (ky, kx) and input channel `c` of the current group is bit

      p·(K·K·PIC) + (ky·K + kx)·PIC + c

  It belongs to output channel `soc·POC + p` and input channel
  `sic·PIC + c`. The window register of the SIDM uses the same tap and
  channel order, so a PE simply XNORs its slice of the weight word with the
  window slice.

### Control unit

`bnn_layer_ctrl` steps through the `(soc, sic)` pairs of each window, with
`sic` innermost. It is a two-stage pipeline:

1. Stage 1 issues the weight-memory read and selects the window's channel
   group `sic`.
2. Stage 2 presents the data to the PEs, with `first` (clear the
   accumulator) and `last` (compare and emit) flags.

The window is released on the last pair. The whole layer stops (`en`) when
the output side does not accept a result.

### Thresholds

* **Per-PE buffer.** Each PE owns a small rotating buffer of `SOC`
  thresholds (`bnn_thresh_buf`). The head is the threshold for the current
  output-channel group.
* **Rotation.** The buffer rotates one step each time the PE emits an
  output bit. After SOC outputs it is back at group 0, ready for the next
  pixel.

### Pooling

`bnn_pool` does 2×2, stride-2 max pooling. On ±1 values the max is a plain
OR.

* It keeps one row of partial results (`(IN_W/2)·SOC` words of POC bits).
* It sends a word out at the odd column of each odd row.
* Trailing odd rows and columns are dropped.

### Output side of a layer

Each pixel leaves the layer as `SOC` words of `POC` bits. These are the
output channels in group order, pooled or not. The next layer must
therefore have `PIC = POC` of this layer, and its SIC counts this layer's
SOC words (times the pixels for an FC layer).

## Fully connected layers are 1×1 maps

An FC layer is the same `bnn_layer` with `IN_W = IN_H = 1`, `K = 1`,
`PAD = 0`. The previous layer's whole output (6×6×256 bits for AlexNet's
first FC layer) streams in as the `SIC` words of one "pixel". The layer can
only compute once that whole vector has arrived. An FC layer thus overlaps
with the convolution layers of the *next* image, not with the same image's
convolutions.

## Default configuration: binarized AlexNet

`bnn_pkg` holds the AlexNet table that `bnn_alexnet_top` uses by default.
The layer shapes are standard AlexNet. The parallelism (PIC/SIC/POC/SOC) is
this design's own choice.

| layer | in map | K / stride / pad | C_in → C_out | PIC×SIC | POC×SOC | pool | PE-busy cycles per image |
|---|---|---|---|---|---|---|---|
| conv1 | 224×224 | 11 / 4 / 2 | 3 → 96 | 3×1 | 32×3 | yes | 55·55·3 = 9,075 |
| conv2 | 27×27 | 5 / 1 / 2 | 96 → 256 | 32×3 | 32×8 | yes | 27·27·24 = 17,496 |
| conv3 | 13×13 | 3 / 1 / 1 | 256 → 384 | 32×8 | 32×12 | no | 13·13·96 = 16,224 |
| conv4 | 13×13 | 3 / 1 / 1 | 384 → 384 | 32×12 | 32×12 | no | 13·13·144 = 24,336 |
| conv5 | 13×13 | 3 / 1 / 1 | 384 → 256 | 32×12 | 32×8 | yes | 13·13·96 = 16,224 |
| fc6 | 1×1 | 1 / 1 / 0 | 9216 → 4096 | 32×288 | 32×128 | no | 36,864 |
| fc7 | 1×1 | 1 / 1 / 0 | 4096 → 4096 | 32×128 | 32×128 | no | 16,384 |
| fc8 | 1×1 | 1 / 1 / 0 | 4096 → 1000 | 32×128 | 40×25 | no | 3,200 |

Maps shrink 224 → 55 → 27 → 13 → 13 → 13 → 6. The first FC layer therefore
sees a 6×6×256 = 9216-bit vector.

The weights total 62,367,776 bits. The memories at the default parameters
hold exactly that, with 32-bit lanes.

### Measured performance at the defaults

Two 224×224 images were streamed back to back through the full-size design
in simulation:

* **Latency:** the first image's 1000 outputs were complete 129,901
  cycles after its first input pixel.
* **Throughput:** the second image finished 68,746 cycles after the first.
  The input port alone needs 50,176 cycles per image, because it takes one
  3-bit pixel per clock. The rest of the gap comes from the stages being
  coupled without slack. Each SIDM holds only one spare window, so a slow
  layer (conv4, 144 cycles per pixel) repeatedly stalls the layers in front
  of it.

At 200 MHz this is about 650 µs latency and about 2,900 images/s. The
published design reaches 29 µs and 34,480 images/s. That would need far
more parallelism per layer and a wider input port than these defaults.
Both can be set through the parameters, but this configuration was not
built or checked.

## Top level: `bnn_alexnet_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, active-low synchronous reset |
| `cfg_i` | in | `cfg_req_t` | configuration bus: weights and thresholds |
| `img_valid_i` / `img_ready_o` | in/out | 1 | input stream handshake |
| `img_data_i` | in | `L_PIC[0]` (3) | one binarized RGB pixel per transfer, raster order |
| `res_valid_o` / `res_ready_i` | out/in | 1 | result stream handshake |
| `res_data_o` | out | `L_POC[NL-1]` (40) | 40 output neurons per word, 25 words per image, neuron `w·40 + b` at bit `b` of word `w` |
| `stall_o` | out | NL | per layer: its SIDM refuses input because the PEs are still busy |
| `busy_o` | out | NL | per layer: its PEs did work this cycle |

Both streams use valid/ready. A word moves on a clock edge where both are
high. Images can follow each other with no gap. `res_ready_i` may be
dropped at any time, and back-pressure then propagates layer by layer up to
`img_ready_o`.

### Configuration bus

`cfg_req_t` is `{we, layer[3:0], kind, bank[15:0], word[15:0], data[31:0]}`.
A request is acted on in every cycle where `we` is high.

* **`kind = CFG_WEIGHT`:** writes `data` into 32-bit lane `bank` of weight
  word `word` of layer `layer`. It uses the bit layout given above.
* **`kind = CFG_THRESHOLD`:** shifts `data[15:0]` into the threshold
  buffer of PE `bank` of layer `layer`. Write SOC values per PE, output
  group 0 first. The value for group s belongs to output channel
  `s·POC + bank`.

Load all layers before streaming the first image. The bus is not meant to
be used while images are in flight.

## Where this design departs from the published one

The published description gives the structure of a layer (SIDM, weight
memory, PEs made of XNOR, popcount and compare, control unit, pooling) and
the fused compare. It leaves much open. The choices made here:

* **Parallelism.** The per-layer PIC/SIC/POC/SOC values and the input
  width are not given. The values above are this design's, and the quoted
  latency is not reached (see above).
* **Pooling** is 2×2/stride-2, as the published design describes, rather
  than AlexNet's overlapping 3×3/stride-2. The map sizes still come out as
  AlexNet's (55 → 27, 27 → 13, 13 → 6).
* **Window memory.** The published SIDM uses K linked FIFOs. Here K−1 FIFOs
  plus the incoming row supply the K rows. A whole K×K×PIC window is handed
  to the PEs each cycle, rather than K×PIC values at a time.
* **Rate matching.** The published design tunes every layer so that
  production and consumption rates match, with almost no idle stages. Here
  each layer has one window of slack, and the rates are only roughly
  matched. The resulting stalls are counted by the testbenches and cost
  throughput (see the measured numbers above).
* **First layer input.** The first layer takes a binarized 3-channel
  image, one bit per colour. Integer first-layer inputs are not supported.
* **Last layer.** Its outputs are binarized by the same compare. There are
  no integer class scores and no argmax.
* **FC layers.** Every layer, FC included, is stream-connected. The FC
  layers can only start when their whole input vector is present (see
  above).
* **Padding** uses −1 (bit 0).
* **Weight memory.** The split between block RAM and distributed RAM is
  left to synthesis.
* **Timing.** There is no timing constraint or clock generation. The
  published design runs at 200 MHz on a Xilinx VCU118 board. The host side
  (PCIe, DMA, image preprocessing) is not part of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/bnn_pkg.sv` | constants, configuration-bus type, AlexNet parameter table |
| `rtl/bnn_popcount.sv` | popcount of an N-bit vector (64-bit groups summed) |
| `rtl/bnn_thresh_buf.sv` | rotating per-PE threshold buffer |
| `rtl/bnn_pe.sv` | PE: XNOR, popcount, accumulate over SIC, fused compare |
| `rtl/bnn_weight_mem.sv` | wide weight memory, 32-bit lanes |
| `rtl/bnn_sidm.sv` | line-buffer window generator with padding, stride, double buffer and stall |
| `rtl/bnn_layer_ctrl.sv` | (soc, sic) sequencer |
| `rtl/bnn_pool.sv` | 2×2 OR pooling on the output stream |
| `rtl/bnn_layer.sv` | one CONV or FC layer |
| `rtl/bnn_alexnet_top.sv` | all layers chained |

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bnn_popcount` | exhaustive-style random vectors at N = 363 and N = 7 |
| `tb_bnn_thresh_buf` | load order, rotation, hold |
| `tb_bnn_weight_mem` | lane writes and one-cycle reads against a model |
| `tb_bnn_pe` | accumulation over SIC groups, clamp and compare, threshold rotation |
| `tb_bnn_sidm` | every window bit, padding and stride against a direct model, with random input gaps and random release delays |
| `tb_bnn_layer_ctrl` | step order, flags, addresses, release |
| `tb_bnn_pool` | pooled output against a model, with back-pressure |
| `tb_bnn_layer` | one padded, strided, pooled layer against a software convolution |
| `tb_bnn_alexnet_top` | a reduced 4-layer network (2 CONV incl. pooling and stride, 2 FC): 3 images, random input gaps and output back-pressure |
| `tb_bnn_alexnet_full` | the top at its default AlexNet size: all weights loaded over the bus, two images, 2000 output bits compared |

`tb_bnn_net_ref.sv` is shared by the last two. It generates the weights and
thresholds from a hash, loads them over `cfg_i`, and computes the network
in software layer by layer. It compares every result word. It also counts
how often each mechanism happened:

* SIDM stalls;
* output back-pressure;
* two layers busy in the same cycle;
* an image entering before the previous one has left.

It fails if any of them never happened. It also checks that each layer's
PE-busy cycles equal `images × windows × SIC × SOC`.

The full-size run takes about a minute of simulation plus a similar build
time with verilator. Most of that time goes to loading the 62 million
weight bits over the 32-bit bus.

Any testbench can be run with plain verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bnn_layer \
  -y rtl -y tb +libext+.sv rtl/bnn_pkg.sv tb/tb_bnn_layer.sv
./obj_dir/Vtb_bnn_layer
```

## Changing the network

Give `bnn_alexnet_top` new parameter arrays (`NL`, `L_IN_W`, `L_IN_H`,
`L_PAD`, `L_K`, `L_STRIDE`, `L_PIC`, `L_SIC`, `L_POC`, `L_SOC`,
`L_POOL`). `tb_bnn_alexnet_top.sv` shows a small example. These rules must hold; the
top reports the first and the fourth with `$error` at elaboration:

* `L_PIC[i+1] = L_POC[i]`.
* The next layer's input map equals this layer's output map: after stride
  and padding, halved when pooling.
* At most 16 layers (4-bit `layer` field).
* Stream words of at most 64 bits.
* Weight depth `SIC·SOC` and lane count below 2^16.
* Thresholds fit in 16 bits.

For an FC layer, set `IN_W = IN_H = 1`, `K = 1`, and `SIC` = (the previous
layer's pixels × its SOC).
