# Binarized neural-network accelerator for a low-end FPGA

In a binarized neural network every weight and every activation is +1 or −1, so each
can be stored as one bit. A multiply becomes an XNOR: two bits agree (product +1) or
disagree (product −1). A sum of products becomes a pop-count of the agreeing bits. Batch
normalisation followed by the sign function can be reduced to a shift, an add and a
comparison. That makes the hidden layers of a network like YOLOv3-tiny cheap enough for a
small Zynq board such as the PYNQ-Z1. There, the ARM cores run the full-precision input
and output layers, and the programmable logic runs the binarized hidden layers.

This repository is the programmable-logic part of such a system, in synthesizable
SystemVerilog. It takes a stream of binary feature-map pixels (or binary vectors) from a
DMA engine. It runs one binarized layer on them and returns the binary results as a
stream. A convolution layer is convolution, then optional max pooling, then shift-based
batch norm, then sign. A fully-connected layer is a matrix-vector product compared with a
threshold.

Bit coding everywhere: **bit 1 = +1, bit 0 = −1**.

## Dataflow

```
 s_axis ─► input FIFO ─┬─► CNV core: sliding_window ─► mvau ─► maxpool (or bypass)
                       │             ─► sbn_unit ─► sign_act ───────────────┐
                       └─► FC core:  fc_layer (mvau + thresholds) ──────────┤
                                                                            ▼
 m_axis ◄─ output FIFO ◄─ bin_to_fp16, or score_fmt for raw FC ◄── core select
```

`bnn_accel_top` runs one layer per run. Software does the following:

1. Write the layer's weights, batch-norm parameters or thresholds through the `prm_*`
   port.
2. Set `cfg_mode` (CNV or FC), `cfg_pool_en`, `cfg_pool_k3`, `cfg_fc_raw` and
   `cfg_out_beats`.
3. Pulse `start`.
4. Stream the input into `s_axis` and read the results from `m_axis`. `m_axis_tlast`
   marks the last beat, and `done` pulses after it.

`cycles` counts the clock cycles of the last run.

All internal links are valid/ready streams: a beat moves when both are high. A
back-pressured output therefore stalls the whole chain, with no data lost. Every unit
keeps its throughput of one word per cycle whenever its output is taken.

Default parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `DIM` | 416 | square input map size (YOLO input) |
| `IN_CH`, `OUT_CH` | 16, 16 | channels of the convolution layer |
| `K`, `PAD` | 3, 1 | 3×3 kernel with "same" padding, stride 1 |
| `SIMD` | 64 | XNOR lanes per processing element |
| `PE` | 16 | processing elements (output channels or neurons per pass) |
| `FC_IN`, `FC_OUT` | 1024, 1024 | fully-connected layer size |
| `IN_DEPTH`, `OUT_DEPTH` | 2 | stream buffer depths |
| `FP16_OUT` | 1 | results as half-precision ±1.0 (1) or as packed bits (0) |

The layer shape is fixed when the design is built, as in a high-level-synthesis flow:
one build per layer shape.

## The PE array and folding (`mvau`, `xnor_popcount`)

`mvau` is the engine shared by the convolution and FC cores. It computes y = W·x for a
binary matrix W with `OUT_N` rows. The vector x arrives as `SF` words of `SIMD` bits,
each with a lane mask.

- **Per word.** Each of the `PE` processing elements takes one matrix row.
  `xnor_popcount` counts the lanes where weight and input agree, leaving out lanes whose
  mask bit is 0. The count is added to the PE's accumulator.
- **Result.** After the last word, the signed dot product is `2·agree − n`, where n is
  the number of valid lanes in the whole vector. This is exactly Σ wᵢxᵢ over ±1 values.
- **Folding.** With `OUT_N > PE`, the rows are covered in `NF = OUT_N/PE` passes, called
  neuron folds. Fold f uses rows f·PE … f·PE+PE−1.
- **Replay.** During fold 0, the incoming words are also written to an input buffer of
  `SF` words. Folds 1 … NF−1 read the vector from that buffer instead of the stream. The
  producer sends each vector only once, and `in_ready` is low during the replay.
- **Weight memories.** Each PE has its own memory of `NF·SF` words of `SIMD` bits,
  address `nf·SF + sf`. The reads are synchronous, which lets synthesis map them to block
  RAM.
- **Pipeline.** Stage 1 issues a word and reads the weights. Stage 2 does
  XNOR/pop-count/accumulate, and on the last word loads the output register. All stages
  advance together on `adv = !out_valid || out_ready`, so a stall at the output freezes
  the pipeline without losing anything.
- **Cost.** A vector costs `SF·NF` cycles, plus two cycles of latency.

For the default convolution, SF = 3·3·⌈16/64⌉ = 9 words per output pixel and NF = 1. That
gives 9 cycles per output pixel, and 416·416·9 ≈ 1.56 M cycles per layer. For the default
FC layer, SF = 16 and NF = 64, which gives 1024 cycles per vector.

## Sliding window and padding (`sliding_window`, `conv_layer`)

Input pixels arrive in raster order, one pixel per beat, with all of its channels in one
word (channel-last). For every output position, the convolution needs that position's
K×K×C receptive field as a flat vector: one column of the "column-expanded" feature map.
`sliding_window` produces these columns as a stream, without ever storing the whole map.

- **Line buffer.** It holds K+1 image rows (4 × 416 pixels × 64 bits at the defaults).
  K rows serve the current output row while the next input row is written into the spare
  row, so input and output overlap.
- **Flow control** works per row. An output row can start once its K source rows are in
  the buffer. A new input row is accepted only while a free row slot exists.
- **Word order.** For each output position, the unit emits K·K·CF words (CF = ⌈C/SIMD⌉)
  in the order ky, kx, channel word. `out_last` marks a window's last word.
- **Padding.** The map is surrounded by `PAD` rows and columns of padding. Padding
  positions are not stored. Instead, their words go out with an all-zero mask, so the PE
  array leaves them out of the dot product. The unused top lanes of a partial channel word
  are masked the same way. For a ±1 network this is the same as zero padding, because
  padding adds nothing to the sum and is not counted in n.
- **Frames.** After the last window of a frame, the unit starts the next frame.

`conv_layer` connects the window to an `mvau` with PE = output channels per pass. Its
kernel memory word for (output channel o, ky, kx, channel word cf) is at PE `o mod PE`,
address `(o / PE)·SF + (ky·K + kx)·CF + cf`. Bit i of a word is channel `cf·SIMD + i`. The
result leaves as `OUT_CH/PE` beats per output pixel, raster order, each beat carrying PE
signed 32-bit sums.

## Max pooling on integer sums (`maxpool`)

Pooling comes **before** batch norm and sign, on the integer dot products. Pooling after
binarization would turn most windows into +1. Both windows have stride 2, and the mode
is chosen at run time by `k3`.

- **2×2 (k3 = 0).** On even rows, each column's values are written into a one-row buffer
  (`pool_buffer_odd`, DIM × NF entries). On odd rows, the incoming value is compared with
  the stored one, which gives the column maximum. `pool_reg` holds the column maximum of
  an even column until the odd column arrives. Their maximum is the output. Output size
  is DIM/2.
- **3×3 (k3 = 1).** Neighbouring windows share one row and one column. The 3×3 maximum is
  built from overlapping 2×2 maxima.
  - The row buffer holds the running maximum of the rows of the window being built.
  - A shared row (rows 2, 4, …) first closes the old window with its value, then starts
    the new window from that same value.
  - Columns work the same way through `pool_reg`.
  - There is no padding, so the output size is (DIM−3)/2 + 1.

Every pixel arrives as NF beats (channel groups), so the buffer and `pool_reg` hold one
entry per channel group. The unit emits at most one beat per input beat, one cycle later.
Comparisons are signed.

## Shift-based batch norm and sign (`sbn_unit`, `sign_act`)

Batch norm with the division replaced by a shift, per output channel:

```
y = sal(x − μ, φ) · (neg ? −1 : +1) + β      φ = round(log2|γ/σ|),  neg = sign(γ/σ) < 0
```

`sal` shifts left for φ > 0 and arithmetically right for φ < 0. The parameters are
computed off-line and written per channel as an `sbn_param_t`: μ (32-bit signed), φ
(6-bit signed), neg, and β (48-bit signed).

y is a 48-bit fixed-point number with 8 fractional bits (`SBN_FRAC`). This keeps right
shifts and a fractional β exact to 1/256. The channel of lane l in beat n (modulo NF) is
n·PE + l, so parameter address = channel.

`sign_act` then outputs 1 when y ≥ 0. A non-zero activation threshold τ is folded into β
beforehand. Each of the two units is one registered stage.

## Fully-connected layers (`fc_layer`)

`fc_layer` is an `mvau` plus a threshold memory. Neuron j outputs 1 when its dot product
is **strictly greater** than τⱼ. Batch norm and sign of an FC layer collapse into this one
comparison, with τ computed off-line.

- **Input.** The vector arrives as ⌈IN_N/SIMD⌉ words. A partial last word is masked
  automatically.
- **Weights.** Neuron o, word s is at PE `o mod PE`, address `(o/PE)·SF + s`.
- **Output.** FC_OUT/PE beats of PE bits per vector.
- **Raw scores.** The last layer of a classifier is not binarized, because software turns
  its scores into probabilities with a softmax. For this layer, a run with
  `cfg_fc_raw = 1` returns each neuron's signed dot product instead of its bit
  (`out_dot`, formatted by `score_fmt`):
  - with `FP16_OUT = 1`, as a half-precision number, rounded to nearest with ties to
    even. This is exact up to ±2048, so exact for any layer of up to 2048 inputs.
  - with `FP16_OUT = 0`, as a 16-bit integer, saturated.

  `tb_score_fmt` checks both forms against an integer reference.

## Stream buffers, fp16 return and control

- **`axis_fifo`** is a valid/ready circular-buffer FIFO and sits at the input and output
  of the top. Its default depth of 2 is the usual HLS stream depth. Increase `IN_DEPTH`
  and `OUT_DEPTH` to absorb DMA burstiness.
- **`bin_to_fp16`** turns each result bit into half-precision +1.0 (`16'h3C00`) or −1.0
  (`16'hBC00`), so the processing system can read results as 16-bit floats. With
  `FP16_OUT = 0`, the bits stay packed in the low lanes instead. That is the option for a
  larger device, where the next layer reads 1-bit data.
- **`layer_ctrl`** latches the configuration at `start`. It keeps `busy` high until
  `cfg_out_beats` output beats have been taken, drives `tlast` on the last one, then
  pulses `done`. A `start` while busy, or with zero beats, is ignored.
- **Input gating.** The input stream is accepted only while busy.

## Parameter port of the top

| `prm_sel` | Target | `prm_pe` | `prm_addr` | `prm_data` |
|---|---|---|---|---|
| 0 | CNV kernels | PE | (o/PE)·SF + (ky·K+kx)·CF + cf | bits [SIMD−1:0] |
| 1 | SBN parameters | – | channel | bits [86:0] = {μ, φ, neg, β} |
| 2 | FC weights | PE | (o/PE)·SF + s | bits [SIMD−1:0] |
| 3 | FC thresholds | – | neuron | bits [31:0], signed |

## Simulating

Each unit has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_mvau rtl/bnn_pkg.sv tb/tb_mvau.sv
./obj_dir/Vtb_mvau
```

Replace `tb_mvau` with any testbench:

- `tb_score_fmt`, `tb_xnor_popcount`, `tb_mvau`, `tb_sliding_window`, `tb_conv_layer`, `tb_maxpool`,
  `tb_sbn_unit`, `tb_sign_act`, `tb_fc_layer`, `tb_axis_fifo`, `tb_bin_to_fp16` and
  `tb_layer_ctrl` test the units. Their parameters are scaled down, and random
  back-pressure is applied at both ends.
- `tb_bnn_accel_top` runs the whole accelerator at a small size: 8×8 map, 5→4 channels,
  FC 20→4. It covers a CNV layer without pooling, with 2×2 and with 3×3 pooling, FC
  runs and a raw-score FC run, all under random stalls. Results are compared with a reference model in the
  testbench, and it checks that every mechanism (stalls, bypass, fold replay, mode
  switch, padding) occurred.
- `tb_bnn_full` uses the top at its default parameters. It runs a 416×416×16 convolution
  layer with 2×2 pooling (about 1.56 M cycles, a few seconds of simulation) and two
  1024→1024 FC vectors, each checked against the reference model. It then runs the same
  two vectors again with raw scores.

- `tb_bnn_workloads` builds the accelerator four times: at hidden-layer shapes of three
  networks, plus one output configuration. It runs each build end to end with random
  stalls, through one pooled CNV run, one FC run and one raw-score FC run. The first three builds are:
  - a pruned YOLOv3-tiny layer: 104×104, 19→25 channels, 2×2 pooling;
  - a CIFAR-10 VGG-style layer: 16×16, 256→256 channels, 2×2 pooling, plus an
    8192→1024 FC layer;
  - an AlexNet layer: 13×13, 384→256 channels, 3×3 stride-2 pooling.

  A fourth build uses the larger-board configuration: packed-bit results
  (`FP16_OUT = 0`) and 16-word stream buffers, on a 52×52, 25→51-channel YOLO layer.

  Compiling it takes about two minutes; simulating it takes a few seconds.

All top testbenches share `tb/bnn_top_tb_body.svh`. `tb/bnn_layer_env.sv` wraps that body
as a parameterised module, so one testbench can run several builds.

## Where this design departs from its source, and what it leaves out

- **Lane count.** The PE lanes are 64 bits wide (`SIMD = 64`) and the pop-count is
  32 bits wide. One description of the scheme speaks of 32 operand pairs per kernel; the
  64-bit datapath was chosen, and `SIMD` is a parameter.
- **Stride and padding.** The convolution uses stride 1 with one pixel of padding, which
  keeps a 416×416 map at 416×416 before pooling. Padding is done by masking, not by
  storing zeros.
- **Equality case.** The CNV activation uses `≥ 0` and the FC threshold uses `> τ`,
  following the two formulas as given for the two layer types.
- **Pooling buffers.** The 2×2 pooling keeps only one row in a buffer. The second row of
  a pair is compared as it streams in, rather than being stored in a second buffer.
- **Raw scores.** Returning the final FC layer's scores, and their fp16 rounding or
  16-bit saturation, is this design's reading of "classification in the logic, softmax
  in software".
- **Stream buffers.** The default depth of 2 is an assumption. The source only says
  that deeper buffers helped on the larger board.
- **Not measured.** The design has been simulated, not run on a board, so there are no
  clock-frequency, frame-rate or resource figures for it. Returning fp16 instead of 32-bit
  values was a resource measure on the small board. Its effect on LUT and DSP use is a
  property of the synthesis result, and the RTL cannot show it.
- **Not included.**
  - Average pooling, which the pooling structure would also suit.
  - The full-precision input and output layers, the bounding-box and softmax steps, the
    DMA engine and the processor system. These all run in software or vendor IP around
    this block.
- **Reset and control.** Reset is synchronous and active-low. It clears control state,
  but not the weight or parameter memories, which must be written before use. The
  register interface (plain `start`/`cfg_*`/`prm_*` ports) is this design's own. In a
  system it would sit behind an AXI-lite register block.
- **Fixed-point format.** The SBN fixed-point format (48 bits, 8 fractional) and the
  parameter memory layouts are this design's own.
- **Layer shapes.** One build handles one layer shape. Pruned networks with odd channel
  counts (for example 19 or 122 output channels) need `PE` to divide `OUT_CH`, or a build
  per layer.
