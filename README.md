# Mixed-precision ResNet20 accelerator

Each layer of this ResNet20 inference engine for 32x32 RGB images (CIFAR-10
style) uses its own integer bit-width: 6 to 8 bits for activations and 7 to 8
bits for weights. A general accelerator would build one wide multiplier array
for every layer. This one groups the layers by the multiplier type they need
and builds one processing element (PE) per group. All layers of a group are
folded onto that PE and run on it in turn. Narrow layers thus run on narrow
multipliers, and no multiplier is wider than its layers need.

| PE | Multipliers | Conv groups | Layers | Weight / activation bits |
|----|-------------|-------------|--------|--------------------------|
| 0  | 8 x 8       | 48 (432 multipliers)   | 1 (3 -> 16 channels)     | 8 / 8 |
| 1  | 7 x 6       | 128 (1152 multipliers) | 2-14 (16 and 32 channels) | 7 / 6 |
| 2  | 8 x 7       | 128 (1152 multipliers) | 15-21 (64 channels)      | 8 / 7 |
| 3  | 10 MACs, 8 x 8 | -                   | 22, fully connected 64 -> 10 | 8 / 8 |

A conv group is one 3x3 window: nine multipliers and their adder. The top
level is `rtl/mp_accel_top.sv`. It needs a clock, a reset, a start pulse and
an AXI4 read port to the memory that holds the image. It returns ten signed
class scores (`logits`) and a `done` pulse.

## Data flow of one inference

1. `axi_image_loader` reads the image once over AXI4. The image is 3 planes of
   32x32 signed bytes, 16-bit beats, in 6 INCR bursts of 256 beats. The loader
   writes the pixels into feature RAM 0.
2. `instr_fsm` holds a program of 275 instructions. It hands them out one by
   one to `layer_ctrl`.
3. For a convolution instruction, `layer_ctrl` does four things:
   - it streams the source feature map through the per-channel register
     buffers;
   - it feeds 3x3 windows of every input channel to the selected PE, one set
     of windows per clock;
   - it picks the tree level, rescale shift and output width of the layer;
   - it writes the quantized results into the destination feature RAM.
4. After layer 21, `layer_ctrl` averages each of the 64 channels over the 8x8
   map. It then streams the 64 averages into the FC PE (`fc_pe`), whose ten
   accumulators are the logits.

There are two feature RAMs and they alternate. The result RAM of one layer is
the source RAM of the next. The source changes whenever the layer number in
the instruction changes.

## Folding a layer onto a PE: groups, passes and the adder-tree level

A PE has S conv groups, and each group always convolves one input channel.
The group sums then go into a binary adder tree (`channel_adder_tree`). A
multiplexer taps that tree at depth `level`. Tapping depth d adds 2^d
neighbouring groups, so one output channel is made from G = 2^d input
channels, and the PE gives S/G output channels per window position.

- G is the layer's input channel count rounded up to a power of two.
  - Layer 1 has 3 channels and uses G = 4, so one group in four is idle.
  - The other layers use G = 16, 32 or 64.
- Group g uses input channel g mod G and works for output channel
  (pass × S/G) + g/G.
- A *pass* is one run over the whole map. It computes S/G output channels.
  - A layer with more output channels than S/G needs several passes.
  - Each pass is one instruction.

The PE is pipelined in four stages, so a window set that enters at clock t
gives its results at t+4, with a tag that travels alongside:

1. window products and window sums (registered);
2. channel adder tree and level multiplexer;
3. per-lane bias, then ReLU (a comparator with zero and a multiplexer);
4. rounding and clamping to the next layer's width (`round_clamp`).

Every weight ROM word is one whole 3x3 kernel. There is one ROM per group,
so a pass needs a single ROM read per group, and the PE's weights stay put
for the whole pass.

## Instructions

Every instruction is 26 bits (`mp_pkg::instr_t`):

| Field | Bits | Meaning here |
|-------|------|--------------|
| LAYER_ID   | 5 | layer 0..21 (the FC layer is 21) |
| CHANNEL_ID | 6 | first output channel of the pass |
| PE_ID      | 2 | PE that runs it |
| WEIGHT_ID  | 6 | pass number; the weight ROM word is the layer's base word plus this |
| RESULT_ID  | 1 of 6 used | destination feature RAM |
| STRIDE     | 1 | stride 2 |

The program is generated at elaboration time by `mp_pkg::program_instr`. The
per-layer settings come from `mp_pkg::layer_cfg`: channels, map size, bit
widths, shift, tree level and PE.

## Feature storage and the register buffer

This part takes the most care to follow.

**Storage.** Each of the 64 channel lanes has its own `feature_ram`. That is a
true dual-port bank of 1024 words of 16 bits, and each word holds two
neighbouring pixels. Maps are stored with a one-pixel zero border. Pixel
(y, x) of an HxH map sits at pixel index (y+1)(H+2)+(x+1), that is, in word
index/2.

**Reading.** The two ports read two adjacent words in one clock, which gives
four neighbouring pixels of one row. Padding positions are masked to zero on
the way into the buffer, so a RAM never has to be cleared between layers.

**The register buffer** (`register_buffer`, one per lane) is a 6x8 register
set.
- A write fills four registers, so 12 writes fill the set.
- A filled set is read as 24 overlapping 3x3 windows, one per clock:
  4 row positions × 6 column positions.
- That makes one tile of 4x6 output pixels. Neighbouring windows share six of
  their nine values, so each pixel is read from the RAM only about 1.7 times.

**Overlapped loading.** Each row carries a valid flag.
- Once the windows that start at row r have been taken, row r is released.
- Rows 3-5 are released after the last window.
- New writes may go into any released row while the rest of the tile is still
  being read. The upper half of the next tile therefore loads while the lower
  half of the current one is still being used.

`layer_ctrl` has two parts:
- an issue side that walks the tiles and writes rows as they become free;
- a consume side that takes one window per clock and starts the PE.

A tile covers rows 4·ty-1 .. 4·ty+4 and columns 6·tx-1 .. 6·tx+6 in map
coordinates. Columns beyond the map edge are padding.

**Stride 2.** Stride-2 layers are computed at stride 1. Only the results at
even positions are written back, into a map of half the size.

## Quantization

All values are signed integers.

- A weight with 2 integer bits and wbits bits in all is stored as
  round(2^(wbits-3)·w).
- An activation with 4 integer bits and abits bits is stored as
  round(2^(abits-5)·a).
- A product of an input activation and a weight therefore carries the scale
  2^((wbits-3)+(abits_in-5)).
- Going to the output activation format means a right shift by
  (wbits-3)+(abits_in-5)-(abits_out-5). That shift is the per-layer `shift`.

`round_clamp` does the shift and adds the first bit shifted out (round half
up). It then clamps to [-2^(n-1), 2^(n-1)-1], where n is the output width of
the layer. Results are stored in 8-bit slots whatever their width.

Bit widths per layer. A layer's output width is the input width of the layer
after it:

| Layers | Weights | Inputs | Outputs |
|--------|---------|--------|---------|
| 1 | 8 | 8 | 6 |
| 2-13 | 7 | 6 | 6 |
| 14 | 7 | 6 | 7 |
| 15-20 | 8 | 7 | 7 |
| 21 | 8 | 7 | 8 |
| 22 (FC) | 8 | 8 | raw 24-bit sums |

## Checking that it works

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

`tb_mp_accel_top` runs the whole design at its default size:
- It runs one full inference against an integer model of the network written
  in the testbench.
- It compares every layer's output map and the ten logits.
- It checks the cycle budget of each conv instruction.
- It counts how often each mechanism occurs: overlapped buffer writes, writer
  stalls, padding masks, stride-2 drops, PE switches, RAM swaps, AXI stalls,
  clamping and every tree level used.

A full inference takes 64,195 clocks, which is 0.64 ms at 100 MHz.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mp_accel_top \
  -y rtl -y tb +libext+.sv rtl/mp_pkg.sv tb/tb_mp_accel_top.sv
./obj_dir/Vtb_mp_accel_top
```

Replace the top module and file name to run any of the unit testbenches.

## Where this design departs from the published architecture, and what is assumed

- **Residual shortcuts are not added.** The 21 convolutions run as a plain
  chain. A ResNet needs the skip additions, plus 1x1 or padding projections
  at the stride-2 stages. These would need a second read stream and an adder
  before the ReLU stage. They are not built.
- **Weights are stand-ins.** Trained weights are not available. The weight,
  bias and FC ROMs are filled at elaboration from a hash function in `mp_pkg`:
  weights lie in [-3, 3] and biases are scaled to the layer's shift. The
  numerical results are therefore not CIFAR-10 classifications. To use real
  weights, change `weight_val`, `bias_val` and `fc_weight`.
- **Batch normalisation** is assumed folded into the weights and a per-channel
  bias, which is added before the ReLU.
- **Global average pooling** (sum, then shift by log2 of 64 pixels) before the
  FC layer is our own addition. It is needed to reach the 64 FC inputs.
- **Throughput.** The published figure is 0.47 ms per image at 100 MHz; this
  RTL takes 0.64 ms. There are two causes:
  - tiles are re-read with 2 overlap rows;
  - layers with many passes re-stream the input map once per pass.
- **PE 0 group count.** PE 0 uses 48 groups (16 output channels × 3 input
  channels). With the 4-channel rounding this becomes 12 outputs per pass,
  which gives two passes for layer 1.
- **FC PE.** It has ten multiply-accumulate units and takes one input per
  clock: 64 clocks per image.
- **Sizes.**
  - Feature banks hold 1024 words; the largest padded map needs 578.
  - The ROM depths are exactly what the program needs: 2, 64 and 208 words
    for PEs 0, 1 and 2.
  - The AXI address width (32) and the tag width (16) are our own choices.

## Files

- `rtl/mp_pkg.sv` is the shared package. It holds the types, the per-layer
  table, the program, the weight functions and a reference rounding function.
- Arithmetic:
  - `conv_kernel` and `kernel_sum` form one window;
  - `channel_adder_tree` adds across groups;
  - `relu_unit` and `round_clamp` finish each result;
  - `conv_pe` pipelines them;
  - `fc_pe` is the FC layer.
- Memories: `feature_ram`, `register_buffer`, `weight_rom`, `bias_rom` and
  `fc_weight_rom`.
- Control and input: `instr_fsm`, `layer_ctrl` and `axi_image_loader`.
- `tb/axi_mem_model.sv` is a behavioural AXI4 memory with random stalls.
