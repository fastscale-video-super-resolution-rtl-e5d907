# FSRCNN-s super-resolution accelerator

This is a hardware engine that upscales a standard-definition video frame to high definition
with a small convolutional network instead of bicubic interpolation. A 240-line widescreen luma
frame (240 × 426) goes in and a 1080-line frame comes out, so the scale factor is 4.5. The
network is FSRCNN-s, the "small" form of the Fast Super-Resolution CNN, with 35 feature maps,
5 shrunk maps and one mapping layer. It works on the low-resolution image and enlarges only in
its last layer, a transposed ("deconvolution") layer whose stride is the scale factor.

The engine follows an accelerator of the kind built with high-level synthesis for a small
Zynq UltraScale+ board. It has these features:

* **Tiled layer engine.** One engine computes every layer, one layer after another. It uses a
  tiled loop nest: feature maps stay in external memory, and tiles of them pass through on-chip
  buffers.
* **Fixed weights.** All 4285 weights are constants of the circuit. Nothing loads them at run
  time.
* **One frame at a time.** Frames are processed sequentially, so throughput is one frame per
  frame-latency.

The design described here is written from scratch in SystemVerilog 2017.

## The network

| layer | role               | kernel              | channels in → out | activation |
|-------|--------------------|---------------------|-------------------|------------|
| 0     | feature extraction | 5 × 5               | 1 → 35            | PReLU      |
| 1     | shrinking          | 1 × 1               | 35 → 5            | PReLU      |
| 2     | mapping            | 3 × 3               | 5 → 5             | PReLU      |
| 3     | expanding          | 1 × 1               | 5 → 35            | PReLU      |
| 4     | reconstruction     | 9 × 9 transposed, stride 4.5 | 35 → 1   | none       |

Layers 0–3 are stride-1 convolutions with zero padding, so the output has the same size as the
input (240 × 426). Layer 4 produces 1080 × 1917. A 240 × 426 frame is 9:15.975 rather than
9:16, so 4.5 × 426 gives 1917 columns, not 1920. The kernel count is
35 + 175 + 25 + 175 + 35 = 445 two-dimensional kernels. One frame takes 438 M multiply-accumulates:
148 M for the four convolutions and 290 M for the transposed layer.

Only the luma channel goes through the network. Upscaling the chroma channels is left to
software.

## The 4.5 stride

A transposed convolution with integer stride S puts low-resolution pixel i at high-resolution
position S·i and adds its 9 × 9 kernel around that point. A stride of 4.5 = 9/2 has no such
lattice, so this design uses a rule of its own:

* Low-resolution pixel i sits at **p(i) = ⌊9i/2⌋**, so the spacing alternates 4, 5, 4, 5, ….
* The kernel is centred on p(i). Output pixel Y gets tap `ky = Y − p(i) + 4` from input i when
  `0 ≤ ky ≤ 8`. Columns work the same way.

The engine computes the layer in *gather* form: each output pixel pulls from its inputs.

* For output Y, the first input that can contribute is `i0(Y) = ⌈2(Y−4)/9⌉`, or 0 when Y ≤ 4.
  This is the first i with p(i) ≥ Y − 4.
* Two consecutive gaps add up to 9, so a 9-wide window never holds three placed pixels. At most
  two candidates per axis can contribute: i0 and i0 + 1.
* So each output pixel visits a 2 × 2 candidate grid. Candidates whose tap falls outside 0..8, or
  that lie past the frame, are masked: the MAC array's products are forced to zero.

The engine computes the same sums as the scatter form. The testbench's reference model uses the
scatter form, and the two agree bit for bit.

`SCALE_NUM` and `SCALE_DEN` set the stride. The number of candidates is ⌈9·DEN/NUM⌉. This
count is exact for 9/2 and for integer strides. Other ratios have not been checked.

## Layer engine (`layer_engine`)

### Loop nest

The engine runs this loop nest, outermost first:

```
for each output tile (TR × TC pixels, row-major over the frame)
  for og in output channel groups (LANES channels each)
    for ig in input channel groups
      load input window of group ig           -> tile_buffer   (tile_loader)
      for each tap (ky,kx)   [K×K, or 2×2 candidates in the transposed layer]
        for each pixel (r,c) of the tile       -- one cycle each
          acc[r][c][0..LANES-1] += W[og,ig,ky,kx] (LANES×LANES) · in[ig](pixel+tap)
    post-process and write the group           -> memory        (tile_storer)
```

### Parts

* **MAC array** (`pe_array`): LANES × LANES multipliers and an adder tree per output lane.
  LANES = 5, so 25 multipliers. Each cycle it multiplies one input word, which holds 5 channels
  of one pixel, by a 5 × 5 weight block.
* **Tile buffer** (`tile_buffer`): holds the input window, (TR+4) × (TC+4) words. A 5 × 5
  kernel needs 2 pixels of border on each side. Reads are asynchronous.
* **Accumulator buffer** (`acc_buffer`): holds TR·TC × LANES sums of 40 bits. The first
  contribution to a tile (ig = 0 and the first tap) overwrites the old value instead of adding to
  it, so no clearing pass is needed. 40 bits hold every sum exactly, so the tiling order does not
  change the result.
* **Tile loader** (`tile_loader`): fills the tile buffer from memory.
  * An issue pointer and a response pointer walk the window in the same order.
  * Positions outside the frame are the zero padding. They are written as zero and never read
    from memory.
  * Reads may be outstanding in any number. Responses come back in order.
* **Tile storer** (`tile_storer`): writes the tile back to memory. It reads the accumulators,
  passes them through `post_proc`, writes the in-frame pixels and skips the positions past the
  right or bottom edge.
* **Weight store** (`weight_rom`): gives the weight block for the current layer, group and tap.
  Weights of channels beyond the layer's channel count are zero. In layer 0, for example, 4 of
  the 5 input lanes are unused.

Loading, computing and storing run one after another; there is no double buffering. The
accumulator buffer is read-modify-written in a single cycle with no pipeline register. This is
simple, but it is not the timing-closed form one would put on an FPGA at a high clock.

### Cycle count

The cycles in which the MAC array works are exact:

`Σ over layers of ⌈out_h/TR⌉ · ⌈out_w/TC⌉ · groups_out · groups_in · taps · TR · TC`

At the defaults this is 78,589,440 cycles per frame, split by layer:

| layer | MAC-array cycles |
|-------|------------------|
| 0     | 18.1 M           |
| 1     | 0.73 M           |
| 2     | 0.93 M           |
| 3     | 0.73 M           |
| 4     | 58.1 M           |

The whole frame takes 89,338,455 cycles with a memory that never stalls; the rest is loading
and storing. Two layers use few of the 25 multipliers, and they dominate the time:

* The transposed layer has one output channel, so it uses 5 of the 25 multipliers.
* Layer 0 has one input channel, so it also uses 5 of the 25.

Packing several output pixels into the idle lanes would be the first thing to change for speed.

At a 300 MHz clock one frame takes about 0.30 s, and 357 MHz would reach 250 ms per frame. That
is far from the 33 ms that 30 frames per second would need.

## Numbers

| quantity      | format                                                  |
|---------------|---------------------------------------------------------|
| feature value | signed Q8.8, 16 bit                                      |
| input pixel   | 8-bit luma stored as pixel/256, i.e. in the fraction byte |
| weight        | signed Q1.7, 8 bit                                       |
| bias          | signed Q8.8                                              |
| accumulator   | 40 bit                                                  |

`post_proc` turns an accumulated sum into a feature value in four steps:

1. Add the bias, shifted left by 7 so that it lines up with the sum.
2. Shift right arithmetically by 7. This rounds towards minus infinity.
3. If the activation is on and the value is negative, shift it right by 2. This is PReLU with a
   fixed slope of 1/4.
4. Saturate to 16 bits.

The output frame is Q8.8 as well. To get an 8-bit pixel, clamp the 16-bit value to the range
0..255 and take its low byte; this inverts the pixel/256 scaling of the input.

## Fixed weights

`fsr_pkg::weight_of(layer, m, n, ky, kx)` and `bias_of(layer, m)` define every parameter as a
hash of its indices. Weights lie in about ±0.25 and biases in ±1/16. These values are
**placeholders**: the trained weights are not available here. The outputs are therefore
deterministic but are not a real super-resolved image.

To use trained weights, replace the bodies of these two functions with a table lookup. Nothing
else depends on the values. The reference model in `tb/fsr_ref_pkg.sv` calls the same
functions, so the testbenches keep working.

## Memory interface and host protocol

Inside the accelerator, the engine moves one memory word per transfer, and a word is
LANES × 16 = 80 bits. It uses two simple channels:

* **Read:** `rd_req_valid/ready/addr`, then `rd_resp_valid/ready/data`. Responses come back in
  request order.
* **Write:** `wr_valid/ready/addr/data`.

`axi_master_bridge` turns these into one AXI4 master on the top-level `m_axi_*` ports. The bus is
`AXI_DATA_W` = 128 bits wide.

* Every transfer is a single-beat INCR burst with ID 0.
* Word w is at byte address w·16. Its 80 bits sit in the low bits of the beat, and the upper
  bits are written as zero.
* A write is offered on AW and W together. The engine's write completes when both channels have
  accepted it, in either order.
* B responses are always accepted. `wr_pending` counts the writes that have not been answered
  yet.
* A non-OKAY response sets the sticky `bus_error` output.

There is no weight port, because the weights are part of the circuit.

**Layer boundaries.** A layer is finished only when the engine is done *and* `wr_pending` is
zero. The next layer therefore never reads a feature map that memory has not yet stored. This
wait costs at most a few cycles per layer.

Memory layout, in word addresses:

| region                   | size (words)            | contents                        |
|--------------------------|-------------------------|---------------------------------|
| `in_base`                | H_IN·W_IN               | frame, lane 0 = pixel, other lanes 0 |
| `scr_a_base`, `scr_b_base` | 7 · H_IN·W_IN each    | intermediate feature maps       |
| `out_base`               | H_OUT·W_OUT             | result in lane 0                |

A map of C channels is stored as ⌈C/5⌉ planes, one per channel group, each row-major. The
layers ping-pong between the two scratch regions: frame → A → B → A → B → output.

To run a frame, the host writes the frame, sets the four base addresses and pulses `start`. It
then waits for the one-cycle `done` pulse. These outputs show progress:

* `busy` is high while a frame is being processed.
* `cur_layer` is the layer being computed.
* `frame_cycles` and `mac_cycles` count the cycles of the last frame and the cycles in which the
  MAC array worked.

Reset is asynchronous and active low.

## Parameters (`fsr_accel`)

| parameter | default | meaning |
|-----------|---------|---------|
| H_IN, W_IN | 240, 426 | input frame size |
| SCALE_NUM / SCALE_DEN | 9 / 2 | stride of the transposed layer (4.5) |
| LANES | 5 | channel-group width = MAC array is LANES × LANES; 5 divides 35 and 5 |
| TR, TC | 8, 8 | output tile size; both must be ≥ 2 |
| AXI_DATA_W | 128 | AXI data width; must be a power of two ≥ 16·LANES |

The network shape is fixed in `fsr_pkg`: the 35/5/1 sizes, the kernel sizes and the layer count.

## What the surrounding system provides

The accelerator is one part of a media-player system. The other parts are not hardware designed
here, and each connects to the top level's ports as follows:

* **Host program.** It runs on the board's ARM cores: it reads the video, calls the accelerator
  once per frame and times it. It drives the start/done and address ports.
* **External DRAM, interconnect and memory controller.** These sit behind the `m_axi_*` ports.
* **Display and interface.** Video display goes over DisplayPort with OpenCV, and a
  terminal-based user interface ties the programs together. Both run in software.

## Files

| file | contents |
|------|----------|
| `rtl/fsr_pkg.sv` | formats, layer-description struct, network shape, weight and bias functions |
| `rtl/fsr_accel.sv` | top: sequencer + engine + cycle counters |
| `rtl/layer_sequencer.sv` | five-layer sequence and feature-map addresses |
| `rtl/layer_engine.sv` | loop-nest controller, tap and address generation, 4.5-stride logic |
| `rtl/tile_loader.sv`, `rtl/tile_storer.sv` | memory-side movers |
| `rtl/axi_master_bridge.sv` | engine channels to AXI4 master |
| `rtl/tile_buffer.sv`, `rtl/acc_buffer.sv` | on-chip tile memories |
| `rtl/pe_array.sv`, `rtl/weight_rom.sv`, `rtl/post_proc.sv` | datapath |
| `tb/fsr_ref_pkg.sv` | untimed reference network (scatter-form transposed layer) |
| `tb/axi_mem_model.sv` | AXI4 DRAM model with random back-pressure and response delays (top-level tests) |
| `tb/mem_model.sv` | word-channel memory model with random back-pressure (engine and loader tests) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fsr_accel_full` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For example, from the
project root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fsr_accel \
  rtl/fsr_pkg.sv tb/fsr_ref_pkg.sv rtl/*.sv tb/axi_mem_model.sv tb/tb_fsr_accel.sv
./obj_dir/Vtb_fsr_accel
```

* `tb_fsr_accel` runs the whole network on a 16 × 13 frame (72 × 59 out) in under a second.
  Stalls on every AXI channel are random. It compares every output pixel with the reference model and checks
  both cycle counters. It also counts that each mechanism happened: read and write
  back-pressure, the wait for write responses at a layer end, zero padding, masked transposed
  taps, skipped edge-tile stores, multi-group
  accumulation, partly used channel groups, and all five layers.
* `tb_fsr_accel_full` does the same on a full 240 × 426 frame with every parameter at its
  default. It runs about 95 M cycles with random stalls, about 77 s of simulation, and checks 2,070,360 output
  pixels bit for bit.
* The unit testbenches run the pieces on their own:
  * `tb_layer_engine` runs single layers, including the transposed one, against the reference.
  * `tb_tile_loader` and `tb_tile_storer` cover windows on every edge, under stalls.
  * `tb_layer_sequencer` checks the layer configurations and the ping-pong addresses.
  * `tb_axi_master_bridge` checks the AXI mapping, split AW/W acceptance, `wr_pending` and
    `bus_error`.
  * The other unit testbenches check arithmetic and memories against integer models.

The simulator used has two states. The memories are not reset, and nothing reads them before
writing them.

## Where this design departs from, or adds to, the system it models

**Taken from the system:**

* FSRCNN-s with 35/5/1 maps and these kernel sizes.
* Upscaling 240-line widescreen to 1080-line by 4.5.
* Layer-by-layer computation through a tiled loop nest with uniform tiles.
* Fixed weights held in the circuit.
* Frames processed one after another, with memory-mapped frames in external DRAM.
* AXI ports for the input and output data.

**Choices of this design**, with no counterpart to follow:

* The placement rule for the 4.5 stride and the 9 × 9 kernel of the last layer.
* Luma-only processing.
* All number formats, the PReLU slope, the rounding and the saturation.
* The tile sizes and the 5-lane grouping.
* The loop order and the memory layout.
* The single-beat AXI4 transfers and the engine's internal word channels.
* The weight values.

Per-frame latency at the defaults is about 89 M cycles. The design holds a full frame, but at
any realistic FPGA clock it does not reach 30 frames per second.
