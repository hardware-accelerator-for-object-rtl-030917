# Tiny YOLO-v3 object-detection accelerator

This is synthesizable SystemVerilog for a streaming accelerator that runs the
convolutional part of Tiny YOLO-v3 on 416x416 RGB frames. Each of the network's
thirteen convolution layers gets its own hardware. All layers work at the same time
as a pipeline, each on a different frame. The slowest layer takes 6,273,325 clock
cycles per frame, so at 200 MHz the design delivers 31.9 frames per second. The
frame output is the two YOLO detection tensors, 13x13x255 and 26x26x255. Anchor
decoding and non-max suppression are left to software.

Two ideas keep the hardware small without lowering the frame rate:

* **MAC reuse in fast layers.** Only the slowest layer needs one MAC unit per filter.
  A layer that would finish early instead shares each MAC unit among RF filters,
  where RF is its *reusability factor*. That stretches the layer to roughly the
  slowest layer's time.
* **One normalisation/activation path per layer.** All MAC units of a layer finish a
  pixel at the same moment. Their results are parked in registers and pushed one per
  clock through a single batch-norm unit and a single Leaky ReLU unit. This costs no
  time, because a pixel takes N_in*K*K clocks in the MACs and only N_MAC clocks in
  the shared path.

Max pooling uses one comparator per unit, driven by a four-state FSM that reads the
2x2 window from memory one value at a time.

## The network as built

| layer | conv | in -> out ch | map | RF | MAC units | conv cycles | pool | pool cycles |
|---|---|---|---|---|---|---|---|---|
| 1 | 3x3 | 3 -> 16 | 416 | 1 | 16 | 4,672,512 | 2x2/2 | 173,056 |
| 2 | 3x3 | 16 -> 32 | 208 | 1 | 32 | 6,230,016 | 2x2/2 | 43,264 |
| 3 | 3x3 | 32 -> 64 | 104 | 2 | 32 | 6,230,016 | 2x2/2 | 21,632 |
| 4 | 3x3 | 64 -> 128 | 52 | 4 | 32 | 6,230,016 | 2x2/2 | 10,816 |
| 5 | 3x3 | 128 -> 256 | 26 | 8 | 32 | 6,230,016 | 2x2/2 | 5,408 |
| 6 | 3x3 | 256 -> 512 | 13 | 16 | 32 | 6,230,016 | 2x2/1 | 10,816 |
| 7 | 3x3 | 512 -> 1024 | 13 | 8 | 128 | 6,230,016 | - | - |
| 8 | 1x1 | 1024 -> 256 | 13 | 4 | 64 | 692,224 | - | - |
| 9 | 3x3 | 256 -> 512 | 13 | 1 | 512 | 389,376 | - | - |
| 10 | 1x1 | 512 -> 255 | 13 | 1 | 255 | 86,528 | - | - |
| 11 | 1x1 | 256 -> 128 | 13 | 16 | 8 | 692,224 | - | - |
| 12 | 3x3 | 384 -> 256 | 26 | 2 | 128 | 4,672,512 | - | - |
| 13 | 1x1 | 256 -> 255 | 26 | 4 | 64 | 692,224 | - | - |

* "map" is the side of the convolution's input and output map. Every convolution
  has stride 1 and zero "same" padding.
* Conv cycles are N_in x K x K x map x map x RF. Pool cycles are RF x 4 x map x map / S².
* MAC units per layer = ceil(N_out / RF), 1335 in all.
* Layer 9 and layer 11 both read layer 8's output.
* Layer 12 reads a 384-channel input: layer 11's output upsampled to 26x26,
  followed by the 256 channels of layer 5's convolution results taken *before* its
  max pool.

The RF values are the ones the timing analysis of the design lists. For layers 8–11
and 13 they are smaller than "slowest/this layer" would allow; for example, that
ratio would be 36 for layer 8. Those layers therefore have more MAC units than they
strictly need. The listed factors are kept as given. The table is `NOUT_P`, `KSZ`, `RFAC`, `POOLS`, `SRC` and `HSHIFT`
in `rtl/yolo_pkg.sv`. Changing a value there reshapes the hardware.

## Frame pipeline and stalls

`pipeline_ctrl` divides time into *steps*. At the start of a step it gives a start
pulse to every layer whose source layer produced a result in the previous step.
Layer 1 starts when a frame is offered on `frame_valid`, and `frame_ready`
acknowledges the frame. The step ends when every started layer has raised
`res_done`. A layer that finishes early sits idle, and `stalled[i]` is high for it
until the step ends. The step length is therefore the running time of the slowest
active layer, 6,273,325 cycles in steady state (layer 2: 6,230,016 convolution
cycles, 43,264 pooling cycles and 45 cycles of control).

A frame passes through 11 steps:

1. layers 1–8, one step each;
2. then layers 9 and 11 together;
3. then layers 10 and 12;
4. then layer 13.

When frames arrive back to back, up to 11 frames are in flight and every layer is
busy in every step. The pipeline drains by itself when `frame_valid` stays low.

`layer_frame[i]` counts the frames layer i has finished, which is also the number of
the frame it is working on. The memory needs this number because neighbouring layers
work on different frames at the same time. Layer i writes frame n while layer i+1
reads frame n−1 from the same region, so every result region needs at least two
frame banks. Layer 5's convolution results need more: layer 12 reads them five steps
after they are written, so they must survive six steps.

The module does not keep these banks itself. It exposes the frame numbers and leaves
the banking to the memory.

## Inside one layer (`conv_layer`)

```
start -> conv_addr_gen -> (memory: 1 feature, N_MAC kernel weights per clock)
      -> N_MAC x mac_unit -> local registers -> counter/mux -> batch_norm -> leaky_relu
      -> conv result write (memory)
      -> N_MAC x maxpool_unit (read conv results back, write pooled maps) -> res_done
```

* **Address generator** (`conv_addr_gen`). It steps once per clock through group r
  (the reuse index), output row, output column, input channel, kernel row and kernel
  column. Positions outside the map are flagged `pad`. At those positions nothing is
  read and the MACs get zero.
* **MAC units** (`mac_unit`). Every unit gets the same feature value and its own
  weight, which belongs to filter r*N_MAC + lane.
  * A counter inside each unit counts N_in*K*K operations and then hands out the
    pixel result.
  * The next product restarts the accumulator, so there is no gap between pixels.
  * The accumulator is 64 bits wide with 32 fraction bits.
* **Shared BN/activation** (`bn_act_sched`). Lane results are copied to local
  registers. A counter then walks the lanes:
  * it reads the (b1, b2) pair of the selected filter;
  * it computes n = b1*m + b2 and then the Leaky ReLU;
  * it writes the value at f*H*W + y*W + x.

  Lanes whose filter index is N_OUT or more are not written. This happens in layer 13,
  where 64 lanes x 4 groups gives 256 slots for 255 filters. The pipeline adds two
  cycles of latency. An assertion flags a new pixel that arrives before the previous
  sweep is done. This cannot happen when N_MAC + 2 <= N_in*K*K, which holds for
  every layer.
* **Max pooling** (`maxpool_unit`). It runs after the whole convolution of the frame
  has been stored. There is one unit per MAC lane, and each pools the RF maps of its
  lane in turn. The FSM spends one state per window cell and reads, in order,
  top-left, top-right, bottom-left and bottom-right. The State-0 value starts the
  maximum, and later values go through the comparator. Each window costs four
  clocks. For stride 1 (layer 6), reads past the last row or column are clamped onto
  it. The writes of all units come out together on one vector port.

Pooling after the convolution, rather than overlapped with it, costs 43,264 cycles
(0.7%) on the slowest layer. That is why the frame period is 6,273,325 rather than
6,230,016 cycles.

## Number formats

| quantity | format | bits |
|---|---|---|
| kernel weight | signed <3,16> | 19 |
| BN constants b1, b2 | signed <6,16> | 22 |
| features, all intermediate results | signed <16,16> | 32 |

b1 = gamma/sqrt(var+eps) and b2 = beta − gamma·mean/sqrt(var+eps) are computed
offline. Each product is kept at full precision and then shifted right by 16, which
truncates toward minus infinity. Every result is saturated to the 32-bit range. The
Leaky ReLU slope 0.01 is the constant 655/65536. These rounding and saturation rules
are this implementation's own choice, and they are the place to look first when
comparing against a floating-point model.

## Memory interface

The main memory holds frames, about 20 MB of weights and the intermediate maps. It
is outside `yolo_top`. Each layer has its own ports, brought out as arrays indexed by
layer number 0..12. Every read returns data on the next clock. Layout:

* **Feature read** (`feat_rd_*`). The address is c*H*W + y*W + x within the region
  `feat_rd_region[i]`. The region is the image, or the source layer's pooled
  results (`REG_POOL`), or its convolution results (`REG_CONV`). Layer 12 does not
  use its feature port; it reads through `route_rd_*` (layer-5 convolution results)
  and `up_rd_*` (layer-11 output) instead.
* **Kernel read** (`ker_rd_*`). Word a returns N_MAC weights. Lane j holds the
  weight of filter (a / (N_in*K*K))*N_MAC + j at offset a mod (N_in*K*K), where the
  offset is c*K*K + ky*K + kx.
* **BN read** (`bn_rd_*`). The address is the filter number, and the data is the
  `bn_const_t` struct `{b1, b2}`.
* **Writes.** `cw_*` writes the convolution results of a layer. `pw_*[i][p]` is
  maxpool unit p's write into the pooled region, at f*Ho*Wo + oy*Wo + ox. `pr_*`
  reads back convolution results for pooling.

A real memory would need a controller that serves the 13 layers' concurrent
streams. That controller is not part of this design.

## Upsample and concatenate

Layer 12's input never exists as a stored map. `upsample_concat` receives each read
as (channel, row, column) and sends it to one of two places:

* channels below 128 read layer 11's output at (row/2, column/2), which is
  nearest-neighbour upsampling;
* the other channels read layer 5's convolution results.

The unit then returns the word from whichever source it picked. Both stages cost no
storage and no cycles. The order of the concatenation (upsampled channels first) and
the upsampling method are choices made here, and the weight layout of layer 12 must
match them.

## Where this departs from, or adds to, the reference design

* Layers 10 and 13 also apply batch-norm and Leaky ReLU, like every other layer. A
  standard Tiny YOLO-v3 has linear outputs with a bias there. To get linear outputs,
  load b1 = 1, b2 = bias and bypass the activation.
* Layer 5 keeps its convolution results next to its pooled output, because layer 12
  needs them. Pooled data therefore does not overwrite convolution data in place.
* The step handshake, frame numbering, memory word layouts, one-cycle read latency,
  padding, rounding and saturation rules, and the stride-1 pool edge rule are all
  this design's own choices.
* The maxpool FSM visits its states in the order 0, 1, 2, 3. That is the only order
  in which its address steps (+1, +(width−1), +1, next window) cover a 2x2 window.
* The memory, the memory controller and the host-side post-processing are not
  included.

## Files

* `rtl/yolo_pkg.sv`: formats, layer table, sizing functions.
* `rtl/yolo_top.sv`: the 13 layers, the pipeline controller and the concat unit.
* `rtl/pipeline_ctrl.sv`, `rtl/conv_layer.sv`, `rtl/conv_addr_gen.sv`,
  `rtl/mac_unit.sv`, `rtl/bn_act_sched.sv`, `rtl/batch_norm.sv`,
  `rtl/leaky_relu.sv`, `rtl/maxpool_unit.sv`, `rtl/upsample_concat.sv`.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_ref_pkg.sv`: reference fixed-point arithmetic.
* `tb/tb_main_memory.sv`: behavioural main memory with frame banks.

`yolo_top` has two parameters. `IMG` is the input side: 416, or any multiple of 32.
`CH_DIV` is a power of two that divides all channel counts except the three colour
channels. They exist to shrink the network for simulation; the defaults are the full
network.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/yolo_pkg.sv tb/tb_ref_pkg.sv \
    rtl/*.sv tb/tb_main_memory.sv tb/tb_yolo_top.sv --top-module tb_yolo_top
./obj_dir/Vtb_yolo_top
```

The other testbenches are built the same way: swap in the testbench file and its
top module.

## How far it has been verified

* **Unit testbenches.** Each module's testbench compares it with arithmetic written
  independently in the testbench, and checks cycle counts where they are defined.
  That covers N_in*K*K*H*W*RF convolution cycles, 4*H*W/S² pool cycles, and steps
  that last exactly as long as their slowest layer.
* **End-to-end test.** `tb_yolo_top` runs the whole 13-layer network at IMG=64,
  CH_DIV=16 on three frames in a pipeline, with random weights. It also passes
  at IMG=64, CH_DIV=4.
  * Every stored map of every layer and frame is compared with a reference model of
    the network.
  * It checks the step count (frames + 10) and the length of each step.
  * It counts stalls, overlapped layers, MAC reuse, padding, route and upsample
    reads, both pool strides and unused filter slots. Each must occur at least once.
* **Slowest layer at full size.** `tb_layer_full` runs layer 2 (16 -> 32
  channels, 208x208) at full size. This is the layer that sets the frame rate. All
  1.73 M convolution and pooled values match the reference. The cycle counts are
  exactly 6,230,016 convolution cycles and 43,264 pooling cycles, and the whole
  layer takes 6,273,325 cycles. That gives 31.88 frames/s at 200 MHz.
* **Full size.** The design compiles and lints at full size. One full-size frame
  takes 11 steps of 6.27 M cycles, about 69 M cycles on a 1335-MAC design, which is
  too long for routine RTL simulation. The largest configuration simulated end to
  end is the reduced one above.
* **Not checked.** The weights have not been compared with a trained network. The
  fixed-point accuracy against floating point is also unchecked.
