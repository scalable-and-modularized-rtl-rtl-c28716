# A modular CNN accelerator in SystemVerilog

This is an inference accelerator for convolutional neural networks such as
AlexNet and Network-in-Network (NIN). The network runs one layer at a time. Each
layer type has a small engine of its own:

- **CONV**: convolution with ReLU, also used for 1x1 "cccp" layers;
- **POOL**: max or average pooling;
- **NORM**: local response normalisation (LRN);
- **FC**: fully connected layers, with ReLU.

Every engine is driven by counters that take the layer's shape at run time, so
one set of hardware runs every layer of a network. There are two CONV engines:
a wide one for most layers and a narrow one for layers with few input maps, such
as a first layer that reads an RGB image. The CONV and FC engines share one
array of multipliers. All feature maps stay on chip, in two banked feature
buffers that swap roles after each layer. Weights come in on a stream from
external memory. CONV weights are copied into an on-chip buffer before their
layer starts. FC weights flow through a FIFO while their layer runs, because each
FC weight is used only once.

Numbers are signed fixed point. Features are 10 bits wide and weights 8 bits.
Each layer has its own right shift, which sets where the binary point sits in
that layer's output.

## How a convolution is scheduled

A convolution layer is four nested loops:

| loop   | runs over                       | size        |
|--------|---------------------------------|-------------|
| Loop-4 | output maps                     | Nof         |
| Loop-3 | input maps                      | Nif         |
| Loop-2 | output pixels                   | Xout x Yout |
| Loop-1 | taps of the kernel window       | K x K       |

The hardware has `LANES` input lanes and `LANES` output lanes. The default is 8,
so there are `NM = LANES*LANES = 64` multipliers.

- **Loop-3 is unrolled by LANES.** Each cycle, one tap of the kernel window is
  read from `LANES` input maps at once, one map per buffer bank.
- **Loop-4 is unrolled by LANES.** Each feature goes to `LANES` multipliers, one
  for each output map in the current group of `LANES` output maps.
- There is one adder tree per output map, with fan-in `LANES`. Each tree adds up
  the products of all `LANES` input maps.
- An accumulator behind each tree adds the tree sums over the kernel window.

Some layers have more input maps than lanes. AlexNet's conv3, with 256 input
maps, is an example. For such a layer the kernel window is swept once for each
group of `LANES` input maps. All of these sweeps finish before the next output
pixel starts. So the accumulator always holds a whole output pixel, and no
partial sums are written back to memory. The counter order, outermost first, is:

```
og (output-map group) > oy > ox > ig (input-map group) > ky > kx
```

One tap is issued per cycle, and nothing stalls. A CONV layer therefore takes
exactly

```
ceil(Nof/LANES) * Xout * Yout * ceil(Nif/LANES) * K * K + 4   cycles.
```

The testbench checks this count. Lanes whose map does not exist are masked to
zero, for example lanes 3..7 when Nif = 3. So are taps that fall into the zero
padding. Stride and padding are fields of the layer descriptor, so stride-4
11x11 and padded 5x5 kernels work too.

### The narrow CONV engine

A first layer with 3 input maps would leave 5 of the 8 lanes idle on the engine
above. So `cnn_top` has a second instance of the same `conv_unit`, built with
parameter `NIF = SMALL_NIF` (4 by default) instead of `LANES`. It has the same
64 multipliers, arranged differently:

- Loop-3 is unrolled by `NIF`. The `NIF` maps of an input group sit in `NIF`
  neighbouring banks. Group `ig` starts at bank `(ig*NIF) % LANES`.
- Loop-4 is unrolled by `NOUT = NM/NIF`, which is 16 output maps per pass. There
  are `NOUT` adder trees, each with fan-in `NIF`.
- The `NOUT` results of a pixel go to the output buffer `LANES` maps at a
  time: chunk 0 in the cycle the window closes, the rest on the following
  cycles. Each window must therefore last at least `NOUT/LANES` taps, which
  is 2 by default. An assertion checks this.

In general a layer takes `ceil(Nof/NOUT) * Xout * Yout * ceil(Nif/NIF) * K * K`
cycles plus `3 + NOUT/LANES`. For a 3-map first layer this halves the time: the
11x11 stride-4 layer with 96 output maps in `tb_workloads` takes 142,296 cycles
instead of 284,592. The layer's `conv_small` bit selects the engine. Both
engines read the same weight buffer, and only one of them runs at a time.

The CONV pipeline, counted from the cycle in which a tap is issued:

| cycle | what happens                                                                   |
|-------|--------------------------------------------------------------------------------|
| 0     | `conv_ctrl` puts out the feature address, weight-word address and window flags |
| 1     | buffer data arrives; the features are masked and broadcast to the multipliers  |
| 2     | products, registered in `mult_array`                                           |
| 3     | adder-tree sums, registered                                                    |
| 4     | at the window's last tap: shift, ReLU, saturate, write the first `LANES` maps  |

## Where the data lives

**Feature buffers.** There are two buffers, A and B. Each has `LANES` separate
RAM banks of `FB_DEPTH` words (4096 by default). Map `m` of a layer is stored in
bank `m % LANES`, at word

```
(m / LANES) * X * Y + y * X + x
```

A CONV or POOL engine reads the same word of all banks at once. It gets the same
pixel of `LANES` consecutive maps in a single cycle. Each layer reads one buffer
and writes the other, and the layer controller swaps them after every layer. The
input image goes into buffer A. The network's result is in the buffer that
`out_sel` names. FC outputs are stored as `Nof` maps of 1x1, so neuron `o` is in
bank `o % LANES` at word `o / LANES`. The next FC layer can read them as its
input directly.

**CONV weight buffer.** Each word holds `NM` weights, one for each multiplier.
With `F` the fan-in of the engine that runs the layer (`LANES` or `SMALL_NIF`)
and `G = NM/F`, lane `p*F + j` holds the weight from input map `ig*F + j` to
output map `og*G + p`. The words are stored in the order in which the schedule
needs them:

```
word = ((og * ceil(Nif/F) + ig) * K + ky) * K + kx
```

The buffer holds `WB_DEPTH` words, 4096 by default. Lanes for maps that do not
exist must be zero.

**FC weight stream.** FC words use the same lane layout. They arrive in the order
`og > ig > pixel`. Lane `p*LANES + j` of word `(og, ig, pix)` is the weight from
input `(ig*LANES + j) * Xin*Yin + pix` to output `og*LANES + p`. This is the
usual flattening of a pooled output into a vector. The FC engine takes one word
per cycle from a 16-word FIFO. When the FIFO is empty the engine stalls and
raises `fc_stall`. An FC layer therefore runs at the speed of the weight
transfer, not the speed of the multipliers.

## The other engines

**FC** (`fc_unit`) works like a convolution whose kernel covers the whole input.
It has its own counters and its own `LANES` adder trees and accumulators, shared
by all FC layers. It borrows the CONV engine's multipliers through the router.

**POOL** (`pool_unit`) processes `LANES` maps in parallel and takes one window
tap per cycle. It keeps a running maximum or a running sum. An average is the sum
times `avg_recip = round(65536/K^2)`, shifted right by 16. `avg_recip` is a
17-bit unsigned value with 16 fraction bits, so `K = 1` (65536) fits. Padded taps are
skipped for the maximum and count as zero for the average. Run time:
`ceil(N/LANES) * Xout * Yout * K * K + 2` cycles.

**NORM** (`norm_unit`) computes LRN across maps:

```
b[c] = a[c] * (k + alpha/n * sum over the n maps around c of a^2) ^ (-beta)
```

The hardware does not compute the power. The sum of squares is shifted right by
the layer's `shift` field and clamped to 63. The result indexes a 64-entry table
of unsigned Q1.15 scale factors. The host fills this table for its values of
k, alpha, beta and the feature scaling. The engine is serial. It reads the `n`
neighbours one per cycle, so a layer takes `Nif * X * Y * n + 2` cycles.

## Running a network

The run is driven by a table of `layer_cfg_t` entries (defined in `cnn_pkg`):

| field                        | meaning                                                                   |
|------------------------------|---------------------------------------------------------------------------|
| `kind`                       | `L_CONV`, `L_POOL`, `L_NORM`, `L_FC`, or `L_END` to stop                   |
| `k`, `stride`, `pad`         | window size (CONV/POOL), local size n (NORM)                              |
| `xin`,`yin`,`xout`,`yout`    | map sizes; the host computes the output sizes                             |
| `nif`, `nof`                 | input and output maps (FC: input maps of `xin*yin`, output neurons)       |
| `shift`                      | CONV/FC: right shift of the accumulator; NORM: table-index shift          |
| `relu`                       | clamp negative results to 0                                               |
| `pool_avg`, `avg_recip`      | POOL: average instead of maximum, and its reciprocal                      |
| `conv_small`                 | CONV: run on the narrow engine                                            |

The sequence on `cnn_top`:

1. While idle, write the table (`cfg_we/cfg_addr/cfg_data`) and the LRN table
   (`lut_*`).
2. Still idle, set `host_en = 1` and `host_sel = 0`, and write the image into
   buffer A with `host_wr`, using the layout above.
3. Pulse `start`.
4. Offer weight words on `w_valid/w_ready/w_data`: all CONV and FC words, in
   layer order.
5. `layer_controller` takes each table entry in turn:
   - CONV: it first accepts exactly `ceil(Nof/G)*ceil(Nif/F)*K*K` words into
     the weight buffer, then starts the engine that `conv_small` selects;
   - FC: it starts the engine and opens the stream into the FIFO;
   - POOL and NORM: it starts the engine.
   After each layer it swaps the buffers.
6. At `L_END`, `done` pulses. Read the result through `host_rd/host_rdata` from
   buffer `out_sel`. Read data comes one cycle after the request. `cycles` gives
   the length of the run.

Only one engine is busy at a time; an assertion in `cnn_top` checks this.

## Sizes and what fits

All architecture constants are in `rtl/cnn_pkg.sv`: `LANES`, `FB_DEPTH`,
`WB_DEPTH`, `MAX_LAYERS`, the widths and the table size. To change the size of
the design, edit them there. `LANES` should be a power of two.

At the defaults (8 lanes, 4096-word banks) the design runs networks whose
largest set of feature maps has at most 32,768 features. More precisely, each
bank must hold its share: `ceil(maps/LANES) * X * Y <= 4096` for every layer's
input and output. The largest CONV layer
may need at most 4096 weight words. Full AlexNet and NIN at ImageNet size need
far more:

- AlexNet conv1 produces 96 x 55 x 55 = 290,400 features;
- AlexNet conv2 needs 4,800 weight words;
- the NIN input alone is 150,528 features.

Every one of their layer shapes can be expressed, though: kernels up to 15,
stride up to 7, padding up to 3, up to 4095 maps, and up to 32 layers. Running
those networks takes larger `FB_DEPTH` and `WB_DEPTH` values. An FPGA has room
for the feature buffers. A Stratix V GXA7 holds about 50 Mbit of block RAM, and
AlexNet's largest feature set is about 2.9 Mbit at 10 bits.

## How this differs from the original accelerator

- The original generates one CONV module for each distinct input-map count of the
  network. Each module's adder-tree fan-in matches that count, and layers with
  the same count share a module. Here there are two fixed engines, with fan-in
  4 and 8. A layer whose map count is not one of these leaves some lanes idle.
  A layer with more maps than the fan-in takes several passes.
- The original's number of multipliers is not known. It ran on an FPGA with 256
  DSP blocks and built some multipliers from logic as well. `LANES = 8`
  (64 multipliers) is an assumption, chosen to keep simulation fast.
- These are this design's own choices: the LRN scale table, the reciprocal
  multiply for average pooling, the shift-and-saturate requantisation, the
  ping-pong buffers, the host port, the layer-table format and every pipeline
  depth.
- The accelerator generator itself, which is software, is not part of this
  design. Neither is the SDRAM/DMA system that supplies the weights. The weight
  stream port stands in for them. The layer table is what a generator would
  produce for the host.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each compares the module
against reference models written from the layer definitions in
`tb/tb_cnn_ref.sv`, or against a direct model of the expected behaviour.
Where the timing is fixed, the testbenches also check cycle counts.

The end-to-end test, `tb/tb_cnn_top.sv`, runs with every parameter at its default.
It runs this small AlexNet/NIN-shaped network:

```
conv 3x3 stride 2 pad 1 > LRN > max pool > 1x1 conv (two input groups) >
average pool > fc > fc
```

It compares the ten outputs with the reference chain. It also requires each of
these to happen at least once:

- the CONV weight preload;
- an FC stall from weight starvation;
- a buffer swap;
- padding;
- a multi-group sweep;
- max pooling, average pooling and LRN;
- a ReLU clamp;
- saturation;
- work on both CONV engines. The first layer runs on the narrow one.

`tb/tb_workloads.sv` runs the layer sequences of AlexNet (13 layers) and NIN
(16 layers) at the default parameters. It uses a 3 x 63 x 63 input and reduced
channel counts, so that every layer fits the buffers and the run takes seconds.
The first layer keeps its real shape: 11x11, stride 4, 3 to 96 maps. AlexNet's
grouped layers run as ordinary dense convolutions. A shift is picked for each
layer so that only a few outputs saturate. Every output of both networks matches
the reference chain. The AlexNet-shaped run takes 358,552 cycles and the
NIN-shaped run takes 307,821.

The design has been linted with Verilator and elaborated with Yosys (slang). It
has not been run on an FPGA or timed on one.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cnn_top \
  -y rtl -y tb +libext+.sv rtl/cnn_pkg.sv tb/tb_cnn_ref.sv tb/tb_cnn_top.sv
./obj_dir/Vtb_cnn_top
```

Every testbench prints one line, `TB_RESULT checks=N failures=M`, and stops on
its own. A watchdog ends it if it hangs. For another block, use its testbench
as the top module: `tb_workloads`, `tb_conv_unit`, `tb_pool_unit`, `tb_norm_unit`,
`tb_fc_unit`, `tb_conv_ctrl`, `tb_layer_controller`, `tb_feature_router`,
`tb_feature_buffer`, `tb_weight_buffer`, `tb_fc_weight_fifo`, `tb_mult_array`,
`tb_adder_tree` or `tb_accum_relu`. Add `tb/tb_cnn_ref.sv` wherever the
testbench imports it. The simulator is two-state, so everything that is read is
reset or written first.

## Files

| file                      | contents                                                        |
|---------------------------|-----------------------------------------------------------------|
| `rtl/cnn_pkg.sv`          | constants, `layer_cfg_t`, buffer request structs, saturation    |
| `rtl/cnn_top.sv`          | the accelerator                                                 |
| `rtl/layer_controller.sv` | layer table and sequencing                                      |
| `rtl/feature_router.sv`   | buffer, engine and multiplier multiplexing                      |
| `rtl/feature_buffer.sv`   | one banked feature memory                                       |
| `rtl/weight_buffer.sv`    | CONV weight memory                                              |
| `rtl/fc_weight_fifo.sv`   | FC weight FIFO                                                  |
| `rtl/mult_array.sv`       | shared multipliers                                              |
| `rtl/conv_unit.sv`        | CONV engine (`conv_ctrl`, `adder_tree`, `accum_relu` inside)    |
| `rtl/fc_unit.sv`          | FC engine                                                       |
| `rtl/pool_unit.sv`        | POOL engine                                                     |
| `rtl/norm_unit.sv`        | NORM engine                                                     |
| `tb/tb_cnn_ref.sv`        | reference models and weight-packing helpers                     |
| `tb/tb_cnn_top.sv`        | end-to-end test of the accelerator                              |
| `tb/tb_workloads.sv`      | scaled AlexNet and NIN runs                                     |
