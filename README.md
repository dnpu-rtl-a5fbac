# DNPU: a heterogeneous deep-neural-network processor with on-chip stereo matching

Mobile vision needs convolutional networks for feature extraction and recurrent or
fully-connected networks for sequences (captioning, action recognition). The two have
opposite needs. A convolution layer does far more arithmetic than it has parameters. An
MLP or RNN layer uses each weight about once, so its cost is moving weights. DNPU does not
compromise on one engine. It has one processor for each kind of layer, plus a third that
makes depth maps from a stereo camera, so the network can take RGB-D input:

| processor | bottleneck it attacks | main idea |
|---|---|---|
| convolution (`conv_core`) | arithmetic and feature-map storage | three-wide MAC row that fits any kernel; per-layer dynamic fixed point whose fraction length adapts on-line to the current image |
| MLP-RNN (`mlp_rnn_core`) | weight traffic | weights quantized to 4-bit indices into a 16-value codebook; multiplication becomes a lookup in a per-input table of precomputed products (Q-table) |
| stereo matching (`stereo_proc`) | aggregation storage | cost volume aggregated through a four-quadrant integral image whose entries are two bits narrower |

This repository is synthesizable SystemVerilog for all three processors and the top that
joins them. It is an RTL model of the published DNPU architecture. It follows that
architecture's features and numbers where they are known: three MAC lanes, strides 1/2/4,
2x2 pooling, ReLU/sigmoid/tanh, 4-bit weight indices, eight Q-tables, an 8 KB MLP data
buffer, QVGA input, 64 depth levels. Everything else is this design's own choice and is
listed under "Own choices and departures" below.

```
              host ports (buffers, configuration, start/done)
        |                         |                          |
  +-----v------+   features  +----v---------+         +------v--------+
  | conv_core  |------------>| mlp_rnn_core |         |  stereo_proc  |
  |  3-MAC row |  (transfer) |  8 Q-tables  |         | cost gen      |
  |  dfxp_unit |             |  8 adder     |         | sm_integral4  |
  |  ReLU/pool |             |  trees, acc  |         | WTA depth map |
  +-----^------+             |  act_unit    |         +------+--------+
        |   depth tile (transfer, 4th input channel)         |
        +----------------------------------------------------+
```

## Convolution processor (`conv_core`, `dfxp_unit`)

### Datapath and loop order
A pass convolves a `cin x in_h x in_w` input tile with `cout` kernels of size `kh x kw`,
with stride 1, 2 or 4 and no padding. Each cycle a row of three multipliers takes three
horizontally adjacent kernel taps of one kernel row of one input channel. So one output
pixel takes `cin * kh * ceil(kw/3)` MAC cycles, plus one post-processing cycle. Kernels of
width 3, 6, 9, ... keep every multiplier busy. A 1x1 kernel uses one in three (33 %). Any
size works. The testbench reports these utilisations.

Loop nest (outermost first): output channel, output row, output column, pooling
sub-position (when pooling), input channel, kernel row, kernel-column group. With pooling,
the four pixels of each 2x2 window are computed back to back. Only their maximum is
written, so pooling needs no line buffer.

Post-processing rounds the 40-bit accumulator to the layer's word length in `dfxp_unit`,
then applies ReLU, then the pooling maximum.

Buffer layouts (word addresses, all 16-bit words):

```
input  [ci][y][x]        ci*in_h*in_w + y*in_w + x
weight [co][ci][ky][kx]  ((co*cin + ci)*kh + ky)*kw + kx
output [co][y][x]        co*oh*ow + y*ow + x          (oh, ow after pooling)
```

Default sizes: input 16 K words, weight 8 K words, output 4 K words (32/16/8 KB, so
input > weight > output).

Start-to-done time: `pixels * (cin*kh*ceil(kw/3) + 1) + 2` cycles, where `pixels` counts
convolution outputs before pooling.

### Workload division
A layer that does not fit the buffers is split by the host:
* **Image division**: the input is cut into tiles. Each tile is an ordinary pass, and the
  weights are reloaded for every tile.
* **Channel division**: the input channels are cut into groups. The first pass writes
  partial outputs. Later passes set `psum_in`, so each accumulator starts from the stored
  partial output, shifted back to the product scale. Only the pass with `final_out` applies
  ReLU and pooling.

Partial outputs are stored unpooled, with the layer's word length and FL. A final pass
with pooling reads the four partial outputs of each window and writes the pooled word in
place. This is safe because a window's pooled address is never above the unpooled address
of a pixel that is still to be read.

Mixing the two divisions per layer trades weight re-fetches against partial-output
traffic. That choice is software's.

### Dynamic fixed point with on-line adaptation
Every layer has its own word length (WL, 2 to 16 bits, set by the host) and its own
binary point, the fraction length (FL). Both are kept in a 16-entry table, so different
layers get different ranges and precisions at fixed-point cost. Values are stored
sign-extended in 16-bit words.
The accumulator carries FL `fl_prod` = input FL + weight FL, which the host gives in the
configuration. `dfxp_unit` shifts it to the layer FL with round-half-up and saturates to
the layer WL.

The FL is not trained off-line. While a layer runs, the unit counts saturated results and
records whether any result reached the upper half of the WL range. When the layer ends:

* more than `OVF_TH` saturations (default 0): FL - 1;
* otherwise, upper half never used: FL + 1;
* otherwise: the FL stays.

The new FL applies the next time the layer runs, for example on the next video frame. So
the number format tracks the statistics of the current input. A format that fits the
input also needs fewer bits, which is why the WL can be set per layer. The WL itself does
not adapt. `fl_layer` exposes the current FL so that the host can pass it on as the next
layer's input FL.

## MLP-RNN processor (`mlp_rnn_core`, `qtable`, `act_unit`)

### Q-table multiplication
The layer's weights are replaced by 4-bit indices into a 16-entry codebook of 16-bit
values, which cuts weight traffic by 75 %. Since an input element `x` can only ever be
multiplied by one of 16 values, `qtable` computes all 16 products `x * cb[k]` once. It
uses one multiplier and 16 cycles. After that, each multiplication is a read addressed by
the weight index. The table has eight read ports.

### Matrix-vector dataflow
`o_m = sum_n W_nm * i_n` is computed eight inputs at a time. For each group of eight
inputs:

1. the eight inputs are read from the data buffer and the eight Q-tables are built
   (18 cycles including the load and the ready check);
2. one 256-bit weight word per cycle is read. It holds the 8x8 indices linking the eight
   inputs to eight outputs. Lane `m` looks up its eight products, sums them in an adder
   tree and adds the sum to accumulator `h*8+m`.

At the end every accumulator is rounded (`shift`, round half up), saturated, passed
through `act_unit` and written back to the data buffer at `out_base`. There it can feed
the next layer or the next RNN time step.

Weight word `w_base + g*ceil(M/8) + h` holds group `g` of inputs and group `h` of
outputs; lane `m`, table `k` sit at bits `[(m*8+k)*4 +: 4]`.
Start-to-done time: `ceil(N/8) * (18 + ceil(M/8)) + M + 2` cycles.

**Bias.** The host puts a constant 1 (in the input FL) into the input vector. The bias
then becomes one more weight row, `[1 i_0 .. i_n] x [b; W]`, and needs no adder.

**Layers of any size.** One pass handles up to 4095 inputs and 1024 outputs. Larger
layers run as several passes over slices of the input. Set `acc_keep` on every pass but
the first, so that it continues the accumulators instead of clearing them.

Buffers: data 4 K words (8 KB), weight indices 512 x 256 bits (16 KB), accumulators
1 K x 40 bits.

### Element-wise operations
Recurrent cells also need per-element products and sums of vectors, for example the
LSTM state update `c' = f*c + i*g` and `h = o*tanh(c')`. With `op` set to `OP_EMUL`,
`OP_EADD` or `OP_EACT`, the core skips the matrix path. It takes vector `a` at `in_base`
and vector `b` at `w_base`, both in the data buffer, and produces `n_out` elements. Each
result is one of:

* `round(a*b >> shift)`;
* `a + b`;
* `a` alone.

It is then saturated to 16 bits, passed through the activation and written to
`out_base`. Eight element lanes do eight elements per cycle. Start-to-done time is
`ceil(n/8) + 2` cycles. The output may be written in place or below an input vector
(`out_base <= in_base`, `out_base <= w_base`); it must not start inside an input vector
above its base.

### Activation
`act_unit` provides none, ReLU, sigmoid and tanh on 16-bit words with `act_fl` fraction
bits. Sigmoid is a four-segment piecewise-linear fit with power-of-two slopes. Its
breakpoints are at |x| = 1, 2.375 and 5, and its error is below 0.02. tanh is computed as
`2*sigmoid(2x) - 1`, with error below 0.04.

## Stereo matching processor (`stereo_proc`, `sm_cost_gen`, `sm_integral4`)

The processor produces a disparity map with 64 levels (6 bits) from a rectified 320x240
8-bit stereo pair. It handles one disparity at a time. Each disparity takes two scans:

1. **build** (W*H cycles): `sm_integral4` walks the image. For each pixel, `sm_cost_gen`
   returns the cost `|L(x,y) - R(x-d,y)|`, or 255 where `x-d` leaves the image. The
   integral image of this cost map is written.
2. **aggregate** (W*H cycles): for each pixel, the cost summed over a 7x7 window
   (clipped at the border) is read from the integral image. If the sum beats the best so
   far, the pixel's best cost and disparity are replaced (winner-take-all; ties keep the
   smaller disparity).

A frame takes `64 * (2*W*H + 2) + 2` = 9.83 M cycles.

### Four-square integral image
A normal integral image sums from one corner. Its last entry holds the whole image's
cost, which here needs 25 bits. `sm_integral4` instead splits the image at its centre
into four quadrants and integrates each quadrant **from the centre outwards**. Entry
`S(x,y)` is the sum over the rectangle between `(x,y)` and the quadrant's corner at the
centre, so no entry exceeds a quarter of the total. The entries are 23 bits, two bits
fewer, with the same work per pixel:

```
S(x,y) = c(x,y) + S(x_in,y) + S(x,y_in) - S(x_in,y_in)
```

Here `x_in` and `y_in` are the neighbours one step towards the centre, taken as zero
outside the quadrant. Quadrants are scanned one after another, centre outwards, so the
three neighbours are always ready.

A window sum is the sum of the window's pieces in the quadrants it touches. Each piece is
a rectangle that is clipped to one quadrant. Call its far-from-centre corner "outer" and
the position one step past its near-to-centre edge "inner". Then

```
piece = S(outer_x, outer_y) - S(inner_x, outer_y) - S(outer_x, inner_y) + S(inner_x, inner_y)
```

with every inner term dropped when the piece already touches the centre line. That is up
to 16 reads for a window that straddles the centre, and 4 for one inside a quadrant.

## Top level and data movement (`dnpu_top`)

The top brings out every processor's configuration, start/busy/done and buffer ports.
It adds a transfer engine that copies one word per cycle over a `tw x th` tile:

* `XF_DEPTH_TO_CONV`: depth-map pixel `(x0+tx, y0+ty)` goes to convolution input word
  `dst_base + ty*tw + tx`. With R, G and B written by the host into channels 0-2 and depth
  copied into channel 3, the convolution runs on four-channel RGB-D tiles. The disparity
  is copied as a plain integer.
* `XF_CONV_TO_MLP`: convolution output word `src_base + i` goes to MLP data word
  `dst_base + i`. This hands CNN features to the fully-connected or recurrent layers.

While a transfer runs, it owns the ports it uses. Assertions check that the processor it
touches is idle.

## Interfaces and timing conventions
* One clock, active-low asynchronous reset.
* Processors: present `cfg` and pulse `start` for one cycle while idle. `busy` stays high
  until the one-cycle `done` pulse. Configuration structs (`conv_cfg_t`, `mlp_cfg_t`,
  `xfer_cfg_t`) are in `dnpu_pkg`.
* Buffer write ports are synchronous. Read ports are combinational (register-file style).
  The host may use the buffers only while the processor is idle.
* Statistics outputs include MAC cycles, multiplier operations, saturations, Q-table
  builds, lookups and winner-take-all updates.

## Capacity against typical workloads
* **QVGA stereo, 64 levels**: fits exactly at the default parameters.
* **VGG-16 convolutions**: an input of 224x224x3 = 150 K words, or a conv5 input of
  14x14x512 = 100 K words, exceeds the 16 K-word input buffer. These layers run with image
  and channel division. One output channel's 3x3x512 weights (4.6 K words) fit the weight
  buffer.
* **Fully-connected layers**: VGG-16 fc6, 25088x4096 with 4-bit weights, runs as many
  `acc_keep` passes. Each pass holds up to 32 K indices and 1024 outputs.

## Own choices and departures
Not taken from the DNPU description, chosen here:
* buffer sizes, except the 8 KB MLP data buffer, and all memory layouts;
* a word length that the host sets per layer and that does not adapt;
* the FL adaptation rule, its threshold and the FL limits of -32..31;
* no padding and no bias in convolutions;
* max pooling;
* the partial-output format of channel division;
* Q-tables filled one entry per cycle, with no overlap between table building and lookups;
* the piecewise-linear sigmoid/tanh;
* the encoding of the element-wise operations and their eight lanes;
* the absolute-difference cost, the 7x7 window, winner-take-all and the disparity-serial
  schedule;
* the centre-outward direction of the four-square integral image;
* the transfer engine.

Not built:
* the computational SRAM that produces matching costs inside the memory array with
  hierarchical bit-lines. Its function is in `sm_cost_gen`, in plain logic.
* the "MLP construction FIFO" and the "mapping table" of the MLP-RNN processor, whose
  roles are not known.
* clocking, pads, the off-chip memory interface and any top-level controller. The host
  drives the processors directly.

The real chip's throughput is also not modelled: how many MAC rows it has and how it
parallelises stereo matching are not known. This RTL has one MAC row and handles one
disparity at a time.

## Simulation
Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dnpu_pkg.sv tb/tb_conv_core.sv --top-module tb_conv_core -Mdir obj -o sim
obj/sim
```

| testbench | checks |
|---|---|
| `tb_conv_core` | 3x3/pool/ReLU, 1x1, 5x5 stride 2, 4x4 stride 4 at 10-bit WL, pooled two-pass channel division; every word, MAC counts, cycle count |
| `tb_dfxp_unit` | rounding and saturation to 4-16 bit WL against a real-valued model; FL lowered, raised, kept |
| `tb_qtable` | 16-cycle build, all eight ports, inputs latched |
| `tb_mlp_rnn_core` | odd sizes, bias row, saturation, ReLU/none exact, sigmoid/tanh within tolerance, two-pass layer, cycle count; element-wise product/sum/activation and a chained LSTM cell update |
| `tb_act_unit` | sweep against real sigmoid/tanh, exact ReLU |
| `tb_sm_cost_gen` | random pixel pairs, out-of-image cost |
| `tb_sm_integral4` | random/quadrant/straddling/whole-image windows, worst-case all-255 map, build time |
| `tb_stereo_proc` | full depth map against a brute-force model, true disparities, flat image (ties), frame time |
| `tb_dnpu_top` | the whole chip at default sizes: QVGA 64-level stereo, RGB-D convolution tile, five convolution passes, feature transfer, two MLP layers with element-wise gating between them; counts that every mechanism occurred (~40 s build, ~10 s run) |

The unit testbenches override sizes to keep runs short. `tb_dnpu_top` leaves every
parameter at its default.

## Files
`rtl/dnpu_pkg.sv` (shared types), `rtl/conv_core.sv`, `rtl/dfxp_unit.sv`,
`rtl/mlp_rnn_core.sv`, `rtl/qtable.sv`, `rtl/act_unit.sv`, `rtl/stereo_proc.sv`,
`rtl/sm_cost_gen.sv`, `rtl/sm_integral4.sv`, `rtl/dnpu_top.sv`; one `tb/tb_<module>.sv`
per module.
