# CQNN: a CGRA of binary components for quantized neural networks

A quantized convolution with `fb`-bit features and `wb`-bit weights is a sum of
`fb x wb` binary convolutions, each weighted by a power of two:

    sum_n F[n]*W[n] = sum_i sum_j 2^(i+j) * popcount(F_i & W_j)

where `F_i` and `W_j` are bit planes. Batch normalisation followed by
quantisation to `q` bits is a comparison against `2^q - 1` thresholds, and
`q` chained comparators can find the level by binary search, one bit per
stage. Max pooling of unsigned numbers can also be done one bit at a time,
most significant bit first.

This design is a grid of identical tiles. Each tile has a binary convolution
unit (BCONV), a threshold comparator (T-BN) and a one-bit pooling unit
(BPOOL), joined to its neighbours by a switch that can shift and add. A
per-layer configuration groups rectangles of tiles into *engines*, one per
output channel, sized to that layer's bit widths and channel count. The
control processor loads the next layer's configuration and parameters while
the current layer runs, then switches every tile at once.

Default size: 64 rows x 16 tile columns, that is 1024 each of BCONV, T-BN and
BPOOL (a 64x48 component array). Features and weights up to 6 bits are
supported.

## Files

| file | contents |
|---|---|
| `rtl/cqnn_pkg.sv` | constants, tile configuration word, instruction header, parameter record, link structs |
| `rtl/bconv.sv` | 288-bit AND + popcount |
| `rtl/acc_switch.sv` | shift/add switch with a popcount alignment buffer |
| `rtl/tbn.sv` | threshold table (two banks) + comparator + next-address logic |
| `rtl/bpool.sv` | one bit of a max pool |
| `rtl/cgra_tile.sv` | one tile: the four parts above plus configuration and weight shadow registers |
| `rtl/cgra_array.sv` | ROWS x TCOLS tiles, neighbour links, configuration shift chain, parameter write decode |
| `rtl/cp_imem.sv` | instruction memory |
| `rtl/cp_src.sv` | switch reconfiguration controller (one column per cycle) |
| `rtl/control_processor.sv` | instruction fetch/decode and layer sequencing |
| `rtl/param_scheduler.sv` | streams weights/thresholds into the array |
| `rtl/feature_scheduler.sv` | window input, row buses, write-back of pooled bits |
| `rtl/cqnn_top.sv` | everything wired together |
| `tb/` | one self-checking testbench per module; `tb_cqnn_top` (reduced array, four layers), `tb_cqnn_full` (default size, two layers) and `tb_cqnn_table1` (default size, twelve-layer width/channel sweep) |

## Tile

A tile holds:

* **BCONV.** It ANDs a 288-bit feature slice (3x3 window x 32 input channels,
  one bit plane) with the tile's 288-bit weight plane and counts the ones.
  The result is registered, so the latency is one cycle.
* **Switch.** It computes `acc = (chain_in << acc_shift) + (side_in << side_shift) + popcount`
  and registers the sum. Each input comes from any of the four neighbours,
  or from none. `skew` delays the local popcount so that it meets the partial
  sum that has been travelling through the engine. The delay uses a circular
  buffer of 128 entries. With `bconv_en = 0` the tile only forwards a sum.
* **T-BN.** It compares a value with one threshold and passes on the value and
  the next table address. The table has 64 entries (6-bit search). There are
  two banks: one is in use and the other is loaded for the next layer.
* **BPOOL.** It holds one bit of the running maximum and a pooling counter,
  and passes a three-state comparison result (equal so far / already greater
  / already smaller) to the BPOOL of the next lower bit. `out_dly` holds the
  higher bits back so that all `q` bits of a result leave in the same cycle.

All links between tiles are registered outputs, so no configuration can form a
combinational loop. Each tile has two copies of its configuration word and of
its weight plane. The active copy is used by the running layer. The shadow
copy is written for the next layer. A single `apply` pulse copies shadow to
active in every tile.

### Threshold search

Table addresses follow a binary-search tree. An address is the bits decided so
far, then a 1, then zeros: `100` is the root for three bits. Entry `a` holds
threshold `T(a-1)`, and entry 0 is unused. A stage outputs
`bit = value > T`. The next address is the current address, with its marker
bit cleared if `bit` is 0, OR-ed with the marker shifted right by one. After
`q` stages the output bits are the level (for example `011` = 3). The first
stage starts at `1 << (q-1)`. Biases are assumed to be folded into the
thresholds.

## Engines and reduction

The main engine shape, called the *default* shape here, is:

* Rows are (feature bit, input-channel group) pairs, with 288 bits per group.
  The order is bit-major, group-minor, and the most significant feature bit is
  at the bottom.
* Columns are weight bits, most significant on the left.

An engine for `fb x wb` bits and `ng` groups takes `fb*ng` rows and `wb`
columns. Partial sums run along each row from west to east, shifted by 1 per
hop (the weight-bit weighting). In the last column they run north to south.
The shift there is 1 where the feature bit changes and 0 between groups of the
same bit. The result arrives in the bottom-right tile, which also starts the
T-BN chain. The chain climbs `q` tiles of the last column, and each BPOOL in
it produces one output bit.

A popcount at row `k`, column `m` gets `skew = k + m`, so that it enters the
sum in the same cycle as the partial sum it belongs to. With 64 rows and 16
columns the largest skew is 78. The accumulator is 26 bits signed, enough for
6x6-bit products over 16 groups.

A second shape, the *vertical* engine, stacks all `fb*wb*ng` products in one
tile column. They are ordered by decreasing bit weight `i+j`. The column
reduces north to south, with a shift of 1 where `i+j` drops and 0 otherwise,
and skew `k`. It suits layers whose weight width does not divide the 16
columns well.

Engines placed side by side, or stacked, receive the same window and hold
different weights, so each computes a different output channel. The rows must keep one (bit plane, group) each, because
each row has one feature bus.

## Reconfiguration

Each instruction is a header plus one configuration word per tile column.
The header holds `pool_n`, `n_windows`, `drain`, `n_params` and a row map
(bit plane and group per row).

* The control processor fetches and decodes the next layer's instruction as
  soon as the current layer starts.
* The SRC pushes its columns into the array one per cycle. They enter at the
  right-most column and shift left, so after TCOLS cycles every column holds
  its shadow word.
* At the same time the parameter scheduler writes the next layer's weight
  planes and thresholds. Each record is addressed by kind, row, column and
  table index. Writes go to the shadow copies only.
* When the configuration and parameters are both loaded and the running layer
  has ended, the control processor issues `apply`. The array switches in one
  cycle, the T-BN banks swap and the feature scheduler starts the new layer.

## Schedulers

The **feature scheduler** takes one window per cycle (`win_valid`/`win_ready`).
A window is up to 6 bit planes x 16 groups of 288 bits. The scheduler drives
every row bus with the slice its row map selects. It passes every cycle's
valid pooled bits to the write-back port as a ROWS*TCOLS vector with a mask.
It ends a layer after `n_windows` windows plus `drain` cycles; `layer_done`
pulses `drain + 2` cycles after the last window is accepted. The compiler
sets `drain` to cover the deepest pipeline. The test mapping uses
`fb*ng + wb + 2q + 8`.

The **parameter scheduler** accepts `n_params` records (`p_valid`/`p_ready`,
one per cycle) once the control processor has decoded the next layer's
instruction. Then it reports `load_done`.

## Interfaces and timing

* Clock `clk`, active-low asynchronous reset `rst_n`. Control registers
  are reset. Memories (instruction memory, threshold tables, popcount
  delay buffers, row buses) are not. Their contents count only after the
  program has written them or when a reset valid bit marks them.
* Program load: `im_we_hdr` / `im_we_col` with `im_layer`, `im_col`, `im_hdr`
  and `im_cfg`. Run: pulse `start` with `n_layers`. `done` is set after the
  last layer and stays set until the next `start`. `busy` is high while running.
* Throughput: one window per cycle per layer, with all engines working in
  parallel. Layer preparation takes TCOLS cycles (configuration) or
  `n_params` cycles (parameters), whichever is longer, and overlaps the
  previous layer. The switch-over itself takes a few cycles.

* Parameter loading runs at one 288-bit record per cycle. A layer that uses
  the whole array therefore needs about 1024 cycles of weight loading plus
  its thresholds. This is hidden behind the previous layer only when that
  layer streams at least as many windows. Short layers, like the 32-window
  layers in the tests, are limited by parameter loading.

## Where this design departs from, or adds to, the description

* The adders take two shifted inputs. The description shows an accumulator
  with one left shift per switch. A second input lets a row reduce in one
  direction and the last column in the other.
* The popcount skew is aligned in the switch, by a delay buffer. The
  description only says that the feature scheduler sends features "in the
  expected order".
* BPOOL passes a greater-than state in addition to the enable. Without it the
  lower bits cannot tell "equal so far" from "already larger".
* Input-channel groups are stacked bit-major in the default engine, not
  group-major.
* The horizontal engine shape, with groups side by side in one row, is not
  supported. One feature bus per row carries one slice.
* The instruction format is this design's own; the description's figure of
  the instruction structure was not available.
* BCONV covers 32 input channels, as the text says. One figure labels its
  BCONVs with 16-channel ranges.
* The SRC configures one column per cycle. The description allows this to be
  customised.

## Not built

* **Line buffers.** The feature scheduler receives windows already formed. It
  does not build them from a feature map or reuse overlapping data. A layer's
  output therefore has to be rearranged outside before it can feed the next
  layer.
* **Off-chip memory.** Its read and write streams are top-level ports.
* **Compiler, cycle-accurate simulator and RTL generator.** These are
  software. `tb/cqnn_tb_pkg.sv` contains a small mapping routine for the
  default engine shape, which the testbenches use to build their programs.
* **Layers larger than one pass.** A layer with more than 16 groups (4608
  inputs per output), or more than 64 rows (`fb*ng`), needs partial sums kept
  across passes, which is not provided. This covers the first fully connected
  layer of the Cifar-10 VGG-like network (8192 inputs), AlexNet (9216) and
  VGG-16 (25088). All convolution layers of those networks, and every layer
  of the 3x3 / 32-128 channel / 1-5 bit sweep, fit.
* **Raw classifier scores.** The last layer's output is quantized by T-BN
  like every other layer; unthresholded sums are not brought out.

## Simulation

With Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/cqnn_pkg.sv tb/cqnn_tb_pkg.sv tb/tb_cqnn_top.sv --top-module tb_cqnn_top
    ./obj_dir/Vtb_cqnn_top

Each testbench prints `TB_RESULT checks=N failures=M`. Each one compares
against a software model: bit-plane products, the threshold level search and
the maximum over each pooling region.

* `tb_cqnn_top` runs an 8x6 array through four layers with different bit
  widths, channel counts, pool sizes and engine shapes (three default, one
  vertical). It counts layer switches, parameter
  loads overlapping a running layer, pooled outputs, multi-group sums and
  window stalls, and fails if any of them never happens.
* `tb_cqnn_full` runs the default 64x16 array through two layers:
  - 4-bit features x 3-bit weights over 128 input channels (4 groups), with
    4-bit output and 2x2 pooling, as twenty engines of 16 x 3 tiles;
  - a binary layer over 64 channels with 2x2 pooling, as 512 engines of
    2 x 1 tiles.

  It takes under a minute.
* `tb_cqnn_table1` runs the default array through twelve 3x3 convolution
  layers with 2x2 pooling. Nine of them use 128 input channels and the
  feature x weight widths (1,1), (2,1), (2,2), (3,2), (3,3), (4,3), (4,4),
  (5,4) and (5,5). The other three use (4,3) with 32, 64 and 96 channels.
  Each layer has as many engines as fit, from 256 down to 9. Building and
  running it takes about two minutes.

Results at the time of writing: all testbenches pass. Each module also has a
deliberately broken copy that its testbench catches.
