# Reconfigurable CNN/GCN inference accelerator for a small FPGA

An object detector for 1024 x 1024 four-channel (RGB + infrared) aerial
images combines a graph-convolution front end (ten fully connected layers with
Sigmoid) with a YOLO back end (125 convolutions with folded batch
normalisation and SiLU). Neither part fits on a small FPGA with 0.97 MB of
on-chip memory, and no single accelerator serves both well. So the whole
fabric is one reconfigurable region. At run time the processor loads one of
four accelerator modules into it, runs every layer that suits that module,
and then loads the next one:

| module     | kind            | parallel lanes     | tile buffers                  | activation |
|------------|-----------------|--------------------|-------------------------------|------------|
| GCN        | fully connected | one 64-wide tree   | 64x64 in, 64x64 weights       | Sigmoid    |
| conv 1     | Conv2d          | T_od=8 x T_id=16   | 64x64 out, 64x64 in           | SiLU       |
| conv 2     | Conv2d          | T_od=32 x T_id=4   | 32x32 out, 64x64 in           | SiLU       |
| conv 3     | Conv2d (head)   | T_od=3 x T_id=64   | 64x64 out, 64x64 in           | none       |

All arithmetic is 16-bit fixed point, Q7.9. Weights, activations and
configuration files live in main memory; tiles are moved in and out by DMA.

This repository holds synthesizable SystemVerilog for the four modules, the
region that holds them, and self-checking testbenches. The processor, the
DMA engine, DRAM and the FPGA's configuration port are outside it.

## The reconfigurable region (`pr_region_top`)

In hardware only one module exists at a time: any pair of them is too large
for the device. In this RTL all four are instantiated side by side and the
region logic decides which one is present:

* `reconfig` high means the configuration port is writing a partial
  bitstream; `rm_sel` says which module it holds. While `reconfig` is high
  the region is isolated (`ld_ready`, `busy`, `done` low) and every module is
  held in reset.
* When `reconfig` falls, the module named by `rm_sel` becomes the loaded one
  (`rm_loaded`, `rm_valid`). Two cycles later its reset is released and
  `ld_ready` rises. The other three stay in reset.
* Load, command and read traffic reaches the loaded module only; its outputs
  are the region's outputs.
* Buffer contents do not survive a reconfiguration: the host reloads them.

After power-up no module is loaded until the first reconfiguration. The
isolation rule and the reset hand-over are this design's own; a real
reconfiguration takes about 10 ms for a 4 MB configuration and is not
modelled.

All modules share one port set, so the static side (DMA, processor) sees the
same interface whatever is loaded:

| port                  | dir | meaning |
|-----------------------|-----|---------|
| `ld_valid/ld_ready`   | in/out | write one word into a buffer; accepted when the module is idle |
| `ld_buf`              | in  | `BUF_IN`, `BUF_WEIGHT` or `BUF_BIAS` |
| `ld_addr`, `ld_data`  | in  | flat index (below) and Q7.9 word |
| `start`, `cmd`        | in  | start a tile command (`tile_cmd_t`), only while idle |
| `busy`, `done`        | out | `busy` from start until `done`, which pulses for one cycle |
| `rd_addr`, `rd_data`  | in/out | read an output word, saturated to Q7.9, one cycle later |

`tile_cmd_t` (in `fxp_pkg`) carries `rows`, `cols`, `k` (1 or 3), `s`
(1 or 2), and four flags:
* `first`: start from the bias rather than the stored partial sums.
* `last`: saturate and activate on write-back.
* `act`: enable the module's activation.
* `feedback`: GCN only, see below.

## Number format and rounding

Every stored activation, weight and bias is Q7.9: 16-bit two's complement,
7 integer bits including the sign and 9 fractional bits. The resolution is
1/512 and the range is [-64, 64). Products are exact (18 fractional bits).
The MAC trees add them without loss. Each pixel's sum over one tile is rounded
half up to 9 fractional bits and kept as a 32-bit partial sum, so a layer
deeper than one tile loses nothing between tiles. Only the last tile
saturates the result to Q7.9 and applies the activation. Rounding once per
tile and keeping 32-bit partial sums are this design's choices.

## The convolution modules (`conv_accel`)

One tile computes, for T_od output maps and T_id input maps,

    O[od][r][c] = B[od] + sum over id, ki, kj of W[od][id][ki][kj] * I[id][S*r+ki][S*c+kj]

Batch normalisation costs nothing in hardware. Before the weights are
loaded, it is folded into them: W' = gamma*W/sqrt(sigma^2+eps) and
B' = beta + gamma*(B-mu)/sqrt(sigma^2+eps).

**Dataflow.** Each input map has its own buffer bank, so one read gives the
T_id values `I[*][S*r+ki][S*c+kj]` of one kernel step. T_od MAC trees, each
T_id wide, take this same vector. Each multiplies it with its own weights
`W[od][*][ki][kj]`. The weights sit in T_od x T_id small memories of K_MAX^2
words, one per tree input, and are read together. A new step issues every
cycle, in this order, fastest first: kj, ki, output column, output row. The
K*K tree results of a pixel are summed behind the trees. The pixel then goes
through a two-stage read-modify-write of the output buffer: bias or old
partial sum, plus the new sum, then SiLU on the last tile.

**Buffers.** The buffers are input T_ir x T_ic x T_id, weights
K^2 x T_id x T_od and output T_or x T_oc x T_od. Their sum must stay within
the on-chip memory. With 32-bit output words, module 1 needs 264 KB, module 2
166 KB and module 3 577 KB.

**Tile geometry.** A tile must satisfy `S*(rows-1)+K <= T_ir` (and the same
for columns). With T_ir = 64, a K=3, S=1 tile has at most 62 x 62 outputs,
and a K=3, S=2 tile on module 2 at most 31 x 31. An assertion flags commands
that break this.

**Load addressing (flat indices):**

    input  : (id*T_IR + r)*T_IC + c
    weight : ((od*T_ID + id)*3 + ki)*3 + kj     (K=1 uses ki=kj=0)
    bias   : od
    output : (od*T_OR + r)*T_OC + c             (read port)

**Timing.** The module does one kernel step per cycle, so all
T_od x T_id multipliers are busy on every step. A tile takes
`rows*cols*K*K + LAT + 2` cycles from the `start` edge to the edge that sees
`done`, where LAT = 1 + log2(T_id) is the tree latency.

**Running a layer.** The host loops over output-depth tiles (T_od maps at a
time), spatial tiles and input-depth tiles. For each input-depth tile it
loads the input tile and the weights, then issues a command. The command has
`first` set on the first depth tile and `last` on the final one. The host
then reads the output tile back. Any layer with K <= 3 and S <= 2 can be
tiled this way. Buffers are never cleared. If a depth tile has fewer than
T_id input maps, the host loads zero weights for the missing ones. The largest, with 2560 input maps, 1280 output maps and a
1024 x 1024 output, takes 160 x 160 depth tiles on module 1 for each spatial
tile.

**The three variants.** Their parameters follow the original design's
tiling table: (T_od, T_id, T_or, T_ir) = (8, 16, 64, 64), (32, 4, 32, 64)
and (3, 64, 64, 64). Module 3 has no SiLU, because it serves the detection
head. Its T_od of 3 divides that head's 51 output maps. Tiles are square
(T_oc = T_or, T_ic = T_ir). Which header of that table names which dimension
is an interpretation. The first two columns are read as the parallel
dimensions. This matches the reported 201 DSPs: module 3 needs 192
multipliers.

## The fully connected module (`gcn_accel`)

A layer maps an input of Row x Column values and weights of Depth x Column
values to Row x Depth outputs, `O[r][d] = B[d] + sum_c W[d][c]*I[r][c]`.
Inputs and weights come in T_row x T_col and T_depth x T_col tiles, here
64 x 64 each. These tile sizes are this design's choice: the source gives
none. Each column has its own input bank and weight bank. Every cycle, one
64-wide MAC tree gets one input row and one weight row: one dot product per
cycle. For each (row, depth) the dot product is accumulated over column tiles
exactly as in the convolution modules. The last column tile applies Sigmoid.
A compute tile takes `rows*cols + LAT + 2` cycles (rows = input rows used,
cols = output depths used).

**On-chip hand-over.** The activations of this part of the model are small,
so layers pass them to each other without main memory. A command with
`feedback` set copies the finished 64 x 64 output tile into the input
buffer: output depth d becomes input column d. The next layer then only
needs its weights loaded. The copy takes `rows*cols + 1` cycles and needs
T_DEP = T_COL, which is checked at elaboration.

The tree always sums all 64 columns. For a narrower layer, the host loads
zero weights for the unused columns.

Flat indices: input `r*T_COL + c`, weight `d*T_COL + c`, bias `d`,
output `r*T_DEP + d`.

## Activation unit (`pwl_act`)

Sigmoid is approximated by four linear segments with power-of-two slopes.
Each segment is then a shift and an add (the classic PLAN table):

| abs(x)         | Sigmoid(abs(x))          |
|----------------|--------------------------|
| >= 5           | 1                        |
| 2.375 to 5     | abs(x)/32 + 0.84375      |
| 1 to 2.375     | abs(x)/8 + 0.625         |
| 0 to 1         | abs(x)/4 + 0.5           |

For negative x the result is 1 - Sigmoid(abs(x)). SiLU is built on top of it
as x * Sigmoid(x): one multiplier, rounded half up. The maximum error of this
Sigmoid against the exact function is 0.0196. The unit is
combinational. Using a piecewise-linear Sigmoid and deriving SiLU from it
follows the original design. The exact segment table is an assumption.

## Sizes and limits

* Multipliers: GCN 64, conv 1 128, conv 2 128, conv 3 192, plus one for SiLU.
  Only one module is present at a time.
* Peak rate at 150 MHz: 192 MAC per cycle on module 3, or 57.6 GMAC/s. The
  full 2530 GFLOP model therefore needs at least about 22 s of compute per
  image, plus reconfiguration and DMA time.
* Output tiles of one command are limited to 255 rows and columns by the
  8-bit command fields. The buffers limit them further.
* Not modelled: the processor's scheduling, DMA, DRAM and the configuration
  port. The load port moves one word per cycle, which is far narrower than a
  real DMA path. The simulator therefore spends most of its time loading
  buffers.

## Files

| file | contents |
|------|----------|
| `rtl/fxp_pkg.sv` | Q7.9 types, rounding and saturation, `tile_cmd_t`, enums |
| `rtl/tile_ram.sv` | one buffer bank (registered read) |
| `rtl/mac_tree.sv` | pipelined N-input multiply-add tree |
| `rtl/pwl_act.sv` | piecewise-linear Sigmoid and SiLU |
| `rtl/conv_accel.sv` | convolution module |
| `rtl/gcn_accel.sv` | fully connected module with on-chip hand-over |
| `rtl/pr_region_top.sv` | the reconfigurable region with all four modules |
| `tb/tb_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_*.sv` | self-checking testbench per module |

## Simulation

Each testbench checks results against its own reference model. It prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that hangs.

* `tb_pwl_act` runs every 16-bit input through all three modes.
* `tb_mac_tree` streams random vectors, including extreme values, and checks
  every sum and its latency.
* `tb_conv_accel` and `tb_gcn_accel` use small parameters. They cover
  multi-tile accumulation, both kernel sizes, stride 2, saturation, SiLU,
  Sigmoid and the on-chip hand-over, and they check every output word and
  every tile's cycle count.
* `tb_pr_region_top` runs the region at full size. It reconfigures into each
  of the four modules and runs full tiles on each. It also checks isolation
  during reconfiguration, and that every mechanism above happens at least
  once.
* `tb_conv_layer` runs one complete convolution layer on conv module 1,
  tiled by a host loop. Its shape is 80 input maps, 80 output maps, K=3 and a
  64 x 64 output. The testbench compares the whole result with a direct
  convolution.
* `tb_gcn_stack` runs ten fully connected layers back to back on the full
  region. The input tile is loaded once and every hand-over stays on chip.
  Only the final result is read back and checked.

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/fxp_pkg.sv tb/tb_ref_pkg.sv rtl/tile_ram.sv rtl/mac_tree.sv \
      rtl/pwl_act.sv rtl/gcn_accel.sv rtl/conv_accel.sv rtl/pr_region_top.sv \
      tb/tb_pr_region_top.sv --top-module tb_pr_region_top
    ./obj_dir/Vtb_pr_region_top

For another testbench, swap its file and `--top-module`. The smaller
testbenches need only the RTL files they use. The full-size region test
builds in about a minute and runs in a few seconds.
