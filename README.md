# Arithmetic-oriented embedded FPGA fabric

A general-purpose FPGA spends most of its area on a very flexible routing
network, because it must handle any logic. Arithmetic datapaths (filters,
correlators, decoders, multipliers) make much narrower demands. Their signals
mostly go to the next bit or the next row, operands are shared by whole
words, and every bit of a word does the same operation. This fabric is
shaped around those demands:

* **Logic elements built for arithmetic.** Each LE holds two LUT-2s, a
  dedicated sum and carry logic, and two storage elements. One LE is a gated
  full adder, the cell of an array multiplier.
* **Fixed directional local interconnect.** Data flows from top to bottom and
  from right to left. Each LE talks only to its neighbours, including both
  lower diagonals, so shifts by one bit cost nothing.
* **Broadcast lines instead of per-LE connection boxes.** Operands from the
  global network run along a row or down a column of LEs, and each LE picks
  what it needs.
* **Shared configuration.** The four LEs of a cluster row share one
  configuration word. The connection boxes and routing switches also switch
  four wires with one field.
* **A small global network.** There are 16 tracks per channel, used mainly to
  bring operands in and results out.

The default macro has 2 × 2 tiles. Each tile holds a 4 × 4 LE cluster, so the
macro has 64 LEs. Everything is parameterised, and the defaults are the
published figures where there are any.

## Structure

```
            h channel (16 wires)            h channel
          ┌──────── CB ────────┐ RS ┌──────── CB ────────┐ RS
          │ SRAM │ 4x4 LEs     │ CB │ SRAM │ 4x4 LEs     │ CB
          │      │             │    │      │             │
          └────────────────────┘ v  └────────────────────┘ v
          ┌──────── CB ────────┐ RS ┌──────── CB ────────┐ RS
          │ SRAM │ 4x4 LEs     │ CB │ SRAM │ 4x4 LEs     │ CB
          └────────────────────┘    └────────────────────┘
```

| File | Contents |
|------|----------|
| `rtl/efpga_pkg.sv` | sizes, configuration word type `le_cfg_t`, select encodings |
| `rtl/ao_le.sv` | the logic element |
| `rtl/ao_cluster.sv` | R × C LEs, broadcast lines, configuration sharing |
| `rtl/cfg_sram.sv` | configuration memory of a tile |
| `rtl/ao_cb.sv` | connection box: channel wires to broadcast lines |
| `rtl/ao_rs.sv` | routing switch at a channel crossing |
| `rtl/ao_tile.sv` | cluster, SRAM, top and right connection boxes, routing switch |
| `rtl/efpga_top.sv` | grid of tiles, global channels, local interconnect, configuration port |

## The logic element

Four operand multiplexers pick A, B, C and D. Each picks one of eight
signals:

| code | source | code | source |
|------|--------|------|--------|
| 0 `SRC_GH`  | horizontal broadcast line of the row | 4 `SRC_N0` | output 0 of the LE above |
| 1 `SRC_GV0` | vertical broadcast line 0 of the column | 5 `SRC_N1` | output 1 of the LE above |
| 2 `SRC_GV1` | vertical broadcast line 1 of the column | 6 `SRC_NE` | diagonal from the upper-right LE |
| 3 `SRC_NW`  | diagonal from the upper-left LE | 7 `SRC_E`  | from the LE to the right |

The core computes the following, with each truth table indexed by
{second input, first input}:

```
fA    = lut_a[{B,A}]                       // LUT-A, e.g. AND = partial product
fB    = lut_b[{D,C}]                       // LUT-B
sum   = fA ^ fB
carry = fA&fB | C&D
t     = lut3 ? (A ? fB : lut_a[{D,C}]) : fA  // LUT-3 on (A,D,C) when lut3=1
path0 = d0_sum   ? sum   : t
path1 = d1_carry ? carry : fB
o0    = reg0 ? register(path0) : path0     // same for o1 / path1 / reg1
```

With `lut_b = XOR`, `sum` and `carry` make a full adder on (fA, C, D). When
`lut3` is set, a second decoder reads LUT-A's four cells with (D,C), and A
picks between that bit and LUT-B's. So the two 4-bit tables form one 8-entry
table `{lut_b, lut_a}` indexed by {A,D,C}.

| use | A | B | C | D | lut_a | lut_b |
|-----|---|---|---|---|-------|-------|
| full adder a+b+cin | GV0 (a) | – | GV1 (b) | E (carry in) | pass A | XOR |
| gated full adder (multiplier cell) | GV0 (a_i) | GH (b_j) | NW (partial sum) | N1 (carry) | AND | XOR |
| 3-input function f(A,D,C) | any | – | any | any | f for A=0 | f for A=1, `lut3=1` |

The published LE wires fewer sources to each operand:

* A is `GV0`.
* B is `GV1` or `GH`.
* C is `N0` or `NE`.
* D is `NW`, `N1` or `E`.

Its outputs are fixed:

* o0 goes down, down-left and onto vertical line 0.
* o1 goes down, left, down-right and onto vertical line 1.

Here every operand multiplexer sees all eight sources, and the side outputs
are selectable. This is a superset, so the published wiring is one
configuration of it.

The outputs go to the neighbours as follows:

* Both outputs go down: `s[0] = o0` and `s[1] = o1`.
* The west output and the two lower diagonals each carry o0 or o1, chosen by
  the bits `w_o1`, `sw_o1` and `se_o1`.
* Two broadcast-drive fields (`bdrv0`, `bdrv1`) can each replace a vertical
  broadcast line below the LE with o0 or o1. This is how results leave a
  cluster.

Configuration word `le_cfg_t` (32 bits, MSB first):
`bdrv1[31:30] bdrv0[29:28] se_o1 sw_o1 w_o1 reg1 reg0 d1_carry d0_sum lut3
lut_b[19:16] lut_a[15:12] src_d[11:9] src_c[8:6] src_b[5:3] src_a[2:0]`.

## Local and broadcast interconnect

LE coordinates are global, with row 0 at the top and column 0 at the left.
LE (r,c) receives these signals:

```
nw <- (r-1,c-1).se    n[1:0] <- (r-1,c).s    ne <- (r-1,c+1).sw    e <- (r,c+1).w
```

This wiring spans the whole LE array, so carries and shifts cross tile
borders. At the array edge the inputs come from `loc_e_in` (east column) and
`loc_n_in` (top row), and the diagonals get 0. The signals leaving the array
appear on `loc_w_out`, `loc_s_out` and `loc_se_out`. Bit weight normally
rises to the left, so a ripple carry travels west. For an array multiplier,
the sum goes south-east and the carry goes south.

The broadcast lines work like this:

* **Horizontal.** Each LE row has one horizontal line, fed by the right
  connection box.
* **Vertical.** Each LE column has two vertical lines, fed at the top by the
  top connection box. A line passes through every LE. Any LE may replace the
  line below itself with one of its outputs.
* **Cluster outputs.** The bottom ends of the vertical lines are the
  cluster's eight outputs: line k of column c is output `k*C + c`. They go to
  the routing switch.

## Global channels, connection boxes, routing switches

Each channel has 16 wires, 8 running each way. There is one horizontal
channel above each tile row and one vertical channel to the right of each
tile column. A routing switch sits at every crossing, at the top-right corner
of its tile.

* **Connection box.** Its lines form groups of four, and each group has a
  4-bit base. Line k of a group carries channel wire `(base + k) mod 16`. So
  a 4-bit operand on adjacent wires lands in adjacent columns or rows with
  one field. Wire numbering in the box: `{west-going, east-going}`
  for the top box, and `{south-going, north-going}` for the right box. In
  both boxes, wires 0–7 are the second of the pair.
* **Routing switch.** Each side's eight outgoing wires form two groups of
  four. Each group has a 3-bit select: 0 = off, 1 to 4 = the same-numbered
  wires arriving from N, E, S or W, and 5 = the cluster outputs.
* **Edge ports.** The wires at the macro edge are the ports `west_in/out`,
  `east_in/out`, `north_in/out` and `south_in/out`.

## Configuration

Address `cfg_addr = {tile, word}` with tile index `r*NC + c`. A write takes
effect on the next rising clock edge. `cfg_rdata` reads back the addressed
word, and reset clears all words.

| word | contents |
|------|----------|
| 0–3 | LE words for cluster rows 0–3 (the 4 LEs of a row share one word) |
| 4 | connection boxes: [3:0] base of top vertical line 0, [7:4] base of top vertical line 1, [11:8] base of the right box |
| 5 | routing switch: field `3*(side*2 + group)`, side order N, E, S, W |

That is the map for the default tile. In general a tile has one word per
`CFG_GRAN` LEs (row-major order). The connection-box fields follow: one 4-bit
base per group of `CFG_GRAN` lines, top box first, then the right box. The
routing-switch fields come last: one 3-bit select per group of `CFG_GRAN`
wires, at `3*(side*groups + group)`. Each of the two field sets is packed
into as few 32-bit words as it needs, and a field may straddle two words.
`efpga_pkg::tile_words` and `tile_abits` give the word count and the word
address width. The default tile has 6 words and 3 address bits. At
`CFG_GRAN = 2` it has 11 words (8 LE, 1 connection box, 2 switch) and 4 bits.

## Timing

The fabric is combinational from its inputs to its outputs, except where a
`reg0`/`reg1` bit selects an LE register. Registers load on the rising edge
of `clk` and clear on `rst_n` low. A datapath can be pipelined by rows: the
4 × 4 multiplier in `tb/tb_array_multiplier.sv` with registered rows gives
its product five clocks after its operands.

As in any FPGA, a configuration could close a combinational loop through
switches or transparent LEs. Such a configuration is illegal, and lint tools
report the structural loops in `efpga_top`, `ao_cluster` and `ao_le`.

## What is published and what is chosen here

Taken from the published architecture:

* LE contents and their wiring: two LUT-2s that combine into a LUT-3 through
  a second decoder and a multiplexer, a partial-product gate on the global
  lines, sum and carry gates fed by the two LUT results and the two local
  operands, two storage elements with input multiplexers, and multiplexers
  onto the broadcast lines.
* The directional local interconnect, including both lower diagonals and the
  connections across cluster borders.
* Broadcast lines: two vertical lines per column and one horizontal line per
  row, as the drawings of a single LE show. The overview drawing of the tile
  shows four line stubs per column and per row between the connection boxes
  and the cluster. This RTL follows the LE-level count; more lines would need
  wider operand selects in `le_cfg_t`.
* Sizes: 4 × 4 clusters, configuration shared by four LEs, and 16 global
  tracks.
* The tile floor plan (SRAM, two connection boxes, routing switch) and a
  macro of four clusters.

Chosen in this implementation:

* the sum and carry equations (the published drawing gives which signals
  feed the two gates, not the gates themselves);
* operand multiplexers that see all eight sources, and selectable side
  outputs, in place of the fixed, smaller published selection;
* flip-flops with a bypass where the original uses small transmission-gate
  latches;
* unidirectional channel wires;
* the rotating connection-box mapping;
* the same-index routing-switch pattern;
* the configuration word layout and port;
* the macro edge ports;
* reset behaviour.

The published work also describes a second, LUT-free reference template with
a hierarchical connection-box network. It was used as a baseline and is not
part of this RTL. Area, density and layout results are properties of a
physical implementation and are not modelled.

## Simulation

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`.
For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/efpga_pkg.sv \
          tb/tb_array_multiplier.sv --top-module tb_array_multiplier
./obj_dir/Vtb_array_multiplier
```

| testbench | checks |
|-----------|--------|
| `tb_ao_le` | random configurations against a truth-table model, with register timing; gated full adder |
| `tb_ao_cluster` | random configurations of the whole cluster against a row-by-row model; configuration sharing |
| `tb_cfg_sram`, `tb_ao_cb`, `tb_ao_rs` | memory, connection-box and switch rules |
| `tb_ao_tile` | CB bases and RS routes loaded through the configuration port |
| `tb_efpga_top` | full-size macro: 8-bit adder across two tiles with operands routed through a switch, registered-sum latency, LUT-3, diagonal shifts across a tile border |
| `tb_array_multiplier` | full-size macro: 4 × 4 carry-save array multiplier, all 256 products, and the pipelined version's latency |
| `tb_efpga_1x3` | the macro generated as one row of three tiles: 12-bit adder whose carry crosses two tile borders, configuration addressing of three tiles |
| `tb_correlator` | full-size macro: chip-match accumulator of a code correlator, with the accumulator fed back through a routing switch and connection box |
| `tb_efpga_gran2` | a tile built with a configuration granularity of two: different functions in the two halves of an LE row, connection-box and switch groups of two, a switch field straddling two words |

To change the fabric size, set `NR`/`NC` (tiles) and `CFG_GRAN` on
`efpga_top`. The configuration map and address width follow automatically.
`R` and `C` are parameters too. `R`, `C*2` and 8 must be multiples of
`CFG_GRAN`. The routing switch takes the first eight cluster outputs, so
clusters wider than four columns need a wider switch input.
