# Edge-flag cache memory feature-vector generator

Edge-based image recognition turns a 64 x 64-pixel recognition window into
a 64-element feature vector. First, binary edge flags are extracted in four
directions: horizontal, vertical, +45° and -45°. Then the flag maps are
*projected*: the flags inside equal-sized slots are counted, and each count
becomes one vector element. Edge extraction is expensive. A recogniser that
slides a window over a scene should therefore not extract edges again for
every window position.

This design keeps the edge flags of a whole scene in an on-chip **edge-flag
cache memory**. A small row of processing units under the memory produces a
feature vector for **any rectangular region, on demand**. It supports
several projection types:

- column sums and row sums (PPED);
- ±45° diagonal sums (PPED);
- cell sums (CED);
- eye/mouth band sums (EM);
- whole-column sums (ego-motion).

The hardware stays the same for every projection type. Only the stream of
commands changes.

The default configuration is a 256 x 256-bit memory holding one edge
direction. The memory is split into 8 blocks of 32 columns. There are 64
processing units, one per 4 adjacent columns, and all sums are 8 bits wide.
A full four-direction vector uses four such engines side by side, one per
edge map.

## The add-and-shift method

All projections reduce to two operations applied to every processing unit
(PU) at once:

- **add**: a memory row is read, and every PU adds the number of set flags
  among its 4 columns to its running sum;
- **shift**: every PU takes the sum of its left neighbour (sums move one PU
  to the right).

**Vertical projection** (sums over columns) uses adds only. After reading K
rows, PU *j* holds the flag count of its 4 columns over those K rows. These
counts are already PPED elements when flags are stored as in the scene.

**Diagonal projection** alternates the two operations: add a row, shift,
add the next row, shift, and so on. A flag read at row *k* in PU *j* has
moved *n* places to the right after *n* more shifts. The value that reaches
the last PU of the region therefore collects every unit with the same
*j - k*: one diagonal. With K rows over L PUs there are K + L - 1 diagonal
sums. They leave the region's last PU one per shift: the first is the
top-right unit alone, and the last is the bottom-left unit alone.

**Grouping.** An element usually covers several basic sums: for example 4
diagonals, or 2 unit columns. The accumulator behind the PUs adds
successive outputs, and it is restarted every *P*-th time to form elements
of period *P*.

**Region of interest.** Each PU has two mask bits:

- **INMSK = 0** marks the first PU of the region. That PU shifts in 0
  instead of its neighbour's sum, so nothing outside the region enters.
- **OUTMSK = 1** marks the last PU. Only that PU drives the OR selectors
  toward the accumulator. All other PUs output 0, so a plain OR acts as the
  multiplexer.

Every PU works on every cycle, and the masks alone define the window. For
this reason the window's size and position are free, within 4-column
granularity.

### The two storage layouts

The memory does not interpret the flags. The host chooses one of two
layouts when it writes the scene:

- **Scene layout.** Flags are stored where they are in the scene. A PU
  covers 1 row x 4 columns. After the adds, PPED vertical elements sit in
  the PUs directly. The next elements are then read by moving the single
  OUTMSK bit one PU per cycle, without shifting any sums. One pass of adds
  over a 64-row band therefore yields the vectors of every 4-aligned window
  in that band.
- **2x2-unit layout.** Each 2 x 2-pixel unit is stored as 4 adjacent
  columns, and two pixel rows become one memory row. A PU then covers one
  2 x 2 unit, and add-and-shift produces true 45° diagonals. A 64 x 64
  window occupies 32 rows x 128 columns.

Horizontal and -45° maps are stored rotated by 90°. Their projections are
then the vertical and +45° cases.

## Structure

```
        wr_*  ──►┌──────────────┐      ┌── sram_block 0 (256x32) ─┐ ... ┌── sram_block 7 ─┐
  cmd ──► phase_ctrl ─ rd_en/row ─► row_decoder ─ 256 word lines ─►│                          │     │                 │
                 │               └──────────────┘      └────────── 32 flags ───────┘     └────── 32 ───────┘
                 │ pu_op (S), acc_en (FINRES), acc_keep (RESET), mask shift
                 ▼                                      processing_block 0               processing_block 7
                                                       8 PU ─►─►─► ... ─►  shift chain ─►─► ... 8 PU
                                                       INMSK/OUTMSK chains ─────────────►─► ...
                                                       OR selector ─► accumulator        OR ─► accumulator
                                                                   └──────── final OR selector ─► vec_out
```

| Module | Role |
|---|---|
| `edge_cache_pkg` | sizes, `op_e`, `pu_op_e`, command struct `cmd_t` |
| `row_decoder` | 8 → 256 word lines; four enabled 6→64 sub-decoders, each two 3→8 predecoders ANDed |
| `sram_block` | 256 x 32 single-port block; row write, registered row read (sense amplifiers) |
| `processing_unit` | 4-flag counter, 8-bit adder, add/shift selector, sum register, INMSK/OUTMSK gating |
| `mask_register` | serial chain of INMSK or OUTMSK bits, cascaded over all blocks |
| `or_selector` | N-input OR used as a selector (per block and final) |
| `final_accumulator` | adds the selected PU output to itself (RESET = 1) or to zero (RESET = 0) on FINRES |
| `processing_block` | 8 PUs, both mask chains, OR selector and accumulator |
| `phase_ctrl` | two-phase timing: expands commands into per-cycle strobes |
| `edge_cache_top` | the whole engine |

The PU shift chain and the mask chains run through all blocks, so a region
may straddle a block boundary. Each block's accumulator sees only zeros
unless the region's last PU is inside that block. Once a capture with
RESET = 0 has been issued, only the block holding the last PU has a
non-zero accumulator, and the final OR selects it.

## Commands and timing

Hardware projections use two cycle lengths. A cycle that reads the memory is
long; a pure shift needs only a short cycle, half as long. Here the clock is
the short cycle, and a long cycle is two clock cycles:

| `cmd.op` | cycles | first cycle | second cycle |
|---|---|---|---|
| `OP_ADD` | 2 | read `cmd.row` | PUs add |
| `OP_SHIFTADD` | 2 | read `cmd.row`, PUs shift | PUs add |
| `OP_SHIFT` | 1 | PUs shift | |
| `OP_HOLD` | 1 | PUs keep their sums | |

`cmd.cap` (FINRES), `cmd.keep` (RESET) and `cmd.mshift` act in the first
cycle. The accumulator therefore samples the last PU's sum as it stood
*before* the command: a capture on a shift records the value being shifted
out. Setting `cmd.mshift` shifts both mask chains one PU to the right.
`cmd.imsk_in` and `cmd.omsk_in` enter at PU 0.

Commands use a valid/ready handshake. A command is accepted on a rising edge
with `cmd_valid && cmd_ready` and executes from the next cycle. `cmd_ready`
is low only in the first cycle of a long command, so commands stream back
to back. `vec_valid` is high in the cycle after a capture, and `vec_out`
then holds the accumulator value. `wr_en/wr_row/wr_data` write a whole
256-bit row. A write is accepted when `wr_ready` is high, meaning the memory
is not being read in that cycle. An assertion flags a write attempted
otherwise.

### Command recipes and cycle counts

In these recipes, the region covers PUs *s*..*e* (L = e - s + 1) and rows
r0..r0+K-1. Load the masks first: 64 `OP_HOLD` commands with `mshift`,
sending the bits of PU 63 first. Then clear the region with L `OP_SHIFT`
commands. In the table, "clk" is one long cycle, or two clock cycles.

| Projection | Commands | Measured | Reference count for the chip |
|---|---|---|---|
| Vertical (any layout) | K x `OP_ADD`, then L x `OP_SHIFT` with `cap`, `keep = (m % P != 0)` | K + L/2 clk | K + L/2 clk (6x6 example: 4.5 clk) |
| Vertical, fast read-out (scene layout) | K x `OP_ADD`, then per element one `OP_HOLD` with `cap` and `mshift` | K clk + 0.5 clk per element | 1 clk per element |
| Diagonal (2x2 layout) | `OP_ADD r0`, (K-1) x `OP_SHIFTADD` with `cap`, L x `OP_SHIFT` with `cap` | K + L/2 clk | K + (L-1)/2 clk |
| PPED, 64x64, 2x2 layout | 32 rows, 32 PUs, P = 2 (vertical) or P = 4 (diagonal) | 48 clk | 47.5 clk |
| CED, scene layout | 4 bands x (16 `OP_ADD` + 16 `OP_SHIFT`, P = 4) | 96 clk | 96 clk |
| CED, 2x2 layout | 4 bands x (8 `OP_ADD` + 32 `OP_SHIFT`, P = 8) | 96 clk | 96 clk |
| EM, 2x2 layout | 2 bands x (8 `OP_ADD` + 32 `OP_SHIFT`, P = 1) | 48 clk | 48 clk |
| Ego-motion, 2x2 layout | 32 `OP_ADD` + 32 `OP_SHIFT`, P = 1 | 48 clk | 48 clk |

Elements come out right to left: the region's last PU first. The one
exception is the fast read-out, which steps the OUTMSK bit left to right. A
region's sums are zero again after L shifts, so banded projections such as
CED and EM need no extra clearing between bands.

## How far it follows the chip, and where it departs

These parts follow the chip as described: the memory size and block split,
the decoder organisation, the PU datapath (adder, S selector, register, mask
gating, unmasked shift output), 8 PUs per block, the 8-bit OR selectors, the
per-block and final accumulators with RESET/FINRES, and the long/short
cycle budget.

These are this design's own choices:

- **Synchronous logic instead of circuit timing.** The SRAM is a register
  array with a registered read. Pulsed word lines, latch sense amplifiers
  with isolation, pre-charge and skewed DRCMOS gates are analog techniques
  and are not modelled. They change speed and power, not function.
- **Long-cycle split.** A long cycle is split into a read phase and an add
  phase. A shift that follows an add is folded into the read phase of the
  next shift-add. As a result a diagonal pass costs one short cycle more
  than the chip's count (K + L/2 instead of K + (L-1)/2). The 6 x 6
  vertical example and the banded cases (CED, EM, ego-motion) match the
  chip's counts exactly. The chip is quoted at 47.5 long cycles for a 64 x 64
  PPED, vertical or diagonal; both come out here at 48.
- **Hold operation.** The PUs have a hold operation (no update). The chip
  gets the same effect by gating its clock.
- **Interfaces.** The serial mask chains, the row-wide write port, the
  command format and handshake, `vec_valid`, and synchronous active-low
  resets of sums, masks and accumulators were all chosen here. Nothing is
  known about how the chip loads masks or edge flags.
- **Width.** Sums wrap at 8 bits. A vertical sum over 64 rows x 4 columns
  can reach 256 and would wrap.
- **Not covered.** The EM projection with flags in scene layout is not
  covered, because 2-column elements cannot be split out of 4-column PUs.
  Use the 2x2 layout for EM.

The edge-extraction front end, which fills the memory, and the vector
matcher behind the engine are outside this design.

An earlier small version of the engine (16 x 12 flags, 6 PUs, 5-bit sums)
read two adjacent rows at once from a dual-port memory, so that each PU saw
a 2 x 2 unit directly. That variant is not included here. The 2x2-unit
layout above gives the same unit sums from a single-port memory.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against an independent reference model, with random stimulus
wherever it applies.

`tb/tb_edge_cache_top.sv` runs the whole engine at its default size. It
writes a random 30 %-density scene and then runs these projections:

- PPED vertical, with both fast and shift read-out;
- PPED diagonal;
- CED in both layouts;
- EM;
- ego-motion.

Every element is compared with sums computed directly from the scene. Each
projection's cycle count is checked against 2 x (long commands) + (short
commands). The testbench also counts each mechanism and requires it to
occur at least once:

- add, shift-add and shift;
- accumulator grouping;
- output-mask stepping;
- the input mask cutting off a non-zero neighbour;
- a write refused during a read.

`tb/tb_pped_four_direction.sv` builds a complete 64-element PPED vector. It
runs four engines in parallel, one per edge direction, each through the
helper `tb/pped_lane.sv`. The edge maps are stored in 2x2 units:

- vertical: as it is;
- horizontal: transposed;
- +45°: as it is;
- -45°: mirrored.

Each map sits in the middle of an otherwise random memory, so the input
mask has real neighbours to cut off. Every element is checked against slot
sums taken directly over the pixel maps. Each engine must finish its
projection in 96 clock cycles (48 long-cycle equivalents).

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/edge_cache_pkg.sv \
    tb/tb_edge_cache_top.sv --top-module tb_edge_cache_top -o sim
./obj_dir/sim
```

Any other testbench runs the same way. Replace the testbench file and the
top module with `tb_<module>`. Every module is parameterised: rows,
columns, blocks, columns per PU and sum width. The top checks that the
columns divide evenly into blocks and PUs.
