# Bus-interleaved H.264 de-blocking filter accelerator

This is a macroblock-level (MB) de-blocking filter for H.264/AVC 4:2:0 video with
8-bit samples. It is built to sit on a 32-bit AHB bus as a slave of a small
decoder platform, where a CPU moves the data. It rests on two ideas.

* **Move only what needs filtering.** A MB is put into one of eight *filtering
  modes* according to three questions: must the left MB boundary be filtered,
  must the upper MB boundary be filtered, must the edges inside the MB be
  filtered? Only the 4x4 blocks that mode touches cross the bus. A MB with no
  edge to filter ("skip") moves nothing at all.
* **Filter while the bus streams.** No MB is buffered before filtering starts.
  Each 32-bit word (one 4-pixel line of a 4x4 block) is filtered in the cycle it
  arrives. A small transposing register array turns the horizontally filtered
  rows into columns on the way into the local SRAM. The vertical pass then reads
  those columns back and filters them. It turns them into rows again on the way
  out. The only memory is one single-ported SRAM: it is written only in the
  first pass and read only in the second.

The architecture is the one published as "A Platform Based Bus-interleaved
Architecture for De-blocking Filter in H.264/MPEG-4 AVC". Figure and table
numbers in the source comments refer to that paper. Where this RTL departs
from it, the departure is listed at the end of this file and in the comment
of the module concerned.

## Block diagram

```
              +-------------------------------- dbf_top -------------------------------+
  AHB-Lite -->| dbf_ahb_slave --side info--> dbf_bs_unit --bS table--> dbf_mode_class  |
  slave       |   |  ^    \                     (2 banks)      |            | mode      |
              |   |  |     \--start, thresholds---------+      v            v           |
              |   |  |                                  +---> dbf_core <----+           |
              |   in |out                                      |                       |
              +---|--|-----------------------------------------|-----------------------+
                  v  |                                          |
      dbf_core:  in_data --+                                    |
                           |  B      +---------+  A' (final)  +------+  transposed
       sram rdata ---------+-------->| dbf_fir |------------->| Reg2 |-----+--> SRAM (pass 1)
                              A +--->|  (1-D)  |--+           +------+     +--> out  (pass 2)
                                |    +---------+  | B' (intermediate)
                                +---- Reg1 <------+
```

| Module | Role |
|---|---|
| `dbf_top` | The accelerator: AHB slave, bS unit, mode classifier and filter core. |
| `dbf_ahb_slave` | AHB-Lite slave: registers, side-information window and the DATA port. Flow control is by wait states. |
| `dbf_bs_unit` | Boundary strength (bS) of the 32 luma edge segments of a MB, one per cycle. It has two result banks. |
| `dbf_mode_class` | Gives the filtering mode (1..7, skip) and the word count from a bS table. |
| `dbf_core` | The datapath: filter, Reg1, Reg2, SRAM, control. |
| `dbf_ctrl` | Data flow control FSM. It sequences both passes. |
| `dbf_fir` | The 1-D adaptive filter for one 8-pixel line across an edge. Combinational. |
| `dbf_reg1` | 4x4 array holding the partly filtered block behind the edge. |
| `dbf_reg2` | 4x4 transposing array with row and column orientation. |
| `dbf_sram` | 160x32 single-port SRAM with registered read. |
| `dbf_pkg` | Types, the block schedule and the word-count function. |

## Filtering modes and what crosses the bus

Every 4x4 block moves as four 32-bit words. Pixel *k* of a line is in bits
`[8k+7:8k]`, so pixel 0 is the leftmost (or topmost) pixel. A component is luma
(4x4 blocks) or one chroma plane (2x2 blocks). Besides its own blocks, a
component has one row of upper-neighbour blocks U and one column of
left-neighbour blocks L. Luma filtering reads four lines on each side of an
edge. Neighbours are kept as whole 4x4 blocks for chroma too, so that every
block takes the same path through the pipeline.

| Mode | Left | Upper | Inside | Blocks moved per component | Words each way |
|---|---|---|---|---|---|
| 1 | Y | Y | Y | U, L, all current | 160 |
| 2 | N | Y | Y | U, all current | 128 |
| 3 | Y | N | Y | L, all current | 128 |
| 4 | N | N | Y | all current | 96 |
| 5 | Y | Y | N | U, L, top row and left column of current | 116 |
| 6 | N | Y | N | U, top row of current | 64 |
| 7 | Y | N | N | L, left column of current | 64 |
| skip | N | N | N | none | 0 |

A boundary "needs filtering" when at least one of its bS values is non-zero.
Modes 1 and 5 move 16 more words than the published transfer sizes (144 and
100). The source does not show how it packs the chroma neighbours when both
boundaries are filtered. Its mode-5 count fits chroma neighbours sent as
2-pixel strips, but then modes 2 and 3 would move 120 words, not 128. Here
neighbours are always whole blocks.

### Block order

This is the part a driver must get right. The components go in the order luma,
Cb, Cr. Blocks a mode does not need are simply left out.

* **Input (horizontal pass), rows of blocks:** for each block row r: L_r, C_r0,
  C_r1, ... Then U0..U(N-1). The upper blocks have no vertical edge to filter,
  so they are only carried into the SRAM. Each block is sent as its four row
  words, top row first.
* **Output (vertical pass), columns of blocks:** L0..L(N-1). Then, for each
  block column c: U_c, C_0c, C_1c, ... Each block is returned as its four row
  words, top row first, after both filtering passes.

The output holds every block that went in, including the modified neighbour
blocks. The CPU writes all of them back to the picture.

## How one pass works

Both passes are a single stream of blocks. Each step takes line *w* of the block
arriving now (B) and line *w* of the previous block, held in Reg1 (A):

1. `dbf_fir` filters the 8-pixel line A3..A0 | B0..B3.
2. B's partly filtered line goes back into Reg1 line *w*. It is filtered again at
   the block's far edge.
3. A's final line goes into Reg2 at index *w*.
4. In the same cycle, Reg2 gives out its index-*w* line of the block written one
   block period earlier. Reg2 alternates between row and column orientation each
   block, so that line is a *column* of that block.

The bS used in step 1 comes from the table only when A and B really share an
edge that the mode filters. Otherwise bS is forced to 0 and both lines pass
through unchanged. This is how the stream goes from one block row to the next,
or carries neighbour blocks that are only transported, without a stall. Four
flush steps move the last block from Reg1 into Reg2, and four drain steps empty
Reg2.

* Pass 1 (vertical edges): B comes from the input port, and Reg2's output is
  written to the SRAM at `4*block_id + w`. Blocks are therefore stored as
  columns. Luma uses block ids 0..3 for U, 4..7 for L and 8..23 for the current
  blocks in raster order. Cb starts at id 24 and Cr at id 32, each with U, L
  and current blocks in the same order.
* Pass 2 (horizontal edges): B comes from the SRAM, read one cycle ahead. Reg2's
  output, now rows again, goes to the output port.

Pass 2 starts only after the last block of pass 1 is in the SRAM, because the
SRAM has one port. Vertical edges are filtered left to right within each row,
and horizontal edges top to bottom within each column. This gives the same
result as the standard's order (all vertical edges of the MB, then all
horizontal ones), because lines in different rows or columns do not interact.

Chroma edges take the bS of the luma edge at the same picture position. Chroma
line *y* (0..7) uses luma segment `y/2` of luma edge `2*e`.

## The filter (`dbf_fir`)

The decision tree is that of H.264:

* A line is filtered when bS != 0, |A0-B0| < alpha, |A1-A0| < beta and
  |B1-B0| < beta.
* **bS 1..3:** a clipped correction changes A0 and B0. For luma, A1 (B1) also
  changes when |A2-A0| < beta (|B2-B0| < beta). The clipping value is tc0, plus
  1 for each such side for luma, or plus 1 for chroma.
* **bS 4:** for luma, when |A2-A0| < beta and |A0-B0| < alpha/4+2, the strong
  5/4/5-tap filter changes A0..A2. Otherwise a 3-tap filter changes A0 only.
  The B side works the same way.

Tap weights, rounding and clipping follow the standard exactly. One departure
from the published decision chart: it writes the strong-filter limit as
alpha/4, and the standard's alpha/4+2 is used here.

## Boundary strength (`dbf_bs_unit`)

Each block's side information is one 32-bit word. Words 0..15 are the current
MB in raster order, 16..19 the left MB's right column, and 20..23 the upper MB's
bottom row.

| Bits | Field |
|---|---|
| 31 | intra coded |
| 30 | non-zero coefficients |
| 29:28 | number of reference pictures |
| 27:24 | reference picture id |
| 23:12 | mv x, signed quarter samples |
| 11:0 | mv y, signed quarter samples |

The rules, in order:

1. Intra: bS 4 on the MB boundary, 3 inside.
2. Else non-zero coefficients: bS 2.
3. Else a different reference picture, a different number of references, or an
   mv difference of at least 4 quarter samples (`MV_LIMIT`): bS 1.
4. Else bS 0.

An edge to a missing neighbour (picture or slice edge) gets bS 0. The unit
evaluates one segment per cycle (32 cycles). The result goes into one of two
banks, so the next MB's table can be computed while the core still filters the
current MB.

## Programming the accelerator

Registers (byte offsets; only `HADDR[7:0]` is decoded; word accesses only):

| Offset | Access | Contents |
|---|---|---|
| 0x00 | W | CTRL. [0] start MB. [1] start bS. [2] left MB available. [3] upper MB available. |
| 0x00 | R | STATUS. [0] core busy. [1] bS busy. [2] bS table ready. [3] bS can start. [6:4] mode of the ready table. [7] the last MB started had a line that met the filter condition. [15:8] words each way. [23:16] MBs finished. |
| 0x04 | RW | alpha_y [7:0], beta_y [15:8], alpha_c [23:16], beta_c [31:24] |
| 0x08 | RW | tc0_y for bS 1/2/3 in [4:0]/[9:5]/[14:10]; tc0_c in [20:16]/[25:21]/[30:26] |
| 0x0C | W/R | DATA. Write pushes an input word; read pops an output word. Wait states until possible. |
| 0x40-0x9C | W | side information of blocks 0..23 |

Per MB:

1. Write the 24 side words and CTRL = `0b1x10` with the availability bits set.
2. Poll STATUS[2].
3. Read the mode and word count from STATUS.
4. Write PARAM0/PARAM1, then CTRL = 1.
5. Write the input words, then read the same number of output words.

You can load the next MB's side information and start its bS in step 5,
between writing the input words and reading the output words. `mb_done` pulses at the end of each MB; for a skip
MB it pulses at once.

The host computes alpha, beta and tc0 from QP with the standard's tables. There
is one set for luma and one for chroma per MB. Filtering stays conformant when
the host gives values that match each edge. When the left or upper MB has a
different QP, the standard uses the average QP on those boundary edges. This
design cannot hold different values for boundary and inner edges of one MB.

## Timing

Without back-pressure, a mode that moves NB blocks (4·NB words each way) raises
`done` 8·NB+17 cycles after the core takes `start`:

* 4·NB+8 cycles for pass 1;
* 1 cycle to prime the SRAM read;
* 4·NB+8 cycles for pass 2, whose last 4·NB cycles carry the output words.

| Mode | 1 | 2, 3 | 4 | 5 | 6, 7 | skip |
|---|---|---|---|---|---|---|
| Core cycles | 337 | 273 | 209 | 249 | 145 | 0 |
| Published latency | 342 | 310 | 246 | 254 | 182 | 50 |

The published figures include about 50 cycles of bS calculation in every MB. This
design runs the bS calculation (32 cycles plus 24 side-word writes) alongside
the previous MB. Bus time is extra: with a pipelined AHB master a DATA transfer
takes one cycle, and a non-pipelined master takes two.

At 100 MHz, 2560x1280 at 30 frames/s needs a MB every 260 cycles. That is met
when the mix of modes averages below that. A stream of nothing but mode-1 MBs
is not. Measured over AHB by `tb_dbf_workload`, counting every bus cycle the
CPU spends (side words, registers, pixel bursts):

| MB mix (100 MBs each) | Cycles per MB |
|---|---|
| High motion (about 29% mode 1, 21% skip, the rest spread) | 226 |
| Static (83% skip) | 98 |
| Mode 1 only | 357 |

A skip MB still costs about 60 bus cycles, for its 24 side words and the
control accesses.

## Departures from the published design, in short

* The local SRAM is 160 words rather than 140, because neighbour blocks are kept
  whole. The 96-word shared luma/chroma variant is not built.
* Modes 1 and 5 move 160 and 116 words instead of 144 and 100.
* The bS unit takes 32 cycles, not 50, and is double buffered instead of being
  slotted into the turn-around between the passes.
* The strong-filter limit is alpha/4+2 (the standard's value), not alpha/4.
* Motion vectors count as equal when within 4 quarter samples (standard), not
  when identical.
* The register map, side-information format and valid/ready streams are this
  design's own; the source only says "32-bit AHB slave".
* The CPU, the other accelerators and the AHB fabric of the platform are not
  part of this RTL.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv rtl/*.sv tb/tb_dbf_top.sv --top-module tb_dbf_top
./obj_dir/Vtb_dbf_top
```

The same command with another `tb/tb_*.sv` and its `--top-module` runs a unit test.

| Testbench | What it checks |
|---|---|
| `tb_dbf_top` | 20 MBs end to end over AHB at the default sizes. Every mode including skip, missing neighbours, bS overlap, wait states, bS 4 and chroma filtering. Every output word is compared against the reference. |
| `tb_dbf_workload` | The mode mixes of a high-motion and a static sequence, and mode 1 only, 100 MBs each. Checks every output word and the cycles per MB against the 260-cycle budget. |
| `tb_dbf_core` | All modes with and without back-pressure. Checks every output word and the 8·NB+17 latency. |
| `tb_dbf_ctrl` | Handshake counts, SRAM write/read address order, bS only in the right pass, latency. |
| `tb_dbf_fir` | 20 000 random lines and two hand-worked ones against the reference filter. |
| `tb_dbf_bs_unit` | Random side information against a model of the decision tree, 32-cycle timing, both banks. |
| `tb_dbf_mode_class`, `tb_dbf_reg1`, `tb_dbf_reg2`, `tb_dbf_sram`, `tb_dbf_ahb_slave` | Unit behaviour. |

`tb/dbf_ref_pkg.sv` is the reference model. It filters whole MB regions in the
standard's edge order and lists the blocks of each mode. It was written apart
from the RTL's schedule functions.
