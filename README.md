# DRC²: an SRAM array that computes

DRC² (Dynamically Reconfigurable Computing Circuit) moves ALU work into a memory macro. In an
ordinary SRAM, a read opens one row at a time. Here several rows are opened at once on the read
bit lines, so the bit lines themselves evaluate a NOR or an AND of the selected cells. A little
logic under each column turns these into XOR, comparison, implication, shifts and word-wise
ripple-carry arithmetic. Data never leaves the array to reach a processor. A result can be read
out on the output bus or written back into a row. Each column can run its own operation in each
cycle, so one array can do a different job in each of its columns at the same moment.

This repository holds synthesizable SystemVerilog for:

* the macro: a 10-transistor 3-port bitcell array, the column periphery, word arithmetic, a
  shifter and a slice-wise program controller;
* the application system built around it: a pixel processor that pulls every pixel of a signed
  occupancy-grid image one step toward zero. It uses a binary CAM (BCAM) to find all pixels of
  one sign in one cycle, then increments or decrements them inside the array, one pixel per
  cycle.

The top module is `drc2_pixel_system`.

## How a column computes

Each bitcell is a 6T write port plus two 2-transistor read ports (`drc2_bitcell`).

* **Read port F.** It pulls its pre-charged bit line RBLF low when its word line RWLF is high
  and the cell stores `1`.
* **Read port T.** It pulls RBLT low when RWLT is high and the cell stores `0`.

With one cell selected, RBLF therefore reads `NOT A` and RBLT reads `A`. When several cells
share a bit line, any one of them can discharge it. This gives:

| cells selected on        | RBLF                 | RBLT                 |
|--------------------------|----------------------|----------------------|
| none                     | 1 (stays pre-charged)| 1 (stays pre-charged)|
| set F on RWLF            | NOR of set F         | –                    |
| set T on RWLT            | –                    | AND of set T         |

Any number of rows, up to all of them, can take part. `drc2_array` models the pre-charge and
discharge inside one cycle as a combinational OR of the cell pull-downs. It has one write port,
so writes land on the clock edge. In the same cycle the array performs two multi-row reads and
one write; a read of the row being written returns the old data.

## The slice periphery

A *slice* is one column together with its periphery (`drc2_slice_io`). The periphery has:

* sense inverters;
* a mux that passes RBLF, or its inverse when `ADDEN=1`;
* a cascade of three NAND gates.

With `m` the mux output:

```
O1 = NAND(m, RBLT)      O2 = NAND(NOT m, NOT RBLT)      O3 = NAND(O1, O2)
```

What these outputs mean depends on how the rows were selected:

| access mode                              | ADDEN | O1                       | O2                  | O3                |
|------------------------------------------|-------|--------------------------|---------------------|-------------------|
| same rows on both ports                  | 0     | 1                        | all equal (NXOR)    | not all equal (XOR / COMP) |
| set F on port F, set T on port T         | 0     | OR(F) + NAND(T) (mixed op)| –                  | –                 |
| one row A on F, one row B on T           | 0     | NOT(NOT A·B) = B→A       | NOT A + B = A→B     | A ⊕ B             |
| one row A on F, one row B on T           | 1     | NAND(A,B)                | A + B               | NOT(A ⊕ B)        |

`drc2_slice` decodes the slice's operation code (`drc2_pkg::op_e`). It sets ADDEN and picks the
single-cycle result:

* from RBLT: RD and AND;
* from RBLF: RD_NOT and NOR;
* inverted bit lines: OR and NAND;
* from the periphery outputs: XOR (O3), NXOR (O2) and IMP (O1);
* constants: RD_0 and RD_1.

Which rows the caller selects on which port decides the operands:

* **OR and NOR** use the rows on port F.
* **AND and NAND** use the rows on port T.
* **XOR and NXOR** use the same rows on both ports. With more than two rows, XOR becomes
  "not all equal" and NXOR becomes "all equal".
* **IMP** gives `T → F` for one row on each port. With more rows it gives OR(F rows) OR NAND(T rows).

XOR also works with one row on each port. NXOR does not: with one row per port, O2 is an
implication, not an NXOR.

## Word arithmetic: a 3-cycle ripple-carry pipeline

A word is `WORD` adjacent slices, with the LSB in the lowest column. Operand A is one row on
port F and operand B one row on port T. With these operands every slice already produces, in
the read cycle:

* **generate (inverted):** `g_n = O1`, which is NAND(A,B) for add and NAND(NOT A,B) for subtract;
* **propagate:** `p = O2`, which is A+B for add and NOT A + B for subtract;
* **half sum:** A ⊕ B. O3 is inverted back when ADDEN=1.

`drc2_rca` turns these into a full adder or subtractor in three pipelined cycles:

1. `g_n`, `p` and the half sum are latched.
2. The carry (or borrow) ripples LSB→MSB through two NAND gates per slice,
   `c[j+1] = NAND(g_n[j], NAND(p[j], c[j]))`, with `c[0] = 0`, and is latched.
3. The result is `sum[j] = halfsum[j] ⊕ c[j]`.

A new word operation can enter every cycle. One pipeline runs per word. The word's result is
written back at the end of its 3rd cycle.

**INC and DEC** need no constant row. With no row selected on port T, RBLT reads all ones, so:

* INC is `A − 111…1`, which equals A+1;
* DEC is `A + 111…1`, which equals A−1.

Both saturate. If the final carry or borrow shows that the field wrapped around, A is kept.
INC stops at all ones and DEC stops at zero.

**LT and GT** are decided in cycle 2 from the final borrow of `A − B`:

* LT(A,B) is the borrow.
* GT is "no borrow and A ≠ B".

The 1-bit result goes to the word's LSB; its other bits are 0.

**SHL and SHR** (`drc2_shifter`) take two cycles. The word read through RBLT is latched, then
shifted by one bit with zero fill.

## Commands, latencies and the output bus

`drc2_core` accepts one command per cycle. A command holds:

* `cmd_rwlf`, `cmd_rwlt`: a bit vector of selected rows for each read port;
* `cmd_op[c]`: an operation for every slice;
* `cmd_wb_en`, `cmd_wb_row`: an optional write-back row.

Every slice of a word must receive the same word operation (an assertion checks this).

| operations                                            | latency | result on `out_data` | written back at end of |
|-------------------------------------------------------|---------|----------------------|------------------------|
| RD, RD_NOT, RD_0, RD_1, NOR, OR, AND, NAND, XOR, NXOR, IMP | 1   | cycle t+1            | cycle t                |
| SHL, SHR, GT, LT                                      | 2       | cycle t+2            | cycle t+1              |
| ADD, SUB, INC, DEC                                    | 3       | cycle t+3            | cycle t+2              |

Here t is the cycle the command is issued, which is also the cycle the array is read.
`out_valid` marks the slices that carry a result.

Operations of different lengths overlap freely. An ADD started in cycle t is still in the
periphery while ORs, XORs or further ADDs on new rows start in cycles t+1, t+2, and so on.

The caller has to keep results apart:

* **Output bus.** If two results reach the same slice in the same cycle, the longer operation
  wins the bus.
* **Write-back.** Only one write-back can happen per cycle. The longer operation is written,
  and `wb_conflict` pulses to flag the one that was dropped.
* **Plain writes.** `wr_*` is a masked write of arbitrary data. It is taken only in cycles
  without a write-back (`wr_ready`).

`busy1` tells a sequencer that a multi-cycle operation will still be in the periphery in the
next cycle.

`drc2_controller` plays a program of such commands, one per cycle, from a small command memory.
It is the "dedicated controller" that picks rows and per-slice operations cycle by cycle.

## The pixel system

`drc2_pixel_system` stores an image of signed 8-bit pixels, one pixel per row:

* the sign bit goes in a 1-bit-wide BCAM (`drc2_bcam`);
* the other 7 bits go in the DRC² array (`COLS = WORD = 7`).

Raising `sat_start` runs the occupancy-filter "mitigation" step. Each negative pixel is
incremented and each positive pixel decremented, both saturating. The memory controller
(`drc2_mem_ctrl`) sequences it:

```
cycle      0      1        2        3        4      ...  Np1+1    Np1+2    Np1+3
           SR'1'  encode   encode   encode   ...
                           INC#1c1  INC#1c2  INC#1c3
                                    INC#2c1  INC#2c2 ...
                                                          INC#Np1c1 c2       c3
then the same starting with SR'0' and DEC:  total Np1+4 + Np2+4 = Np+8 cycles
```

* **SR (search).** One BCAM search raises the match line of every pixel with the sign searched
  for. The hit latches (`drc2_hit_detect`) capture them.
* **encode.** The priority encoder (`drc2_prio_enc`) gives the lowest pending row. That hit
  line is cleared, and in the next cycle the controller issues an INC (or DEC) of that row with
  write-back to the same row. The row address goes through the row decoder (`drc2_row_dec`)
  onto RWLF.
* **Pipelining.** INC takes 3 cycles, but a new one starts every cycle.
* **Second pass.** When no hit is left and the last INC is in its third cycle, the second pass
  starts with sign `0` and DEC.

A pass that finds no pixel takes 3 cycles instead of 4.

Because only the 7 low bits change and they saturate, no pixel changes sign. The BCAM never
needs updating during a pass. Negative pixels stop at −1 and positive ones at 0.

Three sources can issue commands. In priority order they are:

1. the memory controller;
2. the program controller (`prog_*`);
3. the host command port (`host_cmd_*`), which is also how pixels are read back, with RD commands.

## Module map

```
drc2_pixel_system
├── drc2_bcam            sign bits, one-cycle search
├── drc2_hit_detect      hit latches, discharged one by one
├── drc2_prio_enc        lowest pending hit
├── drc2_mem_ctrl        search / encode / INC-DEC / drain sequencer
├── drc2_row_dec         row address -> RWLF
├── drc2_controller      program of per-cycle commands
└── drc2_core            the DRC² macro
    ├── drc2_array       ROWS x COLS drc2_bitcell, wired NOR / AND bit lines
    ├── drc2_slice  x COLS     op decode, result select
    │   └── drc2_slice_io      mux + NAND cascade (O1, O2, O3)
    ├── drc2_rca     x COLS/WORD  3-stage ripple-carry add/sub, INC/DEC, LT/GT
    ├── drc2_shifter x COLS/WORD  2-cycle shift
    └── drc2_row_dec     write word line
drc2_pkg                 operation codes, latencies, ADDEN rule
```

## Parameters

| parameter    | default | where it comes from |
|--------------|---------|---------------------|
| `COLS`       | 7       | 7 array bits per 8-bit pixel |
| `WORD`       | 7       | one pixel per row; `COLS` must be a multiple of `WORD` |
| `ROWS`       | 256     | chosen here; the concept leaves the column length M open |
| `PROG_DEPTH` | 16      | chosen here |

`drc2_core` also works as a general computing memory with wider rows, for example
`COLS = 32, WORD = 8` for four bytes per row. Its testbench runs two 7-bit words per row.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/drc2_pkg.sv \
          tb/tb_drc2_pixel_system.sv --top-module tb_drc2_pixel_system
./obj_dir/Vtb_drc2_pixel_system
```

Replace the testbench name to run another one. The testbenches are:

* **`tb_drc2_pixel_system`** runs the whole design at its default size. It loads a 256-pixel
  image, runs a saturating pass and requires exactly Np+8 = 264 cycles. It reads the image back
  and checks every pixel. It then runs a 10-command program: multi-row logic with a different
  operation in each slice, shift, GT/LT, ADD/SUB with write-back, and mixed two-row logic. Each
  result is checked at its exact cycle.
* **`tb_drc2_core`** issues 4000 random commands against a reference model of the array. Single-,
  2- and 3-cycle operations overlap, write-backs and plain writes are interleaved, and every
  operation must be exercised. It ends with a directed write-back conflict.
* **`tb_drc2_sat_sweep`** runs the pixel system with 32 rows. It uses images with:
  * a random sign mix;
  * only one sign;
  * a single pixel of one sign;
  * pixels already saturated.

  It then repeats passes on one image until the image has converged to −1 and 0. Every pass
  must take exactly `(Nneg+4 or 3) + (Npos+4 or 3)` cycles, and the image is read back after
  every pass.
* **The other testbenches** check each block against an independent model.

## Design choices

The concept fixes these points, and this RTL follows them:

* the bitcell and its read-port polarities;
* wired NOR and AND on the bit lines;
* the mux-and-NAND periphery and its output table;
* the 3-cycle ripple-carry pipeline with a NAND-NAND carry;
* 1-, 2- and 3-cycle operations that pipeline together;
* write-back in the cycle that computes the result;
* the BCAM + hit latch + priority encoder + controller arrangement, and the Np+8 schedule.

The following are choices made for this RTL:

* **Periphery wiring.** The exact gate wiring of the periphery was chosen so that every row of
  the output table holds. With ADDEN=1, O3 is the inverted half sum and is re-inverted.
* **Propagate term.** The carry chain uses O2 (A+B, or NOT A + B) as propagate. This makes the
  same two NANDs serve both addition and subtraction.
* **Latencies.** SUB takes 3 cycles, the same as ADD. The concept's operation list gives SUB
  4 cycles but also describes add and subtract as one 3-cycle structure that differs only in
  ADDEN. This RTL follows the 3-cycle description. A caller that needs the 4-cycle timing can
  wait one more cycle for the result.
* **INC/DEC.** They subtract or add the all-ones word that an unselected port reads, and they
  saturate. The concept only calls the operation a "saturating increment".
* **LT/GT.** Derived from the subtraction borrow. The concept does not detail the comparison
  logic.
* **Shift.** Logical, by one bit, zero fill, inside a word.
* **Not from the concept.** The following are this RTL's own:
  * the operation encoding;
  * the registered output bus;
  * the bus and write-back priorities and `wb_conflict`;
  * the per-column write mask;
  * the plain write port;
  * the program controller's command memory;
  * the command-source priority;
  * lowest-row-first encoding;
  * the 3-cycle empty pass.
* **Pass order.** The first pass searches sign `1` and increments: in two's complement a set
  sign bit is a negative pixel, and negative pixels move up toward zero.

## Limits

* The array is a logic model. Pre-charge, sensing margins and the number of rows that can
  safely share a bit line are analog questions it does not answer.
* Only increments and decrements by one are sequenced by the pixel controller. A step by
  another constant can be programmed as ADD/SUB with a constant row, but it does not saturate.
* The sign bits in the BCAM cannot be read back through the top-level ports. A pass never
  changes them, and they are written together with the pixel.
* The shift is by one position only.
* Nothing here models power or frequency. Only cycle counts are checked.
* Variants built on 6T (1-read/write) bitcells, which need a NOP between INC cycles, are not
  implemented.
