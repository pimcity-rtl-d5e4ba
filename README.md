# PimCity: a compute-in-memory fabric with row- and column-parallel logic

Most digital processing-in-memory (PIM) arrays compute in one dimension only. In a
column-parallel array, a gate reads cells in two rows of a column and writes a third
row of the same column, and every column does this at once. Data can then move
between rows but never between columns. Anything else needs a read, a trip through
peripheral logic and a write back.

PimCity drops that limit. Each cell of its MTJ (magnetic tunnel junction) array has
a second access transistor and each row has a second logic line. A gate can
therefore also run along a row: the operands sit in different columns, and every
row computes at once. Switching between the two modes from one operation to the
next turns data movement into logic. Two NOTs copy a value to any row or column,
with no read or write.

The same idea scales past one array. Neighbouring tiles join their logic lines
through one transistor per line. A gate can then take its inputs in one tile and
write its output in the next. Every row (or column) of a tile can do this at once,
and no shared network is involved.

This repository models that fabric in synthesizable SystemVerilog. It has:

* the cell array, modelled by its digital behaviour;
* the row and column decoders;
* the inter-tile switches;
* the tile;
* one controller that drives all tiles in lockstep;
* a top level with a grid of tiles.

## How a gate happens inside the array

An MTJ is a resistor with two states: low resistance (logic 0) and high resistance
(logic 1). To compute, two input cells are put in parallel with one output cell,
and a gate-specific voltage is applied. If enough current flows, the output cell
switches to a fixed state. Otherwise it keeps its old state. A low-resistance
(0) input raises the current. So every gate is a *threshold* operation:

1. **Preset** the output cell to one state.
2. **Evaluate.** The output flips to the other state only when the inputs let
   enough current through.

| gate | preset | output switches to | when            | result     |
|------|--------|--------------------|-----------------|------------|
| NOT  | 0      | 1                  | input is 0      | ~a         |
| NAND | 0      | 1                  | not both 1      | ~(a & b)   |
| AND  | 1      | 0                  | not both 1      | a & b      |
| NOR  | 0      | 1                  | both 0          | ~(a \| b)  |
| OR   | 1      | 0                  | both 0          | a \| b     |

`pimcity_array` follows this model literally. Presets are separate operations
(`PRESET0`, `PRESET1`) that write a constant into the output cells. If you forget a
preset, the result is the threshold function of the old cell value, just as in the
real device. The current on a logic line is reduced to two facts per line: "all
inputs are 1" and "some input is 1". These are exact for gates with at most two
inputs, which is all the array supports. A two-input AND with the same cell given
twice is a one-input copy. The test programs use it to copy without inverting.

### Row logic and column logic

| mode (`dir`)        | inputs and output are    | lines computing in parallel | logic line |
|---------------------|--------------------------|-----------------------------|------------|
| column logic (`DIR_COL`) | rows of the same column | the active columns          | CLL, one per column |
| row logic (`DIR_ROW`)    | columns of the same row | the active rows             | RLL, one per row    |

Column logic has an electrical rule. Even rows hang on bitline BLE and odd rows on
BLO, so both inputs must be on rows of one parity and the output on a row of the
other parity. The array checks this. A violation raises `op_err`, the gate is not
applied, and the controller's sticky `err` flag is set. Row logic has no parity
rule. Reads and writes move one whole row, and a read of zero or several rows is
rejected.

Cells have no reset, because MTJs are non-volatile. A testbench must write a cell
before reading it.

## Decoders: latched and bulk addresses

A gate must activate several lines at once: two inputs and an output in one
dimension, and the parallel lines in the other. Each decoder (`line_decoder`) keeps
latches per line, and the controller supplies one address per cycle. Each line has
three latches, one per role (input, output, parallel), because the array drives
input and output cells differently.

An address is 11 bits. With the MSB clear it names one line. With the MSB set it is
a reserved *bulk* address: `0` = all lines, `1` = first half, `2` = second half.
Bulk addresses normally select the parallel dimension. The halves let a column
operation touch only part of a row; the test programs use this to write the upper
half of a row without disturbing the lower half.

## Tiles, links and tile selection

`pimcity_tile` holds one array, its two decoders and two `ll_switch` instances.
Those switches are the transistors toward the west/east neighbours on the row logic
lines, and toward the north/south neighbours on the column logic lines. All tiles
receive the same micro-operation every cycle. Two instruction fields decide which
tiles act:

* **`tsel`** picks the selected tiles:
  * `TS_ALL` selects every tile.
  * `TS_ONE` selects the tile with index `r*GRID_C + c`.
  * `TS_EVEN` and `TS_ODD` select tiles by their coordinate along the link axis:
    the tile column for east-west links or no link, the tile row for north-south
    links.
* **`link`** (`NONE`, `N`, `S`, `E`, `W`) turns a gate into a two-tile gate. Each
  selected tile with a neighbour in that direction is a *source*: its input cells
  drive the joined line. The neighbour is the *destination*: its output cells are
  written. Row logic must use E/W and column logic N/S.

If every switch along a row of tiles closed at once, all the lines would merge into
one. For that reason a tile that would be both source and destination is rejected
and `err` is raised. Use `TS_EVEN` or `TS_ODD` to pair tiles up. For example, "NOT
through `LINK_W` with `TS_ODD`" moves a column of every odd tile into its even west
neighbour, in all rows at once. This is how partial sums are gathered in a
matrix-vector product.

## Controller and instruction set

`pim_controller` holds an instruction memory (`IMEM_DEPTH`, default 1024) and a row
buffer (`DBUF_DEPTH`, default 16 rows of `T` bits) that sits between the host and
the fabric. After `start` it runs from address 0 until `HALT`, then pulses `done`.

Instruction word (`pimcity_pkg::instr_t`):

| field     | meaning |
|-----------|---------|
| `op`      | `NOP`, `LOGIC`, `WRITE`, `READ`, `HALT` |
| `gate`    | `NOT`, `NAND`, `AND`, `NOR`, `OR`, `PRESET0`, `PRESET1` |
| `dir`     | row logic or column logic |
| `link`    | inter-tile direction or none |
| `tsel`, `tile` | tile selection |
| `a`, `b`, `c` | input lines and output line (`WRITE` writes row `c`, `READ` reads row `a`) |
| `par`     | lines of the parallel dimension (usually a bulk address) |
| `buf_idx` | row buffer entry for `WRITE` and `READ` |

Each instruction expands into micro-operations, one per cycle:

| instruction            | cycles | sequence |
|------------------------|--------|----------|
| 2-input gate           | 4 | input a, input b, output c, fire |
| NOT                    | 3 | input a, output c, fire |
| PRESET0/1              | 2 | output c, fire |
| WRITE                  | 2 | row and columns, write strobe |
| READ                   | 3 | row and columns, sense strobe, store into buffer |
| NOP / HALT             | 1 | |

The first cycle of every instruction also clears all latches and latches `par`. The
instruction memory is read combinationally, so there is no fetch overhead. `done`
rises one cycle after the `HALT` cycle. A program of `n` instructions therefore
takes the sum of the cycles above, plus 1 for `HALT`, plus 1. The controller and fabric
testbenches check this count.

The host loads the program (`prog_we`) and the rows to write (`dbuf_we`), pulses
`start`, waits for `done`, and collects rows that were read (`dbuf_raddr` /
`dbuf_rdata`). Programs longer than the instruction memory are run in chunks. The
array state persists between runs.

## Programming examples

`tb/tb_pimcity_top.sv` builds two programs with the helper package
`tb/tb_pim_asm.sv`. Both are good starting points.

**Moving data by logic.** X and Y (4 bits each) sit in different rows of one tile.
The program runs in three steps:

1. Four row-logic NOTs produce X' in spare columns of X's row.
2. One column-logic NOT over the upper half of the columns writes X into Y's row.
   That makes b+1 gates for b bits, with no read or write.
3. A ripple-carry adder of 9-NAND full adders, in row logic, forms X+Y.

**Matrix-vector product.** A 128 x 2 matrix of 4-bit numbers is spread over a 2 x 2
grid of tiles. Column c of the matrix lives in tile column c, and the matrix rows
are split over the two tile rows. The program runs in five steps:

1. The vector is written into one row.
2. Column-logic copies spread the vector to every row, including a north-south
   copy into the second tile row.
3. Every row multiplies with AND partial products and full adders, all rows and
   tiles in parallel.
4. The products move west through the row logic lines.
5. A row-logic addition forms each output element.

Each full adder costs 9 NANDs, and each NAND needs its preset. A 4-bit multiply is
about 400 instructions, and the whole product is about 1100.

**32-bit matrix-vector products.** `tb/tb_pimcity_mvm.sv` runs the evaluated
workload at a smaller size. It computes ten products of one 8 x 8 matrix with
ten vectors, on 1 x 4 tiles of 512 x 512, with 32-bit elements kept modulo 2^32.
Each tile row holds two (matrix element, vector element) pairs. The program runs
in four steps:

1. The matrix is written once. For each vector, its elements go into row 0, and
   column-logic copies spread them to the other rows.
2. Every row multiplies and accumulates its two pairs. The low 32 bits of each
   product come from shift-and-add with AND partial products.
3. The partial sums are reduced in log2(4) = 2 steps. First tiles 1 and 3 send to
   tiles 0 and 2 at the same time. Then tile 2 sends to tile 0 in two hops through
   tile 1, because a gate reaches only a neighbouring tile.
4. The 8 results are read from tile 0.

One vector takes about 28,500 instructions and 85,000 cycles. The host feeds the
program in chunks of 1023 instructions.

## Sizes

| parameter    | default | origin |
|--------------|---------|--------|
| `T`          | 1024    | 1024 x 1024 is the largest practical MTJ PIM array (256 x 256 is the other size studied) |
| `GRID_R` x `GRID_C` | 1 x 69 | 69 tiles hold a 1024 x 1024 matrix of 32-bit values on 1024 x 1024 tiles; one matrix row per tile row puts the tiles of a row side by side on the row logic lines |
| `IMEM_DEPTH` | 1024    | this design's choice |
| `DBUF_DEPTH` | 16      | this design's choice |

Address fields cover tiles up to 1024 x 1024 and grids up to 2^17 tiles.

At the default size the fabric holds a matrix of up to 1024 x 1024 (up to 69
tiles). A 2048 x 2048 matrix needs 274 tiles in two tile rows, so the grid
parameters must be raised. A 32-bit multiply is tens of thousands of gate
instructions, so such programs are streamed in chunks.

## Departures from the published architecture, and choices made here

The published architecture specifies the cell, the array modes, the decoder
mechanism, the tile links and a single broadcasting controller. It does not
specify their digital interfaces. The following are this design's own:

* **Analog array.** The array is a digital model. Voltages, currents and sense
  amplifiers are replaced by strobes and the two logic-line facts. Timing in
  nanoseconds (an MTJ switches in about 3 ns) is not modelled; one gate
  evaluation is one clock cycle.
* **AND and OR.** Their preset/switch directions are inferred by analogy with
  NAND.
* **Inter-tile gates.** The inputs must all be in the source tile. Gates with one
  input in each tile are not supported. Chained links are rejected, not modelled.
* **Instruction fields and timing.** The link, tile-selection, parallel-address
  and buffer fields, the per-instruction cycle counts, the instruction memory, the
  row buffer and the host handshake are all this design's choices.
* **Three latches per decoder line.** The decoder keeps three latches per line
  (input/output/parallel), and the bulk codes are encoded as described above.
* **Tiles without sense amplifiers.** The published architecture also describes
  an area-saving variant in which most tiles cannot be read and results are
  shipped by logic to a few readable tiles. Here every tile can read.

## Files

| file | contents |
|------|----------|
| `rtl/pimcity_pkg.sv`    | instruction word, micro-operation, enums, gate threshold functions |
| `rtl/line_decoder.sv`   | latched row/column decoder with bulk addresses |
| `rtl/pimcity_array.sv`  | behavioural model of the T x T MTJ array |
| `rtl/ll_switch.sv`      | inter-tile logic-line switches |
| `rtl/pimcity_tile.sv`   | tile: array, decoders, switches, selection and link roles |
| `rtl/pim_controller.sv` | controller: instruction memory, sequencer, row buffer |
| `rtl/pimcity_top.sv`    | grid of tiles plus controller |
| `tb/tb_*.sv`            | one self-checking testbench per module, plus `tb_pimcity_full` at the default size and the workload testbench `tb_pimcity_mvm` |
| `tb/tb_pim_asm.sv`      | instruction builders used by the fabric testbenches |

Hierarchy: `pimcity_top` contains `pim_controller` and `GRID_R*GRID_C` instances of
`pimcity_tile`. Each tile contains two `line_decoder`, two `ll_switch` and one
`pimcity_array`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Build and
run any of them with Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_pimcity_top \
        -y rtl -y tb +libext+.sv rtl/pimcity_pkg.sv tb/tb_pim_asm.sv tb/tb_pimcity_top.sv
    ./obj_dir/Vtb_pimcity_top

The testbenches:

* **Unit testbenches** use small tiles (8 to 64 cells per side) and run in under a
  second.
* **`tb_pimcity_top`** (64 x 64 tiles, 2 x 2 grid) runs both programming examples.
  It checks 128 matrix-vector outputs against integer arithmetic and checks every
  program's cycle count. It counts each mechanism and fails if one never occurs:
  row logic, column logic, E/W and N/S links, bulk all and half addresses, every
  tile-selection mode, writes, reads and the illegal-operation flag.
* **`tb_pimcity_full`** uses the default parameters: 69 tiles of 1024 x 1024, about
  72 million cells. It runs a column NAND, a row NOR and an east-west inter-tile
  copy on all tiles, and compares the rows it reads back with a reference. It
  takes about three minutes to compile and under a second to run.
* **`tb_pimcity_mvm`** (512 x 512 tiles, 1 x 4 grid) runs ten 32-bit matrix-vector
  products and checks every result and every chunk's cycle count. It takes about
  one minute.

The simulator has two states. Uninitialised cells start at arbitrary values, so
write before you read.

To change the design:

* Grid size and tile size are parameters of `pimcity_top`.
* New gates go in `gate_e` and the three gate functions of `pimcity_pkg`.
* New bulk groups go in `bulk_e` and the decode in `line_decoder`.
