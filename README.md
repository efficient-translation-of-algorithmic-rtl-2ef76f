# A grid of 8-bit micro-cores for algorithmic kernels

This is a two-dimensional array of very small processors ("u-cores"). Each u-core
has eight 8-bit registers, a 64-byte scratchpad, an ALU whose main operation is a
reprogrammable 256-entry lookup table, and four byte-wide ports, one to each
neighbour: East, West, North and South. There is no network, no shared memory
and no arbitration. Every core executes one 11-bit control word per cycle, taken
from its own instruction memory, and all cores step together from one program
counter.

The point of the design is that a grid-level operation (rotate a row of
registers, route a byte across the grid, XOR two 16-byte words, an AES round)
is *translated* ahead of time into one short micro-program per core. In these
programs every neighbour transfer is a sender `OUTPUT` paired with a receiver
`INPUT` in the same cycle. The showcase is AES-128 on a 4 x 4 grid. Each core
holds one byte of the state. The S-box sits in every core's lookup table, and
the round keys sit in every core's scratchpad. Encryption takes 217 cycles,
with I/O excluded:

| step         | times | cycles each | total |
|--------------|-------|-------------|-------|
| AddRoundKey  | 11    | 2 (first: 1)| 21    |
| SubBytes     | 10    | 1           | 10    |
| ShiftRows    | 10    | 6           | 60    |
| MixColumns   | 9     | 14          | 126   |
| **total**    |       |             | **217** |

The testbench builds this program, runs it and checks both the ciphertext
(FIPS-197 example) and the 217-cycle count.

## The u-core

```
            +-------------------------------------------------------+
 E,W,N,S -->| input mux --+                         +--> output demux|--> E,W,N,S
   inputs   |             v                         |               |   outputs
            |   register-input select --> R0..R7 ---+--> ALU (F0, F1, LUT,
            |        ^    ^    ^           |  |           SHL, SHR, INC, DEC)
            |        |    |    +-- ALU ----+  +--> scratchpad (64 B)
            |        |    +------- scratchpad read
            |        +------------ register (move)
            |   control decode <-- 11-bit control word <-- instruction memory
            +-------------------------------------------------------+
```

All of a u-core's logic is combinational between the register bank and the
scratchpad, so each instruction reads its operands, computes, and writes back
in one clock. The two register read ports are addressed by the control word's
`Ra` (bits 2:0) and `Rb` (bits 5:3) fields, and `Rc` (bits 8:6) is the usual
destination.

### Instruction set (control word bits 10..0)

| bits 10:9 | bits 8:6 | bits 5:3 | bits 2:0 | operation |
|-----------|----------|----------|----------|-----------|
| 00 | Rc  | Rb  | Ra  | `R[Rc] = F0(R[Rb], R[Ra])`, bitwise; AND after reset |
| 01 | Rc  | Rb  | Ra  | `R[Rc] = F1(R[Rb], R[Ra])`, bitwise; XOR after reset |
| 10 | Rc  | Rb  | 000 | `R[Rc] = LUT[R[Rb]]` |
| 10 | Rc  | Rb  | 011 | `R[Rc] = R[Rb] << 1`, reduced by POLY (below) |
| 10 | Rc  | Rb  | 100 | `R[Rc] = R[Rb] >> 1` |
| 11 | 111 | 111 | Ra  | `R[Ra] = R[Ra] + 1` |
| 11 | 111 | 000 | Ra  | `R[Ra] = R[Ra] - 1` |
| 11 | 001 | Rb  | 0pp | `R[Rb] = INPUT(port pp)` |
| 11 | 001 | Rb  | 1pp | `OUTPUT(port pp) = R[Rb]` |
| 11 | 100 | Rb  | Ra  | `R[Ra] = MEM[R[Rb]]`; if Rb = 7, then R7 = R7 - 1 |
| 11 | 010 | Rb  | Ra  | `MEM[R[Ra]] = R[Rb]`; if Ra = 7, then R7 = R7 + 1 |
| 11 | 000 | Rb  | Ra  | `R[Rb] = R[Ra]` (register move) |
| anything else | | | | no operation (`CW_NOP` = 11 011 000 000) |

Port codes `pp`: 00 East, 01 West, 10 North, 11 South. R7 is the scratchpad
pointer. It moves after the access, so a sequence of reads walks down through
memory and a sequence of writes walks up. The scratchpad uses only the low six
bits of an address, so addresses wrap modulo 64.

`mmc_pkg` has one builder function per row (`cw_xor(rc, rb, ra)`,
`cw_out(rb, port)`, ...). The testbenches write all their programs with these.

### What "reconfigurable ALU" means here

Two things in the ALU can be changed from outside while the core is idle:

* **The lookup table.** It has 256 entries of 8 bits, written through the host
  port. For AES it holds the S-box, and SubBytes is then one `LUT` instruction.
* **F0 and F1**, two 4-bit truth tables. Classes 00 and 01 apply them bit by
  bit: result bit k is `F[{b[k], a[k]}]`, where b = R[Rb] and a = R[Ra]. They
  reset to AND (`4'b1000`) and XOR (`4'b0110`). Any of the 16 two-input
  functions (OR, NAND, ...) can be loaded per core.
* **POLY**, an 8-bit constant. Shift-left computes
  `(b << 1) ^ (b[7] ? POLY : 0)`. POLY resets to 0, which gives a plain logical
  shift. With POLY = 0x1B the same instruction multiplies by 2 in GF(2^8).
  MixColumns needs that doubling in a single cycle.

## Neighbour transfers and lock-step timing

This is the part to understand before writing programs.

* **A transfer completes in one cycle.** An output port is driven
  combinationally from `R[Rb]` in the cycle its `OUTPUT` executes. The
  neighbour's input multiplexer feeds its register bank in the same cycle. The
  value moves only if the neighbour executes `INPUT` on the facing port
  (East-West, North-South) in that very cycle. A value that nobody reads is
  lost. A port that is not driven reads as 0.
* **There is no combinational loop.** Outputs depend only on registers and the
  control word, never on inputs. So the longest path is: register, demux,
  neighbour's mux, neighbour's register.
* **A core does one thing per cycle.** It cannot receive and forward in the
  same cycle, so a byte moves at most one hop per cycle. A row of cores moves
  data like a bucket brigade, with neighbouring pairs taking turns.
* **All cores share one program counter.** Each instruction memory is read at
  that counter, so a program is a set of per-core instruction lists of equal
  length. Cores with nothing to do run `CW_NOP`.

### How the AES steps are scheduled

Core (r, c) holds state byte s[r][c] in R0. Rows are numbered from the North
edge and columns from the West edge.

* **AddRoundKey**: `MEMR R2 <- MEM[R7]` (R7 then steps down), then
  `XOR R0 <- R0 ^ R2`. Round key r sits at scratchpad address (-r) mod 64 and
  R7 starts at 0. The key for round 0 is read into R2 during loading, so the
  first AddRoundKey is a single XOR.
* **ShiftRows**: rows 1, 2 and 3 rotate left by 1, 2 and 3. Rotating by 3 is
  done as a rotation right by 1. All three rows work in parallel, using R1 and
  R2 as temporaries.
  * The one-place rotation takes 5 cycles: (c0 to c1, c3 to c2), then (c1 to c2),
    then (c2 to c3, c1 to c0), then (c2 to c1), then a move in c2.
  * The two-place rotation swaps across the middle pair. It takes 6 cycles,
    which is the minimum: the two middle cores each have six sends or
    receives.
* **MixColumns**: the four cores of a column first exchange bytes until each
  holds all four. Core r ends with a_r in R0 and a_(r+1), a_(r+2), a_(r+3) in
  R1, R2, R3 (indices mod 4). This exchange takes 8 cycles, which is the
  minimum: each middle core takes part in 8 transfers. The schedule is in
  `tb/tb_mmc_array.sv`, task `mix_columns`. Then come two doublings,
  `R4 = 2*R0` and `R5 = 2*R1`, and four XORs:
  `R0 = R4 ^ R5 ^ R1 ^ R2 ^ R3 = 2a_r ^ 3a_(r+1) ^ a_(r+2) ^ a_(r+3)`.
* **I/O**: each row is loaded from both ends. The West half comes in through
  the West edge and the East half through the East edge, farthest column
  first, with bytes handed from core to core. The ciphertext leaves the same
  way, nearest column first. With H = N/2, each direction takes H(H+1)/2
  cycles. On a 4-wide grid that is 3 cycles each way, the 2(M - 1) cycles of
  I/O the design calls for. The full 4 x 4 program is
  1 (first key) + 3 + 217 + 3 = 224 words.

Larger grids are made of 4 x 4 tiles, and each tile encrypts its own block with
the same 217-cycle kernel. `tb_aes_grid` runs four blocks on an 8 x 8 array in
238 cycles, about 2.15 bits per cycle.

## The array and its host port

`mmc_array` (the top) takes these parameters:

* `M`, `N`: rows and columns, default 4 x 4.
* `IMEM_DEPTH`: words per core, default 512.

Its ports are:

* **Edge I/O**: `west_in/out[M]`, `east_in/out[M]`, `north_in/out[N]` and
  `south_in/out[N]`. Each output has a `_valid` strobe that is high in the
  cycle its `OUTPUT` executes. An edge input is sampled by an `INPUT`
  instruction in the cycle that instruction executes.
* **Host configuration**: when `cfg_we` is high, one item is written per cycle
  into the core at (`cfg_row`, `cfg_col`), or into every core if `cfg_bcast`
  is set. `cfg_tgt` selects the item:
  * `CFG_IMEM`: an instruction word at `cfg_addr`.
  * `CFG_LUT`: a lookup-table entry.
  * `CFG_SPM`: a scratchpad byte.
  * `CFG_ALU`: an ALU register, selected by `cfg_addr`: 0 POLY, 1 F0, 2 F1.
* **Run control**: a `start` pulse runs addresses 0 to `prog_len - 1`, one per
  cycle, with `run` high. `done` pulses once afterwards.
* **Read-back**: `dbg_row`, `dbg_col` and `dbg_reg` select any register of any
  core, and its value appears on `dbg_data`.

Reset (`rst_n`, asynchronous, active low) clears the registers and the
sequencer, and sets POLY to 0 and F0/F1 to AND/XOR. It does not clear the instruction memories, lookup tables or
scratchpads.

## Departures and own choices

The overall structure is taken from the source design. That covers the core's
parts, the 11-bit control word, the instruction encodings, the 8 x 8-bit
registers, the 64-byte scratchpad, the 256-entry table, R7 post-increment and
post-decrement, 4 x 4 nearest-neighbour grids, and the per-step AES cycle
counts. The rest is this implementation's own:

* **Register move encoding.** The source gives the move the same code as the
  memory read. Here the memory read keeps that code, and the move uses
  class 11 with bits 8:6 = 000.
* **Unused codes.** Every code the table does not define does nothing.
* **How a transfer works.** Transfers are combinational and happen in one
  cycle. Output ports have valid strobes and read as 0 when idle.
* **Instruction memories.** Each core has its own. One program counter drives
  them all, and their depth is 512.
* **Host port.** The configuration port, start/length/done control and
  register read-back are all this implementation's.
* **The POLY register.** The source only says that doubling in GF(2^8) is part
  of the instruction set. POLY is how this design provides it.
* **Custom bitwise operations.** The source says classes 00 and 01 can be
  customised per core, but not how. Here each is a writable truth table.
* **Reset values.** Registers reset to 0. Memories are not reset. Writes from
  the host take priority over writes from the core.
* **MixColumns registers.** The AES MixColumns places bytes in registers
  differently from the source. The source XORs R0, R2, R3, R4 and R5, while
  this design XORs R1, R2, R3, R4 and R5. The cycle count is the same (8 + 2 + 4).
* **Edge I/O timing.** The source gives the I/O overhead as 2(M - 1) cycles
  for an M x N grid with M <= N. This design matches that on 4-wide grids.
  Wider grids take longer, H(H+1) cycles in total with H = N/2, because the
  hand-off from core to core is not pipelined. So the throughput plots for
  large grids are not reproduced. With the default depth of 512, grids wider
  than 32 columns do not fit their AES program plus I/O in instruction memory.
* **Translation lives in the testbenches.** Macro-instruction translation is
  done offline, and no hardware for it exists here. The testbenches translate
  Cycle (row rotation), Add, Route (greedy choice of the less-used neighbour),
  WordShift and the AES steps.
* **WordShift.** This is a logical left shift by 1 to 7 bits of a 128-bit word
  held one byte per core, with byte 0 in the North-West core and row-major
  order. Each core receives the next byte into R6 from its East neighbour. The
  first byte of each row travels to the last core of the row above (North,
  then East). Then come 8 - s right shifts of R6, s left shifts of R2 with
  POLY = 0, and one XOR, for 21 cycles in all. No mask step is needed, because
  the logical right shift already isolates the top bits.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `mmc_pkg.sv` | widths, control-word types, decoded-control struct, instruction builders |
| `control_decode.sv` | control word to datapath controls |
| `reconfig_alu.sv` | ALU, lookup table, POLY, F0/F1 |
| `register_bank.sv` | R0..R7, with the R7 pointer port |
| `scratchpad.sv` | 64-byte memory |
| `input_mux.sv`, `output_demux.sv` | port selection |
| `ucore.sv` | one u-core |
| `instr_mem.sv` | per-core control-word store |
| `mmc_sequencer.sv` | shared program counter |
| `mmc_array.sv` | the grid (top) |

`tb/`:

* One self-checking testbench per module: `tb_<module>.sv`.
* `tb_mmc_array.sv`: runs AES-128, the row rotation, the routing, WordShift,
  a mixed program and per-core bitwise truth tables at default parameters.
* `tb_aes_grid.sv`: runs AES on an 8 x 8 grid.
* `aes_ref_pkg.sv`: a software AES model. It computes the S-box from the
  GF(2^8) inverse and the affine map.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mmc_pkg.sv tb/aes_ref_pkg.sv tb/tb_mmc_array.sv --top-module tb_mmc_array
./obj_dir/Vtb_mmc_array
```

Replace `tb_mmc_array` with any other testbench name to run that one. The
end-to-end and grid tests each finish in well under a second.
