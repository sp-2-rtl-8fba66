# SP-2: a 4-bit teaching CPU with addressing modes and switch/TTY I/O

SP-2 is a deliberately small processor for teaching computer organisation. It has
4-bit data, 13-bit instructions, eight registers and a 128-word memory, and it
completes every instruction in one clock cycle. The datapath is simple enough to
follow wire by wire. It still has five addressing modes (register, immediate, direct,
register indirect, based indexed with displacement), seven conditional and
unconditional branches, and an input/output path. Four switches feed an input
register, and an interrupt vector at address 01 handles the input. An output
register drives a 2 × 20 character display.

SP-2 extends an earlier CPU, SP-1, which had only the first three addressing modes
and no I/O. This repository is a synthesizable SystemVerilog model of SP-2. It is
checked against an instruction-level reference model.

## Instruction word

```
 12 11 | 10  9  8  7 | 6  5  4 | 3  2  1  0
 type  |  function   |   RA    |  rest
```

| type | meaning | bits 6:0 |
|---|---|---|
| `00` | ALU, register mode: `op RA, RB` | RA = 6:4, RB = 3:1, bit 0 unused |
| `01` | ALU, immediate mode: `op RA, imm` | RA = 6:4, imm = 3:0 |
| `10` | branch: `Jcc addr` | addr = 6:0 |
| `11` | memory and I/O | see below |

ALU functions (types 00 and 01). The result goes back to RA. All except CMP write
it, and all of them set the flags:

| code | op | code | op | code | op |
|---|---|---|---|---|---|
| 0000 | AND | 0101 | SHR by B[1:0] | 1010 | ROL by B[1:0] |
| 0001 | OR  | 0110 | DIV (unsigned quotient) | 1011 | ROR by B[1:0] |
| 0010 | XOR | 0111 | MUL (low 4 bits) | 1100 | CMP (A − B, not stored) |
| 0011 | NOT A | 1000 | SUB | | |
| 0100 | SHL by B[1:0] | 1001 | ADD | | |

Branches (type 10), tested against the stored flags:

| code | op | taken when |
|---|---|---|
| 0000 | JMP | always |
| 0001 | JE | ZF |
| 0010 | JNE | !ZF |
| 0011 | JL | !ZF & SF |
| 0100 | JLE | SF \| ZF |
| 0101 | JG | !ZF & !SF |
| 0110 | JC | CF |

"Less" and "greater" use the sign bit of the 4-bit result. There is no overflow
flag.

Memory and I/O (type 11):

| code | instruction | field use | effective address |
|---|---|---|---|
| 0000 | `LOAD RA, [d4]` | RA, d4 = 3:0 | d4 |
| 0001 | `LOAD RA, [RB]` | RA, RB = 3:1 | RB |
| 0010 | `LOAD RA, [RB+d2]` | RA, RB = 0 & 3:2, d2 = 1:0 | (RB + d2) mod 16 |
| 0011 | `STORE [d4], RA` | as 0000 | d4 |
| 0100 | `STORE [RB], RA` | as 0001 | RB |
| 0101 | `STORE [RB+d2], RA` | as 0010 | (RB + d2) mod 16 |
| 1101 | `ACCEPT_INPUT` | – | – |
| 1110 | `PRINT_OUTPUT` | – | – |
| 1111 | `PRINT_CLEAR` | – | – |

The unused codes do nothing: ALU 1101–1111, branch 0111–1111 and memory 0110–1100.
Each of them only advances the PC.

## One cycle through the datapath

The PC addresses the memory's instruction port. Everything below is combinational
and settles within the cycle. The next clock edge commits the results.

1. **Register reads.** Port A reads RA (bits 6:4). Port B reads RB. RB is bits 3:1,
   or `0,bits 3:2` in based indexed mode. In that mode only R0–R3 can be the base.
2. **ALU operands.** A is register A, or the 2-bit displacement zero-extended in
   based indexed mode. B is register B, or bits 3:0 in immediate mode.
3. **Memory addresses.** Loads and stores share three address sources. Each is
   zero-extended from 4 to 7 bits:
   - direct: bits 3:0;
   - register indirect: ALU input B, which is the value of RB;
   - based indexed: the ALU result, so the control unit forces the ALU to ADD.

   The load path and the store path each have a 4-way selector
   (`LD_Sel`/`ST_Sel`: 01 direct, 10 indirect, 11 based indexed).
4. **Write-back.** The register write data is the ALU result, or on a LOAD the low
   4 bits of the memory's second read port. The store data is register A.
5. **Next PC.** PC + 1, or 01 when input is accepted, or the branch target. A taken
   branch wins over the interrupt vector, though the decoder never asks for both.
6. **Flags.** CF, SF and ZF are captured from the ALU on ALU instructions only.
   Loads, stores, I/O and branches leave them alone. A branch may therefore follow
   a compare at any distance.

Based indexed addressing needs no separate adder. It uses the ALU, with the
displacement on input A and the base on input B. This is the key idea of the
design. It is also why the ALU is busy on those memory instructions and why the
flags must not be loaded then.

## Memory map and program loading

A single 128 × 13 array holds both the program and the data. It has one read port
for fetch, one for loads and one write port. Data addresses are only 4 bits wide,
so LOAD and STORE reach words 0–15 only. Those words also hold the start of the
program, and a store writes a 13-bit word whose upper 9 bits are zero. A usual
layout is:

| address | contents |
|---|---|
| 0 | `JMP main` |
| 1 | input interrupt vector, typically `JMP handler` |
| 2–15 | data |
| 16–127 | code |

Programs are written through the same write port. Hold `pc_enable` low, then
drive `rom_we`, `phy_address` and `rom_data` for one clock per word. `rom_we` takes
priority over any store.

## Input, output and the input interrupt

- **Input.** The four `switches` go straight to R7, the input register. Their OR is
  `int_input_avail`. `ACCEPT_INPUT` does its work only when `int_input_avail` is
  high. In that case it loads the switches into R7 and sends the PC to address 01.
  When it is low the instruction just falls through. To wait for input, a program
  loops:

  ```
  wait:  ACCEPT_INPUT
         JMP wait
  ```

  The CPU can never write R7. An ALU result or LOAD aimed at R7 is discarded.
- **Output.** R6 is the output register. The CPU writes it like any other register.
  Its value, zero-extended and plus 0x30, is the character on `tty_char`. Values
  0–9 give the digits '0'–'9'; values 10–15 give ':' to '?'. `PRINT_OUTPUT`
  writes that character to the display. `PRINT_CLEAR` blanks it.
- **Display.** 2 rows × 20 columns. Characters fill a row from the left and
  continue on the next row. When the last row is full, the next character scrolls
  the screen up by one row. `tty_screen[row][col]` holds 7-bit ASCII, and blanks
  are 0x20.

## Interface of `sp2_cpu`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (PC, registers, flags, display) |
| `pc_enable` | in | 1 | the CPU executes one instruction per clock while high |
| `rom_we`, `phy_address`, `rom_data` | in | 1, 7, 13 | program loader |
| `switches` | in | 4 | input device |
| `log_address` | out | 7 | PC |
| `log_r` | out | 32 | registers, R0 in bits 3:0 … R7 in 31:28 |
| `cf`, `sf`, `zf` | out | 1 | stored flags |
| `dive`, `mule` | out | 1 | ALU: divide by zero, product above 15 (this cycle) |
| `int_input_avail`, `int_input_sel` | out | 1 | a switch is on; input accepted this cycle |
| `int_print_en`, `int_print_clr` | out | 1 | display write / clear this cycle |
| `int_output_data`, `tty_char` | out | 4, 7 | R6 and its ASCII character |
| `tty_screen`, `tty_row`, `tty_col` | out | 2×20×7, 1, 5 | display contents and cursor |

The display size is set by the parameters `TTY_ROWS` (default 2) and `TTY_COLS`
(default 20). Everything else is fixed by the instruction set and lives in
`sp2_pkg`.

## Modules

| file | block |
|---|---|
| `rtl/sp2_pkg.sv` | widths, opcode enums, control-word struct |
| `rtl/sp2_cpu.sv` | top: datapath, address and data selectors, I/O glue |
| `rtl/sp2_control.sv` | combinational decoder (control unit), with assertions |
| `rtl/sp2_alu.sv` | 13-operation ALU |
| `rtl/sp2_regset.sv` | R0–R7, with R6 = output and R7 = input |
| `rtl/sp2_flag_reg.sv` | CF/SF/ZF register |
| `rtl/sp2_pc.sv` | 7-bit PC, +1 / vector 01 / branch target |
| `rtl/sp2_sram.sv` | 128 × 13 memory, 2 read ports + 1 write port |
| `rtl/sp2_tty.sv` | 2 × 20 character display |

## What is taken from the SP-2 description, and what is this model's own

The following follow the SP-2 description:

- the instruction format and all opcode values except JC's;
- the control signals and their values;
- the datapath connections: the selectors, extenders and bit fields;
- the R6/R7 roles, the vector 01 and the +0x30 ASCII conversion;
- the memory and display sizes.

The description is silent on the following, and the choices here are this model's own:

- the shift and rotate distance (B[1:0]);
- the meaning of CF: carry of ADD, borrow of SUB/CMP, 0 otherwise;
- the meanings of DIVE and MULE, and R = 0 on divide by zero;
- the JC code (0110);
- when the flags load (ALU instructions only);
- the ALU operation on memory instructions (ADD);
- what ACCEPT_INPUT does without input (nothing);
- reset, and the use of `pc_enable` as a clock enable instead of a gated clock;
- loader priority on the write port;
- the display's wrap and scroll behaviour.

Where the SP-2 material contradicts itself, this model makes the following choices:

- The memory/I/O type code is `11`, not `10`.
- STORE based indexed is `0101`, not a second `0100`.
- CMP is the ALU operation that does not write back; the alternative reading
  names ROR instead.

The material counts 12 ALU instructions per mode but lists 13 operations. All 13
are decoded in both modes.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_sp2_alu` checks all 16 codes × 256 operand pairs exhaustively.
  `tb_sp2_control` checks all 64 opcodes × 16 flag/input combinations against a
  table.
- `tb_sp2_regset`, `tb_sp2_flag_reg`, `tb_sp2_pc`, `tb_sp2_sram` and `tb_sp2_tty` run
  random stimulus against shadow models. They also check the specific rules:
  R7 is input-only, the vector is 01, and the display wraps and scrolls.
- `tb_sp2_cpu` runs the full-size CPU in lockstep with an instruction-set model.
  After every clock it compares the PC, all registers, the flags, the I/O strobes
  and every display cell.
  - It first runs a directed program that uses every addressing mode, taken and
    untaken branches, an ignored write to R7, a wait loop with an input interrupt,
    printing and clearing. The program must print `6299:` and leave `9:` on the
    display.
  - It then runs 12 random programs of 1500 cycles each, with random switches.
  - It counts every mechanism and fails if one never occurred. The mechanisms are:
    each ALU operation in both modes, each branch taken and not taken, each
    load/store mode, accept with and without input, print, clear, divide by zero,
    multiply overflow, carry, and display wrap and scroll.

To simulate with Verilator, for example the CPU:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/sp2_pkg.sv tb/tb_sp2_cpu.sv \
          --top-module tb_sp2_cpu -o sim
./obj_dir/sim
```

Verilator finds the other modules in `rtl/` through `-Irtl`. `-Wno-fatal` keeps the
testbenches' width warnings from stopping the build. The whole
CPU testbench runs in well under a second.

## Limits

- There is no stack, call or return, and no overflow flag.
- Signed comparisons use only the result's sign bit, so they are wrong when the
  subtraction overflows, for example 7 − (−8).
- Data memory is 16 words and is shared with the first 16 program words.
- There is only one interrupt: the input interrupt, which is polled by
  `ACCEPT_INPUT`. There is no way to return to the interrupted program, except
  that the handler jumps back to a known address.
