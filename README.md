# A single-cycle processor for a uniform 16-bit instruction encoding

This is a small processor built around one idea: if every instruction is a
16-bit word whose fields sit in the same bit positions whatever the
instruction, the control unit is mostly wiring. The register fields go
straight to the register-file addresses. The low five opcode bits go straight
to the ALU's function select. Two opcode bits say which of four instruction
categories this is. The only real decoding is a handful of enables.

The machine has eight 16-bit registers, an ALU with fifteen functions and the
status bits V, C, N and Z, and a data RAM addressed through a register. It
runs one instruction per clock cycle.

## The instruction word

```
 15          9 8       6 5       3 2       0
+-------------+---------+---------+---------+
|   opcode    |   DR    |   SA    |   SB    |   register format
|   opcode    |   DR    |   SA    |   OP    |   immediate format
|   opcode    | AD[5:3] |   SA    | AD[2:0] |   jump / branch format
+-------------+---------+---------+---------+
```

* **DR** is the destination register, and **SA**/**SB** are the source
  registers. Each is 3 bits, which is why there are exactly eight registers.
* **OP** is a 3-bit two's-complement constant, -4..+3. It is sign-extended to
  16 bits before it reaches the ALU.
* **AD** is a 6-bit two's-complement PC offset, -32..+31. It is split around
  SA so that SA stays in bits 5-3 in all three formats. The decoder
  reassembles it as `{instr[8:6], instr[2:0]}`.

## The opcode map

Opcode bits 6-5 (instruction bits 15-14) give the category. The other five
bits depend on the category:

| bits 6-5 | category | bits 4-0 |
|---|---|---|
| `00` | register ALU: `R[DR] <- R[SA] op R[SB]` | ALU function code FS |
| `01` | data transfer | bit 4: `0` = ST, `1` = LD. Bits 3-0 unused |
| `10` | immediate ALU: `R[DR] <- R[SA] op sext(OP)` | ALU function code FS |
| `11` | jumps and branches | bit 4: `1` = JMP. For a branch, bit 3 is unused and bits 2-0 are the condition |

ALU function codes (FS):

| FS | F | FS | F |
|---|---|---|---|
| 00000 | A | 01000 | A AND B |
| 00001 | A + 1 | 01010 | A OR B |
| 00010 | A + B | 01100 | A XOR B |
| 00011 | A + B + 1 | 01110 | NOT A |
| 00100 | A + NOT B | 10000 | B |
| 00101 | A + NOT B + 1 (A - B) | 10100 | B shifted right by 1 |
| 00110 | A - 1 | 11000 | B shifted left by 1 |
| 00111 | A | | |

Branch conditions (opcode bits 2-0):

| code | branch | code | branch |
|---|---|---|---|
| 000 | BC: carry set | 100 | BNC: carry clear |
| 001 | BN: negative | 101 | BNN: not negative |
| 010 | BV: overflow | 110 | BNV: no overflow |
| 011 | BZ: zero | 111 | BNZ: non-zero |

There are no dedicated immediate-load opcodes. An immediate load is an
immediate ALU operation with FS = `10000` (F = B), for example
`LD R1, #3` = `1010000 001 000 011`.

Examples, with fields separated:

| instruction | opcode | 8-6 | 5-3 | 2-0 |
|---|---|---|---|---|
| ADD R1, R2, R3 | 0000010 | 001 | 010 | 011 |
| LD R1, (R0) | 011xxxx | 001 | 000 | xxx |
| SUB R1, R2, #2 | 1000101 | 001 | 010 | 010 |
| BZ R1, +19 | 110x011 | 010 | 001 | 011 |
| JMP -5 | 111xxxx | 111 | xxx | 011 |

## How one instruction runs

Each cycle, the instruction at `pc` is read from the instruction memory. The
decoder turns it into a control word for the datapath:

```
 register file --A--+--------------> ALU A             data RAM ADRS
   (AA, BA, DA, WR) |                                     ^
                    +-------------------------------------+
               --B--> Mux B (MB) --> ALU B (FS) --> F --> Mux D in 0
     constant ------> in 1      \--> data RAM DATA (MW)   data RAM OUT --> Mux D in 1
                                                          Mux D (MD) --> register file D
```

The control word for each category:

| category | AA | BA | DA | MB | FS | WR | MW | MD | PC |
|---|---|---|---|---|---|---|---|---|---|
| register ALU | SA | SB | DR | 0 | opcode[4:0] | 1 | 0 | 0 | +1 |
| immediate ALU | SA | - | DR | 1 | opcode[4:0] | 1 | 0 | 0 | +1 |
| LD | SA (address) | - | DR | - | - | 1 | 0 | 1 | +1 |
| ST | SA (address) | SB (data) | - | 0 | - | 0 | 1 | - | +1 |
| branch | SA (tested) | - | - | - | 00000 | 0 | 0 | - | +AD if the condition holds, else +1 |
| JMP | - | - | - | - | - | 0 | 0 | - | +AD |

The register file and the RAM are written at the rising edge that ends the
cycle, and the PC is updated at the same edge. Register and RAM reads are
combinational, so fetch, decode, execute and write-back all fit in one
cycle. The critical path runs from the PC through the instruction memory,
the register file, the ALU or the RAM, and Mux D, back to the register-file
input.

## Branches and the status bits

A branch names one register, SA. The decoder sends that register through the
ALU with FS = `00000` (F = A). The program counter then evaluates the
condition on the resulting V, C, N and Z. Z and N therefore test the
register itself: BZ branches if the register is 0, and BN if it is negative.

F = A is an add of zero with no carry-in, so C and V are always 0 on a
branch. As a result, BC and BV are never taken, and BNC and BNV are always
taken. This is a consequence of testing a register rather than keeping
flags from an earlier instruction. This design takes the register-testing
reading because the branch's own definition is "if R[SA] = 0 then
PC <- PC + AD". The condition codes are encoded and decoded in full, so a
flags register could be added later without changing the encoding.

Jumps and branches are PC-relative, counted from the branching instruction
itself. `JMP +3` at address 1002 goes to 1005. `JMP 0` loops on itself, and
the testbench uses it as a halt.

## Modules

| module | role |
|---|---|
| `isa_pkg` | field layout (`instr_t`), category, FS and condition enums, the control-word structs `ctrl_t` and `pc_ctrl_t`, and encoding helpers |
| `cpu_top` | top: instruction memory, decoder, datapath and program counter |
| `instruction_memory` | 2^16 x 16 program store: combinational read at the PC, write port for loading |
| `instruction_decoder` | instruction -> `ctrl_t`, sign-extended constant, `pc_ctrl_t` |
| `datapath` | register file, Mux B, ALU, data RAM and Mux D, wired as above |
| `register_file` | 8 x 16 registers: two combinational read ports and one write port |
| `mux2` | the two datapath multiplexers (Mux B and Mux D) |
| `alu` | FS functions and V, C, N, Z |
| `data_ram` | 2^16 x 16 data memory: combinational read, write on the clock edge |
| `program_counter` | PC register, branch condition and next-PC adder |

The ALU's arithmetic half is a single adder, F = A + Y + FS[0]. FS[2:1]
chooses Y from 0, B, NOT B and all ones, which produces every arithmetic row
of the FS table with one carry chain. The remaining codes decode as follows:

* The logic group (FS = 01xxx) ignores FS bit 0.
* The shift group (FS = 1xxxx) ignores FS bits 1-0.
* FS = 111xx transfers B.

Shifts move one place and shift in 0.

## Using it

Hold `rst_n` low for at least one rising edge. This clears all eight
registers and loads the PC from `start_pc`. Load the program through
`imem_we`/`imem_waddr`/`imem_wdata`, usually while the processor is in
reset. Then release `rst_n`. One instruction completes per cycle after that.

The top brings out these observation outputs:

* `pc` and `instr`: the instruction executing in the current cycle.
* `wb_en`, `wb_addr` and `wb_data`: the register write that takes effect at
  the next edge.
* `mem_we`, `mem_addr` and `mem_wdata`: the RAM write that takes effect at
  the next edge.
* `branch_taken` and `status`.

Neither memory is reset, so read only what has been written.

The parameters are `DATA_W` (16), `PC_W` (16) and `DMEM_AW` (16). The
instruction width is fixed at 16 bits, and the register count is fixed at 8
by the 3-bit register fields.

### Simulation

Each module has a self-checking testbench in `tb/<module>_tb.sv` (`mux2_tb`
covers both multiplexers). Each testbench prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/isa_pkg.sv tb/cpu_top_tb.sv \
          --top-module cpu_top_tb --Mdir obj_cpu
./obj_cpu/Vcpu_top_tb
```

Replace `cpu_top_tb` with any other testbench name to run that test.

`cpu_top_tb` runs the processor at its default size, in lock step with an
instruction-set model written inside the testbench from the encoding rules.
Every cycle it compares the PC, the fetched word, the register write-back
and the RAM write with the model. It has two phases:

* **Directed program.** This phase runs:
  * the PC-relative jump example at address 1000, which must reach 1007 in
    exactly five cycles;
  * a loop counted down by `SUB #1`/`BNZ`;
  * store, load, XOR and both shifts;
  * all eight branch conditions on a zero, a negative and a positive
    register;
  * a forward/backward jump chain.

  The total cycle count is checked against a hand count.
* **Random programs.** The whole instruction memory is filled with random
  valid instructions, and the processor runs 4 x 3000 cycles from random
  start addresses.

The testbench counts each mechanism and fails if one never occurs:

* register and immediate ALU operations;
* a negative constant;
* load and store;
* forward and backward jumps;
* branches taken and not taken;
* each of the eight condition codes.

## Where this design makes its own choices

The instruction encoding, the field positions, the FS table, the category
codes, the LD/ST and JMP/branch bits, the branch condition codes and the
datapath connections all come from the original instruction-set
description. The following were not specified there and are this design's
own choices:

* **Organisation.** A single-cycle processor with a separate instruction
  memory. The original description stops at the encoding and the datapath;
  its control unit is left for later.
* **Sizes.** A 16-bit data width, a 16-bit PC, and 2^16-word instruction
  and data memories.
* **Reset.** A synchronous active-low reset that clears the registers and
  sets the PC to `start_pc`. The memories are not reset.
* **Store fields.** ST uses SA for the address register and SB for the data
  register. This matches the datapath, where the RAM address comes from
  register port A and the data from Mux B.
* **Branches.** A branch tests R[SA] through F = A, with the consequence for
  C and V described above.
* **ALU codes outside the table and shifts.** How the ALU decodes FS codes
  that are not in the table, and the one-place, zero-fill shifts.

There are also two points where the source is inconsistent or stops short:

* **Subtraction code.** One sample encoding of `SUB R5, R5, #2` uses opcode
  `1000100` (FS `00100`, A + NOT B, which is A - B - 1). The opcode
  discussion uses `10 00101` (A - B) for the same instruction. The decoder
  passes FS through unchanged, so both execute as encoded. `00101` is the
  subtraction.
* **Immediate store.** An immediate store such as `ST (R2), #-5` is
  mentioned, but no encoding is given for it, and it is not implemented.

## Limits

* Constants are 3 bits (-4..+3). Larger constants, such as the `#10` and
  `#20` of the jump example as originally written, cannot be encoded. The
  testbench runs that example with constants 1, 3, 2 and -4.
* Offsets reach only -32..+31 words.
* With the register-testing branches, BC and BV can never be taken.
* There is no halt instruction, interrupt or I/O. `JMP 0` is the idle loop.
