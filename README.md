# A single-cycle 32-bit MIPS processor

This processor executes every instruction in exactly one clock cycle. In one
cycle it fetches the instruction, reads its two source registers, computes in
the ALU, reads or writes data memory, and writes one register. At the rising
edge it then loads the next PC. The datapath is built one instruction class at
a time:

1. register-register ALU operations;
2. ALU operations with an immediate;
3. loads and stores;
4. jumps and branches;
5. reset, interrupts and illegal instructions.

Multiplexers merge the paths of the five classes. A purely combinational
control unit drives the multiplexer selects from the opcode, the function
field and the ALU flags. In effect it is a ROM.

It runs most of the integer MIPS R2000 instruction set, but it has no
pipeline, no delay slots and no multiply or divide. Memory access is by whole
words only.

## Instructions

| class | instructions | encoding |
|---|---|---|
| register ALU | `add addu sub subu and or xor nor slt sltu` | op `000000`, funct `100000`..`100111`, `101010`, `101011` |
| shifts | `sll srl sra` (by `shamt`), `sllv srlv srav` (by `Reg[rs]`) | op `000000`, funct `000000 000010 000011 000100 000110 000111` |
| immediate ALU | `addi addiu slti sltiu andi ori xori lui` | op `001000`..`001111` |
| memory | `lw`, `sw` | op `100011`, `101011` |
| branches | `beq`, `bne`: `PC <- PC+4 + 4*SEXT(imm)` if taken | op `000100`, `000101` |
| jumps | `j`, `jal`: `PC <- {PC[31:28], target, 00}`; `jal` writes `r31` | op `000010`, `000011` |
| jump register | `jr`, `jalr`: `PC <- Reg[rs]`; `jalr` writes `Reg[rd]` | op `000000`, funct `001000`, `001001` |

The sum and difference instructions (`add`/`addu`, `sub`/`subu`, `addi`/`addiu`)
work the same way: none of them traps on overflow. `andi`, `ori`, `xori` and
`lui` zero-extend their immediate. All other immediates are sign-extended.
`sltiu` compares against the sign-extended immediate as an unsigned number,
as MIPS does. Register 0 always reads as zero.

Any other encoding is an illegal instruction (see below). System calls can be
built from that: agree on an unused encoding and let the illegal-instruction
handler treat it as a trap.

## Datapath

```
             +---------------------------- PCSEL (0..6) ---------------------------+
             v                                                                     |
  PC[31:2] register --> instruction memory --> rs, rt, rd, shamt, imm, target      |
      |                                          |                                 |
      +--> +4 (30-bit half-adder chain)          v                                 |
                                   register file RA1=rs RA2=rt WA=WASEL(rd,rt,31,27)
                                       RD1            RD2
                                        |              |        imm --> SEXT
                           ASEL: RD1 | shamt | 16   BSEL: RD2 | extended imm
                                        \\            /
                                          ALU(ALUFN) --> Z N V C --> control
                                           |
                                data memory address; WD = RD2; Wr
                                           |
                         WDSEL: PC+4 | ALU result | memory word --> register file WD
```

The PC register has 30 bits. The two low address bits are always zero, so
`PC+4` is a 30-bit increment, built as a ripple chain of half adders.

A second adder computes the branch target
`BT = (PC+4) + (SEXT(imm) << 2)`. It cannot share the ALU, because in a branch
cycle the ALU computes `Reg[rs] - Reg[rt]` for the comparison.

The multiplexers and their inputs:

| select | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| PCSEL | PC+4 | branch target | `{PC[31:28], target, 00}` | `Reg[rs]` | `0x80000000` | `0x80000040` | `0x80000080` |
| WASEL | rd | rt | 31 | 27 | | | |
| WDSEL | PC+4 | ALU result | memory word | | | | |
| ASEL | `Reg[rs]` | shamt | 16 | | | | |
| BSEL | `Reg[rt]` | extended immediate | | | | | |

## The ALU and how set-on-less-than works

The ALU has three units that work in parallel:

- an adder/subtractor;
- a bidirectional barrel shifter, which shifts B by `A[4:0]`;
- a Boolean unit.

The 5-bit function code is `ALUFN = {Sub, Bool[1:0], Shft, Math}`. Two levels
of 2:1 multiplexers use it to pick the result:

| Sub | Bool | Shft | Math | result |
|---|---|---|---|---|
| 0 | xx | 0 | 1 | A + B |
| 1 | xx | 0 | 1 | A - B |
| x | x0 | 1 | 1 | 0 |
| x | x1 | 1 | 1 | 1 |
| x | 00 | 1 | 0 | B << A |
| x | 10 | 1 | 0 | B >> A (logical) |
| x | 11 | 1 | 0 | B >>> A (arithmetic) |
| x | 00 | 0 | 0 | A & B |
| x | 01 | 0 | 0 | A \| B |
| x | 10 | 0 | 0 | A ^ B |
| x | 11 | 0 | 0 | ~(A \| B) |

The rows that give the constants 0 and 1 are the unusual part. The adder
computes `A - B` (Sub = 1) whatever the result multiplexer shows. For `slt`,
`slti`, `sltu` and `sltiu`, the control unit sets Shft = Math = 1 and drives
`Bool[0]` from the adder's flags:

- signed less-than: `Bool[0] = N xor V`;
- unsigned less-than: `Bool[0] = C`.

That bit becomes the result. Two details make this work:

- `N`, `V` and `C` are taken from the adder, not from the result bus.
- For subtraction, `C` is the borrow (the inverted carry-out of `A + ~B + 1`),
  so `C = 1` exactly when `A < B` as unsigned numbers. For addition, `C` is
  the carry-out.

`Z` is the NOR of all 32 result bits. `beq` and `bne` use it after a
subtraction.

There is no combinational loop. The flag-dependent outputs of the control
unit (`alu_bool` and `pcsel`) are computed apart from the main decode, and
the flags never depend on the Bool or Shft bits.

## Control

Priority: RESET first, then IRQ, then the instruction.

| case | PCSEL | WASEL | WDSEL | ALU | BSEL | ASEL | SEXT | WERF | Wr |
|---|---|---|---|---|---|---|---|---|---|
| RESET | 4 | - | - | - | - | - | - | 0 | 0 |
| IRQ | 6 | 27 | PC+4 | - | - | - | - | 1 | 0 |
| illegal | 5 | 27 | PC+4 | - | - | - | - | 1 | 0 |
| R-type ALU | 0 | rd | ALU | per funct | RD2 | rs | - | 1 | 0 |
| shift by shamt | 0 | rd | ALU | shift | RD2 | shamt | - | 1 | 0 |
| immediate ALU | 0 | rt | ALU | per opcode | imm | rs | 1 or 0 | 1 | 0 |
| `lui` | 0 | rt | ALU | B << A | imm | 16 | 0 | 1 | 0 |
| `lw` | 0 | rt | memory | A + B | imm | rs | 1 | 1 | 0 |
| `sw` | 0 | - | - | A + B | imm | rs | 1 | 0 | 1 |
| `beq`/`bne` | 1 if taken, else 0 | - | - | A - B | RD2 | rs | 1 | 0 | 0 |
| `j`/`jal` | 2 | -/31 | PC+4 | - | - | - | - | 0/1 | 0 |
| `jr`/`jalr` | 3 | -/rd | PC+4 | - | - | - | - | 0/1 | 0 |

## Reset, interrupts and illegal instructions

- **RESET** loads `PC <- 0x80000000` and writes nothing else. Registers and
  memories are not cleared.
- **An illegal instruction** does not execute. Instead, `Reg[27] <- PC+4` and
  `PC <- 0x80000040`. A handler that returns with `jr r27` continues after the
  illegal instruction.
- **IRQ** is checked in place of the instruction at PC, which is not
  executed. `Reg[27] <- PC+4` and `PC <- 0x80000080`. The saved address
  points past the instruction that was not executed. A handler that must not
  lose it should return to `Reg[27] - 4`; a plain `jr r27` skips it.

Both inputs pass through a two-flip-flop synchroniser (`input_sync`) against
metastability. This has three consequences:

- RESET must be held for at least three rising edges.
- An IRQ is seen two cycles after it rises.
- IRQ is level-sensitive with no mask. An interrupt is taken in every cycle
  that the synchronised IRQ is high, so the device must drop it as soon as it
  is served. An interrupt during a handler overwrites `r27`.

The vectors are 64 bytes apart. With the default 1024-word instruction memory:

- 0x80000000 is word 0;
- 0x80000040 is word 16;
- 0x80000080 is word 32.

A program therefore usually starts with a jump over the two handlers.

## Interface and timing of `mips_cpu`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one instruction per rising edge |
| `reset` | in | 1 | asynchronous reset request (synchronised inside) |
| `irq` | in | 1 | interrupt request (synchronised inside) |
| `pc` | out | 32 | address of the instruction being executed |
| `instr` | out | 32 | the instruction being executed |
| `dmem_wr` | out | 1 | a store is happening this cycle |
| `dmem_addr` | out | 32 | data-memory address (ALU result) |
| `dmem_wdata` | out | 32 | store data (`Reg[rt]`) |

| parameter | default | meaning |
|---|---|---|
| `IMEM_WORDS` | 1024 | instruction memory size in words |
| `DMEM_WORDS` | 1024 | data memory size in words |
| `SYNC_STAGES` | 2 | flip-flops in the RESET/IRQ synchroniser |
| `IMEM_INIT` | `""` | `$readmemh` file loaded into the instruction memory |

All reads are combinational: register file, instruction memory and data
memory. All writes (PC, register, memory word) happen at the rising edge.
The critical path is therefore long:

PC → instruction memory → register file → ALU → data memory → write-data
multiplexer.

That is the price of one instruction per clock.

Both memories decode only the low word-address bits. Addresses wrap modulo
the memory size.

## Modules

| file | contents |
|---|---|
| `rtl/mips_pkg.sv` | multiplexer select codes, vectors, opcode and function numbers |
| `rtl/mips_cpu.sv` | the processor: datapath multiplexers and wiring of the units below |
| `rtl/mips_control.sv` | control truth table |
| `rtl/alu.sv` | ALU, with `alu_addsub.sv`, `alu_shifter.sv`, `alu_boolean.sv` |
| `rtl/regfile.sv` | 32 x 32 register file, two read ports, one write port |
| `rtl/en_register.sv` | W-bit register with enable; used for the PC and the synchroniser |
| `rtl/input_sync.sv` | synchroniser chain for RESET and IRQ |
| `rtl/pc_incr.sv` | PC+4 half-adder chain |
| `rtl/branch_adder.sv` | branch-target adder |
| `rtl/sext.sv` | immediate sign/zero extension |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction and data memory arrays |

## Simulating

Each testbench in `tb/` checks its result against values it computes itself.
Each ends by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mips_pkg.sv tb/tb_mips_cpu.sv --top-module tb_mips_cpu -o sim
./obj_dir/sim
```

Run the other testbenches the same way. Run them from the directory that
holds `rtl/` and `tb/`, because `tb_mips_cpu_hex` loads
`tb/sum_program.hex` by that relative path.

- `tb_mips_cpu` is the main processor test, at the default sizes. It works in
  four steps:
  1. It assembles a program: the two handlers, two subroutines, a directed
     section that uses every instruction, a backward loop and 400 random
     ALU, shift, load, store and forward-branch instructions.
  2. It runs the program in lock step with an instruction-level reference
     model, with interrupt pulses during the random part.
  3. Every cycle, it compares the PC and the data-memory write.
  4. At the end, it compares all registers and all memory words.

  It also counts each mechanism and fails if any never happened:
  - reset, interrupt and illegal instruction;
  - taken and untaken branch;
  - jump, jump register and both kinds of link;
  - load and store;
  - set-less-than true and false;
  - both kinds of shift;
  - `lui`;
  - zero extension;
  - a write to `r0`.
- `tb_mips_cpu_hex` loads a small program through `IMEM_INIT` and checks
  what it computes.
- One testbench per unit (`tb_alu`, `tb_regfile`, `tb_mips_control`, ...)
  compares the unit against a reference written in the testbench.

To load your own program, assemble it to one 32-bit hex word per line, word 0
at address 0x80000000, and pass the file as `IMEM_INIT`. Alternatively, a
testbench can write `u_imem.mem[]` directly.

## Departures and choices

The datapath, the multiplexer numbering, the ALU function code, the vectors
and the reset/IRQ/`add` rows of the control table follow the original design.
The following are choices made here:

- **Sizes.** Memory sizes (1024 words each) and the two-stage synchroniser
  are this design's choices.
- **Register 0.** Hard-wired to zero; the MIPS convention, not part of the
  original register file.
- **Encodings.** Opcode and function numbers that the datapath does not fix
  are the MIPS R2000 encodings: `beq`/`bne`, the individual ALU, shift and
  jump-register function codes.
- **Boolean code 11.** NOR (and code 01 is OR), matching the MIPS `nor`/`or`
  instructions.
- **Jump target.** Uses `PC[31:28]` of the current PC, as in
  `(PC & 0xf0000000) | 4*target`. One drawing of the original datapath labels
  this input `PC<31:29>`; that label would give 31 bits and was not followed.
- **IRQ and register 27.** An interrupt writes `Reg[27]`, as its defining rule
  says. The original control table row leaves the register-file write enable
  at 0; that was not followed.
- **N flag.** Taken from the adder, not from the result bus; see the ALU
  section.
- **Not built.** A control output named LSEL appears once in the original
  material without any description.
- **Not provided.** There are no byte or halfword loads and stores, no
  overflow trap, no interrupt mask, no way to return from an interrupt
  without losing the interrupted instruction (see above), and no
  program-loading port.
