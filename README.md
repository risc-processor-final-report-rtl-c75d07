# Beta-style single-cycle RISC processor with multi-cycle PUSHA

A small 32-bit RISC processor in synthesizable SystemVerilog, built around the
single-cycle datapath of the MIT 6.004 "Beta". It extends the Beta with
multiply, divide and modulo, extra assembler idioms (MOV, MOVC, ZERO) and one
multi-cycle instruction, PUSHA. PUSHA stores eight registers in one instruction
by holding the program counter while a cycle counter steps through them. The
processor is meant for an FPGA board: eight switches, seven more switches and a
program-select input are wired straight into registers r24, r25 and r26. The
low nibbles of r0..r7 drive a display. A ROM of demonstration programs is
included: a program selector, Fibonacci, an insertion sort, save, load and
PUSHA.

Every instruction except PUSHA finishes in one clock cycle. The instruction
ROM, the register-file reads and the data-memory reads are all combinational.
The only state written at a clock edge is the PC, the multi-counter, the
register file and the data memory.

## Instruction set

Two formats, 32 bits, word aligned:

| format   | [31:26] | [25:21] | [20:16] | [15:11] | [10:0] |
|----------|---------|---------|---------|---------|--------|
| register | opcode  | Rc      | Ra      | Rb      | 0      |
| literal  | opcode  | Rc      | Ra      | literal[15:0], sign extended | (part of literal) |

Register r31 always reads as zero. r30 is XP, the exception pointer.

| opcode | instruction | opcode | instruction | opcode | instruction |
|--------|-------------|--------|-------------|--------|-------------|
| 011000 | LD   Rc = mem[Ra+lit] | 100000 | ADD  | 110000 | ADDC |
| 011001 | ST   mem[Ra+lit] = Rc | 100001 | SUB  | 110001 | SUBC |
| 011010 | PUSHA Ra (8 cycles)   | 100010 | MUL  | 110010 | MULC |
| 011011 | JMP  Rc = PC+4, PC = Ra | 100011 | DIV | 110011 | DIVC |
| 011100 | BEQ  Rc = PC+4, branch if Ra == 0 | 100100 | CMPEQ | 110100 | CMPEQC |
| 011101 | BNE  Rc = PC+4, branch if Ra != 0 | 100101 | CMPLT | 110101 | CMPLTC |
| 011111 | LDR  Rc = mem[PC+4+4*lit] | 100110 | CMPLE | 110110 | CMPLEC |
|        |             | 100111 | MOD  | 110111 | MODC |
|        |             | 101000..101110 | AND OR XOR XNOR SHL SHR SRA | 111000..111110 | ANDC ... SRAC |

Every other opcode is illegal and traps. The branch target is
PC + 4 + 4*SXT(literal). MOV is `ADDC Ra, 0, Rc`, MOVC is `ADDC r31, lit, Rc`
and ZERO is `XOR Rr, Rr, Rr`. Most opcode values are the 6.004 Beta's. MOD,
MODC and PUSHA are additions, so they take codes the Beta leaves free.

The ALU is driven by a 6-bit function code ALUFN:

| ALUFN  | op    | ALUFN  | op   | ALUFN  | op   |
|--------|-------|--------|------|--------|------|
| 000011 | A == B | 101000 | AND | 110000 | SHL |
| 000101 | A < B  | 101110 | OR  | 110001 | SHR |
| 000111 | A <= B | 100110 | XOR | 110011 | SRA |
| 010000 | A + B  | 101001 | XNOR | 100010 | MUL |
| 010001 | A - B  | 101010 | A   | 100011 | DIV |
|        |        |        |     | 100100 | MOD |

Any other code gives 0. Compare, multiply, divide and modulo are signed. The
shift distance is B[4:0]. Division or modulo by zero gives 0.

## Datapath and control

```
 PC --> imem --> ID --+-- Ra ------------------> RA1   regfile   RD1 --+--> Z = (RD1 == 0)
  ^                   +-- RA2SEL ? Rc : Rb ----> RA2             RD2 -+|--> JT (jump target)
  |                   +-- WASEL  ? XP : Rc ----> WA                   ||
  |                   +-- SXT(lit) --+                                 ||
  |                                  v                                 vv
  |          ASEL ? PC+4+4*SXT : RD1 --> ALU A     BSEL ? SXT : RD2 --> ALU B
  |                                        ALU out --> data memory address
  |                                        RD2     --> data memory write data
  |  WDSEL: 0 = PC+4, 1 = ALU out, 2 = memory read data  --> register write data
  +-- PCSEL: 0 = PC+4 (or PC while PUSHA runs), 1 = branch target, 2 = JT,
             3 = 0x80000004 (illegal opcode), 4 = 0x80000008 (interrupt)
```

The control logic (`ctl`) is combinational. Its inputs are the opcode, RESET,
IRQ and Z:

| signal | OP | OPC | LD | LDR | ST | JMP | BEQ | BNE | illegal | IRQ | PUSHA |
|--------|----|-----|----|-----|----|-----|-----|-----|---------|-----|-------|
| ALUFN  | F(op) | F(op) | + | A | + | - | - | - | - | - | + |
| ASEL   | 0 | 0 | 0 | 1 | 0 | - | - | - | - | - | 0 |
| BSEL   | 0 | 1 | 1 | - | 1 | - | - | - | - | - | 1 |
| MOE    | - | - | 1 | 1 | 0 | - | - | - | - | - | 0 |
| MWR    | 0 | 0 | 0 | 0 | 1 | 0 | 0 | 0 | 0 | 0 | 1 |
| PCSEL  | 0 | 0 | 0 | 0 | 0 | 2 | Z?1:0 | Z?0:1 | 3 | 4 | 0 |
| RA2SEL | 0 | - | - | - | 1 | - | - | - | - | - | 1 |
| WASEL  | 0 | 0 | 0 | 0 | - | 0 | 0 | 0 | 1 | 1 | - |
| WDSEL  | 1 | 1 | 2 | 2 | - | 0 | 0 | 0 | 0 | 0 | - |
| WERF   | 1 | 1 | 1 | 1 | 0 | 1 | 1 | 1 | 1 | 1 | 0 |
| MULTI  | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 7 |

`-` entries are driven as 0. RESET forces MWR, WERF and MULTI to 0. IRQ
overrides the instruction, and RESET overrides both. MOE gates the memory
read data, which reads as 0 when MOE is low.

## Multi-cycle instructions: the multi-counter and PUSHA

Next to the PC there is a second register, the multi-counter. Each cycle the
`pc_unit` compares it with the MULTI value in the control word:

* **Counter differs from MULTI:** the counter increments. PCSEL input 0
  supplies the current PC instead of PC+4, so the same instruction stays in
  place.
* **Counter equals MULTI:** the counter returns to 0 and the PC moves on.

Ordinary instructions have MULTI = 0, so they advance at once. PUSHA has
MULTI = 7, so it runs for exactly eight cycles, with the counter k = 0..7.

The datapath uses the counter in two places, and both sums are unchanged when
k is 0:

* the second register-read address is `(RA2SEL ? Rc : Rb) + k`;
* the literal going to the ALU's B input is `SXT(lit) + 4*k`.

PUSHA is encoded with Rc = 0 and literal 0. With MWR = 1 and ALUFN = ADD,
cycle k therefore stores r_k at Ra + 4k, so `PUSHA Ra` writes r0..r7 to eight
consecutive words starting at address Ra. Ra itself is not changed, because
WERF is 0.

Two guards apply:

* An interrupt is accepted only when the counter is 0, so PUSHA cannot be cut
  in half.
* An assertion in `beta_top` checks that the PC holds while the counter runs.

## Traps

Illegal opcodes and interrupts share one mechanism. PC+4 is written to XP
(r30) and the PC jumps to a vector: 0x80000004 for an illegal opcode, and
0x80000008 for an interrupt. Bit 31 of the PC works as the Beta's supervisor
bit. `irq` is ignored while PC[31] = 1, so handlers are not interrupted. A
`JMP` to an address with bit 31 clear returns to user mode. The `illop` output
is high in the cycle an illegal opcode is decoded.

The instruction ROM decodes only the low address bits, so the vectors read ROM
words 1 and 2. The shipped ROM has no handlers: these words belong to the
program selector. An illegal-opcode trap therefore re-reads r26 and starts the
program currently selected (or returns to the idle loop if none is). An
interrupt enters one word later and re-runs the program that was selected
last. Either way the processor ends up back in the idle loop. A custom ROM can place branches to real
handlers at words 1 and 2; `tb_beta_traps` does this.

## Board I/O and the program ROM

| register | source |
|----------|--------|
| r24 | `sw_lo[7:0]`: switches 0-7, the program's input value |
| r25 | `sw_hi[6:0]`: switches 8-14, a byte address |
| r26 | `prog_sel[2:0]`: which program to run |
| r0..r7 | low nibbles out on `first_eight`: r0 in [3:0] up to r7 in [31:28] |

Reads of r24..r26 return the inputs, and writes to them are ignored.

The ROM is built at elaboration time by `programs_pkg::rom_image()`. This
function uses the small assembler in `isa_pkg` (`asm_op`, `asm_opc`,
`asm_br`, ...).

**Program selector (word 0).** It spins at word 0 while r26 is 0. Then it
copies r26 once into r27, so two cycles of `prog_sel` are enough, and
branches to the program chosen:

| r26 | program | word | effect |
|-----|---------|------|--------|
| 1 | Fibonacci | 13 | r0 = F(r24), with F(0) = 0 and F(1) = 1; r1..r7 = 0 |
| 2 | sort      | 31 | insertion-sorts the words at byte addresses 0..28, ascending and signed; copies them into r0..r7 |
| 3 | save      | 54 | mem[r25] = r24; r0..r7 = 0 |
| 4 | load      | 64 | r0 = mem[r25]; r1..r7 = 0 |
| 5 | pusha     | 73 | PUSHA r25 |

Every program ends with `JMP r31`, which returns to the idle loop at word 0.
Use word-aligned addresses in r25 (multiples of 4).

## What is this design's own choice

The block structure, the control table, the ALU codes, the memory sizes and
the I/O wiring follow the processor description this RTL was written from.
The following were not specified there and are decisions made here:

* **Opcode values.** These are the 6.004 Beta values. MOD = 100111,
  MODC = 110111 and PUSHA = 011010 are new assignments.
* **How the multi-counter reaches the datapath for PUSHA.** See the section on
  the multi-counter above.
* **Operand rules:**
  * arithmetic is signed;
  * division by zero gives 0;
  * the overflowing quotient of the most negative number divided by -1 wraps.
* **Register behaviour:**
  * r31 is zero and XP is r30;
  * r24..r26 are read-only;
  * the display order of the r0..r7 nibbles is chosen here.
* **Reset and interrupts:**
  * reset is synchronous and active high, with the reset PC at 0;
  * interrupts are accepted only in user mode and between instructions.
* **Memory sizes.** The instruction ROM holds 128 words and the data memory
  128 words. Addresses wrap modulo these sizes.
* **The program ROM contents.** Each program does what was specified, but the
  instruction sequences are this design's own. Program 5 (PUSHA) and the
  selector numbering are inferred.

Not built: the display driver for the board's display panel, and the DDR-SDRAM
alternative. The DDR-SDRAM memory was only a possible future replacement for
the block-RAM memories.

## Files

| file | contents |
|------|----------|
| `rtl/isa_pkg.sv` | opcodes, ALUFN codes, PCSEL/WDSEL enums, control-word struct, assembler functions |
| `rtl/programs_pkg.sv` | ROM image and program entry addresses |
| `rtl/alu.sv` | ALU |
| `rtl/ctl.sv` | control logic |
| `rtl/regfile.sv` | 32 x 32 register file with the board inputs and display output |
| `rtl/imem.sv` | instruction ROM (parameter `ROM`) |
| `rtl/pc_unit.sv` | PC, next-PC mux, PC+4 and branch adders, multi-counter |
| `rtl/dmem.sv` | 128 x 32 data memory |
| `rtl/beta_top.sv` | the processor |

`beta_top` parameters:

* `DMEM_WORDS` (128);
* `IMEM_WORDS` (128);
* `ROM`, a packed array of `IMEM_WORDS` instruction words.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_alu` | all 64 codes on corner and random operands |
| `tb_ctl` | all opcodes with Z, IRQ and RESET against the control table |
| `tb_regfile`, `tb_dmem` | checks against a model of the storage |
| `tb_pc_unit` | random next-PC selection and multi-counter timing |
| `tb_imem` | hand-encoded words and the selector's branch targets |
| `tb_beta_top` | the full processor at its default size: Fibonacci for n = 0..15; save of eight random values; sort; PUSHA, including its 8-cycle timing; load; an interrupt. It also counts branch taken and not taken, jumps, loads, stores, PUSHA hold cycles and interrupts |
| `tb_save_load` | the save/load sequence: 3 at address 4, then 6 at address 8, then reload address 4; also F(6) = 8 |
| `tb_beta_traps` | a custom ROM: MUL, DIV, MODC, SRAC, LDR, an illegal opcode with its handler, an interrupt with its return, and an interrupt raised during PUSHA that waits for its eight stores |

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/isa_pkg.sv rtl/programs_pkg.sv rtl/alu.sv rtl/ctl.sv rtl/regfile.sv \
  rtl/dmem.sv rtl/pc_unit.sv rtl/imem.sv rtl/beta_top.sv tb/tb_beta_top.sv \
  --top-module tb_beta_top -o sim
./obj_dir/sim
```

All testbenches pass. Each block's testbench was also run against a copy of
the block with a deliberate bug, and it failed each time. The whole suite
finishes in seconds.

The register file and the data memory have no reset, like block RAM. The
programs write a register before they read it.
