# SPARC: a 16-bit processor that understands Arabic letter shapes

Arabic letters change shape with their neighbours: each letter has an
isolated form, a form joined on the right, one joined on the left and one
joined on both sides. Vowel marks (harakat) sit above or below the letter.
A machine that stores text as a plain 7-bit code has to work out the shapes
again every time it prints. It also has to store each vowel as an extra
character.

This design takes a different approach. Every character is a 14-bit word
that carries its shape and its vowels next to the letter code. The
processor has instructions that move and compare those fields directly. The
processor is a reduced PDP-11 with the following changes:

- it has sixteen registers;
- it has four addressing modes;
- it has the character-field instructions;
- it has a second bus for I/O, next to the memory bus, with a DMA controller.

The RTL here is a complete, simulatable computer built around those ideas:

- the CPU;
- its ALU, built like the original from 74181-style 4-bit slices and a
  74182-style carry-lookahead unit;
- a memory controller that shares the 64 KB main memory between the CPU
  and the DMA controller;
- the DMA controller;
- the memory.

## The character word

```
 15 14 13             7  6   5  4             0
+-----+----------------+-------+---------------+
|  0  | character code | shape |  vowel code   |
+-----+----------------+-------+---------------+
        7-bit letter     SHC      5 bits
        (ASMO 449)
```

| shape (bits 6..5) | joined on |
|---|---|
| 00 | nothing (isolated) |
| 01 | right |
| 10 | left |
| 11 | both sides |

The 5-bit vowel field holds one of the allowed combinations of the five
basic vowels and some special diacritics. The hardware treats the vowel
field and the shape field as plain bit fields, so software decides what a
vowel code means. Because a character is an ordinary 16-bit word, all the
normal instructions work on text too. To work with plain 7-bit text, a
program simply ignores the upper fields.

The field instructions (`sparc_charop`) are:

| instruction | effect | flags |
|---|---|---|
| `MOVS src,dst` | dst[6:5] ← src[6:5] | N,Z from the word; V=0; C kept |
| `MOVV src,dst` | dst[4:0] ← src[4:0] | same |
| `CMPS src,dst` | compare src[6:5] with dst[6:5] | Z if equal; C if the source field is smaller (borrow); N = top bit of the field difference; V=0 |
| `CMPV src,dst` | compare src[4:0] with dst[4:0] | same |
| `PUTS #imm5,Rn` | Rn[6:5] ← imm[4:3] | N,Z from the word; V=0; C kept |
| `PUTV #imm5,Rn` | Rn[4:0] ← imm[4:0] | same |

The other bits of the destination are left unchanged. `MOVS`, `MOVV`,
`CMPS` and `CMPV` take full operands in any addressing mode. `PUTS` and
`PUTV` carry a 5-bit immediate inside the instruction and work on a
register.

Why this pays off shows in string matching. Compare ضرب ("daraba", followed
by a blank) with ضربتم. A plain character compare runs until the blank meets
ta, so it compares four characters. With shape codes the third letter (ba)
already differs: it is isolated at the end of the first word but joined to ta
in the second. So only three characters are compared. The end-to-end test
runs exactly this comparison both ways.

## Instruction set

Bit 15 is the most significant bit. The positions of the two-operand fields
and the `PUTS`/`PUTV` fields follow the original machine. The opcode
*values* are this design's own, because the original encoding was not
published.

```
two-operand   | op(4) 1..14 | smode(2) | sreg(4) | dmode(2) | dreg(4) |
branch        | 1111        | cond(4)  |     signed word offset (8)   |
misc          | 0000 | 000  | function(5)           | reg/flag mask(4) |
PUTS          | 0000 | 001  | immediate(5)          | reg(4)           |
PUTV          | 0000 | 010  | immediate(5)          | reg(4)           |
one-op A      | 0000 | 011  | fn(3) | dmode(2)      | dreg(4)          |
one-op B      | 0000 | 100  | fn(3) | dmode(2)      | dreg(4)          |
I/O           | 0000 | 110  | fn(3) | mode(2)       | reg(4)           |
```

These are the opcode values:

| field | values |
|---|---|
| two-operand `op` | 1 MOV, 2 CMP, 3 BIT, 4 BIC, 5 BIS, 6 ADD, 7 SUB, 8 XOR, 9 ADDC, A SUBC, B MOVS, C MOVV, D CMPS, E CMPV |
| one-op A `fn` | CLR, COM, INC, DEC, NEG, TST, ADC, SBC |
| one-op B `fn` | LSR, ASR, ASL, ROR, ROL, SWAB, JMP, CALL |
| I/O `fn` | 0 OUTW, 1 OUTB, 2 OUTC (command), 4 INW, 5 INB, 6 INS (status) |
| misc `function` | 0 HALT, 1 NOP, 2 RTI, 3 RTS, 4 CLCC mask, 5 SECC mask, 6 EI, 7 DI, 8 MTMSR Rn |
| branch `cond` | BR, BNE, BEQ, BGE, BLT, BGT, BLE, BPL, BMI, BHI, BLOS, BVC, BVS, BCC, BCS, never |

All the values are listed in `rtl/sparc_pkg.sv`.

Addressing modes (2 bits):

| mode | name | syntax | effective address |
|---|---|---|---|
| 0 | register | `Rn` | the operand is Rn itself |
| 1 | register indirect | `@Rn` | Rn |
| 2 | autoincrement | `(Rn)+` | Rn, then Rn += 2 |
| 3 | autodecrement | `-(Rn)` | Rn -= 2, then Rn |

R15 is the program counter and R14 the stack pointer. When the instruction
reaches decode, the PC already points past it, so `(R15)+` reads an
immediate word that follows the instruction. The source operand is
evaluated first, then the destination. Memory accesses are whole words at
even byte addresses. There are no byte-wide memory instructions.

Flags follow PDP-11 rules:

- `CMP` computes source minus destination.
- C is the borrow after a subtraction.
- `INC`, `DEC` and the logic operations keep C.
- Shifts set V = N xor C.
- `SWAB` sets N and Z from the low byte.
- `MOV` clears V.

`CALL dst` works as follows:

1. It pushes the PC.
2. It jumps to the operand's address. In register mode it jumps to the
   register's value instead.
3. `RTS` pops the PC.

`JMP` uses the same target rule.

## How an instruction runs

`sparc_cpu` is a multi-cycle state machine. It follows the order of the
original register-transfer control sequence:

| step | state | what happens |
|---|---|---|
| 1 | `S_HALT` | wait for START (after reset and after `HALT`) |
| 2 | `S_IFCHK` | if an interrupt is pending, enter it |
| 3–4 | `S_FETCH` | read the word at PC (waiting while memory is busy) into IR |
| 5 | `S_PCINC` | PC += 2 |
| 6 | `S_DECODE` | classify; branches, flag operations, EI/DI, MTMSR and HALT finish here |
| 7–12 | `S_SRC_EA`, `S_SRC_RD`, `S_DST_EA`, `S_DST_RD` | operand addresses, register updates for modes 2/3, operand reads |
| | `S_EXEC` | ALU or field unit; flags updated |
| | `S_WB` | result to register or memory |
| | `S_IO` | I/O handshakes |
| | `S_CALL_*`, `S_POP_*`, `S_PSW_*`, `S_INT_*` | stack operations |

Every state takes one clock cycle. A state that accesses memory stays
until the memory controller drops busy. An uncontested memory access takes
2 cycles. Some typical instruction times without contention:

- register to register: 9 cycles (`MOV R1,R2`, `CMPS R8,R9`);
- a taken or untaken branch: 5 cycles;
- `ADD #imm,@R2`: 14 cycles (immediate read, destination read, write).

The original sequence had 139 steps. Only its first fourteen were
published. The states after decode are therefore a fresh design that keeps
the same datapath registers: IR, SR/SA, DR/DA, TEMP, MSR, ENIF and the
flags.

## Interrupts

Sixteen interrupt lines set bits of the request register INTR
(`sparc_intc`). A bit stays set until the CPU takes that request. The CPU
takes a request at the start of an instruction when both of these hold:

- interrupts are enabled (`EI`);
- the line is unmasked in MSR (set with `MTMSR Rn`).

The condition is INTF = OR(MSR & INTR) & ENIF. When several lines are
pending, the lowest-numbered one wins.

Entering an interrupt does the following:

1. Push the status word {ENIF, N, Z, V, C} (bits 4..0).
2. Push the PC.
3. Clear ENIF.
4. Load the PC from the vector word at `VEC_BASE + 2*line`. The default
   `VEC_BASE` is `16'hFFE0`, so the vector table is the last 32 bytes of
   memory.

`RTI` pops the PC and then the status word, which restores ENIF.

In `sparc_top`, line 15 is the DMA controller's end-of-block interrupt.
The other fifteen lines come from the `ext_int` port.

## Two buses

```
          memory bus                          I/O bus
 CPU ──┐                              CPU ──┬── data (IOBUS, DATAVALID/READY/ACCEPT)
       ├── PMC ── 64 KB memory              ├── command bus (CSBUS, CSRDY)
 DMA ──┘                              DMA ──┘        │
                                                I/O devices (outside)
```

**Memory controller (`sparc_pmc`).** A requester holds `read` or `write`
and the address until `busy` is low at a clock edge. In that cycle, read
data is valid. Each access has two phases:

1. In the issue cycle, the request goes to the synchronous RAM.
2. In the done cycle, the data comes back and the requester is released.

If the CPU and the DMA controller ask in the same cycle, the DMA controller
goes first. Assertions check that requesters hold their requests.

**Memory (`sparc_memory`).** The memory is 32K × 16 bits (64 KB) of
synchronous single-port RAM with a one-cycle read latency.

**I/O handshakes.** The CPU uses these handshakes:

| instruction | CPU side | device side | transfer |
|---|---|---|---|
| `OUTW` / `OUTB` | holds the word on `io_dout` with `io_datavalid` (a byte goes in bits 7..0, upper byte zero) | — | in the cycle the device raises ACCEPT |
| `OUTC` | puts a command word on the command bus with `cs_rdy` | accepts with ACCEPT | in the cycle ACCEPT is high |
| `INW` / `INB` | waits for READY, takes `io_din`, raises its ACCEPT in the same cycle | raises READY | in the READY cycle |
| `INS` | reads the status word `cs_in` at once | — | immediately |

The top module splits each bidirectional line into an input port and an
output port.

**DMA controller (`sparc_dma`).** The CPU programs it with `OUTC` commands
whose bits [15:13] are `111`:

| bits [12:11] | sets | payload (bits [10:0]) |
|---|---|---|
| 0 | address bits 7..0 | bits [7:0] |
| 1 | address bits 15..8 | bits [7:0] |
| 2 | word count | 11 bits |
| 3 | start | bit 0: 1 = device → memory, 0 = memory → device |

While a block moves, the DMA controller owns the I/O bus. It uses the same
handshakes as the CPU and moves one word at a time through the memory
controller. During the block, a CPU I/O instruction waits and commands are
refused. The top module does not pass DMA commands on to the devices; a
device must accept only the commands meant for it. At the end of the block,
`done` pulses and raises interrupt line 15.

## The ALU

`sparc_alu` is four `sparc_alu181` slices and one `sparc_cla182`. For each
bit, a slice forms two terms:

```
x = a | (b & s0) | (~b & s1)
y = (a & ~b & s2) | (a & b & s3)
```

In arithmetic mode (m = 0) the slice outputs `x + y + carry`. In logic mode
it outputs `~(x ^ y)`. This reproduces the 74181 function table:

| operation | s | mode | carry in |
|---|---|---|---|
| A plus B | 1001 | arithmetic | 0 |
| A minus B | 0110 | arithmetic | 1 |
| A minus 1 | 1111 | arithmetic | 0 |
| A and B | 1011 | logic | — |
| A xor B | 0110 | logic | — |

Each ALU operation selects `s`, `m`, the carry in and the operand order.
For example, `CMP` feeds the source into the A input, and `NEG` computes
0 minus the operand. Shifts, rotates and `SWAB` bypass the slices.

All signals are active high. The real parts use active-low carry, P and G.

## Files

| file | contents |
|---|---|
| `rtl/sparc_pkg.sv` | types, field positions, opcodes, DMA command format, branch conditions |
| `rtl/sparc_top.sv` | the computer: CPU, DMA, PMC, memory, I/O bus sharing |
| `rtl/sparc_cpu.sv` | processor and control sequence |
| `rtl/sparc_regfile.sv` | R0..R15 |
| `rtl/sparc_alu.sv`, `rtl/sparc_alu181.sv`, `rtl/sparc_cla182.sv` | ALU |
| `rtl/sparc_charop.sv` | shape/vowel field unit |
| `rtl/sparc_intc.sv` | interrupt request, mask and priority |
| `rtl/sparc_pmc.sv` | memory controller |
| `rtl/sparc_memory.sv` | 64 KB RAM |
| `rtl/sparc_dma.sv` | DMA controller |
| `tb/sparc_asm_pkg.sv` | instruction encoders for writing test programs |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_sparc_text_workload.sv` | shape/vowel comparison routine, field instructions against general ones |

Parameters:

| module | parameter | default |
|---|---|---|
| `sparc_top` | `MEM_WORDS` | 32768 |
| `sparc_top` | `DMA_IRQ` | 15 |
| `sparc_cpu` | `VEC_BASE` | `16'hFFE0` |
| `sparc_regfile` | `NREGS` | 16 |
| `sparc_regfile` | `WIDTH` | 16 |
| `sparc_intc` | `NLINES` | 16 |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Every module has a watchdog. Build and run one like this:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/sparc_pkg.sv tb/sparc_asm_pkg.sv tb/tb_sparc_top.sv \
  --top-module tb_sparc_top -o sim && ./obj_dir/sim
```

The two packages must come first on the command line; `-y` lets Verilator
find every module in the file of the same name. Add `-Wno-fatal` if a lint
warning (unused signals) stops the build.

`tb_sparc_top` runs the whole computer at its default size in under a
second. It runs this sequence:

1. It loads two Arabic words from a model device by DMA while the CPU keeps
   writing to memory. This produces memory contention.
2. It takes the DMA interrupt.
3. It matches the words with and without shape codes. It expects 3 and 4
   characters compared.
4. It sends one word back by DMA while a CPU output waits for the bus.
5. It counts each of these mechanisms and fails if one never happens.

`tb_sparc_cpu` runs a program that covers every addressing mode, the
arithmetic, logic and shift instructions, branches, `CALL`/`RTS`, all six
field instructions, all six I/O instructions, a masked and an unmasked
interrupt with `RTI`, and `HALT` with a restart. Its results are compared
with values the testbench computes itself.

To write your own programs, use the encoders in `tb/sparc_asm_pkg.sv`. For
example, `two(OP_ADD, AM_AUTOINC, 15, AM_REG, 3)` followed by a data word
is `ADD #imm,R3`. Load the program into `dut.u_mem.mem[]`, then pulse
`start`.

## How closely this follows the original machine

These parts follow the original machine:

- the 14-bit character layout;
- the meaning of the six field instructions;
- sixteen 16-bit registers with R15 as PC and R14 as SP;
- the four addressing modes;
- the two-operand and `PUTS`/`PUTV` field positions;
- the instruction classes: ten arithmetic/logic two-operand instructions,
  one-operand, branch, call/return, flag, interrupt, and output/input of
  word, byte, command and status;
- the fetch and interrupt-check sequence;
- the INTF equation;
- the two-bus structure with a memory controller arbitrating between CPU
  and DMA;
- the 64 KB memory;
- the 74181/74182 ALU structure.

These parts are this design's own:

- all opcode values;
- the choice of the ten two-operand and fourteen one-operand instructions;
- `CALL`/`RTS` through the stack instead of PDP-11 `JSR Rn`;
- the stack frame and vector table of interrupts;
- lowest-line-first interrupt priority;
- every bus handshake and its timing;
- the memory controller's DMA-first priority and 2-cycle access;
- the whole DMA controller: command format and block transfer;
- the flag results of the field instructions;
- which immediate bits `PUTS` uses.

For `PUTS` the layout sets the choice: the shape field is bits 6..5,
next to a 5-bit vowel field, so the two shape bits are taken from the top
of the 5-bit immediate (imm[4:3]).

Not included:

- byte-addressed memory instructions;
- the optional external memory-management hardware that would extend
  memory beyond 64 KB;
- the I/O devices themselves (terminals and printers). Their side of the
  I/O bus is brought out on the ports of `sparc_top`.

The original machine was measured at about six times the speed of a PDP-11
on routines that compare shapes or vowels. That figure depends on the
original microsequence and on the PDP-11 it was compared with, and is not
reproduced here. `tb_sparc_text_workload` measures the effect on this
design instead. It scans 256 random character words and counts the words
whose vowel code, and whose shape code, match a key character. The routine
built on `CMPV`/`CMPS` takes 12,501 cycles. The same routine built from
`MOV`, `BIC` and `CMP` takes 22,763 cycles, 1.8 times as long. The
end-to-end test also shows shape-aware matching stopping one character
earlier in the example above.
