# Sweet16: a microprogrammed 16-bit CISC processor

Sweet16 is a small 16-bit computer built around a microprogrammed control
unit. Every machine instruction runs as a short routine of 56-bit
microwords. Each microword drives 42 control lines into a register ALU
(RALU) and a memory interface. The point of the design is the CISC
trade-off. A complex operation such as a 16x16 multiply can be written as
a software loop of simple instructions, where every instruction pays a
5-cycle memory fetch. Or it can be one instruction whose loop runs inside
the microprogram at one cycle per step. The built-in test program shows the
difference:

- The shift-and-add multiply subroutine takes 985 cycles from CALL to RET.
- The `UMULR` instruction takes 24 cycles, fetch included.

The computer has a CPU and a small external system:
- 1K words of ROM and 1K words of RAM, each built from two byte-wide halves.
- A 16-bit input port and a 16-bit output port.

All of it is synthesizable SystemVerilog. The microprogram and the ROM
contents are constant functions. Sizes after a coarse synthesis: 387
word-level cells, 144 flip-flop bits, and 32 Kbit of memory plus a 20x16
register file.

## Block structure

```
sweet16                         top: CPU + external architecture
├── sw16_cpu                    CPU core
│   ├── sw16_controller         microprogrammed control unit
│   │   ├── sw16_upcont         microsequencer (next address, loop counter, return stack)
│   │   ├── sw16_maprom         opcode -> microroutine start address
│   │   ├── sw16_upm            256 x 56-bit microprogram ROM
│   │   ├── pipeline register   56 bits, holds the microword being executed
│   │   └── sw16_reg16 (IR)     instruction register
│   ├── sw16_intarch            RALU + command-bus glue
│   │   └── sw16_ralu           register ALU
│   │       ├── sw16_reg_array  20 x 16 registers, ports A, B (read) and C (write)
│   │       ├── sw16_mux (U3)   ALU A-input: data bus / short immediate / short offset / port A
│   │       ├── sw16_alu        16 functions incl. multiply and divide step functions
│   │       ├── sw16_alu_shifter  pass / left / right / arithmetic right, sets S and Z
│   │       ├── sw16_ext_shifter + sw16_reg16 (Q)  Q register for 32-bit shifts
│   │       └── status register {C,V,S,Z} + micro flags uC, uS, uZ
│   └── sw16_aux                MAR and data-bus steering
└── sw16_extarch                memory system
    ├── sw16_decoder            address decoder
    ├── sw16_rom_1kx8 x2        ROM, high and low byte lane
    ├── sw16_ram_1kx8 x2        RAM, high and low byte lane
    ├── sw16_inport             input port
    └── sw16_outport            output port
```

`sw16_pkg` holds the shared types and constants:
- the command-bus struct, the microword struct and all field encodings;
- the opcodes, the branch conditions and the microroutine addresses;
- the instruction encoder `ins()` and the built-in ROM program.

## The datapath in one cycle

One microword takes one clock cycle. Combinationally, that cycle does the
following:

1. The A and B register addresses are chosen from IR.r1, IR.r2, a constant
   in the microword, or a *pair* address. The pair address is the odd
   (PL=1) or even (PL=0) register of the pair that IR.r1/r2 names.
2. The ALU A input is one of:
   - register port A;
   - the inbound data bus (memory data, immediates, offsets);
   - IR[3:0] zero-extended (short immediate);
   - IR[7:0] sign-extended (short offset).
3. The ALU B input is always register port B.
4. The ALU result goes through the ALU shifter. The shift-in bit is 0, the
   ALU carry out, the Q shift-out or the C flag.
5. On the clock edge, these update:
   - The register array writes port C (address = the B address). It writes
     the shifter output or Q (SSEL), as a whole word or the low byte only
     (WnB).
   - Q loads the shifter output or shifts left/right. Its shift-in is 0, the
     ALU shifter's shift-out, uC or 1.
   - The status register takes the flags selected by SR_WR.
6. The RALU output to the bus (DSEL) is register port B or the shifter
   output.

A single cycle can therefore compute `R3 <= (R1 + R2) / 2` exactly, with
the 17th sum bit shifted back in: (0x1234 + 0x5678)/2 = 0x3456.

Registers 0-15 belong to the program. Registers 16-19 serve the
microprogram:

| Register | Use |
|---|---|
| 16 | PC |
| 17 | SP |
| 18 | TMP |
| 19 | TMP2 |

### Status register update modes (SR_WR)

| code | effect |
|---|---|
| 0 | none |
| 1 | micro flags uC, uS, uZ only (invisible to programs) |
| 2 | S, Z |
| 3 | C from the shifter shift-out, S, Z |
| 4 | C, V, S, Z |
| 5 / 6 | clear / set C |

## The 42-bit command bus and the microword

A microword is `{seq[13:0], cmd[41:0]}`.

| bits | field | meaning |
|---|---|---|
| 41:40 | AMUXSEL | A address: 0 IR.r1, 1 IR.r2, 2 PL_REGA, 3 pair {IR.r2[3:1], PL_REGA[0]} |
| 39:35 | PL_REGA | constant A register address |
| 34:33 | BMUXSEL | B/C address: 0 IR.r1, 1 IR.r2, 2 PL_REGB, 3 pair {IR.r1[3:1], PL_REGB[0]} |
| 32:28 | PL_REGB | constant B register address |
| 27 | SSEL | register write data: 0 shifter, 1 Q |
| 26 | WE | register write enable |
| 25 | WnB | 1 word write, 0 low-byte write |
| 24:23 | RSEL | ALU A input: 0 data bus, 1 short immediate, 2 short offset, 3 port A |
| 22 | DSEL | RALU output: 0 port B, 1 shifter |
| 21:18 | FSEL | ALU function |
| 17:16 | CNSEL | carry in: 0, 1, C, uC |
| 15:14 | F_SHFT_SEL | pass, left, right, arithmetic right |
| 13:12 | FSI_SEL | shift-in: 0, carry out, Q shift-out, C |
| 11:10 | Q_SHFT_SEL | hold, load, right, left |
| 9:8 | QSI_SEL | Q shift-in: 0, ALU shift-out, uC, 1 |
| 7:5 | SR_WR | status update mode |
| 4 | FMUXSEL | iterate bit of multiply/divide steps: 0 Q[0], 1 uC |
| 3 | DB_DVR_EN | drive the RALU output onto the data bus |
| 2 | MAR_LD | load the MAR from the data bus |
| 1 | RD_STR | memory read strobe |
| 0 | WR_STR | memory write strobe |

The sequencer field is `{op[3:0], cond[1:0], addr[7:0]}`.

| op | action |
|---|---|
| CONT | next word |
| JUMP | go to `addr` |
| CJUMP | go to `addr` if the condition holds |
| MAP | go to `MapROM[opcode on data bus]`, load IR |
| CALL / RET | microsubroutine via a 4-entry stack |
| LDCNT | counter <= addr |
| LDCNT_IR | counter <= IR.r2 - 1; 0 means 16 |
| LOOP | go to `addr` while counter != 0, decrementing |

The four conditions are:
- uC;
- not uC;
- uS;
- the branch condition named in IR.r1, tested on the program flags.

A LOOP after LDCNT n executes its word n+1 times.

Timing of the controller:
- The next address is computed combinationally from the pipeline register.
- It addresses the microprogram ROM.
- The word is clocked into the pipeline register, so each word executes one
  cycle after it is selected.
- Reset clears the pipeline register and sets the current address to 0xFF,
  so the first word executed is word 0.

## Instruction set

Instructions are 16 bits: `{opcode[7:0], r1[3:0], r2[3:0]}`. Some take a
second word (`ext`) holding an immediate, an address, a base or a branch
offset.

Cycle counts include the 5-cycle fetch. The pair `r|1` is the odd register
of r's pair. For UMULR, UDIVR and UMULI, the second operand may itself be
`r1|1` (for example `UDIVR R0,R1`). Operands are read before the odd
register is written.

| op | mnemonic | words | effect | cycles |
|---|---|---|---|---|
| 00 | LDSPR r1 | 1 | SP <- r1 | 6 |
| 03 | CLRC | 1 | C <- 0 | 6 |
| 06 | RET | 1 | PC <- mem[SP], SP += 2 | 9 |
| 0D | RORC r1,n | 1 | rotate r1 right through C, n times (n=0: 16) | 7+n |
| 13 | B cc,off | 2 | if cc: PC <- PC + off (PC after both words) | 12 |
| 14 | CALL addr | 2 | SP -= 2, mem[SP] <- PC, PC <- addr | 15 |
| 15 | JMP addr | 2 | PC <- addr | 11 |
| 16 | CALLX r2,base | 2 | push PC, PC <- base + r2 | 17 |
| 17 | JMPX r2,base | 2 | PC <- base + r2 | 12 |
| 18 | STA r1,addr | 2 | mem[addr] <- r1 | 12 |
| 19 | STAX r1,r2,base | 2 | mem[base + r2] <- r1 | 13 |
| 1A | LDA r1,addr | 2 | r1 <- mem[addr] (absolute mode) | 13 |
| 1B | LDAX r1,r2,base | 2 | r1 <- mem[base + r2] | 14 |
| 21 | ADDR r1,r2 | 1 | r1 <- r1 + r2; C V S Z | 6 |
| 2B | LDR r1,r2 | 1 | r1 <- r2; S Z | 6 |
| 2D | UMULR r1,r2 | 1 | {r1, r1\|1} <- r1 * r2 | 24 |
| 2E | UDIVR r1,r2 | 1 | r1\|1 <- r1 / r2, r1 <- r1 % r2 | 25 or 26 |
| 2F | ADCLR r1,r2 | 1 | {r1,r1\|1} <- {r1,r1\|1} + {r2,r2\|1} + C | 7 |
| 31 | ADDI r1,imm | 2 | r1 <- r1 + imm; C V S Z | 11 |
| 36 | LSUBI r1,imm | 2 | r1 <- r1 - imm; S Z (C kept) | 11 |
| 3B | LDI r1,imm | 2 | r1 <- imm; S Z | 11 |
| 3D | UMULI r1,imm | 2 | {r1, r1\|1} <- r1 * imm | 30 |
| FF | GFO | 1 | halt (the microprogram loops on one word) | - |

Opcodes that are not listed run as no-operations.

Branch conditions, held in the r1 field:

| cc | condition |
|---|---|
| 0 | CC |
| 1 | CS |
| 2 | NE |
| 3 | EQ |
| 4 | PL |
| 5 | MI |
| 6 | VC |
| 7 | VS |
| 8 | GE |
| 9 | LT |
| A | GT |
| B | LE |
| C | HI |
| D | LS |
| E | always |
| F | never |

Addresses are byte addresses, and instructions and data are 16-bit words
stored big-endian: the even byte is the high byte. Address bit 0 is
ignored, and the PC advances by 2 per word.

## Microprogram routines and their timing

- **Fetch / decode** is three words and five cycles:
  1. MAR <- PC, PC += 1, counter <- 2.
  2. Read for three cycles, waiting for memory.
  3. MAP: load IR, jump to the routine, PC += 1.

  The PC is therefore incremented in cycles 2 and 6 counting from the
  reset word. Two increments of 1 replace an "add 2", which would need a
  constant input to the ALU.
- **Immediate mode** is a microsubroutine of three words and four cycles.
  It puts the word after the instruction on the data bus and advances the
  PC. LDI, ADDI, LSUBI, JMP, CALL, B and the indexed instructions call it.
- **Absolute mode** is six words and six cycles. It reads the address word
  and then the operand it points to. LDA uses it.
- **CALL** fetches the target into TMP, decrements SP twice, and stores the
  PC at mem[SP] through the MAR. It then loads the PC from TMP.
- **UMULR** uses the Q register.
  1. Q is loaded with the multiplier and r1 is cleared.
  2. A single microword runs 16 times:
     - It adds the multiplicand when Q[0] = 1 (FMUXSEL = Q[0]).
     - It shifts {r1, Q} right by one, the ALU carry entering at the top.
  3. Q is moved into r1|1.

  The total is 19 cycles after fetch.
- **UDIVR** is a non-restoring division.
  - The dividend is shifted out of Q into the partial remainder. Each of
    16 steps adds or subtracts the divisor, depending on the sign of the
    previous step, which is kept in the micro carry uC.
  - The quotient bit is that carry, shifted into Q one step late. One extra
    Q shift places the last quotient bit.
  - A final add-back runs only if the last step left the remainder negative
    (uC = 0). The instruction therefore takes 20 or 21 cycles after fetch.
  - The remainder is kept to 16 bits plus the carry. The result is exact
    for every divisor up to 0x8000. Larger divisors can give wrong results,
    and division by 0 is not detected.
- **ADCLR** adds the odd (low) registers with carry in C, saving the carry
  in uC. It then adds the even (high) registers with carry in uC, which
  sets the program flags. It takes two cycles after fetch.

## Memory system

| addresses | device |
|---|---|
| 0x0000-0x07FF | ROM, 1K words (two 1Kx8 lanes), read only |
| 0x0800-0x0FFF | RAM, 1K words (two 1Kx8 lanes) |
| 0xFF00-0xFF7F | input port (read) |
| 0xFF80-0xFFFF | output port (write) |

Anything else reads as 0.
- The original bidirectional tri-state bus is split into separate buses.
  `rd_data_bus` is the OR of the selected devices' gated outputs.
  `wr_data_bus` is driven by the CPU.
- The RAM writes on the rising clock edge while WR_STR is high.
- The ROM and RAM read asynchronously while RD_STR is high.
- The CPU keeps RD_STR high for three cycles on every read, as the slow
  memory of the original design required.

Inside the CPU, memory data reaches the RALU and the IR only through the
inbound bus. The RALU output reaches only the MAR and the outbound bus, so
there is no combinational path from the RALU output back to its input.

The ROM powers up holding a test program. The program multiplies 0xABBA by
0xDABA with a shift-and-add subroutine built from RORC, B CC, ADDR, LSUBI
and B PL. It leaves 0x92B92924 in R0:R1 and halts after 1031 cycles. Its
stack starts at 0x1000, so the first push lands at 0x0FFE, the top word of
RAM. A testbench can load another program by writing the ROM arrays
hierarchically:
- `u_ext.u_rom_hi.mem[i]` holds the high byte of word i;
- `u_ext.u_rom_lo.mem[i]` holds the low byte.

## Top-level ports (`sweet16`)

| Port | Meaning |
|---|---|
| `clk` | clock |
| `rst` | synchronous reset, active high |
| `inport[15:0]` | input port pins |
| `outport[15:0]` | output port pins |
| `addr_bus`, `rd_data_bus`, `wr_data_bus`, `rd_str`, `wr_str` | system bus, for observation |
| `ir`, `flags` | instruction register and program flags {C,V,S,Z} |
| `up_addr`, `up_seq` | address and sequencer field of the microword being executed |

## Where this design departs from the original

- **Microcode.** The microcode is a new implementation. The following keep
  the original's cycle counts: fetch (5), immediate mode (4), absolute
  mode (6), UMULR (19 after fetch) and ADCLR (2 after fetch). Other
  routines differ:
  - UDIVR takes 20/21 cycles here against 21/22 in the original.
  - The multiply subroutine of the test program takes 985 cycles here
    against 893. This is still more than 37 times the 24 cycles of UMULR.
- **Assumed encodings.** These are this design's choices:
  - the opcodes of UMULR, ADCLR, ADDI and UMULI;
  - branch conditions 1-F;
  - the encodings of every command-bus field;
  - the sequencer field.
- **Flags.** The flags are a separate status register. They do not occupy
  one of registers 16-19.
- **Test program stack.** The test program's stack is at 0x1000 (top of
  RAM) instead of inside the ROM.
- **Buses.** The buses are split instead of tri-stated, and the RAM write
  is synchronous.
- **Division range.** Division is exact only for divisors up to 0x8000.

## Simulating

Every testbench in `tb/` is self-checking. Each prints one
`TB_RESULT checks=N failures=M` line and has a watchdog. With Verilator 5,
for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sw16_pkg.sv \
          tb/tb_sweet16.sv --top-module tb_sweet16
./obj_dir/Vtb_sweet16 +verilator+rand+reset+2
```

`tb_sweet16` is the end-to-end test, at the default sizes:
- It runs the built-in ROM program.
- It then assembles and loads a 278-word program that uses every
  instruction with random operands. That program includes:
  - 0xF00D*0xBEEF = 0xB309C223 and 0xDEAD*0xBEA7 = 0xA5D5A8DB;
  - 0xF00D/0x000F = 0x1000 remainder 0x000D;
  - the ADCLR case {F00D,F00D}+{BEEF,000F} = {AEFC,F01C} with carry out;
  - input-port and output-port accesses at 0xFF33 and 0xFFBA.
- It checks RAM, the ports and the registers.
- It checks the fetch, immediate, absolute, UMULR, ADCLR and UDIVR cycle
  counts.
- It counts a failure for any mechanism that never occurred. The mechanisms
  are stack push/return, branch taken/not taken, RAM and port traffic,
  divide with and without the add-back, RORC, indexed addressing and halt.

Each block also has its own testbench, `tb/tb_<module>.sv`. The block
testbenches compare against independent reference models.

To run another program, write words into the ROM arrays (see "Memory
system") before releasing reset. `sw16_pkg::ins(op, r1, r2)` builds
instruction words. To change the instruction set, edit `sw16_upm.sv` (the
microroutines) and `sw16_maprom.sv` (the opcode map).
