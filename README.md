# A 16-bit RISC microcontroller with a single common data bus

This is a small Harvard-architecture microcontroller. Its instruction set and peripherals are
modelled on the Atmel AVR AT90S1200, widened to a 16-bit data path. Every ALU instruction executes
in one clock. The instruction word is 24 bits wide, so a 16-bit constant or jump offset fits in one
word and every instruction is a single word. The core has no pipeline: it overlaps only the fetch
of the next instruction with the last cycle of the current one. An eight-state controller
sequences the few multi-cycle instructions: loads and stores, bit operations on I/O registers,
skips, jumps, calls, returns, interrupt entry and sleep.

The design follows the published "FPGA Based Implementation of 16 bit RISC Microcontroller"
(an AVR-derived VHDL design for an FPGA). It keeps that design's block structure, widths, state
diagram, instruction list and addressing modes. That description leaves out the instruction
encoding, the cycle-by-cycle behaviour of each state, the I/O register map and the peripheral
registers. This implementation supplies them, and the sections below mark which parts are its own.

## Block structure

```
 fetch unit                      execute unit                          I/O unit
 ----------                      ------------                          --------
 program_counter                 reg_file (16 x 16 bit) --Z--> data_ram
      |                             |      |  (Rd, Rr)                 io_port  B
 program_rom (24-bit words)         v      v                          io_port  C
      |                               alu  ---- flags ---> status_reg  io_port  D
 instr_reg ---- Rd/Rr fields ---->    |                       |        timer16
      |                               |                       |        ext_interrupt
 control_unit <----- flags -----------+-----------------------+
   (instr_decoder, branch_eval,       |
    hw_stack, 8-state FSM)     ===== data_bus (16 bit, one source per cycle) =====
```

| Module | Role |
|---|---|
| `mcu_top` | Connects everything. The pads are separate in/out/enable vectors. A load port writes the program ROM. |
| `mcu_pkg` | Widths, enums, the instruction format, the I/O address map, and `enc_*` functions that assemble instructions. |
| `program_counter` | 16-bit PC. It increments on every fetch and loads on a jump, branch, skip, return or vector. |
| `program_rom` | `ROM_DEPTH` (1024) words of 24 bits. Read is combinational. Has a synchronous load port. |
| `instr_reg` | 24-bit IR. Reset loads NOP. |
| `control_unit` | Holds the FSM. It instantiates `instr_decoder`, `branch_eval` and the 4-level `hw_stack`. |
| `reg_file` | 16 x 16-bit registers with two read ports and one write port fed from the bus. R15 is the Z pointer and has its own update port. |
| `alu` | 11 operations plus pass-through. Produces the flags and a mask of the flags each operation changes. |
| `status_reg` | `I P H S V N Z C`. Also readable and writable as I/O register 0x3F. |
| `data_ram` | `RAM_DEPTH` (256) 16-bit words, addressed through Z. |
| `data_bus` | The common bus: a multiplexer driven by the control unit's `bus_src`. |
| `io_port` | An AVR-style PORT/DDR/PIN triple, 8 lines wide. There are three instances, for 24 I/O lines. |
| `timer16` | A 16-bit counter with a prescaler (`clock_prescaler`), output compare with an OC pin, input capture and three flags. |
| `ext_interrupt` | INT0 with level, any-edge, falling or rising sense. Has enable and flag registers. |

The data bus is the one shared path. The register file, ALU, status register, data RAM and every
I/O register sit on it. The register file receives data only from the bus. All other links are
point-to-point and need no control signals: PC to ROM, ROM to IR, IR to register addresses,
register file to ALU, ALU flags to status register, and status register to control unit.

## Instruction word

```
 23    20 19    16 15    12 11     8 7      0
+--------+--------+--------+--------+--------+
| major  |   Rd   |   Rr   |        |  fn    |   register-register / single register (major F)
| major  |   Rd   |       16-bit constant K  |   LDI (MVI), SUBI, SBCI, ANDI, ORI/SBR, CBR
| major  |   Rd   |            ...  | A[5:0] |   IN Rd,A
| major  |        |   Rr   |     ...| A[5:0] |   OUT A,Rr
| major  | Rd/--  | --/Rr  |     ...| mode   |   LD Rd,{Z,Z+,-Z} / ST {Z,Z+,-Z},Rr  (mode in [1:0])
| major  |        |      16-bit offset       |   RJMP, RCALL   (target = PC + offset)
| major  |p| flag |        ...      | off[6:0]  BRBS/BRBC: branch if status bit `flag` == p
| major  |  op    |        |  bit   | A[5:0] |   CBI, SBI, SBIC, SBIS  (op in [17:16])
| 0      |          0               |  code  |   NOP(0) SLEEP(1) RET(2) RETI(3) SEI(4) CLI(5)
+--------+--------+--------+--------+--------+
```

The major opcodes are 0 misc, 1 LDI, 2 SUBI, 3 SBCI, 4 ANDI, 5 ORI, 6 CBR, 7 IN, 8 OUT, 9 LD, A ST,
B RJMP, C RCALL, D conditional branch, E bit operations, and F register ALU. The function codes of
major F are ADD 0, ADC 1, SUB 2, SBC 3, AND 4, OR 5, EOR 6, MOV 7, COM 8, NEG 9, INC A and DEC B.
The all-zero word is NOP. Undefined codes execute as NOP. `mcu_pkg` has one encoder function per
format (`enc_alu`, `enc_imm`, `enc_in`, `enc_out`, `enc_ld`, `enc_st`, `enc_rjmp`, `enc_rcall`,
`enc_br`, `enc_bit`, `enc_misc`). The testbenches write their programs with these functions.

The PC in "PC + offset" already points past the branch. A conditional branch reaches -64..+63
words. RJMP and RCALL take a 16-bit offset, so they reach all of program memory. The AVR aliases
need no hardware of their own: SBR is ORI, TST is `AND Rd,Rd`, CLR is `EOR Rd,Rd`, and SER is
`LDI Rd,0xFFFF`. CBR has its own opcode: the decoder complements the constant and the ALU performs
an AND. This whole format is this implementation's own. The source defines only the widths and
the field sizes: 6 bits of I/O address, and a conditional reach of -64..63.

### Flags

| Instructions | Flags updated |
|---|---|
| ADD ADC SUB SUBI SBC SBCI NEG | S Z C N V H P |
| AND ANDI OR ORI EOR CBR (TST CLR) | S Z N V(=0) P |
| COM | S Z C(=1) N V(=0) P |
| INC DEC | S Z N V P |
| LDI MOV IN LD | none |

The flag definitions are the AVR's, widened to 16 bits. C is the carry or borrow out of bit 15.
H is the carry or borrow out of bit 3. V is two's-complement overflow. N is bit 15, and S = N xor V.
Z is set when the result is zero, for every operation: unlike the AVR, SBC does not chain Z.
P is set when the result has an even number of ones.

## The control FSM and instruction timing

This is the part to read before changing anything. The states and their transitions come from the
source design's state diagram:

```
 RESET -> EXE                   EXE -> EXE       single-cycle instruction
 EXE -> BRANCH1 -> BRANCH2 -> EXE   RJMP, RCALL, RET, RETI, interrupt entry
 EXE -> BRANCH2 -> EXE          conditional branch taken (branch request)
 EXE -> LD -> EXE,  EXE -> ST -> EXE,  EXE -> SBICS -> EXE,  EXE -> CBISBI -> EXE
 EXE -> SLEEP (loops while no IRQ) -> BRANCH1 on an accepted IRQ
```

What happens in each state is this implementation's choice:

- **Fetch rule.** The IR loads `ROM[PC]` and the PC increments in the last cycle of every
  instruction. The IR therefore holds the whole instruction for as long as it runs, and the PC
  always holds the address of the next instruction. After reset the IR holds NOP, so the first
  cycle fetches address 0.
- **EXE** executes the instruction in the IR. An ALU op or LDI puts its result on the bus, and the
  result is written to Rd at the clock edge ending the cycle. IN reads an I/O register onto the bus
  and into Rd. OUT passes Rr through the ALU onto the bus and into the I/O register. SEI and CLI
  set or clear I.
- **LD / ST.** EXE computes the address and holds it in a register: Z, Z before the increment for
  `Z+`, or Z−1 for `-Z`. The new Z is written in the same cycle. In the LD state the RAM drives
  the bus into Rd. In the ST state Rr is passed onto the bus into the RAM.
- **CBI / SBI.** EXE reads the I/O register onto the bus and saves a copy with the bit changed.
  CBISBI drives that copy back onto the bus and writes it to the register.
- **SBIC / SBIS.** The SBICS state reads the I/O register and tests the bit. On a skip request
  the fetch reads `ROM[PC+1]` and the PC becomes PC+2. Otherwise the fetch is the normal one.
- **RJMP / RCALL / RET / RETI.** EXE loads the PC. RCALL and interrupt entry push the return
  address (the current PC); RET and RETI pop it. RETI also sets I. BRANCH1 is an idle cycle and
  BRANCH2 refetches.
- **Conditional branch.** `branch_eval` compares the selected status bit with the polarity bit.
  A taken branch loads the PC and goes straight to BRANCH2.

| Instruction | Clocks |
|---|---|
| ALU ops, LDI, MOV, IN, OUT, NOP, SEI, CLI, branch not taken | 1 |
| branch taken, LD, ST, CBI, SBI, SBIC, SBIS (skip or not) | 2 |
| RJMP, RCALL, RET, RETI | 3 |
| interrupt entry | 3, after the interrupted instruction completes |

**Interrupts.** The two sources are the timer and INT0. INT0 has priority and uses vector 1; the
timer uses vector 2. Reset is vector 0. When I = 1 and an IRQ is pending, the single-cycle
instruction in EXE completes. Then, instead of the fetch, the PC is pushed, I is cleared and the
PC loads the vector. An interrupt is not accepted in the cycle of CLI or OUT, because either may
change I. In SLEEP an accepted IRQ leads to BRANCH1 in the same way. With I = 0 the core sleeps
for ever. Taking INT0's vector clears its flag. Timer flags are cleared by writing ones to TIFR.
RETI does not restore the status flags.

**Hardware stack.** It is 4 levels deep. A fifth push drops the oldest entry, and popping an empty
stack returns 0, as in the AT90S1200.

## Data bus and I/O map

The source design uses a tri-state bus. Here the bus is a multiplexer: `bus_src` is one of ALU,
RAM, IO, TMP or NONE, so a second driver cannot occur. In the I/O case, the register block whose
`io_hit` is set answers, and an unmapped address reads 0. An assertion checks that at most one
block answers. Every I/O register is 16 bits on the bus; the 8-bit ones read with the upper byte
zero.

| Address | Register | Bits |
|---|---|---|
| 0x3F | SREG | I P H S V N Z C |
| 0x3B / 0x3A | GIMSK / GIFR | bit 6: INT0 enable / flag (write 1 to clear) |
| 0x39 / 0x38 | TIMSK / TIFR | bit 0 overflow, bit 1 compare, bit 2 capture |
| 0x35 | MCUCR | [1:0] INT0 sense: 00 low level, 01 any edge, 10 falling, 11 rising |
| 0x33 | TCCR | [2:0] clock: 0 stop, 1 clk, 2 /8, 3 /64, 4 /256, 5 /1024; [3] clear on compare; [5:4] OC: 01 toggle, 10 clear, 11 set; [6] capture edge (1 = rising) |
| 0x32 / 0x31 / 0x30 | TCNT / OCR / ICR | 16-bit count / compare value / capture (read only) |
| 0x18 0x17 0x16 | PORTB DDRB PINB | 8 bits |
| 0x15 0x14 0x13 | PORTC DDRC PINC | 8 bits |
| 0x12 0x11 0x10 | PORTD DDRD PIND | 8 bits |

Both the map and the timer and interrupt registers are this implementation's own. They use AVR
names and positions. Pad inputs (PINx, ICP, INT0) pass through a two-flip-flop synchroniser.
A compare match happens on a counting tick while TCNT = OCR. With clear-on-compare, the period is
OCR+1 ticks.

## Departures from the source design

- **Data bus width.** The block diagram labels the common bus 8 bits. The text specifies a 16-bit
  ALU and registers, so the bus here is 16 bits.
- **Status register.** The text specifies a 3-bit flag register for carry, zero and parity. The
  instruction table uses the AVR flags S Z C N V H. This register holds the AVR flags, P and I.
- **Processor states.** The text also names four processor states: idle, fetch, decode and
  execute. The eight-state diagram is implemented instead. Fetch overlaps the last cycle of each
  instruction, and decoding is combinational.
- **Data bus implementation.** The source uses a tri-state bus; this is a multiplexer.
- **Z pointer update.** The source lets the register file receive data only from the bus. Here a
  separate port updates Z for `Z+` and `-Z`.
- **Decoder outputs.** The source's decoder has 46 output lines. This decoder has about 19
  instruction classes, one per instruction kind in the list above; the source does not give its
  full list.
- **Instructions added.** MOV, RET, RETI, SEI and CLI are not in the source's instruction table.
  They were added because calls, interrupts and register moves need them.
- **Not modelled.** The 12 MHz clock achieved on the FPGA, and the "register controller" named
  among the timer subsystems, whose function is not described.
- **Sizes.** The program ROM and data RAM sizes are not specified; they are parameters
  (`ROM_DEPTH` = 1024, `RAM_DEPTH` = 256). Addresses wrap modulo the depth.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and includes a watchdog. The ALU, register file, RAM, stack,
status register and branch evaluator are checked against models in the testbench, with random
operands. The ALU alone runs about 20 000 checks. The peripherals and the control unit get directed
tests of every mode and state.

`tb_mcu_top` runs the whole chip at its default parameters:

- First it runs `MVI R1,0x0005` placed at address 0. It checks that R1 is written at the clock
  edge after the fetch.
- Then it runs a program that uses every instruction class. The program calls four levels deep,
  skips, sleeps until a timer compare interrupt (taking an input capture while asleep), and takes
  an external interrupt while running.
- It checks the final registers, RAM and pads against hand-computed values, and checks that
  24 consecutive ALU instructions take 24 clocks.
- It counts that every FSM state, skip, branch request, interrupt source and entry path, the Z
  modes, the compare match and the capture each occurred at least once.

Known limits: the flags of every ALU operation were checked against the testbench's own model,
not against AVR silicon. No FPGA timing or synthesis-to-hardware was done.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/mcu_pkg.sv tb/tb_mcu_top.sv \
          --top-module tb_mcu_top -o sim && ./obj_dir/sim
```

(`-Wno-fatal` lets the testbenches' width warnings through.) Replace `tb_mcu_top` with any other `tb_*` to test one block. To run your own program, fill an
array with `enc_*` words and write it through `prog_we`/`prog_addr`/`prog_wdata` while `rst_n` is
low, as `tb_mcu_top`'s `load_program` task does. Then release reset; execution starts at address 0.
