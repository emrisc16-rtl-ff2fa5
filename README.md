# EmRISC16: a 16-bit RISC microcontroller core for small FPGAs

EmRISC16 is a deliberately small processor, sized to fit a 10,000-gate FPGA
while still being able to run a UDP/IP stack over an 8-bit Ethernet
controller. To get there it makes a few unusual trades:

* **No pipeline, fixed 32-bit instructions, 8-bit bus.** Each instruction is
  one 32-bit word with every operand at a fixed bit position. It is fetched
  one byte at a time over an 8-bit data bus, so a fetch alone takes 8 clock
  cycles. Decoding is then only wiring. Every instruction takes 9 to 12
  cycles.
* **A large flat address space.** The address bus is 18 bits wide (256 KB),
  enough to hold Ethernet frames. Every jump, call and memory address
  field is a full 18-bit constant, so there is no PC-relative addressing.
* **One data addressing mode.** Each load, store and I/O access uses
  `addr18 + ra`, a constant plus a zero-extended 16-bit register.
* **Two kinds of bus access.** Loads and stores (`lbu lbs lw sbl sbh sw`)
  hold a strobe low for a single cycle, which suits SRAM. `ior` and `iow`
  stretch the access to 4 cycles, for slow peripherals such as an Ethernet
  controller.
* **No on-core peripherals.** The core has two edge-triggered interrupt
  inputs, and nothing else. The microcontroller around it adds an input
  port, an output port and an address decoder.

The RTL is SystemVerilog (IEEE 1800-2017). It lints cleanly in Verilator and
elaborates in Yosys/slang.

## Programmer's model

| Item | Width | Notes |
|---|---|---|
| r0 .. r15 | 16 | r0 always reads 0. Writing to it is allowed and has no effect. |
| PC | 18 | Byte address of the next byte to fetch. It counts up by 1 per fetched byte, so it advances by 4 per instruction. |
| INTPC | 18 | Holds the PC across an interrupt or `trap`. |
| EIB | 1 | Enable-interrupts bit. It is cleared by reset, `di`, `trap` and interrupt entry. It is set by `ei` and `rei`. |

A register can hold only 16 bits, so code addresses are stored in registers
divided by four:

* `acall`/`rcall` write `PC >> 2` into `rd`. At that point the PC holds the
  address of the next instruction.
* `jr ra` and `rcall` jump to `ra << 2`.

`acall r15, sub` ... `jr r15` is therefore the subroutine idiom. Instructions
must be 4-byte aligned.

Multi-byte data in memory is big-endian. No instruction moves 16 bits at once
over the 8-bit bus:

* `sbh` stores the high byte of `rd` and `sbl` stores the low byte.
* `lbu` zero-extends the loaded byte and `lbs` sign-extends it.
* `lw` and `sw` exist in the encoding, but on this 8-bit bus they move one
  byte, like `lbu` and `sbl`.

## Instruction word

Every field sits at the same bit position in all formats:

| Bits | Field | Used by |
|---|---|---|
| 31:26 | opcode | all |
| 25:22 | rd | ALU ops, loads, stores (the register stored), ior, iow, acall, rcall |
| 21:18 | ra | ALU ops, loads, stores, ior, iow (the offset register), beqz, bnez, jr, rcall |
| 17:14 | rb | ALU register forms |
| 15:0 | immed | ALU immediate forms (bits 17:16 unused) |
| 17:0 | addr | loads, stores, ior, iow, ja, acall, beqz, bnez |

The word is stored most significant byte first. For example,
`add r5, r2, r7` is `81 49 C0 00`, and `acall r15, 0x100` is `3B C0 01 00`.

| Group | Opcodes (hex) and cycles |
|---|---|
| System | nop 00 (9), halt 01 (9), rei 03 (9), di 04 (9), ei 05 (9), trap 06 (10), rfe 07 (9) |
| Jump / branch | ja 08 (9), jr 09 (9), acall 0E (10), rcall 0F (10), beqz 18 (9), bnez 19 (9) |
| Memory / I/O | lbu 10, lbs 11, lw 12 (10); ior 13 (12); sbl 14, sbh 15, sw 16 (11); iow 17 (12) |
| Add / sub | add 20, addi 21, addc 22, addci 23, sub 24, subi 25, subc 26, subci 27 (9) |
| Logic | and 28, andi 29, or 2A, ori 2B, xor 2C, xori 2D (9) |
| Shift | lsl 30, lsli 31, lsr 32, lsri 33, asr 36, asri 37 (9); the amount is the low 4 bits of rb or the immediate |
| Compare | slt 38, sle 39, sgt 3A, sge 3B, seq 3C, sne 3D (9); result 1 or 0, always against rb |

In every ALU pair, odd opcodes take the immediate. Within the shifts, opcode
bit 1 selects a right shift and bit 2 an arithmetic one.

The **carry-result** instructions (`addc`, `subc` and their immediate forms)
do not add a carry in. They return the carry out of the same addition, 0 or
1; for subtraction this is 1 when no borrow occurs. They exist for
one's-complement sums:

```
addc r6, r2, r5   ; r6 = carry of r2 + r5
add  r2, r2, r5
add  r2, r2, r6   ; end-around carry: an IP checksum step
```

**Comparisons** subtract `ra - rb` and look at bit 15 of the difference and at
whether it is zero. That gives a signed comparison only while the difference
does not overflow. ALU opcodes the unit does not define (`2E 2F 3E 3F`)
return `0xFFFF`. Any other undefined opcode runs as a 9-cycle `nop`.

## Bus cycles: how an instruction executes

This is the part most worth understanding before connecting memory or
peripherals. All strobes are active low. Each one is low for whole clock
cycles and changes only at rising clock edges. Cycle numbers count from the
first fetch cycle of the instruction.

| Cycles | ADDR_BUS | RD_ | WR_ | DBOUT_ | Internal action |
|---|---|---|---|---|---|
| 1, 3, 5, 7 (fetch) | PC | low | high | high | One instruction byte is latched at the end of the cycle |
| 2, 4, 6, 8 (fetch) | PC | high | high | high | PC <- PC + 1 |
| 9: ALU, shift, compare | PC | high | high | high | rd written |
| 9: ja, jr, taken beqz/bnez, rei, rfe | PC | high | high | high | PC loaded |
| 9-10: acall, rcall | PC | high | high | high | rd <- PC>>2 in 9, PC <- target in 10 |
| 9-10: lbu, lbs, lw | addr+ra | high, then low in 10 | high | high | The byte is written to rd at the end of 10 |
| 9-11: sbl, sbh, sw | addr+ra | high | low only in 10 | low | 11 is a recovery cycle, so the next fetch does not read the byte just written |
| 9-12: ior | addr+ra | low in 10-12 | high | high | The byte is taken at the end of 12 |
| 9-12: iow | addr+ra | high | low only in 12 | low | No recovery cycle: the next fetch goes to memory, not to the slow device |
| 9-10: trap | PC | high | high | high | INTPC <- PC and EIB <- 0 in 9, PC <- 0x10 in 10 |

Read data is sampled at the rising edge that ends an RD_-low cycle. A device
must therefore answer within one clock cycle for loads and fetches, and
within three cycles for `ior`. For stores, DBOUT_ goes low a cycle before
WR_, so the data is already stable when WR_ falls.

## Interrupts, trap and halt

IRQA and IRQB are edge-triggered. Each rising edge sets a latch, whatever
the value of EIB. At every instruction boundary the core checks the latches:

1. If EIB is set and a latch is set, the core does not fetch. It spends three
   cycles on interrupt entry instead: EIB <- 0, then INTPC <- PC, then
   PC <- 0x10 (A) or 0x20 (B).
2. A wins over B. The latch of the interrupt taken is cleared.
3. A latched interrupt that arrives while EIB is clear stays pending. It is
   taken at the first boundary after `ei` or `rei`.

The finishing instruction's own effect on EIB counts. An interrupt is not
taken right after `di`, and a pending interrupt is taken right after `ei`.
Each vector has room for four instructions before the next vector.

A handler ends with one of two instructions:

* `rei` returns and re-enables interrupts.
* `rfe` returns and leaves them disabled.

`trap` is a software interrupt through vector 0x10. `halt` stops the core
after its ninth cycle, until reset or until an enabled interrupt arrives.
Reset (RST, active high, asynchronous) clears PC and EIB, so execution
starts at address 0 with interrupts off.

The IRQ pins are synchronised to the clock by two flip-flops, and the edge is
detected on the clock. From a rising pin to the latch takes about three
cycles. A pin must stay high for at least one clock cycle.

## Units and files

The core is split into the six units of its block diagram. Each is a module
in `rtl/`:

| File | Unit | What is inside |
|---|---|---|
| `emrisc16_pkg.sv` | shared | Opcode enum, next-PC and write-source enums |
| `emrisc16_fdu.sv` | Fetch and Decode Unit | Four byte registers loaded in turn, and field slicing. For stores, the rb output carries rd |
| `emrisc16_regfile.sv` | Register File | Two RAM banks written together, one per read port (how the original maps to FPGA LUT-RAM); an r0 zero multiplexer; `reg_addr = ra << 2` |
| `emrisc16_alublock.sv` | ALU block | Branch check, shift-amount mux, and instances of the shifter and the ALU |
| `emrisc16_alu.sv` | ALU | One adder with an inverted-B path for subtraction, the zero and sign flags, and an 8-way result mux (0, 1, AND, OR, XOR, sum, carry, 0xFFFF) |
| `emrisc16_shifter.sv` | shifter | Barrel shifter: left; logical right; arithmetic right |
| `emrisc16_pcunit.sv` | Program Counter Unit | PC, INTPC and the six-way next-PC mux (PC+1, address field, register, INTPC, 0x10, 0x20) |
| `emrisc16_memio.sv` | Memory and I/O Unit | Displacement adder, address-bus mux, store byte select, load byte extension |
| `emrisc16_control.sv` | Processor Control Unit | Interrupt latches, EIB, and the fetch/execute/interrupt/halt state machine that drives every enable and strobe |
| `emrisc16_core.sv` | core | The units wired together, plus the mux that chooses what is written to rd |
| `emrisc16_inport.sv`, `emrisc16_outport.sv` | ports | The 8-bit input and output ports of the microcontroller |
| `emrisc16_mcu.sv` | microcontroller (top) | Core, ports and address decoder |

## The microcontroller (`emrisc16_mcu`, the top)

| Address | Device | Select |
|---|---|---|
| 0x00000-0x1FFFF | External 128 KB SRAM | `srce_n` low (A17 = 0) |
| 0x20000-0x2000E | External Ethernet controller, on A[3:0] | `netce_n` low (A17..15 = 100) |
| 0x28000 | Input port | A17..15 = 101 |
| 0x30000 | Output port, `led` | A17..16 = 11 |

The decoder looks only at A17..A15, so each device is mirrored across its
range.

The input port is sampled, not transparent. A store to 0x28000 (of any
value) latches the `pin` inputs, and a following load reads that sample.

Top-level ports:

| Port | Direction | Meaning |
|---|---|---|
| `clk`, `rst` | in | Clock, and reset (active high) |
| `irqa`, `irqb` | in | Interrupt requests |
| `rd_n`, `wr_n` | out | Bus strobes, also used as the SRAM's OE_ and WE_ |
| `a[16:0]` | out | Address pins; A17 is used only inside the chip |
| `d_in`, `d_out`, `d_oe` | in, out, out | The bidirectional data pins, split. Drive the pad from `d_out` when `d_oe` is high |
| `srce_n`, `netce_n` | out | Chip selects |
| `pin[7:0]` | in | Input port |
| `led[7:0]` | out | Output port |
| `ucrst` | out | Constant 1. It holds a neighbouring 8031 on the original board in reset |

## Design decisions not fixed by the original description

These are this implementation's own choices; change them if your system
needs otherwise:

* **How PC values fit in 16-bit registers.** Calls store `PC >> 2`, to match
  `jr`/`rcall` shifting left by two.
* **Cycle order of calls.** `acall`/`rcall` write rd in cycle 9 and jump in
  cycle 10. An `rcall` with rd = ra therefore jumps to the return address it
  has just stored.
* **Trap vector.** `trap` uses vector 0x10, the interrupt A vector.
* **Waking from halt.** `halt` wakes on an enabled interrupt.
* **Interrupt entry and sampling.** The order of the three interrupt-entry
  cycles is EIB <- 0, INTPC <- PC, PC <- vector. The IRQ pins are sampled on
  the clock; the original clocks its latches straight from the pins.
* **Word accesses.** `lw`/`sw` move one byte (zero-filled / low byte),
  because only an 8-bit bus exists. `ior` zero-fills.
* **Undefined opcodes.** An arithmetic left shift (0x34/0x35) acts as a
  logical one. Undefined non-ALU opcodes are no-ops.
* **Resets.** Reset is asynchronous and active high. The register file is not
  reset, since it is RAM.
* **Ports.** The input and output ports are clocked registers loaded at a
  clock edge where their chip select and strobe are both active.

Departures from the original FPGA netlist:

* The original control unit has a few extra enable outputs, such as
  `DECADDR_EN`, whose use is not described. This design does without them:
  every register runs on the one system clock, with a write enable from the
  control unit.
* The edge detectors use the system clock.

Neither changes the cycle counts.

## Simulation

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/emrisc16_pkg.sv tb/emrisc16_asm_pkg.sv tb/tb_emrisc16_mcu.sv \
  --top-module tb_emrisc16_mcu -o sim && ./obj_dir/sim
```

For another testbench, swap in its file and top module. With `--assert`, the
core also checks two bus rules at every clock edge: RD_ and WR_ are never low
together, and DBOUT_ is low whenever WR_ is low. `tb/emrisc16_asm_pkg.sv`
holds the instruction encoders that the program-driven testbenches use to
build code in memory.

| Testbench | What it shows |
|---|---|
| `tb_emrisc16_mcu` | The whole microcontroller, at its only size, with an SRAM model and a 16-byte stand-in for the Ethernet controller (both behavioural, in `tb/`). See below. |
| `tb_emrisc16_core` | The core runs a program that covers every ALU, shift and compare instruction on random operands (against an independent reference), loads above 64 KB, ior/iow/sw/sbh, both call forms, loops, both branches, interrupts A and B, `rei` vs `rfe`, trap and halt. Each instruction's measured cycle count is checked against the table above. |
| `tb_emrisc16_example` | The small example program (a call that adds a constant to a byte loaded from memory), assembled with the testbench's encoders. Checks the result and the exact cycle count to halt. |
| `tb_emrisc16_netdemo` | The microcontroller sends an ARP request and receives one UDP frame through a behavioural model of the Ethernet controller's transmit and receive registers: command and length writes, ready polling through the PacketPage ports, byte streaming at 49 cycles per byte. The first data byte plus the input port goes to the output port. |
| `tb_emrisc16_control` | Cycle-by-cycle strobes and enables for every instruction class, and interrupt entry, masking, priority and halt. |
| The other `tb_emrisc16_*` | Unit tests against reference models, mostly with random stimulus. |

The microcontroller test runs a program that does the demonstration
system's steps in small:

* shows "0" on the 7-segment output through a table lookup;
* writes Ethernet controller registers low byte first with `iow`;
* computes an IPv4 header checksum with the `addc` idiom, compared against a
  reference;
* checks that an interrupt arriving while disabled stays pending;
* raises both interrupts at once and checks that A is served first;
* strobes and reads the input port, adds a byte read with `ior`, and shows
  the sum;
* traps, then halts.

It also checks pin timing: `ior` holds RD_ low for exactly 3 cycles, WR_ is
low for 1 cycle with the data driven, and every SRAM store has a recovery
cycle. Finally it counts each mechanism (fetch, load, store, ior, iow, taken
and untaken branch, call, interrupt A and B, masked, both pending, trap,
halt, port strobe and read, output write) and fails if any never occurred.

## Limits

* The Ethernet controller model covers only its transmit and receive
  registers, so the complete UDP/IP demonstration program (ARP replies,
  interrupt-driven UDP messages) has not been run. Its hardware-facing steps
  and one send/receive exchange have.
* Clock rate and FPGA area were not evaluated. The original netlist ran at
  9 MHz on a Xilinx XC4010XL. The 9 MHz clock in the microcontroller test is
  only a time scale.
* The comparison instructions ignore overflow (see above). Code that compares
  values far apart in signed range, such as 0x7FFF against 0x8000, gets the
  wrong answer; this is faithful to the described hardware.
