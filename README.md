# E.E.C.S. — an interrupt-driven elevator controller

E.E.C.S. (Efficient Elevator Control System) is a small 16-bit RISC processor
built to dispatch the elevators of a building. The target building has 64
floors and 16 elevators. The controller does not poll anything. Elevators
raise an interrupt whenever their status changes (load, position, direction,
destination). Hall-call buttons raise another one. The processor reacts to
both. It has three features a plain microcontroller of its size lacks:

* **Two interrupt lines with vectors.** Every elevator report goes to one
  service routine. Every hall button has its own entry point. A single output
  pin, `busbusy`, tells all the devices whether the controller will take a
  request.
* **Two I/O instructions.** `RECV` moves the word an elevator is transmitting
  straight into RAM, in one instruction. With memory-mapped I/O this would take
  a load and a store. `SEND` puts a register on the `elevdata` pins, addressed
  to one elevator.
* **Scan access to PC and IR.** A tester can read the program counter and the
  instruction register through a serial chain. It can also force a new address
  and a specific instruction into them.

The chip has three parts: a datapath (PC, IR, an 8 × 16 register file, a
ripple-carry ALU and a logarithmic shifter), a control unit (sequencer,
decoder, status register and interrupt registers) and a 512K-word data RAM.
The program sits in an external instruction ROM.

```
             rom_addr ─┐        ┌──────────────── eecs_top ───────────────────┐
   ext. ROM ◄──────────┴────────┤ eecs_datapath                               │
            ── rom_data ───────►│  eecs_pc ─► eecs_ir  (scan_in → PC → IR →)  │─► scan_out
                                │  eecs_regfile (8×16, falling-edge write)    │
 elev_data_in ─────────────────►│  eecs_alu (ripple carry)  eecs_shifter      │─► elev_data_out,
                                │        ▲ ctrl_t       │ ir, flags, seq_next │   elev_addr_out,
   irq0, irq1, irq_addr ───────►│ eecs_control (FSM, decoder, PSR, EPC/EPSR,  │   send_strobe
                       busbusy ◄│   interrupt address register)               │
                                │ eecs_ram (512K × 16, registered read)       │
                                └─────────────────────────────────────────────┘
```

## Talking to the building: interrupts, busbusy, SEND and RECV

This is the least conventional part of the design, and the part a user has to
get right when attaching devices.

**Lines.** Every device shares one set of request wires:

| signal | dir | meaning |
|---|---|---|
| `irq0` | in | some elevator has a new status word (IRQ0) |
| `irq1` | in | some hall button has been pressed (IRQ1) |
| `irq_addr[7:0]` | in | address of the device currently holding the line: `{device number[6:0], 1}` for an elevator, `{button number[6:0], 0}` for a hall button |
| `busbusy` | out | high: no request will be taken |
| `elev_data_in[15:0]` | in | word the accepted elevator transmits, read by `RECV` |
| `elev_data_out[15:0]`, `elev_addr_out[7:0]`, `send_strobe` | out | result of `SEND` |

**Acceptance.** `busbusy` is the inverse of the interrupt-enable bit of the
status register. The bit is 0 after reset, set by `EI`, cleared by `DI` and
cleared when a request is accepted. A request is accepted at the end of an
instruction's execute cycle. Interrupts must have been enabled before that
instruction, and the instruction must not have disabled them. So neither `EI`
nor `RETX` is ever interrupted, and `busbusy` stays low for at least one whole
instruction between two services. Every acceptance is therefore a rising edge
of `busbusy`. A device holds its request until it sees that edge with its own
address on `irq_addr`. A device that loses keeps waiting.

**Priority and vectors.** If `irq0` is high it wins, whatever else is
pending:

* elevator: PC ← `0xFFE0`, one routine for all elevators;
* hall call: PC ← `0xFE00 + 2 × button`. Each of up to 128 buttons gets two
  words, which is enough to load the button number and jump to a shared
  handler (`MOVI r, k ; JUC rhandler`). The vectors fill `0xFE00`–`0xFEFF`.

`irq_addr` is copied into the interrupt address register on acceptance.

**Saved state.** On acceptance the control unit saves two things: the PC the
program would have continued at (the branch target if the last instruction
was a taken branch), and the status register including the flags that
instruction set. `RETX` puts both back, which turns interrupts on again. There
is one level of saved state. Interrupts stay off inside a routine unless the
routine executes `EI`, and if it does, a nested interrupt overwrites the saved
state.

**RECV.** `RECV Rbase` writes `elev_data_in` to RAM at address
`Rbase + elevator number`. The elevator number is bits 7:1 of the latched
`irq_addr`. One instruction therefore files each elevator's report in that
elevator's slot of a status table. The elevator must keep its word on
`elev_data_in` until the service routine has executed `RECV`. In the test
models it keeps the word there until the next elevator is accepted.

**SEND.** `SEND Raddr, Rdata` drives `elev_data_out ← Rdata` and
`elev_addr_out ← {Raddr[6:0], 1}`. The appended 1 marks the address as an
elevator's. `send_strobe` is high for the one cycle after the execute cycle.
The data and address pins hold their values until the next `SEND`. Because
any register can be sent, `SEND` also serves as a test port for register (and,
after a load, memory) contents.

A complete service program for the 64-floor, 16-elevator building is in
`tb/tb_eecs_building.sv`. It uses 3 words of main program, 2 words of
elevator routine, 256 words of hall vectors and an 8-word shared hall handler.

## Instruction set

Sixteen-bit instructions in four 4-bit fields: opcode `[15:12]`, `Rdst`/condition
`[11:8]`, extension `[7:4]`, `Rsrc` `[3:0]`. Where an instruction has an 8-bit
immediate or displacement, it takes bits `[7:0]` in place of the last two
fields. There are eight registers, so only the low three bits of a register
field count.

| instruction | encoding | effect |
|---|---|---|
| AND/OR/XOR/ADD/SUB/CMP/MOV Rd,Rs | `0000 d ext s`, ext = 1/2/3/5/9/B/D | Rd ← Rd op Rs (CMP: flags only; MOV: Rd ← Rs) |
| ANDI/ORI/XORI Rd,imm | `0001`/`0010`/`0011 d imm` | zero-extended immediate |
| ADDI/SUBI/CMPI Rd,imm | `0101`/`1001`/`1011 d imm` | sign-extended immediate |
| MOVI Rd,imm | `1101 d imm` | Rd ← zero-extended imm |
| LUI Rd,imm | `1111 d imm` | Rd ← imm << 8 |
| LSH Rd,Rs | `1000 d 0100 s` | shift Rd by the signed value in Rs: positive left, negative right |
| LSHI Rd,±n | `1000 d 000r n` | shift by n (0–15), r = 1 right |
| LD Rd,[Ra] | `0100 d 0000 a` | Rd ← RAM[Ra] |
| ST Rs,[Ra] | `0100 s 0100 a` | RAM[Ra] ← Rs |
| JAL Rl,Rt | `0100 l 1000 t` | Rl ← PC+1, PC ← Rt |
| Jcond Rt | `0100 cc 1100 t` | if cond, PC ← Rt |
| Bcond disp | `1100 cc disp` | if cond, PC ← PC + sign-extended disp (PC of the branch itself) |
| EI / DI / RETX | `0100 0000 0001/0011/1001 0000` | enable / disable interrupts / return |
| SEND Ra,Rd | `0100 a 0010 d` | see above |
| RECV Rb | `0100 b 0110 0000` | see above |
| NOP | `0000 0000 0000 0000` | any unused code also does nothing |

Flags: ADD, ADDI, SUB and SUBI set C (carry out, or borrow for a subtract) and
F (signed overflow). CMP and CMPI set Z (equal), L (Rd < operand, unsigned)
and N (Rd < operand, signed). Conditions, by `cc` value: 0 EQ, 1 NE, 2 CS,
3 CC, 4 HI, 5 LS, 6 GT, 7 LE, 8 FS, 9 FC, A LO, B HS, C LT, D GE, E UC
(always), F never.

`tb/eecs_asm_pkg.sv` has one function per instruction (`ADDI(1, -1)`,
`BCND(CC_NE, -2)`, …) for writing programs into a ROM array.

## Timing

Every instruction takes two clock cycles.

1. **Fetch.** `rom_addr` (the PC) is stable. The IR loads `rom_data` at the
   rising edge, so the ROM has one cycle to answer.
2. **Execute.** The decoder drives one control word (`ctrl_t`, defined in
   `eecs_pkg`). Operands are read from the register file combinationally. At
   the closing rising edge several things happen: the PC takes its next value,
   a store or `RECV` writes the RAM, a load's address is registered in the RAM,
   the status register is updated, an interrupt may be accepted, and the
   result goes into a write-back register.

The register file is written on the **falling** edge in the middle of the
following fetch cycle. Loads write the RAM's registered read data the same
way. The next instruction reads its operands in its execute cycle, after that
edge, so no forwarding is needed.

The original chip ordered its events with delayed clocks. The controller
clock was 15 ns late, so the instruction was present before control signals
were generated. The PC clock was 5 ns late, so the ALU computed branch targets
from the current PC. The two-cycle sequencing here gives the same ordering
with a single clock and no delay elements.

## Datapath units

* **ALU** (`eecs_alu`) — a 16-slice ripple-carry adder. Each slice's carry
  feeds the next, trading speed for area: in the original chip this chain was
  the critical path. Subtract and compare add the inverted operand with a
  carry-in of 1. AND, OR, XOR and pass-B complete the set. For a branch, the
  ALU also adds the displacement to the PC.
* **Shifter** (`eecs_shifter`) — a logarithmic left shifter with stages of 1,
  2, 4 and 8 positions. A right shift bit-reverses the operand, shifts it left
  and bit-reverses the result, so both directions share one set of stages.
  Right shifts are logical.
* **Register file** (`eecs_regfile`) — 8 × 16 bits. It has two combinational
  read ports and one write port on the falling edge. It is not reset.
* **PC and IR** (`eecs_pc`, `eecs_ir`) — registers on the rising edge. With
  `scan_en` high they form one 32-bit shift chain: `scan_in` → PC → IR →
  `scan_out`, most significant bit first. Shifting 32 bits reads out the old
  IR, then the old PC, and loads a new IR value (shifted in first) and a new
  PC value. While `scan_en` is high nothing executes. When it falls, the
  controller executes the instruction in the IR at the address in the PC,
  then carries on from PC+1.
* **RAM** (`eecs_ram`) — 524,288 × 16 bits, single port, registered read. The
  processor's addresses are 16 bits wide, so the upper three RAM address bits
  are tied to 0 in `eecs_top` and software reaches the first 64K words. The
  depth is the top's `RAM_WORDS` parameter.

Reset (`rst_n`, synchronous, active low) clears the PC to 0, the IR, the
status register (interrupts off, so `busbusy` is high) and the sequencer.
Programs start at address 0 and must execute `EI` before they can be
interrupted.

## Where this RTL departs from, or adds to, the original design

What follows the original: the set of units, 16-bit data, 8 registers with a
falling-edge register file, the ripple-carry ALU, the shifter with bit
reversal for right shifts, the 512K-word on-chip RAM, the instruction groups,
the interrupt lines and their vectors at `0xFFE0` and `0xFE00`, elevator
precedence, saving PC and PSR with `RETX` restoring them, `DI` raising
`busbusy`, the behaviour of `SEND` and `RECV`, and scan on PC and IR.

Choices made here, because the original does not specify them:

* the instruction encoding, the flags and the condition codes (modelled on the
  CR16-style baseline the instruction names suggest);
* two-cycle sequencing instead of skewed clocks;
* `irq_addr` as an 8-bit line with an elevator/hall bit, and hall vectors
  spaced two words apart;
* when a request may be accepted (never at the end of `EI` or `RETX`);
* the `RECV` address rule (base register plus elevator number);
* separate input and output pins for `elevdata`, plus a `send_strobe`;
* the scan chain order, the reset state, and the RAM's single port with
  registered read.

Two conflicts with the original deserve mention:

* **RAM size against address width.** The RAM is 512K words, but a 16-bit
  processor can address 64K of them. The RTL keeps the stated size and ties
  the upper address bits to 0. No banking scheme is described, so none is
  invented.
* **Interrupt priority.** Elevator precedence is stated, and so is the idea
  that "the address on the line when busbusy rises" decides. Here `irq0`
  decides, and the line only provides the device number. A device model that
  keeps a hall address on the line while `irq0` is high would be served as an
  elevator with that number.

Not in the RTL: the clock delay cells (see Timing), the pad ring, and the
instruction ROM and its program. The original did not describe its dispatching
software beyond its use of these instructions. The test programs are simple
stand-ins.

## Simulating

Everything is plain SystemVerilog-2017 and runs on Verilator 5. The
testbenches import `eecs_pkg` and `eecs_asm_pkg`. Their width warnings on
immediate arguments are harmless, hence `-Wno-fatal`.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/eecs_pkg.sv tb/eecs_asm_pkg.sv tb/tb_eecs_top.sv --top-module tb_eecs_top -o sim
./obj_dir/sim
```

Every testbench is self-checking, ends with
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| testbench | what it shows |
|---|---|
| `tb_eecs_top` | whole chip at full size, including the 512K RAM. A reference instruction-set model runs in lockstep and is compared after every instruction (PC, IR, all registers, SEND pins, RAM at the end). It covers elevator and hall interrupts, a simultaneous request where the elevator wins, a request held off by `DI`, `RETX`, branches, jumps, `JAL`, loads and stores, both shift directions, and a scan-in of a new PC and IR. It also checks two cycles per instruction and reports a count for each mechanism. |
| `tb_eecs_building` | the 64-floor, 16-elevator scenario. 64 elevator status reports and all 126 hall calls arrive at random, overlapping times. The test checks the status table, the call table and that each hall call produces exactly one correctly addressed `SEND`. |
| `tb_eecs_control` | decoding, flag rules, all 16 conditions, EI/DI/`busbusy`, vectors, priority, save and restore, scan hold |
| `tb_eecs_datapath` | driven with hand-built control words: results, PC sources, link, RAM address and data for LD/ST/RECV, SEND pins, scan chain |
| `tb_eecs_alu`, `tb_eecs_shifter`, `tb_eecs_regfile`, `tb_eecs_pc`, `tb_eecs_ir`, `tb_eecs_ram` | each unit against values computed in the testbench |

The registers and RAM are not reset. Run the simulator with random initial
values (`+verilator+rand+reset+2`) to confirm that no program depends on
them.

## Files

* `rtl/eecs_pkg.sv` — encoding constants, ALU operations, flag and PSR structs, control word
* `rtl/eecs_top.sv` — chip top
* `rtl/eecs_control.sv`, `rtl/eecs_datapath.sv` — the two halves of the processor
* `rtl/eecs_alu.sv`, `rtl/eecs_shifter.sv`, `rtl/eecs_regfile.sv`, `rtl/eecs_pc.sv`, `rtl/eecs_ir.sv`, `rtl/eecs_ram.sv` — datapath units and RAM
* `tb/eecs_asm_pkg.sv` — assembler functions; `tb/tb_*.sv` — testbenches
