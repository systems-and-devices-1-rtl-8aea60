# SimpleCPU_v1a: a three-phase accumulator computer

This is the smallest kind of computer that can still run a program: one
memory, one processor with one working register (the accumulator, ACC),
and a control unit that handles every instruction in three steps: fetch,
decode and execute. Instructions and data share the memory (a von Neumann
organisation). Multiplication is not in the instruction set, so a product
such as 10 x 3 has to be worked out in software by repeated addition. The
design is meant for teaching. It shows how a few registers, two
multiplexers, an ALU and a small sequencer combine to form a programmable
machine.

The RTL is plain synthesizable SystemVerilog (IEEE 1800-2017). Every block
has a self-checking testbench, and one end-to-end testbench runs two
complete programs on the full computer.

## The machine at a glance

| Item | Value |
|---|---|
| Address bus `ADDR(7:0)` | 8 bits, 256 words |
| Memory word / instruction | 16 bits |
| Data-in bus `DATA_IN(15:0)` | 16 bits, goes to the IR, or its low byte to the ALU |
| Data-out bus `DATA_OUT(15:0)` | 16 bits; ACC on bits [7:0], zero on [15:8] |
| Control bus | `RAM_EN`, `RAM_WR`, `ROM_EN` |
| Registers | IR 16 bits, PC 8 bits, ACC 8 bits |
| Flags | Z only (ACC = 0), computed from ACC without being stored |
| Clocks per instruction | 3 (FETCH, DECODE, EXECUTE) for every instruction |

## Instruction set

The instruction word is `oooo xxxx nnnnnnnn`: a 4-bit opcode, four unused
bits (ignored) and an 8-bit operand. The operand is a constant `KK` for the
immediate group, and an address `AA` for the absolute (memory) and direct
(jump) groups.

| Opcode | Mnemonic | Operation | Group |
|---|---|---|---|
| 0x0 | `MOVE KK`   | ACC <- KK | immediate |
| 0x1 | `ADD KK`    | ACC <- ACC + KK | immediate |
| 0x2 | `SUB KK`    | ACC <- ACC - KK | immediate |
| 0x3 | `AND KK`    | ACC <- ACC & KK | immediate |
| 0x4 | `LOAD AA`   | ACC <- M[AA] (low byte) | absolute |
| 0x5 | `STORE AA`  | M[AA] <- {0x00, ACC} | absolute |
| 0x6 | `ADDM AA`   | ACC <- ACC + M[AA] | absolute |
| 0x7 | `SUBM AA`   | ACC <- ACC - M[AA] | absolute |
| 0x8 | `JUMPU AA`  | PC <- AA | direct |
| 0x9 | `JUMPZ AA`  | if ACC = 0 then PC <- AA else PC <- PC + 1 | direct |
| 0xA | `JUMPNZ AA` | if ACC != 0 then PC <- AA else PC <- PC + 1 | direct |
| 0xB-0xF | (none) | no operation: PC <- PC + 1 | this design's choice |

Arithmetic is 8-bit and wraps modulo 256. There is no carry or overflow
flag. There is no halt instruction either: a program stops by jumping to
itself, for example `JUMPU 0x0C` stored at address 0x0C.

Examples: `0x0000` is `MOVE 0x00`; `0x40AA` is `LOAD 0xAA`; `0x0FBB` is
`MOVE 0xBB` (the unused bits are ignored); `0x80CC` is `JUMPU 0xCC`;
`0xFFFF` has no defined opcode and is executed as a no-operation.

## Datapath

```
DATA_IN[15:0] ──► IR (reg_16)
                   ├─ IR[15:12] ──► control_logic ◄── Z
                   └─ IR[7:0] ──┬─► PC load value (counter_8)
                                ├─► ADDR mux input 1 ; input 0 = PC ──► ADDR[7:0]
                                └─► DATA mux input 0 ; input 1 = DATA_IN[7:0] ──► ALU B
ACC ──► ALU A          ALU Y ──► ACC (reg_8) ──┬─► DATA_OUT = {8'h00, ACC}
                                               └─► nor_8 ──► Z
```

* **IR** (`reg_16`) holds the current instruction. It loads `DATA_IN` in
  FETCH.
* **PC** (`counter_8`) holds the address of the next instruction. It counts
  up, or loads the jump address `IR(7:0)`.
* **ADDR multiplexer** (`mux_2_8`) puts the PC (input 0) or the operand
  address `IR(7:0)` (input 1) on the address bus.
* **DATA multiplexer** (`mux_2_8`) gives the ALU's B input either the
  immediate constant `IR(7:0)` (input 0) or the memory word's low byte
  `DATA_IN(7:0)` (input 1).
* **ALU** (`alu`) computes from A = ACC and B one of: pass B, A + B, A - B
  or A & B.
* **ACC** (`reg_8`) takes the ALU result in EXECUTE.
* **ZERO** (`nor_8`) is an 8-input NOR on the ACC. Z is not a stored flag.
  A conditional jump therefore tests whatever value the previous
  instruction left in the ACC.
* **control_logic** is the only sequential part besides the three
  registers. It holds a two-bit phase register and decodes everything else
  from the phase, the opcode and Z.

Every register has an active-high clear (`CLR`) that acts at once. A clear
sets the PC, IR, ACC and the phase to zero, so the machine starts by
fetching address 0. The memory keeps its contents through a clear.

## How an instruction is executed

This part is the key to the design. Each phase lasts exactly one clock
cycle. The control lines are combinational functions of the phase, so each
line is high for the whole of its cycle. Every register and the memory act
on the rising edge that ends that cycle.

| Phase | What happens | Lines high |
|---|---|---|
| FETCH | The address bus shows the PC. The memory drives the instruction onto `DATA_IN`, and the IR loads it at the end of the cycle. | `ROM_EN`, `RAM_EN`, `IR_EN` |
| DECODE | The opcode now in the IR sets up the multiplexers and the ALU function. The PC is incremented, except for the three jumps. For a memory instruction the address bus already shows `IR(7:0)`. | `PC_EN` (not for jumps); `ADDR_SEL`, `DATA_SEL`, `RAM_EN` (memory group) |
| EXECUTE | The result is written. The ACC loads the ALU output (immediate group, LOAD, ADDM, SUBM). The memory writes the ACC (STORE). The PC loads `IR(7:0)` (JUMPU, or a conditional jump that is taken). A conditional jump that is not taken increments the PC instead. | `ACC_EN`, or `RAM_WR` with `RAM_EN`, or `PC_LD`, or `PC_EN`; `ADDR_SEL` and `DATA_SEL` stay set for the memory group |

The ALU function lines `ACC_CTL(2:0)` are driven from the opcode in DECODE
and EXECUTE: pass (0) for MOVE and LOAD, add (1) for ADD and ADDM,
subtract (2) for SUB and SUBM, and (3) for AND.

Here is one cycle-by-cycle example: `LOAD 0x0D` at address 7, with
M[0x0D] = 0.

| Cycle | Phase | ADDR | DATA_IN | Effect at the end of the cycle |
|---|---|---|---|---|
| 1 | FETCH | 0x07 (PC) | 0x400D | IR <- 0x400D |
| 2 | DECODE | 0x0D (IR) | 0x0000 | PC <- 0x08 |
| 3 | EXECUTE | 0x0D (IR) | 0x0000 | ACC <- 0x00 |

Here is `JUMPU 0x04` at address 0x0B: FETCH reads 0x8004; DECODE leaves
the PC at 0x0B; EXECUTE loads the PC with 0x04.

Assertions in `control_logic` check three rules: the PC is never
incremented and loaded in the same cycle; every write has `RAM_EN` set;
every write is addressed by `IR(7:0)`.

## Memory and the control bus

`ram_256x16` is a 256 x 16 array with these ports: `CLK`, `EN`, `WE`,
`DUMP`, `ADDR_IN`, `DATA_IN` and `DATA_OUT`.

* Reads are combinational. While `EN` is high, `DATA_OUT` shows the
  addressed word in the same cycle, and 0 while `EN` is low.
* Writes happen on the rising clock edge when `EN` and `WE` are both high.
* A high `DUMP` at a clock edge prints the non-zero words to the
  simulation log.
* The contents start at zero. The `INIT_FILE` parameter can instead name a
  hex file, one word per line.

In `simple_computer` the memory's `EN` is tied high, `DUMP` is tied low and
`WE` is driven by `RAM_WR`. The processor also drives `RAM_EN` for every
memory access and `ROM_EN` for every instruction fetch. A system with a
separate program ROM could use these two lines to enable the right device.
With a single memory they are simply brought out as ports.

The processor relies on the combinational read: the IR, the ALU and the
ACC all expect `DATA_IN` to match `ADDR` within the same cycle. Replacing
the memory with a registered-read block RAM would need an extra wait cycle
in FETCH and in the memory-operand phases.

## The example program: 10 x 3

```
addr  word    assembly       purpose
 0    0x0000  MOVE 0x00      Total = 0
 1    0x500D  STORE 0x0D
 2    0x0003  MOVE 0x03      Count = 3
 3    0x500E  STORE 0x0E
 4    0x900C  JUMPZ 0x0C     LOOP: exit when Count (in ACC) is 0
 5    0x2001  SUB 0x01       Count = Count - 1
 6    0x500E  STORE 0x0E
 7    0x400D  LOAD 0x0D      Total = Total + 10
 8    0x100A  ADD 0x0A
 9    0x500D  STORE 0x0D
10    0x400E  LOAD 0x0E      ACC = Count, for the test at 4
11    0x8004  JUMPU 0x04
12    0x800C  JUMPU 0x0C     stop
13            Total
14            Count
```

The program runs 29 instructions before it first reaches the stop at
address 12. At three clocks each, that is 87 cycles, or 8.7 us at 10 MHz.
It ends with Total = 30 and Count = 0.

## Files

| File | Contents |
|---|---|
| `rtl/simple_cpu_pkg.sv` | opcode, ALU-function and phase enums; bus widths |
| `rtl/reg_16.sv`, `rtl/reg_8.sv` | IR and ACC registers |
| `rtl/counter_8.sv` | program counter |
| `rtl/mux_2_8.sv` | 8-bit 2:1 multiplexer (ADDR and DATA multiplexers) |
| `rtl/alu.sv` | ALU |
| `rtl/nor_8.sv` | zero flag |
| `rtl/control_logic.sv` | three-phase sequencer and decoder |
| `rtl/simple_cpu_v1a.sv` | the processor |
| `rtl/ram_256x16.sv` | the memory |
| `rtl/simple_computer.sv` | top level: processor plus memory |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_simple_computer_hex.sv`, `tb/mul10x3.hex` | the 10 x 3 program loaded from a hex image through `INIT_FILE` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also contains a watchdog that records a failure if the run hangs. To run
the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/simple_cpu_pkg.sv rtl/*.sv tb/tb_simple_computer.sv \
    --top-module tb_simple_computer -Mdir obj_top
./obj_top/Vtb_simple_computer
```

For any other block, substitute its testbench and top module name.

What the testbenches check:

* **`tb_simple_computer`** first runs an empty memory (all `MOVE 0x00`)
  and checks that the PC walks through all 256 addresses and wraps to 0.
  It then runs the 10 x 3 program on the full computer at its default
  parameters. It checks:
  * the result, and all eight stores in order (0, 3, 2, 10, 1, 20, 0, 30);
  * the 87-cycle run time to the stop.

  It then runs a second program that computes the same product with ADDM,
  SUBM, JUMPNZ and AND. The testbench counts every mechanism: each phase,
  PC increment and load, a conditional jump not taken, each multiplexer
  setting, memory writes, Z set and clear, and each of the 11 opcodes. Any
  mechanism that never occurs counts as a failure.
* **`tb_simple_cpu_v1a`** runs 50 random 256-word programs (all 16 opcode
  values, 100 instructions each) and compares the processor cycle by cycle
  with an instruction-level model. It compares the PC on the address bus
  at fetch, the ACC, the operand address in DECODE, each store, the
  three-cycle timing and the final memory.
* The unit testbenches are exhaustive (ALU, zero flag) or compare random
  stimulus against a reference (registers, counter, multiplexer, memory,
  sequencer).

## Design choices and departures

The following are this design's own decisions. The source describes the
machine at block level and does not fix them.

* **One clock per phase.** The phase register is a two-bit counter, and
  every instruction takes exactly three cycles.
* **Timing of the jumps.** A jump does not increment the PC in DECODE. A
  conditional jump that is not taken increments it in EXECUTE.
* **Address timing for memory instructions.** `ADDR_SEL` (operand address
  on the bus) is raised from DECODE on, not only in EXECUTE, so the
  operand is already being read in DECODE.
* **Encodings.** The ALU function codes and the phase encoding are this
  design's own.
* **Undefined opcodes.** Opcodes 0xB-0xF are executed as no-operations.
* **`ROM_EN` and `RAM_EN`.** `ROM_EN` marks instruction fetches and
  `RAM_EN` marks any memory access. The source only says that the control
  bus enables the memory devices.
* **Asynchronous clear** for all registers.
* **The accumulator is 8 bits**, as are the ALU and the PC. The data-out
  bus is 16 bits wide, so its upper byte is driven with zero, and a STORE
  writes `{0x00, ACC}`.
* **Memory read and `DUMP`.** The memory read is combinational, and `DUMP`
  prints the memory contents.
* **No `STOP` opcode.** Programs stop with a jump to themselves.

In a walkthrough of the LOAD instruction, the source describes the execute
step as performing a subtraction. The instruction set table defines LOAD
as ACC <- M[AA], and that definition is implemented here: the ALU passes
the memory byte through.
