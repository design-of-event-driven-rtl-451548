# Event-driven 8-bit RISC processor

This is a small 8-bit processor for control tasks. It has one external event input, which
interrupts the running program. Every instruction is one byte wide and all instructions
have the same format. Opcodes and operands reach the control unit over one shared 8-bit
data bus. Two memories drive that bus:

- a 1024-word read-only program memory, 10-bit address;
- a 32-register data memory, which is also the register file.

Every instruction runs through the same four clock cycles. In order, these are: an opcode
read from program memory, one or two operand reads, and a write-back. There is no
pipeline, so an instruction finishes before the next one is fetched and the processor
never stalls.

The RTL is plain synthesizable SystemVerilog with one clock domain. It has a package for
the opcode map and no vendor primitives.

## Machine summary

| Property | Value |
|---|---|
| Data width | 8 bits |
| Program memory | 1024 x 8, read-only, loaded from a hex file at elaboration |
| Program address | 10 bits; the PC starts at `0x01F` after reset |
| Registers | R0 to R31 (the data memory), cleared by reset; R0 is the accumulator |
| Instruction | 8 bits, 256 encodings, all defined |
| Timing | 4 clock cycles per instruction, for every instruction |
| Flags | C, Z (from the ALU), EQ, GT, LT (from CMP), IE, IP |
| Interrupt | one input `irq`, rising edge, vector `0x3C0`, no nesting |
| Return stack | 2 entries, shared by CALL and the interrupt |

## The four-phase instruction cycle and the shared bus

This is the most important part to understand. The design has a single data bus `dbus`.
The program memory and the register bank each output zero unless their read strobe is
high, so the bus is just the OR of the two outputs. The control unit never raises both
strobes in the same cycle, and an assertion in `cu` checks this. The program memory's
address is the PC during fetch. In the other phases it is the control unit's `pmadd`.

| Phase | Strobe | What happens |
|---|---|---|
| 0 FETCH | `pmr` | program memory[PC] goes onto the bus; the opcode is latched |
| 1 RDB | `dmr` or `pmr` | the second operand is latched into B. This is Rn, or R0 for `MOV Rn,R0`, or program word *a* for LDA, or R2 (the low byte of the jump target) |
| 2 RDA | `dmr` | R0 is latched into A for ALU and CMP, or R3 (the high bits of the jump target) |
| 3 WR | `dmw`, `pcen` | the result is written to R0 or Rn, flags load, and the PC steps, jumps, calls, returns or takes the interrupt |

Phases an instruction does not need stay idle, so every instruction takes exactly four
cycles. Operand values are therefore always ready one full cycle before they are used.
The A and B latches feed both the ALU (`aluina`, `aluinb`) and the comparator
(`aluinac`, `aluinbc`). The ALU is enabled only in phase 3 of an ALU instruction
(`alusel[3]`), so its output is zero the rest of the time.

At a clock of *f*, the machine runs *f*/4 instructions per second.

## Instruction set

`n` is a register number, `a` a program-memory word address, `s` an ALU code and `c` a
condition.

| Encoding | Mnemonic | Effect |
|---|---|---|
| `00 0 nnnnn` | `MOV R0,Rn` | R0 ← Rn |
| `00 1 nnnnn` | `MOV Rn,R0` | Rn ← R0 |
| `01 sss nnn` | ALU | R0 ← R0 *op* Rn (n = 0..7); loads C and Z |
| `10 000 ccc` | `JMP c` | if c: PC ← {R3[1:0], R2} |
| `10 001 ccc` | `CALL c` | if c: push PC+1, PC ← {R3[1:0], R2} |
| `10 010 xxx` | `RET` | pop PC |
| `10 011 xxx` | `RETI` | pop PC, enable interrupts |
| `10 100 xxx` | `EI` | enable interrupts |
| `10 101 xxx` | `DI` | disable interrupts |
| `10 11x xxx` | `NOP` | nothing |
| `11 0 aaaaa` | `LDA a` | R0 ← program word a (a = 0..31) |
| `11 1 nnnnn` | `CMP R0,Rn` | EQ, GT, LT ← unsigned compare of R0 with Rn |

These are the ALU codes. x is R0 and y is Rn. The unary operations work on y.

| `sss` | Operation | C |
|---|---|---|
| 000 | ADD: x + y | carry |
| 001 | ADD by 1: y + 1 | carry |
| 010 | SUB: x − y | borrow |
| 011 | SUB by 1: y − 1 | borrow |
| 100 | AND | 0 |
| 101 | OR | 0 |
| 110 | NOT: ~y | 0 |
| 111 | XOR | 0 |

Z is set when the result is zero. The ALU also has a carry input, which ADD adds and SUB
subtracts. The top ties it to 0, because the instruction set has no add-with-carry.

The conditions `ccc` are: 000 always, 001 Z, 010 NZ, 011 C, 100 NC, 101 EQ, 110 GT,
111 LT.

**Programming notes:**

- Constants come from the program memory. `LDA a` reads words 0 to 31. Code starts at
  `0x01F`, so words 1 to 30 are free for a constant table.
- A jump first loads its target into R2 and R3. The usual sequence is `LDA lo; MOV R2,R0;
  LDA hi; MOV R3,R0; JMP c`. LDA and MOV do not change flags, so a condition computed
  before this sequence is still valid at the jump.
- `CALL` pushes the address of the next instruction. Flags are not saved on calls or
  interrupts.

## The event input (interrupt)

A rising edge on `irq` sets a pending latch in `interrupt`. `irq` must be synchronous to
`clk`. The interrupt is taken at the end of an instruction when all of these hold:

- the latch is set;
- interrupts are enabled (IE);
- that instruction is not a taken CALL and not a RET or RETI.

The `pc` block then pushes the address the program would have gone to next, which
includes the target of a jump made in that same instruction. It then loads `0x3C0`.
Taking the interrupt clears both IE and the latch, so a second event waits. `RETI`
returns and sets IE again.

IE is off after reset. A request that arrives while IE is off stays pending and is taken
at the end of the instruction after the one that sets IE. `int_ack` is high for the one
clock cycle in which the interrupt is taken.

The return stack has two entries, so an interrupt routine can make one call, or an
interrupt can arrive inside one call. A third push overwrites the top entry. A pop from
an empty stack returns entry 0.

## Blocks

| File | Block |
|---|---|
| `rtl/cpu_pkg.sv` | opcode map, ALU codes, conditions, flag bit positions, phase enum |
| `rtl/processor.sv` | top level: wiring, bus OR, program-address multiplexer |
| `rtl/cu.sv` | control unit: phase counter, opcode and A/B latches, decode of all strobes |
| `rtl/pc.sv` | program counter with return stack and interrupt vector |
| `rtl/promem.sv` | program memory, 1024 x 8, gated combinational read |
| `rtl/regbank.sv` | data memory / registers, 32 x 8, synchronous write, gated combinational read |
| `rtl/alu.sv` | the eight operations above, with a carry input and an enable |
| `rtl/comparator.sv` | unsigned eq/gt/lt |
| `rtl/flagreg.sv` | C, Z, EQ, GT, LT registers, plus IE and IP passed through |
| `rtl/interrupt.sv` | edge latch, enable, take decision |
| `rtl/demo_program.hex` | default program memory image (see below) |

The top's ports are:

- `clk`;
- `rst`: synchronous, active high;
- `irq`;
- `dbus[7:0]`: the data bus, useful for observing the machine;
- `int_ack`.

`flagreg` bits 5 to 7 have no storage of their own. IE and IP are the interrupt block's
registers, and bit 7 is always 0.

## Relation to the original design

The block set, port names, memory sizes and PC reset value come from a published design
of an 8-bit RISC processor with a single interrupt. So do the ALU codes, whose results
match a printed ALU waveform for x = `AA`, y = `55`, and the order of the memory strobes.
Two encodings also come from it: `MOV R0,R2` = `00000010` and `LDA 01H` = `11000001`.
Everything else is this implementation's own, because the original does not specify it:

- **Timing:** the original calls every instruction "one clock cycle", but its waveforms
  show the program read, data read and data write one after another inside that cycle.
  Here these become four separate clock cycles.
- **Opcode map:** all of it except the two encodings above, including jump targets taken
  from R2/R3 and LDA reading program memory.
- **Rest of the machine:** the flag set and its bit order, the interrupt rules, the vector
  `0x3C0` and the two-entry return stack.
- **Extra control-unit ports:** `fetch`, `pcen`, `alu_we`, `cmp_we`, `ei`, `di`. The PC
  also gets an `en` input.
- **Clock edges:** the register bank writes on the falling clock edge, as the original
  specifies, which is the middle of the write phase. Everything else uses the rising edge.
  The original also describes its program memory as clocked on the falling edge, but its
  block symbol has no clock pin. Here that memory is read combinationally.
- **Address width:** the original gives both 9 and 10 bits. 10 bits is used, matching its
  port widths.
- **Program loading:** the program memory has no write port; its contents come from a file.
- **Size:** the original reports 17 slice registers and a clock rate from an FPGA tool.
  This RTL has 34 flip-flop bits outside the memories, plus 256 register bits and 20
  stack bits, and its clock rate has not been measured.

The comparator and the flag register are only named in the original. Their behaviour
here is a plausible reading, not a reproduction.

## Simulating

Run from the directory that holds `rtl/` and `tb/`: hex files are opened by paths
relative to it. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/cpu_pkg.sv tb/isa_model_pkg.sv tb/tb_processor.sv --top-module tb_processor -o sim
./obj_dir/sim
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself, with a
watchdog.

| Testbench | What it shows |
|---|---|
| `tb_processor` | Runs the demonstration program on the full-size processor for 309 instructions. An instruction-level model of the opcode map, `tb/isa_model_pkg.sv`, runs alongside it. After every instruction the test compares the PC, all 32 registers, the flags and the interrupt state. It also checks that every instruction takes four cycles and that `dbus` carries each opcode. It pulses `irq` three times: while disabled, while enabled, and after DI. It counts every mechanism (each ALU code, each compare outcome, jumps taken and not taken, call/ret/reti, EI/DI, interrupts taken and held, a two-deep stack) and fails if one never happened. |
| `tb_processor_random` | Ten runs of 1500 instructions from random program memory contents, with random `irq` pulses. It compares against the same model after every instruction, and reaches random jump targets, stack overflow and underflow, and interrupts at every position. |
| `tb_doc_instr` | Runs `MOV R0,R2` and `LDA 01H` with the operand values of the original waveforms (`11111010`, `10101010`) and checks each phase's strobes, addresses and bus value. |
| `tb_cu` | The same two instructions at the control-unit level, then 3000 random opcodes checked phase by phase against an independent decoder. |
| `tb_alu` | The printed ALU waveform values, then 4000 random operations. |
| `tb_pc` | Reset value, hold, and 4000 random steps against a reference counter and stack; overflow. |
| `tb_regbank`, `tb_promem`, `tb_comparator`, `tb_flagreg`, `tb_interrupt` | Each block against a reference model; the comparator exhaustively. |

`tb_promem` reads `tb/promem_test.hex`, which holds (a·37 + 11) mod 256 at addresses 0
to 63 and 960 to 1023.

## The demonstration program

`rtl/demo_program.hex` is the default image, in `$readmemh` format: one hex byte per
line, with `@address` lines. Words 1 to 22 are the constant table. The main program
starts at `0x01F` and does the following:

1. Stores all eight ALU results for `AA` and `55` in R8 to R15.
2. Tests the carry with taken and untaken conditional jumps.
3. Counts a loop down with SUB by 1 and JNZ.
4. Compares for EQ, GT and LT.
5. Calls a subroutine.
6. Enables interrupts and waits in a loop.
7. Disables interrupts and waits again.
8. Writes `5A` to R31 and stops in a jump-to-self.

The interrupt routine at `0x3C0` does the following:

1. Saves R0, R2 and R3.
2. Counts its runs in R19.
3. Calls the same subroutine, which exercises the second stack entry.
4. Restores the registers and returns with RETI.

To run your own program, pass another file with the top's `PM_INIT` parameter.
