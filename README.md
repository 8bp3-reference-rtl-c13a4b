# 8BP3: an 8-bit CPU whose registers live in I/O space

The 8BP3 is a small 8-bit processor with a 16-bit memory address bus. Its
unusual feature is that it has no register file of its own: every register
operand an instruction names is an address in a 256-location I/O space. The
first seven I/O addresses are the CPU's internal registers (flags, stack
pointer, interrupt-service address, program counter); everything above is
ordinary register storage or, in a larger system, device ports. An `ADD`
therefore reads its operands over the I/O bus and writes its result back over
the I/O bus, and moving a byte between memory and a "register" is a single
bus transfer.

This repository holds synthesizable SystemVerilog for the CPU (following the
*8BP3 Reference* instruction set), a small system around it (64 KiB memory
and a 256-byte I/O register file), and self-checking testbenches.

## Programmer's model

### I/O space and internal registers

| I/O address | register                   | access     |
|-------------|----------------------------|------------|
| 0           | flags `S Z C H V P D E` (bit 7..0) | read/write |
| 1, 2        | stack pointer, low / high  | read/write |
| 3, 4        | ISR (interrupt routine) address, low / high | read/write |
| 5, 6        | program counter, low / high | read only |
| 7..255      | general registers          | read/write |

When the CPU reads addresses 0..6 it takes the value internally and keeps the
external `IN` strobe low, so an external register at the same address does
not drive the bus. When it writes them it still pulses `OUT`, so external
logic may keep a copy (the I/O register file in `bp3_top` does).

Flags: **S** sign, **Z** zero, **C** carry (borrow after a subtraction),
**H** half carry across bit 3/4, **V** two's-complement overflow, **P**
parity (1 = even number of ones), **D** divide by zero, **E** interrupt
enable.

Register pairs and 16-bit values are little endian: register `r` holds the
low byte and `r+1` the high byte. A pointer operand `(rr)` addresses memory
at `{r+1, r}`.

### Instructions

Opcodes, with the operand forms each one accepts (`#` an immediate byte,
`##` an immediate word, `r` a register, `rr` a register pair):

| opcodes | instruction | operation |
|---------|-------------|-----------|
| 00 | LDI rd,#       | encoded `00,rd,#` |
| 01 | MOV rs,rd      | `01,rs,rd` |
| 02 | ST rs,(rr)     | encoded `02,rr,rs` (pointer first) |
| 03 | LD (rr),rd     | `03,rr,rd` |
| 04-06, 07-09, 0A-0C, 0D-0F, 10-12, 13-15 | ADD, SUB, AND, OR, XOR, XNOR | `A op B -> C`, forms `#,r,r` / `r,#,r` / `r,r,r` |
| 16-18, 19-1B | MULT, DIV | result to `C` and `C+1`: product low/high, quotient/remainder |
| 1C-1E, 1F-21, 22-24, 25-27 | ROL, ROR, ASL, ASR | `A` shifted `B` times, to `C` |
| 28/29, 2A/2B, 2C/2D, 2E/2F | INC, DEC, NOT, NEG | `f(A) -> B`, forms `#,r` / `r,r` |
| 30-32, 33-35 | ADDC, SUBC | `A + B + C`, `A - B - C` |
| 36/37, 38/39 | SETF, CLRF | flags OR A, flags AND NOT A |
| 3A/3B, 3C/3D | BCD, BIN | binary to packed BCD and back |
| 3E, 3F | LDIW rr,##; MOVW rr,rr | 16-bit load / move |
| 40, 41 | STW, LDW | 16-bit store / load through a pointer pair |
| 42, 43, 44 | STD r,##; STDW rr,##; LDD ##,rd | direct-address store / load (`44,#l,#h,rd`) |
| 80-82 | CMP | `A - B`, flags only (forms `#,r` / `r,#` / `r,r`) |
| 83, 84 | JMP ##, JMP rr | |
| 85-88 | Jcc | `cc` from `#` or `r`, target `##` or `rr` |
| 89, 8A | JSR ##, JSR rr | push return address, jump |
| 8B-8E | SRcc | conditional JSR |
| 8F, 90, 91 | RET, INT, RETI | |
| 92 | TEST r | S and Z from the register |
| 93 | INTcc # | INT if the condition holds |
| C0-C4 | POPB r / (r), POPW rr / (rr), POPF | |
| C5-CB | PSHB # / r / (r), PSHW ## / rr / (rr), PSHF | |

Operands are encoded in the order they are listed, and in a three-operand
form the first operand is `A`, the second `B`, the third the destination.
Every other opcode is a two-clock no-op.

Condition codes (5 bits; each odd code is the negation of the even code
below it): 00 never, 02 E, 04 D, 06 even parity, 08 V, 0A C and H, 0C C or H,
0E H, 10 C, 12 Z (equal), 14 S (negative); 16..1F alternate never/always.

## How an instruction executes

The core (`bp3_cpu`) is not pipelined. It spends one clock fetching the
opcode and then executes a short list of one-clock **micro-operations**
read from a control store (`bp3_microcode`). The cost rule that decides the
list is:

* each operand byte taken from the instruction stream: 1 clock;
* each read of a register (an I/O location): 1 clock;
* writing a result to a register: 1 clock;
* a byte moving between memory and a register: 1 clock, because both sit on
  the same data bus and the CPU simply routes memory data to the I/O write
  port, or I/O read data to the memory write port.

This rule reproduces the cycle counts the 8BP3 Reference gives:

| instruction | micro-operations after the fetch | clocks |
|-------------|----------------------------------|--------|
| `LDI #,rd`        | fetch rd; fetch # and write it to rd | 3 |
| `JMP ##`          | fetch low byte; fetch high byte and load PC | 3 |
| `MOV rs,rd`       | fetch rs; read rs; fetch rd; write rd | 5 |
| `CMPI rs,#`       | fetch rs; read rs; fetch #; set flags | 5 |
| `LDD ##,rd`       | fetch #l; fetch #h; fetch rd; memory -> rd | 5 |
| `STD rs,##`       | fetch rs; fetch #l; fetch #h; rs -> memory | 5 |
| `ADCI #,rs,rd`, `ANDI #,rs,rd` | fetch #; fetch rs; read rs; fetch rd; write rd | 6 |

The datapath registers are the operand latches `A` and `B` (which also form
the 16-bit pointer `{B, A}` for indirect and direct addressing and jump
targets), the I/O address latch `T` (register `r`; `T+1` addresses `r+1`),
the condition latch `C` (set to "always" at every fetch, overwritten when an
instruction fetches a condition code), a byte buffer `X` used only for
memory-to-memory stack moves such as `PSHB (r)`, the instruction register and
the PC. Each micro-operation uses the memory bus at most once and the I/O bus
at most once.

A few micro-operations are not fixed-length:

* **Shift loop.** `ROL/ROR/ASL/ASR` load the count into `B` and repeat a
  one-bit shift of `A`, one clock per bit, until `B` is zero. A shift by *n*
  takes 7 + *n* clocks in the `r,#,r` form.
* **Conditional end.** `SRcc` and `INTcc` test the condition in a separate
  clock and finish there when it fails. `INT` finishes after one clock when
  interrupts are disabled (E = 0); otherwise it clears E, pushes the return
  address and jumps to the address in registers 3/4. `RETI` pops the PC and
  sets E.
* **Conditional jumps** decide in their last clock; a not-taken `Jcc ##`
  just steps the PC over the high address byte.

### Stack

The stack pointer is internal registers 1/2 and resets to FFFF. The stack
grows downwards: a push writes at `SP` and then decrements it, a pop
increments `SP` and then reads. Words (including return addresses) are
pushed high byte first, so they lie little endian in memory. `PSHW (rr)` and
`POPW (rr)` move the two bytes at the pointer and the pointer + 1.

### ALU

`bp3_alu` implements the 24 select codes 00..17 of the 8BP3 ALU: A, B, A-B,
-A, A+B, AND, OR, XOR, XNOR, product low and high byte, A%B, A/B, rotate left
and right, shift left (which, as specified, copies bit 0 into the vacated
bit), arithmetic shift right, A+1, A-1, ~A, BCD(A), BIN(A), A+B+carry and
A-B-carry. Every arithmetic or logic instruction writes S, Z and P; the add
and subtract forms (including INC, DEC, NEG, CMP, ADDC, SUBC) also write C, H
and V; DIV writes D. Moves, loads and stores do not touch the flags.
Division by zero sets D and yields quotient FF and remainder A.

## Where this implementation makes its own choices

The 8BP3 Reference describes the instruction set and the programmer's model
but not the datapath, the control signals or the memory system. The
following are choices made here, and the places to look if a program written
for another 8BP3 behaves differently:

* **Microarchitecture and cycle counts** of every instruction not listed in
  the table above (they follow the cost rule).
* **Stack and interrupts.** The reference lists the stack and interrupt
  instructions but also calls the stack pointer and interrupts
  unimplemented. The instructions are built here; there is no hardware
  interrupt input, only `INT`, `INTcc` and `RETI`. Stack direction and byte
  order are this design's.
* **Encodings.** `ST` is encoded pointer first (`02,rr,rs`) as the reference's
  encoding line shows, although its operand table lists the source first.
  `INC` is a two-operand instruction (`29,rs,rd`) as in the opcode table,
  although one description shows `29,r`. Encodings the reference does not
  print follow the operand order of the opcode table.
* **Three-operand shifts** shift by the second operand (the reference gives
  a one-bit formula with three operands).
* **DIV** writes the quotient to `C` and the remainder to `C+1`. **NEG** is
  two's-complement negation (ALU code 03). **BCD** gives the two digits of
  A mod 100; **BIN** converts two packed BCD digits.
* **Flag details** not spelled out: which flags each instruction writes (see
  ALU), the parity sense (1 = even), C as borrow after subtraction.
* **Writing the flags register as a destination** (I/O address 0) stores the
  written value; it wins over the instruction's own flag update.
* **Reset**: PC 0000, flags 00 (interrupts off), SP FFFF, ISR address 0000.
  The I/O register file and memory are not reset.
* **Unused opcodes** are two-clock no-ops.

## System and interfaces

`bp3_top` connects `bp3_cpu`, `bp3_memory` (2^`MEM_AW` bytes, default 64 KiB)
and `bp3_ioregs` (256 bytes). Memory and I/O reads are combinational: the CPU
drives an address and uses the data in the same clock; writes take effect at
the rising edge. `rst_n` is an active-low asynchronous reset. While it is
low, load a program through `ld_we/ld_addr/ld_data`; releasing it starts
execution at 0000. The top brings out the I/O bus (`io_addr`, `io_wdata`,
`io_in`, `io_out`), the memory write bus, the PC, the flags and `fetch`,
which is high in every opcode-fetch clock (the distance between two `fetch`
clocks is the instruction's length in clocks).

## Files

| file | contents |
|------|----------|
| `rtl/bp3_pkg.sv`        | flag struct, ALU select codes, micro-operation enum |
| `rtl/bp3_alu.sv`        | ALU |
| `rtl/bp3_cond.sv`       | condition-code evaluation |
| `rtl/bp3_sysregs.sv`    | internal registers 0..6 |
| `rtl/bp3_microcode.sv`  | control store: opcode -> micro-operations |
| `rtl/bp3_cpu.sv`        | sequencer and datapath |
| `rtl/bp3_ioregs.sv`     | 256-byte I/O register file |
| `rtl/bp3_memory.sv`     | 64 KiB memory with load port |
| `rtl/bp3_top.sv`        | system top |
| `tb/tb_bp3_*.sv`        | one self-checking testbench per module |
| `tb/tb_bp3_prog_pkg.sv` | test program, assembled in SystemVerilog, with its expected results |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bp3_pkg.sv tb/tb_bp3_prog_pkg.sv tb/tb_bp3_top.sv --top-module tb_bp3_top
./obj_dir/Vtb_bp3_top
```

Replace `tb_bp3_top` by any other testbench name to run it.

What the testbenches establish:

* `tb_bp3_alu`: all 24 select codes on corner and random operands against a
  reference written with integer arithmetic, including every flag.
* `tb_bp3_cond`: all 32 condition codes against all 256 flag values.
* `tb_bp3_microcode`: the micro-operation lists of representative
  instructions, the quoted cycle counts, and the ALU code of every
  arithmetic opcode.
* `tb_bp3_sysregs`, `tb_bp3_ioregs`, `tb_bp3_memory`: register and memory
  behaviour against models.
* `tb_bp3_cpu`: runs the test program on the bare core. The program executes
  every assigned opcode at least once (the testbench lists any it missed);
  the testbench checks about a hundred register and memory results worked
  out by hand, that `IN` is never raised for addresses 0..6, and the cycle
  counts of LDI, JMP, MOV, CMPI, LDD, STD, ADCI and ANDI and of the shift
  loop.
* `tb_bp3_top`: the same program on the full-size system (64 KiB memory),
  loaded through the load port, with results taken from the bus ports only.
  It also counts each mechanism and fails if one never happens: taken and
  not-taken branches, shift loops, calls and returns, pushes and pops, a
  masked and a taken software interrupt, RETI, divide by zero,
  internal-register reads and writes, memory-to-memory stack moves, a
  register-indirect jump, a result written to the flags register, skipped
  conditional calls/interrupts and flag pushes/pops. The run takes about
  900 clocks.

The expected values in the test program come from the same reading of the
instruction set as the RTL (operand order, shift counts, flag rules listed
above); where that reading is wrong, both are wrong together.
