# A 4-bit accumulator softcore with BCD arithmetic

This is a small teaching processor: a 4-bit accumulator machine with a
Harvard memory layout. It is meant to be small enough for a student to read
in an afternoon, yet it can still do useful work. Multi-nibble binary
arithmetic uses a carry chain, and decimal (BCD) arithmetic uses a digit-carry
flag and a decimal-adjust instruction. Input and output go through their own
register banks, so none of the data memory is lost to I/O.

At a glance:

| item | size |
|---|---|
| data word, accumulator | 4 bits |
| instruction word | 8 bits, with a 2-, 4-, 6- or 8-bit opcode |
| program memory (ROM) | 256 x 8 |
| data memory (RAM) | 16 x 4, all general purpose (R0..R15) |
| program counter | 8 bits |
| flags | Z (zero), C (carry/borrow), DC (digit carry) |
| I/O | 4 input registers, 4 output registers (up to 16 with `N_OUT_PORTS`) |
| timing | 3 clocks per instruction (Fetch, Decode, Execute); no pipeline and no interrupts |

## Datapath

```
            +--------+   +----+        +--------------+
  PC(8) --->|ROM 256x8|-->| IR |--+---->| control unit |--> control word
    ^       +--------+   +----+  |     |  (FSM+decode)|
    |                            |     +--------------+
  pc_unit <-- IR[5:0] offsets ---+ IR[3:0] address / constant, IR[1:0] port
                                 |
   RAM[IR[3:0]] --+               v
   IR[3:0] -------+--> operand selector --+--> ALU (B) --+
   input reg -----+          (sel4)       |   ACC -> (A) |
   ACC -----------+                       |              v
                                          +------> ACC-source selector --> ACC, Z
                                                      (sel4)        ALU --> C, DC
   ACC --> RAM[IR[3:0]] (STORE)      ACC --> output reg[IR[1:0]] (OUT)
```

The two 4-bit, 4-input selectors are:

* **operand selector** (`u_sel_opnd`). It picks the RAM word at `IR[3:0]`,
  the constant `IR[3:0]`, the input register chosen by `IR[1:0]`, or the
  accumulator.
* **accumulator-source selector** (`u_sel_acc`). It picks the ALU result,
  the operand (for LOAD, LOADK and IN), the old accumulator, or zero.

## Instruction set and encoding

The first bit of an instruction tells which group it belongs to. If it is 0,
the instruction writes the accumulator. If it is 1, it does not.

| encoding | mnemonic | operation |
|---|---|---|
| `0000 aaaa` | ADDDC a | ACC = ACC + R[a] + (C or DC) |
| `0001 aaaa` | SUBDC a | ACC = ACC - R[a] - (C or DC) |
| `0010 aaaa` | AND a | ACC = ACC & R[a] |
| `0011 aaaa` | OR a | ACC = ACC \| R[a] |
| `0100 aaaa` | XOR a | ACC = ACC ^ R[a] |
| `0101 0000` | NOT | ACC = ~ACC |
| `0101 0001` | DA | if DC: ACC = ACC + 6 |
| `0101 0010` | ROL | {C, ACC} rotated left by one |
| `0101 0011` | ROR | {ACC, C} rotated right by one |
| `0101 0100` | SETC | C = 1 |
| `0101 0101` | CLRC | C = 0, DC = 0 |
| `0101 0110` | CLRDC | DC = 0 |
| `0101 0111` | (unused) | no operation |
| `0101 11pp` | IN p | ACC = input register p |
| `0110 aaaa` | LOAD a | ACC = R[a] |
| `0111 kkkk` | LOADK k | ACC = k |
| `10ss ssss` | JUMP s | PC = PC + s, where s is signed from -32 to +31 |
| `1100 uuuu` | JFIDC u | if C or DC: PC = PC + u, else PC + 1 |
| `1101 uuuu` | JFIZ u | if Z: PC = PC + u, else PC + 1 |
| `1110 aaaa` | STORE a | R[a] = ACC |
| `1111 xxpp` | OUT p | output register p = ACC (`1111 pppp` with 16 output registers) |

Jump offsets count from the address of the jump instruction itself. So
`JFIZ 2` skips exactly one instruction, and `JUMP 0` loops on itself. The
codes `010110xx` are not assigned; like `01010111`, they run as no-operations.

### Flags: what sets them

* **Z** is written on every instruction that writes the accumulator. It is 1
  when the new value is 0.
* **C** and **DC** are written by ADDDC and SUBDC. ROL and ROR write only C.
  SETC, CLRC and CLRDC change them directly. No other instruction touches
  them.
  * After ADDDC, C is the carry out of bit 3.
  * After SUBDC, C is the borrow: 1 when the true difference is negative.
  * After either one, DC = C or (4-bit result > 9). For an addition this
    means "the sum of the two digits plus the carry-in is 10 or more". That
    is exactly when a BCD digit needs correcting.

### Why the carry input is "C or DC"

There is only one add and one subtract instruction, and both take a carry in.
That carry in is C OR DC. The assembler provides macros for the common cases:

| macro | expands to | meaning |
|---|---|---|
| ADD a | CLRC; ADDDC a | add with no carry in |
| ADDC a | CLRDC; ADDDC a | add with the binary carry (C) as carry in |
| SUB a | CLRC; SUBDC a | subtract with no borrow in |
| SUBC a | CLRDC; SUBDC a | subtract with the borrow (C) as borrow in |
| SHL | CLRC; ROL | shift left by one, bit 3 goes to C |
| SHR | CLRC; ROR | shift right by one, bit 0 goes to C |
| NOP | NOT; NOT | do nothing for two instructions |

In **binary** arithmetic, DC must be cleared before each higher nibble, which
is what ADDC does. If it is not cleared, a low-nibble sum of 10 to 15 leaves
DC set, and the next ADDDC adds a carry that should not be there.

In **BCD** arithmetic, DC is the decimal carry. DA leaves C and DC as they
are, so the next ADDDC picks up the decimal carry:

```
LOAD R0 ; ADD R2 ; DA ; STORE R4     units digit
LOAD R1 ; ADDDC R3 ; DA ; STORE R5   tens digit, decimal carry in
JFIDC ...                            hundreds digit = C or DC
```

For example, 9 + 9 gives 0x2 with C = 1 and DC = 1. DA turns that into 8,
and the carry goes into the next digit. DA only corrects additions. For a BCD
subtraction, a program has to add 10 itself to any digit that borrowed.

## Control: three clocks per instruction

`control_unit` runs a three-state machine: `S_FETCH`, then `S_DECODE`, then
`S_EXECUTE`, and back to `S_FETCH`.

1. **Fetch.** At the end of this clock, IR takes `ROM[PC]`.
2. **Decode.** Nothing is written. The decoder, the operand selector and the
   ALU settle.
3. **Execute.** On the closing edge, everything is written at once: ACC,
   flags, RAM (STORE) or an output register (OUT). The PC also takes its next
   value on this edge.

Because the PC is updated in Execute, it holds the address of the current
instruction for all three clocks. This is why jump offsets count from the
jump itself, and why no separate "increment PC" state is needed. The decoder
is purely combinational, from IR and the flags to a packed control word
(`ctrl_t` in `cpu4_pkg`).

The input registers copy the input pins on every clock. A value placed on
the pins becomes visible to IN one clock later. The output registers change
only on the Execute edge of an OUT.

Reset is synchronous and active high. It clears PC, IR, ACC, the flags and
both I/O banks, and puts the state machine in Fetch. RAM is not cleared.

## Files

All files are in `rtl/`, one module or package per file.

| file | content |
|---|---|
| `cpu4_pkg.sv` | widths, opcode constants, control enums, `ctrl_t` |
| `cpu4_top.sv` | the processor: wires all the blocks below together |
| `control_unit.sv` | the Fetch/Decode/Execute state machine and the decoder |
| `alu.sv` | the 4-bit ALU with carry and digit-carry logic |
| `acc_flags.sv` | ACC, Z, C and DC, and the SETC/CLRC/CLRDC flag operations |
| `pc_unit.sv` | the program counter with relative jumps |
| `ir_reg.sv` | the instruction register |
| `sel4.sv` | the 4-input selector (two instances) |
| `data_ram.sv` | the 16 x 4 RAM (asynchronous read, synchronous write) |
| `prog_rom.sv` | the 256 x 8 ROM (asynchronous read, optional `$readmemh`) |
| `in_bank.sv`, `out_bank.sv` | the I/O register banks |

The ports of `cpu4_top` are:

* `clk` and `rst`;
* `in_pins[4]` and `out_pins[N_OUT_PORTS]`, each 4 bits wide;
* observation outputs `pc`, `acc`, `flag_z`, `flag_c`, `flag_dc` and `state`.

There are two ways to load a program. One is to set the parameter
`ROM_INIT` to a `$readmemh` file with one hex byte per line. The other is to
write `u_rom.mem[]` hierarchically before releasing reset.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* `tb_alu` runs all operations on all operand and flag values and compares
  the results with integer arithmetic.
* `tb_control_unit` checks the state sequence. It also checks the decoder
  against a separate mnemonic table for all 256 codes, each under all 8
  combinations of Z, C and DC.
* The register and memory testbenches compare each block with a model under
  random stimulus. `tb_prog_rom` also loads `tb/rom_test.hex`, whose words
  are `(37*i + 11) mod 256` for i = 0 to 31.
* `tb_cpu4_top` tests the whole processor at its default size. It uses
  programs built by a small assembler package, `tb/cpu4_asm_pkg.sv`, which
  includes the macro expansions. It runs:
  * 600 random 8-bit binary additions;
  * 600 random 8-bit binary subtractions, using SUB and SUBC with the
    borrow chained through C;
  * all 10,000 two-digit BCD additions;
  * SHL and SHR on all 16 values;
  * 40 random programs of 1500 instructions each. After every instruction,
    the architectural state is compared with an instruction-set model written
    in the testbench.

  It also checks that every instruction takes exactly 3 clocks. Finally, it
  counts how often each mechanism happens: carry in, carry out, borrow,
  digit carry, DA adjust, rotate carry, flag instructions, taken and untaken
  branches, backward jumps, I/O and the unused code. A mechanism that never
  happens counts as a failure.

* `tb_cpu4_out16` runs one program on a 16-output-register processor and on
  a default one side by side. It checks that OUT decodes four port bits in
  the first and two in the second.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cpu4_pkg.sv tb/tb_cpu4_top.sv --top-module tb_cpu4_top -o sim
./obj_dir/sim
```

Run it from the directory that holds `rtl/` and `tb/`, because
`tb_prog_rom` reads `tb/rom_test.hex` through a relative path. The full
top-level test takes about a second.

## How far to trust it, and where it departs from its source

The parts given directly by the processor's published description are:

* the block structure;
* all widths and memory sizes;
* the instruction list and its binary encoding;
* the two instruction groups;
* the macro set;
* the three-clock Fetch/Decode/Execute cycle with the PC updated in Execute.

The following are this implementation's own choices, where the description
states only what a part does:

* **Carry and digit-carry rules.**
  * The carry input is C OR DC. This follows from the macro definitions.
  * Subtraction uses a borrow.
  * DC is set when the digit result is 10 or more, including when a carry
    leaves the nibble. The source says "greater than 10"; a BCD digit needs
    correcting from 10 upwards, so that is the condition used.
  * DA adds 6 when DC is set and changes no flags. It corrects additions
    only.
* **Binary carry chains need CLRDC.** The 8-bit binary addition sequence
  given for this processor (LOAD, CLRC, ADDDC, STORE, LOAD, ADDDC, STORE)
  only works here when the low-nibble sum stays below 10. The correct
  sequence puts CLRDC before the high ADDDC, which is the ADDC macro.
* **Z** follows every accumulator write.
* **Jump offsets** count from the jump instruction itself. This matches the
  worked branch example in the source.
* **One shared Execute state.** The source speaks of the PC being advanced
  "in each execution state", that is, of several execute states; here a
  single Execute state serves every instruction. The number of clocks per
  instruction, three, is the same.
* **Selector inputs.** The source does not say what feeds each of the two
  selectors. The assignment described under Datapath is this design's.
* **Memory timing and loading.** Asynchronous ROM and RAM reads, loading the
  ROM by file or hierarchical writes, and reset values are all this design's
  choices.
* **I/O.** The input registers sample on every clock. There are 4 output
  registers by default, the size the design is built with, and OUT then
  ignores `IR[3:2]`. OUT's opcode needs only four bits, so its operand can
  address 16 registers. Setting `N_OUT_PORTS = 16` on `cpu4_top` gives that
  variant.
* **Unassigned codes** `01010111` and `010110xx` run as no-operations.

The source reports an FPGA build on a Xilinx Spartan-3AN (xc3s700an). It used
81 flip-flops and 238 LUTs, with a maximum clock of 929 MHz. None of these
figures is reproduced here. This RTL has 57 flip-flops outside the
memories: PC 8, IR 8, ACC 4, flags 3, state 2 and I/O 32. It also has a
64-bit RAM and a 2048-bit ROM.

The assembler itself is software and is not part of this RTL. Its macro
expansions are reproduced in the testbench package.
