# RV32IMF_XPosit: a RISC-V core with posit and IEEE float side by side

Posits are a drop-in alternative to IEEE-754 floats. A variable-length
*regime* field trades precision for dynamic range, so a 32-bit posit has more
accuracy than a float near 1.0 and a wider range at the extremes. Most posit
hardware replaces the floating-point unit or hangs off the core as a
coprocessor. This design does neither. The posit unit is a tightly coupled
execution unit inside the core, next to the ordinary single-precision FPU.
It has its own register bank and its own major opcode.

Three ideas go with that:

* **Both number systems coexist.** A program can use `FADD.S` and `PADD.S`
  in the same instruction stream. Posit instructions enter their unit in the
  execute stage, so a posit multiply costs 10 cycles instead of the 12 it
  would cost as a coprocessor.
* **The exponent size is switched at run time.** The posit unit handles
  posit<32,2> (more precision) and posit<32,3> (more range). The `es` input
  selects between them and may change between any two instructions.
* **Types are cast in hardware.** Two instruction classes move values
  between the integer, float and posit worlds:
  * **MOT** (mixed operand type) instructions take operands of any two
    types. They convert both to the destination type, then run that type's
    arithmetic unit. One example is `F6 = P2 + I5`.
  * **DTC** (data type converter) instructions convert one register to
    another type, as in `P9 = posit(F3)`.

Everything here is synthesizable SystemVerilog with a self-checking
testbench per block. The top level is `rv32imf_xposit`.

## The common internal number form

All three formats decode into one unpacked form (`xposit_pkg::unp_t`):
* the flags NaN/NaR, infinity and zero;
* a sign;
* a 12-bit signed binary scale;
* a 40-bit significand with the hidden one at bit 39.

Bit 0 of the significand is a sticky bit. It is set whenever lower
nonzero bits were dropped.

For a posit the scale is `k * 2^es + e`, where `k` is the regime value and
`e` the exponent field. Once the number is in this form the arithmetic no
longer depends on es at all. Only the decoder and the encoder know the
exponent size. That is what makes run-time reconfiguration cheap: the adder,
multiplier and divider are shared unchanged by es = 2, es = 3 and the FPU.

```
  posit ──posit_decoder──┐                       ┌──posit_encoder──> posit
  float ──float_to_unp───┼─> unp_add / unp_mul ──┼──unp_to_float───> float
  int   ──int_to_unp─────┘      / unp_div        └──unp_to_int─────> int
```

Each encoder rounds once, to its own precision, round to nearest with ties
to even. The 40-bit significand holds every 28-bit posit significand or
24-bit float significand with room for guard bits. The multiplier keeps the
full product before rounding, and the divider adds a remainder-based sticky
bit. As a result, every operation is correctly rounded.

## Posit decode and encode (es = 2 or 3)

**Decoder (`posit_decoder`).** It works in five steps:
1. Flag zero (all zeros) and NaR (a lone sign bit).
2. Take the two's complement of a negative word.
3. Count the regime run with a leading-zero counter, inverting the body
   first if the regime starts with ones.
4. Shift the body left past the run and its terminating bit.
5. What remains is the exponent, then the fraction.

The field registers are sized for both exponent sizes at once:
* the exponent register has 3 bits (the larger es); with es = 2 its top
  bit is zero;
* the fraction register has 27 bits (N - 2 - 3, set by the smaller es);
  with es = 3 the 26 fraction bits are left-justified in it.

**Encoder (`posit_encoder`).** It splits the scale into regime `k` and
exponent `e` for the selected es. It builds a word from three parts:
* the regime terminating bit `~reg_s`;
* the exponent;
* the fraction, followed by room for guard and sticky bits.

It then shifts that word right by the regime run length, filling from the
left with the regime sign. The top 31 bits are rounded (guard bit, plus
sticky from everything below), and the sign is applied by two's
complement. Two edge cases:
* results outside the posit range saturate to maxpos or minpos, so a
  posit never rounds to zero or to NaR;
* an infinite or NaN intermediate gives NaR.

## Arithmetic units

`posit_unit` and `fpu` have the same structure:
1. an operand register;
2. a decode register (posit or float to unpacked);
3. the shared arithmetic (`unp_add`, `unp_mul`, `unp_div`, all
   combinational);
4. a result register;
5. the encoder and output register.

A counter pads each operation to its fixed cycle count:

| operation | cycles |
|-----------|-------:|
| add / sub | 5 |
| mul       | 8 |
| div       | 12 |

The interface is `start` / `busy` / `done`. `done` pulses in the last cycle
of an operation, which counts the start cycle as cycle 1. Division by zero
raises `dz` with `done`.

* **Adder:** orders the operands by magnitude and aligns the smaller, with
  a sticky bit. It adds or subtracts, then renormalises with a
  leading-zero count. Subtraction negates B.
* **Multiplier:** adds the scales and multiplies the significands
  (40 × 40). It normalises by one bit on the carry. The sign is the XOR
  of the operand signs.
* **Divider:** subtracts the scales. It forms an 81-bit by 40-bit quotient,
  with a sticky bit taken from the remainder.

Posit specials: NaR in gives NaR out, and x / 0 gives NaR with `dz`.
Float specials follow IEEE-754:
* inf − inf, 0 × inf, 0 / 0 and inf / inf give the canonical NaN
  `0x7FC00000`;
* subnormals are supported on input and output.

## Type conversion, MOT and DTC

`dtype_converter` converts any of int / float / posit to any other through
the unpacked form. When source and destination types are equal, it copies
the value unchanged. Special-value rules:
* float or posit to integer rounds to nearest even and saturates;
* NaN or NaR to integer gives `0x7FFFFFFF`;
* float inf or NaN to posit gives NaR;
* NaR to float gives NaN.

The core charges a fixed time for each conversion. The values are
conversion times measured at 100 MHz, expressed in cycles:

| from \ to | int | float | posit |
|-----------|----:|------:|------:|
| int       |  –  |   3   |   6   |
| float     | 10  |   –   |   2   |
| posit     | 14  |   5   |   –   |

**MOT** (`mot_block`). The MOT format is R-type on custom-1 (`0101011`).
Each operand's type is a 2-bit code split across the instruction:
* `xd = {IR[31], IR[14]}`;
* `xs1 = {IR[30], IR[13]}`;
* `xs2 = {IR[29], IR[12]}`.

The codes are 01 integer, 10 float and 11 posit; 00 is taken as integer.
The operation comes from `funct4 = IR[28:25]`: 0000 add, 0100 sub,
1000 mul, 1100 div. The block does three things:
* selects each source from the bank its type names;
* converts both operands to `xd` in parallel;
* hands them to the destination's unit: integer ALU, FPU or posit unit.

The core waits for the slower of the two conversions (at least one cycle).

**DTC** (`dtc_block`). DTC instructions use custom-2 (`1011011`), with
`xd = IR[23:22]` and `xs = IR[21:20]`. The block reads `rs1` from the
source bank and converts it. The core writes the result to `rd` of the
destination bank.

## The core and its cycle counts

`rv32imf_xposit` is a multi-cycle machine that runs one instruction at a
time. It has three 32 × 32 register banks: integer (x0 reads as zero),
float and posit. It has two 1024-word memories, one for instructions and
one for data. Each instruction class goes through these steps:

| class | steps | cycles |
|-------|-------|-------:|
| integer ALU, LW, SW, BEQ, BNE | IF, ID, EX, MEM, WB | 5 |
| FP / posit add, sub | IF, ID, unit | 2 + 5 = 7 |
| FP / posit mul | IF, ID, unit | 2 + 8 = 10 |
| FP / posit div | IF, ID, unit | 2 + 12 = 14 |
| DTC | IF, ID, convert (write-back in the last cycle) | 2 + max(1, conversion) |
| MOT to float or posit | IF, ID, convert, unit | 2 + max(1, conversion) + unit |
| MOT to integer | IF, ID, convert, EX, MEM, WB | 2 + max(1, conversion) + 3 |

Posit and float results are written in the unit's last cycle, so they skip
MEM and WB. That is the advantage of a tightly coupled unit over an
accelerator, which would take the instruction only at write-back.

The core has a minimal control interface:
* load instructions through `imem_we` / `imem_waddr` / `imem_wdata` while
  the core is idle;
* pulse `start` to begin execution at address 0;
* an all-zero instruction word halts the core and raises `done`;
* `dbg_bank` / `dbg_addr` read any register combinationally;
* `dz_flag` is a sticky division-by-zero flag (posit or float), cleared by
  `start`;
* `es` selects the posit exponent size (3 selects es = 3, any other value
  es = 2).

## Instruction encodings

| instruction | opcode | funct7 | funct3 |
|-------------|--------|--------|--------|
| ADD SUB OR AND XOR MUL DIV, ADDI XORI, LW SW, BEQ BNE | standard RV32IM | standard | standard |
| FADD.S FSUB.S FMUL.S FDIV.S | `1010011` | 0000000 / 0000100 / 0001000 / 0001100 | ignored (rm) |
| PADD.S PSUB.S PMUL.S PDIV.S | `0001011` | 0000000 / 0000100 / 0001000 / 0001100 | 000 |
| MOT | `0101011` | see above | type bits |
| DTC | `1011011` | 0 | 000 |

Some example words that run as expected:

| word | instruction |
|------|-------------|
| `0011018B` | PADD P3, P2, P1 |
| `1011028B` | PMUL P5, P2, P1 |
| `1811038B` | PDIV P7, P2, P1 |
| `C051332B` | F6 = P2 + I5 |
| `6051632B` | I6 = P2 + F5 |
| `D851532B` | P6 = F2 / I5 |

## Where this differs from the original description

* **Posit instruction encoding.** The original's instruction table gives
  PMUL/PDIV funct7 and funct3 values that disagree with its own example
  machine code. The machine code was followed: posit instructions use the
  float funct7 coding with funct3 = 000. PSUB.S (funct7 0000100) and the
  MOT subtract (funct4 0100) are not in the original; they are added by
  analogy.
* **MOT opcode.** The MOT opcode is 0x2B (custom-1), as in all the example
  machine code. The instruction table prints the DTC opcode for it.
* **es selection.** The original keeps an es-mode field and the DZ flag in
  a posit control/status register. That register belongs to a variant that
  replaces the F extension. Here, es is a core input and DZ is a sticky
  output bit.
* **One core for both casting methods.** The original builds two cores,
  one with the MOT block and one with the DTC block, to compare them. This
  core carries both blocks; they use different opcodes and never interact,
  so either can be removed without touching the other.
* **FPU cycle counts.** The FPU's latencies are not specified in the
  original; they are set equal to the posit unit's.
* **Mixed-operand timing.** The original quotes whole-instruction times for
  MOT and DTC sequences. This core reproduces the per-conversion times and
  the arithmetic cycle counts, but not those totals. Here, for example,
  `F6 = P2 + I5` takes 12 cycles as one MOT instruction. As a DTC
  sequence (P2 to float, I5 to float, FADD.S) it takes 7 + 5 + 7 = 19
  cycles. The original quotes 18 and 17 cycles.
* **Rounding.** Posit rounding is round-to-nearest-even with saturation,
  as in the posit standard. The original only says rounding depends on the
  regime length.
* **Exponent field with es = 2.** In the 3-bit exponent register, the
  field is zero-extended. The original says "sign extended", which would
  change the value of the number.
* **Scope.** Only a subset of RV32IMF is implemented: the instructions
  listed above, word loads and stores only, and no CSRs, traps or
  privilege modes.
* **Formats.** The posit decoder, encoder and unit take the word size `N`
  as a parameter; N = 8, 16 and 32 are tested. The core and its register
  banks are 32-bit only. es = 0 and es = 1 formats are not supported.
* **Memories.** Memory sizes (1024 words each) and the load/start/halt/
  debug interface are this design's own.

## Files

| file | content |
|------|---------|
| `rtl/xposit_pkg.sv` | unpacked type, opcodes, cycle counts, helpers |
| `rtl/posit_decoder.sv`, `rtl/posit_encoder.sv` | posit ↔ unpacked, es 2/3 |
| `rtl/float_to_unp.sv`, `rtl/unp_to_float.sv` | IEEE single ↔ unpacked |
| `rtl/int_to_unp.sv`, `rtl/unp_to_int.sv` | int32 ↔ unpacked |
| `rtl/unp_add.sv`, `rtl/unp_mul.sv`, `rtl/unp_div.sv` | shared arithmetic cores |
| `rtl/posit_unit.sv`, `rtl/fpu.sv` | timed posit and float units |
| `rtl/int_alu.sv`, `rtl/regfile.sv`, `rtl/word_mem.sv` | integer datapath parts |
| `rtl/dtype_converter.sv`, `rtl/mot_block.sv`, `rtl/dtc_block.sv` | type casting |
| `rtl/rv32imf_xposit.sv` | the core |
| `tb/tb_ref_pkg.sv` | reference models in `real` arithmetic |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_posit_formats.sv` | posit unit at 8 and 16 bits |

## Verification and simulation

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The reference models in `tb_ref_pkg` work independently of the RTL. They
use double-precision `real` arithmetic and bit-string rounding to posit
and float.

The unit testbenches use random operands (several thousand per block)
plus directed corner cases. The timed units also check cycle counts.

`tb_posit_formats` runs the posit unit at N = 8 and N = 16, with es 2
and 3. It covers random operations and every 8-bit multiplication, and it
checks that the cycle counts do not depend on the format.

`tb_rv32imf_xposit` runs the core at its default sizes. An instruction-set
model inside the testbench predicts every register write and every
instruction's cycle count. The core must match both, and all 96 registers
are compared at the end. It runs two programs, each once with es = 2 and
once with es = 3:
* a directed program with the example machine code, loads and stores,
  a counted branch loop, every DTC direction and division by zero;
* 300 random float, posit, MOT and DTC instructions.

It counts each mechanism and fails if any never happened:
* integer ALU, load, store;
* branch taken and not taken;
* FPU, posit unit with es = 2 and with es = 3;
* MOT to each type, and DTC;
* division-by-zero flag, and halt.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/xposit_pkg.sv tb/tb_ref_pkg.sv tb/tb_rv32imf_xposit.sv \
  --top-module tb_rv32imf_xposit -o sim
./obj_dir/sim
```

Replace the testbench name to run any other block's test. Testbenches
that do not use the reference package also build without
`tb/tb_ref_pkg.sv`.

Reference rounding is done in double precision, so a posit result that
lies almost exactly halfway between two posits could in principle round
differently. No such case showed up in the random runs.
