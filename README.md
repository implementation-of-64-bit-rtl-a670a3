# 64-bit RISC processor with a Vedic multiplier and MUX-based adders

This is a small 64-bit processor. Its arithmetic is built from two unusual
parts:

* a multiplier that follows the *Urdhva Tiryakbhyam* ("vertically and
  crosswise") rule of Vedic mathematics. A wide product is split into four
  half-width products, and these are added together. The same rule is used
  again at every smaller size.
* adders whose full-adder cell is made of **two 4:1 multiplexers** and one
  inverter, not XOR/AND/OR gates.

The processor around them is simple. Two 64-bit operands come in on `a` and
`b`. A 4-bit instruction comes in on `prst_addr`. The 128-bit result leaves on
`databus`, and its 4-bit location leaves on `addressbus`. All of it is plain
synthesizable SystemVerilog. The default parameters give the full 64-bit
design, and all of it simulates with Verilator at that size.

## Block structure

```
             prst_addr ─► v1 instructionregister ──op──────────────┐
                               ▲ pc        │ addr                   ▼
 clk,rst ─► v0 controlunit     │           ▼                  v6 ALU ──aluout/zero──┐
            (fetch/execute)  v3 programCounter  v4 memoryaddressR   ▲ r1,r2          │
                               │              │                     │               ▼
                               └──► v5 multiplexer ◄────────────────┤    v2 registerfile
                                          │ address                  └──── R1,R2 ◄── a, b
                                          └──────────────────────────────► addressbus, databus, wr, zflag
```

| instance | module | what it does |
|---|---|---|
| v0 | `controlunit` | one flip-flop, alternating FETCH and EXECUTE |
| v1 | `instructionregister` | 8 bits: `{opcode, address}`, loaded in FETCH |
| v2 | `registerfile` | operand registers R1/R2; output registers for `databus`, `addressbus`, `zflag`, `wr` |
| v3 | `programCounter` | 4-bit counter, +1 per instruction, wraps |
| v4 | `memoryaddressR` | holds the result address until write-back |
| v5 | `multiplexer` | chooses PC or MAR for the shared address bus |
| v6 | `ALU` | 14 operations; its 128-bit output register `aluout` is also the MAC accumulator |

Arithmetic cells below the ALU:

| module | what it does |
|---|---|
| `vedic_mul #(N)` | N×N → 2N unsigned Urdhva multiplier, built level by level from 2×2 cells |
| `mux_adder #(N)` | N-bit ripple adder made of `mux_full_adder` cells |
| `mux_full_adder` | full adder made of two `mux4` |
| `mux4` | 4:1 multiplexer |
| `risc_pkg` | opcode enumeration (`opcode_e`) and `op_writes()` |

## Timing of an instruction

Each instruction takes two clock cycles. Its result appears one instruction
later:

| cycle | phase | what happens at the clock edge that ends the cycle |
|---|---|---|
| 2k | FETCH | IR ← {`prst_addr`, PC}; R1 ← `a`; R2 ← `b`; the previous result is written back (`databus` ← `aluout`, `zflag`); `addressbus` ← MAR |
| 2k+1 | EXECUTE | `aluout` ← op(R1, R2); MAR ← IR address; PC ← PC+1; `addressbus` ← PC |
| 2k+2 | FETCH (next instruction) | the result of instruction k is written back |
| 2k+3 | | `wr` = 1, `databus` = result, `addressbus` = address of instruction k |

So `a`, `b` and `prst_addr` must be stable at the edge that ends a FETCH
cycle. The processor fetches every other cycle, whatever the inputs hold. If
you hold the inputs, the same instruction runs again. Use a no-op code to
idle. The address of an instruction is the PC at its fetch, so results land
at locations 0, 1, 2, … 15, 0, … . The address bus is shared: in the EXECUTE
cycle it carries the PC (the instruction address), and at write-back it
carries the MAR. These two values are equal, so `addressbus` changes once
per instruction. `rst` is synchronous and active high. It clears every
register and restarts in FETCH.

## Instruction set

Codes 0 to 13 are the 14 instructions. Codes 14 and 15 are no-ops: they write
nothing back and leave the accumulator alone. Results are 128 bits wide.

| code | name | result |
|---|---|---|
| 0 | ADD | R1 + R2 (carry in bit 64) |
| 1 | SUB | R1 − R2, two's complement over 128 bits (negative when R1 < R2) |
| 2 | MUL | R1 × R2 (Vedic multiplier) |
| 3 | DIV | ⌊R1 / R2⌋; all ones in the low 64 bits when R2 = 0 |
| 4 | MAC | aluout + R1 × R2 (accumulates; wraps modulo 2^128) |
| 5 | AND | R1 & R2 |
| 6 | OR  | R1 \| R2 |
| 7 | XOR | R1 ^ R2 |
| 8 | NOT | ~R1 |
| 9 | SHL | R1 << 1 (the bit shifted out lands in bit 64) |
| 10 | SHR | R1 >> 1 |
| 11 | INC | R1 + 1 |
| 12 | DEC | R1 − 1, two's complement over 128 bits |
| 13 | CMP | 1 if R1 > R2 (unsigned), else 0 |

`zflag` is 1 when the written result is zero. Worked example with
a = 111111156 and b = 255: ADD gives 111111411, MUL gives 28333344780 and
DIV gives 435730.

The design fixes only the count of instructions. The list and the encoding
above are this implementation's own choice. DIV is included because the
quotient 435730 is among the reference results for the example operands.

## The Vedic multiplier

For N-bit operands split into halves aH/aL and bH/bL (H = N/2 bits each), four
H×H Vedic multipliers compute the following products, each N bits wide:

* the vertical products aL·bL and aH·bH;
* the crosswise products aH·bL and aL·bH.

Three N-bit MUX-based adders then combine them:

```
s1, ca1 = aH·bL + aL·bH
s2, ca2 = s1 + (aL·bL >> H)
p[H-1:0]    = (aL·bL)[H-1:0]
p[N-1:H]    = s2[H-1:0]
p[2N-1:N]   = aH·bH + {ca1|ca2, s2[N-1:H]}
```

For N = 8 this is the 8×8 block built from four 4×4 blocks. `vedic_mul`
applies the same structure at every size from 4 to N. It is written as one
generate loop over levels, not as recursion: level l holds the products of
every pair of 2^l-bit digits of a and b. Each comes from four products of
level l−1, and the top level holds the full product. The base
case is a 2×2 cell: four AND gates (a0b0, a1b0, a0b1, a1b1) and two half
adders. The 64×64 multiplier therefore holds 1024 2×2 cells and about 6000
MUX full adders.

Departure from the reference structure: that structure feeds only the first
adder's carry (ca1) into the last adder and leaves ca2 open. This drops 2^(N+H)
from the product whenever the second addition carries. For N = 8, 143 × 159
is one such case. This implementation feeds `ca1 | ca2` instead. The middle
sum is below 2^(N+1), so the two carries are never both 1. The last adder's
carry is always 0; an immediate assertion checks it. N must be a power of
two, at least 2.

## The MUX-based full adder

Both multiplexers are selected by the addends, {s1, s0} = {a, b}. Only the
carry-in c, or its inverse, reaches their data inputs:

| select ab | SUM mux input | CARRY mux input |
|---|---|---|
| 00 | c  | 0 |
| 01 | ~c | c |
| 10 | ~c | c |
| 11 | c  | 1 |

`mux_adder` chains N of these cells as a ripple-carry adder with a carry-in.
The ALU uses it in several places:

* one 64-bit instance for ADD, SUB (a + ~b + 1), INC and DEC;
* one 128-bit instance for the MAC accumulate;
* three in every split of the multiplier.

Simulation note: each carry in `mux_adder` has a `/*verilator public_flat*/`
comment. Without it, Verilator substitutes each carry into the next one. The
carry appears twice in each cell, so the expression doubles in size with
every bit. Building the 16-bit multiplier alone then needs more than 16 GB.
The comment changes only how the Verilator model is built, not the logic.

## Where this differs from, or adds to, the reference design

The following choices are this implementation's own. The reference names
these signals or blocks without specifying them.

* **Wiring and timing.** The two-phase timing, write-back during the next
  fetch, and the exact wiring between the seven blocks. The reference gives
  the block set, the instance names, the port names and widths, and the
  register counts: 1 for the control unit, 8 for the IR, 4 each for the PC
  and the MAR.
* **`prst_addr`.** It is used as the 4-bit opcode of each instruction.
* **`multiplexer`.** It is read as the PC/MAR selector of a shared address
  bus. The reference lists this instance once as a multiplier and once as a
  multiplexer.
* **Register file.** It holds only R1, R2 and the output registers: about
  400 flip-flops, matching the reference count. It is not a bank of 16
  words. Results go out on `databus`/`addressbus` to whatever memory you
  attach.
* **Added outputs.** `wr` and `zflag`.
* **Instruction set.** Its list and encoding, the 128-bit sign extension of
  differences, and the result of a divide by zero.
* **Divider.** It is behavioural (the `/` operator), because the reference
  gives no structure for one.
* **Base cell and carry fix.** The 2×2 base cell, and the `ca1 | ca2` fix
  described above.

With default parameters the design synthesizes (Yosys, generic) to about
55 000 cells and 409 flip-flops. Most of the cells are in the multiplier.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `processor_64bit_extension` | `WIDTH` | 64 | operand width; `databus` is 2·WIDTH bits. Must be a power of two |
| | `AW` | 4 | address width (PC, MAR, IR address field, `addressbus`) |
| `vedic_mul` | `N` | 64 | operand width, a power of two ≥ 2 |
| `mux_adder` | `N` | 8 | adder width |

The opcode is always 4 bits.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. Expected values come from `tb_ref_pkg`,
which computes every instruction with the language's own operators.

| testbench | what it checks |
|---|---|
| `tb_mux4`, `tb_mux_full_adder`, `tb_multiplexer` | exhaustive |
| `tb_mux_adder` | exhaustive at 8 bits; random vectors at 64 bits |
| `tb_vedic_mul` | 64×64 on corner and random operands; 8×8 exhaustively |
| `tb_ALU` | every opcode on corner and random operands, a MAC chain, hold and reset |
| `tb_controlunit`, `tb_instructionregister`, `tb_programCounter`, `tb_memoryaddressR`, `tb_registerfile` | each register against a software copy |
| `tb_processor_64bit_extension` | see below |

`tb_processor_64bit_extension` runs the whole processor at its default size.
Its program is:

1. the 14 instructions on the example operands;
2. 400 random instructions;
3. a reset in the middle of the run;
4. a MAC chain.

It checks every write-back for data, address, Z flag and arrival exactly
three cycles after the instruction is presented. It also counts how often
each of these happened, and fails if any never did:

* each opcode;
* a no-op;
* a MAC chain;
* a zero result;
* a negative difference;
* a divide by zero;
* a PC wrap;
* a reset.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/risc_pkg.sv tb/tb_ref_pkg.sv tb/tb_processor_64bit_extension.sv \
    --top-module tb_processor_64bit_extension -o sim
./obj_dir/sim
```

Replace the last file and the top module to run another testbench. The
packages `rtl/risc_pkg.sv` and `tb/tb_ref_pkg.sv` come first because
Verilator does not find packages by name.
