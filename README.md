# Quad-core dual-field cryptoprocessor

Elliptic-curve style cryptography needs arithmetic in two kinds of finite
field. One is prime fields GF(p), whose elements are integers modulo a prime.
The other is binary extension fields GF(2^m), whose elements are polynomials
with coefficients modulo 2. This processor has four identical cores. Each core
can run an instruction of either field, and all four run at the same time: a
program is a list of *bundles* of four instructions, one per core. It is a
SystemVerilog implementation of the quad-core dual-field cryptoprocessor
architecture published for FPGAs ("Quad Core Dual Field Cryptoprocessor on
FPGA Platform"). Widths, block structure, algorithms and the worked example
come from that architecture. Everything it leaves open is filled in as
described below.

Each core is a *microcode sequence unit* plus a *configurable arithmetic unit*
(CAU). The microcode sequence unit rejects invalid opcodes. The CAU holds a
prime-field unit and a binary-field unit side by side.

```
              instruction memory (16 x 12 bit)      data memory (32 x 256 bit)
                 |3 bit per core                       | a (256)   | b (256)
   +-------------+-------------+-------------+         |           |
   v             v             v             v         v           v
 [seq 0]      [seq 1]       [seq 2]       [seq 3]   (a, b and p go to all four CAUs)
   |1 bit enable |             |             |
 [CAU 0]      [CAU 1]       [CAU 2]       [CAU 3]     each CAU = fp_unit + gf_unit
   |             |             |             |
 result[0]    result[1]     result[2]     result[3]   (512 bit each)
```

## Instruction set

| opcode | instruction | result |
|---|---|---|
| 1 | F_p multiply (Montgomery-ladder interleaved) | a·b mod p |
| 2 | F_p add | a+b mod p, with a reduction flag in bit 8 (see below) |
| 3 | F_p subtract | a−b mod p |
| 4 | GF(2^4) multiply | a·b mod x^4+x+1 |
| 5 | GF(2^4) add | a xor b |
| 6 | GF(2^4) double | a xor b (see below) |
| 0, 7 | not instructions | rejected: result 0, `illegal` set |

The opcode numbers follow the order of the published instruction table. Using
0 and 7 as the invalid codes is this implementation's choice.

Operand rules:
- Prime-field operands must be residues, a, b < p. For multiply only a < p is
  needed; the ladder uses the low 8 bits of b. A simulation assertion
  checks this.
- GF instructions use bits [3:0] of a and b and ignore the rest.

## Running a program

`quad_core_crypto` runs programs from its own two memories:

- **Instruction memory**: word k is bundle k. The opcode for core j is in
  bits [3j+2:3j].
- **Data memory**: 256-bit words. Bundle k takes a = word 2k and b = word
  2k+1. All four cores get the same a, b and the modulus `p` (8 bits, a
  top-level input).

Load both memories through the `imem_*` / `dmem_*` write ports while `busy`
is low. Set `last_step` and pulse `start`. The sequence controller then
steps through bundles 0..`last_step`. For each bundle it:
1. reads the instruction word and the two operands;
2. starts the four microcode sequence units together;
3. waits until all four cores are done;
4. puts the four 512-bit results on `result`, with a one-cycle
   `result_valid` pulse and the bundle index on `result_step`.

`done` pulses after the last bundle.

A bundle is as slow as its slowest core. From one `result_valid` pulse to the
next takes L + 4 cycles, where L is:

| slowest instruction in the bundle | L | cycles per bundle |
|---|---|---|
| invalid opcode | 1 | 5 |
| GF instruction | 3 | 7 |
| F_p add / subtract | 4 | 8 |
| F_p multiply | 8 + 3 = 11 | 15 |

The first bundle takes one cycle more, counted from `start`. The
microcode-sequence handshake is: sequencer start, a one-cycle CAU enable,
CAU done, sequencer done. The published architecture shows only the 1-bit
enable; the rest is this implementation's.

## The prime-field unit

`fp_unit` is the hardest part to follow. It has three 256-bit adders, a
left shifter and a control/multiplexer block. Every operation is built from
one step: add two numbers, subtract p, and keep whichever of the two is the
right residue. For the intermediate sum v:

```
w = v + ~p + 1          (~p is the complement of p over n = 8 bits, so w = v + 2^n - p)
c = v[n] | w[n]         (v ≥ 2^n, or v ≥ p)
t = c ? w : v           (the residue sits in t[n-1:0])
```

No comparator and no final division are needed. The decision comes from
bit n of two adder outputs. n is the width of p, 8 by default.

- **Add** runs one such step on v = a + b.
- **Subtract** computes v = a + ~b + 1 in two's complement across the whole
  adder. Bit n is then the sign. If it is set, p is added back.
- **Multiply** runs n ladder steps, one per clock, starting from s1 = 0,
  s2 = a and scanning the bits of b from the top:

  ```
  u  = b_i ? s2 : s1
  v1 = 2u            (left shifter)     -> w1 adder -> t1
  v2 = s1 + s2       (adder)            -> w2 adder -> t2
  b_i = 1: s1 <- t2, s2 <- t1      b_i = 0: s1 <- t1, s2 <- t2
  ```

  This holds s2 − s1 = a, and s1 ends as a·b mod p. The published form of the
  algorithm swaps t1 and t2 in the update. That version does not compute
  a·b mod p, so the corrected ladder is the one built here.

Two things about the result format can be surprising:

- **Add keeps bit n.** When a reduction happened, bit 8 of the result is set.
  The residue is in bits [7:0]. So 5 + 4 mod 7 gives `0x102`: residue 2,
  reduction flag set. This matches the published simulation result and is
  deliberate. Software that wants the residue alone masks bits [7:0].
- **Subtract and multiply leave only the residue.** All bits above [7:0] are
  zero.

### Worked example

With a = 5, b = 4 and p = 7, a bundle of F_p add, F_p subtract, GF multiply
and GF double gives `0x102`, `0x1`, `0x7` and `0x1`. These are the published
results. The end-to-end testbench runs this bundle first.

The unit has a 256-bit datapath but an 8-bit modulus. That is the published
configuration: 256-bit adders and operands, an 8-bit p, a 512-bit result.
Making p wider means raising `P_W`, which must stay below `W`. The multiply
then takes `P_W` + 1 cycles.

### The 256-bit adder

`a256_adder` is a carry-select adder built from 64-bit slice adders
(`a64_adder`, each one FPGA carry chain):
- The lowest slice adds with the real carry in.
- Each higher slice is built twice, once for carry-in 0 and once for
  carry-in 1.
- A 2:1 multiplexer per slice picks the right copy once the carry from the
  slice below arrives.

The critical path is one 64-bit carry chain plus three multiplexers. The
sum is 257 bits wide. The published drawing arranges its 64-bit blocks
somewhat differently; only the delay structure is reproduced here.

## The binary-field unit

`gf_unit` works in GF(16) with the field polynomial x^4 + x + 1 (binary
10011):

- **Add** is XOR.
- **Multiply** (`gf_mul_lut`) reads a 256 × 4-bit table addressed by {a, b}.
  The table is computed when the design is elaborated, by carry-less
  multiplication and reduction, rather than written out. It agrees cell for
  cell with the standard GF(16) table, for example 8·7 = 13 and 5·4 = 7.
- **Double** has no single clean definition in the published architecture:
  - It is described as adding the point (r3, r4) to itself with the adder.
  - Literally, x + x = 0 in any field of characteristic 2.
  - The published result for a = 5, b = 4 is 1 = 5 xor 4.

  This implementation follows the published result: double = a[3:0] xor
  b[3:0]. It is therefore the same as GF add, carried out by its own adder.
  Change `y_dbl` in `gf_unit.sv` if a different meaning is wanted.

The 4-bit result is zero-extended to the CAU's 512-bit result.

## Departures and choices at a glance

Departures from the published architecture:
- The multiply ladder update is corrected (t1 and t2 exchanged; see above).
- GF double is a[3:0] xor b[3:0], chosen to match the published result.
- Programs and data are loaded into memories through write ports. The
  published top had fixed instructions and operands.
- The adder's block layout differs from the published drawing. Its delay
  (one 64-bit chain plus three multiplexers) is the same.

Choices where the published architecture says nothing:
- opcode numbering, and 0 and 7 as invalid codes;
- memory depths: 16 instruction words and 32 data words;
- operand addressing: a = word 2k, b = word 2k+1, the same for all cores;
- all handshakes, and all cycle counts;
- synchronous active-high reset;
- an invalid core shows a zero result.

## Modules

| module | role |
|---|---|
| `crypto_pkg` | opcodes (`opcode_e`), decoded form (`decoded_t`), GF constants |
| `quad_core_crypto` | top: memories, sequence controller, four cores |
| `instr_mem`, `data_mem` | synchronous RAMs with a load port |
| `microcode_seq` | per-core opcode check and CAU enable |
| `cau` | per-core execution unit: `fp_unit` + `gf_unit` |
| `instr_decoder` | opcode → selects, used by every unit |
| `fp_unit` | prime-field add / subtract / multiply |
| `a256_adder`, `a64_adder` | carry-select adder and its slice |
| `gf_unit`, `gf_mul_lut` | GF(16) unit and its multiplier table |

Top parameters and their defaults: `NUM_CORES` 4, `DATA_W` 256, `SLICE` 64,
`P_W` 8, `RESULT_W` 512, `IMEM_DEPTH` 16, `DMEM_DEPTH` 32.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself, with a watchdog.
`tb_quad_core_crypto` runs at full default size and takes well under a
second:
- it runs the worked example;
- it runs twenty random programs of up to 16 bundles, including invalid
  opcodes;
- it checks every result and every bundle's cycle count against its own
  reference model;
- it fails if any of these never occurred: each of the six instructions, a
  rejected opcode, an add reduction, a subtract wrap-around, a bundle mixing
  both fields, a multi-bundle program, or a change of p.

From the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/crypto_pkg.sv \
    tb/tb_quad_core_crypto.sv --top-module tb_quad_core_crypto -Mdir obj
./obj/Vtb_quad_core_crypto
```

Replace the testbench name to run any other. The package must come first on
the command line, and `-Irtl` lets Verilator find the other modules by name.
Lint a module with
`verilator --lint-only -Wall -Irtl rtl/crypto_pkg.sv rtl/<module>.sv`.
The remaining warnings are unused bits: for example, the GF unit ignores
operand bits above 3, and each unit uses only some of the decoder outputs.
