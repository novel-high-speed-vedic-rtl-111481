# 8x8 Vedic multiplier (Urdhva Tiryakbhyam, "vertically and crosswise")

A combinational unsigned multiplier, 8 x 8 bits to a 16-bit product, built
as a tree of smaller multipliers in the manner of the Urdhva Tiryakbhyam
sutra of Vedic arithmetic. All partial products are formed at once and then
combined with ripple-carry adders; there is no clock, no register and no
reset. The same recipe is applied at two levels:

```
multi8x8              p = a * b, 8 x 8 -> 16 bits
 ├─ 4 x vedic_mul4x4  4 x 4 -> 8 bits
 │   ├─ 4 x vedic_mul2x2   2 x 2 -> 4 bits (AND gates + 2 half_adder)
 │   └─ 3 x rca #(4)        4-bit ripple-carry adders of full_adder cells
 └─ 3 x rca #(8)      8-bit ripple-carry adders of full_adder cells
```

## The vertically-and-crosswise step

Split each operand into a high and a low half of h bits
(h = 4 for the 8x8 level, h = 2 for the 4x4 level):
`a = {AH, AL}`, `b = {BH, BL}`. Then

```
a * b = AH*BH * 2^(2h)  +  (AH*BL + AL*BH) * 2^h  +  AL*BL
        vertical (high)     crosswise                 vertical (low)
```

Four half-size multipliers produce the four 2h-bit products in parallel.
Three 2h-bit ripple-carry adders combine them:

| adder | adds | result |
|-------|------|--------|
| 1 | `AH*BL + AL*BH` | `x1`, carry `ca1` |
| 2 | `x1 + (AL*BL >> h)` (upper half of the low product, zero-padded) | `x2`, carry `ca2` |
| 3 | `AH*BH + {0.., ca1 \| ca2, x2[2h-1:h]}` | product bits `[4h-1:2h]`, carry `ca3` |

The low h product bits are `AL*BL[h-1:0]`; the next h bits are `x2[h-1:0]`.

### Where the carries go

This is the one point that needs care. `ca1` and `ca2` both carry out at
the same weight, `2^(3h)`. They go into bit h of the third adder's second
operand, just above the part of `x2` that lands there.

- Both can be 1, one at a time. For 4x4, `15 x 11` sets `ca2`.
- They are never 1 together. If `ca1` is set, `x1` is small: at most
  `2*9 - 16 = 2` at the 4x4 level and `2*225 - 256 = 194` at the 8x8 level.
  Adding the low product's upper half (at most 2 or 15) then cannot carry.
  So `ca1 | ca2` equals `ca1 + ca2`, and one OR gate merges them.
- `ca3` is always 0, because `(2^(2h)-1)^2 < 2^(4h)`. It is left
  unconnected.

Leaving out `ca2` is an easy mistake, and it gives wrong products (4 of the
256 4x4 cases, 524 of the 65,536 8x8 cases). Both multiplier modules hold
immediate assertions that `ca1 && ca2` and `ca3` never occur.

## The 2x2 leaf

`vedic_mul2x2` applies the sutra to 2-bit operands directly:

```
q0      = a0 b0                (vertical)
c1 q1   = a1 b0 + a0 b1        (crosswise)
q3 q2   = c1 + a1 b1           (vertical)
```

It uses four AND gates and two half adders. The general column form, for
4 x 4 bits, follows the same pattern: step k adds the carry of step k-1 to
every `ai bj` with `i + j = k`, keeps the LSB as product bit k, and passes
the rest on as the carry. The 4x4 block here does not use the column form.
It uses the 2x2-plus-adders tree.

## Modules

| file | module | what it is |
|------|--------|------------|
| `rtl/full_adder.sv` | `full_adder` | sum = XOR3, carry = majority |
| `rtl/half_adder.sv` | `half_adder` | sum = XOR, carry = AND |
| `rtl/rca.sv` | `rca #(WIDTH=4)` | WIDTH-bit ripple-carry adder, ports `a, b, ci, s, co` |
| `rtl/vedic_mul2x2.sv` | `vedic_mul2x2` | `a[1:0] * b[1:0] -> q[3:0]` |
| `rtl/vedic_mul4x4.sv` | `vedic_mul4x4` | `a[3:0] * b[3:0] -> s[7:0]` |
| `rtl/multi8x8.sv` | `multi8x8` (top) | `a[7:0] * b[7:0] -> p[15:0]` |

Only `rca` has a parameter. The multipliers use it at 4 and 8 bits and tie
its carry in to 0. The multipliers have fixed sizes. To go wider, say
16 x 16, repeat the pattern one level up: four `multi8x8`, three
`rca #(16)`, and the same carry merge. That level is not included here.

Timing: the output settles one ripple path after the inputs change. The
longest path runs through a 2x2 leaf, the three 4-bit adders of a 4x4 block
and then the three 8-bit adders. The tree is not pipelined; registers would
have to be added around it, or between the product and adder stages.

## Where this RTL departs from, or adds to, the architecture

- **`ca2`**: the architecture's block diagrams show where `ca1` enters the
  third adder but give `ca2` no bit position. This RTL ORs `ca2` into the
  same bit as `ca1`, as argued above.
- **Adder count**: three adders per level, as the block diagrams draw. A
  shorter description of the same step counts only two.
- **Operand order on the third adder**: `ca1` sits at bit h and the
  zero padding above it. This follows the arithmetic, since the diagram
  prints no bit numbers there.
- **2x2 leaf**: its internals (two half adders) are this design's choice,
  derived from the sutra's step equations.
- **Adder cells**: textbook full adders; the carry inputs of all adders are
  tied to 0.
- **Names**: `multi8x8` with `a, b, p` matches the top-level symbol. The
  4x4 block is `vedic_mul4x4` with `a, b, s`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints one line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | coverage |
|-----------|----------|
| `tb_full_adder` | all 8 input cases |
| `tb_rca` | 4-bit and 8-bit adders, every `a, b, ci` (131,585 checks), carry out seen at both sizes |
| `tb_vedic_mul2x2` | all 16 operand pairs |
| `tb_vedic_mul4x4` | 14 x 10 = 140, 14 x 5 = 70, then all 256 pairs; requires both `ca1` and `ca2` cases to occur |
| `tb_multi8x8` | 102 x 195 = 19890, 174 x 211 = 36714, then all 65,536 pairs; requires `ca1` and `ca2` cases at both the 8x8 level and inside a 4x4 block |

The reference is the integer product (or sum) computed in the testbench.
The carry-case counts come from the operands, not from probes into the
design: at the 4x4 level, `ca1` is `AH*BL + AL*BH >= 16`. In the full
8x8 run the counts are ca1 = 2994 and ca2 = 524 at the top level, and 256
and 1024 inside the high 4x4 block. The 8x8 testbench is exhaustive at
full size and runs in well under a second.

To run one with plain Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_multi8x8 tb/tb_multi8x8.sv
./obj_dir/Vtb_multi8x8
```

For a lint pass: `verilator --lint-only -Wall -Irtl -y rtl rtl/multi8x8.sv`.
The design contains no vendor primitives and is plain synthesizable
SystemVerilog.
