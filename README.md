# Hybrid Wallace tree multiplier with 4:2 compressors

An unsigned 16 x 16 → 32-bit combinational multiplier. The hard part of any
multiplier is adding up its partial products. Here the sixteen partial products
are reduced to two numbers by a Wallace tree. The tree is built only from 4:2
compressors, which work in carry-save form. Only the last addition of those two
numbers uses a carry-propagate adder, a plain ripple carry adder. "Hybrid" means
this mix: a fast, carry-free tree for the bulk of the work and a small, simple
adder for the final step.

```
 a[15:0] ─┐
          ├─► ppg ──16 x 32b──► wallace_tree_4_2 ──sum, carry──► rca (32b) ──► p[31:0]
 b[15:0] ─┘   (AND array)       (7 rows of 4:2 compressors,     (ripple carry)
                                 3 levels: 4 → 2 → 1)
```

There is no clock, register or handshake. `p` is valid one combinational
delay after `a` or `b` changes.

## The 4:2 compressor (`compressor_4_2`)

A 4:2 compressor takes four bits `x1..x4` of the same weight, plus a carry-in
`ci` from the bit position just below. It returns a sum bit `s` of the same
weight and two bits of double weight, `c` and `co`:

    x1 + x2 + x3 + x4 + ci = s + 2·(c + co)

This version is built from XOR gates and 2:1 multiplexers:

    s  = x1 ⊕ x2 ⊕ x3 ⊕ x4 ⊕ ci
    c  = (x1⊕x2⊕x3⊕x4) ? ci : x4
    co = (x1⊕x2)       ? x3 : x1

`co` is the majority of `x1, x2, x3`. It does **not** depend on `ci`. That is
why the compressor is "carry free": when compressors sit side by side, the
carry-out of bit *i* enters bit *i+1* and stops there. It never ripples
further. The longest path is three XORs and a multiplexer.

In the port list, `x[0..3]` are `x1..x4`. The symbol for the cell shows
inputs X0..X3, a carry C1 coming in from the lower bit, a carry C0 going out
to the higher bit, and outputs C and S. These map to `x`, `ci`, `co`, `c`
and `s`.

## Compressor rows and carry alignment (`csa_4_2`)

`csa_4_2` is a row of W compressors, one per bit. It adds four W-bit words in
carry-save form. The `co` of bit *i* drives the `ci` of bit *i+1*. The row's
own `ci` enters bit 0, and its `co` leaves bit W−1:

    x0 + x1 + x2 + x3 + ci = s + 2·c + 2^W·co

The carry vector `c` comes out **unshifted**: bit *i* of `c` has weight
2^(i+1). Whoever uses the row must shift `c` left by one place. The tree does
this between levels.

## The tree (`wallace_tree_4_2`)

There are seven compressor rows, all W bits wide, in three levels:

| level | rows | inputs                                           | outputs   |
|-------|------|--------------------------------------------------|-----------|
| 1     | 4    | operands 4j … 4j+3                               | 8 vectors |
| 2     | 2    | the (sum, carry≪1) pairs of level-1 rows 2k, 2k+1 | 4 vectors |
| 3     | 1    | the pairs of both level-2 rows                   | 2 vectors |

The outputs are `sum` and `carry`, already aligned, with `sum + carry` equal
to the sum of the 16 operands mod 2^W. Every row's carry-in is 0. Carries
that pass bit W−1 are dropped. For the multiplier this loses nothing: each
row adds a subset of the partial products, so its true total fits in 2N bits,
and then the dropped bits are always 0. The tree's delay is three compressor
delays, whatever the width.

The number of operands is fixed at sixteen, the tree drawn for this design.
`carry[1:0]` is always 0. Bit 0 is zero because of the final shift. Bit 1 is
zero because the last row's bit-0 compressor has carry-in 0 and its `x4` input
is bit 0 of a shifted carry vector, which is 0; its `c` output then selects 0
either way.

## Partial products (`ppg`) and final adder (`rca`, `full_adder`)

`ppg` is an N x N AND array. Partial product *i* is `a & {N{b[i]}}`, shifted
left by *i* inside a 2N-bit word. There is no Booth recoding, because the
operands are unsigned. The bits below and above each shifted product are
constant zeros.

`rca` is a chain of W `full_adder` cells. Each cell's carry-out is the next
cell's carry-in, with `cin` into bit 0 and `cout` out of bit W−1. The
multiplier uses it at 32 bits with `cin = 0`. The product always fits, so
`cout` is always 0 and is left unused. The ripple through 32 cells is the
longest path in the design.

## Top level (`hybrid_multiplier`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 16 | operand width; the product is 2N bits |

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a` | in  | N  | multiplicand, unsigned |
| `b` | in  | N  | multiplier, unsigned |
| `p` | out | 2N | product `a * b` |

`N` can be 1 to 16; an elaboration-time assertion rejects other values. When
N < 16, only N tree inputs carry partial products and the rest are tied to 0.
For N > 16 you would need a bigger tree, such as a fourth level of 4:2 rows
for up to 64 operands.

## What follows the source design and what is this implementation's own

These parts follow the source design:
- the three stages: partial products, a 4:2 compressor Wallace tree, and a
  ripple carry final adder;
- the 16-bit operands and 32-bit product;
- the 4 → 2 → 1 arrangement of seven compressors;
- the sum and `c` equations of the compressor;
- the full-adder chain of the final adder.

These are this implementation's own choices:
- **The compressor's carry-out.** The `co` equation used here is the standard
  multiplexer form of the XOR/MUX compressor. It picks `x1` when
  `x1 = x2`, and otherwise `x3`. A form where both arms select `x3` reduces
  to `co = x3`, and that miscounts: x1 = x2 = 1, x3 = 0 would lose a carry.
- **Operand count.** The tree has sixteen inputs, as in its drawing. A
  nine-operand tree mixing 3:2 and 4:2 compressors is also described for
  Wallace trees in general; it is not what is built here.
- **Alternatives not built.** The older 4:2 compressor made from two full
  adders and the half adder are not built.
- **Smaller choices.** These include pre-shifted 2N-bit partial-product
  words, carry-in 0 on every tree row, dropping carries past the top bit, and
  allowing N below 16.
- **Timing.** There are no registers. The reported speed is a combinational
  path delay of about 8.8 ns for the 16 x 16 multiplier. That is a
  gate-level figure for a particular technology, and RTL simulation does not
  check it.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_full_adder` | all 8 input combinations |
| `tb_compressor_4_2` | all 32 input combinations: the counting identity, the parity sum, and that `co` ignores `ci` |
| `tb_csa_4_2` | 32-bit row on corner and 20 000 random cases; 2-bit row exhaustively |
| `tb_wallace_tree_4_2` | 16 x 32-bit operands: zeros, all ones, each input alone, and random operands, both small and full range |
| `tb_ppg` | each partial product and their sum, 16 x 16 |
| `tb_rca` | 32-bit corner cases (including a carry through all stages) and random cases; 4-bit exhaustively |
| `tb_hybrid_multiplier` | the top at its default size: corners, all 256 pairs of powers of two, 100 000 random products |
| `tb_hybrid_multiplier_small` | the top at N = 4 and N = 8, every operand pair |

`tb_hybrid_multiplier` also counts how often three things happen, and fails
if any never does:
- the tree hands a non-zero carry vector to the final adder;
- a last-level compressor passes a carry to its neighbour;
- the final adder ripples a carry through 8 or more stages.

It reads those internal signals hierarchically, through `dut.t_sum`,
`dut.t_carry` and `dut.u_tree.u_csa_l3.k`. If you rename them, update the
testbench.

The expected values come from integer arithmetic in the testbench, never from
the design.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_hybrid_multiplier tb/tb_hybrid_multiplier.sv
./obj_dir/Vtb_hybrid_multiplier
```

Swap in another testbench name to run a single block. Each test finishes in
well under a second.
