# Residue-to-binary converter for {2^n − 1, 2^n, 2^n + 1} using the core function

A residue number system (RNS) carries an integer X as its remainders modulo a few co-prime
moduli. With the moduli 2^n − 1, 2^n and 2^n + 1, addition and multiplication run
carry-free on three short words. Getting X back out (reverse conversion) is the costly step,
and every RNS datapath needs it. This design does that conversion with one multi-operand
adder modulo 2^(2n) − 1. It has no multiplier, no lookup table and no division.

Inputs are the residues x1 = |X| mod (2^n−1), x2 = |X| mod 2^n and x3 = |X| mod (2^n+1). The
output is X in 0 … M−1, with M = 2^n (2^(2n) − 1). The RTL is combinational and
parameterised in n. The default is n = 3 (moduli 7, 8, 9, M = 504).

## The idea: a core function that equals the upper bits of X

A core function of X is a weighted sum of floor(X / m_i) over the moduli. Choose the weights
(0, 1, 0), which weight only the 2^n modulus. Then

    C(X) = floor(X / 2^n)        and so        X = 2^n · C(X) + x2.

The lower n bits of X are x2 itself, and the upper 2n bits are the core. The remaining problem
is to compute C(X) from the residues. The Chinese remainder theorem for core functions gives C(X)
as a weighted residue sum modulo C(M) = (2^n−1)(2^n+1) = 2^(2n) − 1. With these weights the
coefficients come out as sums and differences of powers of two:

    C(X) = | x1·(2^(2n−1) + 2^(n−1))  −  x2·2^n  −  x3·2^(2n−1)  +  x3·2^(n−1) |  mod 2^(2n)−1

Modulo 2^(2n) − 1, multiplying by 2^k rotates a 2n-bit word left by k, and negating it is the
bitwise complement. So every term is a rotated, and maybe inverted, copy of a residue. C(X) is
never a "critical core": it stays in 0 … 2^(2n) − 2 for every X in range. No range
correction is needed.

## Operand formation (`r2b_operand_gen`)

This is the part to understand. The sum above becomes five 2n-bit vectors, formed only by
wiring and 2n + 1 inverters:

| vector | value modulo 2^(2n)−1 | bits (MSB … LSB) |
|---|---|---|
| op_a | x1·(2^(2n−1) + 2^(n−1)) | x1[0], x1[n−1:0], x1[n−1:1] |
| op_b | (2^(2n)−1) − x2·2^n | ~x2, then n ones |
| op_c | low half of (2^(3n)−1) − x3·2^(2n−1) | ~x3[0], then 2n−1 ones |
| op_d | x3·2^(n−1) | x3[n:0], then n−1 zeros |
| op_e | upper bits of that C term, plus constant 2^(2n)−2^n | n ones, ~x3[n:1] |

- **op_a.** The two copies of x1 do not overlap once x1·2^(2n−1) has wrapped. The
  whole x1 term is therefore one operand.
- **op_b.** Subtracting x2·2^n is done by adding its one's complement.
- **op_c and op_e.** Subtracting x3·2^(2n−1) uses the 3n-bit complement {~x3, 2n−1 ones}. Its n
  upper bits sit at 2^(2n) and above, and are folded back to bit 0. They overlap the ones in the
  low half, so they go to the last adder layer as separate end-around bits, in op_e.
- **Offsets.** The complements add fixed offsets, and the constant 2^(2n) − 2^n in op_e cancels
  them: (2^(2n)−1) + (2^(3n)−1) + (2^(2n)−2^n) ≡ 0. That constant fills exactly the upper half of
  op_e, where the folded bits are absent.

For n = 3 and the residues (6, 6, 6) of X = 6, the operands are 27, 15, 63, 24 and 60. Their sum
is 189 = 3·63 ≡ 0, so C = 0 and X = 8·0 + 6.

### The top bit of x3

The residue modulo 2^n + 1 needs n + 1 bits, and its top bit is set only for x3 = 2^n. A
tempting simplification drops the complement of that bit from the C term, with correction
constant 2^(2n) − 2^(n−1) (60 for n = 3). It is not valid. For x3 = 2^n that version gives a core
that is off by 2^(n−1). That is one X in every 2^n + 1, or 56 of the 504 values for n = 3.
This design keeps the bit, which changes the constant to 2^(2n) − 2^n (56 for n = 3). The
end-to-end testbench counts the x3 = 2^n case and requires it to pass at every size.

## Adders

- **`csa_eac`** is one carry-save row of 2n full adders modulo 2^(2n) − 1. The carry out of the
  top position has weight 2^(2n) ≡ 1, so it is wired into bit 0 of the carry vector
  (end-around carry, EAC). That costs no logic.
- **`csa_tree_eac`** stacks three such rows. Layer 1 adds op_a, op_b and op_c. Layer 2 adds
  op_d. Layer 3 adds op_e, the folded end-around bits and the constant. The result is 6n full
  adders, three full adders deep.
- **`cpa_mod`** adds the final sum and carry vectors. Its carry out is added back at bit 0. The
  result is then in 0 … 2^(2n) − 1, where all ones is a second code for zero. That code is
  mapped to 0, because the core feeds the binary output directly.

The delay is one inverter, three full adders and the modulo adder (two carry-propagate passes).
The cost is 6n full adders, 2n + 1 inverters and the final adder. For comparison, the best-known
CSA-based converters for this moduli set use about 4n full adders, plus 2n−1 AND/OR and 2n XOR
gates. They are about one full-adder delay faster. This design trades some area for a regular,
operand stage made only of wiring and inverters.

## Interface (`r2b_converter`, the top)

| port | dir | width | meaning |
|---|---|---|---|
| x1 | in | N | residue modulo 2^N − 1 (all ones is accepted as 0) |
| x2 | in | N | residue modulo 2^N |
| x3 | in | N+1 | residue modulo 2^N + 1 (values above 2^N are accepted as x3 − (2^N+1)) |
| core | out | 2N | C(X) = floor(X / 2^N) |
| x | out | 3N | X = {core, x2} |

The parameter is `N` (int unsigned, default 3, must be at least 2). There is no clock and no
reset. Register the inputs and outputs, or cut the path between `csa_tree_eac` and `cpa_mod`,
if the converter sits in a pipelined datapath.

Sizes used in testing:

| N | moduli | M | X width |
|---|---|---|---|
| 3 | 7, 8, 9 | 504 | 9 bits (default) |
| 5 | 31, 32, 33 | 32 736 | 15 bits |
| 16 | 65535, 65536, 65537 | 281 474 976 645 120 | 48 bits |

## Files

- `rtl/r2b_converter.sv`: top. Instantiates the three stages and concatenates X.
- `rtl/r2b_operand_gen.sv`: operand formation, described above.
- `rtl/csa_tree_eac.sv`: three-layer carry-save tree.
- `rtl/csa_eac.sv`: one carry-save layer modulo 2^W − 1.
- `rtl/cpa_mod.sv`: final adder modulo 2^W − 1.
- `tb/tb_*.sv`: one self-checking testbench per module.
- `tb/r2b_check.sv`: a helper that checks one converter instance over a range of X.

## Verification

Every testbench computes its expected values with integer arithmetic, not from the gate
equations. Each ends with `TB_RESULT checks=… failures=…`.

- `tb_csa_eac`: all 2^18 input triples at W = 6, and random triples at W = 32.
- `tb_cpa_mod`: all 4096 pairs at W = 6, and random and corner pairs at W = 32. It requires
  the end-around carry and the zero mapping to occur.
- `tb_csa_tree_eac`: random operand sets at n = 3 and n = 16.
- `tb_r2b_operand_gen`: every input bit pattern at n = 3, and most of them at n = 5. Each
  operand is checked against its arithmetic meaning, and the five together against
  floor(X/2^n).
- `tb_r2b_converter`, end to end:
  - every X at n = 3 and n = 5, and random X at n = 8 and n = 16;
  - the redundant residue codes, used at random;
  - the worked examples X = 6 (n = 3), X = 10253 (n = 5, residues 23, 13, 23, core 320) and
    X = 67998 (n = 16, core 1).
  A bit-level model counts the datapath events, and the test fails if any did not happen:
  x3 = 2^n, an end-around carry out of each CSA layer, the final adder's end-around carry, and
  the all-ones-to-zero mapping.
- `tb_r2b_converter_full`: the top at default parameters, over all 1024 input bit patterns.
  That is every X in 0…503 with every code of each residue.

Each testbench was also run against a copy of its module with one deliberate bug, and it
failed.

Run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        --top-module tb_r2b_converter tb/tb_r2b_converter.sv tb/r2b_check.sv rtl/*.sv
    ./obj_dir/Vtb_r2b_converter

Lint a module with `verilator --lint-only -Wall -Irtl rtl/r2b_converter.sv`.

## Where this design makes its own choices

- Operand C keeps the top bit of x3, and the correction constant is 2^(2n) − 2^n (see above).
- The operands are folded into the 2n-bit ring before the adder tree. The wide end-around bits
  of the C term share a vector with the constant.
- The assignment of operands to the three CSA layers is this design's own.
- The final adder makes zero unique (all ones → 0). It is built as an addition followed by an
  increment with the carry out. A faster parallel-prefix modulo adder can replace it without
  changing anything else.
- The converter is purely combinational. No pipelining is built in.
