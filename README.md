# GF(d^m) multiplier core from Modified Guild Cells

Elliptic-curve cryptography needs multipliers for large extension fields.
The usual choice is a binary field GF(2^n). A field GF(d^m) with an odd prime
characteristic d and about the same order is an alternative. This core
multiplies two elements of GF(d^m) in polynomial basis, in one combinational
pass. It is a regular matrix of one kind of cell, the **Modified Guild Cell
(MGC)**:

    S = (A + B * C) mod d        (A, B, C, S: one digit of GF(d) each)

The matrix needs one more small element, **F**, which computes
`(-G) mod d`. The design can be sized for any prime `d` and digit count `m`.
Each MGC can be built in three ways, and the three differ only in logic cost:

| variant | name in RTL | the MGC is built as |
|---|---|---|
| 1 | `MGC_WHOLE`  | one 3k-input function (a black-box truth table) |
| 2 | `MGC_MULADD` | a digit multiplier mod d (`MUL`) followed by a digit adder mod d (`SUM`) |
| 3 | `MGC_GATES`  | an array of bit cells: `SMn`, `SMch`, `Sn`, `Rn` and the `SUM_G` adder |

Here `k = ceil(log2 d)` is the width of one digit in bits. The top,
`gf_mul_core`, builds the same multiplier once in each of the three variants,
side by side on shared inputs. That makes the three easy to compare. Its
default field is GF(7^3).

## Number representation

- A **digit** is an unsigned `k`-bit number in 0..d-1. Codes d..2^k-1 are not
  valid. Nothing checks for them, and the outputs for them are unspecified.
- A **field element** is `m` digits packed into `m*k` bits. Digit `i`, the
  coefficient of x^i, sits at bits `[i*k +: k]`. For GF(7^3), `a[2:0]` is the
  constant term and `a[8:6]` is the x^2 coefficient.
- The **modulus** is a monic polynomial `x^m + p(x)`. Input `p` holds the `m`
  lower coefficients in the same layout. The leading 1 is implied.
  - The arithmetic is correct for any monic modulus.
  - The result is a product in a field only if the modulus is irreducible.
    Example: `x^3 + 5` over GF(7) is irreducible, because 2 is not a cube
    modulo 7.

## The multiplication matrix (`gf_multiplier`)

The matrix works in two parts. Both are built only from MGCs and F elements.

**Product part: m rows of m MGCs.** The 2m-1 coefficients c_0..c_{2m-2} of
`a(x)*b(x)` start at zero. Row `j` adds `a_i * b_j` into column `i+j`, for every
`i`, with one MGC per term:

    c_{i+j} <- (c_{i+j} + a_i * b_j) mod d      (MGC: A = c, B = a_i, C = b_j)

A column that a row does not touch passes straight through to the next row.

**Reduction part: m-1 rows, from the highest degree down.** For
`t = 2m-2` down to `m`:

1. Coefficient c_t is final by now: it gets no more contributions.
2. An F element turns it into `f = (-c_t) mod d`.
3. A row of m MGCs adds `f * p_i` into column `t-m+i`.

Together these add `f * x^(t-m) * (x^m + p(x))`, a multiple of the modulus.
That leaves the result unchanged modulo the modulus, and it makes c_t zero. It
works because the leading coefficient of the modulus is 1, so its top term
cancels c_t exactly. After the last row, columns 0..m-1 hold the result `r`.

**Cost.** The matrix uses `m^2 + m(m-1) = 2m^2 - m` MGCs and `m-1` F elements.
For GF(7^3) that is 15 MGCs and 2 F elements:

```
 product rows (MGC A + B*C)          reduction rows
 c4 c3 c2 c1 c0
        .  .  a0b0   row 0            F(c4) -> f4 : c3,c2,c1 += f4*p2,p1,p0
     .  a1b0 .       ...              F(c3) -> f3 : c2,c1,c0 += f3*p2,p1,p0
 a2b2 ...            row 2            result = c2 c1 c0
```

The longest path runs through about 2m-1 MGCs plus m-1 F elements. The core
has no registers.

**Counting differences.** The source publication's cost formulas count
`m^2 + (m-1)^2 = 2m^2 - 2m + 1` MGCs, which is 13 for m = 3. Its schematic of
the GF(7^3) multiplier shows 15 MGCs and 2 F elements, and this RTL follows the
schematic. That schematic also shows a 3-bit input `L` with connections that
cannot be traced. Here it is read as the zero digit that starts each product
column, and it is tied to zero inside the matrix instead of being a port.

## The three MGC constructions

All three compute the same function and can be exchanged freely. `gf_mgc`
picks one according to the `VARIANT` parameter.

**Variant 1, `mgc_whole`.** One arithmetic expression, `(a + b*c) % D`.
Synthesis turns it into a 3k-input function, which is the "black box" view of
the cell.

**Variant 2, `mgc_muladd`.** Two units of 2k inputs each:

- `u1_mul` (`mul_mod`) forms `b*c mod D`.
- `u2_sum` (`sum_mod`) adds `a` to it modulo D, with one conditional
  subtraction of D.

**Variant 3, `mgc_gates`.** This is the most involved construction. It works
in three stages of 1-bit cells:

1. **Product array, k rows of k `smn_cell`.**
   - Each cell computes `{co,s} = a + (b AND c) + ci`. This is a binary Guild
     cell with a carry input.
   - The partial sum starts as `a`. Row `j` adds `b AND c[j]`, shifted left by
     `j`, with a ripple carry that ends in bit `j+k`.
   - The result is the 2k-bit integer `x = a + b*c`. For valid digits
     `x <= d(d-1) < d * 2^k`.
2. **Non-restoring division by d, k rows of k+1 `smch_cell`.**
   - The partial remainder `r` is a (k+1)-bit two's-complement value. It starts
     as the top k bits of `x`, which is less than d.
   - Each row shifts in the next lower bit of `x`. It then adds d if `r` was
     negative, or subtracts d if not. Each `smch_cell` multiplexes between bit
     `i` of d and its inverse, and the carry-in of the row is 1 when
     subtracting.
   - An `sn_cell` (3-input XOR) on the top position gives the sign of the new
     remainder. That sign is the add/subtract select of the next row.
   - `r` stays within [-d, d), so k+1 bits are enough. The bit that drops out
     when shifting is redundant.
3. **Final correction.**
   - A ripple adder of k `sumg_cell` full adders forms `r + d`.
   - k `rn_cell` multiplexers take that sum when the last remainder is negative
     ("one more addition"). Otherwise they take `r`.

The source gives the roles of these cells. It gives their counts as about k^2
`SMn`, k^2 `SMch`, and k each of `Sn`, `Rn` and adder cells. How they are wired
is this design's own choice:

- ripple-carry rows;
- one extra `SMch` per row, which holds the sign;
- the multiplexer select polarities: select = 1 picks the divisor in `SMch`
  and the corrected bit in `Rn`.

Lint reports some outputs of this construction as unused: the top carry of
each division row, and the carry out of the correction adder. They are left
unused on purpose, because two's-complement arithmetic discards them.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `gf_mul_core`, `gf_multiplier` | `D` | 7 | field characteristic (a prime; `D = 2` gives a binary field) |
| `gf_mul_core`, `gf_multiplier` | `M` | 3 | extension degree, in digits per element |
| `gf_multiplier`, `gf_mgc` | `VARIANT` | `MGC_MULADD` | MGC construction (`gf_pkg::mgc_variant_e`) |
| all digit units | `D` | 7 | characteristic |

The defaults are the GF(7^3) worked example. The source compares costs for
these fields:

- GF(2^50), GF(3^32), GF(5^22), GF(7^18) and GF(13^14), all of order about
  10^15;
- GF(2^998) and GF(13^270), of order about 10^300.

Each of these is reached by overriding `D` and `M`. The large ones are very
large, for example:

| field | MGCs | gate-level cells |
|---|---|---|
| GF(2^998) | about 2.0 million | — |
| GF(13^270) | about 146 thousand | about 10 million |

## Files

- `rtl/gf_pkg.sv`: the variant enum and `digit_bits(d)`.
- `rtl/gf_mul_core.sv`: top, with the three variants side by side.
- `rtl/gf_multiplier.sv`: the MGC/F matrix.
- `rtl/gf_mgc.sv`: selects the MGC construction.
- MGC constructions and their units:
  - `rtl/mgc_whole.sv`
  - `rtl/mgc_muladd.sv`, with `rtl/mul_mod.sv` and `rtl/sum_mod.sv`
  - `rtl/mgc_gates.sv`, with `rtl/smn_cell.sv`, `rtl/smch_cell.sv`,
    `rtl/sn_cell.sv`, `rtl/rn_cell.sv` and `rtl/sumg_cell.sv`
- `rtl/f_elem.sv`: the F element.
- `tb/gf_ref_pkg.sv`: the reference model. It does schoolbook multiplication
  and then long division by the modulus, and shares no code with the RTL.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
  - The unit and cell benches are exhaustive over all valid inputs for
    d = 2, 3, 5, 7, 13 and 53.
  - `tb_gf_multiplier` runs random operands and moduli for GF(2^8), GF(3^5),
    GF(5^4), GF(7^3) and GF(13^3), in all three variants.
  - `tb_gf_mul_core` runs the top at its default size. It covers all 343 x 343
    operand pairs with the irreducible modulus `x^3 + 5`. It checks that every
    nonzero element has exactly one inverse, and then runs random moduli. It
    also counts that each mechanism happened: each F row producing a nonzero
    factor, a top coefficient needing no reduction, a `SUM mod d`
    wrap-around, and the gate-level final correction.
  - `tb_gf_workloads` runs two fields of the size compared in the source
    at full size, on random operands: GF(7^18) built with `MGC_MULADD`, and
    GF(13^14) built with `MGC_GATES`.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and then stops.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb rtl/gf_pkg.sv tb/gf_ref_pkg.sv \
    tb/tb_gf_mul_core.sv --top-module tb_gf_mul_core -o sim
./obj_dir/sim
```

Swap in another testbench name to run it. Lint a module alone with
`verilator --lint-only -Wall -y rtl rtl/gf_pkg.sv rtl/<module>.sv`.

To change the field, override the parameters, for example
`gf_mul_core #(.D(13), .M(14))`. Elaboration and C++ compile time grow quickly
with `M`. GF(7^18) and GF(13^14) together build in about two minutes. Fields
of order 2^998 are beyond what is practical to simulate.

## How far to trust it

- Every module is checked against an independent integer model:
  - cells and digit units exhaustively;
  - the matrix at GF(7^3) exhaustively, and at the other fields listed above on
    random operands.
- Each testbench was also shown to fail when the module under test has a
  deliberate bug.
- The core is combinational and has not been timed on any device.
- The source's LUT counts come from its own FPGA flow. They are not reproduced
  here.
- The source produces these multipliers with a generator program that
  minimizes truth tables with the Quine-McCluskey method. In this RTL that job
  falls to the `D`, `M` and `VARIANT` parameters and to the synthesis tool.
