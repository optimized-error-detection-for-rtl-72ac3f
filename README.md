# Signed-digit residue checker for a multiply-add unit

A multiply-add unit computes `Z = A*B + C` on wide binary words (32-bit `A`
and `B`, 64-bit `C` and `Z`). To catch a wrong result while the unit runs, a
small checker works on residues modulo `m = 2^P + u`, with `P` much smaller
than the word width (8 here) and `u` either -1 or +1. It reduces the
operands to residues, computes `|a*b + c| mod m` from them, and compares that
with the residue of the actual result. If the two differ, the result is
wrong, or the checker has failed.

The checker does all its residue arithmetic in **signed-digit (SD)** form,
with digits -1, 0 and +1. An SD addition needs no carry chain: every output
digit depends on only three neighbouring digit positions. Modulo `2^P +- 1`,
the carry out of the top digit wraps around to digit 0, which also takes no
extra time. So one modulo-`m` addition has a fixed delay, whatever `P` is.
The checker's delay is the number of adder levels in its adder trees.

The same hardware works for both `m = 2^P - 1` and `m = 2^P + 1`. An input,
`u_sel`, picks which one at run time. Many errors that are a multiple of one
modulus are not a multiple of the other. Checking again with the other
modulus therefore catches more double-bit errors.

## Signed-digit residues

A digit takes two wires: bit 1 is the sign and bit 0 the magnitude.

| digit | code |
|:-----:|:----:|
| -1    | `11` |
| 0     | `00` |
| +1    | `01` |

`10` is never produced, and every cell reads it as 0. A `P`-digit SD number
`X = sum x_i 2^i` can take any value from `-(2^P-1)` to `2^P-1`. Most values
have several SD forms. `sd_pkg` defines the digit type `sd_digit_t` and small
digit helpers. It also defines the 2-bit `u_sel_t` enum:

* `U_MINUS` gives m = 2^P-1;
* `U_PLUS` gives m = 2^P+1;
* `U_ZERO` gives m = 2^P, which has no wrap-around.

The unused code `11` acts like `U_ZERO`. The checker is meant to run with
`U_MINUS` or `U_PLUS`. `U_ZERO` is there because the same adder handles a
power-of-two modulus for free; it only checks the low `P` bits of `Z`.

The residues in this design are **redundant**. A block's output is *some*
`P`-digit SD number congruent to the right answer modulo `m`. It is not
necessarily the canonical value in `0..m-1`. Nothing inside the checker needs
canonical form. The only place where this matters is the final zero test
(see below). If you read residues at the ports, reduce them yourself:
`value mod m`.

## The carry-free modulo-m adder (`mod_sd_adder`)

This is the core of the design. Every digit position has two cells.

**add 1 (`sd_add1`)** splits `x_i + y_i` into a transfer digit `c_i` and an
interim sum `s_i`, with `x_i + y_i = 2 c_i + s_i`. Sums of +-2 and 0 split in
only one way. A sum of +-1 can split in two ways. The cell picks the split by
looking at the digits one position down, `x_{i-1}` and `y_{i-1}`:

| x_i + y_i | lower digits both >= 0 | otherwise |
|:---------:|:----------------------:|:---------:|
| +2        | c=+1, s=0              | c=+1, s=0 |
| +1        | c=+1, s=-1             | c=0, s=+1 |
| 0         | c=0, s=0               | c=0, s=0  |
| -1        | c=0, s=-1              | c=-1, s=+1 |
| -2        | c=-1, s=0              | c=-1, s=0 |

If both lower digits are non-negative, the position below can only send a
transfer of 0 or +1, so `s_i` is pushed towards -1. Otherwise that transfer is
0 or -1, so `s_i` is pushed towards +1.

**add 2 (`sd_add2`)** forms `z_i = s_i + c_{i-1}`. The rule above makes sure
this sum never leaves {-1, 0, +1}, so the second stage produces no carry.

**End-around wrap.** `2^P = -u (mod m)`, so a transfer out of digit `P-1` is
worth `-u` units at digit 0. Digit 0 receives `c_{-1} = -u * c_{P-1}`. It also
uses `-u * x_{P-1}` and `-u * y_{P-1}` as its "lower digits" when it picks a
split. This keeps the no-overflow guarantee intact across the wrap.
Multiplying a digit by `-u` is one `sd_digit_mul`. For u = -1 the digit passes
unchanged, for u = +1 it is negated, and for u = 0 it becomes 0. In the last
case the top transfer is simply dropped, which gives modulo `2^P`.

Each output digit depends on digits `i`, `i-1` and `i-2`, taken cyclically.
The adder is `P` copies of a few gates and has the same depth for any `P`.

## Adder trees and where they are used

`mod_sd_adder_tree` adds `K` residues with a balanced binary tree of
`mod_sd_adder`s. It is stored heap-style, and unused leaves are tied to zero.
Its depth is `ceil(log2 K)` adders.

* **Binary to residue (`bin2res`).** The `W`-bit word is cut into `P`-bit
  chunks. Chunk `k` has weight `(-u)^k` modulo `m`, so for u = +1 every odd
  chunk is negated digit by digit. A chunk's bits are already SD digits
  (0 or +1), so the chunks go straight into a tree. With N = 32 and P = 8,
  `A` and `B` take 4 chunks (2 levels), `C` 8 chunks (3 levels) and `Z`
  9 chunks (4 levels).
* **Residue multiply (`res_mul`).** `a*b = sum_j b_j (a * 2^j) mod m`.
  Multiplying by `2^j` modulo `m` rotates `a` left by `j` digits. The digits
  that wrap around the top are multiplied by `-u`. Each rotated copy is
  multiplied digit by digit with `b_j`. The `P` partial products go into one
  tree of `log2 P` levels.
* **Residue product-sum (`res_product_sum`)** is `res_mul` followed by one
  more adder for `c`.

## Subtraction and the error flag (`res_error_detect`)

`E = |Z|m - z`. This is one more `mod_sd_adder` whose second input is the
predicted residue, negated digit by digit. Negating an SD number costs no
logic. Because `E` is redundant, "E = 0 mod m" has three forms:

* all digits 0; or
* when `u = -1` only, all digits +1 or all digits -1. These are `+-(2^P-1)`,
  i.e. `+-m`.

For `u = +1`, `|E| <= 2^P-1 < m`, so only all-zero means zero. The adder does
produce the all-+1 and all--1 forms; the testbench reaches them. `err` is 1
for every other `E`.

## The checked unit (`checked_mac`, top)

```
 a,b,c ──► product_sum ──► {z_carry,z} ──XOR fault_mask──► outputs z, z_carry
   │                                   │
   └──► residue_checker ◄──────────────┘ ──► e, err
        (bin2res x4, res_product_sum, res_error_detect)
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | N | operands, unsigned |
| `c` | in | 2N | addend, unsigned |
| `u_sel` | in | 2 | `U_MINUS` (m = 2^P-1), `U_PLUS` (m = 2^P+1) or `U_ZERO` (m = 2^P) |
| `fault_mask` | in | 2N+1 | XORed onto the result. Tie it to 0 in normal use. |
| `z`, `z_carry` | out | 2N, 1 | `A*B + C` and its carry out |
| `e` | out | P digits | the SD difference `E` |
| `err` | out | 1 | error detected |

Parameters: `N = 32` (operand width) and `P = 8` (residue digits). `P = 4`
also works. `N` need not be a multiple of `P`.

**Timing.** Everything is combinational. There is no clock and no reset; the
outputs follow the inputs after one combinational delay. If you need
pipelining, add registers around the instance.

**Carry out.** `A*B + C` can need `2N+1` bits. The binary unit keeps that
carry, and the checker converts all `2N+1` bits. If the carry were dropped,
every overflowing result would raise a false alarm.

**Fault injection.** `fault_mask` stands for a fault in the multiply-add
circuit. Both the outputs and the checker see the corrupted result. It exists
so that the checker can be exercised.

## What the checker catches

* Any single-bit error in `Z`: `2^k` is never a multiple of `2^P +- 1`.
* A double-bit error escapes only if `+-2^i +- 2^j` is a multiple of `m`. For
  m = 255, one such case is bits `i` and `i+8` changing in opposite directions.
  For m = 257, it is the same two bits changing in the same direction. A pair
  that escapes one modulus is usually caught by the other.
  `tb_checker_coverage` flips every pair of the 65 result bits for four
  operand sets (8320 double errors):

  | P | caught, u = -1 | caught, u = +1 | caught by either |
  |---|---------------:|---------------:|-----------------:|
  | 4 | 7337 | 7347 | 7870 |
  | 8 | 7870 | 7872 | 8135 |

  The pairs that escape both moduli change `Z` by a multiple of
  `(2^P-1)(2^P+1)`.
* A fault inside the checker usually makes `E` non-zero too, and so raises
  `err`. No testbench injects faults into the checker itself.

## Choices made in this RTL

* The split rule of `sd_add1` (table above) is the usual rule for this two-cell
  adder. The cell structure, the digit code and the end-around scheme follow
  the original design.
* The wrap factor is `-u`, so that the adder really works modulo `2^P + u`.
  Multiplying by `+u` instead would make the adder work modulo `2^P - u`.
* The internal structures of the binary-to-residue converter, the residue
  multiplier and the zero test are this design's own. They use only the SD
  adder and the 1-by-1 digit multiplier.
* Residues are redundant SD numbers, not canonical `0..m-1` values.
* All operands are unsigned. The multiply-add unit is a plain binary
  expression left to synthesis; how it is built is not the subject of the
  design.
* The design is purely combinational, `u` is a run-time input, and the carry
  out and `fault_mask` ports were added. The `U_ZERO` setting (m = 2^P) is
  an extra use of the same adder.
* Not provided: any conversion of residues back to binary. No area or delay
  figures for a particular cell library are given here.

## Files

| file | contents |
|------|----------|
| `rtl/sd_pkg.sv` | digit type, digit codes, `u_sel_t`, digit helpers |
| `rtl/sd_add1.sv`, `rtl/sd_add2.sv` | the two per-digit adder cells |
| `rtl/sd_digit_mul.sv` | 1-by-1 digit multiplier |
| `rtl/mod_sd_adder.sv` | modulo `2^P+u` SD adder |
| `rtl/mod_sd_adder_tree.sv` | tree of those adders |
| `rtl/bin2res.sv` | binary to SD residue |
| `rtl/res_mul.sv`, `rtl/res_product_sum.sv` | residue multiply and multiply-add |
| `rtl/res_error_detect.sv` | subtraction and zero test |
| `rtl/product_sum.sv` | the binary multiply-add being checked |
| `rtl/residue_checker.sv` | the complete checker |
| `rtl/checked_mac.sv` | top: multiply-add plus checker |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_checker_coverage.sv` | double-error coverage at P = 4 and P = 8 |

## Simulating

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<n>`. Each one computes its reference values on
its own terms: integer values of SD vectors, Horner's rule for `mod m` of
wide words, and shift-and-add for `A*B + C`. It does not reuse the RTL's
arithmetic. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/sd_pkg.sv \
    tb/tb_checked_mac.sv --top-module tb_checked_mac
./obj_dir/Vtb_checked_mac
```

Swap in any other testbench name. `tb_checked_mac` runs the top at its default
size (N = 32, P = 8), under all three moduli. It checks:

* fault-free results, including overflow with no false alarm;
* single-bit faults;
* random and 8-apart double-bit faults.

It also counts each behaviour and fails if one never happened: each modulus in
use, a carry out, a double error missed by one modulus, and such an error
caught by the other. Every testbench finishes in well under a second.
