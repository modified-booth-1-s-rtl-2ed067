# Radix-4 Booth multipliers for 1's complement and modulo 2^n-1 arithmetic

A radix-4 (modified) Booth multiplier halves the number of partial products.
In 2's complement it has an awkward side: a negative digit means "complement
the multiplicand and add 1". Those +1s are usually pushed into extra bits of
the adder array or into the final adder. That breaks the regularity of the
array and makes it hard to pipeline.

In 1's complement arithmetic, negation is the complement alone, with no +1 to
add. This RTL implements two Booth multipliers built on that fact:

- **`ones_comp_booth_mult`**: an N x N **1's complement** multiplier with a
  (2N-1)-bit 1's complement product. Intended as a regular, easily pipelined
  core, for example for floating-point mantissas.
- **`mod2n1_booth_mult`**: an N-bit **modulo 2^N-1** multiplier (modulo 255
  for N = 8). This is the 2^n-1 channel of a residue number system.

Neither needs a correction term. Every row of the partial-product array is
the same. Both share the same encoder, selector, carry-save array and final
adder:

```
   multiplier b ──► booth_encoder (one per digit) ──┐ 3-bit bus {1x, 2x, Sign}
                                                    ▼
   multiplicand a ──► booth_selector (one per partial-product bit)
                                                    │ NPP partial products, W bits
                                                    ▼
                      eac_csa_array  (half-adder row, then full-adder rows;
                                      every row's top carry wraps to bit 0)
                                                    │ sum, carry (W bits each)
                                  [optional register: PIPELINE = 1]
                                                    ▼
                      eac_adder      (end-around-carry adder)  ──► product
```

## Why the sign bit can be recoded like any other bit

An N-bit 1's complement number b = b(n) b(n-1) … b(0), with n = N-1, has the
value −b(n)·(2^n − 1) + Σ b(k)·2^k. Write −b(n)·(2^n − 1) as
−b(n)·2^(n+1) + b(n)·2^n + b(n). The usual radix-4 regrouping then gives

    b = Σ_i 4^i · ( b(2i-1) + b(2i) − 2·b(2i+1) ),   with b(-1) = b(n)
                                                      and b(n+1) = b(n).

In 2's complement the lowest triplet uses b(-1) = 0. **Here, b(-1) is the
sign bit.** The extra "+b(n)" of 1's complement enters the lowest digit
instead of becoming a separate correction. Each digit is in
{−2, −1, 0, +1, +2}. An 8-bit multiplier gives four digits, from the triplets
(b1 b0 b7), (b3 b2 b1), (b5 b4 b3) and (b7 b6 b5).

`booth_encoder` turns a triplet (b(2i+1), b(2i), b(2i-1)) into three wires:

| triplet | digit | one (1x) | two (2x) | neg (Sign) | partial product word |
|---------|-------|----------|----------|------------|----------------------|
| 000     | 0     | 0        | 0        | 0          | all zeros            |
| 001, 010| +1    | 1        | 0        | 0          | A·4^i                |
| 011     | +2    | 0        | 1        | 0          | A·2·4^i              |
| 100     | −2    | 0        | 1        | 1          | complement of A·2·4^i|
| 101, 110| −1    | 1        | 0        | 1          | complement of A·4^i  |
| 111     | 0     | 0        | 0        | 1          | all ones (−0)        |

`booth_selector` makes one partial-product bit from these wires:
pp = ((a_i & one) | (a_(i-1) & two)) ^ neg. The two multipliers differ only
in which multiplicand bits are wired to a_i and a_(i-1).

## Forming partial products without adders

**1's complement (`ones_comp_booth_mult`).** You multiply a 1's complement
number by 2^k by shifting it left k places. Unlike 2's complement, the k
vacated low bits are filled with copies of the sign bit, not zeros:

    A·2^k = a(n) … a(0) a(n) … a(n)      (k copies of a(n) at the bottom)

Each partial product is therefore A shifted left by 2i (1x) or 2i+1 (2x).
The sign bit fills the bits below and above it, out to W = 2N−1 bits.
Column j of digit i takes a(j−2i) for 1x and a(j−2i−1) for 2x. Every index
outside 0..n reads a(n). For N = 8 there are four 15-bit partial products.
The product p14…p0 always fits: |a·b| ≤ (2^7−1)^2 < 2^14−1.

**Modulo 2^N−1 (`mod2n1_booth_mult`).** The operands are unsigned residues.
b gets a leading zero, so b(-1) = b(N) = b(N+1) = 0, and it has N/2+1 digits
(five for N = 8). Because 2^N ≡ 1 (mod 2^N−1), multiplying by 2^k is a
**left rotation by k mod N**. Column j of digit i takes a((j−2i) mod N) for
1x and a((j−2i−1) mod N) for 2x. Partial products are N bits wide and need
no sign extension. Complementing gives the negative modulo 2^N−1. All ones
is a second form of zero, both as an input and as an output.

## Adding with end-around carries

Both multipliers add modulo 2^W−1: W = 2N−1 for 1's complement, W = N for
the modulo unit. In that arithmetic a carry out of the top bit weighs 2^W ≡ 1.
So nothing is discarded: the carry goes back into bit 0.

- `eac_csa_array`: the first two partial products go into a row of half
  adders. Each further partial product gets a row of full adders. Each row's
  carry vector is rotated left by one, so the top column's carry lands in
  column 0 of the next row. The array ends in a sum vector and a carry vector
  whose sum, modulo 2^W−1, equals the sum of the partial products. The rows
  are identical, so registers can go between any two of them.
- `eac_adder`: adds the two vectors and adds the carry-out back in at bit 0.
  This is 1's complement addition and also modulo 2^W−1 addition; the same
  adder serves both multipliers. It is written in its simplest form: a binary
  adder, then an increment by the carry. The increment cannot overflow. Any
  faster end-around-carry adder with the same ports can replace it.

**Zero has two forms.** A sum of exactly 2^W−1 comes out as all ones:
negative zero, or the all-ones residue. Equality tests must treat all ones
as zero. A floating-point datapath needs a single zero. For that case,
`eac_adder` and `ones_comp_booth_mult` take `SINGLE_ZERO = 1`, which
replaces an all-ones result with all zeros. It is built as a W-input AND
that detects all ones after the sum, not folded into the carry logic. The
option is off by default.

## Timing and pipelining

Both multipliers take a `PIPELINE` parameter:

- `PIPELINE = 0` (the unit default): purely combinational.
  `out_valid = in_valid`, and `clk`/`rst_n` are unused.
- `PIPELINE = 1`: the sum and carry vectors are registered before the final
  adder. That is 2·(2N−1) = 30 bits for the 8x8 1's complement unit and
  2·N = 16 bits for the modulo 255 unit. The operands and `in_valid` are
  sampled on a rising `clk` edge. `p` and `out_valid` are valid during the
  following clock cycle. A new operation can start every clock.
  `rst_n` is an asynchronous active-low reset that clears the register and
  `out_valid`.

The cut before the final adder splits the delay into two similar halves when
the encoder/selector/array delay is close to the final adder's. Because the
array is regular, deeper pipelines only need more registers between rows.
This RTL builds only the single cut.

## Top level: `booth_mult_top`

`booth_mult_top` places the two multipliers side by side. They share `clk`
and `rst_n` and nothing else.

| parameter | default | meaning |
|-----------|---------|---------|
| `N_ONES`  | 8       | 1's complement operand width including sign; the product is 2·N_ONES−1 bits |
| `N_MOD`   | 8       | modulus is 2^N_MOD − 1 (255) |
| `PIPELINE`| 1       | register before both final adders |

| port | dir | width | |
|------|-----|-------|-|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `ones_in_valid`, `ones_a`, `ones_b` | in | 1, N_ONES, N_ONES | 1's complement operands |
| `ones_out_valid`, `ones_p` | out | 1, 2·N_ONES−1 | 1's complement product, one clock later |
| `mod_in_valid`, `mod_a`, `mod_b` | in | 1, N_MOD, N_MOD | residues modulo 2^N_MOD−1 |
| `mod_out_valid`, `mod_p` | out | 1, N_MOD | product modulo 2^N_MOD−1, one clock later |

The units also take any N ≥ 3 on their own, odd or even. The testbenches
cover N = 4, 5, 8, 16 and 32. The intended sizes are 4, 8, 16 and 32 bits:
16 and 32 bits for mantissa multiplication, and the 2^n−1 channel of an RNS
built from 2^n, 2^n−1 and 2^n+1 channels.

## Files

| file | contents |
|------|----------|
| `rtl/booth_pkg.sv` | `booth_digit_t` (the 3-wire encoder bus), digit-count functions |
| `rtl/booth_encoder.sv` | radix-4 digit encoder |
| `rtl/booth_selector.sv` | one partial-product bit |
| `rtl/eac_csa_array.sv` | end-around-carry carry-save array |
| `rtl/eac_adder.sv` | end-around-carry (1's complement / modulo 2^W−1) adder |
| `rtl/ones_comp_booth_mult.sv` | 1's complement multiplier |
| `rtl/mod2n1_booth_mult.sv` | modulo 2^N−1 multiplier |
| `rtl/booth_mult_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench computes expected results from integer arithmetic, not from
the RTL's structure. Each one prints `TB_RESULT checks=… failures=…` and has
a watchdog.

- `tb_booth_encoder`, `tb_booth_selector`: all input combinations.
- `tb_eac_adder`: W = 4 exhaustively, W = 15 randomly (also with
  `SINGLE_ZERO = 1`), with the end-around carry and negative zero exercised.
- `tb_eac_csa_array`: W/NPP = 15/4, 8/5 and 6/2, random words plus words
  that force top-column carries.
- `tb_ones_comp_booth_mult`, `tb_mod2n1_booth_mult`: N = 4, 5 and 8
  exhaustively, N = 16 and 32 with random and corner operands. For the 1's
  complement unit an N = 8 `SINGLE_ZERO = 1` instance is also checked: it
  must never return −0. A pipelined N = 8 instance takes a new operation
  every clock, with random idle clocks, and is checked for the one-clock
  latency.
- `tb_booth_mult_top`: runs the top at its default parameters. It feeds all
  65,536 operand pairs to both units in shuffled order and checks every
  result and its latency. It checks that outputs hold steady when new
  operands arrive between clock edges. It also counts how often each
  mechanism occurs: each digit kind (including the all-ones zero digit), the end-around carry
  of each final adder, negative-zero products, all-ones residues in and out,
  back-to-back issue and idle clocks. A mechanism that never occurs is a
  failure.

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/booth_pkg.sv \
          tb/tb_booth_mult_top.sv --top-module tb_booth_mult_top
./obj_dir/Vtb_booth_mult_top
```

Every testbench finishes in well under a second.

## Where this RTL goes beyond, or departs from, the reference design

- **Full-width array rows.** The 1's complement array has full 2N−1-bit
  rows. The reference 8x8 layout trims columns that hold only copies of the
  sign bit, so this array has more adder cells. The function is the same.
- **Encoder and selector logic** are written as equations (table above). The
  gate-level form is left to synthesis.
- **Final adder**: the simplest end-around-carry adder. The single-zero
  option only masks an all-ones result after the sum (see "Zero has two
  forms").
- **Pipelining**: the `PIPELINE` switch, the valid signals and the reset are
  additions of this RTL. The reference describes the register position but
  no control signals.
- **Area and delay** were not measured against any cell library.
