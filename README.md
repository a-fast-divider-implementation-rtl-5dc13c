# Fourth-order Newton–Raphson divider with parallel powering units

This divider computes the quotient of two 24-bit normalised mantissas (the
IEEE single-precision significand with its hidden bit) in **one** fourth-order
Newton–Raphson step instead of several first-order ones:

    q = a/b = aX · [1 + e + e² + e³ + e⁴],      e = 1 − bX

Here X is a short reciprocal seed read from a 32-entry table. A chained
implementation forms e², e³ and e⁴ one after another with multipliers. This
one forms all three **side by side**, in dedicated squaring, cubing and
fourth-power units. Each unit adds up a *reduced partial-product array*
in about the time of one multiplication. A division therefore costs one table
lookup plus three multiply times:

1. lookup, then e = 1 − bX (a fused multiply-subtract) and a·X in parallel;
2. e², e³ and e⁴ in parallel;
3. S = 1 + e + e² + e³ + e⁴, then q = (aX)·S, the only full-width product.

The RTL puts one pipeline register after each of those three steps. It
accepts one division per clock cycle and returns it three cycles later.

## Why one step is enough

Since bX = 1 − e and (1 − e)(1 + e + e² + e³ + e⁴) = 1 − e⁵, the exact value of
the datapath is

    aX · S = (a/b) · (1 − e⁵)

So the relative error is e⁵, provided e is small and never negative. The seed
table makes sure of both:

* Address i is the 5 bits of b that follow its leading one, so it covers
  b ∈ [1 + i/32, 1 + (i+1)/32).
* The seed is the largest 6-bit X (format 0.xxxxxx, X ∈ [½,1)) that is at or
  below the reciprocal of the interval's upper end:
  `X = floor(2^11 / (32 + i + 1)) / 64`. The seed is therefore ≤ 1/b for
  every b it serves, and 0 ≤ e < 1.
* The top bit of X is always 1, so the table stores only the 5 bits below it.
  The ROM is 2⁵ × 5 bits. Its contents are computed at elaboration time by
  `nr4_div_pkg::seed_full`, so no data file is needed.

Over the whole table the worst e is 0.043 (≈ 2^−4.54). That gives
e⁵ < 2^−22.7. Every later truncation rounds down as well, so the result
**never exceeds a/b** and lies at most about 4 units of 2^−23 below it. The
largest gap measured over 4037 random divisions was 2.86 units. This is a
little short of a correctly truncated 24-bit quotient. With `M = 6` (a 64 × 6
table) the worst e⁵ falls below 2^−27.8.

## Number formats

| signal | width (N=24, M=5) | format | range |
|---|---|---|---|
| `a`, `b` | N = 24 | 1.23 | [1, 2), leading one required |
| seed X | M+1 = 6 | 0.6 | [½, 1) |
| e = 1 − bX | E_W = 25 (kept bits) | F = N+M = 29 fraction bits | < 2^−4 |
| e², e³, e⁴ | 50, 75, 100 | 58, 87, 116 fraction bits, exact | |
| a·X | F+1 = 30 | 1.29 | < 2 |
| S | F+1 = 30 | 1.29 | [1, 1.05) |
| `q` | N = 24 | 1.23, truncated | (½, 2) |

e is exact: b·X has exactly N+M fraction bits. Because e < 2^−4, its top 4
fraction bits are always zero and only the low 25 bits are carried.
`nr4_div_pkg::e_lead_zeros(M)` finds that count from the table at elaboration
time, so `E_W` adjusts itself when `M` changes. The powering units therefore
work on a 25-bit operand. Their own default width is 24.

`series_sum` truncates each power to F fraction bits before the addition. S is
then at most 3·2^−29 below the exact sum. `final_mult` multiplies the two
30-bit operands and keeps bits [58:35] of the product, which is q in 1.23
format. A quotient below 1 keeps only 23 significant bits. Normalising it is
left to the surrounding floating-point logic.

## The powering units: reduced partial-product arrays

This is the core of the design. Raising a W-bit operand a to the k-th power
with multipliers makes an array of W^k bit products. Each product is an AND of
k operand bits and sits in column (sum of the bit indices). Two facts shrink
the array a great deal:

* a bit ANDed with itself is itself (a_i·a_i = a_i);
* products that use the same bits in a different order are equal, so they can
  be merged into one term whose weight is the number of orderings.

A weight is built from shifted copies of the term. Weight 2 is one column to
the left; 3 = 2+1, 4 = <<2, 6 = 4+2, 12 = 8+4 and 24 = 16+8.

| unit | class of term | becomes | weight | column |
|---|---|---|---|---|
| `square_unit` | a_i a_i | a_i | 1 | 2i |
| | a_i a_j, i<j | a_i a_j | 2 | i+j |
| `cube_unit` | a_i a_i a_i | a_i | 1 | 3i |
| | a_i a_i a_j, j≠i | a_i a_j | 3 | 2i+j |
| | a_i a_j a_k, i<j<k | a_i a_j a_k | 6 | i+j+k |
| `pow4_unit` | a_i⁴ | a_i | 1 | 4i |
| | a_i³ a_j, j≠i | a_i a_j | 4 | 3i+j |
| | a_i² a_j², i<j | a_i a_j | 6 | 2i+2j |
| | a_i² a_j a_k, j<k, both ≠ i | a_i a_j a_k | 12 | 2i+j+k |
| | a_i a_j a_k a_l, i<j<k<l | a_i a_j a_k a_l | 24 | i+j+k+l |

The weights of each unit add up to W^k. The fourth-power table's two-pairs
class (weight 6) is easy to forget, but without it the result is wrong for
every operand with two or more set bits.

In the RTL, the reduced terms are written as **rows**. A row is all the terms
that differ only in their highest bit. It is the operand, masked to the bits
above some position, shifted, and gated by the AND of the lower bits. For
example, the four-different terms with lowest bits i<j<k form one row. It
holds the bits of a above position k, left in place and shifted left by
i+j+k, and it is zero unless a_i·a_j·a_k = 1. The row is added twice, shifted
by 3 and by 4, for weight 24 = 16 + 8. The `g_slice[i]` generate block holds the rows owned by
bit i. All the rows are added in one multi-operand sum, and synthesis turns
that sum into a compressor tree. At W = 25 the reduced fourth-power array has about
20,500 terms in about 2,950 rows. The unreduced array has 25⁴ = 390,625 bit
products.

## Interface and timing (`nr4_divider`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous, active-low; clears every stage |
| `in_valid` | in | 1 | `a`, `b` are taken at this rising edge |
| `a`, `b` | in | N | dividend and divisor mantissas, 1.(N−1), MSB must be 1 |
| `out_valid` | out | 1 | `q` is the result for the operands taken 3 edges earlier |
| `q` | out | N | quotient, 1.(N−1), truncated |

The pipeline never stalls: operands may be presented on every cycle, and idle
cycles are bubbles. An immediate assertion reports operands that lack their
leading one. Parameters: `N` (operand width, default 24) and `M` (table
address and word bits, default 5). The 1 − bX unit, the a·X multiplier and the
final multiplier are written as plain products and sums. How they are built
is left to synthesis.

After coarse synthesis (yosys, word-level) the default divider has about 5,300
cells, 362 flip-flop bits and a 160-bit ROM. The fourth-power unit alone
accounts for about 4,400 of the cells.

## What follows the design description and what is this design's own

Taken from the source description:

* the single fourth-order step and its data flow;
* the table rule (seed below 1/b so that 1 − bX ≥ 0);
* a table of about n/5 × n/5 bits;
* the fused multiply-subtract;
* the reduction rules of the squaring and cubing arrays;
* the weights 1, 4, 12 and 24 of the fourth-power array;
* the three-multiply-time latency;
* the 24-bit operand size.

This design's own choices:

* the exact number formats;
* the hidden top bit of the seed;
* which bits of b address the table;
* the two-pairs class of the fourth-power array, with weight 6;
* keeping e at 25 bits;
* truncating the powers to F bits in the sum;
* the 30 × 30-bit final product;
* the pipeline registers, valid flag and reset;
* writing the arrays as rows;
* the assertion.

Not built:

* sign, exponent, rounding and normalisation of a full floating-point divide;
* the "truncated higher-order terms" variant, in which the power units
  compute only the upper bits;
* the two baselines the design is measured against: a first-order
  Newton–Raphson divider that iterates one multiply–subtract–multiply loop,
  and a fourth-order divider that forms the powers with chained multipliers.

## Files

`rtl/`:

* `nr4_div_pkg.sv`: default sizes and the functions behind the seed table;
* `recip_rom.sv`: the seed table;
* `one_minus_bx.sv`: e = 1 − bX;
* `ax_mult.sv`: a·X;
* `square_unit.sv`, `cube_unit.sv`, `pow4_unit.sv`: the three powering units;
* `series_sum.sv`: S = 1 + e + e² + e³ + e⁴;
* `final_mult.sv`: (aX)·S;
* `nr4_divider.sv`: the top.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`:

* The powering units are checked against ordinary wide multiplication, with
  zero, all-ones, every one-hot operand and 1500 random operands.
* The table is checked against its rule at every address.
* `tb_nr4_divider` runs the full-size divider on about 4,000 divisions,
  issued in random bursts with idle cycles and a reset while operations are
  in flight. Each result is compared bit for bit with a reference model built
  from plain multiplications, and against a/b in real arithmetic. It checks
  the 3-cycle latency and reports how often each pipeline situation occurred.
  It runs in under a second.
* `tb_nr4_divider_m6` repeats that test with a 64 × 6 seed table (`M = 6`).
  The tolerance is tightened to 2 units. The largest gap measured there was
  1.03 units of 2^−23.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` at the end.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl rtl/nr4_div_pkg.sv \
        tb/tb_nr4_divider.sv --top-module tb_nr4_divider -Mdir obj_div
    ./obj_div/Vtb_nr4_divider

Any other testbench runs the same way; replace `tb_nr4_divider` with its
name. The package must come first on the command line. `-Irtl` lets Verilator
find the other modules. To try another size, set `N` or `M` on the
`nr4_divider` instance and the matching `N` and `M` localparams in the
testbench. Its reference model follows them.
