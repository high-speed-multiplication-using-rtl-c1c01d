# Urdhva-Tiryagbhyam Vedic multiplier, 32 x 32 bits

This is an unsigned 32 x 32 → 64-bit combinational multiplier. It is built on
*Urdhva Tiryagbhyam*, the "vertically and crosswise" rule of Vedic arithmetic.
All partial products and their column sums are formed at the same time. Only
after that are the carries added in. Larger multipliers are built from smaller
ones in a recursive hierarchy:

```
vedic_mul32 ── 4 x vedic_mul16 ── 4 x vedic_mul8 ── 4 x urdhva_mul (N = 4)
     │               │                  │
     └ ut_quad_combine (3 x ut_adder) at every level
```

The design has no clock, no registers and no reset. A product is valid one
propagation delay after the operands change. The 4x4, 8x8, 16x16 and 32x32
multipliers are each a module of their own, and each can be used alone.

## The vertically-and-crosswise rule

In decimal, 234 × 316 is worked one column at a time, from the right:

| column | products                  | sum | digit kept | carry |
|--------|---------------------------|-----|------------|-------|
| 0      | 4·6                       | 24  | 4          | 2     |
| 1      | 3·6 + 4·1                 | 22  | 2          | 2     |
| 2      | 2·6 + 3·1 + 4·3           | 27  | 7          | 2     |
| 3      | 2·1 + 3·3                 | 11  | 1          | 1     |
| 4      | 2·3                       | 6   | 6          | –     |

Column 0 uses only the "vertical" product of the last digits. The middle
columns use the "crosswise" pairs. The kept digits form the row 61724. Each
carry is written one place to its left, which gives the row 12220. One final
addition gives 61724 + 12220 = 73944. Every column sum depends only on the
operands, so all five can be formed at once.

`urdhva_mul` does exactly this in base 2, for N-bit operands:

1. **Column sums, in parallel.** Column k (k = 0 … 2N−2) counts the bit
   products `a[i] & b[k-i]`. A column holds at most N of them, so its sum
   needs `$clog2(N+1)` bits.
2. **Digit row and carry row.** Bit 0 of each column sum is the digit that
   stays in column k. The rest of the sum, `col_sum[k] >> 1`, is a carry
   worth 2^(k+1). It can be more than one bit wide: in a 4x4 block, a column
   can sum to 4 and carry 2.
3. **One final addition.** The digit row and every carry are added together
   to give `q`.

No carry ripples from column to column while the sums are formed. All the
carry propagation is in the final addition.

`urdhva_mul` takes a parameter `N`. Its default of 4 makes it the 4x4 leaf of
the hierarchy. It also works as a stand-alone NxN multiplier. The testbench
checks it exhaustively at N = 3, 4 and 8.

## Building a 2H x 2H multiplier from four H x H ones

Each `vedic_mulW` (W = 8, 16, 32) splits `a` and `b` into halves of
H = W/2 bits. It then multiplies the halves in the same vertical and
crosswise pattern, this time on half-words:

```
Q0 = a[H-1:0]  * b[H-1:0]      (vertical, low)
Q1 = a[W-1:H]  * b[H-1:0]      (crosswise)
Q2 = a[H-1:0]  * b[W-1:H]      (crosswise)
Q3 = a[W-1:H]  * b[W-1:H]      (vertical, high)
q  = Q3·2^W + (Q1 + Q2)·2^H + Q0
```

All four sub-products are computed in parallel. `ut_quad_combine` then
forms `q` with three adders. For the 32x32 level (H = 16) it works like this:

| adder | width | operands | result |
|-------|-------|----------|--------|
| left  | 48 | `{Q3, 16'b0}` + `{16'b0, Q2}` | `left_sum[47:0]` |
| right | 32 (+ carry) | `Q1` + `{16'b0, Q0[31:16]}` | `{right_co, right_sum}` |
| final | 48 | `left_sum` + `{15'b0, right_co, right_sum}` | `q[63:16]` |
| –     | –  | `Q0[15:0]` is passed straight through | `q[15:0]` |

Points worth knowing when changing this block:

- **The low H bits need no adder.** Nothing else has weight below 2^H, so
  `Q0[H-1:0]` is already the final low part of the product.
- **The right adder never actually carries out.** Q1 is at most (2^H−1)²
  and `Q0[2H-1:H]` is at most 2^H−2, so their sum is always below 2^(2H).
  The carry is still wired into the final adder, so the block stays correct
  if it is reused with other inputs.
- **The left and final adders cannot overflow.** For genuine partial
  products the result fits in 4H bits. An assertion in `ut_quad_combine`
  checks this. If you drive the block directly with arbitrary `q0..q3`
  values, the assertion can fire. This is intended, because such inputs are
  not products of H-bit halves.
- `ut_adder` is a plain `{co, s} = x + y`. The adder architecture is left to
  synthesis, which can map it to an FPGA's fast carry chain or to a
  prefix adder.

## Modules

| module | role | parameters | ports |
|--------|------|------------|-------|
| `vedic_mul32` | top: 32x32 multiplier | – | `a[31:0]`, `b[31:0]` → `q[63:0]` |
| `vedic_mul16` | 16x16 multiplier | – | `a[15:0]`, `b[15:0]` → `q[31:0]` |
| `vedic_mul8` | 8x8 multiplier | – | `a[7:0]`, `b[7:0]` → `q[15:0]` |
| `urdhva_mul` | NxN column-sum multiplier, the leaf | `N = 4` | `a[N-1:0]`, `b[N-1:0]` → `q[2N-1:0]` |
| `ut_quad_combine` | three-adder combiner | `H = 16` | `q0..q3[2H-1:0]` → `q[4H-1:0]` |
| `ut_adder` | adder with carry out | `W = 32` | `x`, `y[W-1:0]` → `s[W-1:0]`, `co` |

All operands and products are unsigned.

## How it relates to the original description

What follows the published method:

- The column rule, with carries collected and added at the end.
- The 32x32 organisation into four 16x16 multipliers and three adders, with
  the zero padding and the low-half bypass shown above.
- The four sizes 4x4, 8x8, 16x16 and 32x32, with their example products.

What is this design's own reading or choice:

- **The lower levels.** Only the 32x32 level is drawn in the original. The
  16x16 and 8x8 levels repeat the same structure, which is how the method
  describes its hierarchical scheme.
- **The leaf size.** The bit-level column rule is used at 4x4, the smallest
  size the method reports. To make it the leaf at another size, change `N`
  of the `urdhva_mul` instances in `vedic_mul8`.
- **The adders.** Their internal structure is not given, so they are written
  as `+`.
- **Numbers and timing.** The multiplier is unsigned and purely
  combinational.
- **Reversible gates.** The original results are labelled as a multiplier
  built from "reversible gates", but no gate type or mapping is given. This
  RTL uses ordinary logic, and it does not try to reproduce the published
  FPGA delay and area figures. For reference, those figures were 38.874 ns
  for the 32x32 multiplier on a Spartan-class device, and 128 I/O pins, which
  equals the 32 + 32 + 64 port bits here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_urdhva_mul` | exhaustive at N = 3, 4, 8; 9 × 6 = 54 |
| `tb_ut_adder` | 32-bit corner cases and 20,000 random pairs (carry out is required to occur); 8-bit exhaustive |
| `tb_ut_quad_combine` | 20,000 random 32-bit operand pairs, turned into half products; checks the low-half bypass and requires the final adder to carry |
| `tb_vedic_mul8` | all 65,536 operand pairs; 30 × 50 = 1500 |
| `tb_vedic_mul16` | corner cases and 100,000 random pairs; 650 × 760 = 494000 |
| `tb_vedic_mul32` | the full-size top: 7755 × 9425 = 73090875, corner cases and 220,000 random pairs |
| `tb_worked_examples` | each example product on the multiplier of its own size, plus 234 × 316 = 73944 |

`tb_vedic_mul32` also works out from the operands how often each carry path
is used, and fails if any of them is never used. The paths are: a 4x4
column carry of 2 or more, the final-adder carry at the 16x16 and 32x32
levels, the left adder carrying into the Q3 field, and a non-zero low-half
bypass.

Every reference value is computed with the simulator's own `*` or `+`, or
taken from the printed examples. None is taken from the design under test.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl tb/tb_vedic_mul32.sv --top-module tb_vedic_mul32
./obj_dir/Vtb_vedic_mul32
```

Every run takes well under a second. Lint is clean with
`verilator --lint-only -Wall -Irtl rtl/<module>.sv`.
