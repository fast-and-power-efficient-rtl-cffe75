# 16x16 Array of Array multiplier (Urdhva Triyagbhyam)

A purely combinational 16 x 16 bit unsigned multiplier, built as a regular
hierarchy of identical stages instead of one large partial-product array.
Each stage multiplies N-bit operands by splitting them into halves and
forming four half-size products, two *vertical* (low x low, high x high) and
two *crosswise* (low x high, high x low), the "vertically and crosswise"
rule (Urdhva Triyagbhyam) of Vedic arithmetic, which is also the plain
four-product form of the Karatsuba-Ofman split. Three adders as wide as a
sub-product then put the four rows together. The recursion bottoms out in a
2x2 multiplier made of six gates.

```
aoa_mult16x16            16x16 -> 32   four vedic_8x8  + aoa_combine #(16)
 └ vedic_8x8              8x8  -> 16   four vedic_4x4  + aoa_combine #(8)
    └ vedic_4x4           4x4  -> 8    four vedic_2x2  + aoa_combine #(4)
       └ vedic_2x2        2x2  -> 4    gate equations
aoa_combine #(N)         three nbit_full_adder #(N)
nbit_full_adder #(W)     W full_adder_cell in a ripple chain
```

In total the 16x16 multiplier holds 64 2x2 blocks and 63 adders (48 of 4
bits, 12 of 8 bits, 3 of 16 bits), with no registers and no clock.
`p = a * b` is valid one combinational delay after `a` and `b` settle.

| level | instances | adders per instance | adder width |
|-------|-----------|---------------------|-------------|
| 16x16 | 1         | 3                   | 16          |
| 8x8   | 4         | 3                   | 8           |
| 4x4   | 16        | 3                   | 4           |
| 2x2   | 64        | -                   | -           |

## The 2x2 block

`vedic_2x2` computes the 4-bit product of two 2-bit numbers directly from
gates obtained from a K-map of the 16-row truth table:

```
p0 = a0 b0
p1 = a0 b1 xor a1 b0
p2 = a1 b1 and not (a0 b0)
p3 = a1 b1 and a0 b0
```

p3 is only set for 3 x 3 = 1001; p2 is set for 2x2, 2x3 and 3x2 but not for
3 x 3, hence the `not (a0 b0)`.

## Adding the four rows: `aoa_combine`

This is the part of the design that takes some thought. With `H = N/2`,
`a = {a1, a0}` and `b = {b1, b0}` (halves of H bits), the four sub-products
are N bits each:

```
cross_a = a0 * b1        vert_lo = a0 * b0
cross_b = a1 * b0        vert_hi = a1 * b1

a * b = vert_hi * 2^N + (cross_a + cross_b) * 2^H + vert_lo
```

Three N-bit adders evaluate this without any wider adder:

```
adder 1:  s1  = cross_a + cross_b                         carry cy1
adder 2:  t   = s1 + {H zeros, vert_lo[N-1:H]}            carry cy2
adder 3:  hi  = vert_hi + {H-1 zeros, cy1|cy2, t[N-1:H]}  carry unused

p[H-1:0]     = vert_lo[H-1:0]      (never touched by an adder)
p[N+H-1:H]   = t[H-1:0]
p[2N-1:N]    = hi
```

For the 16x16 level that is: p[7:0] straight from the low vertical 8x8
product, p[15:8] from the second 16-bit adder, p[31:16] from the third. The
operand of adder 3 is seven zeros, the merged carry bit, and the upper eight
bits of `t`.

Two carries have to be placed, and both weigh `2^(N+H)`, i.e. bit H of
adder 3's second operand:

* `cy1`, the carry out of the crosswise adder, which is set when the two
  crosswise products together overflow N bits (e.g. FFFF x FFFF at the top
  level);
* `cy2`, the carry out of adder 2, set when the low vertical product's upper
  half pushes `s1` over.

They are never set together. Each crosswise product is at most
`(2^H - 1)^2`, so when `cy1 = 1` the remaining `s1` is at most
`2^N - 2^(H+2) + 2`, and adding a value below `2^H` cannot reach `2^N`.
That is why a single OR gate merges them, and why the carry out of adder 3
can never be set (the product always fits in 2N bits). The OR is this
design's choice; an XOR or a half adder would do equally well, since the two
inputs are exclusive. An immediate assertion in `aoa_combine` flags any
simulation in which both carries are set.

## Adders

`nbit_full_adder #(WIDTH)` is a ripple chain of `full_adder_cell`s
(sum = xor, carry = majority). The ripple structure is this design's choice;
only "full adder cells" are prescribed. The critical path of the 16x16
multiplier therefore runs through a 2x2 block and a chain of ripple adders at
each level. Swapping in a faster adder means replacing `nbit_full_adder`
only; its ports (`a`, `b`, `cin`, `sum`, `cout`) stay the same.

## Interface of the top

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`  | in  | 16 | unsigned multiplicand |
| `b`  | in  | 16 | unsigned multiplier |
| `p`  | out | 32 | `a * b` |

All blocks have the same `a`, `b`, `p` interface at their own width, so
`vedic_4x4` or `vedic_8x8` can be used on their own.

## Where this RTL departs from, or goes beyond, the reference design

* The reference block diagrams send the crosswise adder's carry into the
  third adder without showing the bit it enters; here it enters at bit H of
  the second operand, ORed with adder 2's carry, as derived above.
* The width of the 8x8 level's adders (8 bits) is inferred from the pattern
  of the other two levels.
* The full adder cell and the ripple carry chain are this design's own.
* The reference work reports an FPGA implementation (a Spartan-3E
  xc3s100e, 404 slices, 716 four-input LUTs, 37.7 ns delay, compared with a
  radix-4 Booth multiplier). Nothing here targets a particular device; a
  generic synthesis of this RTL gives about 2100 simple gates (AND, OR, XOR,
  NOT) for the 16x16 multiplier. The Booth multiplier is a comparison
  baseline and is not included.

## Verification

Each block has a self-checking testbench in `tb/` that compares against the
integer product or sum and ends by printing
`TB_RESULT checks=<n> failures=<n>`:

| testbench | what it covers |
|-----------|----------------|
| `tb_nbit_full_adder` | 4-bit adder exhaustively (all a, b, cin); 16-bit adder on carry-chain corners and 2000 random sums |
| `tb_vedic_2x2` | all 16 inputs |
| `tb_vedic_4x4` | all 256 inputs |
| `tb_vedic_8x8` | all 65536 inputs |
| `tb_aoa_mult16x16` | corners, FFC0 x 0001, FFC0 x 0002, FFFF x FFFF, walking ones, 200000 random pairs; also counts how often the top-level `cy1` and `cy2` carries occur and fails if either never does |

The 16x16 testbench runs the design at its only size, in well under a
second. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_aoa_mult16x16.sv \
          --top-module tb_aoa_mult16x16
./obj_dir/Vtb_aoa_mult16x16
```

The 16x16 testbench reaches into `dut.u_comb.cy1`/`cy2` by hierarchical
name; keep those instance and signal names if you change the top.
