# 64-bit Vedic multiplier (Urdhva Tiryakbhyam)

A combinational 64 x 64 -> 128-bit unsigned multiplier built with the
"vertically and crosswise" (Urdhva Tiryakbhyam) rule of Vedic arithmetic.
An N x N product is not computed as one array of partial products. It is split
into four N/2 x N/2 products, and each of those is split again, down to 2 x 2
multipliers made of AND gates and half adders. Three adders at every level put
the four sub-products back together. The result is a regular tree of identical
building blocks:

```
top (a[63:0], b[63:0] -> out[127:0])
└── vedic_64x64          4 x vedic_32x32 + 64-bit adder + 2 x 96-bit adders
    └── vedic_32x32      4 x vedic_16x16 + 32-bit adder + 2 x 48-bit adders
        └── vedic_16x16  4 x vedic_8x8   + 16-bit adder + 2 x 24-bit adders
            └── vedic_8x8    4 x vedic_4x4 + 8-bit adder + 2 x 12-bit adders
                └── vedic_4x4    4 x vedic_2x2 + 4-bit adder + 2 x 6-bit adders
                    └── vedic_2x2    4 AND gates + 2 half_adder
```

In total the 64-bit multiplier holds 1024 `vedic_2x2` cells (2048 half adders,
4096 AND gates) and 1023 adders. There is no clock: `out` follows `a` and `b`
after the propagation delay of the tree.

## How one level combines its four sub-products

Write the N-bit operands as halves of H = N/2 bits: `a = AH*2^H + AL`,
`b = BH*2^H + BL`. Then

```
a*b = AH*BH*2^(2H) + (AH*BL + AL*BH)*2^H + AL*BL
```

Every `vedic_NxN` module computes this with four half-size multipliers and three
adders, wired in the same way at every level:

| instance | what it computes                                          | width    |
|----------|-----------------------------------------------------------|----------|
| z1       | p_ll = AL*BL                                              | 2H       |
| z2       | p_lh = AL*BH                                              | 2H       |
| z3       | p_hl = AH*BL                                              | 2H       |
| z4       | p_hh = AH*BH                                              | 2H       |
| z5       | s_low   = p_lh + {H'b0, p_ll[2H-1:H]}                      | N        |
| z6       | s_cross = {p_hh, H'b0} + {H'b0, p_hl}                      | 3N/2     |
| z7       | c[2N-1:H] = s_cross + {H'b0, s_low}                       | 3N/2     |
|          | c[H-1:0]  = p_ll[H-1:0], wired straight to the output     |          |

The table shows the 16x16, 32x32 and 64x64 levels. In `vedic_4x4` and
`vedic_8x8` the two crosswise products trade places: AH*BL goes to z5 (and
is made by z2), and AL*BH goes to z6 (made by z3). The sums are identical.

This is the least obvious part of the design. The low H bits of AL*BL are
already final bits of the product and bypass all adders. The upper half of
AL*BL is folded into one crosswise product in the N-bit adder z5. The other
crosswise product is folded into AH*BH in z6. z7 adds the two. Because
everything below bit H is already settled, the last two adders are only 3N/2
bits wide, not 2N.

None of the adders has a carry out, and none needs one:

- s_low <= (2^H-1)^2 + (2^H-1) = 2^N - 2^H < 2^N, so z5 cannot overflow.
- s_cross < 2^(3H) = 2^(3N/2), since it is at most (2^H-1)(2^(2H)-1).
- z7's sum equals a*b >> H, which is below 2^(2N-H) = 2^(3N/2).

For 64 bits this gives a 64-bit adder and two 96-bit adders. The 2 x 2 leaf is

```
c[0] = a0&b0
c[1] = (a1&b0) ^ (a0&b1)                  half adder z1, carry k
c[2] = (a1&b1) ^ k                        half adder z2
c[3] = (a1&b1) & k
```

## Files

All modules are in `rtl/`, one per file:

| module        | role |
|---------------|------|
| `top`         | 64-bit multiplier top: ports `a[63:0]`, `b[63:0]`, `out[127:0]`; holds one `vedic_64x64` named `dt` |
| `vedic_64x64` ... `vedic_4x4` | one level of the tree each, ports `a`, `b`, `c` (product) |
| `vedic_2x2`   | leaf multiplier: AND gates and two half adders |
| `half_adder`  | `s = x ^ y`, `c = x & y` |
| `add_n_bit`   | `answer = input1 + input2` mod 2^WIDTH, parameter `WIDTH` (default 96) |

Each level is its own module rather than one recursive parameterised module.
This keeps every level's adder widths and wiring visible in its own file.
Any `vedic_NxN` can also be used on its own as an N-bit multiplier.

## Interface and timing

- Operands and product are unsigned binary. No signed mode exists.
- The tree is purely combinational. It has no clock, reset, enable, valid or
  ready signals. To use it in a clocked design, register `a`/`b` and `out`
  around it. Its depth (log2(64) - 1 = 5 levels of adders, each with two adders
  in series, above the 2 x 2 cells) sets the clock period.
- Example: `a = 345`, `b = 678` gives `out = 233910`, with `out[127:32] = 0`.

## Choices made in this implementation

These points are not fixed by the multiplier's description and were decided here:

- **Adder architecture.** `add_n_bit` is a plain `+`. The design fixes only each
  adder's width and its place in the tree. Ripple-carry, carry-select or prefix
  adders all fit; synthesis picks one unless you replace the body of
  `add_n_bit`.
- **No registers.** No pipelining is specified, so none is added.
- **Instance names.** z1 to z7 follow the naming of the reference internal
  diagrams: z1 = AL*BL, z2 = AL*BH, z5 = N-bit adder, z6/z7 = the wide adders.
  Putting AH*BL in z3 and AH*BH in z4 is this design's choice. The 2 x 2 cell
  holds its three non-output bit products in `temp[2:0]` in an order chosen here.
- **Half adder pin names** `x`, `y`, `s`, `c` are this design's.

## Not included

The multiplier was presented as the multiply unit of a small arithmetic block,
in which add, subtract and multiply results go to a multiplexer under a control
unit. No operation encoding, widths or control behaviour were defined for that
block, so it is not part of this RTL. `top` is the multiplier alone.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
compares the module's outputs with products or sums the testbench computes
itself at full width. Each prints `TB_RESULT checks=N failures=M`, and a
watchdog stops the run with a failure if it hangs.

| testbench         | stimulus |
|-------------------|----------|
| `tb_half_adder`   | all 4 input pairs |
| `tb_add_n_bit`    | 6-bit instance exhaustive; 96-bit instance: all ones + 1, walking ones, 2000 random pairs |
| `tb_vedic_2x2`, `tb_vedic_4x4`, `tb_vedic_8x8` | every operand pair (exhaustive) |
| `tb_vedic_16x16`, `tb_vedic_32x32`, `tb_vedic_64x64` | corner operands (0, 1, all ones, MSB only, half all ones), every pair of single-bit operands, 20000 random pairs |
| `tb_top`          | full-size 64-bit end-to-end test: the 345 x 678 example, corners, all 4096 single-bit pairs, 20200 random pairs |

`tb_top` runs the top with no parameter changes. It also counts four
situations and fails if any never happened:

- the 345 x 678 example;
- products reaching `out[127:64]`;
- all-ones operands, where every adder carries across its full width;
- operands whose low halves are zero, so only the upper and crosswise
  sub-products contribute.

Each testbench was also run against a copy of its module with one deliberate
error, such as a wrong carry, a wrong adder input or a miswired operand. Each
such copy failed its testbench.

To simulate with Verilator, for example:

```
verilator --binary --timing -y rtl --top-module tb_top tb/tb_top.sv
./obj_dir/Vtb_top
```

The 64-bit top takes about half a minute to compile and well under a second to
run. Everything also lints cleanly with `verilator --lint-only -Wall`.
