# LUT-based exact 8x8 multipliers (unsigned and Baugh–Wooley signed)

FPGA DSP blocks are few and fixed in place. For small multiplications such as 8x8,
routing to them can cost more than the multiply itself. This RTL builds exact 8x8
multipliers out of soft logic only: six-input LUTs and the slice carry chain. The
design has three ideas:

1. **Partial products are added as they are made.** Each LUT6 takes two multiplicand
   bits and two multiplier bits. It forms the two partial products that share one
   column and adds them on the spot as a half adder. The sum comes out on `o6` and the
   carry on `o5`. So 28 LUTs turn the 64 AND terms into 56 sum/carry bits, plus 8
   single bits.
2. **Ternary adders reduce the rows.** A ternary adder uses one LUT per bit with the
   carry chain and adds three operands at once. Eight rows need two levels of them:
   three adders, then one. Counting the LUT stage as well, that is 3 stages. The
   formula `ceil(log3(M/2)) + 1` also gives 3 for M = 8.
3. **Signed multiplication uses the same matrix.** The Baugh–Wooley rewrite turns the
   negative partial products into complemented ones plus a constant. The signed
   multiplier is therefore the unsigned one with some LUT products inverted and the
   constant `2^8 + 2^15` added as one more adder operand.

Both multipliers are exact. They were checked against `a*b` for all 65536 operand
pairs.

## The partial-product bit matrix

Multiplicand bits are taken in pairs `(a0,a1)`, `(a2,a3)`, `(a4,a5)`, `(a6,a7)`. Pair
`p` and multiplier index `k = 1..7` give one LUT (`pp_pair_cell`). The LUT's two
products have the same weight `2p+k`:

```
p_top = a(2p)   & b(k)
p_bot = a(2p+1) & b(k-1)
x[p][k-1] = p_top ^ p_bot     weight 2p+k      (o6)
z[p][k-1] = p_top & p_bot     weight 2p+k+1    (o5)
```

Two products of each pair have no partner. `lo[p] = a(2p)&b0` sits at weight `2p` and
`hi[p] = a(2p+1)&b7` at weight `2p+8`. The 64 bits form eight rows, each zero outside
its span:

| row      | contents                          | columns          |
|----------|-----------------------------------|------------------|
| R(2p)    | `lo[p]`, `x[p][0..6]`, `hi[p]`    | 2p .. 2p+8       |
| R(2p+1)  | `z[p][0..6]`                      | 2p+2 .. 2p+8     |

Column 8 is the tallest, with 8 bits (`a1b7, z06, x15, z14, x23, z22, x31, z30`).
Columns 0 and 1 hold one bit each. `pp_reduce_8x8` adds the rows:

```
T0 = R0 + R1 + R2
T1 = R3 + R4 + R5
T2 = R6 + R7 + corr          corr = 0 (unsigned) or 0x8100 (signed)
product = T0 + T1 + T2       all modulo 2^16
```

### Signed: which products are complemented

The rule is Baugh–Wooley: a product that pairs a sign bit with a non-sign bit is
inverted. These are `a7&b(m)` with `m < 7`, and `a(n)&b7` with `n < 7`. In the LUT
cells this gives four cell flavours:

| pair p | k     | top `a(2p)&b(k)` | bottom `a(2p+1)&b(k-1)` |
|--------|-------|------------------|-------------------------|
| 0..2   | 1..6  | plain            | plain                   |
| 0..2   | 7     | inverted         | plain                   |
| 3      | 1..6  | plain            | inverted (`a7&b(k-1)`)  |
| 3      | 7     | inverted (`a6&b7`)| inverted (`a7&b6`)     |

The single bits `a1&b7`, `a3&b7` and `a5&b7` are inverted. `a7&b7` and every
`a(2p)&b0` stay plain. The constant `2^(N-1) + 2^(M-1) + 2^(N+M-1)` equals `2^8 + 2^15`
for 8x8. It becomes the third operand of the adder that sums R6 and R7. Column 8 is
already full in every row, so there is nowhere else to put it without an extra bit.

## The ternary adder and the carry chain

`ternary_adder` adds `x + y + z + ci` modulo `2^W`. Bit `k` uses one LUT6 with the
operand bits on `i0..i2`. Its input `i3` is the majority `m[k-1]` from the bit below,
and `i4` and `i5` are tied to 1. The LUT gives two outputs:

* `o5 = maj(x[k], y[k], z[k])`, which goes to the LUT of bit `k+1`;
* `o6 = x[k] ^ y[k] ^ z[k] ^ m[k-1]`, the propagate signal.

`carry_chain` is the slice's multiplexer/XOR chain:

```
sum[k]  = o6[k] ^ c[k]
c[k+1]  = o6[k] ? c[k] : di[k]      di[k] = m[k-1], di[0] = 0
```

This adds the XOR row of the three operands and the majority row shifted up by one, in
a single carry ripple. When `o6 = 0`, the XOR row bit and `m[k-1]` are equal, so
either one can serve as the generate input. The AND-OR form
`c[k+1] = g[k] | p[k]&c[k]` gives the same result with `g = di & ~p`.

## The LUT cell

`lut6_cell` is a LUT with six inputs and two outputs, configured by a 64-bit `INIT`:

```
o5 = INIT[{1'b0, i4..i0}]      (the LUT5)
o6 = i5 ? INIT[{1'b1, i4..i0}] : o5     (2:1 multiplexer steered by i5)
```

The cell is drawn as one LUT5 followed by a 2:1 multiplexer. Only its truth-table
behaviour is modelled here; the internal gates of that restructured LUT are not. Every
use in this design ties `i5 = 1`, so `o5` and `o6` carry two independent functions of
`i0..i4`. The `INIT` words are not written as literals. They are computed from the
cell functions by `pp_pair_init()` and `ternary_init()` in `mult_pkg`.

## Interfaces and timing

| module | ports |
|---|---|
| `accurate_unsigned_mult_8x8` | `clk`, `reset`, `a[7:0]`, `b[7:0]` → `product[15:0]` |
| `accurate_signed_mult_8x8`   | same, two's complement |
| `lut_multipliers_top`        | `clk`, `reset`, `u_a`, `u_b` → `u_product`; `s_a`, `s_b` → `s_product` |

By default (`OUT_REG = 0`) both multipliers are purely combinational from the operand
pins to the product, and `clk`/`reset` are unused. This follows the pad-to-pad
critical paths of the reference implementation. With `OUT_REG = 1` the product is
registered on the rising edge of `clk`. The latency is then one cycle, and `reset` is
synchronous and active high, clearing the product. This option is not part of the
reference design. The critical path runs through one partial-product LUT, two
ternary-adder LUT levels and two 16-bit carry ripples.

The top has no mode switch. The two multipliers sit side by side with their own
operand ports.

## Files

| file | contents |
|---|---|
| `rtl/mult_pkg.sv` | widths, `operand_t`/`product_t`, `BW_CONST`, LUT `INIT` builders |
| `rtl/lut6_cell.sv` | LUT6 cell (LUT5 + 2:1 mux) |
| `rtl/carry_chain.sv` | mux/XOR carry chain |
| `rtl/pp_pair_cell.sv` | partial-product LUT (two ANDs + half adder, optional inversions) |
| `rtl/ternary_adder.sv` | three-operand adder |
| `rtl/pp_reduce_8x8.sv` | row layout and the two adder levels |
| `rtl/accurate_unsigned_mult_8x8.sv`, `rtl/accurate_signed_mult_8x8.sv` | the multipliers |
| `rtl/lut_multipliers_top.sv` | both multipliers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`, then calls `$finish`. Each has a
watchdog. For example:

```
verilator --binary --timing --assert -y rtl --top-module tb_lut_multipliers_top \
    rtl/mult_pkg.sv tb/tb_lut_multipliers_top.sv
./obj_dir/Vtb_lut_multipliers_top
```

The package is named first, so it is compiled before the modules that import it.
`-y rtl` lets Verilator find the other modules by their file names. The testbenches
cover the following:

* `tb_lut_multipliers_top`: the top at default parameters. Both multipliers run over
  all 65536 operand pairs. The test counts each signed sign case (neg·neg, neg·pos,
  pos·pos, and −128·−128) and unsigned products that reach bit 15, and requires each
  to occur at least once. It runs in well under a second.
* The multiplier testbenches repeat the exhaustive check and also test `OUT_REG = 1`
  for reset and one-cycle latency. The signed one first replays the operand sequence
  `a = 2`, `b = 4, 6, …, 26`, with expected products `8 … 52`.
* `tb_ternary_adder`: exhaustive at W = 4, random and full-ripple cases at W = 16.
  `tb_carry_chain`: exhaustive 8-bit adds. `tb_pp_reduce_8x8`: random bit matrices.
  `tb_pp_pair_cell`, `tb_lut6_cell` and `tb_mult_pkg`: exhaustive truth tables.

## How far this follows the reference, and where it departs

These parts follow the reference:

* the operand pairing and bit positions of both bit matrices;
* the half-adder LUTs;
* the ternary adder built from LUT6 cells and a carry chain;
* the Baugh–Wooley equation and its constant;
* the three-stage count;
* the port names and the combinational timing.

These are this design's own choices:

* **How the rows are grouped into adders.** The reference does not say, so it is
  chosen here to meet the three-stage count.
* **LUT functions and input order.** The LUT input assignment and the exact LUT
  functions of the ternary adder (majority on `o5`, 4-input XOR on `o6`) follow the
  standard compressor-plus-carry-chain construction, which matches the drawn
  connections.
* **Cell types.** The reference names several LUT "types" without defining them. Here
  they differ only in which product they invert, derived from the Baugh–Wooley
  equation.
* **Adder width.** All adders are 16 bits wide with zero-padded rows; synthesis trims
  the constant bits. The design needs 28 partial-product LUTs plus one LUT per live
  adder bit. No effort was made to match the LUT count reported for the reference
  implementation.
* **`OUT_REG`** and its reset.

These parts of the reference are not implemented:

* **The approximate multipliers.** This covers the 4x2 approximate multiplier packed
  into one LUT6, the asymmetric 4x4 approximate multiplier built from it, the
  approximate ternary adder, and the approximate 8x8 multipliers built from those.
  Their truth tables and error behaviour are not specified. The quoted savings (up to
  26 % fewer LUTs and 51 % less delay than a vendor soft multiplier) belong to those
  designs, not to this RTL.
* **Booth encoding.** The signed multiplier's description mentions it in passing, but
  the design it describes is Baugh–Wooley on a non-Booth matrix. Baugh–Wooley is what
  is built.
* **The gate-level inside of the restructured LUT6 (one LUT5 plus multiplexers).** Only
  its function is modelled.
