// accurate_signed_mult_8x8: exact 8x8 two's-complement multiplier using the
// Baugh-Wooley scheme, product = a * b as a signed 16-bit value.
//
// The bit matrix is the same as in the unsigned multiplier, but every partial product
// that pairs a sign bit with a non-sign bit (a7&b(m) for m < 7, a(n)&b7 for n < 7) is
// complemented, and the constant 2^8 + 2^15 is added (equation (7)). In the pair
// cells this gives four flavours: no product complemented, only the upper one
// (a(2p)&b7, k = 7), only the lower one (a7&b(k-1) in the last pair), or both
// (a6&b7 with a7&b6). The lone bits a1&b7, a3&b7, a5&b7 are complemented, a7&b7 and
// the a(2p)&b0 bits are not. The constant enters as the third operand of the
// ternary adder that sums rows 6 and 7.
//
// Interface and timing are as in accurate_unsigned_mult_8x8: combinational by
// default; OUT_REG = 1 (this design's own addition) registers the product with a
// synchronous active-high reset.
module accurate_signed_mult_8x8
  import mult_pkg::*;
#(
  parameter bit OUT_REG = 1'b0
) (
  input  logic     clk,
  input  logic     reset,
  input  operand_t a,
  input  operand_t b,
  output product_t product
);

  logic [3:0][6:0] x, z;
  logic [3:0]      lo, hi;
  product_t        prod_comb;

  for (genvar p = 0; p < 4; p++) begin : g_pair
    assign lo[p] = a[2*p] & b[0];
    // a(2p+1)&b7 is complemented unless it is the a7&b7 sign product
    assign hi[p] = (a[2*p+1] & b[OP_W-1]) ^ (p != 3);
    for (genvar k = 1; k < 8; k++) begin : g_col
      pp_pair_cell #(
        .INV_TOP(k == 7),   // a(2p)&b7
        .INV_BOT(p == 3)    // a7&b(k-1), k-1 < 7
      ) u_cell (
        .a_top(a[2*p]),   .b_top(b[k]),
        .a_bot(a[2*p+1]), .b_bot(b[k-1]),
        .x(x[p][k-1]),    .z(z[p][k-1])
      );
    end
  end

  pp_reduce_8x8 u_reduce (
    .x(x), .z(z), .lo(lo), .hi(hi), .corr(BW_CONST), .product(prod_comb)
  );

  if (OUT_REG) begin : g_reg
    always_ff @(posedge clk) begin
      if (reset) product <= '0;
      else       product <= prod_comb;
    end
  end else begin : g_comb
    assign product = prod_comb;
  end

endmodule
