// lut_multipliers_top: the exact LUT-based 8x8 multipliers side by side.
//
// The unsigned multiplier (u_a * u_b -> u_product) and the signed Baugh-Wooley
// multiplier (s_a * s_b -> s_product, two's complement) have independent operand
// ports and share the clk/reset pins of their block symbols. Both are combinational
// by default; OUT_REG = 1 registers both products (one cycle latency, synchronous
// active-high reset), an option of this design rather than of the reference.
module lut_multipliers_top
  import mult_pkg::*;
#(
  parameter bit OUT_REG = 1'b0
) (
  input  logic     clk,
  input  logic     reset,
  input  operand_t u_a,
  input  operand_t u_b,
  output product_t u_product,
  input  operand_t s_a,
  input  operand_t s_b,
  output product_t s_product
);

  accurate_unsigned_mult_8x8 #(.OUT_REG(OUT_REG)) u_unsigned (
    .clk(clk), .reset(reset), .a(u_a), .b(u_b), .product(u_product)
  );

  accurate_signed_mult_8x8 #(.OUT_REG(OUT_REG)) u_signed (
    .clk(clk), .reset(reset), .a(s_a), .b(s_b), .product(s_product)
  );

endmodule
