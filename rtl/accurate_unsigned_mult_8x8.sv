// accurate_unsigned_mult_8x8: exact 8x8 unsigned multiplier, product = a * b.
//
// Partial-product stage: for each multiplicand pair (a(2p), a(2p+1)), p = 0..3, seven
// pp_pair_cell LUTs take a(2p)&b(k) and a(2p+1)&b(k-1), k = 1..7, which share weight
// 2p+k, and emit their half-adder sum and carry. The products a(2p)&b0 and
// a(2p+1)&b7 have no partner and pass on as single bits. pp_reduce_8x8 then sums the
// resulting eight rows with two levels of ternary adders.
//
// Interface: a, b, product as in the block symbol; clk and reset are kept from that
// symbol. With OUT_REG = 0 (default) the multiplier is purely combinational from the
// operand inputs to product, and clk/reset are unused. With OUT_REG = 1 the product
// is registered on the rising clk edge (one cycle latency) and cleared by the
// synchronous, active-high reset; this option is this design's own addition.
module accurate_unsigned_mult_8x8
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
    assign hi[p] = a[2*p+1] & b[OP_W-1];
    for (genvar k = 1; k < 8; k++) begin : g_col
      pp_pair_cell u_cell (
        .a_top(a[2*p]),   .b_top(b[k]),
        .a_bot(a[2*p+1]), .b_bot(b[k-1]),
        .x(x[p][k-1]),    .z(z[p][k-1])
      );
    end
  end

  pp_reduce_8x8 u_reduce (
    .x(x), .z(z), .lo(lo), .hi(hi), .corr('0), .product(prod_comb)
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
