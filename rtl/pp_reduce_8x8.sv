// pp_reduce_8x8: reduction of the 8x8 partial-product bit matrix to the product.
//
// The partial-product stage pairs multiplicand bits (a0,a1), (a2,a3), (a4,a5), (a6,a7).
// Row pair p delivers, for columns 2p+1 .. 2p+7, seven half-adder sums x[p][j]
// (weight 2p+1+j) and carries z[p][j] (weight 2p+2+j), plus two lone products:
// lo[p] = a(2p)b0 at weight 2p and hi[p] = a(2p+1)b7 at weight 2p+8. These 64 bits
// are arranged as eight rows:
//   R(2p)   = lo[p] | x[p][0..6] | hi[p]   at columns 2p .. 2p+8
//   R(2p+1) = z[p][0..6]                   at columns 2p+2 .. 2p+8
// Stage 2 adds them with three ternary adders, T0 = R0+R1+R2, T1 = R3+R4+R5 and
// T2 = R6+R7+corr, where corr is a constant row (0 for unsigned, the Baugh-Wooley
// constant for signed). Stage 3 adds T0+T1+T2 with one more ternary adder. Together with
// the partial-product stage this is ceil(log3(M/2)) + 1 = 3 stages for M = 8.
// The bit positions follow the reference bit matrix; the grouping of the rows into
// adders and the 16-bit adder width (modulo 2^16) are this design's choices.
// Purely combinational.
module pp_reduce_8x8
  import mult_pkg::*;
(
  input  logic [3:0][6:0] x,
  input  logic [3:0][6:0] z,
  input  logic [3:0]      lo,
  input  logic [3:0]      hi,
  input  product_t        corr,
  output product_t        product
);

  product_t row [8];
  product_t t0, t1, t2;

  always_comb begin
    for (int r = 0; r < 8; r++) row[r] = '0;
    for (int p = 0; p < 4; p++) begin
      row[2*p][2*p]     = lo[p];
      row[2*p][2*p + 8] = hi[p];
      for (int j = 0; j < 7; j++) begin
        row[2*p][2*p + 1 + j]   = x[p][j];
        row[2*p+1][2*p + 2 + j] = z[p][j];
      end
    end
  end

  // stage 2
  ternary_adder #(.W(PROD_W)) u_t0 (.x(row[0]), .y(row[1]), .z(row[2]), .ci(1'b0), .sum(t0));
  ternary_adder #(.W(PROD_W)) u_t1 (.x(row[3]), .y(row[4]), .z(row[5]), .ci(1'b0), .sum(t1));
  ternary_adder #(.W(PROD_W)) u_t2 (.x(row[6]), .y(row[7]), .z(corr),   .ci(1'b0), .sum(t2));

  // stage 3
  ternary_adder #(.W(PROD_W)) u_fin (.x(t0), .y(t1), .z(t2), .ci(1'b0), .sum(product));

endmodule
