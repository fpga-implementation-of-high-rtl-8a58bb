// tb_pp_reduce_8x8: self-checking test of pp_reduce_8x8.
// Random bit matrices (and random correction rows) are applied; the product must
// equal the weighted sum of all bits, x[p][j] at weight 2p+1+j, z[p][j] at 2p+2+j,
// lo[p] at 2p and hi[p] at 2p+8, plus corr, modulo 2^16. All-ones matrices are
// included to drive the largest column sums.
module tb_pp_reduce_8x8;
  import mult_pkg::*;
  logic [3:0][6:0] x, z;
  logic [3:0]      lo, hi;
  product_t        corr, product;
  logic            clk = 1'b0;
  int              checks = 0, failures = 0;

  pp_reduce_8x8 dut (.x(x), .z(z), .lo(lo), .hi(hi), .corr(corr), .product(product));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v;
    for (int n = 0; n < 20000; n++) begin
      if (n < 2) begin
        x = '1; z = '1; lo = '1; hi = '1; corr = (n == 0) ? '0 : BW_CONST;
      end else begin
        x = 28'($urandom); z = 28'($urandom); lo = 4'($urandom); hi = 4'($urandom);
        corr = (n % 3 == 0) ? 16'($urandom) : '0;
      end
      @(posedge clk);
      exp_v = longint'(corr);
      for (int p = 0; p < 4; p++) begin
        exp_v += longint'(lo[p]) << (2 * p);
        exp_v += longint'(hi[p]) << (2 * p + 8);
        for (int j = 0; j < 7; j++) begin
          exp_v += longint'(x[p][j]) << (2 * p + 1 + j);
          exp_v += longint'(z[p][j]) << (2 * p + 2 + j);
        end
      end
      checks++;
      if (longint'(product) != (exp_v % 65536)) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d exp %0d", n, product, exp_v % 65536);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
