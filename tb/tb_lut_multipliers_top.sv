// tb_lut_multipliers_top: end-to-end test of lut_multipliers_top at its default
// parameters (combinational products).
// Both multipliers are run over all 65536 operand pairs at the same time (the signed
// one sees the unsigned operands reinterpreted, the two products are independent).
// The test counts how often each sign case of the Baugh-Wooley correction occurs
// (both operands negative, exactly one negative, both non-negative), how often the
// signed product is the extreme -128 * -128, and how often the unsigned product
// reaches the top bit; each must occur at least once.
module tb_lut_multipliers_top;
  import mult_pkg::*;
  logic     clk = 1'b0, reset;
  operand_t u_a, u_b, s_a, s_b;
  product_t u_product, s_product;
  int       checks = 0, failures = 0;
  int       n_negneg = 0, n_negpos = 0, n_pospos = 0, n_extreme = 0, n_msb = 0;

  lut_multipliers_top dut (
    .clk(clk), .reset(reset),
    .u_a(u_a), .u_b(u_b), .u_product(u_product),
    .s_a(s_a), .s_b(s_b), .s_product(s_product)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sx, sy;
    reset = 1'b1;
    @(posedge clk);
    reset = 1'b0;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        u_a = operand_t'(x); u_b = operand_t'(y);
        s_a = operand_t'(x); s_b = operand_t'(y);
        #1;
        sx = int'($signed(s_a)); sy = int'($signed(s_b));
        checks += 2;
        if (int'(u_product) != x * y) begin
          failures++;
          if (failures < 10) $display("unsigned %0d*%0d got %0d", x, y, u_product);
        end
        if (int'($signed(s_product)) != sx * sy) begin
          failures++;
          if (failures < 10) $display("signed %0d*%0d got %0d", sx, sy, $signed(s_product));
        end
        if (sx < 0 && sy < 0)        n_negneg++;
        else if ((sx < 0) != (sy < 0)) n_negpos++;
        else                         n_pospos++;
        if (sx == -128 && sy == -128) n_extreme++;
        if (u_product[PROD_W-1])     n_msb++;
      end
      @(posedge clk);
    end
    $display("cases: neg*neg=%0d neg*pos=%0d pos*pos=%0d extreme=%0d unsigned_msb=%0d",
             n_negneg, n_negpos, n_pospos, n_extreme, n_msb);
    if (n_negneg == 0) failures++;
    if (n_negpos == 0) failures++;
    if (n_pospos == 0) failures++;
    if (n_extreme == 0) failures++;
    if (n_msb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
