// tb_accurate_signed_mult_8x8: self-checking test of the signed multiplier.
// First the operand sequence of the reference waveform is replayed (a = 2,
// b = 4, 6, ..., 26, products 8 .. 52). Then all 65536 two's-complement operand
// pairs are checked against the signed product. A second instance with OUT_REG = 1
// is checked for synchronous reset and a latency of exactly one clock cycle.
module tb_accurate_signed_mult_8x8;
  import mult_pkg::*;
  logic     clk = 1'b0, reset;
  operand_t a, b, ra, rb;
  product_t p_comb, p_reg;
  int       checks = 0, failures = 0;

  accurate_signed_mult_8x8 dut (.clk(clk), .reset(reset), .a(a), .b(b), .product(p_comb));
  accurate_signed_mult_8x8 #(.OUT_REG(1'b1)) dut_reg (
    .clk(clk), .reset(reset), .a(ra), .b(rb), .product(p_reg)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v, exp_prev;
    reset = 1'b1; ra = 8'h80; rb = 8'h7f;
    // waveform sequence
    a = 8'd2;
    for (int k = 0; k < 12; k++) begin
      b = operand_t'(4 + 2 * k);
      @(posedge clk); #1;
      checks++;
      if (int'(p_comb) != 8 + 4 * k) begin
        failures++; $display("waveform: 2*%0d got %0d", b, p_comb);
      end
    end
    // exhaustive combinational check
    for (int x = -128; x < 128; x++) begin
      for (int y = -128; y < 128; y++) begin
        a = operand_t'(x); b = operand_t'(y);
        #1;
        checks++;
        exp_v = x * y;
        if (int'($signed(p_comb)) != exp_v) begin
          failures++;
          if (failures < 10) $display("%0d*%0d got %0d", x, y, $signed(p_comb));
        end
      end
    end
    // registered instance
    @(posedge clk); #1;
    checks++;
    if (p_reg !== '0) begin failures++; $display("reset did not clear product"); end
    reset = 1'b0;
    ra = 8'($urandom); rb = 8'($urandom);
    exp_prev = int'($signed(ra)) * int'($signed(rb));
    for (int n = 0; n < 500; n++) begin
      @(posedge clk); #1;
      checks++;
      if (int'($signed(p_reg)) != exp_prev) begin
        failures++;
        if (failures < 10) $display("registered: got %0d exp %0d", $signed(p_reg), exp_prev);
      end
      ra = 8'($urandom); rb = 8'($urandom);
      exp_prev = int'($signed(ra)) * int'($signed(rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
