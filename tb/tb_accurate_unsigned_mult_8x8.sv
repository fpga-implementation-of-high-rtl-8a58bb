// tb_accurate_unsigned_mult_8x8: self-checking test of the unsigned multiplier.
// The combinational instance (default) is checked for all 65536 operand pairs
// against a * b. A second instance with OUT_REG = 1 is checked for synchronous reset
// (product 0 while reset is high) and for a latency of exactly one clock cycle on a
// random operand stream.
module tb_accurate_unsigned_mult_8x8;
  import mult_pkg::*;
  logic     clk = 1'b0, reset;
  operand_t a, b, ra, rb;
  product_t p_comb, p_reg;
  int       checks = 0, failures = 0;

  accurate_unsigned_mult_8x8 dut (.clk(clk), .reset(reset), .a(a), .b(b), .product(p_comb));
  accurate_unsigned_mult_8x8 #(.OUT_REG(1'b1)) dut_reg (
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
    int exp_prev;
    reset = 1'b1; ra = 8'd255; rb = 8'd255;
    // exhaustive combinational check
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = operand_t'(x); b = operand_t'(y);
        #1;
        checks++;
        if (int'(p_comb) != x * y) begin
          failures++;
          if (failures < 10) $display("%0d*%0d got %0d", x, y, p_comb);
        end
      end
    end
    // registered instance: reset, then one-cycle latency
    @(posedge clk); #1;
    checks++;
    if (p_reg !== '0) begin failures++; $display("reset did not clear product"); end
    reset = 1'b0;
    ra = 8'($urandom); rb = 8'($urandom);
    exp_prev = int'(ra) * int'(rb);
    for (int n = 0; n < 500; n++) begin
      @(posedge clk); #1;
      checks++;
      if (int'(p_reg) != exp_prev) begin
        failures++;
        if (failures < 10) $display("registered: got %0d exp %0d", p_reg, exp_prev);
      end
      ra = 8'($urandom); rb = 8'($urandom);
      exp_prev = int'(ra) * int'(rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
