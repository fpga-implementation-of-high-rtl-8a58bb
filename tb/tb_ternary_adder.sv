// tb_ternary_adder: self-checking test of ternary_adder.
// A 4-bit instance is checked exhaustively (all x, y, z, ci); a 16-bit instance, the
// width the multipliers use, with 20000 random operand triples including all-ones
// operands that make the carry ripple the whole chain.
module tb_ternary_adder;
  logic [3:0]  x4, y4, z4, s4;
  logic [15:0] x16, y16, z16, s16;
  logic        ci;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  ternary_adder #(.W(4))  u_small (.x(x4),  .y(y4),  .z(z4),  .ci(ci), .sum(s4));
  ternary_adder #(.W(16)) u_full  (.x(x16), .y(y16), .z(z16), .ci(ci), .sum(s16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    x16 = '0; y16 = '0; z16 = '0;
    for (int k = 0; k < 8192; k++) begin
      {ci, z4, y4, x4} = 13'(k);
      #1;
      exp_v = (int'(x4) + int'(y4) + int'(z4) + int'(ci)) % 16;
      checks++;
      if (int'(s4) != exp_v) begin
        failures++;
        if (failures < 10) $display("W4 %0d+%0d+%0d+%0d got %0d", x4, y4, z4, ci, s4);
      end
    end
    for (int k = 0; k < 20000; k++) begin
      if (k < 4) begin
        x16 = '1; y16 = (k & 1) ? '1 : 16'd1; z16 = (k & 2) ? '1 : '0; ci = 1'(k & 1);
      end else begin
        x16 = 16'($urandom); y16 = 16'($urandom); z16 = 16'($urandom);
        ci  = 1'($urandom_range(0, 1));
      end
      @(posedge clk);
      exp_v = (int'(x16) + int'(y16) + int'(z16) + int'(ci)) % 65536;
      checks++;
      if (int'(s16) != exp_v) begin
        failures++;
        if (failures < 10) $display("W16 %0d+%0d+%0d+%0d got %0d", x16, y16, z16, ci, s16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
