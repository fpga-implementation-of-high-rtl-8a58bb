// tb_carry_chain: self-checking test of carry_chain (W = 8).
// The chain is used as a binary adder, propagate s = a ^ b and DI = a, for every pair
// of 8-bit operands with a random carry-in; sum and carry-out are compared with a + b + ci.
module tb_carry_chain;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, o;
  logic         ci, co;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  carry_chain #(.W(W)) dut (.s(a ^ b), .di(a), .ci(ci), .o(o), .co(co));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] exp_sum;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a  = W'(x);
        b  = W'(y);
        ci = 1'($urandom_range(0, 1));
        #1;
        exp_sum = (W+1)'(x + y + int'(ci));
        checks++;
        if ({co, o} !== exp_sum) begin
          failures++;
          if (failures < 10) $display("a=%0d b=%0d ci=%0d got %0d", x, y, ci, {co, o});
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
