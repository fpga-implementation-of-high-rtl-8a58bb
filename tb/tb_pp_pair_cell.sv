// tb_pp_pair_cell: self-checking test of pp_pair_cell in its four complement
// configurations. For all 16 input patterns the pair {z, x} must equal the arithmetic
// sum of the two (possibly complemented) partial-product bits.
module tb_pp_pair_cell;
  logic [3:0] in;
  logic [3:0] x, z;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  for (genvar c = 0; c < 4; c++) begin : g_cfg
    pp_pair_cell #(.INV_TOP(c[0]), .INV_BOT(c[1])) u_cell (
      .a_top(in[0]), .b_top(in[1]), .a_bot(in[2]), .b_bot(in[3]), .x(x[c]), .z(z[c])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pt, pb;
    for (int k = 0; k < 16; k++) begin
      in = 4'(k);
      @(posedge clk);
      for (int c = 0; c < 4; c++) begin
        pt = ((k & 1) != 0 && (k & 2) != 0) ? 1 : 0;
        pb = ((k & 4) != 0 && (k & 8) != 0) ? 1 : 0;
        if (c & 1) pt = 1 - pt;
        if (c & 2) pb = 1 - pb;
        checks++;
        if (2 * int'(z[c]) + int'(x[c]) != pt + pb) begin
          failures++;
          $display("cfg=%0d in=%b got z=%b x=%b", c, in, z[c], x[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
