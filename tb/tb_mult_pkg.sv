// tb_mult_pkg: self-checking test of the truth-table builders and constants of
// mult_pkg. Every entry of pp_pair_init (all four complement settings) and of
// ternary_init is compared with the cell function written out from the input bits,
// and BW_CONST with 2^8 + 2^15.
module tb_mult_pkg;
  import mult_pkg::*;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] t;
    logic [5:0]  v;
    logic        pt, pb, e;
    @(posedge clk);
    for (int c = 0; c < 4; c++) begin
      t = pp_pair_init(c[0], c[1]);
      for (int k = 0; k < 64; k++) begin
        v  = 6'(k);
        pt = (v[0] && v[1]) ? ~c[0] : c[0];
        pb = (v[2] && v[3]) ? ~c[1] : c[1];
        e  = v[5] ? (pt != pb) : (pt && pb);
        checks++;
        if (t[k] !== e) begin failures++; $display("pp_pair_init cfg=%0d k=%0d", c, k); end
      end
    end
    t = ternary_init();
    for (int k = 0; k < 64; k++) begin
      v = 6'(k);
      if (v[5]) e = ((int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3])) % 2) == 1;
      else      e = (int'(v[0]) + int'(v[1]) + int'(v[2])) >= 2;
      checks++;
      if (t[k] !== e) begin failures++; $display("ternary_init k=%0d", k); end
    end
    checks++;
    if (BW_CONST !== 16'd33024) begin failures++; $display("BW_CONST=%h", BW_CONST); end
    checks++;
    if (OP_W != 8 || PROD_W != 16) begin failures++; $display("widths"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
