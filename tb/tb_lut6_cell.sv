// tb_lut6_cell: self-checking test of lut6_cell.
// Two cells with known contents are driven through all 64 input patterns:
// a six-input parity table (o6 = ^i, o5 = parity of i0..i4) and a table that is 1
// only at index 0 and 63 (o6 = all-zero or all-one input, o5 = i0..i4 all zero).
// Expected values come from the Boolean functions, not from the INIT words.
module tb_lut6_cell;
  logic [5:0] i;
  logic       p_o5, p_o6, e_o5, e_o6;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  lut6_cell #(.INIT(64'h6996_9669_9669_6996)) u_par (.i(i), .o5(p_o5), .o6(p_o6));
  lut6_cell #(.INIT(64'h8000_0000_0000_0001)) u_end (.i(i), .o5(e_o5), .o6(e_o6));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      i = 6'(k);
      @(posedge clk);
      checks += 4;
      if (p_o6 !== ^i)                      begin failures++; $display("parity o6 i=%0d", k); end
      if (p_o5 !== ^i[4:0])                 begin failures++; $display("parity o5 i=%0d", k); end
      if (e_o6 !== (i == 6'd0 || i == 6'd63)) begin failures++; $display("end o6 i=%0d", k); end
      if (e_o5 !== (i[4:0] == 5'd0))        begin failures++; $display("end o5 i=%0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
