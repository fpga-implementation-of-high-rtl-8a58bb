// mult_pkg: shared widths, types and LUT truth-table builders for the LUT-based
// 8x8 multipliers.
//
// The multipliers are built from six-input LUT cells whose contents are given as a
// 64-bit INIT word, indexed by the inputs {i5,i4,i3,i2,i1,i0}: o6 reads INIT[{i5..i0}],
// o5 reads the lower half INIT[{1'b0,i4..i0}]. The functions here compute those words
// from the cell's Boolean function, so no truth table is pasted as a literal.
//
// Input assignment used throughout (this design's choice, the two constant inputs
// tied to 1 follow the LUT inputs printed in the ternary-adder figure):
//   partial-product cell: i0=a_top i1=b_top i2=a_bot i3=b_bot i4=1 i5=1
//   ternary-adder cell:   i0=x i1=y i2=z i3=carry of the 3:2 stage below i4=1 i5=1
package mult_pkg;

  localparam int unsigned OP_W   = 8;          // operand width N = M = 8
  localparam int unsigned PROD_W = 2 * OP_W;   // product width

  typedef logic [OP_W-1:0]   operand_t;
  typedef logic [PROD_W-1:0] product_t;

  // Baugh-Wooley correction constant 2^(N-1) + 2^(M-1) + 2^(N+M-1) for N = M = 8,
  // i.e. 2^8 + 2^15 (equation (7)).
  localparam product_t BW_CONST = product_t'((1 << OP_W) + (1 << (PROD_W - 1)));

  // Partial-product pair cell: p_top = (a_top & b_top) ^ inv_top,
  // p_bot = (a_bot & b_bot) ^ inv_bot; o6 = p_top ^ p_bot (sum), o5 = p_top & p_bot (carry).
  function automatic logic [63:0] pp_pair_init(input bit inv_top, input bit inv_bot);
    logic [63:0] t;
    logic        pt, pb;
    t = '0;
    for (int k = 0; k < 64; k++) begin
      pt = logic'(k & (k >> 1) & 1) ^ inv_top;                // i0 & i1
      pb = logic'((k >> 2) & (k >> 3) & 1) ^ inv_bot;         // i2 & i3
      if (k >= 32) t[k] = pt ^ pb;   // upper half feeds o6 when i5 = 1
      else         t[k] = pt & pb;   // lower half feeds o5
    end
    return t;
  endfunction

  // Ternary-adder cell: o5 = majority(x,y,z), the carry passed to the next bit's LUT;
  // o6 = x ^ y ^ z ^ c_prev, the propagate signal of the carry chain.
  function automatic logic [63:0] ternary_init();
    logic [63:0] t;
    logic        i0, i1, i2, i3;
    t = '0;
    for (int k = 0; k < 64; k++) begin
      i0 = logic'(k & 1);
      i1 = logic'((k >> 1) & 1);
      i2 = logic'((k >> 2) & 1);
      i3 = logic'((k >> 3) & 1);
      if (k >= 32) t[k] = i0 ^ i1 ^ i2 ^ i3;
      else         t[k] = (i0 & i1) | (i0 & i2) | (i1 & i2);
    end
    return t;
  endfunction

endpackage
