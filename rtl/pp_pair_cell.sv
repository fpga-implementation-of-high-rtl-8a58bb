// pp_pair_cell: one LUT6 of the partial-product stage (the "Type" cells of the bit
// matrices).
//
// It forms two partial-product bits of the same weight, p_top = a_top & b_top and
// p_bot = a_bot & b_bot, and adds them as a half adder inside the LUT: x (o6) is
// their sum at that weight and z (o5) their carry at the next weight. For the signed
// (Baugh-Wooley) multiplier either product may be complemented before the addition,
// selected by INV_TOP / INV_BOT; the unsigned multiplier uses neither. Four of the six
// LUT inputs are used, the other two are tied to 1. The operand pairing follows the
// reference bit matrix; the complement settings follow the Baugh-Wooley equation.
// Purely combinational.
module pp_pair_cell
  import mult_pkg::*;
#(
  parameter bit INV_TOP = 1'b0,
  parameter bit INV_BOT = 1'b0
) (
  input  logic a_top,
  input  logic b_top,
  input  logic a_bot,
  input  logic b_bot,
  output logic x,      // sum bit, same weight as the two products
  output logic z       // carry bit, next higher weight
);

  lut6_cell #(.INIT(pp_pair_init(INV_TOP, INV_BOT))) u_lut (
    .i ({1'b1, 1'b1, b_bot, a_bot, b_top, a_top}),
    .o5(z),
    .o6(x)
  );

endmodule
