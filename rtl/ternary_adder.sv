// ternary_adder: W-bit three-operand adder, sum = x + y + z + ci (mod 2^W).
//
// One LUT6 per bit plus the carry chain. In bit k the LUT computes a 3:2 compression
// of x[k], y[k], z[k]: its o5 is the majority m[k], handed to the LUT of bit k+1 as an
// input; its o6 is x[k]^y[k]^z[k]^m[k-1], the propagate signal of the carry chain.
// The chain's multiplexer 0-input (DI) of bit k is m[k-1], with 0 in bit 0, so the
// chain adds the sum row and the shifted majority row in one pass. The carry out of
// the top bit and m[W-1] are dropped: callers size W so the sum fits.
// The LUT-plus-carry-chain structure and its input wiring follow the reference
// ternary adder; the two LUT functions (majority, four-input XOR) are this design's
// reading of that wiring. Purely combinational: one LUT level, then a W-bit ripple.
module ternary_adder
  import mult_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         ci,
  output logic [W-1:0] sum
);

  logic [W-1:0] maj;     // o5 of each bit's LUT
  logic [W-1:0] prop;    // o6 of each bit's LUT
  logic [W-1:0] maj_in;  // majority of the bit below (0 for bit 0)
  logic         co_unused;

  assign maj_in = {maj[W-2:0], 1'b0};

  for (genvar k = 0; k < W; k++) begin : g_bit
    lut6_cell #(.INIT(ternary_init())) u_lut (
      .i ({1'b1, 1'b1, maj_in[k], z[k], y[k], x[k]}),
      .o5(maj[k]),
      .o6(prop[k])
    );
  end

  carry_chain #(.W(W)) u_chain (
    .s (prop),
    .di(maj_in),
    .ci(ci),
    .o (sum),
    .co(co_unused)
  );

endmodule
