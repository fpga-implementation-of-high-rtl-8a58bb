// carry_chain: the dedicated fast carry logic of an FPGA slice, W bits long.
//
// Each bit has a 2:1 carry multiplexer and an XOR: with propagate s[k] (a LUT's o6)
// and carry c[k] entering bit k,
//   o[k]   = s[k] ^ c[k]                       (equation (2))
//   c[k+1] = s[k] ? c[k] : di[k]               (equation (3) in multiplexer form:
//                                               generate = di[k] & ~s[k])
// c[0] = ci, co = c[W]. di is the multiplexer's 0-input (the slice's DI/AX pin).
// Purely combinational; the carry ripples from bit 0 upwards.
module carry_chain #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] s,
  input  logic [W-1:0] di,
  input  logic         ci,
  output logic [W-1:0] o,
  output logic         co
);

  logic [W:0] c;

  assign c[0] = ci;

  for (genvar k = 0; k < W; k++) begin : g_bit
    assign o[k]   = s[k] ^ c[k];             // XORCY
    assign c[k+1] = s[k] ? c[k] : di[k];     // MUXCY
  end

  assign co = c[W];

endmodule
