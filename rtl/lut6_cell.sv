// lut6_cell: six-input, two-output LUT as used by every logic cell of the multipliers.
//
// The cell is organised as one LUT5 followed by a 2:1 multiplexer (the restructured
// LUT6 this design family proposes): the LUT5 reads inputs i0..i4 and drives o5;
// the multiplexer, steered by i5, passes either that LUT5 value (i5 = 0) or the
// upper-half table entry selected by i0..i4 (i5 = 1) to o6. Logically this is the
// usual fracturable LUT6: o6 = INIT[{i5..i0}], o5 = INIT[{0,i4..i0}]. All cells of
// this design tie i5 to 1, so o5 and o6 carry two independent five-input functions.
//
// The exact gate-level insides of the proposed LUT5-plus-multiplexer cell are not
// specified beyond its block names, so only the truth-table behaviour above is
// modelled. Purely combinational; no clock.
module lut6_cell #(
  parameter logic [63:0] INIT = 64'h0
) (
  input  logic [5:0] i,
  output logic       o5,
  output logic       o6
);

  logic [31:0] lut5_tab;   // table of the single LUT5
  logic [31:0] upper_tab;  // entries reached through the multiplexer when i5 = 1

  assign lut5_tab  = INIT[31:0];
  assign upper_tab = INIT[63:32];

  always_comb begin
    o5 = lut5_tab[i[4:0]];
    o6 = i[5] ? upper_tab[i[4:0]] : o5;   // Mux_2_1
  end

endmodule
