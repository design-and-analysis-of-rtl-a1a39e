// cnt_mux21: 2-to-1 multiplexer cell, y = s ? i1 : i0.
//
// In the physical cell an inverter makes S'; i0 reaches y through a PCNFET
// gated by S (conducting when S is 0) and i1 through an NCNFET gated by S
// (conducting when S is 1), with a restoring NCNFET gated by S'. It is
// modelled by its logic function; pin names S, i0, i1 and y follow the
// schematic. Purely combinational.
module cnt_mux21 (
  input  logic s,
  input  logic i0,
  input  logic i1,
  output logic y
);
  always_comb begin
    if (s) y = i1;
    else   y = i0;
  end
endmodule
