// cnt_xor: two-input XOR cell, axorb = a ^ b.
//
// The physical cell is a full-swing gate in gate-diffusion-input (GDI) style:
// an inverter makes B' and three CNTFETs pass either A or its complement to
// the output. Here it is modelled by its logic function only; no delay is
// modelled. Pin names (A, B, AXORB) follow the cell's schematic.
// Purely combinational.
module cnt_xor (
  input  logic a,
  input  logic b,
  output logic axorb
);
  assign axorb = a ^ b;
endmodule
