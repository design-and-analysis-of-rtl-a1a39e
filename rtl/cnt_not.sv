// cnt_not: inverter cell, y = ~a.
//
// The physical cell is a complementary PCNFET/NCNFET pair. It is modelled by
// its logic function; no delay is modelled. The cell's output pin is named y
// here (the schematic calls it B) to keep it apart from operand B.
// Purely combinational.
module cnt_not (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule
