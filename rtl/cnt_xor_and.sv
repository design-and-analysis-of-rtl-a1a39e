// cnt_xor_and: combined XOR / AND cell.
//
// One cell gives axorb = a ^ b and coutp = a & b. The AND half is a GDI cell
// with A on both gates, the PCNFET source on ground and the NCNFET source on
// B, so it passes 0 when A is 0 and B when A is 1. In the COPFA the AND output
// is the "predicted" carry (it equals the carry out of the bit whenever A and
// B are equal). Modelled by logic function only; purely combinational.
module cnt_xor_and (
  input  logic a,
  input  logic b,
  output logic axorb,
  output logic coutp
);
  cnt_xor u_xor (.a(a), .b(b), .axorb(axorb));

  // GDI AND: A=0 passes the PCNFET source (ground), A=1 passes B.
  always_comb begin
    if (a) coutp = b;
    else   coutp = 1'b0;
  end
endmodule
