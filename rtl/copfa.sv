// copfa: carry output predictable full adder (COPFA), the lower cell of a
// reconfiguration block.
//
// It is the MFA with its XOR replaced by the XOR-AND cell, so besides the sum
// and the regular (rippled) carry cout it gives the predicted carry
// coutp = a & b. coutp is available as soon as a and b are, without waiting
// for cin, and it equals cout whenever a == b. The XOR output axb (a ^ b) is
// also brought out: the CISFA above uses it to decide whether it may take the
// fast predicted carry. Bringing axb out is this design's addition; the rest
// follows the published COPFA schematic. Purely combinational.
module copfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout,
  output logic coutp,
  output logic axb
);
  logic pn;

  cnt_xor_and u_xa   (.a(a), .b(b), .axorb(axb), .coutp(coutp));
  cnt_not     u_not  (.a(axb), .y(pn));
  cnt_mux21   u_smux (.s(cin), .i0(axb), .i1(pn), .y(s));
  cnt_mux21   u_cmux (.s(pn),  .i0(cin), .i1(b),  .y(cout));
endmodule
