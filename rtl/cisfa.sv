// cisfa: carry input selectable full adder (CISFA), the upper cell of a
// reconfiguration block.
//
// It receives two candidate carries from the COPFA below: the regular rippled
// carry cin (Cout2) and the predicted carry cins (Cout2p = A & B of the lower
// bit). MUX21-A picks one of them as OUTA; OUTA then steers the sum
// multiplexer MUX21-B (s = OUTA ? XNOR : XOR) and is the pass-through input of
// the carry multiplexer MUX21-C (cout = XNOR ? b : OUTA), as in the MFA.
//
// Select of MUX21-A (csel): 1 takes cin, 0 takes cins. The predicted carry is
// only equal to the real carry when the lower bit does not propagate, so csel
// is the lower bit's A ^ B, supplied by the COPFA. Driving csel from this
// cell's own XOR, as a literal reading of the schematic suggests, would give a
// wrong sum (for example 3 + 1 = 0 in a 4-bit adder); this is the main point
// where the design departs from the published drawing. When csel is 0 the
// carry into this bit no longer depends on the ripple through the COPFA,
// which is the high-speed path. Purely combinational.
module cisfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic cins,
  input  logic csel,
  output logic s,
  output logic cout
);
  logic p, pn, outa;

  cnt_xor   u_xor  (.a(a), .b(b), .axorb(p));
  cnt_not   u_not  (.a(p), .y(pn));
  cnt_mux21 u_amux (.s(csel), .i0(cins), .i1(cin),  .y(outa));
  cnt_mux21 u_bmux (.s(outa), .i0(p),    .i1(pn),   .y(s));
  cnt_mux21 u_cmux (.s(pn),   .i0(outa), .i1(b),    .y(cout));
endmodule
