// mfa: modified full adder (MFA), the plain cell at both ends of the hybrid
// adder chain.
//
// An XOR cell forms p = a ^ b and an inverter its complement (XNOR). The sum
// multiplexer is steered by the carry input: s = cin ? XNOR : XOR, which is
// a ^ b ^ cin. The carry multiplexer is steered by XNOR: when a equals b the
// carry out is b (both ones generate, both zeros kill), otherwise the carry in
// is passed on. The cell list and wiring follow the published MFA block
// schematic; which data pin of each multiplexer is i0 and which is i1 is this
// design's choice, made so that the cell adds. Purely combinational.
module mfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;    // a ^ b
  logic pn;   // ~(a ^ b)

  cnt_xor   u_xor  (.a(a), .b(b), .axorb(p));
  cnt_not   u_not  (.a(p), .y(pn));
  cnt_mux21 u_smux (.s(cin), .i0(p),   .i1(pn), .y(s));
  cnt_mux21 u_cmux (.s(pn),  .i0(cin), .i1(b),  .y(cout));
endmodule
