// reconfig_block: the two-bit "reconfiguration block" of the hybrid adder.
//
// A COPFA on bit 0 of the block and a CISFA on bit 1. The COPFA hands up both
// its regular carry (Cout2, normal-speed path) and its predicted carry
// (Cout2p = a[0] & b[0], high-speed path) together with a[0] ^ b[0]; the CISFA
// takes the predicted carry whenever a[0] == b[0]. Output fast reports that
// choice (1 = high-speed path used) so the data-dependent path selection can
// be observed; it does not affect the result. An N-bit adder repeats this
// block (N-2)/2 times between two MFAs. Purely combinational.
module reconfig_block (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] sum,
  output logic       cout,
  output logic       fast
);
  logic cout2, cout2p, axb0;

  copfa u_copfa (
    .a(a[0]), .b(b[0]), .cin(cin),
    .s(sum[0]), .cout(cout2), .coutp(cout2p), .axb(axb0)
  );

  cisfa u_cisfa (
    .a(a[1]), .b(b[1]), .cin(cout2), .cins(cout2p), .csel(axb0),
    .s(sum[1]), .cout(cout)
  );

  assign fast = ~axb0;
endmodule
