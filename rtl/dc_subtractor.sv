// dc_subtractor: N-bit delay-controllable subtractor, diff = a - b (mod 2^N).
//
// Two's-complement subtraction on the hybrid adder: a bank of N inverters
// forms B', and the adder chain (MFA, (N-2)/2 reconfiguration blocks, MFA)
// computes A + B' + 1 with its carry input tied to 1. brout is that
// addition's carry out, so it is 1 when a >= b (no borrow) and 0 when a < b;
// the polarity is this design's reading, the structure follows the published
// subtractor schematic. fast[j] reports, as in the adder, whether
// reconfiguration block j used its predicted carry (here that is when
// a[2j+1] != b[2j+1]).
//
// N must be even and at least 2; the default of 4 is the evaluated width.
// Purely combinational.
module dc_subtractor #(
  parameter int unsigned N  = dcr_alu_pkg::ALU_WIDTH,
  localparam int unsigned M  = (N - 2) / 2,
  localparam int unsigned FW = (M > 0) ? M : 1
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [N-1:0]  diff,
  output logic          brout,
  output logic [FW-1:0] fast
);
  logic [N-1:0] bn;

  for (genvar i = 0; i < N; i++) begin : g_inv
    cnt_not u_inv (.a(b[i]), .y(bn[i]));
  end

  dc_adder #(.N(N)) u_add (
    .a(a), .b(bn), .cin(1'b1),
    .sum(diff), .cout(brout), .fast(fast)
  );
endmodule
