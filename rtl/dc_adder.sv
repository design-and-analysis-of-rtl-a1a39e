// dc_adder: N-bit delay-controllable hybrid adder, {cout, sum} = a + b + cin.
//
// Structure: an MFA on bit 0, M = (N-2)/2 reconfiguration blocks
// (COPFA + CISFA) on bits 1 .. N-2, and an MFA on bit N-1. The carry ripples
// from cell to cell, but inside every reconfiguration block the CISFA may
// take the COPFA's predicted carry (A & B of the lower bit) instead of the
// rippled one; it does so whenever the lower bit does not propagate, so the
// carry into the upper bit then no longer waits for the ripple. The result is
// always the exact sum; only the path the carry takes depends on the data.
// fast[j] is 1 when block j used the predicted carry (observation only; tied
// to 0 when N = 2 and there is no block).
//
// N must be even and at least 2 (M must be a whole number); the default of 4
// is the width the adder was evaluated at (one reconfiguration block).
// Purely combinational: outputs settle one ripple delay after the inputs.
module dc_adder #(
  parameter int unsigned N  = dcr_alu_pkg::ALU_WIDTH,
  localparam int unsigned M  = (N - 2) / 2,
  localparam int unsigned FW = (M > 0) ? M : 1
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  output logic [N-1:0]  sum,
  output logic          cout,
  output logic [FW-1:0] fast
);
  if (N < 2 || (N % 2) != 0) begin : g_bad_width
    $error("dc_adder: N must be even and at least 2");
  end

  // cb[j] is the carry into reconfiguration block j; cb[M] is the carry into
  // the top MFA.
  logic [M:0] cb;

  mfa u_mfa_lo (.a(a[0]), .b(b[0]), .cin(cin), .s(sum[0]), .cout(cb[0]));

  for (genvar j = 0; j < M; j++) begin : g_rb
    reconfig_block u_rb (
      .a   (a[2*j+2 -: 2]),
      .b   (b[2*j+2 -: 2]),
      .cin (cb[j]),
      .sum (sum[2*j+2 -: 2]),
      .cout(cb[j+1]),
      .fast(fast[j])
    );
  end

  if (M == 0) begin : g_no_rb
    assign fast = '0;
  end

  mfa u_mfa_hi (.a(a[N-1]), .b(b[N-1]), .cin(cb[M]), .s(sum[N-1]), .cout(cout));
endmodule
