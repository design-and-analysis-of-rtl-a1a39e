// gdi_or_nbit: N-bit bitwise OR, y[i] = a[i] | b[i].
//
// Each bit is one two-transistor gate-diffusion-input cell: A drives both
// gates, the PCNFET source sits on B and the NCNFET source on VDD, so the
// output follows B when A is 0 and is 1 when A is 1. Modelled per bit by that
// pass behaviour. Default width 4 as evaluated. Purely combinational.
module gdi_or_nbit #(
  parameter int unsigned N = dcr_alu_pkg::ALU_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      y[i] = a[i] ? 1'b1 : b[i];
    end
  end
endmodule
