// gdi_and_nbit: N-bit bitwise AND, y[i] = a[i] & b[i].
//
// Each bit is one two-transistor gate-diffusion-input cell: A drives both
// gates, the PCNFET source sits on ground and the NCNFET source on B, so the
// output is 0 when A is 0 and follows B when A is 1. Modelled per bit by that
// pass behaviour. Default width 4 as evaluated. Purely combinational.
module gdi_and_nbit #(
  parameter int unsigned N = dcr_alu_pkg::ALU_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      y[i] = a[i] ? b[i] : 1'b0;
    end
  end
endmodule
