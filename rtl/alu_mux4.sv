// alu_mux4: N-bit 4-to-1 output multiplexer of the ALU.
//
// Selects the result of the unit named by s (dcr_alu_pkg::alu_op_e):
// 00 adder, 01 subtractor, 10 AND, 11 OR. It is built per bit as a tree of
// three 2-to-1 multiplexer cells: s[0] chooses within {add, sub} and
// {and, or}, s[1] chooses between the two pairs. The encoding follows the
// published selection table; the tree is this design's choice.
// Purely combinational.
module alu_mux4 #(
  parameter int unsigned N = dcr_alu_pkg::ALU_WIDTH
) (
  input  dcr_alu_pkg::alu_op_e s,
  input  logic [N-1:0]         add_in,
  input  logic [N-1:0]         sub_in,
  input  logic [N-1:0]         and_in,
  input  logic [N-1:0]         or_in,
  output logic [N-1:0]         y
);
  logic [N-1:0] arith, logic_r;

  for (genvar i = 0; i < N; i++) begin : g_bit
    cnt_mux21 u_m0 (.s(s[0]), .i0(add_in[i]), .i1(sub_in[i]), .y(arith[i]));
    cnt_mux21 u_m1 (.s(s[0]), .i0(and_in[i]), .i1(or_in[i]),  .y(logic_r[i]));
    cnt_mux21 u_m2 (.s(s[1]), .i0(arith[i]),  .i1(logic_r[i]), .y(y[i]));
  end
endmodule
