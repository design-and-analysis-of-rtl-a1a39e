// dcr_alu: N-bit delay-controllable reconfigurable ALU (top level).
//
// The operands a and b feed four units in parallel: the hybrid adder
// (a + b, carry input 0), the subtractor (a - b by a + ~b + 1), an N-bit AND
// and an N-bit OR. A 4-to-1 multiplexer picks the result named by s:
// 00 add, 01 subtract, 10 AND, 11 OR. This arrangement and the encoding follow
// the published ALU block diagram and selection table.
//
// The adder's and subtractor's fast flags (which carry path each
// reconfiguration block used) are observation outputs and are left open here.
//
// carry is this design's addition: the adder's carry out for s = 00, the
// subtractor's carry (1 = no borrow, a >= b) for s = 01, and 0 for the logic
// operations. The adder's carry input is tied to 0, as the block diagram has
// no carry input.
//
// Everything is combinational: there is no clock or reset, and result and
// carry settle after the slowest unit plus the multiplexer. N must be even and
// at least 2; the default of 4 is the evaluated width.
module dcr_alu
  import dcr_alu_pkg::*;
#(
  parameter int unsigned N = ALU_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  alu_op_e      s,
  output logic [N-1:0] result,
  output logic         carry
);
  logic [N-1:0] add_y, sub_y, and_y, or_y;
  logic         add_c, sub_c;

  dc_adder #(.N(N)) u_add (
    .a(a), .b(b), .cin(1'b0), .sum(add_y), .cout(add_c), .fast()
  );

  dc_subtractor #(.N(N)) u_sub (
    .a(a), .b(b), .diff(sub_y), .brout(sub_c), .fast()
  );

  gdi_and_nbit #(.N(N)) u_and (.a(a), .b(b), .y(and_y));
  gdi_or_nbit  #(.N(N)) u_or  (.a(a), .b(b), .y(or_y));

  alu_mux4 #(.N(N)) u_mux (
    .s(s), .add_in(add_y), .sub_in(sub_y), .and_in(and_y), .or_in(or_y),
    .y(result)
  );

  always_comb begin
    unique case (s)
      OP_ADD:  carry = add_c;
      OP_SUB:  carry = sub_c;
      default: carry = 1'b0;
    endcase
  end
endmodule
