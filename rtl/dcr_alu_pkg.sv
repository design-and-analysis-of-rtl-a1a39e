// Shared definitions of the delay-controllable reconfigurable ALU.
//
// alu_op_e is the two-bit operation select S[1:0] of the ALU. The code points
// are the published selection table: 00 addition, 01 subtraction, 10 bitwise
// AND, 11 bitwise OR. ALU_WIDTH is the operand width the ALU was evaluated at
// (4 bits); every N-bit module takes it as its default width.
package dcr_alu_pkg;

  localparam int unsigned ALU_WIDTH = 4;

  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_SUB = 2'b01,
    OP_AND = 2'b10,
    OP_OR  = 2'b11
  } alu_op_e;

endpackage
