// tb_dcr_alu_nbit: self-checking testbench for the ALU at widths other than
// the default.
//
// A 2-bit ALU (no reconfiguration block) is checked exhaustively, and a
// 16-bit ALU (seven reconfiguration blocks) with 5000 random operations,
// every fourth using equal operands and every fifth using all-ones B so that
// long carry and borrow ripples occur. The reference is integer arithmetic:
// add with carry out, subtract with carry = (a >= b), AND, OR. Outputs are
// sampled 1 ns after each input change. A watchdog ends a stuck run.
module tb_dcr_alu_nbit;
  import dcr_alu_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [1:0]  a2, b2, r2;
  logic        c2;
  alu_op_e     s2;
  logic [15:0] a16, b16, r16;
  logic        c16;
  alu_op_e     s16;

  dcr_alu #(.N(2))  dut2  (.a(a2),  .b(b2),  .s(s2),  .result(r2),  .carry(c2));
  dcr_alu #(.N(16)) dut16 (.a(a16), .b(b16), .s(s16), .result(r16), .carry(c16));

  function automatic void ref_op(input int op, input longint x, input longint y, input int w,
                                 output longint r, output longint c);
    longint mask = (64'd1 << w) - 1;
    case (op)
      0: begin r = (x + y) & mask;     c = (x + y) >> w; end
      1: begin r = (x - y) & mask;     c = longint'(x >= y); end
      2: begin r = x & y;              c = 0; end
      default: begin r = x | y;        c = 0; end
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint er, ec;
    for (int v = 0; v < 64; v++) begin
      {s2, a2, b2} = 6'(v);
      #1;
      ref_op(int'(s2), longint'(a2), longint'(b2), 2, er, ec);
      checks++;
      if (longint'(r2) != er || longint'(c2) != ec) begin
        failures++;
        $display("FAIL N=2 s=%0d a=%0d b=%0d: got %0d/%b expected %0d/%0d", s2, a2, b2, r2, c2, er, ec);
      end
    end
    for (int k = 0; k < 5000; k++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      if (k % 4 == 0) b16 = a16;
      if (k % 5 == 0) b16 = '1;
      s16 = alu_op_e'(k % 4);
      #1;
      ref_op(int'(s16), longint'(a16), longint'(b16), 16, er, ec);
      checks++;
      if (longint'(r16) != er || longint'(c16) != ec) begin
        failures++;
        $display("FAIL N=16 s=%0d a=%h b=%h: got %h/%b expected %h/%0d", s16, a16, b16, r16, c16, er, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
