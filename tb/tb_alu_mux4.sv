// tb_alu_mux4: self-checking testbench for alu_mux4.
//
// Drives four distinct random words on the four inputs and, for every select
// code, checks that the output equals the input named by the selection table
// (00 add, 01 sub, 10 and, 11 or). 500 rounds. A watchdog ends a stuck run.
module tb_alu_mux4;
  import dcr_alu_pkg::*;

  int checks = 0;
  int failures = 0;

  alu_op_e    s;
  logic [3:0] add_in, sub_in, and_in, or_in, y;

  alu_mux4 dut (.s(s), .add_in(add_in), .sub_in(sub_in), .and_in(and_in), .or_in(or_in), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      logic [3:0] exp;
      add_in = 4'($urandom); sub_in = 4'($urandom);
      and_in = 4'($urandom); or_in  = 4'($urandom);
      for (int c = 0; c < 4; c++) begin
        s = alu_op_e'(c);
        case (c)
          0: exp = add_in;
          1: exp = sub_in;
          2: exp = and_in;
          default: exp = or_in;
        endcase
        #1;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL s=%0d y=%h expected %h", c, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
