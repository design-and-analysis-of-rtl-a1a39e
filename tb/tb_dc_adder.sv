// tb_dc_adder: self-checking testbench for dc_adder.
//
// The default 4-bit adder is checked exhaustively (all a, b and cin) and a
// 2-bit (no reconfiguration block) and an 8-bit (three blocks) instance with
// 2000 random vectors each. Every result is compared with the integer sum
// a + b + cin, and each block's fast flag with the rule "predicted carry used
// when a[2j+1] == b[2j+1]". The adder is combinational: outputs are sampled
// 1 ns after the inputs change. A watchdog ends a stuck run with a failure.
module tb_dc_adder;
  int checks = 0;
  int failures = 0;
  int n_fast = 0;
  int n_normal = 0;

  logic [3:0] a4, b4, s4;
  logic       c4i, c4o;
  logic [0:0] f4;
  logic [1:0] a2, b2, s2;
  logic       c2i, c2o;
  logic [0:0] f2;
  logic [7:0] a8, b8, s8;
  logic       c8i, c8o;
  logic [2:0] f8;

  dc_adder dut4 (.a(a4), .b(b4), .cin(c4i), .sum(s4), .cout(c4o), .fast(f4));
  dc_adder #(.N(2)) dut2 (.a(a2), .b(b2), .cin(c2i), .sum(s2), .cout(c2o), .fast(f2));
  dc_adder #(.N(8)) dut8 (.a(a8), .b(b8), .cin(c8i), .sum(s8), .cout(c8o), .fast(f8));

  task automatic check_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 4-bit, exhaustive
    for (int v = 0; v < 512; v++) begin
      {a4, b4, c4i} = 9'(v);
      #1;
      check_int(int'({c4o, s4}), int'(a4) + int'(b4) + int'(c4i),
                $sformatf("N=4 %0d+%0d+%0d", a4, b4, c4i));
      check_int(int'(f4[0]), int'(a4[1] == b4[1]), "N=4 fast flag");
      if (f4[0]) n_fast++; else n_normal++;
    end
    // 2-bit, exhaustive
    for (int v = 0; v < 32; v++) begin
      {a2, b2, c2i} = 5'(v);
      #1;
      check_int(int'({c2o, s2}), int'(a2) + int'(b2) + int'(c2i),
                $sformatf("N=2 %0d+%0d+%0d", a2, b2, c2i));
      check_int(int'(f2), 0, "N=2 fast flag");
    end
    // 8-bit, random
    for (int k = 0; k < 2000; k++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); c8i = 1'($urandom);
      #1;
      check_int(int'({c8o, s8}), int'(a8) + int'(b8) + int'(c8i),
                $sformatf("N=8 %0d+%0d+%0d", a8, b8, c8i));
      for (int j = 0; j < 3; j++)
        check_int(int'(f8[j]), int'(a8[2*j+1] == b8[2*j+1]), $sformatf("N=8 fast[%0d]", j));
    end
    checks++;
    if (n_fast == 0 || n_normal == 0) begin
      failures++;
      $display("FAIL a carry path was never used");
    end
    $display("N=4 carry paths: fast=%0d normal=%0d", n_fast, n_normal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
