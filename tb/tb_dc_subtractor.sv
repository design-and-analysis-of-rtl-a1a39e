// tb_dc_subtractor: self-checking testbench for dc_subtractor.
//
// The default 4-bit subtractor is checked exhaustively and a 2-bit and an
// 8-bit instance with all (2-bit) or 2000 random (8-bit) operand pairs. The
// expected difference is (a - b) mod 2^N and the expected brout is
// (a >= b): the carry out of a + ~b + 1. Each block's fast flag must be 1
// exactly when a[2j+1] != b[2j+1] (the inverted B bit equals A). Outputs are
// sampled 1 ns after the inputs change. A watchdog ends a stuck run.
module tb_dc_subtractor;
  int checks = 0;
  int failures = 0;
  int n_borrow = 0;
  int n_noborrow = 0;

  logic [3:0] a4, b4, d4;
  logic       br4;
  logic [0:0] f4;
  logic [1:0] a2, b2, d2;
  logic       br2;
  logic [0:0] f2;
  logic [7:0] a8, b8, d8;
  logic       br8;
  logic [2:0] f8;

  dc_subtractor dut4 (.a(a4), .b(b4), .diff(d4), .brout(br4), .fast(f4));
  dc_subtractor #(.N(2)) dut2 (.a(a2), .b(b2), .diff(d2), .brout(br2), .fast(f2));
  dc_subtractor #(.N(8)) dut8 (.a(a8), .b(b8), .diff(d8), .brout(br8), .fast(f8));

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
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      check_int(int'(d4), (int'(a4) - int'(b4) + 16) % 16, $sformatf("N=4 %0d-%0d", a4, b4));
      check_int(int'(br4), int'(a4 >= b4), $sformatf("N=4 brout %0d-%0d", a4, b4));
      check_int(int'(f4[0]), int'(a4[1] != b4[1]), "N=4 fast flag");
      if (br4) n_noborrow++; else n_borrow++;
    end
    for (int v = 0; v < 16; v++) begin
      {a2, b2} = 4'(v);
      #1;
      check_int(int'(d2), (int'(a2) - int'(b2) + 4) % 4, $sformatf("N=2 %0d-%0d", a2, b2));
      check_int(int'(br2), int'(a2 >= b2), $sformatf("N=2 brout %0d-%0d", a2, b2));
      check_int(int'(f2), 0, "N=2 fast flag");
    end
    for (int k = 0; k < 2000; k++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      #1;
      check_int(int'(d8), (int'(a8) - int'(b8) + 256) % 256, $sformatf("N=8 %0d-%0d", a8, b8));
      check_int(int'(br8), int'(a8 >= b8), $sformatf("N=8 brout %0d-%0d", a8, b8));
      for (int j = 0; j < 3; j++)
        check_int(int'(f8[j]), int'(a8[2*j+1] != b8[2*j+1]), $sformatf("N=8 fast[%0d]", j));
    end
    checks++;
    if (n_borrow == 0 || n_noborrow == 0) begin
      failures++;
      $display("FAIL borrow or no-borrow never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
