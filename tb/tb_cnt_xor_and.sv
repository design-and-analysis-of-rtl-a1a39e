// tb_cnt_xor_and: exhaustive self-checking testbench for cnt_xor_and.
//
// Checks axorb = a ^ b and coutp = a & b.
// Every input combination is applied, the outputs are compared after 1 ns
// with values computed here from the Boolean definition, and a watchdog ends
// the run with a failure if it has not finished in time.
module tb_cnt_xor_and;
  int checks = 0;
  int failures = 0;
  logic a, b, axorb, coutp;

  cnt_xor_and dut (.a(a), .b(b), .axorb(axorb), .coutp(coutp));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check(axorb, (a != b), $sformatf("xor a=%b b=%b", a, b));
      check(coutp, (v == 3), $sformatf("and a=%b b=%b", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
