// tb_mfa: exhaustive self-checking testbench for mfa.
//
// Checks the full-adder function: {cout, s} = a + b + cin.
// Every input combination is applied, the outputs are compared after 1 ns
// with values computed here from the Boolean definition, and a watchdog ends
// the run with a failure if it has not finished in time.
module tb_mfa;
  int checks = 0;
  int failures = 0;
  logic a, b, cin, s, cout;

  mfa dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

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
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      check(s,    total[0], $sformatf("sum a=%b b=%b cin=%b", a, b, cin));
      check(cout, total[1], $sformatf("carry a=%b b=%b cin=%b", a, b, cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
