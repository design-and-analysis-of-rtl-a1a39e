// tb_copfa: exhaustive self-checking testbench for copfa.
//
// Checks {cout, s} = a + b + cin, the predicted carry coutp = a & b and axb = a ^ b.
// Every input combination is applied, the outputs are compared after 1 ns
// with values computed here from the Boolean definition, and a watchdog ends
// the run with a failure if it has not finished in time.
module tb_copfa;
  int checks = 0;
  int failures = 0;
  logic a, b, cin, s, cout, coutp, axb;

  copfa dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .coutp(coutp), .axb(axb));

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
      check(s,     total[0], $sformatf("sum a=%b b=%b cin=%b", a, b, cin));
      check(cout,  total[1], $sformatf("carry a=%b b=%b cin=%b", a, b, cin));
      check(coutp, (a == 1'b1) && (b == 1'b1), $sformatf("coutp a=%b b=%b", a, b));
      check(axb,   (a != b), $sformatf("axb a=%b b=%b", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
