// tb_cisfa: exhaustive self-checking testbench for cisfa.
//
// Checks that the carry picked by csel (1: cin, 0: cins) is added: {cout, s} = a + b + (csel ? cin : cins).
// Every input combination is applied, the outputs are compared after 1 ns
// with values computed here from the Boolean definition, and a watchdog ends
// the run with a failure if it has not finished in time.
module tb_cisfa;
  int checks = 0;
  int failures = 0;
  logic a, b, cin, cins, csel, s, cout;

  cisfa dut (.a(a), .b(b), .cin(cin), .cins(cins), .csel(csel), .s(s), .cout(cout));

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
    for (int v = 0; v < 32; v++) begin
      int total;
      {a, b, cin, cins, csel} = 5'(v);
      total = int'(a) + int'(b) + (csel ? int'(cin) : int'(cins));
      #1;
      check(s,    total[0], $sformatf("sum a=%b b=%b cin=%b cins=%b csel=%b", a, b, cin, cins, csel));
      check(cout, total[1], $sformatf("carry a=%b b=%b cin=%b cins=%b csel=%b", a, b, cin, cins, csel));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
