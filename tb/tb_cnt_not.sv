// tb_cnt_not: exhaustive self-checking testbench for cnt_not.
//
// Checks y = ~a.
// Every input combination is applied, the outputs are compared after 1 ns
// with values computed here from the Boolean definition, and a watchdog ends
// the run with a failure if it has not finished in time.
module tb_cnt_not;
  int checks = 0;
  int failures = 0;
  logic a, y;

  cnt_not dut (.a(a), .y(y));

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
    for (int v = 0; v < 2; v++) begin
      a = 1'(v);
      #1;
      check(y, (v == 0), $sformatf("not a=%b", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
