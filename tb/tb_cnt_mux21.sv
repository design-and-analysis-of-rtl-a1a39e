// tb_cnt_mux21: exhaustive self-checking testbench for cnt_mux21.
//
// Checks y = s ? i1 : i0.
// Every input combination is applied, the outputs are compared after 1 ns
// with values computed here from the Boolean definition, and a watchdog ends
// the run with a failure if it has not finished in time.
module tb_cnt_mux21;
  int checks = 0;
  int failures = 0;
  logic s, i0, i1, y;

  cnt_mux21 dut (.s(s), .i0(i0), .i1(i1), .y(y));

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
      {s, i0, i1} = 3'(v);
      #1;
      check(y, (s == 1'b1) ? i1 : i0, $sformatf("mux s=%b i0=%b i1=%b", s, i0, i1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
