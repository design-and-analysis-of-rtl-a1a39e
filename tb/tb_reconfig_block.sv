// tb_reconfig_block: exhaustive self-checking testbench for reconfig_block.
//
// Applies all 32 combinations of the two-bit operands and the carry input and
// checks {cout, sum} = a + b + cin, and that fast (predicted carry used) is 1
// exactly when a[0] == b[0]. Counts how often each carry path was taken and
// fails if either never occurs. A watchdog ends a stuck run with a failure.
module tb_reconfig_block;
  int checks = 0;
  int failures = 0;
  int n_fast = 0;
  int n_normal = 0;

  logic [1:0] a, b, sum;
  logic       cin, cout, fast;

  reconfig_block dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .fast(fast));

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
      {a, b, cin} = 5'(v);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, sum} !== 3'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%b: got %0d expected %0d", a, b, cin, {cout, sum}, total);
      end
      checks++;
      if (fast !== (a[0] == b[0])) begin
        failures++;
        $display("FAIL fast a=%b b=%b: got %b", a, b, fast);
      end
      if (fast) n_fast++; else n_normal++;
    end
    checks++;
    if (n_fast == 0 || n_normal == 0) begin
      failures++;
      $display("FAIL a carry path was never used: fast=%0d normal=%0d", n_fast, n_normal);
    end
    $display("carry paths: fast=%0d normal=%0d", n_fast, n_normal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
