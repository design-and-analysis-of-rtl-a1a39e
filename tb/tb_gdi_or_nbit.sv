// tb_gdi_or_nbit: exhaustive self-checking testbench for gdi_or_nbit.
//
// All 256 operand pairs of the default 4-bit gate are applied and y is
// compared with a | b; an 8-bit instance is checked with 1000 random pairs.
// Outputs are sampled 1 ns after the inputs change. A watchdog ends a stuck
// run with a failure.
module tb_gdi_or_nbit;
  int checks = 0;
  int failures = 0;

  logic [3:0] a4, b4, y4;
  logic [7:0] a8, b8, y8;

  gdi_or_nbit dut4 (.a(a4), .b(b4), .y(y4));
  gdi_or_nbit #(.N(8)) dut8 (.a(a8), .b(b8), .y(y8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if (y4 !== (a4 | b4)) begin
        failures++;
        $display("FAIL N=4 a=%b b=%b y=%b", a4, b4, y4);
      end
    end
    for (int k = 0; k < 1000; k++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      #1;
      checks++;
      if (y8 !== (a8 | b8)) begin
        failures++;
        $display("FAIL N=8 a=%b b=%b y=%b", a8, b8, y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
