// tb_dcr_alu: end-to-end self-checking testbench for the ALU at its default
// width (4 bits, no parameter override).
//
// Every operation code is applied to every operand pair (4 x 16 x 16 = 1024
// operations), with the code changing on every step so that each step is also
// a mode switch. result and carry are compared with a reference computed
// here from integer arithmetic: a + b, a - b (carry = a >= b), a & b, a | b.
// The run also counts how often the reconfiguration block (bits 1 and 2) took
// its high-speed predicted carry (its lower bit does not propagate: a[1] ==
// b[1] when adding, a[1] != b[1] when subtracting) and how often the normal
// rippled carry, and how often the carry and the borrow
// were produced; a mechanism that never occurs is a failure. The ALU is
// combinational, so outputs are sampled 1 ns after each input change (zero
// clock cycles of latency). A watchdog ends a stuck run with a failure.
module tb_dcr_alu;
  import dcr_alu_pkg::*;

  localparam int W = ALU_WIDTH;

  int checks = 0;
  int failures = 0;

  int n_op[4];
  int n_switch = 0;
  int n_add_fast = 0, n_add_normal = 0, n_add_carry = 0;
  int n_sub_fast = 0, n_sub_normal = 0, n_sub_borrow = 0;

  logic [W-1:0] a, b, result;
  alu_op_e      s;
  logic         carry;

  dcr_alu dut (.a(a), .b(b), .s(s), .result(result), .carry(carry));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e prev;
    prev = OP_OR;
    foreach (n_op[i]) n_op[i] = 0;
    for (int x = 0; x < (1 << W); x++) begin
      for (int y = 0; y < (1 << W); y++) begin
        for (int c = 0; c < 4; c++) begin
          int exp_r, exp_c;
          a = W'(x);
          b = W'(y);
          s = alu_op_e'(c);
          case (c)
            0: begin exp_r = (x + y) % (1 << W);          exp_c = (x + y) >> W; end
            1: begin exp_r = (x - y + (1 << W)) % (1 << W); exp_c = int'(x >= y); end
            2: begin exp_r = x & y;                        exp_c = 0; end
            default: begin exp_r = x | y;                  exp_c = 0; end
          endcase
          #1;
          checks++;
          if (int'(result) != exp_r || int'(carry) != exp_c) begin
            failures++;
            $display("FAIL s=%0d a=%0d b=%0d: got %0d/%b expected %0d/%0d",
                     c, x, y, result, carry, exp_r, exp_c);
          end
          n_op[c]++;
          if (s != prev) n_switch++;
          prev = s;
          if (c == 0) begin
            if (a[1] == b[1]) n_add_fast++; else n_add_normal++;
            if (carry) n_add_carry++;
          end
          if (c == 1) begin
            if (a[1] != b[1]) n_sub_fast++; else n_sub_normal++;
            if (!carry) n_sub_borrow++;
          end
        end
      end
    end

    $display("operations: add=%0d sub=%0d and=%0d or=%0d, mode switches=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_switch);
    $display("adder: fast carry path=%0d normal path=%0d carry out=%0d",
             n_add_fast, n_add_normal, n_add_carry);
    $display("subtractor: fast carry path=%0d normal path=%0d borrow=%0d",
             n_sub_fast, n_sub_normal, n_sub_borrow);

    foreach (n_op[i]) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL operation %0d never ran", i); end
    end
    checks++;
    if (n_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    checks++;
    if (n_add_fast == 0 || n_add_normal == 0) begin failures++; $display("FAIL adder carry path unused"); end
    checks++;
    if (n_sub_fast == 0 || n_sub_normal == 0) begin failures++; $display("FAIL subtractor carry path unused"); end
    checks++;
    if (n_add_carry == 0 || n_sub_borrow == 0) begin failures++; $display("FAIL carry or borrow never produced"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
