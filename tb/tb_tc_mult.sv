// tb_tc_mult: checks the 16x16 two's complement multiplier against integer
// products, on corner values and 20000 random operand pairs.
module tb_tc_mult;
  logic signed [15:0] a, b;
  logic signed [31:0] o;
  int checks = 0, failures = 0;

  tc_mult dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int av, input int bv);
    longint e;
    a = 16'(av);
    b = 16'(bv);
    #1;
    e = longint'(a) * longint'(b);
    checks++;
    if (longint'(o) != e) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", a, b, o, e);
    end
  endtask

  initial begin
    check(0, 0);
    check(32767, 32767);
    check(-32768, 32767);
    check(-32768, -32768);
    check(-1, 1);
    check(12345, -321);
    for (int i = 0; i < 20000; i++) check(int'($urandom) % 65536 - 32768, int'($urandom) % 65536 - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
