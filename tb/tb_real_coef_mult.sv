// tb_real_coef_mult: checks the flagged real-coefficient multiplier.
// Expected output: product bits [30:15] of a*b, inverted when the flag is
// set. It also checks the intended effect: with the coefficient stored
// negated (b = -c, flag = 1) the output is within one LSB of the plain
// product a*c.
module tb_real_coef_mult;
  logic signed [15:0] a, b, fo;
  logic               flag;
  int checks = 0, failures = 0;

  real_coef_mult dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  av, cv;
    logic signed [15:0] plain, e;
    longint p;
    for (int i = 0; i < 20000; i++) begin
      av = int'($urandom_range(0, 65535)) - 32768;
      cv = int'($urandom_range(0, 65534)) - 32767;   // c = -32768 has no negation
      // plain coefficient
      a = 16'(av); b = 16'(cv); flag = 1'b0;
      #1;
      p = longint'(av) * longint'(cv);
      e = 16'(p >>> 15);
      plain = e;
      checks++;
      if (fo !== e) begin failures++; $display("FAIL plain %0d*%0d: %0d vs %0d", av, cv, fo, e); end
      // negated coefficient with flag
      b = 16'(-cv); flag = 1'b1;
      #1;
      p = longint'(av) * longint'(-cv);
      e = ~16'(p >>> 15);
      checks++;
      if (fo !== e) begin failures++; $display("FAIL flag %0d*%0d: %0d vs %0d", av, -cv, fo, e); end
      checks++;
      if (fo - plain > 1 || plain - fo > 1) begin
        failures++;
        $display("FAIL: flagged result %0d not within 1 LSB of %0d", fo, plain);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
