// tb_addr_interchange: checks CAI for N = 32. For every address pair of
// every stage (a0 even or odd parity, a1 = a0 with bit s flipped), the
// even-parity address must reach RAME and the odd one RAMO, each as its
// upper four bits.
module tb_addr_interchange;
  localparam int N = 32;
  logic [4:0] a0, a1;
  logic       parity;
  logic [3:0] addr_e, addr_o;
  int checks = 0, failures = 0;

  addr_interchange dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] ev, od;
    for (int s = 0; s < 5; s++) begin
      for (int a = 0; a < N; a++) begin
        if ((a >> s) & 1) continue;
        a0 = 5'(a); a1 = 5'(a | (1 << s)); parity = ^a0;
        #1;
        ev = (^a0) ? a1 : a0;
        od = (^a0) ? a0 : a1;
        checks += 2;
        if (addr_e !== ev[4:1]) begin failures++; $display("FAIL even a0=%0d s=%0d", a, s); end
        if (addr_o !== od[4:1]) begin failures++; $display("FAIL odd a0=%0d s=%0d", a, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
