// tb_coef_addr_mux: checks MUXC for N = 32 over every butterfly index and
// stage. The expected twiddle exponent is taken from the DIT flowgraph: in
// stage s the butterfly whose lower address is p uses W_N^e with
// e = (p mod 2^s) * N / 2^(s+1); p is the rotated address formed here.
module tb_coef_addr_mux;
  localparam int N = 32, AW = 5;
  logic [3:0] b, caddr;
  logic [2:0] hs;
  int checks = 0, failures = 0;

  coef_addr_mux dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, e, v;
    for (int s = 0; s < AW; s++) begin
      for (int bi = 0; bi < N / 2; bi++) begin
        b = 4'(bi); hs = 3'(s);
        #1;
        v = bi * 2;
        p = ((v << s) | (v >> (AW - s))) & (N - 1);
        e = (p % (1 << s)) * (N / (1 << (s + 1)));
        checks++;
        if (int'(caddr) != e) begin failures++; $display("FAIL b=%0d s=%0d: %0d vs %0d", bi, s, caddr, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
