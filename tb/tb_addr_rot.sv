// tb_addr_rot: checks ROT0 and ROT1 for N = 32 over every butterfly index
// and stage. Expected lower address: b with a 0 appended, rotated left by
// the stage number, computed bit by bit. Also checked, as the flowgraph
// requires: the two addresses differ exactly in bit s (span 2^s), and each
// stage touches every address exactly once.
module tb_addr_rot;
  localparam int N = 32, AW = 5;
  logic [3:0]    b;
  logic [2:0]    hs;
  logic [AW-1:0] a0, a1;
  int checks = 0, failures = 0;

  addr_rot #(.N(N), .BIT(1'b0)) dut0 (.b(b), .hs(hs), .addr(a0));
  addr_rot #(.N(N), .BIT(1'b1)) dut1 (.b(b), .hs(hs), .addr(a1));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] v, e;
    bit seen [N];
    for (int s = 0; s < AW; s++) begin
      for (int k = 0; k < N; k++) seen[k] = 0;
      for (int bi = 0; bi < N / 2; bi++) begin
        b = 4'(bi); hs = 3'(s);
        #1;
        v = {b, 1'b0};
        for (int k = 0; k < AW; k++) e[(k + s) % AW] = v[k];
        checks += 3;
        if (a0 !== e) begin failures++; $display("FAIL rot0 b=%0d s=%0d: %0d vs %0d", bi, s, a0, e); end
        if ((a0 ^ a1) !== AW'(1 << s)) begin failures++; $display("FAIL pair span b=%0d s=%0d", bi, s); end
        if (seen[a0] || seen[a1]) begin failures++; $display("FAIL address reused in stage %0d", s); end
        seen[a0] = 1; seen[a1] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
