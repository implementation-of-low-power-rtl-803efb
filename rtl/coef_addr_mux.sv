// coef_addr_mux: coefficient address generator (MUXC).
//
// In stage hs of the radix-2 DIT flowgraph, butterfly b uses W_N^e with
// e = (x address mod 2^hs) * N / 2^(hs+1). With the rotated addressing this
// is simply the hs most significant bits of b kept in place and the rest
// cleared, so the generator is one row of 2:1 multiplexers, each choosing
// bit k of b or 0 according to the stage. e is also the CROM address.
// Combinational.
module coef_addr_mux #(
  parameter int N = 32,
  localparam int AW  = $clog2(N),
  localparam int LSW = AW - 1,
  localparam int HSW = $clog2(AW)
) (
  input  logic [LSW-1:0] b,
  input  logic [HSW-1:0] hs,
  output logic [LSW-1:0] caddr
);
  always_comb begin
    for (int k = 0; k < LSW; k++)
      caddr[k] = (32'(k) >= 32'(LSW) - 32'(hs)) ? b[k] : 1'b0;
  end
endmodule
