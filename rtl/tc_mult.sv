// tc_mult: 16 x 16 two's complement multiplier with the full 32-bit product.
//
// This is the plain multiplier of the butterfly, used for the imaginary
// coefficient part, and the core of the real-coefficient multiplication
// module. Purely combinational: o = a * b, both operands signed 1.15
// fractions, product signed 2.30. A gate-level structure (the cores were
// built with a Wallace tree) is left to synthesis.
module tc_mult #(
  parameter int W = 16
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] o
);
  always_comb o = a * b;
endmodule
