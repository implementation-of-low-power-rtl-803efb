// real_coef_mult: multiplication module for the real coefficient part.
//
// The real coefficient may be stored negated (two's complement) to cut the
// switching activity on the coefficient input; its flag bit says so. The
// module multiplies, keeps product bits [30:15] (a 1.15 result) and passes
// them through 16 XOR gates driven by the flag. With the flag set the output
// is the ones' complement of the 16-bit product, i.e. -(a*b) - 1 LSB, which
// restores the sign of the true product to within one LSB. Only the upper
// half is complemented, so no 32-bit incrementer is needed.
// Interface: combinational; a = data part, b = stored real coefficient,
// flag = coefficient flag, fo = final output. Structure as in the document;
// the width is a parameter defaulting to its 16 bits.
module real_coef_mult #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                flag,
  output logic signed [W-1:0] fo
);
  logic signed [2*W-1:0] o;

  tc_mult #(.W(W)) u_mult (.a(a), .b(b), .o(o));

  always_comb fo = o[2*W-2:W-1] ^ {W{flag}};
endmodule
