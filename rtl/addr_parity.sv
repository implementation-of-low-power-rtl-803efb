// addr_parity: parity generator (PARITY).
//
// Parity of the butterfly index. The x address of the butterfly (index with
// a 0 appended, rotated) has this parity and the y address the other, so
// PARITY_OUT = 0 means x lives in the even bank RAME and y in RAMO, and 1
// means the reverse. Combinational.
module addr_parity #(
  parameter int N = 32,
  localparam int LSW = $clog2(N) - 1
) (
  input  logic [LSW-1:0] b,
  output logic           parity_out
);
  always_comb parity_out = ^b;
endmodule
