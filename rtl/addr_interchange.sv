// addr_interchange: address interchange block (CAI).
//
// Steers the two butterfly addresses to the banks. An address goes to the
// bank of its parity (RAME even, RAMO odd); within the bank the word index
// is the address without its least significant bit, which is unique among
// addresses of equal parity. parity = 0: a0 -> RAME, a1 -> RAMO; parity = 1:
// a0 -> RAMO, a1 -> RAME. Combinational.
module addr_interchange #(
  parameter int N = 32,
  localparam int AW  = $clog2(N),
  localparam int BAW = AW - 1
) (
  input  logic [AW-1:0]  a0,
  input  logic [AW-1:0]  a1,
  input  logic           parity,
  output logic [BAW-1:0] addr_e,
  output logic [BAW-1:0] addr_o
);
  always_comb begin
    addr_e = parity ? a1[AW-1:1] : a0[AW-1:1];
    addr_o = parity ? a0[AW-1:1] : a1[AW-1:1];
  end
endmodule
