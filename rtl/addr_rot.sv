// addr_rot: rotation block (ROT0 with BIT = 0, ROT1 with BIT = 1).
//
// Forms one data address of butterfly b in stage hs: the butterfly index
// with BIT appended as least significant bit, rotated left by hs places
// within log2(N) bits. The two addresses of a butterfly (BIT = 0 and 1) then
// differ only in bit hs, the span of a radix-2 decimation-in-time butterfly
// in that stage, and over all b every address is used once per stage.
// The rotation follows the cited addressing method; its exact form (left
// rotation, appended bit position) is this design's choice.
// Combinational.
module addr_rot #(
  parameter int N   = 32,
  parameter bit BIT = 1'b0,
  localparam int AW  = $clog2(N),
  localparam int LSW = AW - 1,
  localparam int HSW = $clog2(AW)
) (
  input  logic [LSW-1:0] b,
  input  logic [HSW-1:0] hs,
  output logic [AW-1:0]  addr
);
  logic [AW-1:0]   v;
  logic [2*AW-1:0] t;

  always_comb begin
    v    = {b, BIT};
    t    = {v, v} << hs;
    addr = t[2*AW-1:AW];
  end
endmodule
