// data_in_interchange: data-in interchange block (CDI).
//
// Steers the two words from MUXIN to the RAM write ports: the x word (lower
// address of the pair) to the bank holding the x address, the y word to the
// other. parity = 0: x -> RAME, y -> RAMO; parity = 1: swapped.
// Combinational; driven with the parity of the butterfly being written.
module data_in_interchange
  import fft_pkg::*;
(
  input  pair_t din,
  input  logic  parity,
  output cplx_t wdata_e,
  output cplx_t wdata_o
);
  always_comb begin
    wdata_e = parity ? din.y : din.x;
    wdata_o = parity ? din.x : din.y;
  end
endmodule
