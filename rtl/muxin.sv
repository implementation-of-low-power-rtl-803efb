// muxin: input multiplexer (MUXIN).
//
// Chooses what is written into the RAMs: the 64-bit input pair DATA_IN
// while a block is loaded (sel = 1), or the butterfly results XO and YO
// during the FFT stages (sel = 0). Combinational.
module muxin
  import fft_pkg::*;
(
  input  logic  sel,
  input  pair_t data_in,
  input  pair_t xoyo,
  output pair_t y
);
  always_comb y = sel ? data_in : xoyo;
endmodule
