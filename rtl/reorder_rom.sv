// reorder_rom: reorder look-up table (RROM).
//
// N/2 words of log2(N/2) bits. Word p holds the index of the butterfly to
// run p-th in the last FFT stage. In that stage butterfly b uses W_N^b, so
// the table is the coefficient order found by the ordering procedure in
// fft_pkg::order_exp (nearest Hamming neighbour on the imaginary parts).
// The table is computed while the design elaborates. Combinational read, as
// the counter value and the table output meet in RMUX in the same cycle.
module reorder_rom
  import fft_pkg::*;
#(
  parameter int N = 32,
  localparam int LSW = $clog2(N) - 1,
  localparam int H   = N / 2
) (
  input  logic [LSW-1:0] addr,
  output logic [LSW-1:0] ord
);
  typedef logic [LSW-1:0] tab_t [H];

  function automatic tab_t build();
    tab_t     t;
    exp_arr_t ex;
    ex = order_exp(N);
    for (int p = 0; p < H; p++) t[p] = LSW'(ex[p]);
    return t;
  endfunction

  localparam tab_t TABLE = build();

  always_comb ord = TABLE[addr];
endmodule
