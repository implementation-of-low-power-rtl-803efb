// coef_rom: coefficient ROM (CROM).
//
// N/2 words, addressed by the twiddle exponent k, each {flag, real, imag}
// of W_N^k in 16-bit form. The real part is stored negated (two's
// complement) when the ordering procedure chose that form, and the flag is
// then 1; see fft_pkg. The table is computed while the design elaborates.
// The read is registered, so the word appears one clock after its address,
// in step with the data read from the RAM banks.
module coef_rom
  import fft_pkg::*;
#(
  parameter int N = 32,
  localparam int LSW = $clog2(N) - 1,
  localparam int H   = N / 2
) (
  input  logic           clk,
  input  logic [LSW-1:0] addr,
  output coef_t          w
);
  typedef logic [$bits(coef_t)-1:0] tab_t [H];

  function automatic tab_t build();
    tab_t      t;
    flag_arr_t fl;
    fl = order_flags(N);
    for (int k = 0; k < H; k++) begin
      t[k] = {fl[k], fl[k] ? word_t'(-twiddle_re(N, k)) : twiddle_re(N, k),
              twiddle_im(N, k)};
    end
    return t;
  endfunction

  localparam tab_t TABLE = build();

  always_ff @(posedge clk) w <= coef_t'(TABLE[addr]);
endmodule
