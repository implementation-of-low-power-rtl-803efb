// fft_pkg: types, constants and elaboration-time functions shared by the
// ordered FFT core.
//
// Data words are 32 bits: a 16-bit real part above a 16-bit imaginary part,
// both two's complement (fractional, 1.15). Coefficient words carry a flag
// bit above the 16-bit real part and the 16-bit imaginary part; when the flag
// is set the stored real part is the two's complement (negation) of the true
// value, and the real-coefficient multiplier undoes this by inverting its
// product.
//
// The coefficient tables are not typed in: they are computed while the design
// elaborates, by the functions below, for any power-of-two size N up to 1024.
//  * twiddle_re()/twiddle_im(): W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N). A value v >= 0 is
//    stored as round(|v| * 32767); a negative one as the bitwise complement
//    of that magnitude. This reproduces the 16-bit coefficient set listed for
//    the 32-point core (7fff, 7d89, ..., 8000 for -1.0).
//  * order_exp()/order_flags(): the coefficient ordering procedure. The first entry is
//    the coefficient whose imaginary part has the fewest ones; each following
//    entry is the not-yet-used coefficient whose imaginary part has the
//    smallest Hamming distance to the previous one (ties go to the smallest
//    exponent). The first real part is then stored plain or negated,
//    whichever has fewer ones; each following real part is stored plain or
//    negated, whichever is nearer in Hamming distance to the real part stored
//    before it (ties keep it plain). The flag records the choice.
package fft_pkg;

  localparam int DW    = 16;       // width of a real or imaginary part
  localparam int MAXH  = 512;      // largest N/2 the table functions handle

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;                        // one 32-bit memory word

  typedef struct packed {
    cplx_t x;                      // word for the lower address of a pair
    cplx_t y;                      // word for the upper address of a pair
  } pair_t;                        // 64-bit DATA_IN / XO,YO / data_out bundle

  typedef struct packed {
    logic    flag;                 // 1: re holds the negated real part
    sample_t re;
    sample_t im;
  } coef_t;

  typedef logic [DW-1:0] word_t;

  typedef int unsigned exp_arr_t  [MAXH];  // position -> exponent
  typedef bit          flag_arr_t [MAXH];  // exponent -> flag

  function automatic word_t quant(input real v);
    int m;
    real a;
    a = (v < 0.0) ? -v : v;
    m = $rtoi(a * 32767.0 + 0.5);
    if (m > 32767) m = 32767;
    return (v < 0.0 && m != 0) ? word_t'(~m) : word_t'(m);
  endfunction

  function automatic word_t twiddle_re(input int unsigned n, input int unsigned k);
    real pi = 3.14159265358979323846;
    return quant($cos(2.0 * pi * real'(k) / real'(n)));
  endfunction

  function automatic word_t twiddle_im(input int unsigned n, input int unsigned k);
    real pi = 3.14159265358979323846;
    return quant(-$sin(2.0 * pi * real'(k) / real'(n)));
  endfunction

  function automatic int unsigned ones(input word_t v);
    int unsigned c = 0;
    for (int b = 0; b < DW; b++) c += int'(v[b]);
    return c;
  endfunction

  function automatic int unsigned ham(input word_t a, input word_t b);
    return ones(a ^ b);
  endfunction

  // Coefficient order: position p -> exponent of the p-th coefficient.
  function automatic exp_arr_t order_exp(input int unsigned n);
    exp_arr_t    ex;
    word_t       im [MAXH];
    bit          used [MAXH];
    word_t       prev_im;
    int unsigned best, best_d, d;
    for (int unsigned k = 0; k < MAXH; k++) begin
      used[k] = 1'b0;
      ex[k]   = 0;
      im[k]   = (k < n / 2) ? twiddle_im(n, k) : '0;
    end
    // Fewest ones first, then nearest neighbour on the imaginary parts.
    prev_im = '0;
    for (int unsigned pos = 0; pos < n / 2; pos++) begin
      best   = 0;
      best_d = 1000;
      for (int unsigned k = 0; k < n / 2; k++) begin
        if (!used[k]) begin
          d = (pos == 0) ? ones(im[k]) : ham(im[k], prev_im);
          if (d < best_d) begin
            best   = k;
            best_d = d;
          end
        end
      end
      used[best] = 1'b1;
      ex[pos]    = best;
      prev_im    = im[best];
    end
    return ex;
  endfunction

  // Real-part form: flag of exponent k is 1 when its real part is stored
  // negated. Decided along the coefficient order.
  function automatic flag_arr_t order_flags(input int unsigned n);
    exp_arr_t  ex;
    flag_arr_t fl;
    word_t     xr, neg, prev_re;
    ex = order_exp(n);
    for (int unsigned k = 0; k < MAXH; k++) fl[k] = 1'b0;
    prev_re = '0;
    for (int unsigned pos = 0; pos < n / 2; pos++) begin
      xr  = twiddle_re(n, ex[pos]);
      neg = word_t'(-xr);
      if (pos == 0 ? (ones(xr) > ones(neg)) : (ham(xr, prev_re) > ham(neg, prev_re))) begin
        fl[ex[pos]] = 1'b1;
        xr = neg;
      end
      prev_re = xr;
    end
    return fl;
  endfunction

endpackage
