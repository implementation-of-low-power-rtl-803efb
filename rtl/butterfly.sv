// butterfly: radix-2 decimation-in-time butterfly with halved outputs.
//
//   xo = (x + y*w) / 2,   yo = (x - y*w) / 2
//
// computed as in the four-multiplier structure of the design:
//   O1 = yr*wr (flagged real multiplier), O2 = yi*wi, D = O1 - O2[30:15]
//   O3 = yi*wr (flagged real multiplier), O4 = yr*wi, S = O3 + O4[30:15]
//   xro = xr + D, xio = xi + S, yro = xr - D, yio = xi - S
// Each sum is formed at 17 bits and halved (arithmetic shift right by one,
// truncating) back to 16 bits, so the complex magnitude never grows from
// stage to stage. D and S are 16 bits, as in the document; they cannot
// overflow while |y| stays below 1.0.
// Interface: combinational, one butterfly per clock cycle in the core.
// w.flag marks a negated stored real part (see real_coef_mult).
module butterfly
  import fft_pkg::*;
(
  input  cplx_t x,
  input  cplx_t y,
  input  coef_t w,
  output cplx_t xo,
  output cplx_t yo
);
  sample_t               o1, o3, d, s;
  logic signed [2*DW-1:0] o2, o4;
  logic signed [DW:0]     sxr, sxi, syr, syi;

  real_coef_mult #(.W(DW)) u_m1 (.a(y.re), .b(w.re), .flag(w.flag), .fo(o1));
  tc_mult        #(.W(DW)) u_m2 (.a(y.im), .b(w.im), .o(o2));
  real_coef_mult #(.W(DW)) u_m3 (.a(y.im), .b(w.re), .flag(w.flag), .fo(o3));
  tc_mult        #(.W(DW)) u_m4 (.a(y.re), .b(w.im), .o(o4));

  always_comb begin
    d   = o1 - o2[2*DW-2:DW-1];
    s   = o3 + o4[2*DW-2:DW-1];
    sxr = (DW+1)'(x.re) + (DW+1)'(d);
    sxi = (DW+1)'(x.im) + (DW+1)'(s);
    syr = (DW+1)'(x.re) - (DW+1)'(d);
    syi = (DW+1)'(x.im) - (DW+1)'(s);
    xo.re = sxr[DW:1];
    xo.im = sxi[DW:1];
    yo.re = syr[DW:1];
    yo.im = syi[DW:1];
  end
endmodule
