// tb_butterfly: checks the radix-2 butterfly.
// For random inputs of magnitude below 1 and random unit coefficients,
// stored plain or negated with the flag, the outputs must be within 2 LSB
// of (x + y*w)/2 and (x - y*w)/2 computed in floating point, and equal to
// an integer model of the four-multiplier structure.
module tb_butterfly;
  import fft_pkg::*;
  cplx_t x, y, xo, yo;
  coef_t w;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  butterfly dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int top16(input longint p);
    return int'(16'(p >>> 15));
  endfunction

  function automatic int s16(input int v);
    return int'(signed'(16'(v)));
  endfunction

  initial begin
    real ang, wr, wi, exr, exi, eyr, eyi, pr, pi_;
    int  iwr, iwi, swr, o1, o2, o3, o4, d, s;
    for (int i = 0; i < 20000; i++) begin
      ang = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
      wr = $cos(ang);
      wi = -$sin(ang);
      iwr = $rtoi(wr * 32767.0);
      iwi = $rtoi(wi * 32767.0);
      w.flag = 1'($urandom_range(0, 1));
      swr = w.flag ? -iwr : iwr;
      w.re = 16'(swr);
      w.im = 16'(iwi);
      x.re = 16'(int'($urandom_range(0, 45000)) - 22500);
      x.im = 16'(int'($urandom_range(0, 45000)) - 22500);
      y.re = 16'(int'($urandom_range(0, 45000)) - 22500);
      y.im = 16'(int'($urandom_range(0, 45000)) - 22500);
      #1;
      // integer model
      o1 = s16(top16(longint'(y.re) * swr) ^ (w.flag ? 32'hffff : 0));
      o2 = s16(top16(longint'(y.im) * iwi));
      o3 = s16(top16(longint'(y.im) * swr) ^ (w.flag ? 32'hffff : 0));
      o4 = s16(top16(longint'(y.re) * iwi));
      d = s16(o1 - o2);
      s = s16(o3 + o4);
      checks += 4;
      if (xo.re != 16'((int'(x.re) + d) >>> 1)) begin failures++; $display("FAIL xro"); end
      if (xo.im != 16'((int'(x.im) + s) >>> 1)) begin failures++; $display("FAIL xio"); end
      if (yo.re != 16'((int'(x.re) - d) >>> 1)) begin failures++; $display("FAIL yro"); end
      if (yo.im != 16'((int'(x.im) - s) >>> 1)) begin failures++; $display("FAIL yio"); end
      // floating-point reference with the true coefficient
      pr  = real'(y.re) * iwr / 32768.0 - real'(y.im) * iwi / 32768.0;
      pi_ = real'(y.im) * iwr / 32768.0 + real'(y.re) * iwi / 32768.0;
      exr = (real'(x.re) + pr) / 2.0;
      exi = (real'(x.im) + pi_) / 2.0;
      eyr = (real'(x.re) - pr) / 2.0;
      eyi = (real'(x.im) - pi_) / 2.0;
      checks++;
      if ((real'(xo.re) - exr) > 2.0 || (exr - real'(xo.re)) > 2.0 ||
          (real'(xo.im) - exi) > 2.0 || (exi - real'(xo.im)) > 2.0 ||
          (real'(yo.re) - eyr) > 2.0 || (eyr - real'(yo.re)) > 2.0 ||
          (real'(yo.im) - eyi) > 2.0 || (eyi - real'(yo.im)) > 2.0) begin
        failures++;
        $display("FAIL float: xo=(%0d,%0d) exp (%0.1f,%0.1f) yo=(%0d,%0d) exp (%0.1f,%0.1f)",
                 xo.re, xo.im, exr, exi, yo.re, yo.im, eyr, eyi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
