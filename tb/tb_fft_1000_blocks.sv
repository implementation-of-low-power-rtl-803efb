// tb_fft_1000_blocks: streams 1000 blocks of random samples through the
// default 32-point core, each block started as soon as the previous one is
// done, with random gaps in din_valid. Every output bin of every block is
// compared with a double-precision DFT scaled by 1/N (twiddles from cos/sin,
// independent of the core) within 6 LSB. Over the whole run it also counts
// the bit toggles of the coefficient word at the butterfly in all stages
// and in the last stage, and checks that the last-stage toggles are well
// below those of the same coefficients in natural order.
module tb_fft_1000_blocks;
  import fft_pkg::*;

  localparam int  N = 32, H = N / 2, NBLK = 1000, TOL = 6;
  localparam real PI = 3.14159265358979323846;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, din_valid = 1'b0;
  pair_t data_in = '0, data_out;
  logic  busy, dout_valid, done;
  int checks = 0, failures = 0;

  fft_ordered_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NBLK * 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // coefficient-input activity at the butterfly
  longint      act_all = 0, act_last = 0, act_nat = 0;
  logic [31:0] wprev = '0, nprev = '0, ncur;
  bit          in_proc = 0, in_last = 0;
  int          pos = 0;
  real         cw [N], sw [N];

  function automatic logic [15:0] qw(input real v);
    int m;
    m = $rtoi(((v < 0.0) ? -v : v) * 32767.0 + 0.5);
    return (v < 0.0 && m != 0) ? 16'(~m) : 16'(m);
  endfunction

  always @(posedge clk) begin
    in_proc <= dut.we && !dut.sel && rst_n;
    in_last <= dut.asel && rst_n;
    if (in_proc) begin
      act_all += $countones({dut.w.re, dut.w.im} ^ wprev);
      if (in_last && pos > 0) act_last += $countones({dut.w.re, dut.w.im} ^ wprev);
      wprev = {dut.w.re, dut.w.im};
    end
    if (in_last) begin
      ncur = {qw(cw[pos]), qw(-sw[pos])};
      if (pos > 0) act_nat += $countones(ncur ^ nprev);
      nprev = ncur;
      pos = (pos + 1) % H;
    end
  end

  sample_t xr [N], xi [N];
  cplx_t   got [N];

  initial begin
    int  n_out, dr, di, maxe;
    real er, ei;
    for (int k = 0; k < N; k++) begin
      cw[k] = $cos(2.0 * PI * k / N);
      sw[k] = $sin(2.0 * PI * k / N);
    end
    maxe = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int blk = 0; blk < NBLK; blk++) begin
      for (int m = 0; m < N; m++) begin
        xr[m] = sample_t'(int'($urandom_range(0, 44000)) - 22000);
        xi[m] = sample_t'(int'($urandom_range(0, 44000)) - 22000);
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int c = 0; c < H; c++) begin
        while ($urandom_range(0, 3) == 0) begin
          din_valid = 1'b0;
          @(negedge clk);
        end
        din_valid = 1'b1;
        data_in = '{x: '{re: xr[c], im: xi[c]}, y: '{re: xr[c + H], im: xi[c + H]}};
        @(negedge clk);
      end
      din_valid = 1'b0;
      n_out = 0;
      while (n_out < H) begin
        @(posedge clk);
        #1;
        if (dout_valid) begin
          got[n_out] = data_out.x;
          got[n_out + H] = data_out.y;
          n_out++;
        end
      end
      checks++;
      if (!done) begin failures++; $display("FAIL block %0d: no done", blk); end
      for (int k = 0; k < N; k++) begin
        er = 0.0;
        ei = 0.0;
        for (int m = 0; m < N; m++) begin
          er += real'(xr[m]) * cw[(m * k) % N] + real'(xi[m]) * sw[(m * k) % N];
          ei += real'(xi[m]) * cw[(m * k) % N] - real'(xr[m]) * sw[(m * k) % N];
        end
        dr = int'(real'(got[k].re) - er / N);
        di = int'(real'(got[k].im) - ei / N);
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > maxe) maxe = dr;
        if (di > maxe) maxe = di;
        checks++;
        if (dr > TOL || di > TOL) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d bin %0d: error (%0d,%0d)", blk, k, dr, di);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (act_last * 10 > act_nat * 6) begin
      failures++;
      $display("FAIL: last-stage toggles %0d vs %0d in natural order", act_last, act_nat);
    end
    $display("%0d blocks: max error %0d LSB; coefficient toggles all stages %0d, last stage %0d (natural order %0d)",
             NBLK, maxe, act_all, act_last, act_nat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
