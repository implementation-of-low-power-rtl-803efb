// tb_fft_ordered_core: end-to-end test of the ordered FFT core at its
// default size (N = 32).
//
// Runs several blocks through the core: an impulse, a single complex tone,
// a constant and random data, with and without gaps in din_valid, and one
// block started right after the previous one finished. Each output bin is
// compared with a double-precision DFT scaled by 1/N, computed here from
// cos/sin independently of the core's tables, within a small tolerance in
// LSBs. It also checks
//  * the latency: first output pair exactly log2(N)*N/2 + 1 clock edges after
//    the edge that takes the last input pair, N/2 consecutive output cycles, done with
//    the last one;
//  * that the last stage really runs in the reordered sequence (the
//    butterfly index differs from the counter value) and only there;
//  * that negated-real coefficients (flag = 1) reach the butterfly;
//  * that both bank assignments (parity 0 and 1) occur;
//  * that the coefficient bits seen by the butterfly in the last stage
//    toggle less than the same coefficients would in natural order.
// Each of those mechanisms is counted and must occur at least once.
module tb_fft_ordered_core;
  import fft_pkg::*;

  localparam int N   = 32;
  localparam int LOG = $clog2(N);
  localparam int H   = N / 2;
  localparam int TOL = 6;              // LSBs
  localparam real PI = 3.14159265358979323846;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  start = 1'b0;
  logic  din_valid = 1'b0;
  pair_t data_in = '0;
  logic  busy, dout_valid, done;
  pair_t data_out;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_reorder = 0, n_asel_bad = 0, n_flag = 0, n_par0 = 0, n_par1 = 0, n_gap = 0;
  int act_ordered = 0, act_natural = 0;

  fft_ordered_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- internal observation of the mechanisms ----
  logic [32:0] prev_w;
  bit          prev_valid = 0;
  always @(posedge clk) begin
    if (rst_n && dut.u_fsm.state == 2'd2) begin  // PROC
      if (dut.asel) begin
        if (dut.bidx != dut.ls) n_reorder++;
        if (dut.hs != LOG[$bits(dut.hs)-1:0] - 1'b1) n_asel_bad++;
      end else if (dut.hs == LOG[$bits(dut.hs)-1:0] - 1'b1) n_asel_bad++;
      if (dut.parity) n_par1++; else n_par0++;
    end
    // coefficient actually at the butterfly (one cycle after its address)
    if (rst_n && dut.we_d && !dut.sel_d && dut.w.flag) n_flag++;
  end

  // reference twiddle in natural order, for the activity comparison
  function automatic int popc(input logic [31:0] v);
    return $countones(v);
  endfunction

  // ---- stimulus helpers ----
  real xr [N], xi [N];
  cplx_t got [N];
  int n_out;

  function automatic sample_t q(input real v);
    return sample_t'($rtoi(v * 32768.0));
  endfunction

  task automatic run_block(input bit gaps, output int latency);
    int last_in, first_out;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int c = 0; c < H; c++) begin
      if (gaps && (c % 3 == 1)) begin
        din_valid = 1'b0;
        n_gap++;
        @(negedge clk);
      end
      din_valid = 1'b1;
      data_in.x.re = q(xr[c]);
      data_in.x.im = q(xi[c]);
      data_in.y.re = q(xr[c + H]);
      data_in.y.im = q(xi[c + H]);
      @(negedge clk);
    end
    last_in = cycle - 1;
    din_valid = 1'b0;
    data_in = '0;
    n_out = 0;
    first_out = -1;
    while (n_out < H) begin
      @(posedge clk);
      #1;
      if (dout_valid) begin
        if (first_out < 0) first_out = cycle - 1;
        got[n_out]     = data_out.x;
        got[n_out + H] = data_out.y;
        n_out++;
        if (n_out == H) begin
          checks++;
          if (!done) begin
            failures++;
            $display("FAIL: done not high with the last output pair");
          end
        end
      end else if (n_out > 0) begin
        checks++;
        failures++;
        $display("FAIL: gap in the output burst");
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL: busy/done not cleared after the block");
    end
    latency = first_out - last_in;
  endtask

  task automatic check_block(input string name);
    real er, ei, ang;
    int  dr, di, maxe;
    maxe = 0;
    for (int k = 0; k < N; k++) begin
      er = 0.0;
      ei = 0.0;
      for (int m = 0; m < N; m++) begin
        ang = -2.0 * PI * real'(m * k % N) / real'(N);
        er += real'(q(xr[m])) * $cos(ang) - real'(q(xi[m])) * $sin(ang);
        ei += real'(q(xr[m])) * $sin(ang) + real'(q(xi[m])) * $cos(ang);
      end
      er /= real'(N);
      ei /= real'(N);
      dr = int'(real'(got[k].re) - er);
      di = int'(real'(got[k].im) - ei);
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > maxe) maxe = dr;
      if (di > maxe) maxe = di;
      checks++;
      if (dr > TOL || di > TOL) begin
        failures++;
        $display("FAIL %s bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                 name, k, got[k].re, got[k].im, er, ei);
      end
    end
    $display("%s: max error %0d LSB", name, maxe);
  endtask

  task automatic check_latency(input int lat);
    checks++;
    if (lat != LOG * H + 1) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", lat, LOG * H + 1);
    end
  endtask

  // Coefficient-input activity in the last stage, observed at the butterfly
  // (ordered) against the same coefficients in natural order (reference).
  bit          in_last;
  logic [31:0] wprev_o, wprev_n, wcur_n;
  int          nlast;
  always @(posedge clk) begin
    in_last <= dut.asel && rst_n;
    if (in_last) begin
      if (nlast > 0) act_ordered += popc({dut.w.re, dut.w.im} ^ wprev_o);
      wprev_o = {dut.w.re, dut.w.im};
      // natural order: the coefficient of butterfly nlast, from cos/sin
      wcur_n = {ref_w(nlast, 1'b1), ref_w(nlast, 1'b0)};
      if (nlast > 0) act_natural += popc(wcur_n ^ wprev_n);
      wprev_n = wcur_n;
      nlast++;
    end
  end

  function automatic logic [15:0] ref_w(input int k, input bit re);
    real v;
    int  m;
    v = re ? $cos(2.0 * PI * k / N) : -$sin(2.0 * PI * k / N);
    m = $rtoi(((v < 0.0) ? -v : v) * 32767.0 + 0.5);
    return (v < 0.0 && m != 0) ? 16'(~m) : 16'(m);
  endfunction

  int lat;
  initial begin
    nlast = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1: impulse at 0 -> flat spectrum
    for (int m = 0; m < N; m++) begin xr[m] = 0.0; xi[m] = 0.0; end
    xr[0] = 0.9;
    run_block(1'b0, lat);
    check_block("impulse");
    check_latency(lat);
    checks++;
    if (act_ordered >= act_natural || nlast != H) begin
      failures++;
      $display("FAIL: last-stage coefficient activity %0d (ordered) vs %0d (natural), %0d butterflies",
               act_ordered, act_natural, nlast);
    end
    $display("last-stage coefficient toggles: ordered %0d, natural order %0d",
             act_ordered, act_natural);

    // 2: complex tone at bin 3
    for (int m = 0; m < N; m++) begin
      xr[m] = 0.6 * $cos(2.0 * PI * 3 * m / N);
      xi[m] = 0.6 * $sin(2.0 * PI * 3 * m / N);
    end
    run_block(1'b1, lat);
    check_block("tone");
    check_latency(lat);

    // 3: constant
    for (int m = 0; m < N; m++) begin xr[m] = -0.5; xi[m] = 0.25; end
    run_block(1'b0, lat);
    check_block("constant");

    // 4..8: random data, alternately with gaps
    for (int b = 0; b < 5; b++) begin
      for (int m = 0; m < N; m++) begin
        xr[m] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0 * 0.68;
        xi[m] = (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0 * 0.68;
      end
      run_block(b[0], lat);
      check_block($sformatf("random%0d", b));
      check_latency(lat);
    end

    // mechanisms
    $display("reordered butterflies %0d, flagged coefficient uses %0d, parity0 %0d, parity1 %0d, input gaps %0d",
             n_reorder, n_flag, n_par0, n_par1, n_gap);
    checks += 5;
    if (n_reorder == 0) begin failures++; $display("FAIL: no reordered butterfly"); end
    if (n_asel_bad != 0) begin failures++; $display("FAIL: ASEL outside the last stage"); end
    if (n_flag == 0) begin failures++; $display("FAIL: no flagged coefficient used"); end
    if (n_par0 == 0 || n_par1 == 0) begin failures++; $display("FAIL: one bank assignment never used"); end
    if (n_gap == 0) begin failures++; $display("FAIL: no input gap"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
