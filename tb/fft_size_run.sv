// fft_size_run: test harness for one ordered FFT core of size N, used by
// tb_fft_sizes. Runs one block of random data through the core, compares
// every bin with a double-precision DFT scaled by 1/N within TOL LSBs,
// checks the latency (log2(N)*N/2 + 1 edges from the last input pair to
// the first output pair), and measures the bit toggles of the 32-bit
// coefficient word at the butterfly during the last stage against the same
// coefficients taken in natural order. Raises fin when done.
module fft_size_run
  import fft_pkg::*;
#(
  parameter int N   = 16,
  parameter int TOL = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   act_ordered,
  output int   act_natural
);
  localparam int  LOG = $clog2(N);
  localparam int  H   = N / 2;
  localparam real PI  = 3.14159265358979323846;

  logic  start = 1'b0, din_valid = 1'b0;
  pair_t data_in = '0, data_out;
  logic  busy, dout_valid, done;
  int    cycle = 0;

  fft_ordered_core #(.N(N)) dut (.*);

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [15:0] ref_w(input int k, input bit re);
    real v;
    int  m;
    v = re ? $cos(2.0 * PI * k / N) : -$sin(2.0 * PI * k / N);
    m = $rtoi(((v < 0.0) ? -v : v) * 32767.0 + 0.5);
    return (v < 0.0 && m != 0) ? 16'(~m) : 16'(m);
  endfunction

  // last-stage coefficient activity
  bit          in_last = 0;
  int          nlast = 0;
  logic [31:0] wprev_o, wprev_n, wcur_n;
  always @(posedge clk) begin
    in_last <= dut.asel && rst_n;
    if (in_last) begin
      if (nlast > 0) act_ordered += $countones({dut.w.re, dut.w.im} ^ wprev_o);
      wprev_o = {dut.w.re, dut.w.im};
      wcur_n = {ref_w(nlast, 1'b1), ref_w(nlast, 1'b0)};
      if (nlast > 0) act_natural += $countones(wcur_n ^ wprev_n);
      wprev_n = wcur_n;
      nlast++;
    end
  end

  sample_t xr [N], xi [N];
  cplx_t   got [N];

  initial begin
    int  last_in, first_out, n_out, dr, di, maxe;
    real er, ei, ang;
    fin = 1'b0;
    checks = 0;
    failures = 0;
    act_ordered = 0;
    act_natural = 0;
    for (int m = 0; m < N; m++) begin
      xr[m] = sample_t'(int'($urandom_range(0, 44000)) - 22000);
      xi[m] = sample_t'(int'($urandom_range(0, 44000)) - 22000);
    end
    wait (rst_n);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int c = 0; c < H; c++) begin
      din_valid = 1'b1;
      data_in = '{x: '{re: xr[c], im: xi[c]}, y: '{re: xr[c + H], im: xi[c + H]}};
      @(negedge clk);
    end
    last_in = cycle - 1;
    din_valid = 1'b0;
    n_out = 0;
    first_out = -1;
    while (n_out < H) begin
      @(posedge clk);
      #1;
      if (dout_valid) begin
        if (first_out < 0) first_out = cycle - 1;
        got[n_out] = data_out.x;
        got[n_out + H] = data_out.y;
        n_out++;
      end
    end
    checks++;
    if (first_out - last_in != LOG * H + 1) begin
      failures++;
      $display("FAIL N=%0d: latency %0d, expected %0d", N, first_out - last_in, LOG * H + 1);
    end
    maxe = 0;
    for (int k = 0; k < N; k++) begin
      er = 0.0;
      ei = 0.0;
      for (int m = 0; m < N; m++) begin
        ang = -2.0 * PI * real'((m * k) % N) / real'(N);
        er += real'(xr[m]) * $cos(ang) - real'(xi[m]) * $sin(ang);
        ei += real'(xr[m]) * $sin(ang) + real'(xi[m]) * $cos(ang);
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
        $display("FAIL N=%0d bin %0d: error (%0d,%0d) LSB", N, k, dr, di);
      end
    end
    // the last stage must run every butterfly once, with fewer coefficient
    // toggles than natural order (the document reports about half)
    checks += 2;
    if (nlast != H) begin
      failures++;
      $display("FAIL N=%0d: %0d last-stage butterflies", N, nlast);
    end
    if (act_ordered * 10 > act_natural * 6) begin
      failures++;
      $display("FAIL N=%0d: coefficient toggles %0d ordered vs %0d natural", N, act_ordered, act_natural);
    end
    $display("N=%0d: max error %0d LSB, last-stage coefficient toggles %0d (natural order %0d, %0d%% fewer)",
             N, maxe, act_ordered, act_natural, 100 - (100 * act_ordered + act_natural / 2) / act_natural);
    fin = 1'b1;
  end
endmodule
