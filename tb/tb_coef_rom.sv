// tb_coef_rom: checks the coefficient ROM (CROM) for N = 32.
// Expected words, by exponent: the 16-bit coefficient set of the 32-point
// core (real part stored negated where the flag is 1), as produced by the
// ordering scheme. The published ordered set lists these same words.
// Also checked: the one-cycle read latency, and for every word that a
// flagged real part is the two's complement of the plain value, quantised
// here from cos.
module tb_coef_rom;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam logic [32:0] EXP [16] = '{
    {1'b1, 16'h8001, 16'h0000}, {1'b0, 16'h7d89, 16'he706},
    {1'b0, 16'h7641, 16'hcf04}, {1'b0, 16'h6a6d, 16'hb8e3},
    {1'b1, 16'ha57e, 16'ha57d}, {1'b0, 16'h471c, 16'h9592},
    {1'b1, 16'hcf05, 16'h89be}, {1'b1, 16'he707, 16'h8276},
    {1'b0, 16'h0000, 16'h8000}, {1'b0, 16'he706, 16'h8276},
    {1'b0, 16'hcf04, 16'h89be}, {1'b1, 16'h471d, 16'h9592},
    {1'b0, 16'ha57d, 16'ha57d}, {1'b1, 16'h6a6e, 16'hb8e3},
    {1'b1, 16'h7642, 16'hcf04}, {1'b1, 16'h7d8a, 16'he706}};

  logic       clk = 1'b0;
  logic [3:0] addr = '0;
  coef_t      w;
  int checks = 0, failures = 0;

  coef_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] qre(input int k);
    real v;
    int  m;
    v = $cos(2.0 * PI * k / 32.0);
    m = $rtoi(((v < 0.0) ? -v : v) * 32767.0 + 0.5);
    return (v < 0.0 && m != 0) ? 16'(~m) : 16'(m);
  endfunction

  initial begin
    logic [15:0] plain;
    for (int i = 0; i < 64; i++) begin
      int k;
      k = (i < 16) ? i : int'($urandom_range(0, 15));
      @(negedge clk);
      addr = 4'(k);
      @(posedge clk);
      #1;
      checks++;
      if (w !== EXP[k]) begin failures++; $display("FAIL k=%0d: %h vs %h", k, w, EXP[k]); end
      plain = qre(k);
      checks++;
      if (w.re !== (w.flag ? 16'(-plain) : plain)) begin
        failures++;
        $display("FAIL k=%0d: real part %h does not match flag %0d and %h", k, w.re, w.flag, plain);
      end
      // latency: changing the address does not change w before the clock
      @(negedge clk);
      addr = addr + 1'b1;
      #1;
      checks++;
      if (w !== EXP[k]) begin failures++; $display("FAIL k=%0d: output changed before the clock", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
