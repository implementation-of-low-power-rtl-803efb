// tb_reorder_rom: checks the reorder table (RROM).
// For N = 32 the table must equal the order below, whose first six entries
// (0, 8, 2, 14, 1, 15) are those of the published 32-point ordered set.
// For N = 16, 32 and 64 it must also be a permutation of 0..N/2-1 that
// starts with the coefficient whose imaginary part has the fewest ones and
// where each next imaginary part is at minimum Hamming distance from the
// previous one among the coefficients not yet used. Coefficients are
// quantised here from cos/sin independently of the design's package.
module tb_reorder_rom;
  localparam real PI = 3.14159265358979323846;
  localparam int EXP32 [16] = '{0, 8, 2, 14, 1, 15, 5, 11, 6, 10, 7, 9, 4, 12, 3, 13};

  logic [2:0] a16, o16;
  logic [3:0] a32, o32;
  logic [4:0] a64, o64;
  int checks = 0, failures = 0;

  reorder_rom #(.N(16)) dut16 (.addr(a16), .ord(o16));
  reorder_rom #(.N(32)) dut32 (.addr(a32), .ord(o32));
  reorder_rom #(.N(64)) dut64 (.addr(a64), .ord(o64));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] qim(input int n, input int k);
    real v;
    int  m;
    v = -$sin(2.0 * PI * k / n);
    m = $rtoi(((v < 0.0) ? -v : v) * 32767.0 + 0.5);
    return (v < 0.0 && m != 0) ? 16'(~m) : 16'(m);
  endfunction

  task automatic check_order(input int n, input int ord []);
    bit used [];
    int d, dmin, prev;
    used = new[n / 2];
    for (int p = 0; p < n / 2; p++) begin
      checks++;
      if (ord[p] >= n / 2 || used[ord[p]]) begin
        failures++;
        $display("FAIL N=%0d: entry %0d (%0d) repeats or is out of range", n, p, ord[p]);
        continue;
      end
      dmin = 99;
      for (int k = 0; k < n / 2; k++) if (!used[k]) begin
        d = (p == 0) ? $countones(qim(n, k)) : $countones(qim(n, k) ^ qim(n, prev));
        if (d < dmin) dmin = d;
      end
      d = (p == 0) ? $countones(qim(n, ord[p])) : $countones(qim(n, ord[p]) ^ qim(n, prev));
      checks++;
      if (d != dmin) begin
        failures++;
        $display("FAIL N=%0d: entry %0d is at distance %0d, nearest is %0d", n, p, d, dmin);
      end
      used[ord[p]] = 1;
      prev = ord[p];
    end
  endtask

  initial begin
    int o [];
    o = new[8];
    for (int p = 0; p < 8; p++) begin a16 = 3'(p); #1; o[p] = int'(o16); end
    check_order(16, o);
    o = new[16];
    for (int p = 0; p < 16; p++) begin
      a32 = 4'(p); #1; o[p] = int'(o32);
      checks++;
      if (o[p] != EXP32[p]) begin failures++; $display("FAIL N=32 entry %0d: %0d vs %0d", p, o[p], EXP32[p]); end
    end
    check_order(32, o);
    o = new[32];
    for (int p = 0; p < 32; p++) begin a64 = 5'(p); #1; o[p] = int'(o64); end
    check_order(64, o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
