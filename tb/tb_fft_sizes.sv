// tb_fft_sizes: runs one random block through ordered FFT cores of every
// size the design was evaluated at (16 to 1024 points; 32 is covered by
// tb_fft_ordered_core), plus the smallest size the core accepts, 8 and collects their checks. See fft_size_run.
module tb_fft_sizes;
  localparam int NS = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin [NS];
  int   c [NS], f [NS], ao [NS], an [NS];
  int   checks, failures;

  always #5 clk = ~clk;

  fft_size_run #(.N(16),   .TOL(6))  r16   (.clk, .rst_n, .fin(fin[0]), .checks(c[0]), .failures(f[0]), .act_ordered(ao[0]), .act_natural(an[0]));
  fft_size_run #(.N(64),   .TOL(8))  r64   (.clk, .rst_n, .fin(fin[1]), .checks(c[1]), .failures(f[1]), .act_ordered(ao[1]), .act_natural(an[1]));
  fft_size_run #(.N(128),  .TOL(8))  r128  (.clk, .rst_n, .fin(fin[2]), .checks(c[2]), .failures(f[2]), .act_ordered(ao[2]), .act_natural(an[2]));
  fft_size_run #(.N(256),  .TOL(10)) r256  (.clk, .rst_n, .fin(fin[3]), .checks(c[3]), .failures(f[3]), .act_ordered(ao[3]), .act_natural(an[3]));
  fft_size_run #(.N(512),  .TOL(10)) r512  (.clk, .rst_n, .fin(fin[4]), .checks(c[4]), .failures(f[4]), .act_ordered(ao[4]), .act_natural(an[4]));
  fft_size_run #(.N(1024), .TOL(12)) r1024 (.clk, .rst_n, .fin(fin[5]), .checks(c[5]), .failures(f[5]), .act_ordered(ao[5]), .act_natural(an[5]));
  fft_size_run #(.N(8),    .TOL(6))  r8    (.clk, .rst_n, .fin(fin[6]), .checks(c[6]), .failures(f[6]), .act_ordered(ao[6]), .act_natural(an[6]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) wait (fin[i]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NS; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
