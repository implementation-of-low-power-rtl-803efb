// tb_muxin: checks MUXIN with random words: sel = 1 passes DATA_IN,
// sel = 0 the butterfly results.
module tb_muxin;
  import fft_pkg::*;
  logic  sel;
  pair_t data_in, xoyo, y;
  int checks = 0, failures = 0;

  muxin dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      data_in = {$urandom, $urandom};
      xoyo = {$urandom, $urandom};
      sel = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (y !== (sel ? data_in : xoyo)) begin failures++; $display("FAIL sel=%0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
