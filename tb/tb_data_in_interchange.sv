// tb_data_in_interchange: checks CDI with random words: parity 0 sends x to
// RAME and y to RAMO, parity 1 the reverse.
module tb_data_in_interchange;
  import fft_pkg::*;
  pair_t din;
  logic  parity;
  cplx_t wdata_e, wdata_o;
  int checks = 0, failures = 0;

  data_in_interchange dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      din = {$urandom, $urandom};
      parity = 1'(i);
      #1;
      checks += 2;
      if (wdata_e !== (parity ? din.y : din.x)) begin failures++; $display("FAIL e, parity %0d", parity); end
      if (wdata_o !== (parity ? din.x : din.y)) begin failures++; $display("FAIL o, parity %0d", parity); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
