// tb_data_out_interchange: checks CDO with random words: parity 0 gives
// X = RAME, Y = RAMO; parity 1 the reverse.
module tb_data_out_interchange;
  import fft_pkg::*;
  cplx_t rdata_e, rdata_o, x, y;
  logic  parity;
  int checks = 0, failures = 0;

  data_out_interchange dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      rdata_e = $urandom;
      rdata_o = $urandom;
      parity = 1'(i);
      #1;
      checks += 2;
      if (x !== (parity ? rdata_o : rdata_e)) begin failures++; $display("FAIL x, parity %0d", parity); end
      if (y !== (parity ? rdata_e : rdata_o)) begin failures++; $display("FAIL y, parity %0d", parity); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
