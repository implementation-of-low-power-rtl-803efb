// tb_addr_parity: checks PARITY for N = 32 over every butterfly index: the
// output must be 1 exactly when the index has an odd number of ones, which
// is the parity of the butterfly's lower (x) data address.
module tb_addr_parity;
  logic [3:0] b;
  logic       parity_out;
  int checks = 0, failures = 0;

  addr_parity dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    for (int i = 0; i < 16; i++) begin
      b = 4'(i);
      #1;
      c = 0;
      for (int k = 0; k < 4; k++) if ((i >> k) & 1) c++;
      checks++;
      if (parity_out !== 1'(c % 2)) begin failures++; $display("FAIL b=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
