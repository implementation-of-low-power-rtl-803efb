// tb_rmux: checks RMUX with random indices: ASEL = 1 passes the RROM
// index, ASEL = 0 the counter value.
module tb_rmux;
  logic       asel;
  logic [3:0] ls, ord, y;
  int checks = 0, failures = 0;

  rmux dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      ls = 4'($urandom);
      ord = 4'($urandom);
      asel = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (y !== (asel ? ord : ls)) begin failures++; $display("FAIL asel=%0d", asel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
