// tb_fft_fsm: checks the controller for N = 32 over two blocks, the first
// with gaps in din_valid. Expected per cycle:
//  LOAD: sel = 1, hs = 0, ls = bit-reversed count of accepted pairs,
//        we = din_valid; exactly N/2 pairs accepted.
//  PROC: sel = 0, we = 1, (hs, ls) running 0..4 x 0..15 in order,
//        asel = 1 exactly when hs = 4; 80 cycles.
//  OUT:  rd_out = 1, hs = 4, asel = 0, ls = 0..15; done one cycle after the
//        last OUT cycle; busy from start until then.
module tb_fft_fsm;
  localparam int N = 32, LOG = 5, H = 16;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, din_valid = 1'b0;
  logic [2:0] hs;
  logic [3:0] ls;
  logic       asel, sel, we, rd_out, busy, done;
  int checks = 0, failures = 0;

  fft_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (hs=%0d ls=%0d)", what, hs, ls); end
  endtask

  function automatic logic [3:0] rev4(input int v);
    return {v[0], v[1], v[2], v[3]};
  endfunction

  task automatic block(input bit gaps);
    int c;
    @(negedge clk);
    expect1(!busy, "idle before start");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    c = 0;
    while (c < H) begin
      din_valid = gaps ? 1'($urandom_range(0, 1)) : 1'b1;
      #1;
      expect1(busy && sel && !asel && !rd_out && hs == 0, "load controls");
      expect1(we == din_valid, "load write enable");
      if (din_valid) begin
        expect1(ls == rev4(c), "load address bit-reversed");
        c++;
      end
      @(negedge clk);
    end
    din_valid = 1'b0;
    for (int s = 0; s < LOG; s++)
      for (int b = 0; b < H; b++) begin
        #1;
        expect1(!sel && we && !rd_out && busy, "process controls");
        expect1(hs == 3'(s) && ls == 4'(b), "process counter");
        expect1(asel == (s == LOG - 1), "asel only in the last stage");
        expect1(!done, "no early done");
        @(negedge clk);
      end
    for (int b = 0; b < H; b++) begin
      #1;
      expect1(rd_out && !we && !asel && hs == 3'(LOG - 1) && ls == 4'(b), "output controls");
      @(negedge clk);
    end
    #1;
    expect1(done && !busy && !rd_out, "done after the last output");
    @(negedge clk);
    expect1(!done, "done is one pulse");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // din_valid without start is ignored
    din_valid = 1'b1;
    @(negedge clk);
    #1;
    expect1(!busy && !we, "din_valid ignored in idle");
    din_valid = 1'b0;
    block(1'b1);
    block(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
