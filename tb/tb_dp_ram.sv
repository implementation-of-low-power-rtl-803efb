// tb_dp_ram: checks a RAM bank: writes random words, reads them back with
// the one-cycle read latency, and checks that a simultaneous read of the
// address being written returns the old word.
module tb_dp_ram;
  localparam int DEPTH = 16;
  logic        clk = 1'b0;
  logic        we = 1'b0;
  logic [3:0]  waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  dp_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] old;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // random reads and writes on different addresses
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      raddr = 4'($urandom_range(0, DEPTH - 1));
      we = 1'($urandom_range(0, 1));
      waddr = 4'($urandom_range(0, DEPTH - 1));
      if (waddr == raddr) waddr = waddr + 1'b1;
      wdata = $urandom;
      old = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== old) begin failures++; $display("FAIL read %0d: %h vs %h", raddr, rdata, old); end
    end
    // read during write of the same address returns the old word
    @(negedge clk);
    raddr = 4'd3; waddr = 4'd3; we = 1'b1; wdata = ~model[3]; old = model[3];
    @(posedge clk);
    #1;
    checks++;
    if (rdata !== old) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    we = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (rdata !== ~old) begin failures++; $display("FAIL written word not read back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
