// dp_ram: dual-port data RAM bank (RAME or RAMO).
//
// One write port and one read port on the same clock, so a butterfly's
// inputs can be read in the same cycle as the previous butterfly's results
// are written. The read is synchronous: rdata shows the word at raddr one
// clock after raddr is presented. A read of the address being written in
// the same cycle returns the old word; the core's address sequence never
// does this. DEPTH = N/2 words of W = 32 bits (16-bit real and imaginary
// parts). Contents are not reset.
module dp_ram #(
  parameter int DEPTH = 16,
  parameter int W     = 32,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
