// fft_ordered_core: low-power radix-2 FFT processor core with order-based
// coefficient processing (top level).
//
// An N-point (default 32) in-place decimation-in-time FFT with one butterfly
// per clock. Data live in two dual-port RAM banks, RAME and RAMO, split by
// the parity of the address bits, so both inputs of a butterfly are read in
// one cycle and both results written back in one cycle. A single counter in
// the FSM (stage section HS, butterfly section LS) drives the address logic:
// ROT0/ROT1 rotate the butterfly index into the two data addresses, PARITY
// tells which bank holds which, CAI/CDI/CDO steer addresses and data to the
// banks, and MUXC forms the coefficient (CROM) address.
// In the last stage, where each butterfly needs a different coefficient,
// RMUX replaces the counter's LS value with the entry of the reorder table
// RROM, so the butterflies run in an order that keeps successive
// coefficients close in Hamming distance. The CROM stores each real
// coefficient plain or negated, whichever switches fewer bits against its
// predecessor in that order, with a flag that the butterfly's real
// multipliers use to flip their product back.
//
// Pipeline: addresses are issued in cycle t; the RAM and CROM read data
// arrive in t+1, pass CDO, the butterfly, MUXIN and CDI combinationally and
// are written in t+1 at the addresses of cycle t (held in a register stage
// with the parity). Data_in is registered once on entry so that it meets its
// address in the same way.
//
// Interface (this design's own; the document does not define one):
//   start      pulse in IDLE begins a block.
//   din_valid  data_in = {x[c], x[c+N/2]} for c = 0..N/2-1 in order, each
//              word {re, im} in 1.15 format. Gaps are allowed.
//   dout_valid data_out = {X[c], X[c+N/2]} for c = 0..N/2-1 on N/2
//              consecutive cycles; X is the DFT scaled by 1/N.
//   done       high with the last output pair; busy high from start to done.
// Timing: N/2 load cycles (+1 input register), log2(N)*N/2 butterfly cycles;
// the first output pair is valid log2(N)*N/2 + 1 clock edges after the edge
// that takes the last input pair, and the N/2 pairs follow back to back.
// The run-time assertion below samples rst_n in its disable condition, which
// lint reports as rst_n being used both synchronously and asynchronously;
// it affects no logic.
// To keep every butterfly's complex magnitude in range, inputs should have
// magnitude below 1.0 (|re|, |im| below about 0.7).
module fft_ordered_core
  import fft_pkg::*;
#(
  parameter int N = 32,
  localparam int AW  = $clog2(N),
  localparam int LSW = AW - 1,
  localparam int HSW = $clog2(AW),
  localparam int H   = N / 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  din_valid,
  input  pair_t data_in,
  output logic  busy,
  output logic  dout_valid,
  output pair_t data_out,
  output logic  done
);
  // FSM outputs
  logic [HSW-1:0] hs;
  logic [LSW-1:0] ls, ord, bidx, caddr;
  logic           asel, sel, we, rd_out;

  // address path
  logic [AW-1:0]  a0, a1;
  logic           parity;
  logic [LSW-1:0] raddr_e, raddr_o;

  // write / data stage (one cycle after the addresses)
  logic [LSW-1:0] waddr_e, waddr_o;
  logic           parity_d, we_d, sel_d, rd_out_d;
  pair_t          din_q, mux_out;
  cplx_t          rdata_e, rdata_o, wdata_e, wdata_o, bx, by, xo, yo;
  coef_t          w;

  initial begin
    assert (N >= 8 && N <= 2 * MAXH && (N & (N - 1)) == 0)
      else $error("fft_ordered_core: N must be a power of two from 8 to %0d", 2 * MAXH);
  end

  fft_fsm #(.N(N)) u_fsm (
    .clk, .rst_n, .start, .din_valid,
    .hs, .ls, .asel, .sel, .we, .rd_out, .busy, .done
  );

  reorder_rom #(.N(N)) u_rrom (.addr(ls), .ord(ord));

  rmux #(.W(LSW)) u_rmux (.asel(asel), .ls(ls), .ord(ord), .y(bidx));

  addr_rot #(.N(N), .BIT(1'b0)) u_rot0 (.b(bidx), .hs(hs), .addr(a0));
  addr_rot #(.N(N), .BIT(1'b1)) u_rot1 (.b(bidx), .hs(hs), .addr(a1));

  addr_parity #(.N(N)) u_parity (.b(bidx), .parity_out(parity));

  coef_addr_mux #(.N(N)) u_muxc (.b(bidx), .hs(hs), .caddr(caddr));

  coef_rom #(.N(N)) u_crom (.clk(clk), .addr(caddr), .w(w));

  addr_interchange #(.N(N)) u_cai (
    .a0(a0), .a1(a1), .parity(parity), .addr_e(raddr_e), .addr_o(raddr_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we_d     <= 1'b0;
      sel_d    <= 1'b0;
      rd_out_d <= 1'b0;
      parity_d <= 1'b0;
      waddr_e  <= '0;
      waddr_o  <= '0;
      din_q    <= '0;
    end else begin
      we_d     <= we;
      sel_d    <= sel;
      rd_out_d <= rd_out;
      parity_d <= parity;
      waddr_e  <= raddr_e;
      waddr_o  <= raddr_o;
      din_q    <= data_in;
    end
  end

  dp_ram #(.DEPTH(H), .W(32)) u_rame (
    .clk(clk), .we(we_d), .waddr(waddr_e), .wdata(wdata_e), .raddr(raddr_e), .rdata(rdata_e)
  );
  dp_ram #(.DEPTH(H), .W(32)) u_ramo (
    .clk(clk), .we(we_d), .waddr(waddr_o), .wdata(wdata_o), .raddr(raddr_o), .rdata(rdata_o)
  );

  data_out_interchange u_cdo (
    .rdata_e(rdata_e), .rdata_o(rdata_o), .parity(parity_d), .x(bx), .y(by)
  );

  butterfly u_bf (.x(bx), .y(by), .w(w), .xo(xo), .yo(yo));

  muxin u_muxin (.sel(sel_d), .data_in(din_q), .xoyo('{x: xo, y: yo}), .y(mux_out));

  data_in_interchange u_cdi (
    .din(mux_out), .parity(parity_d), .wdata_e(wdata_e), .wdata_o(wdata_o)
  );

  // The pipeline has no bubble: while a word is written, the RAMs must not
  // be reading it for a butterfly or an output pair (reads during loading
  // are discarded).
  assert property (@(posedge clk) disable iff (!rst_n)
    (we_d && busy && !sel) |-> (raddr_e != waddr_e && raddr_o != waddr_o))
    else $error("fft_ordered_core: read of a word in the cycle it is written");

  always_comb begin
    dout_valid = rd_out_d;
    data_out   = '{x: bx, y: by};
  end
endmodule
