// data_out_interchange: data-out interchange block (CDO).
//
// Steers the words read from RAME and RAMO to the butterfly's X and Y
// inputs. parity = 0: RAME -> X, RAMO -> Y; parity = 1: swapped.
// Combinational; driven with the parity of the butterfly whose read data
// is on the RAM outputs (one cycle after its addresses).
module data_out_interchange
  import fft_pkg::*;
(
  input  cplx_t rdata_e,
  input  cplx_t rdata_o,
  input  logic  parity,
  output cplx_t x,
  output cplx_t y
);
  always_comb begin
    x = parity ? rdata_o : rdata_e;
    y = parity ? rdata_e : rdata_o;
  end
endmodule
