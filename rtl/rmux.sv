// rmux: reorder multiplexer (RMUX).
//
// 2:1 multiplexer between the conventional butterfly index (the counter's
// LS section) and the ordered index read from RROM. ASEL = 1 only in the
// last FFT stage, where the butterflies run in coefficient order; the
// chosen index feeds ROT0, ROT1, PARITY and MUXC alike, so data and
// coefficient addresses stay paired. Combinational.
module rmux #(
  parameter int W = 4
) (
  input  logic         asel,
  input  logic [W-1:0] ls,
  input  logic [W-1:0] ord,
  output logic [W-1:0] y
);
  always_comb y = asel ? ord : ls;
endmodule
