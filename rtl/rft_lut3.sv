// rft_lut3: reversible fault-tolerant 3-input look-up table.
// Two RFT 4:1 multiplexers select among the 8 stored bits by in[1:0]; an
// RFT 2:1 multiplexer (Fredkin gate) selects between them by in[2], so
// y = tt[in]. The decomposition is this design's choice: the source names
// the 3-input LUT without giving its insides. Combinational.
module rft_lut3 (
  input  logic [7:0] tt,
  input  logic [2:0] in,
  output logic       y
);
  logic lo, hi;

  rft_mux4 u_mux_lo (.sel(in[1:0]), .din(tt[3:0]), .y(lo));
  rft_mux4 u_mux_hi (.sel(in[1:0]), .din(tt[7:4]), .y(hi));
  rft_mux2 u_mux_out (.sel(in[2]), .din0(lo), .din1(hi), .y(y));
endmodule
