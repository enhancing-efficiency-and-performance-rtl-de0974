// rft_lut4: reversible fault-tolerant 4-input look-up table.
// The 16 stored bits (tt) are the data inputs of four RFT 4:1 multiplexers
// selected by in[1:0]; a fifth RFT 4:1 multiplexer selected by in[3:2]
// picks among their outputs, so y = tt[in]. Five MSB gates in all.
// The stored bits come from the CLB's configuration memory. Combinational.
module rft_lut4 (
  input  logic [15:0] tt,
  input  logic [3:0]  in,
  output logic        y
);
  logic [3:0] lvl1;

  for (genvar k = 0; k < 4; k++) begin : g_lvl1
    rft_mux4 u_mux (.sel(in[1:0]), .din(tt[4*k +: 4]), .y(lvl1[k]));
  end

  rft_mux4 u_mux_out (.sel(in[3:2]), .din(lvl1), .y(y));
endmodule
