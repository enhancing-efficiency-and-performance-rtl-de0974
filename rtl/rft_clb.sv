// rft_clb: reversible fault-tolerant configurable logic block.
//
// Two RFT 4-input LUTs compute F = F(f_in) and G = G(g_in). An RFT 3-input
// LUT combines them with one more input: H = H(h1, G, F). Four selector bits
// S0..S3 from the configuration steer the results:
//   d1    = S0 ? H : F        data of flip-flop 1
//   d2    = S1 ? H : G        data of flip-flop 2
//   f_out = S2 ? q1 : d1      combinational or registered result
//   g_out = S3 ? q2 : d2
// Each flip-flop is an RFT master-slave flip-flop. Its write enable comes
// from pin ec or from VCC (constant 1), chosen by ec_sel; its "state" bit is
// the value it is loaded with while rst is 1 (the reset acts on the rising
// clk edge, with the write enable forced to 1). Every selection is made by
// an RFT 2:1 multiplexer (a Fredkin gate).
//
// The block structure (two 4-LUTs, a 3-LUT, a 4-bit selector, two
// flip-flops with state blocks, VCC-fed enable muxes, outputs F, G, Q1, Q2)
// and the LUT -> flip-flop -> 2:1 mux flow follow the source. The exact
// steering above, the use of the state bits as reset values and the serial
// configuration port are this design's choices.
//
// Configuration: CLB_CFG_W bits (see rft_pkg::clb_cfg_t) shifted in on clk
// while prog_en is 1, MSB first; prog_dout continues the chain.
module rft_clb
  import rft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       prog_en,
  input  logic       prog_din,
  output logic       prog_dout,
  input  logic [3:0] f_in,
  input  logic [3:0] g_in,
  input  logic       h1,
  input  logic       ec,
  output logic       f_out,
  output logic       g_out,
  output logic       q1,
  output logic       q2
);
  clb_cfg_t cfg;
  logic f, g, h;
  logic d1, d2;
  logic en1_cfg, en2_cfg, w1, w2, dd1, dd2;
  logic q1n, q2n;

  rft_cfg_chain #(.W(CLB_CFG_W)) u_cfg (
    .clk(clk), .prog_en(prog_en), .prog_din(prog_din),
    .prog_dout(prog_dout), .cfg(cfg)
  );

  rft_lut4 u_lut_f (.tt(cfg.lut_f), .in(f_in), .y(f));
  rft_lut4 u_lut_g (.tt(cfg.lut_g), .in(g_in), .y(g));
  rft_lut3 u_lut_h (.tt(cfg.lut_h), .in({h1, g, f}), .y(h));

  // selector muxes in front of the flip-flops
  rft_mux2 u_sel0 (.sel(cfg.sel[0]), .din0(f), .din1(h), .y(d1));
  rft_mux2 u_sel1 (.sel(cfg.sel[1]), .din0(g), .din1(h), .y(d2));

  // write enable: VCC or pin ec
  rft_mux2 u_ec1 (.sel(cfg.ec_sel[0]), .din0(1'b1), .din1(ec), .y(en1_cfg));
  rft_mux2 u_ec2 (.sel(cfg.ec_sel[1]), .din0(1'b1), .din1(ec), .y(en2_cfg));

  // state blocks: during reset load the configured state with enable forced
  rft_mux2 u_st_w1 (.sel(rst), .din0(en1_cfg), .din1(1'b1),         .y(w1));
  rft_mux2 u_st_w2 (.sel(rst), .din0(en2_cfg), .din1(1'b1),         .y(w2));
  rft_mux2 u_st_d1 (.sel(rst), .din0(d1),      .din1(cfg.state[0]), .y(dd1));
  rft_mux2 u_st_d2 (.sel(rst), .din0(d2),      .din1(cfg.state[1]), .y(dd2));

  rft_msff u_ff1 (.clk(clk), .w(w1), .d(dd1), .q(q1), .qn(q1n));
  rft_msff u_ff2 (.clk(clk), .w(w2), .d(dd2), .q(q2), .qn(q2n));

  // output muxes: combinational or registered
  rft_mux2 u_sel2 (.sel(cfg.sel[2]), .din0(d1), .din1(q1), .y(f_out));
  rft_mux2 u_sel3 (.sel(cfg.sel[3]), .din0(d2), .din1(q2), .y(g_out));
endmodule
