// rft_pkg: types and constants shared by the reversible fault-tolerant (RFT)
// configurable logic block and the fabric built from it.
//
// The configuration word of one CLB is a packed struct. It is held in a
// serial shift chain (rft_cfg_chain); the first bit shifted in ends up in the
// most significant position, so a word is sent MSB first. The field layout is
// this design's own choice: the source describes the CLB's parts (two 4-input
// LUTs, one 3-input LUT, a 4-bit selector S0..S3 and two state blocks) but not
// how their memory cells are ordered.
package rft_pkg;

  typedef struct packed {
    logic [15:0] lut_f;   // truth table of 4-input LUT F, bit i = F(inputs == i)
    logic [15:0] lut_g;   // truth table of 4-input LUT G
    logic [7:0]  lut_h;   // truth table of 3-input LUT H, index = {h1, G, F}
    logic [3:0]  sel;     // selector S3..S0, see rft_clb
    logic [1:0]  state;   // value loaded into FF2/FF1 while reset is high
    logic [1:0]  ec_sel;  // per FF: 1 = write enable from pin ec, 0 = VCC
  } clb_cfg_t;

  localparam int unsigned CLB_CFG_W = $bits(clb_cfg_t);  // 48

endpackage
