// rft_cfg_chain: configuration memory of one CLB, loaded serially.
// While prog_en is 1, every rising clk edge shifts prog_din into bit 0 and
// moves every bit one place up; bit W-1 is presented on prog_dout so that
// chains of several CLBs can be joined. After W shifts the first bit sent
// sits in bit W-1 (words are sent MSB first). While prog_en is 0 the
// contents hold. There is no reset: like SRAM configuration cells, the
// contents are defined by programming. A serial chain is this design's
// choice, after the DataIn/DataOut programming pins of the CLB shown in the
// source's adder example.
module rft_cfg_chain #(
  parameter int unsigned W = 48
) (
  input  logic         clk,
  input  logic         prog_en,
  input  logic         prog_din,
  output logic         prog_dout,
  output logic [W-1:0] cfg
);
  always_ff @(posedge clk) begin
    if (prog_en) cfg <= {cfg[W-2:0], prog_din};
  end

  assign prog_dout = cfg[W-1];
endmodule
