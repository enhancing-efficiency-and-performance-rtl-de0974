// rft_adder: N-bit ripple-carry adder mapped onto 2*N RFT CLBs.
//
// Bit i uses two CLBs, both fed with a[i], b[i] and the incoming carry c[i]
// on their LUT inputs ({0, c, b, a}) and with c[i] on h1:
//   carry CLB: its g_out is the carry c[i+1] into bit i+1
//   sum CLB:   its f_out is sum[i], its flip-flop 1 output q1 is sum_q[i]
// What each CLB computes is set only by its configuration, so the intended
// functions (carry AB+AC+BC, sum A^B^C) are loaded through the serial chain;
// the CLB wiring is fixed. The chain runs prog_din -> carry CLB 0 -> sum CLB
// 0 -> carry CLB 1 -> ... -> sum CLB N-1 -> prog_dout, so the word for the
// last CLB is sent first. Loading takes 2*N*CLB_CFG_W clk cycles with prog_en
// high.
//
// Timing: sum and cout are combinational through N carry CLBs; sum_q is
// sum registered on the rising clk edge (when the sum CLBs are configured to
// register F). One carry CLB and one sum CLB per bit, rippling from bit 0,
// follow the source; the fixed wiring in place of programmable routing and
// the choice of CLB pins are this design's own.
module rft_adder #(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         prog_en,
  input  logic         prog_din,
  output logic         prog_dout,
  input  logic         ec,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic [N-1:0] sum_q,
  output logic         cout
);
  logic [N:0]   c;
  logic [2*N:0] chain;

  assign c[0]     = cin;
  assign chain[0] = prog_din;

  for (genvar i = 0; i < N; i++) begin : g_bit
    logic [3:0] lin;
    logic cy_f, cy_q1, cy_q2, s_g, s_q2;  // unused CLB outputs

    assign lin = {1'b0, c[i], b[i], a[i]};

    rft_clb u_carry (
      .clk(clk), .rst(rst), .prog_en(prog_en),
      .prog_din(chain[2*i]), .prog_dout(chain[2*i+1]),
      .f_in(lin), .g_in(lin), .h1(c[i]), .ec(ec),
      .f_out(cy_f), .g_out(c[i+1]), .q1(cy_q1), .q2(cy_q2)
    );

    rft_clb u_sum (
      .clk(clk), .rst(rst), .prog_en(prog_en),
      .prog_din(chain[2*i+1]), .prog_dout(chain[2*i+2]),
      .f_in(lin), .g_in(lin), .h1(c[i]), .ec(ec),
      .f_out(sum[i]), .g_out(s_g), .q1(sum_q[i]), .q2(s_q2)
    );
  end

  assign cout      = c[N];
  assign prog_dout = chain[2*N];
endmodule
