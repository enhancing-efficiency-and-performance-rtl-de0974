// rft_dlatch_we: write-enabled reversible fault-tolerant D-latch.
//
// A Fredkin gate controlled by the write enable w chooses the latch data:
// d when w is 1, the feedback input q_fb when w is 0, i.e.
// data = w*d ^ w'*q_fb. The chosen value enters an MSH-based RFT D-latch
// that is transparent while clk is 1 and holds while clk is 0.
//
// Used on its own, q_fb is tied to q, giving Q+ = clk*(w*d + w'*Q) +
// clk'*Q. Inside the master-slave flip-flop it is the master stage, and
// q_fb comes from the flip-flop's output. The feedback is an input port so
// that both uses share this block; the source draws the feedback from the
// latch's own output for the stand-alone latch and from the flip-flop output
// in the flip-flop. Combinational from d, w, q_fb to q while clk is 1.
// Lint tools report the latch's own feedback through the MSH gate (see
// rft_dlatch) as circular logic; it is closed by the latch.
module rft_dlatch_we (
  input  logic clk,
  input  logic w,
  input  logic d,
  input  logic q_fb,
  output logic q
);
  logic data;
  logic g1, g2;  // garbage outputs of the Fredkin gate

  fredkin_gate u_frg (.a(w), .b(q_fb), .c(d), .p(g1), .q(data), .r(g2));
  rft_dlatch   u_lat (.clk(clk), .d(data), .q(q));
endmodule
