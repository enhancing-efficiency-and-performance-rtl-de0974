// rft_dlatch: reversible fault-tolerant D-latch built from one MSH gate.
//
// The MSH gate gets A=clk, B=d, C=the stored value fed back and D=0; its S
// output clk'*q ^ clk*d is the latch's next state (Q+ = D*clk + clk'*Q).
// While clk is 1 the latch is transparent and q follows d; while clk is 0 it
// holds. The P and Q outputs of the gate are the latch's two garbage outputs.
//
// The storage element is written as an always_latch that is enabled by clk
// and loads the MSH output; this makes the state explicit to the tools
// instead of a zero-delay combinational loop through the gate. Tools report
// it as a latch and, because the gate's C input is the latch output, as a
// loop through the latch: both are the intended behaviour of this block.
module rft_dlatch (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic s_next;
  logic g1, g2, g_r;  // garbage outputs of the MSH gate

  msh_gate u_msh (
    .a(clk), .b(d), .c(q), .d(1'b0),
    .p(g1), .q(g2), .r(g_r), .s(s_next)
  );

  always_latch begin
    if (clk) q <= s_next;
  end
endmodule
