// rft_mux2: reversible 2:1 multiplexer made of one Fredkin gate.
// sel drives the control line A, din0 line B and din1 line C; the Q output
// A'B ^ AC gives y = sel ? din1 : din0. The two other gate outputs are
// garbage. Combinational. It is the "RFT 2x1 Mux" of the CLB flow, used
// wherever the CLB chooses between two signals.
module rft_mux2 (
  input  logic sel,
  input  logic din0,
  input  logic din1,
  output logic y
);
  logic g_p, g_r;  // garbage outputs

  fredkin_gate u_frg (
    .a(sel), .b(din0), .c(din1),
    .p(g_p), .q(y), .r(g_r)
  );
endmodule
