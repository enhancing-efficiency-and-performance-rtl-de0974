// rft_mux4: reversible fault-tolerant 4:1 multiplexer made of one MSB gate.
//   y = M0*I0 ^ M1*I1 ^ M2*I2 ^ M3*I3,  Mk = (sel == k)
// sel[1] drives the gate's A line and sel[0] its B line; following the MSB
// equation R = A'B'C + A'BE + AB'D + ABF, the data inputs are wired
// I0->C, I1->E, I2->D, I3->F. The three other data outputs and the two
// select copies are unused (garbage) outputs of the reversible gate.
// Combinational.
module rft_mux4 (
  input  logic [1:0] sel,
  input  logic [3:0] din,
  output logic       y
);
  logic g_p, g_q, g_s, g_t, g_u;  // garbage outputs

  msb_gate u_msb (
    .a(sel[1]), .b(sel[0]),
    .c(din[0]), .d(din[2]), .e(din[1]), .f(din[3]),
    .p(g_p), .q(g_q), .r(y), .s(g_s), .t(g_t), .u(g_u)
  );
endmodule
