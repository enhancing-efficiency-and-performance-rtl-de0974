// f2g_gate: double Feynman gate, (A,B,C) -> (P=A, Q=A^B, R=A^C).
// It is two Feynman gates sharing the control line A and is used for
// fan-out and inversion of a signal: with (B,C) = (1,0) it yields A, ~A, A.
// The source names the gate but does not define it; the standard F2G mapping
// is used. Combinational. It is parity preserving: P^Q^R = A^B^C.
module f2g_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  logic a_mid;

  feynman_gate u_fg_b (.a(a),     .b(b), .p(a_mid), .q(q));
  feynman_gate u_fg_c (.a(a_mid), .b(c), .p(p),     .q(r));
endmodule
