// fredkin_gate: the 3x3 reversible Fredkin (controlled swap) gate,
// (A,B,C) -> (P=A, Q=A'B ^ AC, R=AB ^ A'C).
// When A is 1 the lines B and C are exchanged. Q is therefore a 2:1
// multiplexer (A=0 -> B, A=1 -> C). Combinational, conservative (the number
// of ones is kept), hence parity preserving.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (a & b) ^ (~a & c);
endmodule
