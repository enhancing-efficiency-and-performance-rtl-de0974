// feynman_gate: the 2x2 reversible Feynman (CNOT) gate, (A,B) -> (P=A, Q=A^B).
// With B tied to 0 it copies A (fan-out); with B tied to 1 it inverts A.
// Purely combinational; the mapping is the standard one.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
