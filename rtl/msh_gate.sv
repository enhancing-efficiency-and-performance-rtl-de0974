// msh_gate: the 4x4 reversible, parity-preserving MSH gate,
// (A,B,C,D) -> (P=A, Q=B^C, R=A'C ^ AB, S=D ^ A'C ^ AB).
//
// The mapping is read from the gate's quantum circuit: a Feynman gate from C
// onto B, a Toffoli gate (controls A and the new B, target C, built from
// controlled-V, controlled-V+ and two CNOTs) and a final CNOT from C onto D,
// six elementary gates in all (quantum cost 6). R selects C when A=0 and B
// when A=1, and S is R added onto D. With A=clock, B=data, C=feedback and
// D=0, S = clk'*feedback ^ clk*data, the next state of a D-latch.
// Parity: P^Q^R^S = A^B^C^D. Combinational. In the D-latch the C input is
// driven from the latch output, so lint tools report circular logic through
// this gate; the loop is closed by the latch, not by the gate.
module msh_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic sel;

  assign sel = (~a & c) ^ (a & b);
  assign p = a;
  assign q = b ^ c;
  assign r = sel;
  assign s = d ^ sel;
endmodule
