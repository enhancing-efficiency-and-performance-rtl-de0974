// msb_gate: the 6x6 reversible, parity-preserving MSB gate used as a 4:1
// multiplexer. A and B pass through (P=A, Q=B) and select one of C, D, E, F
// onto R:
//   R = A'B'C + A'BE + AB'D + ABF
// The other three data lines leave on S, T, U. The source gives P, Q and R
// and the all-identity rows for A=B=0; the routing of the unselected lines
// is this design's choice: the gate is two levels of controlled swaps
// (A swaps C<->D and E<->F, then B swaps the C and E lines), so the outputs
// are a permutation of the inputs. That makes it reversible and conservative,
// hence parity preserving. Combinational.
module msb_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  input  logic f,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t,
  output logic u
);
  logic c1, d1, e1, f1;

  // first level: controlled by A
  assign c1 = (~a & c) | (a & d);
  assign d1 = (~a & d) | (a & c);
  assign e1 = (~a & e) | (a & f);
  assign f1 = (~a & f) | (a & e);

  // second level: controlled by B
  assign p = a;
  assign q = b;
  assign r = (~b & c1) | (b & e1);
  assign t = (~b & e1) | (b & c1);
  assign s = d1;
  assign u = f1;
endmodule
