// rft_msff: reversible fault-tolerant write-enabled master-slave flip-flop.
//
// Structure (following the source's block diagram): a Fredkin gate controlled
// by the write enable w picks d (w=1) or the fed-back output (w=0) and feeds
// the master RFT D-latch (together they form rft_dlatch_we); a double
// Feynman gate with constants (1,0) produces clk' and a copy of clk; the
// master is transparent while clk is 0 and the slave while clk is 1; a
// second double Feynman gate with constants (1,0) fans the slave output out
// to q, qn and the feedback line.
//
// Lint tools report the path q -> Fredkin gate -> master latch as circular
// logic: it is the flip-flop's hold path and is broken by the latches.
//
// Timing: q takes the value of (w ? d : q) present just before the rising
// edge of clk. d and w must be stable around that edge. No reset: the owner
// forces w=1 and d=initial value for one edge to initialise it. Which phase
// drives the master is this design's choice (the source does not say), made
// so that the flip-flop is rising-edge triggered.
module rft_msff (
  input  logic clk,
  input  logic w,
  input  logic d,
  output logic q,
  output logic qn
);
  logic q_fb;
  logic clk_n, clk_p;
  logic m_q, s_q;
  logic g3;  // garbage output

  // clock fan-out and inversion
  f2g_gate u_f2g_clk (.a(clk), .b(1'b1), .c(1'b0), .p(g3), .q(clk_n), .r(clk_p));

  // master: write-enabled latch, data = w ? d : q_fb
  rft_dlatch_we u_master (.clk(clk_n), .w(w), .d(d), .q_fb(q_fb), .q(m_q));
  rft_dlatch u_slave  (.clk(clk_p), .d(m_q), .q(s_q));

  // output fan-out: q_fb = s_q, qn = ~s_q, q = s_q
  f2g_gate u_f2g_out (.a(s_q), .b(1'b1), .c(1'b0), .p(q_fb), .q(qn), .r(q));
endmodule
