// tb_rft_adder: end-to-end test of the CLB-based ripple-carry adder at its
// default width. It programs all 2*N CLBs through the single serial chain,
// then adds random and corner-case operands and compares sum, cout and the
// registered sum with integer arithmetic.
//
// Mechanisms exercised and counted:
//   program    - the whole fabric is configured through the chain; the chain
//                length is checked (the stream re-appears on prog_dout after
//                exactly 2*N*CLB_CFG_W clocks)
//   h_carry    - carry computed through the 3-input LUT: g | (p & cin)
//   lut_carry  - carry computed directly by a 4-input LUT (majority); the
//                fabric is reprogrammed to switch between the two
//   ripple     - a carry that travels through all N bits
//   register   - sum captured by the sum CLBs' flip-flops
//   hold       - flip-flops keep their value while ec is 0 (enable from pin)
//   reset      - flip-flops loaded with the configured state on reset
module tb_rft_adder;
  import rft_pkg::*;

  localparam int unsigned N     = 128;
  localparam int unsigned TOTAL = 2 * N * CLB_CFG_W;

  logic clk = 1'b0;
  logic rst, prog_en, prog_din, prog_dout, ec, cin, cout;
  logic [N-1:0] a, b, sum, sum_q;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_program = 0, n_h_carry = 0, n_lut_carry = 0, n_ripple = 0;
  int n_register = 0, n_hold = 0, n_reset = 0;

  rft_adder dut (
    .clk(clk), .rst(rst), .prog_en(prog_en), .prog_din(prog_din),
    .prog_dout(prog_dout), .ec(ec), .a(a), .b(b), .cin(cin),
    .sum(sum), .sum_q(sum_q), .cout(cout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // truth tables over LUT inputs {0, c, b, a}
  function automatic logic [15:0] tt4(input int kind);
    logic [15:0] t;
    for (int i = 0; i < 16; i++) begin
      logic ia, ib, ic;
      ia = i[0]; ib = i[1]; ic = i[2];
      case (kind)
        0: t[i] = ia & ib;                              // generate
        1: t[i] = ia ^ ib;                              // propagate
        2: t[i] = (ia & ib) | (ia & ic) | (ib & ic);    // carry
        default: t[i] = ia ^ ib ^ ic;                   // sum
      endcase
    end
    return t;
  endfunction

  // carry CLB: via_h selects the carry path; sum CLB: ff enable from pin ec
  function automatic clb_cfg_t carry_cfg(input bit via_h);
    clb_cfg_t c;
    c = '0;
    c.lut_f = tt4(0);
    c.lut_g = via_h ? tt4(1) : tt4(2);
    for (int i = 0; i < 8; i++)  // index {h1, g, f}: f | (g & h1)
      c.lut_h[i] = i[0] | (i[1] & i[2]);
    c.sel[1] = via_h;            // G output = H (carry) or G (majority)
    return c;
  endfunction

  function automatic clb_cfg_t sum_cfg(input logic state);
    clb_cfg_t c;
    c = '0;
    c.lut_f     = tt4(3);
    c.state[0]  = state;
    c.ec_sel[0] = 1'b1;
    return c;
  endfunction

  // stream for the whole fabric; the last CLB's word goes first
  function automatic logic [TOTAL-1:0] stream(input bit via_h, input logic state);
    logic [TOTAL-1:0] s;
    for (int k = 0; k < 2 * N; k++) begin
      clb_cfg_t w;
      w = (k % 2 == 0) ? carry_cfg(via_h) : sum_cfg(state);
      s[k*CLB_CFG_W +: CLB_CFG_W] = w;
    end
    return s;
  endfunction

  task automatic load(input logic [TOTAL-1:0] s, input bit check_out,
                      input logic [TOTAL-1:0] prev);
    int start, mism;
    start = cycles;
    mism  = 0;
    prog_en = 1'b1;
    for (int i = TOTAL - 1; i >= 0; i--) begin
      prog_din = s[i];
      if (check_out && prog_dout !== prev[i]) mism++;
      @(negedge clk);
    end
    prog_en = 1'b0;
    checks++;
    if (cycles - start != TOTAL) failures++;
    if (check_out) begin
      checks++;
      if (mism != 0) begin
        failures++;
        $display("FAIL chain: %0d bits differ on prog_dout", mism);
      end
    end
    n_program++;
  endtask

  task automatic add_check(input logic [N-1:0] x, input logic [N-1:0] y,
                           input logic ci, input bit via_h);
    logic [N:0] want;
    logic [N-1:0] q_prev;
    q_prev = sum_q;
    a = x; b = y; cin = ci;
    #2;
    want = {1'b0, x} + {1'b0, y} + (N+1)'(ci);
    checks++;
    if (sum !== want[N-1:0] || cout !== want[N]) begin
      failures++;
      $display("FAIL add %h + %h + %0b: got %0b_%h want %h", x, y, ci, cout, sum, want);
    end
    if (via_h) n_h_carry++; else n_lut_carry++;
    if ((x ^ y) == '1 && ci) n_ripple++;
    @(posedge clk);
    #1;
    checks++;
    if (ec) begin
      if (sum_q !== want[N-1:0]) failures++;
      n_register++;
    end else begin
      if (sum_q !== q_prev) failures++;
      n_hold++;
    end
    @(negedge clk);
  endtask

  initial begin
    logic [TOTAL-1:0] s_h, s_l;
    rst = 1'b0; prog_en = 1'b0; prog_din = 1'b0; ec = 1'b1;
    a = '0; b = '0; cin = 1'b0;
    s_h = stream(1'b1, 1'b1);
    s_l = stream(1'b0, 1'b0);
    @(negedge clk);

    for (int pass = 0; pass < 4; pass++) begin
      bit via_h;
      logic st;
      via_h = (pass % 2 == 0);
      st    = via_h;
      // first pass has nothing known in the chain to compare with
      load(via_h ? s_h : s_l, pass != 0, via_h ? s_l : s_h);

      // reset: every sum flip-flop takes the configured state
      rst = 1'b1;
      @(posedge clk);
      #1;
      checks++;
      if (sum_q !== {N{st}}) failures++;
      n_reset++;
      @(negedge clk);
      rst = 1'b0;

      // carry through every bit
      ec = 1'b1;
      add_check('1, '0, 1'b1, via_h);
      add_check({N{1'b0}} | N'(1), '1, 1'b0, via_h);
      add_check('1, '1, 1'b1, via_h);
      for (int k = 0; k < 60; k++) begin
        logic [N-1:0] x, y;
        for (int j = 0; j < N; j += 32) begin
          x[j +: 32] = $urandom;
          y[j +: 32] = $urandom;
        end
        ec = (k % 5 != 4);
        add_check(x, y, 1'($urandom), via_h);
      end
      ec = 1'b1;
    end

    $display("mechanisms: program=%0d h_carry=%0d lut_carry=%0d ripple=%0d register=%0d hold=%0d reset=%0d",
             n_program, n_h_carry, n_lut_carry, n_ripple, n_register, n_hold, n_reset);
    checks++;
    if (n_program == 0 || n_h_carry == 0 || n_lut_carry == 0 || n_ripple == 0 ||
        n_register == 0 || n_hold == 0 || n_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
