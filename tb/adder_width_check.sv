// adder_width_check: test harness for one rft_adder of width N, used by
// tb_rft_adder_widths. On start it programs the adder (carry through the
// 3-input LUT, sum registered), resets it, then checks an all-ones ripple
// case and NADD random additions against integer arithmetic, including the
// registered sum one clock later. It reports its counts and raises done.
module adder_width_check #(
  parameter int unsigned N    = 4,
  parameter int unsigned NADD = 40
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import rft_pkg::*;

  localparam int unsigned TOTAL = 2 * N * CLB_CFG_W;

  logic rst, prog_en, prog_din, prog_dout, ec, cin, cout;
  logic [N-1:0] a, b, sum, sum_q;

  rft_adder #(.N(N)) dut (
    .clk(clk), .rst(rst), .prog_en(prog_en), .prog_din(prog_din),
    .prog_dout(prog_dout), .ec(ec), .a(a), .b(b), .cin(cin),
    .sum(sum), .sum_q(sum_q), .cout(cout)
  );

  function automatic clb_cfg_t word(input int k);
    clb_cfg_t c;
    c = '0;
    for (int i = 0; i < 16; i++) begin
      logic ia, ib, ic;
      ia = i[0]; ib = i[1]; ic = i[2];
      if (k % 2 == 0) begin          // carry CLB: g | (p & cin) through H
        c.lut_f[i] = ia & ib;
        c.lut_g[i] = ia ^ ib;
      end else begin                 // sum CLB
        c.lut_f[i] = ia ^ ib ^ ic;
      end
    end
    for (int i = 0; i < 8; i++) c.lut_h[i] = i[0] | (i[1] & i[2]);
    c.sel[1] = (k % 2 == 0);
    return c;
  endfunction

  initial begin
    logic [TOTAL-1:0] s;
    logic [N:0] want;
    logic [N-1:0] x, y;
    logic ci;
    done = 1'b0; checks = 0; failures = 0;
    rst = 1'b0; prog_en = 1'b0; prog_din = 1'b0; ec = 1'b1;
    a = '0; b = '0; cin = 1'b0;
    for (int k = 0; k < 2 * N; k++) s[k*CLB_CFG_W +: CLB_CFG_W] = word(k);
    @(negedge clk);
    prog_en = 1'b1;
    for (int i = TOTAL - 1; i >= 0; i--) begin
      prog_din = s[i];
      @(negedge clk);
    end
    prog_en = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (sum_q !== '0) failures++;
    for (int n = 0; n <= NADD; n++) begin
      if (n == 0) begin
        x = '1; y = '0; ci = 1'b1;
      end else begin
        for (int j = 0; j < N; j++) begin
          x[j] = 1'($urandom);
          y[j] = 1'($urandom);
        end
        ci = 1'($urandom);
      end
      a = x; b = y; cin = ci;
      #2;
      want = {1'b0, x} + {1'b0, y} + (N+1)'(ci);
      checks++;
      if (sum !== want[N-1:0] || cout !== want[N]) begin
        failures++;
        $display("FAIL N=%0d: %h + %h + %0b gave %0b_%h", N, x, y, ci, cout, sum);
      end
      @(negedge clk);
      checks++;
      if (sum_q !== want[N-1:0]) failures++;
    end
    done = 1'b1;
  end
endmodule
