// tb_rft_clb: programs the CLB with random configurations through its serial
// chain, then drives random LUT inputs, write enable and reset, and compares
// F, G, Q1 and Q2 every cycle with an independent model of the block
// (truth-table lookups, selector, enable and reset rules). It also checks
// that the configuration passes out on prog_dout and counts how often each
// mechanism was exercised: H-LUT steering, registered outputs, enable hold
// and reset to the configured state.
module tb_rft_clb;
  import rft_pkg::*;

  logic clk = 1'b0;
  logic rst, prog_en, prog_din, prog_dout;
  logic [3:0] f_in, g_in;
  logic h1, ec;
  logic f_out, g_out, q1, q2;
  int checks = 0, failures = 0;
  int n_h = 0, n_reg = 0, n_hold = 0, n_reset = 0;

  rft_clb dut (
    .clk(clk), .rst(rst), .prog_en(prog_en), .prog_din(prog_din),
    .prog_dout(prog_dout), .f_in(f_in), .g_in(g_in), .h1(h1), .ec(ec),
    .f_out(f_out), .g_out(g_out), .q1(q1), .q2(q2)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic program_cfg(input clb_cfg_t word);
    logic [CLB_CFG_W-1:0] bits;
    bits = word;
    prog_en = 1'b1;
    for (int i = CLB_CFG_W - 1; i >= 0; i--) begin
      prog_din = bits[i];
      @(negedge clk);
    end
    prog_en = 1'b0;
  endtask

  // model of the combinational part
  function automatic logic [3:0] comb(input clb_cfg_t c, input logic [3:0] fi,
                                      input logic [3:0] gi, input logic hh);
    logic f, g, h, d1, d2;
    f  = c.lut_f[fi];
    g  = c.lut_g[gi];
    h  = c.lut_h[{hh, g, f}];
    d1 = c.sel[0] ? h : f;
    d2 = c.sel[1] ? h : g;
    return {f, g, d1, d2};
  endfunction

  initial begin
    clb_cfg_t c, c2;
    logic [3:0] m;
    logic mq1, mq2, w1, w2, ef, eg;
    rst = 1'b0; prog_en = 1'b0; prog_din = 1'b0;
    f_in = '0; g_in = '0; h1 = 1'b0; ec = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      c = {$urandom, $urandom};
      program_cfg(c);
      // reset loads the configured state
      rst = 1'b1;
      ec  = 1'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (q1 !== c.state[0] || q2 !== c.state[1]) begin
        failures++;
        $display("FAIL reset cfg=%h q1=%0b q2=%0b", c, q1, q2);
      end
      n_reset++;
      mq1 = c.state[0];
      mq2 = c.state[1];
      @(negedge clk);
      rst = 1'b0;
      for (int k = 0; k < 100; k++) begin
        f_in = 4'($urandom);
        g_in = 4'($urandom);
        h1   = 1'($urandom);
        ec   = 1'($urandom);
        #2;
        m  = comb(c, f_in, g_in, h1);
        ef = c.sel[2] ? mq1 : m[1];
        eg = c.sel[3] ? mq2 : m[0];
        checks++;
        if (f_out !== ef || g_out !== eg || q1 !== mq1 || q2 !== mq2) begin
          failures++;
          $display("FAIL n=%0d k=%0d F=%0b/%0b G=%0b/%0b Q1=%0b/%0b Q2=%0b/%0b",
                   n, k, f_out, ef, g_out, eg, q1, mq1, q2, mq2);
        end
        if (c.sel[0] || c.sel[1]) n_h++;
        if (c.sel[2] || c.sel[3]) n_reg++;
        w1 = c.ec_sel[0] ? ec : 1'b1;
        w2 = c.ec_sel[1] ? ec : 1'b1;
        if (!w1 || !w2) n_hold++;
        @(posedge clk);
        if (w1) mq1 = m[1];
        if (w2) mq2 = m[0];
        @(negedge clk);
      end
      // configuration passes on: shift a second word in and see the first out
      c2 = {$urandom, $urandom};
      begin
        logic [CLB_CFG_W-1:0] old_bits, new_bits;
        old_bits = c;
        new_bits = c2;
        prog_en = 1'b1;
        for (int i = CLB_CFG_W - 1; i >= 0; i--) begin
          prog_din = new_bits[i];
          checks++;
          if (prog_dout !== old_bits[i]) failures++;
          @(negedge clk);
        end
        prog_en = 1'b0;
      end
    end
    $display("mechanisms: h_steer=%0d registered=%0d enable_hold=%0d reset=%0d",
             n_h, n_reg, n_hold, n_reset);
    checks++;
    if (n_h == 0 || n_reg == 0 || n_hold == 0 || n_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
