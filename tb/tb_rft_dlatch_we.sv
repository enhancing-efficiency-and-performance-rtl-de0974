// tb_rft_dlatch_we: the write-enabled latch used on its own (q_fb tied to q).
// While clk is 1 and w is 1 q follows d; while clk is 1 and w is 0 q keeps
// its value; while clk is 0 q holds whatever d and w do.
module tb_rft_dlatch_we;
  logic clk, w, d, q;
  int checks = 0, failures = 0;
  int n_write = 0, n_wait = 0;

  rft_dlatch_we dut (.clk(clk), .w(w), .d(d), .q_fb(q), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    clk = 1'b1; w = 1'b1; d = 1'b0;
    #2;
    model = 1'b0;
    clk = 1'b0;
    #2;
    for (int n = 0; n < 500; n++) begin
      w = 1'($urandom);
      d = 1'($urandom);
      clk = 1'b1;
      #2;
      if (w) begin
        model = d;
        n_write++;
      end else begin
        n_wait++;
      end
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL open n=%0d w=%0b d=%0b q=%0b want %0b", n, w, d, q, model);
      end
      clk = 1'b0;
      #1;
      for (int k = 0; k < 2; k++) begin
        w = 1'($urandom);
        d = 1'($urandom);
        #2;
        checks++;
        if (q !== model) failures++;
      end
    end
    checks++;
    if (n_write == 0 || n_wait == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
