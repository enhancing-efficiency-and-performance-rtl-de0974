// tb_rft_dlatch: the MSH-based D-latch follows d while clk is 1 (including
// changes of d inside the high phase) and holds while clk is 0 whatever d does.
module tb_rft_dlatch;
  logic clk, d, q;
  int checks = 0, failures = 0;

  rft_dlatch dut (.clk(clk), .d(d), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held;
    clk = 1'b0;
    d   = 1'b0;
    #5;
    for (int n = 0; n < 400; n++) begin
      // transparent phase
      clk = 1'b1;
      d   = 1'($urandom);
      #2;
      checks++;
      if (q !== d) begin
        failures++;
        $display("FAIL transparent n=%0d d=%0b q=%0b", n, d, q);
      end
      d = 1'($urandom);
      #2;
      checks++;
      if (q !== d) failures++;
      // close and hold
      held = d;
      clk  = 1'b0;
      #1;
      for (int k = 0; k < 3; k++) begin
        d = 1'($urandom);
        #2;
        checks++;
        if (q !== held) begin
          failures++;
          $display("FAIL hold n=%0d held=%0b q=%0b", n, held, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
