// tb_rft_mux2: exhaustive check of the Fredkin-based 2:1 multiplexer.
module tb_rft_mux2;
  logic sel, din0, din1, y;
  int checks = 0, failures = 0;

  rft_mux2 dut (.sel(sel), .din0(din0), .din1(din1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, din0, din1} = v[2:0];
      #1;
      checks++;
      if (y !== (sel ? din1 : din0)) begin
        failures++;
        $display("FAIL sel=%0b d0=%0b d1=%0b y=%0b", sel, din0, din1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
