// tb_rft_mux4: exhaustive check of the MSB-based 4:1 multiplexer,
// y = din[sel], for all selections and data words.
module tb_rft_mux4;
  logic [1:0] sel;
  logic [3:0] din;
  logic       y;
  int checks = 0, failures = 0;

  rft_mux4 dut (.sel(sel), .din(din), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {sel, din} = v[5:0];
      #1;
      checks++;
      if (y !== din[sel]) begin
        failures++;
        $display("FAIL sel=%0d din=%04b y=%0b", sel, din, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
