// tb_rft_lut3: the 3-input LUT returns tt[in] for every input and all 256
// tables.
module tb_rft_lut3;
  logic [7:0] tt;
  logic [2:0] in;
  logic       y;
  int checks = 0, failures = 0;

  rft_lut3 dut (.tt(tt), .in(in), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      tt = 8'(k);
      for (int i = 0; i < 8; i++) begin
        in = 3'(i);
        #1;
        checks++;
        if (y !== tt[i]) begin
          failures++;
          $display("FAIL tt=%02h in=%0d y=%0b", tt, i, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
