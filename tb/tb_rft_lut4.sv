// tb_rft_lut4: the 4-input LUT returns tt[in] for every input, for
// walking-one tables and 200 random tables.
module tb_rft_lut4;
  logic [15:0] tt;
  logic [3:0]  in;
  logic        y;
  int checks = 0, failures = 0;

  rft_lut4 dut (.tt(tt), .in(in), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep();
    for (int i = 0; i < 16; i++) begin
      in = 4'(i);
      #1;
      checks++;
      if (y !== tt[i]) begin
        failures++;
        $display("FAIL tt=%04h in=%0d y=%0b", tt, i, y);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin
      tt = 16'(1) << k;
      sweep();
    end
    for (int k = 0; k < 200; k++) begin
      tt = 16'($urandom);
      sweep();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
