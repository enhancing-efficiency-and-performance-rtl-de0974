// tb_rft_cfg_chain: shifts random 48-bit words into the configuration chain
// MSB first and checks that each appears in cfg after exactly W clocks, that
// prog_dout leads out the old contents bit by bit, and that the contents
// hold while prog_en is low.
module tb_rft_cfg_chain;
  localparam int unsigned W = 48;  // default width of the chain
  logic         clk = 1'b0;
  logic         prog_en, prog_din, prog_dout;
  logic [W-1:0] cfg;
  int checks = 0, failures = 0;
  int cycles = 0;

  rft_cfg_chain dut (
    .clk(clk), .prog_en(prog_en), .prog_din(prog_din),
    .prog_dout(prog_dout), .cfg(cfg)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] word, prev;
    int start;
    prog_en  = 1'b0;
    prog_din = 1'b0;
    @(negedge clk);
    for (int n = 0; n < 6; n++) begin
      word  = {$urandom, $urandom};
      prev  = cfg;
      start = cycles;
      prog_en = 1'b1;
      for (int i = W - 1; i >= 0; i--) begin
        prog_din = word[i];
        // before the shift, dout shows the bit that is about to leave
        checks++;
        if (prog_dout !== prev[i]) failures++;
        @(negedge clk);
      end
      prog_en = 1'b0;
      checks++;
      if (cfg !== word) begin
        failures++;
        $display("FAIL load %0d: got %h want %h", n, cfg, word);
      end
      checks++;
      if (cycles - start != W) failures++;
      // hold with prog_en low
      prog_din = ~prog_din;
      repeat (5) @(negedge clk);
      checks++;
      if (cfg !== word) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
