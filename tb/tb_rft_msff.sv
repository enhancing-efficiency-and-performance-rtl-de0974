// tb_rft_msff: the master-slave flip-flop loads d on the rising clk edge when
// w is 1, keeps its value when w is 0, ignores d between edges and gives
// qn = ~q. The output changes exactly at the rising edge, not before.
module tb_rft_msff;
  logic clk = 1'b0;
  logic w, d, q, qn;
  logic model;
  int checks = 0, failures = 0;
  int loads = 0, holds = 0;

  rft_msff dut (.clk(clk), .w(w), .d(d), .q(q), .qn(qn));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise: write a known value
    w = 1'b1;
    d = 1'b0;
    @(posedge clk);
    #1;
    model = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      w = 1'($urandom);
      d = 1'($urandom);
      #3;
      // just before the edge the output still shows the old value
      checks++;
      if (q !== model) failures++;
      @(posedge clk);
      if (w) begin
        model = d;
        loads++;
      end else begin
        holds++;
      end
      #1;
      checks++;
      if (q !== model || qn !== ~model) begin
        failures++;
        $display("FAIL n=%0d w=%0b d=%0b q=%0b qn=%0b want %0b", n, w, d, q, qn, model);
      end
      // d toggling while clk is high must not reach q
      d = ~d;
      #2;
      checks++;
      if (q !== model) failures++;
    end
    checks++;
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
