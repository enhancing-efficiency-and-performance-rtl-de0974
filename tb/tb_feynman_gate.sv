// tb_feynman_gate: exhaustive check of the Feynman gate (P=A, Q=A^B),
// including its use as copier (B=0) and inverter (B=1).
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> p=%0b q=%0b", a, b, p, q);
      end
      checks++;
      if (b == 1'b0 && q !== a) failures++;
      if (b == 1'b1 && q !== !a) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
