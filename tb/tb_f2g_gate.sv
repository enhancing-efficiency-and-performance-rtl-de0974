// tb_f2g_gate: exhaustive check of the double Feynman gate
// (P=A, Q=A^B, R=A^C), its parity preservation and its fan-out use.
module tb_f2g_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  f2g_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      #1;
      checks++;
      if (p !== a || q !== (a != b) || r !== (a != c)) begin
        failures++;
        $display("FAIL abc=%03b -> pqr=%0b%0b%0b", {a, b, c}, p, q, r);
      end
      checks++;
      if ((p ^ q ^ r) !== (a ^ b ^ c)) failures++;
      if (b && !c) begin
        checks++;
        if (p !== a || q !== !a || r !== a) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
