// tb_fredkin_gate: exhaustive check of the Fredkin gate: B and C are
// exchanged when A is 1, the number of ones is kept and the mapping is
// one-to-one.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit seen [8];

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eq, er;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      #1;
      eq = a ? c : b;
      er = a ? b : c;
      checks++;
      if (p !== a || q !== eq || r !== er) begin
        failures++;
        $display("FAIL abc=%03b -> pqr=%0b%0b%0b", {a, b, c}, p, q, r);
      end
      checks++;
      if ((32'(p) + 32'(q) + 32'(r)) != (32'(a) + 32'(b) + 32'(c))) failures++;
      checks++;
      if (seen[{p, q, r}]) failures++;
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
