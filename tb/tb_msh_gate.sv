// tb_msh_gate: exhaustive check of the MSH gate against
// P=A, Q=B^C, R=A?B:C, S=D^R, plus parity preservation, one-to-one mapping
// and the D-latch use (A=clk, B=data, C=state, D=0 gives S = next state).
module tb_msh_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit seen [16];

  msh_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic er;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = v[3:0];
      #1;
      er = a ? b : c;
      checks++;
      if (p !== a || q !== (b ^ c) || r !== er || s !== (d ^ er)) begin
        failures++;
        $display("FAIL abcd=%04b -> pqrs=%0b%0b%0b%0b", {a, b, c, d}, p, q, r, s);
      end
      checks++;
      if ((p ^ q ^ r ^ s) !== (a ^ b ^ c ^ d)) failures++;
      checks++;
      if (seen[{p, q, r, s}]) failures++;
      seen[{p, q, r, s}] = 1'b1;
      if (!d) begin
        // latch equation Q+ = D*clk + clk'*Q
        checks++;
        if (s !== ((b & a) | (~a & c))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
