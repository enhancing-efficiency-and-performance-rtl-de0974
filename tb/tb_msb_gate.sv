// tb_msb_gate: exhaustive check of the MSB gate: P=A, Q=B,
// R = A'B'C + A'BE + AB'D + ABF, identity on all lines when A=B=0, parity
// preservation and a one-to-one mapping of the 64 input vectors.
module tb_msb_gate;
  logic a, b, c, d, e, f, p, q, r, s, t, u;
  int checks = 0, failures = 0;
  bit seen [64];

  msb_gate dut (.a(a), .b(b), .c(c), .d(d), .e(e), .f(f),
                .p(p), .q(q), .r(r), .s(s), .t(t), .u(u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic er;
    for (int v = 0; v < 64; v++) begin
      {a, b, c, d, e, f} = v[5:0];
      #1;
      er = (!a && !b && c) || (!a && b && e) || (a && !b && d) || (a && b && f);
      checks++;
      if (p !== a || q !== b || r !== er) begin
        failures++;
        $display("FAIL in=%06b -> out=%0b%0b%0b%0b%0b%0b", v[5:0], p, q, r, s, t, u);
      end
      checks++;
      if ((p ^ q ^ r ^ s ^ t ^ u) !== (a ^ b ^ c ^ d ^ e ^ f)) failures++;
      checks++;
      if (seen[{p, q, r, s, t, u}]) failures++;
      seen[{p, q, r, s, t, u}] = 1'b1;
      if (!a && !b) begin
        checks++;
        if ({r, s, t, u} !== {c, d, e, f}) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
