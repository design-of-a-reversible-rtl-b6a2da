// tb_fredkin_gate: exhaustive self-check of fredkin_gate.
//
// Applies all eight input vectors, compares (P, Q, R) with the gate's
// defining equations (P = A, Q = A'B + AC, R = A'C + AB) computed here, and checks that no two
// inputs give the same output vector (the mapping is reversible).
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;
  bit   seen [8];

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep, eq, er;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ep = a;
      eq = (!a && b) || (a && c);
      er = (!a && c) || (a && b);
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL in=%b%b%b out=%b%b%b expected=%b%b%b",
                 a, b, c, p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
