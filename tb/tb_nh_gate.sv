// tb_nh_gate: exhaustive self-check of nh_gate against the gate's truth
// table, written out here row by row, and a check that the eight outputs
// are all distinct (the gate is reversible). Also checks the decoder use:
// with C = 0 the outputs are A, A&B, ~A&B.
module tb_nh_gate;
  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;
  bit   seen [8];
  // Truth table, index {A,B,C}, value {P,Q,R}
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b011, 3'b001, 3'b010,
                                       3'b100, 3'b111, 3'b110, 3'b101};

  nh_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TABLE[v]) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", 3'(v), {p, q, r}, TABLE[v]);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b repeated", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
      if (c == 1'b0) begin
        checks++;
        if (q !== (a && b) || r !== (!a && b)) begin
          failures++;
          $display("FAIL decoder use a=%b b=%b q=%b r=%b", a, b, q, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
