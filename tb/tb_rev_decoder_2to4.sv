// tb_rev_decoder_2to4: exhaustive self-check of the 2x4 reversible decoder.
// For each (A, B) the four lines must be {A&~B, ~A&~B, ~A&B, A&B} and the
// garbage lines {~A, A}; exactly one line may be high.
module tb_rev_decoder_2to4;
  logic       a, b;
  logic [3:0] lines;
  logic [1:0] garbage;
  int checks = 0;
  int failures = 0;

  rev_decoder_2to4 dut (.a(a), .b(b), .lines(lines), .garbage(garbage));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [3:0] exp;
      {b, a} = 2'(v);
      #1;
      exp = {a & ~b, ~a & ~b, ~a & b, a & b};
      checks++;
      if (lines !== exp) begin
        failures++;
        $display("FAIL a=%b b=%b lines=%b expected=%b", a, b, lines, exp);
      end
      checks++;
      if (garbage !== {~a, a}) begin
        failures++;
        $display("FAIL a=%b garbage=%b", a, garbage);
      end
      checks++;
      if ($countones(lines) != 1) begin
        failures++;
        $display("FAIL lines not one-hot: %b", lines);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
