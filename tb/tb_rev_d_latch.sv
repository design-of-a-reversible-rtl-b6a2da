// tb_rev_d_latch: self-check of the reversible D latch in all four copy
// gate variants, driven with the same random (E, D) sequence.
//
// Reference: while E = 1 the stored bit follows D, while E = 0 it holds.
// Checked per step: q, q_aux (~q for the GFG and Peres variants, q for the
// two-copy variant, 0 for the Feynman variant), e_out = E and the garbage
// line (the Fredkin gate's second output, which settles to D).
module tb_rev_d_latch;
  import rev_pkg::*;
  logic e, d;
  logic [3:0] e_out, q, q_aux, garbage;
  int checks = 0;
  int failures = 0;
  int holds = 0;
  int loads = 0;

  rev_d_latch #(.COPY(COPY_GFG))     l0 (.e(e), .d(d), .e_out(e_out[0]),
    .q(q[0]), .q_aux(q_aux[0]), .garbage(garbage[0]));
  rev_d_latch #(.COPY(COPY_PERES))   l1 (.e(e), .d(d), .e_out(e_out[1]),
    .q(q[1]), .q_aux(q_aux[1]), .garbage(garbage[1]));
  rev_d_latch #(.COPY(COPY_FEYNMAN)) l2 (.e(e), .d(d), .e_out(e_out[2]),
    .q(q[2]), .q_aux(q_aux[2]), .garbage(garbage[2]));
  rev_d_latch #(.COPY(COPY_GFG_DUP)) l3 (.e(e), .d(d), .e_out(e_out[3]),
    .q(q[3]), .q_aux(q_aux[3]), .garbage(garbage[3]));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b expected=%b (e=%b d=%b)", what, got, exp, e, d);
    end
  endtask

  initial begin
    logic s;
    e = 1'b1; d = 1'b0; s = 1'b0;
    #1;
    for (int t = 0; t < 400; t++) begin
      e = 1'($urandom);
      d = 1'($urandom);
      #1;
      if (e) begin
        s = d;
        loads++;
      end else if (d != s) begin
        holds++;  // D differs from the held bit: the latch must ignore it
      end
      chk("q", q, {4{s}});
      chk("q_aux", q_aux, {s, 1'b0, ~s, ~s});
      chk("e_out", e_out, {4{e}});
      chk("garbage", garbage, {4{d}});
    end
    checks++;
    if (holds == 0 || loads == 0) begin
      failures++;
      $display("FAIL holds=%0d loads=%0d", holds, loads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
