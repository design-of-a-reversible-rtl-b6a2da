// tb_rev_we_dff: self-check of the reversible write-enabled master-slave
// D flip-flop.
//
// Random (CP, W, D) steps. Reference: while CP = 1 the master bit is
// loaded with W ? D : Q; while CP = 0 the slave (Q) is loaded from the
// master. Checks q, cp_out = CP and w_out = W each step, and counts that
// both a write (Q takes a new D) and a refresh with D ignored (W = 0 on a
// clock pulse while D differs from Q) happened.
module tb_rev_we_dff;
  logic cp, w, d, cp_out, w_out, q;
  logic [3:0] garbage;
  int checks = 0;
  int failures = 0;
  int writes = 0;
  int refreshes = 0;

  rev_we_dff dut (.cp(cp), .w(w), .d(d), .cp_out(cp_out), .w_out(w_out),
                  .q(q), .garbage(garbage));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b expected=%b (cp=%b w=%b d=%b)", what, got,
               exp, cp, w, d);
    end
  endtask

  initial begin
    logic m, s, s_old;
    cp = 1'b1; w = 1'b1; d = 1'b1; #1;
    cp = 1'b0; #1;
    m = 1'b1; s = 1'b1;
    chk("init q", q, 1'b1);
    for (int t = 0; t < 800; t++) begin
      cp = (t % 2 == 0) ? 1'($urandom) : ~cp;
      w = 1'($urandom);
      d = 1'($urandom);
      s_old = s;
      #1;
      if (cp) begin
        m = w ? d : s;
        if (!w && d != s) refreshes++;
      end else begin
        s = m;
        if (s != s_old) writes++;
      end
      chk("q", q, s);
      chk("cp_out", cp_out, cp);
      chk("w_out", w_out, w);
    end
    checks++;
    if (writes == 0 || refreshes == 0) begin
      failures++;
      $display("FAIL writes=%0d refreshes=%0d", writes, refreshes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
