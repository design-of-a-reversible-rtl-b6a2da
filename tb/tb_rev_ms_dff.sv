// tb_rev_ms_dff: self-check of the reversible master-slave D flip-flop.
//
// Random (CP, D) steps. Reference: a master bit loaded from D while CP = 1
// and a slave bit loaded from the master while CP = 0; q must equal the
// slave bit, q_n its complement and cp_out must equal CP. The test also
// counts the cases that show edge behaviour: D changing while CP = 1
// without reaching q, and q changing only in steps where CP is 0.
module tb_rev_ms_dff;
  logic cp, d, cp_out, q, q_n;  // q_n: q_aux of the default (GFG 0,1) slave
  logic [2:0] garbage;
  int checks = 0;
  int failures = 0;
  int blocked = 0;   // CP = 1 steps where D differed from q
  int captures = 0;  // falling CP that changed q

  rev_ms_dff dut (.cp(cp), .d(d), .cp_out(cp_out), .q(q), .q_aux(q_n),
                  .garbage(garbage));

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
      $display("FAIL %s got=%b expected=%b (cp=%b d=%b)", what, got, exp,
               cp, d);
    end
  endtask

  initial begin
    logic m, s, s_old;
    cp = 1'b1; d = 1'b0; #1;
    cp = 1'b0; #1;
    m = 1'b0; s = 1'b0;
    chk("init q", q, 1'b0);
    for (int t = 0; t < 600; t++) begin
      cp = (t % 2 == 0) ? 1'($urandom) : ~cp;
      d = 1'($urandom);
      s_old = s;
      #1;
      if (cp) begin
        m = d;
        if (d != s) blocked++;
      end else begin
        s = m;
        if (s != s_old) captures++;
      end
      chk("q", q, s);
      chk("q_n", q_n, ~s);
      chk("cp_out", cp_out, cp);
    end
    checks++;
    if (blocked == 0 || captures == 0) begin
      failures++;
      $display("FAIL blocked=%0d captures=%0d", blocked, captures);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
