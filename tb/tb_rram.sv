// tb_rram: end-to-end self-check of the reversible RAM at its default size
// (8 words of 4 bits, chain decoder).
//
// Each step applies an (address, W, D) triple and waits for the gate
// network to settle. The reference keeps, per row, the master word and the
// stored (slave) word, following the memory's documented behaviour: the
// selected row's masters take W ? D : stored word, every other row copies
// its master word into its stored word. Q must always equal the stored
// word of the selected row.
//
// The test first writes every row, then runs random steps in which the
// address stays put a quarter of the time. It counts, and requires at least
// one of each: a write committed by moving to another row; a read of a
// word written earlier; a refresh (W = 0 on a selected row while D differs
// from the stored word, which must stay unchanged); an abandoned write (W
// dropped while the row stays selected, so the write must not land); and
// a row revisited after other rows were written, to show rows keep their
// words while unselected.
module tb_rram;
  localparam int unsigned ADDR_BITS = 3;
  localparam int unsigned DATA_BITS = 4;
  localparam int unsigned ROWS = 1 << ADDR_BITS;
  localparam int unsigned STEPS = 4000;

  logic [ADDR_BITS-1:0] addr;
  logic                 w;
  logic [DATA_BITS-1:0] d, q;
  int checks = 0;
  int failures = 0;

  rram dut (.addr(addr), .w(w), .d(d), .q(q));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_BITS-1:0] m_ref [ROWS];
  logic [DATA_BITS-1:0] s_ref [ROWS];
  bit                   written [ROWS];
  int n_commit = 0, n_read_written = 0, n_refresh = 0, n_abandon = 0;
  int n_revisit = 0;

  // Apply one step, update the reference and check Q.
  task automatic step(logic [ADDR_BITS-1:0] a, logic wr,
                      logic [DATA_BITS-1:0] dv);
    logic [ADDR_BITS-1:0] prev_a;
    logic                 prev_w;
    prev_a = addr;
    prev_w = w;
    addr = a; w = wr; d = dv;
    #1;
    for (int r = 0; r < ROWS; r++) begin
      if (r == int'(a)) begin
        if (!wr && dv != s_ref[r]) n_refresh++;
        if (!wr && prev_w && prev_a == a && m_ref[r] != s_ref[r])
          n_abandon++;
        m_ref[r] = wr ? dv : s_ref[r];
      end else begin
        if (r == int'(prev_a) && prev_w && prev_a != a) begin
          n_commit++;
          written[r] = 1'b1;
        end
        s_ref[r] = m_ref[r];
      end
    end
    if (!wr && written[a]) n_read_written++;
    checks++;
    if (q !== s_ref[a]) begin
      failures++;
      $display("FAIL addr=%0d w=%b d=%h q=%h expected=%h", a, wr, dv, q,
               s_ref[a]);
    end
  endtask

  initial begin
    logic [ADDR_BITS-1:0] a;
    logic [ADDR_BITS-1:0] last_seen [ROWS];
    int                   last_step [ROWS];
    // Bring every row to a known word: write row r with r, then leave it.
    addr = '0; w = 1'b0; d = '0;
    for (int r = 0; r < ROWS; r++) begin
      addr = ADDR_BITS'(r); w = 1'b1; d = DATA_BITS'(r); #1;
    end
    addr = '0; w = 1'b0; #1;
    for (int r = 0; r < ROWS; r++) begin
      s_ref[r] = DATA_BITS'(r);
      m_ref[r] = DATA_BITS'(r);
      written[r] = 1'b1;
      last_step[r] = 0;
    end
    for (int r = 0; r < ROWS; r++) begin
      step(ADDR_BITS'(r), 1'b0, DATA_BITS'($urandom));
    end
    a = '0;
    for (int t = 1; t <= STEPS; t++) begin
      if ($urandom_range(3) != 0) a = ADDR_BITS'($urandom);
      if (t - last_step[a] > ROWS) n_revisit++;
      last_step[a] = t;
      step(a, 1'($urandom), DATA_BITS'($urandom));
    end
    $display("commits=%0d reads_of_written=%0d refreshes=%0d abandoned=%0d revisits=%0d",
             n_commit, n_read_written, n_refresh, n_abandon, n_revisit);
    checks++;
    if (n_commit == 0 || n_read_written == 0 || n_refresh == 0 ||
        n_abandon == 0 || n_revisit == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
