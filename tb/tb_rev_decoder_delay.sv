// tb_rev_decoder_delay: measures the settling time of the reversible
// decoders in gate delays.
//
// Every gate is given a delay of one time unit. For each ordered pair of
// different addresses the test applies the first, lets the network settle,
// switches to the second and samples the outputs every time unit to find
// when the last output line changes.
// The largest such time over all pairs is the decoder's depth as seen by
// a signal. It is compared with the depth worked out from the structure:
//   2x4 stage: a Feynman gate then an NH gate, 2 units;
//   chain style: an address bit A_i walks through the pass-through outputs
//     of all 2^(i-1) gates of its level, while the line inputs arrive after
//     i-1 units, so the depth is max(n, 2^(n-1));
//   low-delay style: the copies of A_i are ready after i-1 Feynman stages,
//     the same time as the lines of level i-1, so each level adds one unit
//     and the depth is n.
// The gate-count bound 2^n - 2 for the chain style counts every gate on
// the chain as if each of its inputs reached each output, so it is printed
// for comparison and not required. Final outputs are also checked.
module tb_rev_decoder_delay;
  import rev_pkg::*;
  logic [1:0] a2;
  logic [2:0] a3;
  logic [3:0] a4;
  logic [4:0] a5;
  logic [3:0]  y2;
  logic [7:0]  y3c, y3l;
  logic [15:0] y4c, y4l;
  logic [31:0] y5l;
  logic [1:0]  g2;
  logic [2:0]  g3c;
  logic [5:0]  g3l;
  logic [3:0]  g4c;
  logic [13:0] g4l;
  logic [29:0] g5l;
  int checks = 0;
  int failures = 0;

  rev_decoder #(.ADDR_BITS(2), .GATE_DELAY(1)) d2 (.addr(a2), .y(y2),
                                                  .garbage(g2));
  rev_decoder #(.ADDR_BITS(3), .GATE_DELAY(1)) d3c (.addr(a3), .y(y3c),
                                                   .garbage(g3c));
  rev_decoder #(.ADDR_BITS(3), .STYLE(DEC_LOW_DELAY), .GATE_DELAY(1)) d3l (
    .addr(a3), .y(y3l), .garbage(g3l));
  rev_decoder #(.ADDR_BITS(4), .GATE_DELAY(1)) d4c (.addr(a4), .y(y4c),
                                                   .garbage(g4c));
  rev_decoder #(.ADDR_BITS(4), .STYLE(DEC_LOW_DELAY), .GATE_DELAY(1)) d4l (
    .addr(a4), .y(y4l), .garbage(g4l));
  rev_decoder #(.ADDR_BITS(5), .STYLE(DEC_LOW_DELAY), .GATE_DELAY(1)) d5l (
    .addr(a5), .y(y5l), .garbage(g5l));


  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic report(string name, int n, int unsigned worst,
                        int unsigned expect_depth);
    checks++;
    $display("%s: n=%0d measured depth %0d, structural %0d, gate-count bound %0d",
             name, n, worst, expect_depth, (1 << n) - 2);
    if (worst != expect_depth) begin
      failures++;
      $display("FAIL %s depth %0d expected %0d", name, worst, expect_depth);
    end
  endtask

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h expected=%h", what, got, exp);
    end
  endtask

  int unsigned w [6];  // worst settling time per instance

  // Current outputs of the six instances, widened to 32 bits.
  function automatic logic [31:0] outs(int k);
    case (k)
      0: return 32'(y2);
      1: return 32'(y3c);
      2: return 32'(y3l);
      3: return 32'(y4c);
      4: return 32'(y4l);
      default: return y5l;
    endcase
  endfunction

  // After an address change, sample all outputs half a unit after each
  // whole time unit for 40 units and raise w[k] to the last unit at which
  // instance k's outputs changed. Instances in 'mask' take part.
  task automatic settle(bit [5:0] mask);
    logic [31:0] prev [6];
    for (int k = 0; k < 6; k++) prev[k] = outs(k);
    #0.5;
    for (int u = 0; u < 40; u++) begin
      for (int k = 0; k < 6; k++) begin
        if (mask[k] && outs(k) != prev[k] && int'(w[k]) < u) w[k] = u;
        prev[k] = outs(k);
      end
      #1;
    end
  endtask

  initial begin
    for (int k = 0; k < 6; k++) w[k] = 0;
    a2 = '0; a3 = '0; a4 = '0; a5 = '0;
    #50;
    // n = 2, 3 and 4 share the address sweep of their own width.
    for (int f = 0; f < 16; f++) begin
      for (int t = 0; t < 16; t++) begin
        if (f == t) continue;
        a4 = 4'(f); a3 = 3'(f); a2 = 2'(f);
        #50;
        a4 = 4'(t); a3 = 3'(t); a2 = 2'(t);
        settle({1'b0, 1'b1, 1'b1, f < 8 && t < 8, f < 8 && t < 8,
                f < 4 && t < 4});
        chk("n4 chain y", 32'(y4c), 32'd1 << t);
        chk("n4 low-delay y", 32'(y4l), 32'd1 << t);
        chk("n3 chain y", 32'(y3c), 32'd1 << (t % 8));
        chk("n3 low-delay y", 32'(y3l), 32'd1 << (t % 8));
        chk("n2 y", 32'(y2), 32'd1 << (t % 4));
      end
    end
    for (int f = 0; f < 32; f++) begin
      for (int t = 0; t < 32; t++) begin
        if (f == t) continue;
        a5 = 5'(f);
        #50;
        a5 = 5'(t);
        settle(6'b100000);
        chk("n5 low-delay y", y5l, 32'd1 << t);
      end
    end
    report("2x4 decoder",        2, w[0], 2);
    report("chain decoder",      3, w[1], 4);
    report("low-delay decoder",  3, w[2], 3);
    report("chain decoder",      4, w[3], 8);
    report("low-delay decoder",  4, w[4], 4);
    report("low-delay decoder",  5, w[5], 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
