// tb_rev_decoder: self-check of the n x 2^n reversible decoder.
//
// Five instances: the chain structure at n = 2, 3 (default) and 6, and
// the low-delay structure at n = 3 and 6. Every address is applied to
// each; y must equal 1 << addr. In the chain structure the garbage lines
// are the address bits themselves (the control bit of each level leaves
// the last gate unchanged, plus A1 and ~A1 from the 2x4 stage); in the
// low-delay structure every NH gate of level i passes A_i through.
module tb_rev_decoder;
  import rev_pkg::*;
  logic [1:0]  a2;
  logic [2:0]  a3;
  logic [5:0]  a6;
  logic [3:0]  y2;
  logic [7:0]  y3, y3l;
  logic [63:0] y6, y6l;
  logic [1:0]  g2;
  logic [2:0]  g3;
  logic [5:0]  g6;
  logic [5:0]  g3l;
  logic [61:0] g6l;
  int checks = 0;
  int failures = 0;

  rev_decoder #(.ADDR_BITS(2)) d2 (.addr(a2), .y(y2), .garbage(g2));
  rev_decoder                  d3 (.addr(a3), .y(y3), .garbage(g3));
  rev_decoder #(.ADDR_BITS(6)) d6 (.addr(a6), .y(y6), .garbage(g6));
  rev_decoder #(.ADDR_BITS(3), .STYLE(DEC_LOW_DELAY)) d3l (
    .addr(a3), .y(y3l), .garbage(g3l));
  rev_decoder #(.ADDR_BITS(6), .STYLE(DEC_LOW_DELAY)) d6l (
    .addr(a6), .y(y6l), .garbage(g6l));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h expected=%h", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) begin
      a2 = 2'(v);
      #1;
      chk($sformatf("n2 y addr=%0d", v), 64'(y2), 64'd1 << v);
      chk("n2 garbage", 64'(g2), 64'({~a2[0], a2[0]}));
    end
    for (int v = 0; v < 8; v++) begin
      a3 = 3'(v);
      #1;
      chk($sformatf("n3 y addr=%0d", v), 64'(y3), 64'd1 << v);
      chk("n3 garbage", 64'(g3), 64'({a3[2], ~a3[0], a3[0]}));
      chk($sformatf("n3 low-delay y addr=%0d", v), 64'(y3l), 64'd1 << v);
      chk("n3 low-delay garbage", 64'(g3l),
          64'({{4{a3[2]}}, ~a3[0], a3[0]}));
    end
    for (int v = 0; v < 64; v++) begin
      logic [61:0] eg;
      a6 = 6'(v);
      #1;
      chk($sformatf("n6 y addr=%0d", v), y6, 64'd1 << v);
      chk("n6 garbage", 64'(g6), 64'({a6[5:2], ~a6[0], a6[0]}));
      chk($sformatf("n6 low-delay y addr=%0d", v), y6l, 64'd1 << v);
      eg = {{32{a6[5]}}, {16{a6[4]}}, {8{a6[3]}}, {4{a6[2]}}, ~a6[0], a6[0]};
      chk("n6 low-delay garbage", 64'(g6l), 64'(eg));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
