// tb_gfg_gate: self-check of the generalized Feynman gate family at three
// sizes: N = 2 (Feynman gate) and N = 3 exhaustively, N = 16 with random
// vectors. Each output m is compared with the XOR of inputs 1..m computed
// by reduction here, and the inputs are rebuilt from the outputs
// (I_m = O_m ^ O_m-1) to confirm the mapping is invertible.
module tb_gfg_gate;
  logic [1:0]  i2, o2;
  logic [2:0]  i3, o3;
  logic [15:0] i16, o16;
  int checks = 0;
  int failures = 0;

  gfg_gate #(.N(2))  dut2  (.i(i2),  .o(o2));
  gfg_gate #(.N(3))  dut3  (.i(i3),  .o(o3));
  gfg_gate #(.N(16)) dut16 (.i(i16), .o(o16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b expected=%b", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) begin
      i2 = 2'(v);
      #1;
      check_bit("fg.p", o2[0], i2[0]);
      check_bit("fg.q", o2[1], i2[0] ^ i2[1]);
    end
    for (int v = 0; v < 8; v++) begin
      i3 = 3'(v);
      #1;
      check_bit("gfg3.p", o3[0], i3[0]);
      check_bit("gfg3.q", o3[1], i3[0] ^ i3[1]);
      check_bit("gfg3.r", o3[2], i3[0] ^ i3[1] ^ i3[2]);
    end
    for (int t = 0; t < 500; t++) begin
      logic [15:0] back;
      i16 = 16'($urandom);
      #1;
      for (int m = 0; m < 16; m++) begin
        logic [15:0] mask;
        mask = 16'((32'd1 << (m + 1)) - 1);
        check_bit($sformatf("gfg16.o[%0d]", m), o16[m], ^(i16 & mask));
      end
      back[0] = o16[0];
      for (int m = 1; m < 16; m++) back[m] = o16[m] ^ o16[m-1];
      checks++;
      if (back !== i16) begin
        failures++;
        $display("FAIL inverse %h vs %h", back, i16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
