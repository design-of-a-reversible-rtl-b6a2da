// rev_decoder_2to4: 2-to-4 reversible decoder from two Feynman gates and
// two NH gates.
//
// Feynman(A,1) and Feynman(B,1) give A, ~A, B, ~B. NH(A, B, 0) gives A&B
// and ~A&B; NH(~A, ~B, 0) gives ~A&~B and A&~B. The NH gates' first
// outputs (A and ~A) are the two garbage lines. Quantum cost 2*1 + 2*5 = 12,
// four gates, delay two gates.
// lines[3:0] carry, in this order, A&B, ~A&B, ~A&~B, A&~B: the order in
// which the gate network produces them. rev_decoder maps the lines to
// address order. Structure and constants follow the published schematic.
// GATE_DELAY (default 0) is passed to every gate for delay measurements in
// simulation; with 1 the outputs settle two units after an input change.
module rev_decoder_2to4 #(
  parameter int unsigned GATE_DELAY = 0
) (
  input  logic       a,
  input  logic       b,
  output logic [3:0] lines,   // {A&~B, ~A&~B, ~A&B, A&B}
  output logic [1:0] garbage  // {~A, A}
);
  logic [1:0] fa;  // {~A, A}
  logic [1:0] fb;  // {~B, B}

  gfg_gate #(.N(2), .DELAY(GATE_DELAY)) u_fa (.i({1'b1, a}), .o(fa));
  gfg_gate #(.N(2), .DELAY(GATE_DELAY)) u_fb (.i({1'b1, b}), .o(fb));

  nh_gate #(.DELAY(GATE_DELAY)) u_nh_hi (.a(fa[0]), .b(fb[0]), .c(1'b0),
                   .p(garbage[0]), .q(lines[0]), .r(lines[1]));
  nh_gate #(.DELAY(GATE_DELAY)) u_nh_lo (.a(fa[1]), .b(fb[1]), .c(1'b0),
                   .p(garbage[1]), .q(lines[2]), .r(lines[3]));
endmodule
