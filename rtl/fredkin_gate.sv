// fredkin_gate: the 3x3 Fredkin (controlled-swap) gate.
//
// (A, B, C) -> (P = A, Q = ~A&B | A&C, R = ~A&C | A&B). When the control A
// is 0 the two data lines pass straight through; when it is 1 they swap.
// Output R is therefore the 2:1 multiplexer "A ? B : C", which is what the
// latches and the write-enable multiplexer of this library use.
// Combinational, one gate delay. This is the standard controlled-swap
// definition; the published latch relies on its third output being the
// multiplexer.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end
endmodule
