// peres_gate: the 3x3 Peres gate.
//
// (A, B, C) -> (P = A, Q = A ^ B, R = A&B ^ C). With B = 1 and C = 0 it
// turns one line into A, ~A and A: a copy plus its complement, which is how
// the Peres variant of the reversible D latch uses it. Combinational; the
// equations are the gate's standard definition, as used by the published
// design.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
