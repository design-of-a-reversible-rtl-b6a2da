// toffoli_gate: the 3x3 Toffoli (controlled-controlled-NOT) gate.
//
// (A, B, C) -> (P = A, Q = B, R = A&B ^ C). With C = 0 it is a reversible
// AND that also passes both operands on; the RAM uses it to combine the
// write strobe with a row-select line and to gate each cell's output onto
// its column. Combinational, one gate delay. The equations are the gate's
// standard definition, as used by the published design.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end
endmodule
