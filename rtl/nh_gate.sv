// nh_gate: the 3x3 NH reversible gate.
//
// Mapping (A, B, C) -> (P, Q, R) with P = A, Q = A&B ^ C, R = ~A&B ^ C.
// It is a one-through gate: A appears unchanged on P. The mapping is a
// bijection on 3-bit vectors, so the inputs can be recovered from the
// outputs. With C = 0 the gate yields A&B and ~A&B, i.e. two lines of a
// decoder, which is how the decoders in this library use it.
// Purely combinational; one gate delay in the unit-delay model.
// DELAY (default 0) gives the gate a simulation delay, in time units, for
// measuring the depth of gate networks; synthesis ignores it.
// The function follows the gate's published truth table; the output order
// (P, Q, R) is the one of that table.
module nh_gate #(
  parameter int unsigned DELAY = 0
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  if (DELAY == 0) begin : g_ideal
    always_comb begin
      p = a;
      q = (a & b) ^ c;
      r = (~a & b) ^ c;
    end
  end else begin : g_timed
    assign #(DELAY) p = a;
    assign #(DELAY) q = (a & b) ^ c;
    assign #(DELAY) r = (~a & b) ^ c;
  end
endmodule
