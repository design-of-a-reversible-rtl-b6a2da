// gfg_gate: an N x N member of the generalized Feynman gate (GFG) family.
//
// Output m is the XOR of inputs 1..m (a prefix XOR): O1 = I1,
// O2 = I1^I2, ..., ON = I1^...^IN. Input/output k lives in bit k-1 of the
// vectors. The map is reversible (I_m = O_m ^ O_{m-1}).
// N = 2 is the ordinary Feynman (CNOT) gate, used for copying a line
// (second input 0) or inverting it (second input 1). N = 3 with constant
// inputs 0,1 or 0,0 makes the copy/complement stage of the latches. A wide
// instance, N = 2^n, folds the 2^n gated bit lines of a RAM column into
// one read line on its last output. Combinational; the last output is an
// N-input XOR, which synthesis may build as a tree.
// The equations follow the published definition of the family. When the
// gate is a latch's copy gate it sits on the latch's feedback loop, so a
// tool may report a circular path through px; that path is the latch's
// storage loop (see rev_d_latch).
// DELAY (default 0) gives the gate a simulation delay, in time units, for
// measuring the depth of gate networks (one gate counts as one unit
// whatever N is); synthesis ignores it.
module gfg_gate #(
  parameter int unsigned N     = 3,
  parameter int unsigned DELAY = 0
) (
  input  logic [N-1:0] i,
  output logic [N-1:0] o
);
  logic [N-1:0] px;  // prefix XOR of i

  always_comb begin
    logic acc;
    acc = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      acc   = acc ^ i[k];
      px[k] = acc;
    end
  end

  if (DELAY == 0) begin : g_ideal
    assign o = px;
  end else begin : g_timed
    assign #(DELAY) o = px;
  end
endmodule
