// rev_d_latch: reversible D latch, a Fredkin gate plus a copy gate.
//
// The Fredkin gate gets (E, D, S) where S is the latch's own state line fed
// back from the copy gate. Its third output is E ? D : S, the latch
// characteristic Q+ = D.E + ~E.Q. That line cannot fan out in reversible
// logic, so a copy gate splits it into the fed-back line and the visible
// output(s). The Fredkin gate's first output re-emits E so that a chain of
// latches can reuse the enable; its second output is garbage.
//
// COPY chooses the copy gate (see rev_pkg::latch_copy_e):
//   COPY_GFG     3-GFG(x,0,1) -> q = x, feedback = x, q_aux = ~x (default;
//                the cheapest proposal, quantum cost 5 + 2 = 7)
//   COPY_PERES   Peres(x,1,0) -> q = x, q_aux = ~x, feedback = x (cost 9)
//   COPY_FEYNMAN Feynman(x,0) -> feedback = x, q = x; q_aux is not produced
//                by this gate and is driven 0 (master latch of the
//                flip-flops)
//   COPY_GFG_DUP 3-GFG(x,0,0) -> q = x, feedback = x, q_aux = x (slave of
//                the write-enabled flip-flop, which needs a second copy)
// The gate choices and constant inputs follow the published latch and
// flip-flop schematics; which copy output is the one fed back is this
// design's choice (all copies carry the same value).
//
// Storage: in the gate network the state lives on the feedback loop. Here
// that loop is closed through a level-sensitive hold element on S that is
// transparent while E is high. While E is high the Fredkin output does not
// depend on S, so the element only freezes what the loop holds; the latch
// this infers is the intended storage, and the structural loop through it
// is the intended feedback path of the circuit.
// Timing: transparent while E = 1 (q follows d), holds while E = 0.
module rev_d_latch
  import rev_pkg::*;
#(
  parameter latch_copy_e COPY = COPY_GFG
) (
  input  logic e,       // enable ("clock pulse")
  input  logic d,       // data
  output logic e_out,   // enable passed on, for reuse by the next stage
  output logic q,       // stored bit
  output logic q_aux,   // ~q, a second copy of q, or 0 (see COPY)
  output logic garbage  // second Fredkin output, not used
);
  logic state;   // fed-back state line
  logic nx;      // E ? D : state
  logic fb;      // copy of nx returned to the Fredkin gate

  fredkin_gate u_fred (.a(e), .b(d), .c(state), .p(e_out), .q(garbage),
                       .r(nx));

  if (COPY == COPY_PERES) begin : g_peres
    peres_gate u_copy (.a(nx), .b(1'b1), .c(1'b0), .p(q), .q(q_aux),
                       .r(fb));
  end else if (COPY == COPY_FEYNMAN) begin : g_feyn
    logic [1:0] o;
    gfg_gate #(.N(2)) u_copy (.i({1'b0, nx}), .o(o));
    assign fb    = o[0];
    assign q     = o[1];
    assign q_aux = 1'b0;
  end else begin : g_gfg
    logic [2:0] o;
    gfg_gate #(.N(3)) u_copy (
      .i({(COPY == COPY_GFG) ? 1'b1 : 1'b0, 1'b0, nx}), .o(o));
    assign q     = o[0];
    assign fb    = o[1];
    assign q_aux = o[2];
  end

  always_latch begin
    if (e) state = fb;
  end
endmodule
