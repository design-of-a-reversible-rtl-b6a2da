// rev_we_dff: reversible write-enabled master-slave D flip-flop, the RAM
// bit cell.
//
// A Fredkin gate controlled by W selects between the data input D (W = 1)
// and the flip-flop's own output Q (W = 0) and feeds the result to a
// master-slave flip-flop (rev_ms_dff) whose slave copy gate is a
// 3-GFG(x,0,0), giving two copies of Q: one for the output and one fed
// back to the W multiplexer. Six gates (W Fredkin, clock Feynman, two
// Fredkin latches, Feynman and 3-GFG copy gates), quantum cost 19, four
// garbage lines. W and CP are passed on (w_out, cp_out) so that the next
// cell of a RAM row reuses them.
// Timing: while CP = 1 the master follows (W ? D : Q); when CP falls the
// slave opens and Q takes the master's value. With W = 0 a clock pulse
// rewrites the stored bit into itself (refresh). Which Fredkin output is
// the multiplexer output is this design's choice; the gate list, the
// constants and the W/CP reuse follow the published schematic. The loop
// Q -> multiplexer -> master -> slave -> Q is the flip-flop's feedback
// path and is always cut by one closed latch.
module rev_we_dff
  import rev_pkg::*;
(
  input  logic       cp,
  input  logic       w,
  input  logic       d,
  output logic       cp_out,
  output logic       w_out,
  output logic       q,
  output logic [3:0] garbage // mux Fredkin Q, master Fredkin Q,
                             // slave ~CP, slave Fredkin Q
);
  logic q_fb;  // second copy of Q, back to the W multiplexer
  logic mux;   // W ? D : Q

  fredkin_gate u_wmux (.a(w), .b(d), .c(q_fb), .p(w_out), .q(garbage[0]),
                       .r(mux));

  rev_ms_dff #(.SLAVE_COPY(COPY_GFG_DUP)) u_ff (
    .cp(cp), .d(mux), .cp_out(cp_out), .q(q), .q_aux(q_fb),
    .garbage(garbage[3:1]));
endmodule
