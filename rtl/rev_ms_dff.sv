// rev_ms_dff: reversible master-slave D flip-flop.
//
// A 2x2 Feynman gate with constant 1 turns CP into CP (enable of the
// master latch) and ~CP (enable of the slave latch). The master latch is a
// Fredkin gate with a Feynman copy gate; the slave latch is a Fredkin gate
// with a 3-GFG copy gate. Five gates in all, quantum cost
// 2*5 + 2*1 + 2 = 14, three garbage lines.
//
// SLAVE_COPY sets the slave's copy gate constants: COPY_GFG (0,1, the
// default and the standalone flip-flop) gives q_aux = ~q; COPY_GFG_DUP
// (0,0) gives q_aux = q, a second copy that the write-enabled flip-flop
// feeds back to its input multiplexer. The write-enabled flip-flop is built
// as this flip-flop with that change, as its published derivation says.
// Ports: cp, d in; cp_out (CP passed on for reuse), q, q_aux, garbage out.
// Timing: the master is transparent while CP = 1 and the slave while
// CP = 0, so q takes the value d had when CP fell (falling-edge behaviour
// seen from q). Which latch gets which clock phase follows the published
// description; the storage of each latch is as in rev_d_latch, and the
// structural loop through the two latches is the flip-flop's feedback.
module rev_ms_dff
  import rev_pkg::*;
#(
  parameter latch_copy_e SLAVE_COPY = COPY_GFG
) (
  input  logic       cp,
  input  logic       d,
  output logic       cp_out,
  output logic       q,
  output logic       q_aux,   // ~q (COPY_GFG) or q (COPY_GFG_DUP)
  output logic [2:0] garbage  // master Fredkin Q, slave ~CP, slave Fredkin Q
);
  logic [1:0] clk;  // clk[0] = CP, clk[1] = ~CP
  logic       m_q;
  logic       m_aux;

  gfg_gate #(.N(2)) u_clk (.i({1'b1, cp}), .o(clk));

  rev_d_latch #(.COPY(COPY_FEYNMAN)) u_master (
    .e(clk[0]), .d(d), .e_out(cp_out), .q(m_q), .q_aux(m_aux),
    .garbage(garbage[0]));

  rev_d_latch #(.COPY(SLAVE_COPY)) u_slave (
    .e(clk[1]), .d(m_q), .e_out(garbage[1]), .q(q), .q_aux(q_aux),
    .garbage(garbage[2]));

  // m_aux is the constant third line of the master's two-output copy gate.
endmodule
