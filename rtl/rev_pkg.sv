// rev_pkg: types and elaboration-time helpers shared by the reversible-logic
// modules.
//
// latch_copy_e selects the gate that copies the state line of a reversible
// D latch so that one copy can be fed back and the others used: a 3-input
// generalized Feynman gate giving Q and ~Q (the default), a Peres gate
// giving Q and ~Q, a 2x2 Feynman gate giving one copy (the master latch of
// the flip-flops) or a 3-input generalized Feynman gate giving two copies
// (the slave latch of the write-enabled flip-flop). decoder_style_e selects how an n x 2^n decoder hands the
// new address bit to the NH gates of each level: passed along the chain of
// gates (the area-lean structure) or copied with a Feynman tree so that
// every gate of a level works in parallel (the low-delay structure).
//
// dec_line_index() gives, for line POS of decoder level LEVEL, the binary
// address whose minterm that line carries. The NH-gate decoder produces its
// minterms in a fixed but non-binary order; this function is how the
// decoder module wires those lines to a one-hot output indexed by address.
package rev_pkg;

  typedef enum logic [1:0] {
    COPY_GFG     = 2'd0, // 3-GFG, constants 0,1: copy and complement, cost 2
    COPY_PERES   = 2'd1, // Peres, constants 1,0: copy and complement, cost 4
    COPY_FEYNMAN = 2'd2, // 2x2 Feynman, constant 0: one copy, cost 1
    COPY_GFG_DUP = 2'd3  // 3-GFG, constants 0,0: two copies, cost 2
  } latch_copy_e;

  typedef enum logic {
    DEC_CHAIN     = 1'b0, // address bit passed through gate to gate
    DEC_LOW_DELAY = 1'b1  // address bit copied by a Feynman tree
  } decoder_style_e;

  // Level 2 is the 2x4 decoder. Its lines carry, in order,
  // A1&A2, ~A1&A2, ~A1&~A2, A1&~A2 with address = {A2, A1}.
  // Line POS of level i is produced by NH gate POS/2 of that level:
  // the even line is A_i AND the parent line, the odd one ~A_i AND it.
  // Number of garbage lines of an n x 2^n decoder: the two control
  // pass-throughs of the 2x4 decoder, plus one per level (chain) or one per
  // NH gate of levels 3..n (low delay).
  function automatic int unsigned dec_garbage_bits(int unsigned n,
                                                   decoder_style_e style);
    if (style == DEC_CHAIN) return n;
    return (1 << n) - 2;
  endfunction

  function automatic int unsigned dec_line_index(int unsigned level,
                                                 int unsigned pos);
    int unsigned idx;
    int unsigned p;
    p = pos;
    idx = 0;
    for (int unsigned l = level; l > 2; l--) begin
      if (p % 2 == 0) idx += (1 << (l - 1));
      p = p / 2;
    end
    case (p)
      0:       idx += 3;
      1:       idx += 2;
      2:       idx += 0;
      default: idx += 1;
    endcase
    return idx;
  endfunction

endpackage
