// rev_decoder: n x 2^n reversible decoder built from NH gates.
//
// Level 2 is a 2x4 reversible decoder on address bits A1 (addr[0]) and A2
// (addr[1]). Each further level i = 3..n doubles the lines: NH gate j of
// the level takes (A_i, line j of level i-1, 0) and produces A_i & line and
// ~A_i & line, two lines of level i.
//
// STYLE = DEC_CHAIN (default, the structure the gate/garbage/delay counts
// refer to): gate 1 of a level receives A_i and every further gate
// receives A_i from the pass-through output of the gate before it. This
// needs 2^n - 2 NH gates and 2 Feynman gates, quantum cost 5*2^n - 8, and
// leaves n garbage lines, but the address bit ripples through the level.
// STYLE = DEC_LOW_DELAY: A_i is first copied with a tree of Feynman gates
// (constant input 0) so that all NH gates of a level work in parallel.
//
// Output: y is one-hot, y[k] = 1 exactly when addr == k. The gate network
// produces its minterms in a fixed non-binary order; rev_pkg's
// dec_line_index() wires each line to its address position. Purely
// combinational; ADDR_BITS must be at least 2. An assertion checks that y
// is one-hot. GATE_DELAY (default 0) is passed to every gate so that the
// network's depth in gate delays can be measured in simulation; synthesis
// ignores it. The one-hot check only applies with GATE_DELAY = 0, since
// a network with delays passes through intermediate states. The default of 3 is the
// 3 x 8 size of the worked example; it is not a size the design requires.
module rev_decoder
  import rev_pkg::*;
#(
  parameter int unsigned    ADDR_BITS = 3,
  parameter decoder_style_e STYLE     = DEC_CHAIN,
  parameter int unsigned    GATE_DELAY = 0
) (
  input  logic [ADDR_BITS-1:0]      addr,
  output logic [(1<<ADDR_BITS)-1:0] y,
  output logic [dec_garbage_bits(ADDR_BITS, STYLE)-1:0] garbage
);
  localparam int unsigned LOW_G = 2; // garbage lines of the 2x4 decoder

  for (genvar i = 2; i <= ADDR_BITS; i++) begin : lev
    logic [(1<<i)-1:0] lines;

    if (i == 2) begin : g_base
      rev_decoder_2to4 #(.GATE_DELAY(GATE_DELAY)) u_dec2 (
        .a(addr[0]), .b(addr[1]), .lines(lines), .garbage(garbage[1:0]));
    end else begin : g_level
      localparam int unsigned G = 1 << (i - 1); // NH gates in this level
      logic [G-1:0] ctl;   // A_i as seen by each gate
      logic [G-1:0] pass;  // pass-through output of each gate

      for (genvar j = 0; j < G; j++) begin : nh
        nh_gate #(.DELAY(GATE_DELAY)) u_nh (
          .a(ctl[j]), .b(lev[i-1].lines[j]), .c(1'b0),
          .p(pass[j]), .q(lines[2*j]), .r(lines[2*j+1]));
      end

      if (STYLE == DEC_CHAIN) begin : g_chain
        assign ctl[0] = addr[i-1];
        for (genvar j = 1; j < G; j++) begin : link
          assign ctl[j] = pass[j-1];
        end
        // The last gate's pass-through is this level's one garbage line.
        assign garbage[LOW_G + i - 3] = pass[G-1];
      end else begin : g_tree
        // Stage s holds 2^s copies of A_i; i-1 stages give G copies.
        for (genvar s = 0; s < i; s++) begin : st
          logic [(1<<s)-1:0] cp;
          if (s == 0) begin : g_root
            assign cp[0] = addr[i-1];
          end else begin : g_split
            for (genvar k = 0; k < (1 << (s - 1)); k++) begin : fey
              gfg_gate #(.N(2), .DELAY(GATE_DELAY)) u_f (
                .i({1'b0, st[s-1].cp[k]}), .o(cp[2*k+1:2*k]));
            end
          end
        end
        assign ctl = st[i-1].cp;
        // Every NH gate's pass-through is garbage in this structure.
        assign garbage[LOW_G + G - 4 +: G] = pass;
      end
    end
  end

  for (genvar p = 0; p < (1 << ADDR_BITS); p++) begin : map
    assign y[dec_line_index(ADDR_BITS, p)] = lev[ADDR_BITS].lines[p];
  end

  // Exactly one decoder line is active for every address.
  if (GATE_DELAY == 0) begin : g_check
    always_comb begin
      assert ($onehot(y))
        else $error("rev_decoder: output %b is not one-hot", y);
    end
  end
endmodule
