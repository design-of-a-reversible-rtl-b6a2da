# A reversible random access memory

This is a small static RAM built only from **reversible gates**. A
reversible gate has as many outputs as inputs, and its input vector can
always be recovered from its output vector. No information is erased, which
is why such circuits are studied for very low-power, quantum and optical
computing. A memory is the awkward case. Storing a bit means forgetting the
old one, and a decoded select line has to reach many cells without plain
fan-out, which reversible logic does not allow. The design answers this with
four devices:

* a new 3x3 gate, the **NH gate**, which yields two decoder lines at once;
* **Feynman (CNOT) gates** to copy lines wherever a signal must fan out;
* **Fredkin gates** (controlled swaps) used as multiplexers inside latches;
* a **Toffoli gate** per row that ANDs the write strobe with the row select.

Lines that are needed only to keep a gate reversible are called *garbage*.
Constant inputs (0 or 1) that a gate needs are called *ancilla* inputs.

The RTL describes the gate network structurally. Every reversible gate is
its own module, and the larger blocks only wire gates together. All of it
is synthesizable SystemVerilog. Storage uses level-sensitive latches, as
the circuit does; there are no flip-flops in the synthesis sense.

## The gate library

Inputs are (A, B, C) and outputs are (P, Q, R). Index 1 of a vector gate is
bit 0.

| module         | function                                           | quantum cost |
|----------------|----------------------------------------------------|--------------|
| `nh_gate`      | P = A, Q = AB ^ C, R = ~AB ^ C                     | 5 |
| `toffoli_gate` | P = A, Q = B, R = AB ^ C                           | 5 |
| `fredkin_gate` | P = A, Q = A ? C : B, R = A ? B : C (swap when A)  | 5 |
| `peres_gate`   | P = A, Q = A ^ B, R = AB ^ C                       | 4 |
| `gfg_gate #(N)`| O_m = I_1 ^ ... ^ I_m (prefix XOR)                 | N - 1 |

`gfg_gate` is the *generalized Feynman gate* family. With N = 2 it is the
ordinary Feynman gate: (x, 0) gives two copies of x, and (x, 1) gives x and
~x. With N = 3 and constants (0, 1) it gives x, x and ~x at half the quantum cost
of a Peres gate. That is the cheapest way to split a latch's
state line. A wide instance, N = 2^n, is the read gate at the bottom of
each RAM column.

With C = 0 the NH gate outputs A, A&B and ~A&B. That is half of a 2-to-4
decoder in one gate, and it is why the decoder is built from NH gates.

## Decoding the address with NH gates

`rev_decoder_2to4` uses two Feynman gates to form ~A and ~B. NH(A, B, 0)
then gives AB and ~AB, and NH(~A, ~B, 0) gives ~A~B and A~B. The two NH
pass-through lines (A, ~A) are its garbage.

`rev_decoder` grows this to n address bits. Each further bit A_i adds one
*level* of 2^(i-1) NH gates. Gate j takes (A_i, line j of the previous
level, 0) and splits that line into A_i & line and ~A_i & line. A_i still
has to reach every gate of the level, and the parameter `STYLE` chooses how:

* `DEC_CHAIN` (default). The first gate gets A_i. Each later gate gets A_i
  from the pass-through output P of the gate before it. This gives
  2^n - 2 NH gates plus 2 Feynman gates (2^n gates in all), a quantum cost
  of 5*2^n - 8 and only n garbage lines. The cost is that A_i ripples
  through the whole level: the outputs settle after 2^(n-1) gate delays
  (measured; see Verification).
* `DEC_LOW_DELAY`. A_i is first copied by a binary tree of Feynman gates
  with constant input 0. All the NH gates of a level then work in parallel.
  Every NH pass-through becomes garbage: 2^n - 2 lines. The outputs settle
  after n gate delays.

The gate network produces its minterms in its own order. For n = 3 that
order is ABC, A~BC... rather than binary. `rev_pkg::dec_line_index()`
gives the address of each network line, and the module uses it to wire
the lines to a one-hot output. `y[k]` is high exactly when `addr == k`,
with `addr[0]` as the first bit of the 2x4 stage. This renumbering is only
wiring. `ADDR_BITS` must be at least 2.

## Holding a bit: latch, flip-flop, write-enabled flip-flop

This part is the hardest to read from the schematic, so it is explained in
full here.

**Latch (`rev_d_latch`).** A Fredkin gate gets (E, D, S), where S is the
latch's own state line coming back around a loop. Its third output is
E ? D : S, which is the latch equation Q+ = D.E + ~E.Q. That line may not
fan out, so a *copy gate* splits it. One copy goes back as S and the
others are the outputs. The Fredkin gate's first output re-emits E, so the
next latch in a chain can use the same enable. Its second output is the
single garbage line. `COPY` selects the copy gate:

| `COPY`         | gate and constants   | outputs                 | used in |
|----------------|----------------------|-------------------------|---------|
| `COPY_GFG`     | 3-GFG (x, 0, 1)      | q, feedback, ~q         | standalone latch (cost 7); slave of `rev_ms_dff` |
| `COPY_PERES`   | Peres (x, 1, 0)      | q, ~q, feedback         | alternative latch (cost 9) |
| `COPY_FEYNMAN` | Feynman (x, 0)       | feedback, q (q_aux = 0) | master latches |
| `COPY_GFG_DUP` | 3-GFG (x, 0, 0)      | q, feedback, second q   | slave of the write-enabled flip-flop |

In the physical circuit the bit lives on the feedback loop. RTL cannot hold
a value on a purely combinational loop without the tools reporting it, so
the loop is closed through an explicit hold element on S
(`always_latch if (e) state = fb;`). While E = 1 the Fredkin output does not
depend on S, so the element stores nothing the loop would not hold. Lint
and synthesis still report the structural loop through each latch. That
loop is the storage path and is intended.

**Master-slave flip-flop (`rev_ms_dff`).** A Feynman gate with constant 1
turns CP into CP and ~CP. CP enables the master latch (Fredkin + Feynman
copy) and ~CP enables the slave latch (Fredkin + 3-GFG). The output changes
when CP falls and takes the value D had at that moment. It uses five
gates, three garbage lines and costs 14.

**Write-enabled flip-flop (`rev_we_dff`).** This is the RAM bit cell. A
Fredkin gate controlled by W feeds the flip-flop with W ? D : Q. The
flip-flop is `rev_ms_dff` with `SLAVE_COPY = COPY_GFG_DUP`, so the slave
gives two copies of Q: one is the output and one goes back to the
multiplexer. With W = 0 a clock pulse writes the stored bit back into
itself, which is a *refresh*. The cell passes both CP and W on (`cp_out`,
`w_out`), so the cells of a row form a chain rather than a fan-out. It
uses six gates, four garbage lines and costs 19.

## The memory array (`rram`)

For 2^n rows and m columns:

```
addr --> rev_decoder --sel[i]--> Toffoli(W_chain, sel[i], 0) --+--> W passed to next row
                                        |          |
                                    CP = sel[i]  W & sel[i]
                                        v          v
                       row i:  [we_dff]->[we_dff]-> ... ->[we_dff]   (CP and W handed cell to cell)
                                  ^ D_1     ^ D_2            ^ D_m   (Feynman copies down each column)
                                  Q & sel (Toffoli per cell)
                                        v
          column j:  2^n-input generalized Feynman gate, last output = Q_j
```

* The Toffoli gate of row i takes W from the previous row's Toffoli. It
  re-emits the row-select line as the row clock CP and produces
  W & select as the row write enable.
* Each data input D_j runs down its column through 2^n - 1 Feynman gates
  with constant 0. Each gate gives one copy to its row's cell and passes
  one copy down. The last row takes the line itself.
* Each cell's Q is ANDed with the row's CP line by a Toffoli gate, and
  the 2^n results of a column enter one 2^n-input generalized Feynman gate.
  At most one row is selected, so the XOR on its last output is the
  selected row's bit.

Parameters: `ADDR_BITS` (n, default 3), `DATA_BITS` (m, default 4) and
`DEC_STYLE` (default `DEC_CHAIN`). The published design is generic in n and
m. The default of 3 address bits matches the worked 3x8 decoder example,
and the 4-bit word is a choice made for this RTL. Ports: `addr`, `w`, `d`
and `q`. Garbage lines are left unconnected inside the module.

## Operating the memory

The memory has **no clock input**. The row-select line itself is the
clock of the row's cells. This gives the following behaviour:

* **Read.** Apply an address with `w = 0`. After the gate delays, `q`
  shows that row's stored word. While the row stays selected its master
  latches reload the stored word, so the word is refreshed and `d` is
  ignored.
* **Write.** Apply the address with `w = 1` and the data on `d`. The
  selected row's master latches follow `d`. The word is **committed when
  the address moves to another row**: the old row's select falls, its
  slave latches open, and the captured word becomes the stored word.
  `w` may fall at the same moment as the address changes. If `w` is still
  high after the move, the newly selected row is being written too.
* **Abandoned write.** If `w` falls while the row is still selected, the
  masters go back to the stored word and the write does not happen.
* **Write then read of the same word.** During a write, `q` still shows
  the row's old word. The new word appears on `q` only when the row is
  selected again after it has been left once.
* In a gate network with real delays, `d` must be stable, and `w` must not
  change, while the address moves off a row that is being written.
  Otherwise the write races the closing of that row's master latches. The
  zero-delay RTL has no such race: every change at one instant is seen
  together.

After power-up the stored words are arbitrary. Write every row, and move
away from it, before relying on its contents.

## Where this RTL departs from the published description, and why

* **Read gating.** The published array feeds every Q of a column straight
  into the column's wide Feynman gate. That gate's output is then the XOR
  of the whole column, not the selected row's bit, yet the description
  says a read returns the selected row. This RTL adds one Toffoli gate per
  cell, ANDing Q with the row-select line, so that the read works. It
  adds 2^n * m gates to the published gate count. Without this gating
  the RAM test fails on nearly every read.
* **Output order of the NH gate.** This follows the gate's truth table
  (Q = AB ^ C, R = ~AB ^ C). One published drawing lists the two outputs
  the other way round.
* **Choices not given by the description**, all equivalent in function:
  * which copy of a copy gate is fed back;
  * which Fredkin output carries the W multiplexer;
  * which Feynman output goes to a cell and which continues down a column;
  * the tree shape of the low-delay decoder for n > 3;
  * the binary numbering of the decoder outputs.
* **Not built:** the n x n generalisation of the NH gate, which no part of
  the design uses (only the 3x3 gate has a complete truth table), and the
  realisation of the NH gate from controlled-V quantum gates, which has no
  Boolean counterpart below the gate itself.

## Gate counts at the default size (n = 3, m = 4)

| item | published formula | this RTL |
|------|-------------------|----------|
| gates | (7m + 2)·2^n − m = 236 (excludes the m column gates) | 236 + 4 column gates + 32 read-gating Toffoli = 272 |
| quantum cost | (21m + 10)·2^n − 2m − 8 = 736 | 736 + 32 × 5 = 896 |
| decoder | 2^n gates, n garbage, cost 5·2^n − 8 = 32 | 8 gates, 3 garbage, 32 |

## Verification

Every module has a self-checking testbench in `tb/` that ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_nh_gate`, `tb_toffoli_gate`, `tb_fredkin_gate`, `tb_peres_gate` | all 8 input vectors against the gate equations (for the NH gate, against its truth table), and that the 8 outputs are distinct, i.e. the gate is reversible |
| `tb_gfg_gate` | N = 2 and 3 exhaustively; N = 16 randomly, including rebuilding the inputs from the outputs |
| `tb_rev_decoder_2to4`, `tb_rev_decoder` | every address for n = 2, 3, 6 (chain) and n = 3, 6 (low delay), including the garbage lines |
| `tb_rev_d_latch`, `tb_rev_ms_dff`, `tb_rev_we_dff` | random stimulus against a master/slave reference model |
| `tb_rev_decoder_delay` | settling time of the decoders with one time unit per gate (below) |
| `tb_rram` (default size) and `tb_rram_wide` (64 x 8, low-delay decoder) | thousands of random reads and writes against a per-row master/slave reference model |

The RAM tests count the committed writes, reads of written words,
refreshes, abandoned writes and rows revisited after other rows were
written. A mechanism that never happens fails the test.

`tb_rev_decoder_delay` gives every gate one time unit of delay (the
simulation-only `GATE_DELAY`/`DELAY` parameters, 0 by default and ignored
by synthesis). It then measures, over every pair of addresses, when the
decoders' outputs stop changing:

| decoder | measured settling time (gate delays) |
|---------|--------------------------------------|
| 2x4 | 2 |
| chain, n = 3 / 4 | 4 / 8, i.e. 2^(n-1) |
| low delay, n = 3 / 4 / 5 | 3 / 4 / 5, i.e. n |

The low-delay figures match the design intent, which is one gate per
address bit. For the chain decoder, adding up the gates on the chain gives
2^n − 2 (6 for n = 3). A signal is faster than that: the address bit
reaches the last gate of its level through the pass-through outputs alone,
and those do not wait for the decoded lines. So the real depth is
max(n, 2^(n-1)). The RAM itself is simulated with zero delay.

Simulating one testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_rram \
  -y rtl -y tb +libext+.sv rtl/rev_pkg.sv tb/tb_rram.sv
./obj_dir/Vtb_rram
```

Verilator reports `UNOPTFLAT` (circular logic) on the latch feedback
loops. These are the storage paths described above, and simulation
converges because one latch of every loop is always closed.

## Files

* `rtl/rev_pkg.sv`: the copy-gate and decoder-style enums, and the
  decoder's line-numbering and garbage-count functions.
* `rtl/*_gate.sv`: the gate library.
* `rtl/rev_decoder_2to4.sv` and `rtl/rev_decoder.sv`: the decoders.
* `rtl/rev_d_latch.sv`, `rtl/rev_ms_dff.sv` and `rtl/rev_we_dff.sv`: the
  storage cells.
* `rtl/rram.sv`: the memory (top).
* `tb/tb_*.sv`: one testbench per module, plus `tb_rram_wide.sv`.
