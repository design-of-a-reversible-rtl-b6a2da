// rram: 2^n x m reversible random access memory.
//
// Structure (rows i = 0..2^n-1, columns j = 0..m-1):
//  * an n x 2^n reversible NH-gate decoder turns the address into one-hot
//    row-select lines;
//  * a chain of Toffoli gates, one per row, takes (W, select_i, 0): the
//    first output passes W on to the next row, the second re-emits the
//    select line as the row's clock CP, the third is W & select_i, the
//    row's write enable;
//  * each row is m write-enabled master-slave flip-flops (rev_we_dff);
//    CP and W enter the first cell and are handed from cell to cell
//    through the cells' CP and W pass-through outputs;
//  * each data input D_j is copied down its column by a chain of 2^n - 1
//    Feynman gates (constant input 0);
//  * each column is read through one 2^n-input generalized Feynman gate,
//    whose last output is the XOR of its inputs.
//
// Read gating (this design's addition): the XOR of a whole column is not
// the selected row's bit, so each cell's Q passes through a Toffoli gate
// with the row's CP line (Q & select) before entering the column gate.
// With one row selected the XOR then equals that row's bit. This adds
// 2^n * m Toffoli gates to the published gate count.
//
// Operation (no separate clock; the row-select line is the cells' clock):
//  * while a row is selected its master latches are open. With w = 1 they
//    follow d; with w = 0 they reload the stored word (refresh);
//  * when the address moves to another row, the old row's select line
//    falls, its slave latches open and the word captured by the masters
//    becomes the stored word. A write therefore takes effect when the
//    address changes with w still high (or falling at the same moment);
//    dropping w while staying on the same row abandons the write;
//  * q always shows the stored word of the selected row, after the
//    decoder, Toffoli and column-XOR gate delays. During a write it still
//    shows the old word.
// The garbage lines of the gates are left unconnected inside this module.
// Parameter defaults: ADDR_BITS = 3 follows the 3 x 8 decoder example;
// DATA_BITS = 4 is this design's choice (the description is generic in m).
module rram
  import rev_pkg::*;
#(
  parameter int unsigned    ADDR_BITS = 3,
  parameter int unsigned    DATA_BITS = 4,
  parameter decoder_style_e DEC_STYLE = DEC_CHAIN
) (
  input  logic [ADDR_BITS-1:0] addr,  // I_1 .. I_n, addr[0] = I_1
  input  logic                 w,     // 1: write, 0: read/refresh
  input  logic [DATA_BITS-1:0] d,     // D_1 .. D_m, d[0] = D_1
  output logic [DATA_BITS-1:0] q      // Q_1 .. Q_m of the selected row
);
  localparam int unsigned ROWS = 1 << ADDR_BITS;

  logic [ROWS-1:0] sel;      // decoder outputs
  logic [ROWS:0]   w_chain;  // W passed row to row by the Toffoli gates
  logic [ROWS-1:0] row_cp;   // select line re-emitted as the row clock
  logic [ROWS-1:0] row_w;    // W & select
  logic [dec_garbage_bits(ADDR_BITS, DEC_STYLE)-1:0] dec_garbage;

  rev_decoder #(.ADDR_BITS(ADDR_BITS), .STYLE(DEC_STYLE)) u_dec (
    .addr(addr), .y(sel), .garbage(dec_garbage));

  assign w_chain[0] = w;

  // dline[i][j]: data D_j arriving at row i; cell_d[i][j]: D into cell (i,j)
  logic [DATA_BITS-1:0] dline  [ROWS];
  logic [DATA_BITS-1:0] cell_d [ROWS];
  // gated[j][i]: Q of cell (i,j) AND row select, into column gate j
  logic [ROWS-1:0]      gated  [DATA_BITS];

  assign dline[0] = d;

  for (genvar i = 0; i < ROWS; i++) begin : row
    logic [DATA_BITS:0]   cp;   // CP entering cell j (cp[j]), and leaving
    logic [DATA_BITS:0]   wl;   // W entering cell j
    logic [DATA_BITS-1:0] rd_cp; // CP out of cell j, into its read gate
    logic [DATA_BITS-1:0] qv;   // cell outputs
    logic [DATA_BITS-1:0] q_pass;
    logic [3:0]           ff_garbage [DATA_BITS];

    toffoli_gate u_t (.a(w_chain[i]), .b(sel[i]), .c(1'b0),
                      .p(w_chain[i+1]), .q(row_cp[i]), .r(row_w[i]));

    assign cp[0] = row_cp[i];
    assign wl[0] = row_w[i];

    for (genvar j = 0; j < DATA_BITS; j++) begin : col
      // Data fan-out down the column: rows 0..ROWS-2 copy, the last row
      // takes the line itself.
      if (i < ROWS - 1) begin : g_copy
        logic [1:0] f;
        gfg_gate #(.N(2)) u_f (.i({1'b0, dline[i][j]}), .o(f));
        assign dline[i+1][j] = f[0];
        assign cell_d[i][j]  = f[1];
      end else begin : g_last
        assign cell_d[i][j] = dline[i][j];
      end

      rev_we_dff u_ff (.cp(cp[j]), .w(wl[j]), .d(cell_d[i][j]),
                       .cp_out(rd_cp[j]), .w_out(wl[j+1]), .q(qv[j]),
                       .garbage(ff_garbage[j]));

      toffoli_gate u_rd (.a(rd_cp[j]), .b(qv[j]), .c(1'b0),
                         .p(cp[j+1]), .q(q_pass[j]), .r(gated[j][i]));
    end
  end

  for (genvar j = 0; j < DATA_BITS; j++) begin : colread
    logic [ROWS-1:0] o;
    gfg_gate #(.N(ROWS)) u_col (.i(gated[j]), .o(o));
    assign q[j] = o[ROWS-1];
  end
endmodule
