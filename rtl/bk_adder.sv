// bk_adder: n-bit Brent-Kung parallel (carry-lookahead) adder built as a
// rectangular array of leaf cells with right-angle wiring only.
//
// Structure, south to north:
//   * a row of N G cells forming g_i = a_i AND b_i and p_i = a_i XOR b_i;
//   * K = bk_pkg::bw_rows(N) rows of N BW cells (WA, WB, BA, BB) that
//     propagate (generate, propagate) pairs through the Brent-Kung prefix
//     tree, about 2*log2(N) - 1 rows; every row inverts its vertical lines,
//     so odd rows use BA black cells and even rows BB black cells;
//   * a row of N-1 S cells, s_i = carry_{i-1} XOR p_i, with an I cell at
//     each end when K is odd (otherwise two plain wires).
// Each column carries three vertical lines: x (group generate, finally the
// carry out of that column), y (group propagate) and z (the column's own
// propagate). Horizontal v/w lines bring the east operand of a black cell
// from a WB cell over zero or more WA cells. The cell placement follows
// bk_pkg.
//
// Interface: a, b are N-bit unsigned (or two's complement) operands, s the
// N+1-bit result, s[N] the carry out; there is no carry in. The adder is
// purely combinational: no clock, no reset; the worst-case path crosses one
// G cell, K BW cells and one S cell.
//
// LSB_FEEDBACK = 1 replaces the G cell of column 0 with a G2 cell, as on
// the 5-bit prototype chip: b[0] is then the mask c and a[0] must be wired
// to s[0] outside this module, which turns the low slice into a ring
// oscillator when c = 1. The array, the cells and their equations follow the
// document; N = 16 is the size of its worked layout.
module bk_adder
  import bk_pkg::*;
#(
  parameter int unsigned N            = 16,
  parameter bit          LSB_FEEDBACK = 1'b0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   s
);

  localparam int unsigned K = bw_rows(N);

  // Vertical lines entering row r (r = 0 is the G row output).
  logic [N-1:0] x [K+1];
  logic [N-1:0] y [K+1];
  logic [N-1:0] z [K+1];
  // Westward lines leaving each cell of BW row r (index r-1).
  logic [N-1:0] v [K];
  logic [N-1:0] w [K];

  // ---------------------------------------------------------------- G row
  for (genvar c = 0; c < N; c++) begin : g_row
    if (LSB_FEEDBACK && c == 0) begin : g2
      g2_cell u_cell (.x_in(b[c]), .y_in(a[c]),
                      .x_out(x[0][c]), .y_out(y[0][c]), .z_out(z[0][c]));
    end else begin : g
      g_cell u_cell (.x_in(b[c]), .y_in(a[c]),
                     .x_out(x[0][c]), .y_out(y[0][c]), .z_out(z[0][c]));
    end
  end

  // ------------------------------------------------------------- BW rows
  for (genvar r = 1; r <= K; r++) begin : bw_row
    for (genvar c = 0; c < N; c++) begin : col
      localparam bw_cell_e CT = cell_at(N, r, c);
      // East neighbour's westward outputs (nothing lies east of column 0).
      // Only black and WA cells read them; a WB has no east inputs.
      logic v_e, w_e;
      if (c == 0) begin : edge_e
        assign v_e = 1'b0;
        assign w_e = 1'b0;
      end else begin : from_e
        assign v_e = v[r-1][c-1];
        assign w_e = w[r-1][c-1];
      end

      if (CT == CELL_WA) begin : wa
        wa_cell u_cell (.x_in(x[r-1][c]), .y_in(y[r-1][c]), .z_in(z[r-1][c]),
                        .v_in(v_e), .w_in(w_e),
                        .x_out(x[r][c]), .y_out(y[r][c]), .z_out(z[r][c]),
                        .v_out(v[r-1][c]), .w_out(w[r-1][c]));
      end else if (CT == CELL_WB) begin : wb
        wb_cell u_cell (.x_in(x[r-1][c]), .y_in(y[r-1][c]), .z_in(z[r-1][c]),
                        .x_out(x[r][c]), .y_out(y[r][c]), .z_out(z[r][c]),
                        .v_out(v[r-1][c]), .w_out(w[r-1][c]));
      end else if (CT == CELL_BA) begin : ba
        ba_cell u_cell (.x_in(x[r-1][c]), .y_in(y[r-1][c]), .z_in(z[r-1][c]),
                        .v_in(v_e), .w_in(w_e),
                        .x_out(x[r][c]), .y_out(y[r][c]), .z_out(z[r][c]));
        // Black cells have no westward outputs; nothing west reads these.
        assign v[r-1][c] = 1'b0;
        assign w[r-1][c] = 1'b0;
      end else begin : bb
        bb_cell u_cell (.x_in(x[r-1][c]), .y_in(y[r-1][c]), .z_in(z[r-1][c]),
                        .v_in(v_e), .w_in(w_e),
                        .x_out(x[r][c]), .y_out(y[r][c]), .z_out(z[r][c]));
        assign v[r-1][c] = 1'b0;
        assign w[r-1][c] = 1'b0;
      end
    end
  end

  // --------------------------------------------------------------- S row
  for (genvar c = 1; c < N; c++) begin : s_row
    s_cell u_cell (.x_in(x[K][c-1]), .y_in(z[K][c]), .x_out(s[c]));
  end

  if (K % 2 == 1) begin : i_ends
    i_cell u_lsb (.x_in(z[K][0]),   .x_out(s[0]));
    i_cell u_msb (.x_in(x[K][N-1]), .x_out(s[N]));
  end else begin : no_i
    assign s[0] = z[K][0];
    assign s[N] = x[K][N-1];
  end

endmodule
