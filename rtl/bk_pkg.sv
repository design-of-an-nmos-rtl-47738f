// bk_pkg: cell types and layout rules of the Manhattan-geometry Brent-Kung
// carry-lookahead array.
//
// The array has one row of G cells, k rows of BW cells (WA, WB, BA, BB) and a
// row of S cells. Columns are numbered 0 (least significant bit, east) to
// n-1 (most significant bit, west); BW rows are numbered 1 (just north of
// the G row) to k. Row r receives every vertical signal in true polarity
// when r is odd and complemented when r is even, because every BW cell
// inverts what it passes north.
//
// The rows follow the Brent-Kung prefix tree, written with 1-based bit
// positions i = column + 1:
//   * "up" rows l = 1 .. U, U = floor(log2 n): a black cell sits at every
//     i with i mod 2**l = 0 and takes its east operand from i - 2**(l-1);
//   * "down" rows d = D .. 1, D the largest d with 3 * 2**(d-1) <= n: a
//     black cell sits at every i > 2**d with i mod 2**d = 2**(d-1) and takes
//     its east operand from i - 2**(d-1).
// The operand column holds a WB cell, which turns the signals it gets from
// the south to the west; the columns between it and the black cell hold WA
// cells, which pass them on westwards. Every other position holds a WB whose
// westward outputs nobody reads. These rules reproduce both printed layouts
// (16 bits, 7 BW rows; 5 bits, 3 BW rows) and the row counts of the
// dimension table (8, 12, 16, 24, 32, 48, 64 bits: 5 .. 11 rows). The
// placement of the rows is the document's; the closed-form rules are this
// design's own reading of its figures.
package bk_pkg;

  typedef enum logic [1:0] {
    CELL_WA = 2'd0,  // white cell, passes v/w east to west
    CELL_WB = 2'd1,  // white cell, turns x/y from south to west
    CELL_BA = 2'd2,  // black cell for true-polarity inputs
    CELL_BB = 2'd3   // black cell for complemented inputs
  } bw_cell_e;

  // floor(log2 n), n >= 1
  function automatic int unsigned flog2(input int unsigned n);
    int unsigned r;
    r = 0;
    while ((n >> (r + 1)) != 0) r++;
    return r;
  endfunction

  // Number of "up" rows.
  function automatic int unsigned up_rows(input int unsigned n);
    return flog2(n);
  endfunction

  // Number of "down" rows.
  function automatic int unsigned down_rows(input int unsigned n);
    int unsigned d;
    d = 0;
    while (3 * (1 << d) <= n) d++;
    return d;
  endfunction

  // k, the number of rows of BW cells.
  function automatic int unsigned bw_rows(input int unsigned n);
    return up_rows(n) + down_rows(n);
  endfunction

  // Span of row r (1-based): the distance from a black cell to the column
  // holding its east operand.
  function automatic int unsigned row_span(input int unsigned n, input int unsigned r);
    if (r <= up_rows(n)) return 1 << (r - 1);
    else return 1 << (bw_rows(n) - r);
  endfunction

  // True when row r is an "up" row.
  function automatic bit row_is_up(input int unsigned n, input int unsigned r);
    return r <= up_rows(n);
  endfunction

  // True when the 1-based bit position i holds a black cell in row r.
  function automatic bit is_black(input int unsigned n, input int unsigned r,
                                  input int unsigned i);
    int unsigned s;
    s = row_span(n, r);
    if (i < 1 || i > n) return 1'b0;
    if (row_is_up(n, r)) return (i % (2 * s)) == 0;
    else return (i > 2 * s) && ((i % (2 * s)) == s);
  endfunction

  // Cell type at row r (1-based), column c (0-based).
  function automatic bw_cell_e cell_at(input int unsigned n, input int unsigned r,
                                       input int unsigned c);
    int unsigned i, s, nb;
    i = c + 1;
    s = row_span(n, r);
    if (is_black(n, r, i)) return (r % 2 == 1) ? CELL_BA : CELL_BB;
    // nb: the nearest black position at or west of i.
    if (row_is_up(n, r)) nb = ((i + 2 * s - 1) / (2 * s)) * (2 * s);
    else if (i <= 3 * s) nb = 3 * s;
    else nb = ((i - s + 2 * s - 1) / (2 * s)) * (2 * s) + s;
    // A WA lies strictly between a black cell and its operand column.
    if (nb <= n && nb > i && nb - i < s) return CELL_WA;
    return CELL_WB;
  endfunction

  // Number of cells of type t in the whole BW array.
  function automatic int unsigned count_cells(input int unsigned n, input bw_cell_e t);
    int unsigned cnt;
    cnt = 0;
    for (int unsigned r = 1; r <= bw_rows(n); r++)
      for (int unsigned c = 0; c < n; c++)
        if (cell_at(n, r, c) == t) cnt++;
    return cnt;
  endfunction

endpackage
