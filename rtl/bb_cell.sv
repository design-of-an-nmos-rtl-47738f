// bb_cell: black (combining) cell for complemented inputs, the dual of ba_cell.
//
// All four inputs arrive complemented (x_in = NOT g, y_in = NOT p, v_in =
// NOT g_east, w_in = NOT p_east). The cell forms the Brent-Kung operator in
// true polarity: x_out = NOT(x_in AND (y_in OR v_in)) = g OR (p AND g_east),
// y_out = NOT(y_in OR w_in) = p AND p_east. z is inverted. Purely
// combinational. The y_out and z_out equations are the document's; the
// second operand of the inner OR of x_out is y_in as in its transistor
// diagram and as duality with ba_cell requires.
module bb_cell (
  input  logic x_in,
  input  logic y_in,
  input  logic z_in,
  input  logic v_in,
  input  logic w_in,
  output logic x_out,
  output logic y_out,
  output logic z_out
);
  always_comb begin
    x_out = ~(x_in & (y_in | v_in));
    y_out = ~(y_in | w_in);
    z_out = ~z_in;
  end
endmodule
