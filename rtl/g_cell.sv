// g_cell: carry-generate / carry-propagate cell, the bottom row of the adder.
//
// x_in and y_in are the two operand bits of one position (b_i and a_i).
// x_out = x_in AND y_in is the generate bit g_i; y_out = x_in XOR y_in is the
// propagate bit p_i that enters the carry tree; z_out carries the same p_i up
// the column to the sum row. All outputs are true polarity. Purely
// combinational. The equations are the document's.
module g_cell (
  input  logic x_in,
  input  logic y_in,
  output logic x_out,
  output logic y_out,
  output logic z_out
);
  always_comb begin
    x_out = x_in & y_in;
    y_out = x_in ^ y_in;
    z_out = x_in ^ y_in;
  end
endmodule
