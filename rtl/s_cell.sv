// s_cell: sum cell, x_out = x_in XOR y_in.
//
// Sits north of two columns of the BW array: x_in is the carry out of the
// column east of it, y_in the propagate bit of the column west of it. Both
// arrive in the same polarity (both inverted when the number of BW rows is
// odd), so the exclusive-or gives the sum bit in true polarity either way.
// Purely combinational; function as in the document.
module s_cell (
  input  logic x_in,
  input  logic y_in,
  output logic x_out
);
  always_comb x_out = x_in ^ y_in;
endmodule
