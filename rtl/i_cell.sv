// i_cell: inverter, x_out = NOT x_in.
//
// Placed at each end of the sum row when the number of BW rows is odd, to
// restore the polarity of the lowest sum bit and of the carry out. Purely
// combinational; function as in the document.
module i_cell (
  input  logic x_in,
  output logic x_out
);
  always_comb x_out = ~x_in;
endmodule
