// ba_cell: black (combining) cell for true-polarity inputs.
//
// x_in/y_in are the group generate and propagate of this column, v_in/w_in
// those of the adjacent lower group, brought from the east. It forms the
// Brent-Kung operator and outputs it complemented, as one NOR-type gate
// each: x_out = NOT(x_in OR (y_in AND v_in)), y_out = NOT(y_in AND w_in).
// z (the bit's own propagate, on its way to the sum row) is inverted.
// Purely combinational; equations as in the document.
module ba_cell (
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
    x_out = ~(x_in | (y_in & v_in));
    y_out = ~(y_in & w_in);
    z_out = ~z_in;
  end
endmodule
