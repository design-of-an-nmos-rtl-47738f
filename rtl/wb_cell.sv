// wb_cell: white cell that sends the (generate, propagate) pair it receives
// from the south both north (inverted) and west (uninverted).
//
// v_out = x_in and w_out = y_in start an east-to-west run towards a black
// cell; x, y, z are complemented on their way north. It is also the filler
// cell of every position without a black cell or a pass-through. Purely
// combinational; equations as in the document.
module wb_cell (
  input  logic x_in,
  input  logic y_in,
  input  logic z_in,
  output logic x_out,
  output logic y_out,
  output logic z_out,
  output logic v_out,
  output logic w_out
);
  always_comb begin
    v_out = x_in;
    w_out = y_in;
    x_out = ~x_in;
    y_out = ~y_in;
    z_out = ~z_in;
  end
endmodule
