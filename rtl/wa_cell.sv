// wa_cell: white cell that passes a (generate, propagate) pair from east to
// west and inverts the three vertical lines it passes north.
//
// v/w run east to west in metal unchanged; x, y, z are each complemented
// (one nMOS inverter per line). Used between a black cell and the column
// that holds its east operand, so that no diagonal wire is needed. Purely
// combinational; equations as in the document.
module wa_cell (
  input  logic x_in,
  input  logic y_in,
  input  logic z_in,
  input  logic v_in,
  input  logic w_in,
  output logic x_out,
  output logic y_out,
  output logic z_out,
  output logic v_out,
  output logic w_out
);
  always_comb begin
    v_out = v_in;
    w_out = w_in;
    x_out = ~x_in;
    y_out = ~y_in;
    z_out = ~z_in;
  end
endmodule
