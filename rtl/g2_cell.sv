// g2_cell: the G cell of the least significant position of the 5-bit
// prototype, with one pull-down transistor removed.
//
// Removing the transistor that makes the inner NOR gate of the G cell see
// y_in turns the propagate output from x_in XOR y_in into x_in AND NOT y_in,
// while x_out stays x_in AND y_in. With x_in = c (the mask) and y_in = s_0
// fed back from the sum output, c = 0 gives g = p = 0 (no carry into bit 1)
// and c = 1 gives g = s_0, p = NOT s_0, so the low slice becomes an odd ring
// of inverters. The removed transistor is the document's; the equations are
// this design's reading of its circuit diagram. Purely combinational.
module g2_cell (
  input  logic x_in,   // mask c
  input  logic y_in,   // fed-back s_0
  output logic x_out,
  output logic y_out,
  output logic z_out
);
  always_comb begin
    x_out = x_in & y_in;
    y_out = x_in & ~y_in;
    z_out = x_in & ~y_in;
  end
endmodule
