// tb_i_cell: exhaustive self-check of i_cell (inverter cell).
// Drives every combination of the cell's inputs and compares every output
// with the cell's equations, written out here independently of the RTL.
// Prints one TB_RESULT line; a watchdog ends a run that hangs.
module tb_i_cell;
  logic x, y, z, v, w;
  logic xo, yo, zo, vo, wo;
  logic ex, ey, ez, ev, ew;
  int checks = 0, failures = 0;

  i_cell dut (.x_in(x), .x_out(xo)); assign yo = 1'b0; assign zo = 1'b0; assign vo = 1'b0; assign wo = 1'b0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {x, y, z, v, w} = 5'(i);
      #1;
      ex = !x; ey = 0; ez = 0; ev = 0; ew = 0;
      checks++;
      if ({xo, yo, zo} !== {ex, ey, ez}) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b v=%b w=%b: got %b%b%b expected %b%b%b",
                 x, y, z, v, w, xo, yo, zo, ex, ey, ez);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
