// tb_g2_cell: exhaustive self-check of g2_cell (masked feedback generate/propagate cell).
// Drives every combination of the cell's inputs and compares every output
// with the cell's equations, written out here independently of the RTL.
// Prints one TB_RESULT line; a watchdog ends a run that hangs.
module tb_g2_cell;
  logic x, y, z, v, w;
  logic xo, yo, zo, vo, wo;
  logic ex, ey, ez, ev, ew;
  int checks = 0, failures = 0;

  g2_cell dut (.x_in(x), .y_in(y), .x_out(xo), .y_out(yo), .z_out(zo)); assign vo = 1'b0; assign wo = 1'b0;

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
      ex = x && y; ey = x && !y; ez = x && !y; ev = 0; ew = 0;
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
