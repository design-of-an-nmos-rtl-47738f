// tb_bk_adder_128: the parallel adder at 128 bits, one of the two widest sizes of the
// published delay comparison.
// Checks the row count (2 log2 n - 1 = 13), 3000 random operand pairs, a
// pair whose sum is 2**n (a carry through every position) and all ones + 1,
// each against a + b worked out by the testbench. A watchdog ends a run that
// hangs.
module tb_bk_adder_128;
  import bk_pkg::*;
  localparam int unsigned NB = 128;

  int checks = 0, failures = 0;
  logic [NB-1:0] a, b;
  logic [NB:0]   s;

  bk_adder #(.N(NB)) dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (bw_rows(NB) != 13) begin
      failures++;
      $display("FAIL %0d BW rows", bw_rows(NB));
    end
    for (int k = 0; k <= 3001; k++) begin
      for (int q = 0; q < NB / 32; q++) begin
        a = NB'({a, 32'($urandom)});
        b = NB'({b, 32'($urandom)});
      end
      if (k == 3000) b = ~a + NB'(1);
      if (k == 3001) begin a = '1; b = NB'(1); end
      #1;
      checks++;
      if (s !== ({1'b0, a} + {1'b0, b})) begin
        failures++;
        $display("FAIL %h + %h got %h", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
