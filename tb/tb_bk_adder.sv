// tb_bk_adder: self-check of the n-bit parallel adder.
//
// * The default 16-bit adder gets every operand pair with one or both
//   operands at 0, all ones or a single bit set, plus 20000 random pairs,
//   each compared with a + b worked out by the testbench.
// * A 5-bit adder (odd number of BW rows, I cells present) and a 12-bit
//   adder (even number of rows, no I cells) are checked exhaustively
//   (5-bit) or on 20000 random pairs (12-bit).
// * A 5-bit adder with the G2 cell in column 0 is checked exhaustively with
//   its feedback input left open: s[0] = c AND NOT a0, and the carry into
//   bit 1 is c AND a0.
// * A carry in is obtained as with any adder of this kind: a 17-bit adder
//   with both low-order inputs set to the carry in gives a 16-bit sum with
//   carry in in s[17:1]; 20000 random cases.
// * The cell placement rules are compared with the printed 16-bit and 5-bit
//   layouts, row by row, and the 5-bit cell counts with the prototype's
//   parts list (WA 1, WB 9, BA 4, BB 1).
module tb_bk_adder;
  import bk_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16;  logic [16:0] s16;
  logic [4:0]  a5, b5;    logic [5:0]  s5;
  logic [11:0] a12, b12;  logic [12:0] s12;
  logic [4:0]  af, bf;    logic [5:0]  sf;
  logic [16:0] ac, bc;    logic [17:0] sc;

  bk_adder                                 dut16 (.a(a16), .b(b16), .s(s16));
  bk_adder #(.N(5))                        dut5  (.a(a5),  .b(b5),  .s(s5));
  bk_adder #(.N(12))                       dut12 (.a(a12), .b(b12), .s(s12));
  bk_adder #(.N(5), .LSB_FEEDBACK(1'b1))   dutfb (.a(af),  .b(bf),  .s(sf));
  bk_adder #(.N(17))                       dutci (.a(ac),  .b(bc),  .s(sc));

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    a16 = x; b16 = y; #1;
    checks++;
    if (s16 !== ({1'b0, x} + {1'b0, y})) begin
      failures++;
      $display("FAIL n=16 %h + %h = %h, got %h", x, y, {1'b0, x} + {1'b0, y}, s16);
    end
  endtask

  // Printed layouts, one string per BW row from row 1 upwards, listed from
  // the most significant column (west) to column 0 (east).
  function automatic string cell_name(bw_cell_e t);
    case (t)
      CELL_WA: return "WA";
      CELL_WB: return "WB";
      CELL_BA: return "BA";
      default: return "BB";
    endcase
  endfunction

  function automatic string row_string(int unsigned n, int unsigned r);
    string str = "";
    for (int c = int'(n) - 1; c >= 0; c--) str = {str, cell_name(cell_at(n, r, c))};
    return str;
  endfunction

  string fig16 [7] = '{
    "BAWBBAWBBAWBBAWBBAWBBAWBBAWBBAWB",
    "BBWAWBWBBBWAWBWBBBWAWBWBBBWAWBWB",
    "BAWAWAWAWBWBWBWBBAWAWAWAWBWBWBWB",
    "BBWAWAWAWAWAWAWAWBWBWBWBWBWBWBWB",
    "WBWBWBWBBAWAWAWAWBWBWBWBWBWBWBWB",
    "WBWBBBWAWBWBBBWAWBWBBBWAWBWBWBWB",
    "WBBAWBBAWBBAWBBAWBBAWBBAWBBAWBWB"};
  string fig5 [3] = '{"WBBAWBBAWB", "WBBBWAWBWB", "BAWBBAWBWB"};

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // --- layout against the printed figures
    checks++;
    if (bw_rows(16) != 7 || bw_rows(5) != 3) begin
      failures++;
      $display("FAIL row counts %0d %0d", bw_rows(16), bw_rows(5));
    end
    for (int r = 1; r <= 7; r++) begin
      checks++;
      if (row_string(16, r) != fig16[r-1]) begin
        failures++;
        $display("FAIL 16-bit row %0d: %s", r, row_string(16, r));
      end
    end
    for (int r = 1; r <= 3; r++) begin
      checks++;
      if (row_string(5, r) != fig5[r-1]) begin
        failures++;
        $display("FAIL 5-bit row %0d: %s", r, row_string(5, r));
      end
    end

    checks++;
    if (count_cells(5, CELL_WA) != 1 || count_cells(5, CELL_WB) != 9 ||
        count_cells(5, CELL_BA) != 4 || count_cells(5, CELL_BB) != 1) begin
      failures++;
      $display("FAIL 5-bit cell counts WA %0d WB %0d BA %0d BB %0d",
               count_cells(5, CELL_WA), count_cells(5, CELL_WB),
               count_cells(5, CELL_BA), count_cells(5, CELL_BB));
    end

    // --- 16-bit corners
    for (int i = -1; i <= 16; i++) begin
      for (int j = -1; j <= 16; j++) begin
        check16((i < 0) ? 16'h0 : (i == 16) ? 16'hffff : 16'(1) << i,
                (j < 0) ? 16'h0 : (j == 16) ? 16'hffff : 16'(1) << j);
      end
      check16((i < 0) ? 16'h0 : 16'(1) << i, 16'hffff);
      check16(16'hffff - ((i < 0) ? 16'h0 : 16'(1) << i), 16'h0001);
    end
    // --- 16-bit random
    for (int k = 0; k < 20000; k++) check16(16'($urandom), 16'($urandom));

    // --- 5-bit exhaustive
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j); #1;
        checks++;
        if (s5 !== 6'(i + j)) begin
          failures++;
          $display("FAIL n=5 %0d + %0d got %0d", i, j, s5);
        end
      end

    // --- 12-bit random (even number of BW rows)
    for (int k = 0; k < 20000; k++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); #1;
      checks++;
      if (s12 !== ({1'b0, a12} + {1'b0, b12})) begin
        failures++;
        $display("FAIL n=12 %h + %h got %h", a12, b12, s12);
      end
    end

    // --- G2 column, feedback input open
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        logic [5:0] exp_s;
        logic       cin1, s0;
        af = 5'(i); bf = 5'(j); #1;
        cin1 = bf[0] & af[0];
        s0   = bf[0] & ~af[0];
        exp_s = {(6'(af[4:1]) + 6'(bf[4:1]) + 6'(cin1)), s0} ;
        checks++;
        if (sf !== exp_s) begin
          failures++;
          $display("FAIL G2 a=%b b=%b got %b expected %b", af, bf, sf, exp_s);
        end
      end

    // --- carry in through one extra low-order position
    for (int k = 0; k < 20000; k++) begin
      logic [15:0] x, y;
      logic        cin;
      x = 16'($urandom); y = 16'($urandom); cin = 1'($urandom);
      if (k == 0) begin x = 16'hffff; y = 16'h0000; cin = 1'b1; end
      ac = {x, cin}; bc = {y, cin}; #1;
      checks++;
      if (sc[17:1] !== (17'(x) + 17'(y) + 17'(cin))) begin
        failures++;
        $display("FAIL carry in %h + %h + %b got %h", x, y, cin, sc[17:1]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
