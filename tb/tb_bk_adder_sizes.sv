// tb_bk_adder_sizes: the parallel adder at every width of the published
// dimension table and of the delay table up to 64 bits
// (n = 4, 8, 12, 16, 24, 32, 48, 64).
//
// For each width the testbench
// * adds 1999 random operand pairs, a pair whose sum is 2**n (a carry
//   through every position) and all ones + 1, and compares each sum with
//   a + b worked out here;
// * compares the number of BW rows k with the value the published height
//   gives (height = 39 k + 88, in lambda) and, for powers of two, with
//   2 log2 n - 1;
// * compares the regularity factor (cells in the array divided by distinct
//   cell types, rounded to the nearest integer) with the published table.
// A watchdog ends a run that hangs.
module tb_bk_adder_sizes;
  import bk_pkg::*;

  int checks = 0, failures = 0;

  // Published height (lambda) and regularity factor; 0 where not tabulated.
  function automatic int pub_height(int n);
    case (n)
      8: return 283;  12: return 322;  16: return 361;  24: return 400;
      32: return 439; 48: return 478;  64: return 517;
      default: return 0;
    endcase
  endfunction
  function automatic int pub_regularity(int n);
    case (n)
      8: return 8;   12: return 16;  16: return 21;  24: return 40;
      32: return 50; 48: return 96;  64: return 119;
      default: return 0;
    endcase
  endfunction

  function automatic int regularity(int unsigned n);
    int unsigned k, total, kinds;
    k     = bw_rows(n);
    total = n + k * n + (n - 1) + ((k % 2 == 1) ? 2 : 0);
    kinds = 2 + ((k % 2 == 1) ? 1 : 0);  // G, S, and I when present
    for (int t = 0; t < 4; t++)
      if (count_cells(n, bw_cell_e'(t)) != 0) kinds++;
    return int'((total + kinds / 2) / kinds);
  endfunction

  task automatic check_structure(int unsigned n, int unsigned k_expected_pow2);
    checks++;
    if (pub_height(n) != 0 && 39 * int'(bw_rows(n)) + 88 != pub_height(n)) begin
      failures++;
      $display("FAIL n=%0d: %0d BW rows, height %0d, published %0d", n, bw_rows(n),
               39 * bw_rows(n) + 88, pub_height(n));
    end
    checks++;
    if (k_expected_pow2 != 0 && bw_rows(n) != k_expected_pow2) begin
      failures++;
      $display("FAIL n=%0d: %0d BW rows, expected %0d", n, bw_rows(n), k_expected_pow2);
    end
    checks++;
    if (pub_regularity(n) != 0 && regularity(n) != pub_regularity(n)) begin
      failures++;
      $display("FAIL n=%0d: regularity %0d, published %0d", n, regularity(n), pub_regularity(n));
    end
  endtask

  // One adder per width, each with its own random stimulus.
  `define BK_SIZE(NB, KP)                                                       \
    logic [NB-1:0] a_``NB, b_``NB;                                              \
    logic [NB:0]   s_``NB;                                                      \
    bk_adder #(.N(NB)) dut_``NB (.a(a_``NB), .b(b_``NB), .s(s_``NB));           \
    task automatic run_``NB();                                                  \
      check_structure(NB, KP);                                                  \
      for (int k = 0; k <= 2000; k++) begin                                     \
        for (int q = 0; q < (NB + 31) / 32; q++) begin                          \
          a_``NB = NB'({a_``NB, 32'($urandom)});                                \
          b_``NB = NB'({b_``NB, 32'($urandom)});                                \
        end                                                                     \
        if (k == 1999) b_``NB = ~a_``NB + NB'(1);                               \
        if (k == 2000) begin a_``NB = '1; b_``NB = NB'(1); end                  \
        #1;                                                                     \
        checks++;                                                               \
        if (s_``NB !== ({1'b0, a_``NB} + {1'b0, b_``NB})) begin                 \
          failures++;                                                           \
          $display("FAIL n=%0d: %h + %h got %h", NB, a_``NB, b_``NB, s_``NB);  \
        end                                                                     \
      end                                                                       \
    endtask

  `BK_SIZE(4, 3)
  `BK_SIZE(8, 5)
  `BK_SIZE(12, 0)
  `BK_SIZE(16, 7)
  `BK_SIZE(24, 0)
  `BK_SIZE(32, 9)
  `BK_SIZE(48, 0)
  `BK_SIZE(64, 11)



  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_4(); run_8(); run_12(); run_16(); run_24();
    run_32(); run_48(); run_64();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
