// tb_ausmpc_adder5: end-to-end self-check of the 5-bit prototype, at its
// default parameters.
//
// Mask c = 0: all 256 pairs a[4:1], b[4:1] must give the settled, steady
// 4-bit sum s[5:1] = a + b.
// Mask c = 1: for all 256 pairs the carry into bit 1 must oscillate, so that
// s[5:1] keeps changing and takes exactly the two values a + b and a + b + 1.
// The worked example of the prototype (a = 1001, b = 1010) is checked bit by
// bit: s5 = 1 and s4 = 0 stay constant while s3 s2 s1 alternate between 011
// and 100. Both operating modes are counted, and a mode that never occurred
// counts as a failure. A watchdog ends a run that hangs.
module tb_ausmpc_adder5;
  logic [4:1] a, b;
  logic       c;
  logic [5:1] s;

  int checks = 0, failures = 0;
  int n_add_mode = 0, n_oscillating = 0;

  // Observation of s during a window.
  int         changes;
  logic [31:0] seen;  // bit v set when s took value v

  ausmpc_adder5 dut (.a(a), .b(b), .c(c), .s(s));

  always @(s) begin
    changes++;
    seen[s] = 1'b1;
  end

  task automatic open_window();
    changes = 0;
    seen    = '0;
    seen[s] = 1'b1;
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; c = 1'b0;
    #20;

    // ---- c = 0: 4-bit adder
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j); c = 1'b0;
        #10;             // settle, feedback s0 -> 0
        open_window();
        #20;
        checks++;
        if (s !== 5'(i + j) || changes != 0) begin
          failures++;
          $display("FAIL c=0 %0d + %0d: s=%0d changes=%0d", i, j, s, changes);
        end else n_add_mode++;
      end

    // ---- c = 1: oscillating carry into bit 1
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        logic [31:0] expect_seen;
        a = 4'(i); b = 4'(j); c = 1'b1;
        #10;
        open_window();
        #40;
        expect_seen = '0;
        expect_seen[5'(i + j)]     = 1'b1;
        expect_seen[5'(i + j + 1)] = 1'b1;
        checks++;
        if (seen !== expect_seen || changes < 10) begin
          failures++;
          $display("FAIL c=1 %0d + %0d: seen=%h expected %h, %0d changes",
                   i, j, seen, expect_seen, changes);
        end else n_oscillating++;
      end

    // ---- the worked example: 1001 + 1010 with c = 1
    a = 4'b1001; b = 4'b1010; c = 1'b1;
    #10;
    begin
      bit saw_011, saw_100, bad;
      saw_011 = 0; saw_100 = 0; bad = 0;
      for (int t = 0; t < 40; t++) begin
        @(s or a);
        if (s[5] !== 1'b1 || s[4] !== 1'b0) bad = 1;
        if (s[3:1] == 3'b011) saw_011 = 1;
        else if (s[3:1] == 3'b100) saw_100 = 1;
        else bad = 1;
      end
      checks++;
      if (bad || !saw_011 || !saw_100) begin
        failures++;
        $display("FAIL worked example: bad=%0d 011:%0d 100:%0d", bad, saw_011, saw_100);
      end
    end

    // ---- back to c = 0: the oscillation must stop
    c = 1'b0;
    #10;
    open_window();
    #20;
    checks++;
    if (s !== 5'b10011 || changes != 0) begin
      failures++;
      $display("FAIL oscillation did not stop: s=%b changes=%0d", s, changes);
    end

    checks++;
    if (n_add_mode == 0) begin failures++; $display("FAIL adder mode never seen"); end
    checks++;
    if (n_oscillating == 0) begin failures++; $display("FAIL oscillation never seen"); end
    $display("adder-mode cases %0d, oscillating cases %0d", n_add_mode, n_oscillating);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
