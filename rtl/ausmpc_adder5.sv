// ausmpc_adder5: the 5-bit prototype of the parallel adder, with the
// low-order sum bit fed back to the low-order input under a mask c.
//
// Core: bk_adder with N = 5 and LSB_FEEDBACK = 1, i.e. a G2 cell, four G
// cells, three rows of BW cells (WB BA WB BA WB / WB BB WA WB WB / BA WB BA
// WB WB, west to east), four S cells and two I cells. The feedback wire
// sets b_0 = c and a_0 = s_0 at the G2 cell. With c = 0 the circuit is a
// 4-bit adder, s[5:1] = a[4:1] + b[4:1]. With c = 1 the low slice is an odd
// ring of seven inverters (three in the G2 cell, one in each of three BW
// cells, one I cell), so the carry into bit 1 oscillates and s[5:1]
// alternates between a + b and a + b + 1.
//
// Interface: the nine input pins a[4:1], b[4:1], c and the five output pins
// s[5:1] of the chip. The pads and the T superbuffers that drive the output
// pads are electrical drivers with no logic function and are not modelled:
// the pins connect straight to the core.
//
// Timing: the cells are zero-delay; the feedback wire alone carries a
// delay of LOOP_DELAY time units (simulation only), which sets the half
// period of the oscillation and keeps a simulator from looping without end.
// Synthesis ignores the delay and reports the s_0 -> a_0 path as a
// combinational loop. The loop is intended: it is the ring oscillator used
// to test the dynamic behaviour of the adder. The cell arrangement and the
// feedback scheme are the document's; the single lumped loop delay is this
// design's own choice.
module ausmpc_adder5 #(
  parameter int unsigned LOOP_DELAY = 1
) (
  input  logic [4:1] a,
  input  logic [4:1] b,
  input  logic       c,
  output logic [5:1] s
);

  logic [4:0] core_a, core_b;
  logic [5:0] core_s;
  logic       s0_fb;

  assign #(LOOP_DELAY) s0_fb = core_s[0];

  assign core_a = {a, s0_fb};
  assign core_b = {b, c};

  bk_adder #(.N(5), .LSB_FEEDBACK(1'b1)) u_core (
    .a(core_a),
    .b(core_b),
    .s(core_s)
  );

  assign s = core_s[5:1];

endmodule
