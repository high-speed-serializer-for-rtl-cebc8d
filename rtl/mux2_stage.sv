// mux2_stage: one 2:1 serializer stage in the two-latch/three-latch
// arrangement with a transmission-gate output.
//
// D0 passes a latch transparent at clk low and one transparent at clk high
// (together a rising-edge flip-flop) and becomes M0. D1 passes the same two
// latches plus a third one transparent at clk low, so M1 is delayed by half a
// clock period. The output selector passes M0 while clk is low and M1 while
// clk is high. M0 therefore changes only at rising edges, while M1 is not
// selected, and M1 only at falling edges, while M0 is selected: the two
// selector inputs never switch together, and one clock phase is enough for
// the whole stage.
//
// Ports: clk (stage clock, frequency f), d0/d1 (input data at f bit/s, both
// captured at the same rising edge), y (output at 2f bit/s).
// Timing: with the pair (D0, D1) captured at a rising edge t0, y carries D0
// during [t0 + T/2, t0 + T) and D1 during [t0 + T, t0 + 3T/2), T = 1/f.
//
// The five latches and the selector follow the described stage structure; the
// single-ended representation of the differential signals is a modelling
// choice.
module mux2_stage (
  input  logic clk,
  input  logic d0,
  input  logic d1,
  output logic y
);

  timeunit 1ps; timeprecision 1fs;

  logic d0_l1, m0;           // D0 path: two latches
  logic d1_l1, d1_l2, m1;    // D1 path: three latches

  fast_latch #(.TRANSPARENT_HIGH(1'b0)) u_d0_l1 (.clk(clk), .d(d0),    .q(d0_l1));
  fast_latch #(.TRANSPARENT_HIGH(1'b1)) u_d0_l2 (.clk(clk), .d(d0_l1), .q(m0));

  fast_latch #(.TRANSPARENT_HIGH(1'b0)) u_d1_l1 (.clk(clk), .d(d1),    .q(d1_l1));
  fast_latch #(.TRANSPARENT_HIGH(1'b1)) u_d1_l2 (.clk(clk), .d(d1_l1), .q(d1_l2));
  fast_latch #(.TRANSPARENT_HIGH(1'b0)) u_d1_l3 (.clk(clk), .d(d1_l2), .q(m1));

  tg_mux u_tg (.clk(clk), .m0(m0), .m1(m1), .y(y));

endmodule
