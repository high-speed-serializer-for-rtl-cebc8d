// mux16_channel: one 16:1 serializer channel, a binary tree of 2:1 stages.
//
// With the default LEVELS = 4 the tree holds 8 + 4 + 2 + 1 = 15
// mux2_stage instances. The eight leaf stages run on the 4 GHz clock and take
// the sixteen 4 Gbit/s inputs; each level up doubles clock and data rate, and
// the root stage on the 32 GHz clock delivers 64 Gbit/s. Every stage uses one
// clock phase only, and the whole input word is captured at one rising edge
// of the slowest clock (synchronous inputs).
//
// Stages are numbered as a heap: stage 1 is the root, stage n feeds from
// stages 2n (D0) and 2n+1 (D1), and stage n sits at level floor(log2 n). Since
// each stage emits D0 before D1, the serial position of a leaf input is its
// heap path read from the root downwards; the leaf wiring reverses that path
// so that data_i[0] leaves the channel first and data_i[15] last.
//
// Ports:
//   clk_i[l]  clock of level l; clk_i[0] is the fastest (32 GHz), clk_i[3]
//             the slowest (4 GHz). Every slower clock must toggle on falling
//             edges of the next faster one, as the divider chain provides.
//   data_i    parallel word, held stable around the rising edge of
//             clk_i[LEVELS-1].
//   ser_o     serial output, one bit per half period of clk_i[0].
// Timing: the first bit of a word starts first_bit_latency_ui(LEVELS)
// unit intervals (22 for four levels) after the capturing rising edge of the
// slowest clock; the bits follow back to back, 16 per slow-clock period.
//
// The tree of 15 cascaded identical stages follows the described channel. The
// input-to-time-slot order and the single-ended signals are modelling choices.
module mux16_channel
#(
  parameter int unsigned LEVELS = serializer_pkg::MUX_LEVELS,
  localparam int unsigned RATIO     = 1 << LEVELS,
  localparam int unsigned N_STAGES  = RATIO - 1
) (
  input  logic [LEVELS-1:0] clk_i,
  input  logic [RATIO-1:0]      data_i,
  output logic                  ser_o
);

  timeunit 1ps; timeprecision 1fs;

  logic [N_STAGES:1] stage_y;

  for (genvar n = 1; n <= N_STAGES; n++) begin : g_stage
    localparam int unsigned LEVEL = $clog2(n + 1) - 1;
    logic d0, d1;

    if (2 * n > N_STAGES) begin : g_leaf
      // Leaf stage: inputs come from the word, in bit-reversed order.
      localparam int unsigned POS0 = 2 * n - RATIO;
      assign d0 = data_i[serializer_pkg::bit_reverse(POS0,     LEVELS)];
      assign d1 = data_i[serializer_pkg::bit_reverse(POS0 + 1, LEVELS)];
    end else begin : g_inner
      assign d0 = stage_y[2 * n];
      assign d1 = stage_y[2 * n + 1];
    end

    mux2_stage u_stage (
      .clk (clk_i[LEVEL]),
      .d0  (d0),
      .d1  (d1),
      .y   (stage_y[n])
    );
  end

  assign ser_o = stage_y[1];

endmodule
