// serializer: 19-channel 16:1 serializer placed between a DAC's on-chip
// sample memory and its output stage.
//
// An 8-bit DAC segmented into four unary bits (15 thermometer lines) and four
// binary bits needs 19 data lines, each running at 64 Gbit/s for 64 GS/s.
// The memory side supplies, per line, a 16-bit word every 4 GHz cycle
// (16 x 4 Gbit/s). One clock network turns the external 32 GHz clock into the
// 32, 16, 8 and 4 GHz clocks, and every one of the 19 identical channels
// serializes its word through a four-level tree of 2:1 stages, for a total
// throughput of 19 x 64 = 1216 Gbit/s.
//
// Ports:
//   clk_i        external 32 GHz clock
//   div_rst_i    active-high resets of the 16->8 GHz (bit 0) and 8->4 GHz
//                (bit 1) dividers; the 32->16 GHz divider has no reset
//   data_i[c]    16-bit word of channel c; bit 0 is sent first. Must be stable
//                around the rising edge of word_clk_o.
//   word_clk_o   4 GHz word clock for the data source (the slowest MUX clock)
//   ser_o[c]     64 Gbit/s serial output of channel c
// Timing: a word captured at a rising edge of word_clk_o appears on ser_o
// 22 unit intervals (343.75 ps) later, 16 bits back to back, one bit per half
// period of clk_i. All channels are aligned to each other.
//
// Channel count, ratio, clock frequencies and divider arrangement follow the
// described design. Bringing the word clock out to the data source and the
// order of bits within a word are this design's own choices.
module serializer
#(
  parameter int unsigned N_CH       = serializer_pkg::N_CHANNELS,
  parameter int unsigned LEVELS = serializer_pkg::MUX_LEVELS,
  localparam int unsigned RATIO     = 1 << LEVELS
) (
  input  logic                           clk_i,
  input  logic [LEVELS-3:0]          div_rst_i,
  input  logic [N_CH-1:0][RATIO-1:0]     data_i,
  output logic                           word_clk_o,
  output logic [N_CH-1:0]                ser_o
);

  timeunit 1ps; timeprecision 1fs;

  logic [LEVELS-1:0] mux_clk;

  clock_network #(.LEVELS(LEVELS)) u_clock_network (
    .clk_i (clk_i),
    .rst_i (div_rst_i),
    .clk_o (mux_clk)
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_channel
    mux16_channel #(.LEVELS(LEVELS)) u_channel (
      .clk_i  (mux_clk),
      .data_i (data_i[c]),
      .ser_o  (ser_o[c])
    );
  end

  assign word_clk_o = mux_clk[LEVELS-1];

endmodule
