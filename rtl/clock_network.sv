// clock_network: frequency divider chain that derives all MUX clocks from the
// external 32 GHz clock.
//
// clk_o[0] is the input clock itself. Divider A (freq_div_noreset) halves it
// to 16 GHz without reset; dividers B and C (freq_div_reset) halve again to
// 8 GHz and 4 GHz and each has its own reset, so the lower frequency levels
// can be switched on one after the other. Every divided clock toggles on
// falling edges of the clock it is derived from, so all clocks share one
// alignment: each slower edge sits on a falling edge of every faster clock.
//
// In the physical network each clock then passes a tapered inverter driver
// chain (with extra inverters in the faster branches to equalise delay), a
// transmission line along the 19 channels and a local driver per channel.
// Those are analog buffers without a logic function and are represented here
// by direct wiring, i.e. by the ideal zero-skew result they are designed for.
//
// Ports:
//   clk_i     32 GHz input clock
//   rst_i[j]  active-high reset of the divider producing clk_o[j+2]
//             (rst_i[0]: divider B, 16 -> 8 GHz; rst_i[1]: divider C,
//             8 -> 4 GHz)
//   clk_o[l]  clock of MUX level l: 32, 16, 8, 4 GHz for l = 0..3
// Timing: zero-delay; clk_o[l] has period 2^l times that of clk_i.
module clock_network #(
  parameter int unsigned LEVELS = serializer_pkg::MUX_LEVELS
) (
  input  logic              clk_i,
  input  logic [LEVELS-3:0] rst_i,
  output logic [LEVELS-1:0] clk_o
);

  timeunit 1ps; timeprecision 1fs;

  assign clk_o[0] = clk_i;

  // Position A: no reset at the highest frequency.
  freq_div_noreset u_div_a (
    .clk_i (clk_o[0]),
    .clk_o (clk_o[1])
  );

  // Positions B, C, ...: dividers with reset.
  for (genvar l = 2; l < LEVELS; l++) begin : g_div
    freq_div_reset u_div (
      .clk_i (clk_o[l-1]),
      .rst_i (rst_i[l-2]),
      .clk_o (clk_o[l])
    );
  end

endmodule
