// freq_div_reset: divide-by-two with reset, used for the lower clock levels
// (16 GHz -> 8 GHz and 8 GHz -> 4 GHz).
//
// A toggle flip-flop whose state is gated by a NAND-type gate realising
// In AND NOT R: while rst_i (R) is high the divided clock is forced low, and
// once rst_i falls the output toggles from the next active edge on. Holding
// the lower dividers in reset and releasing them one after the other starts
// the serializer level by level, which avoids large supply current steps, and
// it starts the slow clocks at a known point in time.
//
// The gate is static, so the reset acts on its level and clears the divider
// even while its input clock stands still (as it does when the divider in
// front of it is itself held in reset); it is modelled as an asynchronous
// clear. The output toggles on every falling edge of clk_i, like
// freq_div_noreset. Both the asynchronous model of the reset and the choice
// of edge are this model's own.
//
// Ports: clk_i (input clock), rst_i (active-high reset R), clk_o (divided
// clock).
// Timing: clk_o changes on falling edges of clk_i and falls as soon as rst_i
// rises; the first rising edge of clk_o after a release comes at the first
// falling edge of clk_i with rst_i low.
module freq_div_reset (
  input  logic clk_i,
  input  logic rst_i,
  output logic clk_o
);

  timeunit 1ps; timeprecision 1fs;

  logic state;

  always_ff @(negedge clk_i or posedge rst_i) begin
    if (rst_i) state <= 1'b0;
    else       state <= ~state;
  end

  // The gate also acts on the output level, so the divided clock is low for as
  // long as rst_i is high, including before the first clock edge.
  assign clk_o = state & ~rst_i;

endmodule
