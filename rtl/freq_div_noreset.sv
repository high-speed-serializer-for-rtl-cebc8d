// freq_div_noreset: divide-by-two for the fastest clock (32 GHz -> 16 GHz).
//
// At the top frequency a reset input would load the divider too much, so this
// divider has none: it toggles from the first clock edge on. Its defined
// starting state comes from small pull-down devices inside the circuit, which
// is modelled here by a power-up value of 0 on the state bit.
//
// The output toggles on every falling edge of clk_i. That choice places each
// edge of the divided clock on a falling edge of the input clock, halfway
// between the rising edges on which the next faster MUX level captures data;
// the choice of edge is this model's own.
//
// Ports: clk_i (input clock), clk_o (half-frequency clock, 50 % duty).
// Timing: clk_o changes on falling edges of clk_i, no delay modelled.
module freq_div_noreset (
  input  logic clk_i,
  output logic clk_o
);

  timeunit 1ps; timeprecision 1fs;

  // Power-up value set by the pull-down initialisation. There is deliberately
  // no reset, so the declaration value is the only initialisation.
  logic state = 1'b0;

  always_ff @(negedge clk_i) begin
    state <= ~state;
  end

  assign clk_o = state;

endmodule
