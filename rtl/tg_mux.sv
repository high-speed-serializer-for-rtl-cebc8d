// tg_mux: the differential transmission-gate pair that performs the actual
// 2:1 multiplexing at the output of every MUX stage.
//
// One transmission gate passes M0 while clk is low, the other passes M1 while
// clk is high, and their outputs are joined. At the logic level this is a
// clock-controlled selector. Because M0 only changes while clk is high and M1
// only while clk is low (see mux2_stage), the selected input is always the
// stable one and no glitch reaches y.
//
// Ports: clk (stage clock, also the select), m0, m1 (latched data), y (output
// at twice the input data rate).
// Timing: purely combinational.
module tg_mux (
  input  logic clk,
  input  logic m0,
  input  logic m1,
  output logic y
);

  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    y = clk ? m1 : m0;
  end

endmodule
