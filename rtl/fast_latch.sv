// fast_latch: level-sensitive D latch, the storage element of every 2:1 MUX
// stage.
//
// In the transistor-level circuit this is a transmission gate feeding a
// clocked feedback loop and an output driver, built fully differential. At the
// logic level it is a plain D latch: while it is transparent q follows d, and
// when it closes q holds the last value. TRANSPARENT_HIGH selects the phase:
// 0 makes the latch transparent while clk is low (the first latch of both
// input paths of a stage), 1 while clk is high.
//
// The differential pair is represented by one single-ended bit; transistor
// sizing (scaled down by two at every lower clock level) has no logic
// counterpart.
//
// Ports: clk (stage clock), d (data in), q (latched data out).
// Timing: no clock-to-q delay is modelled; q changes with clk or with d while
// transparent.
module fast_latch #(
  parameter bit TRANSPARENT_HIGH = 1'b0
) (
  input  logic clk,
  input  logic d,
  output logic q
);

  timeunit 1ps; timeprecision 1fs;

  logic open;
  assign open = TRANSPARENT_HIGH ? clk : ~clk;

  always_latch begin
    if (open) q = d;
  end

endmodule
