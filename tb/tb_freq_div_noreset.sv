// tb_freq_div_noreset: checks the reset-less divide-by-two.
//
// With no reset applied, the output must start at 0, go high at the very
// first falling edge of the 32 GHz input and then toggle on every falling
// edge and never on a rising edge, giving half the input frequency.
module tb_freq_div_noreset;
  timeunit 1ps; timeprecision 1fs;

  localparam realtime HALF = 15.625ps;

  logic clk = 1'b0;
  logic clk_div;
  int   checks = 0, failures = 0;

  freq_div_noreset u_dut (.clk_i(clk), .clk_o(clk_div));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #10ns;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expv;
    #1ps;
    check(clk_div, 1'b0, "power-up state");
    expv = 1'b0;
    for (int i = 0; i < 100; i++) begin
      #(HALF - 1ps) clk = 1'b1;            // rising edge: no change
      #1ps check(clk_div, expv, "hold on rising edge");
      #(HALF - 1ps) clk = 1'b0;            // falling edge: toggle
      expv = ~expv;
      #1ps check(clk_div, expv, "toggle on falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
