// tb_freq_div_reset: checks the divide-by-two with reset.
//
// While the reset is high the output must stay low across many input edges.
// After the reset falls, the output must rise at the first falling input edge
// and toggle on every falling edge thereafter (half frequency, 50 % duty).
// Reset is then applied again in both output states to check that the output
// is forced low, also while the input clock stands still, and released
// once more.
module tb_freq_div_reset;
  timeunit 1ps; timeprecision 1fs;

  localparam realtime HALF = 31.25ps;     // 16 GHz input

  logic clk = 1'b0;
  logic rst;
  logic clk_div;
  int   checks = 0, failures = 0;

  freq_div_reset u_dut (.clk_i(clk), .rst_i(rst), .clk_o(clk_div));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // One input period; returns after the falling edge plus 1 ps.
  task automatic cycle();
    #(HALF - 1ps) clk = 1'b1;
    #(HALF)       clk = 1'b0;
    #1ps;
  endtask

  initial begin : watchdog
    #20ns;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expv;
    rst = 1'b1;
    #1ps;
    check(clk_div, 1'b0, "low under reset before any clock edge");
    for (int i = 0; i < 10; i++) begin
      cycle();
      check(clk_div, 1'b0, "held in reset");
    end
    for (int round = 0; round < 4; round++) begin
      rst  = 1'b0;
      expv = 1'b0;
      for (int i = 0; i < 21 + round; i++) begin
        cycle();
        expv = ~expv;
        check(clk_div, expv, "toggle after release");
      end
      // Stop the clock, then assert reset: the output must fall at once.
      if (round % 2 == 0) begin
        #(HALF);
        check(clk_div, expv, "holds while the clock stands");
        rst = 1'b1;
        #1ps;
        check(clk_div, 1'b0, "cleared by reset without a clock edge");
        // Release and re-apply the reset while the clock still stands: the
        // divider must have been cleared, not merely masked.
        rst = 1'b0;
        #1ps;
        check(clk_div, 1'b0, "state cleared while the clock stood");
        rst = 1'b1;
        #(HALF - 2ps);
      end
      rst = 1'b1;
      cycle();
      check(clk_div, 1'b0, "forced low by reset");
      cycle();
      check(clk_div, 1'b0, "held in reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
