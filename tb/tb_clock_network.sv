// tb_clock_network: checks the divider chain that makes the 32/16/8/4 GHz
// clocks.
//
// The reference is a free counter of falling input edges, started when a
// divider's reset is released. The test checks, 1 ps after every input
// edge: the 16 GHz clock toggles from the first falling edge without any
// reset; while divider B (16->8) is in reset the 8 and 4 GHz clocks stay
// low; with B running and C (8->4) in reset the 8 GHz clock runs and the
// 4 GHz clock stays low (cascaded start); with both released every clock has
// period 2^l input periods and changes only on falling input edges, with each
// slower clock toggling exactly when the next faster one falls.
module tb_clock_network;
  timeunit 1ps; timeprecision 1fs;

  localparam realtime HALF = 15.625ps;

  logic       clk = 1'b0;
  logic [1:0] rst;
  logic [3:0] ck;
  int         checks = 0, failures = 0;

  clock_network u_dut (.clk_i(clk), .rst_i(rst), .clk_o(ck));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #50ns;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_fall = 0;        // falling edges of clk since time 0
  int b_start = -1;      // n_fall when divider B left reset
  int c_start = -1;      // n_fall of the first 16 GHz falling edge after C left reset
  logic [3:0] prev;

  initial begin
    rst = 2'b11;
    #1ps;
    prev = ck;
    for (int i = 0; i < 600; i++) begin
      #(HALF - 1ps) clk = ~clk;
      if (!clk) n_fall++;
      // Release B after 20 falling edges, on an edge where the 16 GHz clock
      // is high, so its first active edge is the next 16 GHz falling edge.
      if (i == 40) rst[0] = 1'b0;
      if (i == 120) rst[1] = 1'b0;
      #1ps;
      check(ck[0], clk, "clk_o[0] is the input clock");
      check(ck[1], 1'(n_fall & 1), "16 GHz divider");
      // Any change of a divided clock must happen at a falling input edge.
      for (int l = 1; l < 4; l++)
        if (ck[l] != prev[l]) check(clk, 1'b0, "divided clock moved on a rising edge");
      // A slower clock only toggles when the next faster one falls.
      for (int l = 2; l < 4; l++)
        if (ck[l] != prev[l]) check(ck[l-1], 1'b0, "slower clock toggles on faster falling edge");
      if (rst[0]) check(ck[2], 1'b0, "8 GHz held by reset B");
      if (rst[1]) check(ck[3], 1'b0, "4 GHz held by reset C");
      if (!rst[0] && b_start < 0 && prev[1] && !ck[1]) b_start = n_fall - 1;
      if (b_start >= 0 && (n_fall - b_start) >= 1 && (n_fall - b_start) % 2 == 1 && prev[1] && !ck[1])
        check(ck[2], ~prev[2], "8 GHz toggles on every 16 GHz falling edge");
      if (!rst[1] && c_start < 0 && prev[2] && !ck[2]) c_start = n_fall;
      if (c_start >= 0 && prev[2] && !ck[2] && n_fall != c_start)
        check(ck[3], ~prev[3], "4 GHz toggles on every 8 GHz falling edge");
      if (i > 200) begin
        // Steady state: periods 2, 4, 8 input periods.
        check(ck[3], 1'(((n_fall - c_start) >> 2) & 1) ^ 1'b1, "4 GHz phase from first C edge");
      end
      prev = ck;
    end
    if (b_start < 0 || c_start < 0) begin
      failures++;
      $display("FAIL cascaded start not observed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
