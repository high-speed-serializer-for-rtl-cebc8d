// tb_mux2_stage: self-checking test of one 2:1 stage.
//
// A 32 GHz clock (31.25 ps period) drives the stage; a new random pair
// (d0, d1) is applied at every falling edge, so it is stable at the capturing
// rising edge. For a pair captured at rising edge t0 the output must carry d0
// in [t0 + T/2, t0 + T) and d1 in [t0 + T, t0 + 3T/2): the test samples y just
// after every clock edge and compares it with the pair captured one edge
// earlier (the half-period latency of the stage). It also checks that the two
// selector inputs never move in the same clock phase: M0 may change only
// while clk is high, M1 only while clk is low.
module tb_mux2_stage;
  timeunit 1ps; timeprecision 1fs;

  localparam realtime HALF = 15.625ps;
  localparam int      N_PAIRS = 500;

  logic clk = 1'b0;
  logic d0, d1, y;
  int   checks = 0, failures = 0;
  int   m0_moves = 0, m1_moves = 0;

  mux2_stage u_dut (.clk(clk), .d0(d0), .d1(d1), .y(y));

  always #(HALF) clk = ~clk;

  initial begin : watchdog
    #(2 * HALF * (N_PAIRS + 50));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Selector inputs may only move in the phase in which they are not selected.
  always @(u_dut.m0) begin
    if ($time > 0) begin
      m0_moves++;
      checks++;
      if (clk !== 1'b1) begin failures++; $display("FAIL M0 moved while selected at %0t", $time); end
    end
  end
  always @(u_dut.m1) begin
    if ($time > 0) begin
      m1_moves++;
      checks++;
      if (clk !== 1'b0) begin failures++; $display("FAIL M1 moved while selected at %0t", $time); end
    end
  end

  logic cap0, cap1, prev1;
  bit   have_cap = 1'b0;

  initial begin
    d0 = 1'b0; d1 = 1'b0;
    for (int i = 0; i < N_PAIRS; i++) begin
      @(negedge clk);
      if (have_cap) begin
        #1ps;
        // Half a period after the capture: d0 of the last captured pair.
        checks++;
        if (y !== cap0) begin failures++; $display("FAIL d0 slot: y=%0b exp=%0b at %0t", y, cap0, $time); end
      end
      d0 = 1'($urandom); d1 = 1'($urandom);
      @(posedge clk);
      prev1 = cap1;
      cap0 = d0; cap1 = d1;
      #1ps;
      // One full period after the previous capture: its d1.
      if (have_cap) begin
        checks++;
        if (y !== prev1) begin failures++; $display("FAIL d1 slot: y=%0b exp=%0b at %0t", y, prev1, $time); end
      end
      have_cap = 1'b1;
    end
    if (m0_moves == 0 || m1_moves == 0) begin
      failures++;
      $display("FAIL selector inputs never moved");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
