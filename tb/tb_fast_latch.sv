// tb_fast_latch: self-checking test of both latch polarities.
//
// Drives a random clock/data sequence with explicit delays and checks, with a
// reference written from the latch rules (q follows d while open, keeps the
// value present when it closed), that q is right after every change, for the
// low-transparent and the high-transparent variant.
module tb_fast_latch;
  timeunit 1ps; timeprecision 1fs;

  logic clk, d;
  logic q_lo, q_hi;
  int   checks = 0, failures = 0;

  fast_latch #(.TRANSPARENT_HIGH(1'b0)) u_lo (.clk(clk), .d(d), .q(q_lo));
  fast_latch #(.TRANSPARENT_HIGH(1'b1)) u_hi (.clk(clk), .d(d), .q(q_hi));

  // Reference values: what each latch held when it last closed.
  logic held_lo, held_hi;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    #1us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0; d = 1'b0;
    #1;
    clk = 1'b1; #1;          // close u_lo with d = 0, u_hi open
    held_lo = 1'b0;
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 1) == 0) begin
        // Data change while the clock stays.
        d = 1'($urandom);
      end else begin
        // Clock change: the latch that closes keeps the current d.
        if (clk) held_hi = d; else held_lo = d;
        clk = ~clk;
      end
      #1;
      if (clk) begin
        check(q_hi, d,       "high-transparent latch open");
        check(q_lo, held_lo, "low-transparent latch closed");
      end else begin
        check(q_lo, d,       "low-transparent latch open");
        check(q_hi, held_hi, "high-transparent latch closed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
