// tb_mux16_channel: self-checking test of one 16:1 channel at full size.
//
// The testbench makes the four clocks itself: clk[0] is a 32 GHz clock and
// clk[1..3] are the bits of a counter advanced on every falling edge of
// clk[0], which gives 16, 8 and 4 GHz clocks whose edges all sit on falling
// edges of clk[0]. A random 16-bit word is applied at every falling edge of
// the 4 GHz clock. The output is sampled 2 ps after every edge of clk[0],
// i.e. once per 15.625 ps unit interval (UI).
//
// Expected timing, worked out from the stage rule (a stage of period T that
// captures at t0 emits D0 in [t0+T/2, t0+T) and D1 in [t0+T, t0+3T/2)):
// the 4 GHz level hands its first bit to the 8 GHz level 3/4 of 16 UI later
// (12 UI), then 6 UI and 3 UI down to the root, which starts emitting 1 UI
// after its own capture: 22 UI from the 4 GHz capture edge to bit 0 of the
// word. The test checks every bit of every word in its slot, word bit k in
// UI 22 + k, and that words are captured exactly every 16 UI (64 Gbit/s out
// for 4 Gbit/s in).
module tb_mux16_channel;
  timeunit 1ps; timeprecision 1fs;

  localparam realtime HALF       = 15.625ps;
  localparam int      N_WORDS    = 400;
  localparam int      LATENCY_UI = 22;

  logic [3:0]  clk = '0;
  logic [2:0]  cnt = '0;
  logic [15:0] data;
  logic        ser;
  int          checks = 0, failures = 0;

  mux16_channel u_dut (.clk_i(clk), .data_i(data), .ser_o(ser));

  // Clock generator: all four clocks change in one process.
  always #(HALF) begin
    if (clk[0]) cnt = cnt + 1'b1;
    clk = {cnt, ~clk[0]};
  end

  initial begin : watchdog
    #(HALF * 16 * (N_WORDS + 20));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Driver: a new word on every falling edge of the 4 GHz clock.
  logic [15:0] words [N_WORDS];
  int          drv_w = 0;
  initial begin
    foreach (words[i]) words[i] = 16'($urandom);
    data = words[0];
    forever begin
      @(negedge clk[3]);
      if (drv_w < N_WORDS - 1) drv_w++;
      data = words[drv_w];
    end
  end

  // Sampler / scoreboard.
  bit  exp_bit [int];
  int  edge_idx = 0, last_cap = -1, n_caps = 0, bits_checked = 0, last_word = -1;
  logic prev_slow = 1'b0;
  initial begin
    forever begin
      @(clk[0]);
      #2ps;
      edge_idx++;
      if (clk[3] && !prev_slow) begin
        // Word drv_w was captured at this edge.
        if (last_cap >= 0) begin
          checks++;
          if (edge_idx - last_cap != 16) begin
            failures++;
            $display("FAIL capture spacing %0d UI", edge_idx - last_cap);
          end
        end
        last_cap = edge_idx;
        n_caps++;
        if (drv_w != last_word) begin
          for (int k = 0; k < 16; k++) exp_bit[edge_idx + LATENCY_UI + k] = words[drv_w][k];
          last_word = drv_w;
        end
      end
      prev_slow = clk[3];
      if (exp_bit.exists(edge_idx)) begin
        checks++;
        bits_checked++;
        if (ser !== exp_bit[edge_idx]) begin
          failures++;
          if (failures < 10) $display("FAIL UI %0d: got %0b expected %0b", edge_idx, ser, exp_bit[edge_idx]);
        end
        exp_bit.delete(edge_idx);
      end
      if (last_word == N_WORDS - 1 && exp_bit.num() == 0) begin
        if (bits_checked < 16 * (N_WORDS - 2)) begin
          failures++;
          $display("FAIL only %0d bits checked", bits_checked);
        end
        $display("words captured %0d, serial bits checked %0d", n_caps, bits_checked);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
