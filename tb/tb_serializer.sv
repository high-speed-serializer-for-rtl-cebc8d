// tb_serializer: end-to-end test of the complete 19-channel serializer with
// every parameter at its default.
//
// The testbench supplies only the 32 GHz clock, the two divider resets and
// the data; all MUX clocks come from the design's own divider chain, and the
// data source is clocked by the word clock the design brings out.
//
// Sequence (run twice, the second time as a restart from reset):
//   1. both lower dividers held in reset: the word clock must stay low while
//      the 32 -> 16 GHz divider, which has no reset, keeps running;
//   2. divider B (16 -> 8 GHz) released first: 8 GHz runs, the 4 GHz word
//      clock is still held (cascaded start);
//   3. divider C (8 -> 4 GHz) released: words stream in, one per word-clock
//      period, random data on every channel.
// The outputs are sampled 2 ps after every edge of the 32 GHz clock, once per
// 15.625 ps unit interval (UI). A word captured at a rising word-clock edge
// must appear on every channel in UI 22 .. 37 after that edge, bit 0 first,
// and consecutive captures must be exactly 16 UI apart (64 Gbit/s per
// channel, 19 x 64 Gbit/s in total). When the resets are asserted again for
// the restart, the words still in flight are dropped from the expectation,
// since stopping the clocks cuts them.
//
// Each mechanism (reset hold, divider A running without reset, cascaded
// start, capture, restart) is counted and a failure is counted for any that
// never happened.
module tb_serializer;
  timeunit 1ps; timeprecision 1fs;

  localparam realtime HALF       = 15.625ps;
  localparam int      N_CH       = 19;
  localparam int      N_WORDS    = 300;     // per run
  localparam int      N_RUNS     = 2;
  localparam int      LATENCY_UI = 22;

  logic                    clk = 1'b0;
  logic [1:0]              div_rst = 2'b11;
  logic [N_CH-1:0][15:0]   data;
  logic                    word_clk;
  logic [N_CH-1:0]         ser;
  int                      checks = 0, failures = 0;

  serializer u_dut (
    .clk_i      (clk),
    .div_rst_i  (div_rst),
    .data_i     (data),
    .word_clk_o (word_clk),
    .ser_o      (ser)
  );

  always #(HALF) clk = ~clk;

  initial begin : watchdog
    #(HALF * 2 * (8 * N_WORDS * N_RUNS + 2000));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", what, $time);
  endtask

  // ---------------------------------------------------------------- data
  logic [N_CH-1:0][15:0] words [N_WORDS * N_RUNS + 1];
  int                    drv_w = 0;
  bit                    streaming = 1'b0;
  initial begin
    foreach (words[i]) for (int c = 0; c < N_CH; c++) words[i][c] = 16'($urandom);
    data = words[0];
    forever begin
      @(negedge word_clk);
      if (streaming && drv_w < N_WORDS * N_RUNS) drv_w++;
      data = words[drv_w];
    end
  end

  // ---------------------------------------------------------- scoreboard
  logic [N_CH-1:0] exp_bits [int];
  int   edge_idx = 0, last_cap = -1, last_word = -1, n_caps = 0, bits_checked = 0;
  logic prev_word_clk = 1'b0;
  bit   flush = 1'b0;
  int   n_hold = 0, n_free_a = 0, n_cascade = 0, n_restart = 0;
  logic prev_clk16 = 1'b0;

  initial begin
    forever begin
      @(clk);
      #2ps;
      edge_idx++;
      if (flush) begin
        exp_bits.delete();
        last_cap = -1;
        flush = 1'b0;
      end
      // Mechanism counters (observation only).
      if (div_rst[1] && !word_clk) n_hold++;
      if (div_rst != 2'b00 && u_dut.mux_clk[1] != prev_clk16) n_free_a++;
      if (!div_rst[0] && div_rst[1] && u_dut.mux_clk[2]) n_cascade++;
      if (div_rst[1]) begin
        checks++;
        if (word_clk !== 1'b0) fail("word clock runs during reset");
      end
      prev_clk16 = u_dut.mux_clk[1];

      if (word_clk && !prev_word_clk) begin
        if (last_cap >= 0) begin
          checks++;
          if (edge_idx - last_cap != 16) fail($sformatf("capture spacing %0d UI", edge_idx - last_cap));
        end
        last_cap = edge_idx;
        n_caps++;
        if (streaming && drv_w != last_word) begin
          for (int k = 0; k < 16; k++) begin
            logic [N_CH-1:0] col;
            for (int c = 0; c < N_CH; c++) col[c] = words[drv_w][c][k];
            exp_bits[edge_idx + LATENCY_UI + k] = col;
          end
          last_word = drv_w;
        end
      end
      prev_word_clk = word_clk;

      if (exp_bits.exists(edge_idx)) begin
        checks++;
        bits_checked += N_CH;
        if (ser !== exp_bits[edge_idx])
          fail($sformatf("UI %0d: got %05h expected %05h", edge_idx, ser, exp_bits[edge_idx]));
        exp_bits.delete(edge_idx);
      end
    end
  end

  // ------------------------------------------------------------ sequence
  task automatic start_up();
    div_rst = 2'b11;
    repeat (20) @(posedge clk);
    #5ps div_rst[0] = 1'b0;            // divider B: 8 GHz starts
    repeat (24) @(posedge clk);
    #5ps div_rst[1] = 1'b0;            // divider C: word clock starts
  endtask

  initial begin
    for (int run = 0; run < N_RUNS; run++) begin
      if (run > 0) begin
        // Restart: stop the lower clock levels and drop what is in flight.
        @(posedge clk);
        #5ps div_rst = 2'b11;
        flush = 1'b1;
        n_restart++;
      end
      start_up();
      streaming = 1'b1;
      wait (last_word >= N_WORDS * (run + 1) - 1);
      if (run < N_RUNS - 1) begin
        repeat (8) @(posedge clk);     // let part of the pipeline drain
      end
    end
    wait (exp_bits.num() == 0);
    repeat (4) @(posedge clk);

    $display("captures %0d, serial bits checked %0d, reset-hold UIs %0d, divider-A toggles in reset %0d, cascade UIs %0d, restarts %0d",
             n_caps, bits_checked, n_hold, n_free_a, n_cascade, n_restart);
    if (n_hold == 0)    fail("reset hold never observed");
    if (n_free_a == 0)  fail("divider A never ran while the others were held");
    if (n_cascade == 0) fail("cascaded start never observed");
    if (n_restart == 0) fail("restart never performed");
    if (bits_checked < N_CH * 16 * (N_WORDS - 4) * N_RUNS) fail($sformatf("only %0d bits checked", bits_checked));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
