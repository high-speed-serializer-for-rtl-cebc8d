// tb_mux16_skew: clock-skew tolerance of one 16:1 channel.
//
// The four ideal clocks (32 GHz and the counter-derived 16/8/4 GHz) are
// passed through transport delays: the 32 GHz clock by BASE_PS, the three
// slower clocks together by BASE_PS + skew. The skew therefore moves every
// 16 GHz edge against the 32 GHz clock of the root stage. The root captures
// its inputs at rising 32 GHz edges, which in the unskewed case lie half a
// 32 GHz period (15.625 ps) away from the 16 GHz edges where those inputs
// change: in this zero-delay model the tolerated skew is just under
// +-15.625 ps.
//
// Random words stream continuously while the skew is stepped through
// 0, +4, ..., +14, ..., -14, ..., 0 ps (20 words per step); every serial bit
// must then sit in the same slot as without skew (22 UI after the capturing
// 4 GHz edge, seen through the delay BASE_PS). Finally the skew is set to
// +20 ps, beyond the margin, where bits must be lost: the testbench checks
// that it sees errors there, so the margin it measures is real.
module tb_mux16_skew;
  timeunit 1ps; timeprecision 1fs;

  localparam realtime HALF       = 15.625ps;
  localparam int      BASE_PS    = 20;
  localparam int      LATENCY_UI = 22;
  localparam int      WORDS_STEP = 20;
  localparam int      N_STEPS    = 17;
  localparam int      N_WORDS    = WORDS_STEP * (N_STEPS + 1) + 4;

  // Skew steps in ps; the last entry is outside the margin.
  localparam int STEP_PS [N_STEPS + 1] = '{0, 4, 8, 12, 14, 10, 6, 2, -2, -6, -10, -14, -12, -8, -4, 0, 0, 20};

  logic [3:0]  clk = '0;     // ideal clocks
  logic [2:0]  cnt = '0;
  logic [3:0]  clk_d = '0;   // delayed clocks seen by the channel
  logic [15:0] data;
  logic        ser;
  int          skew_ps = 0;
  int          checks = 0, failures = 0;

  mux16_channel u_dut (.clk_i(clk_d), .data_i(data), .ser_o(ser));

  initial begin : watchdog
    #(HALF * 16 * (N_WORDS + 20));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ideal clock generator and schedule of expected bits (by ideal edge index).
  logic [15:0] words [N_WORDS];
  bit          exp_bit [int];
  int          exp_step [int];
  int          gen_edge = 0, n_rise = 0, cur_step = 0;
  initial foreach (words[i]) words[i] = 16'($urandom);

  always #(HALF) begin
    logic prev_slow;
    prev_slow = clk[3];
    if (clk[0]) cnt = cnt + 1'b1;
    clk = {cnt, ~clk[0]};
    gen_edge++;
    if (clk[3] && !prev_slow) begin
      // Rising edge number n_rise+1 of the word clock captures word n_rise.
      if (n_rise < N_WORDS - 4)
        for (int k = 0; k < 16; k++) begin
          exp_bit[gen_edge + LATENCY_UI + k]  = words[n_rise][k];
          exp_step[gen_edge + LATENCY_UI + k] = cur_step;
        end
      n_rise++;
      // Step the skew every WORDS_STEP words, at a quiet point (word clock
      // just rose, 16 GHz clock low and not about to move for 15 ps).
      if (n_rise % WORDS_STEP == 0 && cur_step < N_STEPS) begin
        cur_step++;
        skew_ps = STEP_PS[cur_step];
      end
    end
  end

  // Transport delays: every clock change is replayed after its delay by a
  // process of its own, so several edges can be in flight at once.
  // The delay is counted out in whole picoseconds.
  task automatic delayed_set(input int l, input logic v, input int d_ps);
    fork
      begin
        repeat (d_ps) #1ps;
        clk_d[l] = v;
      end
    join_none
  endtask
  always @(clk[0]) delayed_set(0, clk[0], BASE_PS);
  always @(clk[1]) delayed_set(1, clk[1], BASE_PS + skew_ps);
  always @(clk[2]) delayed_set(2, clk[2], BASE_PS + skew_ps);
  always @(clk[3]) delayed_set(3, clk[3], BASE_PS + skew_ps);

  // Driver: word n at the n-th falling edge of the delayed word clock.
  int drv_w = 0;
  initial begin
    data = words[0];
    forever begin
      @(negedge clk_d[3]);
      if (drv_w < N_WORDS - 1) drv_w++;
      data = words[drv_w];
    end
  end

  // Sampler on the delayed 32 GHz clock.
  int smp_edge = 0, errors_in_margin = 0, errors_outside = 0, bits_outside = 0, bits_in = 0;
  initial begin
    forever begin
      @(clk_d[0]);
      #2ps;
      smp_edge++;
      if (exp_bit.exists(smp_edge)) begin
        // Bits still in flight when the skew leaves the margin count as
        // beyond the margin.
        if (cur_step < N_STEPS) begin
          checks++;
          bits_in++;
          if (ser !== exp_bit[smp_edge]) begin
            failures++;
            errors_in_margin++;
            if (errors_in_margin < 400 && (errors_in_margin % 20) == 0)
              $display("FAIL skew %0d ps: UI %0d got %0b expected %0b", STEP_PS[exp_step[smp_edge]], smp_edge, ser, exp_bit[smp_edge]);
          end
        end else begin
          bits_outside++;
          if (ser !== exp_bit[smp_edge]) errors_outside++;
        end
        exp_bit.delete(smp_edge);
        exp_step.delete(smp_edge);
      end
      if (n_rise > N_WORDS - 4 && exp_bit.num() == 0) begin
        $display("bits checked within margin %0d; beyond margin (+%0d ps) %0d bits, %0d wrong",
                 bits_in, STEP_PS[N_STEPS], bits_outside, errors_outside);
        checks++;
        if (errors_outside == 0) begin
          failures++;
          $display("FAIL no errors seen beyond the skew margin");
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
