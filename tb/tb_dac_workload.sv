// tb_dac_workload: runs the serializer as the front end of an 8-bit
// 64 GS/s segmented DAC, at full size.
//
// Each 8-bit sample is split into its upper four bits, sent as 15
// thermometer (unary) lines, and its lower four bits, sent as 4 binary
// lines: 19 lines in all, one per channel. Line c < 15 is 1 when the upper
// nibble exceeds c; line 15 + b carries bit b of the lower nibble. Every
// 4 GHz word holds 16 consecutive samples, sample k of the word in bit k of
// every channel word.
//
// Two sample streams are sent: a full-scale sine (period 37 samples, so
// every code region is crossed at many phases) followed by random codes.
// Every 15.625 ps unit interval the testbench rebuilds the DAC code from the
// 19 serial outputs (16 x ones among the unary lines + binary value) and
// checks both that the unary lines form a valid thermometer code and that
// the code equals the sample sent 22 unit intervals after the word-capturing
// edge, in order.
module tb_dac_workload;
  timeunit 1ps; timeprecision 1fs;

  localparam realtime HALF       = 15.625ps;
  localparam int      N_CH       = 19;
  localparam int      N_WORDS    = 200;     // 3200 samples
  localparam int      LATENCY_UI = 22;

  logic                  clk = 1'b0;
  logic [1:0]            div_rst = 2'b11;
  logic [N_CH-1:0][15:0] data;
  logic                  word_clk;
  logic [N_CH-1:0]       ser;
  int                    checks = 0, failures = 0;

  serializer u_dut (
    .clk_i      (clk),
    .div_rst_i  (div_rst),
    .data_i     (data),
    .word_clk_o (word_clk),
    .ser_o      (ser)
  );

  always #(HALF) clk = ~clk;

  initial begin : watchdog
    #(HALF * 2 * (8 * N_WORDS + 1000));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 4 unary + 4 binary segmentation of one sample.
  function automatic logic [N_CH-1:0] segment(input logic [7:0] code);
    logic [N_CH-1:0] lines;
    for (int c = 0; c < 15; c++) lines[c] = (int'(code[7:4]) > c);
    lines[18:15] = code[3:0];
    return lines;
  endfunction

  // ------------------------------------------------------------ samples
  logic [7:0] samples [N_WORDS * 16];
  initial begin
    for (int n = 0; n < N_WORDS * 16; n++) begin
      if (n < N_WORDS * 8)
        samples[n] = 8'($rtoi(127.5 + 127.49 * $sin(2.0 * 3.14159265358979 * n / 37.0)));
      else
        samples[n] = 8'($urandom);
    end
  end

  function automatic logic [N_CH-1:0][15:0] word_of(input int w);
    logic [N_CH-1:0][15:0] wd;
    for (int k = 0; k < 16; k++) begin
      logic [N_CH-1:0] lines;
      lines = segment(samples[16 * w + k]);
      for (int c = 0; c < N_CH; c++) wd[c][k] = lines[c];
    end
    return wd;
  endfunction

  int drv_w = 0;
  initial begin
    #1ps data = word_of(0);
    forever begin
      @(negedge word_clk);
      if (drv_w < N_WORDS - 1) drv_w++;
      data = word_of(drv_w);
    end
  end

  // ------------------------------------------------------------ receiver
  int   exp_code [int];
  int   edge_idx = 0, last_word = -1, n_samples = 0, n_top = 0, n_bottom = 0;
  logic prev_word_clk = 1'b0;

  initial begin
    forever begin
      @(clk);
      #2ps;
      edge_idx++;
      if (word_clk && !prev_word_clk && div_rst == 2'b00 && drv_w != last_word) begin
        for (int k = 0; k < 16; k++) exp_code[edge_idx + LATENCY_UI + k] = int'(samples[16 * drv_w + k]);
        last_word = drv_w;
      end
      prev_word_clk = word_clk;
      if (exp_code.exists(edge_idx)) begin
        int ones, code;
        bit thermo_ok;
        ones = 0;
        thermo_ok = 1'b1;
        for (int c = 0; c < 15; c++) begin
          ones += int'(ser[c]);
          if (c > 0 && ser[c] && !ser[c-1]) thermo_ok = 1'b0;
        end
        code = 16 * ones + int'(ser[18:15]);
        checks += 2;
        n_samples++;
        if (code == 255) n_top++;
        if (code == 0)   n_bottom++;
        if (!thermo_ok) begin
          failures++;
          if (failures < 10) $display("FAIL unary lines not a thermometer code: %015b", ser[14:0]);
        end
        if (code != exp_code[edge_idx]) begin
          failures++;
          if (failures < 10) $display("FAIL sample at UI %0d: DAC code %0d expected %0d", edge_idx, code, exp_code[edge_idx]);
        end
        exp_code.delete(edge_idx);
      end
      if (last_word == N_WORDS - 1 && exp_code.num() == 0) begin
        $display("samples converted %0d (full-scale codes %0d, zero codes %0d)", n_samples, n_top, n_bottom);
        if (n_samples != 16 * N_WORDS) begin
          failures++;
          $display("FAIL %0d samples received, %0d sent", n_samples, 16 * N_WORDS);
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // Cascaded start of the clock levels.
  initial begin
    repeat (20) @(posedge clk);
    #5ps div_rst[0] = 1'b0;
    repeat (24) @(posedge clk);
    #5ps div_rst[1] = 1'b0;
  end
endmodule
