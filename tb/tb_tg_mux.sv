// tb_tg_mux: exhaustive test of the transmission-gate selector: y must equal
// m0 while clk is low and m1 while clk is high, for all eight input patterns.
module tb_tg_mux;
  timeunit 1ps; timeprecision 1fs;

  logic clk, m0, m1, y;
  int   checks = 0, failures = 0;

  tg_mux u_dut (.clk(clk), .m0(m0), .m1(m1), .y(y));

  initial begin : watchdog
    #1us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {clk, m1, m0} = 3'(v);
        #1;
        checks++;
        if (y !== (v[2] ? v[1] : v[0])) begin
          failures++;
          $display("FAIL clk=%0b m1=%0b m0=%0b y=%0b", clk, m1, m0, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
