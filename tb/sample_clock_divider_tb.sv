// sample_clock_divider_tb: checks the sample strobe of the clock divider.
//
// Default DIV = 13 (24 MHz to ~1.85 MHz). Checks: no strobe during reset,
// first strobe exactly DIV cycles after reset release, strobe one cycle wide,
// and every interval between strobes exactly DIV cycles. A second instance
// with DIV = 2 covers the smallest division.
module sample_clock_divider_tb;
  localparam int DIV = 13;
  logic clk = 0, rst_n = 0;
  logic tick, tick2;
  int checks = 0, failures = 0;

  sample_clock_divider #(.DIV(DIV)) dut (.clk, .rst_n, .tick);
  sample_clock_divider #(.DIV(2))   dut2 (.clk, .rst_n, .tick(tick2));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int last = 0, cyc = 0, last2 = 0, n = 0;
    repeat (5) begin @(posedge clk); #1; check(!tick && !tick2, "quiet in reset"); end
    rst_n <= 1;
    for (cyc = 1; cyc <= DIV * 200; cyc++) begin
      @(posedge clk); #1;
      if (tick) begin
        check(cyc - last == DIV, "interval");
        last = cyc; n++;
      end
      if (tick2) begin
        check(cyc - last2 == 2, "interval DIV=2");
        last2 = cyc;
      end
    end
    check(n == 200, "strobe count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
