// sigma_delta_tb: self-checking test of the first-order sigma-delta modulator.
//
// A reference model written with integer arithmetic (residue r, output
// q = floor((r + x) / 2**(M-N)) taken one sample later) predicts every output
// sample. Checks: every y against the model; the running sum of y * 2**(M-N)
// tracks the sum of the (saturated) input within one quantum; y only changes
// on a ce pulse; for a constant input, y takes at most two adjacent values.
// One instance uses the default M = 12, N = 3, a second the four-phase
// configuration M = 12, N = 2, fed the ADC code of a 1.49 V command on a
// 3.3 V scale, whose average output must be 1849/1024 = 1.806 phases.
module sigma_delta_tb;
  localparam int M = 12, N = 3, S = M - N;
  localparam int N2 = 2, S2 = M - N2;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [M-1:0] x = '0, x2 = '0;
  logic [N-1:0] y;
  logic [N2-1:0] y2;
  int checks = 0, failures = 0;

  sigma_delta #(.M(M), .N(N))  dut  (.clk, .rst_n, .ce, .x, .y);
  sigma_delta #(.M(M), .N(N2)) dut2 (.clk, .rst_n, .ce, .x(x2), .y(y2));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model state: accumulator value (residue of last sample plus input)
  longint acc_m = 0, sum_in = 0, sum_out = 0;
  int xmax = ((1 << N) - 1) << S;

  task automatic sample(int xv, bit do_ce);
    int xs;
    logic [N-1:0] y_before;
    x  <= M'(xv);
    ce <= do_ce;
    y_before = y;
    @(posedge clk);
    #1;
    if (do_ce) begin
      xs = (xv > xmax) ? xmax : xv;
      sum_out += (acc_m >> S) << S;     // output emitted during this sample
      sum_in  += xs;
      acc_m = (acc_m & ((1 << S) - 1)) + xs;
      if (acc_m > (1 << M) - 1) acc_m = (1 << M) - 1;
      check(int'(y) == int'(acc_m >> S), "y vs model");
      check(sum_in - sum_out >= 0 && sum_in - sum_out < 2 * (1 << S) + xmax, "running average");
    end else begin
      check(y == y_before, "y held without ce");
    end
  endtask

  initial begin
    int hist[8];
    int cnt2, sum2;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(y == '0, "reset");
    // random inputs, including values above the input limit
    for (int k = 0; k < 4000; k++) sample($urandom_range(0, (1 << M) - 1), $urandom_range(0, 3) != 0);
    // constant inputs: output alternates between two adjacent codes
    for (int c = 0; c < 40; c++) begin
      int xv = $urandom_range(0, xmax);
      int lo, hi;
      foreach (hist[i]) hist[i] = 0;
      for (int k = 0; k < 200; k++) sample(xv, 1'b1);
      for (int k = 0; k < 64; k++) begin sample(xv, 1'b1); hist[y]++; end
      lo = xv >> S; hi = (xv + (1 << S) - 1) >> S;
      foreach (hist[i]) if (hist[i] != 0) check(i == lo || i == hi, "two adjacent codes");
    end
    // four-phase experiment: 1.49 V of 3.3 V through a 12-bit ADC
    x2 <= M'(1849);
    ce <= 1;
    repeat (1100) @(posedge clk);
    cnt2 = 0; sum2 = 0;
    for (int k = 0; k < 1024; k++) begin
      @(posedge clk); #1;
      sum2 += int'(y2); cnt2++;
      check(y2 == 2'd1 || y2 == 2'd2, "1.49 V: one or two phases");
    end
    // average over 1024 samples equals 1849/1024 to within one sample
    check(sum2 >= 1848 && sum2 <= 1850, "1.49 V average");
    $display("four-phase average phases = %0d/1024", sum2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
