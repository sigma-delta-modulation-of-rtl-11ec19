// four_phase_experiment_tb: the four-phase open-loop bench configuration.
//
// The controller is built with a 2-bit modulator and four phases (N = 2),
// clocked at 24 MHz divided by 13 (~1.85 MHz samples), with the balancer
// rotating every other sample (divider = 1). The external command is the
// 12-bit code of an analog voltage on a 3.3 V full scale. For 1.0 V, 1.49 V
// and 2.0 V the test measures each enable's duty ratio and rising-edge rate
// over 32768 samples and checks:
//   - each phase's duty ratio equals V / 3.3 (code / 4096) within 0.005,
//   - the spread between phases stays below 0.005,
//   - at 1.49 V the modulator alternates between one and two phases,
//   - every phase switches at the same rate (within 10 %).
// The effective switching frequency of phase 0 (rising edges per second)
// and its period-by-period minimum, mean and maximum are printed; at 1.49 V
// it must lie well below the update rate (under a quarter of it).
module four_phase_experiment_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int M = 12, N = 2, P = 4, CLK_DIV = 13;
  localparam real FCLK = 24.0e6;

  logic clk = 0, rst_n = 0;
  logic [M-1:0] ext_cmd = '0;
  logic sample, pi_sat;
  logic [M-1:0] cmd;
  logic [N-1:0] y;
  logic [P-1:0] en;
  int checks = 0, failures = 0;

  sdm_multiphase_ctrl #(.M(M), .N(N), .CLK_DIV(CLK_DIV)) dut (
    .clk, .rst_n, .closed_loop(1'b0), .ext_cmd, .vout_code('0), .vref_code('0),
    .kp('0), .ki('0), .divider(4'd1), .sample, .cmd, .pi_sat, .y, .en
  );

  always #20.833 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_point(real volts);
    int on_cnt[P], rise[P], yh[P];
    int n = 0, code, last_rise = -1, pmin = 1 << 30, pmax = 0;
    real fsum = 0.0;
    int nper = 0;
    logic [P-1:0] prev;
    real want, dmin = 1.0, dmax = 0.0, fsw;
    code = $rtoi(volts / 3.3 * 4096.0 + 0.5);
    ext_cmd <= M'(code);
    want = real'(code) / 4096.0;
    repeat (200 * CLK_DIV) @(posedge clk);
    foreach (on_cnt[i]) begin on_cnt[i] = 0; rise[i] = 0; yh[i] = 0; end
    prev = en;
    while (n < 32768) begin
      @(posedge clk);
      if (sample) begin
        #1;
        for (int i = 0; i < P; i++) begin
          on_cnt[i] += en[i];
          rise[i] += en[i] & ~prev[i];
        end
        if (en[0] && !prev[0]) begin
          if (last_rise >= 0) begin
            int per;
            per = n - last_rise;
            if (per < pmin) pmin = per;
            if (per > pmax) pmax = per;
            fsum += FCLK / real'(CLK_DIV) / real'(per);
            nper++;
          end
          last_rise = n;
        end
        yh[y]++;
        prev = en;
        n++;
      end
    end
    for (int i = 0; i < P; i++) begin
      real d;
      d = real'(on_cnt[i]) / real'(n);
      if (d < dmin) dmin = d;
      if (d > dmax) dmax = d;
      check(d > want - 0.005 && d < want + 0.005, "duty = V/3.3");
      check(rise[i] * 10 > rise[0] * 9 && rise[i] * 10 < rise[0] * 11 + 10, "equal switching rate");
    end
    check(dmax - dmin < 0.005, "phase spread");
    fsw = real'(rise[0]) / (real'(n) * real'(CLK_DIV) / FCLK);
    $display("%4.2f V: code %0d, duty min %6.4f max %6.4f (expected %6.4f), f_sw %6.1f kHz",
             volts, code, dmin, dmax, want, fsw / 1.0e3);
    $display("      phase 0 period-by-period frequency: min %6.1f kHz, mean %6.1f kHz, max %6.1f kHz",
             FCLK / CLK_DIV / pmax / 1.0e3, fsum / nper / 1.0e3, FCLK / CLK_DIV / pmin / 1.0e3);
    if (volts > 1.4 && volts < 1.6) begin
      check(yh[0] == 0 && yh[3] == 0 && yh[1] > 0 && yh[2] > 0, "one or two phases on");
      check(fsw > 0.0 && fsw < FCLK / CLK_DIV / 4.0, "switching well below update rate");
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    run_point(1.0);
    run_point(1.49);
    run_point(2.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
