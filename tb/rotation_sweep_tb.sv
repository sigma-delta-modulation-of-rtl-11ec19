// rotation_sweep_tb: eight-phase open-loop modulation with a sinusoidally
// varying command, swept over the balancer's rotation period.
//
// The default controller (12-bit command, 3-bit modulator, eight phases) is
// driven open loop with a command that follows a sine around half scale
// (amplitude 0.35 of full scale, period 1000 samples). For rotation periods of
// 1 to 8 samples (divider = 0 .. 7) the test measures over 40000 samples each
// phase's duty ratio and rising-edge count, and checks:
//   - all eight phases have the same long-term duty ratio (within 0.01) and it
//     equals the mean command / 4096,
//   - the switching frequency of the phases differs by less than 2 % of its
//     mean (standard deviation),
//   - the mean switching frequency falls as the rotation period grows.
// Mean and standard deviation of the switching frequency are printed per
// rotation period, in units of the sample rate.
module rotation_sweep_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int M = 12, N = 3, P = 8, CLK_DIV = 13;
  localparam int SAMPLES = 40000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic [M-1:0] ext_cmd = '0;
  logic [3:0] divider = '0;
  logic sample, pi_sat;
  logic [M-1:0] cmd;
  logic [N-1:0] y;
  logic [P-1:0] en;
  int checks = 0, failures = 0;

  sdm_multiphase_ctrl dut (
    .clk, .rst_n, .closed_loop(1'b0), .ext_cmd, .vout_code('0), .vref_code('0),
    .kp('0), .ki('0), .divider, .sample, .cmd, .pi_sat, .y, .en
  );

  always #20.833 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  real fmean[8];

  task automatic run(int d);
    int on_cnt[P], rise[P];
    logic [P-1:0] prev;
    longint cmd_sum = 0;
    real mean_f = 0.0, var_f = 0.0, want;
    divider <= 4'(d);
    foreach (on_cnt[i]) begin on_cnt[i] = 0; rise[i] = 0; end
    prev = en;
    for (int n = 0; n < SAMPLES; n++) begin
      int c;
      c = $rtoi(2048.0 + 0.35 * 4096.0 * $sin(2.0 * PI * real'(n) / 1000.0));
      ext_cmd <= M'(c);
      cmd_sum += c;
      do @(posedge clk); while (!sample);
      #1;
      for (int i = 0; i < P; i++) begin
        on_cnt[i] += en[i];
        rise[i] += en[i] & ~prev[i];
      end
      prev = en;
    end
    want = real'(cmd_sum) / real'(SAMPLES) / 4096.0;
    foreach (rise[i]) mean_f += real'(rise[i]) / real'(SAMPLES);
    mean_f /= P;
    foreach (rise[i]) var_f += (real'(rise[i]) / real'(SAMPLES) - mean_f) ** 2;
    var_f /= P;
    fmean[d] = mean_f;
    $display("rotation every %0d samples: f_sw = %7.5f f_s, sigma = %7.5f f_s (%4.2f %%)",
             d + 1, mean_f, $sqrt(var_f), 100.0 * $sqrt(var_f) / mean_f);
    check($sqrt(var_f) < 0.02 * mean_f, "switching frequency spread < 2 %");
    foreach (on_cnt[i]) begin
      real duty;
      duty = real'(on_cnt[i]) / real'(SAMPLES);
      check(duty > want - 0.01 && duty < want + 0.01, "equal long-term duty");
    end
    if (d > 0) check(fmean[d] < fmean[d-1], "f_sw falls with rotation period");
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    for (int d = 0; d < 8; d++) run(d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
