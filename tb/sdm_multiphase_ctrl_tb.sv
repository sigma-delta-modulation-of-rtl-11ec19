// sdm_multiphase_ctrl_tb: end-to-end test of the multi-phase sigma-delta
// controller at its default size (12-bit command, 3-bit modulator, eight
// phases, 24 MHz clock divided by 13), closing the loop through a
// current-source model of eight Phi-2 converter phases.
//
// Phases of the test:
//  1. Closed loop from 14.4 V with an empty integrator: the output dips,
//     the PI loop recovers and regulates to the 14.4 V reference. Checked:
//     mean output within 0.5 % of the reference, ripple bounded, the
//     modulator toggling between adjacent phase counts, and every phase
//     carrying the same share of the on-time.
//  2. Closed loop, reference step to 17 V: the PI output saturates at full
//     scale, then settles at the new reference.
//  3. Open loop (mode switch): external command 1849 (1.49 V on a 3.3 V,
//     12-bit scale), balancer updated every other sample (divider = 1).
//     Checked: each phase's duty ratio equals 1849/4096, y alternates between
//     3 and 4, and all phases switch at the same rate.
//  4. Open loop, command above the modulator's input limit: y pinned at 7
//     (input saturation), 7/8 duty on every phase.
// Also checked throughout: the sample strobe period (13 clocks) and the
// number of enables equal to y. Each mechanism (PI saturation, modulator
// input saturation, ring rotation, adjacent-code toggling, mode switch) is
// counted and must occur.
module sdm_multiphase_ctrl_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int M = 12, N = 3, P = 8, CLK_DIV = 13;
  localparam real VFS = 20.0;

  logic clk = 0, rst_n = 0;
  logic closed_loop = 1;
  logic [M-1:0] ext_cmd = '0, vout_code, vref_code = '0;
  logic [15:0] kp = '0, ki = '0;
  logic [3:0] divider = '0;
  logic sample, pi_sat;
  logic [M-1:0] cmd;
  logic [N-1:0] y;
  logic [P-1:0] en;
  real vout;
  int checks = 0, failures = 0;

  sdm_multiphase_ctrl dut (
    .clk, .rst_n, .closed_loop, .ext_cmd, .vout_code, .vref_code, .kp, .ki,
    .divider, .sample, .cmd, .pi_sat, .y, .en
  );

  phi2_plant_model #(.P(P), .M(M), .VFS(VFS), .VINIT(14.4)) plant (
    .clk, .en, .vout_code, .vout
  );

  always #20.833 clk = ~clk;   // 24 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters and continuous checks --------------------------
  int n_pi_sat = 0, n_in_sat = 0, n_rot = 0, n_toggle = 0, n_mode = 0;
  int since_sample = 0, n_samples = 0;
  logic [P-1:0] en_q;
  logic [N-1:0] y_q;
  logic         mode_q;

  always @(posedge clk) if (rst_n) begin
    since_sample++;
    if (sample) begin
      if (n_samples > 0) check(since_sample == CLK_DIV, "sample period");
      since_sample = 0;
      n_samples++;
      n_pi_sat += pi_sat;
      n_in_sat += (cmd > M'(((1 << N) - 1) << (M - N)));
    end
    check($countones(en) == int'(y), "enables = y");
    // same count, different set of phases: the ring rotated
    if (y == y_q && en != en_q && y != '0) n_rot++;
    if (y != y_q && (int'(y) - int'(y_q) == 1 || int'(y_q) - int'(y) == 1)) n_toggle++;
    if (closed_loop != mode_q) n_mode++;
    en_q <= en; y_q <= y; mode_q <= closed_loop;
  end

  // ---- measurement over a window of samples ------------------------------
  int  on_cnt[P], rise_cnt[P], y_hist[P];
  real v_sum, v_min, v_max;
  int  n_meas;

  task automatic measure(int samples);
    logic [P-1:0] prev;
    foreach (on_cnt[i]) begin on_cnt[i] = 0; rise_cnt[i] = 0; y_hist[i] = 0; end
    v_sum = 0.0; v_min = 1.0e9; v_max = -1.0e9; n_meas = 0;
    prev = en;
    while (n_meas < samples) begin
      @(posedge clk);
      if (sample) begin
        #1;
        for (int i = 0; i < P; i++) begin
          on_cnt[i] += en[i];
          rise_cnt[i] += (en[i] & ~prev[i]);
        end
        prev = en;
        y_hist[y]++;
        v_sum += vout;
        if (vout < v_min) v_min = vout;
        if (vout > v_max) v_max = vout;
        n_meas++;
      end
    end
  endtask

  task automatic wait_samples(int s);
    repeat (s * CLK_DIV) @(posedge clk);
  endtask

  function automatic int code_of(real v);
    return $rtoi(v / VFS * real'(1 << M) + 0.5);
  endfunction

  // all phases within tol of the mean duty
  task automatic check_balance(real tol, string what);
    real mean = 0.0;
    foreach (on_cnt[i]) mean += real'(on_cnt[i]);
    mean = mean / P;
    foreach (on_cnt[i]) begin
      real d;
      d = (real'(on_cnt[i]) - mean) / real'(n_meas);
      check(d < tol && d > -tol, what);
    end
  endtask

  initial begin
    real vmin_startup;
    // -------- 1. closed loop from 14.4 V, integrator empty ---------------
    kp <= 16'(4 * 256);      // 4.0
    ki <= 16'(24);           // 0.094
    divider <= 4'd1;
    vref_code <= M'(code_of(14.4));
    closed_loop <= 1;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    measure(400);            // start-up transient
    vmin_startup = v_min;
    $display("start-up: minimum %f V", vmin_startup);
    check(vmin_startup < 14.38, "start-up dip");
    wait_samples(20000);
    measure(8192);
    $display("14.4 V: mean %f V  min %f  max %f", v_sum / n_meas, v_min, v_max);
    check(v_sum / n_meas > 14.4 * 0.995 && v_sum / n_meas < 14.4 * 1.005, "regulated mean 14.4 V");
    check(v_max - v_min < 0.2, "ripple");
    check_balance(0.02, "closed-loop phase balance");
    // -------- 2. reference step to 17 V ----------------------------------
    begin
      int sat_before = n_pi_sat;
      vref_code <= M'(code_of(17.0));
      wait_samples(20000);
      check(n_pi_sat > sat_before, "PI saturates on the step");
      measure(8192);
      $display("17 V: mean %f V", v_sum / n_meas);
      check(v_sum / n_meas > 17.0 * 0.995 && v_sum / n_meas < 17.0 * 1.005, "regulated mean 17 V");
      check_balance(0.02, "phase balance at 17 V");
    end
    // -------- 3. open loop, 1.49 V command -------------------------------
    closed_loop <= 0;
    ext_cmd <= M'(1849);
    wait_samples(100);
    measure(16384);
    begin
      real want = 1849.0 / 4096.0;
      foreach (on_cnt[i]) begin
        real d;
        d = real'(on_cnt[i]) / real'(n_meas);
        check(d > want - 0.003 && d < want + 0.003, "open-loop duty");
        if (i == 0) $display("open loop: phase 0 duty %f (expected %f), %0d rising edges",
                             d, want, rise_cnt[i]);
      end
      foreach (y_hist[i]) if (i != 3 && i != 4) check(y_hist[i] == 0, "y in {3,4}");
      check(y_hist[3] > 0 && y_hist[4] > 0, "y toggles 3/4");
      foreach (rise_cnt[i]) check(rise_cnt[i] > rise_cnt[0] * 9 / 10 &&
                                  rise_cnt[i] < rise_cnt[0] * 11 / 10 + 1, "equal switching rate");
    end
    // -------- 4. open loop, command beyond the input limit ---------------
    begin
      int sat_before = n_in_sat;
      ext_cmd <= '1;
      wait_samples(50);
      measure(1024);
      check(n_in_sat > sat_before, "input saturation seen");
      check(y_hist[7] == n_meas, "y pinned at 7");
      foreach (on_cnt[i]) check(on_cnt[i] == n_meas * 7 / 8, "7/8 duty");
    end
    // -------- mechanisms --------------------------------------------------
    $display("mechanisms: pi_sat=%0d input_sat=%0d rotations=%0d toggles=%0d mode_switches=%0d",
             n_pi_sat, n_in_sat, n_rot, n_toggle, n_mode);
    check(n_pi_sat > 0, "PI saturation happened");
    check(n_in_sat > 0, "modulator input saturation happened");
    check(n_rot > 0, "ring rotation happened");
    check(n_toggle > 0, "adjacent-code toggling happened");
    check(n_mode > 0, "mode switch happened");
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
