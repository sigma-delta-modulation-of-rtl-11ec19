// pi_controller_tb: self-checking test of the PI voltage regulator.
//
// A reference model in 64-bit integers applies the regulator law
//   integ = clamp(integ + ki*e, 0, (2**M-1)*2**FRAC)
//   u     = clamp(floor((kp*e + integ) / 2**FRAC), 0, 2**M-1)
// with e = vref - vmeas, and predicts every output. Checks: each output and
// saturation flag against the model over random gains, references and
// measurements (update pulses on random cycles, output held otherwise); a
// constant positive error makes the output ramp up by ki*e/2**FRAC per
// sample (integral action) until it saturates at 2**M-1.
module pi_controller_tb;
  localparam int M = 12, GW = 16, FRAC = 8;
  localparam longint UMAX = (1 << M) - 1;
  localparam longint IMAX = UMAX << FRAC;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [M-1:0] vref = '0, vmeas = '0;
  logic [GW-1:0] kp = '0, ki = '0;
  logic [M-1:0] u;
  logic sat_hi, sat_lo;
  int checks = 0, failures = 0;

  pi_controller #(.M(M), .GAIN_W(GW), .FRAC(FRAC)) dut (.clk, .rst_n, .ce, .vref, .vmeas,
                                                        .kp, .ki, .u, .sat_hi, .sat_lo);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint integ_m = 0;
  longint u_m = 0;

  task automatic step(int r, int m, bit c);
    longint e, s, v;
    logic [M-1:0] u_before;
    vref <= M'(r); vmeas <= M'(m); ce <= c;
    u_before = u;
    @(posedge clk); #1;
    if (c) begin
      e = longint'(r) - longint'(m);
      s = integ_m + e * longint'(ki);
      integ_m = (s < 0) ? 0 : (s > IMAX) ? IMAX : s;
      v = e * longint'(kp) + integ_m;
      v = (v >= 0) ? (v >> FRAC) : -((-v + (1 << FRAC) - 1) >> FRAC); // floor
      u_m = (v < 0) ? 0 : (v > UMAX) ? UMAX : v;
      check(longint'(u) == u_m, "u vs model");
      check(sat_hi == (v > UMAX) && sat_lo == (v < 0), "saturation flags");
    end else check(u == u_before, "u held without ce");
  endtask

  initial begin
    int n_hi, n_lo;
    n_hi = 0; n_lo = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(u == '0, "reset");
    for (int g = 0; g < 40; g++) begin
      kp <= GW'($urandom_range(0, 4096));
      ki <= GW'($urandom_range(0, 256));
      for (int k = 0; k < 200; k++) begin
        int r = $urandom_range(1500, 3500);
        step(r, r + $urandom_range(0, 400) - ((g % 2) ? 100 : 300), $urandom_range(0, 3) != 0);
        n_hi += sat_hi; n_lo += sat_lo;
      end
    end
    $display("saturation: high %0d low %0d", n_hi, n_lo);
    check(n_hi > 0 && n_lo > 0, "both saturation limits reached");
    // integral ramp: kp = 0, ki = 1.0, error = +3 -> u rises 3 per sample
    rst_n <= 0; @(posedge clk); rst_n <= 1; integ_m = 0;
    kp <= '0; ki <= GW'(1 << FRAC);
    @(posedge clk);
    for (int k = 1; k <= 1500; k++) begin
      step(2003, 2000, 1'b1);
      check(longint'(u) == ((3 * k > UMAX) ? UMAX : 3 * k), "integral ramp");
    end
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
