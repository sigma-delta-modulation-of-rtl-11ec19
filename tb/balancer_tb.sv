// balancer_tb: self-checking test of the ring balancer.
//
// A reference model keeps its own rotation count (advanced every divider+1
// update pulses) and predicts each enable as ((rot + i) mod P) < valin.
// Checks: every enable vector against the model, the number of phases on,
// the rotation period in update pulses, and that over one full ring
// revolution every phase is on for exactly valin*(divider+1) updates. The
// update pulse arrives on random cycles to show that the balancer moves only
// on ce. Default N = 3 (eight phases) and, as a second instance, N = 2 (the
// four-phase, 2-bit case).
module balancer_tb;
  localparam int N = 3, P = 1 << N, DIV_W = 4;
  localparam int N2 = 2, P2 = 1 << N2;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [N-1:0]     valin = '0;
  logic [N2-1:0]    valin2 = '0;
  logic [DIV_W-1:0] divider = '0;
  logic [P-1:0]     valout;
  logic [P2-1:0]    valout2;
  int checks = 0, failures = 0;

  balancer #(.N(N), .DIV_W(DIV_W)) dut (.clk, .rst_n, .ce, .valin, .divider, .valout);
  balancer #(.N(N2), .DIV_W(DIV_W)) dut2 (.clk, .rst_n, .ce, .valin(valin2), .divider,
                                          .valout(valout2));

  always #5 clk = ~clk;

  int m_cnt = 0, m_rot = 0;

  function automatic logic [P-1:0] expect_en(int rot, int v);
    logic [P-1:0] r;
    for (int i = 0; i < P; i++) r[i] = ((rot + i) % P) < v;
    return r;
  endfunction
  function automatic logic [P2-1:0] expect_en2(int rot, int v);
    logic [P2-1:0] r;
    for (int i = 0; i < P2; i++) r[i] = ((rot + i) % P2) < v;
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one clk with given ce; model advances on ce
  task automatic step(bit c);
    ce <= c;
    @(posedge clk);
    if (c) begin
      if (m_cnt == int'(divider)) begin m_cnt = 0; m_rot++; end
      else m_cnt = (m_cnt + 1) % (1 << DIV_W);
    end
    #1;
    check(valout == expect_en(m_rot, int'(valin)), "valout");
    check(valout2 == expect_en2(m_rot, int'(valin2)), "valout2");
    check($countones(valout) == int'(valin), "ones");
  endtask

  int on_count[P];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(valout == '0, "reset value");
    // random traffic
    for (int k = 0; k < 3000; k++) begin
      if ($urandom_range(0, 40) == 0) divider <= DIV_W'($urandom_range(0, 5));
      valin  <= N'($urandom);
      valin2 <= N2'($urandom);
      step($urandom_range(0, 2) != 0);
    end
    // balance over a full revolution for each divider and command
    for (int d = 0; d < 4; d++) begin
      for (int v = 0; v < P; v++) begin
        // realign: reset so counter and rotation restart
        ce <= 0; rst_n <= 0; @(posedge clk); m_cnt = 0; m_rot = 0;
        divider <= DIV_W'(d); valin <= N'(v); rst_n <= 1; @(posedge clk);
        foreach (on_count[i]) on_count[i] = 0;
        begin
          int rot_events, first_change, prev_rot;
          rot_events = 0; first_change = -1; prev_rot = 0;
          for (int t = 0; t < P * (d + 1); t++) begin
            foreach (on_count[i]) on_count[i] += valout[i];
            step(1'b1);
            if (m_rot != prev_rot) begin
              rot_events++;
              if (first_change < 0) first_change = t + 1;
              prev_rot = m_rot;
            end
          end
          // rotation period: first move after divider+1 updates
          check(first_change == d + 1, "rotation period");
          check(rot_events == P, "rotations per revolution");
        end
        foreach (on_count[i]) check(on_count[i] == v * (d + 1), "per-phase on time");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
