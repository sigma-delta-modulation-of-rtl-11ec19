// pi_controller: discrete proportional-integral regulator for the converter
// output voltage; its M-bit output is the command for the sigma-delta
// modulator.
//
// Each ce pulse (one sample):
//   e      = vref - vmeas                         (signed, M+1 bits)
//   integ <= clamp(integ + ki*e, 0, UMAX << FRAC)  (anti-windup)
//   u     <= clamp((kp*e + integ_new) >> FRAC, 0, UMAX), UMAX = 2**M - 1
// kp and ki are unsigned fixed-point gains with FRAC fraction bits. The
// design specifies a PI loop with a 12-bit output closing the output-voltage
// loop around modulator, balancer and converter; the gain format, the
// clamping of the integrator (anti-windup) and the output are this
// implementation's choices.
//
// Timing: u is registered and changes one clk after the ce pulse that
// sampled vmeas. Reset (asynchronous, active low) clears integrator and
// output. sat_hi / sat_lo flag that the last update clamped the output.
module pi_controller #(
  parameter int unsigned M      = sdm_pkg::DEF_M,
  parameter int unsigned GAIN_W = sdm_pkg::DEF_GAIN_W,
  parameter int unsigned FRAC   = sdm_pkg::DEF_FRAC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic [M-1:0]      vref,
  input  logic [M-1:0]      vmeas,
  input  logic [GAIN_W-1:0] kp,
  input  logic [GAIN_W-1:0] ki,
  output logic [M-1:0]      u,
  output logic              sat_hi,
  output logic              sat_lo
);
  // Product of an (M+1)-bit signed error and a (GAIN_W+1)-bit signed gain,
  // plus two guard bits for the sum of the P and I terms.
  localparam int unsigned W = M + GAIN_W + 4;
  localparam logic signed [W-1:0] UMAX   = W'((1 << M) - 1);
  localparam logic signed [W-1:0] IMAX   = UMAX <<< FRAC;

  logic signed [M:0]   e;
  logic signed [W-1:0] p_term, i_step, i_sum, i_next, v_sum, v_shift;
  logic signed [W-1:0] integ;

  always_comb begin
    e       = $signed({1'b0, vref}) - $signed({1'b0, vmeas});
    p_term  = W'(e) * W'($signed({1'b0, kp}));
    i_step  = W'(e) * W'($signed({1'b0, ki}));
    i_sum   = integ + i_step;
    if (i_sum < 0)         i_next = '0;
    else if (i_sum > IMAX) i_next = IMAX;
    else                   i_next = i_sum;
    v_sum   = p_term + i_next;
    v_shift = v_sum >>> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ  <= '0;
      u      <= '0;
      sat_hi <= 1'b0;
      sat_lo <= 1'b0;
    end else if (ce) begin
      integ  <= i_next;
      sat_hi <= (v_shift > UMAX);
      sat_lo <= (v_shift < 0);
      if (v_shift < 0)         u <= '0;
      else if (v_shift > UMAX) u <= UMAX[M-1:0];
      else                     u <= v_shift[M-1:0];
    end
  end
endmodule
