// sdm_multiphase_ctrl: digital controller for P = 2**N high-frequency
// converter phases connected in parallel, which are switched on and off
// (never pulse-width modulated) to regulate the output voltage.
//
// Signal chain, one step per sample strobe:
//   sample_clock_divider  clk / CLK_DIV -> sample strobe
//   pi_controller         vref_code - vout_code -> M-bit command  (closed loop)
//   ext_cmd                                      -> M-bit command  (open loop)
//   sigma_delta           M-bit command -> N-bit phase count y
//   balancer              y -> P enables, window of y phases rotating
//                         around the ring every divider+1 samples
// The effective duty ratio of the converter system is y/P on average, i.e.
// cmd / 2**M. The chain, widths (M = 12, N = 3, P = 8), the divide-by-13 and
// the 4-bit rotation divider follow the design; the open/closed-loop select
// reflects its two operating modes (PI-regulated, and an external command
// from an ADC). Running everything in one clock domain with clock enables is
// this implementation's choice.
//
// Interface: vout_code and ext_cmd are ADC codes, sampled on the strobe.
// Latency from a sample to the enables: PI output registered on strobe k,
// modulator accumulates it on strobe k+1, y and the balancer rotation update
// one clk after that strobe. Reset is asynchronous, active low.
module sdm_multiphase_ctrl #(
  parameter int unsigned M       = sdm_pkg::DEF_M,
  parameter int unsigned N       = sdm_pkg::DEF_N,
  parameter int unsigned CLK_DIV = sdm_pkg::DEF_CLK_DIV,
  parameter int unsigned DIV_W   = sdm_pkg::DEF_DIV_W,
  localparam int unsigned GAIN_W = sdm_pkg::DEF_GAIN_W,
  localparam int unsigned P      = 1 << N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              closed_loop,
  input  logic [M-1:0]      ext_cmd,
  input  logic [M-1:0]      vout_code,
  input  logic [M-1:0]      vref_code,
  input  logic [GAIN_W-1:0] kp,
  input  logic [GAIN_W-1:0] ki,
  input  logic [DIV_W-1:0]  divider,
  output logic              sample,
  output logic [M-1:0]      cmd,
  output logic              pi_sat,
  output logic [N-1:0]      y,
  output logic [P-1:0]      en
);
  logic [M-1:0] pi_u;
  logic         pi_sat_hi, pi_sat_lo;

  sample_clock_divider #(.DIV(CLK_DIV)) u_div (
    .clk, .rst_n, .tick(sample)
  );

  pi_controller #(.M(M), .GAIN_W(GAIN_W)) u_pi (
    .clk, .rst_n, .ce(sample),
    .vref(vref_code), .vmeas(vout_code), .kp, .ki,
    .u(pi_u), .sat_hi(pi_sat_hi), .sat_lo(pi_sat_lo)
  );

  assign cmd    = closed_loop ? pi_u : ext_cmd;
  assign pi_sat = closed_loop & (pi_sat_hi | pi_sat_lo);

  sigma_delta #(.M(M), .N(N)) u_sd (
    .clk, .rst_n, .ce(sample), .x(cmd), .y
  );

  balancer #(.N(N), .DIV_W(DIV_W)) u_bal (
    .clk, .rst_n, .ce(sample), .valin(y), .divider, .valout(en)
  );
endmodule
