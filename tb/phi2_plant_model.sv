// phi2_plant_model: behavioural model (simulation only) of P class-Phi-2
// boost converter phases in parallel, with the output capacitor, a resistive
// load and the ADC that samples the output voltage.
//
// Each enabled phase is modelled as a current source of IPH amperes into the
// shared output node, which is how a Phi-2 phase behaves when averaged over
// its ~10 MHz switching period. Every clk the output voltage is integrated:
//   v += TCLK / C * (n_on * IPH - v / RLOAD)
// and vout_code = floor(v / VFS * 2**M), clamped to the code range. The
// component values (IPH = 60 mA, C = 8 x 5 uF, RLOAD = 60 ohm, 20 V ADC full
// scale) are illustrative choices giving a ~14.4 V output near half load.
// Start-up delay of a phase after its enable is not modelled.
module phi2_plant_model #(
  parameter int  P     = 8,
  parameter int  M     = 12,
  parameter real IPH   = 0.060,
  parameter real C     = 40.0e-6,
  parameter real RLOAD = 60.0,
  parameter real VFS   = 20.0,
  parameter real TCLK  = 1.0 / 24.0e6,
  parameter real VINIT = 0.0
) (
  input  logic         clk,
  input  logic [P-1:0] en,
  output logic [M-1:0] vout_code,
  output real          vout
);
  real v = VINIT;

  always_ff @(posedge clk) begin
    v <= v + TCLK / C * (real'($countones(en)) * IPH - v / RLOAD);
  end

  always_comb begin
    real c;
    vout = v;
    c = v / VFS * real'(1 << M);
    if (c < 0.0) vout_code = '0;
    else if (c > real'((1 << M) - 1)) vout_code = '1;
    else vout_code = M'($rtoi(c));
  end
endmodule
