// sigma_delta: first-order sigma-delta modulator that reduces an M-bit
// command x to an N-bit output y whose long-term average equals
// x / 2**(M-N).
//
// Structure (one step per ce pulse):
//   x_sat  = min(x, XMAX)                    input saturation
//   y      = acc >> (M-N)                    right shift (quantiser)
//   acc   <= sat(acc + x_sat - (y << (M-N))) feedback left shift, integrator
// The accumulator is the unit delay; y is taken from its upper N bits, so the
// residue acc - (y << (M-N)) is the low M-N bits and the error in the
// discarded bits is carried into the next sample. The input saturation,
// accumulator saturation, unit delay and the shift gains follow the
// design's first-order modulator diagram; the saturation limits are this
// implementation's choice: XMAX = (2**N - 1) * 2**(M-N), the largest average
// the N-bit output can reach, and the accumulator is clamped to [0, 2**M-1].
// With that input limit the accumulator cannot leave its range, so its
// saturation never acts; it is kept as a guard.
//
// Timing: y changes one clk after a ce pulse and reflects all commands up
// to and including that sample (y is registered). Reset clears acc.
module sigma_delta #(
  parameter int unsigned M = sdm_pkg::DEF_M,
  parameter int unsigned N = sdm_pkg::DEF_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic [M-1:0] x,
  output logic [N-1:0] y
);
  localparam int unsigned      S    = M - N;               // shift distance
  localparam logic [M-1:0]     XMAX = M'(sdm_pkg::cmd_max(M, N));
  localparam logic [M:0]       AMAX = {1'b0, {M{1'b1}}};

  logic [M-1:0] acc;
  logic [M-1:0] x_sat;
  logic [M:0]   sum;     // acc residue + x_sat, one bit of headroom

  always_comb begin
    x_sat = (x > XMAX) ? XMAX : x;
    sum   = {1'b0, {N{1'b0}}, acc[S-1:0]} + {1'b0, x_sat};
  end

  assign y = acc[M-1 -: N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (ce) acc <= (sum > AMAX) ? AMAX[M-1:0] : sum[M-1:0];
  end

  initial assert (N >= 1 && N < M) else $error("need 1 <= N < M");
endmodule
