// balancer: turns the modulator's phase count into P = 2**N phase enables,
// spreading the on-time evenly over all phases.
//
// The phases are treated as a ring. Phase i is enabled when
// (rotation + i) mod P < valin, so exactly valin consecutive phases of the
// ring are on. The starting point of that window moves by one position every
// divider+1 update pulses (ce), so over time every phase is on for the same
// fraction of time and switches at the same rate, unlike a fixed thermometer
// code. This ring-with-moving-start scheme, the compare rule and the 4-bit
// counter/divider follow the design's balancer; gating the counter with a
// clock enable (so it counts samples rather than raw clocks) is this
// implementation's choice. "Updated every other sample" corresponds to
// divider = 1.
//
// Timing: valout is combinational in valin and the registered rotation;
// rotation and counter change on ce. Reset (asynchronous, active low) sets
// rotation = 0 and counter = 0. Since valin is N bits, at most P-1 phases are
// on at once.
module balancer #(
  parameter int unsigned N     = sdm_pkg::DEF_N,
  parameter int unsigned DIV_W = sdm_pkg::DEF_DIV_W,
  localparam int unsigned P    = 1 << N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic [N-1:0]     valin,
  input  logic [DIV_W-1:0] divider,
  output logic [P-1:0]     valout
);
  logic [DIV_W-1:0] counter;
  logic [N-1:0]     rotation;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      counter  <= '0;
      rotation <= '0;
    end else if (ce) begin
      if (counter == divider) begin
        counter  <= '0;
        rotation <= rotation + 1'b1;
      end else begin
        counter  <= counter + 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      logic [N-1:0] pos;
      pos       = rotation + N'(i);   // wraps mod P
      valout[i] = (pos < valin);
    end
  end

  // Exactly valin phases are on at any time.
  a_count : assert property (@(posedge clk) disable iff (!rst_n)
                             $countones(valout) == int'(valin))
    else $error("balancer: %0d phases on for command %0d", $countones(valout), valin);
endmodule
