// sample_clock_divider: derives the controller's sample rate from the system
// clock by integer division.
//
// The experimental controller ran from a 24 MHz clock source through a
// divide-by-13 block, giving a ~1.85 MHz update rate. Here the division yields
// a one-cycle clock-enable strobe rather than a derived clock, so the whole
// controller stays in a single clock domain (an implementation choice).
//
// Interface: tick is high for one clk cycle every DIV cycles. The first tick
// comes DIV cycles after reset is released. Reset is asynchronous, active low,
// like the balancer's.
module sample_clock_divider #(
  parameter int unsigned DIV = sdm_pkg::DEF_CLK_DIV
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == CW'(DIV - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("DIV must be at least 2");
endmodule
