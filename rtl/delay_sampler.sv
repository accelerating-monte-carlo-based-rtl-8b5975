// delay_sampler: draws one pin-to-output delay from its Gaussian
// distribution, delay = mu + sigma * z, registered (latency one clock).
//
// mu (nominal delay) and sigma are unsigned in the arrival-time unit, z is a
// standard Gaussian sample in Q4.12. The product is rounded to the nearest
// time unit and the result is clamped to [0, 2^AT_W-1]: a Gaussian tail can
// otherwise give a negative delay. Independent Gaussian pin delays follow the
// document; the fixed-point format and the clamping are this design's
// choices.
module delay_sampler
  import ssta_pkg::*;
(
  input  logic clk,
  input  at_t  mu,
  input  at_t  sigma,
  input  z_t   z,
  output at_t  dly
);

  localparam int PW = AT_W + Z_W + 1;

  logic signed [PW-1:0] prod, sum;
  at_t nxt;

  always_comb begin
    prod = $signed({1'b0, sigma}) * z;
    // round half up, then drop the fraction (arithmetic shift)
    sum  = ((prod + (PW'(1) <<< (Z_FRAC - 1))) >>> Z_FRAC) + $signed(PW'(mu));
    if (sum < 0)                                nxt = '0;
    else if (sum > $signed(PW'({AT_W{1'b1}})))  nxt = '1;
    else                                        nxt = sum[AT_W-1:0];
  end

  always_ff @(posedge clk) dly <= nxt;

endmodule
