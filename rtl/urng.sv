// urng: 32-bit uniform pseudo-random source (xorshift, shifts 13/17/5).
//
// A new 32-bit word appears every clock on rnd. The period is 2^32-1 and
// the all-zero state is never entered: a zero SEED is replaced by 1. Which
// uniform generator feeds the Gaussian generator is this design's choice;
// xorshift was taken because it costs three XOR layers and no multiplier.
// Reset (asynchronous, active low) loads SEED.
module urng #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] rnd
);

  localparam logic [31:0] INIT = (SEED == 32'd0) ? 32'd1 : SEED;

  logic [31:0] s, x1, x2, x3;

  always_comb begin
    x1 = s  ^ (s  << 13);
    x2 = x1 ^ (x1 >> 17);
    x3 = x2 ^ (x2 << 5);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s <= INIT;
    else        s <= x3;

  assign rnd = s;

endmodule
