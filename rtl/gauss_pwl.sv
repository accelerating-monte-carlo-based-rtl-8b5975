// gauss_pwl: standard Gaussian random number generator built on a
// piecewise linear approximation of the inverse normal distribution.
//
// Every clock a 32-bit uniform word u from urng is mapped to one sample z:
//   * u[31] is the sign;
//   * q = u[30:0] (a fraction in [0,1)) is mapped to |z| = Phi^-1((1+q)/2).
// The curve |z|(q) is cut into 64 straight segments. The number of leading
// ones of q picks an octave o (clamped at 15): octave o covers
// q in [1-2^-o, 1-2^-(o+1)), so segments get finer towards the tail where
// the curve bends fastest. The two bits after the octave marker pick one of
// four equal sub-segments and the next 12 bits are the position f in it:
//   |z| = base[k] + slope[k] * f / 4096,   k = 4*o + sub.
// Table entry k holds base = round(4096*|z|(left)) in its upper 16 bits and
// slope = round(4096*(|z|(right)-|z|(left))) in its lower 16 bits, where
// left/right are the segment ends; for the last segment right = 1-2^-31.
// The largest magnitude is about 6.2. The document names the piecewise
// linear method but gives no segmentation; this segmentation, the xorshift
// source and the Q4.12 output are this design's choices.
//
// Output: z (Q4.12, ssta_pkg::z_t), a fresh sample every clock, registered.
module gauss_pwl
  import ssta_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic clk,
  input  logic rst_n,
  output z_t   z
);

  localparam int NSEG = 64;

  logic [31:0] tbl [NSEG];
  initial $readmemh("rtl/gauss_pwl_table.hex", tbl);

  logic [31:0] u;
  urng #(.SEED(SEED)) u_urng (.clk, .rst_n, .rnd(u));

  logic [30:0] q, sh;
  logic [3:0]  oct;
  logic [5:0]  seg;
  logic [11:0] f;
  logic [15:0] base, slope;
  logic [27:0] prod;
  logic [16:0] m;
  z_t          z_n;

  always_comb begin
    q   = u[30:0];
    oct = 4'd15;
    for (int i = 0; i < 15; i++) begin
      if (!q[30-i] && oct == 4'd15) oct = 4'(i);
    end
    // drop the octave marker (the leading ones and the first zero)
    sh    = (oct == 4'd15) ? (q << 15) : (q << (oct + 4'd1));
    seg   = {oct, sh[30:29]};
    f     = sh[28:17];
    base  = tbl[seg][31:16];
    slope = tbl[seg][15:0];
    prod  = slope * f;
    m     = 17'(base) + 17'(prod[27:12]);
    if (m > 17'd32767) m = 17'd32767;
    z_n   = u[31] ? -$signed(m[15:0]) : $signed(m[15:0]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) z <= '0;
    else        z <= z_n;

endmodule
