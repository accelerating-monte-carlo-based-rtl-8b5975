// pattern_fu: one functional unit of pattern P1 together with the random
// generation of its pin-to-output delays.
//
// Every clock the unit takes one operand bundle (ssta_pkg::fu_op_t: four
// port arrival times and the mu/sigma of its twelve rise/fall pin delays),
// draws the twelve delays from twelve independent Gaussian generators
// (gauss_pwl + delay_sampler) and evaluates the pattern's data flow graph
// (pattern_p1_dfg). It is fully pipelined: initiation interval one, result
// at_out valid LAT = 3 clocks after the operands (one clock for delay
// sampling, two for the two cell levels). The port arrival times are held
// one clock to meet the sampled delays. Because the unit evaluates a
// different pattern instance or Monte Carlo sample every clock, every
// evaluation gets fresh delays.
//
// SEED seeds the twelve generators (each gets SEED mixed with its index), so
// units with different SEEDs draw different sequences. The six delay pairs
// of the bundle are ordered 1a,1b,2a,2b,3a,3b as in pattern_p1_dfg.
module pattern_fu
  import ssta_pkg::*;
#(
  parameter phase_e      PIN_PHASE [6] = '{default: PH_INV},
  parameter logic [31:0] SEED          = 32'h1357_9BDF
) (
  input  logic   clk,
  input  logic   rst_n,
  input  fu_op_t op,
  output at_rf_t at_out
);


  at_rf_t [5:0] dly;
  at_rf_t [3:0] at_q;

  for (genvar p = 0; p < 6; p++) begin : g_pin
    z_t z_r, z_f;
    gauss_pwl #(.SEED(SEED ^ (32'(2*p + 1) * 32'h9E37_79B9))) u_gr (.clk, .rst_n, .z(z_r));
    gauss_pwl #(.SEED(SEED ^ (32'(2*p + 2) * 32'h9E37_79B9))) u_gf (.clk, .rst_n, .z(z_f));
    delay_sampler u_sr (.clk, .mu(op.mu[p].rise), .sigma(op.sigma[p].rise), .z(z_r), .dly(dly[p].rise));
    delay_sampler u_sf (.clk, .mu(op.mu[p].fall), .sigma(op.sigma[p].fall), .z(z_f), .dly(dly[p].fall));
  end

  always_ff @(posedge clk) at_q <= op.at;

  pattern_p1_dfg #(.PIN_PHASE(PIN_PHASE)) u_dfg (
    .clk, .at_in(at_q), .dly, .at_out
  );

endmodule
