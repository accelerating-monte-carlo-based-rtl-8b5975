// tb_mc_ssta_full: the engine exactly as delivered (every parameter at its
// default: one shared functional unit, initiation interval 3, all pins
// INV). One nominal run (sigmas zero) is compared sample by sample with an
// independent static timing model of the nine-cell circuit, then a Monte
// Carlo run of 20000 samples checks the delay distribution and the
// throughput: the run must take (N-1)*3 + 9 clocks plus at most 3 to align
// with the schedule.
module tb_mc_ssta_full;
  import ssta_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         start = 0;
  logic [31:0]  nsamples = 0;
  at_rf_t       pi_at [10];
  at_rf_t [5:0] mu    [3];
  at_rf_t [5:0] sigma [3];
  logic         out_valid, busy, done;
  at_rf_t       out_at;
  at_t          out_delay;
  logic [31:0]  n_done;

  mc_ssta_top dut (.clk, .rst_n, .start, .nsamples, .pi_at, .mu, .sigma,
                   .out_valid, .out_at, .out_delay, .busy, .done, .n_done);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int mx(int a, int b);
    return a > b ? a : b;
  endfunction
  // all pins INV: rise out = fall in + rise delay, and the reverse
  function automatic void p1(input int a [4][2], input at_rf_t [5:0] m, output int r, output int f);
    int n1r, n1f, n2r, n2f;
    n1r = mx(a[0][1] + m[0].rise, a[1][1] + m[1].rise);
    n1f = mx(a[0][0] + m[0].fall, a[1][0] + m[1].fall);
    n2r = mx(a[2][1] + m[2].rise, a[3][1] + m[3].rise);
    n2f = mx(a[2][0] + m[2].fall, a[3][0] + m[3].fall);
    r = mx(n1f + m[4].rise, n2f + m[5].rise);
    f = mx(n1r + m[4].fall, n2r + m[5].fall);
  endfunction
  task automatic circuit_nominal(output int r, output int f);
    int a [4][2];
    int r0, f0, r1, f1;
    for (int p = 0; p < 4; p++) begin a[p][0] = pi_at[p].rise; a[p][1] = pi_at[p].fall; end
    p1(a, mu[0], r0, f0);
    for (int p = 0; p < 4; p++) begin a[p][0] = pi_at[4 + p].rise; a[p][1] = pi_at[4 + p].fall; end
    p1(a, mu[1], r1, f1);
    a[0][0] = r0; a[0][1] = f0; a[1][0] = pi_at[8].rise; a[1][1] = pi_at[8].fall;
    a[2][0] = r1; a[2][1] = f1; a[3][0] = pi_at[9].rise; a[3][1] = pi_at[9].fall;
    p1(a, mu[2], r, f);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ef, nres, t0, nom;
    real sum, sum2, m, sd;
    localparam int N = 20000;
    for (int i = 0; i < 10; i++) pi_at[i] = {16'($urandom_range(0, 1000)), 16'($urandom_range(0, 1000))};
    for (int i = 0; i < 3; i++)
      for (int p = 0; p < 6; p++) begin
        mu[i][p] = {16'($urandom_range(50, 700)), 16'($urandom_range(50, 700))};
        sigma[i][p] = '0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    circuit_nominal(er, ef);
    nsamples = 25; start = 1;
    @(negedge clk);
    start = 0;
    nres = 0;
    while (!done) begin
      @(negedge clk);
      if (out_valid) begin
        nres++;
        checks++;
        if (int'(out_at.rise) != er || int'(out_at.fall) != ef || int'(out_delay) != mx(er, ef)) begin
          failures++;
          if (failures < 10) $display("got %0d/%0d exp %0d/%0d", out_at.rise, out_at.fall, er, ef);
        end
      end
    end
    checks++; if (nres != 25) failures++;
    // Monte Carlo run
    for (int i = 0; i < 10; i++) pi_at[i] = {16'd0, 16'd0};
    for (int i = 0; i < 3; i++)
      for (int p = 0; p < 6; p++) begin
        mu[i][p]    = {16'd400, 16'd350};
        sigma[i][p] = {16'd40, 16'd35};
      end
    circuit_nominal(er, ef);
    nom = mx(er, ef);
    @(negedge clk);
    nsamples = N; start = 1; t0 = cyc;
    @(negedge clk);
    start = 0;
    nres = 0; sum = 0; sum2 = 0;
    while (!done) begin
      @(negedge clk);
      if (out_valid) begin
        nres++;
        sum += out_delay; sum2 += real'(out_delay) * out_delay;
      end
    end
    m = sum / N; sd = $sqrt(sum2 / N - m * m);
    $display("nominal %0d, Monte Carlo mean %f sd %f over %0d samples in %0d clocks", nom, m, sd, nres, cyc - t0);
    checks++; if (nres != N || n_done != N) failures++;
    checks++; if (cyc - t0 < (N - 1) * 3 + 9 || cyc - t0 > (N - 1) * 3 + 9 + 4) failures++;
    checks++; if (m < nom || m > nom + 200) failures++;
    checks++; if (sd < 20 || sd > 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
