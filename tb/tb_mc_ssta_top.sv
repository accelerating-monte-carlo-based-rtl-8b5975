// tb_mc_ssta_top: end-to-end test of the Monte Carlo engine on the nine-cell
// example circuit with one, two and three shared functional units side by
// side (initiation intervals 3, 2 and 1) and mixed pin phases.
//  (1) Nominal runs, all sigmas zero: every sample must equal the static
//      timing result of an independent model of the circuit, results must be
//      exactly II clocks apart, and the first must come after the expected
//      pipeline latency. Several random circuits/input times are used.
//  (2) Monte Carlo run, sigmas nonzero: the three engines must produce the
//      same delay distribution (means and spreads agree), the mean must lie
//      above the nominal delay, and successive samples must differ.
// Mechanisms counted (each must happen): a unit serving more than one
// pattern instance (schedule slot other than 0), several samples in flight
// at once, and results spaced by the initiation interval.
module tb_mc_ssta_top;
  import ssta_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam phase_e PH [6] = '{PH_INV, PH_NONINV, PH_UNKNOWN, PH_INV, PH_INV, PH_NONINV};
  int ph [6] = '{0, 1, 2, 0, 0, 1};
  localparam int NCFG = 3;
  int ii_of  [NCFG] = '{3, 2, 1};
  int lat_of [NCFG] = '{9, 9, 8};   // issue to result: START[2] + 3 + 1

  logic        start = 0;
  logic [31:0] nsamples = 0;
  at_rf_t       pi_at [10];
  at_rf_t [5:0] mu    [3];
  at_rf_t [5:0] sigma [3];

  logic   out_valid [NCFG];
  at_rf_t out_at    [NCFG];
  at_t    out_delay [NCFG];
  logic   busy [NCFG], done [NCFG];
  logic [31:0] n_done [NCFG];

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // per-configuration observations
  int    nres [NCFG], last_t [NCFG], first_t [NCFG], bad_gap [NCFG];
  int    exp_r, exp_f;
  bit    check_exact;
  real   sum [NCFG], sum2 [NCFG];
  int    nchg [NCFG], prev [NCFG];
  int    n_shared [NCFG], n_overlap [NCFG], n_spaced [NCFG];

  for (genvar k = 0; k < NCFG; k++) begin : g_cfg
    mc_ssta_top #(.NFU(k + 1), .PIN_PHASE(PH), .SEED(32'h5EED_0000 + k * 32'h111)) dut (
      .clk, .rst_n, .start, .nsamples, .pi_at, .mu, .sigma,
      .out_valid(out_valid[k]), .out_at(out_at[k]), .out_delay(out_delay[k]),
      .busy(busy[k]), .done(done[k]), .n_done(n_done[k])
    );

    always @(negedge clk) if (rst_n) begin
      if (busy[k] && dut.slot != 0) n_shared[k]++;
      if (dut.n_started - dut.n_done >= 2) n_overlap[k]++;
      if (out_valid[k]) begin
        if (nres[k] == 0) first_t[k] = cyc;
        else if (cyc - last_t[k] != ii_of[k]) bad_gap[k]++;
        else n_spaced[k]++;
        last_t[k] = cyc;
        nres[k]++;
        if (check_exact) begin
          checks++;
          if (int'(out_at[k].rise) != exp_r || int'(out_at[k].fall) != exp_f ||
              int'(out_delay[k]) != (exp_r > exp_f ? exp_r : exp_f)) begin
            failures++;
            if (failures < 10) $display("cfg %0d: got %0d/%0d exp %0d/%0d", k, out_at[k].rise, out_at[k].fall, exp_r, exp_f);
          end
        end else begin
          sum[k] += out_delay[k]; sum2[k] += real'(out_delay[k]) * out_delay[k];
          if (int'(out_delay[k]) != prev[k]) nchg[k]++;
          prev[k] = out_delay[k];
        end
      end
    end
  end

  // ------------------------------------------------------------ reference
  function automatic int mx(int a, int b);
    return a > b ? a : b;
  endfunction
  function automatic int pin(int p, int ar, int af, int dr, int df, bit edge_r);
    int inv, non;
    inv = edge_r ? af + dr : ar + df;
    non = edge_r ? ar + dr : af + df;
    if (p == 0) return inv;
    if (p == 1) return non;
    return mx(inv, non);
  endfunction
  // pattern P1 with inputs a[port][0 rise / 1 fall] and instance delays m
  function automatic void p1(input int a [4][2], input at_rf_t [5:0] m, output int r, output int f);
    int n1r, n1f, n2r, n2f;
    n1r = mx(pin(ph[0], a[0][0], a[0][1], m[0].rise, m[0].fall, 1), pin(ph[1], a[1][0], a[1][1], m[1].rise, m[1].fall, 1));
    n1f = mx(pin(ph[0], a[0][0], a[0][1], m[0].rise, m[0].fall, 0), pin(ph[1], a[1][0], a[1][1], m[1].rise, m[1].fall, 0));
    n2r = mx(pin(ph[2], a[2][0], a[2][1], m[2].rise, m[2].fall, 1), pin(ph[3], a[3][0], a[3][1], m[3].rise, m[3].fall, 1));
    n2f = mx(pin(ph[2], a[2][0], a[2][1], m[2].rise, m[2].fall, 0), pin(ph[3], a[3][0], a[3][1], m[3].rise, m[3].fall, 0));
    r = mx(pin(ph[4], n1r, n1f, m[4].rise, m[4].fall, 1), pin(ph[5], n2r, n2f, m[5].rise, m[5].fall, 1));
    f = mx(pin(ph[4], n1r, n1f, m[4].rise, m[4].fall, 0), pin(ph[5], n2r, n2f, m[5].rise, m[5].fall, 0));
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

  task automatic run(int n);
    int t0;
    foreach (nres[k]) begin nres[k] = 0; bad_gap[k] = 0; end
    @(negedge clk);
    nsamples = n; start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!(done[0] && done[1] && done[2])) @(negedge clk);
    for (int k = 0; k < NCFG; k++) begin
      checks++;
      if (nres[k] != n || n_done[k] != n || bad_gap[k] != 0 ||
          first_t[k] - t0 < lat_of[k] + 1 || first_t[k] - t0 > lat_of[k] + ii_of[k]) begin
        failures++;
        $display("cfg %0d: %0d results, %0d bad gaps, first after %0d clocks", k, nres[k], bad_gap[k], first_t[k] - t0);
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m [NCFG], sd [NCFG];
    int nom;
    for (int i = 0; i < 10; i++) pi_at[i] = '0;
    for (int i = 0; i < 3; i++) begin mu[i] = '0; sigma[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // (1) nominal runs
    check_exact = 1;
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < 10; i++) pi_at[i] = {16'($urandom_range(0, 2000)), 16'($urandom_range(0, 2000))};
      for (int i = 0; i < 3; i++)
        for (int p = 0; p < 6; p++) mu[i][p] = {16'($urandom_range(20, 900)), 16'($urandom_range(20, 900))};
      circuit_nominal(exp_r, exp_f);
      run(10 + t);
    end
    // (2) Monte Carlo run
    check_exact = 0;
    for (int i = 0; i < 10; i++) pi_at[i] = {16'd100, 16'd150};
    for (int i = 0; i < 3; i++)
      for (int p = 0; p < 6; p++) begin
        mu[i][p]    = {16'(300 + 20 * p), 16'(260 + 10 * i)};
        sigma[i][p] = {16'(30 + 2 * p), 16'(26 + i)};
      end
    circuit_nominal(exp_r, exp_f);
    nom = mx(exp_r, exp_f);
    foreach (sum[k]) begin sum[k] = 0; sum2[k] = 0; nchg[k] = 0; prev[k] = -1; end
    run(6000);
    for (int k = 0; k < NCFG; k++) begin
      m[k]  = sum[k] / 6000;
      sd[k] = $sqrt(sum2[k] / 6000 - m[k] * m[k]);
      $display("NFU=%0d: nominal %0d, Monte Carlo mean %f sd %f", k + 1, nom, m[k], sd[k]);
      checks++; if (m[k] < nom || m[k] > nom + 200) failures++;
      checks++; if (sd[k] < 20 || sd[k] > 200) failures++;
      checks++; if (nchg[k] < 5000) failures++;
    end
    for (int k = 1; k < NCFG; k++) begin
      checks++;
      if (m[k] - m[0] > 4 || m[0] - m[k] > 4 || sd[k] / sd[0] > 1.1 || sd[0] / sd[k] > 1.1) begin
        failures++; $display("distributions of NFU=1 and NFU=%0d differ", k + 1);
      end
    end
    // mechanisms
    for (int k = 0; k < NCFG; k++) begin
      $display("NFU=%0d: clocks in a shared slot %0d, clocks with >=2 samples in flight %0d, results II apart %0d",
               k + 1, n_shared[k], n_overlap[k], n_spaced[k]);
      checks++; if (n_overlap[k] == 0 || n_spaced[k] == 0) failures++;
      if (k < 2) begin checks++; if (n_shared[k] == 0) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
