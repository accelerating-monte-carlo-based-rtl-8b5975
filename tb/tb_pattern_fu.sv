// tb_pattern_fu: (1) with all sigmas zero the unit is deterministic: random
// operands are streamed every clock and each result, three clocks later, is
// compared with a model of pattern P1 using the nominal delays. (2) with
// nonzero sigmas and fixed operands, the results must scatter around the
// nominal result, change from one evaluation to the next, and stay within a
// bound of a few sigma per cell level.
module tb_pattern_fu;
  import ssta_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam phase_e PH [6] = '{PH_NONINV, PH_INV, PH_INV, PH_UNKNOWN, PH_INV, PH_NONINV};
  int ph [6] = '{1, 0, 0, 2, 0, 1};

  fu_op_t op;
  at_rf_t at_out;

  pattern_fu #(.PIN_PHASE(PH), .SEED(32'hC0FF_EE01)) dut (.clk, .rst_n, .op, .at_out);

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
  // nominal result of the pattern for operand bundle o: {rise, fall}
  function automatic int nominal(fu_op_t o, bit edge_r);
    int n1r, n1f, n2r, n2f;
    n1r = mx(pin(ph[0], o.at[0].rise, o.at[0].fall, o.mu[0].rise, o.mu[0].fall, 1),
             pin(ph[1], o.at[1].rise, o.at[1].fall, o.mu[1].rise, o.mu[1].fall, 1));
    n1f = mx(pin(ph[0], o.at[0].rise, o.at[0].fall, o.mu[0].rise, o.mu[0].fall, 0),
             pin(ph[1], o.at[1].rise, o.at[1].fall, o.mu[1].rise, o.mu[1].fall, 0));
    n2r = mx(pin(ph[2], o.at[2].rise, o.at[2].fall, o.mu[2].rise, o.mu[2].fall, 1),
             pin(ph[3], o.at[3].rise, o.at[3].fall, o.mu[3].rise, o.mu[3].fall, 1));
    n2f = mx(pin(ph[2], o.at[2].rise, o.at[2].fall, o.mu[2].rise, o.mu[2].fall, 0),
             pin(ph[3], o.at[3].rise, o.at[3].fall, o.mu[3].rise, o.mu[3].fall, 0));
    return mx(pin(ph[4], n1r, n1f, o.mu[4].rise, o.mu[4].fall, edge_r),
              pin(ph[5], n2r, n2f, o.mu[5].rise, o.mu[5].fall, edge_r));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er [$], ef [$];
    int d0r, d0f, prev, nchg, lo, hi;
    real sum, sum2, mean, sd;
    op = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // (1) deterministic stream
    for (int n = 0; n < 2003; n++) begin
      @(negedge clk);
      if (n >= 3) begin
        checks++;
        if (int'(at_out.rise) != er[0] || int'(at_out.fall) != ef[0]) begin
          failures++;
          if (failures < 10) $display("eval %0d: got %0d/%0d exp %0d/%0d", n - 3, at_out.rise, at_out.fall, er[0], ef[0]);
        end
        void'(er.pop_front());
        void'(ef.pop_front());
      end
      for (int k = 0; k < 4; k++) op.at[k] = {16'($urandom_range(0, 3000)), 16'($urandom_range(0, 3000))};
      for (int k = 0; k < 6; k++) op.mu[k] = {16'($urandom_range(10, 800)), 16'($urandom_range(10, 800))};
      op.sigma = '0;
      er.push_back(nominal(op, 1));
      ef.push_back(nominal(op, 0));
    end
    // (2) random delays
    for (int k = 0; k < 4; k++) op.at[k] = {16'd1000, 16'd1200};
    for (int k = 0; k < 6; k++) op.mu[k] = {16'd400, 16'd300};
    for (int k = 0; k < 6; k++) op.sigma[k] = {16'd40, 16'd30};
    d0r = nominal(op, 1);
    d0f = nominal(op, 0);
    lo = d0r - 3 * 6 * 40; hi = d0r + 3 * 7 * 40;
    repeat (4) @(negedge clk);
    sum = 0; sum2 = 0; nchg = 0; prev = -1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      sum += at_out.rise; sum2 += real'(at_out.rise) * at_out.rise;
      if (int'(at_out.rise) != prev) nchg++;
      prev = at_out.rise;
      if (int'(at_out.rise) < lo || int'(at_out.rise) > hi) begin
        checks++; failures++;
        if (failures < 10) $display("rise %0d outside [%0d,%0d]", at_out.rise, lo, hi);
      end
    end
    mean = sum / 20000; sd = $sqrt(sum2 / 20000 - mean * mean);
    $display("nominal rise %0d fall %0d, sampled rise mean %f sd %f, changes %0d", d0r, d0f, mean, sd, nchg);
    // the max of two Gaussian sums lies above the nominal max on average
    checks++; if (mean < d0r - 5 || mean > d0r + 80) failures++;
    checks++; if (sd < 30 || sd > 120) failures++;
    checks++; if (nchg < 19000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
