// tb_gauss_pwl: checks the Gaussian generator in two independent ways.
// (1) Point accuracy: a copy of the xorshift sequence tells the testbench
//     each uniform word; it computes the exact value Phi^-1((1+q)/2) with
//     its own erf approximation and bisection, and requires the generator's
//     sample to be within 0.03 of it (within 0.15 beyond |z| = 4, where the
//     segments are widest).
// (2) Distribution: mean, variance and the tail fractions beyond 1.96 and 3
//     of 200000 samples must match the standard normal distribution.
module tb_gauss_pwl;
  import ssta_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  z_t z;

  localparam logic [31:0] SEED = 32'h1234_5677;
  gauss_pwl #(.SEED(SEED)) dut (.clk, .rst_n, .z);

  function automatic logic [31:0] nxt(logic [31:0] x);
    x ^= x << 13;
    x ^= x >> 17;
    x ^= x << 5;
    return x;
  endfunction

  function automatic real erf_approx(real x);
    real t;
    t = 1.0 / (1.0 + 0.3275911 * x);
    return 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t - 0.284496736) * t
                  + 0.254829592) * t * $exp(-x * x);
  endfunction

  // |z| such that P(|Z| < |z|) = q
  function automatic real half_inv(real q);
    real lo, hi, mid;
    lo = 0.0; hi = 8.0;
    for (int i = 0; i < 50; i++) begin
      mid = (lo + hi) / 2.0;
      if (erf_approx(mid / $sqrt(2.0)) < q) lo = mid; else hi = mid;
    end
    return (lo + hi) / 2.0;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s;
    real zr, ref_z, q, sum, sum2, mean, var_z, worst;
    int n196, n3, npts;
    localparam int NS = 200000;
    sum = 0; sum2 = 0; n196 = 0; n3 = 0; worst = 0; npts = 0;
    s = SEED;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(posedge clk); #1;
      // z now holds the sample made from the word s of the previous clock
      zr = real'(z) / 4096.0;
      sum += zr; sum2 += zr * zr;
      if (zr > 1.96 || zr < -1.96) n196++;
      if (zr > 3.0 || zr < -3.0) n3++;
      if (n % 20 == 0) begin
        q = real'(s[30:0]) / 2147483648.0;
        ref_z = half_inv(q);
        if (s[31]) ref_z = -ref_z;
        checks++;
        npts++;
        if ((ref_z < 4.0 && ref_z > -4.0) ? (zr - ref_z > 0.03 || ref_z - zr > 0.03)
                                          : (zr - ref_z > 0.15 || ref_z - zr > 0.15)) begin
          failures++;
          if (failures < 10) $display("sample %0d: u=%h z=%f ref=%f", n, s, zr, ref_z);
        end
        if (zr - ref_z > worst) worst = zr - ref_z;
        if (ref_z - zr > worst) worst = ref_z - zr;
      end
      s = nxt(s);
    end
    mean  = sum / NS;
    var_z = sum2 / NS - mean * mean;
    $display("mean %f variance %f P(|z|>1.96) %f P(|z|>3) %f worst error %f over %0d points",
             mean, var_z, real'(n196) / NS, real'(n3) / NS, worst, npts);
    checks++; if (mean > 0.01 || mean < -0.01) failures++;
    checks++; if (var_z > 1.02 || var_z < 0.98) failures++;
    checks++; if (real'(n196) / NS > 0.053 || real'(n196) / NS < 0.047) failures++;
    checks++; if (real'(n3) / NS > 0.0035 || real'(n3) / NS < 0.0019) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
