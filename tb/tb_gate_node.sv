// tb_gate_node: checks gate_node against an independent model of the
// separate rise/fall sum/max rule for all pin phase combinations, with random
// arrival times and delays (including values that saturate), and checks the
// one-clock latency.
module tb_gate_node;
  import ssta_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  at_rf_t at_a, at_b, d_a, d_b;
  at_rf_t o [4];

  gate_node #(.PHASE_A(PH_INV),     .PHASE_B(PH_INV))     u0 (.clk, .at_a, .at_b, .dly_a(d_a), .dly_b(d_b), .at_out(o[0]));
  gate_node #(.PHASE_A(PH_NONINV),  .PHASE_B(PH_INV))     u1 (.clk, .at_a, .at_b, .dly_a(d_a), .dly_b(d_b), .at_out(o[1]));
  gate_node #(.PHASE_A(PH_UNKNOWN), .PHASE_B(PH_NONINV))  u2 (.clk, .at_a, .at_b, .dly_a(d_a), .dly_b(d_b), .at_out(o[2]));
  gate_node #(.PHASE_A(PH_INV),     .PHASE_B(PH_UNKNOWN)) u3 (.clk, .at_a, .at_b, .dly_a(d_a), .dly_b(d_b), .at_out(o[3]));

  // phase codes of the four instances: 0 INV, 1 NONINV, 2 UNKNOWN
  int pa [4] = '{0, 1, 2, 0};
  int pb [4] = '{0, 0, 1, 2};

  function automatic int sadd(int a, int b);
    return (a + b > 65535) ? 65535 : a + b;
  endfunction
  function automatic int mx(int a, int b);
    return a > b ? a : b;
  endfunction
  // rise (edge=1) or fall (edge=0) output time contributed by one pin
  function automatic int pin(int ph, int ar, int af, int dr, int df, bit edge_r);
    int inv, non;
    inv = edge_r ? sadd(af, dr) : sadd(ar, df);
    non = edge_r ? sadd(ar, dr) : sadd(af, df);
    if (ph == 0) return inv;
    if (ph == 1) return non;
    return mx(inv, non);
  endfunction

  int exp_r [4], exp_f [4];
  int nsat = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 10 == 0) begin  // large values, to exercise saturation
        at_a = {16'($urandom_range(40000, 65535)), 16'($urandom_range(40000, 65535))};
        d_a  = {16'($urandom_range(20000, 65535)), 16'($urandom_range(20000, 65535))};
      end else begin
        at_a = {16'($urandom_range(0, 5000)), 16'($urandom_range(0, 5000))};
        d_a  = {16'($urandom_range(0, 500)), 16'($urandom_range(0, 500))};
      end
      at_b = {16'($urandom_range(0, 5000)), 16'($urandom_range(0, 5000))};
      d_b  = {16'($urandom_range(0, 500)), 16'($urandom_range(0, 500))};
      for (int k = 0; k < 4; k++) begin
        exp_r[k] = mx(pin(pa[k], at_a.rise, at_a.fall, d_a.rise, d_a.fall, 1),
                      pin(pb[k], at_b.rise, at_b.fall, d_b.rise, d_b.fall, 1));
        exp_f[k] = mx(pin(pa[k], at_a.rise, at_a.fall, d_a.rise, d_a.fall, 0),
                      pin(pb[k], at_b.rise, at_b.fall, d_b.rise, d_b.fall, 0));
        if (exp_r[k] == 65535) nsat++;
      end
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(o[k].rise) != exp_r[k] || int'(o[k].fall) != exp_f[k]) begin
          failures++;
          if (failures < 10) $display("mismatch inst %0d: got %0d/%0d exp %0d/%0d", k, o[k].rise, o[k].fall, exp_r[k], exp_f[k]);
        end
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
