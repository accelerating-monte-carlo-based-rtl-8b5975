// tb_pattern_p1_dfg: streams random operands into pattern_p1_dfg every clock
// (initiation interval one) and compares each result, two clocks later, with
// a model of the three-cell pattern (cells 1 and 2 drive cell 3). Mixed pin
// phases are used so that a wrong pin order or phase shows.
module tb_pattern_p1_dfg;
  import ssta_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam phase_e PH [6] = '{PH_INV, PH_NONINV, PH_UNKNOWN, PH_INV, PH_NONINV, PH_INV};
  int ph [6] = '{0, 1, 2, 0, 1, 0};

  at_rf_t [3:0] at_in;
  at_rf_t [5:0] dly;
  at_rf_t       at_out;

  pattern_p1_dfg #(.PIN_PHASE(PH)) dut (.clk, .at_in, .dly, .at_out);

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

  int er [$], ef [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a [4][2];
    int d [6][2];
    int n1r, n1f, n2r, n2f;
    for (int n = 0; n < 2002; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        checks++;
        if (int'(at_out.rise) != er[0] || int'(at_out.fall) != ef[0]) begin
          failures++;
          if (failures < 10) $display("mismatch: got %0d/%0d exp %0d/%0d", at_out.rise, at_out.fall, er[0], ef[0]);
        end
        void'(er.pop_front());
        void'(ef.pop_front());
      end
      for (int k = 0; k < 4; k++) begin
        a[k][0] = $urandom_range(0, 4000); a[k][1] = $urandom_range(0, 4000);
        at_in[k] = {16'(a[k][0]), 16'(a[k][1])};
      end
      for (int k = 0; k < 6; k++) begin
        d[k][0] = $urandom_range(0, 900); d[k][1] = $urandom_range(0, 900);
        dly[k] = {16'(d[k][0]), 16'(d[k][1])};
      end
      n1r = mx(pin(ph[0], a[0][0], a[0][1], d[0][0], d[0][1], 1), pin(ph[1], a[1][0], a[1][1], d[1][0], d[1][1], 1));
      n1f = mx(pin(ph[0], a[0][0], a[0][1], d[0][0], d[0][1], 0), pin(ph[1], a[1][0], a[1][1], d[1][0], d[1][1], 0));
      n2r = mx(pin(ph[2], a[2][0], a[2][1], d[2][0], d[2][1], 1), pin(ph[3], a[3][0], a[3][1], d[3][0], d[3][1], 1));
      n2f = mx(pin(ph[2], a[2][0], a[2][1], d[2][0], d[2][1], 0), pin(ph[3], a[3][0], a[3][1], d[3][0], d[3][1], 0));
      er.push_back(mx(pin(ph[4], n1r, n1f, d[4][0], d[4][1], 1), pin(ph[5], n2r, n2f, d[5][0], d[5][1], 1)));
      ef.push_back(mx(pin(ph[4], n1r, n1f, d[4][0], d[4][1], 0), pin(ph[5], n2r, n2f, d[5][0], d[5][1], 0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
