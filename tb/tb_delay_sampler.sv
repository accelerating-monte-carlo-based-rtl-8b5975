// tb_delay_sampler: random mu, sigma and z, compared one clock later with
// mu + round(sigma*z/4096) clamped to [0, 65535]; some cases are chosen to
// hit the lower and the upper clamp.
module tb_delay_sampler;
  import ssta_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  at_t mu, sigma, dly;
  z_t  z;

  delay_sampler dut (.clk, .mu, .sigma, .z, .dly);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e, p;
    int nlo = 0, nhi = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      case (n % 5)
        0: begin mu = 16'($urandom_range(0, 100));      sigma = 16'($urandom_range(200, 3000)); z = -16'sd8000; end
        1: begin mu = 16'($urandom_range(65000, 65535)); sigma = 16'($urandom_range(200, 3000)); z = 16'sd9000;  end
        default: begin
          mu = 16'($urandom_range(0, 20000)); sigma = 16'($urandom_range(0, 4000)); z = z_t'($urandom);
        end
      endcase
      p = longint'(sigma) * longint'(z);
      e = (p + 2048) >>> 12;
      e = e + longint'(mu);
      if (e < 0) begin e = 0; nlo++; end
      if (e > 65535) begin e = 65535; nhi++; end
      @(posedge clk); #1;
      checks++;
      if (longint'(dly) != e) begin
        failures++;
        if (failures < 10) $display("mu %0d sigma %0d z %0d: got %0d exp %0d", mu, sigma, z, dly, e);
      end
    end
    checks++;
    if (nlo == 0 || nhi == 0) begin failures++; $display("clamps not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
