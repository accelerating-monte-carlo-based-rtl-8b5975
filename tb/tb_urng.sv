// tb_urng: compares the urng sequence with a reference xorshift model after
// reset, for a nonzero and for a zero seed, and checks that the bits are
// balanced.
module tb_urng;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] r1, r0;

  urng #(.SEED(32'hDEAD_BEEF)) u1 (.clk, .rst_n, .rnd(r1));
  urng #(.SEED(32'h0))         u0 (.clk, .rst_n, .rnd(r0));

  function automatic logic [31:0] nxt(logic [31:0] x);
    x ^= x << 13;
    x ^= x >> 17;
    x ^= x << 5;
    return x;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] m1, m0;
    longint ones = 0;
    m1 = 32'hDEAD_BEEF;
    m0 = 32'd1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      checks++;
      if (r1 !== m1 || r0 !== m0) begin
        failures++;
        if (failures < 10) $display("step %0d: got %h/%h exp %h/%h", n, r1, r0, m1, m0);
      end
      ones += $countones(r1);
      m1 = nxt(m1);
      m0 = nxt(m0);
      @(negedge clk);
    end
    checks++;
    if (ones < 78000 || ones > 82000) begin failures++; $display("bit balance off: %0d ones", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
