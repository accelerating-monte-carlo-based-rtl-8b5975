// tb_mc_ssta_ctrl: II = 3, LAT_END = 9. Runs of 7 samples and of 1 sample
// and a run of 0 samples; checks that issues are exactly II clocks apart,
// that every out_valid comes LAT_END clocks after its issue, the counts, the
// busy/done handshake, that a start during a run is ignored, and the total
// run length.
module tb_mc_ssta_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int II = 3, LE = 9;
  logic start = 0;
  logic [31:0] nsamples = 0;
  logic [1:0] slot;
  logic issue, out_valid, busy, done;
  logic [31:0] n_started, n_done;

  mc_ssta_ctrl #(.II(II), .LAT_END(LE)) dut (.clk, .rst_n, .start, .nsamples, .slot, .issue,
    .out_valid, .busy, .done, .n_started, .n_done);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int issue_t [$];
  int last_issue = -100, nvalid = 0, nissue = 0;

  // monitor: issue spacing, result latency, slot of issue
  always @(negedge clk) if (rst_n) begin
    if (issue) begin
      checks++;
      if (slot != 0 || (last_issue >= 0 && nissue > 0 && cyc - last_issue != II && busy && issue_t.size() > 0)) begin
        failures++; $display("issue at %0d: slot %0d last %0d", cyc, slot, last_issue);
      end
      last_issue = cyc;
      nissue++;
      issue_t.push_back(cyc);
    end
    if (out_valid) begin
      checks++;
      if (issue_t.size() == 0 || cyc - issue_t[0] != LE) begin
        failures++; $display("out_valid at %0d not %0d after issue", cyc, LE);
      end
      if (issue_t.size() > 0) void'(issue_t.pop_front());
      nvalid++;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, int extra_start_at);
    int t0, t1;
    @(negedge clk);
    nvalid = 0; nissue = 0; issue_t.delete();
    nsamples = n; start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    if (extra_start_at > 0) begin
      repeat (extra_start_at) @(negedge clk);
      nsamples = 99; start = 1;
      @(negedge clk);
      start = 0;
    end
    while (!done) @(negedge clk);
    t1 = cyc;
    checks++;
    if (nvalid != n || nissue != n || n_done != n || n_started != n || busy) begin
      failures++; $display("run %0d: valid %0d issue %0d done %0d started %0d", n, nvalid, nissue, n_done, n_started);
    end
    // first issue within II clocks of start, then (n-1)*II, then LAT_END
    checks++;
    if (n > 0 && (t1 - t0 < (n - 1) * II + LE + 1 || t1 - t0 > (n - 1) * II + LE + II + 2)) begin
      failures++; $display("run %0d took %0d clocks", n, t1 - t0);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++; if (done || busy) failures++;
    run(7, 4);
    run(1, 0);
    run(0, 0);
    checks++; if (!done || busy) failures++;
    run(5, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
