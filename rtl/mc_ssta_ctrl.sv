// mc_ssta_ctrl: run controller of the Monte Carlo engine.
//
// The shared functional units follow a static modulo schedule: slot counts
// 0,1,..,II-1,0,... from reset and tells every unit which pattern instance
// it serves this clock. A run is requested with a one-clock start pulse and
// the number of samples nsamples. Whenever slot is 0 and samples remain, a
// new Monte Carlo sample is issued (issue = 1), so samples enter every II
// clocks: the initiation interval of the pipelined engine. Because samples
// are independent, there is no other stall. A sample's result leaves the
// engine LAT_END clocks after its issue; out_valid marks that clock (a shift
// register of issue bits). busy is high from start until the last result is
// out, done goes high then and stays high until the next start. n_started
// and n_done count the samples of the current run. A start while busy is
// ignored. The counter widths and the start/done handshake are this design's
// choices; the document fixes only the initiation-interval behaviour.
module mc_ssta_ctrl #(
  parameter int unsigned II      = 3,
  parameter int unsigned LAT_END = 9,
  localparam int unsigned SW = (II > 1) ? $clog2(II) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   nsamples,
  output logic [SW-1:0] slot,
  output logic          issue,
  output logic          out_valid,
  output logic          busy,
  output logic          done,
  output logic [31:0]   n_started,
  output logic [31:0]   n_done
);

  logic [31:0]        remaining;
  logic [LAT_END-1:0] vpipe;

  assign issue     = busy && (slot == '0) && (remaining != 0);
  assign out_valid = vpipe[LAT_END-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot      <= '0;
      vpipe     <= '0;
      remaining <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      n_started <= '0;
      n_done    <= '0;
    end else begin
      slot  <= (int'(slot) == II - 1) ? '0 : slot + 1'b1;
      vpipe <= {vpipe[LAT_END-2:0], issue};
      if (start && !busy) begin
        remaining <= nsamples;
        busy      <= (nsamples != 0);
        done      <= (nsamples == 0);
        n_started <= '0;
        n_done    <= '0;
      end else begin
        if (issue) begin
          remaining <= remaining - 1;
          n_started <= n_started + 1;
        end
        if (out_valid) n_done <= n_done + 1;
        if (busy && remaining == 0 && !issue && n_done + 32'(out_valid) == n_started) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // the pipeline cannot deliver more results than samples issued
  a_results_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    n_done <= n_started);

endmodule
