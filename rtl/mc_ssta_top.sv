// mc_ssta_top: Monte Carlo statistical static timing analysis engine for
// one mapped netlist, built from shared pattern functional units.
//
// The netlist is the nine-cell example circuit that is covered by three
// instances of pattern P1 (cells 1-2-3, 4-5-6 and 7-8-9): instances 0 and 1
// take their four inputs from primary inputs, instance 2 takes the outputs of
// instances 0 and 1 on pin a of its two first-level cells and primary inputs
// 8 and 9 on their pins b. Each Monte Carlo sample is one complete static
// timing analysis of the circuit with every pin-to-output delay drawn afresh
// from its Gaussian distribution; the result is the rise/fall arrival time at
// the circuit output.
//
// Sharing. NFU functional units (pattern_fu) serve the NINST instances:
// instance i is bound to unit i % NFU and runs in schedule slot i / NFU, so
// the initiation interval is II = ceil(NINST/NFU) and one sample is started
// every II clocks (NFU = 3: every clock; NFU = 1: every third clock). The
// start time of every instance inside a sample, START[i], is fixed when the
// design is elaborated: the first time, in the instance's slot, at which all
// its predecessor instances have delivered (unit latency LAT = 3, plus one
// clock to store the result). Each unit port has a share_mux selecting, by
// slot, the operands of the instance being served: primary-input arrival
// times, the result of a predecessor instance, and the instance's delay
// means and sigmas. Results are kept per instance in a short history
// (HD entries) so that a consumer starting later than II clocks after its
// producer still finds the same sample's value. mc_ssta_ctrl issues the
// samples and marks the results.
//
// Interface: set pi_at (primary input arrival times), mu and sigma (delay
// nominal values and sigmas, per instance, pins ordered 1a,1b,2a,2b,3a,3b
// of the pattern), pulse start with nsamples. Results stream out on out_at /
// out_delay (the larger of rise and fall) with out_valid, one every II clocks,
// the first LAT_END clocks after the first issue; done rises after the last.
//
// From the document: the sum/max delay model, the pattern P1 and its cover
// of the example circuit, one sample per iteration with a resource-bound
// initiation interval, pipelined units with initiation interval one, and
// input multiplexers for sharing. This design's own choices: the binding and
// slot assignment, the result history, the configuration ports (the document
// generated the engine with a C-to-hardware tool and gives no interface),
// fixed-point widths and all-INV pin phases by default. The netlist
// connectivity SRC must list instances in topological order.
module mc_ssta_top
  import ssta_pkg::*;
#(
  parameter int unsigned NFU   = 1,
  parameter int unsigned NINST = 3,
  parameter int unsigned NPI   = 10,
  // source of each instance port: < NPI a primary input, else NPI + instance
  parameter int unsigned SRC [NINST][4] = '{'{0, 1, 2, 3}, '{4, 5, 6, 7}, '{NPI + 0, 8, NPI + 1, 9}},
  parameter phase_e      PIN_PHASE [6]  = '{default: PH_INV},
  parameter logic [31:0] SEED           = 32'h0BAD_5EED,
  localparam int unsigned II = (NINST + NFU - 1) / NFU,
  localparam int unsigned SW = (II > 1) ? $clog2(II) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        nsamples,
  input  at_rf_t             pi_at [NPI],
  input  at_rf_t [5:0]       mu    [NINST],
  input  at_rf_t [5:0]       sigma [NINST],
  output logic               out_valid,
  output at_rf_t             out_at,
  output at_t                out_delay,
  output logic               busy,
  output logic               done,
  output logic [31:0]        n_done
);

  localparam int unsigned LAT = 3;  // pattern_fu latency

  function automatic int unsigned src_of(int i, int p);
    return SRC[i][p];
  endfunction

  function automatic int slot_of(int i);
    return i / NFU;
  endfunction

  function automatic int start_of(int idx);
    int st [NINST];
    int rdy, t, q;
    for (int i = 0; i < NINST; i++) begin
      rdy = 0;
      for (int p = 0; p < 4; p++) begin
        if (SRC[i][p] >= NPI) begin
          q = int'(SRC[i][p]) - int'(NPI);
          if (st[q] + int'(LAT) + 1 > rdy) rdy = st[q] + int'(LAT) + 1;
        end
      end
      // first clock not before rdy that falls in the instance's slot
      t = rdy + ((slot_of(i) - rdy % int'(II)) + int'(II)) % int'(II);
      st[i] = t;
    end
    return st[idx];
  endfunction

  // age (in samples) of the history entry that holds this sample's value
  function automatic int age_of(int i, int p);
    int q;
    q = int'(SRC[i][p]) - int'(NPI);
    return (start_of(i) - start_of(q) - int'(LAT) - 1) / int'(II);
  endfunction

  function automatic int hist_depth();
    int d;
    d = 1;
    for (int i = 0; i < NINST; i++)
      for (int p = 0; p < 4; p++)
        if (SRC[i][p] >= NPI && age_of(i, p) + 1 > d) d = age_of(i, p) + 1;
    return d;
  endfunction

  localparam int unsigned HD      = hist_depth();
  localparam int unsigned LAT_END = start_of(NINST - 1) + LAT + 1;

  // ---------------------------------------------------------------- control
  logic [SW-1:0] slot, out_slot;
  logic          issue;
  logic [31:0]   n_started;

  mc_ssta_ctrl #(.II(II), .LAT_END(LAT_END)) u_ctrl (
    .clk, .rst_n, .start, .nsamples, .slot, .issue, .out_valid,
    .busy, .done, .n_started, .n_done
  );

  // slot in which the operands now leaving the units were presented
  always_comb out_slot = SW'((int'(slot) + int'(II) - int'(LAT % II)) % int'(II));

  // ---------------------------------------------------- units and operands
  at_rf_t hist   [NINST][HD];
  at_rf_t fu_out [NFU];

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    fu_op_t cand [II];
    fu_op_t op;

    for (genvar c = 0; c < II; c++) begin : g_cand
      localparam int unsigned INST = c * NFU + f;
      if (INST < NINST) begin : g_used
        assign cand[c].mu    = mu[INST];
        assign cand[c].sigma = sigma[INST];
        for (genvar p = 0; p < 4; p++) begin : g_port
          localparam int unsigned SP = src_of(INST, p);
          if (SP < NPI) begin : g_pi
            assign cand[c].at[p] = pi_at[SP];
          end else begin : g_inst
            localparam int unsigned Q   = SP - NPI;
            localparam int unsigned AGE = age_of(INST, p);
            assign cand[c].at[p] = hist[Q][AGE];
          end
        end
      end else begin : g_idle
        assign cand[c] = '0;
      end
    end

    share_mux #(.N(II), .T(fu_op_t)) u_mux (.sel(slot), .in(cand), .out(op));

    pattern_fu #(.PIN_PHASE(PIN_PHASE), .SEED(SEED + 32'(f) * 32'h6A09_E667)) u_fu (
      .clk, .rst_n, .op, .at_out(fu_out[f])
    );
  end

  // -------------------------------------------------------- result history
  for (genvar i = 0; i < NINST; i++) begin : g_hist
    always_ff @(posedge clk)
      if (int'(out_slot) == slot_of(i)) begin
        hist[i][0] <= fu_out[i % NFU];
        for (int k = 1; k < HD; k++) hist[i][k] <= hist[i][k-1];
      end
  end

  assign out_at    = hist[NINST-1][0];
  assign out_delay = at_max(out_at.rise, out_at.fall);

endmodule
