// share_mux: N-to-1 operand multiplexer in front of a shared functional
// unit port.
//
// When N pattern instances share one functional unit, each unit port needs a
// multiplexer that presents the operands of the instance served in the
// current schedule slot; its cost grows with N and the operand width, which
// is what the resource model charges for sharing. sel is the slot number
// (0..N-1); out = in[sel], purely combinational. The multiplexer itself
// follows the sharing scheme; giving in[0] for an out-of-range select and
// making the operand type a parameter are this design's choices.
module share_mux #(
  parameter int unsigned N = 3,
  parameter type         T = logic [15:0],
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [SW-1:0] sel,
  input  T              in [N],
  output T              out
);

  always_comb begin
    out = in[0];
    for (int i = 1; i < N; i++)
      if (int'(sel) == i) out = in[i];
  end

endmodule
