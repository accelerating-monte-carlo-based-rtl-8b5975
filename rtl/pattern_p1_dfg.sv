// pattern_p1_dfg: pipelined data flow graph of pattern P1, the three-cell
// pattern in which cells 1 and 2 drive the two pins of cell 3.
//
// Cells 1 and 2 are evaluated in the first pipeline stage and cell 3 in the
// second, so the unit accepts one evaluation per clock (initiation interval
// one) and answers two clocks later. Each cell is a gate_node: one sum per
// pin (two for a binate pin) followed by a max, as in the pattern's data flow
// graph. The delays of cell 3 arrive with the other operands and are held
// one stage so that they meet the cell 1/2 results.
//
// Ports: at_in[0..1] drive pins a,b of cell 1 and at_in[2..3] pins a,b of
// cell 2; dly[0..5] are the rise/fall delays of pins 1a,1b,2a,2b,3a,3b.
// at_out is the arrival time at the output of cell 3. PIN_PHASE gives the
// phase of the six pins in the same order (all INV, as for a NOR2 cell, by
// default; the cell types are not fixed by the pattern's drawing).
module pattern_p1_dfg
  import ssta_pkg::*;
#(
  parameter phase_e PIN_PHASE [6] = '{default: PH_INV}
) (
  input  logic         clk,
  input  at_rf_t [3:0] at_in,
  input  at_rf_t [5:0] dly,
  output at_rf_t       at_out
);

  at_rf_t n1, n2;
  at_rf_t [1:0] dly3_q;

  gate_node #(.PHASE_A(PIN_PHASE[0]), .PHASE_B(PIN_PHASE[1])) u_n1 (
    .clk, .at_a(at_in[0]), .at_b(at_in[1]), .dly_a(dly[0]), .dly_b(dly[1]), .at_out(n1)
  );

  gate_node #(.PHASE_A(PIN_PHASE[2]), .PHASE_B(PIN_PHASE[3])) u_n2 (
    .clk, .at_a(at_in[2]), .at_b(at_in[3]), .dly_a(dly[2]), .dly_b(dly[3]), .at_out(n2)
  );

  always_ff @(posedge clk) dly3_q <= dly[5:4];

  gate_node #(.PHASE_A(PIN_PHASE[4]), .PHASE_B(PIN_PHASE[5])) u_n3 (
    .clk, .at_a(n1), .at_b(n2), .dly_a(dly3_q[0]), .dly_b(dly3_q[1]), .at_out(at_out)
  );

endmodule
