// gate_node: arrival-time evaluation of one 2-input logic cell under the
// separate rise/fall delay model, registered (latency one cycle, a new
// evaluation accepted every cycle).
//
// For each input pin the output arrival time contributed by that pin is the
// sum of an input arrival time and the pin's pin-to-output delay:
//   INV     : rise = AT.fall + D.rise,  fall = AT.rise + D.fall
//   NONINV  : rise = AT.rise + D.rise,  fall = AT.fall + D.fall
//   UNKNOWN : the larger of the INV and NONINV results, separately for
//             rise and fall (two sums and one max per output edge)
// The output rise (fall) arrival time is the maximum over the two pins.
// This is the sum/max formulation of the document, with the pin phases fixed
// by parameters because a cell's unateness is known when the netlist is
// mapped. Saturating addition is this design's choice.
//
// Ports: at_a/at_b are the pin arrival times, dly_a/dly_b the rise/fall
// pin-to-output delays; at_out is valid one clock after the inputs.
module gate_node
  import ssta_pkg::*;
#(
  parameter phase_e PHASE_A = PH_INV,
  parameter phase_e PHASE_B = PH_INV
) (
  input  logic   clk,
  input  at_rf_t at_a,
  input  at_rf_t at_b,
  input  at_rf_t dly_a,
  input  at_rf_t dly_b,
  output at_rf_t at_out
);

  function automatic at_rf_t pin_arrival(phase_e ph, at_rf_t at, at_rf_t d);
    at_rf_t inv, non, r;
    inv.rise = sat_add(at.fall, d.rise);
    inv.fall = sat_add(at.rise, d.fall);
    non.rise = sat_add(at.rise, d.rise);
    non.fall = sat_add(at.fall, d.fall);
    unique case (ph)
      PH_INV:    r = inv;
      PH_NONINV: r = non;
      default: begin
        r.rise = at_max(inv.rise, non.rise);
        r.fall = at_max(inv.fall, non.fall);
      end
    endcase
    return r;
  endfunction

  at_rf_t pa, pb, nxt;

  always_comb begin
    pa       = pin_arrival(PHASE_A, at_a, dly_a);
    pb       = pin_arrival(PHASE_B, at_b, dly_b);
    nxt.rise = at_max(pa.rise, pb.rise);
    nxt.fall = at_max(pa.fall, pb.fall);
  end

  always_ff @(posedge clk) at_out <= nxt;

endmodule
