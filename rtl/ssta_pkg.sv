// ssta_pkg: types, constants and arithmetic helpers shared by the Monte Carlo
// static-timing datapath.
//
// Arrival times and pin-to-output delays are unsigned fixed-point numbers of
// AT_W bits in an arbitrary time unit; every value is carried as a rise/fall
// pair because the delay model keeps separate rising and falling times.
// Standard Gaussian samples are signed Q(Z_W-Z_FRAC).Z_FRAC numbers.
// Additions saturate at the largest arrival time so that a long path can
// never wrap around and look short. The widths are this design's choice; the
// rise/fall pairing and the three pin phases follow the separate rise-fall
// delay model.
package ssta_pkg;

  localparam int unsigned AT_W   = 16;  // arrival time / delay width
  localparam int unsigned Z_W    = 16;  // Gaussian sample width
  localparam int unsigned Z_FRAC = 12;  // fractional bits of a Gaussian sample

  typedef logic [AT_W-1:0]       at_t;
  typedef logic signed [Z_W-1:0] z_t;

  // A rise/fall pair: an arrival time pair or a delay pair.
  typedef struct packed {
    at_t rise;
    at_t fall;
  } at_rf_t;

  // Pin phase: negative unate, positive unate or binate input.
  typedef enum logic [1:0] {
    PH_INV     = 2'd0,
    PH_NONINV  = 2'd1,
    PH_UNKNOWN = 2'd2
  } phase_e;

  // Operand bundle of one pattern-P1 functional unit: the arrival times at
  // its four input ports and the nominal value and sigma of its six
  // pin-to-output delays (node 1 pins a,b; node 2 pins a,b; node 3 pins a,b).
  typedef struct packed {
    at_rf_t [3:0] at;
    at_rf_t [5:0] mu;
    at_rf_t [5:0] sigma;
  } fu_op_t;

  function automatic at_t sat_add(at_t a, at_t b);
    logic [AT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[AT_W] ? {AT_W{1'b1}} : s[AT_W-1:0];
  endfunction

  function automatic at_t at_max(at_t a, at_t b);
    return (a > b) ? a : b;
  endfunction

endpackage
