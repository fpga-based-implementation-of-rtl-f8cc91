// spwm_pkg: number formats and constants shared by the SPWM datapath.
//
// Two fixed-point formats run through the design:
//   angle_t  20-bit signed radians with 17 fractional bits (range +-4 rad),
//            used from the phase gain through the 120-degree offset stage
//            into the CORDIC units;
//   sig_t    16-bit signed values with 14 fractional bits (range +-2),
//            used for the sines, the scaled sines and the carrier, so that
//            the comparators see both operands in one format.
// The formats are this design's choice; the source model works in the
// fixed-point types of its block library and does not print them.
package spwm_pkg;

  localparam int ANGLE_W    = 20;
  localparam int ANGLE_FRAC = 17;
  localparam int SIG_W      = 16;
  localparam int SIG_FRAC   = 14;

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [ANGLE_W-1:0] angle_t;
  typedef logic signed [SIG_W-1:0]   sig_t;

  // Nearest integer to v * 2^frac (real to integer casts round to nearest).
  function automatic longint to_fix(input real v, input int frac);
    return longint'(v * (2.0 ** frac));
  endfunction

endpackage
