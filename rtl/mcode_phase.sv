// mcode_phase: the 120-degree offset stage in front of the three sine units.
//
// From the phase angle phi it forms the three angles
//   a1 = phi,  a2 = wrap(phi - phi1),  a3 = wrap(phi - phi2)
// where phi1 and phi2 are the offsets (fed in by the top as constants:
// 2*pi/3 and -2*pi/3, the latter standing for 4*pi/3, which does not fit
// the angle format) and wrap() adds or subtracts 2*pi once to bring the
// result back into [-pi, pi], the input range of the CORDIC units. With phi
// and the offsets in [-pi, pi] one correction always suffices.
//
// The source design does this in a small scripted block with the phase and
// two constants as inputs and three angles as outputs; its code is not
// given. Subtracting the offsets (so phase b lags phase a by 120 degrees and
// phase c by 240) is this design's choice.
//
// Interface: angles in spwm_pkg::angle_t (radians, 17 fractional bits).
// Timing: one register, latency 1 clock.
module mcode_phase
  import spwm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  angle_t phi,
  input  angle_t phi1,
  input  angle_t phi2,
  output angle_t a1,
  output angle_t a2,
  output angle_t a3
);
  typedef logic signed [ANGLE_W+1:0] wide_t;   // room for phi - 2*pi

  localparam wide_t PI_Q     = wide_t'(to_fix(PI, ANGLE_FRAC));
  localparam wide_t TWO_PI_Q = wide_t'(to_fix(2.0 * PI, ANGLE_FRAC));

  function automatic angle_t wrap(input wide_t v);
    if (v > PI_Q)       return angle_t'(v - TWO_PI_Q);
    else if (v < -PI_Q) return angle_t'(v + TWO_PI_Q);
    else                return angle_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1 <= '0;
      a2 <= '0;
      a3 <= '0;
    end else begin
      a1 <= phi;
      a2 <= wrap(wide_t'(phi) - wide_t'(phi1));
      a3 <= wrap(wide_t'(phi) - wide_t'(phi2));
    end
  end
endmodule
