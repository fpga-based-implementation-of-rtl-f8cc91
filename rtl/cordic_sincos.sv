// cordic_sincos: pipelined CORDIC giving the sine and cosine of an angle.
//
// Rotation-mode CORDIC. The input angle theta (radians, spwm_pkg::angle_t,
// range [-pi, pi]) is first folded into [-pi/2, pi/2] by adding or
// subtracting pi, which negates both results. The vector (1/G, 0), G being
// the CORDIC gain of ITER steps, is then rotated by ITER micro-rotations of
// +-atan(2^-i), each chosen by the sign of the remaining angle, one per
// pipeline stage. After the last stage x = cos and y = sin (folded back),
// rounded to spwm_pkg::sig_t (14 fractional bits).
//
// The source design uses a vendor CORDIC SINCOS block with one angle input
// and sine/cosine outputs, and its diagram marks the block with an 11-cycle
// delay. Here the fold stage plus ITER = 10 rotation stages give that same
// latency of ITER + 1 clocks; the rest of the arithmetic (guard bits, 10
// iterations, about 1e-3 accuracy) is this design's choice.
//
// Interface: theta in, sin_o / cos_o out; a new angle may enter every clock.
// Timing: latency ITER + 1 clocks.
module cordic_sincos
  import spwm_pkg::*;
#(
  parameter int ITER  = 10,
  parameter int GUARD = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  angle_t theta,
  output sig_t   sin_o,
  output sig_t   cos_o
);
  localparam int XF = SIG_FRAC + GUARD;          // fractional bits of x, y
  localparam int XW = SIG_W + GUARD + 1;         // width of x, y
  localparam int ZW = ANGLE_W + 1;               // width of the residual angle

  typedef logic signed [XW-1:0] xy_t;
  typedef logic signed [ZW-1:0] z_t;
  typedef z_t atan_tab_t [ITER];

  function automatic atan_tab_t make_atan();
    atan_tab_t t;
    for (int i = 0; i < ITER; i++) t[i] = z_t'(to_fix($atan(2.0 ** (-i)), ANGLE_FRAC));
    return t;
  endfunction

  function automatic real inv_gain();
    real k = 1.0;
    for (int i = 0; i < ITER; i++) k = k / $sqrt(1.0 + 2.0 ** (-2 * i));
    return k;
  endfunction

  localparam atan_tab_t ATAN  = make_atan();
  localparam xy_t       X0    = xy_t'(to_fix(inv_gain(), XF));
  localparam z_t        PI_Q  = z_t'(to_fix(PI, ANGLE_FRAC));
  localparam z_t        HPI_Q = z_t'(to_fix(PI / 2.0, ANGLE_FRAC));

  xy_t  x [ITER+1];
  xy_t  y [ITER+1];
  z_t   z [ITER+1];
  logic neg [ITER+1];

  // Stage 0: fold the angle into [-pi/2, pi/2].
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; neg[0] <= 1'b0;
    end else begin
      x[0] <= X0;
      y[0] <= '0;
      if (z_t'(theta) > HPI_Q) begin
        z[0] <= z_t'(theta) - PI_Q;  neg[0] <= 1'b1;
      end else if (z_t'(theta) < -HPI_Q) begin
        z[0] <= z_t'(theta) + PI_Q;  neg[0] <= 1'b1;
      end else begin
        z[0] <= z_t'(theta);         neg[0] <= 1'b0;
      end
    end
  end

  // Stages 1..ITER: one micro-rotation each.
  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[i+1] <= '0; y[i+1] <= '0; z[i+1] <= '0; neg[i+1] <= 1'b0;
      end else begin
        neg[i+1] <= neg[i];
        if (z[i] >= 0) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - ATAN[i];
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + ATAN[i];
        end
      end
    end
  end

  // Undo the fold, round to the output format.
  function automatic sig_t to_sig(input xy_t v, input logic n);
    xy_t s = n ? -v : v;
    xy_t r = (s + (xy_t'(1) <<< (GUARD - 1))) >>> GUARD;
    return sig_t'(r);
  endfunction

  assign sin_o = to_sig(y[ITER], neg[ITER]);
  assign cos_o = to_sig(x[ITER], neg[ITER]);
endmodule
