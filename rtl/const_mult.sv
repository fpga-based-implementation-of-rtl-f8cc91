// const_mult: multiplication of a fixed-point signal by a constant gain.
//
// y = round(x * GAIN), with x read as a signed number with IN_FRAC fractional
// bits and y written with OUT_FRAC fractional bits, saturated to OUT_W bits.
// The gain is quantised to K = round(GAIN * 2^K_FRAC); the product is then
// shifted right by K_FRAC + IN_FRAC - OUT_FRAC with rounding (half up).
// The modulator uses it as the carrier scale 1/100, as the counts-to-radians
// gain of the phase counter and as the modulation index 0.86 on each sine.
//
// Interface: x in, y out. Timing: one register, latency 1 clock.
// Which gains are used follows the source design; the quantisation, rounding
// and saturation are this design's choice. GAIN must not be negative.
module const_mult #(
  parameter int  IN_W     = 16,
  parameter int  IN_FRAC  = 14,
  parameter int  OUT_W    = 16,
  parameter int  OUT_FRAC = 14,
  parameter real GAIN     = 0.86,
  parameter int  K_FRAC   = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  localparam longint K    = longint'(GAIN * (2.0 ** K_FRAC));
  localparam int     SH   = K_FRAC + IN_FRAC - OUT_FRAC;
  localparam longint YMAX = (64'sd1 <<< (OUT_W - 1)) - 1;
  localparam longint YMIN = -(64'sd1 <<< (OUT_W - 1));

  if (SH < 1 || SH > 60) begin : g_bad_shift
    $error("const_mult: K_FRAC + IN_FRAC - OUT_FRAC must lie in 1..60");
  end
  if (GAIN < 0.0) begin : g_bad_gain
    $error("const_mult: GAIN must not be negative");
  end

  longint prod, rnd;

  always_comb begin
    prod = longint'(x) * K;
    rnd  = (prod + (64'sd1 <<< (SH - 1))) >>> SH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           y <= '0;
    else if (rnd > YMAX)  y <= OUT_W'(YMAX);
    else if (rnd < YMIN)  y <= OUT_W'(YMIN);
    else                  y <= OUT_W'(rnd);
  end
endmodule
