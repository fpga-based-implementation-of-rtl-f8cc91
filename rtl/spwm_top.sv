// spwm_top: three-phase sinusoidal PWM generator for a two-level inverter.
//
// Two chains meet at three comparators. The carrier chain is a sample-rate
// enable, an 8-bit counter from -100 and a gain of 1/100, giving a ramp
// carrier from -1 to +1 at 10 kHz. The sine chain is a 2^20 Hz enable, a
// 20-bit counter sweeping -10486..+10486 (one sweep = 20 ms), a gain turning
// counts into radians (-pi..pi), an offset stage making three angles 120
// degrees apart, three CORDIC sine units and a gain of 0.86 (the modulation
// index) on each sine. Each comparator raises pwm[k] while sine k is above
// the carrier; a dead-time stage turns pwm[k] into the upper and lower gate
// signals of inverter leg k.
//
// The block structure, the counter widths and ranges, the 1/100 and 0.86
// gains, the 100 MHz clock and the 2^-20 s sample period follow the source
// design. Its phase gain is 1 on a counter whose number format it does not
// show; here the counter is an integer and the gain is pi/10486. The 2 MHz
// carrier step rate (for 10 kHz with 200 steps), the number formats, the
// "sine above carrier" polarity and the 1 us dead band are this design's own.
//
// Interface: clk (F_CLK), active-low asynchronous reset rst_n. Outputs:
// gate_hi/gate_lo, the six switch commands (leg k = phase k); pwm, the raw
// comparator outputs; carrier and sine[0..2], the compared signals (sig_t,
// 14 fractional bits) for observation; carrier_wrap and phase_wrap, one-clock
// pulses at the start of each carrier period and each output period.
// Timing: free-running after reset; the sine path has a latency of 16 clocks
// (160 ns) from a phase step to the comparator output, a negligible phase lag
// at 50 Hz.
module spwm_top
  import spwm_pkg::*;
#(
  parameter longint F_CLK          = 100_000_000,
  parameter longint F_PHASE_TICK   = 1_048_576,   // 1/Ts, Ts = 2^-20 s
  parameter longint F_CARRIER_TICK = 2_000_000,   // 200 steps x 10 kHz
  parameter int     CARRIER_W      = 8,
  parameter int     CARRIER_INIT   = -100,
  parameter int     CARRIER_MAX    = 99,
  parameter bit     TRIANGLE       = 1'b0,
  parameter real    CARRIER_GAIN   = 0.01,
  parameter int     PHASE_W        = 20,
  parameter int     PHASE_HALF     = 10486,
  parameter real    MOD_INDEX      = 0.86,
  parameter real    PHI1           = 2.0 * 3.14159265358979323846 / 3.0,
  parameter real    PHI2           = -2.0 * 3.14159265358979323846 / 3.0,
  parameter int     CORDIC_ITER    = 10,
  parameter int     DEAD_CYCLES    = 100
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [2:0] gate_hi,
  output logic [2:0] gate_lo,
  output logic [2:0] pwm,
  output sig_t       carrier,
  output sig_t       sine [3],
  output logic       carrier_wrap,
  output logic       phase_wrap
);
  // ---------------- carrier chain ----------------
  logic                        carrier_tick;
  logic signed [CARRIER_W-1:0] carrier_count;

  tick_gen #(.F_CLK(F_CLK), .F_TICK(F_CARRIER_TICK)) u_carrier_tick (
    .clk, .rst_n, .tick(carrier_tick));

  carrier_counter #(.W(CARRIER_W), .INIT(CARRIER_INIT), .MAX(CARRIER_MAX),
                    .TRIANGLE(TRIANGLE)) u_counter1 (
    .clk, .rst_n, .en(carrier_tick), .count(carrier_count), .wrap(carrier_wrap));

  const_mult #(.IN_W(CARRIER_W), .IN_FRAC(0), .OUT_W(SIG_W), .OUT_FRAC(SIG_FRAC),
               .GAIN(CARRIER_GAIN)) u_cmult (
    .clk, .rst_n, .x(carrier_count), .y(carrier));

  // ---------------- sine chain ----------------
  logic                      phase_tick;
  logic signed [PHASE_W-1:0] phase_count;
  angle_t                    phi, a [3];
  sig_t                      s [3];

  tick_gen #(.F_CLK(F_CLK), .F_TICK(F_PHASE_TICK)) u_phase_tick (
    .clk, .rst_n, .tick(phase_tick));

  phase_counter #(.W(PHASE_W), .HALF(PHASE_HALF)) u_counter2 (
    .clk, .rst_n, .en(phase_tick), .count(phase_count), .wrap(phase_wrap));

  const_mult #(.IN_W(PHASE_W), .IN_FRAC(0), .OUT_W(ANGLE_W), .OUT_FRAC(ANGLE_FRAC),
               .GAIN(PI / real'(PHASE_HALF)), .K_FRAC(30)) u_cmult1 (
    .clk, .rst_n, .x(phase_count), .y(phi));

  localparam angle_t PHI1_Q = angle_t'(to_fix(PHI1, ANGLE_FRAC));
  localparam angle_t PHI2_Q = angle_t'(to_fix(PHI2, ANGLE_FRAC));

  mcode_phase u_mcode (
    .clk, .rst_n, .phi, .phi1(PHI1_Q), .phi2(PHI2_Q),
    .a1(a[0]), .a2(a[1]), .a3(a[2]));

  // ---------------- per phase: sine, scaling, comparison, gates ----------------
  for (genvar k = 0; k < 3; k++) begin : g_phase
    sig_t cos_unused;

    cordic_sincos #(.ITER(CORDIC_ITER)) u_cordic (
      .clk, .rst_n, .theta(a[k]), .sin_o(s[k]), .cos_o(cos_unused));

    const_mult #(.IN_W(SIG_W), .IN_FRAC(SIG_FRAC), .OUT_W(SIG_W), .OUT_FRAC(SIG_FRAC),
                 .GAIN(MOD_INDEX)) u_cmult_m (
      .clk, .rst_n, .x(s[k]), .y(sine[k]));

    relational_cmp u_relational (
      .clk, .rst_n, .a(sine[k]), .b(carrier), .pwm(pwm[k]));

    dead_time #(.DEAD(DEAD_CYCLES)) u_dead (
      .clk, .rst_n, .pwm(pwm[k]), .gate_hi(gate_hi[k]), .gate_lo(gate_lo[k]));
  end
endmodule
