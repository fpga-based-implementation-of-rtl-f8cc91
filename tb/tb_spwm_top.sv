// tb_spwm_top: end-to-end test of the three-phase SPWM generator at its
// default parameters, driving a behavioural model of the inverter and RL
// load (230 V bus, 10 ohm, 1 mH).
//
// After reset the test waits for the first output period to end (the load
// current settles within a few 100 us), then measures one full period,
// from one phase-counter wrap to the next, and checks against values worked
// out here:
//   - the period: 20973 samples at 2^20 Hz = 2000141.2 clocks at 100 MHz;
//   - the carrier period: exactly 10000 clocks (10 kHz);
//   - the three scaled sines: 0.86*sin(wt - pi - k*2pi/3), within 0.006;
//   - the duty cycle of each comparator output per carrier period:
//     (1 + s)/2 for the sine value s at mid-period, within 0.02;
//   - the gates: never both on in a leg, every dead band in the measured
//     period exactly 100 clocks unless pwm changed again inside it (a short
//     pulse near a carrier step, swallowed by the band);
//   - the fundamental of the phase current: m*VDC/2/|R + jwL| = 9.88 A
//     (less a few percent lost to the dead bands), within 6 %; phase b lagging
//     phase a by 120 degrees within 2 degrees; likewise the line voltage
//     a-b: sqrt(3)*m*VDC/2 = 171 V within 6 %.
// Every mechanism of the design is counted and must occur: carrier wrap,
// phase wrap, the offset stage's wrap-around, the CORDIC quadrant fold, dead
// bands, swallowed pulses and diode freewheeling. Prints the current's total harmonic
// distortion for information.
module tb_spwm_top;
  import spwm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam real    M       = 0.86;
  localparam real    VDC     = 230.0;
  localparam real    RL      = 10.0;
  localparam real    LL      = 1.0e-3;
  localparam real    F0      = 1_048_576.0 / 20973.0;         // output frequency
  localparam real    NPER    = 100.0e6 / F0;                  // clocks per period
  localparam int     DEAD    = 100;
  localparam real    SS      = 16384.0;

  logic [2:0] gate_hi, gate_lo, pwm;
  sig_t       carrier, sine [3];
  logic       carrier_wrap, phase_wrap;

  spwm_top dut (.clk, .rst_n, .gate_hi, .gate_lo, .pwm, .carrier, .sine,
                .carrier_wrap, .phase_wrap);

  real v_ph [3], v_ab, i_ph [3];
  int  freewheel;
  inverter_rl_model load (.clk, .gate_hi, .gate_lo, .v_ph, .v_ab, .i_ph, .freewheel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (4_600_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_carrier_wrap = 0, n_phase_wrap = 0, n_offset_wrap = 0, n_fold = 0;
  int n_dead = 0, n_freewheel = 0, n_swallow = 0;

  initial begin
    int     t, wraps = 0, last_cw = -1, last_pw = -1, t_cw = 0;
    int     hi_cnt [3], low_run [3], toggles [3];
    logic   pwm_prev [3];
    real    th, s_exp, d, worst_sine = 0.0;
    real    ca [3], sa [3], sq [3], cv = 0.0, sv = 0.0;
    real    amp, ph [3], i1, thd, vamp;
    angle_t a_prev [3];
    logic   measuring = 1'b0;

    for (int k = 0; k < 3; k++) begin
      hi_cnt[k] = 0; low_run[k] = 0; toggles[k] = 0; pwm_prev[k] = 1'b0; ca[k] = 0.0; sa[k] = 0.0; sq[k] = 0.0;
      a_prev[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    t = 0;
    while (wraps < 2) begin
      @(posedge clk);
      #1;
      t++;
      // ---- structural events, all the time ----
      for (int k = 0; k < 3; k++) begin
        check(!(gate_hi[k] && gate_lo[k]), $sformatf("leg %0d shoot-through at %0d", k, t));
        if (!gate_hi[k] && !gate_lo[k]) low_run[k]++;
        else begin
          if (low_run[k] > 0 && measuring) begin
            // one change of pwm: a plain dead band; several: a pulse
            // shorter than the band was swallowed and the band restarted
            if (toggles[k] == 1)
              check(low_run[k] == DEAD, $sformatf("leg %0d dead band %0d clocks", k, low_run[k]));
            else begin
              check(low_run[k] > DEAD && toggles[k] % 2 == 1,
                    $sformatf("leg %0d band %0d clocks, %0d changes", k, low_run[k], toggles[k]));
              n_swallow++;
            end
            n_dead++;
          end
          low_run[k] = 0;
          toggles[k] = 0;
        end
        if (pwm[k] != pwm_prev[k]) toggles[k]++;
        pwm_prev[k] = pwm[k];
        if (k > 0 && ((dut.a[k] > 0) != (a_prev[k] > 0)) &&
            (dut.a[k] - a_prev[k] > 400_000 || a_prev[k] - dut.a[k] > 400_000))
          n_offset_wrap++;
        if (dut.a[k] > angle_t'(to_fix(PI / 2.0, ANGLE_FRAC)) ||
            dut.a[k] < angle_t'(to_fix(-PI / 2.0, ANGLE_FRAC))) n_fold++;
        a_prev[k] = dut.a[k];
      end
      if (freewheel > 0) n_freewheel++;

      if (carrier_wrap) begin
        n_carrier_wrap++;
        if (last_cw >= 0) check(t - last_cw == 10_000, $sformatf("carrier period %0d", t - last_cw));
        if (measuring && last_cw >= 0) begin
          // duty of the last complete carrier period against the sine at its middle
          for (int k = 0; k < 3; k++) begin
            th = 2.0 * PI * (real'(t - t_cw) - 5000.0) / NPER - PI - real'(k) * 2.0 * PI / 3.0;
            s_exp = M * $sin(th);
            d = real'(hi_cnt[k]) / 10_000.0 - (1.0 + s_exp) / 2.0;
            check(d < 0.02 && d > -0.02,
                  $sformatf("phase %0d duty %f expected %f", k, real'(hi_cnt[k]) / 10_000.0,
                            (1.0 + s_exp) / 2.0));
          end
        end
        for (int k = 0; k < 3; k++) hi_cnt[k] = 0;
        last_cw = t;
      end
      for (int k = 0; k < 3; k++) hi_cnt[k] += int'(pwm[k]);

      if (phase_wrap) begin
        n_phase_wrap++;
        wraps++;
        if (last_pw >= 0)
          check(t - last_pw == 2_000_141 || t - last_pw == 2_000_142,
                $sformatf("output period %0d clocks", t - last_pw));
        last_pw = t;
        t_cw = t;
        measuring = (wraps == 1);
      end

      // ---- one output period of measurements ----
      if (measuring) begin
        th = 2.0 * PI * real'(t - t_cw) / NPER;
        for (int k = 0; k < 3; k++) begin
          s_exp = M * $sin(th - PI - real'(k) * 2.0 * PI / 3.0);
          d = real'(sine[k]) / SS - s_exp;
          if (d < 0.0) d = -d;
          if (d > worst_sine) worst_sine = d;
          if (t % 97 == 0) check(d < 0.006, $sformatf("sine %0d = %f expected %f", k,
                                                      real'(sine[k]) / SS, s_exp));
          ca[k] += i_ph[k] * $cos(th);
          sa[k] += i_ph[k] * $sin(th);
          sq[k] += i_ph[k] * i_ph[k];
        end
        cv += v_ab * $cos(th);
        sv += v_ab * $sin(th);
      end
    end

    // ---- fundamental of the load current and line voltage ----
    for (int k = 0; k < 3; k++) begin
      amp   = 2.0 * $sqrt(ca[k] * ca[k] + sa[k] * sa[k]) / NPER;
      ph[k] = $atan2(sa[k], ca[k]) * 180.0 / PI;
      i1    = M * VDC / 2.0 / $sqrt(RL * RL + (2.0 * PI * F0 * LL) ** 2);
      thd   = $sqrt(sq[k] / NPER - amp * amp / 2.0) / (amp / $sqrt(2.0));
      $display("phase %0d current: fundamental %f A (ideal %f), phase %f deg, THD %f %%",
               k, amp, i1, ph[k], 100.0 * thd);
      check(amp > 0.94 * i1 && amp < 1.03 * i1, $sformatf("phase %0d current amplitude %f", k, amp));
    end
    for (int k = 1; k < 3; k++) begin
      d = ph[k] - ph[0] - 120.0 * real'(k);
      while (d > 180.0) d -= 360.0;
      while (d < -180.0) d += 360.0;
      check(d < 2.0 && d > -2.0, $sformatf("phase %0d lags by %f deg", k, ph[k] - ph[0]));
    end
    vamp = 2.0 * $sqrt(cv * cv + sv * sv) / NPER;
    $display("line voltage a-b fundamental %f V (ideal %f)", vamp, $sqrt(3.0) * M * VDC / 2.0);
    check(vamp > 0.94 * $sqrt(3.0) * M * VDC / 2.0 && vamp < 1.03 * $sqrt(3.0) * M * VDC / 2.0,
          "line voltage amplitude");
    $display("largest sine error %f", worst_sine);

    $display("mechanisms: carrier wraps %0d, phase wraps %0d, offset wraps %0d, CORDIC folds %0d, dead bands %0d, swallowed pulses %0d, freewheel clocks %0d",
             n_carrier_wrap, n_phase_wrap, n_offset_wrap, n_fold, n_dead, n_swallow, n_freewheel);
    check(n_carrier_wrap > 0, "carrier wrap never happened");
    check(n_phase_wrap > 0, "phase wrap never happened");
    check(n_offset_wrap > 0, "offset wrap-around never happened");
    check(n_fold > 0, "CORDIC quadrant fold never happened");
    check(n_dead > 0, "dead band never happened");
    check(n_freewheel > 0, "diode freewheeling never happened");
    check(n_swallow > 0, "pulse swallowing by the dead band never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
