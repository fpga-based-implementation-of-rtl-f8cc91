// tb_spwm_top_triangle: the SPWM generator with a symmetric triangle carrier
// and no dead band (TRIANGLE = 1, DEAD_CYCLES = 0: the gates are just the
// comparator output and its inverse), driving the inverter/RL-load model.
//
// The carrier counter steps at 3.98 MHz, so its 398-step up/down period is
// 10 kHz (10000 clocks, +-1 because the steps are 25 or 26 clocks apart).
// After the first output period, one full period is measured and checked:
//   - every carrier period 9999..10001 clocks;
//   - duty of each comparator output per carrier period within 0.02 of
//     (1 + s)/2, s the sine at mid-period (the same law as for the ramp);
//   - gate_hi equals pwm one clock later and gate_lo is its inverse;
//   - phase-current fundamental within 4 % of m*VDC/2/|R + jwL| = 9.89 A
//     (no dead band, so close to ideal), phases b, c lagging by 120, 240 deg.
// Counts the triangle's turning points at the top and bottom and requires both.
module tb_spwm_top_triangle;
  import spwm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam real M    = 0.86;
  localparam real VDC  = 230.0;
  localparam real RL   = 10.0;
  localparam real LL   = 1.0e-3;
  localparam real F0   = 1_048_576.0 / 20973.0;
  localparam real NPER = 100.0e6 / F0;
  localparam real SS   = 16384.0;

  logic [2:0] gate_hi, gate_lo, pwm;
  sig_t       carrier, sine [3];
  logic       carrier_wrap, phase_wrap;

  spwm_top #(.TRIANGLE(1'b1), .DEAD_CYCLES(0), .F_CARRIER_TICK(3_980_000)) dut (
    .clk, .rst_n, .gate_hi, .gate_lo, .pwm, .carrier, .sine, .carrier_wrap, .phase_wrap);

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

  initial begin
    int     t, wraps, last_cw, t_pw, n_top, n_bottom;
    int     hi_cnt [3];
    real    th, s_exp, d, amp, i1;
    real    ca [3], sa [3], ph [3];
    logic [2:0] pwm_d;
    sig_t   c_prev, c_prev2;
    logic   measuring;

    t = 0; wraps = 0; last_cw = -1; t_pw = 0; n_top = 0; n_bottom = 0;
    measuring = 1'b0; pwm_d = '0; c_prev = '0; c_prev2 = '0;
    for (int k = 0; k < 3; k++) begin
      hi_cnt[k] = 0; ca[k] = 0.0; sa[k] = 0.0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (wraps < 2) begin
      @(posedge clk);
      #1;
      t++;
      // turning points of the carrier
      if (carrier != c_prev) begin
        if (c_prev > c_prev2 && carrier < c_prev) n_top++;
        if (c_prev < c_prev2 && carrier > c_prev) n_bottom++;
        c_prev2 = c_prev;
        c_prev  = carrier;
      end
      if (t > 20) begin
        for (int k = 0; k < 3; k++)
          check(gate_hi[k] == pwm_d[k] && gate_lo[k] == !pwm_d[k],
                $sformatf("leg %0d gates do not follow pwm at %0d", k, t));
      end
      pwm_d = pwm;

      if (carrier_wrap) begin
        if (last_cw >= 0)
          check(t - last_cw >= 9_999 && t - last_cw <= 10_001,
                $sformatf("triangle carrier period %0d", t - last_cw));
        if (measuring && last_cw >= 0) begin
          for (int k = 0; k < 3; k++) begin
            th = 2.0 * PI * (real'(t - t_pw) - 5000.0) / NPER - PI - real'(k) * 2.0 * PI / 3.0;
            s_exp = M * $sin(th);
            d = real'(hi_cnt[k]) / real'(t - last_cw) - (1.0 + s_exp) / 2.0;
            check(d < 0.02 && d > -0.02, $sformatf("phase %0d duty off by %f", k, d));
          end
        end
        for (int k = 0; k < 3; k++) hi_cnt[k] = 0;
        last_cw = t;
      end
      for (int k = 0; k < 3; k++) hi_cnt[k] += int'(pwm[k]);

      if (phase_wrap) begin
        wraps++;
        t_pw = t;
        measuring = (wraps == 1);
      end
      if (measuring) begin
        th = 2.0 * PI * real'(t - t_pw) / NPER;
        for (int k = 0; k < 3; k++) begin
          ca[k] += i_ph[k] * $cos(th);
          sa[k] += i_ph[k] * $sin(th);
        end
      end
    end

    i1 = M * VDC / 2.0 / $sqrt(RL * RL + (2.0 * PI * F0 * LL) ** 2);
    for (int k = 0; k < 3; k++) begin
      amp   = 2.0 * $sqrt(ca[k] * ca[k] + sa[k] * sa[k]) / NPER;
      ph[k] = $atan2(sa[k], ca[k]) * 180.0 / PI;
      $display("phase %0d current: fundamental %f A (ideal %f), phase %f deg", k, amp, i1, ph[k]);
      check(amp > 0.96 * i1 && amp < 1.04 * i1, $sformatf("phase %0d current amplitude %f", k, amp));
    end
    for (int k = 1; k < 3; k++) begin
      d = ph[k] - ph[0] - 120.0 * real'(k);
      while (d > 180.0) d -= 360.0;
      while (d < -180.0) d += 360.0;
      check(d < 2.0 && d > -2.0, $sformatf("phase %0d lags by %f deg", k, ph[k] - ph[0]));
    end
    $display("carrier turning points: top %0d, bottom %0d", n_top, n_bottom);
    check(n_top > 0 && n_bottom > 0, "triangle turning points never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
