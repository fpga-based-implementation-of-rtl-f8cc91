// tb_mcode_phase: random phase angles in [-pi, pi] with the offsets 2*pi/3
// and -2*pi/3 (the latter the in-range form of 4*pi/3); each output is compared, one clock later, with the offset
// angle worked out in real arithmetic and wrapped into [-pi, pi]
// (tolerance 2 LSB). Counts how often each offset output had to wrap.
module tb_mcode_phase;
  import spwm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, wraps2 = 0, wraps3 = 0;
  always #5 clk = ~clk;

  localparam real SC = 131072.0;   // 2^17

  angle_t phi, phi1, phi2, a1, a2, a3;
  mcode_phase dut (.clk, .rst_n, .phi, .phi1, .phi2, .a1, .a2, .a3);

  function automatic real wrap(input real v);
    if (v > PI) return v - 2.0 * PI;
    if (v < -PI) return v + 2.0 * PI;
    return v;
  endfunction

  task automatic check_angle(input angle_t got, input real exp, input string what);
    real g = real'(got) / SC;
    real d = g - exp;
    // an angle of +pi and one of -pi are the same angle
    if (d > PI) d -= 2.0 * PI;
    if (d < -PI) d += 2.0 * PI;
    checks++;
    if (d * SC > 2.0 || d * SC < -2.0 || g > PI + 2.0 / SC || g < -PI - 2.0 / SC) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %f exp %f", what, g, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p;
    phi  = '0;
    phi1 = angle_t'(longint'(2.0 * PI / 3.0 * SC));
    phi2 = angle_t'(longint'(-2.0 * PI / 3.0 * SC));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 20_000; i++) begin
      @(negedge clk);
      if (i < 4) p = (i % 2 == 0) ? PI : -PI;          // end points first
      else p = (real'($urandom_range(0, 1_000_000)) / 500_000.0 - 1.0) * PI;
      phi = angle_t'(longint'(p * SC));
      p = real'(phi) / SC;
      @(posedge clk);
      #1;
      if (p - 2.0 * PI / 3.0 < -PI) wraps2++;
      if (p + 2.0 * PI / 3.0 > PI) wraps3++;
      check_angle(a1, p, "a1");
      check_angle(a2, wrap(p - 2.0 * PI / 3.0), "a2");
      check_angle(a3, wrap(p - 4.0 * PI / 3.0), "a3");
    end
    checks++;
    if (wraps2 == 0 || wraps3 == 0) begin
      failures++;
      $display("FAIL: wrap-around never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
