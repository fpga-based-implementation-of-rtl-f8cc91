// tb_cordic_sincos: feeds a new angle every clock (the end points -pi,
// -pi/2, 0, pi/2, pi, then random angles in [-pi, pi]) and compares the
// outputs, exactly ITER + 1 = 11 clocks later, with $sin/$cos. Tolerance
// 0.003 (the 10-step CORDIC error is about 0.002). Also checks that the
// output is still the old value one clock before the expected latency.
module tb_cordic_sincos;
  import spwm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, folds = 0;
  always #5 clk = ~clk;

  localparam int  LAT = 11;
  localparam real SA  = 131072.0;   // angle scale
  localparam real SS  = 16384.0;    // sine scale

  angle_t theta;
  sig_t   s, c;
  cordic_sincos dut (.clk, .rst_n, .theta, .sin_o(s), .cos_o(c));

  real hist [LAT+1];
  real worst = 0.0;

  task automatic check_val(input sig_t got, input real exp, input string what);
    real d = real'(got) / SS - exp;
    if (d < 0.0) d = -d;
    if (d > worst) worst = d;
    checks++;
    if (d > 0.003) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %f exp %f", what, real'(got) / SS, exp);
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
    real p, a;
    theta = '0;
    for (int k = 0; k <= LAT; k++) hist[k] = 0.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // latency: hold 0, step to pi/2 once, watch the sine rise exactly LAT clocks later
    repeat (LAT + 2) @(posedge clk);
    @(negedge clk);
    theta = angle_t'(longint'(PI / 2.0 * SA));
    for (int k = 1; k <= LAT + 1; k++) begin
      @(posedge clk);
      #1;
      if (k == LAT) begin
        checks++;
        if (!(s > 16000)) begin failures++; $display("FAIL: no result after %0d clocks", LAT); end
      end else if (k == LAT - 1) begin
        checks++;
        if (!(s < 100 && s > -100)) begin failures++; $display("FAIL: result before %0d clocks", LAT); end
      end
    end
    for (int i = 0; i < 20_000 + LAT; i++) begin
      @(negedge clk);
      case (i)
        0: p = -PI;
        1: p = -PI / 2.0;
        2: p = 0.0;
        3: p = PI / 2.0;
        4: p = PI;
        default: p = (real'($urandom_range(0, 1_000_000)) / 500_000.0 - 1.0) * PI;
      endcase
      theta = angle_t'(longint'(p * SA));
      for (int k = LAT; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = real'(theta) / SA;
      @(posedge clk);
      #1;
      if (i >= LAT) begin
        a = hist[LAT - 1];
        if (a > PI / 2.0 || a < -PI / 2.0) folds++;
        check_val(s, $sin(a), $sformatf("sin(%f)", a));
        check_val(c, $cos(a), $sformatf("cos(%f)", a));
      end
    end
    checks++;
    if (folds == 0) begin failures++; $display("FAIL: quadrant fold never exercised"); end
    $display("largest error %f, folded angles %0d", worst, folds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
