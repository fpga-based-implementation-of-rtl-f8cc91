// tb_const_mult: checks the three gains of the modulator (carrier 1/100,
// counts to radians pi/10486, modulation index 0.86) and saturation, each
// with random inputs, against the product worked out in real arithmetic,
// one clock later. Tolerance: one output LSB.
module tb_const_mult;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, sats = 0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979323846;

  logic signed [7:0]  xc;  logic signed [15:0] yc;
  logic signed [19:0] xp;  logic signed [19:0] yp;
  logic signed [15:0] xm;  logic signed [15:0] ym;
  logic signed [15:0] xs;  logic signed [11:0] ys;

  const_mult #(.IN_W(8), .IN_FRAC(0), .OUT_W(16), .OUT_FRAC(14), .GAIN(0.01)) dut_c (
    .clk, .rst_n, .x(xc), .y(yc));
  const_mult #(.IN_W(20), .IN_FRAC(0), .OUT_W(20), .OUT_FRAC(17),
               .GAIN(PI / 10486.0), .K_FRAC(30)) dut_p (.clk, .rst_n, .x(xp), .y(yp));
  const_mult dut_m (.clk, .rst_n, .x(xm), .y(ym));
  const_mult #(.IN_W(16), .IN_FRAC(14), .OUT_W(12), .OUT_FRAC(10), .GAIN(1.5)) dut_s (
    .clk, .rst_n, .x(xs), .y(ys));

  task automatic check_near(input real got, input real exp, input string what);
    checks++;
    if (got - exp > 1.01 || exp - got > 1.01) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %f exp %f", what, got, exp);
    end
  endtask

  function automatic real sat(input real v, input int w);
    real hi = 2.0 ** (w - 1) - 1.0, lo = -(2.0 ** (w - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ec, ep, em, es;
    xc = '0; xp = '0; xm = '0; xs = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 20_000; i++) begin
      @(negedge clk);
      xc = 8'($urandom_range(0, 200) - 100);
      xp = 20'($urandom_range(0, 20972) - 10486);
      xm = 16'($urandom_range(0, 32767) - 16384);
      xs = 16'($urandom());
      ec = real'(xc) * 0.01 * 16384.0;
      ep = real'(xp) * PI / 10486.0 * 131072.0;
      em = real'(xm) * 0.86;
      es = sat(real'(xs) * 1.5 / 16.0, 12);
      if (es == 2047.0 || es == -2048.0) sats++;
      @(posedge clk);
      #1;
      check_near(real'(yc), ec, $sformatf("carrier gain x=%0d", xc));
      check_near(real'(yp), ep, $sformatf("phase gain x=%0d", xp));
      check_near(real'(ym), em, $sformatf("index gain x=%0d", xm));
      check_near(real'(ys), es, $sformatf("saturating gain x=%0d", xs));
    end
    checks++;
    if (sats == 0) begin
      failures++;
      $display("FAIL: saturation never exercised");
    end
    $display("saturated outputs: %0d", sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
