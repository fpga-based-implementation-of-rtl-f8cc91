// tb_carrier_counter: drives the carrier counter with random enables, in
// sawtooth and in triangle mode, and compares every output with the value
// expected from the number of enables seen: -100 + (n mod 200) for the ramp,
// and the folded sequence of period 398 for the triangle. Also checks that
// wrap pulses exactly once per period.
module tb_carrier_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic en;
  logic signed [7:0] cnt_s, cnt_t;
  logic wrap_s, wrap_t;

  carrier_counter                   dut_s (.clk, .rst_n, .en, .count(cnt_s), .wrap(wrap_s));
  carrier_counter #(.TRIANGLE(1'b1)) dut_t (.clk, .rst_n, .en, .count(cnt_t), .wrap(wrap_t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
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
    int n = 0, exp_s, exp_t, p, wraps_s = 0, wraps_t = 0;
    en = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    check(cnt_s == -100 && cnt_t == -100, "reset value -100");
    for (int c = 0; c < 50_000; c++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (en) n++;
      exp_s = -100 + (n % 200);
      p = n % 398;
      exp_t = (p <= 199) ? -100 + p : -100 + (398 - p);
      check(cnt_s == exp_s, $sformatf("ramp n=%0d got %0d exp %0d", n, cnt_s, exp_s));
      check(cnt_t == exp_t, $sformatf("triangle n=%0d got %0d exp %0d", n, cnt_t, exp_t));
      check(wrap_s == (en && n % 200 == 0), $sformatf("ramp wrap at n=%0d", n));
      check(wrap_t == (en && p == 0), $sformatf("triangle wrap at n=%0d", n));
      wraps_s += int'(wrap_s);
      wraps_t += int'(wrap_t);
    end
    check(wraps_s == n / 200 && wraps_t == n / 398, "number of carrier periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
