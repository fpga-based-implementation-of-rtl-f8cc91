// tb_phase_counter: checks the phase counter sweep -HALF..+HALF with random
// enables on a small instance (HALF = 50), and the full period of 20973
// enables on the default instance (one 50 Hz period at 2^20 Hz).
module tb_phase_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic en;
  logic signed [19:0] cnt_s, cnt_d;
  logic wrap_s, wrap_d;

  phase_counter #(.HALF(50)) dut_s (.clk, .rst_n, .en, .count(cnt_s), .wrap(wrap_s));
  phase_counter              dut_d (.clk, .rst_n, .en(1'b1), .count(cnt_d), .wrap(wrap_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0, exp_s, c_d = 0, last_wrap = -1, periods = 0;
    en = 1'b0;
    repeat (3) @(posedge clk);
    check(cnt_d == -10486, "default reset value -10486");
    rst_n <= 1'b1;
    for (int c = 0; c < 70_000; c++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      #1;
      c_d++;
      if (en) n++;
      exp_s = -50 + (n % 101);
      check(cnt_s == exp_s, $sformatf("small n=%0d got %0d exp %0d", n, cnt_s, exp_s));
      check(wrap_s == (en && n % 101 == 0), "small wrap");
      check(cnt_d == -10486 + (c_d % 20973), $sformatf("default count %0d at %0d", cnt_d, c_d));
      if (wrap_d) begin
        if (last_wrap >= 0) begin
          check(c_d - last_wrap == 20973, $sformatf("default period %0d", c_d - last_wrap));
          periods++;
        end
        last_wrap = c_d;
      end
    end
    check(periods >= 2, "default instance completed two periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
