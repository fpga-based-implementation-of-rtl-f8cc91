// tb_tick_gen: checks the average rate and the spacing of the enables.
// At 100 MHz, a 2^20 Hz enable must come every 95 or 96 clocks and
// 10485 or 10486 times in 10 ms; a 2 MHz enable exactly every 50 clocks.
module tb_tick_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic tick_a, tick_b;
  tick_gen                                dut_a (.clk, .rst_n, .tick(tick_a));
  tick_gen #(.F_TICK(2_000_000))          dut_b (.clk, .rst_n, .tick(tick_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_a = 0, n_b = 0, last_a = -1, last_b = -1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 1_000_000; c++) begin
      @(posedge clk);
      #1;
      if (tick_a) begin
        if (last_a >= 0) check(c - last_a == 95 || c - last_a == 96,
                               $sformatf("2^20 Hz spacing %0d", c - last_a));
        last_a = c;
        n_a++;
      end
      if (tick_b) begin
        if (last_b >= 0) check(c - last_b == 50, $sformatf("2 MHz spacing %0d", c - last_b));
        last_b = c;
        n_b++;
      end
    end
    check(n_a == 10485 || n_a == 10486, $sformatf("2^20 Hz count %0d in 10 ms", n_a));
    check(n_b == 20000, $sformatf("2 MHz count %0d in 10 ms", n_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
