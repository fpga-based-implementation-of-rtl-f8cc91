// tb_dead_time: random pwm waveforms (runs of 1..3*DEAD clocks, so some
// pulses are shorter than the dead band) into instances with DEAD = 5, 0 and
// the default 100. Reference: after a change of pwm, both gates stay low until
// pwm has been steady for DEAD + 1 samples; then gate_hi = pwm and
// gate_lo = !pwm. Checks every clock, and that both gates are never high.
module tb_dead_time;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, swallowed = 0, bands = 0;
  always #5 clk = ~clk;

  logic pwm;
  logic hi5, lo5, hi0, lo0, hid, lod;
  dead_time #(.DEAD(5)) dut5 (.clk, .rst_n, .pwm, .gate_hi(hi5), .gate_lo(lo5));
  dead_time #(.DEAD(0)) dut0 (.clk, .rst_n, .pwm, .gate_hi(hi0), .gate_lo(lo0));
  dead_time             dutd (.clk, .rst_n, .pwm, .gate_hi(hid), .gate_lo(lod));

  task automatic check_leg(input logic hi, input logic lo, input int dead, input int run,
                           input logic level, input string what);
    logic on = (run >= dead + 1);
    checks++;
    if (hi !== (on && level) || lo !== (on && !level) || (hi && lo)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: %s run=%0d level=%0b hi=%0b lo=%0b", what, run, level, hi, lo);
    end
  endtask

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int run = 1, left = 0, scale = 5;
    logic level = 1'b0;
    pwm = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;                   // reset acts like a change to 0
    for (int i = 0; i < 300_000; i++) begin
      if (i == 150_000) scale = 100; // second half: long runs for the default
      @(negedge clk);
      if (left == 0) begin
        pwm  = !pwm;
        left = $urandom_range(1, 3 * scale);
      end
      left--;
      @(posedge clk);
      #1;
      if (pwm != level) begin
        if (run < 6) swallowed++;
        else bands++;
        level = pwm;
        run = 1;
      end else begin
        run++;
      end
      check_leg(hi5, lo5, 5, run, level, "DEAD=5");
      check_leg(hi0, lo0, 0, run, level, "DEAD=0");
      check_leg(hid, lod, 100, run, level, "DEAD=100");
    end
    checks++;
    if (swallowed == 0 || bands == 0) begin
      failures++;
      $display("FAIL: short pulses or full dead bands never exercised");
    end
    $display("dead bands %0d, swallowed pulses %0d", bands, swallowed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
