// tb_relational_cmp: random and equal operand pairs; pwm must equal a > b
// one clock later.
module tb_relational_cmp;
  import spwm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sig_t a, b;
  logic pwm;
  relational_cmp dut (.clk, .rst_n, .a, .b, .pwm);

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib;
    bit exp;
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 20_000; i++) begin
      @(negedge clk);
      ia = int'($urandom_range(0, 65535)) - 32768;
      case (i % 4)
        0: ib = ia;                                            // equal
        1: ib = ia + int'($urandom_range(0, 4)) - 2;           // close
        default: ib = int'($urandom_range(0, 65535)) - 32768;  // anywhere
      endcase
      if (ib > 32767) ib = 32767;
      if (ib < -32768) ib = -32768;
      a = sig_t'(ia);
      b = sig_t'(ib);
      exp = (ia > ib);
      @(posedge clk);
      #1;
      checks++;
      if (pwm !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL: a=%0d b=%0d pwm=%0b", ia, ib, pwm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
