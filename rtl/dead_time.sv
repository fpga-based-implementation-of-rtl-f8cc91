// dead_time: complementary gate signals of one inverter leg with a dead band.
//
// The upper switch of a leg follows the comparator output pwm and the lower
// switch its inverse. Because a real switch turns off more slowly than it
// turns on, both gates are held low for DEAD clocks after every change of
// pwm before the newly selected gate is raised; a pulse shorter than the dead
// band is swallowed. With DEAD = 0 the outputs are simply pwm and its
// inverse.
//
// The inverted comparator output and a dead-time stage come from the source
// design, which gives neither the mechanism nor the length of the dead band.
// The counter mechanism and DEAD = 100 clocks (1 us at 100 MHz) are this
// design's choice.
//
// Interface: pwm in; gate_hi, gate_lo out (never both high).
// Timing: after a change of pwm seen at clock edge t, both gates are low from
// edge t, and the new gate rises at edge t + DEAD (edge t itself if DEAD = 0).
// After reset both gates are low, then the lower gate rises DEAD clocks later.
module dead_time #(
  parameter int DEAD = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pwm,
  output logic gate_hi,
  output logic gate_lo
);
  localparam int CW = $clog2(DEAD + 2);

  logic          level;   // the state the gates are moving to
  logic [CW-1:0] cnt;     // clocks spent in the dead band so far

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level   <= 1'b0;
      cnt     <= CW'(1);
      gate_hi <= 1'b0;
      gate_lo <= 1'b0;
    end else if (pwm != level) begin
      level   <= pwm;
      cnt     <= CW'(1);
      gate_hi <= (DEAD == 0) &&  pwm;
      gate_lo <= (DEAD == 0) && !pwm;
    end else if (cnt < CW'(DEAD)) begin
      cnt     <= cnt + 1'b1;
      gate_hi <= 1'b0;
      gate_lo <= 1'b0;
    end else begin
      gate_hi <=  level;
      gate_lo <= !level;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(gate_hi && gate_lo))
    else $error("dead_time: both gates of the leg are on");
endmodule
