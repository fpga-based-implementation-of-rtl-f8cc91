// tick_gen: sample-rate enable for the counters of the SPWM generator.
//
// The counters of the modulator do not step on every system clock; each has
// its own sample period. This block turns the system clock (F_CLK, 100 MHz
// as in the source design) into a one-cycle enable pulse whose average rate
// is F_TICK. It is a phase accumulator: every clock it adds F_TICK and, when
// the sum reaches F_CLK, subtracts F_CLK and raises `tick` for one cycle. The
// rate need not divide the clock: a rate of 2^20 Hz (sample period 2^-20 s)
// gives ticks 95 or 96 clocks apart, 2^20 per second exactly on average.
//
// Interface: clk, active-low asynchronous reset rst_n, output tick.
// Timing: the first tick comes ceil(F_CLK/F_TICK) clocks after reset; tick is
// registered. The accumulator form is this design's own choice.
module tick_gen #(
  parameter longint F_CLK  = 100_000_000,
  parameter longint F_TICK = 1_048_576
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int AW = $clog2(F_CLK) + 1;
  localparam logic [AW-1:0] STEP = AW'(F_TICK);
  localparam logic [AW-1:0] LIM  = AW'(F_CLK - F_TICK);

  if (F_TICK < 1 || F_TICK > F_CLK) begin : g_bad_rate
    $error("tick_gen: F_TICK must lie in 1..F_CLK");
  end

  logic [AW-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      tick <= 1'b0;
    end else if (acc >= LIM) begin
      acc  <= acc - LIM;
      tick <= 1'b1;
    end else begin
      acc  <= acc + STEP;
      tick <= 1'b0;
    end
  end
endmodule
