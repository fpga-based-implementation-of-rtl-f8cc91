// relational_cmp: the comparator of one SPWM phase.
//
// Compares the scaled sine (a) with the carrier (b), both spwm_pkg::sig_t,
// and outputs pwm = 1 while a > b. With a ramp or triangle carrier this
// gives a pulse whose width follows the sine: natural-sampled SPWM.
// The comparison of the two signals with a Boolean result follows the source
// design; the choice of "greater than" and of a registered output is this
// design's.
//
// Interface: a, b in; pwm out. Timing: one register, latency 1 clock.
module relational_cmp
  import spwm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  sig_t a,
  input  sig_t b,
  output logic pwm
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm <= 1'b0;
    else        pwm <= (a > b);
  end
endmodule
