// carrier_counter: the counter that forms the PWM carrier.
//
// A W-bit signed counter that starts at INIT (-100) and steps by one on every
// enable. In the default sawtooth mode it climbs to MAX and reloads INIT, the
// ramp carrier of the FPGA model; with TRIANGLE = 1 it counts up to MAX and
// back down to INIT, the symmetric triangle of the reference simulation.
// Scaled by 1/100 downstream, the count becomes a carrier from -1 to just
// under +1. With the default 200 states and a 2 MHz enable the carrier runs
// at 10 kHz.
//
// The 8-bit width, the start value -100 and the 1/100 scale follow the source
// design. The upper limit (99, so that a period is exactly 200 steps) and
// the triangle option's turning points are this design's choice.
//
// Interface: en is the sample enable; count is the carrier value; wrap pulses
// (with the step) when the count returns to INIT, marking a new carrier
// period. Timing: count changes on the clock edge where en is high.
module carrier_counter #(
  parameter int W        = 8,
  parameter int INIT     = -100,
  parameter int MAX      = 99,
  parameter bit TRIANGLE = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  output logic signed [W-1:0] count,
  output logic                wrap
);
  localparam logic signed [W-1:0] LO = W'(INIT);
  localparam logic signed [W-1:0] HI  = W'(MAX);
  localparam logic signed [W-1:0] LO1 = W'(INIT + 1);

  logic down;   // triangle mode: currently counting down

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= LO;
      down  <= 1'b0;
      wrap  <= 1'b0;
    end else begin
      wrap <= 1'b0;
      if (en) begin
        if (!TRIANGLE) begin
          if (count >= HI) begin
            count <= LO;
            wrap  <= 1'b1;
          end else begin
            count <= count + 1'b1;
          end
        end else if (!down) begin
          if (count >= HI) begin
            count <= count - 1'b1;
            down  <= 1'b1;
          end else begin
            count <= count + 1'b1;
          end
        end else begin
          if (count <= LO1) begin
            count <= LO;
            down  <= 1'b0;
            wrap  <= 1'b1;
          end else begin
            count <= count - 1'b1;
          end
        end
      end
    end
  end
endmodule
