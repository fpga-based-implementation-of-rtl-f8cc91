// phase_counter: the time axis of the sine generators.
//
// A W-bit (20) signed counter sweeping -HALF .. +HALF and starting over, one
// step per enable. The source design counts from -1/Ts/100 to +1/Ts/100 with
// a sample period Ts = 2^-20 s, so HALF = 2^20/100 = 10486 (rounded) and one
// sweep of 2*HALF+1 steps lasts 20973 * 2^-20 s = 20.0 ms: one period of a
// 50 Hz output. The sweep is mapped onto -pi .. +pi by the gain that follows.
//
// Interface: en is the 2^20 Hz sample enable; count is the phase; wrap pulses
// (with the step) when the count jumps from +HALF back to -HALF.
// Timing: count changes on the clock edge where en is high; reset loads
// -HALF (reset behaviour is this design's choice).
module phase_counter #(
  parameter int W    = 20,
  parameter int HALF = 10486
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  output logic signed [W-1:0] count,
  output logic                wrap
);
  localparam logic signed [W-1:0] LO = W'(-HALF);
  localparam logic signed [W-1:0] HI = W'(HALF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= LO;
      wrap  <= 1'b0;
    end else begin
      wrap <= 1'b0;
      if (en) begin
        if (count >= HI) begin
          count <= LO;
          wrap  <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end
endmodule
