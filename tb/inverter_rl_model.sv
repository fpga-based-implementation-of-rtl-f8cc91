// inverter_rl_model: behavioural model (not synthesizable) of the power stage
// the modulator drives: a two-level three-phase IGBT bridge on a DC bus of
// VDC = 230 V feeding a star-connected series RL load (R = 10 ohm,
// L = 1 mH per phase) with an isolated neutral.
//
// Each leg's output sits at VDC when its upper gate is on and at 0 V when
// its lower gate is on. With both gates off (dead band) the freewheeling
// diodes decide: a current flowing out of the leg takes the lower diode (0 V),
// a current flowing in takes the upper one (VDC). The load neutral settles at
// the mean of the three leg voltages, so the phase voltage is
// v_k = v_leg_k - mean(v_leg), and each phase current obeys
// L di/dt = v_k - R i, integrated by forward Euler once per clock (DT = 10 ns).
// Switches are ideal: no on-state drop, no switching delay.
//
// Interface: clk (the integration step), gate_hi/gate_lo per leg in; phase
// voltages, the line voltage a-b, and the phase currents out, as reals;
// freewheel, the number of legs conducting through a diode this step.
module inverter_rl_model #(
  parameter real VDC = 230.0,
  parameter real R   = 10.0,
  parameter real L   = 1.0e-3,
  parameter real DT  = 10.0e-9
) (
  input  logic       clk,
  input  logic [2:0] gate_hi,
  input  logic [2:0] gate_lo,
  output real        v_ph [3],
  output real        v_ab,
  output real        i_ph [3],
  output int         freewheel
);
  real v_leg [3];
  real v_n;

  initial begin
    for (int k = 0; k < 3; k++) i_ph[k] = 0.0;
  end

  always @(posedge clk) begin
    freewheel = 0;
    for (int k = 0; k < 3; k++) begin
      if (gate_hi[k])      v_leg[k] = VDC;
      else if (gate_lo[k]) v_leg[k] = 0.0;
      else begin
        v_leg[k] = (i_ph[k] > 0.0) ? 0.0 : VDC;
        freewheel++;
      end
    end
    v_n  = (v_leg[0] + v_leg[1] + v_leg[2]) / 3.0;
    v_ab = v_leg[0] - v_leg[1];
    for (int k = 0; k < 3; k++) begin
      v_ph[k] = v_leg[k] - v_n;
      i_ph[k] = i_ph[k] + DT * (v_ph[k] - R * i_ph[k]) / L;
    end
  end
endmodule
