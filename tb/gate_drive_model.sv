// gate_drive_model: behavioural model, for simulation only, of the gate
// voltage swing scaling driver of one power-stage segment.
//
// Each power gate is a capacitance charged through the driver transistor
// that conducts: towards vin through p_pmos / n_pmos, towards ground
// through p_nmos / n_nmos, with time constant TAU. With both transistors of
// a driver off the gate keeps its voltage. The model updates once per clock
// of period DT and gives the two gate voltages and the swings that matter
// for the power switches: p_swing = vin - p_gate (source-gate voltage of the
// high-side PMOS) and n_swing = n_gate. The time constant is an assumed
// value for an integrated driver and power switch.
module gate_drive_model
  import dcdc_pkg::*;
#(
  parameter real TAU = 60.0e-9,
  parameter real DT  = 10.0e-9
) (
  input  logic    clk,
  input  gating_t gate,
  input  real     vin,
  output real     p_gate,
  output real     n_gate,
  output real     p_swing,
  output real     n_swing
);

  real k;

  initial begin
    k      = 1.0 - $exp(-DT / TAU);
    p_gate = 5.0;
    n_gate = 0.0;
  end

  always @(posedge clk) begin
    if (gate.p_pmos)      p_gate <= p_gate + (vin - p_gate) * k;
    else if (gate.p_nmos) p_gate <= p_gate - p_gate * k;
    if (gate.n_pmos)      n_gate <= n_gate + (vin - n_gate) * k;
    else if (gate.n_nmos) n_gate <= n_gate - n_gate * k;
  end

  assign p_swing = vin - p_gate;
  assign n_swing = n_gate;

endmodule
