// buck_plant_model: behavioural model, for simulation only, of everything
// around the digital controller: the three-segment synchronous buck power
// stage, the RC filter of the sigma-delta DAC, the peak current comparator
// and the windowed ADC.
//
// It is evaluated once per controller clock (DT), on the falling edge, so
// the controller sees new comparator and ADC values at its next rising edge.
//   power stage  ideal switches, L = 2.2 uH, C = 40 uF, input `vin`, load
//                current `iload`; the high side of a segment conducts while
//                its gate is not pulled to vin (p_pmos low), the low side
//                while its gate is not pulled to ground (n_nmos low); with
//                both off the inductor current freewheels through the body
//                diode (-0.5 V) down to zero
//   DAC filter   first-order RC, TAU_DAC, 5.12 A for a one on the bitstream
//   comparator   cmp = 1 while the inductor current is at or above v_c
//   ADC          e = round((VREF - vout) / QADC), clipped to -8 .. 7
// The output starts at 0 V. The model has no losses.
module buck_plant_model
  import dcdc_pkg::*;
#(
  parameter real DT      = 10.0e-9,
  parameter real LIND    = 2.2e-6,
  parameter real COUT    = 40.0e-6,
  parameter real VREF    = 1.8,
  parameter real QADC    = 0.010,
  parameter real TAU_DAC = 2.0e-6,
  parameter real IFS     = 5.12
) (
  input  logic    clk,
  input  gating_t seg_gate [NSEG],
  input  logic    dac_bit,
  input  real     vin,
  input  real     iload,
  output err_t    e_adc,
  output logic    cmp,
  output logic    hs_any,
  output logic    ls_any,
  output real     vout,
  output real     il,
  output real     vc
);

  initial begin
    vout  = 0.0;
    il    = 0.0;
    vc    = 0.0;
    cmp   = 1'b0;
    e_adc = '0;
  end

  always @(negedge clk) begin
    real vsw;
    int  q;
    hs_any = 1'b0;
    ls_any = 1'b0;
    for (int k = 0; k < NSEG; k++) begin
      if (!seg_gate[k].p_pmos) hs_any = 1'b1;
      if (!seg_gate[k].n_nmos) ls_any = 1'b1;
    end
    if (hs_any)      vsw = vin;
    else if (ls_any) vsw = 0.0;
    else if (il > 0) vsw = -0.5;
    else             vsw = vout;
    il = il + (vsw - vout) / LIND * DT;
    if (!hs_any && !ls_any && il < 0.0) il = 0.0;
    vout = vout + (il - iload) / COUT * DT;
    vc = vc + ((dac_bit ? IFS : 0.0) - vc) * DT / TAU_DAC;
    cmp = (il >= vc);
    q = $rtoi((VREF - vout) / QADC + 100.5) - 100;
    if (q > 7) q = 7;
    if (q < -8) q = -8;
    e_adc = err_t'(q);
  end

endmodule
