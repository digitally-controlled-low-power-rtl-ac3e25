// gate_swing_controller: gate voltage swing control of the first power-stage
// segment, the only segment whose swing is scaled.
//
// At every period start the current reference i_c[n] is compared with NLEV
// stored ascending thresholds SWING_TH. The highest threshold it reaches
// selects the pulse width SWING_PW of that level as the pulse select
// pulse_sl[n]; below the first threshold the first width is used, and at or
// above FULL_TH pulse_sl becomes PSL_FULL, full swing. pulse_sl is
// held for the period and sets both driver pulse widths of the segment
// (t_NMOS for the high-side gate, t_PMOS for the low-side gate) in a
// gate_pulse_gen. In PFM the high-side gate is driven at full swing. The
// gating follows hs_on/ls_on in the same clock; pulse_sl changes one clock
// after cycle_start, while both switches are off.
//
// Scaling one segment's swing from i_c[n] through stored thresholds over
// 0.1 A to 1 A, and full high-side swing in PFM, follow the converter
// described. The threshold and width values stand in for the efficiency
// model's optimum, which this design does not have; they are parameters.
module gate_swing_controller
  import dcdc_pkg::*;
#(
  parameter int   NLEV = 8,
  parameter ic_t  SWING_TH [NLEV] = '{10'd72, 10'd95, 10'd117, 10'd140,
                                      10'd162, 10'd185, 10'd207, 10'd230},
  parameter psl_t SWING_PW [NLEV] = '{6'd4, 6'd6, 6'd8, 6'd10,
                                      6'd12, 6'd14, 6'd16, 6'd18},
  parameter ic_t  FULL_TH = 10'd252
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cycle_start,
  input  ic_t     ic,
  input  logic    pfm_mode,
  input  logic    hs_on,
  input  logic    ls_on,
  output psl_t    pulse_sl,
  output gating_t gate
);

  psl_t sel;

  always_comb begin
    sel = SWING_PW[0];
    for (int i = 1; i < NLEV; i++)
      if (ic >= SWING_TH[i]) sel = SWING_PW[i];
    if (ic >= FULL_TH) sel = PSL_FULL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           pulse_sl <= PSL_FULL;
    else if (cycle_start) pulse_sl <= sel;
  end

  gate_pulse_gen u_drv (
    .clk   (clk),
    .rst_n (rst_n),
    .hs_on (hs_on),
    .ls_on (ls_on),
    .t_hs  (pfm_mode ? PSL_FULL : pulse_sl),
    .t_ls  (pulse_sl),
    .gate  (gate)
  );

endmodule
