// gate_pulse_gen: gating-signal sequencer for the two gate drivers of one
// power-stage segment (gate charge based swing control).
//
// Each driver runs a three-state FSM. While its power switch is commanded
// off (IDLE) the driver transistor that pulls the power gate to its off
// level conducts. When the switch command rises, the opposite driver
// transistor conducts for t clocks (CHARGE) and then both driver
// transistors are off (FLOAT): the power gate keeps the charge moved in t
// clocks, so the gate swing grows with t. A width of PSL_FULL keeps CHARGE
// for the whole on-time, which is the full swing of a normal driver; a width
// of 0 behaves like 1. Turning a switch off is always full swing.
//   high side: hs_on, width t_hs -> p_nmos pulse (t_NMOS), p_pmos when off
//   low side:  ls_on, width t_ls -> n_pmos pulse (t_PMOS), n_nmos when off
// The gating is combinational from the commands and the FSM registers, so
// it follows hs_on/ls_on in the same clock. The widths must be steady while
// the switch is on. The gate-charge principle follows the converter
// described; the FSM and the clock-count widths are this design's choice.
module gate_pulse_gen
  import dcdc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    hs_on,
  input  logic    ls_on,
  input  psl_t    t_hs,
  input  psl_t    t_ls,
  output gating_t gate
);

  typedef enum logic [1:0] {D_IDLE, D_CHARGE, D_FLOAT} drv_state_t;

  drv_state_t pst, nst;
  psl_t       pcnt, ncnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst  <= D_IDLE;
      nst  <= D_IDLE;
      pcnt <= '0;
      ncnt <= '0;
    end else begin
      if (!hs_on) begin
        pst  <= D_IDLE;
        pcnt <= '0;
      end else if (pst != D_FLOAT) begin
        if (t_hs != PSL_FULL && pcnt + 1'b1 >= t_hs) pst <= D_FLOAT;
        else begin
          pst  <= D_CHARGE;
          pcnt <= pcnt + 1'b1;
        end
      end
      if (!ls_on) begin
        nst  <= D_IDLE;
        ncnt <= '0;
      end else if (nst != D_FLOAT) begin
        if (t_ls != PSL_FULL && ncnt + 1'b1 >= t_ls) nst <= D_FLOAT;
        else begin
          nst  <= D_CHARGE;
          ncnt <= ncnt + 1'b1;
        end
      end
    end
  end

  always_comb begin
    gate.p_pmos = !hs_on;
    gate.p_nmos = hs_on && (pst != D_FLOAT);
    gate.n_nmos = !ls_on;
    gate.n_pmos = ls_on && (nst != D_FLOAT);
  end

  // A driver never pulls its power gate both ways at once.
  a_p_driver: assert property (@(posedge clk) disable iff (!rst_n) !(gate.p_pmos && gate.p_nmos));
  a_n_driver: assert property (@(posedge clk) disable iff (!rst_n) !(gate.n_pmos && gate.n_nmos));

endmodule
