// dcdc_controller_top: digital controller of a 1 MHz synchronous buck
// converter with a three-segment power stage and instantaneous efficiency
// optimization.
//
// The voltage loop is digital, the inner current loop analog. Once per
// switching period the windowed ADC's error e[n] is taken (adc_sample) and
// the PI compensator computes the current reference i_c[n]. A sigma-delta
// modulator sends i_c[n] out as a bitstream (dac_bit); filtered outside, it
// is the peak current limit that the external comparator (cmp) checks the
// inductor current against. The peak current modulator turns the high-side
// switch on at each period start and off when cmp trips.
//
// The same i_c[n] also drives the optimization, period by period, with no
// steady-state estimation: at each period start
//   - the PFM controller selects PFM below 0.1 A (low side off, pulses only
//     while the output is low, full high-side swing),
//   - the gate swing controller sets the drive pulse width pulse_sl of
//     segment 1, and hence its gate swing, over 0.1 A to 1 A,
//   - the segment selector enables segments 2 and 3 at higher currents.
// seg_gate[k] holds the four driver gating signals of segment k+1 (see
// dcdc_pkg::gating_t). All outputs are synchronous to clk; i_c[n] is ready
// one clock after adc_sample and is used from the following period start.
// cmp_trip and dmax_trip are strobes telling whether a pulse was ended by
// the comparator or by the maximum duty cycle.
// The block split and the signals follow the converter described; timing
// and widths are this design's choice (see the blocks).
module dcdc_controller_top
  import dcdc_pkg::*;
#(
  parameter int PERIOD = 100   // controller clocks per switching period
) (
  input  logic            clk,
  input  logic            rst_n,
  input  err_t            e_adc,
  input  logic            cmp,
  output logic            adc_sample,
  output logic            dac_bit,
  output gating_t         seg_gate [NSEG],
  output logic [NSEG-1:0] seg_en,
  output psl_t            pulse_sl,
  output logic            pfm_mode,
  output ic_t             ic,
  output logic            hs_on,
  output logic            ls_on,
  output logic            cmp_trip,
  output logic            dmax_trip
);

  logic    cycle_start, pulse_en;
  err_t    e_hold;
  gating_t seg_gate_hi [NSEG-1];

  // ADC result of the current period, held for the PFM decision.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          e_hold <= '0;
    else if (adc_sample) e_hold <= e_adc;
  end

  digital_compensator u_comp (
    .clk    (clk),
    .rst_n  (rst_n),
    .sample (adc_sample),
    .e      (e_adc),
    .ic     (ic)
  );

  sigma_delta_dac #(.W(IC_W)) u_dac (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (ic),
    .dout  (dac_bit)
  );

  pfm_controller u_pfm (
    .clk         (clk),
    .rst_n       (rst_n),
    .cycle_start (cycle_start),
    .ic          (ic),
    .e           (e_hold),
    .pfm_mode    (pfm_mode),
    .pulse_en    (pulse_en)
  );

  cpm_modulator #(
    .PERIOD    (PERIOD),
    .DMAX      (PERIOD * 9 / 10),
    .SAMPLE_AT (PERIOD - 4)
  ) u_mod (
    .clk         (clk),
    .rst_n       (rst_n),
    .cmp         (cmp),
    .pulse_en    (pulse_en),
    .ls_dis      (pfm_mode),
    .cycle_start (cycle_start),
    .sample      (adc_sample),
    .hs_on       (hs_on),
    .ls_on       (ls_on),
    .cmp_trip    (cmp_trip),
    .dmax_trip   (dmax_trip)
  );

  gate_swing_controller u_swing (
    .clk         (clk),
    .rst_n       (rst_n),
    .cycle_start (cycle_start),
    .ic          (ic),
    .pfm_mode    (pfm_mode),
    .hs_on       (hs_on),
    .ls_on       (ls_on),
    .pulse_sl    (pulse_sl),
    .gate        (seg_gate[0])
  );

  segment_selector u_seg (
    .clk         (clk),
    .rst_n       (rst_n),
    .cycle_start (cycle_start),
    .ic          (ic),
    .hs_on       (hs_on),
    .ls_on       (ls_on),
    .seg_en      (seg_en),
    .seg_gate    (seg_gate_hi)
  );

  for (genvar k = 1; k < NSEG; k++) begin : g_out
    assign seg_gate[k] = seg_gate_hi[k-1];
  end

endmodule
