// pfm_controller: light-load pulse frequency modulation control.
//
// At every period start the mode is updated from i_c[n]: PFM is entered
// when i_c falls below PFM_ENTER, the peak current of a 0.1 A load in
// continuous conduction (0.1 A + 0.26 A half ripple), and left when it
// reaches PFM_EXIT (hysteresis). The hysteresis is wide because in PFM the
// pulses are short triangles, so the same load needs a higher peak than in
// continuous conduction. pfm_mode disables the low-side switch and asks for full
// high-side gate swing. pulse_en tells the modulator whether the coming
// period gets a pulse: always outside PFM, and in PFM only while the held
// ADC error e[n] is positive (output below its reference), so pulses come
// at a rate set by the load. pulse_en is combinational and is used with the
// mode that takes effect at the same period start. PFM below 0.1 A, decided
// from i_c[n], with the low side disabled follows the converter described;
// the hysteresis and the skipping rule are this design's choice.
module pfm_controller
  import dcdc_pkg::*;
#(
  parameter ic_t PFM_ENTER = 10'd72,   // 0.36 A peak, 0.1 A load
  parameter ic_t PFM_EXIT  = 10'd120   // 0.6 A peak
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cycle_start,
  input  ic_t  ic,
  input  err_t e,
  output logic pfm_mode,
  output logic pulse_en
);

  logic pfm_next;

  assign pfm_next = pfm_mode ? (ic < PFM_EXIT) : (ic < PFM_ENTER);
  assign pulse_en = !pfm_next || (e > 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           pfm_mode <= 1'b0;
    else if (cycle_start) pfm_mode <= pfm_next;
  end

endmodule
