// digital_compensator: PI voltage-loop compensator of the peak current
// programmed mode controller.
//
// Once per switching period (on `sample`) the signed ADC error e[n] updates
// the current reference:
//     I[n]  = clamp(I[n-1] + KI*e[n])          (I kept with FRAC fraction bits)
//     ic[n] = clamp(I[n]/2^FRAC + KP*e[n])
// Both clamps limit to 0 .. 2^IC_W-1; clamping the integrator is the
// anti-windup. `ic` is registered and is valid the clock after `sample`.
// That a digital compensator turns e[n] into i_c[n] follows the converter
// described; the PI law, its gains and the clamps are this design's choice.
module digital_compensator
  import dcdc_pkg::*;
#(
  parameter int  KP      = 20,   // proportional gain, ic codes per error LSB
  parameter int  KI      = 16,   // integral gain, 2^-FRAC ic codes per error LSB
  parameter int  FRAC    = 4,    // integrator fraction bits
  parameter ic_t IC_INIT = '0    // reference after reset
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample,
  input  err_t e,
  output ic_t  ic
);

  localparam int AW = IC_W + FRAC + 8;   // headroom for the sums
  localparam logic signed [AW-1:0] I_MAX = AW'((2 ** (IC_W + FRAC)) - 1);
  localparam logic signed [AW-1:0] O_MAX = AW'((2 ** IC_W) - 1);

  logic signed [AW-1:0] integ, integ_sum, out_sum;

  always_comb begin
    integ_sum = integ + AW'(KI) * AW'(e);
    if (integ_sum < 0)          integ_sum = '0;
    else if (integ_sum > I_MAX) integ_sum = I_MAX;
    out_sum = (integ_sum >>> FRAC) + AW'(KP) * AW'(e);
    if (out_sum < 0)            out_sum = '0;
    else if (out_sum > O_MAX)   out_sum = O_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= AW'(IC_INIT) <<< FRAC;
      ic    <= IC_INIT;
    end else if (sample) begin
      integ <= integ_sum;
      ic    <= ic_t'(out_sum);
    end
  end

endmodule
