// dcdc_pkg: types and constants shared by the blocks of the digital buck
// controller.
//
// The current reference i_c[n] is a 10-bit unsigned code with 5 mA per LSB
// (full scale 5.12 A), the ADC error e[n] a 4-bit two's complement number
// (positive when the output is below its reference), and the gate swing
// pulse select a 6-bit pulse width in controller clocks, all ones meaning
// full swing. The 4-bit error and three segments follow the converter
// described; the other widths and the LSB size are this design's choice.
package dcdc_pkg;

  localparam int IC_W  = 10;  // current reference width
  localparam int E_W   = 4;   // ADC error width
  localparam int PSL_W = 6;   // pulse select width
  localparam int NSEG  = 3;   // power stage segments

  typedef logic [IC_W-1:0]         ic_t;
  typedef logic signed [E_W-1:0]   err_t;
  typedef logic [PSL_W-1:0]        psl_t;

  // Pulse select value meaning "hold the driver pulse for the whole on-time".
  localparam psl_t PSL_FULL = '1;

  // Gating signals of one segment's two gate drivers. Each bit is 1 when
  // that driver transistor conducts:
  //   p_pmos pulls the high-side (PMOS) power gate up to Vin   -> switch off
  //   p_nmos pulls the high-side power gate down               -> switch on
  //   n_pmos pulls the low-side (NMOS) power gate up           -> switch on
  //   n_nmos pulls the low-side power gate down to ground      -> switch off
  // With both transistors of a driver off the power gate floats and keeps
  // the charge, hence the partial swing, it was given.
  typedef struct packed {
    logic p_pmos;
    logic p_nmos;
    logic n_pmos;
    logic n_nmos;
  } gating_t;

  // Gating of a segment that is held off.
  localparam gating_t GATE_OFF = '{p_pmos: 1'b1, p_nmos: 1'b0, n_pmos: 1'b0, n_nmos: 1'b1};

endpackage
