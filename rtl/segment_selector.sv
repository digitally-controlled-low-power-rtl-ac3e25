// segment_selector: chooses how many of the power-stage segments switch.
//
// At every period start i_c[n] is compared with two stored thresholds:
// below SEG2_TH one segment is enabled, from SEG2_TH two, from SEG3_TH all
// three (seg_en is a thermometer code 001/011/111, bit 0 the segment whose
// gate swing is scaled). seg_en changes one clock after cycle_start, while
// both switches are off, and holds for the period. The selector also drives
// the gates of segments 2..NSEG: an enabled segment follows hs_on/ls_on at
// full swing, a disabled one is held off. seg_gate[k-1] belongs to segment
// k+1. Segment selection from i_c[n] above 1 A follows the converter
// described; the threshold values are this design's choice. They are
// peak-current codes: a load I in continuous conduction peaks at I + 0.26 A.
module segment_selector
  import dcdc_pkg::*;
#(
  parameter ic_t SEG2_TH = 10'd352,  // 1.76 A peak, 1.5 A load
  parameter ic_t SEG3_TH = 10'd492   // 2.46 A peak, 2.2 A load
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cycle_start,
  input  ic_t           ic,
  input  logic          hs_on,
  input  logic          ls_on,
  output logic [NSEG-1:0] seg_en,
  output gating_t       seg_gate [NSEG-1]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                seg_en <= 3'b001;
    else if (cycle_start) begin
      if (ic >= SEG3_TH)       seg_en <= 3'b111;
      else if (ic >= SEG2_TH)  seg_en <= 3'b011;
      else                     seg_en <= 3'b001;
    end
  end

  for (genvar k = 1; k < NSEG; k++) begin : g_seg
    gate_pulse_gen u_drv (
      .clk   (clk),
      .rst_n (rst_n),
      .hs_on (hs_on && seg_en[k]),
      .ls_on (ls_on && seg_en[k]),
      .t_hs  (PSL_FULL),
      .t_ls  (PSL_FULL),
      .gate  (seg_gate[k-1])
    );
  end

endmodule
