// cpm_modulator: peak current programmed mode pulse generator with pulse
// skipping for PFM.
//
// A counter divides the clock into switching periods of PERIOD clocks.
// When a period starts (`cycle_start`, counter 0) and `pulse_en` is high,
// the high-side switch turns on (hs_on from counter 1). The analog
// comparator (`cmp`, 1 when the inductor current has reached the limit set
// by the DAC) ends the pulse; it is ignored for the first BLANK clocks of
// the pulse (leading-edge blanking), and the pulse is cut at counter DMAX
// whatever the comparator says. After DEAD clocks with both switches off the
// low-side switch conducts until DEAD clocks before the period ends, unless
// `ls_dis` is high (PFM), in which case both stay off. With `pulse_en` low
// the whole period is skipped. `sample` pulses at counter SAMPLE_AT: the ADC
// result is taken and the compensator updates there, so the new reference
// is ready at the next period start. hs_on and ls_on come straight from the
// state register. cmp_trip and dmax_trip are one-clock strobes telling how a
// pulse ended.
//
// Peak current control with an analog comparator, and PFM with the low side
// disabled, follow the converter described; counter length, dead time,
// blanking, maximum duty and sample position are this design's choice.
module cpm_modulator #(
  parameter int PERIOD    = 100,  // clocks per switching period
  parameter int DEAD      = 2,    // dead time, clocks
  parameter int DMAX      = 90,   // last counter value of a high-side pulse
  parameter int BLANK     = 4,    // leading-edge blanking, clocks
  parameter int SAMPLE_AT = 96    // counter value of the sample strobe
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmp,
  input  logic pulse_en,
  input  logic ls_dis,
  output logic cycle_start,
  output logic sample,
  output logic hs_on,
  output logic ls_on,
  output logic cmp_trip,
  output logic dmax_trip
);

  localparam int CW = $clog2(PERIOD);

  typedef enum logic [1:0] {S_OFF, S_HS, S_DT, S_LS} state_t;

  state_t        state;
  logic [CW-1:0] cnt;
  logic [CW-1:0] sub;    // clocks spent in the current state

  assign cycle_start = (cnt == '0);
  assign sample      = (cnt == CW'(SAMPLE_AT));
  assign hs_on       = (state == S_HS);
  assign ls_on       = (state == S_LS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      state     <= S_OFF;
      sub       <= '0;
      cmp_trip  <= 1'b0;
      dmax_trip <= 1'b0;
    end else begin
      cnt       <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      sub       <= sub + 1'b1;
      cmp_trip  <= 1'b0;
      dmax_trip <= 1'b0;
      unique case (state)
        S_OFF: begin
          if (cycle_start && pulse_en) begin
            state <= S_HS;
            sub   <= '0;
          end
        end
        S_HS: begin
          if (sub >= CW'(BLANK - 1) && cmp) begin
            state    <= S_DT;
            sub      <= '0;
            cmp_trip <= 1'b1;
          end else if (cnt == CW'(DMAX)) begin
            state     <= S_DT;
            sub       <= '0;
            dmax_trip <= 1'b1;
          end
        end
        S_DT: begin
          if (sub == CW'(DEAD - 1)) begin
            state <= (!ls_dis && cnt < CW'(PERIOD - DEAD - 1)) ? S_LS : S_OFF;
            sub   <= '0;
          end
        end
        S_LS: begin
          if (ls_dis || cnt == CW'(PERIOD - DEAD - 1)) begin
            state <= S_OFF;
            sub   <= '0;
          end
        end
        default: state <= S_OFF;
      endcase
    end
  end

  // The two switches never conduct together.
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(hs_on && ls_on));

endmodule
