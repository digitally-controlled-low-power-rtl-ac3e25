// sigma_delta_dac: digital half of the sigma-delta DAC that turns the
// current reference into the analog peak current limit v_c(t).
//
// A first-order error-feedback modulator: every clock the W-bit input is
// added to a W-bit accumulator and the carry is the output bit, so over any
// 2^W clocks the number of ones equals din (for a constant din) and the
// running error never exceeds one LSB. An external RC low-pass turns the
// stream into v_c(t) = din/2^W times the full-scale voltage. The modulator
// type follows "a simple sigma-delta DAC"; its order and clocking at the
// controller clock are this design's choice.
module sigma_delta_dac #(
  parameter int W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic         dout
);

  logic [W-1:0] acc;
  logic [W:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, din};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      dout <= 1'b0;
    end else begin
      acc  <= sum[W-1:0];
      dout <= sum[W];
    end
  end

endmodule
