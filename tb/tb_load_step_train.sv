// tb_load_step_train: the controller at its default parameters under a
// repetitive load, with the analog parts modelled by a buck_plant_model.
// Two square waves are applied, each at load-step rates of 2, 5, 10 and
// 20 kHz: 0.5 A <-> 1.6 A (one segment with scaled swing <-> two segments)
// and 1.6 A <-> 2.6 A (two <-> three segments).
//
// This is the situation the per-cycle optimization is made for: the
// optimizers must follow the load while the output is still recovering,
// without waiting for the error to settle. For every up-step the test
// measures the periods until the heavier configuration is on and checks
// that this happens within the half period and before the ADC error first
// returns to zero. For every down-step it checks the return to the lighter
// configuration (for 0.5 A also a scaled gate swing) within the half period. It also checks that the output
// stays within 0.25 V of 1.8 V throughout and reports the worst deviation,
// and it counts the mode changes made per millisecond at each rate.
module tb_load_step_train;
  import dcdc_pkg::*;

  logic            clk = 1'b0, rst_n = 1'b0;
  err_t            e_adc;
  logic            cmp, hs_any, ls_any;
  logic            adc_sample, dac_bit, pfm_mode, hs_on, ls_on, cmp_trip, dmax_trip;
  gating_t         seg_gate [NSEG];
  logic [NSEG-1:0] seg_en;
  psl_t            pulse_sl;
  ic_t             ic;
  real             vout, il, vc, iload = 0.5;

  dcdc_controller_top dut (.*);

  buck_plant_model u_plant (
    .clk      (clk),
    .seg_gate (seg_gate),
    .dac_bit  (dac_bit),
    .vin      (5.0),
    .iload    (iload),
    .e_adc    (e_adc),
    .cmp      (cmp),
    .hs_any   (hs_any),
    .ls_any   (ls_any),
    .vout     (vout),
    .il       (il),
    .vc       (vc)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mode changes: seg_en or pulse_sl differing from the previous period
  int n_changes = 0;
  logic [NSEG-1:0] seg_d = 3'b001;
  psl_t psl_d = '0;
  always @(negedge clk) if (rst_n && dut.cycle_start) begin
    if (seg_en != seg_d || pulse_sl != psl_d) n_changes++;
    seg_d = seg_en;
    psl_d = pulse_sl;
  end

  // one half period of the load square wave; returns the periods until the
  // target configuration and whether the error had returned to zero first
  task automatic half(input real amps, input int half_us, input bit up,
                      input logic [NSEG-1:0] target,
                      output int lat, output bit settled_first, output real worst);
    bit reached, zero_seen;
    reached = 1'b0;
    zero_seen = 1'b0;
    lat = -1;
    worst = 0.0;
    iload = amps;
    for (int c = 0; c < half_us * 100; c++) begin
      @(negedge clk);
      #1;
      if ((vout - 1.8) > worst) worst = vout - 1.8;
      if ((1.8 - vout) > worst) worst = 1.8 - vout;
      if (c > 200 && adc_sample && e_adc == 0 && !reached) zero_seen = 1'b1;
      if (!reached && seg_en == target && !pfm_mode &&
          (target != 3'b001 || pulse_sl != PSL_FULL)) begin
        reached = 1'b1;
        lat = c / 100;
      end
    end
    settled_first = zero_seen;
  endtask

  initial begin
    int  lat, rates [4] = '{2, 5, 10, 20};
    real lo_a [2] = '{0.5, 1.6}, hi_a [2] = '{1.6, 2.6};
    logic [NSEG-1:0] lo_seg [2] = '{3'b001, 3'b011}, hi_seg [2] = '{3'b011, 3'b111};
    bit  zs;
    real worst, w;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (50000) @(negedge clk);   // start-up at 0.5 A
    for (int wv = 0; wv < 2; wv++)
    for (int r = 0; r < 4; r++) begin
      int hp, lat_up_max, lat_dn_max, ch0;
      if (r == 0) begin              // settle at the wave's low level first
        iload = lo_a[wv];
        repeat (30000) @(negedge clk);
      end
      hp = 500 / rates[r];            // half period in microseconds
      lat_up_max = 0;
      lat_dn_max = 0;
      worst = 0.0;
      ch0 = n_changes;
      for (int s = 0; s < 4; s++) begin
        half(hi_a[wv], hp, 1'b1, hi_seg[wv], lat, zs, w);
        if (w > worst) worst = w;
        chk(lat >= 0, $sformatf("%0d kHz: heavier configuration within the half period", rates[r]));
        chk(!zs, $sformatf("%0d kHz: segments follow before the error settles", rates[r]));
        if (lat > lat_up_max) lat_up_max = lat;
        half(lo_a[wv], hp, 1'b0, lo_seg[wv], lat, zs, w);
        if (w > worst) worst = w;
        chk(lat >= 0, $sformatf("%0d kHz: back to the lighter configuration", rates[r]));
        if (lat > lat_dn_max) lat_dn_max = lat;
      end
      $display("%3.1f A <-> %3.1f A at %2d kHz: seg_en %b within %0d periods, back to %b within %0d periods, worst |vout-1.8| %5.3f V, %0d mode changes per ms",
               lo_a[wv], hi_a[wv], rates[r], hi_seg[wv], lat_up_max, lo_seg[wv], lat_dn_max, worst,
               (n_changes - ch0) * rates[r] / 4);
      chk(worst < 0.25, $sformatf("%0d kHz: output within 0.25 V", rates[r]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
