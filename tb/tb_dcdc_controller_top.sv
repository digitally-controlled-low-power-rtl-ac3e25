// tb_dcdc_controller_top: closed-loop test of the whole controller with a
// behavioural model of everything around it, at the default parameters.
//
// A buck_plant_model stands for the analog parts: the power stage (5 V,
// 1.9 V during a sag, L = 2.2 uH, C = 40 uF), the DAC filter, the current
// comparator and the windowed ADC (10 mV per code).
// The run starts from 0 V and then steps the load through 0.5 A, 1 A,
// 0.05 A (PFM), 0.3 A, 1.3 A, 1.8 A (two segments), 2.6 A (three
// segments) and 1.6 A, then lets the input sag to 1.9 V (maximum duty)
// and recover.
// At the end of each load phase it checks that the output is regulated
// and that the optimizers chose the expected mode, and it counts each
// mechanism of the controller (comparator-ended and duty-limited pulses,
// PFM entry and skipped periods, scaled and full gate swing with a floating
// gate, one, two and three segments); one that never happens is a failure.
// It also checks the 1 MHz period, the ADC sample once per period, that
// pulse_sl and seg_en of every period follow the reference at its start, no
// low side in PFM and no shoot-through. A gate_drive_model turns segment
// 1's gating into gate voltages, so the swing itself is checked: reduced at
// 0.5 A, larger at 1 A, full on the high side in PFM.
module tb_dcdc_controller_top;
  import dcdc_pkg::*;

  localparam real VREF = 1.8;

  logic            clk = 1'b0, rst_n = 1'b0;
  err_t            e_adc;
  logic            cmp;
  logic            adc_sample, dac_bit, pfm_mode, hs_on, ls_on, cmp_trip, dmax_trip;
  gating_t         seg_gate [NSEG];
  real             VIN = 5.0;
  logic [NSEG-1:0] seg_en;
  psl_t            pulse_sl;
  ic_t             ic;

  dcdc_controller_top dut (.*);

  // gate voltages of segment 1, the segment with the scaled swing
  real p_gate1, n_gate1, p_swing1, n_swing1;
  gate_drive_model u_gate1 (
    .clk     (clk),
    .gate    (seg_gate[0]),
    .vin     (VIN),
    .p_gate  (p_gate1),
    .n_gate  (n_gate1),
    .p_swing (p_swing1),
    .n_swing (n_swing1)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  localparam longint LIMIT = 2_100_000;
  initial begin
    repeat (LIMIT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- plant
  real vout, il, vc, iload = 0.0;
  real vmin_w, vmax_w, vsum_w;
  logic hs_any, ls_any;

  buck_plant_model u_plant (
    .clk      (clk),
    .seg_gate (seg_gate),
    .dac_bit  (dac_bit),
    .vin      (VIN),
    .iload    (iload),
    .e_adc    (e_adc),
    .cmp      (cmp),
    .hs_any   (hs_any),
    .ls_any   (ls_any),
    .vout     (vout),
    .il       (il),
    .vc       (vc)
  );

  always @(negedge clk) cyc++;

  // ------------------------------------------------------ mechanism counts
  int n_cmp_trip = 0, n_dmax_trip = 0, n_pfm_entry = 0, n_skip = 0;
  int n_scaled = 0, n_full = 0, n_float = 0, n_seg [4] = '{default: 0};
  int n_ls_in_pfm = 0, n_shoot = 0, n_bad_period = 0, n_bad_sample = 0;
  longint last_start = -1, last_sample = -1;
  bit pfm_d = 1'b0, hs_in_period = 1'b0, p_nmos_d = 1'b0;

  always @(negedge clk) if (rst_n) begin
    if (cmp_trip)  n_cmp_trip++;
    if (dmax_trip) n_dmax_trip++;
    if (pfm_mode && !pfm_d) n_pfm_entry++;
    pfm_d = pfm_mode;
    if (pfm_mode && ls_on) n_ls_in_pfm++;
    if (hs_any && ls_any) n_shoot++;
    // the segment-1 driver stops charging while the switch is still on
    if (hs_on && p_nmos_d && !seg_gate[0].p_nmos) n_float++;
    p_nmos_d = seg_gate[0].p_nmos;
    if (hs_on) hs_in_period = 1'b1;
    if (dut.cycle_start) begin
      if (last_start >= 0 && cyc - last_start != 100) n_bad_period++;
      if (last_start >= 0 && !hs_in_period) n_skip++;
      hs_in_period = 1'b0;
      last_start = cyc;
    end
    if (adc_sample) begin
      if (last_sample >= 0 && cyc - last_sample != 100) n_bad_sample++;
      last_sample = cyc;
    end
    if (dut.cycle_start && last_start > 0) begin
      case (seg_en)
        3'b001: n_seg[1]++;
        3'b011: n_seg[2]++;
        3'b111: n_seg[3]++;
        default: n_seg[0]++;
      endcase
      if (!pfm_mode && seg_en == 3'b001) begin
        if (pulse_sl == PSL_FULL) n_full++; else n_scaled++;
      end
    end
  end

  // swing reached by segment 1 at the end of each on-time, one period's lag
  real last_pswing = 0.0, last_nswing = 0.0, pfm_sw_sum = 0.0;
  int  pfm_sw_n = 0, n_pfm_partial = 0;
  bit  hs_d = 1'b0, ls_d = 1'b0;
  int  n_psl_checked = 0, n_psl_bad = 0;
  ic_t ic_at_start;
  always @(negedge clk) if (rst_n) begin
    if (hs_d && !hs_on) begin
      last_pswing = p_swing1;
      if (pfm_mode) begin
        pfm_sw_sum += p_swing1;
        pfm_sw_n++;
      end
    end
    if (pfm_mode && hs_on && !seg_gate[0].p_nmos) n_pfm_partial++;
    if (ls_d && !ls_on) last_nswing = n_swing1;
    hs_d = hs_on;
    ls_d = ls_on;
  end

  // Latency: the configuration used in a period is the one computed from the
  // reference present at that period's start.
  function automatic int exp_psl(input int v);
    int s;
    s = 4;
    for (int i = 1; i < 8; i++) if (v >= 72 + (i * 45 + 1) / 2) s = 4 + 2 * i;
    if (v >= 252) s = 63;
    return s;
  endfunction
  always @(negedge clk) if (rst_n) begin
    if (dut.cycle_start) ic_at_start = ic;
    if (cyc > 10 && last_start == cyc - 1) begin
      n_psl_checked++;
      if (int'(pulse_sl) != exp_psl(int'(ic_at_start)) ||
          seg_en != ((ic_at_start >= 492) ? 3'b111 : (ic_at_start >= 352) ? 3'b011 : 3'b001))
        n_psl_bad++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Run one load phase of `us` microseconds; measure over the last `win_us`.
  int  w_clocks, w_pfm, w_seg1, w_seg2, w_seg3, w_full;
  real w_psl, w_pswing, w_nswing;
  task automatic phase(input real amps, input int us, input int win_us, input bit regulated = 1'b1);
    iload = amps;
    repeat ((us - win_us) * 100) @(negedge clk);
    w_clocks = 0; w_pfm = 0; w_seg1 = 0; w_seg2 = 0; w_seg3 = 0; w_full = 0; w_psl = 0.0; w_pswing = 0.0; w_nswing = 0.0;
    vmin_w = 10.0; vmax_w = -10.0; vsum_w = 0.0;
    repeat (win_us * 100) begin
      @(negedge clk);
      #1;
      w_clocks++;
      vsum_w += vout;
      if (vout < vmin_w) vmin_w = vout;
      if (vout > vmax_w) vmax_w = vout;
      w_pfm  += int'(pfm_mode);
      w_seg1 += int'(seg_en == 3'b001);
      w_seg2 += int'(seg_en == 3'b011);
      w_seg3 += int'(seg_en == 3'b111);
      w_full += int'(pulse_sl == PSL_FULL);
      w_psl  += real'(pulse_sl);
      w_pswing += last_pswing;
      w_nswing += last_nswing;
    end
    w_psl = w_psl / w_clocks;
    w_pswing = w_pswing / w_clocks;
    w_nswing = w_nswing / w_clocks;
    $display("load %4.2f A: vout mean %6.4f min %6.4f max %6.4f  ic %0d  pfm %0d%%  seg1/2/3 %0d/%0d/%0d%%  mean pulse_sl %4.1f  swing P %4.2f N %4.2f V",
             amps, vsum_w / w_clocks, vmin_w, vmax_w, ic, 100 * w_pfm / w_clocks,
             100 * w_seg1 / w_clocks, 100 * w_seg2 / w_clocks, 100 * w_seg3 / w_clocks, w_psl, w_pswing, w_nswing);
    if (regulated) chk(vsum_w / w_clocks > VREF - 0.04 && vsum_w / w_clocks < VREF + 0.04,
        $sformatf("regulation at %0.2f A", amps));
  endtask

  real psl_05, psl_10, sw_05, sw_10;
  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    phase(0.5, 400, 100);   // start-up from 0 V, then 0.5 A
    chk(w_seg1 == w_clocks && w_pfm == 0 && w_full < w_clocks, "0.5 A: one segment, scaled swing");
    psl_05 = w_psl;
    sw_05 = w_pswing;
    chk(w_pswing < 4.5 && w_nswing < 4.5, "0.5 A: reduced gate swing on both switches");
    phase(1.0, 300, 100);   // the 0.5 A to 1 A step: gate swing grows
    psl_10 = w_psl;
    sw_10 = w_pswing;
    chk(psl_10 > psl_05, "1 A: longer drive pulses than at 0.5 A");
    chk(sw_10 > sw_05 + 0.2, "1 A: larger gate voltage swing than at 0.5 A");
    chk(w_pfm == 0 && w_seg1 == w_clocks, "1 A: one segment, no PFM");
    phase(0.05, 500, 200);
    chk(w_pfm > w_clocks * 9 / 10, "0.05 A: PFM");
    chk(vmax_w - vmin_w < 0.15, "0.05 A: PFM ripple");
    phase(0.3, 300, 100);
    chk(w_seg1 == w_clocks && w_pfm == 0 && w_full == 0, "0.3 A: one segment, scaled swing, no PFM");
    phase(1.3, 300, 100);
    phase(1.8, 300, 100);
    chk(w_seg2 > w_clocks * 8 / 10, "1.8 A: two segments");
    phase(2.6, 300, 100);
    chk(w_seg3 > w_clocks * 8 / 10, "2.6 A: three segments");
    phase(1.6, 300, 100);
    // input sag to 1.9 V: the pulses run into the maximum duty cycle
    VIN = 1.9;
    n_dmax_trip = 0;
    phase(0.5, 60, 20, 1'b0);
    chk(n_dmax_trip > 10, "duty limit during input sag");
    VIN = 5.0;
    phase(0.5, 200, 100);
    $display("comparator-ended %0d, duty-limited %0d, PFM entries %0d, skipped periods %0d",
             n_cmp_trip, n_dmax_trip, n_pfm_entry, n_skip);
    $display("scaled-swing periods %0d, full-swing periods %0d, floating-gate pulses %0d, periods with 1/2/3 segments %0d/%0d/%0d",
             n_scaled, n_full, n_float, n_seg[1], n_seg[2], n_seg[3]);
    chk(n_cmp_trip > 0,  "comparator-ended pulses happened");
    chk(n_dmax_trip > 0, "duty-limited pulses happened");
    chk(n_pfm_entry > 0, "PFM entered");
    chk(n_skip > 0,      "PFM periods skipped");
    chk(n_scaled > 0,    "scaled gate swing used");
    chk(n_full > 0,      "full gate swing used");
    chk(n_float > 0,     "gate left floating after a partial charge");
    chk(n_seg[1] > 0 && n_seg[2] > 0 && n_seg[3] > 0, "1, 2 and 3 segments used");
    chk(n_seg[0] == 0,   "seg_en always a thermometer code");
    chk(n_ls_in_pfm == 0, "no low side in PFM");
    $display("PFM pulses %0d, mean high-side swing %4.2f V", pfm_sw_n, pfm_sw_sum / pfm_sw_n);
    chk(n_pfm_partial == 0 && pfm_sw_n > 0 && pfm_sw_sum / pfm_sw_n > 4.5, "full high-side swing in PFM");
    chk(n_shoot == 0,    "no shoot-through");
    chk(n_bad_period == 0, "1 MHz switching period");
    chk(n_bad_sample == 0, "one ADC sample per period");
    chk(n_psl_checked > 1000 && n_psl_bad == 0, "optimizers configure each period from the reference at its start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
