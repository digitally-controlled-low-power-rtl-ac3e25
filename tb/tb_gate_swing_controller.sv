// tb_gate_swing_controller: gives the gate swing controller a random
// current reference at each period start, often next to one of its
// thresholds, then a high-side and a low-side pulse of random lengths,
// with and without PFM. It checks pulse_sl against the threshold table
// (thresholds 72 + 22.5*i rounded, widths 4 + 2*i, full swing from 252),
// that pulse_sl holds during the period, and the four gating signals clock
// by clock: the charging transistor conducts for the first min(width, on-
// time) clocks of each on-time, then the gate floats; PFM gives the high
// side full swing.
module tb_gate_swing_controller;
  import dcdc_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, cycle_start = 1'b0;
  ic_t     ic = '0;
  logic    pfm_mode = 1'b0, hs_on = 1'b0, ls_on = 1'b0;
  psl_t    pulse_sl;
  gating_t gate;
  int      checks = 0, failures = 0;
  int      n_full = 0, n_part = 0, n_pfm = 0, n_float = 0;

  gate_swing_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int th(input int i);
    return 72 + (i * 45 + 1) / 2;
  endfunction

  function automatic int model_sel(input int v);
    int s;
    s = 4;
    for (int i = 1; i < 8; i++) if (v >= th(i)) s = 4 + 2 * i;
    if (v >= 252) s = 63;
    return s;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%s", what); end
  endtask

  initial begin
    int v, sel, hs_len, ls_len, wp, wn;
    bit pfm;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3000; p++) begin
      case ($urandom_range(0, 3))
        0: v = $urandom_range(0, 350);
        1: v = th($urandom_range(1, 7)) + int'($urandom_range(0, 1)) - 1;
        2: v = 252 + int'($urandom_range(0, 1)) - 1;
        default: v = $urandom_range(0, 1023);
      endcase
      pfm = ($urandom_range(0, 4) == 0);
      sel = model_sel(v);
      ic = 10'(v);
      cycle_start = 1'b1;
      @(negedge clk);
      cycle_start = 1'b0;
      pfm_mode = pfm;
      ic = 10'($urandom_range(0, 1023));
      chk(int'(pulse_sl) == sel, $sformatf("pulse_sl %0d expected %0d for ic=%0d", pulse_sl, sel, v));
      if (sel == 63) n_full++; else n_part++;
      if (pfm) n_pfm++;
      hs_len = $urandom_range(1, 40);
      ls_len = $urandom_range(1, 40);
      wp = (pfm || sel == 63) ? hs_len : (sel < hs_len ? sel : hs_len);
      wn = (sel == 63) ? ls_len : (sel < ls_len ? sel : ls_len);
      if (wp < hs_len || wn < ls_len) n_float++;
      // idle clock, high side, two dead clocks, low side, idle clock
      for (int c = 0; c < hs_len + ls_len + 4; c++) begin
        hs_on = (c >= 1 && c < 1 + hs_len);
        ls_on = (c >= 3 + hs_len && c < 3 + hs_len + ls_len);
        #1;
        chk(gate.p_pmos == !hs_on, "p_pmos must conduct exactly while the high side is off");
        chk(gate.n_nmos == !ls_on, "n_nmos must conduct exactly while the low side is off");
        chk(gate.p_nmos == (hs_on && (c - 1) < wp),
            $sformatf("p_nmos at clock %0d of the high-side pulse, width %0d", c - 1, wp));
        chk(gate.n_pmos == (ls_on && (c - 3 - hs_len) < wn),
            $sformatf("n_pmos at clock %0d of the low-side pulse, width %0d", c - 3 - hs_len, wn));
        chk(int'(pulse_sl) == sel, "pulse_sl changed inside the period");
        @(negedge clk);
      end
      hs_on = 1'b0;
      ls_on = 1'b0;
    end
    chk(n_full > 0 && n_part > 0 && n_pfm > 0 && n_float > 0, "cases not covered");
    $display("full %0d scaled %0d pfm %0d floating %0d", n_full, n_part, n_pfm, n_float);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
