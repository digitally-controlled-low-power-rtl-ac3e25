// tb_cpm_modulator: runs the peak current modulator period by period with
// a comparator that trips k clocks into each pulse (k random, including
// trips inside the blanking time and pulses that reach the maximum duty),
// with random pulse skipping and random low-side disable. For every period
// it checks the period length, the sample strobe position, the high-side
// on-time min(max(k+1, BLANK), DMAX), the dead time, the low-side on-time
// up to DEAD clocks before the period end, and the trip strobes.
module tb_cpm_modulator;

  localparam int PERIOD = 100, DEAD = 2, DMAX = 90, BLANK = 4, SAMPLE_AT = 96;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmp = 1'b0, pulse_en = 1'b0, ls_dis = 1'b0;
  logic cycle_start, sample, hs_on, ls_on, cmp_trip, dmax_trip;
  int   checks = 0, failures = 0;

  cpm_modulator #(.PERIOD(PERIOD), .DEAD(DEAD), .DMAX(DMAX), .BLANK(BLANK),
                  .SAMPLE_AT(SAMPLE_AT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("period check failed: %s", what);
    end
  endtask

  int n_cmp = 0, n_dmax = 0, n_skip = 0, n_lsdis = 0, n_blank = 0;

  initial begin
    int k, hs_len, ls_len, hs_first, hs_last, ls_first, ls_last, hs_j;
    int samp_at, n_cmp_trip, n_dmax_trip, exp_hs;
    bit pe, ld;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 600; p++) begin
      // wait for the period start, then set this period's inputs
      while (!cycle_start) @(negedge clk);
      pe = ($urandom_range(0, 5) != 0);
      ld = ($urandom_range(0, 4) == 0);
      case ($urandom_range(0, 5))
        0:       k = $urandom_range(0, 3);        // inside blanking
        1:       k = $urandom_range(95, 200);     // never before DMAX
        default: k = $urandom_range(4, 85);
      endcase
      pulse_en = pe;
      ls_dis   = ld;
      hs_len = 0; ls_len = 0; hs_first = -1; hs_last = -1; ls_first = -1; ls_last = -1;
      samp_at = -1; n_cmp_trip = 0; n_dmax_trip = 0; hs_j = 0;
      for (int c = 0; c < PERIOD; c++) begin
        @(negedge clk);
        if (c == 0) begin
          pulse_en = 1'b0;
        end
        // comparator model: trips once the pulse has lasted k clocks
        if (hs_on) begin
          cmp = (hs_j >= k);
          hs_j++;
        end else cmp = 1'b0;
        if (c < PERIOD - 1) begin
          check(!cycle_start, "cycle_start inside the period");
        end
        if (hs_on) begin hs_len++; if (hs_first < 0) hs_first = c + 1; hs_last = c + 1; end
        if (ls_on) begin ls_len++; if (ls_first < 0) ls_first = c + 1; ls_last = c + 1; end
        if (sample) samp_at = c + 1;
        n_cmp_trip += int'(cmp_trip);
        n_dmax_trip += int'(dmax_trip);
      end
      // the loop above ended on the negedge of counter 0 of the next period
      check(cycle_start, "period length");
      check(samp_at == SAMPLE_AT, "sample strobe position");
      if (!pe) begin
        n_skip++;
        check(hs_len == 0 && ls_len == 0, "skipped period has no conduction");
      end else begin
        exp_hs = (k + 1 > BLANK) ? k + 1 : BLANK;
        if (exp_hs > DMAX) exp_hs = DMAX;
        if (k + 1 < BLANK) n_blank++;
        check(hs_first == 1, "high side starts at counter 1");
        check(hs_len == exp_hs, $sformatf("high-side on-time %0d, expected %0d (k=%0d)", hs_len, exp_hs, k));
        check(hs_last - hs_first + 1 == hs_len, "one high-side pulse");
        if (exp_hs == DMAX && k + 1 > DMAX) begin
          n_dmax++;
          check(n_dmax_trip == 1 && n_cmp_trip == 0, "dmax strobe");
        end else begin
          n_cmp++;
          check(n_cmp_trip == 1 && n_dmax_trip == 0, "comparator strobe");
        end
        if (ld) begin
          n_lsdis++;
          check(ls_len == 0, "low side disabled");
        end else begin
          check(ls_first == hs_last + DEAD + 1, "dead time before low side");
          check(ls_last == PERIOD - DEAD - 1, "low side ends DEAD clocks before period end");
          check(ls_len == ls_last - ls_first + 1, "one low-side pulse");
        end
      end
    end
    check(n_cmp > 0 && n_dmax > 0 && n_skip > 0 && n_lsdis > 0 && n_blank > 0, "all cases covered");
    $display("comparator-ended %0d, dmax-ended %0d, skipped %0d, ls disabled %0d, blanked %0d",
             n_cmp, n_dmax, n_skip, n_lsdis, n_blank);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
