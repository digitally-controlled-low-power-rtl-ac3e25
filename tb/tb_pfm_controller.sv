// tb_pfm_controller: drives the PFM controller with a random walk of the
// current reference that crosses the 0.1 A thresholds many times and with
// random errors. It checks the hysteresis (enter below PFM_ENTER, leave at
// PFM_EXIT), that the mode changes only at period starts, and the pulse
// skipping rule against a model.
module tb_pfm_controller;
  import dcdc_pkg::*;

  localparam int ENTER = 20, EXIT = 30;

  logic clk = 1'b0, rst_n = 1'b0, cycle_start = 1'b0;
  ic_t  ic = '0;
  err_t e = '0;
  logic pfm_mode, pulse_en;
  int   checks = 0, failures = 0;
  int   n_enter = 0, n_exit = 0, n_skip = 0;

  pfm_controller #(.PFM_ENTER(10'(ENTER)), .PFM_EXIT(10'(EXIT))) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m_pfm, m_next, m_pe, old;
    int v;
    v = 60;
    m_pfm = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3000; p++) begin
      // several clocks between period starts: the mode must hold
      repeat ($urandom_range(1, 4)) begin
        old = pfm_mode;
        ic = 10'($urandom_range(0, 60));
        @(negedge clk);
        checks++;
        if (pfm_mode != old) begin failures++; $display("mode changed without cycle_start"); end
      end
      v += int'($urandom_range(0, 6)) - 3;
      if (v < 0) v = 0;
      if (v > 60) v = 60;
      ic = 10'(v);
      e = err_t'(int'($urandom_range(0, 15)) - 8);
      m_next = m_pfm ? (v < EXIT) : (v < ENTER);
      m_pe = !m_next || (int'(e) > 0);
      cycle_start = 1'b1;
      #1;
      checks++;
      if (pulse_en != m_pe) begin failures++; $display("pulse_en %0b expected %0b", pulse_en, m_pe); end
      if (!m_pe) n_skip++;
      @(negedge clk);
      cycle_start = 1'b0;
      if (m_next && !m_pfm) n_enter++;
      if (!m_next && m_pfm) n_exit++;
      m_pfm = m_next;
      checks++;
      if (pfm_mode != m_pfm) begin failures++; $display("pfm_mode %0b expected %0b at ic=%0d", pfm_mode, m_pfm, v); end
    end
    checks++;
    if (n_enter == 0 || n_exit == 0 || n_skip == 0) begin failures++; $display("cases not covered"); end
    $display("entries %0d exits %0d skipped pulses %0d", n_enter, n_exit, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
