// tb_digital_compensator: checks the PI law of digital_compensator against
// an integer model. Random errors, with long runs of one sign to reach both
// clamps, are applied on sample strobes spaced a few clocks apart; after
// every strobe the reference must equal the model one clock later and must
// not change between strobes.
module tb_digital_compensator;
  import dcdc_pkg::*;

  localparam int KP = 20, KI = 16, FRAC = 4;

  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  err_t e = '0;
  ic_t  ic;
  int   checks = 0, failures = 0;
  int   m_int, m_out, hit_hi = 0, hit_lo = 0;

  digital_compensator #(.KP(KP), .KI(KI), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int ev);
    ic_t ic_prev;
    @(negedge clk);
    e = err_t'(ev);
    sample = 1'b1;
    @(negedge clk);
    sample = 1'b0;
    // model
    m_int = m_int + KI * ev;
    if (m_int < 0) m_int = 0;
    if (m_int > 1024 * 16 - 1) m_int = 1024 * 16 - 1;
    m_out = m_int / 16 + KP * ev;
    if (m_out < 0) m_out = 0;
    if (m_out > 1023) m_out = 1023;
    if (m_out == 1023) hit_hi++;
    if (m_out == 0) hit_lo++;
    checks++;
    if (int'(ic) != m_out) begin
      failures++;
      $display("mismatch e=%0d ic=%0d expected %0d", ev, ic, m_out);
    end
    ic_prev = ic;
    repeat (1 + $urandom_range(3)) @(negedge clk);
    checks++;
    if (ic != ic_prev) begin
      failures++;
      $display("ic changed without a sample strobe");
    end
  endtask

  initial begin
    m_int = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (ic != 0) begin failures++; $display("reset value %0d", ic); end
    for (int i = 0; i < 1500; i++) step($urandom_range(0, 7));          // drive up to the top clamp
    for (int i = 0; i < 1500; i++) step(-int'($urandom_range(0, 8)));   // and down to zero
    for (int i = 0; i < 2000; i++) step(int'($urandom_range(0, 15)) - 8);
    checks++;
    if (hit_hi == 0 || hit_lo == 0) begin failures++; $display("clamps not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
