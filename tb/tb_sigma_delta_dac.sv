// tb_sigma_delta_dac: for a set of constant inputs, the number of ones in
// 2^W consecutive output bits must equal the input exactly, and the running
// count of ones must stay within one of n*din/2^W at every clock (first-
// order noise shaping). The input then changes without reset to check that
// the stream follows it.
module tb_sigma_delta_dac;
  localparam int W = 10;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] din = '0;
  logic         dout;
  int           checks = 0, failures = 0;

  sigma_delta_dac #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_value(input int v);
    int ones;
    longint err;
    @(negedge clk);
    din = W'(v);
    @(negedge clk);   // first bit computed from the new value
    ones = 0;
    for (int n = 1; n <= 2 ** W; n++) begin
      ones += int'(dout);
      if (n < 2 ** W) @(negedge clk);
      err = longint'(ones) * (2 ** W) - longint'(n) * v;
      if (err >= 2 * (2 ** W) || err <= -2 * (2 ** W)) begin
        failures++;
        $display("din=%0d n=%0d ones=%0d: running error too large", v, n, ones);
        break;
      end
    end
    checks++;
    if (ones != v) begin
      failures++;
      $display("din=%0d: %0d ones in 2^W bits", v, ones);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_value(0);
    run_value(1);
    run_value(512);
    run_value(1023);
    run_value(341);
    run_value(77);
    for (int i = 0; i < 10; i++) run_value($urandom_range(0, 1023));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
