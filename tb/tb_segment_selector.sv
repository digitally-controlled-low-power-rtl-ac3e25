// tb_segment_selector: sweeps the current reference over the two segment
// thresholds with random values and random switch commands. It checks the
// thermometer enable against the thresholds, that the enable changes only
// at period starts, and that segments 2 and 3 follow the switch commands at
// full swing when enabled and are held off otherwise.
module tb_segment_selector;
  import dcdc_pkg::*;

  localparam int TH2 = 352, TH3 = 492;

  logic            clk = 1'b0, rst_n = 1'b0, cycle_start = 1'b0;
  ic_t             ic = '0;
  logic            hs_on = 1'b0, ls_on = 1'b0;
  logic [NSEG-1:0] seg_en;
  gating_t         seg_gate [NSEG-1];
  int              checks = 0, failures = 0;
  int              n_seg [4];

  segment_selector dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_gates(input logic [NSEG-1:0] en);
    gating_t want;
    for (int k = 1; k < NSEG; k++) begin
      if (en[k]) want = '{p_pmos: !hs_on, p_nmos: hs_on, n_pmos: ls_on, n_nmos: !ls_on};
      else       want = '{p_pmos: 1'b1, p_nmos: 1'b0, n_pmos: 1'b0, n_nmos: 1'b1};
      checks++;
      if (seg_gate[k-1] != want) begin
        failures++;
        $display("segment %0d gating %b expected %b", k + 1, seg_gate[k-1], want);
      end
    end
  endtask

  initial begin
    logic [NSEG-1:0] m_en;
    int v, nsg;
    m_en = 3'b001;
    n_seg = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 2000; p++) begin
      case ($urandom_range(0, 3))
        0: v = $urandom_range(0, 1023);
        1: v = TH2 + int'($urandom_range(0, 2)) - 1;
        2: v = TH3 + int'($urandom_range(0, 2)) - 1;
        default: v = $urandom_range(250, 600);
      endcase
      ic = 10'(v);
      cycle_start = 1'b1;
      @(negedge clk);
      cycle_start = 1'b0;
      m_en = (v >= TH3) ? 3'b111 : (v >= TH2) ? 3'b011 : 3'b001;
      nsg = (v >= TH3) ? 3 : (v >= TH2) ? 2 : 1;
      n_seg[nsg]++;
      checks++;
      if (seg_en != m_en) begin failures++; $display("seg_en %b expected %b for ic=%0d", seg_en, m_en, v); end
      // a period: high side, gap, low side, with ic moving meanwhile
      for (int c = 0; c < 12; c++) begin
        hs_on = (c >= 1 && c < 5);
        ls_on = (c >= 7 && c < 11);
        ic = 10'($urandom_range(0, 1023));
        @(negedge clk);
        checks++;
        if (seg_en != m_en) begin failures++; $display("seg_en changed inside the period"); end
        check_gates(m_en);
      end
    end
    checks++;
    if (n_seg[1] == 0 || n_seg[2] == 0 || n_seg[3] == 0) begin failures++; $display("not all counts seen"); end
    $display("periods with 1/2/3 segments: %0d %0d %0d", n_seg[1], n_seg[2], n_seg[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
