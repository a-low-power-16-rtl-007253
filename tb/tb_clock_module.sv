// tb_clock_module: writes BCSCTL and measures the MCLK and ACLK periods for
// every divider setting and both MCLK sources; checks that MCLK stops when
// the CPU halts with CPUOFF and restarts on wake, that OSCOFF stops ACLK and
// the LFXT oscillator, the register read-back, and scan-mode clocking.
// HFXT period 10 ns, LFXT period 80 ns (scaled for simulation).
module tb_clock_module;
  import mcu_pkg::*;

  logic rst_n = 1, lfxt_clk = 0, hfxt_clk = 0, scan_mode = 0, scan_enable = 0;
  initial #1 rst_n = 0;   // a real falling edge, so every asynchronous reset fires
  logic cpu_halt = 0, oscoff = 0, wake = 0;
  per_req_t per = '0;
  logic [15:0] per_rdata;
  logic mclk, aclk, lfxt_en;
  int checks = 0, failures = 0;

  clock_module dut (.*);

  always #5  hfxt_clk = ~hfxt_clk;
  always #40 lfxt_clk = ~lfxt_clk;

  task automatic chk(string s, real got, real exp);
    checks++;
    if (got < exp - 0.5 || got > exp + 0.5) begin
      failures++;
      $display("FAIL %s: got %0.1f exp %0.1f", s, got, exp);
    end
  endtask

  task automatic wr(logic [15:0] v);
    @(negedge mclk);
    per = '{sel: 1'b1, we: 1'b1, addr: PA_BCSCTL, wdata: v};
    @(posedge mclk);
    #1 per = '0;
    repeat (20) @(posedge mclk);   // let the dividers settle
  endtask

  // average period over n rising edges
  task automatic period(input bit m, input int n, output real p);
    realtime t0;
    if (m) @(posedge mclk); else @(posedge aclk);
    t0 = $realtime;
    repeat (n) if (m) @(posedge mclk); else @(posedge aclk);
    p = ($realtime - t0) / n;
  endtask

  // edges of a clock within a time window
  task automatic count(input bit m, input int ns, output int c);
    int k = 0;
    fork
      begin
        forever begin
          if (m) @(posedge mclk); else @(posedge aclk);
          k++;
        end
      end
      #(ns);
    join_any
    disable fork;
    c = k;
  endtask

  real p;
  int c;

  initial begin
    #23 rst_n = 1;
    period(1, 8, p); chk("MCLK HFXT/1", p, 10);
    period(0, 4, p); chk("ACLK LFXT/1", p, 80);
    for (int d = 1; d < 4; d++) begin
      wr(16'(d << 1));
      period(1, 8, p); chk($sformatf("MCLK HFXT/%0d", 1 << d), p, 10.0 * (1 << d));
    end
    wr(16'h0001);
    period(1, 4, p); chk("MCLK LFXT/1", p, 80);
    wr(16'h0003);
    period(1, 4, p); chk("MCLK LFXT/2", p, 160);
    for (int d = 1; d < 4; d++) begin
      wr(16'(d << 3));
      period(0, 4, p); chk($sformatf("ACLK LFXT/%0d", 1 << d), p, 80.0 * (1 << d));
    end
    // read back
    @(negedge mclk) per = '{sel: 1'b1, we: 1'b0, addr: PA_BCSCTL, wdata: 16'h0};
    #1 checks++;
    if (per_rdata !== 16'h0018) begin failures++; $display("FAIL readback %h", per_rdata); end
    per = '0;
    wr(16'h0000);
    // CPU halt stops MCLK, wake restarts it
    @(negedge hfxt_clk) cpu_halt = 1;
    count(1, 300, c); chk("MCLK edges while halted", c, 0);
    wake = 1;
    count(1, 100, c); chk("MCLK edges on wake", c, 10);
    wake = 0; cpu_halt = 0;
    // OSCOFF stops ACLK and the oscillator enable
    oscoff = 1;
    #1 checks++;
    if (lfxt_en !== 1'b0) begin failures++; $display("FAIL lfxt_en"); end
    count(0, 800, c); chk("ACLK edges with OSCOFF", c, 0);
    oscoff = 0;
    count(0, 800, c); chk("ACLK edges without OSCOFF", c, 10);
    // scan: both clocks follow HFXT, gates open
    scan_mode = 1; scan_enable = 1; cpu_halt = 1; oscoff = 1;
    period(1, 8, p); chk("MCLK in scan", p, 10);
    period(0, 8, p); chk("ACLK in scan", p, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
