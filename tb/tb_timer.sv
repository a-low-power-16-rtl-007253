// tb_timer: programs a period of TCCR+1 = 5 ACLK cycles and checks the time
// between interrupt flags (5 ACLK periods), that `pend_async` precedes the
// synchronised flag, that the acknowledge and a write of 1 to TIFG clear
// the flag, the register read-back, and that a stopped timer holds its
// counter at 0 and raises nothing. MCLK 10 ns, ACLK 80 ns.
module tb_timer;
  import mcu_pkg::*;

  logic mclk = 0, aclk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so every asynchronous reset fires
  per_req_t per = '0;
  logic [15:0] per_rdata;
  logic irq_ack = 0, flag, pend_async;
  int checks = 0, failures = 0;

  timer dut (.mclk, .mclk_rst_n (rst_n), .aclk, .aclk_rst_n (rst_n), .*);

  always #5  mclk = ~mclk;
  always #40 aclk = ~aclk;

  task automatic chk(string s, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", s, got, exp);
    end
  endtask

  task automatic wr(logic [7:0] a, logic [15:0] v);
    @(negedge mclk) per = '{sel: 1'b1, we: 1'b1, addr: a, wdata: v};
    @(negedge mclk) per = '0;
  endtask
  task automatic rd(logic [7:0] a, output logic [15:0] v);
    @(negedge mclk) per = '{sel: 1'b1, we: 1'b0, addr: a, wdata: 16'h0};
    #1 v = per_rdata;
    @(negedge mclk) per = '0;
  endtask

  realtime t_pend, t_flag, t_prev;
  logic [15:0] v;

  initial begin
    #23 rst_n = 1;
    wr(PA_TCCR, 16'd4);
    rd(PA_TCCR, v); chk("TCCR read", v, 4);
    repeat (20) @(posedge aclk);
    chk("no flag while stopped", flag, 0);
    rd(PA_TR, v); chk("counter held while stopped", v, 0);
    wr(PA_TCTL, 16'd1);
    rd(PA_TCTL, v); chk("TCTL read", v, 1);
    @(posedge pend_async) t_pend = $realtime;
    @(posedge flag) t_flag = $realtime;
    checks++;
    if (!(t_pend < t_flag && t_flag - t_pend < 40)) begin
      failures++; $display("FAIL pend %t flag %t", t_pend, t_flag);
    end
    rd(PA_TIFG, v); chk("TIFG read", v, 1);
    // acknowledge clears it
    @(negedge mclk) irq_ack = 1;
    @(negedge mclk) irq_ack = 0;
    chk("flag cleared by ack", flag, 0);
    t_prev = t_pend;
    @(posedge pend_async) chk("period in ACLK cycles", int'(($realtime - t_prev) / 80.0), 5);
    @(posedge flag);
    wr(PA_TIFG, 16'd1);
    chk("flag cleared by write", flag, 0);
    rd(PA_TR, v);
    checks++;
    if (v > 4) begin failures++; $display("FAIL TR %0d", v); end
    wr(PA_TCTL, 16'd0);
    repeat (3) @(posedge aclk);
    rd(PA_TR, v); chk("counter cleared on stop", v, 0);
    wr(PA_TIFG, 16'd1);
    repeat (20) @(posedge aclk);
    chk("no flag after stop", flag, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
