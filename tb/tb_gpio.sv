// tb_gpio: checks the output, direction and edge-select registers, the
// synchronised P1IN, rising and falling edge detection per pin with the
// flags in P1IFG, the interrupt request only for enabled pins, the
// asynchronous pending signal while MCLK is stopped, and write-1-to-clear.
module tb_gpio;
  import mcu_pkg::*;

  logic mclk_run = 1, osc = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so every asynchronous reset fires
  logic mclk;
  per_req_t per = '0;
  logic [15:0] per_rdata;
  logic [7:0] p_in = 0, p_out, p_dir;
  logic flag, pend_async;
  int checks = 0, failures = 0;

  assign mclk = osc & mclk_run;
  gpio dut (.*);

  always #5 osc = ~osc;

  task automatic chk(string s, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", s, got, exp);
    end
  endtask
  task automatic wr(logic [7:0] a, logic [15:0] v);
    @(negedge osc) per = '{sel: 1'b1, we: 1'b1, addr: a, wdata: v};
    @(negedge osc) per = '0;
  endtask
  task automatic rd(logic [7:0] a, output logic [15:0] v);
    @(negedge osc) per = '{sel: 1'b1, we: 1'b0, addr: a, wdata: 16'h0};
    #1 v = per_rdata;
    @(negedge osc) per = '0;
  endtask

  logic [15:0] v;

  initial begin
    #23 rst_n = 1;
    wr(PA_P1OUT, 16'h5A); wr(PA_P1DIR, 16'hC3);
    chk("p_out", p_out, 8'h5A); chk("p_dir", p_dir, 8'hC3);
    p_in = 8'h96;
    repeat (3) @(negedge osc);
    rd(PA_P1IN, v); chk("P1IN", v, 16'h96);
    // rising edges on pins 1,2,4,7 happened above
    rd(PA_P1IFG, v); chk("flags after rising edges", v, 16'h96);
    chk("no request without enable", flag, 0);
    wr(PA_P1IFG, 16'hFF);
    rd(PA_P1IFG, v); chk("flags cleared", v, 0);
    // falling-edge select on pin 2, enable pins 2 and 0
    wr(PA_P1IES, 16'h04);
    wr(PA_P1IFG, 16'hFF);      // selecting a falling edge on a high pin counts as an edge
    rd(PA_P1IES, v); chk("P1IES", v, 16'h04);
    wr(PA_P1IE, 16'h05);
    rd(PA_P1IE, v); chk("P1IE", v, 16'h05);
    chk("no request yet", flag, 0);
    // stop MCLK: the edge must still be seen
    @(negedge osc) mclk_run = 0;
    #20 p_in[2] = 1'b0;        // falling edge on pin 2
    #1 chk("pend_async with MCLK stopped", pend_async, 1);
    chk("flag waits for MCLK", flag, 0);
    #20 mclk_run = 1;
    repeat (3) @(negedge osc);
    chk("request", flag, 1);
    rd(PA_P1IFG, v); chk("pin 2 flag", v, 16'h04);
    p_in[3] = 1'b1;            // rising on pin 3: flag, but not enabled
    repeat (3) @(negedge osc);
    rd(PA_P1IFG, v); chk("pin 3 flag", v, 16'h0C);
    wr(PA_P1IFG, 16'h04);
    chk("request cleared", flag, 0);
    chk("pend cleared", pend_async, 0);
    rd(PA_P1IFG, v); chk("pin 3 flag kept", v, 16'h08);
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
