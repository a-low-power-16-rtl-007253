// tb_int_judge: all combinations of GIE, IE bits and the two source flags;
// checks the request, the vector (timer first), the timer acknowledge, the
// asynchronous wake and the IE register.
module tb_int_judge;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so every asynchronous reset fires
  per_req_t per = '0;
  logic [15:0] per_rdata, vector;
  logic gie, timer_flag, io_flag, timer_pend_async, io_pend_async, ack;
  logic irq, timer_ack, wake;
  int checks = 0, failures = 0;

  int_judge #(.VEC_BASE(16'hF000)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string s, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", s, got, exp);
    end
  endtask

  initial begin
    {gie, timer_flag, io_flag, timer_pend_async, io_pend_async, ack} = '0;
    #12 rst_n = 1;
    for (int ie = 0; ie < 4; ie++) begin
      @(negedge clk) per = '{sel: 1'b1, we: 1'b1, addr: PA_IE, wdata: 16'(ie)};
      @(negedge clk) per = '{sel: 1'b1, we: 1'b0, addr: PA_IE, wdata: 16'h0};
      #1 chk("IE read", per_rdata, ie);
      per = '0;
      for (int v = 0; v < 64; v++) begin
        logic t, io;
        {gie, timer_flag, io_flag, timer_pend_async, io_pend_async, ack} = 6'(v);
        #1;
        t  = gie && ie[0] && timer_flag;
        io = gie && ie[1] && io_flag;
        chk("irq", irq, t || io);
        if (t || io) chk("vector", vector, t ? 16'hF002 : 16'hF004);
        chk("timer_ack", timer_ack, ack && t);
        chk("wake", wake, gie && ((ie[0] && timer_pend_async) || (ie[1] && io_pend_async)));
      end
    end
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
