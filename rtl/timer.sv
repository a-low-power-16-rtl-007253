// timer: a periodic interval timer clocked by ACLK, so that it keeps counting
// (and can wake the CPU) in the real-time-clock mode, where MCLK is stopped.
// The counter runs from 0 to TCCR and then restarts at 0, raising the timer
// interrupt flag each time it wraps; it is held at 0 while TCTL.run is 0.
// Registers (peripheral offsets, MCLK domain): TCTL 0x20 [0] run; TCCR 0x22
// period minus one; TR 0x24 counter value (read only; sampled across clock
// domains without a handshake: while the timer runs, a read that meets an
// ACLK edge can mix old and new bits, so software reads it until two
// consecutive reads agree); TIFG 0x26
// [0] interrupt flag, write 1 to clear; it is also cleared when the CPU takes
// the timer vector. TCTL and TCCR should be changed only while the timer is
// stopped. Only the existence of timers and of the timer interrupt is given;
// the counter's form and registers are this design's choice.
module timer
  import mcu_pkg::*;
(
  input  logic        mclk,
  input  logic        mclk_rst_n,
  input  logic        aclk,
  input  logic        aclk_rst_n,
  input  per_req_t    per,
  output logic [15:0] per_rdata,
  input  logic        irq_ack,
  output logic        flag,
  output logic        pend_async
);

  logic        run;
  logic [15:0] tccr, cnt;
  logic        tgl, clr;

  // MCLK-domain registers
  always_ff @(posedge mclk or negedge mclk_rst_n) begin
    if (!mclk_rst_n) begin
      run  <= 1'b0;
      tccr <= 16'hFFFF;
    end else if (per.sel && per.we) begin
      if (per.addr == PA_TCTL) run  <= per.wdata[0];
      if (per.addr == PA_TCCR) tccr <= per.wdata;
    end
  end

  // ACLK-domain counter
  always_ff @(posedge aclk or negedge aclk_rst_n) begin
    if (!aclk_rst_n) begin
      cnt <= '0;
      tgl <= 1'b0;
    end else if (!run) begin
      cnt <= '0;
    end else if (cnt >= tccr) begin
      cnt <= '0;
      tgl <= ~tgl;
    end else begin
      cnt <= cnt + 16'd1;
    end
  end

  assign clr = irq_ack || (per.sel && per.we && per.addr == PA_TIFG && per.wdata[0]);

  event_sync u_sync (
    .clk (mclk), .rst_n (mclk_rst_n), .evt_tgl (tgl), .clr, .flag, .pend_async
  );

  always_comb begin
    per_rdata = '0;
    if (per.sel) begin
      unique case (per.addr)
        PA_TCTL: per_rdata = {15'd0, run};
        PA_TCCR: per_rdata = tccr;
        PA_TR:   per_rdata = cnt;
        PA_TIFG: per_rdata = {15'd0, flag};
        default: per_rdata = '0;
      endcase
    end
  end

endmodule
