// int_judge: the interrupt judge circuit, kept outside the CPU so that
// peripherals can be added without touching it. Two sources, the timer and
// the I/O port, each with its own enable bit in register IE (peripheral
// offset 0x00: [0] timer, [1] I/O). An interrupt is judged to happen only if
// SR's general interrupt enable GIE is set and a source's flag and enable bit
// are both set; then `irq` goes to the CPU together with the vector address.
// Vectors are the first words of ROM: VEC_BASE+2 for the timer, VEC_BASE+4
// for the I/O port (VEC_BASE itself is the reset entry); each holds a jump to
// the handler. The timer has priority when both are pending (this design's
// choice). When the CPU takes the vector (`ack`), the timer flag is
// acknowledged through `timer_ack`; I/O flags are cleared by software.
// `wake` is the asynchronous version of the request, used by the clock module
// to restart MCLK in a low-power mode. Combinational apart from IE.
module int_judge
  import mcu_pkg::*;
#(
  parameter logic [15:0] VEC_BASE = 16'hF000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  per_req_t    per,
  output logic [15:0] per_rdata,
  input  logic        gie,
  input  logic        timer_flag,
  input  logic        io_flag,
  input  logic        timer_pend_async,
  input  logic        io_pend_async,
  input  logic        ack,
  output logic        irq,
  output logic [15:0] vector,
  output logic        timer_ack,
  output logic        wake
);

  logic [1:0] ie;
  logic       t_req, io_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ie <= '0;
    else if (per.sel && per.we && per.addr == PA_IE) ie <= per.wdata[1:0];
  end

  assign per_rdata = (per.sel && per.addr == PA_IE) ? {14'd0, ie} : 16'd0;

  assign t_req  = gie && ie[0] && timer_flag;
  assign io_req = gie && ie[1] && io_flag;
  assign irq    = t_req || io_req;
  assign vector = t_req ? VEC_BASE + 16'd2 : VEC_BASE + 16'd4;
  assign timer_ack = ack && t_req;
  assign wake   = gie && ((ie[0] && timer_pend_async) || (ie[1] && io_pend_async));

endmodule
