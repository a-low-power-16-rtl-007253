// regfile: the sixteen 16-bit registers of the execution unit.
// R0 is the program counter, R1 the stack pointer, R2 the status register;
// R3..R15 are the thirteen general-purpose registers. Two combinational read
// ports serve the source and destination register; two write ports (port 1
// wins over port 0 on the same register) plus a flag-update port for SR cover
// the cases where one cycle changes two registers (e.g. PC increment together
// with an autoincremented pointer, SP and PC on an interrupt). Bit 0 of PC
// and SP is held at zero (word alignment). Reset clears every register except
// PC, which is loaded with RESET_PC, the start of program memory.
// Low-power structure: every register sits behind its own hand-inserted
// clock gate (sixteen gates), opened only in a cycle that writes that
// register, so a register that is not written sees no clock edge at all.
// Hand-inserted gating of the execution unit's fast-switching registers
// follows the architecture description; one gate per register is this
// design's choice of granularity. Each gate is also held open during reset.
// Writes take effect at the rising clock edge.
module regfile
  import mcu_pkg::*;
#(
  parameter logic [15:0] RESET_PC = 16'hF000   // first instruction after reset
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scan_enable,
  input  logic [3:0]  ra,
  input  logic [3:0]  rb,
  output logic [15:0] rdata_a,
  output logic [15:0] rdata_b,
  input  logic        we0,
  input  logic [3:0]  wa0,
  input  logic [15:0] wd0,
  input  logic        we1,
  input  logic [3:0]  wa1,
  input  logic [15:0] wd1,
  input  logic        flag_we,     // update C,Z,N,V of SR
  input  logic [3:0]  flags,       // {V,N,Z,C}
  output logic [15:0] pc,
  output logic [15:0] sp,
  output logic [15:0] sr
);

  logic [15:0] regs [16];

  for (genvar i = 0; i < 16; i++) begin : g_reg
    localparam bit ALIGNED = (i == R_PC) || (i == R_SP);
    localparam logic [15:0] RST_VAL = (i == R_PC) ? RESET_PC : 16'h0000;
    logic        wr0, wr1, wrf, gclk;
    logic [15:0] q;

    assign wr0 = we0 && wa0 == 4'(i);
    assign wr1 = we1 && wa1 == 4'(i);
    assign wrf = flag_we && (i == R_SR);

    clock_gate u_cg (
      .clk         (clk),
      .en          (wr0 | wr1 | wrf | !rst_n),
      .scan_enable (scan_enable),
      .gclk        (gclk)
    );

    always_ff @(posedge gclk or negedge rst_n) begin
      if (!rst_n) q <= RST_VAL;
      else if (wr1) q <= ALIGNED ? {wd1[15:1], 1'b0} : wd1;
      else if (wr0) q <= ALIGNED ? {wd0[15:1], 1'b0} : wd0;
      else if (wrf) begin
        q[SR_C] <= flags[0];
        q[SR_Z] <= flags[1];
        q[SR_N] <= flags[2];
        q[SR_V] <= flags[3];
      end
    end

    assign regs[i] = q;
  end

  assign rdata_a = regs[ra];
  assign rdata_b = regs[rb];
  assign pc      = regs[R_PC];
  assign sp      = regs[R_SP];
  assign sr      = regs[R_SR];

endmodule
