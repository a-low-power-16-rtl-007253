// clock_module: generates the main clock MCLK (CPU and bus) and the auxiliary
// clock ACLK (peripherals that keep running in the low-power modes) from two
// crystal oscillators: a 32768 Hz watch crystal (LFXT) and a 450 kHz..8 MHz
// crystal (HFXT). SELM picks the MCLK source (0: HFXT, 1: LFXT), DIVM divides
// it by 1, 2, 4 or 8; ACLK is LFXT divided by DIVA (1, 2, 4, 8). Each output
// passes a clock gate: MCLK is stopped while CPUOFF is set in SR and the
// CPU has reached its idle state (`cpu_halt`), unless an enabled interrupt
// is pending (`wake`, asynchronous), ACLK is stopped while
// OSCOFF is set, and `lfxt_en` tells the LFXT oscillator to stop then.
// Both gates are open while reset is asserted, so that the reset
// synchronisers and every clocked reset see clock edges whatever state the
// mode bits were left in.
// Register BCSCTL (peripheral offset 0x30, MCLK domain): [0] SELM,
// [2:1] DIVM, [4:3] DIVA; reset value 0 (HFXT, no division).
// In scan mode both clocks are the HFXT input (the tester's clock) and the
// gates are opened by scan_enable.
// The two sources, the select, the two dividers and the mode gating follow
// the architecture description; the register layout, the divider ratios and
// the plain (not glitch-suppressing) source multiplexer are this design's
// choice: software should switch SELM only while the divider outputs are low,
// or accept one irregular MCLK cycle.
module clock_module
  import mcu_pkg::*;
(
  input  logic        rst_n,        // general reset (asynchronous)
  input  logic        lfxt_clk,
  input  logic        hfxt_clk,
  input  logic        scan_mode,
  input  logic        scan_enable,
  input  logic        cpu_halt,     // CPU idle with CPUOFF set
  input  logic        oscoff,
  input  logic        wake,
  input  per_req_t    per,
  output logic [15:0] per_rdata,
  output logic        mclk,
  output logic        aclk,
  output logic        lfxt_en
);

  logic       selm;
  logic [1:0] divm, diva;
  logic       msrc, mdiv, adiv;
  logic [2:0] mcnt, acnt;
  logic       mclk_pre, aclk_pre;

  // source select and dividers
  assign msrc = selm ? lfxt_clk : hfxt_clk;

  always_ff @(posedge msrc or negedge rst_n) begin
    if (!rst_n) mcnt <= '0;
    else        mcnt <= mcnt + 3'd1;
  end

  always_ff @(posedge lfxt_clk or negedge rst_n) begin
    if (!rst_n) acnt <= '0;
    else        acnt <= acnt + 3'd1;
  end

  assign mdiv = (divm == 2'd0) ? msrc : mcnt[divm - 2'd1];
  assign adiv = (diva == 2'd0) ? lfxt_clk : acnt[diva - 2'd1];

  // scan-mode clock multiplexers
  assign mclk_pre = scan_mode ? hfxt_clk : mdiv;
  assign aclk_pre = scan_mode ? hfxt_clk : adiv;

  clock_gate u_mclk_gate (
    .clk (mclk_pre), .en (!cpu_halt || wake || !rst_n), .scan_enable, .gclk (mclk)
  );

  clock_gate u_aclk_gate (
    .clk (aclk_pre), .en (!oscoff || !rst_n), .scan_enable, .gclk (aclk)
  );

  assign lfxt_en = !oscoff;

  // BCSCTL register
  always_ff @(posedge mclk or negedge rst_n) begin
    if (!rst_n) begin
      selm <= 1'b0;
      divm <= '0;
      diva <= '0;
    end else if (per.sel && per.we && per.addr == PA_BCSCTL) begin
      selm <= per.wdata[0];
      divm <= per.wdata[2:1];
      diva <= per.wdata[4:3];
    end
  end

  assign per_rdata = (per.sel && per.addr == PA_BCSCTL) ?
                     {11'd0, diva, divm, selm} : 16'd0;

endmodule
