// tb_mcu_top: end-to-end test of the whole microcontroller at its default
// sizes. The program in ROM (built with asm_pkg) switches the MCLK divider
// and source, programs the timer on ACLK, enters the real-time-clock mode
// (CPUOFF) and lets three timer interrupts run, the third of which returns to
// active mode by editing the saved SR; then it enters sleep mode (CPUOFF and
// OSCOFF, LFXT stopped) and is woken by an edge on I/O pin 0, reads the pin
// and writes the results to RAM. Afterwards the testbench checks scan mode.
// Each mechanism is counted: divided MCLK, MCLK from LFXT, MCLK stopped in
// RTC mode while ACLK runs, ACLK and LFXT stopped in sleep mode, timer and I/O
// interrupts, return from an interrupt into a low-power mode, scan clocking.
// Clock periods are scaled for simulation: HFXT 10 ns, LFXT 160 ns.
module tb_mcu_top;
  import mcu_pkg::*;
  import asm_pkg::*;

  localparam int ROM_BASE = 16'hF000;
  localparam int LF_HALF  = 80;

  logic rst_n = 1, hfxt_clk = 0, lfxt_clk = 0, lfxt_en;
  initial #1 rst_n = 0;   // a real falling edge, so every asynchronous reset fires
  logic scan_mode = 0, scan_enable = 0;
  logic [7:0] p1_in = 0, p1_out, p1_dir;

  int checks = 0, failures = 0, pcw;

  mcu_top dut (.*);

  always #5 hfxt_clk = ~hfxt_clk;
  // LFXT oscillator model: runs only while enabled
  always begin
    #(LF_HALF);
    if (lfxt_en) lfxt_clk = ~lfxt_clk;
    else         lfxt_clk = 1'b0;
  end

  // ---------------- mechanism counters ----------------
  realtime last_m = 0;
  int n_div2 = 0, n_lfsrc = 0, n_mclk_in_rtc = 0, n_aclk_in_rtc = 0;
  int n_aclk_in_sleep = 0, n_sleep_hf = 0, n_rtc_hf = 0;
  int n_tirq = 0, n_ioirq = 0, n_reti_to_lpm = 0;
  logic was_lpm_reti = 0;

  // events are counted only once reset is over (registers start random)
  logic live;
  assign live = rst_n && dut.mrst_n && dut.arst_n;

  always @(posedge dut.mclk) begin
    if (live && $realtime - last_m > 19.0 && $realtime - last_m < 21.0) n_div2++;
    if (live && $realtime - last_m > 159.0 && $realtime - last_m < 161.0) n_lfsrc++;
    last_m = $realtime;
  end
  always @(posedge hfxt_clk) if (live) begin
    if (dut.cpuoff && !dut.oscoff) n_rtc_hf++;
    if (dut.cpuoff && dut.oscoff)  n_sleep_hf++;
  end
  always @(posedge dut.aclk) if (live) begin
    if (dut.cpuoff && !dut.oscoff) n_aclk_in_rtc++;
    if (dut.oscoff) n_aclk_in_sleep++;
  end
  // MCLK edges while the CPU is off and no interrupt is waking it
  always @(posedge dut.mclk) if (live && dut.halted && !dut.wake) n_mclk_in_rtc++;
  always @(posedge dut.mclk) if (live) begin
    if (dut.irq_ack && dut.irq_vector == 16'(ROM_BASE + 2)) n_tirq++;
    if (dut.irq_ack && dut.irq_vector == 16'(ROM_BASE + 4)) n_ioirq++;
    // RETI that restores CPUOFF
    if (dut.u_cpu.u_dec.state == S_RETI_SR && dut.u_cpu.rdata[SR_CPUOFF]) n_reti_to_lpm++;
  end

  // ---------------- program builder ----------------
  task automatic e(input logic [15:0] w);
    dut.u_rom.mem[pcw] = w;
    pcw++;
  endtask
  function automatic int here();
    return ROM_BASE + 2 * pcw;
  endfunction
  task automatic imm2(op2_e op, int imm, int rd);
    e(i2(op, PC, 3, rd)); e(16'(imm));
  endtask
  task automatic imm_abs(op2_e op, int imm, int addr);
    e(i2(op, PC, 3, SR, 1)); e(16'(imm)); e(16'(addr));
  endtask
  task automatic reg_abs(op2_e op, int rs, int addr);
    e(i2(op, rs, 0, SR, 1)); e(16'(addr));
  endtask
  task automatic jump_to(jcond_e c, int target);
    e(jmp(c, (target - (here() + 2)) / 2));
  endtask

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%h) expected %0d (0x%h)", what, got, got, exp, exp);
    end
  endtask
  task automatic check_min(string what, int got, int min);
    checks++;
    if (got < min) begin
      failures++;
      $display("FAIL %s: happened %0d times, expected at least %0d", what, got, min);
    end else $display("mechanism %s: %0d", what, got);
  endtask

  function automatic int rd_ram(int addr);
    return int'(dut.u_ram.mem[(addr - 16'h0200) / 2]);
  endfunction

  int stay, n_scan;

  initial begin
    // vectors
    pcw = 0;
    jump_to(J_MP, 16'hF010);
    jump_to(J_MP, 16'hF300);
    jump_to(J_MP, 16'hF380);
    // timer handler: count; after the third, return to active mode
    pcw = (16'hF300 - ROM_BASE) / 2;
    imm2(OP_ADD, 1, 4);
    e(i2(OP_CMP, PC, 3, 4)); e(16'd3);
    stay = here() + 8;
    jump_to(J_NE, stay);
    e(i2(OP_BIC, PC, 3, SP, 1)); e(16'h0010); e(16'd0);   // BIC #CPUOFF,0(SP)
    e(i1(OP1_RETI, 0));
    // I/O handler: count, clear flag, return to active mode
    pcw = (16'hF380 - ROM_BASE) / 2;
    imm2(OP_ADD, 1, 5);
    imm_abs(OP_MOV, 1, PA_P1IFG);
    e(i2(OP_BIC, PC, 3, SP, 1)); e(16'h0030); e(16'd0);   // BIC #CPUOFF+OSCOFF,0(SP)
    e(i1(OP1_RETI, 0));
    // main
    pcw = (16'hF010 - ROM_BASE) / 2;
    imm2(OP_MOV, 16'h0400, SP);
    imm2(OP_MOV, 0, 4);
    imm2(OP_MOV, 0, 5);
    imm_abs(OP_MOV, 16'h0002, PA_BCSCTL);                  // DIVM = /2
    for (int i = 0; i < 4; i++) imm2(OP_ADD, 1, 6);
    imm_abs(OP_MOV, 16'h0001, PA_BCSCTL);                  // SELM = LFXT
    for (int i = 0; i < 4; i++) imm2(OP_ADD, 1, 6);
    imm_abs(OP_MOV, 16'h0000, PA_BCSCTL);                  // back to HFXT /1
    reg_abs(OP_MOV, 6, 16'h0208);
    imm_abs(OP_MOV, 3, PA_TCCR);                           // period 4 ACLK
    imm_abs(OP_MOV, 1, PA_IE);                             // timer interrupt on
    imm_abs(OP_MOV, 1, PA_TCTL);                           // run
    imm2(OP_BIS, 16'h0018, SR);                            // GIE + CPUOFF: RTC mode
    reg_abs(OP_MOV, 4, 16'h0200);
    imm_abs(OP_MOV, 0, PA_TCTL);                           // stop timer
    imm_abs(OP_MOV, 16'h00F0, PA_P1DIR);
    imm_abs(OP_MOV, 16'h00A0, PA_P1OUT);
    imm_abs(OP_MOV, 16'h0001, PA_P1IE);
    imm_abs(OP_MOV, 2, PA_IE);                             // I/O interrupt on
    imm2(OP_BIS, 16'h0038, SR);                            // GIE + CPUOFF + OSCOFF: sleep
    reg_abs(OP_MOV, 5, 16'h0202);
    e(i2(OP_MOV, SR, 1, SR, 1)); e(16'(PA_P1IN)); e(16'h0204);  // MOV &P1IN,&0x0204
    imm_abs(OP_MOV, 16'h0D0E, 16'h0206);
    e(jmp(J_MP, -1));

    // reset is applied twice: the synchronised internal resets may start at
    // 0 in a two-state simulation, and only their second falling edge
    // reaches the flip-flops that are clocked by the pins
    repeat (4) @(negedge hfxt_clk);
    rst_n = 1;
    repeat (4) @(negedge hfxt_clk);
    rst_n = 0;
    repeat (4) @(negedge hfxt_clk);
    rst_n = 1;
    // wait for sleep mode, stay a while, then wake through pin 0
    wait (dut.cpuoff && dut.oscoff);
    repeat (300) @(negedge hfxt_clk);
    p1_in = 8'h01;
    while (rd_ram(16'h0206) != 16'h0D0E) @(negedge hfxt_clk);
    repeat (10) @(negedge hfxt_clk);

    check("timer interrupts counted by software", rd_ram(16'h0200), 3);
    check("I/O interrupts counted by software", rd_ram(16'h0202), 1);
    check("P1IN read", rd_ram(16'h0204), 1);
    check("program under divided and LFXT clock", rd_ram(16'h0208), 8);
    check("P1OUT", int'(p1_out), 16'hA0);
    check("P1DIR", int'(p1_dir), 16'hF0);
    check("MCLK silent while CPU off", n_mclk_in_rtc, 0);
    check("ACLK silent while OSCOFF", n_aclk_in_sleep, 0);
    check("timer vectors taken", n_tirq, 3);
    check("I/O vectors taken", n_ioirq, 1);
    check_min("MCLK divided by 2", n_div2, 4);
    check_min("MCLK from LFXT", n_lfsrc, 4);
    check_min("RTC mode (HFXT cycles with CPU off)", n_rtc_hf, 20);
    check_min("ACLK running in RTC mode", n_aclk_in_rtc, 8);
    check_min("sleep mode (HFXT cycles)", n_sleep_hf, 250);
    check_min("RETI back into a low-power mode", n_reti_to_lpm, 2);

    // scan mode: MCLK follows the test clock, the gates are open
    scan_mode = 1; scan_enable = 1;
    n_scan = 0;
    repeat (10) @(posedge hfxt_clk) begin
      #1;
      if (dut.mclk && dut.aclk) n_scan++;
    end
    check_min("scan clocking", n_scan, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge hfxt_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
