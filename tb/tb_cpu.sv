// tb_cpu: self-checking test of the CPU (decode unit, execution unit, bus
// arbiter, address decode cell) with behavioural ROM, RAM and peripheral
// registers. A program built with asm_pkg runs every instruction of the set
// in all source addressing modes (register, indexed/absolute/symbolic,
// indirect, indirect autoincrement/immediate) and both destination modes,
// byte and word, stores its results in RAM and counts wrong branch outcomes
// in R3. The testbench also raises two interrupts: one while the program
// polls, and one while the CPU is off (CPUOFF), checking that the CPU makes
// no bus access while off and that the handler, by clearing CPUOFF in the
// saved SR, returns to active mode. Expected values are written out by hand.
module tb_cpu;
  import mcu_pkg::*;
  import asm_pkg::*;

  localparam int ROM_BYTES = 4096, RAM_BYTES = 512;
  localparam int ROM_BASE = 16'hF000;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so every asynchronous reset fires
  logic irq, irq_req = 0, irq_ack, gie, cpuoff, oscoff, halted;
  logic rom_en, ram_en, ram_we;
  logic [10:0] rom_addr;
  logic [7:0]  ram_addr;
  logic [1:0]  ram_be;
  logic [15:0] rom_rdata, ram_rdata, ram_wdata, per_rdata;
  per_req_t    per;

  logic [15:0] rom_m [2048];
  logic [15:0] ram_m [256];
  logic [15:0] per_m [128];

  int checks = 0, failures = 0;
  int pcw;
  int cyc = 0;
  int off_cycles = 0, off_bus = 0, irq_count = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  cpu #(.ROM_BYTES(ROM_BYTES), .RAM_BYTES(RAM_BYTES)) dut (
    .clk, .rst_n, .scan_enable (1'b0),
    .irq, .irq_vector (16'(ROM_BASE + 2)), .irq_ack,
    .gie, .cpuoff, .oscoff, .halted,
    .rom_en, .rom_addr, .rom_rdata,
    .ram_en, .ram_we, .ram_be, .ram_addr, .ram_wdata, .ram_rdata,
    .per, .per_rdata
  );

  assign rom_rdata = rom_en ? rom_m[rom_addr] : 16'd0;
  assign ram_rdata = ram_en ? ram_m[ram_addr] : 16'd0;
  assign per_rdata = per.sel ? per_m[per.addr[7:1]] : 16'd0;
  assign irq       = irq_req && gie;

  always @(posedge clk) begin
    if (ram_en && ram_we) begin
      if (ram_be[0]) ram_m[ram_addr][7:0]  <= ram_wdata[7:0];
      if (ram_be[1]) ram_m[ram_addr][15:8] <= ram_wdata[15:8];
    end
    if (per.sel && per.we) per_m[per.addr[7:1]] <= per.wdata;
    if (cpuoff && irq_count == 1 && !irq_req) begin
      off_cycles <= off_cycles + 1;
      if (rom_en || ram_en || per.sel) off_bus <= off_bus + 1;
    end
    if (irq_ack) irq_count <= irq_count + 1;
  end

  // ---------------- program builder ----------------
  task automatic e(input logic [15:0] w);
    rom_m[pcw] = w;
    pcw++;
  endtask
  function automatic int here();
    return ROM_BASE + 2 * pcw;
  endfunction
  task automatic imm2(op2_e op, int imm, int rd, int bw = 0);
    e(i2(op, PC, 3, rd, 0, bw)); e(16'(imm));
  endtask
  task automatic imm_abs(op2_e op, int imm, int addr, int bw = 0);
    e(i2(op, PC, 3, SR, 1, bw)); e(16'(imm)); e(16'(addr));
  endtask
  task automatic reg_abs(op2_e op, int rs, int addr);
    e(i2(op, rs, 0, SR, 1)); e(16'(addr));
  endtask
  // branch that must be taken: otherwise R3 is incremented
  task automatic expect_taken(jcond_e c);
    e(jmp(c, 2)); e(i2(OP_ADD, PC, 3, 3)); e(16'd1);
  endtask
  task automatic jump_to(jcond_e c, int target);
    e(jmp(c, (target - (here() + 2)) / 2));
  endtask

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] rd_ram(int addr);
    return ram_m[(addr - 16'h0200) / 2];
  endfunction

  int w_loop, loop_top;

  initial begin
    for (int i = 0; i < 2048; i++) rom_m[i] = '0;
    for (int i = 0; i < 256; i++)  ram_m[i] = '0;
    for (int i = 0; i < 128; i++)  per_m[i] = '0;
    // vectors
    pcw = 0;
    jump_to(J_MP, 16'hF010);            // reset entry
    jump_to(J_MP, 16'hF300);            // interrupt entry
    // subroutine
    pcw = (16'hF400 - ROM_BASE) / 2;
    imm2(OP_MOV, 16'h7777, 11);
    e(i2(OP_MOV, SP, 3, PC));           // RET
    // interrupt handler
    pcw = (16'hF300 - ROM_BASE) / 2;
    e(i2(OP_ADD, PC, 3, SR, 1)); e(16'd1); e(16'h031C);  // ADD #1,&0x031C
    e(i2(OP_BIC, PC, 3, SP, 1)); e(16'h0010); e(16'd0);  // BIC #CPUOFF,0(SP)
    e(i1(OP1_RETI, 0));
    // main
    pcw = (16'hF010 - ROM_BASE) / 2;
    imm2(OP_MOV, 16'h0400, SP);
    imm2(OP_MOV, 0, 3);
    imm2(OP_MOV, 16'h1234, 4);
    imm2(OP_MOV, 16'h00FF, 5);
    e(i2(OP_ADD, 4, 0, 5));                            // R5 = 0x1333
    reg_abs(OP_MOV, 5, 16'h0300);
    imm2(OP_MOV, 16'h0300, 6);
    e(i2(OP_ADD, 6, 2, 4));                            // ADD @R6,R4
    e(i2(OP_MOV, 4, 0, 6, 1)); e(16'd2);               // MOV R4,2(R6)
    e(i2(OP_SUB, PC, 3, 6, 1)); e(16'd1); e(16'd2);    // SUB #1,2(R6)
    e(i2(OP_MOV, 6, 3, 6, 1)); e(16'd4);               // MOV @R6+,4(R6)
    e(i2(OP_CMP, PC, 3, 6, 1)); e(16'h2566); e(16'd0); // CMP #0x2566,0(R6)
    expect_taken(J_EQ);
    imm2(OP_MOV, 16'hFFFF, 7);
    imm2(OP_ADD, 1, 7);
    expect_taken(J_C);
    expect_taken(J_EQ);
    imm2(OP_ADDC, 5, 7);                               // 0+5+1
    expect_taken(J_NC);
    reg_abs(OP_MOV, 7, 16'h0308);
    imm2(OP_MOV, 10, 8);
    imm2(OP_SUBC, 3, 8);                               // 10-3-1
    reg_abs(OP_MOV, 8, 16'h030A);
    imm2(OP_MOV, 16'h0199, 9);
    imm2(OP_BIC, 1, SR);
    imm2(OP_DADD, 16'h0001, 9);
    reg_abs(OP_MOV, 9, 16'h030C);
    imm2(OP_MOV, 16'h00F0, 10);
    imm2(OP_BIS, 16'h000F, 10);
    imm2(OP_BIC, 16'h0011, 10);
    imm2(OP_XOR, 16'h0F0F, 10);
    imm2(OP_AND, 16'h0FF0, 10);
    reg_abs(OP_MOV, 10, 16'h030E);
    imm2(OP_BIT, 16'h0020, 10);
    expect_taken(J_NE);
    expect_taken(J_C);
    imm2(OP_BIT, 16'h0001, 10);
    expect_taken(J_EQ);
    expect_taken(J_NC);
    imm2(OP_MOV, 16'h0080, 14, 1);
    imm2(OP_ADD, 16'h0080, 14, 1);                     // byte: 0x80+0x80
    expect_taken(J_EQ);
    expect_taken(J_C);
    expect_taken(J_L);
    reg_abs(OP_MOV, 14, 16'h0328);
    imm_abs(OP_MOV, 16'h00AB, 16'h0311, 1);
    imm_abs(OP_MOV, 16'h00CD, 16'h0310, 1);
    e(i2(OP_MOV, SR, 1, 13, 0, 1)); e(16'h0311);       // MOV.B &0x0311,R13
    reg_abs(OP_MOV, 13, 16'h0320);
    imm2(OP_MOV, 16'h8001, 12);
    e(i1(OP1_RRA, 12));
    e(i1(OP1_RRC, 12));
    e(i1(OP1_SWPB, 12));
    e(i1(OP1_SXT, 12));
    expect_taken(J_N);
    reg_abs(OP_MOV, 12, 16'h0312);
    imm_abs(OP_MOV, 16'h0004, 16'h0314);
    e(i1(OP1_RRA, SR, 1)); e(16'h0314);                // RRA &0x0314
    e(i1(OP1_PUSH, PC, 3)); e(16'h5555);               // PUSH #0x5555
    e(i1(OP1_CALL, PC, 3)); e(16'hF400);               // CALL #0xF400
    e(i2(OP_MOV, SP, 3, 14));                          // POP R14
    reg_abs(OP_MOV, 11, 16'h0316);
    reg_abs(OP_MOV, 14, 16'h0318);
    reg_abs(OP_MOV, SP, 16'h0322);
    imm2(OP_MOV, 5, 15);
    loop_top = here();
    imm2(OP_ADD, 1, 9);
    imm2(OP_SUB, 1, 15);
    jump_to(J_NE, loop_top);
    reg_abs(OP_MOV, 9, 16'h0324);
    e(i2(OP_CMP, PC, 3, 4)); e(16'd3);
    expect_taken(J_GE);
    imm_abs(OP_MOV, 16'h4321, 16'h0040);               // peripheral write
    e(i2(OP_MOV, SR, 1, 13)); e(16'h0040);             // peripheral read
    reg_abs(OP_MOV, 13, 16'h0326);
    e(i2(OP_MOV, 0, 1, 13)); e(16'h0000);              // MOV 0(PC),R13: reads the word after the index word
    reg_abs(OP_MOV, 13, 16'h032A);
    imm2(OP_BIS, 8, SR);                               // enable interrupts
    w_loop = here();
    e(i2(OP_CMP, PC, 3, SR, 1)); e(16'd0); e(16'h031C);
    jump_to(J_EQ, w_loop);
    imm2(OP_BIS, 16'h0010, SR);                        // CPUOFF
    imm_abs(OP_MOV, 16'hDEAD, 16'h031E);
    reg_abs(OP_MOV, 3, 16'h031A);
    e(jmp(J_MP, -1));

    repeat (3) @(negedge clk);
    rst_n = 1;
    // first interrupt while polling
    wait (gie === 1'b1);
    repeat (5) @(negedge clk);
    irq_req = 1;
    @(posedge clk iff irq_ack);
    @(negedge clk) irq_req = 0;
    // second interrupt while the CPU is off
    wait (cpuoff === 1'b1);
    repeat (40) @(negedge clk);
    irq_req = 1;
    @(posedge clk iff irq_ack);
    @(negedge clk) irq_req = 0;
    while (rd_ram(16'h031E) != 16'hDEAD) @(negedge clk);
    repeat (20) @(negedge clk);

    check("ADD reg,reg",          rd_ram(16'h0300), 16'h1333);
    check("ADD @Rn / SUB #,X(Rn)", rd_ram(16'h0302), 16'h2566);
    check("MOV @Rn+,X(Rn)",       rd_ram(16'h0306), 16'h1333);
    check("ADDC",                 rd_ram(16'h0308), 16'h0006);
    check("SUBC",                 rd_ram(16'h030A), 16'h0006);
    check("DADD",                 rd_ram(16'h030C), 16'h0200);
    check("BIS/BIC/XOR/AND",      rd_ram(16'h030E), 16'h0FE0);
    check("byte writes",          rd_ram(16'h0310), 16'hABCD);
    check("RRA/RRC/SWPB/SXT",     rd_ram(16'h0312), 16'hFFE0);
    check("RRA memory",           rd_ram(16'h0314), 16'h0002);
    check("CALL/RET",             rd_ram(16'h0316), 16'h7777);
    check("PUSH/POP",             rd_ram(16'h0318), 16'h5555);
    check("branch failures",      rd_ram(16'h031A), 16'h0000);
    check("interrupts handled",   rd_ram(16'h031C), 16'h0002);
    check("byte read",            rd_ram(16'h0320), 16'h00AB);
    check("SP balanced",          rd_ram(16'h0322), 16'h0400);
    check("loop",                 rd_ram(16'h0324), 16'h0205);
    check("peripheral access",    rd_ram(16'h0326), 16'h4321);
    check("byte ADD result",      rd_ram(16'h0328), 16'h0000);
    check("symbolic mode",        rd_ram(16'h032A), i2(OP_MOV, 13, 0, SR, 1));
    check("interrupt acks",       16'(irq_count), 16'd2);
    check("bus idle while CPUOFF", 16'(off_bus), 16'd0);
    checks++;
    if (off_cycles < 30) begin
      failures++;
      $display("FAIL CPUOFF lasted only %0d cycles", off_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
