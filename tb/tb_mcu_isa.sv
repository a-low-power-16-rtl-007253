// tb_mcu_isa: random-program test of the whole microcontroller at its default
// sizes against an instruction-set model written in this testbench.
// Each round builds a random program in ROM and fills RAM with random data,
// resets the chip, lets it run to the final `JMP $`, and then compares R1
// and R3..R15, the C/Z/N/V flags and all of RAM with what the model got by
// executing the same ROM image word by word.
// A program does the following:
//   - A prologue loads the data registers and four pointer registers, sets
//     SP to the top of RAM, and sets random flags.
//   - Then come ROUND_LEN random instructions.
// The random instructions cover:
//   - the two-operand instructions except DADD, whose decimal result is
//     only defined for BCD operands (tb_alu and tb_cpu cover it), with every
//     source mode (Rn, X(Rn), &abs, symbolic X(PC), @Rn, @Rn+, #imm) and
//     both destination modes (Rn, X(Rn) and &abs);
//   - RRC, RRA, SWPB, SXT and PUSH on registers and memory;
//   - forward conditional jumps over 0..2 instructions.
// Only the pointer registers R4..R7 address memory, so every access lands in
// RAM. Byte @Rn+ steps a pointer by one; a later word access through an odd
// pointer uses the word that holds it, as the hardware does.
// Timing: the model also predicts each instruction's MCLK cycles (one per
// state: fetch, index fetches, operand reads, execute, write; two for a
// jump), and the total from the reset entry to the final jump must match the
// hardware's exactly. Each round runs until PC stays on the final jump; a
// watchdog limits the whole run.
module tb_mcu_isa;
  import mcu_pkg::*;
  import asm_pkg::*;

  localparam int ROM_BASE  = 'hF000;
  localparam int RAM_BASE  = 'h0200;
  localparam int RAM_WORDS = 256;
  localparam int ROUNDS    = 150;
  localparam int ROUND_LEN = 40;

  logic rst_n = 1, hfxt_clk = 0, lfxt_clk = 0, lfxt_en;
  initial #1 rst_n = 0;   // a real falling edge, so every asynchronous reset fires
  logic scan_mode = 0, scan_enable = 0;
  logic [7:0] p1_in = 0, p1_out, p1_dir;

  int checks = 0, failures = 0;
  int n_insn = 0, n_taken = 0, n_mode[8];
  int mcyc;                          // MCLK cycles the model expects

  mcu_top dut (.*);

  always #5  hfxt_clk = ~hfxt_clk;
  always #40 lfxt_clk = lfxt_en ? ~lfxt_clk : 1'b0;

  // ---------------- program image and model state ----------------
  logic [15:0] rom_img [2048];
  logic [15:0] ram_img [RAM_WORDS];
  int          pos;                 // next free ROM word
  logic [15:0] r [16];              // model registers
  logic [15:0] mram [RAM_WORDS];    // model RAM

  function automatic logic [15:0] waddr(int i);
    return 16'(ROM_BASE + 2 * i);
  endfunction

  function automatic int pick(int n);
    return int'($urandom % n);
  endfunction

  function automatic int data_reg();
    int d[9] = '{3, 8, 9, 10, 11, 12, 13, 14, 15};
    return d[pick(9)];
  endfunction

  function automatic int ptr_reg();
    return 4 + pick(4);
  endfunction

  // ---------------- random instruction generator ----------------
  // appends one instruction at ROM word `at`, returns its words
  function automatic void gen_insn(int at, ref logic [15:0] w[$]);
    int kind, rs, as_m, rd, ad, bw, m;
    logic [15:0] sx, dx;
    logic        s_ext, d_ext;
    op2_e ops2[11] = '{OP_MOV, OP_ADD, OP_ADDC, OP_SUBC, OP_SUB, OP_CMP,
                       OP_BIT, OP_BIC, OP_BIS, OP_XOR, OP_AND};
    w = {};
    kind = pick(10);
    bw = pick(2);
    s_ext = 0; d_ext = 0; sx = 0; dx = 0;
    if (kind < 7) begin
      // source
      m = pick(7);
      n_mode[m]++;
      unique case (m)
        0: begin rs = (pick(2) != 0) ? data_reg() : ptr_reg(); as_m = 0; end
        1: begin rs = ptr_reg(); as_m = 1; s_ext = 1; sx = 16'(pick(32)); end
        2: begin rs = SR; as_m = 1; s_ext = 1; sx = 16'(RAM_BASE + pick(256)); end
        3: begin rs = PC; as_m = 1; s_ext = 1; sx = 16'(RAM_BASE + pick(256)); end  // target, fixed below
        4: begin rs = ptr_reg(); as_m = 2; end
        5: begin rs = ptr_reg(); as_m = 3; end
        default: begin rs = PC; as_m = 3; s_ext = 1; sx = 16'($urandom); end
      endcase
      // destination
      m = pick(3);
      if (m == 0) begin rd = data_reg(); ad = 0; end
      else if (m == 1) begin rd = ptr_reg(); ad = 1; d_ext = 1; dx = 16'(pick(32)); end
      else begin rd = SR; ad = 1; d_ext = 1; dx = 16'(RAM_BASE + pick(256)); end
      w.push_back(i2(ops2[pick(11)], rs, as_m, rd, ad, bw));
      if (s_ext) begin
        // symbolic: the offset counts from the word after the index word
        if (rs == PC && as_m == 1) sx = sx - waddr(at + 2);
        w.push_back(sx);
      end
      if (d_ext) w.push_back(dx);
    end else if (kind < 9) begin
      op1_e op = op1_e'(pick(5));  // RRC SWPB RRA SXT PUSH
      if (op == OP1_SWPB || op == OP1_SXT) bw = 0;
      m = pick(5);
      unique case (m)
        0: begin rd = (op == OP1_PUSH) ? ptr_reg() : data_reg(); as_m = 0; end
        1: begin rd = ptr_reg(); as_m = 1; s_ext = 1; sx = 16'(pick(32)); end
        2: begin rd = SR; as_m = 1; s_ext = 1; sx = 16'(RAM_BASE + pick(256)); end
        3: begin rd = ptr_reg(); as_m = 2; end
        default: begin rd = ptr_reg(); as_m = 3; end
      endcase
      if (op == OP1_PUSH && pick(4) == 0) begin
        rd = PC; as_m = 3; s_ext = 1; sx = 16'($urandom);   // PUSH #imm
      end
      w.push_back(i1(op, rd, as_m, bw));
      if (s_ext) w.push_back(sx);
    end else begin
      w.push_back(jmp(jcond_e'(pick(8)), 0));   // offset filled in by the caller
    end
  endfunction

  task automatic build_program();
    logic [15:0] w[$], body[$];
    int k, start;
    foreach (rom_img[i]) rom_img[i] = '0;
    rom_img[0] = jmp(J_MP, 7);      // reset entry: jump to word 8
    pos = 8;
    // prologue
    foreach (r[i]) if (i == 3 || i >= 8) begin
      rom_img[pos++] = i2(OP_MOV, PC, 3, i);
      rom_img[pos++] = 16'($urandom);
    end
    for (int i = 4; i < 8; i++) begin
      rom_img[pos++] = i2(OP_MOV, PC, 3, i);
      rom_img[pos++] = 16'(RAM_BASE + 'h20 + pick(96));
    end
    rom_img[pos++] = i2(OP_MOV, PC, 3, SP);
    rom_img[pos++] = 16'(RAM_BASE + 2 * RAM_WORDS);
    rom_img[pos++] = i2(OP_BIS, PC, 3, SR);
    rom_img[pos++] = 16'($urandom & 'h0107);
    // body
    for (int n = 0; n < ROUND_LEN; n++) begin
      gen_insn(pos, w);
      if (w.size() == 1 && w[0][15:13] == 3'b001) begin
        // a jump over the next k instructions
        k = pick(3);
        start = pos + 1;
        body = {};
        for (int j = 0; j < k; j++) begin
          logic [15:0] v[$];
          do gen_insn(start + body.size(), v); while (v[0][15:13] == 3'b001);
          body = {body, v};
        end
        rom_img[pos++] = {w[0][15:10], 10'(body.size())};
        foreach (body[j]) rom_img[pos++] = body[j];
        n += k;
      end else begin
        foreach (w[j]) rom_img[pos++] = w[j];
      end
    end
    rom_img[pos] = jmp(J_MP, -1);     // JMP $
  endtask

  // ---------------- instruction-set model ----------------
  function automatic logic [15:0] rd_mem(logic [15:0] a, int bw);
    logic [15:0] word;
    if (a >= RAM_BASE && a < RAM_BASE + 2 * RAM_WORDS) word = mram[(a - RAM_BASE) >> 1];
    else if (a >= ROM_BASE) word = rom_img[(a - ROM_BASE) >> 1];
    else word = 0;
    if (bw != 0) return a[0] ? {8'd0, word[15:8]} : {8'd0, word[7:0]};
    return word;
  endfunction

  function automatic void wr_mem(logic [15:0] a, int bw, logic [15:0] v);
    int i;
    if (!(a >= RAM_BASE && a < RAM_BASE + 2 * RAM_WORDS)) return;
    i = (a - RAM_BASE) >> 1;
    if (bw == 0)   mram[i] = v;
    else if (a[0]) mram[i][15:8] = v[7:0];
    else           mram[i][7:0]  = v[7:0];
  endfunction

  function automatic logic [15:0] fetch();
    logic [15:0] w = rom_img[(r[PC] - ROM_BASE) >> 1];
    r[PC] += 2;
    return w;
  endfunction

  function automatic int sgn(int x, int w);
    return (x >= (1 << (w - 1))) ? x - (1 << w) : x;
  endfunction

  // operand fetch for source mode as_m of register rs; returns value and address
  function automatic void operand(int rs, int as_m, int bw, output logic [15:0] v, output logic [15:0] a);
    logic [15:0] x;
    a = 0;
    unique case (as_m)
      0: v = (bw != 0) ? (r[rs] & 16'h00FF) : r[rs];
      1: begin
        x = fetch();
        a = (rs == SR) ? x : ((rs == PC) ? r[PC] + x : r[rs] + x);
        v = rd_mem(a, bw);
      end
      2: begin a = r[rs]; v = rd_mem(a, bw); end
      default: begin
        if (rs == PC) begin
          v = fetch();
          if (bw != 0) v &= 16'h00FF;
        end else begin
          a = r[rs];
          v = rd_mem(a, bw);
          r[rs] += (bw != 0 && rs != SP) ? 16'd1 : 16'd2;
        end
      end
    endcase
  endfunction

  function automatic void set_flags(int res, int w, bit c, bit v);
    int m = (1 << w) - 1;
    r[SR][SR_C] = c;
    r[SR][SR_Z] = ((res & m) == 0);
    r[SR][SR_N] = (res >> (w - 1)) & 1;
    r[SR][SR_V] = v;
  endfunction

  task automatic model_step();
    logic [15:0] ir, sv, sa, dv, da, x;
    int op, bw, as_m, ad, rs, rd, w, m, a, b, s, res;
    bit c, v, wr, fl;
    ir = fetch();
    n_insn++;
    if (ir[15:13] == 3'b001) begin
      bit t;
      unique case (ir[12:10])
        0: t = !r[SR][SR_Z];
        1: t =  r[SR][SR_Z];
        2: t = !r[SR][SR_C];
        3: t =  r[SR][SR_C];
        4: t =  r[SR][SR_N];
        5: t = (r[SR][SR_N] == r[SR][SR_V]);
        6: t = (r[SR][SR_N] != r[SR][SR_V]);
        default: t = 1;
      endcase
      if (t) begin
        r[PC] += 16'({{6{ir[9]}}, ir[9:0]} << 1);
        n_taken++;
      end
      mcyc += 2;                               // fetch, execute
      return;
    end
    bw = ir[6]; as_m = ir[5:4];
    if (ir[15:10] == 6'b000100) begin
      op = ir[9:7]; rs = ir[3:0];
      if (op == 1 || op == 3) bw = 0;
      // fetch, [index], [operand read], then push, or execute and [write]
      mcyc += 1 + int'(as_m == 1) + int'(as_m != 0) + ((op == 4) ? 1 : 1 + int'(as_m != 0));
      operand(rs, as_m, bw, sv, sa);
      w = (bw != 0) ? 8 : 16;
      m = (1 << w) - 1;
      a = int'(sv) & m;
      c = r[SR][SR_C]; v = 0; fl = 1;
      unique case (op)
        0: begin res = (a >> 1) | (int'(c) << (w - 1)); c = a & 1; end          // RRC
        1: begin res = ((a & 255) << 8) | ((a >> 8) & 255); fl = 0; end           // SWPB
        2: begin res = (a >> 1) | (a & (1 << (w - 1))); c = a & 1; end          // RRA
        3: begin res = (a & 128) ? ((a & 255) | 'hFF00) : (a & 255); c = (res != 0); end  // SXT
        default: begin                                                            // PUSH
          r[SP] -= 2;
          wr_mem(r[SP], bw, sv);
          return;
        end
      endcase
      if (fl) set_flags(res, w, c, 0);
      if (as_m == 0) r[rs] = 16'(res & m);
      else           wr_mem(sa, bw, 16'(res));
      return;
    end
    op = ir[15:12]; rs = ir[11:8]; ad = ir[7]; rd = ir[3:0];
    // fetch, [source index], [source read], [destination index, old value
    // read unless MOV], execute, [write unless CMP/BIT]
    mcyc += 1 + int'(as_m == 1) + int'(as_m != 0) + 1 +
            ((ad != 0) ? 1 + int'(op != 'h4) + int'(op != 'h9 && op != 'hB) : 0);
    operand(rs, as_m, bw, sv, sa);
    if (ad != 0) begin
      x = fetch();
      da = (rd == SR) ? x : r[rd] + x;
      dv = rd_mem(da, bw);
    end else begin
      dv = r[rd];
    end
    w = (bw != 0) ? 8 : 16;
    m = (1 << w) - 1;
    a = int'(sv) & m;
    b = int'(dv) & m;
    c = r[SR][SR_C]; v = 0; wr = 1; fl = 1;
    unique case (op)
      'h4: begin res = a; fl = 0; end
      'h5, 'h6: begin
        s = b + a + ((op == 'h6) ? int'(c) : 0);
        res = s & m;
        v = (sgn(a, w) + sgn(b, w) + ((op == 'h6) ? int'(c) : 0)) != sgn(res, w);
        c = (s >> w) & 1;
      end
      'h7, 'h8, 'h9: begin
        s = b + ((~a) & m) + ((op == 'h7) ? int'(c) : 1);
        res = s & m;
        v = (sgn(b, w) - sgn(a, w) - ((op == 'h7) ? 1 - int'(c) : 0)) != sgn(res, w);
        c = (s >> w) & 1;
        wr = (op != 'h9);
      end
      'hB, 'hF: begin res = a & b; c = (res != 0); wr = (op == 'hF); end
      'hC: begin res = b & ~a & m; fl = 0; end
      'hD: begin res = b | a; fl = 0; end
      'hE: begin res = a ^ b; c = (res != 0); v = ((a & b) >> (w - 1)) & 1; end
      default: begin res = b; wr = 0; fl = 0; end
    endcase
    if (fl) set_flags(res, w, c, v);
    if (wr) begin
      if (ad != 0) wr_mem(da, bw, 16'(res));
      else         r[rd] = 16'(res & m);
    end
  endtask

  // ---------------- checking ----------------
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  logic [15:0] halt_pc;

  // MCLK cycles from the fetch of the reset entry to the fetch of the final
  // jump, as taken by the hardware
  int cyc = 0, t_start = -1, t_halt = -1;
  always @(posedge dut.mclk) begin
    cyc++;
    if (dut.u_cpu.u_dec.state == S_FETCH && dut.u_cpu.u_dec.pc_inc) begin
      if (dut.u_cpu.u_exe.pc == 16'(ROM_BASE)) t_start = cyc;
      if (dut.u_cpu.u_exe.pc == halt_pc && t_halt < 0) t_halt = cyc;
    end
  end

  initial begin
    #2;
    for (int round = 0; round < ROUNDS; round++) begin
      int guard;
      build_program();
      halt_pc = waddr(pos);
      foreach (ram_img[i]) ram_img[i] = 16'($urandom);
      // hardware
      rst_n = 0;
      t_start = -1; t_halt = -1;
      foreach (rom_img[i]) dut.u_rom.mem[i] = rom_img[i];
      foreach (ram_img[i]) dut.u_ram.mem[i] = ram_img[i];
      repeat (4) @(negedge hfxt_clk);
      rst_n = 1;
      // model
      foreach (r[i]) r[i] = 0;
      r[PC] = ROM_BASE;
      mram = ram_img;
      mcyc = 0;
      guard = 0;
      while (r[PC] != halt_pc && guard < 10 * ROUND_LEN) begin
        model_step();
        guard++;
      end
      chk($sformatf("round %0d: model reached the end", round), int'(r[PC] == halt_pc), 1);
      // let the hardware finish
      guard = 0;
      while (dut.u_cpu.u_exe.u_rf.regs[0] != halt_pc && guard < 5000) begin
        @(negedge hfxt_clk);
        guard++;
      end
      repeat (12) @(negedge hfxt_clk);
      chk($sformatf("round %0d: cycles", round), t_halt - t_start, mcyc);
      // PC is on the final jump, or just past it while that jump executes
      chk($sformatf("round %0d: PC", round), (dut.u_cpu.u_exe.u_rf.regs[0] == halt_pc + 16'd2) ?
          int'(halt_pc) : int'(dut.u_cpu.u_exe.u_rf.regs[0]),
          int'(halt_pc));
      for (int i = 1; i < 16; i++)
        if (i != 2)
          chk($sformatf("round %0d: R%0d", round, i), int'(dut.u_cpu.u_exe.u_rf.regs[i]), int'(r[i]));
      chk($sformatf("round %0d: flags", round), int'(dut.u_cpu.u_exe.u_rf.regs[2] & 16'h0107),
          int'(r[SR] & 16'h0107));
      for (int i = 0; i < RAM_WORDS; i++)
        chk($sformatf("round %0d: RAM %h", round, RAM_BASE + 2 * i), int'(dut.u_ram.mem[i]), int'(mram[i]));
    end
    $display("instructions executed: %0d, jumps taken: %0d", n_insn, n_taken);
    $display("two-operand source modes Rn/X(Rn)/&abs/symbolic/@Rn/@Rn+/#imm: %0d %0d %0d %0d %0d %0d %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_mode[5], n_mode[6]);
    for (int i = 0; i < 7; i++) chk($sformatf("source mode %0d used", i), int'(n_mode[i] > 0), 1);
    chk("jumps taken", int'(n_taken > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
