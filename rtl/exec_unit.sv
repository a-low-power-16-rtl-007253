// exec_unit: execution unit of the CPU: register file, ALU and the operand
// latches. In each state named by the decode unit's `ctrl` it performs that
// state's data work: incrementing PC after a fetch, latching index words,
// forming operand and stack addresses (handed to the address decode cell as
// base/offset/control through the data request), latching read operands,
// running the ALU and writing the result and flags back, pushing and popping
// PC and SR, and loading the interrupt vector. Register-mode operands are
// read straight from the register file in the execute state; memory operands
// come from the latches.
// Addressing: As=00 Rn, 01 X(Rn) (with R2 as base giving an absolute
// address &X, and with PC as base a PC-relative address),
// 10 @Rn, 11 @Rn+ (with PC: an immediate). In X(PC) the base is the
// address of the word that follows the index word. Destination Ad=0 Rn, 1 X(Rn).
// @Rn+ steps by 1 for a byte operation and by 2 for a word and always by 2
// for PC and SP.
// Low power: the register file and the five operand/result latch groups
// are clocked through hand-inserted clock gates that open only in a cycle
// that loads them (the architecture calls for hand-placed gates on the
// execution unit's fast-switching registers; the grouping is this design's).
// Timing: one bus access per state; register and flag updates happen at the
// end of the state. The data request is always granted (the arbiter gives the
// execution unit priority).
module exec_unit
  import mcu_pkg::*;
#(
  parameter logic [15:0] RESET_PC = 16'hF000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scan_enable,
  input  ctrl_t       ctrl,
  input  logic        pc_inc,
  input  logic [15:0] rdata,       // aligned read data of the bus
  input  logic [15:0] bus_addr,    // address formed by the address decode cell
  input  logic [15:0] irq_vector,
  output bus_req_t    data_req,
  output logic [15:0] pc,
  output logic [15:0] sr
);

  logic [15:0] rs_val, rd_val, sp;
  logic [15:0] src_ofs, dst_ofs, src_val, dst_val, src_addr, res_q;
  logic        we0, we1, flag_we;
  logic [3:0]  wa0, wa1;
  logic [15:0] wd0, wd1;
  logic [15:0] src_op, dst_op, alu_res;
  logic        c_o, z_o, n_o, v_o;
  logic        jump_taken;

  regfile #(.RESET_PC(RESET_PC)) u_rf (
    .clk, .rst_n, .scan_enable,
    .ra (ctrl.rs), .rb (ctrl.rd),
    .rdata_a (rs_val), .rdata_b (rd_val),
    .we0, .wa0, .wd0, .we1, .wa1, .wd1,
    .flag_we, .flags ({v_o, n_o, z_o, c_o}),
    .pc, .sp, .sr
  );

  assign src_op = (ctrl.as_mode == AS_REG) ? rs_val : src_val;
  assign dst_op = ctrl.is_single ? src_op : (ctrl.ad ? dst_val : rd_val);

  alu u_alu (
    .op (ctrl.alu_op), .byte_op (ctrl.byte_op),
    .src (src_op), .dst (dst_op), .cin (sr[SR_C]),
    .res (alu_res), .c_out (c_o), .z_out (z_o), .n_out (n_o), .v_out (v_o)
  );

  always_comb begin
    unique case (ctrl.jcond)
      J_NE: jump_taken = !sr[SR_Z];
      J_EQ: jump_taken =  sr[SR_Z];
      J_NC: jump_taken = !sr[SR_C];
      J_C:  jump_taken =  sr[SR_C];
      J_N:  jump_taken =  sr[SR_N];
      J_GE: jump_taken = (sr[SR_N] == sr[SR_V]);
      J_L:  jump_taken = (sr[SR_N] != sr[SR_V]);
      default: jump_taken = 1'b1;
    endcase
  end

  // address control for an indexed operand: R2 as base means absolute
  function automatic addr_ctrl_e idx_ctl(input logic [3:0] r);
    return (r == R_SR) ? AC_ABS : AC_INDEX;
  endfunction

  logic [15:0] inc_step;
  assign inc_step = (ctrl.byte_op && ctrl.rs != R_PC && ctrl.rs != R_SP) ? 16'd1 : 16'd2;

  always_comb begin
    data_req = '0;
    data_req.actl = AC_DIRECT;
    we0 = 1'b0; wa0 = '0; wd0 = '0;
    we1 = 1'b0; wa1 = '0; wd1 = '0;
    flag_we = 1'b0;
    unique case (ctrl.state)
      S_FETCH, S_SRC_EXT, S_DST_EXT: begin
        if (pc_inc) begin
          we0 = 1'b1; wa0 = R_PC; wd0 = pc + 16'd2;
        end
      end
      S_SRC_RD: begin
        data_req.req  = 1'b1;
        data_req.bw   = ctrl.byte_op;
        data_req.base = rs_val;
        data_req.ofs  = src_ofs;
        data_req.actl = (ctrl.as_mode == AS_IDX) ? idx_ctl(ctrl.rs) : AC_DIRECT;
        if (ctrl.as_mode == AS_INC) begin
          we1 = 1'b1; wa1 = ctrl.rs; wd1 = rs_val + inc_step;
        end
      end
      S_DST_RD: begin
        data_req.req  = 1'b1;
        data_req.bw   = ctrl.byte_op;
        data_req.base = rd_val;
        data_req.ofs  = dst_ofs;
        data_req.actl = idx_ctl(ctrl.rd);
      end
      S_EXEC: begin
        if (ctrl.is_jump) begin
          if (jump_taken) begin
            we0 = 1'b1; wa0 = R_PC;
            wd0 = pc + {{5{ctrl.joffset[9]}}, ctrl.joffset, 1'b0};
          end
        end else begin
          flag_we = ctrl.sets_flags;
          if (ctrl.writes && (ctrl.is_single ? (ctrl.as_mode == AS_REG) : !ctrl.ad)) begin
            we0 = 1'b1;
            wa0 = ctrl.is_single ? ctrl.rs : ctrl.rd;
            wd0 = alu_res;
          end
        end
      end
      S_WRITE: begin
        data_req.req   = 1'b1;
        data_req.we    = 1'b1;
        data_req.bw    = ctrl.byte_op;
        data_req.wdata = res_q;
        if (ctrl.is_single) begin
          data_req.actl = AC_ABS;
          data_req.ofs  = src_addr;
        end else begin
          data_req.actl = idx_ctl(ctrl.rd);
          data_req.base = rd_val;
          data_req.ofs  = dst_ofs;
        end
      end
      S_PUSH, S_CALL, S_IRQ_PC, S_IRQ_SR: begin
        data_req.req  = 1'b1;
        data_req.we   = 1'b1;
        data_req.bw   = (ctrl.state == S_PUSH) && ctrl.byte_op;
        data_req.actl = AC_INDEX;
        data_req.base = sp;
        data_req.ofs  = 16'hFFFE;
        we0 = 1'b1; wa0 = R_SP; wd0 = sp - 16'd2;
        unique case (ctrl.state)
          S_PUSH:   data_req.wdata = src_op;
          S_CALL: begin
            data_req.wdata = pc;
            we1 = 1'b1; wa1 = R_PC; wd1 = src_op;
          end
          S_IRQ_PC: begin
            data_req.wdata = pc;
            we1 = 1'b1; wa1 = R_PC; wd1 = irq_vector;
          end
          default: begin   // S_IRQ_SR
            data_req.wdata = sr;
            we1 = 1'b1; wa1 = R_SR; wd1 = '0;
          end
        endcase
      end
      S_RETI_SR, S_RETI_PC: begin
        data_req.req  = 1'b1;
        data_req.actl = AC_DIRECT;
        data_req.base = sp;
        we0 = 1'b1; wa0 = R_SP; wd0 = sp + 16'd2;
        we1 = 1'b1; wa1 = (ctrl.state == S_RETI_SR) ? R_SR : R_PC; wd1 = rdata;
      end
      default: ;
    endcase
  end

  // operand latches, each group behind its own clock gate that opens only in
  // the state that loads it (and during reset)
  logic [4:0] lat_en, lat_clk;

  assign lat_en[0] = (ctrl.state == S_SRC_EXT && pc_inc) || !rst_n;
  assign lat_en[1] = (ctrl.state == S_DST_EXT && pc_inc) || !rst_n;
  assign lat_en[2] = (ctrl.state == S_SRC_RD) || !rst_n;
  assign lat_en[3] = (ctrl.state == S_DST_RD) || !rst_n;
  assign lat_en[4] = (ctrl.state == S_EXEC) || !rst_n;

  for (genvar g = 0; g < 5; g++) begin : g_lat_cg
    clock_gate u_cg (
      .clk (clk), .en (lat_en[g]), .scan_enable (scan_enable), .gclk (lat_clk[g])
    );
  end

  always_ff @(posedge lat_clk[0] or negedge rst_n)
    if (!rst_n) src_ofs <= '0; else src_ofs <= rdata;

  always_ff @(posedge lat_clk[1] or negedge rst_n)
    if (!rst_n) dst_ofs <= '0; else dst_ofs <= rdata;

  always_ff @(posedge lat_clk[2] or negedge rst_n)
    if (!rst_n) begin
      src_val  <= '0;
      src_addr <= '0;
    end else begin
      src_val  <= rdata;
      src_addr <= bus_addr;
    end

  always_ff @(posedge lat_clk[3] or negedge rst_n)
    if (!rst_n) dst_val <= '0; else dst_val <= rdata;

  always_ff @(posedge lat_clk[4] or negedge rst_n)
    if (!rst_n) res_q <= '0; else res_q <= alu_res;

endmodule
