// decode_unit: instruction and execution state machines of the CPU.
// The instruction machine fetches the instruction word at PC, decodes it and
// fetches the index words that follow it in the instruction stream. The
// execution machine steps through the operand-read, execute, write-back,
// stack and interrupt states the instruction needs. The two call each
// other: exactly one is active at a time, and the active one hands over by
// naming the state the other starts in, then waits to be called back. For
// example, `ADD 2(R5),4(R6)` runs fetch and source index (instruction),
// source read (execution), destination index (instruction), destination
// read, execute and write (execution), and returns to fetch.
// At the instruction boundary the instruction machine takes a pending
// interrupt instead of fetching, by calling the execution machine's
// interrupt states (push PC, push SR, clear SR, jump to the vector). While
// CPUOFF is set in SR it stays idle in its fetch state without bus traffic.
// `halted` tells the clock module that MCLK may now be stopped. A CPUOFF
// set while an instruction or an interrupt entry is still in progress takes
// effect at its end.
// Interface: the decoded fields and the combined current state go to the
// execution unit as a `ctrl_t` word. Timing: one memory access per state;
// fetch states wait when the bus arbiter does not grant the fetch.
// The split into two machines that call each other, the interrupt sequence
// and the CPUOFF behaviour follow the architecture description. The states,
// the encoding, and the choice not to read the old destination of a MOV (it
// is overwritten anyway) are this design's own.
// Words that are no instruction are treated as no-operations.
module decode_unit
  import mcu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] pc,
  input  logic [15:0] rdata,      // aligned read data of the bus
  input  logic        fetch_gnt,
  input  logic        cpuoff,
  input  logic        irq,        // judged interrupt request
  output bus_req_t    fetch_req,
  output ctrl_t       ctrl,
  output logic        pc_inc,     // a fetch completed this cycle
  output logic        irq_ack,    // vector taken this cycle
  output logic        halted      // idle at an instruction boundary with CPUOFF set
);

  state_e      state;
  logic [15:0] ir;
  ctrl_t       dec_ir, dec_new;

  function automatic ctrl_t decode(input logic [15:0] w);
    ctrl_t c;
    c = '0;
    c.is_jump   = (w[15:13] == 3'b001);
    c.is_single = (w[15:10] == 6'b000100);
    c.as_mode   = w[5:4];
    c.rd        = w[3:0];
    c.jcond     = jcond_e'(w[12:10]);
    c.joffset   = w[9:0];
    if (c.is_single) begin
      c.rs      = w[3:0];
      c.byte_op = w[6] && (w[9:7] inside {OP1_RRC, OP1_RRA, OP1_PUSH});
      unique case (op1_e'(w[9:7]))
        OP1_RRC:  begin c.alu_op = ALU_RRC;  c.writes = 1'b1; c.sets_flags = 1'b1; end
        OP1_SWPB: begin c.alu_op = ALU_SWPB; c.writes = 1'b1; end
        OP1_RRA:  begin c.alu_op = ALU_RRA;  c.writes = 1'b1; c.sets_flags = 1'b1; end
        OP1_SXT:  begin c.alu_op = ALU_SXT;  c.writes = 1'b1; c.sets_flags = 1'b1; end
        default:  c.alu_op = ALU_MOV;
      endcase
    end else if (w[15:12] >= 4'h4) begin
      c.rs      = w[11:8];
      c.ad      = w[7];
      c.byte_op = w[6];
      c.writes  = 1'b1;
      c.sets_flags = 1'b1;
      unique case (op2_e'(w[15:12]))
        OP_MOV:  begin c.alu_op = ALU_MOV; c.sets_flags = 1'b0; end
        OP_ADD:  c.alu_op = ALU_ADD;
        OP_ADDC: c.alu_op = ALU_ADDC;
        OP_SUBC: c.alu_op = ALU_SUBC;
        OP_SUB:  c.alu_op = ALU_SUB;
        OP_CMP:  begin c.alu_op = ALU_SUB; c.writes = 1'b0; end
        OP_DADD: c.alu_op = ALU_DADD;
        OP_BIT:  begin c.alu_op = ALU_BIT; c.writes = 1'b0; end
        OP_BIC:  begin c.alu_op = ALU_BIC; c.sets_flags = 1'b0; end
        OP_BIS:  begin c.alu_op = ALU_BIS; c.sets_flags = 1'b0; end
        OP_XOR:  c.alu_op = ALU_XOR;
        OP_AND:  c.alu_op = ALU_AND;
        default: c.alu_op = ALU_MOV;
      endcase
    end
    return c;
  endfunction

  function automatic logic valid_insn(input logic [15:0] w);
    return (w[15:13] == 3'b001) || (w[15:12] >= 4'h4) ||
           ((w[15:10] == 6'b000100) && (w[9:7] != 3'd7));
  endfunction

  // state after the operands of the source are in place
  function automatic state_e after_src(input ctrl_t c, input logic [15:0] w);
    if (c.is_single) begin
      if (w[9:7] == OP1_PUSH) return S_PUSH;
      if (w[9:7] == OP1_CALL) return S_CALL;
      return S_EXEC;
    end
    return c.ad ? S_DST_EXT : S_EXEC;
  endfunction

  function automatic state_e first_state(input ctrl_t c, input logic [15:0] w);
    if (!valid_insn(w))                             return S_FETCH;
    if (c.is_jump)                                  return S_EXEC;
    if (c.is_single && w[9:7] == OP1_RETI)          return S_RETI_SR;
    if (c.as_mode == AS_IDX)                        return S_SRC_EXT;
    if (c.as_mode == AS_IND || c.as_mode == AS_INC) return S_SRC_RD;
    return after_src(c, w);
  endfunction

  assign dec_ir  = decode(ir);
  assign dec_new = decode(rdata);

  logic mem_dst;
  assign mem_dst = dec_ir.writes && (dec_ir.is_single ? (dec_ir.as_mode != AS_REG) : dec_ir.ad);

  // ---------------- the two state machines ----------------
  // Instruction machine: fetches opcodes and index words. Execution machine:
  // operand reads, execute, write-back, stack and interrupt states. Exactly
  // one of them is active; the active one hands over by a call (call_e /
  // call_i) naming the state the other one starts in next cycle, and then
  // waits (I_WAIT / E_IDLE) until it is called back.
  typedef enum logic [1:0] {I_FETCH, I_SRC_EXT, I_DST_EXT, I_WAIT} istate_e;
  typedef enum logic [3:0] {
    E_IDLE, E_SRC_RD, E_DST_RD, E_EXEC, E_WRITE, E_PUSH, E_CALL,
    E_RETI_SR, E_RETI_PC, E_IRQ_PC, E_IRQ_SR
  } estate_e;

  istate_e ist, ist_run, ist_nx, i_entry;
  estate_e est, est_run, est_nx, e_entry;
  logic    call_e, call_i;

  function automatic estate_e to_e(input state_e s);
    unique case (s)
      S_SRC_RD:  return E_SRC_RD;
      S_DST_RD:  return E_DST_RD;
      S_EXEC:    return E_EXEC;
      S_WRITE:   return E_WRITE;
      S_PUSH:    return E_PUSH;
      S_CALL:    return E_CALL;
      S_RETI_SR: return E_RETI_SR;
      S_RETI_PC: return E_RETI_PC;
      S_IRQ_PC:  return E_IRQ_PC;
      S_IRQ_SR:  return E_IRQ_SR;
      default:   return E_IDLE;
    endcase
  endfunction

  // instruction machine
  always_comb begin
    fetch_req      = '0;
    fetch_req.actl = AC_DIRECT;
    fetch_req.base = pc;
    pc_inc         = 1'b0;
    ist_run        = ist;
    call_e         = 1'b0;
    e_entry        = E_IDLE;
    unique case (ist)
      I_FETCH: begin
        if (irq) begin
          call_e  = 1'b1;
          e_entry = E_IRQ_PC;
        end else if (!cpuoff) begin
          fetch_req.req = 1'b1;
          if (fetch_gnt) begin
            pc_inc = 1'b1;
            unique case (first_state(dec_new, rdata))
              S_FETCH:   ist_run = I_FETCH;    // not an instruction
              S_SRC_EXT: ist_run = I_SRC_EXT;
              S_DST_EXT: ist_run = I_DST_EXT;
              default: begin
                call_e  = 1'b1;
                e_entry = to_e(first_state(dec_new, rdata));
              end
            endcase
          end
        end
      end
      I_SRC_EXT: begin
        fetch_req.req = 1'b1;
        if (fetch_gnt) begin
          pc_inc  = 1'b1;
          call_e  = 1'b1;
          e_entry = E_SRC_RD;
        end
      end
      I_DST_EXT: begin
        fetch_req.req = 1'b1;
        if (fetch_gnt) begin
          pc_inc  = 1'b1;
          call_e  = 1'b1;
          e_entry = (dec_ir.alu_op == ALU_MOV) ? E_EXEC : E_DST_RD;
        end
      end
      default: ;   // I_WAIT
    endcase
    if (call_e) ist_run = I_WAIT;
  end

  // execution machine
  always_comb begin
    irq_ack = 1'b0;
    est_run = est;
    call_i  = 1'b0;
    i_entry = I_FETCH;
    unique case (est)
      E_SRC_RD: begin
        if (after_src(dec_ir, ir) == S_DST_EXT) begin
          call_i  = 1'b1;
          i_entry = I_DST_EXT;
        end else begin
          est_run = to_e(after_src(dec_ir, ir));
        end
      end
      E_DST_RD:  est_run = E_EXEC;
      E_EXEC: begin
        if (!dec_ir.is_jump && mem_dst) est_run = E_WRITE;
        else                            call_i  = 1'b1;
      end
      E_RETI_SR: est_run = E_RETI_PC;
      E_IRQ_PC: begin
        irq_ack = 1'b1;
        est_run = E_IRQ_SR;
      end
      E_WRITE, E_PUSH, E_CALL, E_RETI_PC, E_IRQ_SR: call_i = 1'b1;
      default: ;   // E_IDLE
    endcase
    if (call_i) est_run = E_IDLE;
  end

  // a waiting machine starts when the other one calls it
  assign ist_nx = (ist == I_WAIT) ? (call_i ? i_entry : I_WAIT) : ist_run;
  assign est_nx = (est == E_IDLE) ? (call_e ? e_entry : E_IDLE) : est_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ist <= I_FETCH;
      est <= E_IDLE;
      ir  <= '0;
    end else begin
      ist <= ist_nx;
      est <= est_nx;
      if (ist == I_FETCH && pc_inc) ir <= rdata;
    end
  end

  // combined state handed to the execution unit
  always_comb begin
    unique case (ist)
      I_FETCH:   state = S_FETCH;
      I_SRC_EXT: state = S_SRC_EXT;
      I_DST_EXT: state = S_DST_EXT;
      default: begin
        unique case (est)
          E_SRC_RD:  state = S_SRC_RD;
          E_DST_RD:  state = S_DST_RD;
          E_EXEC:    state = S_EXEC;
          E_WRITE:   state = S_WRITE;
          E_PUSH:    state = S_PUSH;
          E_CALL:    state = S_CALL;
          E_RETI_SR: state = S_RETI_SR;
          E_RETI_PC: state = S_RETI_PC;
          E_IRQ_PC:  state = S_IRQ_PC;
          E_IRQ_SR:  state = S_IRQ_SR;
          default:   state = S_FETCH;
        endcase
      end
    endcase
  end

  assign halted = (ist == I_FETCH) && cpuoff && !irq;

  always_comb begin
    ctrl       = dec_ir;
    ctrl.state = state;
  end

endmodule
