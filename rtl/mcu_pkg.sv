// mcu_pkg: types and constants shared by the microcontroller blocks.
// It fixes the instruction encoding (a two-operand, one-operand and jump
// format that together give 27 instructions and 4 source addressing modes),
// the status-register bit positions (CPUOFF and OSCOFF live in SR as the
// operating-mode bits), the CPU state machine states, the request that the
// decode and execution units place on the memory bus, and the peripheral
// register map. Bit positions, opcodes and addresses are this design's own
// choice; the instruction and mode counts and the SR mode bits follow the
// architecture description.
package mcu_pkg;

  // ---------------- status register bits ----------------
  localparam int SR_C      = 0;
  localparam int SR_Z      = 1;
  localparam int SR_N      = 2;
  localparam int SR_GIE    = 3;
  localparam int SR_CPUOFF = 4;
  localparam int SR_OSCOFF = 5;
  localparam int SR_V      = 8;

  // register numbers of the special registers
  localparam logic [3:0] R_PC = 4'd0;
  localparam logic [3:0] R_SP = 4'd1;
  localparam logic [3:0] R_SR = 4'd2;

  // ---------------- instruction encoding ----------------
  // two-operand format: [15:12] opcode, [11:8] Rs, [7] Ad, [6] B/W, [5:4] As, [3:0] Rd
  typedef enum logic [3:0] {
    OP_MOV  = 4'h4, OP_ADD  = 4'h5, OP_ADDC = 4'h6, OP_SUBC = 4'h7,
    OP_SUB  = 4'h8, OP_CMP  = 4'h9, OP_DADD = 4'hA, OP_BIT  = 4'hB,
    OP_BIC  = 4'hC, OP_BIS  = 4'hD, OP_XOR  = 4'hE, OP_AND  = 4'hF
  } op2_e;

  // one-operand format: [15:10] 000100, [9:7] opcode, [6] B/W, [5:4] As, [3:0] R
  typedef enum logic [2:0] {
    OP1_RRC = 3'd0, OP1_SWPB = 3'd1, OP1_RRA = 3'd2, OP1_SXT = 3'd3,
    OP1_PUSH = 3'd4, OP1_CALL = 3'd5, OP1_RETI = 3'd6
  } op1_e;

  // jump format: [15:13] 001, [12:10] condition, [9:0] signed word offset
  typedef enum logic [2:0] {
    J_NE = 3'd0, J_EQ = 3'd1, J_NC = 3'd2, J_C = 3'd3,
    J_N  = 3'd4, J_GE = 3'd5, J_L  = 3'd6, J_MP = 3'd7
  } jcond_e;

  // source addressing modes
  typedef enum logic [1:0] {
    AS_REG = 2'b00, AS_IDX = 2'b01, AS_IND = 2'b10, AS_INC = 2'b11
  } as_e;

  // ALU operation, shared by both instruction formats
  typedef enum logic [3:0] {
    ALU_MOV, ALU_ADD, ALU_ADDC, ALU_SUBC, ALU_SUB, ALU_DADD, ALU_BIT,
    ALU_BIC, ALU_BIS, ALU_XOR, ALU_AND, ALU_RRC, ALU_SWPB, ALU_RRA, ALU_SXT
  } alu_op_e;

  // ---------------- CPU states ----------------
  typedef enum logic [3:0] {
    S_FETCH,      // instruction fetch (or idle while CPUOFF)
    S_SRC_EXT,    // fetch index word of the source
    S_SRC_RD,     // read source operand from memory
    S_DST_EXT,    // fetch index word of the destination
    S_DST_RD,     // read destination operand from memory
    S_EXEC,       // ALU operation / jump
    S_WRITE,      // write result to memory
    S_PUSH,       // PUSH: pre-decrement SP and store
    S_CALL,       // CALL: push PC, load PC
    S_RETI_SR,    // RETI: pop SR
    S_RETI_PC,    // RETI: pop PC
    S_IRQ_PC,     // interrupt: push PC
    S_IRQ_SR      // interrupt: push SR, clear SR, load vector
  } state_e;

  // decoded instruction, handed from the decode unit to the execution unit
  typedef struct packed {
    state_e     state;
    logic       is_jump;
    logic       is_single;   // one-operand format
    logic       byte_op;
    logic [1:0] as_mode;
    logic       ad;
    logic [3:0] rs;          // source register (operand register of one-operand format)
    logic [3:0] rd;          // destination register
    alu_op_e    alu_op;
    logic       writes;      // result is written back (not CMP/BIT)
    logic       sets_flags;  // instruction updates C,Z,N,V
    jcond_e     jcond;
    logic [9:0] joffset;
  } ctrl_t;

  // ---------------- memory bus ----------------
  // address control of the address decode cell
  typedef enum logic [1:0] {
    AC_DIRECT = 2'd0,  // address = base register value (PC, @Rn)
    AC_INDEX  = 2'd1,  // address = base + offset (X(Rn), pre-decremented SP)
    AC_ABS    = 2'd2   // address = offset (absolute, &ADDR)
  } addr_ctrl_e;

  typedef struct packed {
    logic        req;
    addr_ctrl_e  actl;
    logic [15:0] base;
    logic [15:0] ofs;
    logic        we;
    logic        bw;      // byte access
    logic [15:0] wdata;   // write data, right aligned for a byte access
  } bus_req_t;

  // peripheral bus request (word registers, 8-bit offset inside the peripheral page)
  typedef struct packed {
    logic        sel;
    logic        we;
    logic [7:0]  addr;
    logic [15:0] wdata;
  } per_req_t;

  // ---------------- peripheral register map (byte offsets) ----------------
  localparam logic [7:0] PA_IE     = 8'h00;  // interrupt enables: [0] timer, [1] I/O
  localparam logic [7:0] PA_P1IN   = 8'h10;
  localparam logic [7:0] PA_P1OUT  = 8'h12;
  localparam logic [7:0] PA_P1DIR  = 8'h14;
  localparam logic [7:0] PA_P1IFG  = 8'h16;  // write 1 to clear
  localparam logic [7:0] PA_P1IES  = 8'h18;  // 0 rising, 1 falling edge
  localparam logic [7:0] PA_P1IE   = 8'h1A;
  localparam logic [7:0] PA_TCTL   = 8'h20;  // [0] run (counter held at 0 while clear)
  localparam logic [7:0] PA_TCCR   = 8'h22;  // period - 1
  localparam logic [7:0] PA_TR     = 8'h24;  // counter (read)
  localparam logic [7:0] PA_TIFG   = 8'h26;  // [0] flag, write 1 to clear
  localparam logic [7:0] PA_BCSCTL = 8'h30;  // [0] SELM, [2:1] DIVM, [4:3] DIVA

endpackage
