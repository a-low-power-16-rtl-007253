// cpu: the 16-bit RISC CPU. It joins the decode unit (instruction and
// execution state machines), the execution unit (register file and ALU), the
// bus arbiter that lets either of them use the memory bus, and the address
// decode cell that turns a request into a ROM, RAM or peripheral access.
// The CPU has no internal wait states: ROM, RAM and peripherals must answer
// combinationally in the cycle of the access. An instruction takes one cycle
// per memory access plus one execute cycle (a register-to-register operation
// takes 2 cycles, memory-to-memory with two index words 6).
// The interrupt request comes from the interrupt judge outside the CPU, which
// also supplies the vector; the CPU pulses `irq_ack` when it loads the
// vector. SR's GIE, CPUOFF and OSCOFF bits are brought out for the interrupt
// judge and the clock module.
module cpu
  import mcu_pkg::*;
#(
  parameter int unsigned PER_BYTES = 256,
  parameter int unsigned RAM_BASE  = 32'h0200,
  parameter int unsigned RAM_BYTES = 512,
  parameter int unsigned ROM_BYTES = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scan_enable,
  // interrupts
  input  logic        irq,
  input  logic [15:0] irq_vector,
  output logic        irq_ack,
  // status
  output logic        gie,
  output logic        cpuoff,
  output logic        oscoff,
  output logic        halted,      // CPU idle with CPUOFF set: MCLK may stop
  // ROM
  output logic                         rom_en,
  output logic [$clog2(ROM_BYTES)-2:0] rom_addr,
  input  logic [15:0]                  rom_rdata,
  // RAM
  output logic                         ram_en,
  output logic                         ram_we,
  output logic [1:0]                   ram_be,
  output logic [$clog2(RAM_BYTES)-2:0] ram_addr,
  output logic [15:0]                  ram_wdata,
  input  logic [15:0]                  ram_rdata,
  // peripherals
  output per_req_t    per,
  input  logic [15:0] per_rdata
);

  localparam logic [15:0] ROM_BASE = 16'(32'h10000 - ROM_BYTES);

  bus_req_t    fetch_req, data_req, bus;
  logic        fetch_gnt, data_gnt;
  logic [15:0] rdata, bus_addr, pc, sr;
  ctrl_t       ctrl;
  logic        pc_inc;

  decode_unit u_dec (
    .clk, .rst_n, .pc, .rdata, .fetch_gnt, .cpuoff, .irq,
    .fetch_req, .ctrl, .pc_inc, .irq_ack, .halted
  );

  exec_unit #(.RESET_PC(ROM_BASE)) u_exe (
    .clk, .rst_n, .scan_enable, .ctrl, .pc_inc, .rdata, .bus_addr, .irq_vector,
    .data_req, .pc, .sr
  );

  bus_arbiter u_arb (
    .dec_req (fetch_req), .exe_req (data_req),
    .dec_gnt (fetch_gnt), .exe_gnt (data_gnt), .bus
  );

  addr_decode #(
    .PER_BYTES (PER_BYTES), .RAM_BASE (RAM_BASE),
    .RAM_BYTES (RAM_BYTES), .ROM_BYTES (ROM_BYTES)
  ) u_adec (
    .req (bus), .addr (bus_addr), .rdata,
    .rom_en, .rom_addr, .rom_rdata,
    .ram_en, .ram_we, .ram_be, .ram_addr, .ram_wdata, .ram_rdata,
    .per, .per_rdata
  );

  assign gie    = sr[SR_GIE];
  assign cpuoff = sr[SR_CPUOFF];
  assign oscoff = sr[SR_OSCOFF];

  // the execution unit's requests are never refused
  assert property (@(posedge clk) disable iff (!rst_n) data_req.req |-> data_gnt);

endmodule
