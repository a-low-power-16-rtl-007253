// mcu_top: the low-power 16-bit RISC microcontroller for sensor systems.
// CPU (decode unit, execution unit, bus arbiter, address decode cell),
// program ROM, data RAM, and the peripherals: clock module, interrupt judge,
// interval timer and 8-bit I/O port, all on one byte address space
// (0x0000.. peripherals, 0x0200.. RAM, top of the space ROM).
// Clocks: MCLK clocks the CPU, memories and peripheral registers; ACLK clocks
// the timer counter. Operating modes come from SR: active (CPUOFF=0),
// real-time-clock mode (CPUOFF=1: MCLK stopped, ACLK running) and sleep
// mode (CPUOFF=1, OSCOFF=1: ACLK stopped too, LFXT oscillator told to stop).
// An enabled interrupt restarts MCLK; the CPU saves SR (and with it the mode)
// on the stack and clears it, so the handler runs in active mode and RETI
// returns to the saved mode.
// Test: scan_mode replaces both clocks by the HFXT input and connects every
// internal reset to rst_n; scan_enable opens every clock gate.
// The program is loaded into ROM from ROM_INIT (a $readmemh file of 16-bit
// words, first word at the start of ROM) or by the testbench.
// The crystal oscillators, the comparator and the debug unit are outside this
// RTL: the oscillator clocks enter as ports, `lfxt_en` goes out.
module mcu_top
  import mcu_pkg::*;
#(
  parameter int unsigned ROM_BYTES = 4096,
  parameter int unsigned RAM_BYTES = 512,
  parameter int unsigned RAM_BASE  = 32'h0200,
  parameter int unsigned PER_BYTES = 256,
  parameter string       ROM_INIT  = ""      // $readmemh file with the program
) (
  input  logic       rst_n,
  input  logic       hfxt_clk,     // 450 kHz .. 8 MHz crystal oscillator
  input  logic       lfxt_clk,     // 32768 Hz watch-crystal oscillator
  output logic       lfxt_en,      // 0: stop the LFXT oscillator (OSCOFF)
  input  logic       scan_mode,
  input  logic       scan_enable,
  input  logic [7:0] p1_in,
  output logic [7:0] p1_out,
  output logic [7:0] p1_dir
);

  localparam int unsigned ROM_WORDS = ROM_BYTES / 2;
  localparam int unsigned RAM_WORDS = RAM_BYTES / 2;
  localparam logic [15:0] ROM_BASE  = 16'(32'h10000 - ROM_BYTES);

  logic mclk, aclk, mrst_n, arst_n;
  logic gie, cpuoff, oscoff, halted, wake;
  logic irq, irq_ack, timer_ack;
  logic [15:0] irq_vector;
  logic timer_flag, timer_pend, io_flag, io_pend;

  logic                         rom_en;
  logic [$clog2(ROM_WORDS)-1:0] rom_addr;
  logic [15:0]                  rom_rdata;
  logic                         ram_en, ram_we;
  logic [1:0]                   ram_be;
  logic [$clog2(RAM_WORDS)-1:0] ram_addr;
  logic [15:0]                  ram_wdata, ram_rdata;
  per_req_t                     per;
  logic [15:0] per_rdata, rd_clk, rd_int, rd_tmr, rd_io;

  clock_module u_clk (
    .rst_n, .lfxt_clk, .hfxt_clk, .scan_mode, .scan_enable,
    .cpu_halt (halted), .oscoff, .wake, .per, .per_rdata (rd_clk),
    .mclk, .aclk, .lfxt_en
  );

  reset_sync u_mrst (.clk (mclk), .rst_n_in (rst_n), .scan_mode, .rst_n_out (mrst_n));
  reset_sync u_arst (.clk (aclk), .rst_n_in (rst_n), .scan_mode, .rst_n_out (arst_n));

  cpu #(
    .PER_BYTES (PER_BYTES), .RAM_BASE (RAM_BASE),
    .RAM_BYTES (RAM_BYTES), .ROM_BYTES (ROM_BYTES)
  ) u_cpu (
    .clk (mclk), .rst_n (mrst_n), .scan_enable,
    .irq, .irq_vector, .irq_ack,
    .gie, .cpuoff, .oscoff, .halted,
    .rom_en, .rom_addr, .rom_rdata,
    .ram_en, .ram_we, .ram_be, .ram_addr, .ram_wdata, .ram_rdata,
    .per, .per_rdata
  );

  rom #(.WORDS (ROM_WORDS), .INIT_FILE (ROM_INIT)) u_rom (.en (rom_en), .addr (rom_addr), .rdata (rom_rdata));

  ram #(.WORDS (RAM_WORDS)) u_ram (
    .clk (mclk), .en (ram_en), .we (ram_we), .be (ram_be),
    .addr (ram_addr), .wdata (ram_wdata), .rdata (ram_rdata)
  );

  int_judge #(.VEC_BASE (ROM_BASE)) u_int (
    .clk (mclk), .rst_n (mrst_n), .per, .per_rdata (rd_int),
    .gie, .timer_flag, .io_flag,
    .timer_pend_async (timer_pend), .io_pend_async (io_pend),
    .ack (irq_ack), .irq, .vector (irq_vector), .timer_ack, .wake
  );

  timer u_tmr (
    .mclk, .mclk_rst_n (mrst_n), .aclk, .aclk_rst_n (arst_n),
    .per, .per_rdata (rd_tmr), .irq_ack (timer_ack),
    .flag (timer_flag), .pend_async (timer_pend)
  );

  gpio #(.WIDTH (8)) u_io (
    .mclk, .rst_n (mrst_n), .per, .per_rdata (rd_io),
    .p_in (p1_in), .p_out (p1_out), .p_dir (p1_dir),
    .flag (io_flag), .pend_async (io_pend)
  );

  // each peripheral returns zero unless addressed
  assign per_rdata = rd_clk | rd_int | rd_tmr | rd_io;

endmodule
