// addr_decode: the address decode cell between the CPU and its memories.
// Program memory (ROM), data memory (RAM) and peripheral registers share one
// 64 KiB byte address space. First the address logic forms the address from
// a base value (PC or a register), an offset (an index word) and the address
// control code of the request: base, base + offset, or offset alone
// (absolute). Then the address is mapped to the physical block that holds it
// and to the word index inside it, the write data and byte enables are
// steered there, and the read data of the selected block is returned,
// aligned to bit 0 and zero-extended for a byte access. Unmapped addresses
// read as zero and ignore writes.
// Memory map (this design's choice; each region is sized by a parameter):
//   0x0000 .. PER_BYTES-1           peripheral registers
//   RAM_BASE .. RAM_BASE+RAM_BYTES-1 RAM
//   0x10000-ROM_BYTES .. 0xFFFF     ROM (interrupt vectors at its start)
// Combinational; all memories answer in the same cycle.
module addr_decode
  import mcu_pkg::*;
#(
  parameter int unsigned PER_BYTES = 256,
  parameter int unsigned RAM_BASE  = 32'h0200,
  parameter int unsigned RAM_BYTES = 512,
  parameter int unsigned ROM_BYTES = 4096
) (
  input  bus_req_t    req,
  output logic [15:0] addr,       // computed byte address
  output logic [15:0] rdata,      // aligned read data
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

  localparam int unsigned ROM_BASE = 32'h10000 - ROM_BYTES;

  logic        in_rom, in_ram, in_per;
  logic [15:0] word;

  // address logic
  always_comb begin
    unique case (req.actl)
      AC_DIRECT: addr = req.base;
      AC_INDEX:  addr = req.base + req.ofs;
      AC_ABS:    addr = req.ofs;
      default:   addr = req.base;
    endcase
  end

  // region decode
  assign in_per = ({16'd0, addr} < PER_BYTES);
  assign in_ram = ({16'd0, addr} >= RAM_BASE) && ({16'd0, addr} < RAM_BASE + RAM_BYTES);
  assign in_rom = ({16'd0, addr} >= ROM_BASE);

  localparam logic [15:0] RAM_BASE16 = RAM_BASE[15:0];
  localparam logic [15:0] ROM_BASE16 = ROM_BASE[15:0];
  logic [15:0] ram_off, rom_off;
  assign ram_off = addr - RAM_BASE16;
  assign rom_off = addr - ROM_BASE16;

  assign rom_en    = req.req && in_rom && !req.we;
  assign rom_addr  = rom_off[$clog2(ROM_BYTES)-1:1];

  assign ram_en    = req.req && in_ram;
  assign ram_we    = req.req && in_ram && req.we;
  assign ram_addr  = ram_off[$clog2(RAM_BYTES)-1:1];
  assign ram_be    = req.bw ? (addr[0] ? 2'b10 : 2'b01) : 2'b11;
  assign ram_wdata = req.bw ? {req.wdata[7:0], req.wdata[7:0]} : req.wdata;

  assign per.sel   = req.req && in_per;
  assign per.we    = req.we;
  assign per.addr  = {addr[7:1], 1'b0};
  assign per.wdata = req.bw ? {8'd0, req.wdata[7:0]} : req.wdata;

  always_comb begin
    if (in_rom)      word = rom_rdata;
    else if (in_ram) word = ram_rdata;
    else if (in_per) word = per_rdata;
    else             word = '0;
    if (req.bw) rdata = {8'd0, addr[0] ? word[15:8] : word[7:0]};
    else        rdata = word;
  end

endmodule
