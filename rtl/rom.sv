// rom: program memory. WORDS 16-bit words, read combinationally. The first
// words hold the interrupt entry points (reset, timer, I/O), each a jump to
// the real routine elsewhere in the ROM. The contents come from INIT_FILE
// (hex, one word per line) when it is given; without it the ROM reads as
// zero until a testbench loads it. Size is this design's choice.
module rom #(
  parameter int unsigned WORDS     = 2048,
  parameter string       INIT_FILE = ""
) (
  input  logic                       en,
  input  logic [$clog2(WORDS)-1:0]   addr,
  output logic [15:0]                rdata
);

  logic [15:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign rdata = en ? mem[addr] : 16'd0;

endmodule
