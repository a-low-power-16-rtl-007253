// ram: data memory. WORDS 16-bit words with a byte enable per half-word;
// read is combinational (the data of `addr` is returned in the same cycle),
// a write takes effect at the rising clock edge when `we` is set, only in the
// bytes selected by `be`. Size is this design's choice.
module ram #(
  parameter int unsigned WORDS = 256
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [1:0]               be,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [15:0]              wdata,
  output logic [15:0]              rdata
);

  logic [15:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en && we) begin
      if (be[0]) mem[addr][7:0]  <= wdata[7:0];
      if (be[1]) mem[addr][15:8] <= wdata[15:8];
    end
  end

  assign rdata = en ? mem[addr] : 16'd0;

endmodule
