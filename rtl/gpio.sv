// gpio: 8-bit I/O port with the I/O interrupt. Each pin has an output latch,
// a direction bit, an edge select (0: rising, 1: falling) and an interrupt
// enable. An edge on a pin toggles a flip-flop clocked by the pin itself, so
// the edge is caught even while every clock is stopped (sleep mode); the
// event is then synchronised into MCLK and sets the pin's flag in P1IFG.
// The port requests an interrupt while any flag with its enable bit is set;
// flags are cleared by writing 1 to them. Changing P1IES while the pin is
// high can itself be seen as an edge.
// Registers (peripheral offsets, MCLK domain): P1IN 0x10 (read, synchronised
// pins), P1OUT 0x12, P1DIR 0x14 (1 = output), P1IFG 0x16, P1IES 0x18,
// P1IE 0x1A. Only the existence of I/O and of the I/O interrupt is given;
// the port's form and registers are this design's choice.
module gpio
  import mcu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             mclk,
  input  logic             rst_n,
  input  per_req_t         per,
  output logic [15:0]      per_rdata,
  input  logic [WIDTH-1:0] p_in,
  output logic [WIDTH-1:0] p_out,
  output logic [WIDTH-1:0] p_dir,
  output logic             flag,        // enabled flag pending (MCLK domain)
  output logic             pend_async   // enabled edge seen (asynchronous)
);

  logic [WIDTH-1:0] ies, ie, ifg, pend, tgl, clr, in_s1, in_s2, edge_clk;

  always_ff @(posedge mclk or negedge rst_n) begin
    if (!rst_n) begin
      p_out <= '0;
      p_dir <= '0;
      ies   <= '0;
      ie    <= '0;
      in_s1 <= '0;
      in_s2 <= '0;
    end else begin
      in_s1 <= p_in;
      in_s2 <= in_s1;
      if (per.sel && per.we) begin
        unique case (per.addr)
          PA_P1OUT: p_out <= per.wdata[WIDTH-1:0];
          PA_P1DIR: p_dir <= per.wdata[WIDTH-1:0];
          PA_P1IES: ies   <= per.wdata[WIDTH-1:0];
          PA_P1IE:  ie    <= per.wdata[WIDTH-1:0];
          default: ;
        endcase
      end
    end
  end

  assign clr = (per.sel && per.we && per.addr == PA_P1IFG) ? per.wdata[WIDTH-1:0] : '0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_pin
    assign edge_clk[i] = p_in[i] ^ ies[i];

    always_ff @(posedge edge_clk[i] or negedge rst_n) begin
      if (!rst_n) tgl[i] <= 1'b0;
      else        tgl[i] <= ~tgl[i];
    end

    event_sync u_sync (
      .clk (mclk), .rst_n, .evt_tgl (tgl[i]), .clr (clr[i]),
      .flag (ifg[i]), .pend_async (pend[i])
    );
  end

  assign flag       = |(ifg & ie);
  assign pend_async = |(pend & ie);

  always_comb begin
    per_rdata = '0;
    if (per.sel) begin
      unique case (per.addr)
        PA_P1IN:  per_rdata[WIDTH-1:0] = in_s2;
        PA_P1OUT: per_rdata[WIDTH-1:0] = p_out;
        PA_P1DIR: per_rdata[WIDTH-1:0] = p_dir;
        PA_P1IFG: per_rdata[WIDTH-1:0] = ifg;
        PA_P1IES: per_rdata[WIDTH-1:0] = ies;
        PA_P1IE:  per_rdata[WIDTH-1:0] = ie;
        default:  per_rdata = '0;
      endcase
    end
  end

endmodule
