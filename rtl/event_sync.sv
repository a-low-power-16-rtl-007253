// event_sync: carries interrupt events from another clock domain (or from an
// unclocked pin edge) into the MCLK domain. The source toggles `evt_tgl` once
// per event; two flip-flops synchronise it, and the flag `flag` is set while
// the synchronised toggle differs from the last value acknowledged (`seen`).
// `clr` acknowledges everything seen so far. `pend_async` compares the
// unsynchronised toggle with `seen`: it rises as soon as the event happens,
// even while MCLK is stopped, and serves only to wake the clock.
module event_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic evt_tgl,
  input  logic clr,
  output logic flag,
  output logic pend_async
);

  logic s1, s2, seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1   <= 1'b0;
      s2   <= 1'b0;
      seen <= 1'b0;
    end else begin
      s1 <= evt_tgl;
      s2 <= s1;
      if (clr) seen <= s2;
    end
  end

  assign flag       = s2 ^ seen;
  assign pend_async = evt_tgl ^ seen;

endmodule
