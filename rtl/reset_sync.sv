// reset_sync: reset for one clock domain: asserted asynchronously with the
// reset input, released two clock edges after it. In scan mode the
// synchroniser is bypassed and the domain reset is the reset input itself, so
// the tester controls every internal reset directly.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  input  logic scan_mode,
  output logic rst_n_out
);

  logic r1, r2;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      r1 <= 1'b0;
      r2 <= 1'b0;
    end else begin
      r1 <= 1'b1;
      r2 <= r1;
    end
  end

  assign rst_n_out = scan_mode ? rst_n_in : r2;

endmodule
