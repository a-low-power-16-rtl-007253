// clock_gate: glitch-free clock gating cell (latch + AND).
// The enable is captured by a latch that is transparent while `clk` is low,
// so it can only change while the clock is low and `gclk` never carries a
// shortened pulse. `scan_enable` forces the gate open so that every flip-flop
// behind it is clocked during scan shift, as required for a scan-friendly
// design. Timing: an enable that is stable before the rising edge of `clk`
// lets that edge through. The latch is intentional (it is the cell's whole
// purpose); tools that report it as an inferred latch may be ignored here.
module clock_gate (
  input  logic clk,
  input  logic en,
  input  logic scan_enable,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en | scan_enable;
  end

  assign gclk = clk & en_lat;

endmodule
