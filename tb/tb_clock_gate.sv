// tb_clock_gate: the enable changes at random times; the gated clock must
// equal clk AND (enable as it was while clk was last low), so an enable that
// changes while clk is high never cuts or starts a pulse. scan_enable must
// force the clock through.
module tb_clock_gate;
  logic clk = 0, en = 0, scan_enable = 0, gclk;
  logic en_ref = 0;
  int checks = 0, failures = 0, pulses = 0;

  clock_gate dut (.*);

  always #5 clk = ~clk;
  always @(posedge gclk) pulses++;

  // reference latch
  always @(clk or en or scan_enable) if (!clk) en_ref = en | scan_enable;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      #($urandom % 7 + 1);
      en = 1'($urandom);
      if (n > 1500) scan_enable = 1'($urandom % 4 == 0);
      #0.1;
      checks++;
      if (gclk !== (clk & en_ref)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%t clk=%0d en=%0d gclk=%0d", $realtime, clk, en, gclk);
      end
    end
    checks++;
    if (pulses < 100) begin
      failures++;
      $display("FAIL only %0d gated pulses", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
