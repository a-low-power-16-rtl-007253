// tb_rom: loads tb/rom_test.hex (word i = i*0x1111 XOR 0xA5A5) and checks
// every word, that words beyond the file read as zero, and that a disabled
// ROM drives zero.
module tb_rom;
  logic en;
  logic [4:0] addr;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  rom #(.WORDS(32), .INIT_FILE("tb/rom_test.hex")) dut (.*);

  initial begin
    for (int i = 0; i < 32; i++) begin
      en = 1; addr = 5'(i);
      #1 checks++;
      if (rdata !== ((i < 16) ? 16'((i * 16'h1111) ^ 16'hA5A5) : 16'h0)) begin
        failures++; $display("FAIL word %0d = %h", i, rdata);
      end
      en = 0;
      #1 checks++;
      if (rdata !== 16'h0) begin failures++; $display("FAIL disabled read %h", rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
