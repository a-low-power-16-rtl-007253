// tb_ram: random word and byte writes compared with a model; reads are
// checked in the same cycle (combinational read port).
module tb_ram;
  logic clk = 0, en = 0, we = 0;
  logic [1:0] be = 0;
  logic [7:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  ram #(.WORDS(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    // initialise through the write port
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) {en, we, be, addr, wdata} = {1'b1, 1'b1, 2'b11, 8'(i), 16'(i * 3)};
      model[i] = 16'(i * 3);
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = 1; we = 1'($urandom); be = 2'($urandom); addr = 8'($urandom); wdata = 16'($urandom);
      #1 checks++;
      if (rdata !== model[addr]) begin
        failures++; if (failures < 10) $display("FAIL read %h: %h exp %h", addr, rdata, model[addr]);
      end
      if (we && be[0]) model[addr][7:0]  = wdata[7:0];
      if (we && be[1]) model[addr][15:8] = wdata[15:8];
    end
    @(negedge clk) en = 0;
    #1 checks++;
    if (rdata !== 16'h0) begin failures++; $display("FAIL disabled read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
