// tb_regfile: random writes through both write ports and the flag port,
// compared with a model array; checks PC reset value, PC/SP word alignment,
// port 1 priority, and that registers hold their value in cycles without a
// write (the clock gate is closed then).
module tb_regfile;
  import mcu_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a real falling edge, so every asynchronous reset fires
  logic [3:0] ra, rb, wa0, wa1;
  logic [15:0] rdata_a, rdata_b, wd0, wd1, pc, sp, sr;
  logic we0 = 0, we1 = 0, flag_we = 0;
  logic [3:0] flags;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  regfile #(.RESET_PC(16'hE000)) dut (.clk, .rst_n, .scan_enable (1'b0), .*);

  always #5 clk = ~clk;

  task automatic chk(string s, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", s, got, exp);
    end
  endtask

  initial begin
    ra = 0; rb = 0; wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0; flags = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) model[i] = 0;
    model[0] = 16'hE000;
    @(negedge clk);
    chk("reset PC", pc, 16'hE000);
    for (int n = 0; n < 3000; n++) begin
      we0 = 1'($urandom); we1 = 1'($urandom % 3 == 0); flag_we = 1'($urandom % 4 == 0);
      wa0 = 4'($urandom); wa1 = 4'($urandom);
      wd0 = 16'($urandom); wd1 = 16'($urandom); flags = 4'($urandom);
      @(negedge clk);
      if (flag_we) begin
        model[2][0] = flags[0]; model[2][1] = flags[1];
        model[2][2] = flags[2]; model[2][8] = flags[3];
      end
      if (we0) model[wa0] = (wa0 < 2) ? {wd0[15:1], 1'b0} : wd0;
      if (we1) model[wa1] = (wa1 < 2) ? {wd1[15:1], 1'b0} : wd1;
      we0 = 0; we1 = 0; flag_we = 0;
      ra = 4'($urandom); rb = 4'($urandom);
      #1;
      chk("read a", rdata_a, model[ra]);
      chk("read b", rdata_b, model[rb]);
      chk("pc", pc, model[0]);
      chk("sp", sp, model[1]);
      chk("sr", sr, model[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
