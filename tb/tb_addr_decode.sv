// tb_addr_decode: random requests in every address-control mode; checks the
// computed address, the region selected (ROM/RAM/peripheral/none), the word
// index inside it, byte enables and write-data steering, and the aligned
// read data for byte and word reads. The memories answer with a pattern
// derived from the word index so that a wrong index is visible.
module tb_addr_decode;
  import mcu_pkg::*;

  bus_req_t req;
  logic [15:0] addr, rdata, rom_rdata, ram_rdata, ram_wdata, per_rdata;
  logic rom_en, ram_en, ram_we;
  logic [10:0] rom_addr;
  logic [7:0]  ram_addr;
  logic [1:0]  ram_be;
  per_req_t    per;
  int checks = 0, failures = 0;

  addr_decode dut (.*);

  assign rom_rdata = {5'h1A, rom_addr};
  assign ram_rdata = {8'h5B, ram_addr};
  assign per_rdata = {8'h3C, per.addr};

  task automatic chk(string s, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h (addr %h)", s, got, exp, addr);
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int a, word;
      req = bus_req_t'({$urandom, $urandom, $urandom});
      req.req = 1;
      req.actl = addr_ctrl_e'($urandom % 3);
      // bias towards the mapped regions
      case ($urandom % 4)
        0: req.base = 16'($urandom % 256);
        1: req.base = 16'(16'h0200 + $urandom % 512);
        2: req.base = 16'(16'hF000 + $urandom % 4096);
        default: ;
      endcase
      if ($urandom % 2) req.ofs = 16'($urandom % 8);
      #1;
      a = (req.actl == AC_DIRECT) ? req.base : (req.actl == AC_INDEX) ? (req.base + req.ofs) & 16'hFFFF : req.ofs;
      chk("addr", addr, a);
      chk("rom sel", rom_en, (a >= 16'hF000) && !req.we);
      chk("ram sel", ram_en, (a >= 16'h0200) && (a < 16'h0400));
      chk("per sel", per.sel, a < 256);
      word = 0;
      if (a >= 16'hF000) begin
        chk("rom index", rom_addr, (a - 16'hF000) / 2);
        word = {5'h1A, 11'((a - 16'hF000) / 2)};
      end else if (a >= 16'h0200 && a < 16'h0400) begin
        chk("ram index", ram_addr, (a - 16'h0200) / 2);
        chk("ram we", ram_we, req.we);
        chk("ram be", ram_be, req.bw ? (a[0] ? 2 : 1) : 3);
        chk("ram wdata", ram_wdata, req.bw ? {req.wdata[7:0], req.wdata[7:0]} : req.wdata);
        word = {8'h5B, 8'((a - 16'h0200) / 2)};
      end else if (a < 256) begin
        chk("per addr", per.addr, a & 16'hFE);
        word = {8'h3C, 8'(a & 16'hFE)};
      end
      chk("rdata", rdata, req.bw ? (a[0] ? (word >> 8) & 255 : word & 255) : word);
    end
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
