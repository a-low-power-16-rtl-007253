// tb_bus_arbiter: random request pairs; the execution unit must win, the
// decode unit is granted only when alone, and the bus carries the winner.
module tb_bus_arbiter;
  import mcu_pkg::*;

  bus_req_t dec_req, exe_req, bus;
  logic dec_gnt, exe_gnt;
  int checks = 0, failures = 0;

  bus_arbiter dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      dec_req = bus_req_t'({$urandom, $urandom, $urandom});
      exe_req = bus_req_t'({$urandom, $urandom, $urandom});
      #1;
      checks++;
      if (exe_gnt !== exe_req.req || dec_gnt !== (dec_req.req && !exe_req.req) ||
          bus !== (exe_req.req ? exe_req : dec_req.req ? dec_req : '0)) begin
        failures++;
        if (failures < 10) $display("FAIL dec=%0d exe=%0d gnt %0d %0d", dec_req.req, exe_req.req, dec_gnt, exe_gnt);
      end
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
