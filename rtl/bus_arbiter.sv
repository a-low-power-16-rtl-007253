// bus_arbiter: shares the single memory bus between the decode unit
// (instruction and index-word fetches) and the execution unit (operand
// reads, result writes, stack traffic). Fixed priority: the execution unit
// wins, since the instruction it is completing must finish before the next
// fetch may proceed; a decode-unit request that loses is simply not granted
// and is held by the decode unit until the next cycle. Combinational: the
// winner's request is forwarded in the same cycle. The priority order is this
// design's choice; only the existence of the arbiter is given.
module bus_arbiter
  import mcu_pkg::*;
(
  input  bus_req_t dec_req,
  input  bus_req_t exe_req,
  output logic     dec_gnt,
  output logic     exe_gnt,
  output bus_req_t bus
);

  always_comb begin
    exe_gnt = exe_req.req;
    dec_gnt = dec_req.req && !exe_req.req;
    if (exe_req.req)      bus = exe_req;
    else if (dec_req.req) bus = dec_req;
    else                  bus = '0;
  end

  // at most one master is granted, and only one that asked
  always_comb begin
    assert (!(dec_gnt && exe_gnt));
    assert (!dec_gnt || dec_req.req);
  end

endmodule
