// asm_pkg: instruction encoders used by the testbenches to build programs.
// Two-operand: {op[15:12], Rs, Ad, B/W, As, Rd}; one-operand:
// {000100, op[9:7], B/W, As, R}; jump: {001, cond, 10-bit word offset}.
package asm_pkg;
  import mcu_pkg::*;

  localparam int PC = 0, SP = 1, SR = 2;

  function automatic logic [15:0] i2(op2_e op, int rs, int as_m, int rd, int ad = 0, int bw = 0);
    return {op, 4'(rs), 1'(ad), 1'(bw), 2'(as_m), 4'(rd)};
  endfunction

  function automatic logic [15:0] i1(op1_e op, int r, int as_m = 0, int bw = 0);
    return {6'b000100, op, 1'(bw), 2'(as_m), 4'(r)};
  endfunction

  function automatic logic [15:0] jmp(jcond_e c, int off);
    return {3'b001, c, 10'(off)};
  endfunction

endpackage
