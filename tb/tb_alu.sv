// tb_alu: checks the ALU against a reference computed with plain integer
// arithmetic (signed ranges for V, decimal digits for DADD) over random
// operands, for every operation, byte and word.
module tb_alu;
  import mcu_pkg::*;

  alu_op_e     op;
  logic        byte_op, cin;
  logic [15:0] src, dst, res;
  logic        c_out, z_out, n_out, v_out;
  int checks = 0, failures = 0;

  alu dut (.*);

  function automatic int sgn(int x, int w);
    return (x >= (1 << (w - 1))) ? x - (1 << w) : x;
  endfunction

  function automatic int bcd2int(int x, int digits);
    int v = 0;
    for (int i = digits - 1; i >= 0; i--) v = v * 10 + ((x >> (4 * i)) & 15);
    return v;
  endfunction
  function automatic int int2bcd(int v, int digits);
    int x = 0;
    for (int i = 0; i < digits; i++) begin
      x |= (v % 10) << (4 * i);
      v /= 10;
    end
    return x;
  endfunction

  task automatic one(alu_op_e o, logic bw, int a_in, int b_in, logic c_in);
    int w, m, a, b, r, s, lim;
    logic c, v, fl;
    w = bw ? 8 : 16;
    m = (1 << w) - 1;
    a = a_in & m;
    b = b_in & m;
    c = c_in; v = 0; fl = 1;
    case (o)
      ALU_MOV:  begin r = a; fl = 0; end
      ALU_ADD, ALU_ADDC: begin
        s = b + a + ((o == ALU_ADDC) ? int'(c_in) : 0);
        r = s & m; c = (s >> w) & 1;
        s = sgn(b, w) + sgn(a, w) + ((o == ALU_ADDC) ? int'(c_in) : 0);
        v = (s > (1 << (w - 1)) - 1) || (s < -(1 << (w - 1)));
      end
      ALU_SUB, ALU_SUBC: begin
        s = b + ((~a) & m) + ((o == ALU_SUB) ? 1 : int'(c_in));
        r = s & m; c = (s >> w) & 1;
        s = sgn(b, w) - sgn(a, w) - ((o == ALU_SUB) ? 0 : 1 - int'(c_in));
        v = (s > (1 << (w - 1)) - 1) || (s < -(1 << (w - 1)));
      end
      ALU_DADD: begin
        lim = (w == 8) ? 100 : 10000;
        s = bcd2int(a, w / 4) + bcd2int(b, w / 4) + int'(c_in);
        c = (s >= lim);
        r = int2bcd(s % lim, w / 4);
        v = 0;      // V is left undefined by the instruction set; this ALU clears it
      end
      ALU_AND, ALU_BIT: begin r = a & b; c = (r != 0); end
      ALU_XOR: begin r = a ^ b; c = (r != 0); v = ((a >> (w - 1)) & 1) && ((b >> (w - 1)) & 1); end
      ALU_BIC: begin r = b & ~a & m; fl = 0; end
      ALU_BIS: begin r = b | a; fl = 0; end
      ALU_RRC: begin r = (a >> 1) | (int'(c_in) << (w - 1)); c = a & 1; end
      ALU_RRA: begin r = (a >> 1) | (a & (1 << (w - 1))); c = a & 1; end
      ALU_SWPB: begin r = ((a_in & 255) << 8) | ((a_in >> 8) & 255); fl = 0; w = 16; end
      ALU_SXT: begin
        r = (a_in & 128) ? ((a_in & 255) | 16'hFF00) : (a_in & 255);
        w = 16; c = (r != 0);
      end
      default: r = 0;
    endcase
    op = o; byte_op = bw; src = 16'(a_in); dst = 16'(b_in); cin = c_in;
    #1;
    checks++;
    if (res !== 16'(r) ||
        (fl && (c_out !== c || v_out !== v || z_out !== (r == 0) ||
                n_out !== 1'((r >> (w - 1)) & 1)))) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s bw=%0d a=%h b=%h c=%0d: got %h C%0d Z%0d N%0d V%0d exp %h C%0d V%0d",
                 o.name(), bw, a_in, b_in, c_in, res, c_out, z_out, n_out, v_out, 16'(r), c, v);
    end
  endtask

  initial begin
    automatic alu_op_e ops[$] = '{ALU_MOV, ALU_ADD, ALU_ADDC, ALU_SUBC, ALU_SUB, ALU_DADD, ALU_BIT,
                                  ALU_BIC, ALU_BIS, ALU_XOR, ALU_AND, ALU_RRC, ALU_SWPB, ALU_RRA, ALU_SXT};
    foreach (ops[k]) begin
      for (int i = 0; i < 400; i++) begin
        int a, b;
        a = $urandom & 16'hFFFF;
        b = $urandom & 16'hFFFF;
        if (ops[k] == ALU_DADD) begin
          a = int2bcd($urandom % 10000, 4);
          b = int2bcd($urandom % 10000, 4);
        end
        if (i < 4) begin  // corner values
          a = (i[0]) ? 16'h8000 : 16'h7FFF;
          b = (i[1]) ? 16'h8000 : 16'hFFFF;
          if (ops[k] == ALU_DADD) begin a = 16'h9999; b = 16'h0001; end
        end
        one(ops[k], i[2], a, b, 1'($urandom));
      end
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
