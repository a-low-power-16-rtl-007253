// alu: arithmetic, logic and shift unit of the execution unit.
// Purely combinational. `src` and `dst` are the two operands (for the
// one-operand instructions the operand arrives on `src`); `byte_op` selects
// an 8-bit operation on the low bytes, in which case the result's upper byte
// is zero. It returns the result and the four condition flags C, Z, N, V in
// the way the instruction set defines them: add/subtract set all four, the
// logical tests AND/BIT/XOR/SXT set C to "result not zero", shifts move the
// shifted-out bit into C, DADD is a decimal (BCD) add with carry. Whether the flags
// are kept is decided by the caller (MOV, BIC, BIS and SWPB leave them alone).
// The operation set follows the 27-instruction set; the flag rules are this
// design's choice where the architecture description is silent.
module alu
  import mcu_pkg::*;
(
  input  alu_op_e     op,
  input  logic        byte_op,
  input  logic [15:0] src,
  input  logic [15:0] dst,
  input  logic        cin,
  output logic [15:0] res,
  output logic        c_out,
  output logic        z_out,
  output logic        n_out,
  output logic        v_out
);

  logic [15:0] a, b, mask;
  logic [16:0] sum;
  logic [15:0] b_eff;
  logic        cy;
  logic [15:0] bcd;
  logic        bcd_c;
  logic [4:0]  nib;

  function automatic logic msb(input logic [15:0] x, input logic bw);
    return bw ? x[7] : x[15];
  endfunction

  always_comb begin
    mask  = byte_op ? 16'h00FF : 16'hFFFF;
    a     = src & mask;
    b     = dst & mask;
    res   = '0;
    c_out = cin;
    v_out = 1'b0;
    sum   = '0;
    b_eff = '0;
    cy    = 1'b0;
    bcd   = '0;
    bcd_c = cin;
    nib   = '0;
    unique case (op)
      ALU_MOV:  res = a;
      ALU_ADD, ALU_ADDC, ALU_SUB, ALU_SUBC: begin
        // dst + src (+carry), or dst + ~src + (1 | carry)
        b_eff = (op == ALU_SUB || op == ALU_SUBC) ? (~a & mask) : a;
        cy    = (op == ALU_ADD) ? 1'b0 : (op == ALU_SUB) ? 1'b1 : cin;
        sum   = {1'b0, b} + {1'b0, b_eff} + {16'd0, cy};
        res   = sum[15:0] & mask;
        c_out = byte_op ? sum[8] : sum[16];
        v_out = (msb(b, byte_op) == msb(b_eff, byte_op)) &&
                (msb(res, byte_op) != msb(b, byte_op));
      end
      ALU_DADD: begin
        for (int i = 0; i < 4; i++) begin
          nib = {1'b0, b[4*i +: 4]} + {1'b0, a[4*i +: 4]} + {4'd0, bcd_c};
          if (nib > 5'd9) begin
            nib   = nib + 5'd6;
            bcd_c = 1'b1;
          end else begin
            bcd_c = 1'b0;
          end
          bcd[4*i +: 4] = nib[3:0];
          if (byte_op && i == 1) c_out = bcd_c;
        end
        res = bcd & mask;
        if (!byte_op) c_out = bcd_c;
      end
      ALU_BIT, ALU_AND: begin
        res   = a & b;
        c_out = (res != 16'd0);
      end
      ALU_BIC: res = b & ~a;
      ALU_BIS: res = b | a;
      ALU_XOR: begin
        res   = a ^ b;
        c_out = (res != 16'd0);
        v_out = msb(a, byte_op) && msb(b, byte_op);
      end
      ALU_RRC: begin
        res   = byte_op ? {8'd0, cin, a[7:1]} : {cin, a[15:1]};
        c_out = a[0];
      end
      ALU_RRA: begin
        res   = byte_op ? {8'd0, a[7], a[7:1]} : {a[15], a[15:1]};
        c_out = a[0];
      end
      ALU_SWPB: res = {src[7:0], src[15:8]};
      ALU_SXT: begin
        res   = {{8{src[7]}}, src[7:0]};
        c_out = (res != 16'd0);
      end
      default: res = a;
    endcase
    // SXT is always a word result
    z_out = (op == ALU_SXT || op == ALU_SWPB) ? (res == 16'd0) : ((res & mask) == 16'd0);
    n_out = (op == ALU_SXT || op == ALU_SWPB) ? res[15] : msb(res, byte_op);
  end

endmodule
