// alu6502: the single 8-bit, 12-function ALU of the 6502 datapath.
//
// Combinational. Operand a, operand b and the incoming carry produce the
// result and the N, Z, C and V flags. The CPU chooses which of the flags it
// keeps for each instruction (e.g. DEC keeps only N and Z), so the ALU always
// drives all four. The 2A03 has no decimal mode, so ADC/SBC are binary only.
// BIT returns a & b; Z comes from that result, N and V are bits 7 and 6 of b.
// Shifts and rotates work on operand a.
// Timing: purely combinational, no clock.
//
// The twelve functions, their order and the BIT flag rule follow the
// original design; binary-only ADC/SBC follows the NES CPU.
module alu6502
  import nes_pkg::*;
(
  input  alu_op_e    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] res,
  output logic       n,
  output logic       z,
  output logic       c,
  output logic       v
);
  logic [8:0] sum;
  logic [7:0] bb;
  logic       ci;

  always_comb begin
    sum = '0;
    bb  = b;
    ci  = 1'b0;
    c   = cin;
    v   = 1'b0;
    unique case (op)
      ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC: begin
        // Subtraction is addition of the complement with carry as not-borrow.
        bb  = (op == ALU_SUB || op == ALU_SBC) ? ~b : b;
        ci  = (op == ALU_ADD) ? 1'b0 : (op == ALU_SUB) ? 1'b1 : cin;
        sum = {1'b0, a} + {1'b0, bb} + {8'h00, ci};
        res = sum[7:0];
        c   = sum[8];
        v   = (a[7] == bb[7]) && (res[7] != a[7]);
      end
      ALU_AND: res = a & b;
      ALU_ORA: res = a | b;
      ALU_BIT: begin
        res = a & b;
        v   = b[6];
      end
      ALU_EOR: res = a ^ b;
      ALU_ASL: begin res = {a[6:0], 1'b0}; c = a[7]; end
      ALU_ROL: begin res = {a[6:0], cin};  c = a[7]; end
      ALU_LSR: begin res = {1'b0, a[7:1]}; c = a[0]; end
      ALU_ROR: begin res = {cin, a[7:1]};  c = a[0]; end
      default: res = a;
    endcase
    z = (res == 8'h00);
    n = (op == ALU_BIT) ? b[7] : res[7];
  end
endmodule
