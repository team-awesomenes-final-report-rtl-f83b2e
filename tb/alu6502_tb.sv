// alu6502_tb: random and corner-case check of the 12-function ALU against a
// reference model written with integer arithmetic.
module alu6502_tb;
  import nes_pkg::*;
  alu_op_e    op;
  logic [7:0] a, b, res;
  logic       cin, n, z, c, v;
  int checks = 0, failures = 0;

  alu6502 dut (.op, .a, .b, .cin, .res, .n, .z, .c, .v);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib, r, sa, sb, sr;
    logic [7:0] er;
    logic ec, ev, en;
    for (int i = 0; i < 4000; i++) begin
      op  = alu_op_e'(i % 12);
      a   = (i < 48) ? 8'(i * 37) : 8'($urandom);
      b   = (i < 48) ? 8'(255 - i * 11) : 8'($urandom);
      cin = 1'($urandom);
      #1;
      ia = int'(a); ib = int'(b);
      sa = (ia > 127) ? ia - 256 : ia;
      sb = (ib > 127) ? ib - 256 : ib;
      ec = cin; ev = 1'b0;
      unique case (op)
        ALU_ADD, ALU_ADC: begin
          r  = ia + ib + ((op == ALU_ADC) ? int'(cin) : 0);
          sr = sa + sb + ((op == ALU_ADC) ? int'(cin) : 0);
          er = 8'(r); ec = r > 255; ev = sr > 127 || sr < -128;
        end
        ALU_SUB, ALU_SBC: begin
          r  = ia - ib - ((op == ALU_SBC) ? 1 - int'(cin) : 0);
          sr = sa - sb - ((op == ALU_SBC) ? 1 - int'(cin) : 0);
          er = 8'(r); ec = r >= 0; ev = sr > 127 || sr < -128;
        end
        ALU_AND, ALU_BIT: er = 8'(ia & ib);
        ALU_ORA: er = 8'(ia | ib);
        ALU_EOR: er = 8'(ia ^ ib);
        ALU_ASL: begin er = 8'(ia * 2); ec = ia >= 128; end
        ALU_ROL: begin er = 8'(ia * 2 + int'(cin)); ec = ia >= 128; end
        ALU_LSR: begin er = 8'(ia / 2); ec = ia % 2 == 1; end
        default: begin er = 8'(ia / 2 + 128 * int'(cin)); ec = ia % 2 == 1; end
      endcase
      if (op == ALU_BIT) ev = b[6];
      en = (op == ALU_BIT) ? b[7] : er[7];
      checks++;
      if (res !== er || n !== en || z !== (er == 0) ||
          (op inside {ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC, ALU_BIT} && v !== ev) ||
          (!(op inside {ALU_AND, ALU_ORA, ALU_EOR, ALU_BIT}) && c !== ec)) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%s a=%h b=%h cin=%b -> %h nzcv=%b%b%b%b exp %h c=%b v=%b",
                   op.name(), a, b, cin, res, n, z, c, v, er, ec, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
