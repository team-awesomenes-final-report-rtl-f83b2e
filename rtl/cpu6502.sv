// cpu6502: 6502-compatible CPU core (the 2A03's processor) with sprite DMA.
//
// The core is a finite-state machine that steers a combinational datapath:
// each state chooses the bus address, the ALU operands and which registers
// latch at the next clock edge. Memory is read combinationally: the address
// leaves the core and the data must come back within the same cycle, which
// gives the 6502's short instruction timings (2 cycles for immediate and
// implied instructions, 3 for zero page, 4 for absolute).
//
// States follow the report's state diagrams: Fetch 1/2, zero-page/absolute
// (plus X/Y indexed variants), indirect X (3) and indirect Y (2), branch (2),
// push, PLP, PLA, break (5, shared with JSR and the NMI/IRQ entry), JSR 3/4,
// RTI 1-3, RTS 3, jump absolute, jump indirect (3), store-back of a
// read-modify-write result, a dead cycle, reset (2) and the DMA read/write
// loop. A write to $4014 starts DMA: 256 read/write pairs copy
// page $xx00-$xxFF to $2004.
//
// Interface: one clock `clk`, advanced only when `ce` is high (one CPU cycle
// per ce pulse). `addr`, `we` and `dout` are valid throughout a cycle; on a
// read `din` is sampled at the ce edge. `rd` marks a real read access so a
// peripheral with read side effects can act once per cycle. `nmi` is edge
// triggered (rising), `irq` level, masked by I. Synchronous active-low reset
// starts at the reset vector $FFFC/$FFFD.
//
// Own choices, where the report is silent or differs from the real part:
// documented opcodes all execute. Of the undocumented ones, the combined
// read-modify-write opcodes (SLO, RLA, SRE, RRA, DCP, ISC) run their second
// ALU operation in the dead cycle that follows the write-back, as in the
// original design; LAX and SAX are also decoded. The remaining undocumented
// opcodes (immediate forms, unstable stores, KIL) run as 2-byte NOPs;
// address arithmetic uses dedicated adders next to the ALU; return
// addresses are pushed high byte first, as on the 6502; there is no decimal
// mode (as on the 2A03). Cycle counts match the 6502 for most instructions;
// interrupt entry, PLA/PLP and indexed stores are one cycle shorter.
module cpu6502
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  output logic [15:0] addr,
  output logic [7:0]  dout,
  input  logic [7:0]  din,
  output logic        we,
  output logic        rd,
  input  logic        nmi,
  input  logic        irq,
  output logic        sync,      // high in Fetch 1 (opcode fetch)
  output logic        dma_active // high during the sprite DMA loop
);

  typedef enum logic [5:0] {
    S_RESET1, S_RESET2, S_FETCH1, S_FETCH2,
    S_ZPABS, S_ZPABSX, S_ZPABSY, S_ABS1, S_ABSX, S_ABSY, S_ABS2,
    S_INDX1, S_INDX2, S_INDX3, S_INDY1, S_INDY2,
    S_BRANCH1, S_BRANCH2, S_PUSH, S_PLP, S_PLA,
    S_BRK1, S_BRK2, S_BRK3, S_BRK4, S_BRK5, S_JSR3, S_JSR4,
    S_RTI1, S_RTI2, S_RTI3, S_RTS3,
    S_JMPABS, S_JMPIND1, S_JMPIND2, S_JMPIND3,
    S_STND, S_DEAD, S_DMAR, S_DMAW
  } state_e;

  typedef enum logic [3:0] {
    M_IMP, M_IMM, M_ZP, M_ZPX, M_ZPY, M_ABS, M_ABSX, M_ABSY,
    M_INDX, M_INDY, M_REL, M_SPECIAL
  } mode_e;

  typedef enum logic [4:0] {
    O_NOP, O_LD, O_ST, O_ORA, O_AND, O_EOR, O_ADC, O_SBC, O_CMP, O_BIT,
    O_ASL, O_ROL, O_LSR, O_ROR, O_INC, O_DEC, O_XFER, O_INR, O_DER,
    O_FLAG, O_BRANCH, O_JMP, O_JMPI, O_JSR, O_RTS, O_RTI, O_BRK,
    O_PHA, O_PHP, O_PLA, O_PLP
  } op_e;

  typedef enum logic [2:0] { R_A, R_X, R_Y, R_SP, R_ND, R_AX, R_NONE } reg_e;

  typedef struct packed {
    mode_e mode;
    op_e   op;
    reg_e  r;     // register loaded, stored, compared or the transfer source
    reg_e  r2;    // transfer destination
    logic  acc;   // shift/rotate on the accumulator
    op_e   cmb;   // second operation run in the dead cycle (combined opcodes)
  } dec_t;

  // ---------------------------------------------------------------- decode
  function automatic dec_t decode(input logic [7:0] o);
    dec_t d;
    logic [2:0] aaa, bbb;
    aaa = o[7:5];
    bbb = o[4:2];
    d = '{mode: M_IMM, op: O_NOP, r: R_A, r2: R_NONE, acc: 1'b0, cmb: O_NOP};
    unique case (o[1:0])
      2'b01: begin
        unique case (bbb)
          3'd0: d.mode = M_INDX; 3'd1: d.mode = M_ZP;   3'd2: d.mode = M_IMM;
          3'd3: d.mode = M_ABS;  3'd4: d.mode = M_INDY; 3'd5: d.mode = M_ZPX;
          3'd6: d.mode = M_ABSY; default: d.mode = M_ABSX;
        endcase
        unique case (aaa)
          3'd0: d.op = O_ORA; 3'd1: d.op = O_AND; 3'd2: d.op = O_EOR;
          3'd3: d.op = O_ADC; 3'd4: d.op = O_ST;  3'd5: d.op = O_LD;
          3'd6: d.op = O_CMP; default: d.op = O_SBC;
        endcase
        if (o == 8'h89) d.op = O_NOP;
      end
      2'b10: begin
        d.r = (aaa == 3'd4 || aaa == 3'd5) ? R_X : R_ND;
        unique case (aaa)
          3'd0: d.op = O_ASL; 3'd1: d.op = O_ROL; 3'd2: d.op = O_LSR;
          3'd3: d.op = O_ROR; 3'd4: d.op = O_ST;  3'd5: d.op = O_LD;
          3'd6: d.op = O_DEC; default: d.op = O_INC;
        endcase
        unique case (bbb)
          3'd0: if (o != 8'hA2) d.op = O_NOP;
          3'd1: d.mode = M_ZP;
          3'd2: begin
            d.mode = M_IMP;
            unique case (aaa)
              3'd4: begin d.op = O_XFER; d.r = R_X; d.r2 = R_A; end      // TXA
              3'd5: begin d.op = O_XFER; d.r = R_A; d.r2 = R_X; end      // TAX
              3'd6: begin d.op = O_DER;  d.r = R_X; end                  // DEX
              3'd7: d.op = O_NOP;                                         // NOP
              default: d.acc = 1'b1;                                     // ASL A ..
            endcase
          end
          3'd3: d.mode = M_ABS;
          3'd5: d.mode = (aaa == 3'd4 || aaa == 3'd5) ? M_ZPY : M_ZPX;
          3'd6: begin
            d.mode = M_IMP;
            if (aaa == 3'd4)      begin d.op = O_XFER; d.r = R_X;  d.r2 = R_SP; end // TXS
            else if (aaa == 3'd5) begin d.op = O_XFER; d.r = R_SP; d.r2 = R_X;  end // TSX
            else begin d.mode = M_IMM; d.op = O_NOP; end
          end
          3'd7: begin
            d.mode = (aaa == 3'd5) ? M_ABSY : M_ABSX;
            if (aaa == 3'd4) d.op = O_NOP;
          end
          default: d.op = O_NOP;
        endcase
      end
      2'b00: begin
        unique case (bbb)
          3'd0: begin
            unique case (aaa)
              3'd0: begin d.mode = M_SPECIAL; d.op = O_BRK; end
              3'd1: begin d.mode = M_SPECIAL; d.op = O_JSR; end
              3'd2: begin d.mode = M_SPECIAL; d.op = O_RTI; end
              3'd3: begin d.mode = M_SPECIAL; d.op = O_RTS; end
              3'd5: begin d.op = O_LD;  d.r = R_Y; end
              3'd6: begin d.op = O_CMP; d.r = R_Y; end
              3'd7: begin d.op = O_CMP; d.r = R_X; end
              default: d.op = O_NOP;
            endcase
          end
          3'd2: begin
            d.mode = M_IMP;
            unique case (aaa)
              3'd0: begin d.mode = M_SPECIAL; d.op = O_PHP; end
              3'd1: begin d.mode = M_SPECIAL; d.op = O_PLP; end
              3'd2: begin d.mode = M_SPECIAL; d.op = O_PHA; end
              3'd3: begin d.mode = M_SPECIAL; d.op = O_PLA; end
              3'd4: begin d.op = O_DER;  d.r = R_Y; end                  // DEY
              3'd5: begin d.op = O_XFER; d.r = R_A; d.r2 = R_Y; end      // TAY
              3'd6: begin d.op = O_INR;  d.r = R_Y; end                  // INY
              default: begin d.op = O_INR; d.r = R_X; end                // INX
            endcase
          end
          3'd4: begin d.mode = M_REL; d.op = O_BRANCH; end
          3'd6: begin
            d.mode = M_IMP;
            if (aaa == 3'd4) begin d.op = O_XFER; d.r = R_Y; d.r2 = R_A; end // TYA
            else d.op = O_FLAG;
          end
          3'd1, 3'd3, 3'd5, 3'd7: begin
            d.mode = (bbb == 3'd1) ? M_ZP : (bbb == 3'd3) ? M_ABS :
                     (bbb == 3'd5) ? M_ZPX : M_ABSX;
            unique case (aaa)
              3'd1: d.op = (bbb == 3'd1 || bbb == 3'd3) ? O_BIT : O_NOP;
              3'd2: if (bbb == 3'd3) begin d.mode = M_SPECIAL; d.op = O_JMP;  end
                    else d.op = O_NOP;
              3'd3: if (bbb == 3'd3) begin d.mode = M_SPECIAL; d.op = O_JMPI; end
                    else d.op = O_NOP;
              3'd4: begin d.op = (bbb == 3'd7) ? O_NOP : O_ST; d.r = R_Y; end
              3'd5: begin d.op = O_LD; d.r = R_Y; end
              3'd6: begin d.op = (bbb <= 3'd3) ? O_CMP : O_NOP; d.r = R_Y; end
              3'd7: begin d.op = (bbb <= 3'd3) ? O_CMP : O_NOP; d.r = R_X; end
              default: d.op = O_NOP;
            endcase
            if (d.op == O_NOP) d.mode = M_IMM;
          end
          default: begin d.mode = M_IMM; d.op = O_NOP; end
        endcase
      end
      default: begin
        // Undocumented column xxxxxx11. Read-modify-write forms run the
        // shift/increment of column 10 and then, in the dead cycle, the ALU
        // operation of column 01 on the result (SLO, RLA, SRE, RRA, DCP,
        // ISC). LAX loads A and X; SAX stores A & X. The immediate and
        // unstable forms stay 2-byte NOPs.
        unique case (bbb)
          3'd0: d.mode = M_INDX; 3'd1: d.mode = M_ZP;   3'd3: d.mode = M_ABS;
          3'd4: d.mode = M_INDY; 3'd5: d.mode = M_ZPX;  3'd6: d.mode = M_ABSY;
          3'd7: d.mode = M_ABSX; default: d.mode = M_IMM;
        endcase
        unique case (aaa)
          3'd0: begin d.op = O_ASL; d.cmb = O_ORA; end
          3'd1: begin d.op = O_ROL; d.cmb = O_AND; end
          3'd2: begin d.op = O_LSR; d.cmb = O_EOR; end
          3'd3: begin d.op = O_ROR; d.cmb = O_ADC; end
          3'd4: begin
            d.op = O_ST; d.r = R_AX;
            if (bbb == 3'd5) d.mode = M_ZPY;
            else if (bbb != 3'd0 && bbb != 3'd1 && bbb != 3'd3) d.op = O_NOP;
          end
          3'd5: begin
            d.op = O_LD; d.r = R_AX;
            if (bbb == 3'd5) d.mode = M_ZPY;
            else if (bbb == 3'd7) d.mode = M_ABSY;
            else if (bbb == 3'd2 || bbb == 3'd6) d.op = O_NOP;
          end
          3'd6: begin d.op = O_DEC; d.cmb = O_CMP; end
          default: begin d.op = O_INC; d.cmb = O_SBC; end
        endcase
        if (bbb == 3'd2) begin d.op = O_NOP; d.cmb = O_NOP; end
        if (d.op == O_NOP) d.mode = M_IMM;
      end
    endcase
    return d;
  endfunction

  // -------------------------------------------------------------- registers
  state_e      state;
  logic [7:0]  a_q, x_q, y_q, sp_q, ir_q, m_q, nd_q, dma_hi, dma_lo;
  logic [8:0]  l_q;          // low address byte plus index carry (L[8])
  logic [15:0] pc_q;
  logic        fn, fv, fd, fi, fz, fc;
  logic        nmi_prev, nmi_pend, dma_pend, int_nmi, int_hw;

  dec_t        dec;
  assign dec = decode(ir_q);

  wire [7:0] p_byte = {fn, fv, 1'b1, 1'b1, fd, fi, fz, fc};  // pushed by PHP/BRK

  // ----------------------------------------------------------- ALU control
  alu_op_e    alu_op;
  logic [7:0] alu_a, alu_b, alu_res;
  logic       alu_n, alu_z, alu_c, alu_v;
  logic [7:0] opnd;

  alu6502 u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .cin(fc),
                 .res(alu_res), .n(alu_n), .z(alu_z), .c(alu_c), .v(alu_v));

  function automatic logic [7:0] rd_reg(input reg_e r, input logic [7:0] a,
      input logic [7:0] x, input logic [7:0] y, input logic [7:0] sp,
      input logic [7:0] nd);
    unique case (r)
      R_A:  return a;
      R_X:  return x;
      R_Y:  return y;
      R_SP: return sp;
      R_ND: return nd;
      R_AX: return a & x;
      default: return 8'h00;
    endcase
  endfunction

  // In the dead cycle of a combined opcode the second operation runs on the
  // read-modify-write result held in ND; otherwise the operand is memory
  // data, or A for ASL A etc.
  logic  cmb_now;
  op_e   xop;
  assign cmb_now = (state == S_DEAD) && (dec.cmb != O_NOP);
  assign xop     = cmb_now ? dec.cmb : dec.op;
  assign opnd    = cmb_now ? nd_q : dec.acc ? a_q : din;

  always_comb begin
    alu_a  = opnd;
    alu_b  = 8'h00;
    alu_op = ALU_ADD;
    unique case (xop)
      O_ORA: begin alu_op = ALU_ORA; alu_a = a_q; alu_b = opnd; end
      O_AND: begin alu_op = ALU_AND; alu_a = a_q; alu_b = opnd; end
      O_EOR: begin alu_op = ALU_EOR; alu_a = a_q; alu_b = opnd; end
      O_ADC: begin alu_op = ALU_ADC; alu_a = a_q; alu_b = opnd; end
      O_SBC: begin alu_op = ALU_SBC; alu_a = a_q; alu_b = opnd; end
      O_CMP: begin alu_op = ALU_SUB;
                   alu_a = rd_reg(dec.r, a_q, x_q, y_q, sp_q, nd_q); alu_b = opnd; end
      O_BIT: begin alu_op = ALU_BIT; alu_a = a_q; alu_b = opnd; end
      O_ASL: alu_op = ALU_ASL;
      O_ROL: alu_op = ALU_ROL;
      O_LSR: alu_op = ALU_LSR;
      O_ROR: alu_op = ALU_ROR;
      O_INC: alu_b = 8'h01;
      O_DEC: alu_b = 8'hFF;
      O_INR: begin alu_a = rd_reg(dec.r, a_q, x_q, y_q, sp_q, nd_q); alu_b = 8'h01; end
      O_DER: begin alu_a = rd_reg(dec.r, a_q, x_q, y_q, sp_q, nd_q); alu_b = 8'hFF; end
      O_XFER: alu_a = rd_reg(dec.r, a_q, x_q, y_q, sp_q, nd_q);
      O_PLA, O_PLP, O_LD: alu_a = din;
      default: ;
    endcase
  end

  // --------------------------------------------------------- bus addressing
  wire [7:0]  m_inc  = m_q + 8'd1;
  wire [15:0] abs_ea = {m_q, l_q[7:0]};
  wire [15:0] stack  = {8'h01, sp_q};
  wire        is_st  = (dec.op == O_ST);
  wire [7:0]  st_val = rd_reg(dec.r, a_q, x_q, y_q, sp_q, nd_q);

  always_comb begin
    addr = pc_q;
    we   = 1'b0;
    dout = 8'h00;
    rd   = 1'b1;
    unique case (state)
      S_RESET1: addr = 16'hFFFC;
      S_RESET2: addr = 16'hFFFD;
      S_ZPABS:  begin addr = {8'h00, m_q}; we = is_st; dout = st_val; end
      S_ABS2:   begin addr = abs_ea; we = is_st && !l_q[8]; dout = st_val; rd = !l_q[8] && !is_st; end
      S_ZPABSX, S_ZPABSY, S_INDX1, S_BRANCH1, S_BRANCH2, S_DEAD, S_RTS3, S_JSR4:
                rd = 1'b0;
      S_INDX2, S_INDY1: addr = {8'h00, m_q};
      S_INDX3, S_INDY2: addr = {8'h00, m_inc};
      S_PUSH:   begin addr = stack; we = 1'b1; dout = (dec.op == O_PHP) ? p_byte : a_q; end
      S_PLP, S_PLA, S_RTI1, S_RTI2, S_RTI3: addr = stack;
      S_BRK1:   begin addr = stack; we = 1'b1; dout = pc_q[15:8]; end
      S_BRK2:   begin addr = stack; we = 1'b1; dout = pc_q[7:0]; end
      S_BRK3:   begin addr = stack; we = 1'b1; dout = {p_byte[7:5], !int_hw, p_byte[3:0]}; end
      S_BRK4:   addr = int_nmi ? 16'hFFFA : (int_hw || dec.op == O_BRK) ? 16'hFFFE : 16'hFFFC;
      S_BRK5:   addr = int_nmi ? 16'hFFFB : 16'hFFFF;
      S_JMPIND2: addr = abs_ea;
      S_JMPIND3: addr = {m_q, l_q[7:0] + 8'd1};   // page wrap as on the 6502
      S_STND:   begin addr = (dec.mode == M_ZP || dec.mode == M_ZPX) ? {8'h00, m_q} : abs_ea;
                      we = 1'b1; dout = nd_q; rd = 1'b0; end
      S_DMAR:   addr = {dma_hi, dma_lo};
      S_DMAW:   begin addr = 16'h2004; we = 1'b1; dout = m_q; end
      default:  ;
    endcase
    if (we) rd = 1'b0;
  end

  assign sync       = (state == S_FETCH1);
  assign dma_active = (state == S_DMAR) || (state == S_DMAW);

  // Branch condition: IR[7:6] picks N, V, C or Z, IR[5] the value wanted.
  logic take_branch;
  always_comb begin
    unique case (ir_q[7:6])
      2'd0: take_branch = (fn == ir_q[5]);
      2'd1: take_branch = (fv == ir_q[5]);
      2'd2: take_branch = (fc == ir_q[5]);
      default: take_branch = (fz == ir_q[5]);
    endcase
  end

  // ------------------------------------------------------------ sequencing
  // Result of executing the decoded instruction on `opnd`: which register
  // is written, which flags change, and where the FSM goes next.
  reg_e       wb_reg;
  logic [5:0] fl_we;      // {N, V, D, I, Z, C} update enables
  logic [5:0] fl_val;
  state_e     ex_next;
  logic       do_exec;

  always_comb begin
    wb_reg  = R_NONE;
    fl_we   = '0;
    fl_val  = {alu_n, alu_v, fd, fi, alu_z, alu_c};
    unique case (xop)
      O_ORA, O_AND, O_EOR: begin wb_reg = R_A; fl_we = 6'b100010; end
      O_ADC, O_SBC: begin wb_reg = R_A; fl_we = 6'b110011; end
      O_CMP: fl_we = 6'b100011;
      O_BIT: fl_we = 6'b110010;
      O_LD:  begin wb_reg = dec.r; fl_we = 6'b100010; end
      O_ASL, O_ROL, O_LSR, O_ROR: begin wb_reg = dec.acc ? R_A : R_ND; fl_we = 6'b100011; end
      O_INC, O_DEC: begin wb_reg = R_ND; fl_we = 6'b100010; end
      O_INR, O_DER: begin wb_reg = dec.r; fl_we = 6'b100010; end
      O_XFER: begin wb_reg = dec.r2; fl_we = (dec.r2 == R_SP) ? 6'b000000 : 6'b100010; end
      O_FLAG: unique case (ir_q[7:6])
        2'd0: begin fl_we = 6'b000001; fl_val[0] = ir_q[5]; end
        2'd1: begin fl_we = 6'b000100; fl_val[2] = ir_q[5]; end
        2'd2: begin fl_we = 6'b010000; fl_val[4] = 1'b0;    end
        default: begin fl_we = 6'b001000; fl_val[3] = ir_q[5]; end
      endcase
      default: ;
    endcase
    ex_next = (xop inside {O_ASL, O_ROL, O_LSR, O_ROR, O_INC, O_DEC} && !dec.acc)
              ? S_STND : S_FETCH1;
    do_exec = (state == S_FETCH2 && (dec.mode == M_IMP || dec.mode == M_IMM)) ||
              (state == S_ZPABS) || (state == S_ABS2 && !l_q[8]) || cmb_now;
  end

  logic [8:0] br_sum;
  assign br_sum = {1'b0, pc_q[7:0]} + {1'b0, l_q[7:0]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_RESET1;
      a_q <= 8'h00; x_q <= 8'h00; y_q <= 8'h00; sp_q <= 8'hFD;
      ir_q <= 8'hEA; m_q <= 8'h00; nd_q <= 8'h00; l_q <= 9'h000;
      pc_q <= 16'h0000;
      {fn, fv, fd, fz, fc} <= '0;
      fi       <= 1'b1;
      nmi_prev <= 1'b0; nmi_pend <= 1'b0; dma_pend <= 1'b0;
      int_nmi  <= 1'b0; int_hw   <= 1'b0;
      dma_hi   <= 8'h00; dma_lo  <= 8'h00;
    end else if (ce) begin
      nmi_prev <= nmi;
      if (nmi && !nmi_prev) nmi_pend <= 1'b1;
      if (we && addr == 16'h4014) begin
        dma_hi   <= dout;
        dma_pend <= 1'b1;
      end
      unique case (state)
        S_RESET1: begin pc_q[7:0] <= din; state <= S_RESET2; end
        S_RESET2: begin pc_q[15:8] <= din; state <= S_FETCH1; end
        S_FETCH1: begin
          if (dma_pend) begin
            dma_pend <= 1'b0;
            dma_lo   <= 8'h00;
            state    <= S_DMAR;
          end else if (nmi_pend || (irq && !fi)) begin
            int_nmi  <= nmi_pend;
            int_hw   <= 1'b1;
            nmi_pend <= 1'b0;
            state    <= S_BRK1;
          end else begin
            ir_q   <= din;
            pc_q   <= pc_q + 16'd1;
            int_hw <= 1'b0;
            int_nmi <= 1'b0;
            state  <= S_FETCH2;
          end
        end
        S_FETCH2: begin
          unique case (dec.mode)
            M_IMP: ;
            M_IMM: pc_q <= pc_q + 16'd1;
            M_ZP:   begin m_q <= din; pc_q <= pc_q + 16'd1; state <= S_ZPABS;  end
            M_ZPX:  begin m_q <= din; pc_q <= pc_q + 16'd1; state <= S_ZPABSX; end
            M_ZPY:  begin m_q <= din; pc_q <= pc_q + 16'd1; state <= S_ZPABSY; end
            M_ABS:  begin l_q <= {1'b0, din}; pc_q <= pc_q + 16'd1; state <= S_ABS1; end
            M_ABSX: begin l_q <= {1'b0, din}; pc_q <= pc_q + 16'd1; state <= S_ABSX; end
            M_ABSY: begin l_q <= {1'b0, din}; pc_q <= pc_q + 16'd1; state <= S_ABSY; end
            M_INDX: begin m_q <= din; pc_q <= pc_q + 16'd1; state <= S_INDX1; end
            M_INDY: begin m_q <= din; pc_q <= pc_q + 16'd1; state <= S_INDY1; end
            M_REL: begin
              pc_q <= pc_q + 16'd1;
              l_q  <= {1'b0, din};
              state <= take_branch ? S_BRANCH1 : S_FETCH1;
            end
            default: unique case (dec.op)
              O_BRK:  begin pc_q <= pc_q + 16'd1; state <= S_BRK1; end
              O_JSR:  begin l_q <= {1'b0, din}; pc_q <= pc_q + 16'd1; state <= S_BRK1; end
              O_RTI:  begin sp_q <= sp_q + 8'd1; state <= S_RTI1; end
              O_RTS:  begin sp_q <= sp_q + 8'd1; state <= S_RTI2; end
              O_JMP:  begin l_q <= {1'b0, din}; pc_q <= pc_q + 16'd1; state <= S_JMPABS; end
              O_JMPI: begin l_q <= {1'b0, din}; pc_q <= pc_q + 16'd1; state <= S_JMPIND1; end
              O_PHA, O_PHP: state <= S_PUSH;
              O_PLA:  begin sp_q <= sp_q + 8'd1; state <= S_PLA; end
              default: begin sp_q <= sp_q + 8'd1; state <= S_PLP; end
            endcase
          endcase
        end
        S_ZPABSX: begin m_q <= m_q + x_q; state <= S_ZPABS; end
        S_ZPABSY: begin m_q <= m_q + y_q; state <= S_ZPABS; end
        S_ZPABS:  ;
        S_ABS1:   begin m_q <= din; pc_q <= pc_q + 16'd1; state <= S_ABS2; end
        S_ABSX:   begin m_q <= din; l_q <= {1'b0, l_q[7:0]} + {1'b0, x_q};
                        pc_q <= pc_q + 16'd1; state <= S_ABS2; end
        S_ABSY:   begin m_q <= din; l_q <= {1'b0, l_q[7:0]} + {1'b0, y_q};
                        pc_q <= pc_q + 16'd1; state <= S_ABS2; end
        S_ABS2: begin
          if (l_q[8]) begin
            m_q    <= m_inc;      // page crossing: one extra cycle
            l_q[8] <= 1'b0;
          end
        end
        S_INDX1: begin m_q <= m_q + x_q; state <= S_INDX2; end
        S_INDX2: begin l_q <= {1'b0, din}; state <= S_INDX3; end
        S_INDX3: begin m_q <= din; state <= S_ABS2; end
        S_INDY1: begin l_q <= {1'b0, din} + {1'b0, y_q}; state <= S_INDY2; end
        S_INDY2: begin m_q <= din; state <= S_ABS2; end
        S_BRANCH1: begin
          pc_q[7:0] <= br_sum[7:0];
          state <= (br_sum[8] != l_q[7]) ? S_BRANCH2 : S_FETCH1;
        end
        S_BRANCH2: begin
          pc_q[15:8] <= l_q[7] ? pc_q[15:8] - 8'd1 : pc_q[15:8] + 8'd1;
          state <= S_FETCH1;
        end
        S_PUSH: begin sp_q <= sp_q - 8'd1; state <= S_FETCH1; end
        S_PLP:  begin {fn, fv} <= din[7:6]; {fd, fi, fz, fc} <= din[3:0]; state <= S_FETCH1; end
        S_PLA:  begin a_q <= alu_res; fn <= alu_n; fz <= alu_z; state <= S_FETCH1; end
        S_BRK1: begin sp_q <= sp_q - 8'd1; state <= S_BRK2; end
        S_BRK2: begin
          sp_q  <= sp_q - 8'd1;
          state <= (!int_hw && dec.op == O_JSR) ? S_JSR3 : S_BRK3;
        end
        S_BRK3: begin sp_q <= sp_q - 8'd1; fi <= 1'b1; state <= S_BRK4; end
        S_BRK4: begin pc_q[7:0] <= din; state <= S_BRK5; end
        S_BRK5: begin pc_q[15:8] <= din; int_nmi <= 1'b0; int_hw <= 1'b0; state <= S_FETCH1; end
        S_JSR3: begin m_q <= din; state <= S_JSR4; end
        S_JSR4: begin pc_q <= abs_ea; state <= S_FETCH1; end
        S_RTI1: begin
          {fn, fv} <= din[7:6]; {fd, fi, fz, fc} <= din[3:0];
          sp_q <= sp_q + 8'd1; state <= S_RTI2;
        end
        S_RTI2: begin pc_q[7:0] <= din; sp_q <= sp_q + 8'd1; state <= S_RTI3; end
        S_RTI3: begin pc_q[15:8] <= din; state <= (dec.op == O_RTS) ? S_RTS3 : S_DEAD; end
        S_RTS3: begin pc_q <= pc_q + 16'd1; state <= S_DEAD; end
        S_JMPABS:  begin pc_q <= {din, l_q[7:0]}; state <= S_FETCH1; end
        S_JMPIND1: begin m_q <= din; state <= S_JMPIND2; end
        S_JMPIND2: begin nd_q <= din; state <= S_JMPIND3; end
        S_JMPIND3: begin pc_q <= {din, nd_q}; state <= S_FETCH1; end
        S_STND:    state <= S_DEAD;
        S_DEAD:    state <= S_FETCH1;
        S_DMAR:    begin m_q <= din; state <= S_DMAW; end
        S_DMAW: begin
          dma_lo <= dma_lo + 8'd1;
          state  <= (dma_lo == 8'hFF) ? S_FETCH1 : S_DMAR;
        end
        default: state <= S_FETCH1;
      endcase
      if (do_exec) begin
        unique case (wb_reg)
          R_A:  a_q  <= alu_res;
          R_X:  x_q  <= alu_res;
          R_Y:  y_q  <= alu_res;
          R_SP: sp_q <= alu_res;
          R_ND: nd_q <= alu_res;
          R_AX: begin a_q <= alu_res; x_q <= alu_res; end
          default: ;
        endcase
        if (fl_we[5]) fn <= fl_val[5];
        if (fl_we[4]) fv <= fl_val[4];
        if (fl_we[3]) fd <= fl_val[3];
        if (fl_we[2]) fi <= fl_val[2];
        if (fl_we[1]) fz <= fl_val[1];
        if (fl_we[0]) fc <= fl_val[0];
        state <= ex_next;
      end
    end
  end
endmodule
