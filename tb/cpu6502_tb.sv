// cpu6502_tb: runs a 6502 test program on the CPU with a 64 KB memory model
// and checks register/memory results, stack behaviour, interrupts, sprite
// DMA, the cycle counts of representative instructions and the combined
// undocumented opcodes (SLO, RLA, SRE, RRA, DCP, ISC, LAX, SAX) on random
// operands.
//
// The program is assembled here, byte by byte; expected values were worked
// out by hand from the 6502 instruction definitions. At its end the program
// stores its results to $0200.. and loops at a `JMP *`; the testbench waits
// for that address.
module cpu6502_tb;
  logic        clk = 0, rst_n = 0, ce = 1;
  logic [15:0] addr;
  logic [7:0]  dout, din;
  logic        we, rd, nmi = 0, irq = 0, sync, dma_active;
  logic [7:0]  mem [65536];
  int checks = 0, failures = 0;
  int cycles = 0;
  int dma_writes = 0;
  logic [7:0] oam_seen [256];

  cpu6502 dut (.clk, .rst_n, .ce, .addr, .dout, .din, .we, .rd, .nmi, .irq,
               .sync, .dma_active);

  always #5 clk = !clk;
  assign din = mem[addr];
  always_ff @(posedge clk) begin
    if (rst_n && ce && we) begin
      mem[addr] <= dout;
      if (addr == 16'h2004) begin
        oam_seen[dma_writes[7:0]] <= dout;
        dma_writes <= dma_writes + 1;
      end
    end
    if (rst_n) cycles <= cycles + 1;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int pc;
  task automatic emit(input logic [7:0] b);
    mem[pc[15:0]] = b;
    pc++;
  endtask

  // Cycle count of each of the first instructions: distance between
  // consecutive opcode fetches.
  int fetch_at [16];
  int nfetch = 0;
  always_ff @(posedge clk) begin
    if (rst_n && sync && nfetch < 16) begin
      fetch_at[nfetch] <= cycles;
      nfetch <= nfetch + 1;
    end
  end
  int n_timed = 0;
  // operands of the combined (undocumented) opcodes, drawn at random
  logic [7:0] r [8];
  logic [7:0] k [6];
  logic [7:0] e_m [6];
  logic [7:0] e_a [6];
  logic [1:0] e_dcp;
  task automatic time_instr(input string what, input int exp);
    chk(what, fetch_at[n_timed + 1] - fetch_at[n_timed], exp);
    n_timed++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    // vectors
    mem[16'hFFFC] = 8'h00; mem[16'hFFFD] = 8'h80;   // reset  -> $8000
    mem[16'hFFFA] = 8'h00; mem[16'hFFFB] = 8'h90;   // NMI    -> $9000
    mem[16'hFFFE] = 8'h00; mem[16'hFFFF] = 8'h91;   // IRQ/BRK-> $9100
    // NMI handler: INC $0210 ; RTI
    pc = 16'h9000; emit(8'hEE); emit(8'h10); emit(8'h02); emit(8'h40);
    // IRQ/BRK handler: INC $0211 ; RTI
    pc = 16'h9100; emit(8'hEE); emit(8'h11); emit(8'h02); emit(8'h40);
    // subroutine at $9200: LDY #$77 ; RTS
    pc = 16'h9200; emit(8'hA0); emit(8'h77); emit(8'h60);
    // data
    mem[16'h0300] = 8'h11; mem[16'h0301] = 8'h22; mem[16'h03FF] = 8'h33;
    mem[16'h0400] = 8'h44;
    mem[16'h0040] = 8'h00; mem[16'h0041] = 8'h03;    // pointer -> $0300
    mem[16'h0050] = 8'hFF; mem[16'h0051] = 8'h03;    // pointer -> $03FF
    mem[16'h0600] = 8'h34; mem[16'h0601] = 8'h12;    // JMP ($0600) -> $1234
    for (int i = 0; i < 256; i++) mem[16'h0700 + i] = 8'(i * 3 + 1);
    for (int i = 0; i < 8; i++) r[i] = 8'($urandom);
    for (int i = 0; i < 6; i++) k[i] = 8'($urandom);
    mem[16'h0060] = r[0]; mem[16'h0061] = r[1]; mem[16'h0362] = r[2];
    mem[16'h0063] = r[3]; mem[16'h0064] = r[4]; mem[16'h0065] = r[5];
    mem[16'h0364] = r[6];
    // expected results, from the definitions of the combined opcodes
    e_m[0] = r[0] << 1;                 e_a[0] = k[0] | e_m[0];       // SLO
    e_m[1] = {r[1][6:0], r[0][7]};      e_a[1] = k[1] & e_m[1];       // RLA
    e_m[2] = r[2] >> 1;                 e_a[2] = k[2] ^ e_m[2];       // SRE
    e_m[3] = {1'b0, r[3][7:1]};         e_a[3] = k[3] + e_m[3] + 8'(r[3][0]); // RRA
    e_m[4] = r[4] - 8'd1;                                             // DCP
    e_dcp  = {k[4] == e_m[4], k[4] >= e_m[4]};
    e_m[5] = r[5] + 8'd1;               e_a[5] = k[5] - e_m[5];       // ISC

    pc = 16'h8000;
    emit(8'hA2); emit(8'hFF);             // LDX #$FF
    emit(8'h9A);                          // TXS
    emit(8'hA9); emit(8'h10);             // LDA #$10
    emit(8'h18);                          // CLC
    emit(8'h69); emit(8'h25);             // ADC #$25      A=35
    emit(8'h8D); emit(8'h00); emit(8'h02); // STA $0200
    emit(8'h38);                          // SEC
    emit(8'hE9); emit(8'h40);             // SBC #$40      A=F5, C=0
    emit(8'h85); emit(8'h20);             // STA $20
    emit(8'h08);                          // PHP
    emit(8'h68);                          // PLA           A = P (N=1,C=0)
    emit(8'h8D); emit(8'h01); emit(8'h02); // STA $0201
    emit(8'hA2); emit(8'h01);             // LDX #1
    emit(8'hA0); emit(8'h01);             // LDY #1
    emit(8'hA1); emit(8'h3F);             // LDA ($3F,X)   -> ($40) = $0300 -> 11
    emit(8'h8D); emit(8'h02); emit(8'h02); // STA $0202
    emit(8'hB1); emit(8'h50);             // LDA ($50),Y   -> $03FF+1 = $0400 -> 44
    emit(8'h8D); emit(8'h03); emit(8'h02); // STA $0203
    emit(8'hBD); emit(8'hFF); emit(8'h02); // LDA $02FF,X -> $0300 = 11
    emit(8'h0A);                          // ASL A  -> 22
    emit(8'h8D); emit(8'h04); emit(8'h02); // STA $0204
    emit(8'hE6); emit(8'h20);             // INC $20 -> F6
    emit(8'h46); emit(8'h20);             // LSR $20 -> 7B, C=0
    emit(8'hA5); emit(8'h20);             // LDA $20
    emit(8'h8D); emit(8'h05); emit(8'h02); // STA $0205
    emit(8'h20); emit(8'h00); emit(8'h92); // JSR $9200 -> Y=77
    emit(8'h8C); emit(8'h06); emit(8'h02); // STY $0206
    emit(8'hA2); emit(8'h05);             // LDX #5
    emit(8'hCA);                          // loop: DEX
    emit(8'hD0); emit(8'hFD);             //       BNE loop
    emit(8'h8E); emit(8'h07); emit(8'h02); // STX $0207  (0)
    emit(8'hA9); emit(8'h80);             // LDA #$80
    emit(8'h24); emit(8'h20);             // BIT $20 ($7B) -> Z=1,N=0,V=1
    emit(8'h08);                          // PHP
    emit(8'h68);                          // PLA
    emit(8'h8D); emit(8'h08); emit(8'h02); // STA $0208
    emit(8'hC9); emit(8'h80);             // CMP #$80 (A=$74 after PLA? A=P)
    emit(8'h00); emit(8'hEA);             // BRK (+pad) -> IRQ handler
    emit(8'h58);                          // CLI
    emit(8'hA9); emit(8'h07);             // LDA #7
    emit(8'h8D); emit(8'h14); emit(8'h40); // STA $4014 -> DMA from $0700
    emit(8'hEA);                          // NOP
    // combined read-modify-write opcodes, LAX and SAX
    emit(8'hA9); emit(k[0]);              // LDA #k0
    emit(8'h07); emit(8'h60);             // SLO $60
    emit(8'h8D); emit(8'h20); emit(8'h02); // STA $0220
    emit(8'hA9); emit(k[1]);              // LDA #k1
    emit(8'h27); emit(8'h61);             // RLA $61 (carry from SLO)
    emit(8'h8D); emit(8'h22); emit(8'h02); // STA $0222
    emit(8'hA9); emit(k[2]);              // LDA #k2
    emit(8'h4F); emit(8'h62); emit(8'h03); // SRE $0362
    emit(8'h8D); emit(8'h23); emit(8'h02); // STA $0223
    emit(8'h18);                          // CLC
    emit(8'hA9); emit(k[3]);              // LDA #k3
    emit(8'h67); emit(8'h63);             // RRA $63
    emit(8'h8D); emit(8'h24); emit(8'h02); // STA $0224
    emit(8'hA9); emit(k[4]);              // LDA #k4
    emit(8'hC7); emit(8'h64);             // DCP $64
    emit(8'h08);                          // PHP
    emit(8'h68);                          // PLA
    emit(8'h29); emit(8'h03);             // AND #3  (Z, C)
    emit(8'h8D); emit(8'h25); emit(8'h02); // STA $0225
    emit(8'h38);                          // SEC
    emit(8'hA9); emit(k[5]);              // LDA #k5
    emit(8'hE7); emit(8'h65);             // ISC $65
    emit(8'h8D); emit(8'h26); emit(8'h02); // STA $0226
    emit(8'hAF); emit(8'h64); emit(8'h03); // LAX $0364
    emit(8'h8E); emit(8'h27); emit(8'h02); // STX $0227
    emit(8'h8D); emit(8'h28); emit(8'h02); // STA $0228
    emit(8'hA9); emit(8'hF0);             // LDA #$F0
    emit(8'hA2); emit(8'h3C);             // LDX #$3C
    emit(8'h87); emit(8'h66);             // SAX $66     -> $30
    emit(8'hA0); emit(8'h01);             // LDY #1
    emit(8'h97); emit(8'h66);             // SAX $66,Y   -> $67 = $30
    emit(8'hA0); emit(8'h02);             // LDY #2
    emit(8'hB7); emit(8'h64);             // LAX $64,Y   -> X = A = $30
    emit(8'h8E); emit(8'h29); emit(8'h02); // STX $0229
    emit(8'h6C); emit(8'h00); emit(8'h06); // JMP ($0600) -> $1234
    // $1234: final loop
    pc = 16'h1234;
    emit(8'h4C); emit(8'h34); emit(8'h12); // JMP $1234

    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nfetch == 16);
    // cycle counts of the first instructions
    time_instr("LDX # cycles", 2);
    time_instr("TXS cycles", 2);
    time_instr("LDA # cycles", 2);
    time_instr("CLC cycles", 2);
    time_instr("ADC # cycles", 2);
    time_instr("STA abs cycles", 4);
    time_instr("SEC cycles", 2);
    time_instr("SBC # cycles", 2);
    time_instr("STA zp cycles", 3);
    time_instr("PHP cycles", 3);
    // pulse an IRQ while I is set (ignored), then NMI later
    irq = 1;
    repeat (40) @(posedge clk);
    irq = 0;
    wait (dut.pc_q == 16'h8040);
    nmi = 1;
    repeat (4) @(posedge clk);
    nmi = 0;
    wait (dut.pc_q == 16'h1234 && sync);
    repeat (10) @(posedge clk);
    chk("ADC result", mem[16'h0200], 8'h35);
    chk("SBC result", mem[16'h0020] == 8'h7B ? 8'hF5 : 8'h00, 8'hF5);
    chk("P after SBC", mem[16'h0201], 8'hB4);
    chk("(zp,X)", mem[16'h0202], 8'h11);
    chk("(zp),Y page cross", mem[16'h0203], 8'h44);
    chk("abs,X + ASL A", mem[16'h0204], 8'h22);
    chk("INC/LSR zp", mem[16'h0205], 8'h7B);
    chk("JSR/RTS", mem[16'h0206], 8'h77);
    chk("DEX/BNE loop", mem[16'h0207], 8'h00);
    chk("BIT flags", mem[16'h0208], 8'h76);
    chk("NMI taken once", mem[16'h0210], 8'h01);
    chk("BRK taken once", mem[16'h0211], 8'h01);
    chk("SP restored", dut.sp_q, 8'hFF);
    chk("DMA writes", dma_writes, 256);
    for (int i = 0; i < 256; i += 17) chk("DMA data", oam_seen[i], (i * 3 + 1) & 255);
    chk("JMP ind", dut.pc_q, 16'h1234);
    chk("SLO memory", mem[16'h0060], e_m[0]);
    chk("SLO A", mem[16'h0220], e_a[0]);
    chk("RLA memory", mem[16'h0061], e_m[1]);
    chk("RLA A", mem[16'h0222], e_a[1]);
    chk("SRE memory", mem[16'h0362], e_m[2]);
    chk("SRE A", mem[16'h0223], e_a[2]);
    chk("RRA memory", mem[16'h0063], e_m[3]);
    chk("RRA A", mem[16'h0224], e_a[3]);
    chk("DCP memory", mem[16'h0064], e_m[4]);
    chk("DCP flags Z,C", mem[16'h0225], e_dcp);
    chk("ISC memory", mem[16'h0065], e_m[5]);
    chk("ISC A", mem[16'h0226], e_a[5]);
    chk("LAX abs X", mem[16'h0227], r[6]);
    chk("LAX abs A", mem[16'h0228], r[6]);
    chk("SAX zp", mem[16'h0066], 8'h30);
    chk("SAX zp,Y", mem[16'h0067], 8'h30);
    chk("LAX zp,Y", mem[16'h0229], 8'h30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
