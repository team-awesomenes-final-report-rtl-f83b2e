// nes_top_tb: the whole console running a small game-like program from a
// cartridge model, at the real clock ratios and sizes.
//
// The cartridge model holds a 32 KB PRG ROM (program, palette table, sprite
// table and vectors) and an 8 KB CHR ROM generated by a formula (tile $FF is
// fully opaque). Two pad models (4021-style shift registers) hold random
// buttons. The program: clears zero page, waits for VBLANK, loads the palette and a name
// table through $2006/$2007, copies a sprite table to page 2, starts both
// square channels (sweep on channel 1, envelope and a short length on
// channel 2), sets the scroll, enables NMI and rendering, then loops reading
// pad 1 through $4016 into RAM $00, counting sprite-0 hits seen in $2002
// ($01), copying $4015 to $02 and executing one BRK. Before rendering
// starts it runs one combined undocumented opcode (SLO $07: $81 -> $02,
// A = $01 | $02 = $03, kept in $08). The NMI handler starts
// the sprite DMA ($4014) and counts frames in $04; the IRQ/BRK handler tells
// BRK from the cartridge IRQ by the pushed B flag ($05 / $03).
//
// Every mechanism of the design is counted while four frames run, and one
// that never happens is a failure. Results are also checked: RAM values
// against the pad buttons and frame count, the framebuffer swap against the
// frame-done pulses, the VGA sync periods, and the pixels the PPU writes
// into the framebuffer against the VGA colour of the same pixel one frame
// later.
module nes_top_tb;
  logic clk = 0, rst_n = 0;
  logic [14:0] prg_addr;
  logic prg_cs;
  logic [7:0] prg_data, chr_data;
  logic [12:0] chr_addr;
  logic mirror_v = 1, cart_irq = 0;
  logic pad_latch, pad_clk, pad_data1, pad_data2;
  logic [4:0] audio;
  logic hsync, vsync;
  logic [7:0] red, green, blue;
  logic [7:0] prg [32768];
  logic [7:0] chr [8192];
  logic [7:0] btn1, btn2, sr1 = 0, sr2 = 0;
  logic pclk_q = 0;
  int checks = 0, failures = 0;

  nes_top dut (.clk, .rst_n, .prg_addr, .prg_cs, .prg_data, .chr_addr, .chr_data, .mirror_v,
               .cart_irq, .pad_latch, .pad_clk, .pad_data1, .pad_data2, .audio, .hsync,
               .vsync, .red, .green, .blue);
  always #5 clk = !clk;

  // cartridge: asynchronous ROMs
  assign prg_data = prg[prg_addr];
  assign chr_data = chr[chr_addr];

  // pads
  always @(posedge clk) begin
    pclk_q <= pad_clk;
    if (pad_latch) begin sr1 <= btn1; sr2 <= btn2; end
    else if (pad_clk && !pclk_q) begin sr1 <= {1'b0, sr1[7:1]}; sr2 <= {1'b0, sr2[7:1]}; end
  end
  assign pad_data1 = !sr1[0];
  assign pad_data2 = !sr2[0];

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask

  // ---------------------------------------------------------------- program
  // 6502 machine code of the program described above, loaded at $8000
  // (reset $8000, NMI handler $80CD, IRQ/BRK handler $80D7).
  localparam int PROG_LEN = 237;
  localparam logic [7:0] PROG [PROG_LEN] = '{
    8'h78, 8'hD8, 8'hA2, 8'hFF, 8'h9A, 8'hA9, 8'h00, 8'hAA, 8'h95, 8'h00, 8'hE8, 8'hD0,
    8'hFB, 8'h8D, 8'h00, 8'h20, 8'h8D, 8'h01, 8'h20, 8'h2C, 8'h02, 8'h20, 8'h10, 8'hFB,
    8'hA9, 8'h3F, 8'h8D, 8'h06, 8'h20, 8'hA9, 8'h00, 8'h8D, 8'h06, 8'h20, 8'hA2, 8'h00,
    8'hBD, 8'h00, 8'h90, 8'h8D, 8'h07, 8'h20, 8'hE8, 8'hE0, 8'h20, 8'hD0, 8'hF5, 8'hA9,
    8'h20, 8'h8D, 8'h06, 8'h20, 8'hA9, 8'h00, 8'h8D, 8'h06, 8'h20, 8'hA0, 8'h04, 8'hA2,
    8'h00, 8'h8A, 8'h8D, 8'h07, 8'h20, 8'hE8, 8'hD0, 8'hF9, 8'h88, 8'hD0, 8'hF6, 8'hBD,
    8'h00, 8'h91, 8'h9D, 8'h00, 8'h02, 8'hE8, 8'hD0, 8'hF7, 8'hA9, 8'h03, 8'h8D, 8'h15,
    8'h40, 8'hA9, 8'hBF, 8'h8D, 8'h00, 8'h40, 8'hA9, 8'h82, 8'h8D, 8'h01, 8'h40, 8'hA9,
    8'h80, 8'h8D, 8'h02, 8'h40, 8'hA9, 8'h01, 8'h8D, 8'h03, 8'h40, 8'hA9, 8'h43, 8'h8D,
    8'h04, 8'h40, 8'hA9, 8'h00, 8'h8D, 8'h05, 8'h40, 8'hA9, 8'h40, 8'h8D, 8'h06, 8'h40,
    8'hA9, 8'h18, 8'h8D, 8'h07, 8'h40, 8'hAD, 8'h02, 8'h20, 8'hA9, 8'h05, 8'h8D, 8'h05,
    8'h20, 8'hA9, 8'h10, 8'h8D, 8'h05, 8'h20, 8'hA9, 8'h80, 8'h8D, 8'h00, 8'h20, 8'hA9,
    8'h1E, 8'h8D, 8'h01, 8'h20, 8'hA9, 8'h81, 8'h85, 8'h07, 8'hA9, 8'h01, 8'h07, 8'h07,
    8'h85, 8'h08, 8'h58, 8'hA9, 8'h01, 8'h8D, 8'h16, 8'h40, 8'hA9, 8'h00, 8'h8D, 8'h16,
    8'h40, 8'hA2, 8'h08, 8'hAD, 8'h16, 8'h40, 8'h4A, 8'h66, 8'h06, 8'hCA, 8'hD0, 8'hF7,
    8'hA5, 8'h06, 8'h85, 8'h00, 8'h2C, 8'h02, 8'h20, 8'h50, 8'h02, 8'hE6, 8'h01, 8'hAD,
    8'h15, 8'h40, 8'h85, 8'h02, 8'hA5, 8'h05, 8'hD0, 8'h02, 8'h00, 8'hEA, 8'h4C, 8'h9F,
    8'h80, 8'h48, 8'hA9, 8'h02, 8'h8D, 8'h14, 8'h40, 8'hE6, 8'h04, 8'h68, 8'h40, 8'h48,
    8'h8A, 8'h48, 8'hBA, 8'hBD, 8'h03, 8'h01, 8'h29, 8'h10, 8'hF0, 8'h05, 8'hE6, 8'h05,
    8'h4C, 8'hE9, 8'h80, 8'hE6, 8'h03, 8'h68, 8'hAA, 8'h68, 8'h40};

  initial begin
    for (int i = 0; i < 32768; i++) prg[i] = 8'hEA;
    for (int i = 0; i < PROG_LEN; i++) prg[i] = PROG[i];
    // palette table at $9000: 32 colour codes
    for (int i = 0; i < 32; i++) prg[16'h1000 + i] = 8'((i * 5 + 1) % 64);
    // sprite table at $9100: sprite 0 opaque at (60, 41), a cluster of
    // twelve sprites on rows 101-108, the rest spread over the screen
    for (int s = 0; s < 64; s++) begin
      prg[16'h1100 + s * 4]     = 8'((s * 37) % 230);
      prg[16'h1100 + s * 4 + 1] = 8'(s * 3);
      prg[16'h1100 + s * 4 + 2] = 8'(s % 4 | ((s % 3) << 6) | ((s % 5 == 0) << 5));
      prg[16'h1100 + s * 4 + 3] = 8'((s * 53) % 250);
    end
    for (int s = 1; s <= 12; s++) prg[16'h1100 + s * 4] = 8'd100;
    prg[16'h1100] = 8'd40; prg[16'h1101] = 8'hFF; prg[16'h1102] = 8'h00; prg[16'h1103] = 8'd60;
    // vectors
    prg[16'h7FFA] = 8'hCD; prg[16'h7FFB] = 8'h80;   // NMI
    prg[16'h7FFC] = 8'h00; prg[16'h7FFD] = 8'h80;   // reset
    prg[16'h7FFE] = 8'hD7; prg[16'h7FFF] = 8'h80;   // IRQ/BRK
    // pattern tables: a formula; tile $FF is solid colour 3
    for (int i = 0; i < 8192; i++) chr[i] = 8'((i * 73) ^ (i >> 4) ^ (i >> 9));
    for (int i = 0; i < 16; i++) chr[16'h0FF0 + i] = 8'hFF;
    btn1 = 8'($urandom); btn2 = 8'($urandom);
  end

  // ------------------------------------------------------------- mechanisms
  int n_undoc = 0;
  int n_instr = 0, n_nmi = 0, n_irq = 0, n_dma = 0, n_vram_w = 0, n_pal_w = 0, n_oam_w = 0;
  int n_bg = 0, n_spr = 0, n_s0 = 0, n_ovf = 0, n_vblank = 0, n_odd = 0, n_poll = 0;
  int n_pad_rd = 0, n_sound = 0, n_env = 0, n_sweep = 0, n_len_end = 0, n_seq = 0;
  int n_fb_swap = 0, n_vsync = 0, n_hsync = 0, n_rgb = 0, n_frames = 0, n_scroll = 0;
  int n_apu_w = 0, n_ram_w = 0;
  logic dma_q = 0, vs_q = 1, hs_q = 1, wsel_q = 0, st1_q = 0;
  logic [10:0] per_q = 0;
  logic [3:0] vol_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.cpu_ce && dut.cpu_sync) n_instr++;
    if (dut.cpu_ce && dut.u_cpu.cmb_now) n_undoc++;
    if (dut.cpu_ce && dut.cpu_rd && dut.cpu_addr == 16'hFFFA) n_nmi++;
    if (dut.cpu_ce && dut.cpu_rd && dut.cpu_addr == 16'hFFFE) begin
      if (cart_irq) n_irq++;
      cart_irq <= 1'b0;                            // the cartridge drops its request
    end
    dma_q <= dut.dma_active;
    if (dut.dma_active && !dma_q) n_dma++;
    if (dut.ppu_ce && dut.vram_we) n_vram_w++;
    if (dut.u_ppu.pal_we) n_pal_w++;
    if (dut.u_ppu.oam_we) n_oam_w++;
    if (dut.ram_we) n_ram_w++;
    if (dut.apu_we) n_apu_w++;
    if (dut.ppu_ce && dut.u_ppu.draw_line && dut.u_ppu.dot < 256) begin
      if (dut.u_ppu.bg_pix[1:0] != 0) n_bg++;
      if (dut.u_ppu.spr_pix[1:0] != 0) n_spr++;
    end
    if (dut.u_ppu.s0_set) n_s0++;
    if (dut.u_ppu.ovf_set) n_ovf++;
    if (dut.u_ppu.vblank_set) n_vblank++;
    if (dut.ppu_ce && dut.u_ppu.u_fsm.last_dot && dut.u_ppu.dot == 339) n_odd++;
    if (dut.ppu_ce && dut.u_ppu.u_fsm.prime_line && dut.u_ppu.dot == 300 &&
        dut.u_ppu.scroll != 0 && dut.u_ppu.render_line) n_scroll++;
    if (dut.cpu_ce && pad_latch && !dut.u_pads.tmr_q) n_poll++;
    if (dut.cpu_ce && dut.cpu_rd && dut.cpu_addr == 16'h4016) n_pad_rd++;
    if (audio != 0) n_sound++;
    if (dut.u_apu.qclk) n_seq++;
    vol_q <= dut.u_apu.u_sq2.vol;
    if (dut.u_apu.u_sq2.vol != vol_q && vol_q != 0) n_env++;
    per_q <= dut.u_apu.u_sq1.period;
    if (dut.u_apu.u_sq1.u_sweep.upd) n_sweep++;
    st1_q <= dut.u_apu.status[1];
    if (st1_q && !dut.u_apu.status[1]) n_len_end++;
    wsel_q <= dut.wsel;
    if (dut.wsel != wsel_q) n_fb_swap++;
    if (dut.frame_done) n_frames++;
    vs_q <= vsync; hs_q <= hsync;
    if (!vsync && vs_q) n_vsync++;
    if (!hsync && hs_q) n_hsync++;
    if ({red, green, blue} != 0) n_rgb++;
  end

  task automatic need(input string w, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", w); end
    else $display("  %-34s %0d", w, n);
  endtask

  // a framebuffer pixel and its VGA colour: sample at the VGA side
  int n_px_chk = 0;
  logic [23:0] ref_rgb;
  logic [5:0] ref_code = 0;
  vga_palette ref_lut (.code(ref_code), .rgb(ref_rgb));

  initial begin #200000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (4) @(negedge clk); rst_n = 1;
    // run until the third frame after rendering started, raise the IRQ once
    wait (n_frames == 1);
    cart_irq = 1;
    wait (n_frames == 4);
    // VGA reads what the PPU wrote: check a line of the picture shown now
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (dut.u_vga.img) begin
        ref_code = dut.u_fb.mem[{dut.rsel, dut.fb_y, dut.fb_x}];
        @(negedge clk); #1;
        checks++;
        if ({red, green, blue} != ref_rgb) begin failures++; $display("FAIL VGA colour"); end
        n_px_chk++;
      end
    end
    // let the NMI handler of the new frame (sprite DMA included) finish
    repeat (20000) @(negedge clk);
    $display("mechanisms:");
    need("instructions executed", n_instr);
    need("NMI taken", n_nmi);
    need("cartridge IRQ taken", n_irq);
    need("BRK taken", int'(dut.u_ram.mem[5]));
    need("combined undocumented opcode", n_undoc);
    need("sprite DMA", n_dma);
    need("work RAM writes", n_ram_w);
    need("VRAM writes via $2007", n_vram_w);
    need("palette writes", n_pal_w);
    need("sprite RAM writes", n_oam_w);
    need("background pixels", n_bg);
    need("sprite pixels", n_spr);
    need("sprite-0 hit", n_s0);
    need("sprite-0 hit seen by program", int'(dut.u_ram.mem[1]));
    need("more than 8 sprites", n_ovf);
    need("VBLANK", n_vblank);
    need("odd-frame short prime line", n_odd);
    need("scroll load", n_scroll);
    need("pad polls", n_poll);
    need("pad reads via $4016", n_pad_rd);
    need("pAPU register writes", n_apu_w);
    need("square wave output", n_sound);
    need("frame sequencer clocks", n_seq);
    need("envelope decay", n_env);
    need("sweep update", n_sweep);
    need("length counter expiry", n_len_end);
    need("framebuffer swaps", n_fb_swap);
    need("VGA frames", n_vsync);
    need("VGA lines", n_hsync);
    need("VGA colour output", n_rgb);
    need("VGA pixels compared", n_px_chk);
    // results
    chk("pad 1 buttons read by program", dut.u_ram.mem[0], btn1);
    chk("frames counted by NMI handler", dut.u_ram.mem[4], n_nmi);
    chk("IRQ counted once", dut.u_ram.mem[3], 1);
    chk("SLO memory result", dut.u_ram.mem[7], 8'h02);
    chk("SLO accumulator result", dut.u_ram.mem[8], 8'h03);
    chk("$4015: channel 1 on, channel 2 expired", dut.u_ram.mem[2], 1);
    chk("framebuffer swaps = frames", n_fb_swap, n_frames);
    chk("sprite DMA per NMI", n_dma, n_nmi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
