// nes_top: an NES built from the 2A03 CPU/pAPU, the 2C02 PPU and the board
// support logic, shown on VGA.
//
// One clock, the 26.666 MHz VGA pixel clock, drives everything; clock_gen
// makes the PPU (/5) and CPU (/15) clock enables, three PPU dots per CPU
// cycle. The CPU reaches work RAM, PPU registers, the pAPU, the pads and the
// cartridge PRG ROM through the memory mapper; its sprite DMA writes $2004.
// The PPU reads name tables from the on-board 2 KB VRAM ($2000-$3EFF) and
// patterns from the cartridge CHR ROM ($0000-$1FFF); its pixels go into the
// double framebuffer, which the VGA adapter scans out line- and
// pixel-doubled with black side bars. The pad controller polls both pads at
// 60 Hz.
// External parts: the cartridge (asynchronous PRG and CHR ROM ports, its
// name-table mirroring and IRQ line), the pads, the speaker DAC (the 5-bit
// `audio` sample is brought out) and the VGA connector.
//
// The partitioning into CPU, PPU, audio, mapper, pad interface, clocking and
// double-buffered VGA output follows the original design; running all of it
// on one clock with enables instead of derived clocks is this design's own.
module nes_top (
  input  logic        clk,
  input  logic        rst_n,
  // cartridge
  output logic [14:0] prg_addr,
  output logic        prg_cs,
  input  logic [7:0]  prg_data,
  output logic [12:0] chr_addr,
  input  logic [7:0]  chr_data,
  input  logic        mirror_v,
  input  logic        cart_irq,
  // pads
  output logic        pad_latch,
  output logic        pad_clk,
  input  logic        pad_data1,
  input  logic        pad_data2,
  // audio
  output logic [4:0]  audio,
  // VGA
  output logic        hsync,
  output logic        vsync,
  output logic [7:0]  red,
  output logic [7:0]  green,
  output logic [7:0]  blue
);
  logic        ppu_ce, cpu_ce;
  logic [15:0] cpu_addr;
  logic [7:0]  cpu_dout, cpu_din;
  logic        cpu_we, cpu_rd, cpu_sync, dma_active;
  logic [10:0] ram_addr;
  logic        ram_we;
  logic [7:0]  ram_wdata, ram_rdata;
  logic        ppu_cs, ppu_we;
  logic [2:0]  ppu_sel;
  logic [7:0]  ppu_wdata, ppu_rdata;
  logic        nmi;
  logic        apu_we;
  logic [4:0]  apu_addr;
  logic [7:0]  apu_wdata;
  logic [1:0]  apu_status;
  logic [7:0]  buttons1, buttons2;
  logic [13:0] vram_addr;
  logic        vram_en, vram_we;
  logic [7:0]  vram_wdata, vram_rdata, nt_rdata, chr_q;
  logic        chr_sel_q;
  logic        pix_valid, frame_done;
  logic [7:0]  pix_x, pix_y;
  logic [5:0]  pix_color;
  logic [7:0]  fb_x, fb_y;
  logic [5:0]  fb_color;
  logic        vga_frame_start, wsel, rsel;

  clock_gen u_clk (.clk, .rst_n, .ppu_ce, .cpu_ce);

  cpu6502 u_cpu (
    .clk, .rst_n, .ce(cpu_ce), .addr(cpu_addr), .dout(cpu_dout), .din(cpu_din),
    .we(cpu_we), .rd(cpu_rd), .nmi, .irq(cart_irq), .sync(cpu_sync),
    .dma_active);

  mem_mapper u_map (
    .clk, .rst_n, .ce(cpu_ce),
    .cpu_addr, .cpu_wdata(cpu_dout), .cpu_we, .cpu_rd, .cpu_rdata(cpu_din),
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata,
    .ppu_cs, .ppu_we, .ppu_sel, .ppu_wdata, .ppu_rdata,
    .apu_we, .apu_addr, .apu_wdata, .apu_status,
    .prg_addr, .prg_cs, .prg_rdata(prg_data),
    .buttons1, .buttons2);

  cpu_ram u_ram (.clk, .we(ram_we), .addr(ram_addr), .wdata(ram_wdata),
                 .rdata(ram_rdata));

  apu u_apu (.clk, .rst_n, .ce(cpu_ce), .we(apu_we), .waddr(apu_addr),
             .wdata(apu_wdata), .sample(audio), .status(apu_status));

  ctrl_if u_pads (.clk, .rst_n, .ce(cpu_ce), .pad_latch, .pad_clk,
                  .pad_data1, .pad_data2, .buttons1, .buttons2);

  ppu u_ppu (
    .clk, .rst_n, .ce(ppu_ce),
    .cs(ppu_cs), .we(ppu_we), .sel(ppu_sel), .din(ppu_wdata), .dout(ppu_rdata),
    .nmi,
    .vram_addr, .vram_en, .vram_we, .vram_wdata, .vram_rdata,
    .pix_valid, .pix_x, .pix_y, .pix_color, .frame_done);

  // PPU bus: pattern tables from the cartridge, name tables on the board.
  ppu_vram u_vram (.clk, .en(vram_en && vram_addr[13]), .we(vram_we),
                   .mirror_v, .addr(vram_addr), .wdata(vram_wdata),
                   .rdata(nt_rdata));

  assign chr_addr = vram_addr[12:0];
  always_ff @(posedge clk) begin
    if (vram_en) begin
      chr_sel_q <= !vram_addr[13];
      chr_q     <= chr_data;
    end
  end
  assign vram_rdata = chr_sel_q ? chr_q : nt_rdata;

  framebuffer u_fb (
    .clk, .rst_n, .wr(pix_valid), .wx(pix_x), .wy(pix_y), .wcolor(pix_color),
    .frame_done, .vga_frame_start, .rx(fb_x), .ry(fb_y), .rcolor(fb_color),
    .wsel, .rsel);

  vga_adapter u_vga (
    .clk, .rst_n, .fb_x, .fb_y, .fb_color, .frame_start(vga_frame_start),
    .hsync, .vsync, .red, .green, .blue);
endmodule
