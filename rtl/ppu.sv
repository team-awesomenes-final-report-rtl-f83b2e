// ppu: the 2C02 picture processing unit.
//
// Register file, sprite RAM (256 B), palette RAM (32 entries), the
// memory/scanline FSM, the background renderer, the sprite renderer and the
// pixel multiplexer, wired as in the PPU block diagram. Each PPU dot (`ce`)
// of a drawn scanline yields one pixel: the multiplexer's 5-bit palette
// address selects a 6-bit NES colour, output with its screen position.
// $2001 bit 0 (mono) keeps only the colour's luminance bits.
// CPU port: `cs` one-cycle strobe per access, `sel` = address bits 2:0,
// combinational `dout`. VRAM port: 14-bit address, synchronous read data
// expected one clock after an enabled address. `nmi` is high while VBLANK
// and $2000 bit 7 are both set.
//
// The split into register file, sprite RAM, palette RAM, scanline FSM,
// background and sprite renderers and pixel mux follows the original design;
// the mono-mode mask and the VRAM request handshake are this design's own.
module ppu (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  // CPU register port
  input  logic        cs,
  input  logic        we,
  input  logic [2:0]  sel,
  input  logic [7:0]  din,
  output logic [7:0]  dout,
  output logic        nmi,
  // VRAM
  output logic [13:0] vram_addr,
  output logic        vram_en,
  output logic        vram_we,
  output logic [7:0]  vram_wdata,
  input  logic [7:0]  vram_rdata,
  // video out
  output logic        pix_valid,
  output logic [7:0]  pix_x,
  output logic [7:0]  pix_y,
  output logic [5:0]  pix_color,
  output logic        frame_done
);
  logic [7:0]  ctrl, mask;
  logic [15:0] scroll;
  logic        vblank_set, vblank_clr, s0_set, ovf_set;
  logic [7:0]  rf_oam_addr, oam_addr, oam_wdata, oam_rdata, spr_oam_addr;
  logic        oam_we;
  logic [4:0]  pal_waddr, pal_pix;
  logic        pal_we;
  logic [5:0]  pal_wdata, pal_rdata, pal_color;
  logic        vreq, vreq_we, vack;
  logic [13:0] vreq_addr, bg_addr, spr_addr;
  logic [7:0]  vreq_wdata;
  logic [8:0]  dot, line;
  logic        prime_line, eval_line, draw_line, render_line;
  logic [3:0]  bg_pix;
  logic [4:0]  spr_pix;
  logic        spr_is0, s0_hit, overflow;

  ppu_regfile u_regs (
    .clk, .rst_n, .cs, .we, .sel, .din, .dout, .ctrl, .mask, .scroll, .nmi,
    .vblank_set, .vblank_clr, .s0_set, .ovf_set,
    .oam_addr(rf_oam_addr), .oam_we, .oam_wdata, .oam_rdata,
    .pal_addr(pal_waddr), .pal_we, .pal_wdata, .pal_rdata,
    .vreq, .vreq_we, .vreq_addr, .vreq_wdata, .vack, .vrdata(vram_rdata));

  assign oam_addr = (eval_line && dot < 9'd256) ? spr_oam_addr : rf_oam_addr;

  ppu_sprite_ram u_oam (.clk, .we(oam_we), .addr(oam_addr), .wdata(oam_wdata),
                        .rdata(oam_rdata));

  ppu_palette_ram u_pal (.clk, .we(pal_we), .waddr(pal_waddr), .wdata(pal_wdata),
                         .raddr_cpu(pal_waddr), .rdata_cpu(pal_rdata),
                         .raddr_pix(pal_pix), .rdata_pix(pal_color));

  ppu_scan_fsm u_fsm (
    .clk, .rst_n, .ce, .rendering_on(mask[3] || mask[4]),
    .dot, .line, .prime_line, .eval_line, .draw_line, .render_line,
    .vblank_set, .vblank_clr, .frame_done,
    .bg_addr, .spr_addr, .vreq, .vreq_we, .vreq_addr, .vreq_wdata, .vack,
    .vram_addr, .vram_en, .vram_we, .vram_wdata);

  ppu_bg_renderer u_bg (
    .clk, .rst_n, .ce, .dot, .render_line, .prime_line, .scroll,
    .nt_base(ctrl[1:0]), .bg_pt(ctrl[4]), .vram_addr(bg_addr),
    .vram_data(vram_rdata), .pixel(bg_pix));

  ppu_sprite_renderer u_spr (
    .clk, .rst_n, .ce, .dot, .eval_line, .draw_line,
    .next_row(8'(line - 9'd20)), .spr16(ctrl[5]), .spr_pt(ctrl[3]),
    .oam_addr(spr_oam_addr), .oam_data(oam_rdata),
    .vram_addr(spr_addr), .vram_data(vram_rdata),
    .pixel(spr_pix), .is_sprite0(spr_is0), .overflow);

  ppu_pixel_mux u_mux (
    .bg(bg_pix), .spr(spr_pix), .spr_is0, .mask, .x(dot[7:0]),
    .pal_addr(pal_pix), .s0_hit);

  assign s0_set    = ce && draw_line && dot < 9'd256 && s0_hit;
  assign ovf_set   = ce && overflow;
  assign pix_valid = ce && draw_line && dot < 9'd256;
  assign pix_x     = dot[7:0];
  assign pix_y     = 8'(line - 9'd21);
  assign pix_color = mask[0] ? {pal_color[5:4], 4'h0} : pal_color;
endmodule
