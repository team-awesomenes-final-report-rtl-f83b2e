// ppu_scan_fsm: frame/scanline sequencer and VRAM arbiter of the PPU.
//
// A frame is 262 scanlines of 341 dots: scanlines 0-19 are the VINT period
// (VBLANK raised at the start of scanline 0, cleared at the start of 20),
// scanline 20 primes the pipeline without drawing, 21-260 draw rows 0-239,
// 261 rests. On odd frames with rendering enabled the priming scanline drops
// its last dot. Within a rendering scanline dots 0-255 draw (stage 1),
// 256-319 are HBLANK where the sprite renderer fetches (stage 2), 320-335
// prefetch two background tiles (stage 3) and 336-340 fetch two unused
// name-table bytes (stage 4).
// VRAM ownership: while rendering (scanlines 20-260 with $2001 bit 3 or 4
// set) the background renderer owns the bus except in stage 2, which belongs
// to the sprite renderer; otherwise the register file's $2007 requests are
// served in two dots (address, then data), `vack` marking the second.
// All counters advance on `ce` (one PPU dot); strobes are gated with `ce`.
//
// The line counts, the four stages and the skipped rest dot follow the
// original design; numbering the lines from the start of VBLANK is its own.
module ppu_scan_fsm
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        rendering_on,
  output logic [8:0]  dot,
  output logic [8:0]  line,
  output logic        prime_line,
  output logic        eval_line,
  output logic        draw_line,
  output logic        render_line,
  output logic        vblank_set,
  output logic        vblank_clr,
  output logic        frame_done,
  // VRAM sources
  input  logic [13:0] bg_addr,
  input  logic [13:0] spr_addr,
  input  logic        vreq,
  input  logic        vreq_we,
  input  logic [13:0] vreq_addr,
  input  logic [7:0]  vreq_wdata,
  output logic        vack,
  // VRAM bus
  output logic [13:0] vram_addr,
  output logic        vram_en,
  output logic        vram_we,
  output logic [7:0]  vram_wdata
);
  logic odd_q, phase_q;
  logic last_dot;

  assign prime_line  = (line == 9'(PPU_PRIME));
  assign eval_line   = rendering_on && line >= 9'(PPU_PRIME) && line < 9'(PPU_LAST_VIS);
  assign draw_line   = line >= 9'(PPU_FIRST_VIS) && line <= 9'(PPU_LAST_VIS);
  assign render_line = rendering_on && line >= 9'(PPU_PRIME) && line <= 9'(PPU_LAST_VIS);
  assign last_dot    = (dot == 9'(PPU_DOTS - 1)) ||
                       (dot == 9'(PPU_DOTS - 2) && prime_line && odd_q && rendering_on);
  assign vblank_set  = ce && line == 9'd0 && dot == 9'd0;
  assign vblank_clr  = ce && prime_line && dot == 9'd0;
  assign frame_done  = ce && line == 9'(PPU_LAST_VIS) && last_dot;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dot <= '0; line <= '0; odd_q <= 1'b0; phase_q <= 1'b0;
    end else if (ce) begin
      if (last_dot) begin
        dot <= '0;
        if (line == 9'(PPU_LINES - 1)) begin
          line  <= '0;
          odd_q <= !odd_q;
        end else begin
          line <= line + 9'd1;
        end
      end else begin
        dot <= dot + 9'd1;
      end
      if (!render_line && vreq) phase_q <= !phase_q;
      else                      phase_q <= 1'b0;
    end
  end

  always_comb begin
    vram_we    = 1'b0;
    vram_wdata = vreq_wdata;
    vack       = 1'b0;
    vram_en    = ce;
    if (render_line) begin
      vram_addr = (dot >= 9'd256 && dot < 9'd320) ? spr_addr : bg_addr;
    end else begin
      vram_addr = vreq_addr;
      vram_we   = ce && vreq && vreq_we && !phase_q;
      vack      = ce && vreq && phase_q;
    end
  end
endmodule
