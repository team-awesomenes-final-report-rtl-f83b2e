// ppu_bg_renderer: background fetch and shift pipeline of the PPU.
//
// Scroll counters: name-table select (2 bits), coarse vertical (5), fine
// vertical (3), coarse horizontal (5); fine horizontal (3) selects the tap.
// The $2005 scroll word is {coarse Y[15:11], fine Y[10:8], coarse X[7:3],
// fine X[2:0]}; the base name table comes from $2000[1:0].
// Each tile takes four VRAM reads in 8 dots: name table (dots 0-1), attribute
// table (2-3), pattern low (4-5), pattern high (6-7). Tiles are fetched during
// dots 0-255 (two tiles ahead) and 320-335 (first two tiles of the next
// line); dots 336-339 fetch two unused name-table bytes.
//   name table  {10, nt, coarseY, coarseX}
//   attribute   {10, nt, 1111, coarseY[4:2], coarseX[4:2]}
//   pattern     {0, $2000.4, tile, high, fineY}
// Coarse X increments after each tile and wraps at 32 toggling the low
// name-table bit; fine Y increments at dot 256 (HBLANK) and carries into
// coarse Y, which wraps at 30 toggling the high name-table bit. Horizontal
// counters reload from the scroll registers at dot 257 of every rendering
// line, vertical ones at dot 300 of the priming line.
// Pattern bits go into 16-bit shift registers (upper byte loaded every 8
// dots, one shift per dot); the tile's 2 attribute bits feed two 8-bit shift
// registers serially. The output pixel {attr[1:0], pattern[1:0]} is the tap
// at the fine horizontal offset.
// VRAM reads are synchronous: the byte for the address of dot d is valid in
// dot d+1.
//
// The fetch schedule, the 16-bit shift registers loaded in their upper byte
// and the scroll-word layout follow the original design; the reload dots
// 257 and 300 are taken from the NES.
module ppu_bg_renderer
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic [8:0]  dot,
  input  logic        render_line,  // priming or drawn scanline, rendering on
  input  logic        prime_line,
  input  logic [15:0] scroll,
  input  logic [1:0]  nt_base,
  input  logic        bg_pt,        // $2000.4
  output logic [13:0] vram_addr,
  input  logic [7:0]  vram_data,
  output logic [3:0]  pixel
);
  logic [4:0]  cx, cy;
  logic [2:0]  fy;
  logic [1:0]  nt;
  logic [7:0]  tile_q, pt0_q;
  logic [1:0]  at_q, at_hi;
  logic [15:0] sh0, sh1;
  logic [7:0]  ats0, ats1;
  logic        in_fetch, in_shift;
  logic [2:0]  sub;
  logic [2:0]  fx;

  assign sub      = dot[2:0];
  assign fx       = scroll[2:0];
  assign in_fetch = render_line && (dot < 9'd256 || (dot >= 9'd320 && dot < 9'd336));
  assign in_shift = in_fetch;

  always_comb begin
    unique case (sub[2:1])
      2'd0: vram_addr = {2'b10, nt, cy, cx};
      2'd1: vram_addr = {2'b10, nt, 4'b1111, cy[4:2], cx[4:2]};
      2'd2: vram_addr = {1'b0, bg_pt, tile_q, 1'b0, fy};
      default: vram_addr = {1'b0, bg_pt, tile_q, 1'b1, fy};
    endcase
    if (dot >= 9'd336) vram_addr = {2'b10, nt, cy, cx};
  end

  logic [7:0] at_byte;
  logic [2:0] at_shift;
  assign at_shift = {cy[1], cx[1], 1'b0};
  assign at_byte  = vram_data >> at_shift;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cx <= '0; cy <= '0; fy <= '0; nt <= '0;
      tile_q <= '0; pt0_q <= '0; at_q <= '0; at_hi <= '0;
      sh0 <= '0; sh1 <= '0; ats0 <= '0; ats1 <= '0;
    end else if (ce) begin
      if (in_fetch) begin
        unique case (sub)
          3'd1: tile_q <= vram_data;
          3'd3: at_q   <= at_byte[1:0];
          3'd5: pt0_q  <= vram_data;
          default: ;
        endcase
      end
      if (in_shift) begin
        sh0  <= {1'b0, sh0[15:1]};
        sh1  <= {1'b0, sh1[15:1]};
        ats0 <= {at_hi[0], ats0[7:1]};
        ats1 <= {at_hi[1], ats1[7:1]};
        if (sub == 3'd7) begin
          sh0[15:8] <= rev8(pt0_q);
          sh1[15:8] <= rev8(vram_data);
          at_hi     <= at_q;
          // coarse horizontal step after the tile is complete
          if (cx == 5'd31) begin cx <= '0; nt[0] <= !nt[0]; end
          else cx <= cx + 5'd1;
        end
      end
      if (render_line && dot == 9'd256) begin
        if (fy == 3'd7) begin
          fy <= '0;
          if (cy == 5'd29)      begin cy <= '0; nt[1] <= !nt[1]; end
          else if (cy == 5'd31) cy <= '0;
          else                  cy <= cy + 5'd1;
        end else begin
          fy <= fy + 3'd1;
        end
      end
      if (render_line && dot == 9'd257) begin
        cx    <= scroll[7:3];
        nt[0] <= nt_base[0];
      end
      if (prime_line && dot == 9'd300) begin
        cy    <= scroll[15:11];
        fy    <= scroll[10:8];
        nt[1] <= nt_base[1];
      end
    end
  end

  assign pixel = {ats1[fx], ats0[fx], sh1[{1'b0, fx}], sh0[{1'b0, fx}]};
endmodule
