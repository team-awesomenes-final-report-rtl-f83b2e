// ppu_sprite_renderer: evaluates, fetches and draws up to 8 sprites per line.
//
// Stage 1 of a rendering scanline (dots 0-255): the range evaluator walks the
// sprite RAM and the sprite temporary memory keeps the first eight sprites
// that cover the next scanline. Stage 2 (dots 256-319, the PPU's HBLANK): the
// renderer owns VRAM for 8 slots of 8 dots; in slot i it fetches the low
// (dots 4-5) and high (dots 6-7) pattern bytes of entry i and loads sprite
// buffer i, then its X and attributes. Empty slots get transparent patterns.
// Pattern address: 8x8 sprites {0, $2000.3, tile, high, row[2:0]}; 8x16
// sprites {0, tile[0], tile[7:1], row[3], high, row[2:0]}.
// On the following scanline the eight buffers shift out their pixels and a
// priority mux returns the first opaque one (lowest index = highest
// priority) as {priority, palette, pattern}, plus whether it is sprite 0.
// VRAM reads are synchronous: the data for the address of dot d arrives in
// dot d+1, so the bytes are taken in dots 5 and 7 of each slot.
//
// The range evaluator, 24-bit temporary memory, HBLANK pattern fetches and
// eight buffers follow the original design; the dot of each fetch within a
// sprite's 8-dot slot is this design's choice.
module ppu_sprite_renderer
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic [8:0]  dot,
  input  logic        eval_line,    // scanline that prepares the next drawn one
  input  logic        draw_line,    // scanline that is drawn
  input  logic [7:0]  next_row,     // screen row of the next scanline
  input  logic        spr16,        // $2000.5
  input  logic        spr_pt,       // $2000.3
  output logic [7:0]  oam_addr,
  input  logic [7:0]  oam_data,
  output logic [13:0] vram_addr,
  input  logic [7:0]  vram_data,
  output logic [4:0]  pixel,
  output logic        is_sprite0,
  output logic        overflow
);
  logic       eval_en, eval_start, in_range;
  logic [1:0] byte_sel;
  logic [3:0] range, count;
  logic [23:0] entry;
  logic       empty, obj0;
  logic [2:0] slot;
  logic [2:0] sub;
  logic       fetch;
  logic       spr0_line;

  assign eval_en    = eval_line && dot < 9'd256;
  assign eval_start = eval_line && dot == 9'd0;

  ppu_range_eval u_eval (
    .clk, .rst_n, .ce, .eval_start, .eval_en, .row(next_row), .spr16,
    .oam_data, .oam_addr, .byte_sel, .in_range, .range);

  ppu_sprite_temp u_temp (
    .clk, .rst_n, .ce, .clear(eval_start), .valid(eval_en), .byte_sel,
    .sprite0(oam_addr[7:2] == 6'd0), .in_range, .range, .spr16, .oam_data,
    .sel(slot), .entry, .count, .empty, .obj0, .more_than_8(overflow));

  // Stage 2 pattern fetch.
  assign fetch = eval_line && dot >= 9'd256 && dot < 9'd320;
  assign slot  = dot[5:3];
  assign sub   = dot[2:0];

  logic [7:0] tile;
  logic [3:0] row;
  logic [7:0] pat;
  logic       slot_used;
  assign tile      = entry[23:16];
  assign row       = entry[3:0];
  assign slot_used = !empty && ({1'b0, slot} < count);

  always_comb begin
    if (spr16) vram_addr = {1'b0, tile[0], tile[7:1], row[3], sub[1], row[2:0]};
    else       vram_addr = {1'b0, spr_pt, tile, sub[1], row[2:0]};
  end

  // Horizontal flip mirrors the pattern byte; unused slots are transparent.
  always_comb begin
    pat = 8'h00;
    if (slot_used) pat = entry[7] ? rev8(vram_data) : vram_data;
    if (sub == 3'd0) pat = slot_used ? entry[15:8] : 8'hFF;   // X position
  end

  always_ff @(posedge clk) begin
    if (!rst_n) spr0_line <= 1'b0;
    else if (ce && fetch && dot == 9'd256) spr0_line <= obj0;
  end

  logic [1:0] bpix [8];
  logic [2:0] battr [8];

  for (genvar i = 0; i < 8; i++) begin : g_buf
    logic sel_i;
    assign sel_i = fetch && slot == 3'(i);
    ppu_sprite_buffer u_buf (
      .clk, .rst_n, .ce,
      .active (draw_line && dot < 9'd256),
      .load_x (sel_i && sub == 3'd0),
      .load_lo(sel_i && sub == 3'd5),
      .load_hi(sel_i && sub == 3'd7),
      .data   (pat),
      .attr   ({entry[6], entry[5:4]}),
      .pix    (bpix[i]),
      .attr_out(battr[i]));
  end

  // Priority mux: first non-transparent buffer wins.
  always_comb begin
    pixel      = 5'd0;
    is_sprite0 = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      if (bpix[i] != 2'b00) begin
        pixel      = {battr[i], bpix[i]};
        is_sprite0 = (i == 0) && spr0_line;
      end
    end
  end
endmodule
