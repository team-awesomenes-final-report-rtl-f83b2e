// ppu_pixel_mux: chooses between the background and the sprite pixel.
//
// Inputs are the background pixel {attribute[1:0], pattern[1:0]}, the sprite
// pixel {priority, palette[1:0], pattern[1:0]} and whether that sprite is
// sprite 0. A pixel whose pattern bits are 00 is transparent. The sprite
// wins when it is opaque and either in front (priority 0) or over a
// transparent background; otherwise an opaque background wins; otherwise the
// shared background colour (palette address 0). $2001 bits 3/4 enable the
// background/sprites, bits 1/2 show them in the leftmost 8 pixels. An opaque
// sprite 0 over an opaque background raises `s0_hit`.
// Output is the 5-bit palette address. Purely combinational.
// A disabled background shows palette entry 0; the report mentions that
// $2001 bits 7-5 might select a default colour but was unsure, so they are
// not used here.
module ppu_pixel_mux (
  input  logic [3:0] bg,
  input  logic [4:0] spr,
  input  logic       spr_is0,
  input  logic [7:0] mask,
  input  logic [7:0] x,
  output logic [4:0] pal_addr,
  output logic       s0_hit
);
  logic bg_on, sp_on, bg_op, sp_op;

  assign bg_on = mask[3] && (x >= 8'd8 || mask[1]);
  assign sp_on = mask[4] && (x >= 8'd8 || mask[2]);
  assign bg_op = bg_on && bg[1:0] != 2'b00;
  assign sp_op = sp_on && spr[1:0] != 2'b00;

  always_comb begin
    if (sp_op && (!spr[4] || !bg_op)) pal_addr = {1'b1, spr[3:0]};
    else if (bg_op)                   pal_addr = {1'b0, bg};
    else                              pal_addr = 5'd0;
  end
  assign s0_hit = spr_is0 && sp_op && bg_op;
endmodule
