// ppu_sprite_temp: sprite temporary memory, 8 entries of 24 bits.
//
// Fed by the range evaluator during the scanline, it keeps the first eight
// sprites found in range for the next scanline. Each entry holds the tile
// index (8), X (8), attribute bits 6, 5, 1, 0 (4: flip-H, priority,
// palette) and the 4-bit row within the sprite; vertical flip is applied to
// the row as the attribute byte arrives, so it is not stored. A ninth sprite
// in range sets `more_than_8`. `obj0` records that sprite 0 is entry 0.
// `clear` (start of evaluation) empties it. `sel` reads an entry
// combinationally for the pattern fetches.
//
// The 24-bit entry (tile, X, attribute bits 6, 5, 1, 0 and the 4-bit row)
// follows the original design; the per-field storage is this design's.
module ppu_sprite_temp (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        clear,
  input  logic        valid,       // a sprite-RAM byte is on the bus
  input  logic [1:0]  byte_sel,
  input  logic        sprite0,     // the byte belongs to sprite 0
  input  logic        in_range,
  input  logic [3:0]  range,
  input  logic        spr16,
  input  logic [7:0]  oam_data,
  input  logic [2:0]  sel,
  output logic [23:0] entry,       // {tile, x, attr4, range}
  output logic [3:0]  count,
  output logic        empty,
  output logic        obj0,
  output logic        more_than_8
);
  logic [7:0]  tile_m  [8];
  logic [7:0]  x_m     [8];
  logic [3:0]  attr_m  [8];
  logic [3:0]  range_m [8];
  logic        take_q;
  logic [2:0]  slot;

  assign slot = count[2:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0; take_q <= 1'b0; obj0 <= 1'b0; more_than_8 <= 1'b0;
    end else if (ce) begin
      if (clear) begin
        count <= '0; take_q <= 1'b0; obj0 <= 1'b0; more_than_8 <= 1'b0;
      end
      if (valid) begin
        unique case (byte_sel)
          2'd0: begin
            take_q <= 1'b0;
            if (in_range) begin
              if (count < 4'd8 || clear) begin
                take_q <= 1'b1;
                range_m[clear ? 3'd0 : slot] <= range;
                if (sprite0) obj0 <= 1'b1;
              end else begin
                more_than_8 <= 1'b1;
              end
            end
          end
          2'd1: if (take_q) tile_m[slot] <= oam_data;
          2'd2: if (take_q) begin
            attr_m[slot] <= {oam_data[6], oam_data[5], oam_data[1:0]};
            if (oam_data[7])
              range_m[slot] <= range_m[slot] ^ (spr16 ? 4'hF : 4'h7);
          end
          default: if (take_q) begin
            x_m[slot] <= oam_data;
            count  <= count + 4'd1;
            take_q <= 1'b0;
          end
        endcase
      end
    end
  end

  assign entry = {tile_m[sel], x_m[sel], attr_m[sel], range_m[sel]};
  assign empty = (count == 4'd0);
endmodule
