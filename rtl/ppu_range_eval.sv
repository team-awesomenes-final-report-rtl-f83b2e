// ppu_range_eval: sprite range evaluator of the sprite renderer.
//
// While a scanline is drawn (256 PPU cycles) it walks the sprite RAM, one
// byte per cycle (`oam_addr`, 64 sprites x 4 bytes), starting when
// `eval_start` is pulsed. For the Y byte (byte 0) it computes the row of the
// sprite that falls on the next scanline: range = row - (Y + 1), since sprite
// RAM stores the top edge minus one. `in_range` is high when that row lies
// inside the sprite (8 or 16 lines tall, `spr16`). `byte_sel` tells the
// sprite temporary memory which byte is on the bus.
// Timing: `oam_addr` comes from a counter (0 in the `eval_start` cycle); `in_range`/`range` are combinational on
// the sprite RAM data of the same cycle.
//
// The range evaluation during the drawn dots follows the original design;
// reading one byte per dot (four dots per sprite) is this design's choice.
module ppu_range_eval (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       eval_start,
  input  logic       eval_en,
  input  logic [7:0] row,
  input  logic       spr16,
  input  logic [7:0] oam_data,
  output logic [7:0] oam_addr,
  output logic [1:0] byte_sel,
  output logic       in_range,
  output logic [3:0] range
);
  logic [8:0] diff;
  logic [7:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n)                  cnt_q <= '0;
    else if (ce && eval_start)   cnt_q <= 8'd1;
    else if (ce && eval_en)      cnt_q <= cnt_q + 8'd1;
  end

  assign oam_addr = eval_start ? 8'd0 : cnt_q;
  assign byte_sel = oam_addr[1:0];
  assign diff     = {1'b0, row} - {1'b0, oam_data} - 9'd1;
  assign in_range = !diff[8] && (diff[7:0] < (spr16 ? 8'd16 : 8'd8));
  assign range    = diff[3:0];
endmodule
