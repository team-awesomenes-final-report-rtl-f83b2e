// ppu_sprite_buffer: one of the eight sprite buffers of the sprite processor.
//
// Two 8-bit shift registers hold the low and high pattern bits of the
// sprite's row (already mirrored for horizontal flip), an 8-bit X counter
// holds its screen position, and the priority and palette bits ride along.
// During the drawn part of a scanline (`active`) the X counter decrements
// every pixel until it reaches zero; from then on the shift registers shift
// one pixel per cycle, MSB first, giving `pix` = {high, low} (00 =
// transparent). `load_lo`/`load_hi` load the pattern bytes, `load_x` loads X
// and the attribute bits. All loads and shifts are on `ce` cycles.
//
// The down-counting X register that starts the shifters at zero follows the
// original design; applying horizontal flip at load time is this design's.
module ppu_sprite_buffer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       active,
  input  logic       load_lo,
  input  logic       load_hi,
  input  logic       load_x,
  input  logic [7:0] data,
  input  logic [2:0] attr,      // {priority, palette[1:0]}
  output logic [1:0] pix,
  output logic [2:0] attr_out
);
  logic [7:0] lo_q, hi_q, x_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lo_q <= '0; hi_q <= '0; x_q <= 8'hFF; attr_out <= '0;
    end else if (ce) begin
      if (load_lo) lo_q <= data;
      if (load_hi) hi_q <= data;
      if (load_x) begin
        x_q      <= data;
        attr_out <= attr;
      end
      if (active && !load_lo && !load_hi && !load_x) begin
        if (x_q != 8'd0) x_q <= x_q - 8'd1;
        else begin
          lo_q <= {lo_q[6:0], 1'b0};
          hi_q <= {hi_q[6:0], 1'b0};
        end
      end
    end
  end

  assign pix = (x_q == 8'd0) ? {hi_q[7], lo_q[7]} : 2'b00;
endmodule
