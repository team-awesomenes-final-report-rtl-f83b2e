// framebuffer: two 256x240 frames of 6-bit NES colour codes.
//
// The PPU writes pixels (`wr`, `wx`, `wy`, `wcolor`) into the buffer selected
// by `wsel`; at `frame_done` (end of the last drawn scanline) it switches to
// the other buffer. The VGA side reads `rx`/`ry`; at `vga_frame_start` it
// picks the buffer the PPU is not writing, which holds the latest complete
// frame, and keeps it for its whole screen, so reading and writing never
// meet in one buffer and the picture never tears.
// Timing: writes at the clock edge; reads are synchronous (data one clock
// after the address).
//
// Two swapped buffers of 6-bit colour codes follow the original design; the
// 256-entry row stride (rows 240-255 unused) is this design's choice.
module framebuffer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] wx,
  input  logic [7:0] wy,
  input  logic [5:0] wcolor,
  input  logic       frame_done,
  input  logic       vga_frame_start,
  input  logic [7:0] rx,
  input  logic [7:0] ry,
  output logic [5:0] rcolor,
  output logic       wsel,
  output logic       rsel
);
  logic [5:0] mem [131072];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wsel <= 1'b0;
      rsel <= 1'b1;
    end else begin
      if (frame_done)      wsel <= !wsel;
      if (vga_frame_start) rsel <= frame_done ? wsel : !wsel;
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[{wsel, wy, wx}] <= wcolor;
    rcolor <= mem[{rsel, ry, rx}];
  end
endmodule
