// ppu_bg_renderer_tb: drives the renderer with a 341-dot x 262-line timing
// and a synchronous VRAM model filled with random name, attribute and
// pattern tables, then compares every background pixel of the 240 drawn
// lines against a reference computed directly from the scroll position
// (including wrapping into the neighbouring name tables). Four frames with
// different scroll values, name table bases and pattern table selects.
module ppu_bg_renderer_tb;
  logic clk = 0, rst_n = 0, ce = 1, render_line = 0, prime_line = 0, bg_pt = 0;
  logic [8:0] dot = 0;
  logic [15:0] scroll = 0;
  logic [1:0] nt_base = 0;
  logic [13:0] vram_addr;
  logic [7:0] vram_data = 0;
  logic [3:0] pixel;
  logic [7:0] mem [16384];
  int checks = 0, failures = 0;
  ppu_bg_renderer dut (.clk, .rst_n, .ce, .dot, .render_line, .prime_line, .scroll, .nt_base,
                       .bg_pt, .vram_addr, .vram_data, .pixel);
  always #5 clk = !clk;
  always @(posedge clk) vram_data <= mem[vram_addr];
  function automatic int ref_pixel(input int x, input int y);
    int sx, sy, xw, yw, nt, tx, ty, px, py, tile, at, base, lo, hi;
    sx = scroll[7:0]; sy = scroll[15:11] * 8 + scroll[10:8];
    xw = (nt_base[0] * 256 + sx + x) % 512;
    yw = (nt_base[1] * 240 + sy + y) % 480;
    nt = (yw / 240) * 2 + xw / 256;
    tx = (xw % 256) / 8; px = xw % 8;
    ty = (yw % 240) / 8; py = yw % 8;
    base = 16'h2000 + nt * 16'h400;
    tile = mem[base + ty * 32 + tx];
    at = (mem[base + 16'h3C0 + (ty / 4) * 8 + tx / 4] >> ((ty & 2) * 2 + (tx & 2))) & 3;
    lo = (mem[bg_pt * 16'h1000 + tile * 16 + py] >> (7 - px)) & 1;
    hi = (mem[bg_pt * 16'h1000 + tile * 16 + 8 + py] >> (7 - px)) & 1;
    return at * 4 + hi * 2 + lo;
  endfunction
  initial begin #60000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 16384; i++) mem[i] = 8'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      scroll = {5'($urandom_range(0, 29)), 3'($urandom), 8'($urandom)};
      if (f == 0) scroll = 0;
      nt_base = 2'(f); bg_pt = f[0];
      for (int l = 0; l < 262; l++)
        for (int d = 0; d < 341; d++) begin
          dot = 9'(d);
          prime_line = (l == 20);
          render_line = (l >= 20 && l <= 260);
          #1;
          if (l >= 21 && l <= 260 && d < 256) begin
            int e; e = ref_pixel(d, l - 21);
            checks++;
            if (pixel != 4'(e)) begin
              failures++;
              if (failures < 10) $display("FAIL frame %0d line %0d x %0d got %h exp %h", f, l, d, pixel, e);
            end
          end
          @(negedge clk);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
