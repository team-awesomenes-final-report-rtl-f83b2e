// ppu_sprite_renderer_tb: drives the sprite path (range evaluation, temporary
// memory, pattern fetch, eight sprite buffers and the priority mux) with a
// 341-dot line timing, a combinational sprite-RAM model and a synchronous
// VRAM model. Every sprite pixel of the drawn lines is compared with a
// reference that picks, among the first eight in-range sprites of the row,
// the lowest-numbered non-transparent one. Covers 8x8 and 8x16 sprites,
// both flips, both pattern tables, the sprite-0 marker and the
// more-than-8 flag (a cluster of sprites is placed on purpose).
module ppu_sprite_renderer_tb;
  logic clk = 0, rst_n = 0, ce = 1, eval_line = 0, draw_line = 0, spr16 = 0, spr_pt = 0;
  logic [8:0] dot = 0;
  logic [7:0] next_row = 0, oam_addr, oam_data, vram_data = 0;
  logic [13:0] vram_addr;
  logic [4:0] pixel;
  logic is_sprite0, overflow;
  logic [7:0] oam [256];
  logic [7:0] mem [16384];
  int checks = 0, failures = 0, n_ovf = 0, n_s0 = 0, n_pix = 0;
  ppu_sprite_renderer dut (.clk, .rst_n, .ce, .dot, .eval_line, .draw_line, .next_row, .spr16,
                           .spr_pt, .oam_addr, .oam_data, .vram_addr, .vram_data, .pixel,
                           .is_sprite0, .overflow);
  always #5 clk = !clk;
  assign oam_data = oam[oam_addr];
  always @(posedge clk) vram_data <= mem[vram_addr];
  // reference sprite pixel for screen (x, y): {prio, pal, pix}, sprite-0 flag
  task automatic ref_pixel(input int x, input int y, output int p, output int s0, output int n_in);
    int h, d, c, tile, r, a, lo, hi, at;
    h = spr16 ? 16 : 8;
    p = 0; s0 = 0; n_in = 0;
    for (int s = 0; s < 64; s++) begin
      d = y - int'(oam[s * 4]) - 1;
      if (d < 0 || d >= h) continue;
      n_in++;
      if (n_in > 8) continue;
      c = x - int'(oam[s * 4 + 3]);
      if (c < 0 || c > 7 || p != 0) continue;
      at = oam[s * 4 + 2];
      tile = oam[s * 4 + 1];
      r = at[7] ? h - 1 - d : d;
      if (spr16) a = (tile & 1) * 16'h1000 + (tile & 8'hFE) * 16 + (r >= 8 ? 16 : 0) + r % 8;
      else       a = spr_pt * 16'h1000 + tile * 16 + r;
      if (at[6]) c = 7 - c;
      lo = (mem[a] >> (7 - c)) & 1;
      hi = (mem[a + 8] >> (7 - c)) & 1;
      if (hi * 2 + lo != 0) begin
        p = ((at >> 5) & 1) * 16 + (at & 3) * 4 + hi * 2 + lo;
        s0 = (s == 0);
      end
    end
  endtask
  initial begin #80000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int p, s0, nin;
    for (int i = 0; i < 16384; i++) mem[i] = 8'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      spr16 = f[0]; spr_pt = f[1];
      for (int i = 0; i < 256; i++) oam[i] = 8'($urandom);
      for (int s = 0; s < 64; s++) oam[s * 4] = 8'($urandom_range(0, 239));
      for (int s = 20; s < 32; s++) oam[s * 4] = 8'($urandom_range(100, 103));  // > 8 on some rows
      oam[0] = 8'd50; oam[3] = 8'd40;                                            // sprite 0 on screen
      for (int l = 0; l < 262; l++)
        for (int d = 0; d < 341; d++) begin
          dot = 9'(d);
          eval_line = (l >= 20 && l < 260);
          draw_line = (l >= 21 && l <= 260);
          next_row = 8'(l - 20);
          #1;
          if (draw_line && d < 256) begin
            ref_pixel(d, l - 21, p, s0, nin);
            checks++;
            if (pixel != 5'(p) || (p != 0 && is_sprite0 != s0)) begin
              failures++;
              if (failures < 10) $display("FAIL frame %0d line %0d x %0d got %h/%0d exp %h/%0d", f, l, d, pixel, is_sprite0, p, s0);
            end
            if (p != 0) n_pix++;
            if (p != 0 && s0 != 0) n_s0++;
          end
          if (eval_line && d == 300) begin
            ref_pixel(0, l - 20, p, s0, nin);
            checks++;
            if (overflow != (nin > 8)) begin failures++; $display("FAIL overflow line %0d got %0d exp %0d", l, overflow, nin > 8); end
            if (overflow) n_ovf++;
          end
          @(negedge clk);
        end
    end
    checks += 3;
    if (n_pix == 0) begin failures++; $display("FAIL no sprite pixels drawn"); end
    if (n_s0 == 0)  begin failures++; $display("FAIL sprite 0 never drawn"); end
    if (n_ovf == 0) begin failures++; $display("FAIL overflow never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
