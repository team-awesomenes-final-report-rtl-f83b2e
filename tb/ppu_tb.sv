// ppu_tb: the whole PPU driven through its CPU register port. The
// testbench plays the cartridge/VRAM (synchronous read) with random pattern
// and name tables, programs the palette through $2006/$2007, the sprite RAM
// through $2003/$2004, the scroll through $2005 and control through
// $2000/$2001, waits for VBLANK (NMI), enables rendering and compares every
// pixel of the following frame (coordinates and colour code) against a
// reference built from the same memories: background with scroll, the
// first eight in-range sprites, priority/transparency rules, left-column
// clipping and the palette. Also checks $2007 writes/reads, the NMI, the
// status flags after the frame (sprite-0 hit, more than 8 sprites) and the
// monochrome mode on a second frame.
module ppu_tb;
  logic clk = 0, rst_n = 0, ce = 1, cs = 0, we = 0;
  logic [2:0] sel = 0;
  logic [7:0] din = 0, dout, vram_wdata, vram_rdata = 0, pix_x, pix_y;
  logic nmi, vram_en, vram_we, pix_valid, frame_done;
  logic [13:0] vram_addr;
  logic [5:0] pix_color;
  logic [7:0] mem [16384];
  logic [7:0] oam [256];
  logic [5:0] pal [32];
  logic [7:0] ctrl_m, mask_m;
  logic [15:0] scroll_m;
  int checks = 0, failures = 0, n_nmi = 0;
  logic nmi_q = 0;
  ppu dut (.clk, .rst_n, .ce, .cs, .we, .sel, .din, .dout, .nmi, .vram_addr, .vram_en,
           .vram_we, .vram_wdata, .vram_rdata, .pix_valid, .pix_x, .pix_y, .pix_color,
           .frame_done);
  always #5 clk = !clk;
  always @(posedge clk) begin
    if (vram_en) begin
      vram_rdata <= mem[vram_addr];
      if (vram_we) mem[vram_addr] <= vram_wdata;
    end
    nmi_q <= nmi;
    if (rst_n && nmi && !nmi_q) n_nmi <= n_nmi + 1;
  end
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 15) $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask
  task automatic wr(input int r, input int d);
    sel = 3'(r); din = 8'(d); we = 1; cs = 1; @(negedge clk); cs = 0; we = 0;
    repeat (3) @(negedge clk);
  endtask
  task automatic rd(input int r, output int d);
    sel = 3'(r); we = 0; cs = 1; #1; d = dout; @(negedge clk); cs = 0;
    repeat (3) @(negedge clk);
  endtask
  function automatic int bg_ref(input int x, input int y);
    int sx, sy, xw, yw, nt, tx, ty, px, py, tile, at, base, lo, hi, pt;
    pt = ctrl_m[4];
    sx = scroll_m[7:0]; sy = scroll_m[15:11] * 8 + scroll_m[10:8];
    xw = (ctrl_m[0] * 256 + sx + x) % 512;
    yw = (ctrl_m[1] * 240 + sy + y) % 480;
    nt = (yw / 240) * 2 + xw / 256;
    tx = (xw % 256) / 8; px = xw % 8;
    ty = (yw % 240) / 8; py = yw % 8;
    base = 16'h2000 + nt * 16'h400;
    tile = mem[base + ty * 32 + tx];
    at = (mem[base + 16'h3C0 + (ty / 4) * 8 + tx / 4] >> ((ty & 2) * 2 + (tx & 2))) & 3;
    lo = (mem[pt * 16'h1000 + tile * 16 + py] >> (7 - px)) & 1;
    hi = (mem[pt * 16'h1000 + tile * 16 + 8 + py] >> (7 - px)) & 1;
    return at * 4 + hi * 2 + lo;
  endfunction
  task automatic spr_ref(input int x, input int y, output int p, output int s0, output int n_in);
    int h, d, c, tile, r, a, lo, hi, at;
    h = ctrl_m[5] ? 16 : 8;
    p = 0; s0 = 0; n_in = 0;
    for (int s = 0; s < 64; s++) begin
      d = y - int'(oam[s * 4]) - 1;
      if (d < 0 || d >= h) continue;
      n_in++;
      if (n_in > 8) continue;
      c = x - int'(oam[s * 4 + 3]);
      if (c < 0 || c > 7 || p != 0) continue;
      at = oam[s * 4 + 2]; tile = oam[s * 4 + 1];
      r = at[7] ? h - 1 - d : d;
      if (ctrl_m[5]) a = (tile & 1) * 16'h1000 + (tile & 8'hFE) * 16 + (r >= 8 ? 16 : 0) + r % 8;
      else           a = ctrl_m[3] * 16'h1000 + tile * 16 + r;
      if (at[6]) c = 7 - c;
      lo = (mem[a] >> (7 - c)) & 1;
      hi = (mem[a + 8] >> (7 - c)) & 1;
      if (hi * 2 + lo != 0) begin
        p = ((at >> 5) & 1) * 16 + (at & 3) * 4 + hi * 2 + lo;
        s0 = (s == 0);
      end
    end
  endtask
  // expected colour code and sprite-0 hit for one pixel
  task automatic pix_ref(input int x, input int y, output int col, output int hit);
    int b, sp, s0, nin, a;
    logic bg_op, sp_op;
    b = bg_ref(x, y);
    spr_ref(x, y, sp, s0, nin);
    bg_op = mask_m[3] && (x >= 8 || mask_m[1]) && (b & 3) != 0;
    sp_op = mask_m[4] && (x >= 8 || mask_m[2]) && (sp & 3) != 0;
    if (sp_op && (!sp[4] || !bg_op)) a = 16 + (sp & 15);
    else if (bg_op) a = b;
    else a = 0;
    col = mask_m[0] ? (pal[a] & 6'h30) : pal[a];
    hit = s0 && sp_op && bg_op;
  endtask
  initial begin #200000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int d, col, hit, any_hit, any_ovf, p, s0, nin, npix;
    for (int i = 0; i < 16384; i++) mem[i] = 8'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // control: NMI on, 8x8 sprites from table 0, background from table 1
    ctrl_m = 8'h90; wr(0, ctrl_m);
    mask_m = 8'h00; wr(1, mask_m);
    // palette through $2006/$2007
    wr(6, 8'h3F); wr(6, 8'h00);
    for (int i = 0; i < 32; i++) begin pal[i] = 6'($urandom); wr(7, pal[i]); end
    // name-table write and buffered read-back
    wr(6, 8'h20); wr(6, 8'h40);
    for (int i = 0; i < 4; i++) wr(7, 8'hC0 + i);
    for (int i = 0; i < 4; i++) chk("name table write", mem[16'h2040 + i], 8'hC0 + i);
    wr(6, 8'h20); wr(6, 8'h40); rd(7, d);
    for (int i = 0; i < 4; i++) begin rd(7, d); chk("name table read", d, 8'hC0 + i); end
    // sprite RAM: random sprites, a cluster for >8, sprite 0 in view
    for (int i = 0; i < 256; i++) oam[i] = 8'($urandom);
    for (int s = 0; s < 64; s++) oam[s * 4] = 8'($urandom_range(0, 239));
    for (int s = 20; s < 31; s++) oam[s * 4] = 8'($urandom_range(120, 122));
    oam[0] = 8'd60; oam[2] = 8'h00; oam[3] = 8'd100;
    for (int t = 0; t < 256; t++) if ((mem[t * 16] | mem[t * 16 + 8]) == 8'hFF) begin oam[1] = 8'(t); break; end
    wr(3, 0);
    for (int i = 0; i < 256; i++) wr(4, oam[i]);
    // scroll
    scroll_m = {5'd7, 3'd3, 8'd77};
    rd(2, d); wr(5, scroll_m[7:0]); wr(5, scroll_m[15:8]);
    for (int f = 0; f < 2; f++) begin
      // wait for VBLANK through the NMI
      while (!nmi) @(negedge clk);
      rd(2, d); chk("vblank flag", d[7], 1);
      mask_m = (f == 0) ? 8'h1E : 8'h19; wr(1, mask_m);
      any_hit = 0; any_ovf = 0; npix = 0;
      for (int y = 0; y < 240; y++) begin
        spr_ref(0, y, p, s0, nin); if (nin > 8) any_ovf = 1;
      end
      // compare the frame
      while (!frame_done) begin
        @(posedge clk); #1;
        if (pix_valid) begin
          pix_ref(pix_x, pix_y, col, hit);
          if (hit) any_hit = 1;
          chk("pixel x", pix_x, npix % 256);
          chk("pixel y", pix_y, npix / 256);
          chk("pixel colour", pix_color, col);
          npix++;
        end
      end
      chk("pixels per frame", npix, 256 * 240);
      @(negedge clk); @(negedge clk);
      rd(2, d);
      chk("sprite 0 hit flag", d[6], any_hit);
      chk("more than 8 flag", d[5], any_ovf);
      chk("sprite 0 hit exercised", any_hit, 1);
    end
    // one when NMI is enabled inside the VBLANK that follows reset, then one per frame
    chk("nmi count", n_nmi, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
