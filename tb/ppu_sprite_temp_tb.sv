// ppu_sprite_temp_tb: feeds a sprite RAM through the temporary memory with
// the row computed by the testbench and checks that it keeps the first eight
// in-range sprites in order with tile, X, attribute bits and the row
// (vertically flipped where requested), counts them, flags sprite 0 and
// sets the more-than-8 flag.
module ppu_sprite_temp_tb;
  logic clk = 0, rst_n = 0, ce = 1, clear = 0, valid = 0, in_range = 0, spr16 = 0;
  logic [1:0] byte_sel = 0;
  logic [3:0] range = 0, count;
  logic [7:0] oam_data = 0;
  logic [2:0] sel = 0;
  logic [23:0] entry;
  logic empty, obj0, more_than_8, sprite0 = 0;
  logic [7:0] oam [256];
  int checks = 0, failures = 0;
  ppu_sprite_temp dut (.clk, .rst_n, .ce, .clear, .valid, .byte_sel, .sprite0, .in_range,
                       .range, .spr16, .oam_data, .sel, .entry, .count, .empty, .obj0,
                       .more_than_8);
  always #5 clk = !clk;
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int row, h, n, d, found [8], nin;
    logic [23:0] e;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      spr16 = t[0];
      h = spr16 ? 16 : 8;
      row = 50;
      for (int i = 0; i < 256; i++) oam[i] = 8'($urandom);
      for (int s = 0; s < 64; s++) oam[s * 4] = 8'($urandom_range(row - 20, row + 5));
      if (t == 2) for (int s = 0; s < 64; s++) oam[s * 4] = 8'd200;   // none in range
      nin = 0;
      @(negedge clk);
      for (int a = 0; a < 256; a++) begin
        clear = (a == 0); valid = 1; byte_sel = 2'(a); sprite0 = (a < 4);
        oam_data = oam[a];
        d = row - int'(oam[a & 8'hFC]) - 1;
        in_range = (a % 4 == 0) && d >= 0 && d < h;
        range = 4'(d);
        if (in_range) begin if (nin < 8) found[nin] = a / 4; nin++; end
        @(negedge clk);
      end
      valid = 0; clear = 0;
      n = nin > 8 ? 8 : nin;
      chk("count", count, n);
      chk("empty", empty, n == 0);
      chk("more than 8", more_than_8, nin > 8);
      chk("sprite 0 flag", obj0, n > 0 && found[0] == 0);
      for (int k = 0; k < n; k++) begin
        int s, r;
        s = found[k];
        sel = 3'(k); #1;
        d = row - int'(oam[s * 4]) - 1;
        r = oam[s * 4 + 2][7] ? (h - 1 - d) : d;
        e = {oam[s * 4 + 1], oam[s * 4 + 3], oam[s * 4 + 2][6], oam[s * 4 + 2][5],
             oam[s * 4 + 2][1:0], 4'(r)};
        chk("entry", entry, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
