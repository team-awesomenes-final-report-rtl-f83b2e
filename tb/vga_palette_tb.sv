// vga_palette_tb: checks sample entries of the NES-to-RGB table, one from
// each brightness row, and structural properties of the whole table: the
// $x0 and $xD-$xF columns are neutral greys, $xE/$xF are near black and
// each row's $x0 grey gets brighter from row 0 to row 2.
module vga_palette_tb;
  logic [5:0] code = 0;
  logic [23:0] rgb;
  int checks = 0, failures = 0;
  vga_palette dut (.code, .rgb);
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask
  task automatic look(input int c, output int v);
    code = 6'(c); #1; v = int'(rgb);
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int g [4], v;
    look(6'h00, v); chk("code 00", v, 24'h808080);
    look(6'h01, v); chk("code 01", v, 24'h0000BB);
    look(6'h10, v); chk("code 10", v, 24'hC8C8C8);
    look(6'h21, v); chk("code 21", v, 24'h0095FF);
    look(6'h31, v); chk("code 31", v, 24'h84BFFF);
    look(6'h20, v); chk("code 20", v, 24'hFFFFFF);
    look(6'h0D, v); chk("code 0D", v, 24'h000000);
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 16; c++) begin
        look(r * 16 + c, v);
        if (c == 0 || c >= 13) begin
          chk("grey", (v >> 16) & 255, v & 255);
          chk("grey", (v >> 8) & 255, v & 255);
        end
        if (c >= 14) chk("near black", (v & 255) < 32, 1);
      end
      look(r * 16, v); g[r] = v & 255;
    end
    chk("row 0-1 brightness", g[1] > g[0], 1);
    chk("row 1-2 brightness", g[2] > g[1], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
