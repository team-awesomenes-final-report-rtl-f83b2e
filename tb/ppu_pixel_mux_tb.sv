// ppu_pixel_mux_tb: exhaustive check of background/sprite selection,
// enables, left-column clipping and sprite-0 hit against a reference model.
module ppu_pixel_mux_tb;
  logic [3:0] bg;
  logic [4:0] spr;
  logic spr_is0, s0_hit;
  logic [7:0] mask, x;
  logic [4:0] pal_addr;
  int checks = 0, failures = 0;
  ppu_pixel_mux dut (.bg, .spr, .spr_is0, .mask, .x, .pal_addr, .s0_hit);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int eb, es, e;
    bit bop, sop;
    for (int i = 0; i < 16 * 32 * 2 * 16 * 2; i++) begin
      bg = 4'(i); spr = 5'(i >> 4); spr_is0 = 1'(i >> 9);
      mask = {3'b000, 4'(i >> 10), 1'b0};
      x = (i >> 14) ? 8'd100 : 8'd3;
      #1;
      bop = mask[3] && (x >= 8 || mask[1]) && bg[1:0] != 0;
      sop = mask[4] && (x >= 8 || mask[2]) && spr[1:0] != 0;
      if (sop && !spr[4])      e = 16 + spr[3:0];
      else if (bop)            e = bg;
      else if (sop)            e = 16 + spr[3:0];
      else                     e = 0;
      checks += 2;
      if (pal_addr != 5'(e)) begin failures++; if (failures < 5) $display("FAIL i=%0d got %0d exp %0d", i, pal_addr, e); end
      if (s0_hit != (spr_is0 && sop && bop)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
