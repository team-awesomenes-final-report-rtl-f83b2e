// ppu_range_eval_tb: walks a random sprite RAM for several scanlines and
// checks the address sequence and the in-range/row result of every Y byte
// for 8- and 16-line sprites.
module ppu_range_eval_tb;
  logic clk = 0, rst_n = 0, ce = 1, eval_start = 0, eval_en = 0, spr16 = 0, in_range;
  logic [7:0] row = 0, oam_addr;
  logic [1:0] byte_sel;
  logic [3:0] range;
  logic [7:0] oam [256];
  int checks = 0, failures = 0;
  ppu_range_eval dut (.clk, .rst_n, .ce, .eval_start, .eval_en, .row, .spr16,
                      .oam_data(oam[oam_addr]), .oam_addr, .byte_sel, .in_range, .range);
  always #5 clk = !clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int y, h, d;
    for (int i = 0; i < 256; i++) oam[i] = 8'($urandom_range(0, 80));
    repeat (2) @(negedge clk); rst_n = 1;
    for (int l = 0; l < 12; l++) begin
      row = 8'($urandom_range(0, 90)); spr16 = l[0];
      h = spr16 ? 16 : 8;
      for (int dot = 0; dot < 256; dot++) begin
        eval_start = (dot == 0); eval_en = 1;
        #1;
        checks++;
        if (oam_addr != 8'(dot) || byte_sel != 2'(dot)) begin failures++; $display("FAIL addr %0d", oam_addr); end
        if (dot % 4 == 0) begin
          y = oam[dot]; d = row - y - 1;
          checks++;
          if (in_range != (d >= 0 && d < h) || (in_range && range != 4'(d))) begin
            failures++; $display("FAIL row %0d y %0d in %b r %0d", row, y, in_range, range);
          end
        end
        @(negedge clk);
      end
      eval_en = 0; eval_start = 0;
      repeat (20) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
