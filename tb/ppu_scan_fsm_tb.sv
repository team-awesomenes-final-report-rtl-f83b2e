// ppu_scan_fsm_tb: runs four frames (rendering on for frames 0-1, off for
// 2-3) and checks the dot/line counters, the 341x262 frame with the dropped
// dot on odd rendered frames, the position of the VBLANK set/clear and
// frame-done pulses, the line classification outputs and the VRAM address
// multiplexer. With rendering off it also checks that a register-file VRAM
// request is written on the first phase and acknowledged on the second.
module ppu_scan_fsm_tb;
  logic clk = 0, rst_n = 0, ce = 1, rendering_on = 1;
  logic [8:0] dot, line;
  logic prime_line, eval_line, draw_line, render_line, vblank_set, vblank_clr, frame_done;
  logic [13:0] bg_addr = 14'h1111, spr_addr = 14'h2222, vreq_addr = 14'h3333, vram_addr;
  logic vreq = 0, vreq_we = 0, vack, vram_en, vram_we;
  logic [7:0] vreq_wdata = 8'h44, vram_wdata;
  int checks = 0, failures = 0;
  ppu_scan_fsm dut (.clk, .rst_n, .ce, .rendering_on, .dot, .line, .prime_line, .eval_line,
                    .draw_line, .render_line, .vblank_set, .vblank_clr, .frame_done, .bg_addr,
                    .spr_addr, .vreq, .vreq_we, .vreq_addr, .vreq_wdata, .vack, .vram_addr,
                    .vram_en, .vram_we, .vram_wdata);
  always #5 clk = !clk;
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s got %0d exp %0d (line %0d dot %0d)", w, got, exp, line, dot); end
  endtask
  initial begin #30000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int d, l, len, n_set, n_clr, n_done;
    repeat (2) @(negedge clk); rst_n = 1; #1;
    for (int f = 0; f < 4; f++) begin
      rendering_on = f < 2;
      len = 0; n_set = 0; n_clr = 0; n_done = 0;
      d = 0; l = 0;
      do begin
        chk("dot", dot, d); chk("line", line, l);
        chk("prime", prime_line, l == 20);
        chk("draw", draw_line, l >= 21 && l <= 260);
        chk("render", render_line, rendering_on && l >= 20 && l <= 260);
        chk("eval", eval_line, rendering_on && l >= 20 && l < 260);
        if (vblank_set) begin n_set++; chk("vblank set at", l * 1000 + d, 0); end
        if (vblank_clr) begin n_clr++; chk("vblank clear at", l * 1000 + d, 20000); end
        if (frame_done) begin n_done++; chk("frame done line", l, 260); end
        chk("vram en", vram_en, 1);
        if (render_line) chk("vram addr", vram_addr, (d >= 256 && d < 320) ? 14'h2222 : 14'h1111);
        else begin chk("vram addr", vram_addr, 14'h3333); chk("no write without request", vram_we, 0); end
        len++;
        @(negedge clk); #1;
        if (d == 340 || (d == 339 && l == 20 && rendering_on && f % 2 == 1)) begin d = 0; l++; end
        else d++;
      end while (l < 262);
      chk("frame length", len, (rendering_on && f % 2 == 1) ? 341 * 262 - 1 : 341 * 262);
      chk("vblank set pulses", n_set, 1);
      chk("vblank clear pulses", n_clr, 1);
      chk("frame done pulses", n_done, 1);
    end
    // register-file request outside rendering (rendering is off now)
    for (int i = 0; i < 4; i++) begin
      vreq = 1; vreq_we = i[0]; #1;
      chk("write on first phase", vram_we, vreq_we); chk("no ack yet", vack, 0);
      @(negedge clk); #1;
      chk("no write on second phase", vram_we, 0); chk("ack", vack, 1);
      @(negedge clk); vreq = 0; #1;
      @(negedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
