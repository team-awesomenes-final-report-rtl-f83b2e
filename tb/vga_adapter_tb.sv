// vga_adapter_tb: runs the 640x480 timing for a little over one frame with
// a one-clock-latency picture source and checks, clock by clock, the sync
// pulses, the black bars and blanking, the pixel/line doubling of the
// framebuffer coordinates and the colour conversion, plus the frame-start
// pulse. Expected colours come from a second palette instance.
module vga_adapter_tb;
  logic clk = 0, rst_n = 0;
  logic [7:0] fb_x, fb_y, red, green, blue;
  logic [5:0] fb_color = 0, ref_code = 0;
  logic frame_start, hsync, vsync;
  logic [23:0] ref_rgb;
  int checks = 0, failures = 0;
  vga_adapter dut (.clk, .rst_n, .fb_x, .fb_y, .fb_color, .frame_start, .hsync, .vsync,
                   .red, .green, .blue);
  vga_palette ref_lut (.code(ref_code), .rgb(ref_rgb));
  always #5 clk = !clk;
  function automatic logic [5:0] pic(input int x, input int y);
    return 6'(x ^ (y * 3));
  endfunction
  always @(posedge clk) fb_color <= pic(fb_x, fb_y);
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", w, got, exp);
    end
  endtask
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int h, v, ph, pv, starts = 0;
    logic pimg;
    repeat (2) @(negedge clk); rst_n = 1; #1;
    ph = -1; pv = -1; pimg = 0;
    for (int n = 0; n < 800 * 525 + 2000; n++) begin
      h = n % 800; v = (n / 800) % 525;
      // outputs now describe the previous pixel
      if (ph >= 0) begin
        chk("hsync", hsync, !(ph >= 656 && ph < 752));
        chk("vsync", vsync, !(pv >= 490 && pv < 492));
        if (pimg) chk("rgb", {red, green, blue}, ref_rgb);
        else      chk("black", {red, green, blue}, 0);
      end
      if (frame_start) starts++;
      chk("frame start", frame_start, h == 0 && v == 0);
      pimg = h >= 64 && h < 576 && v < 480;
      if (pimg) begin
        chk("fb_x", fb_x, (h - 64) / 2);
        chk("fb_y", fb_y, v / 2);
        ref_code = pic((h - 64) / 2, v / 2);
      end
      ph = h; pv = v;
      @(negedge clk);
    end
    chk("frame starts", starts, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
