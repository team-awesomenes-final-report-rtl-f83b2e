// framebuffer_tb: fills the write buffer with one picture, swaps, and
// checks that the read side returns it (one clock read latency) while a
// second picture is written into the other buffer, then swaps again and
// checks the second picture. Also checks the buffer-select rules.
module framebuffer_tb;
  logic clk = 0, rst_n = 0, wr = 0, frame_done = 0, vga_frame_start = 0;
  logic [7:0] wx = 0, wy = 0, rx = 0, ry = 0;
  logic [5:0] wcolor = 0, rcolor;
  logic wsel, rsel;
  int checks = 0, failures = 0;
  framebuffer dut (.clk, .rst_n, .wr, .wx, .wy, .wcolor, .frame_done, .vga_frame_start,
                   .rx, .ry, .rcolor, .wsel, .rsel);
  always #5 clk = !clk;
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask
  function automatic logic [5:0] pic(input int n, input int x, input int y);
    return 6'((x * 7 + y * 13 + n * 29) ^ (x >> 3));
  endfunction
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk("reset wsel", wsel, 0); chk("reset rsel", rsel, 1);
    for (int n = 0; n < 3; n++) begin
      // write picture n over the whole 256x240 area
      wr = 1;
      for (int y = 0; y < 240; y++)
        for (int x = 0; x < 256; x++) begin
          wx = 8'(x); wy = 8'(y); wcolor = pic(n, x, y);
          rx = 8'($urandom); ry = 8'($urandom_range(0, 239));
          @(negedge clk);
          // while writing, the read side still shows the previous picture
          if (n > 0) chk("read during write", rcolor, pic(n - 1, rx, ry));
        end
      wr = 0;
      frame_done = 1; @(negedge clk); frame_done = 0;
      chk("wsel toggles", wsel, (n + 1) % 2);
      repeat (3) @(negedge clk);
      vga_frame_start = 1; @(negedge clk); vga_frame_start = 0;
      chk("rsel follows finished buffer", rsel, n % 2);
      for (int i = 0; i < 3000; i++) begin
        int x, y; x = $urandom_range(0, 255); y = $urandom_range(0, 239);
        rx = 8'(x); ry = 8'(y); @(negedge clk);
        chk("read back", rcolor, pic(n, x, y));
      end
    end
    // frame_done and frame start together: read side gets the buffer just done
    frame_done = 1; vga_frame_start = 1; @(negedge clk); frame_done = 0; vga_frame_start = 0;
    chk("simultaneous swap", rsel, !wsel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
