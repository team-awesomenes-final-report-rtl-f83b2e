// ppu_sprite_buffer_tb: loads a pattern row and an X position and checks
// that the eight pixels appear exactly at dots X..X+7, MSB first, with
// transparent pixels elsewhere.
module ppu_sprite_buffer_tb;
  logic clk = 0, rst_n = 0, ce = 1, active = 0, load_lo = 0, load_hi = 0, load_x = 0;
  logic [7:0] data = 0;
  logic [2:0] attr = 0, attr_out;
  logic [1:0] pix;
  int checks = 0, failures = 0;
  ppu_sprite_buffer dut (.clk, .rst_n, .ce, .active, .load_lo, .load_hi, .load_x,
                         .data, .attr, .pix, .attr_out);
  always #5 clk = !clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(input logic [7:0] lo, input logic [7:0] hi, input int xpos);
    int e;
    @(negedge clk) begin load_lo = 1; data = lo; end
    @(negedge clk) begin load_lo = 0; load_hi = 1; data = hi; end
    @(negedge clk) begin load_hi = 0; load_x = 1; data = 8'(xpos); attr = 3'b101; end
    @(negedge clk) begin load_x = 0; active = 1; end
    for (int d = 0; d < 256; d++) begin
      e = (d >= xpos && d < xpos + 8) ? {hi[7 - (d - xpos)], lo[7 - (d - xpos)]} : 0;
      checks++;
      if (pix != 2'(e)) begin failures++; if (failures < 5) $display("FAIL x=%0d d=%0d got %0d exp %0d", xpos, d, pix, e); end
      @(negedge clk);
    end
    active = 0;
    checks++; if (attr_out != 3'b101) failures++;
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(8'b1100_1010, 8'b1010_0110, 0);
    run(8'b0111_0001, 8'b1000_1111, 37);
    run(8'hFF, 8'h00, 250);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
