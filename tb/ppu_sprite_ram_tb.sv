// ppu_sprite_ram_tb: fills all 256 bytes with a pattern and reads them back.
module ppu_sprite_ram_tb;
  logic clk = 0, we = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  int checks = 0, failures = 0;
  ppu_sprite_ram dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = !clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) begin we = 1; addr = 8'(i); wdata = 8'(i * 7 + 3); end
    end
    @(negedge clk) we = 0;
    for (int i = 255; i >= 0; i--) begin
      addr = 8'(i); #1; checks++;
      if (rdata != 8'(i * 7 + 3)) begin failures++; $display("FAIL %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
