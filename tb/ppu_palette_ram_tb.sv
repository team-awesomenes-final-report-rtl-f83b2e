// ppu_palette_ram_tb: writes the 32 palette entries and reads them back on
// both read ports.
module ppu_palette_ram_tb;
  logic clk = 0, we = 0;
  logic [4:0] waddr = 0, ra = 0, rp = 0;
  logic [5:0] wdata = 0, rc, rpix;
  int checks = 0, failures = 0;
  ppu_palette_ram dut (.clk, .we, .waddr, .wdata, .raddr_cpu(ra), .rdata_cpu(rc),
                       .raddr_pix(rp), .rdata_pix(rpix));
  always #5 clk = !clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 32; i++) begin
      @(negedge clk) begin we = 1; waddr = 5'(i); wdata = 6'(63 - i * 2); end
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rp = 5'(31 - i); #1; checks += 2;
      if (rc != 6'(63 - i * 2)) failures++;
      if (rpix != 6'(63 - (31 - i) * 2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
