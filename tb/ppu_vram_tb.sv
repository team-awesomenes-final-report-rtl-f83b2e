// ppu_vram_tb: checks synchronous read timing and both mirroring modes: with
// vertical mirroring $2000/$2800 and $2400/$2C00 alias, with horizontal
// mirroring $2000/$2400 and $2800/$2C00; $3000-$3EFF alias $2000-$2EFF.
module ppu_vram_tb;
  logic clk = 0, en = 0, we = 0, mirror_v = 1;
  logic [13:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  ppu_vram dut (.clk, .en, .we, .mirror_v, .addr, .wdata, .rdata);
  always #5 clk = !clk;
  task automatic wr(input int a, input int d);
    @(negedge clk) begin en = 1; we = 1; addr = 14'(a); wdata = 8'(d); end
    @(negedge clk) begin en = 0; we = 0; end
  endtask
  task automatic rd(input int a, input int exp);
    @(negedge clk) begin en = 1; addr = 14'(a); end
    @(negedge clk) en = 0;
    checks++;
    if (rdata != 8'(exp)) begin failures++; $display("FAIL rd %h got %h exp %h", a, rdata, exp); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    mirror_v = 1;
    wr('h2005, 'hA1); wr('h2405, 'hB2);
    rd('h2805, 'hA1); rd('h2C05, 'hB2); rd('h2005, 'hA1); rd('h3405, 'hB2);
    mirror_v = 0;
    wr('h2010, 'hC3); wr('h2810, 'hD4);
    rd('h2410, 'hC3); rd('h2C10, 'hD4); rd('h3010, 'hC3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
