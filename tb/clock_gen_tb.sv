// clock_gen_tb: counts the clock enables over 3000 master clocks and checks
// that the PPU enable comes every 5th clock and the CPU enable every 15th,
// that each CPU enable coincides with a PPU enable (three PPU dots per CPU
// cycle) and that no enable is given in reset.
module clock_gen_tb;
  logic clk = 0, rst_n = 0, ppu_ce, cpu_ce;
  int checks = 0, failures = 0;
  clock_gen dut (.clk, .rst_n, .ppu_ce, .cpu_ce);
  always #5 clk = !clk;
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int np = 0, nc = 0, lastp = -1, lastc = -1, np_between = 0;
    @(negedge clk); chk("no enable in reset", ppu_ce | cpu_ce, 0);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk); #1;
      if (ppu_ce) begin
        if (lastp >= 0) chk("ppu period", i - lastp, 5);
        lastp = i; np++; np_between++;
      end
      if (cpu_ce) begin
        chk("cpu on a ppu dot", ppu_ce, 1);
        if (lastc >= 0) begin chk("cpu period", i - lastc, 15); chk("dots per cpu cycle", np_between, 3); end
        lastc = i; nc++; np_between = 0;
      end
    end
    chk("ppu count", np, 600);
    chk("cpu count", nc, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
