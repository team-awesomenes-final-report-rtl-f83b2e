// mem_mapper_tb: drives random CPU accesses across the whole 64 KB map and
// checks the decoded selects and the read-data multiplexer against a model
// of the map (work RAM mirrored below $2000, PPU registers mirrored every 8
// bytes to $3FFF, pAPU/IO at $4000-$401F, PRG ROM at $8000-$FFFF). Then
// checks the pad strobe at $4016 and the serial reads of $4016/$4017.
module mem_mapper_tb;
  logic clk = 0, rst_n = 0, ce = 1;
  logic [15:0] cpu_addr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata, ram_wdata, ram_rdata = 8'h11, ppu_wdata, ppu_rdata = 8'h22;
  logic [7:0] apu_wdata, prg_rdata = 8'h33, buttons1 = 0, buttons2 = 0;
  logic cpu_we = 0, cpu_rd = 0, ram_we, ppu_cs, ppu_we, apu_we, prg_cs;
  logic [10:0] ram_addr;
  logic [2:0] ppu_sel;
  logic [4:0] apu_addr;
  logic [1:0] apu_status = 2'b10;
  logic [14:0] prg_addr;
  int checks = 0, failures = 0;
  mem_mapper dut (.clk, .rst_n, .ce, .cpu_addr, .cpu_wdata, .cpu_we, .cpu_rd, .cpu_rdata,
                  .ram_addr, .ram_we, .ram_wdata, .ram_rdata, .ppu_cs, .ppu_we, .ppu_sel,
                  .ppu_wdata, .ppu_rdata, .apu_we, .apu_addr, .apu_wdata, .apu_status,
                  .prg_addr, .prg_cs, .prg_rdata, .buttons1, .buttons2);
  always #5 clk = !clk;
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int a, exp_rd;
    logic w;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      a = (i < 64) ? 16'h4000 + i % 32 : $urandom_range(0, 65535);
      w = 1'($urandom);
      cpu_addr = 16'(a); cpu_we = w; cpu_rd = !w; cpu_wdata = 8'($urandom);
      if (a >= 16'h4016 && a <= 16'h4017) begin cpu_we = 0; cpu_rd = 0; end
      #1;
      chk("ram_we", ram_we, cpu_we && a < 16'h2000);
      chk("ram_addr", ram_addr, a % 2048);
      chk("ppu_cs", ppu_cs, a >= 16'h2000 && a < 16'h4000);
      chk("ppu_sel", ppu_sel, a % 8);
      chk("apu_we", apu_we, cpu_we && a >= 16'h4000 && a < 16'h4020 && a != 16'h4014 && a != 16'h4016);
      chk("prg_cs", prg_cs, a >= 16'h8000);
      chk("prg_addr", prg_addr, a % 32768);
      if (a < 16'h2000) exp_rd = 8'h11;
      else if (a < 16'h4000) exp_rd = 8'h22;
      else if (a == 16'h4015) exp_rd = 2;
      else if (a >= 16'h8000) exp_rd = 8'h33;
      else if (a == 16'h4016 || a == 16'h4017) exp_rd = cpu_rdata;
      else exp_rd = 0;
      chk("cpu_rdata", cpu_rdata, exp_rd);
      @(negedge clk);
    end
    // pad strobe and serial reads
    for (int r = 0; r < 20; r++) begin
      buttons1 = 8'($urandom); buttons2 = 8'($urandom);
      cpu_addr = 16'h4016; cpu_we = 1; cpu_rd = 0; cpu_wdata = 1; @(negedge clk);
      cpu_wdata = 0; @(negedge clk);     // strobe still high this cycle: reload
      cpu_we = 0; @(negedge clk);
      for (int b = 0; b < 10; b++) begin
        cpu_rd = 1;
        cpu_addr = 16'h4016; #1; chk("4016 bit", cpu_rdata, 8'h40 | (b < 8 ? buttons1[b] : 1));
        @(negedge clk);
        cpu_addr = 16'h4017; #1; chk("4017 bit", cpu_rdata, 8'h40 | (b < 8 ? buttons2[b] : 1));
        @(negedge clk);
      end
      cpu_rd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
