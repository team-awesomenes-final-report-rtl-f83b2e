// ppu_regfile_tb: exercises $2000-$2007 from a CPU-like driver (one-cycle
// strobes) with a VRAM-port model that answers requests two clocks later.
// Checks control/mask writes, the two-write scroll register and its toggle
// reset by a $2002 read, the status flags and NMI output, sprite RAM
// address/increment, $2006/$2007 addressing with +1/+32 increments, VRAM
// writes, buffered VRAM reads, direct palette access and the write-busy
// flag.
module ppu_regfile_tb;
  logic clk = 0, rst_n = 0, cs = 0, we = 0;
  logic [2:0] sel = 0;
  logic [7:0] din = 0, dout, ctrl, mask, oam_addr, oam_wdata, oam_rdata = 8'h5A;
  logic [7:0] vreq_wdata, vrdata = 0;
  logic [15:0] scroll;
  logic nmi, vblank_set = 0, vblank_clr = 0, s0_set = 0, ovf_set = 0, oam_we;
  logic [4:0] pal_addr;
  logic pal_we, vreq, vreq_we, vack = 0;
  logic [5:0] pal_wdata, pal_rdata;
  logic [13:0] vreq_addr;
  logic [7:0] vmem [16384];
  logic [5:0] pal [32];
  int checks = 0, failures = 0, vwrites = 0, delay = 0;
  ppu_regfile dut (.clk, .rst_n, .cs, .we, .sel, .din, .dout, .ctrl, .mask, .scroll, .nmi,
                   .vblank_set, .vblank_clr, .s0_set, .ovf_set, .oam_addr, .oam_we,
                   .oam_wdata, .oam_rdata, .pal_addr, .pal_we, .pal_wdata, .pal_rdata, .vreq,
                   .vreq_we, .vreq_addr, .vreq_wdata, .vack, .vrdata);
  always #5 clk = !clk;
  assign pal_rdata = pal[pal_addr];
  always @(posedge clk) if (pal_we) pal[pal_addr] <= pal_wdata;
  // VRAM port model: acknowledge two clocks after the request
  always @(posedge clk) begin
    vack <= 1'b0;
    if (vreq && !vack) begin
      delay <= delay + 1;
      if (delay == 1) begin
        vack <= 1'b1; delay <= 0;
        vrdata <= vmem[vreq_addr];
        if (vreq_we) begin vmem[vreq_addr] <= vreq_wdata; vwrites <= vwrites + 1; end
      end
    end
  end
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask
  task automatic wr(input int r, input int d);
    sel = 3'(r); din = 8'(d); we = 1; cs = 1; @(negedge clk); cs = 0; we = 0;
    repeat (5) @(negedge clk);
  endtask
  task automatic rd(input int r, output int d);
    sel = 3'(r); we = 0; cs = 1; #1; d = dout; @(negedge clk); cs = 0;
    repeat (5) @(negedge clk);
  endtask
  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0; @(negedge clk);
  endtask
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int d, a;
    for (int i = 0; i < 16384; i++) vmem[i] = 8'($urandom);
    for (int i = 0; i < 32; i++) pal[i] = 6'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    // control registers
    wr(0, 8'h12); chk("ctrl", ctrl, 8'h12);
    wr(1, 8'h1E); chk("mask", mask, 8'h1E);
    // scroll: X then Y, toggle reset by $2002 read
    wr(5, 8'h34); wr(5, 8'h56); chk("scroll", scroll, 16'h5634);
    wr(5, 8'h78); rd(2, d); wr(5, 8'h9A); chk("toggle reset", scroll, 16'h569A);
    // status and NMI
    chk("nmi off", nmi, 0);
    pulse(vblank_set); rd(2, d); chk("vblank flag", d[7], 1);
    rd(2, d); chk("vblank cleared by read", d[7], 0);
    pulse(s0_set); pulse(ovf_set); rd(2, d); chk("s0 and ovf", d[6:5], 2'b11);
    pulse(vblank_set); rd(2, d); chk("s0/ovf cleared at vblank", d[6:5], 2'b00);
    wr(0, 8'h80); chk("nmi when enabled", nmi, 0);
    pulse(vblank_set); chk("nmi asserted", nmi, 1);
    pulse(vblank_clr); chk("nmi released", nmi, 0);
    wr(0, 8'h00);
    // sprite RAM address
    wr(3, 8'h40); chk("oam addr", oam_addr, 8'h40);
    sel = 4; din = 8'hC3; we = 1; cs = 1; #1; chk("oam we", oam_we, 1); chk("oam wdata", oam_wdata, 8'hC3);
    @(negedge clk); cs = 0; we = 0; chk("oam addr inc", oam_addr, 8'h41);
    rd(4, d); chk("oam read", d, 8'h5A); chk("oam addr inc on read", oam_addr, 8'h42);
    // VRAM writes with +1 increments
    a = 16'h2105;
    wr(6, a >> 8); wr(6, a & 255);
    for (int i = 0; i < 10; i++) wr(7, 8'h10 + i);
    for (int i = 0; i < 10; i++) chk("vram write +1", vmem[a + i], 8'h10 + i);
    // +32 increments
    wr(0, 8'h04); wr(6, 8'h24); wr(6, 8'h00);
    for (int i = 0; i < 5; i++) wr(7, 8'hA0 + i);
    for (int i = 0; i < 5; i++) chk("vram write +32", vmem[16'h2400 + 32 * i], 8'hA0 + i);
    wr(0, 8'h00);
    // buffered reads: the first returns the stale buffer
    wr(6, 8'h21); wr(6, 8'h05);
    rd(7, d);
    for (int i = 0; i < 8; i++) begin rd(7, d); chk("buffered read", d, vmem[16'h2105 + i]); end
    // palette writes and reads go straight to palette RAM
    wr(6, 8'h3F); wr(6, 8'h00);
    for (int i = 0; i < 32; i++) wr(7, i * 2);
    for (int i = 0; i < 32; i++) chk("palette write", pal[i], (i * 2) & 63);
    wr(6, 8'h3F); wr(6, 8'h08);
    rd(7, d); chk("palette read unbuffered", d, 16);
    // write-busy flag and dropped write
    wr(6, 8'h23); wr(6, 8'h00);
    a = vwrites;
    sel = 7; din = 8'h11; we = 1; cs = 1; @(negedge clk); din = 8'h22; @(negedge clk); cs = 0; we = 0;
    sel = 2; #1; chk("busy flag", dout[4], 1);
    repeat (6) @(negedge clk);
    chk("second write ignored", vwrites - a, 1);
    chk("written byte", vmem[16'h2300], 8'h11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
