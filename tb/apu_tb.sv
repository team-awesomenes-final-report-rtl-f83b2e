// apu_tb: writes the pAPU registers as the CPU would ($4000-$4007, $4015,
// $4017) and checks the mixed sample, the status bits and the channel
// enables, and that the envelope decays under the frame sequencer.
module apu_tb;
  logic clk = 0, rst_n = 0, ce = 1, we = 0;
  logic [4:0] waddr = 0, sample;
  logic [7:0] wdata = 0;
  logic [1:0] status;
  int checks = 0, failures = 0;

  apu dut (.clk, .rst_n, .ce, .we, .waddr, .wdata, .sample, .status);
  always #5 clk = !clk;

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask
  task automatic wreg(input int a, input logic [7:0] d);
    @(negedge clk) begin we = 1; waddr = 5'(a); wdata = d; end
    @(negedge clk) we = 0;
  endtask

  int seen [32];
  task automatic observe(input int n);
    for (int i = 0; i < 32; i++) seen[i] = 0;
    repeat (n) begin @(posedge clk); seen[sample]++; end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    wreg(5'h15, 8'h03);
    wreg(5'h00, 8'hBF); wreg(5'h02, 8'd40); wreg(5'h03, 8'h08);   // 50 %, vol 15
    wreg(5'h04, 8'hB5); wreg(5'h06, 8'd61); wreg(5'h07, 8'h08);   // 50 %, vol 5
    chk("status both active", status, 3);
    observe(20000);
    chk("sq1 alone seen", seen[15] > 0, 1);
    chk("sq2 alone seen", seen[5] > 0, 1);
    chk("sum seen", seen[20] > 0, 1);
    chk("silence seen", seen[0] > 0, 1);
    wreg(5'h15, 8'h01);
    @(negedge clk);
    chk("status sq2 cleared", status, 1);
    observe(5000);
    chk("sq2 off: no 5", seen[5], 0);
    // envelope: decaying volume on square 1 (period 0 -> one step per quarter frame)
    wreg(5'h00, 8'h80); wreg(5'h03, 8'h08);
    repeat (7458 * 3 + 10) @(posedge clk);
    observe(2000);
    chk("envelope decayed to 12 or 13", (seen[12] + seen[13]) > 0 && seen[15] == 0, 1);
    wreg(5'h15, 8'h00);
    @(negedge clk);
    chk("status cleared", status, 0);
    observe(1000);
    chk("all silent", seen[0], 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
