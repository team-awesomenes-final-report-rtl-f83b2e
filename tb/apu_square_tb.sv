// apu_square_tb: programs the channel registers and measures the output
// waveform: period 16*(P+1) CPU cycles (timer at half the CPU clock, 8
// sequencer steps), high time for each duty setting, constant volume, the
// length-counter gate and sweep muting.
module apu_square_tb;
  logic clk = 0, rst_n = 0, ce = 1, enable = 1, qclk = 0, hclk = 0;
  logic [3:0] wr = 0, sample;
  logic [7:0] wdata = 0;
  logic active;
  int checks = 0, failures = 0;

  apu_square dut (.clk, .rst_n, .ce, .wr, .wdata, .enable, .qclk, .hclk, .sample, .active);
  always #5 clk = !clk;

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask
  task automatic wreg(input int r, input logic [7:0] d);
    @(negedge clk) begin wr = 4'(1 << r); wdata = d; end
    @(negedge clk) wr = 0;
  endtask

  // Measure over 4 full periods: cycles high and the max sample value.
  task automatic measure(input int per, output int high, output int vmax);
    high = 0; vmax = 0;
    for (int i = 0; i < 4 * per; i++) begin
      @(posedge clk);
      if (sample != 0) high++;
      if (sample > vmax) vmax = sample;
    end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int high, vmax;
  int duty_high [4] = '{1, 2, 4, 6};
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int d = 0; d < 4; d++) begin
      wreg(0, 8'(d << 6) | 8'h30 | 8'h0A);   // duty d, halt, constant volume 10
      wreg(1, 8'h00);
      wreg(2, 8'd20);                         // P = 20
      wreg(3, 8'h08);                         // length index 1, P high = 0
      measure(16 * 21, high, vmax);
      chk("duty high time", high, 4 * duty_high[d] * 2 * 21);
      chk("volume", vmax, 10);
    end
    chk("length active", active, 1);
    enable = 0; @(negedge clk);
    measure(16 * 21, high, vmax);
    chk("silenced by length clear", high, 0);
    enable = 1;
    wreg(2, 8'd5); wreg(3, 8'h08);            // P = 5 < 8: muted by sweep rule
    measure(16 * 6, high, vmax);
    chk("muted below period 8", high, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
