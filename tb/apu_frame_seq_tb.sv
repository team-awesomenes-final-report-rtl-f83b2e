// apu_frame_seq_tb: measures the quarter/half/frame tick periods in both
// modes at the full 7458 / 9323 dividers.
module apu_frame_seq_tb;
  logic clk = 0, rst_n = 0, ce = 1, wr = 0, mode = 0;
  logic qclk, hclk, fclk;
  int checks = 0, failures = 0;
  int cyc = 0, lastq, lasth, lastf, nq;

  apu_frame_seq dut (.clk, .rst_n, .ce, .wr, .mode, .qclk, .hclk, .fclk);
  always #5 clk = !clk;

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(input int div);
    lastq = -1; lasth = -1; lastf = -1; nq = 0;
    while (nq < 9) begin
      @(posedge clk); cyc++;
      if (qclk) begin
        if (lastq >= 0) chk("quarter period", cyc - lastq, div);
        lastq = cyc; nq++;
      end
      if (hclk) begin
        if (lasth >= 0) chk("half period", cyc - lasth, 2 * div);
        lasth = cyc;
      end
      if (fclk) begin
        if (lastf >= 0) chk("frame period", cyc - lastf, 4 * div);
        lastf = cyc;
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    measure(7458);
    @(negedge clk) begin mode = 1; wr = 1; end
    @(negedge clk) wr = 0;
    measure(9323);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
