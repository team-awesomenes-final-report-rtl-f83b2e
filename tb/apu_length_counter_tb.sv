// apu_length_counter_tb: loads every table entry and checks it against the
// length table, then checks decrement, halt and clear by the enable bit.
module apu_length_counter_tb;
  logic clk = 0, rst_n = 0, enable = 1, load = 0, halt = 0, hclk = 0;
  logic [4:0] idx = 0;
  logic [7:0] count;
  logic active;
  int checks = 0, failures = 0;
  // Length table: rows 0-F by index bits 4:1, columns by index bit 0.
  int col0 [16] = '{10, 20, 40, 80, 160, 60, 14, 26, 12, 24, 48, 96, 192, 72, 16, 32};
  int col1 [16] = '{254, 2, 4, 6, 8, 10, 12, 14, 16, 18, 20, 22, 24, 26, 28, 30};

  apu_length_counter dut (.clk, .rst_n, .enable, .load, .idx, .halt, .hclk, .count, .active);
  always #5 clk = !clk;

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      idx = 5'(i); load = 1; @(negedge clk); load = 0;
      chk("table", count, (i % 2) ? col1[i / 2] : col0[i / 2]);
    end
    idx = 5'd3; load = 1; @(negedge clk); load = 0;   // 2
    hclk = 1; @(negedge clk); hclk = 0;
    chk("decrement", count, 1);
    halt = 1; hclk = 1; @(negedge clk); hclk = 0;
    chk("halt", count, 1);
    halt = 0; hclk = 1; @(negedge clk); hclk = 0;
    chk("reaches 0", count, 0);
    chk("inactive", active, 0);
    hclk = 1; @(negedge clk); hclk = 0;
    chk("stays 0", count, 0);
    idx = 5'd0; load = 1; @(negedge clk); load = 0;
    enable = 0; @(negedge clk);
    chk("cleared by enable", count, 0);
    load = 1; @(negedge clk); load = 0;
    chk("no load while disabled", count, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
