// apu_envelope_tb: checks restart to 15, the n+1 divider period, decay to
// zero, looping and the constant-volume mode.
module apu_envelope_tb;
  logic clk = 0, rst_n = 0, qclk = 0, restart = 0, loop = 0, dis = 0;
  logic [3:0] n = 4'd2, volume;
  int checks = 0, failures = 0;

  apu_envelope dut (.clk, .rst_n, .qclk, .restart, .loop, .disable_env(dis), .n, .volume);
  always #5 clk = !clk;

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask
  task automatic tick(); @(negedge clk) qclk = 1; @(negedge clk) qclk = 0; endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk) restart = 1; @(negedge clk) restart = 0;
    tick();
    chk("restart loads 15", volume, 15);
    // with n = 2 the counter steps once every 3 ticks
    for (int k = 1; k <= 15; k++) begin
      repeat (3) tick();
      chk("decay", volume, 15 - k);
    end
    repeat (6) tick();
    chk("stays at 0 without loop", volume, 0);
    loop = 1;
    repeat (3) tick();
    chk("loop reloads 15", volume, 15);
    dis = 1; n = 4'd9; #1;
    chk("constant volume", volume, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
