// apu_sweep_tb: checks the shifter's add and negate targets, the muting
// rules and the p+1 divider period of period updates.
module apu_sweep_tb;
  logic clk = 0, rst_n = 0, hclk = 0, reload = 0, enable = 0, negate = 0;
  logic [2:0] p = 0, shift = 0;
  logic [10:0] period = 11'd400, new_period;
  logic upd, mute;
  int checks = 0, failures = 0, updates = 0;

  apu_sweep dut (.clk, .rst_n, .hclk, .reload, .enable, .p, .negate, .shift,
                 .period, .upd, .new_period, .mute);
  always #5 clk = !clk;
  always @(posedge clk) if (upd) begin updates++; period <= new_period; end

  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask
  task automatic tick(); @(negedge clk) hclk = 1; @(negedge clk) hclk = 0; endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    shift = 3'd2; #1;
    chk("add target", new_period, 400 + 100);
    negate = 1; #1;
    chk("negate target", new_period, 400 - 100 - 1);
    chk("not muted", mute, 0);
    negate = 0; period = 11'd1800; #1;
    chk("mute on overflow", mute, 1);
    period = 11'd7; #1;
    chk("mute below 8", mute, 1);
    period = 11'd400; enable = 1; p = 3'd2;
    @(negedge clk) reload = 1; @(negedge clk) reload = 0;
    tick();                         // reload tick
    chk("no update on reload", updates, 0);
    repeat (2) tick();
    chk("no update before divider", updates, 0);
    tick();
    chk("update after p+1 ticks", updates, 1);
    chk("period updated", period, 500);
    repeat (3) tick();
    chk("second update", period, 625);
    enable = 0;
    repeat (6) tick();
    chk("disabled: no update", period, 625);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
