// ctrl_if_tb: two 4021-style pad models (parallel load while latch is high,
// shift on the rising edge of the pad clock, data active low) are polled by
// the interface with a shortened poll period. After each poll the decoded
// buttons must equal the pads' buttons; the latch pulse width and the
// number of pad clock pulses per poll are checked as well.
module ctrl_if_tb;
  localparam int PERIOD = 300, PULSE = 6;
  logic clk = 0, rst_n = 0, ce = 1;
  logic pad_latch, pad_clk, pad_data1, pad_data2;
  logic [7:0] buttons1, buttons2, held1 = 0, held2 = 0, sr1 = 0, sr2 = 0;
  logic clk_q = 0;
  int checks = 0, failures = 0;
  ctrl_if #(.POLL_PERIOD(PERIOD), .PULSE(PULSE)) dut (.clk, .rst_n, .ce, .pad_latch, .pad_clk,
      .pad_data1, .pad_data2, .buttons1, .buttons2);
  always #5 clk = !clk;
  // pad models
  always @(posedge clk) begin
    clk_q <= pad_clk;
    if (pad_latch) begin sr1 <= held1; sr2 <= held2; end
    else if (pad_clk && !clk_q) begin sr1 <= {1'b0, sr1[7:1]}; sr2 <= {1'b0, sr2[7:1]}; end
  end
  assign pad_data1 = !sr1[0];
  assign pad_data2 = !sr2[0];
  task automatic chk(input string w, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int lw, nclk;
    logic pc;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      // wait for the latch pulse, measure it
      while (!pad_latch) @(negedge clk);
      held1 = 8'($urandom); held2 = 8'($urandom);
      lw = 0; while (pad_latch) begin lw++; @(negedge clk); end
      chk("latch width", lw, PULSE);
      nclk = 0; pc = 0;
      for (int i = 0; i < 8 * 2 * PULSE + 8; i++) begin
        if (pad_clk && !pc) nclk++;
        pc = pad_clk; @(negedge clk);
      end
      chk("clock pulses", nclk, 7);
      chk("pad 1 buttons", buttons1, held1);
      chk("pad 2 buttons", buttons2, held2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
