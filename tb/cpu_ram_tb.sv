// cpu_ram_tb: writes random data to every address of the 2 KB work RAM,
// then reads it all back (combinational read) and compares with a model
// array; a second pass overwrites random addresses and checks again.
module cpu_ram_tb;
  logic clk = 0, we = 0;
  logic [10:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [2048];
  int checks = 0, failures = 0;
  cpu_ram dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = !clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 2048; i++) begin
      model[i] = 8'($urandom);
      addr = 11'(i); wdata = model[i]; we = 1; @(negedge clk);
    end
    we = 0;
    for (int p = 0; p < 2; p++) begin
      for (int i = 0; i < 2048; i++) begin
        addr = 11'(i); #1; checks++;
        if (rdata !== model[i]) begin failures++; $display("FAIL addr %0d got %h exp %h", i, rdata, model[i]); end
      end
      @(negedge clk);
      for (int i = 0; i < 500; i++) begin
        int a; a = $urandom_range(0, 2047);
        model[a] = 8'($urandom); addr = 11'(a); wdata = model[a]; we = 1; @(negedge clk);
      end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
