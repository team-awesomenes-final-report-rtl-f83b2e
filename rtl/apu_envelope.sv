// apu_envelope: volume envelope generator of a pAPU square channel.
//
// A divider of period n+1 and a 4-bit down-counter. The divider is clocked by
// the frame sequencer's quarter-frame tick (`qclk`). A write to the channel's
// fourth register (`restart`) makes the next tick reset the divider and load
// the counter with 15 instead. Each divider output decrements the counter; at
// zero it reloads 15 only when `loop` is set. The channel volume is the
// counter, or the constant `n` when `disable` is set.
// Interface: single clock, `qclk` and `restart` are one-cycle strobes.
// Follows the report's description; the reset values are this design's.
module apu_envelope (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       qclk,
  input  logic       restart,
  input  logic       loop,
  input  logic       disable_env,
  input  logic [3:0] n,
  output logic [3:0] volume
);
  logic [3:0] div_q, cnt_q;
  logic       start_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_q   <= '0;
      cnt_q   <= '0;
      start_q <= 1'b0;
    end else begin
      if (restart) start_q <= 1'b1;
      if (qclk) begin
        if (start_q && !restart) begin
          start_q <= 1'b0;
          cnt_q   <= 4'd15;
          div_q   <= n;
        end else if (div_q == 4'd0) begin
          div_q <= n;
          if (cnt_q != 4'd0)  cnt_q <= cnt_q - 4'd1;
          else if (loop)      cnt_q <= 4'd15;
        end else begin
          div_q <= div_q - 4'd1;
        end
      end
    end
  end

  assign volume = disable_env ? n : cnt_q;
endmodule
