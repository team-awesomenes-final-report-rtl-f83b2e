// apu_frame_seq: low-frequency sequencer of the pAPU.
//
// Divides the 1.79 MHz CPU clock (`ce` marks its cycles) by DIV4 = 7458 in
// mode 0 (4-step: 240/120/60 Hz) or by DIV5 = 9323 in mode 1 (5-step:
// 192/96/48 Hz). Every divider tick is a quarter-frame clock (`qclk`, drives
// the envelopes), every second tick a half-frame clock (`hclk`, drives length
// counters and sweeps), every fourth a frame clock (`fclk`). Mode is bit 7 of
// $4017; a write to $4017 (`wr`) restarts the divider and the step count.
// Outputs are one-cycle strobes on the `clk` cycle where `ce` is high.
//
// The dividers 7458 and 9323 and the mode bit are taken from the original
// design; the exact step order within a sequence is this design's choice.
module apu_frame_seq #(
  parameter int unsigned DIV4 = 7458,
  parameter int unsigned DIV5 = 9323
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic wr,
  input  logic mode,
  output logic qclk,
  output logic hclk,
  output logic fclk
);
  logic [13:0] cnt_q;
  logic [1:0]  step_q;
  logic        tick;

  assign tick = ce && !wr &&
                (32'(cnt_q) == (mode ? DIV5 - 1 : DIV4 - 1));
  assign qclk = tick;
  assign hclk = tick && step_q[0];
  assign fclk = tick && step_q == 2'd3;

  always_ff @(posedge clk) begin
    if (!rst_n || wr) begin
      cnt_q  <= '0;
      step_q <= '0;
    end else if (ce) begin
      if (tick) begin
        cnt_q  <= '0;
        step_q <= step_q + 2'd1;
      end else begin
        cnt_q  <= cnt_q + 14'd1;
      end
    end
  end
endmodule
