// apu_square: one square-wave channel of the pAPU.
//
// Four registers (written with `wr` one-hot per register):
//   reg0 ddle nnnn  duty, length halt / envelope loop, envelope disable, n
//   reg1 eppp nsss  sweep enable, divider period, negate, shift
//   reg2 pppp pppp  timer period low byte
//   reg3 llll lppp  length index, timer period high bits
// Signal chain: sweep -> timer (clocked every second CPU cycle) -> 8-step duty
// sequencer; the sequencer bit, the length counter and the sweep mute gate
// the envelope volume onto `sample` (4 bits). The timer is an 11-bit divider
// of period p+1. A write to reg3 restarts the envelope and the duty step.
// `ce` marks CPU cycles; `qclk`/`hclk` come from the frame sequencer.
//
// The block order (sweep, timer/2, sequencer, then length and envelope to
// the output) and the duty selections follow the original design; the bit
// order of each duty pattern is taken from the NES.
module apu_square
  import nes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic [3:0] wr,
  input  logic [7:0] wdata,
  input  logic       enable,
  input  logic       qclk,
  input  logic       hclk,
  output logic [3:0] sample,
  output logic       active
);
  logic [7:0]  r0, r1;
  logic [10:0] period;
  logic [10:0] timer_q;
  logic [2:0]  step_q;
  logic        half_q;
  logic [3:0]  vol;
  logic        sw_upd, sw_mute;
  logic [10:0] sw_period;
  logic [7:0]  len_count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r0 <= '0; r1 <= '0; period <= '0;
      timer_q <= '0; step_q <= '0; half_q <= 1'b0;
    end else begin
      if (wr[0]) r0 <= wdata;
      if (wr[1]) r1 <= wdata;
      if (wr[2]) period[7:0]  <= wdata;
      if (wr[3]) period[10:8] <= wdata[2:0];
      if (sw_upd) period <= sw_period;
      if (wr[3]) step_q <= '0;
      else if (ce) begin
        half_q <= !half_q;
        if (half_q) begin
          if (timer_q == 11'd0) begin
            timer_q <= period;
            step_q  <= step_q + 3'd1;
          end else begin
            timer_q <= timer_q - 11'd1;
          end
        end
      end
    end
  end

  apu_envelope u_env (
    .clk, .rst_n, .qclk, .restart(wr[3]), .loop(r0[5]), .disable_env(r0[4]),
    .n(r0[3:0]), .volume(vol));

  apu_sweep u_sweep (
    .clk, .rst_n, .hclk, .reload(wr[1]), .enable(r1[7]), .p(r1[6:4]),
    .negate(r1[3]), .shift(r1[2:0]), .period, .upd(sw_upd),
    .new_period(sw_period), .mute(sw_mute));

  apu_length_counter u_len (
    .clk, .rst_n, .enable, .load(wr[3]), .idx(wdata[7:3]), .halt(r0[5]),
    .hclk, .count(len_count), .active);

  logic [7:0] wave;
  assign wave   = duty_wave(r0[7:6]);
  assign sample = (wave[3'd7 - step_q] && active && !sw_mute) ? vol : 4'd0;
endmodule
