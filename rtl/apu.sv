// apu: the pAPU of the 2A03, built with its two square channels.
//
// The CPU writes registers $4000-$4017 through (`we`, `waddr` = address bits
// 4:0, `wdata`): $4000-$4003 square 1, $4004-$4007 square 2, $4015 channel
// enables (bits 0 and 1), $4017 sequencer mode (bit 7). The frame sequencer
// produces the quarter- and half-frame clocks for both channels. `sample` is
// the digital sum of the two channels (0..30); the DAC is outside the design.
// `status` gives the two length counters' non-zero state ($4015 read).
// `ce` marks the 1.79 MHz CPU cycles; writes are one-cycle strobes.
// The triangle, noise and DMC channels are not part of this design.
//
// The two square channels, their register layout and the 4-/5-step
// sequencer follow the original design; summing the channels into one sample
// and the $4015 status bits are this design's own choices.
module apu (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       we,
  input  logic [4:0] waddr,
  input  logic [7:0] wdata,
  output logic [4:0] sample,
  output logic [1:0] status
);
  logic [1:0] en_q;
  logic       mode_q;
  logic       qclk, hclk, fclk;
  logic [3:0] s1, s2;
  logic       wr4017;

  assign wr4017 = we && waddr == 5'h17;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      en_q   <= '0;
      mode_q <= 1'b0;
    end else if (we) begin
      if (waddr == 5'h15) en_q   <= wdata[1:0];
      if (wr4017)         mode_q <= wdata[7];
    end
  end

  apu_frame_seq u_seq (.clk, .rst_n, .ce, .wr(wr4017), .mode(mode_q),
                       .qclk, .hclk, .fclk);

  apu_square u_sq1 (.clk, .rst_n, .ce,
    .wr({we && waddr == 5'h03, we && waddr == 5'h02, we && waddr == 5'h01, we && waddr == 5'h00}),
    .wdata, .enable(en_q[0]), .qclk, .hclk, .sample(s1), .active(status[0]));

  apu_square u_sq2 (.clk, .rst_n, .ce,
    .wr({we && waddr == 5'h07, we && waddr == 5'h06, we && waddr == 5'h05, we && waddr == 5'h04}),
    .wdata, .enable(en_q[1]), .qclk, .hclk, .sample(s2), .active(status[1]));

  assign sample = {1'b0, s1} + {1'b0, s2};
endmodule
