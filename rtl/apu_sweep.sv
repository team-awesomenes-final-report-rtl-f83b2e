// apu_sweep: period sweep unit of a pAPU square channel.
//
// The shifter continuously computes target = period +/- (period >> shift).
// In negate mode the shifted value is inverted (ones' complement), i.e.
// target = period - (period >> shift) - 1. A divider of period p+1, clocked by
// the frame sequencer's half-frame tick (`hclk`), writes the target back to
// the channel's period when the sweep is enabled, the shift is non-zero and
// the channel is not muted. The channel is muted while its period is below 8
// or the (non-negated) target exceeds $7FF.
// Interface: single clock; `hclk` and `reload` (write to the sweep register)
// are one-cycle strobes; `upd`/`new_period` is a one-cycle period write.
// Follows the report; the p+1 divider period and reload-on-write are this
// design's choice.
module apu_sweep (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hclk,
  input  logic        reload,
  input  logic        enable,
  input  logic [2:0]  p,
  input  logic        negate,
  input  logic [2:0]  shift,
  input  logic [10:0] period,
  output logic        upd,
  output logic [10:0] new_period,
  output logic        mute
);
  logic [2:0]  div_q;
  logic        reload_q;
  logic [10:0] sh;
  logic [11:0] target;

  assign sh     = period >> shift;
  assign target = negate ? ({1'b0, period} + {1'b0, ~sh}) & 12'h7FF
                         : {1'b0, period} + {1'b0, sh};
  assign mute   = (period < 11'd8) || (!negate && target[11]);
  assign new_period = target[10:0];
  assign upd    = hclk && div_q == 3'd0 && !reload_q && enable &&
                  shift != 3'd0 && !mute;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_q    <= '0;
      reload_q <= 1'b0;
    end else begin
      if (reload) reload_q <= 1'b1;
      if (hclk) begin
        if (reload_q || div_q == 3'd0) begin
          div_q    <= p;
          reload_q <= 1'b0;
        end else begin
          div_q <= div_q - 3'd1;
        end
      end
    end
  end
endmodule
