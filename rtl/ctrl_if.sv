// ctrl_if: polls two NES game pads and holds their button states.
//
// Every POLL_PERIOD CPU cycles (60 times a second at 1.777 MHz) the FSM
// raises `pad_latch` for PULSE cycles, which makes each pad capture its eight
// buttons, then reads the serial `pad_data` lines eight times, giving a
// `pad_clk` pulse of PULSE cycles after each bit to advance the pads. Button
// order is A, B, Select, Start, Up, Down, Left, Right (bit 0 to 7). The pad
// drives its data line low for a pressed button; `buttons1/2` are active
// high and update together when a poll completes.
// `ce` marks the CPU cycles. Pulse widths are this design's choice.
//
// Polling in hardware at 60 Hz and holding the results follow the original
// design; the poll period of 29630 CPU cycles is derived from that rate.
module ctrl_if #(
  parameter int unsigned POLL_PERIOD = 29630,
  parameter int unsigned PULSE       = 6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  output logic       pad_latch,
  output logic       pad_clk,
  input  logic       pad_data1,
  input  logic       pad_data2,
  output logic [7:0] buttons1,
  output logic [7:0] buttons2
);
  typedef enum logic [2:0] { C_IDLE, C_LATCH, C_SAMPLE, C_CLKH, C_CLKL } cstate_e;
  cstate_e     st_q;
  logic [15:0] tmr_q;
  logic [2:0]  bit_q;
  logic [7:0]  sh1_q, sh2_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q <= C_IDLE; tmr_q <= '0; bit_q <= '0;
      sh1_q <= '0; sh2_q <= '0; buttons1 <= '0; buttons2 <= '0;
    end else if (ce) begin
      tmr_q <= tmr_q + 16'd1;
      unique case (st_q)
        C_IDLE: if (32'(tmr_q) >= POLL_PERIOD - 1) begin
          st_q <= C_LATCH; tmr_q <= '0;
        end
        C_LATCH: if (32'(tmr_q) == PULSE - 1) begin
          st_q <= C_SAMPLE; tmr_q <= '0; bit_q <= '0;
        end
        C_SAMPLE: begin
          sh1_q <= {!pad_data1, sh1_q[7:1]};
          sh2_q <= {!pad_data2, sh2_q[7:1]};
          if (bit_q == 3'd7) begin
            buttons1 <= {!pad_data1, sh1_q[7:1]};
            buttons2 <= {!pad_data2, sh2_q[7:1]};
            st_q  <= C_IDLE;
          end else begin
            st_q  <= C_CLKH;
          end
          tmr_q <= '0;
        end
        C_CLKH: if (32'(tmr_q) == PULSE - 1) begin st_q <= C_CLKL; tmr_q <= '0; end
        C_CLKL: if (32'(tmr_q) == PULSE - 1) begin
          st_q <= C_SAMPLE; tmr_q <= '0; bit_q <= bit_q + 3'd1;
        end
        default: st_q <= C_IDLE;
      endcase
    end
  end

  assign pad_latch = (st_q == C_LATCH);
  assign pad_clk   = (st_q == C_CLKH);
endmodule
