// apu_length_counter: note-duration counter of a pAPU channel.
//
// Loaded from the 32-entry length table with index {reg[7:4], reg[3]} when the
// channel's fourth register is written (`load`). Each half-frame tick (`hclk`)
// decrements a non-zero count unless `halt` is set. Clearing the channel's
// enable bit in the status register ($4015) clears the count and blocks loads.
// `active` is high while the count is non-zero; it gates the channel output.
// Interface: single clock, strobes one cycle wide.
//
// The load table and the halt/decrement rule follow the original design;
// blocking loads while the channel is disabled is taken from the NES.
module apu_length_counter
  import nes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       load,
  input  logic [4:0] idx,
  input  logic       halt,
  input  logic       hclk,
  output logic [7:0] count,
  output logic       active
);
  always_ff @(posedge clk) begin
    if (!rst_n)                         count <= '0;
    else if (!enable)                   count <= '0;
    else if (load)                      count <= length_lut(idx);
    else if (hclk && count != 8'd0 && !halt) count <= count - 8'd1;
  end
  assign active = (count != 8'd0);
endmodule
