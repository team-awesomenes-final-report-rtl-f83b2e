// ppu_sprite_ram: the PPU's 256-byte sprite attribute memory.
//
// 64 sprites x 4 bytes (Y-1, tile index, attributes, X). One write port and
// one combinational read port sharing the address: the CPU side ($2003/$2004
// and sprite DMA) writes it during VBLANK, the range evaluator reads one byte
// per PPU cycle while rendering. Writes take effect at the clock edge where
// `we` is high.
//
// The 256-byte size follows the original design; the combinational read is
// this design's choice so range evaluation can read a byte per dot.
module ppu_sprite_ram (
  input  logic       clk,
  input  logic       we,
  input  logic [7:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata
);
  logic [7:0] mem [256];

  always_ff @(posedge clk) if (we) mem[addr] <= wdata;
  assign rdata = mem[addr];
endmodule
