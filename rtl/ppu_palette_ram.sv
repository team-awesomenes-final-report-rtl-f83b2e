// ppu_palette_ram: the PPU's 32-entry palette memory ($3F00-$3F1F).
//
// Entries 0-15 are the background palettes, 16-31 the sprite palettes; each
// holds a 6-bit NES colour code. The CPU port (`waddr`/`we`/`wdata`, read on
// `raddr_cpu`) is reached through $2006/$2007; the pixel multiplexer reads the
// colour of the current pixel combinationally on `raddr_pix`. Entry 0 is the
// shared background colour. Writes happen at the clock edge with `we` high.
//
// The 32-entry size follows the original design; keeping $10/$14/$18/$1C as
// ordinary entries (no mirroring onto the backdrop) is this design's choice.
module ppu_palette_ram (
  input  logic       clk,
  input  logic       we,
  input  logic [4:0] waddr,
  input  logic [5:0] wdata,
  input  logic [4:0] raddr_cpu,
  output logic [5:0] rdata_cpu,
  input  logic [4:0] raddr_pix,
  output logic [5:0] rdata_pix
);
  logic [5:0] mem [32];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata_cpu = mem[raddr_cpu];
  assign rdata_pix = mem[raddr_pix];
endmodule
