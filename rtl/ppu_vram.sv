// ppu_vram: the 2 KB of name-table RAM on the NES board.
//
// The PPU address space holds four 1 KB name tables ($2000, $2400, $2800,
// $2C00, each with its attribute table) but only two exist; the cartridge
// decides the mirroring. `mirror_v` = 1 maps tables 0/2 and 1/3 together
// (vertical mirroring), 0 maps 0/1 and 2/3 (horizontal). Addresses $3000-
// $3EFF alias $2000-$2EFF through the 10-bit offset.
// Timing: synchronous read: `rdata` holds the byte at the address presented
// on the previous clock edge with `en` high; a write happens at that edge
// when `we` is high.
//
// Two physical name tables with cartridge-selected mirroring follow the
// original design; the synchronous read is this design's choice.
module ppu_vram (
  input  logic        clk,
  input  logic        en,
  input  logic        we,
  input  logic        mirror_v,
  input  logic [13:0] addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata
);
  logic [7:0]  mem [2048];
  logic [10:0] idx;

  assign idx = {mirror_v ? addr[10] : addr[11], addr[9:0]};

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[idx] <= wdata;
      rdata <= mem[idx];
    end
  end
endmodule
