// cpu_ram: the 2 KB of work RAM on the CPU bus ($0000-$07FF, mirrored up to
// $1FFF by the memory mapper through the 11-bit address).
// Combinational read, so the CPU gets the data in the cycle it presents the
// address; write at the clock edge with `we` high.
//
// The 2 KB size and mirroring follow the NES memory map; the combinational
// read is this design's choice to suit the single-cycle CPU bus.
module cpu_ram (
  input  logic        clk,
  input  logic        we,
  input  logic [10:0] addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata
);
  logic [7:0] mem [2048];

  always_ff @(posedge clk) if (we) mem[addr] <= wdata;
  assign rdata = mem[addr];
endmodule
