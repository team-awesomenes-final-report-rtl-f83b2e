// mem_mapper: builds the CPU's address space from RAM, PPU, pAPU, pads and
// the cartridge.
//
//   $0000-$1FFF  2 KB work RAM (mirrored every $800)
//   $2000-$3FFF  PPU registers (address bits 2:0, mirrored every 8 bytes)
//   $4000-$4017  pAPU registers (writes forwarded), $4015 read = pAPU status
//   $4014        sprite DMA page (acted on by the CPU itself)
//   $4016        read: next button of pad 1; write bit 0: strobe both pads
//   $4017        read: next button of pad 2; write: pAPU sequencer mode
//   $8000-$FFFF  cartridge PRG ROM (15 address lines)
// Address decoding is combinational. Side effects (register strobes, the pad
// shift registers) happen only on the CPU cycle's enable `ce`. The pads are
// polled elsewhere; while the strobe bit is set the two shift registers
// reload continuously from the polled states, and each read returns bit 0
// and shifts in a 1. Unmapped reads return 0; pad reads return $40 | bit.
//
// The address map and the re-serialisation of held pad states follow the
// original design; the $40 open-bus bits and leaving $6000-$7FFF undecoded
// are this design's choices.
module mem_mapper (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  // CPU
  input  logic [15:0] cpu_addr,
  input  logic [7:0]  cpu_wdata,
  input  logic        cpu_we,
  input  logic        cpu_rd,
  output logic [7:0]  cpu_rdata,
  // work RAM
  output logic [10:0] ram_addr,
  output logic        ram_we,
  output logic [7:0]  ram_wdata,
  input  logic [7:0]  ram_rdata,
  // PPU
  output logic        ppu_cs,
  output logic        ppu_we,
  output logic [2:0]  ppu_sel,
  output logic [7:0]  ppu_wdata,
  input  logic [7:0]  ppu_rdata,
  // pAPU
  output logic        apu_we,
  output logic [4:0]  apu_addr,
  output logic [7:0]  apu_wdata,
  input  logic [1:0]  apu_status,
  // cartridge PRG
  output logic [14:0] prg_addr,
  output logic        prg_cs,
  input  logic [7:0]  prg_rdata,
  // pads
  input  logic [7:0]  buttons1,
  input  logic [7:0]  buttons2
);
  typedef enum logic [2:0] { R_RAM, R_PPU, R_IO, R_PRG, R_NONE } region_e;
  region_e    region;
  logic       acc;
  logic [7:0] sh1_q, sh2_q;
  logic       strobe_q;

  always_comb begin
    if (cpu_addr < 16'h2000)       region = R_RAM;
    else if (cpu_addr < 16'h4000)  region = R_PPU;
    else if (cpu_addr < 16'h4020)  region = R_IO;
    else if (cpu_addr[15])         region = R_PRG;
    else                           region = R_NONE;
  end

  assign acc       = ce && (cpu_we || cpu_rd);
  assign ram_addr  = cpu_addr[10:0];
  assign ram_we    = ce && cpu_we && region == R_RAM;
  assign ram_wdata = cpu_wdata;
  assign ppu_cs    = acc && region == R_PPU;
  assign ppu_we    = cpu_we;
  assign ppu_sel   = cpu_addr[2:0];
  assign ppu_wdata = cpu_wdata;
  assign apu_we    = ce && cpu_we && region == R_IO && cpu_addr[4:0] != 5'h14 &&
                     cpu_addr[4:0] != 5'h16;
  assign apu_addr  = cpu_addr[4:0];
  assign apu_wdata = cpu_wdata;
  assign prg_addr  = cpu_addr[14:0];
  assign prg_cs    = region == R_PRG;

  always_comb begin
    unique case (region)
      R_RAM: cpu_rdata = ram_rdata;
      R_PPU: cpu_rdata = ppu_rdata;
      R_PRG: cpu_rdata = prg_rdata;
      R_IO: unique case (cpu_addr[4:0])
        5'h15:   cpu_rdata = {6'd0, apu_status};
        5'h16:   cpu_rdata = {7'b0100000, sh1_q[0]};
        5'h17:   cpu_rdata = {7'b0100000, sh2_q[0]};
        default: cpu_rdata = 8'h00;
      endcase
      default: cpu_rdata = 8'h00;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh1_q <= '0; sh2_q <= '0; strobe_q <= 1'b0;
    end else if (ce) begin
      if (cpu_we && region == R_IO && cpu_addr[4:0] == 5'h16) strobe_q <= cpu_wdata[0];
      if (strobe_q) begin
        sh1_q <= buttons1;
        sh2_q <= buttons2;
      end else if (cpu_rd && region == R_IO) begin
        if (cpu_addr[4:0] == 5'h16) sh1_q <= {1'b1, sh1_q[7:1]};
        if (cpu_addr[4:0] == 5'h17) sh2_q <= {1'b1, sh2_q[7:1]};
      end
    end
  end
endmodule
