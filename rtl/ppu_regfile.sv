// ppu_regfile: the eight CPU-visible PPU registers $2000-$2007.
//
//   $2000 control 1 (NMI enable, sprite size, pattern selects, increment,
//         name table)          $2001 control 2 (enables, clipping, mono)
//   $2002 status (VBLANK, sprite-0 hit, >8 sprites, VRAM write busy); a read
//         clears VBLANK and the shared $2005/$2006 toggle
//   $2003 sprite RAM address   $2004 sprite RAM data (address +1 per access)
//   $2005 scroll, two writes (X then Y) into {Y, X}
//   $2006 VRAM address, two writes (high then low), same toggle as $2005
//   $2007 VRAM data, address +1 or +32 ($2000.2) per access
// $2007 accesses below $3F00 go through the scanline FSM's VRAM port
// (`vreq`, served when the renderer does not need VRAM; `vack` marks the
// cycle the data is valid). Reads return the buffered byte of the previous
// read and refill the buffer; palette addresses ($3F00-$3FFF) reach the
// palette RAM directly, without buffering. While a VRAM write is pending the
// status bit 4 is set and further $2007 writes are ignored.
// CPU side: `cs` is a one-cycle strobe per CPU access; `dout` is
// combinational. Status flags are set/cleared by one-cycle pulses.
//
// The register meanings follow the original design's register table; NMI
// gating by $2000 bit 7 and the two-dot VRAM request are this design's own.
module ppu_regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cs,
  input  logic        we,
  input  logic [2:0]  sel,
  input  logic [7:0]  din,
  output logic [7:0]  dout,
  output logic [7:0]  ctrl,
  output logic [7:0]  mask,
  output logic [15:0] scroll,
  output logic        nmi,
  // status events
  input  logic        vblank_set,
  input  logic        vblank_clr,
  input  logic        s0_set,
  input  logic        ovf_set,
  // sprite RAM
  output logic [7:0]  oam_addr,
  output logic        oam_we,
  output logic [7:0]  oam_wdata,
  input  logic [7:0]  oam_rdata,
  // palette RAM
  output logic [4:0]  pal_addr,
  output logic        pal_we,
  output logic [5:0]  pal_wdata,
  input  logic [5:0]  pal_rdata,
  // VRAM port through the scanline FSM
  output logic        vreq,
  output logic        vreq_we,
  output logic [13:0] vreq_addr,
  output logic [7:0]  vreq_wdata,
  input  logic        vack,
  input  logic [7:0]  vrdata
);
  logic        vblank_q, s0_q, ovf_q, toggle_q;
  logic [13:0] vaddr_q;
  logic [7:0]  rbuf_q;
  logic        is_pal;
  logic        rd, wr;

  assign rd     = cs && !we;
  assign wr     = cs && we;
  assign is_pal = vaddr_q[13:8] == 6'h3F;
  assign nmi    = ctrl[7] && vblank_q;

  assign oam_we    = wr && sel == 3'd4;
  assign oam_wdata = din;
  assign pal_addr  = vaddr_q[4:0];
  assign pal_we    = wr && sel == 3'd7 && is_pal;
  assign pal_wdata = din[5:0];

  always_comb begin
    unique case (sel)
      3'd2: dout = {vblank_q, s0_q, ovf_q, vreq && vreq_we, 4'h0};
      3'd4: dout = oam_rdata;
      3'd7: dout = is_pal ? {2'b00, pal_rdata} : rbuf_q;
      default: dout = 8'h00;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl <= '0; mask <= '0; scroll <= '0;
      vblank_q <= 1'b0; s0_q <= 1'b0; ovf_q <= 1'b0; toggle_q <= 1'b0;
      vaddr_q <= '0; rbuf_q <= '0; oam_addr <= '0;
      vreq <= 1'b0; vreq_we <= 1'b0; vreq_addr <= '0; vreq_wdata <= '0;
    end else begin
      if (vblank_set) begin vblank_q <= 1'b1; s0_q <= 1'b0; ovf_q <= 1'b0; end
      if (vblank_clr) vblank_q <= 1'b0;
      if (s0_set)  s0_q  <= 1'b1;
      if (ovf_set) ovf_q <= 1'b1;
      if (vack) begin
        vreq <= 1'b0;
        if (!vreq_we) rbuf_q <= vrdata;
      end
      if (rd && sel == 3'd2) begin
        vblank_q <= 1'b0;
        toggle_q <= 1'b0;
      end
      if (cs && sel == 3'd4) oam_addr <= oam_addr + 8'd1;
      if (wr) begin
        unique case (sel)
          3'd0: ctrl <= din;
          3'd1: mask <= din;
          3'd3: oam_addr <= din;
          3'd5: begin
            if (!toggle_q) scroll[7:0]  <= din;
            else           scroll[15:8] <= din;
            toggle_q <= !toggle_q;
          end
          3'd6: begin
            if (!toggle_q) vaddr_q[13:8] <= din[5:0];
            else           vaddr_q[7:0]  <= din;
            toggle_q <= !toggle_q;
          end
          default: ;
        endcase
      end
      if (cs && sel == 3'd7 && !(wr && vreq && vreq_we)) begin
        if (!is_pal) begin
          vreq       <= 1'b1;
          vreq_we    <= we;
          vreq_addr  <= vaddr_q;
          vreq_wdata <= din;
        end
        vaddr_q <= vaddr_q + (ctrl[2] ? 14'd32 : 14'd1);
      end
    end
  end
endmodule
