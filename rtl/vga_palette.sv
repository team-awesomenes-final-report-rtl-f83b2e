// vga_palette: converts a 6-bit NES colour code into 24-bit VGA RGB.
//
// A 64-entry lookup table {red, green, blue}, 8 bits each, applied in real
// time by the VGA adapter to every pixel read from the framebuffer. The
// columns $x0, $xD, $xE and $xF are greys, and $xE/$xF are near black.
// The colour values follow the palette table in the design description.
// Purely combinational.
module vga_palette (
  input  logic [5:0]  code,
  output logic [23:0] rgb
);
  always_comb begin
    unique case (code)
      6'h00: rgb = 24'h808080;
      6'h01: rgb = 24'h0000BB;
      6'h02: rgb = 24'h3700BF;
      6'h03: rgb = 24'h8400A6;
      6'h04: rgb = 24'hBB006A;
      6'h05: rgb = 24'hB7001E;
      6'h06: rgb = 24'hB30000;
      6'h07: rgb = 24'h912600;
      6'h08: rgb = 24'h7B2B00;
      6'h09: rgb = 24'h003E00;
      6'h0A: rgb = 24'h00480D;
      6'h0B: rgb = 24'h003C22;
      6'h0C: rgb = 24'h002F66;
      6'h0D: rgb = 24'h000000;
      6'h0E: rgb = 24'h050505;
      6'h0F: rgb = 24'h050505;
      6'h10: rgb = 24'hC8C8C8;
      6'h11: rgb = 24'h0059FF;
      6'h12: rgb = 24'h443CFF;
      6'h13: rgb = 24'hB733CC;
      6'h14: rgb = 24'hFF33AA;
      6'h15: rgb = 24'hFF375E;
      6'h16: rgb = 24'hFF371A;
      6'h17: rgb = 24'hD54B00;
      6'h18: rgb = 24'hC46200;
      6'h19: rgb = 24'h3C7B00;
      6'h1A: rgb = 24'h1E8415;
      6'h1B: rgb = 24'h009566;
      6'h1C: rgb = 24'h0084C4;
      6'h1D: rgb = 24'h111111;
      6'h1E: rgb = 24'h090909;
      6'h1F: rgb = 24'h090909;
      6'h20: rgb = 24'hFFFFFF;
      6'h21: rgb = 24'h0095FF;
      6'h22: rgb = 24'h6F84FF;
      6'h23: rgb = 24'hD56FFF;
      6'h24: rgb = 24'hFF77CC;
      6'h25: rgb = 24'hFF6F99;
      6'h26: rgb = 24'hFF7B59;
      6'h27: rgb = 24'hFF915F;
      6'h28: rgb = 24'hFFA233;
      6'h29: rgb = 24'hA6BF00;
      6'h2A: rgb = 24'h51D96A;
      6'h2B: rgb = 24'h4DD5AE;
      6'h2C: rgb = 24'h00D9FF;
      6'h2D: rgb = 24'h666666;
      6'h2E: rgb = 24'h0D0D0D;
      6'h2F: rgb = 24'h0D0D0D;
      6'h30: rgb = 24'hFFFFFF;
      6'h31: rgb = 24'h84BFFF;
      6'h32: rgb = 24'hBBBBFF;
      6'h33: rgb = 24'hD0BBFF;
      6'h34: rgb = 24'hFFBFEA;
      6'h35: rgb = 24'hFFBFCC;
      6'h36: rgb = 24'hFFC4B7;
      6'h37: rgb = 24'hFFCCAE;
      6'h38: rgb = 24'hFFD9A2;
      6'h39: rgb = 24'hCCE199;
      6'h3A: rgb = 24'hAEEEB7;
      6'h3B: rgb = 24'hAAF7EE;
      6'h3C: rgb = 24'hB3EEFF;
      6'h3D: rgb = 24'hDDDDDD;
      6'h3E: rgb = 24'h111111;
      6'h3F: rgb = 24'h111111;
      default: rgb = 24'h000000;
    endcase
  end
endmodule
