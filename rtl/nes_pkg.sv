// nes_pkg: types and constants shared by the NES modules.
//
// Holds the ALU operation codes of the 6502 datapath, the pAPU length-counter
// load table, the duty-cycle waveforms of the square channel and the PPU
// frame geometry. The length table and duty selections are the values of the
// NES hardware as used on the console; the encodings of the enums are
// this design's own choice.
package nes_pkg;

  // 12-function ALU of the CPU (order: A+B, A+B+Cin, A-B, A-B-(1-Cin), AND,
  // OR, BIT, XOR, shift left, rotate left, shift right, rotate right).
  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,
    ALU_ADC = 4'd1,
    ALU_SUB = 4'd2,
    ALU_SBC = 4'd3,
    ALU_AND = 4'd4,
    ALU_ORA = 4'd5,
    ALU_BIT = 4'd6,
    ALU_EOR = 4'd7,
    ALU_ASL = 4'd8,
    ALU_ROL = 4'd9,
    ALU_LSR = 4'd10,
    ALU_ROR = 4'd11
  } alu_op_e;

  // Length-counter load value for a 5-bit index {reg[7:4], reg[3]}.
  function automatic logic [7:0] length_lut(input logic [4:0] idx);
    logic [7:0] v;
    unique case (idx)
      5'd0:  v = 8'h0A; 5'd1:  v = 8'hFE; 5'd2:  v = 8'h14; 5'd3:  v = 8'h02;
      5'd4:  v = 8'h28; 5'd5:  v = 8'h04; 5'd6:  v = 8'h50; 5'd7:  v = 8'h06;
      5'd8:  v = 8'hA0; 5'd9:  v = 8'h08; 5'd10: v = 8'h3C; 5'd11: v = 8'h0A;
      5'd12: v = 8'h0E; 5'd13: v = 8'h0C; 5'd14: v = 8'h1A; 5'd15: v = 8'h0E;
      5'd16: v = 8'h0C; 5'd17: v = 8'h10; 5'd18: v = 8'h18; 5'd19: v = 8'h12;
      5'd20: v = 8'h30; 5'd21: v = 8'h14; 5'd22: v = 8'h60; 5'd23: v = 8'h16;
      5'd24: v = 8'hC0; 5'd25: v = 8'h18; 5'd26: v = 8'h48; 5'd27: v = 8'h1A;
      5'd28: v = 8'h10; 5'd29: v = 8'h1C; 5'd30: v = 8'h20; default: v = 8'h1E;
    endcase
    return v;
  endfunction

  // Eight-step square waveform for each duty setting:
  // 00 12.5 %, 01 25 %, 10 50 %, 11 75 % (25 % inverted, low part first).
  function automatic logic [7:0] duty_wave(input logic [1:0] duty);
    logic [7:0] w;
    unique case (duty)
      2'd0: w = 8'b0100_0000;
      2'd1: w = 8'b0110_0000;
      2'd2: w = 8'b0111_1000;
      default: w = 8'b1001_1111;
    endcase
    return w;
  endfunction

  // Bit-reversal of a byte (horizontal mirroring of pattern rows).
  function automatic logic [7:0] rev8(input logic [7:0] v);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = v[7 - i];
    return r;
  endfunction

  // PPU frame geometry: 20 VINT scanlines, one priming scanline (20),
  // 240 rendered scanlines (21..260), one rest scanline (261).
  localparam int unsigned PPU_DOTS      = 341;
  localparam int unsigned PPU_LINES     = 262;
  localparam int unsigned PPU_PRIME     = 20;
  localparam int unsigned PPU_FIRST_VIS = 21;
  localparam int unsigned PPU_LAST_VIS  = 260;

endpackage
