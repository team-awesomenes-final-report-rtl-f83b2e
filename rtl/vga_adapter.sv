// vga_adapter: shows the 256x240 NES picture on a 640x480 VGA monitor.
//
// Generates 640x480 VGA timing from the pixel clock (horizontal 640 visible +
// 16 front porch + 96 sync + 48 back porch, vertical 480 + 10 + 2 + 33, both
// syncs active low). Every NES pixel is shown twice on a line and every NES
// line on two VGA lines, giving a 512x480 image; the remaining 128 columns
// form two 64-pixel black bars. The framebuffer is read one clock ahead
// (synchronous read), and each colour code is converted to RGB through the
// NES-to-VGA lookup table. `frame_start` pulses at the first pixel of each
// VGA frame, when the framebuffer chooses which buffer to show.
// Timing values are standard VGA figures chosen by this design; the outputs
// are registered one clock after the counters.
//
// Pixel and line doubling to 512x480 with two 64-pixel bars follow the
// original design; the sync and porch widths are the standard 640x480 ones.
module vga_adapter #(
  parameter int unsigned H_VIS = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33,
  parameter int unsigned BAR   = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [7:0] fb_x,
  output logic [7:0] fb_y,
  input  logic [5:0] fb_color,
  output logic       frame_start,
  output logic       hsync,
  output logic       vsync,
  output logic [7:0] red,
  output logic [7:0] green,
  output logic [7:0] blue
);
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  logic [10:0] h_q, v_q;
  logic        img, img_q;
  logic        hs, vs;
  logic [23:0] rgb;
  logic [10:0] hx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_q <= '0;
      v_q <= '0;
    end else if (32'(h_q) == H_TOT - 1) begin
      h_q <= '0;
      v_q <= (32'(v_q) == V_TOT - 1) ? 11'd0 : v_q + 11'd1;
    end else begin
      h_q <= h_q + 11'd1;
    end
  end

  assign img  = 32'(h_q) >= BAR && 32'(h_q) < H_VIS - BAR && 32'(v_q) < V_VIS;
  assign hx   = h_q - 11'(BAR);
  assign fb_x = hx[8:1];
  assign fb_y = v_q[8:1];
  assign hs   = !(32'(h_q) >= H_VIS + H_FP && 32'(h_q) < H_VIS + H_FP + H_SYNC);
  assign vs   = !(32'(v_q) >= V_VIS + V_FP && 32'(v_q) < V_VIS + V_FP + V_SYNC);
  assign frame_start = rst_n && h_q == 11'd0 && v_q == 11'd0;

  vga_palette u_lut (.code(fb_color), .rgb);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      img_q <= 1'b0; hsync <= 1'b1; vsync <= 1'b1;
    end else begin
      img_q <= img;
      hsync <= hs;
      vsync <= vs;
    end
  end

  assign red   = img_q ? rgb[23:16] : 8'h00;
  assign green = img_q ? rgb[15:8]  : 8'h00;
  assign blue  = img_q ? rgb[7:0]   : 8'h00;
endmodule
