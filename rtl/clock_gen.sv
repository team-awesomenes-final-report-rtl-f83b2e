// clock_gen: CPU and PPU clock enables derived from the pixel clock.
//
// The board's 26.666 MHz VGA pixel clock is divided by PPU_DIV = 5 for the
// PPU (5.333 MHz) and by CPU_DIV = 15 for the CPU and pAPU (1.777 MHz), the
// same ratios as the board's clock managers, so there are exactly three PPU
// dots per CPU cycle, as on the NES. Instead of separate clock nets this
// design produces one-cycle clock enables on the single pixel clock; each
// CPU enable coincides with a PPU enable. Synchronous active-low reset.
module clock_gen #(
  parameter int unsigned PPU_DIV = 5,
  parameter int unsigned CPU_DIV = 15
) (
  input  logic clk,
  input  logic rst_n,
  output logic ppu_ce,
  output logic cpu_ce
);
  logic [7:0] pcnt_q, ccnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pcnt_q <= '0;
      ccnt_q <= '0;
    end else begin
      pcnt_q <= (32'(pcnt_q) == PPU_DIV - 1) ? 8'd0 : pcnt_q + 8'd1;
      ccnt_q <= (32'(ccnt_q) == CPU_DIV - 1) ? 8'd0 : ccnt_q + 8'd1;
    end
  end

  assign ppu_ce = rst_n && (32'(pcnt_q) == PPU_DIV - 1);
  assign cpu_ce = rst_n && (32'(ccnt_q) == CPU_DIV - 1);
endmodule
