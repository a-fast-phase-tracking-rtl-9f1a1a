// freq_divider: the feedback divider (FivM) of the ADPLL.
//
// Counts pixel clocks and produces FB_CLK (also called HSOUT), one period per
// M pixel clocks, where M is the multiplication factor chosen by the 4-bit
// DIVM_MODE input (800 for VGA up to 2160 for UXGA, plus test factors 32 to
// 5600, per the chip's pad table). FB_CLK is compared with HSYNC by the PFD.
//
// This design's choices: FB_CLK is registered and high for the first
// floor(M/2) pixel clocks of each period, so its rising edge comes one clock
// after the counter wraps; a change of DIVM_MODE takes effect at the next
// wrap.
//
// Timing: FB_CLK rises on the pixel-clock edge that loads count 0; period
// exactly M pixel clocks.
module freq_divider
  import adpll_pkg::*;
(
  input  logic       clk,       // pixel clock
  input  logic       rst_n,
  input  logic [3:0] divm_mode,
  output logic [DIVM_W-1:0] divm,   // factor in use
  output logic       fb_clk
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [DIVM_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      divm   <= divm_value(4'd0);
      fb_clk <= 1'b0;
    end else begin
      if (cnt >= divm - 1'b1) begin
        cnt  <= '0;
        divm <= divm_value(divm_mode);
      end else begin
        cnt <= cnt + 1'b1;
      end
      fb_clk <= (cnt >= divm - 1'b1) || (cnt + 1'b1 < (divm >> 1));
    end
  end

endmodule
