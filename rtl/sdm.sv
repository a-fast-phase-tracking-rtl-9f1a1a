// sdm: modified first-order sigma-delta modulator that dithers the DCO code.
//
// The 21-bit control word {coarse, fine, fraction} comes from the slow
// phase-clock domain; the DCO can only take the 13-bit integer part
// {coarse, fine}. Clocked by the fast pixel clock, the modulator adds a 1-bit
// carry yt to the integer part on a fraction xf/2^F of the cycles, so that the
// average DCO period over one HSYNC line equals the fractional code. With the
// large multiplication factor of the application (800..2160 pixel clocks per
// line) the over-sampling ratio comes for free.
//
// Structure as in the document's modified first-order SDM: the fraction,
// zero-extended by two bits, minus the delayed carry shifted left by F, is
// accumulated in an (F+2)-bit register; the carry yt is the accumulator sum
// shifted right by F (its bit F). y = xi + yt.
//
// Choices of this design: SD_MODE keeps 8, 6, 4 or 0 upper fraction bits
// (mode 3 = 0 bits switches dithering off, as the pad table says); the
// output is registered so the DCO sees one clean code change per pixel clock;
// when the fine field is already at its maximum the carry is dropped instead
// of rippling into the coarse field, so the dither never crosses a
// coarse/fine boundary.
//
// Interface: code_in must be stable in the pixel-clock domain (see
// code_sync). en = 0 clears the accumulator and passes the integer part.
// Latency: one pixel clock from code_in to code_out.
module sdm
  import adpll_pkg::*;
(
  input  logic              clk,       // pixel clock
  input  logic              rst_n,
  input  logic              en,        // dithering enabled by the controller
  input  logic [1:0]        sd_mode,   // fraction bits in use: 8/6/4/0
  input  logic [CODE_W-1:0] code_in,   // {coarse, fine, frac}
  output logic [INT_W-1:0]  code_out   // {coarse, fine} to the DCO
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned F = FRAC_W;

  logic [INT_W-1:0] xi;
  logic [F-1:0]     xf;
  logic [F+1:0]     acc, sum;
  logic             yt, yt_d;
  logic             dither;

  assign xi     = code_in[CODE_W-1:F];
  assign xf     = code_in[F-1:0] & sd_frac_mask(sd_mode);
  assign dither = en && (sd_mode != 2'd3);

  // Difference (x - delayed y) then integration.
  assign sum = acc + {2'b00, xf} - ((F+2)'(yt_d) << F);
  assign yt  = sum[F];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      yt_d     <= 1'b0;
      code_out <= '0;
    end else if (!dither) begin
      acc      <= '0;
      yt_d     <= 1'b0;
      code_out <= xi;
    end else begin
      acc      <= sum;
      yt_d     <= yt;
      if (yt && (xi[FINE_W-1:0] != {FINE_W{1'b1}}))
        code_out <= xi + 1'b1;
      else
        code_out <= xi;
    end
  end

endmodule
