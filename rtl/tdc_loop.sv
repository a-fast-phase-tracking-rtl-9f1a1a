// tdc_loop: the fast phase-compensation path of the ADPLL.
//
// At each phase clock it takes the TDC code of the comparison just made
// (the lead TDC's code when FB_CLK led HSYNC, the lag TDC's code when it
// lagged, nothing inside the PFD dead zone), multiplies it by the loop gain
// and adds the result, once, to the controller's base code:
//   dco_code_frac = dco_code_base + sign * tdc_code * gain
// The correction is not accumulated: it is replaced at the next phase clock,
// so it shifts the phase of the next HSYNC line without moving the average
// frequency. The sigma-delta modulator spreads it evenly over the pixel
// clocks of the line, which is what lets the loop remove an HSYNC jitter
// step within one line.
//
// Units: gain is unsigned Q8.4, in LSBs of the 8-bit fraction field per TDC
// count; the ideal value is T_tdc * 2^8 / (T_fine * M) (the document's ideal
// TDC gain, scaled to this code's fraction width). Sign: FB_CLK leading means
// the line came out short, so the code (the period) goes up.
//
// This design's choices: the sum saturates inside the 14-bit fine+fraction
// field and leaves the coarse code alone (the controller holds the coarse
// code once it is chosen), and the correction is zero while `en` is low.
// The coarse field of dco_code_frac is therefore dco_code_base's coarse
// field passed straight through.
//
// Timing: cp_code is registered on the phase clock; dco_code_frac is
// combinational from dco_code_base and the registered correction.
module tdc_loop
  import adpll_pkg::*;
(
  input  logic              clk,          // phase clock
  input  logic              rst_n,
  input  logic              en,           // EN_TDC_LOOP and phase tracking
  input  logic              lead,         // FB_CLK led REF_CLK
  input  logic              lag,          // FB_CLK lagged REF_CLK
  input  logic [TDC_W-1:0]  code_lead,
  input  logic [TDC_W-1:0]  code_lag,
  input  logic [11:0]       gain,         // Q8.4
  input  logic [CODE_W-1:0] dco_code_base,
  output logic signed [LOW_W+1:0] cp_code,
  output logic [CODE_W-1:0] dco_code_frac
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [TDC_W-1:0]     tdc_code;
  logic [TDC_W+11:0]    prod;
  logic [LOW_W:0]       mag;

  // Lead/lag selection (the multiplexer after the two TDCs).
  always_comb begin
    if (lead)     tdc_code = code_lead;
    else if (lag) tdc_code = code_lag;
    else          tdc_code = '0;
    prod = (TDC_W+12)'(tdc_code) * (TDC_W+12)'(gain);
    // drop the 4 fraction bits of the gain, saturate to the field size
    if ((prod >> 4) > (TDC_W+12)'({LOW_W{1'b1}})) mag = {1'b0, {LOW_W{1'b1}}};
    else                                           mag = (LOW_W+1)'(prod >> 4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cp_code <= '0;
    else if (!en)        cp_code <= '0;
    else if (lead)       cp_code <=  $signed({1'b0, mag});
    else if (lag)        cp_code <= -$signed({1'b0, mag});
    else                 cp_code <= '0;
  end

  // Apply the correction to the fine+fraction field, saturating.
  logic signed [LOW_W+2:0] low_sum;

  always_comb begin
    low_sum = $signed({3'b000, dco_code_base[LOW_W-1:0]}) + (LOW_W+3)'(cp_code);
    dco_code_frac[CODE_W-1:LOW_W] = dco_code_base[CODE_W-1:LOW_W];
    if (low_sum < 0)
      dco_code_frac[LOW_W-1:0] = '0;
    else if (low_sum > $signed((LOW_W+3)'({LOW_W{1'b1}})))
      dco_code_frac[LOW_W-1:0] = '1;
    else
      dco_code_frac[LOW_W-1:0] = low_sum[LOW_W-1:0];
  end

endmodule
