// dco_decoder: turns the 13-bit integer DCO code into the select lines of the
// MUX-type DCO.
//
// The DCO has 128 coarse stages chosen by coarse_sel and a fine stage of 64
// digitally controlled varactor loads enabled by fine_sel, as in the
// document's DCO figures. coarse_sel is one-hot: bit k set makes the ring
// turn back at coarse stage k, so a larger coarse code is a longer loop.
// fine_sel is a thermometer code: fine code f enables the first f loads, so
// each step adds one load, which keeps the fine stage monotonic. With a 6-bit
// fine code at most 63 of the 64 loads are enabled, so fine_sel[63] is
// always 0; the line is kept so the bus matches the 64-cell stage.
//
// The encodings (one-hot and thermometer) are this design's reading of the
// figures, which name the select buses but not their codes.
//
// Timing: purely combinational; the sigma-delta modulator that feeds it has
// a registered output.
module dco_decoder
  import adpll_pkg::*;
(
  input  logic [INT_W-1:0]         code,        // {coarse[6:0], fine[5:0]}
  output logic [2**COARSE_W-1:0]   coarse_sel,  // one-hot
  output logic [2**FINE_W-1:0]     fine_sel     // thermometer
);

  timeunit 1ps;
  timeprecision 1fs;

  logic [COARSE_W-1:0] coarse;
  logic [FINE_W-1:0]   fine;

  assign coarse = code[INT_W-1:FINE_W];
  assign fine   = code[FINE_W-1:0];

  always_comb begin
    coarse_sel = '0;
    coarse_sel[coarse] = 1'b1;
    for (int i = 0; i < 2**FINE_W; i++)
      fine_sel[i] = (i < int'(fine));
  end

endmodule
