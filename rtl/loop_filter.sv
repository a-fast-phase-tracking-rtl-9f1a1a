// loop_filter: digital loop filter of the ADPLL controller.
//
// It keeps the last DEPTH (10) DCO control codes the controller has sent it
// and gives their trimmed average: the largest and the smallest stored code
// are left out and the remaining DEPTH-2 (8) are averaged, so a single code
// pulled off by HSYNC jitter does not move the baseline. The average is the
// controller's avg_dco_code, the baseline frequency it reloads on each phase
// polarity.
//
// Storage is a shift register: each `load` pushes `code_in` in and drops the
// oldest entry. The document says both that ten codes are stored and averaged
// without their extremes, and that "the maximum and minimum stored code will
// be replaced by new input DCO control code"; this design reads the second
// sentence as "the extremes do not count" and replaces the oldest code, which
// is its own choice. `flush` empties the filter (used when the controller
// fixes the coarse code). `ok` rises once DEPTH codes have been loaded since
// reset or flush.
//
// Timing: clocked by the slow phase clock; avg and ok are combinational from
// the registers, so they reflect codes loaded up to the previous edge.
module loop_filter
  import adpll_pkg::*;
#(
  parameter int unsigned DEPTH = 10,  // stored codes (M + 2 with M = 8 averaged)
  parameter int unsigned W     = CODE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         flush,
  input  logic [W-1:0] code_in,
  output logic [W-1:0] avg,
  output logic         ok
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);
  localparam int unsigned SUM_W = W + $clog2(DEPTH) + 1;

  logic [W-1:0]     taps [DEPTH];
  logic [CNT_W-1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) taps[i] <= '0;
      fill <= '0;
    end else if (flush) begin
      fill <= '0;
    end else if (load) begin
      taps[0] <= code_in;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
      if (fill != CNT_W'(DEPTH)) fill <= fill + 1'b1;
    end
  end

  assign ok = (fill == CNT_W'(DEPTH));

  // Trimmed mean: (sum - max - min) / (DEPTH - 2). DEPTH - 2 = 8 makes the
  // division a shift; other depths use a constant divider.
  logic [SUM_W-1:0] sum, trimmed;
  logic [W-1:0]     vmax, vmin;

  always_comb begin
    sum  = '0;
    vmax = taps[0];
    vmin = taps[0];
    for (int i = 0; i < DEPTH; i++) begin
      sum = sum + SUM_W'(taps[i]);
      if (taps[i] > vmax) vmax = taps[i];
      if (taps[i] < vmin) vmin = taps[i];
    end
    trimmed = sum - SUM_W'(vmax) - SUM_W'(vmin);
    avg     = W'(trimmed / SUM_W'(DEPTH - 2));
  end

endmodule
